// tb_line_memory: the memory used as a one-line delay for several widths,
// with idle cycles between pushes; every output must equal the bit pushed
// exactly one line earlier.
module tb_line_memory;
  localparam int MAX_W = 64;
  localparam int AW = $clog2(MAX_W);
  logic clk = 0, push = 0, din = 0, dout;
  logic [AW-1:0] ptr = '0;
  int checks = 0, failures = 0;
  logic hist [$];

  line_memory #(.MAX_W(MAX_W)) dut (.clk(clk), .push(push), .ptr(ptr), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int wi = 0; wi < 3; wi++) begin
      int w;
      w = (wi == 0) ? MAX_W : (wi == 1) ? 17 : 3;
      hist.delete();
      ptr = '0;
      for (int t = 0; t < 6 * w; t++) begin
        @(negedge clk);
        push = 0;
        if ($urandom % 4 == 0) begin
          @(negedge clk);   // idle cycle: nothing may move
        end
        din  = 1'($urandom);
        push = 1;
        #1;
        if (t >= w) begin
          checks++;
          if (dout !== hist[t - w]) begin
            failures++;
            $display("FAIL w=%0d t=%0d dout=%b exp=%b", w, t, dout, hist[t - w]);
          end
        end
        hist.push_back(din);
        @(posedge clk);
        #1;
        ptr = (int'(ptr) + 1 >= w) ? '0 : ptr + 1'b1;
      end
      push = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
