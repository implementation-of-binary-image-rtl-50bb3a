// tb_output_image_control: frames of random length; every word must leave
// one clock after it arrives, busy must span start to the last word,
// frame_done must pulse once after it, and words outside a frame are dropped.
module tb_output_image_control;
  localparam int PW = 16;
  logic clk = 0, rst_n = 0, start = 0, word_valid = 0, word_last = 0;
  logic [PW-1:0] word = '0;
  logic out_valid, out_last, frame_done, busy;
  logic [PW-1:0] out_data;
  logic [31:0] word_count;
  int checks = 0, failures = 0;
  logic [PW-1:0] got [$];
  int n_done;

  output_image_control #(.PW(PW)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .word_valid(word_valid), .word(word),
    .word_last(word_last), .out_valid(out_valid), .out_data(out_data), .out_last(out_last),
    .frame_done(frame_done), .busy(busy), .word_count(word_count));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (out_valid) got.push_back(out_data);
    if (frame_done) n_done++;
  end

  task automatic frame(int n);
    logic [PW-1:0] sent [$];
    got.delete(); n_done = 0;
    // a stray word before start is dropped
    word_valid = 1; word = 16'hDEAD; word_last = 0;
    @(negedge clk); word_valid = 0;
    start = 1; @(negedge clk); start = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL busy not set"); end
    for (int k = 0; k < n; k++) begin
      if ($urandom % 2) @(negedge clk);
      word_valid = 1; word = PW'($urandom); word_last = (k == n - 1);
      sent.push_back(word);
      @(negedge clk);
      word_valid = 0;
      #1;
      checks++;
      if (got.size() != k + 1 || got[k] !== sent[k] || busy !== (k != n - 1)) begin
        failures++;
        $display("FAIL n=%0d word %0d", n, k);
      end
    end
    @(negedge clk);
    checks++;
    if (n_done != 1 || word_count != 32'(n)) begin
      failures++;
      $display("FAIL n=%0d done=%0d count=%0d", n, n_done, word_count);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) frame(1 + $urandom % 30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
