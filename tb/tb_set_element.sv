// tb_set_element: every operand pair through every set operation; the
// result must appear one clock after the enable and hold while it is low.
module tb_set_element;
  import bip_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, a = 0, b = 0, y;
  set_op_e op = SOP_PASS;
  int checks = 0, failures = 0;

  set_element dut (.clk(clk), .rst_n(rst_n), .en(en), .a(a), .b(b), .op(op), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic model(int o, logic aa, logic bb);
    case (o)
      0: return aa || bb;
      1: return aa && bb;
      2: return !aa;
      3: return aa && !bb;
      4: return aa != bb;
      default: return aa;
    endcase
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int o = 0; o < 6; o++) begin
      for (int v = 0; v < 4; v++) begin
        logic held;
        @(negedge clk);
        op = set_op_e'(o); a = v[1]; b = v[0]; en = 1;
        @(negedge clk);
        en = 0;
        checks++;
        if (y !== model(o, v[1], v[0])) begin
          failures++;
          $display("FAIL op=%0d a=%b b=%b y=%b", o, v[1], v[0], y);
        end
        held = y;
        a = ~a; b = ~b;
        @(negedge clk);
        checks++;
        if (y !== held) begin
          failures++;
          $display("FAIL output changed without enable");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
