// tb_binary_logic_element: random operands through every operation of the
// binary logic element, compared bit by bit with a truth-table model.
module tb_binary_logic_element;
  import bip_pkg::*;
  localparam int N = 5;
  logic [N-1:0] a, b, y;
  logic_op_e op;
  int checks = 0, failures = 0;

  binary_logic_element #(.N(N)) dut (.a(a), .b(b), .op(op), .y(y));

  // truth table per operation, indexed by {a_bit, b_bit}
  function automatic logic [3:0] table_of(logic_op_e o);
    case (o)
      LOP_AND:  return 4'b1000;
      LOP_OR:   return 4'b1110;
      LOP_NOT:  return 4'b0011;
      LOP_NAND: return 4'b0111;
      LOP_NOR:  return 4'b0001;
      LOP_XOR:  return 4'b0110;
      LOP_XNOR: return 4'b1001;
      default:  return 4'b1100;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 8; o++) begin
      for (int t = 0; t < 64; t++) begin
        logic [N-1:0] exp;
        op = logic_op_e'(o);
        a  = N'($urandom);
        b  = N'($urandom);
        #1;
        for (int i = 0; i < N; i++) exp[i] = table_of(op)[{a[i], b[i]}];
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL op=%0d a=%b b=%b y=%b exp=%b", o, a, b, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
