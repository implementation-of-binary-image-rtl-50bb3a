// binary_logic_element: bitwise logic on one N-bit row of the window.
//
// A binary compute element holds N of these, one per window row. Each applies
// AND, OR, NOT, NAND, NOR, XOR, XNOR or straight-through to its two N-bit
// operands, bit by bit, as the operation list of the source description gives it. NOT
// and straight-through use operand a only. Purely combinational; the caller
// registers the result.
module binary_logic_element
  import bip_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic_op_e    op,
  output logic [N-1:0] y
);

  always_comb begin
    unique case (op)
      LOP_AND:  y = a & b;
      LOP_OR:   y = a | b;
      LOP_NOT:  y = ~a;
      LOP_NAND: y = ~(a & b);
      LOP_NOR:  y = ~(a | b);
      LOP_XOR:  y = a ^ b;
      LOP_XNOR: y = ~(a ^ b);
      default:  y = a;
    endcase
  end

endmodule
