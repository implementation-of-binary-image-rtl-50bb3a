// set_element: fine-grained 1-bit set operation of a binary compute unit.
//
// Union, intersection, complement (of a), subtraction (a and not b), XOR and
// straight-through (a), the operations the source description lists. The source description also
// names "addition"; for 1-bit sets this design takes it to be XOR, the sum
// modulo 2. The result is registered when en is high, so the element adds one
// pipeline stage to the compute unit.
module set_element
  import bip_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  logic    a,
  input  logic    b,
  input  set_op_e op,
  output logic    y
);

  logic y_d;

  always_comb begin
    unique case (op)
      SOP_UNION:     y_d = a | b;
      SOP_INTERSECT: y_d = a & b;
      SOP_COMPL:     y_d = ~a;
      SOP_SUBTRACT:  y_d = a & ~b;
      SOP_XOR:       y_d = a ^ b;
      default:       y_d = a;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= 1'b0;
    else if (en) y <= y_d;
  end

endmodule
