// reduction_element: reduces the N x N logic result to one bit.
//
// Reduction AND, OR, NAND, NOR, XOR, XNOR or straight-through, as listed in
// the source description. Only the bits inside the configured mask square ("active")
// take part: inactive bits are replaced by the neutral value of the
// reduction (1 for AND, 0 for OR and XOR). Straight-through returns the centre
// bit, which is this design's choice. Purely combinational.
module reduction_element
  import bip_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic [N*N-1:0] x,
  input  logic [N*N-1:0] active,
  input  red_op_e        op,
  output logic           y
);

  localparam int unsigned C = (N - 1) / 2;

  logic r_and, r_or, r_xor;

  always_comb begin
    r_and = &(x | ~active);
    r_or  = |(x & active);
    r_xor = ^(x & active);
    unique case (op)
      ROP_AND:  y = r_and;
      ROP_OR:   y = r_or;
      ROP_NAND: y = ~r_and;
      ROP_NOR:  y = ~r_or;
      ROP_XOR:  y = r_xor;
      ROP_XNOR: y = ~r_xor;
      default:  y = x[C*N+C];
    endcase
  end

endmodule
