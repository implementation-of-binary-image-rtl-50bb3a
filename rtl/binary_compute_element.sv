// binary_compute_element: coarse-grained stage of a binary compute unit.
//
// Two input control multiplexers choose the operands a and b, each N x N
// bits, from the line-memory window of the unit's input, the block offered on
// the external (SDRAM) port or a parameter word of the register group
// (param0 for a, param1 for b). N binary logic elements, one per window row,
// combine a and b bit by bit. The N x N logic result then feeds a reduction
// element and a binary median (or rank-order) filter, both restricted to the active mask
// square. The three results are registered together when en is high, so they
// appear one clock after the window, aligned with each other.
//
// Typical settings: erosion by a structuring element B is operand a = window,
// b = parameter ~B, logic OR, reduction AND; dilation is a = window,
// b = parameter B, logic AND, reduction OR (B stored reflected for a
// non-symmetric element). The structure follows the source description; operand
// encodings and the a/b parameter assignment are this design's choice.
module binary_compute_element
  import bip_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  bce_cfg_t       cfg,
  input  logic [N*N-1:0] active,
  input  logic [N*N-1:0] win,
  input  logic [N*N-1:0] blk,
  output logic [N*N-1:0] logic_res,
  output logic           red_res,
  output logic           med_res
);

  logic [N*N-1:0] a, b, l;
  logic           r, m;

  function automatic logic [N*N-1:0] pick(input in_sel_e s, input logic [N*N-1:0] w,
                                          input logic [N*N-1:0] k, input logic [31:0] p);
    unique case (s)
      ISEL_WINDOW: return w;
      ISEL_BLOCK:  return k;
      ISEL_PARAM:  return p[N*N-1:0];
      default:     return '0;
    endcase
  endfunction

  assign a = pick(cfg.sel_a, win, blk, cfg.param0);
  assign b = pick(cfg.sel_b, win, blk, cfg.param1);

  for (genvar i = 0; i < N; i++) begin : g_le
    binary_logic_element #(.N(N)) u_le (
      .a (a[i*N +: N]),
      .b (b[i*N +: N]),
      .op(cfg.lop),
      .y (l[i*N +: N])
    );
  end

  reduction_element #(.N(N)) u_red (
    .x     (l),
    .active(active),
    .op    (cfg.rop),
    .y     (r)
  );

  binary_median_filter #(.N(N)) u_med (
    .x     (l),
    .active(active),
    .rank  (cfg.rank),
    .y     (m)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      logic_res <= '0;
      red_res   <= 1'b0;
      med_res   <= 1'b0;
    end else if (en) begin
      logic_res <= l;
      red_res   <= r;
      med_res   <= m;
    end
  end

endmodule
