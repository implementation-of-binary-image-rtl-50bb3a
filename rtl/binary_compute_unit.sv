// binary_compute_unit: one reconfigurable unit of the processing module.
//
// The unit windows its 1-bit input stream with its own line memories
// (window_generator), runs two binary compute elements on the window, lets
// two multiplexers pick the operands of a fine-grained 1-bit set element, and
// lets an output multiplexer pick the unit's result. The multiplexers choose
// among the taps listed in bip_pkg::tap_e: the original centre pixel, the
// centre bit of either element's logic result, either element's reduction or
// median result, and (output only) the set result.
//
// Pipeline, one window per input pixel:
//   S1 window (window_generator, registered)
//   S2 compute elements (registered results, centre pixel carried along)
//   S3 set element (registered; the other taps are delayed to match)
//   S4 output multiplexer (registered out_pix with out_valid)
// so out_valid follows the window pulse by three clocks. A frame of
// width*height pixels gives width*height outputs in raster order.
//
// idle is high when no pixel of a frame is inside the unit.
// pix_ready is low while the window generator flushes the end of a frame;
// pixels offered then are dropped. blk_req is high in the cycle a window is presented; the external block for
// that pixel must be on blk in the same cycle. The two-element structure, the
// set element and the multiplexer sources follow the source description; the tap
// encoding, the pipeline depth and the block request are this design's.
module binary_compute_unit
  import bip_pkg::*;
#(
  parameter int unsigned N     = 5,
  parameter int unsigned MAX_W = 640
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic [15:0]    width,
  input  logic [15:0]    height,
  input  bcu_cfg_t       cfg,
  input  logic           pix_valid,
  input  logic           pix,
  output logic           pix_ready,
  output logic           blk_req,
  input  logic [N*N-1:0] blk,
  output logic           out_valid,
  output logic           out_pix,
  output logic           idle
);

  localparam int unsigned C = (N - 1) / 2;

  logic           win_valid, centre;
  logic [N*N-1:0] win, active;
  logic [63:0]    act_full;
  logic [N*N-1:0] l0, l1;
  logic           r0, r1, m0, m1;
  logic           v2, c2, v3;
  logic [7:0]     tap2, tap3;
  logic           set_y;
  logic           win_idle;

  assign act_full = active_mask(N, int'(cfg.mask_size));
  assign active   = act_full[N*N-1:0];

  window_generator #(.N(N), .MAX_W(MAX_W)) u_win (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (clear),
    .width    (width),
    .height   (height),
    .border   (cfg.border),
    .in_valid (pix_valid),
    .in_pix   (pix),
    .in_ready (pix_ready),
    .win_valid(win_valid),
    .win      (win),
    .centre   (centre),
    .idle     (win_idle)
  );

  assign blk_req = win_valid;

  binary_compute_element #(.N(N)) u_e0 (
    .clk(clk), .rst_n(rst_n), .en(win_valid), .cfg(cfg.e0), .active(active),
    .win(win), .blk(blk), .logic_res(l0), .red_res(r0), .med_res(m0)
  );

  binary_compute_element #(.N(N)) u_e1 (
    .clk(clk), .rst_n(rst_n), .en(win_valid), .cfg(cfg.e1), .active(active),
    .win(win), .blk(blk), .logic_res(l1), .red_res(r1), .med_res(m1)
  );

  // S2 bookkeeping
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0;
      c2 <= 1'b0;
    end else begin
      v2 <= win_valid;
      if (win_valid) c2 <= centre;
    end
  end

  assign tap2 = {1'b0, m1, r1, l1[C*N+C], m0, r0, l0[C*N+C], c2};

  // S3: set element and delayed taps
  set_element u_set (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (v2),
    .a    (tap2[cfg.set_a]),
    .b    (tap2[cfg.set_b]),
    .op   (cfg.sop),
    .y    (set_y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v3          <= 1'b0;
      tap3[6:0]   <= '0;
    end else begin
      v3 <= v2;
      if (v2) tap3[6:0] <= tap2[6:0];
    end
  end
  assign tap3[7] = set_y;

  // S4: unit output multiplexer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= 1'b0;
    end else begin
      out_valid <= v3;
      if (v3) out_pix <= tap3[cfg.out_sel];
    end
  end

  // nothing of a frame left anywhere in the unit
  assign idle = win_idle && !win_valid && !v2 && !v3 && !out_valid;

endmodule
