// reconfigurable_binary_processing_module: the array of binary compute units
// and the output control logic.
//
// NUM_BCU binary compute units work on 1-bit pixel streams. The connection
// pattern is set per unit by cfg[u].src: 0 takes the image stream, k (1..u)
// takes the result stream of unit k-1. Units that all take the image run in
// parallel; a chain of units runs an algorithm as a pipeline (for example an
// opening is an erosion unit followed by a dilation unit). Only earlier units
// can be chosen, so no combinational or streaming loop can be configured; a
// source index above u leaves the unit without input. The output control
// logic then picks the unit given by out_sel and packs its stream into PW-bit
// words.
//
// pix_ready is the AND of the ready outputs of the units that take the
// image. idle is high when every unit is idle; a frame is complete only
// when all units, not just the selected one, have drained. blk_req[u] asks for the external block of unit u (see
// binary_compute_unit). The division into compute units and output control
// logic follows the source description; the source-select scheme is this design's.
module reconfigurable_binary_processing_module
  import bip_pkg::*;
#(
  parameter int unsigned N       = 5,
  parameter int unsigned MAX_W   = 640,
  parameter int unsigned NUM_BCU = 4,
  parameter int unsigned PW      = 32,
  localparam int unsigned SW = (NUM_BCU > 1) ? $clog2(NUM_BCU) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic [15:0]        width,
  input  logic [15:0]        height,
  input  bcu_cfg_t           cfg [NUM_BCU],
  input  logic [SW-1:0]      out_sel,
  input  logic               pix_valid,
  input  logic               pix,
  output logic               pix_ready,
  output logic [NUM_BCU-1:0] blk_req,
  input  logic [N*N-1:0]     blk,
  output logic [NUM_BCU-1:0] unit_valid,
  output logic [NUM_BCU-1:0] unit_pix,
  output logic               word_valid,
  output logic [PW-1:0]      word,
  output logic               word_last,
  output logic               idle
);

  logic [NUM_BCU-1:0] in_valid, in_pix, ready, ready_ok, unit_idle;

  for (genvar u = 0; u < NUM_BCU; u++) begin : g_bcu
    always_comb begin
      in_valid[u] = 1'b0;
      in_pix[u]   = 1'b0;
      if (cfg[u].src == 3'd0) begin
        in_valid[u] = pix_valid;
        in_pix[u]   = pix;
      end else begin
        for (int s = 0; s < u; s++) begin
          if (32'(cfg[u].src) == s + 1) begin
            in_valid[u] = unit_valid[s];
            in_pix[u]   = unit_pix[s];
          end
        end
      end
    end

    assign ready_ok[u] = ready[u] || (cfg[u].src != 3'd0);

    binary_compute_unit #(.N(N), .MAX_W(MAX_W)) u_bcu (
      .clk      (clk),
      .rst_n    (rst_n),
      .clear    (clear),
      .width    (width),
      .height   (height),
      .cfg      (cfg[u]),
      .pix_valid(in_valid[u]),
      .pix      (in_pix[u]),
      .pix_ready(ready[u]),
      .blk_req  (blk_req[u]),
      .blk      (blk),
      .out_valid(unit_valid[u]),
      .out_pix  (unit_pix[u]),
      .idle     (unit_idle[u])
    );
  end

  assign pix_ready = &ready_ok;
  assign idle      = &unit_idle;

  output_control_logic #(.NUM_BCU(NUM_BCU), .PW(PW)) u_ocl (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (clear),
    .total     (32'(width) * 32'(height)),
    .sel       (out_sel),
    .unit_valid(unit_valid),
    .unit_pix  (unit_pix),
    .word_valid(word_valid),
    .word      (word),
    .word_last (word_last)
  );

endmodule
