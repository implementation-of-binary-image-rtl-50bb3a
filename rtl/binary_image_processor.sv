// binary_image_processor: reconfigurable processor for binary (1-bit) images.
//
// Morphological operations (erosion, dilation, and their compositions
// opening and closing), binary median filtering, logic and set operations
// between images are all built from the same resources: NUM_BCU binary
// compute units whose operations and interconnection are set by a register
// group. The top wires four parts together:
//   input_image_control   packed input words -> 1-bit pixel stream
//   config_registers      register group on a simple 32-bit bus
//   reconfigurable_binary_processing_module
//                         compute units + output control logic (select, pack)
//   output_image_control  result words out, frame bookkeeping
//
// Operation: write the registers, pulse start, supply ceil(width*height/PW)
// input words on in_valid/in_ready, and collect ceil(width*height/PW) result
// words from out_valid (the last with out_last, followed by frame_done).
// start is ignored while busy; one frame is processed at a time, and busy
// stays high until every unit has drained, including units whose result is
// not routed out. Change the registers only while busy is low. Pixels
// stream at one per clock; each unit adds (N-1)/2 lines plus a few clocks of
// latency. The external block port (blk_req / blk_data) stands in for the
// SDRAM, from which the compute elements can take an N x N operand instead of
// the line-memory window.
//
// The decomposition follows the source description; the bus, word packing, frame
// protocol and all default sizes (N = 5, 640 x 480, four units, 32-bit words)
// are this design's choices, as the source description gives no numbers for them.
module binary_image_processor
  import bip_pkg::*;
#(
  parameter int unsigned N       = 5,
  parameter int unsigned MAX_W   = 640,
  parameter int unsigned MAX_H   = 480,
  parameter int unsigned NUM_BCU = 4,
  parameter int unsigned PW      = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  // register group
  input  logic               cfg_we,
  input  logic [7:0]         cfg_addr,
  input  logic [31:0]        cfg_wdata,
  output logic [31:0]        cfg_rdata,
  // frame control
  input  logic               start,
  output logic               busy,
  output logic               frame_done,
  // input image
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [PW-1:0]      in_data,
  // external block operand (SDRAM side)
  output logic [NUM_BCU-1:0] blk_req,
  input  logic [N*N-1:0]     blk_data,
  // output image
  output logic               out_valid,
  output logic [PW-1:0]      out_data,
  output logic               out_last
);

  localparam int unsigned SW = (NUM_BCU > 1) ? $clog2(NUM_BCU) : 1;

  logic [15:0]        width, height;
  logic [SW-1:0]      out_sel;
  bcu_cfg_t           cfg [NUM_BCU];
  logic               go, frame_start, in_active;
  logic               pix_valid, pix, pix_ready;
  logic [NUM_BCU-1:0] unit_valid, unit_pix;
  logic               word_valid, word_last;
  logic [PW-1:0]      word;
  logic [31:0]        word_count;
  logic               units_idle, out_busy;

  assign go   = start && !busy;
  assign busy = out_busy || in_active || !units_idle;

  config_registers #(.N(N), .MAX_W(MAX_W), .MAX_H(MAX_H), .NUM_BCU(NUM_BCU)) u_regs (
    .clk    (clk),
    .rst_n  (rst_n),
    .we     (cfg_we),
    .addr   (cfg_addr),
    .wdata  (cfg_wdata),
    .rdata  (cfg_rdata),
    .width  (width),
    .height (height),
    .out_sel(out_sel),
    .cfg    (cfg)
  );

  input_image_control #(.PW(PW)) u_in (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (go),
    .width      (width),
    .height     (height),
    .frame_start(frame_start),
    .active     (in_active),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .in_data    (in_data),
    .pix_valid  (pix_valid),
    .pix        (pix),
    .pix_ready  (pix_ready)
  );

  reconfigurable_binary_processing_module #(
    .N(N), .MAX_W(MAX_W), .NUM_BCU(NUM_BCU), .PW(PW)
  ) u_rbpm (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (frame_start),
    .width     (width),
    .height    (height),
    .cfg       (cfg),
    .out_sel   (out_sel),
    .pix_valid (pix_valid),
    .pix       (pix),
    .pix_ready (pix_ready),
    .blk_req   (blk_req),
    .blk       (blk_data),
    .unit_valid(unit_valid),
    .unit_pix  (unit_pix),
    .word_valid(word_valid),
    .word      (word),
    .word_last (word_last),
    .idle      (units_idle)
  );

  output_image_control #(.PW(PW)) u_out (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (go),
    .word_valid(word_valid),
    .word      (word),
    .word_last (word_last),
    .out_valid (out_valid),
    .out_data  (out_data),
    .out_last  (out_last),
    .frame_done(frame_done),
    .busy      (out_busy),
    .word_count(word_count)
  );

  // the frame geometry must fit the line memories
  property p_size_ok;
    @(posedge clk) disable iff (!rst_n) go |-> (width <= 16'(MAX_W) && height <= 16'(MAX_H)
                                                && width != 0 && height >= 16'((N - 1) / 2));
  endproperty
  a_size_ok: assert property (p_size_ok);

  // a frame's words leave only while it is in flight
  a_out_in_frame: assert property (@(posedge clk) disable iff (!rst_n) word_valid |-> out_busy);

endmodule
