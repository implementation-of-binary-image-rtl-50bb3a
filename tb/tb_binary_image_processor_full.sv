// tb_binary_image_processor_full: one full-size frame through the processor
// with every parameter at its default (640 x 480 frame, 5 x 5 window, four
// units, 32-bit words). Units 0 -> 1 form an opening with a 3 x 3 square
// (erosion then dilation), units 2 and 3 run a 5x5 median and a pass-through
// in parallel. The routed result is compared word by word with the reference
// model, and the frame must take no more than one clock per pixel plus the
// line latency of the two chained units.
module tb_binary_image_processor_full;
  import bip_pkg::*;
  import bip_model_pkg::*;
  localparam int W = 640, H = 480, N = 5, U = 4, PW = 32, NN = N * N;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [7:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0, cfg_rdata;
  logic start = 0, busy, frame_done;
  logic in_valid = 0, in_ready;
  logic [PW-1:0] in_data = '0;
  logic [U-1:0] blk_req;
  logic [NN-1:0] blk_data = '0;
  logic out_valid, out_last;
  logic [PW-1:0] out_data;
  int checks = 0, failures = 0;
  logic [PW-1:0] words [$];
  int cyc, t_start, t_done;

  binary_image_processor dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
    .cfg_rdata(cfg_rdata), .start(start), .busy(busy), .frame_done(frame_done),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data), .blk_req(blk_req),
    .blk_data(blk_data), .out_valid(out_valid), .out_data(out_data), .out_last(out_last));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid) words.push_back(out_data);
    if (frame_done) t_done <= cyc;
  end

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    bcu_cfg_t c [U];
    frame_t img, o [U];
    int nw, k, bad, budget;
    cyc = 0; t_done = 0;
    // image: random rectangles on a noisy background
    img = new[W * H];
    foreach (img[i]) img[i] = ($urandom % 100) < 8;
    for (int r = 0; r < 60; r++) begin
      int x0, y0, rw, rh;
      x0 = $urandom % W; y0 = $urandom % H; rw = 2 + $urandom % 80; rh = 2 + $urandom % 60;
      for (int y = y0; y < y0 + rh && y < H; y++)
        for (int x = x0; x < x0 + rw && x < W; x++) img[y*W + x] = 1'b1;
    end
    c[0] = cfg_morph(1, 3, 0); c[1] = cfg_morph(0, 3, 1);
    c[2] = cfg_pass(); c[2].mask_size = 4'd5; c[2].out_sel = TAP_E0_MED;
    c[3] = cfg_pass();
    for (int u = 0; u < U; u++) o[u] = unit_model((c[u].src == 0) ? img : o[int'(c[u].src) - 1], W, H, N, c[u], u);

    repeat (3) @(negedge clk);
    rst_n = 1;
    // width and height keep their reset values (640 x 480)
    wr(REG_OUTSEL, 32'd1);
    for (int u = 0; u < U; u++) begin
      logic [7:0] b;
      b = REG_UNIT0 + 8'(16 * u);
      wr(b + 8'(UOFS_CTRL), unit_ctrl_word(c[u]));
      wr(b + 8'(UOFS_E0CTL), elem_ctrl_word(c[u].e0));
      wr(b + 8'(UOFS_E0P0), c[u].e0.param0);
      wr(b + 8'(UOFS_E0P1), c[u].e0.param1);
      wr(b + 8'(UOFS_E1CTL), elem_ctrl_word(c[u].e1));
      wr(b + 8'(UOFS_E1P0), c[u].e1.param0);
      wr(b + 8'(UOFS_E1P1), c[u].e1.param1);
    end
    nw = W * H / PW;
    @(negedge clk); start = 1; t_start = cyc; @(negedge clk); start = 0;
    k = 0;
    while (k < nw) begin
      in_valid = 1;
      for (int b = 0; b < PW; b++) in_data[b] = img[k*PW + b];
      @(posedge clk);
      if (in_ready) k++;
      #1;
    end
    in_valid = 0;
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (words.size() != nw) begin
      failures++;
      $display("FAIL %0d words, exp %0d", words.size(), nw);
    end else begin
      bad = 0;
      for (int q = 0; q < nw; q++) begin
        logic [PW-1:0] e;
        for (int b = 0; b < PW; b++) e[b] = o[1][q*PW + b];
        if (words[q] !== e) bad++;
      end
      checks++;
      if (bad != 0) begin failures++; $display("FAIL %0d wrong words", bad); end
    end
    // one pixel per clock plus two units' line latency and a small pipeline margin
    budget = W * H + 2 * (2 * W + 2) + 40;
    $display("frame took %0d clocks (budget %0d)", t_done - t_start, budget);
    checks++;
    if (t_done - t_start > budget) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
