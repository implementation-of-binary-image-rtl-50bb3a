// tb_binary_image_processor: end-to-end test of the processor at a reduced
// size (32 x 24 maximum frame, 5 x 5 window, four units, 16-bit words).
// Everything goes through the ports: configuration by register writes (with
// read-back), packed input words with random gaps, the external block port
// and packed result words. Each frame is compared with the reference model.
// The scenarios make every configurable mechanism happen and count it:
// pipelined unit chains (opening, closing), parallel units, a set operation
// between two elements, the median and rank-order filters, block operands from the external
// port (motion detection against a previous frame), both border values,
// mask sizes 1/3/5, frame sizes that do not fill the last word, and a start
// request ignored while a frame is in flight.
module tb_binary_image_processor;
  import bip_pkg::*;
  import bip_model_pkg::*;
  localparam int N = 5, MAX_W = 32, MAX_H = 24, U = 4, PW = 16, NN = N * N;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [7:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0, cfg_rdata;
  logic start = 0, busy, frame_done;
  logic in_valid = 0, in_ready;
  logic [PW-1:0] in_data = '0;
  logic [U-1:0] blk_req;
  logic [NN-1:0] blk_data;
  logic out_valid, out_last;
  logic [PW-1:0] out_data;

  int checks = 0, failures = 0;
  logic [PW-1:0] words [$];
  logic lasts [$];
  int req_cnt, n_done;
  bit motion_mode;
  frame_t prev;
  // mechanism counters
  int n_rank, n_pipe, n_par, n_set, n_med, n_blk, n_border1, n_mask [6], n_partial, n_ignored;

  binary_image_processor #(.N(N), .MAX_W(MAX_W), .MAX_H(MAX_H), .NUM_BCU(U), .PW(PW)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
    .cfg_rdata(cfg_rdata), .start(start), .busy(busy), .frame_done(frame_done),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data), .blk_req(blk_req),
    .blk_data(blk_data), .out_valid(out_valid), .out_data(out_data), .out_last(out_last));

  always #5 clk = ~clk;

  // block source: hash for unit 0, or the previous frame's centre pixel
  always_comb begin
    blk_data = NN'(blk_of(0, req_cnt));
    if (motion_mode && req_cnt < prev.size()) blk_data[(N/2)*N + N/2] = prev[req_cnt];
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (blk_req[0]) req_cnt <= req_cnt + 1;
    if (out_valid) begin words.push_back(out_data); lasts.push_back(out_last); end
    if (frame_done) n_done <= n_done + 1;
  end

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
    #1;
    checks++;
    if (cfg_rdata !== d) begin
      failures++;
      $display("FAIL read-back %h: %h exp %h", a, cfg_rdata, d);
    end
  endtask

  task automatic configure(int w, int h, bcu_cfg_t c [U], int osel);
    wr(REG_WIDTH, 32'(w));
    wr(REG_HEIGHT, 32'(h));
    wr(REG_OUTSEL, 32'(osel));
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
  endtask

  // run one frame; expected result given by the caller
  task automatic frame(int w, int h, frame_t img, frame_t exp, string name);
    int nw, k, cycles;
    nw = (w * h + PW - 1) / PW;
    words.delete(); lasts.delete();
    req_cnt = 0; n_done = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    k = 0; cycles = 0;
    while (n_done == 0 && cycles < 100000) begin
      if (k < nw) begin
        in_valid = ($urandom % 3 != 0);
        for (int b = 0; b < PW; b++) in_data[b] = (k*PW + b < w*h) ? img[k*PW + b] : 1'($urandom);
      end else in_valid = 0;
      // a second start while busy must be ignored
      start = (k == 1);
      @(posedge clk);
      if (start && busy) n_ignored++;
      if (in_valid && in_ready) k++;
      #1; cycles++;
    end
    start = 0; in_valid = 0;
    repeat (4) @(negedge clk);
    cycles = 0;
    while (busy && cycles < 10000) begin @(negedge clk); cycles++; end
    checks++;
    if (words.size() != nw || n_done != 1 || busy) begin
      failures++;
      $display("FAIL %s: %0d words exp %0d, done=%0d busy=%b", name, words.size(), nw, n_done, busy);
    end else begin
      int bad = 0;
      for (int q = 0; q < nw; q++) begin
        logic [PW-1:0] e = '0;
        for (int b = 0; b < PW; b++) if (q*PW + b < w*h) e[b] = exp[q*PW + b];
        if (words[q] !== e || lasts[q] !== (q == nw - 1)) bad++;
      end
      checks++;
      if (bad != 0) begin failures++; $display("FAIL %s: %0d wrong words", name, bad); end
    end
    if ((w * h) % PW != 0) n_partial++;
  endtask

  function automatic frame_t chain(frame_t img, int w, int h, bcu_cfg_t c [U], int osel);
    frame_t o [U];
    for (int u = 0; u < U; u++) o[u] = unit_model((c[u].src == 0) ? img : o[int'(c[u].src) - 1], w, h, N, c[u], 0);
    return o[osel];
  endfunction

  task automatic count(bcu_cfg_t c [U], int osel);
    bit used [U];
    int u;
    foreach (used[i]) used[i] = 0;
    u = osel;
    used[u] = 1;
    while (c[u].src != 0 && int'(c[u].src) - 1 < u) begin
      n_pipe++;
      u = int'(c[u].src) - 1;
      used[u] = 1;
    end
    if (c[0].src == 0 && c[1].src == 0) n_par++;
    for (int i = 0; i < U; i++) if (used[i]) begin
      if (c[i].out_sel == TAP_SET) n_set++;
      if (c[i].out_sel == TAP_E0_MED || c[i].out_sel == TAP_E1_MED) n_med++;
      if ((c[i].out_sel == TAP_E0_MED && c[i].e0.rank != 0) ||
          (c[i].out_sel == TAP_E1_MED && c[i].e1.rank != 0)) n_rank++;
      if (c[i].border) n_border1++;
      n_mask[int'(c[i].mask_size)]++;
      if (i == 0 && ((c[0].e0.sel_a == ISEL_BLOCK && c[0].out_sel inside {TAP_E0_LOG, TAP_E0_RED, TAP_E0_MED}) ||
                     (c[0].e1.sel_a == ISEL_BLOCK && c[0].out_sel inside {TAP_E1_LOG, TAP_E1_RED, TAP_E1_MED}) ||
                     c[0].out_sel == TAP_SET)) n_blk++;
    end
  endtask

  initial begin
    bcu_cfg_t c [U];
    frame_t img, exp;
    int w, h, osel;
    motion_mode = 0;
    prev = new[0];
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1: opening = erosion unit 0 -> dilation unit 1; 2: closing in units 2 -> 3
    c[0] = cfg_morph(1, 3, 0); c[1] = cfg_morph(0, 3, 1);
    c[2] = cfg_morph(0, 3, 0); c[3] = cfg_morph(1, 3, 3);
    for (osel = 1; osel <= 3; osel += 2) begin
      w = 32; h = 24;
      img = new[w * h];
      foreach (img[i]) img[i] = ($urandom % 100) < 60;
      configure(w, h, c, osel);
      exp = chain(img, w, h, c, osel);
      frame(w, h, img, exp, osel == 1 ? "opening" : "closing");
      count(c, osel);
    end

    // 3: motion detection: unit 0 XORs the frame with the previous one taken
    // from the block port, unit 1 cleans the difference with a 3x3 median
    w = 20; h = 13;
    prev = new[w * h];
    foreach (prev[i]) prev[i] = 1'($urandom);
    img = new[w * h];
    foreach (img[i]) img[i] = prev[i] ^ (($urandom % 100) < 15);
    c[0] = cfg_pass(); c[0].e1.sel_a = ISEL_BLOCK;
    c[0].set_a = TAP_E0_LOG; c[0].set_b = TAP_E1_LOG; c[0].sop = SOP_XOR; c[0].out_sel = TAP_SET;
    c[1] = cfg_pass(); c[1].src = 3'd1; c[1].out_sel = TAP_E0_MED; c[1].mask_size = 4'd3;
    c[2] = cfg_pass(); c[3] = cfg_pass();
    begin
      frame_t diff;
      diff = new[w * h];
      foreach (diff[i]) diff[i] = img[i] ^ prev[i];
      exp = unit_model(diff, w, h, N, c[1], 0);
    end
    motion_mode = 1;
    configure(w, h, c, 1);
    frame(w, h, img, exp, "motion");
    count(c, 1);
    motion_mode = 0;

    // 4: random configurations, sizes and output units
    for (int t = 0; t < 30; t++) begin
      int osel_pre;
      osel_pre = $urandom % U;
      for (int u = 0; u < U; u++) begin
        c[u] = cfg_random(u);
        if (u != 0) begin
          if (c[u].e0.sel_a == ISEL_BLOCK) c[u].e0.sel_a = ISEL_WINDOW;
          if (c[u].e0.sel_b == ISEL_BLOCK) c[u].e0.sel_b = ISEL_WINDOW;
          if (c[u].e1.sel_a == ISEL_BLOCK) c[u].e1.sel_a = ISEL_WINDOW;
          if (c[u].e1.sel_b == ISEL_BLOCK) c[u].e1.sel_b = ISEL_WINDOW;
        end
      end
      if (t < 4) c[0].e0.sel_a = ISEL_BLOCK;
      if (t == 4) begin c[osel_pre].out_sel = TAP_E0_MED; c[osel_pre].e0.rank = 5'd2; end
      w = 3 + $urandom % (MAX_W - 2); h = 2 + $urandom % (MAX_H - 1);

      osel = osel_pre;
      img = new[w * h];
      foreach (img[i]) img[i] = 1'($urandom);
      configure(w, h, c, osel);
      exp = chain(img, w, h, c, osel);
      frame(w, h, img, exp, "random");
      count(c, osel);
    end

    $display("mechanisms: pipelined=%0d parallel=%0d set=%0d median=%0d block=%0d border1=%0d mask1=%0d mask3=%0d mask5=%0d partial_word=%0d start_ignored=%0d rank=%0d",
             n_pipe, n_par, n_set, n_med, n_blk, n_border1, n_mask[1], n_mask[3], n_mask[5], n_partial, n_ignored, n_rank);
    foreach (n_mask[i]) if (i % 2 == 1) begin checks++; if (n_mask[i] == 0) failures++; end
    checks += 9;
    if (n_rank == 0) failures++;
    if (n_pipe == 0) failures++;
    if (n_par == 0) failures++;
    if (n_set == 0) failures++;
    if (n_med == 0) failures++;
    if (n_blk == 0) failures++;
    if (n_border1 == 0) failures++;
    if (n_partial == 0) failures++;
    if (n_ignored == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
