// tb_reconfigurable_binary_processing_module: frames through four compute
// units connected in pipelined chains (opening, closing), in parallel, and
// in random patterns. Every unit's result stream and the packed words of the
// selected unit are compared with the reference model chained the same way.
module tb_reconfigurable_binary_processing_module;
  import bip_pkg::*;
  import bip_model_pkg::*;
  localparam int N = 5, MAX_W = 16, U = 4, PW = 8, NN = N * N;
  logic clk = 0, rst_n = 0, clear = 0, pix_valid = 0, pix = 0;
  logic [15:0] width = 16'd8, height = 16'd6;
  bcu_cfg_t cfg [U];
  logic [1:0] out_sel = 0;
  logic pix_ready, word_valid, word_last;
  logic [U-1:0] blk_req, unit_valid, unit_pix;
  logic [NN-1:0] blk;
  logic [PW-1:0] word;
  int checks = 0, failures = 0;
  int req_cnt;
  bit got [U][$];
  logic [PW-1:0] words [$];

  reconfigurable_binary_processing_module #(.N(N), .MAX_W(MAX_W), .NUM_BCU(U), .PW(PW)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .width(width), .height(height), .cfg(cfg),
    .out_sel(out_sel), .pix_valid(pix_valid), .pix(pix), .pix_ready(pix_ready),
    .blk_req(blk_req), .blk(blk), .unit_valid(unit_valid), .unit_pix(unit_pix),
    .word_valid(word_valid), .word(word), .word_last(word_last));

  always #5 clk = ~clk;
  assign blk = NN'(blk_of(0, req_cnt));

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (blk_req[0]) req_cnt <= req_cnt + 1;
    for (int u = 0; u < U; u++) if (unit_valid[u]) got[u].push_back(unit_pix[u]);
    if (word_valid) words.push_back(word);
  end

  task automatic run(int w, int h, bcu_cfg_t c [U], int osel, string name);
    frame_t img, exp [U];
    int nw;
    width = 16'(w); height = 16'(h); cfg = c; out_sel = 2'(osel);
    img = new[w * h];
    foreach (img[i]) img[i] = 1'($urandom);
    for (int u = 0; u < U; u++)
      exp[u] = unit_model((c[u].src == 0) ? img : exp[int'(c[u].src) - 1], w, h, N, c[u], 0);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    req_cnt = 0; words.delete();
    for (int u = 0; u < U; u++) got[u].delete();
    for (int p = 0; p < w * h; p++) begin
      if ($urandom % 5 == 0) begin pix_valid = 0; @(negedge clk); end
      pix_valid = 1; pix = img[p];
      @(negedge clk);
    end
    pix_valid = 0;
    repeat (U * (2 * w + 10)) @(negedge clk);
    for (int u = 0; u < U; u++) begin
      checks++;
      if (got[u].size() != w * h) begin
        failures++;
        $display("FAIL %s unit %0d: %0d pixels", name, u, got[u].size());
      end else begin
        int bad = 0;
        for (int p = 0; p < w * h; p++) if (got[u][p] !== exp[u][p]) bad++;
        checks++;
        if (bad != 0) begin
          failures++;
          $display("FAIL %s unit %0d: %0d wrong pixels", name, u, bad);
        end
      end
    end
    nw = (w * h + PW - 1) / PW;
    checks++;
    if (words.size() != nw) begin
      failures++;
      $display("FAIL %s: %0d words", name, words.size());
    end else begin
      for (int k = 0; k < nw; k++) begin
        logic [PW-1:0] e = '0;
        for (int b = 0; b < PW; b++) if (k*PW + b < w*h) e[b] = exp[osel][k*PW + b];
        checks++;
        if (words[k] !== e) begin failures++; $display("FAIL %s word %0d", name, k); end
      end
    end
  endtask

  initial begin
    bcu_cfg_t c [U];
    foreach (c[u]) c[u] = cfg_pass();
    cfg = c;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // opening (erode then dilate) and closing as two-unit pipelines
    c[0] = cfg_morph(1, 3, 0); c[1] = cfg_morph(0, 3, 1);
    c[2] = cfg_morph(0, 3, 0); c[3] = cfg_morph(1, 3, 3);
    run(12, 9, c, 1, "opening");
    run(12, 9, c, 3, "closing");
    // four units in parallel on the image
    c[0] = cfg_morph(1, 5, 0); c[1] = cfg_morph(0, 5, 0); c[2] = cfg_pass(); c[3] = cfg_random(0);
    c[2].out_sel = TAP_E0_MED;
    c[3].e0.sel_a = ISEL_WINDOW; c[3].e0.sel_b = ISEL_PARAM;
    c[3].e1.sel_a = ISEL_WINDOW; c[3].e1.sel_b = ISEL_PARAM;
    run(16, 6, c, 2, "parallel");
    for (int t = 0; t < 25; t++) begin
      for (int u = 0; u < U; u++) begin
        c[u] = cfg_random(u);
        if (u != 0) begin    // only unit 0 is served by the block source here
          if (c[u].e0.sel_a == ISEL_BLOCK) c[u].e0.sel_a = ISEL_WINDOW;
          if (c[u].e0.sel_b == ISEL_BLOCK) c[u].e0.sel_b = ISEL_WINDOW;
          if (c[u].e1.sel_a == ISEL_BLOCK) c[u].e1.sel_a = ISEL_WINDOW;
          if (c[u].e1.sel_b == ISEL_BLOCK) c[u].e1.sel_b = ISEL_WINDOW;
        end
      end
      run(3 + $urandom % 14, 2 + $urandom % 8, c, $urandom % 4, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
