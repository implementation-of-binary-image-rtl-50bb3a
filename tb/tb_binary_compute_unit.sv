// tb_binary_compute_unit: whole frames through one compute unit with random
// configurations plus erosion, dilation and median settings, compared pixel
// by pixel with the reference model; the external block port is served from
// a hash of the pixel index. Also checks the S1->S4 latency of three clocks.
module tb_binary_compute_unit;
  import bip_pkg::*;
  import bip_model_pkg::*;
  localparam int N = 5, MAX_W = 16, NN = N * N;
  logic clk = 0, rst_n = 0, clear = 0, pix_valid = 0, pix = 0;
  logic [15:0] width = 16'd8, height = 16'd6;
  bcu_cfg_t cfg;
  logic pix_ready, blk_req, out_valid, out_pix;
  logic [NN-1:0] blk;
  int checks = 0, failures = 0;
  int req_cnt, n_out, cyc, lat_bad;
  int req_q [$];
  frame_t got;

  binary_compute_unit #(.N(N), .MAX_W(MAX_W)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .width(width), .height(height), .cfg(cfg),
    .pix_valid(pix_valid), .pix(pix), .pix_ready(pix_ready), .blk_req(blk_req), .blk(blk),
    .out_valid(out_valid), .out_pix(out_pix));

  always #5 clk = ~clk;
  assign blk = NN'(blk_of(0, req_cnt));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (blk_req) begin
      req_cnt <= req_cnt + 1;
      req_q.push_back(cyc);
    end
    if (out_valid) begin
      if (n_out < int'(width) * int'(height)) got[n_out] = out_pix;
      // each output leaves three clocks after its window
      if (req_q.size() == 0 || cyc - req_q.pop_front() != 3) lat_bad <= lat_bad + 1;
      n_out <= n_out + 1;
    end
  end

  task automatic run(int w, int h, bcu_cfg_t c, string name);
    frame_t img, exp;
    width = 16'(w); height = 16'(h); cfg = c;
    img = new[w * h];
    foreach (img[i]) img[i] = 1'($urandom);
    got = new[w * h];
    exp = unit_model(img, w, h, N, c, 0);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    req_cnt = 0; n_out = 0; lat_bad = 0; req_q.delete();
    for (int p = 0; p < w * h; p++) begin
      if ($urandom % 4 == 0) begin pix_valid = 0; @(negedge clk); end
      pix_valid = 1; pix = img[p];
      @(negedge clk);
    end
    pix_valid = 0;
    repeat (2 * w + 12) @(negedge clk);
    checks++;
    if (n_out != w * h) begin
      failures++;
      $display("FAIL %s: %0d outputs, exp %0d", name, n_out, w * h);
    end
    for (int p = 0; p < w * h; p++) begin
      checks++;
      if (got[p] !== exp[p]) begin
        failures++;
        if (failures < 10) $display("FAIL %s: pixel %0d got %b exp %b", name, p, got[p], exp[p]);
      end
    end
    checks++;
    if (lat_bad != 0) begin
      failures++;
      $display("FAIL %s: %0d outputs with wrong latency", name, lat_bad);
    end
  endtask

  initial begin
    bcu_cfg_t c;
    cyc = 0;
    cfg = cfg_pass();
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(8, 6, cfg_morph(1, 3, 0), "erode3");
    run(16, 9, cfg_morph(0, 5, 0), "dilate5");
    c = cfg_pass(); c.e0.rop = ROP_PASS; c.out_sel = TAP_E1_MED; c.mask_size = 4'd3;
    run(11, 7, c, "median3");
    c = cfg_morph(1, 3, 0);
    c.e1 = cfg_morph(0, 3, 0).e0; c.set_a = TAP_E1_RED; c.set_b = TAP_E0_RED;
    c.sop = SOP_SUBTRACT; c.out_sel = TAP_SET;
    run(10, 8, c, "gradient");
    for (int t = 0; t < 40; t++) run(3 + $urandom % 14, 2 + $urandom % 8, cfg_random(0), "random");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
