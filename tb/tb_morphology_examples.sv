// tb_morphology_examples: the four basic operators on the textbook example
// of a square of side 10 and a disc of radius 2 as structuring element,
// run through the processor (24 x 24 frame). Units 0 -> 1 form an opening,
// units 2 -> 3 a closing, and units 0 and 2 on their own give erosion and
// dilation. Each result is compared with the set definitions
//   dilation  A (+) B = { z | (B)z meets A }
//   erosion   A (-) B = { z | (B)z inside A }
// evaluated directly, and with the known shapes: erosion leaves a square of
// side 6, dilation a square of side 14 with rounded corners, the opening a
// square of side 10 with rounded corners, and the closing the square itself.
module tb_morphology_examples;
  import bip_pkg::*;
  localparam int N = 5, W = 24, H = 24, U = 4, PW = 16, NN = N * N;

  logic clk = 0, rst_n = 0, cfg_we = 0, start = 0, in_valid = 0;
  logic [7:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0, cfg_rdata;
  logic busy, frame_done, in_ready, out_valid, out_last;
  logic [PW-1:0] in_data = '0, out_data;
  logic [U-1:0] blk_req;
  int checks = 0, failures = 0;
  bit res [$];

  binary_image_processor #(.N(N), .MAX_W(W), .MAX_H(H), .NUM_BCU(U), .PW(PW)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
    .cfg_rdata(cfg_rdata), .start(start), .busy(busy), .frame_done(frame_done),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data), .blk_req(blk_req),
    .blk_data('0), .out_valid(out_valid), .out_data(out_data), .out_last(out_last));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (out_valid) for (int b = 0; b < PW; b++) res.push_back(out_data[b]);

  bit A [H][W];
  bit B [N][N];

  function automatic bit in_a(int x, int y);
    return (x >= 0 && y >= 0 && x < W && y < H) ? A[y][x] : 1'b0;
  endfunction

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic run(int osel, output bit r [H][W]);
    int k;
    wr(REG_OUTSEL, 32'(osel));
    res.delete();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    k = 0;
    while (k < W * H / PW) begin
      in_valid = 1;
      for (int b = 0; b < PW; b++) in_data[b] = A[(k*PW + b) / W][(k*PW + b) % W];
      @(posedge clk);
      if (in_ready) k++;
      #1;
    end
    in_valid = 0;
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (res.size() != W * H) begin
      failures++;
      $display("FAIL unit %0d: %0d pixels", osel, res.size());
    end
    for (int p = 0; p < W * H; p++) r[p / W][p % W] = (p < res.size()) ? res[p] : 1'b0;
  endtask

  function automatic int side_x(bit r [H][W]);
    int lo, hi;
    lo = W; hi = -1;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
      if (r[y][x]) begin if (x < lo) lo = x; if (x > hi) hi = x; end
    return hi - lo + 1;
  endfunction

  task automatic compare(string name, bit r [H][W], bit e [H][W]);
    int bad;
    bad = 0;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) if (r[y][x] !== e[y][x]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %s: %0d pixels differ", name, bad); end
  endtask

  initial begin
    bit ero [H][W], dil [H][W], opn [H][W], cls [H][W];
    bit e_ero [H][W], e_dil [H][W], e_opn [H][W], e_cls [H][W];
    logic [31:0] disc;
    int cnt;
    // square of side 10 and a digital disc of radius 2 (x^2 + y^2 <= 4)
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) A[y][x] = (x >= 7 && x < 17 && y >= 7 && y < 17);
    disc = '0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      B[i][j] = ((i - 2) * (i - 2) + (j - 2) * (j - 2) <= 4);
      disc[i*N + j] = B[i][j];
    end
    // set definitions (the disc is symmetric, so no reflection is needed)
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      bit all_in, any_in;
      all_in = 1; any_in = 0;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) if (B[i][j]) begin
        all_in &= in_a(x + j - 2, y + i - 2);
        any_in |= in_a(x + j - 2, y + i - 2);
      end
      e_ero[y][x] = all_in; e_dil[y][x] = any_in;
    end
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      bit any_e, all_d;
      any_e = 0; all_d = 1;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) if (B[i][j]) begin
        int xx, yy;
        bit in_img;
        xx = x + j - 2; yy = y + i - 2;
        in_img = (xx >= 0 && yy >= 0 && xx < W && yy < H);
        any_e |= in_img && e_ero[yy][xx];
        all_d &= !in_img || e_dil[yy][xx];
      end
      e_opn[y][x] = any_e; e_cls[y][x] = all_d;
    end

    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(REG_WIDTH, W); wr(REG_HEIGHT, H);
    // unit 0: erosion (border 1), unit 1: dilation of unit 0
    wr(8'h10, 32'h0000_0000 | (32'(TAP_E0_RED) << 12) | (32'd5 << 15) | (32'd1 << 19));
    wr(8'h11, 32'(ISEL_WINDOW) | (32'(ISEL_PARAM) << 2) | (32'(LOP_OR) << 4) | (32'(ROP_AND) << 7));
    wr(8'h13, ~disc);
    wr(8'h20, 32'd1 | (32'(TAP_E0_RED) << 12) | (32'd5 << 15));
    wr(8'h21, 32'(ISEL_WINDOW) | (32'(ISEL_PARAM) << 2) | (32'(LOP_AND) << 4) | (32'(ROP_OR) << 7));
    wr(8'h23, disc);
    // unit 2: dilation (border 0), unit 3: erosion of unit 2 (border 1)
    wr(8'h30, 32'd0 | (32'(TAP_E0_RED) << 12) | (32'd5 << 15));
    wr(8'h31, 32'(ISEL_WINDOW) | (32'(ISEL_PARAM) << 2) | (32'(LOP_AND) << 4) | (32'(ROP_OR) << 7));
    wr(8'h33, disc);
    wr(8'h40, 32'd3 | (32'(TAP_E0_RED) << 12) | (32'd5 << 15) | (32'd1 << 19));
    wr(8'h41, 32'(ISEL_WINDOW) | (32'(ISEL_PARAM) << 2) | (32'(LOP_OR) << 4) | (32'(ROP_AND) << 7));
    wr(8'h43, ~disc);

    run(0, ero); compare("erosion", ero, e_ero);
    run(1, opn); compare("opening", opn, e_opn);
    run(2, dil); compare("dilation", dil, e_dil);
    run(3, cls); compare("closing", cls, e_cls);

    // the shapes the definitions predict
    cnt = 0;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) cnt += int'(ero[y][x]);
    checks++; if (cnt != 36 || side_x(ero) != 6) begin failures++; $display("FAIL erosion: %0d pixels", cnt); end
    checks++; if (side_x(dil) != 14 || dil[5][5] || !dil[5][12]) begin failures++; $display("FAIL dilation shape"); end
    checks++; if (side_x(opn) != 10 || opn[7][7] || !opn[7][12] || !opn[12][12]) begin failures++; $display("FAIL opening shape"); end
    compare("closing = square", cls, A);
    $display("erosion side %0d, dilation side %0d, opening side %0d", side_x(ero), side_x(dil), side_x(opn));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
