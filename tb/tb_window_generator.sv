// tb_window_generator: random frames of several sizes, with random input
// gaps and both border values. Every window must match the N x N block of a
// software copy of the frame (border value outside it), windows must come
// in raster order and exactly width*height per frame, and the internal flush
// must last C*width + C clocks with in_ready low.
module tb_window_generator;
  localparam int N = 5, C = 2, MAX_W = 16;
  logic clk = 0, rst_n = 0, clear = 0, border = 0, in_valid = 0, in_pix = 0;
  logic [15:0] width = 16'd8, height = 16'd6;
  logic in_ready, win_valid, centre;
  logic [N*N-1:0] win;
  int checks = 0, failures = 0;
  logic img [64][64];
  int n_win, flush_cycles;

  window_generator #(.N(N), .MAX_W(MAX_W)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .width(width), .height(height),
    .border(border), .in_valid(in_valid), .in_pix(in_pix), .in_ready(in_ready),
    .win_valid(win_valid), .win(win), .centre(centre));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic px(int x, int y);
    if (x < 0 || y < 0 || x >= int'(width) || y >= int'(height)) return border;
    return img[y][x];
  endfunction

  // checker: compare each window with the model
  always @(negedge clk) if (rst_n) begin
    if (!in_ready) flush_cycles++;
    if (win_valid) begin
      int x, y;
      logic [N*N-1:0] exp;
      x = n_win % int'(width);
      y = n_win / int'(width);
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          exp[i*N+j] = px(x + j - C, y + i - C);
      checks++;
      if (win !== exp || centre !== img[y][x]) begin
        failures++;
        $display("FAIL win (%0d,%0d) got %h exp %h", x, y, win, exp);
      end
      n_win++;
    end
  end

  task automatic run_frame(int w, int h, logic bval, int gap_pct);
    width = 16'(w); height = 16'(h); border = bval;
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) img[y][x] = 1'($urandom);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    n_win = 0; flush_cycles = 0;
    for (int p = 0; p < w * h; p++) begin
      while (int'($urandom % 100) < gap_pct) begin
        in_valid = 0; @(negedge clk);
      end
      in_valid = 1; in_pix = img[p / w][p % w];
      @(negedge clk);
    end
    in_valid = 0;
    repeat (C * w + C + 10) @(negedge clk);
    checks++;
    if (n_win != w * h) begin
      failures++;
      $display("FAIL %0dx%0d: %0d windows", w, h, n_win);
    end
    checks++;
    if (flush_cycles != C * w + C) begin
      failures++;
      $display("FAIL %0dx%0d: flush took %0d cycles, exp %0d", w, h, flush_cycles, C * w + C);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frame(8, 6, 1'b0, 0);
    run_frame(16, 5, 1'b1, 30);
    run_frame(5, 7, 1'b0, 10);
    run_frame(9, 2, 1'b1, 0);
    run_frame(13, 11, 1'b0, 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
