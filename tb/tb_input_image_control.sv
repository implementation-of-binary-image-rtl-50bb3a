// tb_input_image_control: frames of several sizes fed as packed words with
// random input gaps and random pixel_ready stalls; the serial stream must
// reproduce the pixels in order, stop after width*height pixels, take only
// ceil(width*height/PW) words, pulse frame_start once and ignore a start
// while a frame is active.
module tb_input_image_control;
  localparam int PW = 8;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, pix_ready = 0;
  logic [15:0] width = 16'd5, height = 16'd3;
  logic [PW-1:0] in_data = '0;
  logic frame_start, active, in_ready, pix_valid, pix;
  int checks = 0, failures = 0;
  bit got [$];
  int n_fs, n_words;

  input_image_control #(.PW(PW)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .width(width), .height(height),
    .frame_start(frame_start), .active(active), .in_valid(in_valid), .in_ready(in_ready),
    .in_data(in_data), .pix_valid(pix_valid), .pix(pix), .pix_ready(pix_ready));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (pix_valid && pix_ready) got.push_back(pix);
    if (frame_start) n_fs++;
    if (in_valid && in_ready) n_words++;
  end

  task automatic frame(int w, int h);
    bit px [];
    int n, nw, k;
    n = w * h; nw = (n + PW - 1) / PW;
    px = new[nw * PW];
    foreach (px[i]) px[i] = 1'($urandom);
    width = 16'(w); height = 16'(h);
    got.delete(); n_fs = 0; n_words = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    k = 0;
    fork
      begin
        while (k < nw) begin
          in_valid = ($urandom % 4 != 0);
          for (int b = 0; b < PW; b++) in_data[b] = px[k*PW + b];
          @(posedge clk);
          if (in_valid && in_ready) k++;
          #1;
          if (k == 2) begin start = 1; end   // must be ignored
        end
        in_valid = 0; start = 0;
      end
      begin
        repeat (60 * nw + 100) begin
          pix_ready = ($urandom % 5 != 0);
          @(negedge clk);
        end
      end
    join
    pix_ready = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (got.size() != n || n_fs != 1 || n_words != nw || active) begin
      failures++;
      $display("FAIL %0dx%0d: %0d pixels, %0d starts, %0d words, active=%b", w, h, got.size(), n_fs, n_words, active);
    end
    for (int p = 0; p < n && p < got.size(); p++) begin
      checks++;
      if (got[p] !== px[p]) begin
        failures++;
        $display("FAIL %0dx%0d pixel %0d", w, h, p);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    frame(8, 4);
    frame(5, 3);
    frame(13, 7);
    frame(1, 1);
    frame(16, 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
