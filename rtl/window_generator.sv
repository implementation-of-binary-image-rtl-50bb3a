// window_generator: forms the N x N neighbourhood of every pixel of a frame.
//
// Pixels arrive one per in_valid in raster order. N-1 line memories, each as
// deep as the image width, delay the stream by one, two, ... N-1 lines, and a
// shift register of N bits per row holds the last N columns, so after every
// push the registers hold the N x N block ending at the newest pixel. Its
// centre lies C = (N-1)/2 lines and C pixels back, so the window of pixel p is
// complete once pixel p + C*width + C has arrived. After the last pixel of the
// frame the generator pushes C*width + C border pixels by itself (one per
// clock) so that the last lines also get their windows; input pixels offered
// during that flush are ignored (in_ready is low). Every frame therefore
// yields exactly width*height windows, in raster order.
//
// Window layout: bit i*N + j is the pixel at (x + j - C, y + i - C) for the
// centre (x, y); row i = 0 is the top line. Positions outside the image read
// the configurable border value. The first N-1 lines after a reset or clear
// may read stale memory contents; they are always outside the image and
// masked. width and height must stay constant during a frame, and height must
// be at least C.
//
// idle is high between frames (no pixel of a frame received or pending).
//
// Timing: win_valid is a one-cycle registered pulse per window; win and
// centre are valid with it and hold until the next push. clear restarts the
// frame counters (issue it before each frame).
//
// The line-memory structure follows the source description; the internal flush, the
// border value and the clear input are this design's own choices.
module window_generator #(
  parameter int unsigned N     = 5,
  parameter int unsigned MAX_W = 640,
  localparam int unsigned AW = $clog2(MAX_W)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic [15:0]    width,
  input  logic [15:0]    height,
  input  logic           border,
  input  logic           in_valid,
  input  logic           in_pix,
  output logic           in_ready,
  output logic           win_valid,
  output logic [N*N-1:0] win,
  output logic           centre,
  output logic           idle
);

  localparam int unsigned C = (N - 1) / 2;

  logic [31:0]   t;          // pushes so far in this frame
  logic [31:0]   n_in;       // input pixels accepted in this frame
  logic [31:0]   total;      // width*height
  logic [31:0]   lead;       // C*width + C
  logic [AW-1:0] ptr;        // column pointer into the line memories
  logic          push, pix;
  logic [N-1:0]  row_in;     // newest bit of every row
  logic [N-1:0]  sr [N];     // sr[r][k]: pixel pushed r lines and k pixels ago
  logic [15:0]   nx, ny;     // centre of the next window
  logic [15:0]   ox, oy;     // centre of the current window

  assign total    = 32'(width) * 32'(height);
  assign lead     = 32'(C) * 32'(width) + 32'(C);
  assign in_ready = (n_in < total);
  assign push     = in_ready ? in_valid : (t < total + lead);
  assign pix      = in_ready ? in_pix : border;

  // line memories: lm j delays the stream by j+1 lines
  assign row_in[0] = pix;
  for (genvar j = 0; j < N - 1; j++) begin : g_lm
    line_memory #(.MAX_W(MAX_W)) u_lm (
      .clk (clk),
      .push(push),
      .ptr (ptr),
      .din (row_in[j]),
      .dout(row_in[j+1])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t         <= '0;
      n_in      <= '0;
      ptr       <= '0;
      nx        <= '0;
      ny        <= '0;
      ox        <= '0;
      oy        <= '0;
      win_valid <= 1'b0;
      for (int r = 0; r < N; r++) sr[r] <= '0;
    end else if (clear) begin
      t         <= '0;
      n_in      <= '0;
      ptr       <= '0;
      nx        <= '0;
      ny        <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= 1'b0;
      if (push) begin
        for (int r = 0; r < N; r++) sr[r] <= {sr[r][N-2:0], row_in[r]};
        ptr <= (32'(ptr) + 1 >= 32'(width)) ? '0 : ptr + 1'b1;
        if (in_ready) n_in <= n_in + 1;
        if (t >= lead) begin
          win_valid <= 1'b1;
          ox <= nx;
          oy <= ny;
          if (nx + 1 >= width) begin
            nx <= '0;
            ny <= ny + 1'b1;
          end else begin
            nx <= nx + 1'b1;
          end
        end
        if (t + 1 >= total + lead) begin
          // frame complete: rearm for the next one
          t    <= '0;
          n_in <= '0;
          ptr  <= '0;
          nx   <= '0;
          ny   <= '0;
        end else begin
          t <= t + 1;
        end
      end
    end
  end

  // border masking of the registered block
  always_comb begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        automatic int col = int'(ox) + j - int'(C);
        automatic int row = int'(oy) + i - int'(C);
        if (col < 0 || col >= int'(width) || row < 0 || row >= int'(height))
          win[i*N+j] = border;
        else
          win[i*N+j] = sr[N-1-i][N-1-j];
      end
    end
  end

  assign centre = sr[C][C];
  assign idle   = (t == 0);

endmodule
