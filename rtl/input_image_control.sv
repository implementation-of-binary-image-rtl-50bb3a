// input_image_control: feeds one binary image frame into the processor.
//
// Images arrive as PW-bit words over a valid/ready interface, pixels packed
// LSB first and contiguously in raster order (a line need not start a new
// word; unused bits of the last word are ignored). On start, when idle, the
// unit pulses frame_start (which clears the window generators and the output
// packer) and then shifts out width*height pixels, one per clock while
// pix_ready is high. It takes the next word only when the current one is
// used up. The source description names this unit without describing it; this is the
// simplest unit that turns stored words into the 1-bit pixel stream the
// compute units need.
module input_image_control #(
  parameter int unsigned PW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [15:0]   width,
  input  logic [15:0]   height,
  output logic          frame_start,
  output logic          active,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [PW-1:0] in_data,
  output logic          pix_valid,
  output logic          pix,
  input  logic          pix_ready
);

  localparam int unsigned BW = $clog2(PW);

  logic [31:0]   remaining;  // pixels still to send in this frame
  logic [PW-1:0] sh;         // current word, next pixel in bit 0
  logic [BW:0]   nbits;      // valid bits left in sh
  logic          take;

  assign pix_valid = active && nbits != 0 && remaining != 0;
  assign pix       = sh[0];
  assign in_ready  = active && remaining > 32'(nbits) &&
                     (nbits == 0 || (nbits == 1 && pix_ready));
  assign take      = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active      <= 1'b0;
      frame_start <= 1'b0;
      remaining   <= '0;
      sh          <= '0;
      nbits       <= '0;
    end else begin
      frame_start <= 1'b0;
      if (!active) begin
        if (start) begin
          active      <= 1'b1;
          frame_start <= 1'b1;
          remaining   <= 32'(width) * 32'(height);
          nbits       <= '0;
        end
      end else begin
        if (pix_valid && pix_ready) begin
          sh        <= sh >> 1;
          nbits     <= nbits - 1'b1;
          remaining <= remaining - 1;
          if (remaining == 1) begin
            active <= 1'b0;
            nbits  <= '0;
          end
        end
        if (take) begin
          sh    <= in_data;
          nbits <= (BW+1)'(PW);
        end
      end
    end
  end

endmodule
