// output_control_logic: selects one compute unit's result stream and packs it.
//
// The source description gives the output control logic two jobs: choose the output
// among all binary compute unit outputs according to the configuration, and
// convert the serial 1-bit image into parallel data. Here sel picks the unit;
// its pixels are packed LSB first into PW-bit words (pixel k of the frame
// lands in word k / PW, bit k % PW). A word is emitted when full or when the
// frame's last pixel (number total-1) has arrived; then word_last is set and
// the unused high bits of a partial word are zero. clear restarts the pixel
// count. word_valid is a registered one-cycle pulse.
module output_control_logic #(
  parameter int unsigned NUM_BCU = 4,
  parameter int unsigned PW      = 32,
  localparam int unsigned SW = (NUM_BCU > 1) ? $clog2(NUM_BCU) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic [31:0]        total,
  input  logic [SW-1:0]      sel,
  input  logic [NUM_BCU-1:0] unit_valid,
  input  logic [NUM_BCU-1:0] unit_pix,
  output logic               word_valid,
  output logic [PW-1:0]      word,
  output logic               word_last
);

  localparam int unsigned BW = $clog2(PW);

  logic [31:0]   cnt;      // pixels of this frame packed so far
  logic [BW-1:0] bitpos;
  logic [PW-1:0] acc;
  logic          v, p, last_pix;

  assign v        = unit_valid[sel];
  assign p        = unit_pix[sel];
  assign last_pix = (cnt + 1 == total);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      bitpos     <= '0;
      acc        <= '0;
      word_valid <= 1'b0;
      word       <= '0;
      word_last  <= 1'b0;
    end else if (clear) begin
      cnt        <= '0;
      bitpos     <= '0;
      acc        <= '0;
      word_valid <= 1'b0;
      word_last  <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (v) begin
        if (32'(bitpos) == PW - 1 || last_pix) begin
          word_valid <= 1'b1;
          word       <= acc | (PW'(p) << bitpos);
          word_last  <= last_pix;
          acc        <= '0;
          bitpos     <= '0;
        end else begin
          acc    <= acc | (PW'(p) << bitpos);
          bitpos <= bitpos + 1'b1;
        end
        cnt <= last_pix ? '0 : cnt + 1;
      end
    end
  end

endmodule
