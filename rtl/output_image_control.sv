// output_image_control: hands the packed result words of a frame out.
//
// It registers each word from the output control logic onto the output port
// (out_valid / out_data / out_last; there is no back-pressure, the receiver
// must take one word per out_valid), counts the words of the frame and keeps
// busy high from start until the frame's last word has been sent, when it
// pulses frame_done. The input side uses busy to hold the next frame back,
// so one frame is processed at a time. The source description names the output image
// control unit only; these duties are this design's choice.
module output_image_control #(
  parameter int unsigned PW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          word_valid,
  input  logic [PW-1:0] word,
  input  logic          word_last,
  output logic          out_valid,
  output logic [PW-1:0] out_data,
  output logic          out_last,
  output logic          frame_done,
  output logic          busy,
  output logic [31:0]   word_count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_last   <= 1'b0;
      frame_done <= 1'b0;
      busy       <= 1'b0;
      word_count <= '0;
    end else begin
      out_valid  <= 1'b0;
      frame_done <= 1'b0;
      if (start && !busy) begin
        busy       <= 1'b1;
        word_count <= '0;
      end
      if (word_valid && busy) begin
        out_valid  <= 1'b1;
        out_data   <= word;
        out_last   <= word_last;
        word_count <= word_count + 1;
        if (word_last) begin
          busy       <= 1'b0;
          frame_done <= 1'b1;
        end
      end
    end
  end

endmodule
