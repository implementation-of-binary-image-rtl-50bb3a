// line_memory: one line memory of the window generator, a 1-bit x MAX_W RAM.
//
// The source description asks for n-1 line memories, each as deep as the image width,
// to hold the previous image lines. This one is used as a delay of exactly
// one image line: the window generator steps a shared pointer through
// 0 .. width-1 and, on each push, the word stored at the pointer (written one
// line earlier) is read out while the new bit is written in its place. The
// read is combinational (read-before-write); the write happens on the clock
// edge. The memory is not reset; the window generator masks whatever it holds
// before the first full line of a frame has been written.
module line_memory #(
  parameter int unsigned MAX_W = 640,
  localparam int unsigned AW = $clog2(MAX_W)
) (
  input  logic          clk,
  input  logic          push,
  input  logic [AW-1:0] ptr,
  input  logic          din,
  output logic          dout
);

  logic mem [MAX_W];

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (push) mem[ptr] <= din;
  end

endmodule
