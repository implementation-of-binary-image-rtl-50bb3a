// binary_median_filter: median (or rank-order) filter of the active bits of
// an N x N binary window.
//
// For 1-bit data the median is a majority vote: the output is 1 when more
// than half of the active bits are 1. With an m x m mask (m odd) the count of
// active bits is odd, so there is no tie. A non-zero rank turns the filter
// into a binary rank-order filter: the output is 1 when at least rank active
// bits are 1 (rank 1 is a dilation, rank m*m an erosion over the mask).
// A binary median filter in every compute element, and rank-order
// filtering, follow the source description; the population-count realisation and the
// rank encoding are this design's choice. Purely combinational.
module binary_median_filter #(
  parameter int unsigned N = 5
) (
  input  logic [N*N-1:0] x,
  input  logic [N*N-1:0] active,
  input  logic [4:0]     rank,
  output logic           y
);

  localparam int unsigned CW = $clog2(N*N + 1);

  logic [CW-1:0] ones, total;

  always_comb begin
    ones  = '0;
    total = '0;
    for (int i = 0; i < N*N; i++) begin
      ones  = ones  + CW'(x[i] & active[i]);
      total = total + CW'(active[i]);
    end
    if (rank == '0)
      y = ({1'b0, ones} << 1) > {1'b0, total};  // more than half: 2*ones > total
    else
      y = 32'(ones) >= 32'(rank);
  end

endmodule
