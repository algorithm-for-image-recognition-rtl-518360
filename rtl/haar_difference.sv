// haar_difference: difference unit ("D") of the parallel Haar wavelet pipeline.
//
// Computes c = a - b, the high-pass (detail) Haar coefficient of a pair of
// samples, and registers it. As in the published design the difference is
// not halved, so the pair (a, b) is recovered from an average m and a
// difference d as a = m + d/2, b = m - d/2 (up to the truncation of m).
//
// Interface: a and b are IN_W-bit signed; c is OUT_W-bit signed. With the
// default OUT_W = IN_W + 1 the difference is exact for every input; the
// published design keeps c in -127..127 like its inputs, and the extra bit is
// this design's choice so that no detail coefficient wraps. Latency is one
// clock. The asynchronous active-low reset to zero is this design's addition.
module haar_difference #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = IN_W + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  a,
  input  logic signed [IN_W-1:0]  b,
  output logic signed [OUT_W-1:0] c
);

  logic signed [IN_W:0] diff;

  always_comb diff = {a[IN_W-1], a} - {b[IN_W-1], b};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c <= '0;
    else        c <= OUT_W'(diff);
  end

endmodule
