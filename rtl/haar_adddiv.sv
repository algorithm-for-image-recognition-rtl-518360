// haar_adddiv: average unit ("A") of the parallel Haar wavelet pipeline.
//
// Computes c = (a + b) / 2, the low-pass (approximation) Haar coefficient of
// a pair of samples, and registers it. The quotient is truncated toward zero,
// which is what the published simulation values show (for example
// (7 + -20) / 2 gives -6, not -7). In hardware this is the full-width sum,
// plus one when the sum is negative, then an arithmetic shift right by one.
//
// Interface: a and b are IN_W-bit signed; c is OUT_W-bit signed
// (OUT_W >= IN_W; the average of two IN_W-bit values always fits IN_W bits,
// so c is only sign-extended). Latency is one clock: c shows the average of
// the a and b sampled at the previous rising edge. The asynchronous
// active-low reset to zero is this design's addition.
module haar_adddiv #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  a,
  input  logic signed [IN_W-1:0]  b,
  output logic signed [OUT_W-1:0] c
);

  logic signed [IN_W:0]   sum;
  logic signed [IN_W:0]   sum_adj;
  logic signed [IN_W-1:0] avg;

  always_comb begin
    sum     = {a[IN_W-1], a} + {b[IN_W-1], b};
    // Round toward zero: bias a negative odd sum up by one before the shift.
    sum_adj = sum + {{IN_W{1'b0}}, sum[IN_W]};
    avg     = IN_W'(sum_adj >>> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c <= '0;
    else        c <= OUT_W'(avg);
  end

endmodule
