// haar_reg: one input register ("R") of the parallel Haar wavelet pipeline.
//
// Each of the N input samples passes through one of these before the first
// rank of average/difference units, so the arithmetic always starts from a
// registered value. It is a plain W-bit D register clocked on the rising
// edge; the asynchronous active-low reset that clears it to zero is this
// design's addition (the published design has no reset).
//
// Interface: d is sampled on every rising edge of clk and appears on q one
// cycle later.
module haar_reg #(
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
