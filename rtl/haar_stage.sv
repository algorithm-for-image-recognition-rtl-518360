// haar_stage: one level (one row of A and D units) of the parallel Haar pipeline.
//
// The N values entering the level are split into consecutive groups of G
// values. Inside each group the values are taken in pairs (2i, 2i+1); the
// average of pair i goes to position i of the group and its difference to
// position G/2 + i. With N = 8 this gives the three rows of the published
// 8-input architecture: G = 8 gives "A A A A D D D D", G = 4 gives
// "A A D D A A D D" and G = 2 gives "A D A D A D A D". Differences are also
// transformed again by the later levels, as in the published architecture,
// so the full pipeline computes a complete Haar wavelet-packet tree.
//
// Interface: d holds the N IN_W-bit signed values of the previous level;
// q holds the N (IN_W + 1)-bit results, registered, one clock later. All
// units run every clock, so a new set of N values can enter every cycle.
module haar_stage #(
  parameter int unsigned N    = 8,
  parameter int unsigned G    = 8,
  parameter int unsigned IN_W = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [IN_W-1:0] d [N],
  output logic signed [IN_W:0]   q [N]
);

  initial begin
    assert (G >= 2 && (G % 2) == 0 && (N % G) == 0)
      else $error("haar_stage: G must be even and divide N");
  end

  for (genvar grp = 0; grp < int'(N / G); grp++) begin : g_group
    for (genvar i = 0; i < int'(G / 2); i++) begin : g_pair
      localparam int unsigned BASE = grp * G;

      haar_adddiv #(.IN_W(IN_W), .OUT_W(IN_W + 1)) u_avg (
        .clk  (clk),
        .rst_n(rst_n),
        .a    (d[BASE + 2*i]),
        .b    (d[BASE + 2*i + 1]),
        .c    (q[BASE + i])
      );

      haar_difference #(.IN_W(IN_W), .OUT_W(IN_W + 1)) u_diff (
        .clk  (clk),
        .rst_n(rst_n),
        .a    (d[BASE + 2*i]),
        .b    (d[BASE + 2*i + 1]),
        .c    (q[BASE + G/2 + i])
      );
    end
  end

endmodule
