// haar: parallel 8-input Haar wavelet transform, the kernel of an image
// recognition front end.
//
// N signed samples arrive together. Each passes an input register (R), then
// log2(N) levels of registered average (A) and difference (D) units turn them
// into the coefficients of a full Haar wavelet-packet decomposition: every
// level splits each group of values into pairwise averages (first half of the
// group) and pairwise differences (second half), and the next level does the
// same on each half. With the default N = 8 there are three levels and the
// outputs are, in order, the coefficients of the paths AAA, AAD, ADA, ADD,
// DAA, DAD, DDA, DDD (A = average, D = difference, first letter = level 1).
// Averages truncate toward zero; differences are not halved.
//
// Interface: din[0..N-1] correspond to in1..in8 of the published design and
// dout[0..N-1] to out1..out8. in_valid/out_valid are this design's addition:
// a flag that travels with the data so a user can tell which output cycle
// belongs to which input cycle; the datapath itself runs every clock
// regardless. Outputs are IN_W + log2(N) bits wide so no coefficient wraps
// (the published design keeps them in -127..127).
//
// Timing: fully pipelined, one input set per clock. The samples presented
// before rising edge k are in the input registers after edge k and the
// coefficients appear on dout after edge k + log2(N), i.e. log2(N) + 1 = 4
// register ranks for N = 8, as in the published simulation. The
// asynchronous active-low reset clears every register to zero; the
// published design has none.
module haar
  import haar_pkg::*;
#(
  parameter int unsigned N    = HAAR_N,
  parameter int unsigned IN_W = HAAR_IN_W,
  localparam int unsigned LEVELS = $clog2(N),
  localparam int unsigned OUT_W  = IN_W + LEVELS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  din      [N],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] dout     [N]
);

  initial begin
    assert (N >= 2 && (1 << LEVELS) == N)
      else $error("haar: N must be a power of two");
  end

  // Level 0: input register rank.
  logic signed [IN_W-1:0] r [N];

  for (genvar i = 0; i < int'(N); i++) begin : g_in_reg
    haar_reg #(.W(IN_W)) u_reg (
      .clk  (clk),
      .rst_n(rst_n),
      .d    (din[i]),
      .q    (r[i])
    );
  end

  // Levels 1..LEVELS: group size halves at every level, width grows by one.
  for (genvar lv = 1; lv <= int'(LEVELS); lv++) begin : g_level
    localparam int unsigned W_IN = level_width(IN_W, lv - 1);
    localparam int unsigned GRP  = N >> (lv - 1);

    logic signed [W_IN-1:0] d [N];
    logic signed [W_IN:0]   q [N];

    if (lv == 1) begin : g_from_reg
      assign d = r;
    end else begin : g_from_level
      assign d = g_level[lv-1].q;
    end

    haar_stage #(.N(N), .G(GRP), .IN_W(W_IN)) u_stage (
      .clk  (clk),
      .rst_n(rst_n),
      .d    (d),
      .q    (q)
    );
  end

  assign dout = g_level[LEVELS].q;

  // Valid flag delayed to match the LEVELS + 1 register ranks.
  logic [LEVELS:0] vld_pipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld_pipe <= '0;
    else        vld_pipe <= {vld_pipe[LEVELS-1:0], in_valid};
  end

  assign out_valid = vld_pipe[LEVELS];

endmodule
