// tb_haar_difference: self-checking test of the difference unit.
//
// Checks a - b, one clock after the operands are applied, for the pairs of
// the published simulation, for the range extremes (whose differences need
// the ninth bit) and for random pairs.
module tb_haar_difference;
  localparam int unsigned IN_W  = 8;
  localparam int unsigned OUT_W = 9;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b1;
  logic signed [IN_W-1:0]  a = '0, b = '0;
  logic signed [OUT_W-1:0] c;
  int checks = 0, failures = 0;

  haar_difference #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .c(c)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int x, input int y);
    int exp;
    exp = x - y;
    @(negedge clk);
    a = IN_W'(x);
    b = IN_W'(y);
    @(posedge clk);
    #1;
    checks++;
    if (int'(c) !== exp) begin
      failures++;
      $display("FAIL diff(%0d,%0d): got %0d expected %0d", x, y, c, exp);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #1;
    checks++;
    if (c !== '0) begin failures++; $display("FAIL reset value %0d", c); end
    @(negedge clk) rst_n = 1'b1;
    apply(18, 5);    // 13
    apply(1, 9);     // -8
    apply(-50, 10);  // -60
    apply(-53, -49); // -4
    apply(127, -128);
    apply(-128, 127);
    apply(-128, -128);
    for (int n = 0; n < 500; n++)
      apply(int'($signed(IN_W'($urandom))), int'($signed(IN_W'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
