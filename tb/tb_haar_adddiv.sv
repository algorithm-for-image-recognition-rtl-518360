// tb_haar_adddiv: self-checking test of the average unit.
//
// Checks the pairs the published simulation shows (including the negative
// odd sums, which must truncate toward zero), the extremes of the 8-bit
// range and random pairs, each one clock after it is applied. The expected
// value is the integer quotient (a + b) / 2 computed in the testbench.
module tb_haar_adddiv;
  localparam int unsigned IN_W  = 8;
  localparam int unsigned OUT_W = 9;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b1;
  logic signed [IN_W-1:0]  a = '0, b = '0;
  logic signed [OUT_W-1:0] c;
  int checks = 0, failures = 0;

  haar_adddiv #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (
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
    exp = (x + y) / 2;              // integer division truncates toward zero
    @(negedge clk);
    a = IN_W'(x);
    b = IN_W'(y);
    @(posedge clk);
    #1;
    checks++;
    if (int'(c) !== exp) begin
      failures++;
      $display("FAIL avg(%0d,%0d): got %0d expected %0d", x, y, c, exp);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #1;
    checks++;
    if (c !== '0) begin failures++; $display("FAIL reset value %0d", c); end
    @(negedge clk) rst_n = 1'b1;
    // Pairs from the published waveforms.
    apply(18, 5);    // 11
    apply(13, 6);    // 9
    apply(7, -20);   // -6 (toward zero)
    apply(-12, -51); // -31 (toward zero)
    apply(-34, 10);  // -12
    apply(-3, 17);   // 7
    // Range extremes.
    apply(127, 127);
    apply(-128, -128);
    apply(-128, 127);
    apply(127, -128);
    apply(-1, 0);
    apply(0, -1);
    for (int n = 0; n < 500; n++)
      apply(int'($signed(IN_W'($urandom))), int'($signed(IN_W'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
