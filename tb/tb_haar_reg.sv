// tb_haar_reg: self-checking test of the input register.
//
// Drives random signed values, checks that each appears on q exactly one
// clock later, and that the asynchronous reset clears q without a clock edge.
module tb_haar_reg;
  localparam int unsigned W = 8;

  logic                clk = 1'b0;
  logic                    rst_n = 1'b1;
  logic signed [W-1:0] d = '0;
  logic signed [W-1:0] q;
  int checks = 0, failures = 0;

  haar_reg #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic signed [W-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] prev;
    #1 rst_n = 1'b0;
    #1 check(q, '0, "reset value");
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      prev = W'($urandom);
      d = prev;
      @(posedge clk);
      #1 check(q, prev, "one-cycle delay");
      @(negedge clk) d = ~prev;        // changes after the edge must not leak
      #1 check(q, prev, "hold between edges");
    end
    // Asynchronous reset, mid-cycle.
    d = 8'sd55;
    @(posedge clk);
    #2 rst_n = 1'b0;
    #1 check(q, '0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
