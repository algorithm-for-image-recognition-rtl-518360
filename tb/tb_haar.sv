// tb_haar: end-to-end test of the parallel Haar wavelet pipeline at its
// default size (8 inputs of 8 bits, three levels).
//
// 1. The input vectors of the published simulation are applied back to back,
//    one per clock, and the outputs are compared with the coefficient values
//    printed there.
// 2. Random vectors, with random idle cycles between them, are compared with
//    a reference that builds the wavelet-packet tree in integer arithmetic.
// 3. Every output must appear exactly LEVELS clocks after the input register
//    has taken its vector (LEVELS + 1 register ranks in all), and a new
//    vector is accepted on every clock.
// The test also counts how often each behaviour of the design occurs:
// back-to-back vectors, idle gaps, averages of a negative odd sum (rounded
// toward zero) and coefficients outside the 8-bit input range; one that
// never occurs is a failure.
module tb_haar;
  import haar_pkg::*;

  localparam int unsigned N      = HAAR_N;
  localparam int unsigned IN_W   = HAAR_IN_W;
  localparam int unsigned LEVELS = $clog2(N);
  localparam int unsigned OUT_W  = IN_W + LEVELS;

  typedef int vec_t [N];

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    in_valid = 1'b0;
  logic signed [IN_W-1:0]  din  [N];
  logic                    out_valid;
  logic signed [OUT_W-1:0] dout [N];

  int checks = 0, failures = 0;
  int n_back_to_back = 0, n_gaps = 0, n_neg_odd = 0, n_wide = 0;
  longint cycle = 0;

  haar dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .din(din),
    .out_valid(out_valid), .dout(dout)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: full Haar wavelet-packet tree, truncating averages.
  function automatic vec_t reference(vec_t x);
    vec_t cur = x, nxt;
    for (int lv = 1; lv <= int'(LEVELS); lv++) begin
      int g = int'(N) >> (lv - 1);
      for (int base = 0; base < int'(N); base += g)
        for (int i = 0; i < g / 2; i++) begin
          int s = cur[base + 2*i] + cur[base + 2*i + 1];
          if (s < 0 && (s % 2) != 0) n_neg_odd++;
          nxt[base + i]         = s / 2;
          nxt[base + g/2 + i]   = cur[base + 2*i] - cur[base + 2*i + 1];
        end
      cur = nxt;
    end
    return cur;
  endfunction

  // Scoreboard: expected outputs and the cycle their input was registered.
  int     exp_q [$];   // N expected coefficients per vector, in order
  longint due_q [$];
  bit     last_valid = 1'b0;

  task automatic send(vec_t x, vec_t expect_out, bit use_expect);
    vec_t e;
    @(negedge clk);
    for (int i = 0; i < int'(N); i++) din[i] = IN_W'(x[i]);
    in_valid = 1'b1;
    if (use_expect) e = expect_out;
    else            e = reference(x);
    foreach (e[i]) begin
      if (e[i] > 127 || e[i] < -128) n_wide++;
      exp_q.push_back(e[i]);
    end
    // Registered at the coming edge (cycle+1 after it), out LEVELS edges later.
    due_q.push_back(cycle + 1 + longint'(LEVELS));
    if (last_valid) n_back_to_back++;
    last_valid = 1'b1;
  endtask

  task automatic idle(int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      in_valid = 1'b0;
      for (int i = 0; i < int'(N); i++) din[i] = IN_W'($urandom);
      if (last_valid) n_gaps++;
      last_valid = 1'b0;
    end
  endtask

  // Output checker, sampled just after each rising edge.
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      longint due;
      int     e_i;
      checks++;
      if (due_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        due = due_q.pop_front();
        if (cycle != due) begin
          failures++;
          $display("FAIL latency: output at cycle %0d, expected %0d", cycle, due);
        end
        for (int i = 0; i < int'(N); i++) begin
          e_i = exp_q.pop_front();
          checks++;
          if (int'(dout[i]) != e_i) begin
            failures++;
            $display("FAIL out%0d: got %0d expected %0d", i + 1, dout[i], e_i);
          end
        end
      end
    end
  end

  initial begin
    vec_t x, y, none;
    foreach (none[i]) none[i] = 0;
    for (int i = 0; i < int'(N); i++) din[i] = '0;
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < int'(N); i++) begin
      checks++;
      if (dout[i] !== '0) begin failures++; $display("FAIL reset out%0d", i + 1); end
    end
    @(negedge clk) rst_n = 1'b1;

    // Published vectors, one per clock, with the printed coefficients.
    x = '{18, 5, 1, 9, 13, 6, 2, 3};    y = '{6, 3, 6, -1, 2, -1, 14, 13};
    send(x, y, 1'b1);
    x = '{9, 2, 12, 5, 10, 60, 23, 13}; y = '{16, -20, 7, -20, -6, 27, -30, 60};
    send(x, y, 1'b1);
    x = '{18, 52, 11, 1, 8, 61, 28, 77}; y = '{31, -23, 5, 47, -31, 39, -24, -40};
    send(x, y, 1'b1);
    // The same vectors through the reference, to cross-check it.
    x = '{18, 5, 1, 9, 13, 6, 2, 3};     send(x, none, 1'b0);
    x = '{9, 2, 12, 5, 10, 60, 23, 13};  send(x, none, 1'b0);
    idle(2);

    // Range extremes.
    foreach (x[i]) x[i] = (i % 2 != 0) ? -128 : 127;   send(x, none, 1'b0);
    foreach (x[i]) x[i] = -128;                   send(x, none, 1'b0);
    foreach (x[i]) x[i] = (i < 4) ? 127 : -128;   send(x, none, 1'b0);
    foreach (x[i]) x[i] = (i % 4 < 2) ? 127 : -128; send(x, none, 1'b0);

    // Random traffic with random gaps.
    for (int n = 0; n < 400; n++) begin
      foreach (x[i]) x[i] = int'($signed(IN_W'($urandom)));
      send(x, none, 1'b0);
      if ($urandom_range(0, 3) == 0) idle($urandom_range(1, 3));
    end
    idle(LEVELS + 3);

    checks++;
    if (due_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs never appeared", due_q.size());
    end
    $display("events: back_to_back=%0d gaps=%0d neg_odd_avg=%0d wide_coeff=%0d",
             n_back_to_back, n_gaps, n_neg_odd, n_wide);
    checks += 4;
    if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back vectors"); end
    if (n_gaps == 0)         begin failures++; $display("FAIL no idle gaps"); end
    if (n_neg_odd == 0)      begin failures++; $display("FAIL no negative odd sums"); end
    if (n_wide == 0)         begin failures++; $display("FAIL no wide coefficients"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
