// End-to-end, full-size testbench for trojan_aware_fir (all parameters at
// their defaults: 4 taps, 8-bit data and coefficients, 16-bit output).
//
// 1. After reset the coefficients are zero, so dout stays 0 while enable is low.
// 2. Raising enable generates the coefficients; coef_valid must rise
//    exactly 9 rising edges after the first falling edge that sees enable.
// 3. A unit impulse on din must give dout = W0, W1, W2, W3, 0, ... with
//    W0..W3 = D7, DD, AA, AF, the first reported coefficient set.
// 4. A constant input of 1 must give dout = 000D, the reported output.
// 5. Random input is compared with a reference model of
//    y(n) = sum W_i x(n-i) mod 256.
// 6. enable is dropped and raised again; the coefficients must be
//    regenerated identically.
// The raw PUF pins q must show q2 = ~q1 per cell and must toggle.
// Each mechanism (coefficient generation, regeneration, 8-bit wrap of the
// sum, PUF output activity) is counted and must occur at least once.
module tb_trojan_aware_fir;
  localparam logic [7:0] W [4] = '{8'hD7, 8'hDD, 8'hAA, 8'hAF};

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        enable = 1'b0;
  logic [7:0]  din = '0;
  logic [15:0] dout;
  logic [7:0]  q;
  logic        coef_valid;

  int checks = 0, failures = 0;
  int n_generate = 0, n_regenerate = 0, n_wrap = 0, n_q_toggle = 0;

  trojan_aware_fir dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .din(din),
    .dout(dout), .q(q), .coef_valid(coef_valid));

  always #5 clk = ~clk;

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0h expected %0h", what, $time, got, exp);
    end
  endtask

  // PUF pin monitor.
  logic [7:0] q_prev;
  always @(negedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < 4; i++) check(q[2*i] ^ q[2*i+1], 1, "q2 == ~q1");
      if (q !== q_prev) n_q_toggle++;
    end
    q_prev <= q;
  end

  // Reference model: one sample per clock, output two edges later.
  logic [7:0]  hist [4];
  int unsigned prev_sum;
  bit          prev_check;

  task automatic step(logic [7:0] sample, bit do_check);
    int unsigned s;
    @(negedge clk);
    din = sample;
    for (int i = 3; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = sample;
    s = 0;
    for (int i = 0; i < 4; i++) s += int'(W[i]) * int'(hist[i]);
    @(posedge clk); #1;
    if (prev_check) begin
      check(dout, prev_sum % 256, "dout vs reference");
      if (prev_sum >= 256) n_wrap++;
    end
    prev_sum   = s;
    prev_check = do_check;
  endtask

  task automatic generate_coefficients();
    int edges;
    @(posedge clk); #1 enable = 1'b1;
    @(negedge clk);
    edges = 0;
    while (!coef_valid && edges < 50) begin
      @(posedge clk); #1 edges++;
    end
    check(edges, 9, "rising edges from enable to coef_valid");
  endtask

  initial begin
    for (int i = 0; i < 4; i++) hist[i] = '0;
    prev_check = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. filter runs with zero coefficients before enable
    for (int n = 0; n < 6; n++) begin
      @(negedge clk) din = 8'($urandom);
      @(posedge clk); #1 check(dout, 0, "dout before coefficients");
      check(coef_valid, 0, "coef_valid before enable");
    end

    // 2. coefficient generation
    generate_coefficients();
    n_generate++;

    // 3. impulse response (history cleared by four zero samples first)
    for (int n = 0; n < 4; n++) step(8'h00, 1'b0);
    for (int n = 0; n < 4; n++) hist[n] = '0;
    step(8'h01, 1'b1);
    check(dout, 0, "impulse: before response");
    for (int n = 0; n < 6; n++) begin
      step(8'h00, 1'b1);
      check(dout, n < 4 ? 16'(W[n]) : 16'h0, $sformatf("impulse response tap %0d", n));
    end

    // 4. constant input 1
    for (int n = 0; n < 6; n++) step(8'h01, 1'b1);
    check(dout, 16'h000D, "reported output for input 01");

    // 5. random input
    for (int n = 0; n < 200; n++) step(8'($urandom), 1'b1);

    // 6. regeneration
    @(posedge clk); #1 enable = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(coef_valid, 0, "coef_valid after disable");
    generate_coefficients();
    n_regenerate++;
    // din was held while waiting: refill the delay line before checking
    prev_check = 1'b0;
    for (int n = 0; n < 4; n++) step(8'($urandom), 1'b0);
    for (int n = 0; n < 100; n++) step(8'($urandom), 1'b1);

    if (n_generate == 0)   begin failures++; $display("FAIL: no coefficient generation"); end
    if (n_regenerate == 0) begin failures++; $display("FAIL: no regeneration"); end
    if (n_wrap == 0)       begin failures++; $display("FAIL: sum never wrapped"); end
    if (n_q_toggle == 0)   begin failures++; $display("FAIL: PUF pins never toggled"); end
    $display("mechanisms: generate=%0d regenerate=%0d wrap=%0d q_toggle=%0d",
             n_generate, n_regenerate, n_wrap, n_q_toggle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
