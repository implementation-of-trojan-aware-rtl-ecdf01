// Self-checking testbench for fir_filter.
//
// Two instances share random coefficients and a random input stream: one
// with the default 8-bit wrap of the sum (SUM_W = 8), one keeping the sum
// to 16 bits. A reference model keeps the last TAPS inputs and computes
// sum(coef[i] * x(n-i)) in full precision; each output is compared, two
// rising edges after its sample was applied, with that sum reduced modulo
// 2**SUM_W. Coefficients are changed several times; a fixed case with all
// inputs 1 and coefficients D7, DD, AA, AF checks the reported output 000D.
module tb_fir_filter;
  localparam int unsigned TAPS = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0]  din = '0;
  logic [7:0]  coef [TAPS];
  logic [15:0] dout8, dout16;
  int   checks = 0, failures = 0;
  int   wraps = 0;

  fir_filter dut8 (.clk(clk), .rst_n(rst_n), .din(din), .coef(coef), .dout(dout8));
  fir_filter #(.SUM_W(16)) dut16 (.clk(clk), .rst_n(rst_n), .din(din), .coef(coef), .dout(dout16));

  always #5 clk = ~clk;

  logic [7:0] hist [TAPS];   // hist[0] = newest applied sample
  int unsigned full_sum;

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0h expected %0h", what, $time, got, exp);
    end
  endtask

  // Apply one sample per clock. The output seen after a rising edge
  // belongs to the sample applied one clock earlier (two-edge latency).
  int unsigned prev_sum;
  bit          prev_check;

  task automatic step(logic [7:0] sample, bit do_check);
    @(negedge clk);
    din = sample;
    for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = sample;
    full_sum = 0;
    for (int i = 0; i < TAPS; i++) full_sum += int'(coef[i]) * int'(hist[i]);
    @(posedge clk); #1;
    if (prev_check) begin
      check(dout8, prev_sum % 256, "dout with SUM_W=8");
      check(dout16, prev_sum % 65536, "dout with SUM_W=16");
      if (prev_sum >= 256) wraps++;
    end
    prev_sum   = full_sum;
    prev_check = do_check;
  endtask

  initial begin
    for (int i = 0; i < TAPS; i++) begin coef[i] = '0; hist[i] = '0; end
    repeat (2) @(posedge clk);
    check(dout8, 0, "dout in reset");
    @(negedge clk) rst_n = 1'b1;
    // Fixed case from the published results.
    coef = '{8'hD7, 8'hDD, 8'hAA, 8'hAF};
    prev_check = 1'b0;
    for (int n = 0; n < 8; n++) step(8'h01, n >= TAPS - 1);
    check(dout8, 16'h000D, "reported output 000D");
    // Impulse: the outputs are the coefficients in tap order.
    for (int n = 0; n < 4; n++) step(n == 0 ? 8'h01 : 8'h00, 1'b1);
    // Random coefficients and data.
    repeat (6) begin
      // change the coefficients between a rising edge and the next falling
      // edge, after the last output under the old ones has been checked
      step(8'($urandom), 1'b0);
      prev_check = 1'b0;
      for (int i = 0; i < TAPS; i++) coef[i] = 8'($urandom);
      for (int n = 0; n < 40; n++) step(8'($urandom), 1'b1);
    end
    if (wraps == 0) begin
      failures++;
      $display("FAIL: the sum never exceeded 8 bits");
    end
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
