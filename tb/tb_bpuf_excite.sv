// Self-checking testbench for bpuf_excite.
//
// Two instances with different timing settings. After enable rises, the
// k-th falling edge (k = 0, 1, ...) must give exc = ((PHASE + k) mod
// (HI + LO)) < HI and run = 1; while enable is low, exc must be 1 and run
// 0. The enable is dropped and raised again to check that the sequence
// restarts from PHASE.
module tb_bpuf_excite;
  localparam int unsigned HI_A = 3, LO_A = 2, PH_A = 4;
  localparam int unsigned HI_B = 1, LO_B = 8, PH_B = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enable = 1'b0;
  logic exc_a, run_a, exc_b, run_b;
  int   checks = 0, failures = 0;

  bpuf_excite #(.HI(HI_A), .LO(LO_A), .PHASE(PH_A)) dut_a (
    .clk(clk), .rst_n(rst_n), .enable(enable), .exc(exc_a), .run(run_a));
  bpuf_excite #(.HI(HI_B), .LO(LO_B), .PHASE(PH_B)) dut_b (
    .clk(clk), .rst_n(rst_n), .enable(enable), .exc(exc_b), .run(run_b));

  always #5 clk = ~clk;

  function automatic logic expect_exc(int unsigned hi, int unsigned lo, int unsigned ph, int unsigned k);
    return ((ph + k) % (hi + lo)) < hi;
  endfunction

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  task automatic run_session(int unsigned n);
    // enable changes after a rising edge, so the next falling edge sees it
    @(posedge clk); #1 enable = 1'b1;
    for (int unsigned k = 0; k < n; k++) begin
      @(negedge clk); #1;
      check(exc_a, expect_exc(HI_A, LO_A, PH_A, k), "exc_a");
      check(exc_b, expect_exc(HI_B, LO_B, PH_B, k), "exc_b");
      check(run_a, 1'b1, "run_a");
    end
    @(posedge clk); #1 enable = 1'b0;
    @(negedge clk); #1;
    check(exc_a, 1'b1, "exc_a idle");
    check(exc_b, 1'b1, "exc_b idle");
    check(run_b, 1'b0, "run_b idle");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(exc_a, 1'b1, "exc_a in reset");
    check(run_a, 1'b0, "run_a in reset");
    rst_n = 1'b1;
    repeat (3) @(negedge clk); #1;
    check(exc_a, 1'b1, "exc_a disabled");
    run_session(40);
    repeat (2) @(posedge clk);
    run_session(23);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
