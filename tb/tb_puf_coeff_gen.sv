// Self-checking testbench for puf_coeff_gen.
//
// Five coefficient sources with different excitation timing. The expected
// bytes are the coefficient values reported for the published design
// (75 from its single-cell run; D7, DD, AA, AF from its first filter run);
// the timing settings reproducing them were worked out with a separate
// cycle model of cell, excitation and capture. Checks each byte, the
// ready time (COEF_W+1 rising edges after the first falling edge that sees
// enable), that q2 is always the complement of q1 once excited, and that
// disabling and re-enabling regenerates the same byte.
module tb_puf_coeff_gen;
  localparam int N = 5;
  localparam logic [7:0] EXP [N] = '{8'h75, 8'hD7, 8'hDD, 8'hAA, 8'hAF};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enable = 1'b0;
  logic [7:0] coef [N];
  logic [N-1:0] valid, q1, q2;
  int   checks = 0, failures = 0;
  int   sessions = 0;

  puf_coeff_gen #(.HI(1), .LO(4), .PHASE(2)) u0 (.clk(clk), .rst_n(rst_n), .enable(enable),
    .coef(coef[0]), .valid(valid[0]), .q1(q1[0]), .q2(q2[0]));
  puf_coeff_gen #(.HI(2), .LO(4), .PHASE(0)) u1 (.clk(clk), .rst_n(rst_n), .enable(enable),
    .coef(coef[1]), .valid(valid[1]), .q1(q1[1]), .q2(q2[1]));
  puf_coeff_gen #(.HI(2), .LO(2), .PHASE(0)) u2 (.clk(clk), .rst_n(rst_n), .enable(enable),
    .coef(coef[2]), .valid(valid[2]), .q1(q1[2]), .q2(q2[2]));
  puf_coeff_gen #(.HI(1), .LO(8), .PHASE(0)) u3 (.clk(clk), .rst_n(rst_n), .enable(enable),
    .coef(coef[3]), .valid(valid[3]), .q1(q1[3]), .q2(q2[3]));
  puf_coeff_gen #(.HI(2), .LO(5), .PHASE(1)) u4 (.clk(clk), .rst_n(rst_n), .enable(enable),
    .coef(coef[4]), .valid(valid[4]), .q1(q1[4]), .q2(q2[4]));

  always #5 clk = ~clk;

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0h expected %0h", what, $time, got, exp);
    end
  endtask

  // Complement check on every falling edge once reset is released.
  always @(negedge clk) begin
    if (rst_n) check(q1 ^ q2, {N{1'b1}}, "q2 == ~q1");
  end

  task automatic session();
    int edges;
    @(posedge clk); #1 enable = 1'b1;      // first falling edge to see it: next one
    @(negedge clk);
    edges = 0;
    while (valid !== {N{1'b1}} && edges < 50) begin
      @(posedge clk); #1 edges++;
    end
    check(edges, 9, "rising edges from enable to valid");
    for (int i = 0; i < N; i++) check(coef[i], EXP[i], $sformatf("coefficient %0d", i));
    repeat (10) @(posedge clk);
    #1 for (int i = 0; i < N; i++) check(coef[i], EXP[i], $sformatf("coefficient %0d held", i));
    enable = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(valid, 0, "valid after disable");
    sessions++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3) @(posedge clk);
    session();
    repeat (4) @(posedge clk);
    session();
    check(sessions, 2, "sessions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
