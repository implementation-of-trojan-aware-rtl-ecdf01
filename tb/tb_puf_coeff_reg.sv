// Self-checking testbench for puf_coeff_reg.
//
// Feeds random bytes MSB first on bit_in, changing it on falling edges,
// and checks that coef equals the byte and valid rises exactly at the
// (COEF_W+1)-th rising edge after run was first seen high. Also checks that
// valid stays low before that, that coef holds afterwards while bit_in
// keeps changing, and that dropping run clears valid but keeps coef.
module tb_puf_coeff_reg;
  localparam int unsigned COEF_W = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic run = 1'b0;
  logic bit_in = 1'b0;
  logic [COEF_W-1:0] coef;
  logic valid;
  logic [$clog2(COEF_W+1)-1:0] count;
  int   checks = 0, failures = 0;

  puf_coeff_reg #(.COEF_W(COEF_W)) dut (
    .clk(clk), .rst_n(rst_n), .run(run), .bit_in(bit_in),
    .coef(coef), .valid(valid), .count(count));

  always #5 clk = ~clk;

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0h expected %0h", what, $time, got, exp);
    end
  endtask

  task automatic capture(logic [COEF_W-1:0] word, logic [COEF_W-1:0] prev);
    // run rises on a falling edge, as the excitation generator drives it
    @(negedge clk); run = 1'b1; bit_in = 1'b0;
    @(posedge clk); #1;                       // P1: run seen, not sampled
    check(valid, 0, "valid after P1");
    for (int i = COEF_W - 1; i >= 0; i--) begin
      @(negedge clk); bit_in = word[i];
      @(posedge clk); #1;
      if (i > 0) begin
        check(valid, 0, "valid during capture");
        check(coef, prev, "coef held during capture");
      end
    end
    check(valid, 1, "valid at edge COEF_W+1");
    check(coef, word, "captured word");
    repeat (5) begin
      @(negedge clk); bit_in = 1'($urandom);
      @(posedge clk); #1;
      check(coef, word, "coef held after capture");
      check(valid, 1, "valid held");
    end
    @(negedge clk); run = 1'b0;
    @(posedge clk); #1;
    check(valid, 0, "valid cleared by run low");
    check(coef, word, "coef kept after run low");
  endtask

  initial begin
    logic [COEF_W-1:0] prev, w;
    repeat (2) @(posedge clk);
    check(coef, 0, "coef in reset");
    check(valid, 0, "valid in reset");
    @(negedge clk); rst_n = 1'b1;
    prev = '0;
    capture(8'h75, prev); prev = 8'h75;
    capture(8'h80, prev); prev = 8'h80;
    capture(8'h01, prev); prev = 8'h01;
    repeat (20) begin
      w = COEF_W'($urandom);
      capture(w, prev);
      prev = w;
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
