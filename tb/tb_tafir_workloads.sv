// Workload testbench: the three further coefficient sets reported for the
// published design, each on its own trojan_aware_fir instance.
//
//   set 2: W0..W3 = 7F, D7, DD, FF   output for input 01: 0032 (reported)
//   set 3: W0..W3 = 5F, EB, 6D, 7F   output for input 01: 0036 (computed:
//          the low byte of 5F+EB+6D+7F = 236; no output was reported)
//   set 4: W0..W3 = FF, AF, 7B, FF   output for input 01: 0028 (reported)
//
// Each instance gets excitation settings that make its PUF cells produce
// that set. The test enables all three, waits for coef_valid, reads each
// coefficient back through the filter's impulse response, then applies a
// constant input of 1 and checks the output.
//
// A fourth instance with TAPS = 6 checks the general N-tap case: its
// expected coefficients come from model_coef, a clock-by-clock model of
// excitation generator, butterfly cell and capture register written
// independently of the RTL.
module tb_tafir_workloads;
  import tafir_pkg::*;

  localparam int NSET = 3;
  localparam exc_cfg_t [3:0] CFG2 = {exc_cfg(1, 1, 0), exc_cfg(2, 2, 0), exc_cfg(2, 4, 0), exc_cfg(5, 3, 5)};
  localparam exc_cfg_t [3:0] CFG3 = {exc_cfg(5, 3, 5), exc_cfg(1, 2, 1), exc_cfg(2, 4, 5), exc_cfg(3, 5, 3)};
  localparam exc_cfg_t [3:0] CFG4 = {exc_cfg(1, 1, 0), exc_cfg(2, 3, 2), exc_cfg(2, 5, 1), exc_cfg(1, 1, 0)};
  localparam logic [7:0] W [NSET][4] = '{
    '{8'h7F, 8'hD7, 8'hDD, 8'hFF},
    '{8'h5F, 8'hEB, 8'h6D, 8'h7F},
    '{8'hFF, 8'hAF, 8'h7B, 8'hFF}
  };
  localparam logic [15:0] Y1 [NSET] = '{16'h0032, 16'h0036, 16'h0028};

  localparam int T6 = 6;
  localparam exc_cfg_t [T6-1:0] CFG6 = {exc_cfg(1, 1, 1), exc_cfg(4, 2, 3), exc_cfg(2, 3, 2),
                                         exc_cfg(1, 2, 1), exc_cfg(3, 1, 0), exc_cfg(1, 4, 2)};

  // Clock-by-clock model of one coefficient source, enable high before
  // rising edge 0: excitation high -> q1=1, q2=0 at once; excitation low ->
  // q1 and q2 swap at each rising edge; the excitation is updated on each
  // falling edge from position (phase + k) mod (hi + lo); bits are sampled
  // from the second rising edge after the first falling edge on.
  function automatic logic [7:0] model_coef(int hi, int lo, int ph);
    logic q1 = 1'b1, q2 = 1'b0, ex = 1'b1, run = 1'b0, armed = 1'b0, t;
    int pos = ph, nbits = 0;
    logic [7:0] w = '0;
    for (int k = 0; k < 64 && nbits < 8; k++) begin
      // rising edge
      if (armed) begin w = {w[6:0], q1}; nbits++; end
      armed = run;
      if (!ex) begin t = q1; q1 = q2; q2 = t; end
      // falling edge
      ex  = pos < hi;
      pos = (pos == hi + lo - 1) ? 0 : pos + 1;
      run = 1'b1;
      if (ex) begin q1 = 1'b1; q2 = 1'b0; end
    end
    return w;
  endfunction

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        enable = 1'b0;
  logic [7:0]  din = '0;
  logic [15:0] dout [NSET];
  logic [7:0]  q [NSET];
  logic [NSET-1:0] valid;
  logic [15:0] dout6;
  logic [11:0] q6;
  logic        valid6;
  logic [7:0]  w6 [T6];
  int checks = 0, failures = 0;

  trojan_aware_fir #(.EXC_CFG(CFG2)) u_set2 (.clk(clk), .rst_n(rst_n), .enable(enable),
    .din(din), .dout(dout[0]), .q(q[0]), .coef_valid(valid[0]));
  trojan_aware_fir #(.EXC_CFG(CFG3)) u_set3 (.clk(clk), .rst_n(rst_n), .enable(enable),
    .din(din), .dout(dout[1]), .q(q[1]), .coef_valid(valid[1]));
  trojan_aware_fir #(.EXC_CFG(CFG4)) u_set4 (.clk(clk), .rst_n(rst_n), .enable(enable),
    .din(din), .dout(dout[2]), .q(q[2]), .coef_valid(valid[2]));

  trojan_aware_fir #(.TAPS(T6), .EXC_CFG(CFG6)) u_tap6 (.clk(clk), .rst_n(rst_n), .enable(enable),
    .din(din), .dout(dout6), .q(q6), .coef_valid(valid6));

  always #5 clk = ~clk;

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0h expected %0h", what, $time, got, exp);
    end
  endtask

  task automatic apply(logic [7:0] sample);
    @(negedge clk) din = sample;
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1 enable = 1'b1;
    repeat (12) @(posedge clk);
    #1 check(valid, {NSET{1'b1}}, "coef_valid");
    check(valid6, 1'b1, "coef_valid, 6 taps");
    for (int i = 0; i < T6; i++)
      w6[i] = model_coef(int'(CFG6[i].hi), int'(CFG6[i].lo), int'(CFG6[i].phase));
    // the model must agree with the reported bytes for the 4-tap sets
    check(model_coef(5, 3, 5), 8'h7F, "model: 7F");
    check(model_coef(1, 2, 1), 8'h6D, "model: 6D");
    check(model_coef(2, 3, 2), 8'h7B, "model: 7B");
    // impulse response: dout after the impulse's second edge is W0, then W1...
    for (int n = 0; n < T6; n++) apply(8'h00);
    apply(8'h01);
    for (int t = 0; t < T6; t++) begin
      apply(8'h00);
      for (int s = 0; s < NSET; s++)
        check(dout[s], t < 4 ? 16'(W[s][t]) : 16'h0, $sformatf("set %0d impulse response %0d", s + 2, t));
      check(dout6, 16'(w6[t]), $sformatf("6 taps: coefficient W%0d", t));
    end
    for (int n = 0; n < 6; n++) apply(8'h01);
    for (int s = 0; s < NSET; s++)
      check(dout[s], Y1[s], $sformatf("set %0d output for input 01", s + 2));
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
