// Direct-form FIR filter with externally supplied coefficients.
//
// Each rising clock edge shifts the input sample `din` into a TAPS-deep
// delay line x[0..TAPS-1] (x[0] = newest sample), and registers on `dout`
//   y = coef[0]*x[0] + coef[1]*x[1] + ... + coef[TAPS-1]*x[TAPS-1]
// computed from the delay line as it stood before the edge. All values are
// unsigned. Every product and the sum are kept to SUM_W bits (arithmetic
// modulo 2**SUM_W) and the result is zero-extended to DOUT_W bits.
//
// Interface: clk, rst_n (asynchronous, active low), din[DATA_W-1:0],
// coef[TAPS] (coef[0] multiplies the newest sample) -> dout[DOUT_W-1:0].
// Timing: one new sample and one new output per clock; a sample presented
// before edge k enters x[0] at edge k and first affects dout at edge k+1
// (latency two edges).
//
// The four taps, 8-bit samples and coefficients, the input and output
// registers and the 16-bit output port follow the published design. So
// does SUM_W = 8: the published results show the sum of products wrapping
// to its low eight bits (for input 1 and coefficients D7, DD, AA, AF the
// reported output is 000D, the low byte of 30D). Setting SUM_W = DOUT_W
// gives the full sum modulo 2**16 instead. Unsigned arithmetic and the
// reset are this design's choices.
module fir_filter #(
  parameter int unsigned TAPS   = 4,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned COEF_W = 8,
  parameter int unsigned SUM_W  = 8,
  parameter int unsigned DOUT_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] din,
  input  logic [COEF_W-1:0] coef [TAPS],
  output logic [DOUT_W-1:0] dout
);

  logic [DATA_W-1:0] x [TAPS];
  logic [SUM_W-1:0]  y;

  // Delay line: x[0] <= din, x[i] <= x[i-1].
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) x[i] <= '0;
    end else begin
      x[0] <= din;
      for (int i = 1; i < TAPS; i++) x[i] <= x[i-1];
    end
  end

  // Sum of products, wrapped to SUM_W bits.
  always_comb begin
    logic [SUM_W-1:0] acc;
    acc = '0;
    for (int i = 0; i < TAPS; i++) begin
      acc = acc + SUM_W'(SUM_W'(coef[i]) * SUM_W'(x[i]));
    end
    y = acc;
  end

  // Output register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= DOUT_W'(y);
  end

  initial begin
    assert (SUM_W <= DOUT_W) else $error("fir_filter: SUM_W must not exceed DOUT_W");
  end

endmodule
