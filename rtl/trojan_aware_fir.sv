// PUF-keyed ("trojan aware") FIR filter: top level.
//
// A TAPS-tap FIR filter whose coefficients are not stored in the design but
// generated on chip by TAPS Butterfly PUF cells, one cell per coefficient.
// Raising `enable` starts the excitation of all cells; each coefficient
// source collects COEF_W bits of its cell's output and loads them as
// coefficient W0..W(TAPS-1). `coef_valid` goes high once all coefficients
// are loaded. The filter runs on every clock from reset; until the first
// coefficients are loaded they are zero, so dout is zero.
//
// Interface: clk, rst_n (asynchronous, active low), enable, din[7:0] ->
// dout[15:0], q[2*TAPS-1:0] (raw PUF outputs: q[2i] = q1 and q[2i+1] = q2
// of cell i, i.e. pins Q1..Q8 of the published design in that order),
// coef_valid.
// Timing: coefficients are loaded COEF_W+1 rising edges after the first
// falling edge that sees enable high (9.5 clocks at the defaults); the
// filter latency is two rising edges from din to dout.
//
// Structure, widths and pin set follow the published design (clk, enable,
// din[7:0], dout[15:0], Q1..Q8). The reset input, the coef_valid flag and
// the per-cell excitation settings EXC_CFG are this design's additions;
// EXC_CFG's default reproduces the first reported coefficient set
// (D7, DD, AA, AF).
module trojan_aware_fir #(
  parameter int unsigned TAPS   = tafir_pkg::TAPS,
  parameter int unsigned DATA_W = tafir_pkg::DATA_W,
  parameter int unsigned COEF_W = tafir_pkg::COEF_W,
  parameter int unsigned SUM_W  = tafir_pkg::SUM_W,
  parameter int unsigned DOUT_W = tafir_pkg::DOUT_W,
  parameter tafir_pkg::exc_cfg_t [TAPS-1:0] EXC_CFG = tafir_pkg::EXC_CFG_DEFAULT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,
  input  logic [DATA_W-1:0]   din,
  output logic [DOUT_W-1:0]   dout,
  output logic [2*TAPS-1:0]   q,
  output logic                coef_valid
);

  logic [COEF_W-1:0] coef  [TAPS];
  logic [TAPS-1:0]   valid;

  for (genvar i = 0; i < TAPS; i++) begin : g_puf
    puf_coeff_gen #(
      .COEF_W (COEF_W),
      .HI     (int'(EXC_CFG[i].hi)),
      .LO     (int'(EXC_CFG[i].lo)),
      .PHASE  (int'(EXC_CFG[i].phase))
    ) u_src (
      .clk    (clk),
      .rst_n  (rst_n),
      .enable (enable),
      .coef   (coef[i]),
      .valid  (valid[i]),
      .q1     (q[2*i]),
      .q2     (q[2*i+1])
    );
  end

  assign coef_valid = &valid;

  fir_filter #(
    .TAPS   (TAPS),
    .DATA_W (DATA_W),
    .COEF_W (COEF_W),
    .SUM_W  (SUM_W),
    .DOUT_W (DOUT_W)
  ) u_fir (
    .clk  (clk),
    .rst_n(rst_n),
    .din  (din),
    .coef (coef),
    .dout (dout)
  );

endmodule
