// One PUF coefficient source: excitation generator, Butterfly PUF cell and
// capture register in a chain.
//
// `enable` starts the excitation generator (bpuf_excite), whose output
// drives the cell's preset/clear (bpuf_cell). The capture register
// (puf_coeff_reg) records the cell's q1 output once per clock for COEF_W
// clocks and presents the result on `coef` with `valid`. The excitation
// timing parameters decide which coefficient this source produces.
//
// Interface: clk, rst_n, enable -> coef, valid, q1, q2 (raw cell outputs,
// which the published design brings out as pins).
// Timing: coef/valid are ready COEF_W+1 rising edges after the first
// falling edge that sees enable high.
//
// One PUF per coefficient and eight PUF bits per coefficient follow the
// document; sampling q1 rather than q2 is this design's choice.
module puf_coeff_gen #(
  parameter int unsigned COEF_W = 8,
  parameter int unsigned HI     = 2,
  parameter int unsigned LO     = 4,
  parameter int unsigned PHASE  = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  output logic [COEF_W-1:0] coef,
  output logic              valid,
  output logic              q1,
  output logic              q2
);

  logic exc;
  logic run;
  logic [$clog2(COEF_W+1)-1:0] count;

  bpuf_excite #(.HI(HI), .LO(LO), .PHASE(PHASE)) u_excite (
    .clk    (clk),
    .rst_n  (rst_n),
    .enable (enable),
    .exc    (exc),
    .run    (run)
  );

  bpuf_cell u_cell (
    .clk (clk),
    .exc (exc),
    .q1  (q1),
    .q2  (q2)
  );

  puf_coeff_reg #(.COEF_W(COEF_W)) u_capture (
    .clk    (clk),
    .rst_n  (rst_n),
    .run    (run),
    .bit_in (q1),
    .coef   (coef),
    .valid  (valid),
    .count  (count)
  );

endmodule
