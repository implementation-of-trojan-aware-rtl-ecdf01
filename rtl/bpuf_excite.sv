// Excitation generator for one Butterfly PUF cell.
//
// While `enable` is low the excitation is held high, keeping the cell in
// its excited state. Once `enable` is high the generator runs a counter over
// a period of HI+LO clocks, starting at position PHASE, and drives `exc`
// high for positions 0..HI-1 and low for HI..HI+LO-1. The cell's output bit
// stream, and hence the coefficient built from it, is fixed by HI, LO and
// PHASE, which act as the cell's personality in this RTL. `run` is a copy
// of `enable` taken on the same edge and tells the capture register that
// the excitation sequence has started.
//
// Interface: clk, rst_n (asynchronous, active low), enable -> exc, run.
// Timing: both outputs are registered on the FALLING clock edge, so the
// asynchronous excitation never changes on the rising edge the PUF cell and
// the capture register use. The first excitation value after enable rises
// appears at the first falling edge that sees enable high.
//
// The document raises the excitation, lowers it after a few clock pulses
// and runs each PUF from an excitation clock of its own frequency; the
// counter, the falling-edge timing and the PHASE offset are this design's
// choices. Requires HI >= 1, LO >= 1 and PHASE < HI+LO.
module bpuf_excite #(
  parameter int unsigned HI    = 2,
  parameter int unsigned LO    = 4,
  parameter int unsigned PHASE = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  output logic exc,
  output logic run
);

  localparam int unsigned PERIOD = HI + LO;
  localparam int unsigned CW     = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [CW-1:0] pos;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= CW'(PHASE);
      exc <= 1'b1;
      run <= 1'b0;
    end else if (!enable) begin
      pos <= CW'(PHASE);
      exc <= 1'b1;
      run <= 1'b0;
    end else begin
      exc <= (pos < CW'(HI));
      pos <= (pos == CW'(PERIOD - 1)) ? '0 : pos + 1'b1;
      run <= 1'b1;
    end
  end

  initial begin
    assert (HI >= 1 && LO >= 1 && PHASE < HI + LO)
      else $error("bpuf_excite: need HI>=1, LO>=1, PHASE<HI+LO");
  end

endmodule
