// Butterfly PUF cell built from two cross-coupled D flip-flops.
//
// Flip-flop 1 (output q1) has its asynchronous preset on `exc`; flip-flop 2
// (output q2) has its asynchronous clear on `exc`. Each one's D input is the
// other's Q output. While `exc` is high the pair is forced to q1=1, q2=0,
// the excited state in which the two halves hold opposite values. When
// `exc` is released, every rising clock edge lets each flip-flop take the
// other's value, so the cell leaves the forced state; the bit sequence seen
// on q1 therefore depends on when the excitation rises and falls relative
// to the clock. q2 is always the complement of q1.
//
// Interface: clk, exc (asynchronous, active high), q1, q2.
// Timing: q1/q2 jump to 1/0 as soon as exc rises; otherwise they change
// only on rising clk edges. `exc` should change away from rising clock
// edges (the excitation generator drives it from the falling edge).
//
// The structure (preset on one flip-flop, clear on the other, D inputs
// cross-connected) is the published one. In silicon, a butterfly cell's
// settling is decided by device mismatch; in this RTL it is decided by the
// excitation timing, which is therefore what distinguishes one cell from
// another. No reset is needed: holding `exc` high initialises the cell.
module bpuf_cell (
  input  logic clk,
  input  logic exc,
  output logic q1,
  output logic q2
);

  // Flip-flop 1: preset by the excitation, D from flip-flop 2.
  always_ff @(posedge clk or posedge exc) begin
    if (exc) q1 <= 1'b1;
    else     q1 <= q2;
  end

  // Flip-flop 2: cleared by the excitation, D from flip-flop 1.
  always_ff @(posedge clk or posedge exc) begin
    if (exc) q2 <= 1'b0;
    else     q2 <= q1;
  end

endmodule
