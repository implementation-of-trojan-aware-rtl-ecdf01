// Coefficient capture register: turns a PUF output bit stream into one
// COEF_W-bit filter coefficient.
//
// When `run` goes high the register waits one clock (the excitation
// generator has just made its first step) and then shifts in one bit of
// `bit_in` per rising clock edge, most significant bit first, for COEF_W
// clocks. The assembled word is copied to `coef` together with the last
// bit and `valid` is raised; `coef` then holds until the next complete
// capture. Dropping `run` clears `valid` and the bit counter, so raising it
// again starts a fresh capture while the old coefficient stays in place
// until the new one is complete.
//
// Interface: clk, rst_n (asynchronous, active low), run, bit_in ->
// coef[COEF_W-1:0], valid, count (bits captured so far).
// Timing: with run first seen high at rising edge P1, bits are sampled at
// edges P2..P(COEF_W+1) and coef/valid change at edge P(COEF_W+1).
//
// Collecting eight PUF bits over eight clock pulses into an 8-bit register
// follows the document; the one-clock start delay, the MSB-first order, the
// separate shift and output registers and the valid flag are this design's
// choices.
module puf_coeff_reg #(
  parameter int unsigned COEF_W = 8
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            run,
  input  logic                            bit_in,
  output logic [COEF_W-1:0]               coef,
  output logic                            valid,
  output logic [$clog2(COEF_W+1)-1:0]     count
);

  localparam int unsigned CNT_W = $clog2(COEF_W + 1);

  logic              armed;
  logic [COEF_W-2:0] shreg;       // bits captured so far
  logic [COEF_W-1:0] shreg_next;  // the same with bit_in appended

  assign shreg_next = {shreg, bit_in};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed <= 1'b0;
      count <= '0;
      shreg <= '0;
      coef  <= '0;
      valid <= 1'b0;
    end else begin
      armed <= run;
      if (!run) begin
        count <= '0;
        valid <= 1'b0;
      end else if (armed && count < CNT_W'(COEF_W)) begin
        shreg <= shreg_next[COEF_W-2:0];
        count <= count + 1'b1;
        if (count == CNT_W'(COEF_W - 1)) begin
          coef  <= shreg_next;
          valid <= 1'b1;
        end
      end
    end
  end

  // The counter never passes COEF_W, and valid implies a full capture.
  always_comb begin
    if (rst_n) begin
      a_count_range: assert (count <= CNT_W'(COEF_W))
        else $error("puf_coeff_reg: bit counter out of range");
      a_valid_full: assert (!valid || count == CNT_W'(COEF_W))
        else $error("puf_coeff_reg: valid before all bits were captured");
    end
  end

endmodule
