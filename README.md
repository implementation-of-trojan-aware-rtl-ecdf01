# PUF-keyed 4-tap FIR filter

This is an FIR filter whose coefficients are not stored anywhere in the design.
Each coefficient is produced on chip by a Butterfly PUF (physical unclonable
function) cell when the filter is enabled. A copied netlist or bitstream
therefore carries no coefficient table to read out. The intent is also to make
the coefficient set part of the individual device rather than of the design,
which makes the filter harder to clone, reverse-engineer or tamper with.

The datapath is small: a 4-tap, 8-bit direct-form FIR filter. The unusual part
is the coefficient source. That is where most of this document goes.

```
                 enable
                   |
      +------------+------------+------------+
      v            v            v            v
  [PUF source 0][PUF source 1][PUF source 2][PUF source 3]   each: excitation
      | W0          | W1          | W2          | W3          generator ->
      v             v             v             v             butterfly cell ->
  din -> x[0] -> x[1] -> x[2] -> x[3]   (delay line)          8-bit capture
          *W0     *W1     *W2     *W3
            \______+_______+_______/
                   | (sum, wrapped to 8 bits)
                   v
                 y_reg -> dout[15:0]
```

## How one coefficient is produced

Each coefficient source (`puf_coeff_gen`) is a chain of three blocks.

**The butterfly cell (`bpuf_cell`).** It has two D flip-flops with their data
inputs crossed: each flip-flop loads the other's output. The excitation signal
`exc` drives the asynchronous preset of flip-flop 1 and the asynchronous clear
of flip-flop 2. The cell therefore behaves as follows:

* While `exc` is high, the cell is forced to the excited state q1=1, q2=0.
  The two halves hold opposite values.
* When `exc` is released, every rising clock edge swaps the two values. q1
  then reads 0, 1, 0, ... until the excitation rises again.

q2 is always the complement of q1. In a silicon butterfly cell built from
cross-coupled latches, device mismatch decides which way the cell falls. In
RTL nothing models mismatch. The bit stream on q1 is a fixed function of
*when* the excitation rises and falls relative to the clock. That timing is
what tells one cell from another in this design.

**The excitation generator (`bpuf_excite`).** It is a counter on the
**falling** clock edge. While `enable` is low it holds `exc` high. Once
`enable` is high, it repeats a period of `HI + LO` clocks, starting at position
`PHASE`: `exc` is high for positions `0 .. HI-1` and low for the rest. The
generator uses the falling edge so that the asynchronous preset/clear never
changes on the rising edge where the cell and the capture register sample. A
rising-edge generator would create a simulation race and a real hold hazard.

**The capture register (`puf_coeff_reg`).** It samples q1 on rising edges. It
waits one clock after the generator reports `run`, then shifts in eight bits,
most significant bit first. The finished byte is copied to `coef` and `valid`
is raised. The filter keeps using the previous coefficient until a new capture
is complete. Dropping `enable` clears `valid`. Raising `enable` again
regenerates the coefficient, and with the same settings it gets the same byte.

Together these give a bit stream of this shape:

* q1 reads 1 for each clock the excitation is high.
* In each low phase it reads 1, 0, 1, 0, ...

A zero is therefore always isolated, as in `D7 = 1101_0111`. All coefficient
bytes reported for the published design have this form. Each cell's
(`HI`, `LO`, `PHASE`) setting is given in the top's `EXC_CFG` parameter. The
default setting reproduces the first reported set, D7, DD, AA, AF:

| coefficient | value | HI | LO | PHASE |
|-------------|-------|----|----|-------|
| W0 (tap x(n))   | D7 | 2 | 4 | 0 |
| W1 (tap x(n-1)) | DD | 2 | 2 | 0 |
| W2 (tap x(n-2)) | AA | 1 | 8 | 0 |
| W3 (tap x(n-3)) | AF | 2 | 5 | 1 |

Other settings that reproduce the other reported sets are in
`tb/tb_tafir_workloads.sv`:

* 7F, D7, DD, FF
* 5F, EB, 6D, 7F
* FF, AF, 7B, FF

A single cell with HI=1, LO=4, PHASE=2 gives 75. To work out the byte for any
setting, step the rules above through one clock at a time. The function
`model_coef` in `tb/tb_tafir_workloads.sv` does exactly this.

## The filter (`fir_filter`)

`y(n) = W0 x(n) + W1 x(n-1) + W2 x(n-2) + W3 x(n-3)`, unsigned. The input goes
through a registered delay line `x[0..3]`, and the sum of products is
registered into `dout`. A sample presented before rising edge *k* enters
`x[0]` at edge *k* and first shows in `dout` after edge *k+1*. The filter takes
one sample per clock.

**8-bit wrap.** Every product and the sum are kept to `SUM_W` = 8 bits, and the
result is zero-extended to the 16-bit `dout`. The upper byte of `dout` is
therefore always zero at the defaults. This matches the behaviour reported for
the published design. With input 1 and coefficients D7, DD, AA, AF, the output
is `000D`, the low byte of `0x30D`. Likewise `0032` is reported for the second
set and `0028` for the fourth. For a filter that keeps the full sum, set
`SUM_W = 16`. The result is then the sum modulo 2^16. Four 8x8 products can
reach 18 bits, so 16 bits can still wrap at extreme inputs.

## Top level (`trojan_aware_fir`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock; everything runs on it (excitation on its falling edge) |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `enable` | in | 1 | start excitation and coefficient generation; low = cells held excited |
| `din` | in | 8 | input sample |
| `dout` | out | 16 | filter output |
| `q` | out | 8 | raw cell outputs: `q[2i]` = q1 and `q[2i+1]` = q2 of cell *i* |
| `coef_valid` | out | 1 | all four coefficients loaded in this enable session |

Timing:

* `coef_valid` rises 9 rising edges after the first falling edge that sees
  `enable` high.
* Before the first coefficients are loaded they are zero, so `dout` is 0.
* The filter runs continuously from reset.

Parameters (defaults in brackets): `TAPS` [4], `DATA_W` [8], `COEF_W` [8],
`SUM_W` [8], `DOUT_W` [16] and `EXC_CFG`. `EXC_CFG` is a packed array of
`tafir_pkg::exc_cfg_t {hi, lo, phase}`, and entry *i* belongs to coefficient
W*i*. If you change `TAPS`, you must pass an `EXC_CFG` with that many entries.

Files, bottom up:

* `rtl/tafir_pkg.sv`: widths, `exc_cfg_t`, default settings
* `bpuf_cell`
* `bpuf_excite`
* `puf_coeff_reg`
* `puf_coeff_gen`
* `fir_filter`
* `trojan_aware_fir`

## What follows the published design and what does not

Taken from the published design:

* four taps with one Butterfly PUF per coefficient
* 8-bit samples and coefficients, eight PUF bits per coefficient, one bit per
  clock
* the two-flip-flop cell with preset/clear on the excitation
* registered inputs x1..x4 and output register
* the 8-bit sum on a 16-bit output port
* the pin set clk, enable, din, dout, Q1..Q8

Choices of this design:

* **Excitation timing.** The published design drives each cell from an
  excitation clock of its own frequency and gives no periods. The counter
  generator, its falling-edge timing and the `EXC_CFG` values are this
  design's own. The values were fitted so that the cells reproduce the
  reported coefficient bytes.
* **Capture details.** The one-clock start delay, the MSB-first order and
  sampling q1 are this design's choices. The start delay is what allows
  coefficients with a leading 0, such as 75 or 7F.
* **Added ports.** `rst_n` and `coef_valid` are additions.
* **Coefficient order.** Reported coefficient 1 is taken as W0. The reported
  outputs only check the sum of the four, so the order cannot be confirmed.
* **Registers.** The conceptual block diagram multiplies W0 by the
  unregistered x(n). This design follows the implemented structure, which
  registers the input first.
* **Uniqueness.** There is no physical randomness. Two copies of this RTL
  with the same `EXC_CFG` give the same coefficients. Per-device uniqueness
  would need a real latch-based cell, or per-device settings.

Out of scope: the A/D converter that would feed `din`. The published design
only mentions it as a generic part in front of any digital filter.

## How far it is verified

Every block has a self-checking testbench in `tb/`:

* **`tb_bpuf_cell`**: random excitation against a model of the preset/swap
  rules.
* **`tb_bpuf_excite`**: the excitation sequence for two settings, plus
  restart.
* **`tb_puf_coeff_reg`**: random bytes, the exact ready edge, and hold and
  restart.
* **`tb_puf_coeff_gen`**: the five reported bytes (75, D7, DD, AA, AF), the
  9-edge ready time, q2 = ~q1, and regeneration.
* **`tb_fir_filter`**: random data and coefficients against a full-precision
  model, for `SUM_W` 8 and 16.
* **`tb_trojan_aware_fir`**: runs at the default parameters. It checks the
  zero output before enable, the ready time, the impulse response
  (D7, DD, AA, AF), the reported output 000D and random data. It also checks
  regeneration and counts each mechanism: generation, regeneration, 8-bit
  wrap and PUF pin activity.
* **`tb_tafir_workloads`**: the three other reported coefficient sets, with
  outputs 0032 and 0028. For the third set no output was reported, so the
  test checks 0036, the low byte of 0x236. A 6-tap instance checks the
  general N-tap case against a model of the coefficient source.

Each testbench was also run against a deliberately broken copy of its block,
and the testbench caught it. Lint (`verilator -Wall`) and elaboration are clean. The only notices are
about package constants a module does not use, and the capture counter that
`puf_coeff_gen` leaves unconnected.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/tafir_pkg.sv tb/tb_trojan_aware_fir.sv --top-module tb_trojan_aware_fir
./obj_dir/Vtb_trojan_aware_fir
```

Replace the testbench name to run any other testbench. Each one prints
`TB_RESULT checks=N failures=M`. All of them run in well under a second.
