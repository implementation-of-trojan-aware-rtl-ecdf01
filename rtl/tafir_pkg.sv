// Shared widths, types and default excitation settings of the PUF-keyed
// 4-tap FIR filter.
//
// The filter takes 8-bit samples and four 8-bit coefficients; each
// coefficient is assembled from eight output bits of one Butterfly PUF
// cell. The cell's output bit stream is set by the timing of its
// excitation signal, described per cell by an exc_cfg_t: the excitation is
// high for `hi` clocks and low for `lo` clocks, repeating, and the
// generator starts `phase` clocks into that period when enabled.
//
// The sample, coefficient and output widths (8, 8, 16), the tap count (4)
// and the 8-bit wrap of the sum of products follow the published design.
// The exc_cfg_t encoding and the four default settings are this design's
// own: they were chosen so that, from reset, the four cells produce the
// coefficient bytes D7, DD, AA and AF, the first coefficient set reported
// for the published design.
package tafir_pkg;

  localparam int unsigned TAPS   = 4;   // filter taps = number of PUF cells
  localparam int unsigned DATA_W = 8;   // input sample width
  localparam int unsigned COEF_W = 8;   // coefficient width = PUF bits per coefficient
  localparam int unsigned SUM_W  = 8;   // width the products and their sum wrap to
  localparam int unsigned DOUT_W = 16;  // output port width (sum zero-extended)

  // Excitation timing of one PUF cell, in clock cycles.
  typedef struct packed {
    logic [7:0] hi;     // cycles with the excitation asserted (>= 1)
    logic [7:0] lo;     // cycles with the excitation released (>= 1)
    logic [7:0] phase;  // starting position inside the hi+lo period
  } exc_cfg_t;

  function automatic exc_cfg_t exc_cfg(logic [7:0] hi, logic [7:0] lo, logic [7:0] phase);
    exc_cfg_t c;
    c.hi    = hi;
    c.lo    = lo;
    c.phase = phase;
    return c;
  endfunction

  // Default settings, index 0 = coefficient W0 (tap x(n)).
  // They give W0..W3 = D7, DD, AA, AF.
  localparam exc_cfg_t [TAPS-1:0] EXC_CFG_DEFAULT = {
    exc_cfg(2, 5, 1),   // W3 = AF
    exc_cfg(1, 8, 0),   // W2 = AA
    exc_cfg(2, 2, 0),   // W1 = DD
    exc_cfg(2, 4, 0)    // W0 = D7
  };

endpackage
