// fcc_pkg: shared number formats, sizes and helper functions of the
// finite-set model predictive controller for flying-capacitor inverters.
//
// Physical quantities (volts, amperes) travel as signed fixed-point words
// of DW bits with DF fractional bits. Model coefficients (exp(-dR/L),
// (1-exp(-dR/L))/R, d/(2C), 1/3) are signed CW-bit words with CF fractional
// bits. Weight factors are unsigned WW-bit words with WF fractional bits.
// Costs are unsigned GW-bit words with 2*DF fractional bits, the scale of a
// squared quantity. All widths are choices of this design; the
// 18-bit words match the 18x18 hardware multipliers of the target class of
// FPGA. Switch states are bit vectors: bit j of a phase is switch S_(j+1),
// with S_(n-1) the outermost switch, tied to the positive rail.
// Linting the package on its own reports its constants as unused; the
// modules that import it use all of them.
package fcc_pkg;

  localparam int unsigned NPH = 3;     // three converter phases a, b, c

  localparam int unsigned DW  = 18;    // quantity word width
  localparam int unsigned DF  = 8;     // quantity fractional bits
  localparam int unsigned CW  = 18;    // coefficient word width
  localparam int unsigned CF  = 16;    // coefficient fractional bits
  localparam int unsigned WW  = 16;    // weight word width
  localparam int unsigned WF  = 8;     // weight fractional bits
  localparam int unsigned GW  = 56;    // cost width

  typedef logic signed [DW-1:0] val_t;
  typedef logic signed [CW-1:0] coef_t;
  typedef logic        [WW-1:0] weight_t;
  typedef logic        [GW-1:0] cost_t;

  // Model coefficients of the RL load and the flying capacitors, eq. (4)/(5).
  typedef struct packed {
    coef_t a;   // exp(-d R / L)
    coef_t b;   // (1 - exp(-d R / L)) / R
    coef_t c;   // d / (2 C)
  } model_coef_t;

  // 1/3 in coefficient format, for the star-point voltage of eq. (2)/(7).
  localparam coef_t ONE_THIRD = coef_t'((1 << CF) / 3 + 1);

  localparam logic signed [DW-1:0] VMAX = {1'b0, {(DW-1){1'b1}}};
  localparam logic signed [DW-1:0] VMIN = {1'b1, {(DW-1){1'b0}}};

  // Saturate a wide signed value to a quantity word.
  function automatic val_t sat(input logic signed [63:0] x);
    if (x > 64'(VMAX)) return VMAX;
    if (x < 64'(VMIN)) return VMIN;
    return val_t'(x);
  endfunction

  // Signed value (up to 32 bits) times coefficient, truncated by an
  // arithmetic shift and saturated to a quantity word.
  function automatic val_t cmul(input logic signed [31:0] x, input coef_t k);
    logic signed [32+CW-1:0] p;
    p = x * k;
    return sat(64'(p >>> CF));
  endfunction

endpackage
