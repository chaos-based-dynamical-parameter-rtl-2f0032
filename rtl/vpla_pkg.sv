// Shared fixed-point formats and constants of the chaos-oscillator parameter
// estimator.
//
// State variables x, y, z of the discrete Vilnius oscillator are signed
// fixed-point numbers with 8 integer bits (sign included) and 14 fractional
// bits, as the oscillator was built. The parameter estimate uses 4 integer
// and 20 fractional bits. Both formats follow the published design; the
// time-step and nonlinearity constants below are this implementation's own
// choices and are documented where they are used.
package vpla_pkg;

  // Oscillator state format: Q8.14 (22 bits, two's complement).
  localparam int unsigned STATE_W    = 22;
  localparam int unsigned STATE_FRAC = 14;

  // Parameter estimate format: Q4.20 (24 bits, two's complement).
  localparam int unsigned EST_W    = 24;
  localparam int unsigned EST_FRAC = 20;

  // Width of the derivative values inside the oscillator: 4 extra integer
  // bits over the state format, because (1/eps)*y and b/eps exceed +-128.
  localparam int unsigned DERIV_W = STATE_W + 4;

  // Address width of the exp() lookup table (12-bit address space).
  localparam int unsigned LUT_AW = 12;

  typedef logic signed [STATE_W-1:0] state_t;
  typedef logic signed [EST_W-1:0]   est_t;
  typedef logic signed [DERIV_W-1:0] deriv_t;

  // Default integration step: delta_theta = 2**-DT_SHIFT.
  localparam int unsigned DT_SHIFT_DEFAULT = 7;

endpackage
