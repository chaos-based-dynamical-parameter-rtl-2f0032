// "Calculate derivatives" block of the discrete Vilnius oscillator.
//
// Evaluates the right-hand sides of the normalized Vilnius equations
//   dx = y
//   dy = a*y - x - z
//   dz = b/eps + (1/eps)*y - (c/eps)*(exp(z) - 1)
// from the current state, as in the forward-Euler difference equations of
// the published oscillator. The exp() term comes from a 12-bit-address ROM
// (exp_lut). 1/eps is a power of two (eps = 0.125 in the adjusted model), so
// (1/eps)*y is a left shift by EPS_SHIFT.
//
// Interface: all inputs are Q8.14; a and b/eps arrive as run-time constants.
// Outputs are Q12.14 (DERIV_W bits), wide enough for (1/eps)*y + b/eps and,
// for |a| < 8, for a*y - x - z over the whole state range.
// Timing: purely combinational. The published block is described as a
// pipeline with equal delays on the three outputs; here the delay is zero on
// all three so that the state registers can take one step per clock.
module vilnius_derivatives
  import vpla_pkg::*;
#(
  parameter longint unsigned C_OVER_EPS_Q74 = 64'd117114688775167,
  parameter int unsigned EPS_SHIFT  = 3
) (
  input  state_t x,
  input  state_t y,
  input  state_t z,
  input  state_t a,           // parameter a, Q8.14
  input  state_t b_over_eps,  // b/eps, Q8.14
  output deriv_t dx,
  output deriv_t dy,
  output deriv_t dz
);

  localparam int unsigned PROD_W = 2 * STATE_W;

  state_t                    f_z;
  logic signed [PROD_W-1:0]  ay_full;
  deriv_t                    ay;

  exp_lut #(.C_OVER_EPS_Q74(C_OVER_EPS_Q74)) u_lut (
    .z   (z),
    .f_z (f_z)
  );

  always_comb begin
    ay_full = PROD_W'(a) * PROD_W'(y);
    ay      = deriv_t'(ay_full >>> STATE_FRAC);
    dx      = deriv_t'(y);
    dy      = ay - deriv_t'(x) - deriv_t'(z);
    dz      = deriv_t'(b_over_eps) + (deriv_t'(y) <<< EPS_SHIFT) - deriv_t'(f_z);
  end

endmodule
