// Estimator of the Vilnius oscillator parameter a.
//
// From the difference equation y[n+1] = y[n] + (a*y[n] - x[n] - z[n])*dt,
// a = s[n] / y[n] with s[n] = (y[n+1] - y[n])/dt + x[n] + z[n]. Division is
// avoided: the numerator pipeline forms s[n] and a copy of y[n] delayed to
// the same phase, and an LMS adaptive filter converges to the a that best
// explains s[n] = a*y[n] in the mean-square sense.
//
// Interface: x, y, z in Q8.14, one sample per clock, taken from any source
// (a local oscillator, or received x_m, y_m with a synchronized local z_s).
// mu_shift sets 2mu = 2**-mu_shift. a_est is Q4.20.
// Timing: 4 clocks through the numerator pipeline plus 4 through the LMS
// loop; convergence from a_est = 0 takes on the order of 1e5 clocks at
// mu_shift = 17 (see the README for measured figures).
module a_estimator
  import vpla_pkg::*;
#(
  parameter int unsigned DT_SHIFT = DT_SHIFT_DEFAULT,
  parameter est_t        A_INIT   = '0
) (
  input  logic       clk,
  input  logic       rst,
  input  state_t     x,
  input  state_t     y,
  input  state_t     z,
  input  logic [4:0] mu_shift,
  output est_t       a_est
);

  localparam int unsigned S_W = STATE_W + DT_SHIFT + 2;

  logic signed [S_W-1:0] s;
  state_t                y_delayed;

  numerator_pipeline #(.DT_SHIFT(DT_SHIFT)) u_num (
    .clk       (clk),
    .rst       (rst),
    .x         (x),
    .y         (y),
    .z         (z),
    .s         (s),
    .y_delayed (y_delayed)
  );

  lms_filter #(.S_W(S_W), .A_INIT(A_INIT)) u_lms (
    .clk      (clk),
    .rst      (rst),
    .s        (s),
    .y_d      (y_delayed),
    .mu_shift (mu_shift),
    .a_est    (a_est)
  );

endmodule
