// Gateway-side receiver of the chaos-based physical-layer authentication
// scheme: a local discrete Vilnius oscillator plus the parameter-a estimator.
//
// The transmitter (a sensor node with an analog Vilnius oscillator) sends
// its state variables x_m and y_m. The receiver uses y_m to synchronize its
// own oscillator by Pecora-Carroll replacement (sync_en high), after which
// the local z_s follows the transmitter's z_m. The estimator then works on
// (x_m, y_m, z_s) and converges to the transmitter's a, which identifies the
// transmitter. The receiver's own a_rx matters: it shapes how finely
// transmitter values of a can be told apart.
//
// use_local selects the estimator's input: low = received x_m, y_m with the
// local z_s (authentication mode); high = the local oscillator's own x_s,
// y_s, z_s (self-test of the estimator on a known a).
//
// Interface: all signal values Q8.14; a_est Q4.20; received samples arrive
// one per clock, already demodulated (modulator, channel and demodulator are
// outside this block). Timing: x_m/y_m of clock t and z_s of clock t form
// one sample; a_est reacts 8 clocks later and settles within ~1e5 clocks.
module pla_receiver
  import vpla_pkg::*;
#(
  parameter int unsigned DT_SHIFT   = DT_SHIFT_DEFAULT,
  parameter int unsigned EPS_SHIFT  = 3,
  parameter longint unsigned C_OVER_EPS_Q74 = 64'd117114688775167,
  parameter state_t      X0         = state_t'(-8192),  // -0.5
  parameter state_t      Y0         = state_t'(8192),   //  0.5
  parameter state_t      Z0         = state_t'(0)
) (
  input  logic       clk,
  input  logic       rst,
  // constants of the local oscillator
  input  state_t     a_rx,
  input  state_t     b_over_eps,
  // received (demodulated) transmitter signals
  input  state_t     x_m,
  input  state_t     y_m,
  // control
  input  logic       sync_en,
  input  logic       use_local,
  input  logic [4:0] mu_shift,
  // outputs
  output state_t     x_s,
  output state_t     y_s,
  output state_t     z_s,
  output est_t       a_est
);

  state_t est_x, est_y;

  vilnius_oscillator #(
    .DT_SHIFT   (DT_SHIFT),
    .EPS_SHIFT  (EPS_SHIFT),
    .C_OVER_EPS_Q74 (C_OVER_EPS_Q74),
    .X0         (X0),
    .Y0         (Y0),
    .Z0         (Z0)
  ) u_osc (
    .clk        (clk),
    .rst        (rst),
    .a          (a_rx),
    .b_over_eps (b_over_eps),
    .sync_en    (sync_en),
    .y_drive    (y_m),
    .x          (x_s),
    .y          (y_s),
    .z          (z_s)
  );

  always_comb begin
    est_x = use_local ? x_s : x_m;
    est_y = use_local ? y_s : y_m;
  end

  a_estimator #(.DT_SHIFT(DT_SHIFT)) u_est (
    .clk      (clk),
    .rst      (rst),
    .x        (est_x),
    .y        (est_y),
    .z        (z_s),
    .mu_shift (mu_shift),
    .a_est    (a_est)
  );

endmodule
