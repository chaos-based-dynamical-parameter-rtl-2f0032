// Discrete-time Vilnius chaotic oscillator with Pecora-Carroll drive input.
//
// Three state registers x, y, z (Q8.14) advance by one forward-Euler step
// per clock:  v[n+1] = v[n] + dv[n] * delta_theta,  delta_theta = 2**-DT_SHIFT,
// so the multiplication by the time step is an arithmetic right shift. The
// derivatives come from vilnius_derivatives. Sums saturate to the Q8.14
// range (saturation is this design's choice; the published structure does
// not say what happens on overflow).
//
// Pecora-Carroll synchronization: while sync_en is high the received drive
// signal y_drive replaces the local y in the derivative computation and is
// loaded into the y register, so the local x and z are driven by the remote
// oscillator's y. The receiver of the authentication scheme uses this mode;
// a transmitter model simply ties sync_en low.
//
// Interface: a and b_over_eps are run-time constants (Q8.14). x, y, z are
// the register outputs; y follows y_drive combinationally while sync_en is
// high. Timing: one step per clock; synchronous active-high reset loads
// X0/Y0/Z0 (reset values are this design's choice).
module vilnius_oscillator
  import vpla_pkg::*;
#(
  parameter int unsigned DT_SHIFT   = DT_SHIFT_DEFAULT,
  parameter int unsigned EPS_SHIFT  = 3,
  parameter longint unsigned C_OVER_EPS_Q74 = 64'd117114688775167,
  parameter state_t      X0         = state_t'(1638),  // 0.1
  parameter state_t      Y0         = state_t'(0),
  parameter state_t      Z0         = state_t'(0)
) (
  input  logic   clk,
  input  logic   rst,
  input  state_t a,
  input  state_t b_over_eps,
  input  logic   sync_en,
  input  state_t y_drive,
  output state_t x,
  output state_t y,
  output state_t z
);

  localparam int unsigned SUM_W = DERIV_W + 1;
  localparam logic signed [SUM_W-1:0] SMAX = SUM_W'((1 <<< (STATE_W - 1)) - 1);
  localparam logic signed [SUM_W-1:0] SMIN = -SUM_W'(1 <<< (STATE_W - 1));

  state_t x_q, y_q, z_q;
  state_t y_cur;
  deriv_t dx, dy, dz;
  state_t x_nx, y_nx, z_nx;

  function automatic state_t step(state_t v, deriv_t d);
    logic signed [SUM_W-1:0] s;
    s = SUM_W'(v) + SUM_W'(d >>> DT_SHIFT);
    if (s > SMAX)      return state_t'(SMAX);
    else if (s < SMIN) return state_t'(SMIN);
    else               return state_t'(s);
  endfunction

  assign y_cur = sync_en ? y_drive : y_q;

  vilnius_derivatives #(
    .C_OVER_EPS_Q74 (C_OVER_EPS_Q74),
    .EPS_SHIFT  (EPS_SHIFT)
  ) u_deriv (
    .x          (x_q),
    .y          (y_cur),
    .z          (z_q),
    .a          (a),
    .b_over_eps (b_over_eps),
    .dx         (dx),
    .dy         (dy),
    .dz         (dz)
  );

  always_comb begin
    x_nx = step(x_q, dx);
    y_nx = step(y_cur, dy);
    z_nx = step(z_q, dz);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x_q <= X0;
      y_q <= Y0;
      z_q <= Z0;
    end else begin
      x_q <= x_nx;
      y_q <= y_nx;
      z_q <= z_nx;
    end
  end

  assign x = x_q;
  assign y = y_cur;
  assign z = z_q;

endmodule
