// Least-mean-squares adaptive filter that estimates a from s[n] = a*y[n].
//
// Implements the stochastic-gradient update
//   a_est <- a_est + 2mu * y_d * (s - a_est * y_d)
// with 2mu = 2**-mu_shift, so the step-size multiplication is a shift.
// Structure (as published): s and y_d come straight from the output
// registers of the numerator pipeline.
//   s  -> Rs2 ;  y_d * a_est -> Rp ;  Rs2 - Rp -> Re ;
//   y_d -> Ry2 -> Ry3 ;  Re * Ry3 -> Rg ;  a_est + (Rg * 2mu) -> a_est
// The product a_est*y_d uses the a_est of the same clock, so the loop is a
// delayed LMS whose error term is three clocks older than the register it
// updates; with a step of 2**-17 this has no visible effect on convergence.
//
// Formats: y_d Q8.14, s with 14 fractional bits, a_est Q4.20 (24 bits) as
// published. Intermediate products are kept at full width. The scaled
// update is rounded to nearest and the a_est sum saturates to the Q4.20
// range (both are this design's choices).
// Interface: mu_shift selects 2mu at run time (17 gives 2**-17 ~ 7.6e-6, the
// floor of 1e-5; 19 gives the floor of 3e-6). Timing: one sample per clock;
// a change in s reaches a_est 4 clocks later. Synchronous reset sets a_est
// to A_INIT (0 by default, as in the published experiments).
module lms_filter
  import vpla_pkg::*;
#(
  parameter int unsigned S_W    = STATE_W + DT_SHIFT_DEFAULT + 2,
  parameter est_t        A_INIT = '0
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic signed [S_W-1:0] s,
  input  state_t                y_d,
  input  logic [4:0]            mu_shift,
  output est_t                  a_est
);

  localparam int unsigned P_W = EST_W + STATE_W;       // a_est * y_d
  localparam int unsigned E_W = S_W + 1;               // error
  localparam int unsigned G_W = E_W + STATE_W;         // error * y
  // Rg has 2*STATE_FRAC fractional bits; a_est has EST_FRAC.
  localparam int unsigned G_ALIGN = 2 * STATE_FRAC - EST_FRAC;
  localparam int unsigned U_W = G_W + 1;

  typedef logic signed [E_W-1:0] err_t;
  typedef logic signed [G_W-1:0] grad_t;
  typedef logic signed [U_W-1:0] upd_t;

  localparam upd_t AMAX = upd_t'((1 <<< (EST_W - 1)) - 1);
  localparam upd_t AMIN = -upd_t'(1 <<< (EST_W - 1));

  logic signed [P_W-1:0] prod_full;
  logic signed [S_W-1:0] r_s2;
  err_t                  r_p;
  state_t                r_y2, r_y3;
  err_t                  r_e;
  grad_t                 r_g;
  est_t                  a_q;
  upd_t                  a_sum;

  int unsigned upd_shift;
  upd_t        upd_half;

  always_comb begin
    prod_full = P_W'(a_q) * P_W'(y_d);
    // 2mu * (error * y), rounded to nearest: plain truncation would bias
    // every update towards minus infinity and pull a_est low by ~2**-9.
    upd_shift = G_ALIGN + 32'(mu_shift);
    upd_half  = upd_t'(1) <<< (upd_shift - 1);
    a_sum     = upd_t'(a_q) + ((upd_t'(r_g) + upd_half) >>> upd_shift);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      r_s2 <= '0;
      r_p  <= '0;
      r_y2 <= '0;
      r_y3 <= '0;
      r_e  <= '0;
      r_g  <= '0;
      a_q  <= A_INIT;
    end else begin
      r_s2 <= s;
      r_p  <= err_t'(prod_full >>> EST_FRAC);
      r_y2 <= y_d;
      r_y3 <= r_y2;
      r_e  <= err_t'(r_s2) - r_p;
      r_g  <= grad_t'(r_e) * grad_t'(r_y3);
      if (a_sum > AMAX)      a_q <= est_t'(AMAX);
      else if (a_sum < AMIN) a_q <= est_t'(AMIN);
      else                   a_q <= est_t'(a_sum);
    end
  end

  assign a_est = a_q;

endmodule
