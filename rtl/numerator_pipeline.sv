// Numerator pipeline of the parameter-a estimator.
//
// Computes, for consecutive oscillator samples,
//   s[n] = (y[n+1] - y[n]) / delta_theta + x[n] + z[n]
// which equals a*y[n] when x, y, z obey the discrete Vilnius equations
// (y[n+1] = y[n] + (a*y[n] - x[n] - z[n]) * delta_theta). Division by
// delta_theta = 2**-DT_SHIFT is a left shift of y taken at the input.
//
// Structure (four register levels, as published):
//   y/dt -> R1 -> R2 ; R1 - R2 -> R3 ;                 R3 + R5 -> R6 = s
//   x -> Rx, z -> Rz ; Rx + Rz -> R4 -> R5 ;
//   y -> D1 -> D2 -> D3 -> D4 = y_delayed
// The published figure draws the final combining element with a multiplier
// symbol; the equation for s[n] is a sum, and the sum is what is built.
//
// Interface: x, y, z in Q8.14, one sample per clock. s has 14 fractional
// bits and S_W bits, enough to hold y/dt exactly, so nothing overflows.
// Timing: s and y_delayed describe the same sample n and leave the pipeline
// 4 clocks after x[n] and z[n] entered it (one clock after y[n+1] entered).
// Registers reset to zero (design's choice).
module numerator_pipeline
  import vpla_pkg::*;
#(
  parameter int unsigned DT_SHIFT = DT_SHIFT_DEFAULT,
  localparam int unsigned S_W     = STATE_W + DT_SHIFT + 2
) (
  input  logic                  clk,
  input  logic                  rst,
  input  state_t                x,
  input  state_t                y,
  input  state_t                z,
  output logic signed [S_W-1:0] s,
  output state_t                y_delayed
);

  typedef logic signed [S_W-1:0] wide_t;

  wide_t  y_dt;
  wide_t  r_ydt1, r_ydt2, r_dif;
  state_t r_x, r_z;
  wide_t  r_xz1, r_xz2;
  wide_t  r_s;
  state_t r_yd [4];

  assign y_dt = wide_t'(y) <<< DT_SHIFT;

  always_ff @(posedge clk) begin
    if (rst) begin
      r_ydt1 <= '0;
      r_ydt2 <= '0;
      r_dif  <= '0;
      r_x    <= '0;
      r_z    <= '0;
      r_xz1  <= '0;
      r_xz2  <= '0;
      r_s    <= '0;
      for (int i = 0; i < 4; i++) r_yd[i] <= '0;
    end else begin
      r_ydt1 <= y_dt;
      r_ydt2 <= r_ydt1;
      r_dif  <= r_ydt1 - r_ydt2;
      r_x    <= x;
      r_z    <= z;
      r_xz1  <= wide_t'(r_x) + wide_t'(r_z);
      r_xz2  <= r_xz1;
      r_s    <= r_dif + r_xz2;
      r_yd[0] <= y;
      for (int i = 1; i < 4; i++) r_yd[i] <= r_yd[i-1];
    end
  end

  assign s         = r_s;
  assign y_delayed = r_yd[3];

endmodule
