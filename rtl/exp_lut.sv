// Lookup table for the diode nonlinearity of the Vilnius oscillator.
//
// Returns f(z) = (c/eps) * (exp(z) - 1) in the Q8.14 state format for a
// Q8.14 input z. The published oscillator approximates this term with a ROM
// of 12-bit address space; the way z is mapped onto the address is this
// design's own choice:
//   * 0 <= z < 32 : address = z >> 7 (z in Q8.14), a step of 2**-7 in z;
//   * z < 0       : 0, since |f(z)| < c/eps there, far below
//     one least significant bit;
//   * z >= 32     : the last entry.
// Entry i holds floor((c/eps) * (exp(i * step) - 1) * 2**14), clipped to the
// largest Q8.14 value. The table is computed at elaboration in integer
// arithmetic from C_OVER_EPS_Q74, so no data file is needed. Read is
// combinational (asynchronous ROM), so the oscillator can complete one
// integration step per clock.
module exp_lut
  import vpla_pkg::*;
#(
  // c/eps scaled by 2**74 (2**14 for the Q8.14 output, 2**60 for the
  // internal fraction): round(6.2e-9 * 2**74), where
  // c/eps = (rho * i_S / V_T) / (C2/C1) = 7.75e-10 / 0.125.
  parameter longint unsigned C_OVER_EPS_Q74 = 64'd117114688775167
) (
  input  state_t z,
  output state_t f_z
);

  localparam int unsigned DEPTH        = 1 << LUT_AW;
  localparam int unsigned Z_RANGE_LOG2 = 5;  // table covers z in [0, 32)
  localparam int unsigned ADDR_LSB     = STATE_FRAC + Z_RANGE_LOG2 - LUT_AW;
  // exp(2**-7) in Q.60, the ratio between neighbouring table entries.
  localparam logic [127:0] EXP_STEP_Q60 = 128'd1161963980038882737;
  localparam logic [127:0] ONE_Q60      = 128'd1 << 60;
  localparam logic [191:0] MAX_VALUE    = 192'((1 << (STATE_W - 1)) - 1);

  state_t rom [DEPTH];

  // Entry i = floor((c/eps) * (exp(i * 2**-7) - 1) * 2**14), clipped.
  // exp(i * 2**-7) is built up by repeated multiplication in Q.60; the
  // truncation error stays far below one output LSB.
  initial begin
    logic [127:0] e_q60;
    logic [191:0] v;
    e_q60 = ONE_Q60;
    for (int i = 0; i < DEPTH; i++) begin
      v = (192'(e_q60 - ONE_Q60) * 192'(C_OVER_EPS_Q74)) >> 120;
      if (v > MAX_VALUE) v = MAX_VALUE;
      rom[i] = state_t'(v);
      e_q60  = 128'((256'(e_q60) * 256'(EXP_STEP_Q60)) >> 60);
    end
  end

  logic              z_neg;
  logic              z_over;
  logic [LUT_AW-1:0] addr;

  always_comb begin
    z_neg  = z[STATE_W-1];
    z_over = |z[STATE_W-2 : ADDR_LSB + LUT_AW];
    addr   = z[ADDR_LSB + LUT_AW - 1 : ADDR_LSB];
    if (z_neg)       f_z = '0;
    else if (z_over) f_z = rom[DEPTH-1];
    else             f_z = rom[addr];
  end

endmodule
