// Reference models for the testbenches, written from the equations rather
// than from the RTL structure: the diode term (c/eps)(exp(z)-1) evaluated in
// real arithmetic and quantized, and one forward-Euler step of the
// normalized Vilnius equations on 64-bit integers in Q.14.
package tb_ref_pkg;

  localparam real   COE      = 6.2e-9;   // c/eps
  localparam int    FRAC     = 14;
  localparam int    DT       = 7;        // delta_theta = 2**-7
  localparam int    EPS_SH   = 3;        // 1/eps = 8
  localparam longint SMAX    = (64'sd1 <<< 21) - 1;
  localparam longint SMIN    = -(64'sd1 <<< 21);

  // Table value: z is quantized down to a multiple of 2**-7 in [0, 32).
  function automatic longint lut(longint z);
    real zq, v;
    if (z < 0) return 0;
    if (z >= (64'sd32 <<< FRAC)) zq = 32.0 - 1.0 / 128.0;
    else zq = real'(z >>> 7) / 128.0;
    v = COE * ($exp(zq) - 1.0) * 16384.0;
    if (v > real'(SMAX)) v = real'(SMAX);
    return longint'($floor(v));
  endfunction

  function automatic longint sat(longint v);
    if (v > SMAX) return SMAX;
    if (v < SMIN) return SMIN;
    return v;
  endfunction

  // One integration step. y_used is the y fed to the equations (own or drive).
  function automatic void step(inout longint x, inout longint y, inout longint z,
                               input longint a, input longint boe);
    longint dx, dy, dz;
    dx = y;
    dy = ((a * y) >>> FRAC) - x - z;
    dz = boe + y * 8 - lut(z);
    x = sat(x + (dx >>> DT));
    y = sat(y + (dy >>> DT));
    z = sat(z + (dz >>> DT));
  endfunction

  function automatic longint q14(real v);
    return longint'($floor(v * 16384.0 + 0.5));
  endfunction

endpackage
