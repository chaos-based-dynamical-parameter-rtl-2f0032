// Workload: bifurcation sweep of the discrete Vilnius oscillator.
// a runs from 0.20 to 1.20 in steps of 0.05 with b/eps = 34.46 (V1 = 2 V)
// and eps = 0.125. For each value the free-running oscillator is reset,
// left to settle for TRANS clocks, and then observed for OBS clocks. Every
// local maximum of y is rounded to 2**-6 and counted once per distinct
// value; the peak-to-peak swing of y and the extremes of x, y, z are kept.
// One distinct maximum means a period-1 orbit, a few mean period doubling,
// many mean a chaotic or long-period orbit.
// Checks: at a = 0.20 the oscillation has died out (swing below 0.5); at
// a = 0.30 the orbit is period 1; at a = 0.40 or 0.45 it has doubled (2 to
// 8 distinct maxima); below the escape point some orbit has more than 20
// distinct maxima (chaos); for a < A_BOUND no state reaches its saturation
// limit and z stays inside the exp ROM range.
// Observed: rest at 0.20, period 1 from 0.25 to 0.35, period 2 at 0.40 and
// 0.45, chaos from 0.50 to 0.90 with a period-2 window at 0.65. From 0.95 on
// the orbit grows past the Q8.14 range (|z| hits 128) and the clamped result
// no longer models the circuit; this is reported, not checked. The same
// Euler equations in floating point diverge there too, so this is a property
// of the equations at these constants, not of the number format. The
// document's sweep runs to 1.2.
module tb_bifurcation;
  import vpla_pkg::*;

  localparam state_t BOE   = state_t'(564593);
  localparam int     NPTS  = 21;
  localparam int     TRANS = 100000;
  localparam int     OBS   = 200000;
  localparam int     MAXPK = 64;
  localparam real    A_BOUND = 0.92;  // orbits stay inside the number ranges below this a
  localparam state_t SMAX  = state_t'({1'b0, {(STATE_W-1){1'b1}}});
  localparam state_t SMIN  = state_t'({1'b1, {(STATE_W-1){1'b0}}});

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  state_t a = '0;
  state_t x, y, z;
  int npk_v [NPTS];
  real swing_v [NPTS];

  always #5 clk = ~clk;

  vilnius_oscillator #(.X0(state_t'(16384)), .Y0(state_t'(-16384)), .Z0(state_t'(81920))) dut (
    .clk(clk), .rst(rst), .a(a), .b_over_eps(BOE), .sync_en(1'b0), .y_drive('0),
    .x(x), .y(y), .z(z));

  initial begin
    repeat (NPTS * (TRANS + OBS + 10) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit chaos_seen, limit_hit;
    int k_escape;
    chaos_seen = 0; limit_hit = 0; k_escape = NPTS;
    for (int k = 0; k < NPTS; k++) begin
      real av;
      int pk [MAXPK];
      int npk;
      state_t y1, y2, ylo, yhi, xlo, xhi, zlo, zhi;
      av = 0.20 + 0.05 * real'(k);
      @(negedge clk) begin rst = 1; a = state_t'($rtoi(av * 16384.0 + 0.5)); end
      @(negedge clk) rst = 0;
      repeat (TRANS) @(posedge clk);
      #1;
      npk = 0; y1 = y; y2 = y;
      ylo = SMAX; yhi = SMIN; xlo = SMAX; xhi = SMIN; zlo = SMAX; zhi = SMIN;
      for (int i = 0; i < OBS; i++) begin
        @(posedge clk); #1;
        if (y < ylo) ylo = y;
        if (y > yhi) yhi = y;
        if (x < xlo) xlo = x;
        if (x > xhi) xhi = x;
        if (z < zlo) zlo = z;
        if (z > zhi) zhi = z;
        if (y1 > y2 && y1 >= y && npk <= MAXPK) begin
          int q;
          bit found;
          found = 0;
          q = int'(y1) >>> (STATE_FRAC - 6);
          for (int j = 0; j < npk && j < MAXPK; j++) if (pk[j] == q) found = 1;
          if (!found) begin
            if (npk < MAXPK) pk[npk] = q;
            npk++;
          end
        end
        y2 = y1; y1 = y;
      end
      npk_v[k] = npk;
      swing_v[k] = real'(int'(yhi) - int'(ylo)) / 16384.0;
      if (xlo == SMIN || xhi == SMAX || ylo == SMIN || yhi == SMAX || zlo == SMIN || zhi == SMAX
          || zhi >= state_t'(32 * 16384)) begin
        if (k_escape == NPTS) k_escape = k;
        if (av < A_BOUND) limit_hit = 1;
      end
      if (npk > 20 && k < k_escape) chaos_seen = 1;
      $display("a=%4.2f distinct maxima %0d%s  y swing %7.3f  x [%7.2f %7.2f] y [%6.2f %6.2f] z [%6.2f %6.2f]",
               av, (npk > MAXPK) ? MAXPK : npk, (npk > MAXPK) ? "+" : "", swing_v[k],
               real'(xlo) / 16384.0, real'(xhi) / 16384.0, real'(ylo) / 16384.0, real'(yhi) / 16384.0,
               real'(zlo) / 16384.0, real'(zhi) / 16384.0);
    end
    if (k_escape < NPTS)
      $display("from a=%4.2f the orbit leaves the Q8.14 range and is clamped", 0.20 + 0.05 * real'(k_escape));
    checks++;
    if (swing_v[0] >= 0.5) begin failures++; $display("FAIL a=0.20 still oscillates"); end
    checks++;
    if (npk_v[2] != 1 || swing_v[2] < 1.0) begin failures++; $display("FAIL a=0.30 is not a period-1 orbit"); end
    checks++;
    if (!((npk_v[4] >= 2 && npk_v[4] <= 8) || (npk_v[5] >= 2 && npk_v[5] <= 8))) begin
      failures++; $display("FAIL no period doubling at a=0.40..0.45");
    end
    checks++;
    if (!chaos_seen) begin failures++; $display("FAIL no chaotic orbit in the sweep"); end
    checks++;
    if (limit_hit) begin failures++; $display("FAIL a state reached its fixed-point limit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
