// Workload: transmitter a swept from 0.20 to 0.70 in steps of 0.01, for
// receiver a = 0.47 and a = 0.60, synchronized receiver, 2mu = 2**-17.
// For each point the transmitter and receiver are reset, run 1.4e5 clocks,
// and a_est is averaged over the last 4e4 clocks (min and max recorded).
// Checks: each mean within 0.03 of a_tx; means strictly increasing with
// a_tx. With b/eps = 34.46 the discrete oscillator stops oscillating below
// a ~ 0.22 (the equilibrium becomes stable and y decays towards zero), so
// there is nothing to estimate from: points below a_tx = 0.24 (K_MIN) are reported
// but not checked, and left out of the error statistics. Reported: the constant offset, the largest relative error before
// and after removing it, and how many neighbouring levels have
// non-overlapping min-max ranges.
module tb_sweep_a;
  import vpla_pkg::*;

  localparam state_t BOE  = state_t'(564593);
  localparam int     NPTS = 51;
  localparam int     RUN  = 140000;
  localparam int     WIN  = 40000;
  localparam int     K_MIN = 4;      // first checked point, a_tx = 0.24

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  state_t a_tx = '0, a_rx = '0;
  state_t x_m, y_m, z_m, x_s, y_s, z_s;
  est_t a_est;
  real mean_v [NPTS], lo_v [NPTS], hi_v [NPTS];

  always #5 clk = ~clk;

  vilnius_oscillator #(.X0(state_t'(16384)), .Y0(state_t'(-16384)), .Z0(state_t'(81920))) u_tx (
    .clk(clk), .rst(rst), .a(a_tx), .b_over_eps(BOE), .sync_en(1'b0), .y_drive('0),
    .x(x_m), .y(y_m), .z(z_m));

  pla_receiver dut (
    .clk(clk), .rst(rst), .a_rx(a_rx), .b_over_eps(BOE), .x_m(x_m), .y_m(y_m),
    .sync_en(1'b1), .use_local(1'b0), .mu_shift(5'd17),
    .x_s(x_s), .y_s(y_s), .z_s(z_s), .a_est(a_est));

  initial begin
    repeat (2 * NPTS * (RUN + 10) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sweep(real rx);
    real off, maxrel, maxrel_c;
    int distinct;
    a_rx = state_t'($rtoi(rx * 16384.0 + 0.5));
    for (int k = 0; k < NPTS; k++) begin
      real atx, sum, v;
      atx = 0.20 + 0.01 * real'(k);
      @(negedge clk) begin rst = 1; a_tx = state_t'($rtoi(atx * 16384.0 + 0.5)); end
      @(negedge clk) rst = 0;
      sum = 0.0; lo_v[k] = 100.0; hi_v[k] = -100.0;
      for (int i = 0; i < RUN; i++) begin
        @(posedge clk); #1;
        if (i >= RUN - WIN) begin
          v = real'(a_est) / 1048576.0;
          sum += v;
          if (v < lo_v[k]) lo_v[k] = v;
          if (v > hi_v[k]) hi_v[k] = v;
        end
      end
      mean_v[k] = sum / real'(WIN);
      $display("a_rx=%4.2f a_tx=%4.2f mean=%7.4f min=%7.4f max=%7.4f", rx, atx, mean_v[k], lo_v[k], hi_v[k]);
      if (k < K_MIN) continue;
      checks++;
      if (mean_v[k] - atx > 0.03 || atx - mean_v[k] > 0.03) begin
        failures++; $display("FAIL a_tx=%4.2f estimate %f", atx, mean_v[k]);
      end
      if (k > K_MIN) begin
        checks++;
        if (mean_v[k] <= mean_v[k-1]) begin failures++; $display("FAIL not increasing at a_tx=%4.2f", atx); end
      end
    end
    off = 0.0;
    for (int k = K_MIN; k < NPTS; k++) off += mean_v[k] - (0.20 + 0.01 * real'(k));
    off /= real'(NPTS - K_MIN);
    maxrel = 0.0; maxrel_c = 0.0; distinct = 0;
    for (int k = K_MIN; k < NPTS; k++) begin
      real atx, r, rc;
      atx = 0.20 + 0.01 * real'(k);
      r  = (mean_v[k] - atx) / atx;        if (r < 0) r = -r;
      rc = (mean_v[k] - off - atx) / atx;  if (rc < 0) rc = -rc;
      if (r > maxrel) maxrel = r;
      if (rc > maxrel_c) maxrel_c = rc;
      if (k > K_MIN && lo_v[k] > hi_v[k-1]) distinct++;
    end
    $display("a_rx=%4.2f: mean offset %f, max relative error %f %%, after offset removal %f %%, %0d of %0d neighbouring levels separated",
             rx, off, 100.0 * maxrel, 100.0 * maxrel_c, distinct, NPTS - 1 - K_MIN);
  endtask

  initial begin
    sweep(0.47);
    sweep(0.60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
