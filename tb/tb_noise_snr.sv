// Workload: band-limited white Gaussian noise added to the transmitted x_m
// and y_m; transmitter and receiver a = 0.47; SNR 50, 40, 30, 24 and 18 dB;
// 2mu = 2**-17 and 2**-19.
// Noise: each clock a Gaussian sample (sum of 12 uniforms minus 6) goes
// through a one-pole low-pass filter, n[k] = n[k-1] + (w[k] - n[k-1])/32,
// which keeps it inside the band of the chaotic signals (their main period
// is about 800 clocks). It is scaled so that its variance is the signal's
// variance divided by 10**(SNR/10), separately for x and y; both variances
// are measured by the testbench itself.
// For each setting the receiver is reset, synchronized from the start, and
// a_est is observed (mean, min, max) over the last 1e5 clocks of the run.
// Checks: at 50 dB the mean is within 0.03 of 0.47; the min-max range at
// 18 dB is wider than at 50 dB; at 18 and 24 dB the slower step size gives
// a narrower range than the faster one.
module tb_noise_snr;
  import vpla_pkg::*;

  localparam state_t BOE = state_t'(564593);
  localparam int     WIN = 100000;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [4:0] mu_shift = 5'd17;
  state_t x_m, y_m, z_m, x_s, y_s, z_s;
  state_t x_rx = '0, y_rx = '0;
  est_t a_est;
  real nx = 0.0, ny = 0.0, gx = 0.0, gy = 0.0;
  real var_x, var_y, var_n;
  real snr_db [5] = '{50.0, 40.0, 30.0, 24.0, 18.0};
  real rng17 [5], rng19 [5], mean17 [5];

  always #5 clk = ~clk;

  vilnius_oscillator #(.X0(state_t'(16384)), .Y0(state_t'(-16384)), .Z0(state_t'(81920))) u_tx (
    .clk(clk), .rst(rst), .a(state_t'(7700)), .b_over_eps(BOE), .sync_en(1'b0), .y_drive('0),
    .x(x_m), .y(y_m), .z(z_m));

  pla_receiver dut (
    .clk(clk), .rst(rst), .a_rx(state_t'(7700)), .b_over_eps(BOE), .x_m(x_rx), .y_m(y_rx),
    .sync_en(1'b1), .use_local(1'b0), .mu_shift(mu_shift),
    .x_s(x_s), .y_s(y_s), .z_s(z_s), .a_est(a_est));

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  // received = transmitted + scaled band-limited noise, applied before the edge
  always @(negedge clk) begin
    nx = nx + (gauss() - nx) / 32.0;
    ny = ny + (gauss() - ny) / 32.0;
    x_rx = state_t'($rtoi((real'(x_m) / 16384.0 + gx * nx) * 16384.0));
    y_rx = state_t'($rtoi((real'(y_m) / 16384.0 + gy * ny) * 16384.0));
  end

  task automatic run(real snr, int n, output real mean, output real lo, output real hi);
    real sum, v;
    gx = $sqrt(var_x / (var_n * $pow(10.0, snr / 10.0)));
    gy = $sqrt(var_y / (var_n * $pow(10.0, snr / 10.0)));
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    sum = 0.0; lo = 100.0; hi = -100.0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      if (i >= n - WIN) begin
        v = real'(a_est) / 1048576.0;
        sum += v;
        if (v < lo) lo = v;
        if (v > hi) hi = v;
      end
    end
    mean = sum / real'(WIN);
  endtask

  initial begin
    real sx, sxx, sy, syy, sn, snn, mean, lo, hi;
    // measure signal and filtered-noise variances (noise gain 0 meanwhile)
    gx = 0.0; gy = 0.0;
    @(negedge clk) rst = 0;
    repeat (20000) @(posedge clk);
    sx = 0; sxx = 0; sy = 0; syy = 0; sn = 0; snn = 0;
    for (int i = 0; i < 200000; i++) begin
      @(posedge clk); #1;
      sx += real'(x_m) / 16384.0; sxx += (real'(x_m) / 16384.0) ** 2;
      sy += real'(y_m) / 16384.0; syy += (real'(y_m) / 16384.0) ** 2;
      sn += nx; snn += nx * nx;
    end
    var_x = sxx / 200000.0 - (sx / 200000.0) ** 2;
    var_y = syy / 200000.0 - (sy / 200000.0) ** 2;
    var_n = snn / 200000.0 - (sn / 200000.0) ** 2;
    $display("signal variance x %f y %f, unit filtered noise variance %f", var_x, var_y, var_n);

    foreach (snr_db[k]) begin
      mu_shift = 5'd17;
      run(snr_db[k], 300000, mean, lo, hi);
      rng17[k] = hi - lo; mean17[k] = mean;
      $display("SNR %4.1f dB 2mu=2^-17: mean %f range [%f, %f]", snr_db[k], mean, lo, hi);
      mu_shift = 5'd19;
      run(snr_db[k], 600000, mean, lo, hi);
      rng19[k] = hi - lo;
      $display("SNR %4.1f dB 2mu=2^-19: mean %f range [%f, %f]", snr_db[k], mean, lo, hi);
    end
    checks++;
    if (mean17[0] < 0.44 || mean17[0] > 0.50) begin failures++; $display("FAIL level at 50 dB"); end
    checks++;
    if (rng17[4] <= rng17[0]) begin failures++; $display("FAIL noise does not widen the range"); end
    checks++;
    if (rng19[4] >= rng17[4]) begin failures++; $display("FAIL slow step not narrower at 18 dB"); end
    checks++;
    if (rng19[3] >= rng17[3]) begin failures++; $display("FAIL slow step not narrower at 24 dB"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
