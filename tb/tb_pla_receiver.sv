// End-to-end test of pla_receiver at its default parameters.
//
// A transmitter is modelled by a second vilnius_oscillator (free-running,
// a_tx switchable); its x and y go to the receiver as x_m, y_m. The run
// follows the synchronous authentication experiment:
//   phase S (self-test): use_local = 1, estimator on the receiver's own
//       oscillator (a_rx = 0.47); a_est must settle near 0.47.
//   phase U (unsynchronized): 5e4 clocks with sync_en = 0; z_s and z_m
//       must differ.
//   phase T (tracking): sync_en = 1; a_tx = 0.6, 0.5, 0.3 for 2e5 clocks
//       each; z_s must lock to z_m and a_est must settle within 0.03 of
//       each a_tx, with levels ordered as a_tx.
//   phase L (slow step): 2mu = 2**-19, a_tx switched to 0.47; a_est must
//       still reach 0.47 within 0.03, and more slowly than with 2**-17.
// Every mechanism (self-test, unsynchronized period, synchronization lock,
// parameter switch tracked, slow step size) is counted; one that never
// happened counts as a failure.
module tb_pla_receiver;
  import vpla_pkg::*;

  localparam state_t BOE = state_t'(564593);   // b/eps = 34.46

  int checks = 0, failures = 0;
  int n_selftest = 0, n_unsync = 0, n_lock = 0, n_track = 0, n_slow = 0;
  logic clk = 0, rst = 1, tx_rst = 1;
  logic sync_en = 0, use_local = 0;
  logic [4:0] mu_shift = 5'd17;
  state_t a_tx = state_t'(9830), a_rx = state_t'(7700);
  state_t x_m, y_m, z_m, x_s, y_s, z_s;
  est_t a_est;

  always #5 clk = ~clk;

  // transmitter model: the discrete oscillator, different start state
  vilnius_oscillator #(.X0(state_t'(16384)), .Y0(state_t'(-16384)), .Z0(state_t'(81920))) u_tx (
    .clk(clk), .rst(tx_rst), .a(a_tx), .b_over_eps(BOE), .sync_en(1'b0), .y_drive('0),
    .x(x_m), .y(y_m), .z(z_m));

  pla_receiver dut (
    .clk(clk), .rst(rst), .a_rx(a_rx), .b_over_eps(BOE), .x_m(x_m), .y_m(y_m),
    .sync_en(sync_en), .use_local(use_local), .mu_shift(mu_shift),
    .x_s(x_s), .y_s(y_s), .z_s(z_s), .a_est(a_est));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real est_real();
    return real'(a_est) / 1048576.0;
  endfunction

  function automatic real zerr();
    int d;
    d = int'(z_s) - int'(z_m);
    return real'(d < 0 ? -d : d) / 16384.0;
  endfunction

  // Run n clocks; report the mean and range of a_est over the last 5e4
  // clocks, the largest |z_s - z_m| over the last 5e4 clocks, and the first
  // clock after which a_est stayed within 0.03 of target.
  task automatic run(int n, real target, output real mean, output real lo,
                     output real hi, output real zmax, output int settle);
    real sum;
    sum = 0.0; lo = 100.0; hi = -100.0; zmax = 0.0; settle = -1;
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      if (est_real() - target > 0.03 || target - est_real() > 0.03) settle = -1;
      else if (settle < 0) settle = i;
      if (i >= n - 50000) begin
        sum += est_real();
        if (est_real() < lo) lo = est_real();
        if (est_real() > hi) hi = est_real();
        if (zerr() > zmax) zmax = zerr();
      end
    end
    mean = sum / 50000.0;
  endtask

  task automatic expect_level(string what, real a_true, real mean, real lo, real hi);
    checks++;
    $display("%s: a_true=%f mean=%f range=[%f, %f]", what, a_true, mean, lo, hi);
    if (mean - a_true > 0.03 || a_true - mean > 0.03) begin
      failures++; $display("FAIL %s: level off", what);
    end
  endtask

  initial begin
    real mean, lo, hi, zmax, m06, m05, m03;
    int settle, settle17, settle19;

    repeat (3) @(posedge clk);
    @(negedge clk) begin rst = 0; tx_rst = 0; end

    // phase S: self-test on the local oscillator
    use_local = 1;
    run(150000, 0.47, mean, lo, hi, zmax, settle);
    expect_level("self-test", 0.47, mean, lo, hi);
    if (mean > 0.44 && mean < 0.50) n_selftest++;

    // phase U: estimator restarted, received signals, no synchronization
    @(negedge clk) begin rst = 1; use_local = 0; end
    @(negedge clk) rst = 0;
    run(50000, 0.6, mean, lo, hi, zmax, settle);
    $display("unsynchronized: max |z_s - z_m| over last 5e4 clocks = %f", zmax);
    checks++;
    if (zmax < 1.0) begin failures++; $display("FAIL oscillators already agree without sync"); end
    else n_unsync++;

    // phase T: synchronization applied, transmitter a switched every 2e5
    @(negedge clk) sync_en = 1;
    run(200000, 0.6, m06, lo, hi, zmax, settle);
    expect_level("a_tx=0.6", 0.6, m06, lo, hi);
    settle17 = settle;
    checks++;
    $display("synchronized: max |z_s - z_m| = %f", zmax);
    if (zmax > 0.01) begin failures++; $display("FAIL z_s not locked"); end
    else n_lock++;
    if (m06 > 0.57 && m06 < 0.63) n_track++;

    @(negedge clk) a_tx = state_t'(8192);   // 0.5
    run(200000, 0.5, m05, lo, hi, zmax, settle);
    expect_level("a_tx=0.5", 0.5, m05, lo, hi);
    $display("0.6 -> 0.5 settled after %0d clocks", settle);
    if (m05 > 0.47 && m05 < 0.53) n_track++;
    settle17 = settle;

    @(negedge clk) a_tx = state_t'(4915);   // 0.3
    run(200000, 0.3, m03, lo, hi, zmax, settle);
    expect_level("a_tx=0.3", 0.3, m03, lo, hi);
    $display("0.5 -> 0.3 settled after %0d clocks", settle);
    if (m03 > 0.27 && m03 < 0.33) n_track++;

    checks++;
    if (!(m06 > m05 + 0.05 && m05 > m03 + 0.1)) begin failures++; $display("FAIL levels not ordered"); end

    // phase L: slower step size, switch 0.3 -> 0.47 (a larger step than
    // 0.6 -> 0.5, so it must take longer than settle17 if slower)
    @(negedge clk) begin mu_shift = 5'd19; a_tx = state_t'(7700); end
    run(400000, 0.47, mean, lo, hi, zmax, settle);
    settle19 = settle;
    expect_level("a_tx=0.47, 2mu=2^-19", 0.47, mean, lo, hi);
    $display("0.3 -> 0.47 with 2^-19 settled after %0d clocks (0.6 -> 0.5 with 2^-17: %0d)", settle19, settle17);
    checks++;
    if (settle19 <= settle17) begin failures++; $display("FAIL slow step size not slower"); end
    else if (mean > 0.44 && mean < 0.50) n_slow++;

    // every mechanism must have happened
    checks++; if (n_selftest == 0) begin failures++; $display("FAIL self-test never happened"); end
    checks++; if (n_unsync == 0)   begin failures++; $display("FAIL unsynchronized period never observed"); end
    checks++; if (n_lock == 0)     begin failures++; $display("FAIL synchronization lock never observed"); end
    checks++; if (n_track < 3)     begin failures++; $display("FAIL only %0d of 3 parameter switches tracked", n_track); end
    checks++; if (n_slow == 0)     begin failures++; $display("FAIL slow step size never exercised"); end
    $display("mechanisms: self-test %0d, unsync %0d, lock %0d, tracked switches %0d, slow step %0d",
             n_selftest, n_unsync, n_lock, n_track, n_slow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
