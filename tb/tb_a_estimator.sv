// Self-checking test of a_estimator on a clean oscillator signal (the
// self-test setup: estimator fed with x, y, z of an oscillator whose a is
// known). The oscillator is the testbench's reference model.
// Checks: a_est first moves exactly 8 clocks after the first sample
// (4 + 4 register stages); a_est settles within 0.03 of a = 0.47 and of
// a = 0.30; the settled ripple is below 0.01; settling from 0 takes
// under 2e5 clocks.
module tb_a_estimator;
  import vpla_pkg::*;
  import tb_ref_pkg::*;

  localparam longint BOE = 64'sd564593;   // b/eps = 34.46

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  state_t x = '0, y = '0, z = '0;
  est_t a_est;
  longint mx, my, mz;

  always #5 clk = ~clk;

  a_estimator dut (.clk(clk), .rst(rst), .x(x), .y(y), .z(z), .mu_shift(5'd17), .a_est(a_est));

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real est_real();
    return real'(a_est) / 1048576.0;
  endfunction

  // Run the model oscillator with parameter a for n clocks, feeding the DUT.
  // Returns the clock at which a_est first came within 0.02 of a_true and
  // stayed there, and min/max over the last 40000 clocks.
  task automatic run(longint a_q, real a_true, int n, output int settle,
                     output real lo, output real hi);
    settle = -1; lo = 100.0; hi = -100.0;
    for (int i = 0; i < n; i++) begin
      x = state_t'(mx); y = state_t'(my); z = state_t'(mz);
      step(mx, my, mz, a_q, BOE);
      @(posedge clk); #1;
      if (est_real() - a_true > 0.02 || a_true - est_real() > 0.02) settle = -1;
      else if (settle < 0) settle = i;
      if (i >= n - 40000) begin
        if (est_real() < lo) lo = est_real();
        if (est_real() > hi) hi = est_real();
      end
      @(negedge clk);
    end
  endtask

  initial begin
    int settle;
    real lo, hi;
    mx = 1638; my = 0; mz = 0;
    // start the model on its attractor so that y is far from zero
    for (int i = 0; i < 20000; i++) step(mx, my, mz, 64'sd7700, BOE);
    while (my < 64'sd16384 && my > -64'sd16384) step(mx, my, mz, 64'sd7700, BOE);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // latency: sample 0 enters at the next edge
    for (int e = 1; e <= 8; e++) begin
      x = state_t'(mx); y = state_t'(my); z = state_t'(mz);
      step(mx, my, mz, 64'sd7700, BOE);
      @(posedge clk); #1;
      checks++;
      if (e < 8 && a_est != 0) begin failures++; $display("FAIL a_est moved after %0d edges", e); end
      if (e == 8 && a_est == 0) begin failures++; $display("FAIL a_est still 0 after 8 edges"); end
      @(negedge clk);
    end

    run(64'sd7700, 0.47, 300000, settle, lo, hi);
    $display("a=0.47: settled at %0d clocks, last 4e4 clocks in [%f, %f]", settle, lo, hi);
    checks++;
    if (settle < 0 || settle > 200000) begin failures++; $display("FAIL settling"); end
    checks++;
    if (lo < 0.44 || hi > 0.50) begin failures++; $display("FAIL level"); end
    checks++;
    if (hi - lo > 0.01) begin failures++; $display("FAIL ripple"); end

    run(64'sd4915, 0.30, 300000, settle, lo, hi);
    $display("a=0.30: settled at %0d clocks, last 4e4 clocks in [%f, %f]", settle, lo, hi);
    checks++;
    if (lo < 0.27 || hi > 0.33) begin failures++; $display("FAIL level"); end
    checks++;
    if (hi - lo > 0.01) begin failures++; $display("FAIL ripple"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
