// Self-checking test of lms_filter.
//  1. Latency and first step: from reset, with s = y = 1.0 applied at one
//     edge, a_est must stay 0 for three edges and become exactly
//     2**-17 * 1.0 * 1.0 = 8 LSB of Q4.20 at the fourth.
//  2. Convergence: s = a_true * y with random y in [-8, 8). After 2e5
//     clocks a_est must be within 0.002 of a_true, for several a_true. (With
//     2mu = 2**-17 and 20 fractional bits the update rounds to zero once
//     |a_true - a_est| * y**2 < 2**-4, a dead zone of ~0.001 for |y| < 8.)
//  3. Step size: after 2e4 clocks from 0, the 2**-19 setting must be
//     further from a_true than the 2**-17 setting.
//  4. Saturation: an a_true beyond the Q4.20 range must pin a_est at the
//     largest value instead of wrapping.
module tb_lms_filter;
  import vpla_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic signed [30:0] s = '0;
  state_t y_d = '0;
  logic [4:0] mu_shift = 5'd17;
  est_t a_est;

  always #5 clk = ~clk;

  lms_filter dut (.clk(clk), .rst(rst), .s(s), .y_d(y_d), .mu_shift(mu_shift), .a_est(a_est));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real targets [4] = '{0.47, 0.3, 0.61, 1.5};

  function automatic real est_real();
    return real'(a_est) / 1048576.0;
  endfunction

  task automatic do_reset();
    rst = 1; s = '0; y_d = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
  endtask

  // Drive one sample of s = a_true * y with random y during one clock.
  task automatic drive(real a_true);
    real yv;
    yv = (real'($urandom_range(0, 262143)) - 131072.0) / 16384.0;  // [-8, 8)
    y_d = state_t'($rtoi(yv * 16384.0));
    s   = 31'($rtoi(a_true * real'(y_d)));
    @(negedge clk);
  endtask

  task automatic run_to(real a_true, int n, logic [4:0] mu);
    mu_shift = mu;
    do_reset();
    for (int i = 0; i < n; i++) drive(a_true);
  endtask

  initial begin
    real err17, err19;

    // 1. latency
    do_reset();
    s = 31'(16384); y_d = state_t'(16384);
    for (int e = 0; e < 4; e++) begin
      @(posedge clk); #1;
      checks++;
      if (e < 3 && a_est != 0) begin failures++; $display("FAIL a_est moved after %0d edges", e + 1); end
      if (e == 3 && a_est != est_t'(8)) begin failures++; $display("FAIL first step a_est=%0d expected 8", a_est); end
    end
    @(negedge clk);

    // 2. convergence
    foreach (targets[k]) begin
      run_to(targets[k], 200000, 5'd17);
      checks++;
      $display("a_true=%f a_est=%f", targets[k], est_real());
      if (est_real() - targets[k] > 0.002 || targets[k] - est_real() > 0.002) begin
        failures++; $display("FAIL no convergence to %f", targets[k]);
      end
    end

    // 3. slower step size converges more slowly
    run_to(0.47, 20000, 5'd17);
    err17 = 0.47 - est_real();
    run_to(0.47, 20000, 5'd19);
    err19 = 0.47 - est_real();
    $display("after 2e4 clocks: error 2^-17 %f, 2^-19 %f", err17, err19);
    checks++;
    if (!(err19 > err17 && err17 >= 0.0)) begin failures++; $display("FAIL step-size ordering"); end

    // 4. saturation at the top of Q4.20
    run_to(20.0, 50000, 5'd17);
    checks++;
    if (a_est != est_t'(24'h7fffff)) begin failures++; $display("FAIL no saturation, a_est=%0d", a_est); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
