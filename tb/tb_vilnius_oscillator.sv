// Self-checking test of vilnius_oscillator.
//  1. Free-running: every clock the x, y, z registers must equal an
//     independent forward-Euler model of the normalized Vilnius equations.
//  2. The trajectory must stay bounded and keep oscillating (y changes sign
//     many times).
//  3. Pecora-Carroll mode: a second reference oscillator (different a,
//     different start) drives y_drive; the DUT's y must equal the drive and
//     its z must converge to the drive oscillator's z.
module tb_vilnius_oscillator;
  import vpla_pkg::*;
  import tb_ref_pkg::*;

  localparam longint A_DUT = 64'sd7700;     // 0.47 in Q8.14
  localparam longint A_TX  = 64'sd9830;     // 0.60
  localparam longint BOE   = 64'sd564593;   // 34.46

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, sync_en = 0;
  state_t y_drive = '0, x, y, z;
  longint rx, ry, rz;      // model of the DUT
  longint tx_, ty_, tz_;   // model of the drive oscillator
  int sign_changes = 0;
  logic last_sign = 0;

  always #5 clk = ~clk;

  vilnius_oscillator dut (.clk(clk), .rst(rst), .a(state_t'(A_DUT)), .b_over_eps(state_t'(BOE)),
                          .sync_en(sync_en), .y_drive(y_drive), .x(x), .y(y), .z(z));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint maxerr;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    rx = 1638; ry = 0; rz = 0;   // reset values X0 = 0.1, Y0 = 0, Z0 = 0
    checks++;
    if (x != state_t'(rx) || y != state_t'(ry) || z != state_t'(rz)) begin
      failures++; $display("FAIL reset state %0d %0d %0d", x, y, z);
    end
    // 1 and 2: free-running, compared every clock
    for (int n = 0; n < 100000; n++) begin
      @(posedge clk); #1;
      step(rx, ry, rz, A_DUT, BOE);
      if (n % 10 == 0 || n < 200) begin
        checks++;
        if (x != state_t'(rx) || y != state_t'(ry) || z != state_t'(rz)) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d dut=(%0d,%0d,%0d) ref=(%0d,%0d,%0d)", n, x, y, z, rx, ry, rz);
        end
      end
      if (y[STATE_W-1] != last_sign) sign_changes++;
      last_sign = y[STATE_W-1];
    end
    checks++;
    if (sign_changes < 50) begin failures++; $display("FAIL only %0d sign changes of y", sign_changes); end
    checks++;
    if (x > state_t'(q14(100.0)) || x < state_t'(q14(-100.0))) begin failures++; $display("FAIL x unbounded %0d", x); end
    $display("free-running: %0d sign changes of y in 1e5 steps", sign_changes);

    // 3: synchronization to a drive oscillator with a = 0.6. y_drive carries
    // the drive's y[k]; after the clock edge the DUT's z must match the
    // drive's z[k+1].
    tx_ = q14(-3.0); ty_ = q14(1.0); tz_ = q14(5.0);
    maxerr = 0;
    for (int n = 0; n < 120000; n++) begin
      @(negedge clk);
      y_drive = state_t'(ty_);
      sync_en = 1;
      #1;
      if (n % 100 == 0) begin
        checks++;
        if (y != y_drive) begin failures++; $display("FAIL y does not follow drive"); end
      end
      step(tx_, ty_, tz_, A_TX, BOE);
      @(posedge clk); #1;
      if (n >= 100000) begin
        if (longint'(z) - tz_ > maxerr) maxerr = longint'(z) - tz_;
        if (tz_ - longint'(z) > maxerr) maxerr = tz_ - longint'(z);
      end
    end
    checks++;
    $display("synchronized: max |z_s - z_m| = %0d LSB (%f)", maxerr, real'(maxerr) / 16384.0);
    if (maxerr > 64'sd2048) begin failures++; $display("FAIL z not synchronized"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
