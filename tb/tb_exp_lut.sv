// Self-checking test of exp_lut: random and corner z values against
// (c/eps)(exp(z)-1) evaluated in real arithmetic, plus monotonicity.
module tb_exp_lut;
  import vpla_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  state_t z, f;

  exp_lut dut (.z(z), .f_z(f));

  task automatic check_one(longint zv);
    longint exp_v;
    z = state_t'(zv);
    #1;
    exp_v = lut(zv);
    checks++;
    if (longint'(f) != exp_v) begin
      failures++;
      $display("FAIL z=%0d f=%0d expected=%0d", zv, f, exp_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint prev;
    // corners: negative, zero, inside, top of range, beyond range, saturation
    check_one(-1);
    check_one(SMIN);
    check_one(0);
    check_one(q14(10.0));
    check_one(q14(20.0));
    check_one(q14(23.0));
    check_one(q14(31.99));
    check_one(q14(40.0));
    check_one(SMAX);
    // hand-worked value: z = 20 -> 6.2e-9*(e^20-1)*2^14 = 49283.4 -> 49283
    z = state_t'(q14(20.0)); #1; checks++;
    if (f != state_t'(49283)) begin failures++; $display("FAIL z=20 f=%0d", f); end
    // random
    for (int i = 0; i < 3000; i++) check_one(longint'($signed(22'($urandom))));
    // monotonic over the whole range
    prev = -1;
    for (longint zz = 0; zz < (64'sd32 <<< 14); zz += 128) begin
      z = state_t'(zz); #1;
      checks++;
      if (longint'(f) < prev) begin failures++; $display("FAIL not monotonic at %0d", zz); end
      prev = longint'(f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
