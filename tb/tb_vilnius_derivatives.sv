// Self-checking test of vilnius_derivatives: random states and constants
// against the right-hand sides of the normalized Vilnius equations computed
// on 64-bit integers, with the diode term from the real-valued reference.
module tb_vilnius_derivatives;
  import vpla_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  state_t x, y, z, a, boe;
  deriv_t dx, dy, dz;

  vilnius_derivatives dut (.x(x), .y(y), .z(z), .a(a), .b_over_eps(boe),
                           .dx(dx), .dy(dy), .dz(dz));

  task automatic check(string what, longint got, longint exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s got=%0d expected=%0d (x=%0d y=%0d z=%0d a=%0d)", what, got, exp_v, x, y, z, a);
    end
  endtask

  task automatic apply(longint xv, longint yv, longint zv, longint av, longint bv);
    x = state_t'(xv); y = state_t'(yv); z = state_t'(zv); a = state_t'(av); boe = state_t'(bv);
    #1;
    check("dx", longint'(dx), yv);
    check("dy", longint'(dy), ((av * yv) >>> 14) - xv - zv);
    check("dz", longint'(dz), bv + 8 * yv - lut(zv));
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // a worked example: x=-20, y=2, z=21, a=0.5, b/eps=34.46
    //   dy = 1 - (-20) - 21 = 0 ; dz = 34.46 + 16 - 6.2e-9*(e^21-1)
    apply(q14(-20.0), q14(2.0), q14(21.0), q14(0.5), q14(34.46));
    checks++;
    if (dy != 0) begin failures++; $display("FAIL worked dy=%0d", dy); end
    for (int i = 0; i < 5000; i++) begin
      longint xv, yv, zv, av;
      xv = longint'($signed(22'($urandom)));
      yv = longint'($signed(22'($urandom)));
      zv = longint'($signed(22'($urandom)));
      // |a| < 8 keeps a*y - x - z inside the Q12.14 derivative range
      av = longint'($signed(18'($urandom)));
      apply(xv, yv, zv, av, q14(34.46));
    end
    // values in the working range of the oscillator
    for (int i = 0; i < 5000; i++) begin
      apply(q14(-30.0) + longint'($urandom_range(0, 30 * 16384)),
            q14(-8.0)  + longint'($urandom_range(0, 16 * 16384)),
            q14(-5.0)  + longint'($urandom_range(0, 30 * 16384)),
            longint'($urandom_range(q14(0.2), q14(1.2))), q14(34.46));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
