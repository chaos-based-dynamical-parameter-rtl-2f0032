// Self-checking test of numerator_pipeline: random x, y, z streams; every
// clock s must equal (y[n+1]-y[n])*2**7 + x[n] + z[n] and y_delayed must
// equal y[n], for n four clocks back (the published 4-clock latency).
module tb_numerator_pipeline;
  import vpla_pkg::*;

  localparam int N = 5000;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  state_t x = '0, y = '0, z = '0, yd;
  logic signed [30:0] s;
  longint xs[N], ys[N], zs[N];

  always #5 clk = ~clk;

  numerator_pipeline dut (.clk(clk), .rst(rst), .x(x), .y(y), .z(z), .s(s), .y_delayed(yd));

  initial begin
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      xs[i] = longint'($signed(22'($urandom)));
      ys[i] = longint'($signed(22'($urandom)));
      zs[i] = longint'($signed(22'($urandom)));
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    // sample t is applied during clock t (t = 0 .. N-1)
    for (int t = 0; t < N; t++) begin
      x = state_t'(xs[t]); y = state_t'(ys[t]); z = state_t'(zs[t]);
      @(posedge clk); #1;
      // after edge t the output describes sample n = t - 3:
      // s is registered at edge t from data that entered at edges up to t
      if (t >= 4) begin
        int n;
        longint exp_s;
        n = t - 3;
        exp_s = ((ys[n+1] - ys[n]) <<< 7) + xs[n] + zs[n];
        checks++;
        if (longint'(s) != exp_s) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d s=%0d expected=%0d", t, s, exp_s);
        end
        checks++;
        if (longint'(yd) != ys[n]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d y_delayed=%0d expected=%0d", t, yd, ys[n]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
