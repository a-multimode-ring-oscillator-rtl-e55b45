// mmro_tb: checks the multi-mode ring oscillator model.
//
// While en is low the taps must not move. After en rises, the early toggles
// of both taps must fall at (2j+1)*675 ps (jitter is still tiny there) and
// by 74.25 ns each tap must have toggled exactly 55 times (m = 18 cycles of
// n = 3 edges, plus the first). Over many runs the difference between the
// 55th toggles of tap_b and tap_a (the width of the virtual pulse) must have
// a mean near 0 and a standard deviation near
// sqrt(2 * 109 stages * 2.7 fs * 675 ps) = 19.9 ps.
module mmro_tb;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int RUNS = 400;
  localparam int NT   = 55;

  logic en;
  logic tap_a, tap_b;
  int checks = 0, failures = 0;

  mmro dut (.en, .tap_a, .tap_b);

  realtime t0;
  realtime ta[NT+2], tb_t[NT+2];
  int na, nb;

  always @(tap_a) if (en) begin if (na < NT + 2) ta[na] = $realtime - t0; na++; end
  always @(tap_b) if (en) begin if (nb < NT + 2) tb_t[nb] = $realtime - t0; nb++; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    real sum, sum2, d, mean, sd;
    logic a0, b0;
    sum = 0.0; sum2 = 0.0;
    en = 0;
    #1000;
    a0 = tap_a; b0 = tap_b;
    #20000;
    check(tap_a == a0 && tap_b == b0, "taps move while the ring is held in reset");
    for (int r = 0; r < RUNS; r++) begin
      na = 0; nb = 0;
      t0 = $realtime;
      en = 1;
      #74250;
      check(na == NT && nb == NT, $sformatf("run %0d: %0d/%0d toggles by 74.25 ns, expected %0d", r, na, nb, NT));
      if (r == 0)
        for (int j = 0; j < 4; j++) begin
          check(ta[j] > (2*j+1)*675.0 - 10.0 && ta[j] < (2*j+1)*675.0 + 10.0,
                $sformatf("tap_a toggle %0d at %0.1f ps", j, ta[j]));
          check(tb_t[j] > (2*j+1)*675.0 - 10.0 && tb_t[j] < (2*j+1)*675.0 + 10.0,
                $sformatf("tap_b toggle %0d at %0.1f ps", j, tb_t[j]));
        end
      d = tb_t[NT-1] - ta[NT-1];
      sum += d; sum2 += d * d;
      #2000;
      en = 0;
      #5000;
    end
    mean = sum / RUNS;
    sd   = $sqrt(sum2 / RUNS - mean * mean);
    $display("virtual pulse after m = 18 cycles: mean %0.2f ps, sigma %0.2f ps", mean, sd);
    check(mean > -5.0 && mean < 5.0, "pulse mean not near 0");
    check(sd > 16.0 && sd < 24.0, "pulse sigma not near 19.9 ps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
