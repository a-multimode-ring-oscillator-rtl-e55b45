// mmro_jitter_sweep_tb: jitter accumulation of the ring model against the
// design equation, for the run lengths behind the 10, 20 and 40 ps targets.
//
// For m ring cycles (m = 6, 18, 20, 74) the ring is started RUNS times and
// the width of the virtual pulse is taken at toggle j = m*n of both taps
// (each of the two edges has then passed 2j+1 stages). Its standard
// deviation must be within 15 % of sqrt(2*(2j+1)*2.7 fs*675 ps), and m must
// reach the targets the design equation
//   sigma^2 = (sigma^2/t)*d_stage*(2*w*m*n - n - 2*w*(m mod 2))
// gives for it: m = 6 -> 10 ps, m = 20 -> 20 ps, m = 74 -> 40 ps.
module mmro_jitter_sweep_tb;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int RUNS = 300;
  localparam int N_MODE = 3, W = 2;
  localparam real D_STAGE = 675.0, SIG2_STAGE = 2.7e-3 * 675.0;

  logic en = 0;
  logic tap_a, tap_b;
  int checks = 0, failures = 0;

  mmro dut (.en, .tap_a, .tap_b);

  int na, nb, jsel;
  realtime ta, tbv;

  always @(tap_a) if (en) begin if (na == jsel) ta = $realtime; na++; end
  always @(tap_b) if (en) begin if (nb == jsel) tbv = $realtime; nb++; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic sweep(input int m, input real target);
    real sum, sum2, d, mean, sd, sd_model, sd_eq;
    sum = 0.0; sum2 = 0.0;
    jsel = m * N_MODE;
    for (int r = 0; r < RUNS; r++) begin
      na = 0; nb = 0;
      en = 1;
      #((2 * jsel + 2) * D_STAGE);
      d = tbv - ta;
      sum += d; sum2 += d * d;
      en = 0;
      #5000;
    end
    mean = sum / RUNS;
    sd = $sqrt(sum2 / RUNS - mean * mean);
    sd_model = $sqrt(2.0 * (2 * jsel + 1) * SIG2_STAGE);
    sd_eq = $sqrt(SIG2_STAGE * (2 * W * m * N_MODE - N_MODE - 2 * W * (m % 2)));
    $display("m = %0d: pulse sigma %0.2f ps (model %0.2f ps, design equation %0.2f ps, target %0.0f ps)",
             m, sd, sd_model, sd_eq, target);
    check(sd > 0.85 * sd_model && sd < 1.15 * sd_model, $sformatf("m = %0d: sigma off the model", m));
    check(sd_eq >= target || target == 0.0, $sformatf("m = %0d does not reach %0.0f ps", m, target));
  endtask

  initial begin
    #1000;
    sweep(6, 10.0);
    sweep(18, 0.0);
    sweep(20, 20.0);
    sweep(74, 40.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1s;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
