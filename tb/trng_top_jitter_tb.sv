// trng_top_jitter_tb: the whole TRNG at the run lengths behind the 10, 20
// and 40 ps jitter targets of the design equation.
//
// Three copies of trng_top run side by side with RUN_CYCLES = 5, 17 and 61
// (25, 85 and 305 ns of ring running at a 5 ns clock, i.e. about 6, 21
// and 75 ring cycles of n = 3 edges). Each must deliver raw bits at its own
// rate, RST_CYCLES + RUN_CYCLES cycles apart, with an edge inside both lines
// in every snapshot (the routing delay follows the run length). The spread
// of the edge-position difference between the lines must match the pulse
// sigma expected for that run, in carry delays, with the quantisation of
// both positions added: sqrt(sigma^2/(20 ps)^2 + 1/6), within 20 %.
module trng_top_jitter_tb;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int TAPS = 40;
  localparam int NCFG = 3;
  localparam int RC[NCFG] = '{5, 17, 61};
  localparam int NBITS = 256;
  localparam real SIG2_STAGE = 2.7e-3 * 675.0;

  logic clk = 0, rst_n = 0, enable = 0;
  int checks = 0, failures = 0;
  int nraw[NCFG], nedge[NCFG], badper[NCFG];
  real dsum[NCFG], dsum2[NCFG];

  always #2500 clk = ~clk;

  function automatic int edge_pos(input logic [TAPS-1:0] c);
    int n = 0;
    for (int i = 0; i < TAPS; i++) if (c[i] != c[TAPS-1]) n++;
    return n;
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    logic raw_bit, raw_valid, rnd_valid;
    logic [TAPS-1:0] code_a, code_b;
    logic [7:0] rnd_word;
    int last = -1, cyc = 0;

    trng_top #(.RUN_CYCLES(RC[g])) dut (
      .clk, .rst_n, .enable, .raw_bit, .raw_valid, .code_a, .code_b, .rnd_word, .rnd_valid
    );

    initial begin nraw[g] = 0; nedge[g] = 0; badper[g] = 0; dsum[g] = 0.0; dsum2[g] = 0.0; end

    always @(negedge clk) if (rst_n) begin
      cyc++;
      if (raw_valid && nraw[g] < NBITS) begin
        int pa, pb;
        pa = edge_pos(code_a);
        pb = edge_pos(code_b);
        if (pa > 0 && pb > 0 && code_a[0] != code_a[TAPS-1] && code_b[0] != code_b[TAPS-1]) nedge[g]++;
        dsum[g] += pa - pb;
        dsum2[g] += (pa - pb) * (pa - pb);
        if (last >= 0 && cyc - last != RC[g] + 1) badper[g]++;
        last = cyc;
        nraw[g]++;
      end
    end
  end

  initial begin
    real mean, sd, sd_exp;
    int j, stages;
    repeat (3) @(negedge clk);
    rst_n = 1;
    enable = 1;
    wait (nraw[0] == NBITS && nraw[1] == NBITS && nraw[2] == NBITS);
    for (int g = 0; g < NCFG; g++) begin
      // the toggle measured: the last (1 + 2j) * 675 ps before mid-line at the capture
      j = int'($floor((RC[g] * 5000.0 - 400.0 - 675.0) / 1350.0));
      stages = 2 * j + 1;
      sd_exp = $sqrt(2.0 * stages * SIG2_STAGE / 400.0 + 1.0 / 6.0);
      mean = dsum[g] / NBITS;
      sd = $sqrt(dsum2[g] / NBITS - mean * mean);
      $display("RUN_CYCLES = %0d (m ~ %0d): pulse sigma %0.2f ps expected, position spread %0.2f taps (expected %0.2f), %0d/%0d snapshots with edges",
               RC[g], stages / 6, $sqrt(2.0 * stages * SIG2_STAGE), sd, sd_exp, nedge[g], NBITS);
      checks++;
      if (!(sd > 0.8 * sd_exp && sd < 1.2 * sd_exp)) begin failures++; $display("FAIL: spread for RUN_CYCLES %0d", RC[g]); end
      checks++;
      if (nedge[g] < NBITS * 95 / 100) begin failures++; $display("FAIL: edges missed for RUN_CYCLES %0d", RC[g]); end
      checks++;
      if (badper[g] != 0) begin failures++; $display("FAIL: raw bit period for RUN_CYCLES %0d", RC[g]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
