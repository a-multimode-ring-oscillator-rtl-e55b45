// trng_ctrl_tb: checks the generation controller's timing.
//
// With enable high the ring must run exactly 15 cycles, be held in reset
// for 1, a capture must fall on the edge that ends each run, raw_valid must
// follow one cycle later, and a raw bit must come every 16 cycles. Dropping
// enable in the middle of a run must stop the ring at once and produce no
// capture. All counts are taken here from cycle numbers.
module trng_ctrl_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 0, rst_n, enable;
  logic ro_en, sample, raw_valid;
  int checks = 0, failures = 0;
  int cyc = 0;
  int en_rise = -1, last_sample = -1, last_valid = -1;
  int run_len_ok = 0, periods_ok = 0, samples = 0, valids = 0;
  logic ro_en_d = 0, sample_d = 0;

  trng_ctrl dut (.clk, .rst_n, .enable, .ro_en, .sample, .raw_valid);

  always #2500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // sampled just after each rising edge
  always @(posedge clk) begin
    #1;
    cyc++;
    if (rst_n) begin
      if (ro_en && !ro_en_d) en_rise = cyc;
      if (sample_d) begin
        // the capture edge was this one: ro_en must have just dropped
        check(!ro_en, "ring still enabled after the capture edge");
        check(cyc - en_rise == 15, $sformatf("ring ran %0d cycles before the capture", cyc - en_rise));
        if (last_sample >= 0) check(cyc - last_sample == 16, $sformatf("capture period %0d", cyc - last_sample));
        last_sample = cyc;
        samples++;
      end
      if (raw_valid) begin
        check(sample_d, "raw_valid not one cycle after sample");
        valids++;
      end
      if (sample) check(ro_en, "sample while the ring is stopped");
    end
    ro_en_d  = ro_en;
    sample_d = sample;
  end

  initial begin
    int s0;
    rst_n = 0; enable = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(!ro_en && !sample && !raw_valid, "activity while disabled");
    enable = 1;
    repeat (16 * 20 + 2) @(negedge clk);
    check(samples == 20, $sformatf("%0d captures in 20 periods", samples));
    // abort in the middle of a run
    wait (ro_en);
    repeat (5) @(negedge clk);
    s0 = samples;
    enable = 0;
    @(negedge clk);
    check(!ro_en, "ring not stopped when enable drops");
    repeat (40) @(negedge clk);
    check(samples == s0, "capture after enable dropped");
    last_sample = -1;
    enable = 1;
    repeat (16 * 5 + 2) @(negedge clk);
    check(samples == s0 + 5, $sformatf("%0d captures after re-enable, expected 5", samples - s0));
    check(valids == samples, "raw_valid count differs from captures");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
