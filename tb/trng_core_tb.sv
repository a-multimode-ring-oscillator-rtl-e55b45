// trng_core_tb: checks the digital part of the TRNG with synthetic lines.
//
// In place of the ring and the delay lines the testbench drives both tap
// vectors with a new step pattern (random position, sometimes a bubble)
// every cycle, as a free-running line would show. For every raw bit it
// checks, against the vectors it drove at the capture edge: the snapshots
// code_a / code_b, raw_bit = parity(A) ^ parity(B), the 16-cycle raw bit
// period and the ring enable (high for the 15 cycles before each capture).
// The raw bits are also run through a reference of the [16,8,5] map to
// check every rnd_word and its 256-cycle period.
module trng_core_tb;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int TAPS = 40;
  logic clk = 0, rst_n, enable;
  logic ro_en;
  logic [TAPS-1:0] taps_a, taps_b, code_a, code_b;
  logic raw_bit, raw_valid;
  logic [7:0] rnd_word;
  logic rnd_valid;
  int checks = 0, failures = 0, cyc = 0;

  trng_core dut (.clk, .rst_n, .enable, .ro_en, .taps_a, .taps_b, .raw_bit, .raw_valid,
                 .code_a, .code_b, .rnd_word, .rnd_valid);

  always #2500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  function automatic logic [TAPS-1:0] step_vec();
    logic [TAPS-1:0] v;
    int p;
    p = $urandom_range(TAPS - 2, 1);
    for (int i = 0; i < TAPS; i++) v[i] = (i < p);
    if ($urandom_range(3, 0) == 0) begin v[p-1] = 0; v[p] = 1; end
    if ($urandom_range(1, 0) == 0) v = ~v;
    return v;
  endfunction

  function automatic logic [7:0] ref_l(input logic [15:0] b);
    logic [7:0] l;
    for (int j = 0; j < 8; j++)
      l[j] = b[j] ^ b[(j + 7) % 8] ^ b[(j + 6) % 8] ^ b[(j + 4) % 8] ^ b[8 + j];
    return l;
  endfunction

  logic [TAPS-1:0] at_edge_a, at_edge_b;  // lines as seen by the last rising edge
  logic [15:0] raw_buf;
  int nraw = 0, nwords = 0, last_raw = -1, last_word = -1, run_len = 0;
  logic [7:0] exp_word;
  logic exp_pending = 0;

  // drive new taps after each rising edge, remember what the edge saw
  always @(posedge clk) begin
    cyc++;
    at_edge_a = taps_a;
    at_edge_b = taps_b;
    #1000;
    taps_a = step_vec();
    taps_b = step_vec();
  end

  always @(negedge clk) if (rst_n) begin
    if (ro_en) run_len++;
    if (raw_valid) begin
      check(code_a === at_edge_a && code_b === at_edge_b, "snapshots differ from the captured lines");
      check(raw_bit === ((^at_edge_a) ^ (^at_edge_b)), "raw bit is not parity(A) ^ parity(B)");
      check(run_len == 15, $sformatf("ring ran %0d cycles for this bit", run_len));
      if (last_raw >= 0) check(cyc - last_raw == 16, $sformatf("raw bit period %0d", cyc - last_raw));
      last_raw = cyc;
      run_len = 0;
      raw_buf[nraw % 16] = raw_bit;
      nraw++;
      if (nraw % 16 == 0) begin exp_word = ref_l(raw_buf); exp_pending = 1; end
    end
    if (rnd_valid) begin
      check(exp_pending && rnd_word === exp_word, $sformatf("rnd_word %h, expected %h", rnd_word, exp_word));
      if (last_word >= 0) check(cyc - last_word == 256, $sformatf("word period %0d", cyc - last_word));
      last_word = cyc;
      exp_pending = 0;
      nwords++;
    end
  end

  initial begin
    rst_n = 0; enable = 0;
    taps_a = '0; taps_b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    enable = 1;
    wait (nwords == 20);
    @(negedge clk);
    check(nraw >= 320, "too few raw bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
