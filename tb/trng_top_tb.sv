// trng_top_tb: end-to-end test of the TRNG, entropy source included, at the
// default parameters (ring n = 3, w = 2; two 40-tap lines; 15 + 1 cycle
// generations at a 5 ns clock).
//
// It runs 640 generations, dropping `enable` once in the middle of a run,
// and checks for every raw bit:
//   - both snapshots show an edge inside the line (the ring was reset,
//     restarted and sampled at the planned moment);
//   - raw_bit = parity(code_a) ^ parity(code_b), recomputed here;
//   - one raw bit every 16 cycles (12.5 Mb/s at 200 MHz) between aborts;
// and for every word: it equals the [16,8,5] map of the last 16 raw bits,
// one every 256 cycles. Statistics: the raw bits must be balanced (ones
// between 40 % and 60 %) and the spread of the edge-position difference
// between the lines (the quantised virtual pulse) must be about one carry
// delay (sigma 19.9 ps / 20 ps). Every mechanism (ring reset and restart,
// capture of an edge in both lines, abort on enable low, post-processed
// word) must happen at least once.
module trng_top_tb;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int TAPS = 40;
  localparam int GENS = 640;

  logic clk = 0, rst_n, enable;
  logic raw_bit, raw_valid;
  logic [TAPS-1:0] code_a, code_b;
  logic [7:0] rnd_word;
  logic rnd_valid;
  int checks = 0, failures = 0, cyc = 0;

  trng_top dut (.clk, .rst_n, .enable, .raw_bit, .raw_valid, .code_a, .code_b,
                .rnd_word, .rnd_valid);

  always #2500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  function automatic logic [7:0] ref_l(input logic [15:0] b);
    logic [7:0] l;
    for (int j = 0; j < 8; j++)
      l[j] = b[j] ^ b[(j + 7) % 8] ^ b[(j + 6) % 8] ^ b[(j + 4) % 8] ^ b[8 + j];
    return l;
  endfunction

  // taps that already show the new value: those differing from the far end
  function automatic int edge_pos(input logic [TAPS-1:0] c);
    int n = 0;
    for (int i = 0; i < TAPS; i++) if (c[i] != c[TAPS-1]) n++;
    return n;
  endfunction

  int nraw = 0, nones = 0, nwords = 0, nedges = 0, naborts = 0, nbubbles = 0;
  int last_raw = -1, last_word = -1;
  logic [15:0] raw_buf;
  logic [7:0] exp_word;
  logic exp_pending = 0, abort_seen = 0;
  real dsum = 0.0, dsum2 = 0.0;

  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (raw_valid) begin
      int pa, pb, d;
      pa = edge_pos(code_a);
      pb = edge_pos(code_b);
      if (pa > 0 && pa < TAPS && pb > 0 && pb < TAPS && code_a[0] != code_a[TAPS-1]
          && code_b[0] != code_b[TAPS-1]) nedges++;
      else $display("note: snapshot without an inner edge: %b %b", code_a, code_b);
      // a bubble: a tap differs from both neighbours
      for (int i = 1; i < TAPS - 1; i++)
        if (code_a[i] != code_a[i-1] && code_a[i] != code_a[i+1]) nbubbles++;
      d = pa - pb;
      dsum += d; dsum2 += d * d;
      check(raw_bit === ((^code_a) ^ (^code_b)), "raw bit is not parity(A) ^ parity(B)");
      if (last_raw >= 0 && !abort_seen) check(cyc - last_raw == 16, $sformatf("raw bit period %0d", cyc - last_raw));
      last_raw = cyc;
      raw_buf[nraw % 16] = raw_bit;
      nraw++;
      if (raw_bit) nones++;
      if (nraw % 16 == 0) begin exp_word = ref_l(raw_buf); exp_pending = 1; end
    end
    if (rnd_valid) begin
      check(exp_pending && rnd_word === exp_word, $sformatf("rnd_word %h, expected %h", rnd_word, exp_word));
      if (last_word >= 0 && !abort_seen) check(cyc - last_word == 256, $sformatf("word period %0d", cyc - last_word));
      last_word = cyc;
      exp_pending = 0;
      abort_seen = 0;
      nwords++;
    end
  end

  initial begin
    real mean, sd;
    rst_n = 0; enable = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    enable = 1;
    wait (nraw == GENS / 2);
    // abort one generation half way through its run
    repeat (8) @(negedge clk);
    enable = 0;
    naborts++;
    abort_seen = 1;
    repeat (10) @(negedge clk);
    check(raw_valid == 0 && nraw == GENS / 2, "a raw bit came out of the aborted generation");
    enable = 1;
    wait (nraw == GENS);
    repeat (20) @(negedge clk);
    mean = dsum / nraw;
    sd = $sqrt(dsum2 / nraw - mean * mean);
    $display("raw bits %0d, ones %0d, words %0d, snapshots with edges %0d, bubbles %0d, aborts %0d",
             nraw, nones, nwords, nedges, nbubbles, naborts);
    $display("edge position difference A-B: mean %0.2f, sigma %0.2f carry delays", mean, sd);
    check(nones > nraw * 4 / 10 && nones < nraw * 6 / 10, "raw bits not balanced");
    check(sd > 0.6 && sd < 1.6, "pulse spread not about one carry delay");
    check(nedges >= nraw * 95 / 100, "too few snapshots with an edge in both lines");
    check(nwords == GENS / 16, $sformatf("%0d words, expected %0d", nwords, GENS / 16));
    check(naborts > 0, "no abort");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
