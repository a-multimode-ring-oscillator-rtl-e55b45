// lc_postproc_tb: checks the [16,8,5] linear-code post-processor.
//
// Random raw bits arrive with random gaps. For every 16 bits the output word
// must equal the reference, computed here output bit by output bit:
//   L[j] = X1[j] ^ X1[j-1] ^ X1[j-2] ^ X1[j-4] ^ X2[j]   (indices mod 8),
// one cycle after the 16th bit. Then the 16 unit vectors are fed through
// the block to recover its 8x16 matrix, and the minimum weight of the
// 255 nonzero combinations of its rows (the code's distance) must be 5.
module lc_postproc_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 0, rst_n;
  logic in_bit, in_valid;
  logic [7:0] out_word;
  logic out_valid;
  int checks = 0, failures = 0;

  lc_postproc dut (.clk, .rst_n, .in_bit, .in_valid, .out_word, .out_valid);

  always #2500 clk = ~clk;

  function automatic logic [7:0] ref_l(input logic [15:0] b);
    logic [7:0] l;
    for (int j = 0; j < 8; j++)
      l[j] = b[j] ^ b[(j + 7) % 8] ^ b[(j + 6) % 8] ^ b[(j + 4) % 8] ^ b[8 + j];
    return l;
  endfunction

  // feed one 16-bit block, check the word that comes out
  task automatic block(input logic [15:0] b, output logic [7:0] w);
    for (int i = 0; i < 16; i++) begin
      repeat ($urandom_range(2, 0)) begin
        in_valid = 0; in_bit = $urandom;
        @(negedge clk);
        checks++;
        if (out_valid) begin failures++; $display("FAIL: out_valid without input"); end
      end
      in_valid = 1; in_bit = b[i];
      @(negedge clk);
      checks++;
      if (out_valid !== (i == 15)) begin
        failures++;
        $display("FAIL: out_valid=%b after bit %0d", out_valid, i);
      end
    end
    in_valid = 0;
    w = out_word;
  endtask

  initial begin
    logic [15:0] b;
    logic [7:0] w;
    logic [7:0] cols [16];
    logic [15:0] rows [8];
    int dmin, wt;
    rst_n = 0; in_valid = 0; in_bit = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      b = 16'($urandom);
      block(b, w);
      checks++;
      if (w !== ref_l(b)) begin
        failures++;
        $display("FAIL: block %h gives %h, expected %h", b, w, ref_l(b));
      end
    end
    // recover the code from the block itself
    for (int i = 0; i < 16; i++) begin
      block(16'(1) << i, w);
      cols[i] = w;
    end
    for (int j = 0; j < 8; j++)
      for (int i = 0; i < 16; i++) rows[j][i] = cols[i][j];
    dmin = 99;
    for (int u = 1; u < 256; u++) begin
      b = '0;
      for (int j = 0; j < 8; j++) if (u[j]) b ^= rows[j];
      wt = $countones(b);
      if (wt < dmin) dmin = wt;
    end
    $display("minimum distance of the post-processing code: %0d", dmin);
    checks++;
    if (dmin != 5) begin failures++; $display("FAIL: code distance %0d, expected 5", dmin); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
