// coding_line_tb: checks the sampling register and parity encoder.
//
// Random tap vectors (clean steps, steps with a bubble, random words) are
// applied every cycle and `sample` is raised at random. After a capture
// `code` must equal the vector applied at that edge and `bit_o` the parity
// of its number of ones (counted here bit by bit); without a capture both
// must hold their value.
module coding_line_tb;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int TAPS = 40;
  logic clk = 0;
  logic sample;
  logic [TAPS-1:0] taps, code, held;
  logic bit_o;
  int checks = 0, failures = 0, captures = 0;

  coding_line dut (.clk, .sample, .taps, .code, .bit_o);

  always #2500 clk = ~clk;

  function automatic logic [TAPS-1:0] make_vec(input int kind);
    logic [TAPS-1:0] v;
    int p;
    p = $urandom_range(TAPS - 2, 1);
    for (int i = 0; i < TAPS; i++) v[i] = (i < p);
    if (kind == 1) begin v[p-1] = 1'b0; v[p] = 1'b1; end  // bubble at the step
    if (kind == 2) v = {$urandom, $urandom};
    if (kind == 3) v = ~v;
    return v;
  endfunction

  function automatic logic ones_parity(input logic [TAPS-1:0] v);
    int n = 0;
    for (int i = 0; i < TAPS; i++) if (v[i]) n++;
    return logic'(n % 2);
  endfunction

  initial begin
    logic s;
    sample = 1;
    taps = '0;
    @(negedge clk);
    held = '0;
    for (int c = 0; c < 2000; c++) begin
      s = ($urandom_range(2, 0) == 0);
      sample = s;
      taps = make_vec($urandom_range(3, 0));
      @(posedge clk);
      if (s) begin held = taps; captures++; end
      @(negedge clk);
      checks++;
      if (code !== held || bit_o !== ones_parity(held)) begin
        failures++;
        $display("FAIL: cycle %0d code %h bit %b, expected %h %b", c, code, bit_o, held, ones_parity(held));
      end
    end
    checks++;
    if (captures < 100) begin failures++; $display("FAIL: too few captures"); end
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
