// carry_delay_line_tb: checks the carry-chain delay line model.
//
// A rising and then a falling edge are sent into the line; the taps are
// read halfway between two element delays, ROUTE + 20*j + 10 ps after the
// edge, where exactly the first j taps must show the new value.
module carry_delay_line_tb;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int TAPS = 40;
  logic din;
  logic [TAPS-1:0] taps;
  int checks = 0, failures = 0;

  carry_delay_line dut (.din, .taps);

  task automatic probe(input logic v);
    realtime t0;
    logic [TAPS-1:0] exp;
    din = v;
    t0 = $realtime;
    for (int j = 0; j <= TAPS; j++) begin
      #(t0 + 1025.0 + 20.0 * j + 10.0 - $realtime);
      for (int i = 0; i < TAPS; i++) exp[i] = (i < j) ? v : ~v;
      checks++;
      if (taps !== exp) begin
        failures++;
        $display("FAIL: edge %0b, %0d carry delays: got %b expected %b", v, j, taps, exp);
      end
    end
  endtask

  initial begin
    din = 0;
    #5000;
    probe(1'b1);
    #3000;
    probe(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
