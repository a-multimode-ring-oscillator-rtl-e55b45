// coding_line: sampling register and parity encoder of one delay line.
//
// On a clock edge with `sample` high the TAPS delay-line outputs are
// captured into `code`. The encoder is the XOR of all captured bits: for a
// clean step 0..01..1 it equals the least significant bit of the step's
// position, and a bubble (a 0/1 pair flipped near the step, as seen in real
// carry chains) changes the count of ones by an even number and so does not
// change the result. `bit_o` is combinational from `code`, valid from the
// cycle after the capture until the next one.
//
// Capturing only on `sample` and the XOR encoding are this implementation's
// reading of the design's "coding line"; the 40 flip-flops per line follow
// from its 80 flip-flops for two lines.
module coding_line #(
  parameter int unsigned TAPS = 40
) (
  input  logic            clk,
  input  logic            sample,
  input  logic [TAPS-1:0] taps,
  output logic [TAPS-1:0] code,
  output logic            bit_o
);
  timeunit 1ps;
  timeprecision 1fs;

  // The capture register has no reset: it is written before it is read
  // (the controller raises raw_valid only after a capture).
  always_ff @(posedge clk) begin
    if (sample) code <= taps;
  end

  always_comb bit_o = ^code;
endmodule
