// trng_core: synthesizable part of the multi-mode RO TRNG.
//
// Takes the two sampled delay lines, fed from two taps of the ring that see
// two consecutive edges at the same nominal moment, and turns them into
// random bits:
//   - trng_ctrl runs the reset / run / sample cycle and drives the ring's
//     enable (ro_en);
//   - two independent coding lines capture lines A and B and reduce each
//     to the parity of its snapshot (the LSB of the edge's position);
//   - raw_bit = bit A ^ bit B, the LSB of the difference of the two edge
//     positions, i.e. of the width of the jittery pulse between the two
//     edges measured in carry delays. Noise common to both edges (supply,
//     temperature) moves both positions alike and cancels;
//   - lc_postproc compresses pairs of 8 raw bits into one 8-bit word.
// raw_bit is valid for the cycle raw_valid is high (one every
// RST_CYCLES + RUN_CYCLES cycles); rnd_word for the cycle rnd_valid is high
// (one every 16 raw bits). code_a / code_b expose the last snapshots for
// on-line health tests and characterisation.
//
// Combining the two lines by XOR is this implementation's reading of the
// design's differential, double coding-line structure.
module trng_core
#(
  parameter int unsigned TAPS       = trng_pkg::TAPS_DEF,
  parameter int unsigned RUN_CYCLES = trng_pkg::RUN_CYCLES_DEF,
  parameter int unsigned RST_CYCLES = trng_pkg::RST_CYCLES_DEF
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,
  output logic            ro_en,
  input  logic [TAPS-1:0] taps_a,
  input  logic [TAPS-1:0] taps_b,
  output logic            raw_bit,
  output logic            raw_valid,
  output logic [TAPS-1:0] code_a,
  output logic [TAPS-1:0] code_b,
  output logic [trng_pkg::K_DEF-1:0] rnd_word,
  output logic            rnd_valid
);
  timeunit 1ps;
  timeprecision 1fs;

  logic sample;
  logic bit_a, bit_b;

  trng_ctrl #(.RUN_CYCLES(RUN_CYCLES), .RST_CYCLES(RST_CYCLES)) u_ctrl (
    .clk, .rst_n, .enable, .ro_en, .sample, .raw_valid
  );

  coding_line #(.TAPS(TAPS)) u_line_a (
    .clk, .sample, .taps(taps_a), .code(code_a), .bit_o(bit_a)
  );

  coding_line #(.TAPS(TAPS)) u_line_b (
    .clk, .sample, .taps(taps_b), .code(code_b), .bit_o(bit_b)
  );

  always_comb raw_bit = bit_a ^ bit_b;

  lc_postproc #(.K(trng_pkg::K_DEF)) u_lc (
    .clk, .rst_n, .in_bit(raw_bit), .in_valid(raw_valid),
    .out_word(rnd_word), .out_valid(rnd_valid)
  );
endmodule
