// trng_top: the multi-mode ring oscillator TRNG, entropy source included.
//
// A ring oscillator running in mode n = 3 (three edges, w = 2 stages apart)
// is reset before every bit and then allowed to run for m = 18 ring cycles,
// during which the white-noise jitter of every stage accumulates in the
// spacing of consecutive edges. Two taps of the ring, w stages apart, feed
// two 40-tap carry-chain delay lines; at the end of the run both lines are
// sampled and encoded, and the XOR of the two parities is the raw bit: the
// least significant bit of the width of the jittery "virtual pulse" between
// two consecutive edges, quantised in ~20 ps carry delays. The estimated
// Shannon entropy is 0.997 bit per raw bit; a [16,8,5] linear code halves
// the bit rate and reduces bias further.
//
// The ring and the delay lines are behavioural models (mmro,
// carry_delay_line); everything else (trng_core) is synthesizable. Ports:
// `enable` starts and stops generation; raw_bit/raw_valid give one raw bit
// every 16 cycles (12.5 Mb/s at the assumed 200 MHz clock); rnd_word/
// rnd_valid give one 8-bit word every 256 cycles (6.25 Mb/s); code_a/code_b
// are the latest delay-line snapshots. rst_n is synchronous, active low.
// A longer RUN_CYCLES accumulates more jitter (sigma grows with the square
// root of the run time); the routing delay in front of the delay lines is
// derived from RUN_CYCLES and CLK_PERIOD_PS so that the measured edge stays
// in the middle of the lines. The clock period is this implementation's
// choice; the stage and carry delays are the design's platform figures.
module trng_top
#(
  parameter int unsigned N_MODE     = trng_pkg::N_MODE_DEF,
  parameter int unsigned W          = trng_pkg::W_DEF,
  parameter int unsigned TAPS       = trng_pkg::TAPS_DEF,
  parameter int unsigned RUN_CYCLES = trng_pkg::RUN_CYCLES_DEF,
  parameter int unsigned RST_CYCLES = trng_pkg::RST_CYCLES_DEF,
  parameter real         CLK_PERIOD_PS = 5000.0,   // clock of the sequencer
  parameter real         D_STAGE_PS    = 675.0,    // ring stage delay
  parameter real         D_CARRY_PS    = 20.0      // carry element delay
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,
  output logic            raw_bit,
  output logic            raw_valid,
  output logic [TAPS-1:0] code_a,
  output logic [TAPS-1:0] code_b,
  output logic [trng_pkg::K_DEF-1:0] rnd_word,
  output logic            rnd_valid
);
  timeunit 1ps;
  timeprecision 1fs;

  // Where the measured edge is at the capture edge. A tap toggles at
  // (1 + j*W) * D_STAGE_PS after the ring starts; the edge measured is the
  // last one that can still be in the middle of the line at the capture,
  // RUN_CYCLES clock periods after the start, and the routing delay in front
  // of the lines puts it there (placement does this on the FPGA). Defaults:
  // j = 54, the 55th toggle at 73.575 ns (m = 18), routing delay 1025 ps.
  localparam real T_SAMPLE_PS = RUN_CYCLES * CLK_PERIOD_PS;
  localparam real T_MID_PS    = TAPS / 2.0 * D_CARRY_PS;
  localparam int  J_EDGE      = int'($floor((T_SAMPLE_PS - T_MID_PS - D_STAGE_PS) / (W * D_STAGE_PS)));
  localparam real ROUTE_PS    = T_SAMPLE_PS - (1.0 + J_EDGE * W) * D_STAGE_PS - T_MID_PS;

  logic            ro_en;
  logic            tap_a, tap_b;
  logic [TAPS-1:0] taps_a, taps_b;

  mmro #(.N_MODE(N_MODE), .W(W), .D_STAGE_PS(D_STAGE_PS)) u_ro (
    .en(ro_en), .tap_a, .tap_b
  );

  carry_delay_line #(.TAPS(TAPS), .D_CARRY_PS(D_CARRY_PS), .ROUTE_PS(ROUTE_PS)) u_dl_a (.din(tap_a), .taps(taps_a));
  carry_delay_line #(.TAPS(TAPS), .D_CARRY_PS(D_CARRY_PS), .ROUTE_PS(ROUTE_PS)) u_dl_b (.din(tap_b), .taps(taps_b));

  trng_core #(.TAPS(TAPS), .RUN_CYCLES(RUN_CYCLES), .RST_CYCLES(RST_CYCLES)) u_core (
    .clk, .rst_n, .enable, .ro_en,
    .taps_a, .taps_b,
    .raw_bit, .raw_valid, .code_a, .code_b, .rnd_word, .rnd_valid
  );
endmodule
