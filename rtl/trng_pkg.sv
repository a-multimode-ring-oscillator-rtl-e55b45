// trng_pkg: constants shared by the multi-mode ring oscillator TRNG.
//
// Ring topology (n, w), delay-line length, generation timing and the width
// of the post-processed words. n = 3, w = 2, the 40-tap lines (20 CARRY4
// elements over two lines) and the 8-bit linear-code words follow the
// design; the clock-cycle counts are this implementation's choice for an
// assumed 200 MHz clock (5 ns): 1 reset cycle + 15 run cycles = 80 ns per
// raw bit, i.e. 12.5 Mb/s, with the sample taken 75 ns after the ring
// starts, just after the 73.575 ns the m = 18 cycles need.
package trng_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N_MODE_DEF = 3;   // edges inserted into the ring (mode n)
  localparam int unsigned W_DEF = 2;   // stages between edge-inserting stages
  localparam int unsigned TAPS_DEF = 40;  // flip-flops per delay line
  localparam int unsigned RUN_CYCLES_DEF = 15;  // clock cycles the ring runs per bit
  localparam int unsigned RST_CYCLES_DEF = 1;   // clock cycles the ring is held in reset
  localparam int unsigned K_DEF = 8;   // post-processing word width

  // One generation, as seen by the controller.
  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,   // generator disabled, ring held in reset
    ST_RESET = 2'd1,   // ring held in reset between two generations
    ST_RUN   = 2'd2    // ring oscillating, jitter accumulating
  } gen_state_e;
endpackage
