// trng_ctrl: generation controller of the TRNG.
//
// Every raw bit is produced from a freshly reset ring, so that successive
// bits are independent. One generation takes RST_CYCLES + RUN_CYCLES clock
// cycles:
//   ST_RESET  ro_en = 0 for RST_CYCLES cycles: the ring returns to its
//             reset state with its N_MODE edges re-inserted;
//   ST_RUN    ro_en = 1 for RUN_CYCLES cycles: the edges circulate and
//             jitter accumulates. `sample` is high in the last run cycle,
//             so the coding lines capture at the same clock edge that
//             drops ro_en, exactly RUN_CYCLES periods after ro_en rose.
// raw_valid is high in the cycle after the capture, when the coding lines'
// bits are valid. While `enable` is low the controller idles in ST_IDLE
// with the ring held in reset; dropping `enable` mid-run aborts the
// generation without a sample.
//
// Timing (defaults, assumed 200 MHz clock): capture 75 ns after the ring
// starts, which covers the 73.575 ns that m = 18 ring cycles need; one raw
// bit every 16 cycles = 80 ns, i.e. 12.5 Mb/s. The reset between
// generations follows the design; the cycle counts and the clock are this
// implementation's choice. ro_en comes straight from a flip-flop, so the
// ring sees no glitches.
module trng_ctrl
  import trng_pkg::*;
#(
  parameter int unsigned RUN_CYCLES = trng_pkg::RUN_CYCLES_DEF,
  parameter int unsigned RST_CYCLES = trng_pkg::RST_CYCLES_DEF
) (
  input  logic clk,
  input  logic rst_n,      // synchronous, active low
  input  logic enable,
  output logic ro_en,
  output logic sample,
  output logic raw_valid
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned CW = $clog2(RUN_CYCLES > RST_CYCLES ? RUN_CYCLES + 1 : RST_CYCLES + 1);

  gen_state_e    state, state_nx;
  logic [CW-1:0] cnt, cnt_nx;

  always_comb begin
    state_nx = state;
    cnt_nx   = cnt + 1'b1;
    unique case (state)
      ST_IDLE: begin
        cnt_nx = '0;
        if (enable) state_nx = ST_RESET;
      end
      ST_RESET: begin
        if (!enable) begin
          state_nx = ST_IDLE;
          cnt_nx   = '0;
        end else if (cnt == CW'(RST_CYCLES - 1)) begin
          state_nx = ST_RUN;
          cnt_nx   = '0;
        end
      end
      ST_RUN: begin
        if (!enable) begin
          state_nx = ST_IDLE;
          cnt_nx   = '0;
        end else if (cnt == CW'(RUN_CYCLES - 1)) begin
          state_nx = ST_RESET;
          cnt_nx   = '0;
        end
      end
      default: begin
        state_nx = ST_IDLE;
        cnt_nx   = '0;
      end
    endcase
  end

  always_comb sample = (state == ST_RUN) && enable && (cnt == CW'(RUN_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      cnt       <= '0;
      ro_en     <= 1'b0;
      raw_valid <= 1'b0;
    end else begin
      state     <= state_nx;
      cnt       <= cnt_nx;
      ro_en     <= (state_nx == ST_RUN);
      raw_valid <= sample;
    end
  end

  // The capture always happens while the ring runs.
  a_sample_in_run : assert property (@(posedge clk) disable iff (!rst_n) sample |-> ro_en);
  // The ring is released for exactly RUN_CYCLES cycles before a capture.
  a_run_length : assert property (@(posedge clk) disable iff (!rst_n)
                                  sample |-> $past(ro_en, RUN_CYCLES - 1));
endmodule
