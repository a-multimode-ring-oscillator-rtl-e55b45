// carry_delay_line: behavioural model of one carry-chain delay line.
//
// Behavioural model, not synthesizable logic: on the FPGA the line is a
// column of CARRY4 primitives (four taps each) whose propagation delay is
// what is being measured, which RTL cannot describe.
//
// The RO tap `din` reaches the first carry element after a routing delay
// ROUTE_PS and then passes TAPS elements of D_CARRY_PS each. taps[i] is the
// value of `din` ROUTE_PS + (i+1)*D_CARRY_PS ago, so when the line is
// sampled an edge of `din` shows as a step in the tap vector whose position
// is the edge's time to within one carry delay. TAPS = 40 (10 CARRY4) and
// the 20 ps average element delay follow the design; the uniform element
// delay and the routing delay are this model's choices. ROUTE_PS is set so
// that, with the default generation timing, the nominal position of the
// measured edge is the middle of the line at the sampling clock edge
// (75 ns - 73.575 ns - 20 taps * 20 ps = 1025 ps; trng_top derives it from
// the run length); a real implementation
// gets the same by placement.
module carry_delay_line #(
  parameter int unsigned TAPS       = 40,
  parameter real         D_CARRY_PS = 20.0,
  parameter real         ROUTE_PS   = 1025.0
) (
  input  logic            din,
  output logic [TAPS-1:0] taps
);
  timeunit 1ps;
  timeprecision 1fs;

  logic routed;

  assign #(ROUTE_PS) routed = din;
  assign #(D_CARRY_PS) taps[0] = routed;

  for (genvar i = 1; i < TAPS; i++) begin : g_carry
    assign #(D_CARRY_PS) taps[i] = taps[i-1];
  end
endmodule
