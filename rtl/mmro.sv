// mmro: behavioural model of the multi-mode ring oscillator (entropy source).
//
// Behavioural model, not synthesizable logic: on an FPGA the ring is built
// from LUT stages and placed by hand, and its randomness comes from
// transistor noise that no RTL can express.
//
// The ring has N_MODE*W stages and one logical inversion. While `en` is low
// the ring is held in a reset state that contains exactly N_MODE edges,
// W stages apart (stages 0, W, 2W, ... are the edge-inserting stages). When
// `en` rises the N_MODE edges start to travel round the ring together: the
// ring oscillates in mode n, and a tap sees one edge every W*D_STAGE_PS.
// Every stage an edge passes adds an independent Gaussian delay error of
// variance JIT_FS * D_STAGE_PS (the white-noise jitter strength sigma^2/t
// times the stage delay), so the timing error of an edge grows with the
// number of stages it has travelled.
//
// tap_a is the output of stage 0 and tap_b the output of stage N_MODE*W-W.
// Both taps toggle at the same nominal times, (2j+1)*D_STAGE_PS after `en`
// rises for W = 2, but at each moment by two different, consecutive edges:
// the time between them is the "virtual pulse" whose width carries the
// entropy. With the defaults the 55th toggle (m = 18 cycles of n = 3 edges)
// falls at 109 * 675 ps = 73.575 ns, and the pulse has sigma ~ 19.9 ps.
//
// Edges are assumed never to collapse (no edge catches up with another).
// The Gaussian samples use the sum of 12 uniform numbers. The stage delay,
// n, w and the jitter strength follow the design; everything else here is
// this model's own choice.
module mmro #(
  parameter int unsigned N_MODE     = 3,
  parameter int unsigned W          = 2,
  parameter real         D_STAGE_PS = 675.0,
  parameter real         JIT_FS     = 2.7
) (
  input  logic en,
  output logic tap_a,
  output logic tap_b
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N = N_MODE * W;

  // stage outputs
  logic [N-1:0] s;

  // standard deviation of one stage delay, in ps: sqrt(fs * ps) = ps * sqrt(1e-3)
  localparam real SIGMA_STAGE_PS = $sqrt(JIT_FS * 1.0e-3 * D_STAGE_PS);

  // reset pattern: stage k*W is the only unstable stage of each group
  function automatic logic [N-1:0] reset_pattern();
    logic [N-1:0] p;
    for (int unsigned i = 0; i < N; i++) p[i] = ((i / W) % 2) == 1;
    return p;
  endfunction

  // zero-mean, unit-variance Gaussian sample (Irwin-Hall, 12 uniforms)
  function automatic real gauss();
    real acc;
    acc = 0.0;
    for (int i = 0; i < 12; i++) acc += real'($urandom) / 4294967296.0;
    return acc - 6.0;
  endfunction

  function automatic real stage_delay();
    return D_STAGE_PS + SIGMA_STAGE_PS * gauss();
  endfunction

  realtime     t_edge[N_MODE];   // absolute time of each edge's next stage passage
  int unsigned p_edge[N_MODE];   // stage each edge will pass next

  initial s = reset_pattern();

  // One edge passage per activation. While `en` is low the ring is held in
  // its reset state; its rise re-inserts the edges.
  always begin : p_ring
    int unsigned k;
    realtime     now;
    if (!en) begin
      s = reset_pattern();
      @(posedge en);
      now = $realtime;
      for (int unsigned e = 0; e < N_MODE; e++) begin
        p_edge[e] = e * W;
        t_edge[e] = now + stage_delay();
      end
    end
    // the edge that moves next
    k = 0;
    for (int unsigned e = 1; e < N_MODE; e++)
      if (t_edge[e] < t_edge[k]) k = e;
    #(t_edge[k] - $realtime);
    if (en) begin
      s[p_edge[k]] = ~s[p_edge[k]];
      p_edge[k]    = (p_edge[k] + 1) % N;
      t_edge[k]    = t_edge[k] + stage_delay();
    end
  end

  assign tap_a = s[0];
  assign tap_b = s[N-W];
endmodule
