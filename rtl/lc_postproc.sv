// lc_postproc: linear-code [16,8,5] post-processing of the raw bits.
//
// Raw bits are collected into two K-bit words, X1 (the first K bits, the
// first bit in bit 0) and X2 (the next K bits). When X2 is complete the
// output word
//     L = X1 ^ rotl(X1,1) ^ rotl(X1,2) ^ rotl(X1,4) ^ X2
// is presented for one cycle on out_word with out_valid. Every output bit is
// the XOR of 5 or more raw bits, and any nonzero XOR of output bits also
// covers at least 5 raw bits (the code's minimum distance is 5), so an input
// bias e becomes at most 2^4 * e^5. Two raw bits in, one bit out: the
// throughput halves (12.5 Mb/s raw, 6.25 Mb/s after).
//
// The formula, the 8-bit words and the [16,8,5] code follow the design; the
// shifts are read as 8-bit rotations, the reading under which the code has
// distance 5 (with plain truncating shifts it would only have distance 2).
// The bit order and the handshake are this implementation's choices. Latency:
// out_valid rises the cycle after the 16th in_valid.
module lc_postproc
#(
  parameter int unsigned K = trng_pkg::K_DEF
) (
  input  logic         clk,
  input  logic         rst_n,      // synchronous, active low
  input  logic         in_bit,
  input  logic         in_valid,
  output logic [K-1:0] out_word,
  output logic         out_valid
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned NW = 2 * K;

  logic [NW-1:0]         buf_q;   // bit i = i-th raw bit of the current block
  logic [$clog2(NW)-1:0] cnt;     // raw bits held in buf_q

  function automatic logic [K-1:0] rotl(input logic [K-1:0] x, input int unsigned n);
    return (x << n) | (x >> (K - n));
  endfunction

  function automatic logic [K-1:0] lc_map(input logic [K-1:0] x1, input logic [K-1:0] x2);
    return x1 ^ rotl(x1, 1) ^ rotl(x1, 2) ^ rotl(x1, 4) ^ x2;
  endfunction

  logic [NW-1:0] buf_nx;
  always_comb begin
    buf_nx      = buf_q;
    buf_nx[cnt] = in_bit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      buf_q     <= '0;
      out_valid <= 1'b0;
      out_word  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        buf_q <= buf_nx;
        cnt   <= cnt + 1'b1;   // wraps after NW bits
        if (cnt == $clog2(NW)'(NW - 1)) begin
          out_word  <= lc_map(buf_nx[K-1:0], buf_nx[NW-1:K]);
          out_valid <= 1'b1;
        end
      end
    end
  end
endmodule
