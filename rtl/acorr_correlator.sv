// acorr_correlator -- 2-bit-input correlator.
//
// Computes the similarity of two 2-bit samples x and y as c = 3 - |x - y|:
// equal inputs give 11, inputs one level apart 10, two levels apart 01, and
// 00 against 11 gives 00. It is built from exclusive-OR gates, as the source
// design is, because the complement of |x - y| has a cheap XOR form:
//   c0 = NOT(x0 XOR y0)
//   c1 = NOT( (x1 XOR y1) AND NOT((x0 XOR y0) AND (x1 XOR x0)) )
// (the AND term removes the pair 01/10, whose MSBs differ although the
// levels are only one apart).
//
// The truth table follows the source design; the gate decomposition above is
// this design's own. The result is registered once on an enabled clock, a
// one-stage stand-in for the concurrent-flow clocked gate pipeline of the
// original, and is reset to 00 (no output pulses).
//
// Interface: x, y sampled on a clock with en high; c valid one enabled clock
// later and held until the next one.
module acorr_correlator
  import acorr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sample_t x,
  input  sample_t y,
  output sample_t c
);

  logic    lsb_diff;   // x0 ^ y0 : |x - y| is odd
  logic    msb_diff;   // x1 ^ y1
  logic    near_pair;  // the 01/10 pair
  sample_t c_d;

  always_comb begin
    lsb_diff  = x[0] ^ y[0];
    msb_diff  = x[1] ^ y[1];
    near_pair = lsb_diff & (x[1] ^ x[0]);
    c_d[0]    = ~lsb_diff;
    c_d[1]    = ~(msb_diff & ~near_pair);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  c <= '0;
    else if (en) c <= c_d;
  end

endmodule
