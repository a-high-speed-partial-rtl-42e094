// merged_pe: processing element that evaluates the f node and both possible
// g node results of one butterfly in the same cycle (pre-computation PE).
//
// Inputs are two sign-magnitude LLRs: llr_c from the upper half of the
// stage input and llr_d from the lower half.
//   f  = sign(c) xor sign(d), magnitude min(|c|,|d|)       (min-sum)
//   gp = d + c   (the g result when the partial sum is 0)
//   gm = d - c   (the g result when the partial sum is 1)
// The f path works directly on sign and magnitude (XOR gate plus
// compare-and-select); the g path converts both operands to two's
// complement (S2C), adds and subtracts, and converts back (C2S), clipping to
// the q-bit range. Choosing between gp and gm by the partial sum is left to
// the caller, which is what lets the decoder compute f and g of a stage in
// one cycle. These structures follow the merged PE drawing; the operand
// order d - c follows g(a,b) = a(-1)^u + b with a the upper LLR. A zero f
// result is given sign 0 (this design's rule, so that a sign bit of 1 always
// means a negative value). Purely combinational.
module merged_pe
  import polar_pkg::*;
(
  input  llr_t llr_c,
  input  llr_t llr_d,
  output llr_t f_out,
  output llr_t gp_out,
  output llr_t gm_out
);
  logic signed [LLR_W-1:0] c_tc, d_tc;
  logic signed [LLR_W:0]   sum_tc, diff_tc;
  logic [MAG_W-1:0]        min_mag;

  // f node: XOR of signs, compare & select of magnitudes
  always_comb begin
    min_mag      = (llr_c.mag <= llr_d.mag) ? llr_c.mag : llr_d.mag;
    f_out.mag    = min_mag;
    f_out.sign   = (llr_c.sign ^ llr_d.sign) & (min_mag != '0);
  end

  // g node: S2C, adder and subtractor, C2S
  s2c u_s2c_c (.din(llr_c), .dout(c_tc));
  s2c u_s2c_d (.din(llr_d), .dout(d_tc));

  always_comb begin
    sum_tc  = (LLR_W+1)'(d_tc) + (LLR_W+1)'(c_tc);
    diff_tc = (LLR_W+1)'(d_tc) - (LLR_W+1)'(c_tc);
  end

  c2s u_c2s_p (.din(sum_tc),  .dout(gp_out));
  c2s u_c2s_m (.din(diff_tc), .dout(gm_out));
endmodule
