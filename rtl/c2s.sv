// c2s: two's complement to sign-magnitude converter with saturation (the C2S
// box of the PE).
//
// The adder and subtractor of a PE produce a (q+1)-bit two's complement
// result. This block takes its absolute value, clips it to the largest
// q-bit sign-magnitude magnitude (2^(q-1)-1) and attaches the sign. Zero
// is returned with sign 0. Clipping is this design's choice; the PE drawing
// only shows the conversion. Purely combinational.
module c2s
  import polar_pkg::*;
(
  input  logic signed [LLR_W:0] din,
  output llr_t                  dout
);
  logic [LLR_W:0] abs_v;

  always_comb begin
    abs_v     = din[LLR_W] ? -din : din;
    dout.sign = din[LLR_W];
    if (abs_v > {2'b00, MAG_MAX}) dout.mag = MAG_MAX;
    else                          dout.mag = abs_v[MAG_W-1:0];
  end
endmodule
