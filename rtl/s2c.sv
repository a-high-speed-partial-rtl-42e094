// s2c: sign-magnitude to two's complement converter (the S2C box of the PE).
//
// A q-bit sign-magnitude LLR becomes a q-bit two's complement number. The
// magnitude never exceeds 2^(q-1)-1, so the result always fits. A negative
// zero (sign 1, magnitude 0) converts to 0. Purely combinational.
module s2c
  import polar_pkg::*;
(
  input  llr_t              din,
  output logic signed [LLR_W-1:0] dout
);
  always_comb begin
    if (din.sign) dout = -$signed({1'b0, din.mag});
    else          dout =  $signed({1'b0, din.mag});
  end
endmodule
