// p_node: last-stage decision unit of the 2-bit SC decoder.
//
// It takes the two LLRs c and d that reach the final stage and decides the
// pair (u_{2i-1}, u_{2i}) in one step, without computing the last f and g
// values. The decision uses only the two sign bits, one magnitude
// comparison (comp = |c| >= |d|) and the two frozen flags:
//   u_{2i-1} = ~frozen1 & (sign(c) ^ sign(d))
//   u_{2i}   = ~frozen2 & ( ~comp & sign(d)
//                         | ~frozen1 & sign(d)
//                         |  frozen1 & comp & sign(c) )
// i.e. when u_{2i-1} is free the second bit is sign(d) (d - c or d + c
// always takes the sign of d then), and when u_{2i-1} is frozen to 0 it is
// the sign of c + d, read from the larger magnitude (ties go to c).
// The frozen-flag product terms follow the p node equations and gate
// drawing; they are written here as derived from the SC rule. Purely
// combinational.
module p_node
  import polar_pkg::*;
(
  input  llr_t llr_c,
  input  llr_t llr_d,
  input  logic frozen1,   // u_{2i-1} is a frozen bit
  input  logic frozen2,   // u_{2i} is a frozen bit
  output logic u_odd,     // u_{2i-1}
  output logic u_even     // u_{2i}
);
  logic comp;

  always_comb begin
    comp   = (llr_c.mag >= llr_d.mag);
    u_odd  = ~frozen1 & (llr_c.sign ^ llr_d.sign);
    u_even = (~comp & ~frozen2 & llr_d.sign)
           | (~frozen1 & ~frozen2 & llr_d.sign)
           | (comp & frozen1 & ~frozen2 & llr_c.sign);
  end
endmodule
