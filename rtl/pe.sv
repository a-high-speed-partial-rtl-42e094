// pe: unified processing element for f and g nodes, used by the plain and
// overlapped 2-bit SC schedules.
//
// It is the merged PE (f node, S2C, adder, subtractor, C2S) followed by two
// 2:1 multiplexers: the partial sum u_sum picks d + c (0) or d - c (1), and
// ctrl_g picks the f result (0) or the g result (1) as the single output.
// So one PE serves both node types of its tree position, one per cycle:
//   ctrl_g = 0: f(c,d) = sign(c) xor sign(d), min(|c|,|d|)
//   ctrl_g = 1: g(c,d) = d + (-1)^u_sum c, clipped to q bits
// The structure follows the unified PE drawing; operand order and clipping
// are as in merged_pe. Purely combinational.
module pe
  import polar_pkg::*;
(
  input  llr_t llr_c,
  input  llr_t llr_d,
  input  logic u_sum,
  input  logic ctrl_g,
  output llr_t llr_out
);
  llr_t f_v, gp_v, gm_v, g_v;

  merged_pe u_core (.llr_c, .llr_d, .f_out(f_v), .gp_out(gp_v), .gm_out(gm_v));

  always_comb begin
    g_v     = u_sum  ? gm_v : gp_v;
    llr_out = ctrl_g ? g_v  : f_v;
  end
endmodule
