// psn: high speed partial-sum network.
//
// The partial sums an SC decoder needs are the running encoding
// v = u_hat(0:i) * G_N of the bits decoded so far. Two observations keep
// this cheap:
//   * Bits u_i with i < N/2 only touch v(0:N/2-1), bits with i >= N/2 only
//     touch v(N/2:N-1) as far as the remaining g nodes care, and
//     v(j+N/2) is first needed after v(j) has been used for the last time.
//     So v(j) and v(j+N/2) share one register r_j: N/2 registers in all.
//   * Row i of G_N restricted to N/2 columns is produced from row i-1 by a
//     row of XOR gates (G(i,j) = G(i-1,j) xor G(i-1,j-1), G(i,0) = 1), held
//     in an N/2-bit row register. For i >= N/2 the needed row
//     G_N(i, N/2:N-1) equals G_N(i-N/2, 0:N/2-1), so the generator restarts.
// Each register is then updated as r_j <= r_j xor (u_i and G_N(i,j)): one
// AND gate and one XOR gate, whatever N is.
//
// This decoder delivers two bits per cycle (u_idx and u_idx+1, idx even),
// so one update applies two rows: row i from the row register and row i+1
// from one XOR row; the row register then advances by two rows. An update
// with idx = 0 or idx = N/2 starts from a zero vector and from row 0; this
// is how the registers are cleared for a new codeword and for the second
// half. One-update-per-two-bits and the clearing rule are this design's
// choices; the register sharing, the row generator and the AND/XOR update
// follow the proposed architecture.
//
// Interface: upd with idx and u_pair; psum is registered and shows the
// result from the clock edge after the update. psum_next is the same value
// combinationally, in the cycle of the update, for a g node that runs in the
// same cycle as the p node (overlapped schedule). psum[j] holds v(j) during the
// first half of a codeword and v(j+N/2) during the second.
module psn #(
  parameter int unsigned N = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       upd,
  input  logic [$clog2(N)-1:0]       idx,
  input  logic [1:0]                 u_pair,   // [0] = u_idx, [1] = u_idx+1
  output logic [N/2-1:0]             psum,
  output logic [N/2-1:0]             psum_next // value psum takes at the next edge
);
  localparam int unsigned H = N / 2;

  logic [H-1:0] row_q, row0, row1, row_next, base_v, v_next;
  logic         restart;

  function automatic logic [H-1:0] next_row(input logic [H-1:0] r);
    return r ^ (r << 1);
  endfunction

  always_comb begin
    restart  = (idx == '0) || (idx == ($clog2(N))'(H));
    row0     = restart ? H'(1) : row_q;
    base_v   = restart ? '0    : psum;
    row1     = next_row(row0);
    row_next = next_row(row1);
    v_next   = base_v ^ (row0 & {H{u_pair[0]}}) ^ (row1 & {H{u_pair[1]}});
  end

  assign psum_next = upd ? v_next : psum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_q <= H'(1);
      psum  <= '0;
    end else if (upd) begin
      row_q <= row_next;
      psum  <= v_next;
    end
  end
endmodule
