// polar_encoder: (N, K) polar encoder.
//
// Step 1 builds the N-bit source vector u: the K message bits go, in order
// (msg[0] first), to the free positions in increasing index order, and every
// frozen position carries 0. Step 2 computes the codeword x = u * G_N,
// G_N = F^(x)log2(N), F = [1 0; 1 1], with log2(N) columns of XOR gates: in
// column t every bit i whose bit t is 0 is XORed with bit i + 2^t (for
// N = 8: distance 1, then 2, then 4).
//
// Bit i of every vector is u_(i+1) / x_(i+1), so a literal written as
// 8'b11101000 has u_8 on the left. If the mask has more than K free
// positions the extra ones carry 0; with fewer, the last message bits are
// dropped. The XOR network follows the encoder drawing; the message
// placement order is this design's choice. Purely combinational.
module polar_encoder #(
  parameter int unsigned N = 8,
  parameter int unsigned K = 4
) (
  input  logic [K-1:0] msg,
  input  logic [N-1:0] frozen,   // frozen[i] = 1: u_(i+1) is frozen to 0
  output logic [N-1:0] u,
  output logic [N-1:0] x
);
  localparam int unsigned M = $clog2(N);

  always_comb begin
    int unsigned cnt;
    cnt = 0;
    for (int unsigned i = 0; i < N; i++) begin
      u[i] = 1'b0;
      if (!frozen[i]) begin
        if (cnt < K) u[i] = msg[cnt];
        cnt++;
      end
    end
  end

  logic [N-1:0] col [M+1];

  assign col[0] = u;
  for (genvar t = 0; t < M; t++) begin : g_col
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (((i >> t) & 1) == 0) begin : g_xor
        assign col[t+1][i] = col[t][i] ^ col[t][i + (1 << t)];
      end else begin : g_pass
        assign col[t+1][i] = col[t][i];
      end
    end
  end
  assign x = col[M];
endmodule
