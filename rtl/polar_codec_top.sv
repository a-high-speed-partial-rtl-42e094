// polar_codec_top: (N, K) polar encoder and low-latency 2-bit SC decoder.
//
// The two halves of the codec stand side by side; the channel between them
// (modulation, noise, LLR computation) is outside this design.
//   * Encoder: message bits -> source vector u -> codeword x = u * G_N.
//     Combinational.
//   * Decoder: N channel LLRs (q-bit sign-magnitude, llr_t) -> u_hat in
//     3N/4 - 1 cycles, using merged PEs, one p node and the high speed
//     partial-sum network (N/2 partial-sum registers).
// The frozen mask is shared by both: frozen[i] = 1 marks u_(i+1) as frozen.
// Decoder timing: dec_llr and frozen are sampled when dec_start is high and
// the decoder is idle; dec_done pulses one cycle after the last working
// cycle and dec_u_hat holds the result until the next start.
// Defaults N = 8, K = 4 are the code evaluated in the document; the LLR width
// is set in polar_pkg (6 bits, this design's choice). SCHED picks the
// decoder schedule: pre-computation (default, 3N/4 - 1 cycles), overlapped
// (N - 1) or plain 2-bit SC (1.5N - 2); all three share the p node and PSN.
module polar_codec_top
  import polar_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned K     = 4,
  parameter sched_e      SCHED = SCHED_PRECOMP
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   frozen,
  // encoder
  input  logic [K-1:0]   enc_msg,
  output logic [N-1:0]   enc_u,
  output logic [N-1:0]   enc_x,
  // decoder
  input  logic           dec_start,
  input  llr_t           dec_llr [N],
  output logic [N-1:0]   dec_u_hat,
  output logic           dec_busy,
  output logic           dec_done
);
  polar_encoder #(.N(N), .K(K)) u_enc (
    .msg   (enc_msg),
    .frozen(frozen),
    .u     (enc_u),
    .x     (enc_x)
  );

  sc_decoder #(.N(N), .SCHED(SCHED)) u_dec (
    .clk, .rst_n,
    .start (dec_start),
    .llr_in(dec_llr),
    .frozen(frozen),
    .u_hat (dec_u_hat),
    .busy  (dec_busy),
    .done  (dec_done)
  );
endmodule
