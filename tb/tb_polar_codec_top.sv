// tb_polar_codec_top: end-to-end run of the codec at its default size
// (N = 8, K = 4), with no parameter overrides.
//   1. The worked example: message 1111 with u1 u2 u3 u5 frozen encodes to
//      u = 11101000, x = 10010110 (u8/x8 leftmost); its noiseless LLRs
//      decode back to u in 5 cycles.
//   2. Random messages and frozen masks go through the encoder, a BPSK
//      channel with uniform noise of growing amplitude and a q-bit
//      quantiser, then the decoder. u_hat must equal the integer SC
//      reference bit for bit, and equal the sent u when there is no noise.
//   3. A start pulse in the middle of a codeword must be ignored.
// Mechanisms counted (each must happen at least once): the four frozen
// combinations at the p node, g candidates chosen by a partial sum of 1,
// clipped g results, noise-free codewords recovered, noisy codewords
// decoded wrongly (SC is not ML, so a few must appear at high noise), and
// ignored start pulses. Latency 3N/4 - 1 = 5 cycles is checked every time.
module tb_polar_codec_top;
  import polar_pkg::*;
  import polar_ref_pkg::*;

  localparam int N   = 8;
  localparam int K   = 4;
  localparam int LAT = 3 * N / 4 - 1;

  logic          clk = 0, rst_n = 0, dec_start = 0;
  logic [N-1:0]  frozen, enc_u, enc_x, dec_u_hat;
  logic [K-1:0]  enc_msg;
  llr_t          dec_llr [N];
  logic          dec_busy, dec_done;
  int            checks = 0, failures = 0;
  int            n_clean_ok = 0, n_err = 0, n_ignored = 0;
  stats_t        st;

  always #5 clk = ~clk;

  polar_codec_top dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send the current encoder output through the channel and decode it
  task automatic transfer(input int noise, input bit poke_start);
    ivec_t li;
    bvec_t fz, ref_u;
    int    cyc;
    logic [N-1:0] sent_u;
    for (int i = 0; i < NMAX; i++) begin li[i] = 0; fz[i] = 0; end
    #1;
    sent_u = enc_u;
    for (int i = 0; i < N; i++) begin
      int nz = (noise == 0) ? 0 : int'($urandom_range(2 * noise)) - noise;
      li[i]      = sat((enc_x[i] ? -8 : 8) + nz, LLR_W);
      dec_llr[i] = to_sm(li[i]);
      fz[i]      = frozen[i];
    end
    ref_u = sc_decode(li, fz, N, LLR_W, st);
    dec_start = 1;
    @(posedge clk);
    #1;
    dec_start = 0;
    cyc = 1;
    while (!dec_done && cyc < 50) begin
      if (poke_start && cyc == 2) begin
        dec_start = 1;
        n_ignored++;
      end else dec_start = 0;
      @(posedge clk);
      #1;
      cyc++;
    end
    dec_start = 0;
    checks += 2;
    if (cyc != LAT) begin
      failures++;
      $display("latency %0d, expected %0d", cyc, LAT);
    end
    if (poke_start && dec_busy) begin
      failures++;
      $display("start pulse during a codeword was not ignored");
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (dec_u_hat[i] !== ref_u[i]) begin
        failures++;
        if (failures < 10) $display("bit %0d differs from the reference", i);
      end
    end
    if (noise == 0) begin
      checks++;
      if (dec_u_hat !== sent_u) failures++;
      else n_clean_ok++;
    end else if (dec_u_hat !== sent_u) n_err++;
    @(posedge clk);
    #1;
  endtask

  initial begin
    frozen  = '0;
    enc_msg = '0;
    for (int i = 0; i < N; i++) dec_llr[i] = '0;
    st = '{default: 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. worked example
    enc_msg = 4'b1111;
    frozen  = 8'b0001_0111;
    #1;
    checks += 2;
    if (enc_u !== 8'b1110_1000 || enc_x !== 8'b1001_0110) begin
      failures++;
      $display("example encode u=%b x=%b", enc_u, enc_x);
    end
    transfer(0, 0);
    checks++;
    if (dec_u_hat !== 8'b1110_1000) begin
      failures++;
      $display("example decode u_hat=%b", dec_u_hat);
    end else $display("worked example decoded: u_hat=%b", dec_u_hat);

    // 2./3. random traffic
    for (int w = 0; w < 4000; w++) begin
      enc_msg = K'($urandom);
      frozen  = (w % 4 == 0) ? 8'b0001_0111 : N'($urandom);
      transfer((w % 5) * 6, (w % 97) == 5);
    end

    $display("p node frozen cases {f1,f2}: 00=%0d 01=%0d 10=%0d 11=%0d",
             st.pn_case[0], st.pn_case[1], st.pn_case[2], st.pn_case[3]);
    $display("g via partial sum 1: %0d, clipped g: %0d, clean ok: %0d, noisy errors: %0d, ignored starts: %0d",
             st.psum_one, st.sat_hits, n_clean_ok, n_err, n_ignored);
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (st.pn_case[c] == 0) failures++;
    end
    checks += 5;
    if (st.psum_one == 0)  failures++;
    if (st.sat_hits == 0)  failures++;
    if (n_clean_ok == 0)   failures++;
    if (n_err == 0)        failures++;
    if (n_ignored == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
