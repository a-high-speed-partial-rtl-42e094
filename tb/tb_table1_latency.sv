// tb_table1_latency: the (8,4) worked example (message 1111, u1 u2 u3 u5
// frozen) through three codecs that differ only in the decoder schedule.
// Each must encode to u = 11101000, x = 10010110, decode the noiseless
// LLRs back to 11101000, and take the output decoding latency of its
// schedule: 10 cycles (plain 2-bit SC), 7 (overlapped), 5 (pre-computation).
// Then 500 random noisy codewords check that the three give identical
// decisions.
module tb_table1_latency;
  import polar_pkg::*;

  localparam int N  = 8;
  localparam int NS = 3;
  localparam int LAT [NS] = '{10, 7, 5};

  logic          clk = 0, rst_n = 0, dec_start = 0;
  logic [N-1:0]  frozen;
  logic [3:0]    enc_msg;
  llr_t          dec_llr [N];
  logic [N-1:0]  enc_u [NS], enc_x [NS], dec_u_hat [NS];
  logic          dec_busy [NS], dec_done [NS];
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  polar_codec_top #(.SCHED(SCHED_2BIT)) c0 (.clk, .rst_n, .frozen, .enc_msg, .enc_u(enc_u[0]),
    .enc_x(enc_x[0]), .dec_start, .dec_llr, .dec_u_hat(dec_u_hat[0]), .dec_busy(dec_busy[0]),
    .dec_done(dec_done[0]));
  polar_codec_top #(.SCHED(SCHED_OVERLAP)) c1 (.clk, .rst_n, .frozen, .enc_msg, .enc_u(enc_u[1]),
    .enc_x(enc_x[1]), .dec_start, .dec_llr, .dec_u_hat(dec_u_hat[1]), .dec_busy(dec_busy[1]),
    .dec_done(dec_done[1]));
  polar_codec_top #(.SCHED(SCHED_PRECOMP)) c2 (.clk, .rst_n, .frozen, .enc_msg, .enc_u(enc_u[2]),
    .enc_x(enc_x[2]), .dec_start, .dec_llr, .dec_u_hat(dec_u_hat[2]), .dec_busy(dec_busy[2]),
    .dec_done(dec_done[2]));

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run one codeword on all three, return the latencies
  task automatic decode(output int lat [NS]);
    int cyc = 0;
    for (int d = 0; d < NS; d++) lat[d] = 0;
    dec_start = 1;
    @(posedge clk);
    #1;
    dec_start = 0;
    cyc = 1;
    while (cyc < 14) begin
      for (int d = 0; d < NS; d++) if (dec_done[d] && lat[d] == 0) lat[d] = cyc;
      @(posedge clk);
      #1;
      cyc++;
    end
  endtask

  initial begin
    int lat [NS];
    frozen  = 8'b0001_0111;
    enc_msg = 4'b1111;
    for (int i = 0; i < N; i++) dec_llr[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      dec_llr[i].sign = enc_x[2][i];   // BPSK: bit 1 -> negative LLR
      dec_llr[i].mag  = MAG_W'(8);
    end
    decode(lat);
    for (int d = 0; d < NS; d++) begin
      checks += 4;
      if (enc_u[d] !== 8'b1110_1000) failures++;
      if (enc_x[d] !== 8'b1001_0110) failures++;
      if (dec_u_hat[d] !== 8'b1110_1000) begin
        failures++;
        $display("schedule %0d decoded %b", d, dec_u_hat[d]);
      end
      if (lat[d] != LAT[d]) begin
        failures++;
        $display("schedule %0d latency %0d, expected %0d", d, lat[d], LAT[d]);
      end
      $display("schedule %0d: u_hat=%b after %0d cycles", d, dec_u_hat[d], lat[d]);
    end
    for (int w = 0; w < 500; w++) begin
      frozen  = N'($urandom);
      enc_msg = 4'($urandom);
      for (int i = 0; i < N; i++) begin
        int v = (enc_x[2][i] ? -8 : 8) + int'($urandom_range(24)) - 12;
        dec_llr[i].sign = v < 0;
        dec_llr[i].mag  = MAG_W'(v < 0 ? -v : v);
      end
      decode(lat);
      for (int d = 0; d < NS; d++) begin
        checks += 2;
        if (lat[d] != LAT[d]) failures++;
        if (dec_u_hat[d] !== dec_u_hat[2]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
