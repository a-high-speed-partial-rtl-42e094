// tb_sc_decoder: the decoder at N = 16 (two registered inner stages, so
// every input path of a stage is used), in all three schedules side by side,
// against the integer SC reference model. Each codeword has a random frozen
// mask and LLRs that are either uniformly random over the q-bit range or a
// noisy BPSK image of a random valid codeword. Checks: u_hat equals the
// reference bit for bit in every schedule; done comes 1.5N-2 = 22 (plain),
// N-1 = 15 (overlapped) and 3N/4-1 = 11 (pre-computation) cycles after the
// start cycle and lasts one cycle; busy is high for exactly those cycles;
// llr_in and frozen may change after the start cycle.
module tb_sc_decoder;
  import polar_pkg::*;
  import polar_ref_pkg::*;

  localparam int NT = 16;
  localparam int NS = 3;
  localparam int LAT [NS] = '{3 * NT / 2 - 2, NT - 1, 3 * NT / 4 - 1};

  logic            clk = 0, rst_n = 0, start = 0;
  llr_t            llr [NT];
  logic [NT-1:0]   frozen;
  logic [NT-1:0]   u_hat [NS];
  logic            busy [NS], done [NS];
  int              checks = 0, failures = 0;
  stats_t          st;

  always #5 clk = ~clk;

  sc_decoder #(.N(NT), .SCHED(SCHED_2BIT)) dut0 (
    .clk, .rst_n, .start, .llr_in(llr), .frozen, .u_hat(u_hat[0]), .busy(busy[0]), .done(done[0]));
  sc_decoder #(.N(NT), .SCHED(SCHED_OVERLAP)) dut1 (
    .clk, .rst_n, .start, .llr_in(llr), .frozen, .u_hat(u_hat[1]), .busy(busy[1]), .done(done[1]));
  sc_decoder #(.N(NT), .SCHED(SCHED_PRECOMP)) dut2 (
    .clk, .rst_n, .start, .llr_in(llr), .frozen, .u_hat(u_hat[2]), .busy(busy[2]), .done(done[2]));

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_word(input int mode);
    ivec_t li;
    bvec_t fz, u, x, ref_u;
    int    lim = (1 << (LLR_W - 1)) - 1;
    int    cyc;
    int    done_at [NS], busy_cnt [NS], done_cnt [NS];
    for (int i = 0; i < NMAX; i++) begin li[i] = 0; fz[i] = 0; u[i] = 0; end
    for (int i = 0; i < NT; i++) begin
      fz[i] = bit'($urandom_range(1));
      if (!fz[i]) u[i] = bit'($urandom_range(1));
    end
    x = encode(u, NT);
    for (int i = 0; i < NT; i++) begin
      if (mode == 0) li[i] = $urandom_range(2 * lim) - lim;
      else           li[i] = sat((x[i] ? -6 : 6) + int'($urandom_range(16)) - 8, LLR_W);
      llr[i]    = to_sm(li[i]);
      frozen[i] = fz[i];
    end
    ref_u = sc_decode(li, fz, NT, LLR_W, st);
    for (int d = 0; d < NS; d++) begin done_at[d] = 0; busy_cnt[d] = 0; done_cnt[d] = 0; end
    start = 1;
    #1;
    for (int d = 0; d < NS; d++) if (busy[d]) busy_cnt[d]++;
    @(posedge clk);
    #1;
    start = 0;
    // scramble inputs: they must not be needed after the start cycle
    for (int i = 0; i < NT; i++) llr[i] = llr_t'($urandom);
    frozen = NT'($urandom);
    cyc = 1;
    while (cyc < LAT[0] + 3) begin
      for (int d = 0; d < NS; d++) begin
        if (done[d]) begin
          done_cnt[d]++;
          if (done_at[d] == 0) begin
            done_at[d] = cyc;
            for (int i = 0; i < NT; i++) begin
              checks++;
              if (u_hat[d][i] !== ref_u[i]) begin
                failures++;
                if (failures < 10) $display("schedule %0d bit %0d differs from the reference", d, i);
              end
            end
          end
        end
        if (busy[d]) busy_cnt[d]++;
      end
      @(posedge clk);
      #1;
      cyc++;
    end
    for (int d = 0; d < NS; d++) begin
      checks += 3;
      if (done_at[d] != LAT[d]) begin
        failures++;
        $display("schedule %0d latency %0d, expected %0d", d, done_at[d], LAT[d]);
      end
      if (busy_cnt[d] != LAT[d]) begin
        failures++;
        $display("schedule %0d busy for %0d cycles, expected %0d", d, busy_cnt[d], LAT[d]);
      end
      if (done_cnt[d] != 1) failures++;
    end
  endtask

  initial begin
    for (int i = 0; i < NT; i++) llr[i] = '0;
    frozen = '0;
    st = '{default: 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int w = 0; w < 2000; w++) one_word(w % 2);
    $display("g selections with partial sum 1/0: %0d/%0d, clipped g: %0d",
             st.psum_one, st.psum_zero, st.sat_hits);
    checks++;
    if (st.psum_one == 0 || st.sat_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
