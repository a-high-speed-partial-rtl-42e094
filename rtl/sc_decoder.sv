// sc_decoder: tree-based 2-bit successive cancellation polar decoder with
// pre-computation and the high speed partial-sum network.
//
// Structure (N = code length, M = log2 N):
//   * Stage s (1 <= s <= M-1) is a row of N/2^s merged PEs. Stage 1 takes
//     the channel LLRs, pairing LLR k with LLR k+N/2. Every merged PE gives
//     f and both g candidates (d+c, d-c) at once; N-2 PEs in total.
//   * Stages 1..M-2 register f and both g candidates. The input of stage s
//     is either the f register of stage s-1 (left child) or its g
//     candidates, each chosen by one partial sum bit (right child).
//   * Stage M-1 feeds one p node in the same cycle: a leaf visit is two
//     cycles, first on the f values (bits blk, blk+1), then on the g
//     candidates of stage M-1 registered in the first cycle and chosen by
//     the two partial sums just produced (bits blk+2, blk+3).
//   * The psn module keeps the partial sums in N/2 registers; g candidates
//     of stage s-1 for the block starting at blk use psum bits
//     (blk - N/2^(s-1) + k) mod N/2.
//   * sc_controller provides the stage/phase/block counters.
// Result: 3N/4 - 1 cycles per codeword (5 cycles for N = 8).
//
// The SCHED parameter selects two further schedules on the same tree, p
// node and PSN. They use unified PEs (pe: f or g per cycle, one output
// register per PE) and keep the channel LLRs in an input register:
//   SCHED_2BIT    - f, g and p node each take a cycle: 1.5N - 2 cycles (10)
//   SCHED_OVERLAP - each g runs in the cycle of the p node before it, with
//                   the partial sums that p node has just produced (taken
//                   combinationally from the PSN): N - 1 cycles (7)
//
// The tree of PEs, merged PEs, p node and PSN follow the document; the exact
// cycle schedule (which stage shares a cycle with the p node) is this
// design's reading of the stated 3N/4 - 1 latency.
//
// In the default schedule the controller outputs pe_act and op_g and the
// PSN's psum_next are not used; they serve the other two schedules.
//
// Interface and timing: llr_in and frozen are sampled in the cycle where
// start is high while idle (cycle 1); llr_in need not be held afterwards,
// frozen is stored. done pulses for one cycle after the 3N/4-1 working
// cycles, and u_hat (u_hat[0] = u_1) is valid from then until the next
// start. busy is high during the working cycles. Frozen bits decode to 0.
module sc_decoder
  import polar_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter sched_e      SCHED = SCHED_PRECOMP
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  llr_t           llr_in [N],
  input  logic [N-1:0]   frozen,     // frozen[i] = 1: u_(i+1) is frozen
  output logic [N-1:0]   u_hat,
  output logic           busy,
  output logic           done
);
  localparam int unsigned M  = $clog2(N);
  localparam int unsigned H  = N / 2;
  localparam int unsigned SW = M + 1;

  logic [SW-1:0] stage;
  logic          phase, last, first, pe_act, op_g, op_p;
  logic [H-1:0]  psum_next;
  logic [M-1:0]  blk, bit0, bit1;
  logic [H-1:0]  psum;
  logic [N-1:0]  frozen_q, fz;

  llr_t          pc, pd;
  logic          u_odd, u_even;

  sc_controller #(.N(N), .SCHED(SCHED)) u_ctrl (
    .clk, .rst_n, .start, .busy, .stage, .phase, .blk, .pe_act, .op_g, .op_p,
    .last, .first
  );

  assign fz   = first ? frozen : frozen_q;
  assign bit1 = bit0 + M'(1);
  // first bit decided by the p node this cycle
  assign bit0 = (SCHED == SCHED_PRECOMP && phase) ? blk + M'(2) : blk;

  // ---------------------------------------------------------------- stages
  if (SCHED == SCHED_PRECOMP) begin : g_pre
    // per-stage registered results (index s-1 feeds stage s)
    llr_t f_r  [M][H];
    llr_t gp_r [M][H];
    llr_t gm_r [M][H];
    // per-stage combinational PE outputs
    llr_t f_w  [M][H];
    llr_t gp_w [M][H];
    llr_t gm_w [M][H];
    logic [M-2:0] blk1;            // (blk + 1) mod N/2

    assign blk1 = blk[M-2:0] + (M-1)'(1);

    for (genvar s = 1; s <= M - 1; s++) begin : g_stage
      localparam int unsigned L = N >> (s - 1);   // LLRs into this stage
      localparam int unsigned P = L / 2;          // PEs in this stage

      llr_t in_v [L];
      llr_t f_q  [P];
      llr_t gp_q [P];
      llr_t gm_q [P];

      if (s == 1) begin : g_in_ch
        for (genvar k = 0; k < L; k++) begin : g_k
          assign in_v[k] = llr_in[k];
        end
      end else begin : g_in_prev
        // right child when the block-size bit of blk is set
        logic from_g;
        assign from_g = blk[M - s + 1];
        for (genvar k = 0; k < L; k++) begin : g_k
          logic [M-2:0] pidx;             // (blk - L + k) mod N/2
          assign pidx    = blk[M-2:0] - (M-1)'(L) + (M-1)'(k);
          assign in_v[k] = !from_g                 ? f_r[s-1][k]
                         : psum[pidx]              ? gm_r[s-1][k]
                         :                           gp_r[s-1][k];
        end
      end

      for (genvar k = 0; k < P; k++) begin : g_pe
        merged_pe u_pe (
          .llr_c (in_v[k]),
          .llr_d (in_v[k + P]),
          .f_out (f_w[s][k]),
          .gp_out(gp_w[s][k]),
          .gm_out(gm_w[s][k])
        );
      end

      // stages below M-1 keep f and both g; stage M-1 keeps only the g pair,
      // written in leaf phase 0
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < P; k++) begin
            f_q[k]  <= '0;
            gp_q[k] <= '0;
            gm_q[k] <= '0;
          end
        end else if (busy && stage == SW'(s) && !phase) begin
          for (int k = 0; k < P; k++) begin
            f_q[k]  <= f_w[s][k];
            gp_q[k] <= gp_w[s][k];
            gm_q[k] <= gm_w[s][k];
          end
        end
      end

      for (genvar k = 0; k < H; k++) begin : g_exp
        if (k < P) begin : g_used
          assign f_r[s][k]  = f_q[k];
          assign gp_r[s][k] = gp_q[k];
          assign gm_r[s][k] = gm_q[k];
        end else begin : g_pad
          assign f_r[s][k]  = '0;
          assign gp_r[s][k] = '0;
          assign gm_r[s][k] = '0;
          assign f_w[s][k]  = '0;
          assign gp_w[s][k] = '0;
          assign gm_w[s][k] = '0;
        end
      end
    end

    // index 0 is never read
    for (genvar k = 0; k < H; k++) begin : g_zero
      assign f_r[0][k]  = '0;
      assign gp_r[0][k] = '0;
      assign gm_r[0][k] = '0;
      assign f_w[0][k]  = '0;
      assign gp_w[0][k] = '0;
      assign gm_w[0][k] = '0;
    end

    always_comb begin
      if (!phase) begin
        pc = f_w[M-1][0];
        pd = f_w[M-1][1];
      end else begin
        pc = psum[blk[M-2:0]]  ? gm_r[M-1][0] : gp_r[M-1][0];
        pd = psum[blk1] ? gm_r[M-1][1] : gp_r[M-1][1];
      end
    end

  end else begin : g_tree
    // ------------------------------------------- plain / overlapped schedules
    llr_t in_q [N];
    llr_t o_r  [M][H];   // o_r[s]: registered outputs of stage s

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k < N; k++) in_q[k] <= '0;
      end else if (first) begin
        for (int k = 0; k < N; k++) in_q[k] <= llr_in[k];
      end
    end

    for (genvar s = 1; s <= M - 1; s++) begin : g_stage
      localparam int unsigned P = N >> s;       // PEs in this stage
      llr_t in_v [2*P];
      llr_t o_w  [P];
      llr_t o_q  [P];
      logic [M-2:0] gbase;             // next bit to decode after g, mod N/2
      assign gbase = blk[M-2:0] + (op_p ? (M-1)'(2) : (M-1)'(0));

      for (genvar k = 0; k < 2 * P; k++) begin : g_in
        if (s == 1) begin : g_ch
          assign in_v[k] = first ? llr_in[k] : in_q[k];
        end else begin : g_prev
          assign in_v[k] = o_r[s-1][k];
        end
      end

      for (genvar k = 0; k < P; k++) begin : g_pe
        logic [M-2:0] pidx;                      // (gbase - P + k) mod N/2
        logic         usum;
        assign pidx = gbase - (M-1)'(P) + (M-1)'(k);
        // overlapped: the p node of this same cycle supplies the bits
        assign usum = (SCHED == SCHED_OVERLAP && op_p) ? psum_next[pidx] : psum[pidx];
        pe u_pe (
          .llr_c  (in_v[k]),
          .llr_d  (in_v[k + P]),
          .u_sum  (usum),
          .ctrl_g (op_g),
          .llr_out(o_w[k])
        );
      end

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < P; k++) o_q[k] <= '0;
        end else if (pe_act && stage == SW'(s)) begin
          for (int k = 0; k < P; k++) o_q[k] <= o_w[k];
        end
      end

      for (genvar k = 0; k < H; k++) begin : g_exp
        if (k < P) begin : g_used
          assign o_r[s][k] = o_q[k];
        end else begin : g_pad
          assign o_r[s][k] = '0;
        end
      end
    end

    for (genvar k = 0; k < H; k++) begin : g_zero
      assign o_r[0][k] = '0;
    end

    assign pc = o_r[M-1][0];
    assign pd = o_r[M-1][1];
  end

  // ------------------------------------------------------------ p node
  p_node u_pnode (
    .llr_c  (pc),
    .llr_d  (pd),
    .frozen1(fz[bit0]),
    .frozen2(fz[bit1]),
    .u_odd  (u_odd),
    .u_even (u_even)
  );

  // ------------------------------------------------------------ PSN
  psn #(.N(N)) u_psn (
    .clk, .rst_n,
    .upd   (op_p),
    .idx   (bit0),
    .u_pair({u_even, u_odd}),
    .psum  (psum),
    .psum_next(psum_next)
  );

  // ------------------------------------------------------------ outputs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frozen_q <= '0;
      u_hat    <= '0;
      done     <= 1'b0;
    end else begin
      done <= busy && last;
      if (first) frozen_q <= frozen;
      if (op_p) begin
        u_hat[bit0]          <= u_odd;
        u_hat[bit1] <= u_even;
      end
    end
  end
endmodule
