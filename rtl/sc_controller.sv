// sc_controller: schedule counters of the tree-based 2-bit SC decoder.
//
// The decoder walks the SC tree depth first, one step per clock cycle. The
// state is a stage counter, an operation (f, g or p node; or a leaf phase
// bit) and a block counter blk holding the next bit to decode. After the p
// node has decided bits blk and blk+1 the next g node to run is at stage
// M - tz(blk + 2), tz = number of trailing zero bits, M = log2 N.
//
// SCHED_PRECOMP (default): stages 1..M-2 run once per visit with merged PEs
//   (f and both g candidates); stage M-1 shares the cycle with the p node,
//   so a leaf visit is two cycles: phase 0 on f (bits blk, blk+1) and phase
//   1 on g (bits blk+2, blk+3). After a leaf blk advances by 4 and the next
//   stage is M + 1 - tz(blk). 3N/4 - 1 cycles.
// SCHED_2BIT: f at stage s, f at s+1, ..., p node, g at stage M-tz(blk+2),
//   ... each in its own cycle. 1.5N - 2 cycles.
// SCHED_OVERLAP: as SCHED_2BIT, but the g that follows a p node runs in the
//   p node's cycle (op_p and pe_act together, stage = that g's stage).
//   N - 1 cycles.
// The counters are this design's own; the document says the stages are
// enabled by counters and gives the resulting latencies.
//
// Interface: a start pulse while idle begins a codeword in the same cycle.
// busy is high for all working cycles; first marks the start cycle and last
// the final one. stage / phase / blk describe the current cycle; in the
// tree schedules pe_act says the PEs of `stage` work (op_g: as g nodes),
// op_p that the p node decides bits blk and blk+1. A start pulse while busy
// is ignored.
module sc_controller
  import polar_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter sched_e      SCHED = SCHED_PRECOMP
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  output logic                         busy,
  output logic [$clog2(N):0]           stage,   // 1 .. M-1
  output logic                         phase,   // leaf phase (SCHED_PRECOMP)
  output logic [$clog2(N)-1:0]         blk,     // block start / next bit
  output logic                         pe_act,  // tree schedules: PEs of `stage` work
  output logic                         op_g,    // tree schedules: ... as g nodes
  output logic                         op_p,    // tree schedules: p node works
  output logic                         last,
  output logic                         first    // start accepted this cycle
);
  localparam int unsigned M  = $clog2(N);
  localparam int unsigned SW = M + 1;

  typedef enum logic {IDLE, RUN} state_e;
  typedef enum logic [1:0] {OP_F, OP_G, OP_P} op_e;

  state_e         state_q;
  logic [SW-1:0]  stage_q, cur_stage, gst;
  logic           phase_q;
  op_e            op_q, cur_op;
  logic [M-1:0]   blk_q;
  logic           run;
  logic [M-1:0]   blk_nx4, blk_nx2;

  function automatic int unsigned tz(input logic [M-1:0] b);
    int unsigned t;
    t = 0;
    for (int unsigned k = 0; k < M; k++)
      if (b[k] == 1'b0 && t == k) t = k + 1;
    return t;
  endfunction

  assign run       = (state_q == RUN) || start;
  assign busy      = run;
  assign first     = start && (state_q == IDLE);
  assign cur_stage = (state_q == RUN) ? stage_q : SW'(1);
  assign cur_op    = (state_q == RUN) ? op_q    : OP_F;
  assign phase     = (state_q == RUN) ? phase_q : 1'b0;
  assign blk       = (state_q == RUN) ? blk_q   : '0;
  assign blk_nx4   = blk + M'(4);
  assign blk_nx2   = blk + M'(2);
  assign gst       = SW'(M - tz(blk_nx2));

  always_comb begin
    if (SCHED == SCHED_PRECOMP) begin
      stage  = cur_stage;
      pe_act = run;
      op_g   = 1'b0;
      op_p   = run && (cur_stage == SW'(M - 1));
      last   = run && (cur_stage == SW'(M - 1)) && phase && (blk_nx4 == '0);
    end else begin
      op_p   = run && (cur_op == OP_P);
      last   = op_p && (blk_nx2 == '0);
      if (cur_op == OP_P) begin
        stage  = gst;
        pe_act = (SCHED == SCHED_OVERLAP) && run && !last;
        op_g   = 1'b1;
      end else begin
        stage  = cur_stage;
        pe_act = run;
        op_g   = (cur_op == OP_G);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      stage_q <= SW'(1);
      phase_q <= 1'b0;
      op_q    <= OP_F;
      blk_q   <= '0;
    end else if (run) begin
      state_q <= last ? IDLE : RUN;
      phase_q <= 1'b0;
      op_q    <= OP_F;
      stage_q <= SW'(1);
      blk_q   <= blk;
      if (SCHED == SCHED_PRECOMP) begin
        if (cur_stage != SW'(M - 1)) begin
          stage_q <= cur_stage + SW'(1);
        end else if (!phase) begin
          stage_q <= cur_stage;
          phase_q <= 1'b1;
        end else begin
          stage_q <= last ? SW'(1) : SW'(M + 1 - tz(blk_nx4));
          blk_q   <= blk_nx4;
        end
      end else if (cur_op != OP_P) begin
        // f or g at cur_stage: descend to the left child, or to the p node
        if (cur_stage != SW'(M - 1)) stage_q <= cur_stage + SW'(1);
        else                         op_q    <= OP_P;
      end else begin
        blk_q <= blk_nx2;
        if (!last) begin
          if (SCHED == SCHED_2BIT) begin
            op_q    <= OP_G;
            stage_q <= gst;
          end else if (gst != SW'(M - 1)) begin
            stage_q <= gst + SW'(1);          // g already done in this cycle
          end else begin
            op_q    <= OP_P;
          end
        end
      end
    end
  end
endmodule
