// tb_sc_controller: checks the stage/phase/block schedule of the decoder
// controller for N = 8 and N = 16 against a depth-first walk of the SC tree
// built with an explicit stack in the testbench, the 3N/4 - 1 cycle length
// of a codeword, the last/first flags, and that a start pulse during a
// codeword is ignored.
module tb_sc_controller;
  import polar_pkg::*;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       st8, busy8, ph8, last8, first8;
  logic [3:0] stg8;
  logic [2:0] blk8;
  sc_controller #(.N(8)) dut8 (.clk, .rst_n, .start(st8), .busy(busy8), .stage(stg8),
                               .phase(ph8), .blk(blk8), .pe_act(), .op_g(), .op_p(),
                               .last(last8), .first(first8));

  logic       st16, busy16, ph16, last16, first16;
  logic [4:0] stg16;
  logic [3:0] blk16;
  sc_controller #(.N(16)) dut16 (.clk, .rst_n, .start(st16), .busy(busy16), .stage(stg16),
                                 .phase(ph16), .blk(blk16), .pe_act(), .op_g(), .op_p(),
                                 .last(last16), .first(first16));

  // plain and overlapped schedules, N = 8 and 16
  localparam int NT = 4;
  localparam int TN [NT] = '{8, 8, 16, 16};
  logic       t_busy [NT], t_act [NT], t_g [NT], t_p [NT], t_last [NT], t_first [NT], t_ph [NT];
  logic [4:0] t_stg [NT];
  logic [3:0] t_blk [NT];
  logic       t_start;

  sc_controller #(.N(8), .SCHED(SCHED_2BIT)) dt0 (.clk, .rst_n, .start(t_start), .busy(t_busy[0]),
    .stage(t_stg[0][3:0]), .phase(t_ph[0]), .blk(t_blk[0][2:0]), .pe_act(t_act[0]), .op_g(t_g[0]),
    .op_p(t_p[0]), .last(t_last[0]), .first(t_first[0]));
  sc_controller #(.N(8), .SCHED(SCHED_OVERLAP)) dt1 (.clk, .rst_n, .start(t_start), .busy(t_busy[1]),
    .stage(t_stg[1][3:0]), .phase(t_ph[1]), .blk(t_blk[1][2:0]), .pe_act(t_act[1]), .op_g(t_g[1]),
    .op_p(t_p[1]), .last(t_last[1]), .first(t_first[1]));
  sc_controller #(.N(16), .SCHED(SCHED_2BIT)) dt2 (.clk, .rst_n, .start(t_start), .busy(t_busy[2]),
    .stage(t_stg[2]), .phase(t_ph[2]), .blk(t_blk[2]), .pe_act(t_act[2]), .op_g(t_g[2]),
    .op_p(t_p[2]), .last(t_last[2]), .first(t_first[2]));
  sc_controller #(.N(16), .SCHED(SCHED_OVERLAP)) dt3 (.clk, .rst_n, .start(t_start), .busy(t_busy[3]),
    .stage(t_stg[3]), .phase(t_ph[3]), .blk(t_blk[3]), .pe_act(t_act[3]), .op_g(t_g[3]),
    .op_p(t_p[3]), .last(t_last[3]), .first(t_first[3]));
  assign t_stg[0][4] = 1'b0;
  assign t_stg[1][4] = 1'b0;
  assign t_blk[0][3] = 1'b0;
  assign t_blk[1][3] = 1'b0;

  task automatic run_tree();
    int lat [NT], pcnt [NT], acnt [NT], gcnt [NT], nextbit [NT], lastc [NT];
    for (int d = 0; d < NT; d++) begin
      lat[d] = 0; pcnt[d] = 0; acnt[d] = 0; gcnt[d] = 0; nextbit[d] = 0; lastc[d] = 0;
    end
    @(negedge clk);
    t_start = 1;
    for (int c = 0; c < 40; c++) begin
      #1;
      for (int d = 0; d < NT; d++) begin
        if (t_busy[d]) begin
          lat[d]++;
          if (t_act[d]) begin acnt[d]++; if (t_g[d]) gcnt[d]++; end
          if (t_p[d]) begin
            pcnt[d]++;
            if (int'(t_blk[d]) != nextbit[d]) begin
              failures++;
              $display("tree schedule %0d: p node at bit %0d, expected %0d", d, t_blk[d], nextbit[d]);
            end
            nextbit[d] += 2;
          end
          if (t_last[d]) lastc[d]++;
        end
      end
      @(negedge clk);
      t_start = 0;
    end
    for (int d = 0; d < NT; d++) begin
      int n = TN[d];
      int el = (d % 2 == 0) ? 3 * n / 2 - 2 : n - 1;
      checks += 5;
      if (lat[d] != el) begin failures++; $display("tree schedule %0d: %0d cycles, expected %0d", d, lat[d], el); end
      if (pcnt[d] != n / 2) failures++;
      if (acnt[d] != n - 2) begin failures++; $display("tree schedule %0d: %0d PE activations", d, acnt[d]); end
      if (gcnt[d] != n / 2 - 1) failures++;
      if (lastc[d] != 1) failures++;
    end
  endtask

  // expected schedule: entries {stage, phase, blk}
  typedef struct { int s; int p; int b; } ent_t;

  function automatic void build(input int n, ref ent_t q[$]);
    int m = $clog2(n);
    int ss[$], sb[$];
    q.delete();
    ss.push_back(1); sb.push_back(0);
    while (ss.size() > 0) begin
      int s = ss.pop_back();
      int b = sb.pop_back();
      if (s == m - 1) begin
        q.push_back('{s, 0, b});
        q.push_back('{s, 1, b});
      end else begin
        q.push_back('{s, 0, b});
        // right child visited after left child: push it first
        ss.push_back(s + 1); sb.push_back(b + (n >> s));
        ss.push_back(s + 1); sb.push_back(b);
      end
    end
  endfunction

  task automatic run(input int n, input bit extra_start);
    ent_t q[$];
    build(n, q);
    checks++;
    if (q.size() != 3 * n / 4 - 1) failures++;
    @(negedge clk);
    if (n == 8) st8 = 1; else st16 = 1;
    for (int c = 0; c < q.size(); c++) begin
      #1;
      begin
      int  gs  = (n == 8) ? int'(stg8) : int'(stg16);
      int  gp  = (n == 8) ? int'(ph8)  : int'(ph16);
      int  gb  = (n == 8) ? int'(blk8) : int'(blk16);
      bit  gbz = (n == 8) ? busy8 : busy16;
      bit  gl  = (n == 8) ? last8 : last16;
      bit  gf  = (n == 8) ? first8 : first16;
      checks++;
      if (!gbz || gs != q[c].s || gp != q[c].p || gb != q[c].b ||
          gl != (c == q.size() - 1) || gf != (c == 0)) begin
        failures++;
        if (failures < 10)
          $display("N=%0d cycle %0d got s%0d p%0d b%0d last%0d first%0d exp s%0d p%0d b%0d",
                   n, c, gs, gp, gb, gl, gf, q[c].s, q[c].p, q[c].b);
      end
      end
      @(negedge clk);
      st8 = 0; st16 = 0;
      if (extra_start && c == 1) begin
        if (n == 8) st8 = 1; else st16 = 1;   // must be ignored
      end
    end
    st8 = 0; st16 = 0;
    #1;
    checks++;
    if ((n == 8 ? busy8 : busy16) !== 1'b0) begin
      failures++;
      $display("N=%0d still busy after %0d cycles", n, q.size());
    end
  endtask

  initial begin
    st8 = 0; st16 = 0; t_start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) begin
      run(8, 0);
      run(8, 1);
      run(16, 0);
      run(16, 1);
      run_tree();
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
