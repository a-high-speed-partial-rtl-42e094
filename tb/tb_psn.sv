// tb_psn: drives random decoded bit pairs into the partial-sum network for
// many codewords (N = 8 and N = 16 side by side) and compares the registered
// partial sums after every update with the running encoding u(0:i) * G_N of
// the bits given so far: positions 0..N/2-1 during the first half of a
// codeword, N/2..N-1 during the second half.
module tb_psn;
  import polar_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- N = 8
  logic       upd8;
  logic [2:0] idx8;
  logic [1:0] up8;
  logic [3:0] ps8;
  psn #(.N(8)) dut8 (.clk, .rst_n, .upd(upd8), .idx(idx8), .u_pair(up8), .psum(ps8));

  // ---------------------------------------------------------------- N = 16
  logic       upd16;
  logic [3:0] idx16;
  logic [1:0] up16;
  logic [7:0] ps16;
  psn #(.N(16)) dut16 (.clk, .rst_n, .upd(upd16), .idx(idx16), .u_pair(up16), .psum(ps16));

  task automatic run_word(input int n);
    bvec_t u, x;
    for (int i = 0; i < NMAX; i++) u[i] = 0;
    for (int b = 0; b < n; b += 2) begin
      u[b]   = bit'($urandom_range(1));
      u[b+1] = bit'($urandom_range(1));
      @(negedge clk);
      if (n == 8) begin
        upd8 = 1; idx8 = 3'(b); up8 = {u[b+1], u[b]};
      end else begin
        upd16 = 1; idx16 = 4'(b); up16 = {u[b+1], u[b]};
      end
      @(negedge clk);
      upd8 = 0; upd16 = 0;
      x = encode(u, n);
      for (int j = 0; j < n / 2; j++) begin
        bit exp_b = (b < n / 2) ? x[j] : x[j + n/2];
        bit got_b = (n == 8) ? ps8[j] : ps16[j];
        checks++;
        if (got_b !== exp_b) begin
          failures++;
          if (failures < 10) $display("N=%0d b=%0d j=%0d got=%b exp=%b", n, b, j, got_b, exp_b);
        end
      end
      // idle cycles must not change anything
      if ($urandom_range(3) == 0) begin
        logic [7:0] keep = (n == 8) ? {4'b0, ps8} : ps16;
        @(negedge clk);
        checks++;
        if (((n == 8) ? {4'b0, ps8} : ps16) !== keep) failures++;
      end
    end
  endtask

  initial begin
    upd8 = 0; idx8 = 0; up8 = 0;
    upd16 = 0; idx16 = 0; up16 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 200; w++) begin
      run_word(8);
      run_word(16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
