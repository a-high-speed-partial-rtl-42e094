// tb_polar_encoder: checks the worked (8,4) example (message 1111, frozen
// u1 u2 u3 u5 -> u = 11101000, x = 10010110 with u8/x8 written leftmost) and
// random messages and frozen masks for N = 8 and N = 16 against x = u * G_N
// computed from the definition of G_N.
module tb_polar_encoder;
  import polar_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0]  m8;
  logic [7:0]  fz8, u8, x8;
  polar_encoder #(.N(8), .K(4)) dut8 (.msg(m8), .frozen(fz8), .u(u8), .x(x8));

  logic [7:0]  m16;
  logic [15:0] fz16, u16, x16;
  polar_encoder #(.N(16), .K(8)) dut16 (.msg(m16), .frozen(fz16), .u(u16), .x(x16));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int n, input int k, input logic [15:0] msg,
                       input logic [15:0] fz, input logic [15:0] gu, input logic [15:0] gx);
    bvec_t u, x;
    int cnt = 0;
    for (int i = 0; i < NMAX; i++) u[i] = 0;
    for (int i = 0; i < n; i++)
      if (!fz[i]) begin
        if (cnt < k) u[i] = msg[cnt];
        cnt++;
      end
    x = encode(u, n);
    for (int i = 0; i < n; i++) begin
      checks += 2;
      if (gu[i] !== u[i]) failures++;
      if (gx[i] !== x[i]) failures++;
    end
  endtask

  initial begin
    // worked example from the (8,4) code
    m8 = 4'b1111; fz8 = 8'b0001_0111;
    #1;
    checks += 2;
    if (u8 !== 8'b1110_1000) begin failures++; $display("example u=%b", u8); end
    if (x8 !== 8'b1001_0110) begin failures++; $display("example x=%b", x8); end
    for (int t = 0; t < 2000; t++) begin
      m8   = 4'($urandom);
      fz8  = 8'($urandom);
      m16  = 8'($urandom);
      fz16 = 16'($urandom);
      #1;
      check(8, 4, 16'(m8), 16'(fz8), 16'(u8), 16'(x8));
      check(16, 8, 16'(m16), fz16, u16, x16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
