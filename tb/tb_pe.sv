// tb_pe: exhaustive check of the unified f/g processing element over every
// pair of q-bit inputs and all four (ctrl_g, u_sum) settings: f when
// ctrl_g = 0 (u_sum ignored), sat(d + c) or sat(d - c) when ctrl_g = 1.
module tb_pe;
  import polar_pkg::*;
  import polar_ref_pkg::*;

  llr_t c, d, o;
  logic us, cg;
  int   checks = 0, failures = 0;

  pe dut (.llr_c(c), .llr_d(d), .u_sum(us), .ctrl_g(cg), .llr_out(o));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << LLR_W); a++) begin
      for (int b = 0; b < (1 << LLR_W); b++) begin
        for (int m = 0; m < 4; m++) begin
          int ci, di, e;
          c  = llr_t'(a);
          d  = llr_t'(b);
          cg = m[1];
          us = m[0];
          #1;
          ci = to_int(c);
          di = to_int(d);
          if (!cg)     e = fmin(ci, di);
          else if (us) e = sat(di - ci, LLR_W);
          else         e = sat(di + ci, LLR_W);
          checks++;
          if (to_int(o) != e || (o.sign && o.mag == 0)) begin
            failures++;
            if (failures < 10)
              $display("c=%0d d=%0d ctrl_g=%b u_sum=%b got=%0d exp=%0d", ci, di, cg, us, to_int(o), e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
