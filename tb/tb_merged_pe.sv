// tb_merged_pe: exhaustive check of the merged PE over every pair of q-bit
// sign-magnitude inputs (negative zero included). f must be the min-sum
// value with a non-negative zero, gp = sat(d + c), gm = sat(d - c).
module tb_merged_pe;
  import polar_pkg::*;
  import polar_ref_pkg::*;

  llr_t c, d, f, gp, gm;
  int   checks = 0, failures = 0;

  merged_pe dut (.llr_c(c), .llr_d(d), .f_out(f), .gp_out(gp), .gm_out(gm));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << LLR_W); a++) begin
      for (int b = 0; b < (1 << LLR_W); b++) begin
        int ci, di, ef, egp, egm;
        c = llr_t'(a);
        d = llr_t'(b);
        #1;
        ci  = to_int(c);
        di  = to_int(d);
        ef  = fmin(ci, di);
        egp = sat(di + ci, LLR_W);
        egm = sat(di - ci, LLR_W);
        checks += 3;
        if (to_int(f) != ef || (f.sign && f.mag == 0)) begin
          failures++;
          if (failures < 10) $display("f mismatch c=%0d d=%0d got=%0d exp=%0d", ci, di, to_int(f), ef);
        end
        if (to_int(gp) != egp || (gp.sign && gp.mag == 0)) begin
          failures++;
          if (failures < 10) $display("gp mismatch c=%0d d=%0d got=%0d exp=%0d", ci, di, to_int(gp), egp);
        end
        if (to_int(gm) != egm || (gm.sign && gm.mag == 0)) begin
          failures++;
          if (failures < 10) $display("gm mismatch c=%0d d=%0d got=%0d exp=%0d", ci, di, to_int(gm), egm);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
