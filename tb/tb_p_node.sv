// tb_p_node: exhaustive check of the p node over all canonical q-bit LLR
// pairs and all four frozen combinations, against the SC rule: first bit =
// hard decision of f, second bit = hard decision of g = d + (-1)^u1 c
// (zero-valued g resolved towards the sign of c), frozen bits 0.
module tb_p_node;
  import polar_pkg::*;
  import polar_ref_pkg::*;

  llr_t c, d;
  logic f1, f2, uo, ue;
  int   checks = 0, failures = 0;

  p_node dut (.llr_c(c), .llr_d(d), .frozen1(f1), .frozen2(f2), .u_odd(uo), .u_even(ue));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lim = (1 << (LLR_W - 1)) - 1;
    for (int ci = -lim; ci <= lim; ci++) begin
      for (int di = -lim; di <= lim; di++) begin
        for (int fz = 0; fz < 4; fz++) begin
          bit eo, ee;
          int g;
          c  = to_sm(ci);
          d  = to_sm(di);
          f1 = fz[1];
          f2 = fz[0];
          #1;
          // u1 from the f value; a zero f still carries the XOR of signs
          eo = f1 ? 1'b0 : bit'((ci < 0) ^ (di < 0));
          g  = eo ? di - ci : di + ci;
          ee = f2 ? 1'b0 : bit'(g < 0 || (g == 0 && ci < 0));
          checks++;
          if (uo !== eo || ue !== ee) begin
            failures++;
            if (failures < 10)
              $display("mismatch c=%0d d=%0d fz=%b got=%b%b exp=%b%b", ci, di, fz[1:0], uo, ue, eo, ee);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
