// tb_bmu: exhaustive-by-sampling check of the branch metric unit.
// Reference: with BPSK labels x = +1 for bit 0 and -1 for bit 1, twice the
// metric of branch (u,p) must equal x_u*(ys+la) + x_p*yp + (ys+la+yp).
module tb_bmu;
  import turbo_pkg::*;
  rx_t ys, yp;
  ext_t la;
  bmvec_t g;
  bmu dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 2000; i++) begin
      int a, b, c, xu, xp, exp2;
      a = int'($urandom_range(63, 0)) - 32;
      b = int'($urandom_range(63, 0)) - 32;
      c = int'($urandom_range(63, 0)) - 32;
      ys = rx_t'(a); yp = rx_t'(b); la = ext_t'(c);
      #1;
      for (int u = 0; u < 2; u++)
        for (int p = 0; p < 2; p++) begin
          xu = u ? -1 : 1;
          xp = p ? -1 : 1;
          exp2 = xu * (a + c) + xp * b + (a + c + b);
          checks++;
          if (2 * int'(g[{1'(u), 1'(p)}]) != exp2) begin
            failures++;
            if (failures < 5) $display("ys=%0d yp=%0d la=%0d u=%0d p=%0d g=%0d", a, b, c, u, p, g[{1'(u), 1'(p)}]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
