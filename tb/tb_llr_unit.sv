// tb_llr_unit: checks LLR, extrinsic value and hard decision against a
// reference computed in this bench from the encoder equations:
// LLR = max_{u=0}(alpha+gamma+beta) - max_{u=1}(...), saturated to 10 bits;
// extrinsic = floor(0.75*(LLR - ys - la)) saturated to 6 bits; hard = LLR < 0.
module tb_llr_unit;
  import turbo_pkg::*;
  pmvec_t alpha, beta;
  bmvec_t g;
  rx_t ys;
  ext_t la;
  llr_t llr;
  ext_t ext;
  logic hard;
  llr_unit dut (.*);
  int checks = 0, failures = 0;

  function automatic void enc(int s, int u, output int ns, output int p);
    int d1, d2, d3, a;
    d1 = (s >> 2) & 1; d2 = (s >> 1) & 1; d3 = s & 1;
    a = u ^ d2 ^ d3;
    p = a ^ d1 ^ d3;
    ns = 4 * a + 2 * d1 + d2;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int m [2];
    int ns, p, v, l, e, a, c;
    for (int i = 0; i < 3000; i++) begin
      for (int s = 0; s < 8; s++) begin
        alpha[s] = pm_t'(-int'($urandom_range(256, 0)));
        beta[s]  = pm_t'(-int'($urandom_range(256, 0)));
      end
      for (int k = 0; k < 4; k++) g[k] = bm_t'(int'($urandom_range(190, 0)) - 96);
      a = int'($urandom_range(63, 0)) - 32;
      c = int'($urandom_range(63, 0)) - 32;
      ys = rx_t'(a); la = ext_t'(c);
      #1;
      m[0] = -99999; m[1] = -99999;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          enc(s, u, ns, p);
          v = alpha[s] + g[2 * u + p] + beta[ns];
          if (v > m[u]) m[u] = v;
        end
      l = m[0] - m[1];
      if (l > 511) l = 511;
      if (l < -512) l = -512;
      e = l - a - c;
      e = (3 * e) >>> 2;
      if (e > 31) e = 31;
      if (e < -32) e = -32;
      checks++;
      if (int'(llr) != l || int'(ext) != e || hard != (l < 0)) begin
        failures++;
        if (failures < 5) $display("llr %0d/%0d ext %0d/%0d hard %0d", llr, l, ext, e, hard);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
