// tb_acs_unit: checks the 8-state ACS unit in both directions against a
// reference built from the encoder equations of the 3GPP constituent code
// (next state and parity derived in this bench), including normalisation
// to a maximum of 0 and saturation at -256.
module tb_acs_unit;
  import turbo_pkg::*;
  logic dir;
  pmvec_t pm_in, pm_out;
  bmvec_t g;
  acs_unit dut (.*);
  int checks = 0, failures = 0;

  // encoder: registers (d1,d2,d3), state number = 4*d1 + 2*d2 + d3
  function automatic void enc(int s, int u, output int ns, output int p);
    int d1, d2, d3, a;
    d1 = (s >> 2) & 1; d2 = (s >> 1) & 1; d3 = s & 1;
    a = u ^ d2 ^ d3;          // feedback 1 + D^2 + D^3
    p = a ^ d1 ^ d3;          // forward 1 + D + D^3
    ns = 4 * a + 2 * d1 + d2;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int best [8];
    int ns, p, v, mx, e;
    for (int i = 0; i < 3000; i++) begin
      dir = 1'($urandom);
      for (int s = 0; s < 8; s++) pm_in[s] = pm_t'(-int'($urandom_range((i % 3 == 0) ? 256 : 40, 0)));
      for (int k = 0; k < 4; k++) g[k] = bm_t'(int'($urandom_range(190, 0)) - 96);
      #1;
      for (int s = 0; s < 8; s++) best[s] = -99999;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          enc(s, u, ns, p);
          if (!dir) begin
            v = pm_in[s] + g[2 * u + p];
            if (v > best[ns]) best[ns] = v;
          end else begin
            v = pm_in[ns] + g[2 * u + p];
            if (v > best[s]) best[s] = v;
          end
        end
      mx = best[0];
      for (int s = 1; s < 8; s++) if (best[s] > mx) mx = best[s];
      for (int s = 0; s < 8; s++) begin
        e = best[s] - mx;
        if (e < -256) e = -256;
        checks++;
        if (int'(pm_out[s]) != e) begin
          failures++;
          if (failures < 5) $display("dir=%0d state %0d: got %0d expected %0d", dir, s, pm_out[s], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
