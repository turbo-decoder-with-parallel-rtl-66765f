// tb_siso_decoder: checks the sliding-window SISO decoder bit-exactly against
// a reference Max-Log-MAP model written in this bench (its own trellis
// tables, branch metrics, normalisation, LLR and 0.75 extrinsic scaling, and
// its own 16-symbol window schedule: zero-started dummy backward recursions,
// beta_init for the last window's dummy recursion, beta_d_in for the last
// window's real recursion).
// Random soft inputs and random initial metrics are applied for lengths from
// 1 to 256 (one to sixteen windows, so the 64-entry buffers wrap) and both
// half-iteration types; the first input comes after a random delay, the rest
// back to back. Checked per output: the extrinsic value, the hard decision,
// the LLR and the returned tag, in the window order (window 0 first,
// descending inside a window); per pass: alpha_end, beta_start, beta_d_out
// and that done is seen 16*(K+3)-1 clock edges after the edge that samples
// the first input (a pass of 16*(K+3) cycles).
module tb_siso_decoder;
  import turbo_pkg::*;

  localparam int unsigned MAXL = 256;
  localparam int unsigned TAGW = 8;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // asynchronous reset edge before the first clock
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic start = 0, half = 0, in_valid = 0;
  logic [$clog2(MAXL+1)-1:0] len;
  pmvec_t alpha_init, beta_init, beta_d_in, beta_d_out;
  rx_t in_sys, in_par;
  ext_t in_la;
  logic [TAGW-1:0] in_tag;
  logic out_valid, out_hard, done, busy;
  ext_t out_ext;
  llr_t out_llr;
  logic [TAGW-1:0] out_tag;
  pmvec_t alpha_end [2];
  pmvec_t beta_start [2];

  siso_decoder #(.MAX_LEN(MAXL), .TAGW(TAGW)) dut (.*);

  int checks = 0, failures = 0;

  // reference model ------------------------------------------------------
  int ys [MAXL], yp [MAXL], la [MAXL];
  int A [MAXL+1][8];
  int B [MAXL+1][8];
  int BD [MAXL+1][8];
  int r_ext [MAXL], r_llr [MAXL], r_hard [MAXL];
  int order [MAXL];
  int bd0 [8];
  int b0 [8];

  function automatic int nxt(int s, int u);
    int s1, s2, s3, a;
    s1 = (s >> 2) & 1; s2 = (s >> 1) & 1; s3 = s & 1;
    a = u ^ s2 ^ s3;
    return (a << 2) | (s1 << 1) | s2;
  endfunction
  function automatic int par(int s, int u);
    int s1, s2, s3, a;
    s1 = (s >> 2) & 1; s2 = (s >> 1) & 1; s3 = s & 1;
    a = u ^ s2 ^ s3;
    return a ^ s1 ^ s3;
  endfunction
  function automatic int gam(int t, int u, int p);
    return (u == 0 ? ys[t] + la[t] : 0) + (p == 0 ? yp[t] : 0);
  endfunction
  function automatic int sat(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  task automatic bstep(int t, input int bn [8], output int bo [8]);
    int c [8];
    int mx, v;
    for (int s = 0; s < 8; s++) begin
      c[s] = -100000;
      for (int u = 0; u < 2; u++) begin
        v = bn[nxt(s, u)] + gam(t, u, par(s, u));
        if (v > c[s]) c[s] = v;
      end
    end
    mx = c[0];
    for (int s = 1; s < 8; s++) if (c[s] > mx) mx = c[s];
    for (int s = 0; s < 8; s++) bo[s] = sat(c[s] - mx, -256, 255);
  endtask

  task automatic ref_model(int n, pmvec_t ai, pmvec_t bi, pmvec_t bd);
    int c [8];
    int mx, m0, m1, v, l, e, nw, no, lo, hi;
    for (int s = 0; s < 8; s++) A[0][s] = ai[s];
    for (int t = 0; t < n; t++) begin
      for (int s = 0; s < 8; s++) c[s] = -100000;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          v = A[t][s] + gam(t, u, par(s, u));
          if (v > c[nxt(s, u)]) c[nxt(s, u)] = v;
        end
      mx = c[0];
      for (int s = 1; s < 8; s++) if (c[s] > mx) mx = c[s];
      for (int s = 0; s < 8; s++) A[t+1][s] = sat(c[s] - mx, -256, 255);
    end
    nw = (n + 15) / 16;
    no = 0;
    for (int k = 0; k < nw; k++) begin
      lo = 16 * k;
      hi = (k == nw - 1) ? n - 1 : 16 * k + 15;
      // dummy recursion over window k
      for (int s = 0; s < 8; s++) BD[hi+1][s] = (k == nw - 1) ? int'(bi[s]) : 0;
      for (int t = hi; t >= lo; t--) bstep(t, BD[t+1], BD[t]);
      if (k == 0) for (int s = 0; s < 8; s++) bd0[s] = BD[0][s];
    end
    for (int k = 0; k < nw; k++) begin
      lo = 16 * k;
      hi = (k == nw - 1) ? n - 1 : 16 * k + 15;
      for (int s = 0; s < 8; s++) B[hi+1][s] = (k == nw - 1) ? int'(bd[s]) : BD[hi+1][s];
      for (int t = hi; t >= lo; t--) begin
        m0 = -100000; m1 = -100000;
        for (int s = 0; s < 8; s++)
          for (int u = 0; u < 2; u++) begin
            v = A[t][s] + gam(t, u, par(s, u)) + B[t+1][nxt(s, u)];
            if (u == 0 && v > m0) m0 = v;
            if (u == 1 && v > m1) m1 = v;
          end
        l = sat(m0 - m1, -512, 511);
        e = l - ys[t] - la[t];
        e = (e * 3) >>> 2;
        r_llr[t] = l;
        r_ext[t] = sat(e, -32, 31);
        r_hard[t] = (l < 0);
        order[no++] = t;
        bstep(t, B[t+1], B[t]);
      end
    end
    for (int s = 0; s < 8; s++) b0[s] = B[0][s];
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_pass(int n, bit h, int amp);
    int t0, got, t, lat;
    for (int i = 0; i < n; i++) begin
      ys[i] = $urandom_range(2 * amp, 0) - amp;
      if (ys[i] > 31) ys[i] = 31;
      if (ys[i] < -32) ys[i] = -32;
      yp[i] = sat($urandom_range(63, 0) - 32, -32, 31);
      la[i] = sat($urandom_range(63, 0) - 32, -32, 31);
    end
    for (int s = 0; s < 8; s++) begin
      alpha_init[s] = pm_t'(-int'($urandom_range(256, 0)));
      beta_init[s]  = pm_t'(-int'($urandom_range(256, 0)));
      beta_d_in[s]  = pm_t'(-int'($urandom_range(256, 0)));
    end
    ref_model(n, alpha_init, beta_init, beta_d_in);
    @(negedge clk);
    len = ($clog2(MAXL+1))'(n); half = h; start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    // the first input after a random delay, then back to back; outputs
    // are collected while feeding
    repeat ($urandom_range(3, 0)) @(negedge clk);
    got = 0;
    t0 = cyc + 1;            // posedge that samples the first input
    for (int i = 0; !done; i++) begin
      in_valid = (i < n);
      if (i < n) begin
        in_sys = rx_t'(ys[i]); in_par = rx_t'(yp[i]); in_la = ext_t'(la[i]);
        in_tag = TAGW'(i);
      end else begin
        in_sys = rx_t'($urandom); in_par = rx_t'($urandom); in_la = ext_t'($urandom);
        in_tag = TAGW'($urandom);
      end
      @(posedge clk);
      #1;
      if (out_valid) begin
        checks++;
        t = (got < n) ? order[got] : 0;
        if (got >= n || out_ext !== ext_t'(r_ext[t]) || out_hard !== r_hard[t][0] ||
            out_llr !== llr_t'(r_llr[t]) || out_tag !== TAGW'(t)) begin
          failures++;
          if (failures < 10)
            $display("n=%0d t=%0d: ext %0d/%0d llr %0d/%0d hard %0d/%0d tag %0d", n, t, out_ext, r_ext[t],
                     out_llr, r_llr[t], out_hard, r_hard[t], out_tag);
        end
        got++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    lat = cyc - t0;   // done seen after posedge number cyc
    checks++;
    if (got != n) begin failures++; $display("got %0d outputs, expected %0d", got, n); end
    checks++;
    if (lat != 16 * ((n + 15) / 16 + 3) - 1) begin
      failures++;
      $display("pass took %0d cycles, expected %0d", lat, 16 * ((n + 15) / 16 + 3) - 1);
    end
    checks++;
    for (int s = 0; s < 8; s++)
      if (alpha_end[h][s] !== pm_t'(A[n][s]) || beta_start[h][s] !== pm_t'(b0[s]) ||
          beta_d_out[s] !== pm_t'(bd0[s])) begin
        failures++;
        $display("boundary metric mismatch at state %0d", s);
        break;
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_pass(1, 0, 10);
    run_pass(5, 1, 10);
    run_pass(16, 0, 40);
    run_pass(17, 1, 30);
    run_pass(64, 1, 20);
    run_pass(37, 0, 60);
    run_pass(200, 1, 50);
    run_pass(256, 0, 70);
    run_pass(33, 1, 25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
