// tb_parallel_turbo_top: end-to-end test of the whole design at its default
// size (no parameter overrides): the LTE decoder up to N = 6144 with 8
// iterations, and the IBP memory/interconnection system at 32 sub-blocks of
// 128 symbols.
//
// LTE part: for each case the bench draws random bits, encodes them with its
// own model of the 3GPP rate-1/3 turbo encoder (two 8-state RSC encoders,
// QPP interleaver c'(t) = c(F(t)), no tail bits), adds pseudo-Gaussian noise,
// quantises to 6-bit soft values and runs the decoder. Checks: every decoded
// bit is right, the noisy systematic values alone contain errors, each
// half-iteration takes 16*ceil(M/16) + 56 cycles, address generator initialisation ends
// within 16 cycles.
// IBP part: random blocks of 4096 and 512 symbols are loaded and read back in
// interleaved and natural order; every word at every decoder port is compared
// with a model built from the double-prime formula and the 32-entry sequence.
// Mechanisms counted (a failure if one never happens): each LTE parallel mode
// P_S = 1,2,4,8, rotations in the LTE read and write networks, use of the
// alpha', beta' and beta'_d boundary metrics (beta'_d compared with the
// neighbouring decoder's output), IBP passes with butterfly stages
// switched, IBP passes with the high control bits forced to zero.
module tb_parallel_turbo_top;
  import turbo_pkg::*;

  localparam int unsigned N_MAX = 6144;
  localparam int unsigned NW = $clog2(N_MAX + 1);

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // asynchronous reset edge before the first clock
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic lte_start = 1'b0;
  logic [NW-1:0] lte_cfg_n, lte_cfg_f1, lte_cfg_f2;
  logic [3:0] lte_cfg_iter;
  logic [1:0] lte_cfg_ps_log2;
  logic lte_in_valid = 1'b0, lte_in_ready;
  rx_t lte_in_sys, lte_in_p1, lte_in_p2;
  logic lte_out_valid, lte_out_bit, lte_out_last, lte_busy, lte_done;

  // IBP side
  localparam int PS = 32, M = 128, PT = 2;
  logic [2:0] ibp_nsb_log2 = 0;
  logic ibp_ld_valid = 0, ibp_start = 0, ibp_interleaved = 0;
  logic [PT-1:0][5:0] ibp_ld_data;
  logic ibp_busy, ibp_out_valid, ibp_out_last;
  logic [PS-1:0][PT-1:0][5:0] ibp_out_data;

  parallel_turbo_top dut (.*);

  int checks = 0, failures = 0;
  int n_mode [4];
  int n_rot_rd = 0, n_rot_wr = 0, n_alpha_nb = 0, n_beta_nb = 0, n_betad_nb = 0, n_sat = 0;
  int raw_err_total = 0;

  bit   u   [N_MAX];
  bit   ui  [N_MAX];
  bit   p1b [N_MAX];
  bit   p2b [N_MAX];
  rx_t  ys [N_MAX], yp1 [N_MAX], yp2 [N_MAX];
  bit   dec [N_MAX];

  function automatic int qpp(int t, int n, int f1, int f2);
    longint v;
    v = (longint'(f1) * t + longint'(f2) * t * t) % n;
    return int'(v);
  endfunction

  // 3GPP constituent encoder: feedback 1+D^2+D^3, forward 1+D+D^3
  task automatic rsc(input bit in [N_MAX], input int n, output bit par [N_MAX]);
    bit d1, d2, d3, a;
    d1 = 0; d2 = 0; d3 = 0;
    for (int t = 0; t < n; t++) begin
      a = in[t] ^ d2 ^ d3;
      par[t] = a ^ d1 ^ d3;
      d3 = d2; d2 = d1; d1 = a;
    end
  endtask

  function automatic rx_t chan(bit b, int noise);
    int v;
    v = (b ? -8 : 8);
    for (int i = 0; i < 4; i++) v += int'($urandom_range(2 * noise, 0)) - noise;
    if (v > 31) v = 31;
    if (v < -32) v = -32;
    return rx_t'(v);
  endfunction

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("IBP: cycles with butterfly stages switched %0d, passes with masked control %0d", n_bfly, n_masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  always @(posedge clk) begin
    if (dut.u_lte.rd_v && ({dut.u_lte.sa4, dut.u_lte.sa2, dut.u_lte.sa1} != '0)) n_rot_rd++;
    if ((|dut.u_lte.w_v) && ({dut.u_lte.sw4, dut.u_lte.sw2, dut.u_lte.sw1} != '0)) n_rot_wr++;
    if (dut.u_lte.siso_start && dut.u_lte.it != 0) begin
      if (dut.u_lte.psl_q != 0) n_alpha_nb++;
      if (dut.u_lte.psl_q != 0) n_beta_nb++;
    end
    // beta'_d: decoder 0 starts its last window's backward recursion from
    // the metrics handed over by decoder s in the same half-iteration
    if (dut.u_lte.psl_q != 0 && dut.u_lte.g_siso[0].u_siso.vb && dut.u_lte.g_siso[0].u_siso.b_top &&
        dut.u_lte.g_siso[0].u_siso.kb == dut.u_lte.g_siso[0].u_siso.lastw) begin
      n_betad_nb++;
      for (int q = 0; q < 8; q++)
        if (dut.u_lte.bd_in[0][q] !== dut.u_lte.bd_out[8 >> dut.u_lte.psl_q][q]) begin
          failures++;
          $display("beta'_d hand-over to decoder 0 does not carry decoder %0d's metrics", 8 >> dut.u_lte.psl_q);
          break;
        end
    end
    for (int k = 0; k < 8; k++)
      if (dut.u_lte.s_out_valid[k] && (dut.u_lte.s_ext[k] == 31 || dut.u_lte.s_ext[k] == -32)) n_sat++;
  end

  // timing monitors
  int t_init_start, t_hw_start;
  int half_cycles [$];
  int init_cycles [$];
  always @(posedge clk) begin
    if (dut.u_lte.gen_init) t_init_start = cyc;
    if (dut.u_lte.siso_start) init_cycles.push_back(cyc - t_init_start);
    if (dut.u_lte.gen_init) t_hw_start = cyc;
    if (dut.u_lte.s_done[0]) half_cycles.push_back(cyc - t_hw_start + 1);
  end

  task automatic run_case(int n, int f1, int f2, int iters, int psl, int noise);
    int raw_err, bit_err, idx, m;
    for (int t = 0; t < n; t++) u[t] = 1'($urandom);
    for (int t = 0; t < n; t++) ui[t] = u[qpp(t, n, f1, f2)];
    rsc(u, n, p1b);
    rsc(ui, n, p2b);
    raw_err = 0;
    for (int t = 0; t < n; t++) begin
      ys[t]  = chan(u[t], noise);
      yp1[t] = chan(p1b[t], noise);
      yp2[t] = chan(p2b[t], noise);
      if ((ys[t] < 0) != u[t]) raw_err++;
    end
    raw_err_total += raw_err;
    half_cycles.delete();
    init_cycles.delete();

    @(negedge clk);
    lte_cfg_n = NW'(n); lte_cfg_f1 = NW'(f1); lte_cfg_f2 = NW'(f2);
    lte_cfg_iter = 4'(iters); lte_cfg_ps_log2 = 2'(psl);
    lte_start = 1'b1;
    @(negedge clk);
    lte_start = 1'b0;
    for (int t = 0; t < n; t++) begin
      lte_in_valid = 1'b1; lte_in_sys = ys[t]; lte_in_p1 = yp1[t]; lte_in_p2 = yp2[t];
      @(posedge clk);
      while (!lte_in_ready) @(posedge clk);
      @(negedge clk);
    end
    lte_in_valid = 1'b0;
    idx = 0;
    while (1) begin
      @(posedge clk);
      if (lte_out_valid) begin
        dec[idx] = lte_out_bit;
        idx++;
        if (lte_out_last) break;
      end
    end
    @(posedge clk);
    checks++;
    if (idx != n) begin
      failures++;
      $display("N=%0d: %0d decisions received", n, idx);
    end
    bit_err = 0;
    for (int t = 0; t < n; t++) if (dec[t] != u[t]) bit_err++;
    checks++;
    if (bit_err != 0) begin
      failures++;
      $display("N=%0d P=%0d: %0d bit errors after decoding (raw %0d)", n, 1 << psl, bit_err, raw_err);
    end
    m = n >> psl;
    checks++;
    if (half_cycles.size() != 2 * iters) begin
      failures++;
      $display("N=%0d: %0d half-iterations seen, expected %0d", n, half_cycles.size(), 2 * iters);
    end
    foreach (half_cycles[i]) begin
      checks++;
      if (half_cycles[i] != 16 * ((m + 15) / 16) + 56) begin
        failures++;
        $display("N=%0d: half-iteration %0d took %0d cycles, expected %0d", n, i, half_cycles[i], 16 * ((m + 15) / 16) + 56);
      end
    end
    foreach (init_cycles[i]) begin
      checks++;
      if (init_cycles[i] > 16) begin
        failures++;
        $display("initialisation took %0d cycles", init_cycles[i]);
      end
    end
    n_mode[psl]++;
    $display("N=%0d f1=%0d f2=%0d I=%0d P_S=%0d: raw errors %0d, decoded errors %0d, half-iteration %0d cycles",
             n, f1, f2, iters, 1 << psl, raw_err, bit_err, half_cycles.size() ? half_cycles[0] : 0);
  endtask

  // ---------------------------------------------------------------- IBP part
  int n_bfly = 0, n_masked = 0;
  logic [5:0] iblk [PS * M];
  int seq [32] = '{8, 19, 12, 18, 17, 14, 29, 5, 10, 21, 6, 23, 3, 26, 20, 22,
                   30, 4, 25, 15, 0, 2, 11, 9, 28, 24, 31, 27, 1, 13, 16, 7};

  always @(posedge clk)
    if (dut.u_ibp.step_v && dut.u_ibp.ctrl_q != 0) n_bfly++;

  function automatic int pi_ref(int y);
    if (y % 2 == 1) return 2 * (((y / 2) * 15) % (M / 2)) + 1;
    else            return 2 * (((y / 2) * 15 + 23) % (M / 2));
  endfunction

  task automatic ibp_case(int nsb);
    int t, sb, y, errs;
    @(negedge clk);
    ibp_nsb_log2 = 3'(nsb);
    for (int i = 0; i < (M << nsb); i++) iblk[i] = 6'($urandom);
    for (int w = 0; w < (M << nsb) / PT; w++) begin
      ibp_ld_valid = 1;
      for (int j = 0; j < PT; j++) ibp_ld_data[j] = iblk[PT * w + j];
      @(negedge clk);
    end
    ibp_ld_valid = 0;
    for (int inter = 1; inter >= 0; inter--) begin
      while (ibp_busy) @(negedge clk);
      ibp_interleaved = 1'(inter);
      ibp_start = 1;
      @(negedge clk);
      ibp_start = 0;
      t = 0;
      errs = 0;
      while (t < M / PT) begin
        @(posedge clk);
        #1;
        if (ibp_out_valid) begin
          for (int x = 0; x < (1 << nsb); x++)
            for (int j = 0; j < PT; j++) begin
              sb = inter ? (x ^ (seq[t % 32] & ((1 << nsb) - 1))) : x;
              y  = inter ? pi_ref(PT * t + j) : PT * t + j;
              if (ibp_out_data[x][j] != iblk[sb * M + y]) errs++;
            end
          t++;
        end
      end
      checks++;
      if (errs != 0) begin
        failures++;
        $display("IBP N=%0d interleaved=%0d: %0d words wrong", M << nsb, inter, errs);
      end
      if (inter && nsb < 5) n_masked++;
      $display("IBP N=%0d interleaved=%0d: %0d words wrong", M << nsb, inter, errs);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    run_case(40,   3,  10, 4, 3, 4);
    run_case(128, 15,  32, 4, 2, 5);
    run_case(256, 15,  32, 4, 1, 5);
    run_case(512, 31,  64, 4, 0, 5);
    run_case(1024, 31, 64, 6, 3, 5);
    run_case(2048, 31, 64, 6, 2, 5);
    run_case(4096, 31, 64, 8, 1, 5);
    run_case(6144, 263, 480, 8, 3, 5);
    ibp_case(5);
    ibp_case(2);
    // mechanisms
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_mode[i] == 0) begin failures++; $display("mode P_S=%0d never used", 1 << i); end
    end
    checks += 7;
    if (n_bfly == 0)     begin failures++; $display("IBP butterfly never switched"); end
    if (n_masked == 0)   begin failures++; $display("IBP control never masked"); end
    if (n_rot_rd == 0)   begin failures++; $display("read network never rotated"); end
    if (n_rot_wr == 0)   begin failures++; $display("write network never rotated"); end
    if (n_alpha_nb == 0) begin failures++; $display("alpha' never used"); end
    if (n_beta_nb == 0)  begin failures++; $display("beta' never used"); end
    checks++;
    if (n_betad_nb == 0) begin failures++; $display("beta'_d never used"); end
    if (raw_err_total == 0) begin failures++; $display("channel produced no errors"); end
    $display("mechanisms: modes %0d/%0d/%0d/%0d, read rotations %0d, write rotations %0d, alpha' %0d, beta' %0d, beta'_d %0d, saturated extrinsic %0d, raw errors %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_rot_rd, n_rot_wr, n_alpha_nb, n_beta_nb, n_betad_nb, n_sat, raw_err_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
