// tb_lte_turbo_decoder: end-to-end test of the parallel LTE turbo decoder at
// its default size, up to the largest LTE block (N = 6144, 8 iterations).
//
// For each test case the bench draws random information bits, encodes them
// with its own model of the 3GPP rate-1/3 turbo encoder (two 8-state RSC
// encoders, QPP interleaver c'(t) = c(F(t)), no tail bits), adds
// pseudo-Gaussian noise, quantises to 6-bit soft values and runs the decoder.
// Checks: every decoded bit equals the transmitted bit; the noisy systematic
// values alone contain errors (so the decoder corrected something); each
// half-iteration takes 16*ceil(M/16) + 56 cycles; the address generators initialise in
// at most 16 cycles. Mechanisms counted: each parallel mode P_S = 1,2,4,8,
// non-trivial rotation in the read and write networks, use of alpha', beta'
// and beta'_d boundary metrics (beta'_d compared with the neighbouring
// decoder's output), and extrinsic values at saturation.
module tb_lte_turbo_decoder;
  import turbo_pkg::*;

  localparam int unsigned N_MAX = 6144;
  localparam int unsigned NW = $clog2(N_MAX + 1);

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // asynchronous reset edge before the first clock
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic start = 1'b0;
  logic [NW-1:0] cfg_n, cfg_f1, cfg_f2;
  logic [3:0] cfg_iter;
  logic [1:0] cfg_ps_log2;
  logic in_valid = 1'b0, in_ready;
  rx_t in_sys, in_p1, in_p2;
  logic out_valid, out_bit, out_last, busy, done;

  lte_turbo_decoder dut (.*);

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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  always @(posedge clk) begin
    if (dut.rd_v && ({dut.sa4, dut.sa2, dut.sa1} != '0)) n_rot_rd++;
    if ((|dut.w_v) && ({dut.sw4, dut.sw2, dut.sw1} != '0)) n_rot_wr++;
    if (dut.siso_start && dut.it != 0) begin
      if (dut.psl_q != 0) n_alpha_nb++;
      if (dut.psl_q != 0) n_beta_nb++;
    end
    // beta'_d: decoder 0 starts its last window's backward recursion from
    // the metrics handed over by decoder s in the same half-iteration
    if (dut.psl_q != 0 && dut.g_siso[0].u_siso.vb && dut.g_siso[0].u_siso.b_top &&
        dut.g_siso[0].u_siso.kb == dut.g_siso[0].u_siso.lastw) begin
      n_betad_nb++;
      for (int q = 0; q < 8; q++)
        if (dut.bd_in[0][q] !== dut.bd_out[8 >> dut.psl_q][q]) begin
          failures++;
          $display("beta'_d hand-over to decoder 0 does not carry decoder %0d's metrics", 8 >> dut.psl_q);
          break;
        end
    end
    for (int k = 0; k < 8; k++)
      if (dut.s_out_valid[k] && (dut.s_ext[k] == 31 || dut.s_ext[k] == -32)) n_sat++;
  end

  // timing monitors
  int t_init_start, t_hw_start;
  int half_cycles [$];
  int init_cycles [$];
  always @(posedge clk) begin
    if (dut.gen_init) t_init_start = cyc;
    if (dut.st == dut.S_HWAIT && dut.siso_start) init_cycles.push_back(cyc - t_init_start);
    if (dut.gen_init) t_hw_start = cyc;
    if (dut.st == dut.S_WAIT && dut.s_done[0]) half_cycles.push_back(cyc - t_hw_start + 1);
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
    cfg_n = NW'(n); cfg_f1 = NW'(f1); cfg_f2 = NW'(f2);
    cfg_iter = 4'(iters); cfg_ps_log2 = 2'(psl);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int t = 0; t < n; t++) begin
      in_valid = 1'b1; in_sys = ys[t]; in_p1 = yp1[t]; in_p2 = yp2[t];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 1'b0;
    idx = 0;
    while (1) begin
      @(posedge clk);
      if (out_valid) begin
        dec[idx] = out_bit;
        idx++;
        if (out_last) break;
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
    // mechanisms
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_mode[i] == 0) begin failures++; $display("mode P_S=%0d never used", 1 << i); end
    end
    checks += 5;
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
