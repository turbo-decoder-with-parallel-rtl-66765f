// tb_ibp_addr_gen: checks the IBP address generator against the double-prime
// formula and the 32-entry inter-block sequence, written out independently
// here, for the Design-I size (32 sub-blocks of 128, P_T = 2) and the
// Design-II size (16 sub-blocks of 256, P_T = 4). Per cycle: every lane's
// intra-block address, the network control word with the unused high bits
// forced to zero, and that the P_T lanes use distinct banks. Per pass: the
// addresses form a permutation of the sub-block, there are M/P_T cycles and
// last marks the final one; natural order gives y itself and no control.
module tb_ibp_addr_gen;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // asynchronous reset edge before the first clock
  logic start = 0, il = 0, step = 0;
  logic [2:0] nsb1, nsb2;
  logic [6:0] pi1 [2];
  logic [7:0] pi2 [4];
  logic [4:0] c1;
  logic [3:0] c2;
  logic last1, last2;
  ibp_addr_gen #(.PS_LOG2(5), .M(128), .PT(2)) dut1 (.clk, .rst_n, .start, .interleaved(il),
    .nsb_log2(nsb1), .step, .pi(pi1), .ctrl(c1), .last(last1));
  ibp_addr_gen #(.PS_LOG2(4), .M(256), .PT(4)) dut2 (.clk, .rst_n, .start, .interleaved(il),
    .nsb_log2(nsb2), .step, .pi(pi2), .ctrl(c2), .last(last2));
  int checks = 0, failures = 0;
  int seq [32] = '{8, 19, 12, 18, 17, 14, 29, 5, 10, 21, 6, 23, 3, 26, 20, 22,
                   30, 4, 25, 15, 0, 2, 11, 9, 28, 24, 31, 27, 1, 13, 16, 7};

  function automatic int pi_ref(int y, int m);
    if (y % 2 == 1) return 2 * (((y / 2) * 15) % (m / 2)) + 1;
    else            return 2 * (((y / 2) * 15 + 23) % (m / 2));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit inter, int n1, int n2);
    bit seen1 [128], seen2 [256];
    int e;
    foreach (seen1[i]) seen1[i] = 0;
    foreach (seen2[i]) seen2[i] = 0;
    @(negedge clk);
    il = inter; nsb1 = 3'(n1); nsb2 = 3'(n2); start = 1;
    @(negedge clk);
    start = 0;
    for (int t = 0; t < 128; t++) begin
      if (t < 64) begin
        for (int j = 0; j < 2; j++) begin
          e = inter ? pi_ref(2 * t + j, 128) : 2 * t + j;
          checks++;
          if (int'(pi1[j]) != e) begin failures++; $display("D-I t=%0d lane %0d: %0d, expected %0d", t, j, pi1[j], e); end
          seen1[pi1[j]] = 1;
        end
        checks += 2;
        if (pi1[0][0] == pi1[1][0]) begin failures++; $display("D-I t=%0d: bank collision", t); end
        e = inter ? (seq[t % 32] & ((1 << n1) - 1)) : 0;
        if (int'(c1) != e) begin failures++; $display("D-I t=%0d: ctrl %0d, expected %0d", t, c1, e); end
        checks++;
        if (last1 != (t == 63)) begin failures++; $display("D-I t=%0d: last wrong", t); end
      end
      if (t < 64) begin
        for (int j = 0; j < 4; j++) begin
          e = inter ? pi_ref(4 * t + j, 256) : 4 * t + j;
          checks++;
          if (int'(pi2[j]) != e) begin failures++; $display("D-II t=%0d lane %0d: %0d, expected %0d", t, j, pi2[j], e); end
          seen2[pi2[j]] = 1;
          for (int i = 0; i < j; i++) begin
            checks++;
            if (pi2[i][1:0] == pi2[j][1:0]) begin failures++; $display("D-II t=%0d: bank collision", t); end
          end
        end
        e = inter ? (seq[t % 32] & ((1 << n2) - 1)) : 0;
        checks += 2;
        if (int'(c2) != e) begin failures++; $display("D-II t=%0d: ctrl %0d, expected %0d", t, c2, e); end
        if (last2 != (t == 63)) begin failures++; $display("D-II t=%0d: last wrong", t); end
      end
      step = 1;
      @(negedge clk);
      step = 0;
    end
    foreach (seen1[i]) begin checks++; if (!seen1[i]) begin failures++; $display("D-I address %0d never used", i); end end
    foreach (seen2[i]) begin checks++; if (!seen2[i]) begin failures++; $display("D-II address %0d never used", i); end end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    chk(1, 5, 4);
    chk(1, 2, 3);
    chk(0, 5, 4);
    chk(1, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
