// tb_qpp_addr_gen: checks the recursive QPP address generator against the
// direct formula F(t) = (f1*t + f2*t^2) mod N evaluated in this bench.
// For several LTE block sizes, every parallel mode and the identity mapping
// (f1,f2) = (1,0), each active lane k = x*(8/P_S) must give
// bank*(N/8) + off = F(x*M + j) for j = 0..M-1. The initialisation must end
// within 16 cycles of init, and stepping must give one address per cycle.
module tb_qpp_addr_gen;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // asynchronous reset edge before the first clock
  logic init = 0, step = 0, ready;
  logic [12:0] n, f1, f2;
  logic [1:0] ps_log2;
  logic [7:0][2:0] bank;
  logic [9:0] off;
  qpp_addr_gen dut (.*);
  int checks = 0, failures = 0;

  function automatic int qpp(int t, int nn, int a, int b);
    return int'((longint'(a) * t + longint'(b) * t * t) % nn);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int nn, int a, int b, int psl);
    int m, m8, s, cyc, got, exp_v;
    m = nn >> psl; m8 = nn / 8; s = 8 >> psl;
    @(negedge clk);
    n = 13'(nn); f1 = 13'(a); f2 = 13'(b); ps_log2 = 2'(psl); init = 1;
    @(negedge clk);
    init = 0;
    cyc = 1;
    while (!ready) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc > 16) begin failures++; $display("init took %0d cycles", cyc); end
    for (int j = 0; j < m; j++) begin
      for (int x = 0; x < (1 << psl); x++) begin
        got = int'(bank[x * s]) * m8 + int'(off);
        exp_v = qpp(x * m + j, nn, a, b);
        checks++;
        if (got != exp_v) begin
          failures++;
          if (failures < 8) $display("N=%0d P=%0d x=%0d j=%0d: got %0d expected %0d", nn, 1 << psl, x, j, got, exp_v);
        end
      end
      step = 1;
      @(negedge clk);
      step = 0;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int psl = 0; psl < 4; psl++) begin
      run(40, 3, 10, psl);
      run(128, 15, 32, psl);
      run(1056, 17, 66, psl);
      run(2048, 31, 64, psl);
      run(6144, 263, 480, psl);
      run(512, 1, 0, psl);
    end
    run(64, 7, 16, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
