// tb_ibp_interleaver: loads random blocks into the IBP memory system at its
// Design-I size (32 sub-blocks of 128 symbols, two symbols per cycle) and
// checks every word that reaches every decoder port in natural and in
// interleaved order against a model of the interleaver built here from the
// double-prime formula and the 32-entry sequence. Checks timing too: output
// 2 cycles after the start edge, 64 valid cycles per pass, out_last on the
// last. Block sizes 4096 (32 sub-blocks) and 512 (4 sub-blocks, high control
// bits forced to zero).
module tb_ibp_interleaver;
  localparam int PSL = 5, PS = 32, M = 128, PT = 2, DW = 6;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // asynchronous reset edge before the first clock
  int cyc = 0;
  always @(posedge clk) cyc++;
  logic [2:0] nsb_log2 = 0;
  logic ld_valid = 0, start = 0, interleaved = 0;
  logic [PT-1:0][DW-1:0] ld_data;
  logic busy, out_valid, out_last;
  logic [PS-1:0][PT-1:0][DW-1:0] out_data;
  ibp_interleaver dut (.*);
  int checks = 0, failures = 0;
  logic [DW-1:0] blk [PS * M];
  int seq [32] = '{8, 19, 12, 18, 17, 14, 29, 5, 10, 21, 6, 23, 3, 26, 20, 22,
                   30, 4, 25, 15, 0, 2, 11, 9, 28, 24, 31, 27, 1, 13, 16, 7};

  function automatic int pi_ref(int y);
    if (y % 2 == 1) return 2 * (((y / 2) * 15) % (M / 2)) + 1;
    else            return 2 * (((y / 2) * 15 + 23) % (M / 2));
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pass(bit inter, int nsb);
    int t0, t, src_sb, src_y;
    @(negedge clk);
    interleaved = inter; start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    t = 0;
    while (t < M / PT) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        if (t == 0) begin
          checks++;
          if (cyc - t0 != 2) begin failures++; $display("first output %0d cycles after start", cyc - t0); end
        end
        for (int x = 0; x < (1 << nsb); x++)
          for (int j = 0; j < PT; j++) begin
            src_sb = inter ? (x ^ (seq[t % 32] & ((1 << nsb) - 1))) : x;
            src_y  = inter ? pi_ref(PT * t + j) : PT * t + j;
            checks++;
            if (out_data[x][j] != blk[src_sb * M + src_y]) begin
              failures++;
              if (failures < 6) $display("t=%0d port %0d lane %0d: %0d, expected %0d", t, x, j, out_data[x][j], blk[src_sb * M + src_y]);
            end
          end
        checks++;
        if (out_last != (t == M / PT - 1)) begin failures++; $display("out_last wrong at %0d", t); end
        t++;
      end else if (cyc - t0 > 10) begin
        failures++;
        $display("output stalled");
        break;
      end
    end
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) begin failures++; $display("more than %0d output cycles", M / PT); end
  endtask

  task automatic run(int nsb);
    @(negedge clk);
    nsb_log2 = 3'(nsb);
    for (int i = 0; i < (M << nsb); i++) blk[i] = DW'($urandom);
    for (int w = 0; w < (M << nsb) / PT; w++) begin
      ld_valid = 1;
      for (int j = 0; j < PT; j++) ld_data[j] = blk[PT * w + j];
      @(negedge clk);
    end
    ld_valid = 0;
    pass(1, nsb);
    pass(0, nsb);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(5);
    run(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
