// tb_net_ctrl: checks the network controller together with the two network
// orders on QPP access patterns computed in this bench. For random LTE block
// sizes, positions and every parallel mode, the banks of the active lanes are
// bank_x = F(x*M + j) div (N/8). Memory -> SISO (TO_MEM=0, stages 1,2,4):
// SISO port x*s must receive the word of memory bank_x. SISO -> memory
// (TO_MEM=1, stages 4,2,1): memory bank_x must receive the word of port x*s,
// with its valid bit, and no memory may receive more valid words than sent.
module tb_net_ctrl;
  logic [1:0] ps_log2;
  logic [7:0][2:0] bank;
  logic [3:0] r4, w4;
  logic [1:0] r2, w2;
  logic r1, w1;
  logic [7:0][7:0] din, rd_out, wr_out;
  logic [7:0] vin, rd_v, wr_v;
  net_ctrl #(.TO_MEM(1'b0)) dut_r (.ps_log2, .bank, .sel4(r4), .sel2(r2), .sel1(r1));
  net_ctrl #(.TO_MEM(1'b1)) dut_w (.ps_log2, .bank, .sel4(w4), .sel2(w2), .sel1(w1));
  bs_network #(.DW(8), .MSB_FIRST(1'b0)) u_rd (.din, .vin('1), .sel4(r4), .sel2(r2), .sel1(r1), .dout(rd_out), .vout(rd_v));
  bs_network #(.DW(8), .MSB_FIRST(1'b1)) u_wr (.din, .vin, .sel4(w4), .sel2(w2), .sel1(w1), .dout(wr_out), .vout(wr_v));
  int checks = 0, failures = 0;
  int ns [6] = '{40, 128, 1056, 2048, 4096, 6144};
  int f1s [6] = '{3, 15, 17, 31, 31, 263};
  int f2s [6] = '{10, 32, 66, 64, 64, 480};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 3000; i++) begin
      int c, nn, psl, m, m8, s, j, f;
      c = int'($urandom_range(5, 0));
      nn = ns[c]; psl = int'($urandom_range(3, 0));
      m = nn >> psl; m8 = nn / 8; s = 8 >> psl;
      j = int'($urandom_range(m - 1, 0));
      ps_log2 = 2'(psl);
      bank = '0;
      vin = '0;
      for (int k = 0; k < 8; k++) din[k] = 8'($urandom);
      for (int x = 0; x < (1 << psl); x++) begin
        f = int'((longint'(f1s[c]) * (x * m + j) + longint'(f2s[c]) * (x * m + j) * (x * m + j)) % nn);
        bank[x * s] = 3'(f / m8);
        vin[x * s] = 1'b1;
      end
      #1;
      for (int x = 0; x < (1 << psl); x++) begin
        checks++;
        if (rd_out[x * s] != din[bank[x * s]]) begin
          failures++;
          if (failures < 6) $display("read N=%0d P=%0d j=%0d: port %0d wrong", nn, 1 << psl, j, x * s);
        end
        checks++;
        if (wr_out[bank[x * s]] != din[x * s] || !wr_v[bank[x * s]]) begin
          failures++;
          if (failures < 6) $display("write N=%0d P=%0d j=%0d: port %0d wrong", nn, 1 << psl, j, x * s);
        end
      end
      checks++;
      if ($countones(wr_v) != (1 << psl)) begin failures++; $display("write valid count %0d", $countones(wr_v)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
