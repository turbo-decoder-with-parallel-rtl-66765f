// tb_butterfly_network: checks the butterfly network at the Design-I size
// (32 ports, 5 stages) and at the 4-port size of the document's small example.
// Each stage alone must swap every pair (x, x + 2^k) selected by its control
// bit; the whole network must send input x XOR ctrl to output x, for random
// data and control words.
module tb_butterfly_network;
  logic [31:0][5:0] din32, dout32;
  logic [4:0]       c32;
  logic [3:0][5:0]  din4, dout4;
  logic [1:0]       c4;
  butterfly_network #(.PS_LOG2(5), .DW(6)) dut32 (.din(din32), .ctrl(c32), .dout(dout32));
  butterfly_network #(.PS_LOG2(2), .DW(6)) dut4  (.din(din4),  .ctrl(c4),  .dout(dout4));
  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    // single stages: swap distance 2^k
    for (int k = 0; k < 5; k++) begin
      for (int x = 0; x < 32; x++) din32[x] = 6'(x);
      c32 = 5'(1 << k);
      #1;
      for (int x = 0; x < 32; x++) begin
        checks++;
        if (dout32[x] != 6'(x ^ (1 << k))) begin
          failures++;
          $display("stage with distance %0d: output %0d carries %0d", 1 << k, x, dout32[x]);
        end
      end
    end
    // P_S = 4: every control word
    for (int c = 0; c < 4; c++) begin
      for (int x = 0; x < 4; x++) din4[x] = 6'($urandom);
      c4 = 2'(c);
      #1;
      for (int x = 0; x < 4; x++) begin
        checks++;
        if (dout4[x] != din4[x ^ c]) begin failures++; $display("P_S=4 ctrl=%0d port %0d wrong", c, x); end
      end
    end
    // random words and controls
    for (int i = 0; i < 500; i++) begin
      for (int x = 0; x < 32; x++) din32[x] = 6'($urandom);
      c32 = 5'($urandom);
      #1;
      for (int x = 0; x < 32; x++) begin
        checks++;
        if (dout32[x] != din32[x ^ int'(c32)]) begin
          failures++;
          if (failures < 6) $display("ctrl=%0d port %0d wrong", c32, x);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
