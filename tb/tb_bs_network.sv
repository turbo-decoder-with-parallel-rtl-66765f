// tb_bs_network: checks the barrel-shift network.
// 1) The document's example (N=64, f1=7, f2=16, P_S=8, y=2): the 4, 2 and 1
//    select bits of the shift-4, shift-2 and shift-1 stages taken from the
//    shifts {1,7,5,3,1,7,5,3} must send inputs 0..7 to outputs
//    {1,0,7,6,5,4,3,2}.
// 2) Random rotations (every word shifted by the same amount) in both stage
//    orders.
// 3) The mirror network (stages 1,2,4, selects by destination) must realise
//    the inverse of the example mapping.
module tb_bs_network;
  logic [7:0][7:0] din, dout_m, dout_l;
  logic [7:0] vin, vout_m, vout_l;
  logic [3:0] sel4;
  logic [1:0] sel2;
  logic sel1;
  bs_network #(.DW(8), .MSB_FIRST(1'b1)) dut_m (.din, .vin, .sel4, .sel2, .sel1, .dout(dout_m), .vout(vout_m));
  bs_network #(.DW(8), .MSB_FIRST(1'b0)) dut_l (.din, .vin, .sel4, .sel2, .sel1, .dout(dout_l), .vout(vout_l));
  int checks = 0, failures = 0;
  int dest [8] = '{1, 0, 7, 6, 5, 4, 3, 2};
  int dlt  [8] = '{1, 7, 5, 3, 1, 7, 5, 3};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    // example of the document
    for (int k = 0; k < 8; k++) din[k] = 8'(8'hA0 + k);
    vin = '1;
    for (int r = 0; r < 4; r++) sel4[r] = 1'(dlt[r] >> 2);
    for (int r = 0; r < 2; r++) sel2[r] = 1'(dlt[r] >> 1);
    sel1 = 1'(dlt[0]);
    #1;
    checks++;
    if ({sel4, sel2, sel1} != 7'b0110_10_1) begin failures++; $display("select bits %b", {sel4, sel2, sel1}); end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (dout_m[dest[k]] != din[k]) begin failures++; $display("memory %0d did not reach SISO %0d", k, dest[k]); end
    end
    // mirror network: SISO x fetches from memory with inverse mapping
    // shift of the word for destination x is (x - source) mod 8
    for (int x = 0; x < 8; x++) begin
      int src, sh;
      for (int k = 0; k < 8; k++) if (dest[k] == x) src = k;
      sh = (x - src + 8) % 8;
      if (x < 4) sel4[x] = 1'(sh >> 2);
      if (x < 2) sel2[x] = 1'(sh >> 1);
      if (x == 0) sel1 = 1'(sh);
    end
    #1;
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (dout_l[dest[k]] != din[k]) begin failures++; $display("mirror: memory %0d did not reach SISO %0d", k, dest[k]); end
    end
    // uniform rotations with valid flags
    for (int i = 0; i < 200; i++) begin
      int r;
      r = int'($urandom_range(7, 0));
      for (int k = 0; k < 8; k++) din[k] = 8'($urandom);
      vin = 8'($urandom);
      sel4 = {4{1'(r >> 2)}};
      sel2 = {2{1'(r >> 1)}};
      sel1 = 1'(r);
      #1;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (dout_m[(k + r) % 8] != din[k] || dout_l[(k + r) % 8] != din[k] ||
            vout_m[(k + r) % 8] != vin[k] || vout_l[(k + r) % 8] != vin[k]) begin
          failures++;
          if (failures < 5) $display("rotation %0d: word %0d misrouted", r, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
