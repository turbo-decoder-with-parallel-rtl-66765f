// tb_subblock_mem: loads random data, reads it back on both ports with one
// cycle of latency, checks that loading clears the extrinsic field, then
// writes extrinsic values and decisions and reads them back.
module tb_subblock_mem;
  import turbo_pkg::*;
  localparam int D = 48;
  logic clk = 0;
  always #5 clk = ~clk;
  logic ld_en = 0, rb_psel = 0, wr_en = 0, ra_hard, wr_hard = 0;
  logic [5:0] ld_addr = 0, ra_addr = 0, rb_addr = 0, wr_addr = 0;
  rx_t ld_sys = 0, ld_p1 = 0, ld_p2 = 0, ra_sys, rb_par;
  ext_t ra_ext, wr_ext = 0;
  subblock_mem #(.DEPTH(D)) dut (.*);
  int checks = 0, failures = 0;
  rx_t s_r [D], a_r [D], b_r [D];
  ext_t e_r [D];
  bit h_r [D];

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    // give every word a non-zero extrinsic value first
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(i); wr_ext = ext_t'(i - 20); wr_hard = 1;
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < D; i++) begin
      s_r[i] = rx_t'($urandom); a_r[i] = rx_t'($urandom); b_r[i] = rx_t'($urandom);
      @(negedge clk);
      ld_en = 1; ld_addr = 6'(i); ld_sys = s_r[i]; ld_p1 = a_r[i]; ld_p2 = b_r[i];
    end
    @(negedge clk); ld_en = 0;
    for (int i = 0; i < D; i++) begin
      ra_addr = 6'(i); rb_addr = 6'(D - 1 - i); rb_psel = 1'(i);
      @(negedge clk);
      checks++;
      if (ra_sys != s_r[i] || ra_ext != 0 || ra_hard != 0 ||
          rb_par != (i % 2 ? b_r[D - 1 - i] : a_r[D - 1 - i])) begin
        failures++;
        $display("read %0d wrong: sys %0d ext %0d par %0d", i, ra_sys, ra_ext, rb_par);
      end
    end
    for (int i = 0; i < D; i++) begin
      e_r[i] = ext_t'($urandom); h_r[i] = 1'($urandom);
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(i); wr_ext = e_r[i]; wr_hard = h_r[i];
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < D; i++) begin
      ra_addr = 6'(i);
      @(negedge clk);
      checks++;
      if (ra_ext != e_r[i] || ra_hard != h_r[i] || ra_sys != s_r[i]) begin
        failures++;
        $display("write-back %0d wrong", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
