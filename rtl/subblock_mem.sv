// subblock_mem: one of the 8 sub-block memory modules.
//
// Holds, for N/8 consecutive symbols of the block, the received systematic
// value, both received parity values, the extrinsic information exchanged
// between half-iterations (one shared memory, updated in place) and the
// latest hard decision. Loading a symbol clears its extrinsic value.
// Port A reads systematic + extrinsic + decision, port B reads one parity
// stream (psel: 0 = first parity, 1 = second parity); both have one cycle of
// read latency. Port W writes extrinsic and decision. Load and W must not be
// used in the same cycle (load wins). The split into fields and ports is this
// design's choice; the document only gives one memory module per sub-block.
module subblock_mem
  import turbo_pkg::*;
#(
  parameter int unsigned DEPTH = 768,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  // load port
  input  logic          ld_en,
  input  logic [AW-1:0] ld_addr,
  input  rx_t           ld_sys,
  input  rx_t           ld_p1,
  input  rx_t           ld_p2,
  // read port A
  input  logic [AW-1:0] ra_addr,
  output rx_t           ra_sys,
  output ext_t          ra_ext,
  output logic          ra_hard,
  // read port B
  input  logic [AW-1:0] rb_addr,
  input  logic          rb_psel,
  output rx_t           rb_par,
  // write port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  ext_t          wr_ext,
  input  logic          wr_hard
);
  rx_t  sys_m  [DEPTH];
  rx_t  p1_m   [DEPTH];
  rx_t  p2_m   [DEPTH];
  ext_t ext_m  [DEPTH];
  logic hard_m [DEPTH];

  always_ff @(posedge clk) begin
    if (ld_en) begin
      sys_m[ld_addr] <= ld_sys;
      p1_m[ld_addr]  <= ld_p1;
      p2_m[ld_addr]  <= ld_p2;
    end
    if (ld_en) begin
      ext_m[ld_addr]  <= '0;
      hard_m[ld_addr] <= 1'b0;
    end else if (wr_en) begin
      ext_m[wr_addr]  <= wr_ext;
      hard_m[wr_addr] <= wr_hard;
    end
    ra_sys  <= sys_m[ra_addr];
    ra_ext  <= ext_m[ra_addr];
    ra_hard <= hard_m[ra_addr];
    rb_par  <= rb_psel ? p2_m[rb_addr] : p1_m[rb_addr];
  end
endmodule
