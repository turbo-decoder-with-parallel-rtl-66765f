// ibp_interleaver: sub-block memories, address generator and butterfly
// networks of a hybrid-parallel turbo decoder with the IBP interleaver
// (P_S sub-blocks side by side, P_T symbols per SISO decoder per cycle).
//
// Memory organisation: sub-block x (M symbols) lives in memory x, split into
// P_T banks by the symbol index modulo P_T, so bank b word w holds symbol
// P_T*w + b. A block of N = 2^nsb_log2 * M symbols is loaded in natural
// order, P_T symbols per cycle. A read pass then delivers, every cycle, P_T
// symbols to each of the P_S decoder ports: in natural order symbols P_T*t+j
// of the decoder's own sub-block, in interleaved order the IBP sequence from
// ibp_addr_gen. All memories use the same bank addresses in a cycle; one
// butterfly network per bank moves the words from memory x XOR c(t) to port
// x, and a P_T-way selector per port puts the banks back into lane order.
// The decoder ports are brought out because the radix-2^2 / radix-2^4 SISO
// decoders of these designs are not part of this RTL.
// Timing: load takes N/P_T cycles with ld_valid high; start (while idle)
// begins a pass, out_valid rises 2 cycles after the start edge and stays high
// for M/P_T cycles, out_last marks the final one. Port data of inactive
// sub-blocks (x >= 2^nsb_log2) are don't-care.
// Follows the document: double-prime intra-block permutation, butterfly
// networks with one control bit per stage, sub-block memories with P_T banks.
// Own choices: the load/read interface and the bank split by index mod P_T.
module ibp_interleaver #(
  parameter int unsigned PS_LOG2 = 5,
  parameter int unsigned M       = 128,
  parameter int unsigned PT      = 2,
  parameter int unsigned DW      = 6,
  parameter int unsigned PS      = 1 << PS_LOG2,
  parameter int unsigned SW      = $clog2(PS_LOG2 + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [SW-1:0]              nsb_log2,     // sampled at load start and read start
  // natural-order load
  input  logic                       ld_valid,
  input  logic [PT-1:0][DW-1:0]      ld_data,      // symbols P_T*w + j, j = 0..P_T-1
  // read pass
  input  logic                       start,
  input  logic                       interleaved,
  output logic                       busy,
  output logic                       out_valid,
  output logic                       out_last,
  output logic [PS-1:0][PT-1:0][DW-1:0] out_data   // [decoder port][lane]
);
  localparam int unsigned YW = $clog2(M);
  localparam int unsigned WD = M / PT;              // words per bank
  localparam int unsigned WW = $clog2(WD);
  localparam int unsigned BW = (PT > 1) ? $clog2(PT) : 1;

  // ---------------------------------------------------------------- load
  logic [PS_LOG2-1:0] ld_sb;
  logic [WW-1:0]      ld_w;
  logic [DW-1:0]      mem [PS][PT][WD];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_sb <= '0;
      ld_w  <= '0;
    end else if (ld_valid) begin
      ld_w <= ld_w + 1'b1;
      if (ld_w == WW'(WD - 1))
        ld_sb <= (ld_sb == PS_LOG2'((1 << nsb_log2) - 1)) ? '0 : ld_sb + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (ld_valid)
      for (int b = 0; b < PT; b++)
        mem[ld_sb][b][ld_w] <= ld_data[b];

  // ---------------------------------------------------------------- address generation
  logic               run, step_v, last_g;
  logic [YW-1:0]      pi [PT];
  logic [PS_LOG2-1:0] ctrl;

  ibp_addr_gen #(.PS_LOG2(PS_LOG2), .M(M), .PT(PT)) u_gen (
    .clk, .rst_n, .start(start && !busy), .interleaved, .nsb_log2,
    .step(run), .pi, .ctrl, .last(last_g));

  // bank addresses and, per lane, the bank it reads
  logic [WW-1:0] baddr   [PT];
  logic [BW-1:0] lane_bk [PT];
  always_comb
    for (int b = 0; b < PT; b++) begin
      baddr[b]   = '0;
      lane_bk[b] = BW'(int'(pi[b]) % PT);
      for (int j = 0; j < PT; j++)
        if (int'(pi[j]) % PT == b) baddr[b] = WW'(int'(pi[j]) / PT);
    end

  // ---------------------------------------------------------------- read
  logic [PT-1:0][PS-1:0][DW-1:0] rd_q, net_q;   // [bank][memory], [bank][port]
  logic [BW-1:0]      lane_bk_q [PT];
  logic [PS_LOG2-1:0] ctrl_q;
  logic               last_q;

  always_ff @(posedge clk)
    for (int x = 0; x < PS; x++)
      for (int b = 0; b < PT; b++)
        rd_q[b][x] <= mem[x][b][baddr[b]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run       <= 1'b0;
      step_v    <= 1'b0;
      last_q    <= 1'b0;
      ctrl_q    <= '0;
      for (int j = 0; j < PT; j++) lane_bk_q[j] <= '0;
    end else begin
      if (start && !busy) run <= 1'b1;
      else if (run && last_g) run <= 1'b0;
      step_v <= run;
      last_q <= run && last_g;
      ctrl_q <= ctrl;
      lane_bk_q <= lane_bk;
    end
  end

  for (genvar b = 0; b < PT; b++) begin : g_net
    butterfly_network #(.PS_LOG2(PS_LOG2), .DW(DW)) u_bfly (
      .din(rd_q[b]), .ctrl(ctrl_q), .dout(net_q[b]));
  end

  always_comb
    for (int x = 0; x < PS; x++)
      for (int j = 0; j < PT; j++)
        out_data[x][j] = net_q[lane_bk_q[j]][x];

  assign out_valid = step_v;
  assign out_last  = last_q;
  assign busy      = run || step_v;
endmodule
