// ibp_addr_gen: address generator of the IBP (inter-block permutation)
// interleaver with the double-prime intra-block permutation.
//
// Each of the P_S sub-blocks holds M symbols; a SISO decoder takes P_T of them
// per cycle. In interleaved order, at cycle t SISO decoder x takes, for lane
// j = 0..P_T-1, symbol y = P_T*t + j of the interleaved sub-block, which is
// symbol pi(y) of sub-block x XOR c(t):
//   pi(y) = 2*((floor(y/2)*EPS)         mod M/2) + 1   for odd y
//   pi(y) = 2*((floor(y/2)*EPS + THETA) mod M/2)       for even y
//   c(t)  = SEQ[t mod 32] with the bits above nsb_log2 forced to zero.
// Every decoder uses the same pi(y) in its own memory, so the P_S accesses
// never collide; pi(y) mod P_T differs between the lanes, so the P_T symbols
// of one cycle sit in different banks. In natural order pi(y) = y and c = 0.
// floor(y/2)*EPS is kept in an accumulator that adds (P_T/2)*EPS per cycle;
// M must be a power of two, so mod M/2 is a truncation.
// Interface: start (one cycle) restarts at t = 0 with the given order; step
// advances one cycle; pi/ctrl/bank_of_lane describe the current cycle and last
// marks t = M/P_T - 1. (EPS, THETA) = (15, 23), the 32-entry sequence, M = 128,
// P_T = 2 and P_S = 32 are the document's Design-I values; the choice of the
// cycle index t (not y) to select the sequence entry is this design's.
module ibp_addr_gen #(
  parameter int unsigned PS_LOG2 = 5,
  parameter int unsigned M       = 128,
  parameter int unsigned PT      = 2,
  parameter int unsigned EPS     = 15,
  parameter int unsigned THETA   = 23,
  parameter int unsigned YW      = $clog2(M),
  parameter int unsigned SW      = $clog2(PS_LOG2 + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               interleaved,   // order selected at start
  input  logic [SW-1:0]      nsb_log2,      // log2 of the number of active sub-blocks
  input  logic               step,
  output logic [YW-1:0]      pi   [PT],     // intra-block address of each lane
  output logic [PS_LOG2-1:0] ctrl,          // inter-block permutation of this cycle
  output logic               last
);
  localparam int unsigned HW = YW - 1;      // width of an index modulo M/2
  localparam int unsigned TW = $clog2(M / PT);

  // inter-block permutation, 32 periodic entries (Design-I table)
  localparam logic [4:0] SEQ [32] = '{
    5'd8,  5'd19, 5'd12, 5'd18, 5'd17, 5'd14, 5'd29, 5'd5,
    5'd10, 5'd21, 5'd6,  5'd23, 5'd3,  5'd26, 5'd20, 5'd22,
    5'd30, 5'd4,  5'd25, 5'd15, 5'd0,  5'd2,  5'd11, 5'd9,
    5'd28, 5'd24, 5'd31, 5'd27, 5'd1,  5'd13, 5'd16, 5'd7};

  logic          il_q;
  logic [TW-1:0] t;
  logic [HW-1:0] acc;        // floor(y0/2)*EPS mod M/2 for the first lane
  logic [SW-1:0] nsb_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      il_q  <= 1'b0;
      t     <= '0;
      acc   <= '0;
      nsb_q <= '0;
    end else if (start) begin
      il_q  <= interleaved;
      nsb_q <= nsb_log2;
      t     <= '0;
      acc   <= '0;
    end else if (step) begin
      t   <= t + 1'b1;
      acc <= acc + HW'((PT / 2) * EPS);
    end
  end

  always_comb begin
    logic [HW-1:0] k;
    logic [PS_LOG2-1:0] mask;
    for (int j = 0; j < PT; j++) begin
      k = acc + HW'((j / 2) * EPS);
      if (!il_q)       pi[j] = YW'(PT * t + j);
      else if (j % 2 == 1) pi[j] = {k, 1'b1};
      else pi[j] = {HW'(k + HW'(THETA)), 1'b0};
    end
    mask = PS_LOG2'((1 << nsb_q) - 1);
    ctrl = il_q ? (PS_LOG2'(SEQ[t % 32]) & mask) : '0;
    last = (t == TW'(M / PT - 1));
  end

  initial begin
    assert (M == (1 << YW)) else $error("ibp_addr_gen: M must be a power of two");
    assert (PT == 2 || PT == 4) else $error("ibp_addr_gen: P_T must be 2 or 4");
    assert (EPS % 2 == 1) else $error("ibp_addr_gen: EPS must be odd");
  end
endmodule
