// turbo_pkg: types, widths and trellis helpers shared by the LTE turbo decoder.
//
// The constituent code is the 8-state recursive systematic code of 3GPP,
// G(D) = [1, (1+D+D^3)/(1+D^2+D^3)]. A state is written {s1,s2,s3}, s1 being
// the most recent feedback bit: a = u^s2^s3, parity = a^s1^s3, next = {a,s1,s2}.
// Word widths follow the decoder's quantisation: 6-bit received values,
// 9-bit state metrics, 10-bit LLR and 6-bit extrinsic information. The metric
// normalisation (subtract the largest metric, saturate) is this design's choice.
package turbo_pkg;

  localparam int unsigned NSTATE = 8;   // 2^m states, m = 3
  localparam int unsigned RX_W   = 6;   // received symbol width
  localparam int unsigned EXT_W  = 6;   // extrinsic information width
  localparam int unsigned PM_W   = 9;   // path metric width
  localparam int unsigned LLR_W  = 10;  // a posteriori LLR width
  localparam int unsigned BM_W   = 8;   // branch metric width

  typedef logic signed [RX_W-1:0]  rx_t;
  typedef logic signed [EXT_W-1:0] ext_t;
  typedef logic signed [PM_W-1:0]  pm_t;
  typedef logic signed [LLR_W-1:0] llr_t;
  typedef logic signed [BM_W-1:0]  bm_t;

  typedef pm_t pmvec_t [NSTATE];   // metrics of all states at one trellis step
  typedef bm_t bmvec_t [4];        // branch metric indexed by {u, parity}

  localparam pm_t PM_MIN = pm_t'(-(2 ** (PM_W - 1)));

  function automatic logic [2:0] next_state(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return {a, s[2], s[1]};
  endfunction

  function automatic logic parity_bit(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return a ^ s[2] ^ s[0];
  endfunction

  // Saturate a wide signed value to the path metric width.
  function automatic pm_t sat_pm(input logic signed [15:0] v);
    if (v > 16'sd255) return pm_t'(255);
    if (v < -16'sd256) return PM_MIN;
    return pm_t'(v);
  endfunction

endpackage
