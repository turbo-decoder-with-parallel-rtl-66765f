// bmu: branch metric unit of the Max-Log-MAP SISO decoder.
//
// For a trellis branch labelled (u, p) the metric is the correlation of the
// BPSK labels with the systematic value plus a priori value and the parity
// value. Bit 0 maps to +1 and bit 1 to -1. The common term 1/2*(ys+la+yp) is
// added to every branch so that only the labels equal to 0 contribute, which
// removes the halving and does not change any max difference (a design
// choice). Purely combinational; output index is {u, p}.
module bmu
  import turbo_pkg::*;
(
  input  rx_t    ys,   // systematic received value
  input  rx_t    yp,   // parity received value
  input  ext_t   la,   // a priori information
  output bmvec_t g     // g[{u,p}]
);
  logic signed [BM_W-1:0] su;
  always_comb begin
    su = BM_W'(ys) + BM_W'(la);
    g[0] = su + BM_W'(yp);   // u=0, p=0
    g[1] = su;               // u=0, p=1
    g[2] = BM_W'(yp);        // u=1, p=0
    g[3] = '0;               // u=1, p=1
  end
endmodule
