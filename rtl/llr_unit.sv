// llr_unit: a posteriori LLR, scaled extrinsic value and hard decision.
//
// For each of the 16 branches the sum alpha_t(s) + gamma + beta_{t+1}(s') is
// formed; the largest sum with u=0 minus the largest with u=1 is the LLR
// (Max-Log-MAP), saturated to 10 bits. The extrinsic value is
// 0.75 * (LLR - ys - la), computed as (3*x) >>> 2 and saturated to 6 bits.
// The hard decision is 1 when the LLR is negative. The 0.75 scaling follows
// the document; the rounding (floor) and saturation are this design's choice.
// Purely combinational.
module llr_unit
  import turbo_pkg::*;
(
  input  pmvec_t alpha,   // alpha_t
  input  pmvec_t beta,    // beta_{t+1}
  input  bmvec_t g,       // branch metrics of step t
  input  rx_t    ys,
  input  ext_t   la,
  output llr_t   llr,
  output ext_t   ext,
  output logic   hard
);
  logic signed [12:0] sum, m0, m1, d;
  logic signed [15:0] e, e3;

  always_comb begin
    m0 = 13'sh1000;
    m1 = 13'sh1000;
    for (int s = 0; s < NSTATE; s++) begin
      for (int u = 0; u < 2; u++) begin
        sum = 13'(alpha[s]) + 13'(g[{1'(u), parity_bit(3'(s), 1'(u))}])
            + 13'(beta[next_state(3'(s), 1'(u))]);
        if (u == 0) begin
          if (sum > m0) m0 = sum;
        end else begin
          if (sum > m1) m1 = sum;
        end
      end
    end
    d = m0 - m1;
    if (d > 13'sd511)       llr = llr_t'(511);
    else if (d < -13'sd512) llr = llr_t'(-512);
    else                    llr = llr_t'(d);
    e  = 16'(llr) - 16'(ys) - 16'(la);
    e3 = (e * 16'sd3) >>> 2;
    if (e3 > 16'sd31)       ext = ext_t'(31);
    else if (e3 < -16'sd32) ext = ext_t'(-32);
    else                    ext = ext_t'(e3);
    hard = llr[LLR_W-1];
  end
endmodule
