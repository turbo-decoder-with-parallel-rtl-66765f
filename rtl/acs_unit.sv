// acs_unit: radix-2 add-compare-select for all 8 states of one trellis step.
//
// Forward (dir=0): alpha_{t+1}(s') = max over the two branches into s' of
// alpha_t(s) + gamma(s,s'). Backward (dir=1): beta_t(s) = max over the two
// branches out of s of beta_{t+1}(s') + gamma(s,s'). Each state uses one
// 2-input ACS (adder pair, comparator, selector). The new metrics are
// normalised by subtracting their maximum and saturated to 9 bits, so every
// output lies in [-256, 0]; the normalisation scheme is this design's choice.
// Purely combinational.
module acs_unit
  import turbo_pkg::*;
(
  input  logic   dir,     // 0: forward (alpha), 1: backward (beta)
  input  pmvec_t pm_in,   // metrics of the current step
  input  bmvec_t g,       // branch metrics of the step
  output pmvec_t pm_out   // normalised metrics of the next step
);
  logic signed [11:0] cand [NSTATE];
  logic signed [11:0] mx;

  // One 2-input ACS for state s.
  function automatic logic signed [11:0] acs2(input logic d, input logic [2:0] s,
                                              input pmvec_t pm, input bmvec_t gg);
    logic [2:0] p0, p1;
    logic u0, u1;
    logic signed [11:0] c0, c1;
    p0 = {s[1:0], 1'b0};
    p1 = {s[1:0], 1'b1};
    u0 = s[2] ^ p0[1] ^ p0[0];
    u1 = s[2] ^ p1[1] ^ p1[0];
    if (!d) begin
      c0 = 12'(pm[p0]) + 12'(gg[{u0, parity_bit(p0, u0)}]);
      c1 = 12'(pm[p1]) + 12'(gg[{u1, parity_bit(p1, u1)}]);
    end else begin
      c0 = 12'(pm[next_state(s, 1'b0)]) + 12'(gg[{1'b0, parity_bit(s, 1'b0)}]);
      c1 = 12'(pm[next_state(s, 1'b1)]) + 12'(gg[{1'b1, parity_bit(s, 1'b1)}]);
    end
    return (c0 >= c1) ? c0 : c1;
  endfunction

  always_comb begin
    for (int s = 0; s < NSTATE; s++)
      cand[s] = acs2(dir, 3'(s), pm_in, g);
    mx = cand[0];
    for (int s = 1; s < NSTATE; s++)
      if (cand[s] > mx) mx = cand[s];
    for (int s = 0; s < NSTATE; s++)
      pm_out[s] = sat_pm(16'(cand[s] - mx));
  end
endmodule
