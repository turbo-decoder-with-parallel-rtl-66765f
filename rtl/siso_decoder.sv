// siso_decoder: sliding-window Max-Log-MAP soft-in soft-out decoder for one
// sub-block of the parallel LTE turbo decoder.
//
// The sub-block of len symbols is cut into K = ceil(len/16) windows of 16
// symbols; the last window holds the remainder. Symbols (systematic, parity,
// a priori, plus an opaque write-back tag) arrive one per cycle, back to back,
// in ascending order. With cycle c counted from the first input and slot
// s = c div 16, three recursions run at the same time on different windows:
//   alpha-ACS   on window s   (with the input, forward),
//   beta_d-ACS  on window s-1 (dummy backward recursion, read back from the
//               input buffer),
//   beta-ACS    on window s-3 (backward, with the LLR unit), starting from the
//               beta_d result of window s-2.
// Input and alpha buffers therefore hold 4 windows (64 entries).
// Initial metrics:
//   alpha of window 0          alpha_init (alpha' of the previous sub-block,
//                              or state 0 for the first sub-block)
//   beta_d of the last window  beta_init (beta' of the next sub-block from
//                              the previous iteration)
//   beta_d of other windows    all zero
//   beta of the last window    beta_d_in: the beta_d that the next
//                              sub-block's decoder computed over its first
//                              window in this iteration (beta'_d)
// The decoder offers its own first-window beta_d on beta_d_out from slot 2 on.
// It keeps, for each of the two half-iteration types, the alpha reached at the
// end of the sub-block (alpha_end) and the beta reached at its start
// (beta_start); the parallel decoder passes them to the neighbours as
// alpha' and beta' in the next iteration.
// Timing: outputs come in descending order within each window, window 0
// first, during slots 3 .. K+2; done is high with the last output, so
// a pass takes 16*(K+3) cycles from the first input (plus 1 from the start
// pulse to the first input at the earliest). Inputs must be contiguous.
// Follows the document: window length 16 with one shorter window, a dummy
// beta_d recursion, alpha', beta' and beta'_d initialisation, the fixed-point
// widths. Own choices: symbols enter in ascending order (the windowed input
// order of the document is not used), the exact slot offsets, the placement
// of the shorter window at the end.
module siso_decoder
  import turbo_pkg::*;
#(
  parameter int unsigned MAX_LEN = 6144,
  parameter int unsigned TAGW    = 13,
  parameter int unsigned LW      = $clog2(MAX_LEN + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            half,        // 0: first code, 1: second code
  input  logic [LW-1:0]   len,         // sub-block length, 1..MAX_LEN
  input  pmvec_t          alpha_init,
  input  pmvec_t          beta_init,
  input  pmvec_t          beta_d_in,   // beta'_d from the next sub-block
  input  logic            in_valid,
  input  rx_t             in_sys,
  input  rx_t             in_par,
  input  ext_t            in_la,
  input  logic [TAGW-1:0] in_tag,
  output logic            out_valid,
  output ext_t            out_ext,
  output logic            out_hard,
  output llr_t            out_llr,
  output logic [TAGW-1:0] out_tag,
  output logic            done,
  output logic            busy,
  output pmvec_t          beta_d_out,  // beta_d over the first window
  output pmvec_t          alpha_end  [2],
  output pmvec_t          beta_start [2]
);
  localparam int unsigned WL  = 16;          // window length
  localparam int unsigned CW  = LW + 1;      // cycle counter width
  localparam int unsigned BUF = 4 * WL;

  typedef struct packed {
    rx_t  sys;
    rx_t  par;
    ext_t la;
  } ibuf_t;

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_RUN} st_e;
  st_e st;

  ibuf_t           ibuf [BUF];
  logic [TAGW-1:0] tbuf [BUF];
  pmvec_t          abuf [BUF];

  logic          half_q;
  logic [LW-1:0] len_q;
  logic [CW-1:0] nwin;          // K
  logic [CW-1:0] c;             // cycle counter, 0 = first input
  pmvec_t        alpha_q, bd_q, bd_save, b_q, beta_init_q;

  // ---------------------------------------------------------------- schedule
  logic [CW-1:0] cc, slot, kd, kb, pd, pb, topd, topb, lastw;
  logic [3:0]    ph;
  logic          run_c, vd, vb, bd_top, b_top;
  always_comb begin
    run_c = (st == S_RUN) || (st == S_WAIT && in_valid);
    cc    = (st == S_RUN) ? c : '0;
    ph    = cc[3:0];
    slot  = cc >> 4;
    lastw = nwin - 1'b1;
    kd    = slot - 1'b1;
    kb    = slot - CW'(3);
    pd    = (kd << 4) + CW'(15 - ph);
    pb    = (kb << 4) + CW'(15 - ph);
    topd  = (kd == lastw) ? CW'(len_q) - 1'b1 : (kd << 4) + CW'(15);
    topb  = (kb == lastw) ? CW'(len_q) - 1'b1 : (kb << 4) + CW'(15);
    vd    = run_c && (slot >= CW'(1)) && (kd <= lastw) && (pd < CW'(len_q));
    vb    = run_c && (slot >= CW'(3)) && (kb <= lastw) && (pb < CW'(len_q));
    bd_top = (pd == topd);
    b_top  = (pb == topb);
  end

  // ---------------------------------------------------------------- datapath
  ibuf_t  ib_d, ib_b;
  pmvec_t ab_b, bd_in, b_in;
  bmvec_t g_f, g_d, g_b;
  pmvec_t alpha_nx, bd_nx, b_nx;
  llr_t   llr_w;
  ext_t   ext_w;
  logic   hard_w;

  assign ib_d  = ibuf[pd[5:0]];
  assign ib_b  = ibuf[pb[5:0]];
  assign ab_b  = abuf[pb[5:0]];
  assign bd_in = bd_top ? ((kd == lastw) ? beta_init_q : '{default: '0}) : bd_q;
  assign b_in  = b_top  ? ((kb == lastw) ? beta_d_in : bd_save) : b_q;

  bmu      u_bmu_f (.ys(in_sys), .yp(in_par), .la(in_la), .g(g_f));
  acs_unit u_acs_a (.dir(1'b0), .pm_in(alpha_q), .g(g_f), .pm_out(alpha_nx));
  bmu      u_bmu_d (.ys(ib_d.sys), .yp(ib_d.par), .la(ib_d.la), .g(g_d));
  acs_unit u_acs_d (.dir(1'b1), .pm_in(bd_in), .g(g_d), .pm_out(bd_nx));
  bmu      u_bmu_b (.ys(ib_b.sys), .yp(ib_b.par), .la(ib_b.la), .g(g_b));
  acs_unit u_acs_b (.dir(1'b1), .pm_in(b_in), .g(g_b), .pm_out(b_nx));
  llr_unit u_llr   (.alpha(ab_b), .beta(b_in), .g(g_b), .ys(ib_b.sys), .la(ib_b.la),
                    .llr(llr_w), .ext(ext_w), .hard(hard_w));

  // buffers: written with the input, read by beta_d and beta
  always_ff @(posedge clk)
    if (run_c && in_valid) begin
      ibuf[cc[5:0]] <= '{sys: in_sys, par: in_par, la: in_la};
      tbuf[cc[5:0]] <= in_tag;
      abuf[cc[5:0]] <= alpha_q;
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      half_q    <= 1'b0;
      len_q     <= '0;
      nwin      <= '0;
      c         <= '0;
      out_valid <= 1'b0;
      out_ext   <= '0;
      out_hard  <= 1'b0;
      out_llr   <= '0;
      out_tag   <= '0;
      done      <= 1'b0;
      for (int s = 0; s < NSTATE; s++) begin
        alpha_q[s]     <= '0;
        bd_q[s]        <= '0;
        bd_save[s]     <= '0;
        b_q[s]         <= '0;
        beta_init_q[s] <= '0;
        beta_d_out[s]  <= '0;
        for (int h = 0; h < 2; h++) begin
          alpha_end[h][s]  <= '0;
          beta_start[h][s] <= '0;
        end
      end
    end else begin
      done      <= 1'b0;
      out_valid <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          half_q      <= half;
          len_q       <= len;
          nwin        <= (CW'(len) + CW'(WL - 1)) >> 4;
          alpha_q     <= alpha_init;
          beta_init_q <= beta_init;
          st          <= S_WAIT;
        end
        S_WAIT: if (in_valid) begin
          c  <= CW'(1);
          st <= S_RUN;
        end
        default: c <= c + 1'b1;
      endcase
      if (run_c && in_valid) begin
        alpha_q <= alpha_nx;
        if (cc == CW'(len_q) - 1'b1) alpha_end[half_q] <= alpha_nx;
      end
      if (vd) begin
        bd_q <= bd_nx;
        if (pd == (kd << 4)) begin
          bd_save <= bd_nx;
          if (kd == '0) beta_d_out <= bd_nx;
        end
      end
      if (vb) begin
        b_q       <= b_nx;
        out_valid <= 1'b1;
        out_ext   <= ext_w;
        out_hard  <= hard_w;
        out_llr   <= llr_w;
        out_tag   <= tbuf[pb[5:0]];
        if (pb == '0) beta_start[half_q] <= b_nx;
        if (kb == lastw && pb == (kb << 4)) begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
      end
    end
  end

  assign busy = (st != S_IDLE);

  // A new pass may only start when idle; inputs arrive back to back.
  always_ff @(posedge clk) begin
    if (start) assert (st == S_IDLE) else $error("siso_decoder: start while busy");
    if (st == S_RUN && c < CW'(len_q)) assert (in_valid) else $error("siso_decoder: gap in the input");
    if (in_valid) assert (run_c && cc < CW'(len_q)) else $error("siso_decoder: unexpected input");
  end
endmodule
