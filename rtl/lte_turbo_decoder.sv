// lte_turbo_decoder: reconfigurable parallel turbo decoder for the 3GPP LTE
// code (rate 1/3, QPP interleaver, block sizes 40..6144 with 8 | N).
//
// Up to eight SISO decoders decode one block at the same time, each working
// on a sub-block of M = N/P_S symbols, P_S = 1, 2, 4 or 8. The received block
// sits in eight sub-block memories of N/8 words. In the first half-iteration
// every SISO decoder reads its sub-block in natural order; in the second it
// reads the interleaved sequence, position t of which is stored at F(t) =
// f1*t + f2*t^2 mod N. Because the QPP interleaver is contention-free, all
// active decoders read the same offset in different memories each cycle, and
// the words reach the decoders through a barrel-shift network of 2-to-1
// multiplexers whose select bits come from the address generator. Extrinsic
// values go back to the locations they were read from (in-place
// de-interleaving) through the mirror network. Decoders hand their boundary
// metrics to their neighbours for the next iteration (alpha', beta'), and
// each decoder's first-window dummy beta_d to the previous sub-block's
// decoder within the same half-iteration (beta'_d).
//
// Operation: pulse start with cfg_* (N, f1, f2, iterations 1..8, log2 P_S)
// while idle. The block is then accepted one symbol per cycle (in_valid &&
// in_ready, natural order, systematic + two parities, 6-bit two's complement
// soft values, positive meaning bit 0). After cfg_iter iterations the hard
// decisions are streamed in natural order on out_bit/out_valid, out_last marks
// the last one, and done pulses. Each half-iteration takes 16*ceil(M/16) + 56
// cycles (address generator initialisation, memory and network latency, and
// a 16*(ceil(M/16)+3)-cycle sliding-window SISO pass).
// Requirements from the document: 8 | N, f1 odd, f2 even.
// This design's choices: no tail bits are processed (the first sub-block
// starts in state 0, the last ends in an unknown state), the first iteration
// starts neighbouring sub-blocks from all-zero metrics, and the SISO
// decoders take their symbols in ascending order.
// The SISO decoders' soft LLR outputs are left unused: only the hard
// decisions leave the decoder.
module lte_turbo_decoder
  import turbo_pkg::*;
#(
  parameter int unsigned N_MAX = 6144,
  parameter int unsigned NW    = $clog2(N_MAX + 1),
  parameter int unsigned OW    = $clog2(N_MAX / 8)
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration, sampled with start
  input  logic          start,
  input  logic [NW-1:0] cfg_n,
  input  logic [NW-1:0] cfg_f1,
  input  logic [NW-1:0] cfg_f2,
  input  logic [3:0]    cfg_iter,
  input  logic [1:0]    cfg_ps_log2,
  // received block
  input  logic          in_valid,
  output logic          in_ready,
  input  rx_t           in_sys,
  input  rx_t           in_p1,
  input  rx_t           in_p2,
  // decoded bits
  output logic          out_valid,
  output logic          out_bit,
  output logic          out_last,
  output logic          busy,
  output logic          done
);
  localparam int unsigned DEPTH = N_MAX / 8;
  localparam int unsigned TAGW  = 3 + OW;
  localparam int unsigned LW    = $clog2(N_MAX + 1);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_HINIT, S_HWAIT, S_FWD, S_WAIT, S_OUT, S_FIN} st_e;
  st_e st;

  logic [NW-1:0] n_q, f1_q, f2_q;
  logic [3:0]    iter_q, it;
  logic [1:0]    psl_q;
  logic          half;
  logic [OW-1:0] m8;
  logic [LW-1:0] msub, j;
  logic [2:0]    cb;           // load / output bank counter
  logic [OW-1:0] co;           // load / output offset counter
  logic [NW-1:0] cnt;
  logic [7:0]    active;

  assign m8   = OW'(n_q >> 3);
  assign msub = LW'(n_q >> psl_q);
  always_comb
    for (int k = 0; k < 8; k++)
      active[k] = ((k % (8 >> psl_q)) == 0);

  // ---------------------------------------------------------------- address generators
  logic            gen_init, gen_step, ga_ready, gb_ready;
  logic [7:0][2:0] ga_bank, gb_bank;
  logic [OW-1:0]   ga_off, gb_off;

  qpp_addr_gen #(.N_MAX(N_MAX), .NW(NW), .OW(OW)) u_gen_a (
    .clk, .rst_n, .init(gen_init), .n(n_q),
    .f1(half ? f1_q : NW'(1)), .f2(half ? f2_q : '0), .ps_log2(psl_q),
    .step(gen_step), .ready(ga_ready), .bank(ga_bank), .off(ga_off));

  // parity streams are always read in their own natural order
  qpp_addr_gen #(.N_MAX(N_MAX), .NW(NW), .OW(OW)) u_gen_b (
    .clk, .rst_n, .init(gen_init), .n(n_q), .f1(NW'(1)), .f2('0), .ps_log2(psl_q),
    .step(gen_step), .ready(gb_ready), .bank(gb_bank), .off(gb_off));

  // ---------------------------------------------------------------- memories
  logic [7:0]      ld_en, wr_en_m;
  rx_t             ra_sys  [8];
  ext_t            ra_ext  [8];
  logic [7:0]      ra_hard;
  rx_t             rb_par  [8];
  logic [OW-1:0]   ra_addr, wr_addr;
  logic [7:0][EXT_W:0] wr_data;

  assign ra_addr = (st == S_OUT) ? co : ga_off;

  for (genvar m = 0; m < 8; m++) begin : g_mem
    assign ld_en[m] = (st == S_LOAD) && in_valid && (cb == 3'(m));
    subblock_mem #(.DEPTH(DEPTH), .AW(OW)) u_mem (
      .clk,
      .ld_en(ld_en[m]), .ld_addr(co), .ld_sys(in_sys), .ld_p1(in_p1), .ld_p2(in_p2),
      .ra_addr(ra_addr), .ra_sys(ra_sys[m]), .ra_ext(ra_ext[m]), .ra_hard(ra_hard[m]),
      .rb_addr(gb_off), .rb_psel(half), .rb_par(rb_par[m]),
      .wr_en(wr_en_m[m]), .wr_addr(wr_addr),
      .wr_ext(ext_t'(wr_data[m][EXT_W:1])), .wr_hard(wr_data[m][0]));
  end

  // ---------------------------------------------------------------- memory -> SISO
  logic            rd_v;
  logic [7:0][2:0] ga_bank_q, gb_bank_q;
  logic [OW-1:0]   ga_off_q;
  logic [7:0][RX_W+EXT_W-1:0] na_in, na_out;
  logic [7:0][RX_W-1:0]       nb_in, nb_out;
  logic [7:0]      na_vin, nb_vin, na_vout, nb_vout;
  logic [3:0]      sa4, sb4, sw4;
  logic [1:0]      sa2, sb2, sw2;
  logic            sa1, sb1, sw1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_v      <= 1'b0;
      ga_bank_q <= '0;
      gb_bank_q <= '0;
      ga_off_q  <= '0;
    end else begin
      rd_v      <= (st == S_FWD);
      ga_bank_q <= ga_bank;
      gb_bank_q <= gb_bank;
      ga_off_q  <= ga_off;
    end
  end

  // valid flags mark the memories read by an active decoder; they travel
  // with the words and must arrive at every active decoder
  always_comb
    for (int m = 0; m < 8; m++) begin
      na_in[m]  = {ra_sys[m], ra_ext[m]};
      nb_in[m]  = rb_par[m];
      na_vin[m] = 1'b0;
      nb_vin[m] = 1'b0;
      for (int k = 0; k < 8; k++) begin
        if (active[k] && ga_bank_q[k] == 3'(m)) na_vin[m] = 1'b1;
        if (active[k] && gb_bank_q[k] == 3'(m)) nb_vin[m] = 1'b1;
      end
    end

  net_ctrl #(.TO_MEM(1'b0)) u_ctl_a (.ps_log2(psl_q), .bank(ga_bank_q), .sel4(sa4), .sel2(sa2), .sel1(sa1));
  net_ctrl #(.TO_MEM(1'b0)) u_ctl_b (.ps_log2(psl_q), .bank(gb_bank_q), .sel4(sb4), .sel2(sb2), .sel1(sb1));

  bs_network #(.DW(RX_W+EXT_W), .MSB_FIRST(1'b0)) u_net_a (
    .din(na_in), .vin(na_vin), .sel4(sa4), .sel2(sa2), .sel1(sa1), .dout(na_out), .vout(na_vout));
  bs_network #(.DW(RX_W), .MSB_FIRST(1'b0)) u_net_b (
    .din(nb_in), .vin(nb_vin), .sel4(sb4), .sel2(sb2), .sel1(sb1), .dout(nb_out), .vout(nb_vout));

  // ---------------------------------------------------------------- SISO decoders
  logic            siso_start;
  logic [7:0]      s_out_valid, s_done, s_hard;
  ext_t            s_ext   [8];
  llr_t            s_llr   [8];
  logic [TAGW-1:0] s_tag   [8];
  pmvec_t          a_init  [8];
  pmvec_t          b_init  [8];
  pmvec_t          bd_in   [8];
  pmvec_t          bd_out  [8];
  pmvec_t          a_end   [8][2];
  pmvec_t          b_start [8][2];
  logic [7:0]      s_busy;

  // boundary metrics: alpha' from the previous sub-block, beta' from the next
  // (both from the previous iteration), beta'_d from the next sub-block's
  // decoder in this half-iteration
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      int unsigned s, x;
      s = 8 >> psl_q;
      x = k / s;
      for (int q = 0; q < NSTATE; q++) begin
        if (x == 0)       a_init[k][q] = (q == 0) ? pm_t'(0) : PM_MIN;
        else if (it == 0) a_init[k][q] = '0;
        else              a_init[k][q] = a_end[(k + 8 - s) % 8][half][q];
        if (it == 0 || x == (8 / s) - 1) b_init[k][q] = '0;
        else                             b_init[k][q] = b_start[(k + s) % 8][half][q];
        if (x == (8 / s) - 1) bd_in[k][q] = '0;
        else                  bd_in[k][q] = bd_out[(k + s) % 8][q];
      end
    end
  end

  for (genvar k = 0; k < 8; k++) begin : g_siso
    siso_decoder #(.MAX_LEN(N_MAX), .TAGW(TAGW)) u_siso (
      .clk, .rst_n,
      .start(siso_start && active[k]), .half(half), .len(msub),
      .alpha_init(a_init[k]), .beta_init(b_init[k]), .beta_d_in(bd_in[k]),
      .in_valid(rd_v && active[k]),
      .in_sys(rx_t'(na_out[k][RX_W+EXT_W-1:EXT_W])),
      .in_par(rx_t'(nb_out[k])),
      .in_la(ext_t'(na_out[k][EXT_W-1:0])),
      .in_tag({ga_bank_q[k], ga_off_q}),
      .out_valid(s_out_valid[k]), .out_ext(s_ext[k]), .out_hard(s_hard[k]),
      .out_llr(s_llr[k]), .out_tag(s_tag[k]),
      .done(s_done[k]), .busy(s_busy[k]), .beta_d_out(bd_out[k]),
      .alpha_end(a_end[k]), .beta_start(b_start[k]));
  end

  // ---------------------------------------------------------------- SISO -> memory
  logic [7:0][2:0]     w_bank;
  logic [7:0][EXT_W:0] w_in;
  logic [7:0]          w_v;
  always_comb
    for (int k = 0; k < 8; k++) begin
      w_bank[k] = s_tag[k][TAGW-1:OW];
      w_in[k]   = {s_ext[k], s_hard[k]};
      w_v[k]    = s_out_valid[k] && active[k];
    end
  assign wr_addr = s_tag[0][OW-1:0];

  net_ctrl #(.TO_MEM(1'b1)) u_ctl_w (.ps_log2(psl_q), .bank(w_bank), .sel4(sw4), .sel2(sw2), .sel1(sw1));
  bs_network #(.DW(EXT_W+1), .MSB_FIRST(1'b1)) u_net_w (
    .din(w_in), .vin(w_v), .sel4(sw4), .sel2(sw2), .sel1(sw1), .dout(wr_data), .vout(wr_en_m));

  // ---------------------------------------------------------------- control
  logic last_half;
  assign last_half = half && (it == iter_q - 4'd1);
  assign gen_init   = (st == S_HINIT);
  assign gen_step   = (st == S_FWD);
  assign siso_start = (st == S_HWAIT) && ga_ready && gb_ready;
  assign in_ready   = (st == S_LOAD);
  assign busy       = (st != S_IDLE);

  logic out_pend;
  logic [2:0] out_b_q;
  logic out_last_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      n_q <= '0; f1_q <= '0; f2_q <= '0; iter_q <= '0; psl_q <= '0;
      half <= 1'b0; it <= '0; j <= '0; cb <= '0; co <= '0; cnt <= '0;
      out_pend <= 1'b0; out_b_q <= '0; out_last_pend <= 1'b0;
      out_valid <= 1'b0; out_bit <= 1'b0; out_last <= 1'b0; done <= 1'b0;
    end else begin
      done      <= 1'b0;
      out_valid <= out_pend;
      out_bit   <= ra_hard[out_b_q];
      out_last  <= out_pend && out_last_pend;
      out_pend  <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          n_q <= cfg_n; f1_q <= cfg_f1; f2_q <= cfg_f2;
          iter_q <= cfg_iter; psl_q <= cfg_ps_log2;
          cb <= '0; co <= '0; cnt <= '0;
          st <= S_LOAD;
        end
        S_LOAD: if (in_valid) begin
          if (co == m8 - 1'b1) begin
            co <= '0;
            cb <= cb + 1'b1;
          end else co <= co + 1'b1;
          if (cnt == n_q - 1'b1) begin
            half <= 1'b0;
            it   <= '0;
            st   <= S_HINIT;
          end
          cnt <= cnt + 1'b1;
        end
        S_HINIT: st <= S_HWAIT;
        S_HWAIT: if (siso_start) begin
          j  <= '0;
          st <= S_FWD;
        end
        S_FWD: begin
          if (j == msub - 1'b1) st <= S_WAIT;
          j <= j + 1'b1;
        end
        S_WAIT: if (s_done[0]) begin
          if (last_half) begin
            cb <= '0; co <= '0; cnt <= '0;
            st <= S_OUT;
          end else begin
            if (half) it <= it + 1'b1;
            half <= ~half;
            st   <= S_HINIT;
          end
        end
        S_OUT: begin
          out_pend      <= 1'b1;
          out_b_q       <= cb;
          out_last_pend <= (cnt == n_q - 1'b1);
          if (co == m8 - 1'b1) begin
            co <= '0;
            cb <= cb + 1'b1;
          end else co <= co + 1'b1;
          cnt <= cnt + 1'b1;
          if (cnt == n_q - 1'b1) st <= S_FIN;
        end
        S_FIN: if (out_last) begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // Contention-free access: every active decoder receives a word from a
  // memory that was read for it, every write reaches exactly one memory, the
  // active decoders finish together and are idle before a half-iteration.
  always_ff @(posedge clk) begin
    if (rd_v) assert ((na_vout & active) == active && (nb_vout & active) == active)
      else $error("lte_turbo_decoder: read network misrouted");
    if (|w_v) assert ($countones(wr_en_m) == $countones(w_v))
      else $error("lte_turbo_decoder: write network collision");
    if (s_done[0]) assert (s_done == active)
      else $error("lte_turbo_decoder: decoders out of step");
    if (st == S_HWAIT) assert (s_busy == '0)
      else $error("lte_turbo_decoder: decoder busy at half-iteration start");
  end
endmodule
