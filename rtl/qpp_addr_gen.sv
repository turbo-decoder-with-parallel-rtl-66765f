// qpp_addr_gen: recursive QPP address generator for 8 parallel lanes.
//
// The block of N symbols is stored in 8 memories of N/8 words each, so an
// address is kept in mixed radix: bank = F / (N/8), off = F mod (N/8). In
// parallel mode P_S = 2^ps_log2 the active lanes are k = x*s (s = 8/P_S) and
// lane k walks the sub-block x of M = N/P_S symbols, producing
// F(xM + j) = f1*(xM+j) + f2*(xM+j)^2 mod N for j = 0,1,2,...
// It uses the recursion F(t+1) = F(t) + G(t), G(t+1) = G(t) + 2*f2 (mod N),
// with every sum done in mixed radix, so no multiplier or divider is needed
// after initialisation. With (f1,f2) = (1,0) it generates the natural order.
//
// Initialisation (pulse init, 5 cycles, ready rises afterwards): f1+f2 and
// 2*f2 are reduced mod N and split into (bank, off) by a 3-step restoring
// division by N/8; the starting values of every lane only need bank sums
// modulo 8 because M is a multiple of N/8:
//   F(xM)  = (s*f1*x + f2*(N/8)*s^2*x^2 mod 8, 0)
//   G(xM)  = (f1+f2) + (2*f2*s*x mod 8, 0).
// Each cycle with step=1 advances all lanes by one symbol. The offset is the
// same in all active lanes (the QPP property used by the document), so one
// offset is output. Requires 8 | N, f1 < N, f2 < N.
// The recursion follows the document's reference to on-the-fly QPP address
// generation; the mixed-radix form and the initialisation are this design's.
module qpp_addr_gen #(
  parameter int unsigned N_MAX = 6144,
  parameter int unsigned NW    = $clog2(N_MAX + 1),
  parameter int unsigned OW    = $clog2(N_MAX / 8)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  logic [NW-1:0]    n,
  input  logic [NW-1:0]    f1,
  input  logic [NW-1:0]    f2,
  input  logic [1:0]       ps_log2,
  input  logic             step,
  output logic             ready,
  output logic [7:0][2:0]  bank,
  output logic [OW-1:0]    off
);
  typedef struct packed {
    logic [2:0]    b;
    logic [OW-1:0] o;
  } mr_t;

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_LANE, S_RUN} st_e;
  st_e st;

  logic [OW-1:0] m8;
  logic [NW:0]   r1, r2;        // remainders during division
  logic [2:0]    q1, q2;        // quotients (banks)
  logic [1:0]    dcnt;
  logic [2:0]    f1_q, f2_q;     // only the residues mod 8 are needed
  logic [1:0]    psl_q;
  mr_t           fv [8];
  mr_t           gv [8];
  mr_t           d2;
  mr_t           lane_f [8];
  mr_t           lane_g [8];

  function automatic mr_t mr_add(input mr_t a, input mr_t b, input logic [OW-1:0] m);
    mr_t r;
    logic [OW:0] o;
    logic c;
    o = {1'b0, a.o} + {1'b0, b.o};
    c = (o >= {1'b0, m});
    r.o = c ? OW'(o - {1'b0, m}) : OW'(o);
    r.b = a.b + b.b + 3'(c);
    return r;
  endfunction

  function automatic logic [NW:0] modn(input logic [NW:0] v, input logic [NW-1:0] nn);
    return (v >= {1'b0, nn}) ? v - {1'b0, nn} : v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      m8    <= '0;
      r1    <= '0;
      r2    <= '0;
      q1    <= '0;
      q2    <= '0;
      dcnt  <= '0;
      f1_q  <= '0;
      f2_q  <= '0;
      psl_q <= '0;
      d2    <= '0;
      for (int k = 0; k < 8; k++) begin
        fv[k] <= '0;
        gv[k] <= '0;
      end
    end else begin
      case (st)
        S_IDLE, S_RUN: begin
          if (init) begin
            m8    <= OW'(n >> 3);
            r1    <= modn({1'b0, f1} + {1'b0, f2}, n);
            r2    <= modn({f2, 1'b0}, n);
            q1    <= '0;
            q2    <= '0;
            dcnt  <= 2'd2;
            f1_q  <= f1[2:0];
            f2_q  <= f2[2:0];
            psl_q <= ps_log2;
            st    <= S_DIV;
          end else if (st == S_RUN && step) begin
            for (int k = 0; k < 8; k++) begin
              fv[k] <= mr_add(fv[k], gv[k], m8);
              gv[k] <= mr_add(gv[k], d2, m8);
            end
          end
        end
        S_DIV: begin
          // restoring division by m8, quotient bit dcnt
          if (r1 >= ((NW+1)'(m8) << dcnt)) begin
            r1 <= r1 - ((NW+1)'(m8) << dcnt);
            q1[dcnt] <= 1'b1;
          end
          if (r2 >= ((NW+1)'(m8) << dcnt)) begin
            r2 <= r2 - ((NW+1)'(m8) << dcnt);
            q2[dcnt] <= 1'b1;
          end
          dcnt <= dcnt - 2'd1;
          if (dcnt == 2'd0) st <= S_LANE;
        end
        S_LANE: begin
          for (int k = 0; k < 8; k++) begin
            fv[k] <= lane_f[k];
            gv[k] <= lane_g[k];
          end
          d2 <= '{b: q2, o: OW'(r2)};
          st <= S_RUN;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // starting values of every lane (banks only need arithmetic modulo 8)
  always_comb begin
    logic [2:0] s, x;
    s = 3'(4'd8 >> psl_q);
    for (int k = 0; k < 8; k++) begin
      x = 3'(k >> (3 - psl_q));
      lane_f[k].b = 3'(s * f1_q * x) + 3'(f2_q * m8[2:0] * s * s * x * x);
      lane_f[k].o = '0;
      lane_g[k].b = q1 + 3'(f2_q * 3'd2 * s * x);
      lane_g[k].o = OW'(r1);
    end
  end

  assign ready = (st == S_RUN);
  always_comb begin
    for (int k = 0; k < 8; k++) bank[k] = fv[k].b;
    off = fv[0].o;
  end

// All active lanes share one offset (contention-free QPP property).
  always_ff @(posedge clk)
    if (st == S_RUN)
      for (int k = 0; k < 8; k++)
        if ((k % (8 >> psl_q)) == 0)
          assert (fv[k].o == fv[0].o) else $error("qpp_addr_gen: lane offsets differ");
endmodule
