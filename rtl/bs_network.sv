// bs_network: multi-stage barrel-shift interconnection between 8 sub-block
// memories and 8 SISO decoders.
//
// Three stages of 2-to-1 multiplexers rotate data by 4, 2 and 1 positions.
// Every element moves forward (towards higher index, modulo 8) by its own
// shift amount; because the QPP interleaver makes the shift amounts of
// sub-blocks x and x+2^i agree modulo 2^(i+1), the multiplexers of one stage
// can share 2^i select bits: sel_i[k mod 2^i] drives the multiplexer at
// output k. This gives 4, 2 and 1 select bits for the shift-4, shift-2 and
// shift-1 stages, as in the document.
// MSB_FIRST=1 orders the stages 4,2,1 as the document draws them; select bits
// are then indexed by the source position (used from SISO to memory).
// MSB_FIRST=0 orders them 1,2,4, the mirror network; select bits are indexed
// by the destination position (used from memory to SISO). The mirror network
// and the valid bit travelling with each word are this design's choices.
// Purely combinational.
module bs_network #(
  parameter int unsigned DW        = 8,
  parameter bit          MSB_FIRST = 1'b1
) (
  input  logic [7:0][DW-1:0] din,
  input  logic [7:0]         vin,
  input  logic [3:0]         sel4,   // shift-by-4 stage, indexed by k mod 4
  input  logic [1:0]         sel2,   // shift-by-2 stage, indexed by k mod 2
  input  logic               sel1,   // shift-by-1 stage
  output logic [7:0][DW-1:0] dout,
  output logic [7:0]         vout
);
  logic [3:0][7:0][DW-1:0] d;
  logic [3:0][7:0]         v;

  function automatic logic sel_of(input int unsigned amt, input int unsigned k,
                                  input logic [3:0] s4, input logic [1:0] s2, input logic s1);
    case (amt)
      4:       return s4[k % 4];
      2:       return s2[k % 2];
      default: return s1;
    endcase
  endfunction

  assign d[0] = din;
  assign v[0] = vin;

  for (genvar st = 0; st < 3; st++) begin : g_stage
    localparam int unsigned AMT = MSB_FIRST ? (4 >> st) : (1 << st);
    for (genvar k = 0; k < 8; k++) begin : g_mux
      logic sel;
      assign sel = sel_of(AMT, k, sel4, sel2, sel1);
      assign d[st+1][k] = sel ? d[st][(k + 8 - AMT) % 8] : d[st][k];
      assign v[st+1][k] = sel ? v[st][(k + 8 - AMT) % 8] : v[st][k];
    end
  end

  assign dout = d[3];
  assign vout = v[3];
endmodule
