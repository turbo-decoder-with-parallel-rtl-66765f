// butterfly_network: multi-stage butterfly interconnection for the parallel
// decoders that use the inter-block permutation (IBP) interleaver.
//
// P_S = 2^PS_LOG2 words pass through PS_LOG2 stages of 2-to-1 multiplexers.
// Stage i (i = 1..PS_LOG2) can exchange the word of position x with that of
// position x + 2^(PS_LOG2-i); every multiplexer of a stage is driven by the
// same one-bit control, bit (PS_LOG2-i) of ctrl. Each word therefore leaves
// on exactly one of two paths per stage, and with the whole control word
// applied, output x carries input x XOR ctrl. The stage order and the shared
// control bit per stage follow the document; which control bit drives which
// stage is this design's reading of "translating the decimal inter-block
// permutation parameters into binary". Because XOR is its own inverse the same
// network serves interleaving and de-interleaving.
// Purely combinational.
module butterfly_network #(
  parameter int unsigned PS_LOG2 = 5,
  parameter int unsigned DW      = 6,
  parameter int unsigned PS      = 1 << PS_LOG2
) (
  input  logic [PS-1:0][DW-1:0] din,
  input  logic [PS_LOG2-1:0]    ctrl,
  output logic [PS-1:0][DW-1:0] dout
);
  logic [PS_LOG2:0][PS-1:0][DW-1:0] d;

  assign d[0] = din;
  for (genvar i = 1; i <= PS_LOG2; i++) begin : g_stage
    localparam int unsigned DIST = 1 << (PS_LOG2 - i);
    for (genvar x = 0; x < PS; x++) begin : g_mux
      assign d[i][x] = ctrl[PS_LOG2-i] ? d[i-1][x ^ DIST] : d[i-1][x];
    end
  end
  assign dout = d[PS_LOG2];
endmodule
