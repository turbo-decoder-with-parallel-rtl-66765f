// net_ctrl: network controller for the barrel-shift networks.
//
// In parallel mode P_S = 2^ps_log2, the active SISO decoders sit at ports
// k = x*s with s = 8/P_S. For each active port k, bank[k] is the memory the
// port exchanges data with. The shift of that word is (bank[k]-k) mod 8 when
// data flow from port to memory (TO_MEM=1) and (k-bank[k]) mod 8 when they flow
// from memory to port. Select bit i of stage "shift by 2^i" for residue r is
// bit i of the shift of the active port k = r (ports below 2^i are a complete
// set of residues of the active ports). Other select bits are 0.
// Purely combinational; the mapping of ports for P_S < 8 is this design's choice.
module net_ctrl #(
  parameter bit TO_MEM = 1'b0
) (
  input  logic [1:0]       ps_log2,
  input  logic [7:0][2:0]  bank,
  output logic [3:0]       sel4,
  output logic [1:0]       sel2,
  output logic             sel1
);
  logic [7:0][2:0] sh;
  logic [2:0]      s;

  always_comb begin
    s = 3'(4'd8 >> ps_log2);
    for (int k = 0; k < 8; k++)
      sh[k] = TO_MEM ? 3'(bank[k] - 3'(k)) : 3'(3'(k) - bank[k]);
    sel1 = sh[0][0];
    for (int r = 0; r < 2; r++)
      sel2[r] = ((3'(r) & (s - 3'd1)) == 3'd0) ? sh[r][1] : 1'b0;
    for (int r = 0; r < 4; r++)
      sel4[r] = ((3'(r) & (s - 3'd1)) == 3'd0) ? sh[r][2] : 1'b0;
  end
endmodule
