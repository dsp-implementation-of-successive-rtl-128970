// ovsf_code: chip of an orthogonal variable spreading factor (OVSF) channelization code.
//
// C_{SF,k}[n] is the Walsh-type code of the 3GPP code tree: its sign is the parity of the AND of
// n with the bit-reversed (over log2(SF) bits) code index k. The uplink DPDCH uses k = SF/4 and
// the DPCCH uses C_{256,0}, which is all ones, so only the DPDCH code needs this block.
// Purely combinational. The tree construction is the 3GPP one; the document only names C_d.
module ovsf_code #(
  parameter int unsigned LOG2_SF = 4                 // SF = 16
) (
  input  logic [LOG2_SF-1:0] code_idx,               // k
  input  logic [LOG2_SF-1:0] chip_idx,               // n mod SF
  output logic               chip_neg                // chip value is -1
);
  logic [LOG2_SF-1:0] k_rev;
  always_comb begin
    for (int i = 0; i < int'(LOG2_SF); i++) k_rev[i] = code_idx[LOG2_SF-1-i];
    chip_neg = ^(k_rev & chip_idx);
  end
endmodule
