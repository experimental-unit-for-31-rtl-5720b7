// check_xor_network -- the six parity check sums of one orthogonal set.
//
// Every check of a set contains the same four "common" bits, so their parity
// is formed once and XORed with the parity of each check's own four bits:
// fourteen two-input XORs form seven four-bit parities, and six more XORs
// combine the common parity with each of the other six. sums[j] is check j
// of the set, 1 when the check fails. Purely combinational.
`timescale 1ns/1ps
module check_xor_network (
  input  logic [3:0]      common,  // the four bits every check of the set shares
  input  logic [5:0][3:0] other,   // the four further bits of each check
  output logic [5:0]      sums     // check sums, one per check
);
  logic common_par;

  always_comb begin
    common_par = (common[0] ^ common[1]) ^ (common[2] ^ common[3]);
    for (int j = 0; j < 6; j++)
      sums[j] = common_par ^ ((other[j][0] ^ other[j][1]) ^ (other[j][2] ^ other[j][3]));
  end
endmodule
