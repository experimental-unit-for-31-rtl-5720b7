// majority_gate6 -- six-input majority gate built from adders.
//
// Output is 1 when at least four of the six inputs are 1 (more than half;
// a 3-3 tie gives 0). The structure is the adder tree of the design: a
// three-input adder on inputs 1-3 and another on inputs 4-6, a two-input
// adder on their two sum bits, and a final three-input adder on the three
// carries whose carry is the output. The input count is
// 2*(c1+c2+c3) + (s1^s2), so the final carry is set exactly when the count
// is four or more. Purely combinational.
`timescale 1ns/1ps
module majority_gate6 (
  input  logic [5:0] in,   // in[0] is input 1 ... in[5] is input 6
  output logic       out
);
  logic s1, c1, s2, c2, c3;

  always_comb begin
    // adder on inputs 1,2,3
    s1 = in[0] ^ in[1] ^ in[2];
    c1 = (in[0] & in[1]) | (in[0] & in[2]) | (in[1] & in[2]);
    // adder on inputs 4,5,6
    s2 = in[3] ^ in[4] ^ in[5];
    c2 = (in[3] & in[4]) | (in[3] & in[5]) | (in[4] & in[5]);
    // two-input adder on the two sums: only its carry is used
    c3 = s1 & s2;
    // final adder on the three carries: its carry is the decision
    out = (c1 & c2) | (c1 & c3) | (c2 & c3);
  end
endmodule
