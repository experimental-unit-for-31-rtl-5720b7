// majority_logic -- two-step majority-logic decision for bit 30.
//
// Step one: for each of the six check sets in ml_pkg, a check_xor_network
// forms six parity check sums from the decoder register and a majority_gate6
// estimates the modulo-2 sum of the errors on the set's four common positions.
// Step two: a seventh majority_gate6 takes those six estimates, which are
// orthogonal on bit 30, and decides whether bit 30 is in error.
// With at most three errors in the 31 bits the decision is exact.
// Purely combinational; err30 is XORed with bit 30 by the decoder register.
`timescale 1ns/1ps
module majority_logic
  import ml_pkg::*;
(
  input  logic [N-1:0]     r,        // decoder register, r[p] holds position p
  output logic [NSETS-1:0] step1,    // first-step decisions, one per set
  output logic             err30     // second-step decision: bit 30 is wrong
);
  logic [NSETS-1:0][3:0]         common;
  logic [NSETS-1:0][5:0][3:0]    other;
  logic [NSETS-1:0][5:0]         sums;

  always_comb begin
    for (int s = 0; s < NSETS; s++) begin
      for (int b = 0; b < 4; b++) begin
        common[s][b] = r[CHECK_COMMON[s][b]];
        for (int j = 0; j < NCHECKS; j++)
          other[s][j][b] = r[CHECK_OTHER[s][j][b]];
      end
    end
  end

  for (genvar s = 0; s < NSETS; s++) begin : g_set
    check_xor_network u_xor (
      .common (common[s]),
      .other  (other[s]),
      .sums   (sums[s])
    );
    majority_gate6 u_maj (
      .in  (sums[s]),
      .out (step1[s])
    );
  end

  majority_gate6 u_maj7 (
    .in  (step1),
    .out (err30)
  );
endmodule
