// decoder_register -- 31-bit decoder shift register with the line/feedback
// switch and the correcting XOR.
//
// Stages are numbered 0 (input, left) to 30 (output, right); a shift moves
// stage p to p+1. While a block is received (sel_feedback = 0) each shift
// takes the next line bit into stage 0; after the start bit and 31 code bits
// the start bit has left the right end and stage p holds code bit c_p.
// For decoding (sel_feedback = 1) the switch closes the loop: the decoded
// digit, stage 30 XOR the majority decision, is fed back into stage 0, so
// each shift is a cyclic shift of a (corrected) codeword and brings the next
// data bit to stage 30. correct_en = 0 (decoder switched out) passes stage 30
// through unchanged. decoded is combinational from the register state; it is
// valid in the cycle in which shift is asserted.
`timescale 1ns/1ps
module decoder_register
  import ml_pkg::*;
(
  input  logic         clk,
  input  logic         rst,          // synchronous, clears the register
  input  logic         shift,        // one shift right
  input  logic         sel_feedback, // switch: 0 = line, 1 = decoded digit
  input  logic         line_bit,     // received line bit (already synchronized)
  input  logic         correct_en,   // 1 = majority-logic correction in use
  output logic         decoded,      // decoded digit for the bit in stage 30
  output logic         corrected,    // the majority logic flips stage 30
  output logic [N-1:0] r             // register contents, r[p] = stage p
);
  logic err30;

  majority_logic u_ml (
    .r     (r),
    .step1 (),
    .err30 (err30)
  );

  assign corrected = correct_en & err30;
  assign decoded   = r[N-1] ^ corrected;

  always_ff @(posedge clk) begin
    if (rst)        r <= '0;
    else if (shift) r <= {r[N-2:0], sel_feedback ? decoded : line_bit};
  end
endmodule
