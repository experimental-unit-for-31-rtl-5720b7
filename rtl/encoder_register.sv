// encoder_register -- 16-bit parallel-in, serial-out encoder register.
//
// A (31,16) cyclic code can be encoded with a K-stage register that uses
// the parity-check polynomial h(X) (the approach of the design; the exact
// tap wiring below is derived from h(X)). s[0] is the output (right) end.
// After a parallel load s[m] holds data bit m, which is code bit c_{30-m}.
// Every shift puts s[0] on the line and moves the word one stage right;
// the new bit entering s[15] is the XOR of the stages selected by
// h_0..h_15, which is the next parity bit:
//     c_j = sum_{i=0..15} h_i c_{j+16-i}   for j = 14 down to 0.
// So 31 shifts put out c_30..c_15 (the 16 data bits, in load order) and
// then c_14..c_0 (the 15 parity bits). With fb_en = 0 (encoder switched
// out) zeros enter instead, and the 15 parity places carry zeros.
`timescale 1ns/1ps
module encoder_register
  import ml_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         load,   // parallel transfer from the input register
  input  logic [K-1:0] din,
  input  logic         shift,  // shift right one place
  input  logic         fb_en,  // 1 = parity feedback in use
  output logic         sout    // bit now on the output end
);
  logic [K-1:0] s;
  logic         fb;

  assign sout = s[0];
  assign fb   = fb_en & (^(s & H_TAPS));

  always_ff @(posedge clk) begin
    if (rst)        s <= '0;
    else if (load)  s <= din;
    else if (shift) s <= {fb, s[K-1:1]};
  end
endmodule
