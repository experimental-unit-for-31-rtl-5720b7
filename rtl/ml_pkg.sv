// ml_pkg -- constants shared by the (31,16) majority-logic link.
//
// The code is the (31,16) cyclic Euclidean-geometry code with minimum
// distance 7 (corrects three random errors):
//   generator     g(X) = 1+X+X^2+X^3+X^5+X^7+X^8+X^9+X^10+X^11+X^15
//   parity check  h(X) = 1+X+X^4+X^9+X^10+X^11+X^12+X^16
// A codeword bit c_p is indexed by its power of X. The first data bit on the
// line is c_30, the last parity bit c_0. In the decoder register stage p holds
// c_p once a block has been received, so the check-set tables below use the
// same numbering.
//
// CHECK_COMMON / CHECK_OTHER are the six sets of parity checks used by the
// first decoding step. Set s has six checks; each check is the XOR of the four
// bits CHECK_COMMON[s] (which always include bit 30) and four bits
// CHECK_OTHER[s][j]. The six checks of a set are orthogonal on the sum of the
// common bits, and the six common sums are in turn orthogonal on bit 30. The
// table entries are the code's own check equations; the polynomials, the
// sets and the frame layout follow the design description, the type names
// are this implementation's.
`timescale 1ns/1ps
package ml_pkg;

  localparam int unsigned N = 31;   // block length
  localparam int unsigned K = 16;   // information bits

  // h_0 .. h_15 of the parity-check polynomial (h_16 = 1 is the new bit).
  localparam logic [K-1:0] H_TAPS = 16'b0001_1110_0001_0011;

  typedef logic [4:0] pos_t;          // bit position 0..30

  localparam int unsigned NSETS   = 6;
  localparam int unsigned NCHECKS = 6;

  localparam pos_t CHECK_COMMON [NSETS][4] = '{
    '{5'd0, 5'd7,  5'd11, 5'd30},
    '{5'd1, 5'd16, 5'd27, 5'd30},
    '{5'd2, 5'd23, 5'd25, 5'd30},
    '{5'd4, 5'd10, 5'd17, 5'd30},
    '{5'd5, 5'd24, 5'd29, 5'd30},
    '{5'd6, 5'd8,  5'd22, 5'd30}
  };

  localparam pos_t CHECK_OTHER [NSETS][NCHECKS][4] = '{
    '{'{5'd1, 5'd2,  5'd10, 5'd26}, '{5'd3, 5'd12, 5'd14, 5'd16},
      '{5'd4, 5'd5,  5'd18, 5'd28}, '{5'd6, 5'd15, 5'd20, 5'd25},
      '{5'd8, 5'd21, 5'd24, 5'd27}, '{5'd9, 5'd13, 5'd23, 5'd29}},
    '{'{5'd0, 5'd3,  5'd10, 5'd21}, '{5'd2, 5'd7,  5'd8,  5'd14},
      '{5'd5, 5'd13, 5'd20, 5'd22}, '{5'd6, 5'd9,  5'd17, 5'd18},
      '{5'd11,5'd12, 5'd24, 5'd26}, '{5'd15,5'd19, 5'd23, 5'd28}},
    '{'{5'd0, 5'd6,  5'd13, 5'd26}, '{5'd1, 5'd7,  5'd15, 5'd29},
      '{5'd3, 5'd18, 5'd22, 5'd24}, '{5'd4, 5'd8,  5'd16, 5'd19},
      '{5'd5, 5'd12, 5'd17, 5'd21}, '{5'd9, 5'd10, 5'd11, 5'd20}},
    '{'{5'd2, 5'd5,  5'd11, 5'd19}, '{5'd3, 5'd6,  5'd27, 5'd29},
      '{5'd7, 5'd22, 5'd26, 5'd28}, '{5'd8, 5'd12, 5'd20, 5'd23},
      '{5'd9, 5'd16, 5'd21, 5'd25}, '{5'd13,5'd14, 5'd15, 5'd24}},
    '{'{5'd0, 5'd8,  5'd9,  5'd28}, '{5'd1, 5'd12, 5'd22, 5'd25},
      '{5'd2, 5'd3,  5'd15, 5'd17}, '{5'd4, 5'd11, 5'd13, 5'd27},
      '{5'd6, 5'd10, 5'd14, 5'd19}, '{5'd7, 5'd18, 5'd21, 5'd23}},
    '{'{5'd0, 5'd19, 5'd24, 5'd25}, '{5'd1, 5'd5,  5'd9,  5'd14},
      '{5'd2, 5'd13, 5'd16, 5'd18}, '{5'd3, 5'd4,  5'd23, 5'd26},
      '{5'd7, 5'd17, 5'd20, 5'd27}, '{5'd10,5'd12, 5'd28, 5'd29}}
  };

  // Line levels of the start-stop signalling.
  localparam logic MARK  = 1'b1;
  localparam logic SPACE = 1'b0;

endpackage
