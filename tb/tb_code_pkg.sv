// tb_code_pkg -- reference arithmetic for the testbenches, written
// independently of the RTL: systematic encoding by division by g(X),
// the error-address sequence as published for the error generator, and
// small helpers.
`timescale 1ns/1ps
package tb_code_pkg;

  // g(X) = 1+X+X^2+X^3+X^5+X^7+X^8+X^9+X^10+X^11+X^15
  localparam logic [15:0] G = 16'b1000_1111_1010_1111;

  // Systematic codeword: bit p is the coefficient of X^p. Data bit k
  // (k = 0 is the first sent) is c_{30-k}; c_14..c_0 are the remainder of
  // X^15 m(X) divided by g(X).
  function automatic logic [30:0] encode(input logic [15:0] d);
    logic [30:0] c, r;
    c = '0;
    for (int k = 0; k < 16; k++) c[30-k] = d[k];
    r = c;
    for (int i = 30; i >= 15; i--)
      if (r[i]) r = r ^ (31'(G) << (i - 15));
    return c | r;
  endfunction

  // Order in which bits go on the line after the start bit: c_30 first.
  function automatic logic line_bit(input logic [30:0] c, input int slot); // slot 1..31
    return c[31 - slot];
  endfunction

  // Error-generator address sequence as published (value after each shift,
  // starting from the register value 1).
  localparam int unsigned SEQ [31] = '{2, 5, 10, 21, 11, 23, 14, 29, 27, 22, 12, 24,
    17, 3, 7, 15, 31, 30, 28, 25, 19, 6, 13, 26, 20, 9, 18, 4, 8, 16, 1};

  function automatic int popcount31(input logic [30:0] v);
    int n = 0;
    for (int i = 0; i < 31; i++) n += int'(v[i]);
    return n;
  endfunction

endpackage
