// error_generator -- serial error generator of the encoder station.
//
// A 5-bit shift register with feedback from bits 2 and 5 (bit 1 being the
// least significant) steps through all 31 non-zero values:
//   2 5 10 21 11 23 14 29 27 22 12 24 17 3 7 15 31 30 28 25 19 6 13 26 20
//   9 18 4 8 16 1
// and a zero state is forced out by feeding a 1. A sixth stage takes the bit
// shifted out of stage 5. During the start bit of every block the control
// shifts the register four times; the values after the first, second and
// third shift are loaded into down-counters A, B and C (tr_a, tr_b, tr_c),
// and with counter C the sixth stage is stored as the block's error-control
// bit. Each count_down pulse (one per bit sent) decrements all three
// counters; while a counter reads zero, err is 1, so an address n puts an
// error on the n-th bit after the start bit (1 = first data bit).
// A control bit of 1 suppresses all errors of that block. The choice of
// which shifts feed the counters and the polarity of the control bit are
// this design's: with them, 23 of every 62 characters sent without coding
// get errors in their data bits, the figure given for the original unit, and the
// sequence repeats after 31 blocks (62 characters).
`timescale 1ns/1ps
module error_generator #(
  parameter logic [4:0] SEED = 5'd1   // register value after reset
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       lfsr_shift,  // advance the address register
  input  logic       tr_a,        // load counter A from the register
  input  logic       tr_b,
  input  logic       tr_c,        // load counter C and the control bit
  input  logic       count_down,  // one pulse per transmitted bit
  output logic       err,         // invert the bit now on the line
  output logic [4:0] addr         // current register value
);
  logic [5:0] sr;                  // sr[4:0] address bits, sr[5] sixth bit
  logic [4:0] cnt_a, cnt_b, cnt_c;
  logic       ctl;
  logic       fb;

  assign addr = sr[4:0];
  assign fb   = (sr[4] ^ sr[1]) | (sr[4:0] == 5'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      sr    <= {1'b0, SEED};
      cnt_a <= '1;
      cnt_b <= '1;
      cnt_c <= '1;
      ctl   <= 1'b1;
    end else begin
      if (lfsr_shift) sr <= {sr[4], sr[3:0], fb};
      if (tr_a) cnt_a <= sr[4:0];
      else if (count_down) cnt_a <= cnt_a - 1'b1;
      if (tr_b) cnt_b <= sr[4:0];
      else if (count_down) cnt_b <= cnt_b - 1'b1;
      if (tr_c) begin
        cnt_c <= sr[4:0];
        ctl   <= sr[5];
      end else if (count_down) cnt_c <= cnt_c - 1'b1;
    end
  end

  // the control loads the three counters one at a time
  a_one_load: assert property (@(posedge clk) disable iff (rst) $onehot0({tr_a, tr_b, tr_c}));

  assign err = ~ctl & ((cnt_a == 5'd0) ^ (cnt_b == 5'd0) ^ (cnt_c == 5'd0));
endmodule
