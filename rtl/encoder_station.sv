// encoder_station -- the sending unit: teletype input, (31,16) encoder and
// serial error generator.
//
// Two clocks, as in the original unit's two crystal oscillators: clk880
// (880 Hz) runs the teletype input control, clk (307.2 kHz) runs the
// encoder register, the output control and the error generator. The input
// control collects two characters (16 bits) and toggles a flag; the
// output control, on seeing the flag, loads the encoder register and sends
// start bit + 16 data bits + 15 parity bits at 19.2 kHz, with errors from
// the error generator XORed onto the line.
//
// Demonstration switches: enc_in = 1 sends the
// parity bits, enc_in = 0 sends the same frame with the parity places
// left at zero (no coding); err_in = 1 inserts errors. The multi-bit
// transfer between clocks relies on the 16-bit word staying stable for
// more than two teletype units after the flag toggles.
`timescale 1ns/1ps
module encoder_station
  import ml_pkg::*;
#(
  parameter int unsigned BIT_DIV = 16,
  parameter int unsigned TTY_DIV = 8
) (
  input  logic clk,       // 307.2 kHz
  input  logic clk880,    // 880 Hz
  input  logic rst,       // synchronous; hold for at least two clk880 periods
  input  logic enc_in,
  input  logic err_in,
  input  logic tty,       // sending teletype, mark = 1
  output logic line,      // data channel, mark = 1
  output logic busy       // a block is on the line
);
  logic [K-1:0] data;
  logic         xfer_tgl, in_busy;
  logic         load, shift, lfsr_shift, tr_a, tr_b, tr_c, count_down;
  logic         enc_bit, err;
  logic [4:0]   addr;

  tty_input #(.TTY_DIV(TTY_DIV)) u_in (
    .clk(clk880), .rst(rst), .tty(tty),
    .data(data), .xfer_tgl(xfer_tgl), .busy(in_busy)
  );

  encoder_register u_enc (
    .clk(clk), .rst(rst), .load(load), .din(data), .shift(shift),
    .fb_en(enc_in), .sout(enc_bit)
  );

  error_generator u_err (
    .clk(clk), .rst(rst), .lfsr_shift(lfsr_shift),
    .tr_a(tr_a), .tr_b(tr_b), .tr_c(tr_c), .count_down(count_down),
    .err(err), .addr(addr)
  );

  enc_output_control #(.BIT_DIV(BIT_DIV)) u_ctl (
    .clk(clk), .rst(rst), .go_tgl(xfer_tgl), .enc_bit(enc_bit),
    .err(err), .err_en(err_in), .load(load), .shift(shift),
    .lfsr_shift(lfsr_shift), .tr_a(tr_a), .tr_b(tr_b), .tr_c(tr_c),
    .count_down(count_down), .line(line), .busy(busy)
  );
endmodule
