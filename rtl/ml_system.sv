// ml_system -- complete (31,16) majority-logic link: sending station,
// data channel, receiving station.
//
// Text typed on the sending teletype is packed two characters at a time
// into 16-bit words, encoded into 31-bit blocks of the (31,16) cyclic
// code, sent at 19.2 kHz in start-stop framing, optionally hit by up to
// three errors per block, decoded by two-step majority logic and printed
// on the receiving teletype. The four clocks are independent, like the
// four crystal oscillators of the original unit. The three switches give
// the demonstration modes: all off (plain link), err_in only (errors, no
// coding), all on (errors corrected).
`timescale 1ns/1ps
module ml_system
  import ml_pkg::*;
#(
  parameter int unsigned BIT_DIV = 16,  // 307.2 kHz / 19.2 kHz
  parameter int unsigned TTY_DIV = 8    // 880 Hz / 110 Hz
) (
  input  logic         enc_clk,     // 307.2 kHz, sending station
  input  logic         enc_clk880,  // 880 Hz, sending station
  input  logic         dec_clk,     // 307.2 kHz, receiving station
  input  logic         dec_clk880,  // 880 Hz, receiving station
  input  logic         rst,
  input  logic         enc_in,
  input  logic         err_in,
  input  logic         dec_in,
  input  logic         tty_tx,      // sending teletype
  output logic         tty_rx,      // receiving teletype
  output logic         channel,     // the line between the stations
  output logic [K-1:0] word,        // last decoded 16-bit word
  output logic         word_tgl,
  output logic         corrected
);
  logic enc_busy;

  encoder_station #(.BIT_DIV(BIT_DIV), .TTY_DIV(TTY_DIV)) u_enc (
    .clk(enc_clk), .clk880(enc_clk880), .rst(rst), .enc_in(enc_in),
    .err_in(err_in), .tty(tty_tx), .line(channel), .busy(enc_busy)
  );

  decoder_station #(.BIT_DIV(BIT_DIV), .TTY_DIV(TTY_DIV)) u_dec (
    .clk(dec_clk), .clk880(dec_clk880), .rst(rst), .dec_in(dec_in),
    .line(channel), .tty(tty_rx), .word(word), .word_tgl(word_tgl),
    .corrected(corrected)
  );
endmodule
