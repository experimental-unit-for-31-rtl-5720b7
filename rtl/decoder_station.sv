// decoder_station -- the receiving unit: decoder control, 31-bit decoder
// register with two-step majority logic, 16-bit register, and teletype
// output.
//
// clk (307.2 kHz) runs the decoder: a block is shifted in at 19.2 kHz and
// then decoded in 16 consecutive clocks (one 19.2 kHz bit time), leaving
// the 16 corrected data bits in the 16-bit register and toggling a flag.
// clk880 (880 Hz) runs the output control, which then sends the two
// characters to the teletype at 110 baud. dec_in = 0 switches the majority
// correction off, so the received data bits go out as they came.
// corrected pulses once for every bit the majority logic inverts.
`timescale 1ns/1ps
module decoder_station
  import ml_pkg::*;
#(
  parameter int unsigned BIT_DIV = 16,
  parameter int unsigned TTY_DIV = 8
) (
  input  logic         clk,        // 307.2 kHz
  input  logic         clk880,     // 880 Hz
  input  logic         rst,        // synchronous; hold for two clk880 periods
  input  logic         dec_in,
  input  logic         line,       // data channel, asynchronous
  output logic         tty,        // receiving teletype, mark = 1
  output logic [K-1:0] word,       // last decoded word
  output logic         word_tgl,   // toggles when word is new
  output logic         corrected   // a data bit is being corrected
);
  logic         line_bit, shift, sel_feedback, sipo_shift, busy;
  logic         decoded, corr;
  logic [N-1:0] r;
  logic         out_busy;

  decoder_control #(.BIT_DIV(BIT_DIV)) u_ctl (
    .clk(clk), .rst(rst), .line(line), .line_bit(line_bit),
    .shift(shift), .sel_feedback(sel_feedback), .sipo_shift(sipo_shift),
    .xfer_tgl(word_tgl), .busy(busy)
  );

  decoder_register u_reg (
    .clk(clk), .rst(rst), .shift(shift), .sel_feedback(sel_feedback),
    .line_bit(line_bit), .correct_en(dec_in), .decoded(decoded),
    .corrected(corr), .r(r)
  );

  decoded_sipo #(.W(K)) u_sipo (
    .clk(clk), .rst(rst), .shift(sipo_shift), .din(decoded), .q(word)
  );

  assign corrected = corr & sipo_shift;

  tty_output #(.TTY_DIV(TTY_DIV)) u_out (
    .clk(clk880), .rst(rst), .data(word), .xfer_tgl(word_tgl),
    .tty(tty), .busy(out_busy)
  );
endmodule
