// tb_ml_system -- end-to-end run of the whole link at its real rates
// (307.2 kHz and 880 Hz at both stations, the four clocks slightly apart)
// through the three demonstration modes:
//   1. all switches out      8 characters, must arrive unchanged;
//   2. error generator only  62 characters (one full period of the error
//      sequence), exactly 23 must arrive damaged;
//   3. all switches in       62 characters with up to three errors per
//      block, all must arrive unchanged.
// The channel is monitored independently: each block is compared with the
// codeword of the pair sent, to count inserted errors per block. Every
// mechanism must occur at least once: each mode, blocks with errors,
// blocks with three errors, blocks the control bit leaves clean, and
// corrections by the decoder.
`timescale 1ns/1ps
module tb_ml_system;
  import tb_code_pkg::*;
  localparam real TE   = 1.0e9 / 307200.0;
  localparam real TD   = 1.0e9 / 307200.0 * 0.9998;
  localparam real TE8  = 1.0e9 / 880.0;
  localparam real TD8  = 1.0e9 / 880.0 * 0.9995;
  logic enc_clk = 0, enc_clk880 = 0, dec_clk = 0, dec_clk880 = 0, rst = 1;
  logic enc_in = 0, err_in = 0, dec_in = 0;
  logic tty_tx, tty_rx, channel, word_tgl, corrected;
  logic [15:0] word;
  int checks = 0, failures = 0;

  tty_model u_tty (.tx(tty_tx), .rx(tty_rx));
  ml_system dut (.enc_clk(enc_clk), .enc_clk880(enc_clk880), .dec_clk(dec_clk),
    .dec_clk880(dec_clk880), .rst(rst), .enc_in(enc_in), .err_in(err_in), .dec_in(dec_in),
    .tty_tx(tty_tx), .tty_rx(tty_rx), .channel(channel), .word(word), .word_tgl(word_tgl),
    .corrected(corrected));
  always #(TE / 2.0)  enc_clk    = ~enc_clk;
  always #(TD / 2.0)  dec_clk    = ~dec_clk;
  always #(TE8 / 2.0) enc_clk880 = ~enc_clk880;
  always #(TD8 / 2.0) dec_clk880 = ~dec_clk880;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // channel monitor: reads every block at 19.2 kHz
  logic [30:0] ch_block;
  int          ch_blocks = 0;
  initial begin
    forever begin
      @(negedge channel);
      #(TE * 8.0);
      for (int slot = 1; slot <= 31; slot++) begin
        #(TE * 16.0);
        ch_block[31 - slot] = channel;
      end
      ch_blocks++;
    end
  end

  int n_corrections = 0;
  always @(posedge dec_clk) if (corrected) n_corrections++;

  // mechanism counters
  int m_mode[1:3] = '{0, 0, 0};
  int m_err_blocks = 0, m_three = 0, m_clean_with_gen = 0, m_damaged_chars = 0;

  string text = "THE QUICK BROWN FOX JUMPS OVER THE LAZY DOG 0123456789 SENT OK.";

  task automatic run_mode(input int mode, input int nchars);
    logic [7:0] c1, c2, r1, r2;
    logic [30:0] exp, diff;
    int n0, nerr;
    enc_in = (mode == 3); dec_in = (mode == 3); err_in = (mode >= 2);
    u_tty.rx_q.delete();
    for (int i = 0; i < nchars; i += 2) begin
      c1 = text[i % text.len()]; c2 = text[(i + 1) % text.len()];
      n0 = ch_blocks;
      u_tty.send_char(c1);
      u_tty.send_char(c2);
      u_tty.idle(1);
      chk(ch_blocks == n0 + 1, $sformatf("mode %0d pair %0d: one block on the channel", mode, i / 2));
      exp = encode({c2, c1});
      if (!enc_in) exp[14:0] = '0;
      diff = ch_block ^ exp;
      nerr = popcount31(diff);
      chk(err_in ? nerr <= 3 : nerr == 0, $sformatf("mode %0d: %0d errors in a block", mode, nerr));
      if (nerr > 0) m_err_blocks++;
      if (nerr == 3) m_three++;
      if (err_in && nerr == 0) m_clean_with_gen++;
      m_mode[mode]++;
    end
    u_tty.idle(25);                          // let the last pair be printed
    chk(u_tty.rx_q.size() == nchars, $sformatf("mode %0d: %0d of %0d characters printed", mode, u_tty.rx_q.size(), nchars));
    for (int i = 0; i < nchars && u_tty.rx_q.size() > 0; i++) begin
      r1 = u_tty.rx_q.pop_front();
      c1 = text[i % text.len()];
      if (mode == 2) begin
        if (r1 != c1) m_damaged_chars++;
      end else chk(r1 === c1, $sformatf("mode %0d char %0d: got %h exp %h", mode, i, r1, c1));
    end
  endtask

  initial begin
    repeat (4) @(posedge enc_clk880);
    repeat (4) @(posedge dec_clk880);
    rst = 0;
    u_tty.idle(3);
    run_mode(1, 8);
    run_mode(2, 62);
    chk(m_damaged_chars == 23, $sformatf("mode 2: %0d of 62 characters damaged, expected 23", m_damaged_chars));
    run_mode(3, 62);
    chk(u_tty.rx_bad == 0, "teletype framing");
    $display("mechanisms: mode1=%0d mode2=%0d mode3=%0d blocks, error blocks=%0d, three-error blocks=%0d, clean blocks with generator in=%0d, damaged uncoded chars=%0d, corrections=%0d",
             m_mode[1], m_mode[2], m_mode[3], m_err_blocks, m_three, m_clean_with_gen, m_damaged_chars, n_corrections);
    chk(m_mode[1] > 0 && m_mode[2] > 0 && m_mode[3] > 0, "all three modes ran");
    chk(m_err_blocks > 0, "errors inserted");
    chk(m_three > 0, "three-error blocks");
    chk(m_clean_with_gen > 0, "control bit suppressed a block");
    chk(m_damaged_chars > 0, "uncoded errors reach the teletype");
    chk(n_corrections > 0, "decoder corrected bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge enc_clk880);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
