// tb_decoder_station -- sends start-stop blocks on the line at 19.2 kHz
// from a free-running source (not the station clock): codewords of random
// character pairs with 0..3 random errors. With dec_in = 1 the decoded
// word and the two characters printed by the teletype model must be the
// sent pair; with dec_in = 0 the raw received data bits. The decoded word
// must be ready within two bit times (0.1 ms) after the block's last bit.
`timescale 1ns/1ps
module tb_decoder_station;
  import tb_code_pkg::*;
  localparam real TCLK = 1.0e9 / 307200.0;
  localparam real T880 = 1.0e9 / 880.0;
  localparam real TBIT = 1.0e9 / 19200.0 * 1.0003;   // a slightly fast sender
  logic clk = 0, clk880 = 0, rst = 1, dec_in = 1, line = 1;
  logic tty, word_tgl, corrected, tx_unused;
  logic [15:0] word;
  int checks = 0, failures = 0, ncorr = 0;

  tty_model u_tty (.tx(tx_unused), .rx(tty));
  decoder_station dut (.clk(clk), .clk880(clk880), .rst(rst), .dec_in(dec_in), .line(line),
                       .tty(tty), .word(word), .word_tgl(word_tgl), .corrected(corrected));
  always #(TCLK / 2.0) clk = ~clk;
  always #(T880 / 2.0) clk880 = ~clk880;
  always @(posedge clk) if (corrected) ncorr++;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [15:0] d, expw;
    logic [30:0] c, e, rx;
    logic [7:0] a, b;
    logic tgl0;
    real t_end, t_tgl;
    repeat (4) @(posedge clk880);
    rst = 0;
    #(1.0e6);
    for (int p = 0; p < 30; p++) begin
      dec_in = (p % 5 != 4);
      d = 16'($urandom);
      c = encode(d);
      e = '0;
      for (int k = 0; k < int'($urandom_range(3)); k++) e[$urandom_range(30)] = 1'b1;
      if (p % 3 == 0) e = (31'b1 << 30) | (31'b1 << 20) | (31'b1 << 3);   // three errors
      rx = c ^ e;
      for (int k = 0; k < 16; k++) expw[k] = dec_in ? d[k] : rx[30-k];
      tgl0 = word_tgl;
      line = 0; #(TBIT);
      for (int slot = 1; slot <= 31; slot++) begin line = rx[31 - slot]; #(TBIT); end
      line = 1;
      t_end = $realtime;
      fork
        begin wait (word_tgl != tgl0); t_tgl = $realtime; end
        #(1.0e6);
      join_any
      disable fork;
      chk(word_tgl != tgl0, $sformatf("block %0d decoded", p));
      chk((t_tgl - t_end) < 2.0 * TBIT, $sformatf("block %0d ready %f us after its last bit", p, (t_tgl - t_end) / 1000.0));
      chk(word === expw, $sformatf("block %0d: word %h exp %h (errors %h)", p, word, expw, e));
      #(23.0 * 1.0e9 / 110.0);
      chk(u_tty.rx_q.size() == 2, $sformatf("block %0d: %0d characters printed", p, u_tty.rx_q.size()));
      if (u_tty.rx_q.size() == 2) begin
        a = u_tty.rx_q.pop_front(); b = u_tty.rx_q.pop_front();
        chk({b, a} === expw, $sformatf("block %0d: printed %h%h exp %h", p, b, a, expw));
      end
      u_tty.rx_q.delete();
    end
    chk(u_tty.rx_bad == 0, "teletype framing");
    chk(ncorr > 0, "corrections happened");
    $display("corrections=%0d", ncorr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000) @(posedge clk880);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
