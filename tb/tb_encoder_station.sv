// tb_encoder_station -- a teletype model types pairs of characters; the
// line is read at 19.2 kHz (16 station clocks per bit). Every block must
// be a start bit followed by the systematic (31,16) codeword of the pair
// (first character's least significant bit first). With err_in = 1 the
// received block must differ from it exactly at the addresses the error
// generator's published sequence gives for that block (or nowhere, when
// the block's control bit is set). With enc_in = 0 the parity places are
// zero. A block must take 32 bit times.
`timescale 1ns/1ps
module tb_encoder_station;
  import tb_code_pkg::*;
  localparam real TCLK = 1.0e9 / 307200.0;
  localparam real T880 = 1.0e9 / 880.0;
  logic clk = 0, clk880 = 0, rst = 1, enc_in = 1, err_in = 0;
  logic tx, line, busy;
  int checks = 0, failures = 0;

  tty_model u_tty (.tx(tx), .rx(1'b1));
  encoder_station dut (.clk(clk), .clk880(clk880), .rst(rst), .enc_in(enc_in), .err_in(err_in),
                       .tty(tx), .line(line), .busy(busy));
  always #(TCLK / 2.0) clk = ~clk;
  always #(T880 / 2.0) clk880 = ~clk880;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // block receiver on the station clock
  logic [30:0] rx_block;
  int          nblocks = 0, blk_len;
  initial begin
    forever begin
      @(negedge line);
      repeat (8) @(negedge clk);
      for (int slot = 1; slot <= 31; slot++) begin
        repeat (16) @(negedge clk);
        rx_block[31 - slot] = line;
      end
      repeat (16) @(negedge clk);
      if (line !== 1'b1) begin failures++; $display("FAIL stop level"); end
      nblocks++;
    end
  end

  initial begin
    logic [7:0] c1, c2;
    logic [30:0] exp, diff;
    int a, b, c, n0;
    repeat (4) @(posedge clk880);
    rst = 0;
    u_tty.idle(2);
    for (int p = 0; p < 16; p++) begin
      enc_in = (p % 4 != 3);
      err_in = (p >= 8);
      c1 = 8'($urandom); c2 = 8'($urandom);
      n0 = nblocks;
      u_tty.send_char(c1);
      u_tty.send_char(c2);
      u_tty.idle(1);
      chk(nblocks == n0 + 1, $sformatf("pair %0d: %0d blocks", p, nblocks - n0));
      exp = encode({c2, c1});
      if (!enc_in) exp[14:0] = '0;
      diff = rx_block ^ exp;
      a = SEQ[(4*p) % 31]; b = SEQ[(4*p+1) % 31]; c = SEQ[(4*p+2) % 31];
      if (!err_in || b >= 16) chk(diff == '0, $sformatf("pair %0d: block %h exp %h", p, rx_block, exp));
      else chk(diff == ((31'b1 << (31-a)) | (31'b1 << (31-b)) | (31'b1 << (31-c))),
               $sformatf("pair %0d: error pattern %h (addresses %0d %0d %0d)", p, diff, a, b, c));
    end
    // block length in station clocks
    fork
      begin u_tty.send_char(8'h41); u_tty.send_char(8'h42); end
      begin
        @(negedge line);
        blk_len = 0;
        while (busy || !line) begin @(posedge clk); blk_len++; end
      end
    join
    chk(blk_len >= 511 && blk_len <= 514, $sformatf("block length %0d clocks (1.67 ms)", blk_len));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) @(posedge clk880);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
