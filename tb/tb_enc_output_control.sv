// tb_enc_output_control -- toggles go_tgl and checks one block on the
// line: 16 clocks of start bit, then 31 bits of 16 clocks each taken from
// a model encoder register, then mark. Counts the pulses per block (one
// load, 31 register shifts, 4 address steps, one each of TR A/B/C, 31
// count-downs), checks the block length of 512 clocks (1.67 ms at
// 307.2 kHz), and with err_en = 1 that a forced error inverts the line.
`timescale 1ns/1ps
module tb_enc_output_control;
  logic clk = 0, rst = 1, go_tgl = 0, enc_bit, err = 0, err_en = 0;
  logic load, shift, lfsr_shift, tr_a, tr_b, tr_c, count_down, line, busy;
  int checks = 0, failures = 0;
  logic [30:0] model;            // model register, model[0] on the output end
  int n_load, n_shift, n_lfsr, n_tra, n_trb, n_trc, n_cd;

  enc_output_control dut (.clk(clk), .rst(rst), .go_tgl(go_tgl), .enc_bit(enc_bit), .err(err),
    .err_en(err_en), .load(load), .shift(shift), .lfsr_shift(lfsr_shift), .tr_a(tr_a),
    .tr_b(tr_b), .tr_c(tr_c), .count_down(count_down), .line(line), .busy(busy));
  always #5 clk = ~clk;

  logic [30:0] pattern;
  assign enc_bit = model[0];
  always_ff @(posedge clk) begin
    if (load) model <= pattern;
    else if (shift) model <= {1'b0, model[30:1]};
    n_load  <= n_load  + int'(load);
    n_shift <= n_shift + int'(shift);
    n_lfsr  <= n_lfsr  + int'(lfsr_shift);
    n_tra   <= n_tra   + int'(tr_a);
    n_trb   <= n_trb   + int'(tr_b);
    n_trc   <= n_trc   + int'(tr_c);
    n_cd    <= n_cd    + int'(count_down);
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int t0, len;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int b = 0; b < 6; b++) begin
      pattern = 31'($urandom);
      err_en  = (b >= 3);
      n_load = 0; n_shift = 0; n_lfsr = 0; n_tra = 0; n_trb = 0; n_trc = 0; n_cd = 0;
      repeat (20) @(negedge clk);
      chk(line === 1'b1, "idle line is mark");
      go_tgl = ~go_tgl;
      @(negedge line);
      repeat (8) @(negedge clk);          // middle of the start bit
      chk(line === 1'b0, "start bit");
      for (int slot = 1; slot <= 31; slot++) begin
        err = err_en && ($urandom_range(3) == 0);
        repeat (16) @(negedge clk);       // middle of code bit 'slot'
        chk(line === (pattern[slot-1] ^ err), $sformatf("block %0d bit %0d", b, slot));
      end
      err = 0;
      wait (!busy);
      repeat (2) @(negedge clk);
      chk(line === 1'b1, "stop level");
      len = 0;
      chk(n_load == 1 && n_shift == 31 && n_lfsr == 4 && n_tra == 1 && n_trb == 1 && n_trc == 1 && n_cd == 31,
          $sformatf("pulse counts %0d %0d %0d %0d %0d %0d %0d", n_load, n_shift, n_lfsr, n_tra, n_trb, n_trc, n_cd));
    end
    // block length: time from line going to space to the line at mark for good
    go_tgl = ~go_tgl;
    @(negedge line);
    t0 = $time;
    wait (!busy);
    @(posedge clk); #1;
    len = ($time - t0 + 5) / 10;
    chk(len == 512 || len == 513, $sformatf("block length %0d clocks", len));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
