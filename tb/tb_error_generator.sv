// tb_error_generator -- drives the error generator the way the output
// control does (four register steps and loads of A, B, C, then 31 bits
// with a count-down after each but the last) for 62 blocks. Checks: the
// address register follows the published 31-value sequence; errors fall
// exactly on the addresses held by A, B and C (taken from the published
// sequence) in blocks whose control bit allows them; over one period of 31
// blocks, 23 of the 62 characters carried in the data bits get errors.
`timescale 1ns/1ps
module tb_error_generator;
  import tb_code_pkg::*;
  logic clk = 0, rst = 1;
  logic lfsr_shift = 0, tr_a = 0, tr_b = 0, tr_c = 0, count_down = 0;
  logic err;
  logic [4:0] addr;
  int checks = 0, failures = 0;

  error_generator dut (.clk(clk), .rst(rst), .lfsr_shift(lfsr_shift), .tr_a(tr_a), .tr_b(tr_b),
                       .tr_c(tr_c), .count_down(count_down), .err(err), .addr(addr));
  always #5 clk = ~clk;

  task automatic pulse(ref logic s);
    s = 1; @(negedge clk); s = 0;
  endtask

  initial begin
    int nshift = 0, char_err = 0, blocks_err = 0;
    int a, b, c;
    logic [31:1] got, exp;
    logic en;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    checks++;
    if (addr !== 5'd1) begin failures++; $display("FAIL reset value %0d", addr); end
    for (int blk = 0; blk < 62; blk++) begin
      for (int s = 0; s < 4; s++) begin
        pulse(lfsr_shift);
        checks++;
        if (addr !== 5'(SEQ[nshift % 31])) begin
          failures++; $display("FAIL shift %0d addr=%0d exp %0d", nshift, addr, SEQ[nshift % 31]);
        end
        nshift++;
        if (s == 0) pulse(tr_a);
        if (s == 1) pulse(tr_b);
        if (s == 2) pulse(tr_c);
      end
      a = SEQ[(4*blk) % 31]; b = SEQ[(4*blk+1) % 31]; c = SEQ[(4*blk+2) % 31];
      en = (b < 16);    // control bit: the bit shifted out when C is loaded
      pulse(count_down);
      got = '0; exp = '0;
      for (int slot = 1; slot <= 31; slot++) begin
        got[slot] = err;
        if (slot != 31) pulse(count_down); else @(negedge clk);
      end
      if (en) begin exp[a] = 1; exp[b] = 1; exp[c] = 1; end
      checks++;
      if (got !== exp) begin failures++; $display("FAIL blk %0d got %b exp %b", blk, got, exp); end
      if (blk < 31) begin
        if (|got[8:1])  char_err++;
        if (|got[16:9]) char_err++;
        if (|got) blocks_err++;
      end
    end
    checks++;
    if (char_err != 23) begin failures++; $display("FAIL characters with errors %0d, expected 23", char_err); end
    $display("characters with data errors per 62: %0d, blocks with errors per 31: %0d", char_err, blocks_err);
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
