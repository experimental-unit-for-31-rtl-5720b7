// tb_decoder_register -- shifts a start bit and a received block (codeword
// plus 0..3 errors) in from the line, then runs 16 feedback shifts and
// compares the decoded digits with the data bits. Also checks that with
// correction off the raw received data bits come out.
`timescale 1ns/1ps
module tb_decoder_register;
  import tb_code_pkg::*;
  logic clk = 0, rst = 1, shift = 0, sel_feedback = 0, line_bit = 1, correct_en = 1;
  logic decoded, corrected;
  logic [30:0] r;
  int checks = 0, failures = 0, ncorr = 0;

  decoder_register dut (.clk(clk), .rst(rst), .shift(shift), .sel_feedback(sel_feedback),
                        .line_bit(line_bit), .correct_en(correct_en), .decoded(decoded),
                        .corrected(corrected), .r(r));
  always #5 clk = ~clk;

  initial begin
    logic [15:0] d;
    logic [30:0] c, e, rx;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 300; t++) begin
      correct_en = (t % 5 != 4);
      d = 16'($urandom);
      c = encode(d);
      e = '0;
      for (int k = 0; k < int'($urandom_range(3)); k++) e[$urandom_range(30)] = 1'b1;
      rx = c ^ e;
      // start bit then the 31 bits, c_30 first
      @(negedge clk); sel_feedback = 0; shift = 1; line_bit = 1'b0;
      for (int slot = 1; slot <= 31; slot++) begin
        @(negedge clk); line_bit = line_bit_of(rx, slot);
      end
      @(negedge clk); shift = 0;
      checks++;
      if (r !== rx) begin failures++; $display("FAIL received r=%h exp %h", r, rx); end
      sel_feedback = 1;
      for (int k = 0; k < 16; k++) begin
        shift = 1;
        checks++;
        if (decoded !== (correct_en ? d[k] : rx[30-k])) begin
          failures++;
          $display("FAIL t=%0d k=%0d decoded=%b d=%b", t, k, decoded, d[k]);
        end
        if (corrected) ncorr++;
        @(negedge clk);
      end
      shift = 0;
    end
    checks++;
    if (ncorr == 0) begin failures++; $display("FAIL no correction seen"); end
    $display("corrections=%0d", ncorr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic line_bit_of(input logic [30:0] v, input int slot);
    return v[31 - slot];
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
