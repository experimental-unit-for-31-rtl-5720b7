// tb_encoder_register -- loads random words, shifts 31 times and compares
// the serial output with the systematic codeword computed by dividing by
// g(X). With fb_en = 0 the 15 parity places must be zero.
`timescale 1ns/1ps
module tb_encoder_register;
  import tb_code_pkg::*;
  logic clk = 0, rst = 1, load = 0, shift = 0, fb_en = 1;
  logic [15:0] din;
  logic sout;
  int checks = 0, failures = 0;

  encoder_register dut (.clk(clk), .rst(rst), .load(load), .din(din),
                        .shift(shift), .fb_en(fb_en), .sout(sout));
  always #5 clk = ~clk;

  initial begin
    logic [30:0] c;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 200; t++) begin
      fb_en = (t % 4 != 3);
      din = (t == 0) ? 16'h0001 : 16'($urandom);
      c = fb_en ? encode(din) : {din[0], din[1], din[2], din[3], din[4], din[5], din[6], din[7],
                                 din[8], din[9], din[10], din[11], din[12], din[13], din[14], din[15], 15'b0};
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      for (int slot = 1; slot <= 31; slot++) begin
        checks++;
        if (sout !== line_bit(c, slot)) begin
          failures++;
          $display("FAIL t=%0d slot=%0d got %b exp %b", t, slot, sout, line_bit(c, slot));
        end
        shift = 1;
        @(negedge clk);
        shift = 0;
      end
    end
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
