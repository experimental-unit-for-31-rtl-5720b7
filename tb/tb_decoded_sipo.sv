// tb_decoded_sipo -- shifts random 16-bit words in, first bit first, and
// expects the first bit in q[0]; holding shift low must keep the word.
`timescale 1ns/1ps
module tb_decoded_sipo;
  logic clk = 0, rst = 1, shift = 0, din = 0;
  logic [15:0] q;
  int checks = 0, failures = 0;

  decoded_sipo dut (.clk(clk), .rst(rst), .shift(shift), .din(din), .q(q));
  always #5 clk = ~clk;

  initial begin
    logic [15:0] w;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 50; t++) begin
      w = 16'($urandom);
      for (int k = 0; k < 16; k++) begin
        @(negedge clk); shift = 1; din = w[k];
      end
      @(negedge clk); shift = 0;
      checks++;
      if (q !== w) begin failures++; $display("FAIL q=%h exp %h", q, w); end
      repeat (3) @(negedge clk);
      checks++;
      if (q !== w) begin failures++; $display("FAIL hold q=%h exp %h", q, w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
