// tb_check_xor_network -- random inputs; each check sum must equal the XOR
// of the four common bits and that check's four other bits.
`timescale 1ns/1ps
module tb_check_xor_network;
  logic [3:0]      common;
  logic [5:0][3:0] other;
  logic [5:0]      sums;
  int checks = 0, failures = 0;

  check_xor_network dut (.common(common), .other(other), .sums(sums));

  initial begin
    for (int t = 0; t < 2000; t++) begin
      common = 4'($urandom);
      other  = 24'($urandom);
      #1;
      for (int j = 0; j < 6; j++) begin
        checks++;
        if (sums[j] !== ($countones({common, other[j]}) % 2 == 1)) begin
          failures++;
          $display("FAIL common=%b other=%b j=%0d", common, other[j], j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
