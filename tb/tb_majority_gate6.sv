// tb_majority_gate6 -- exhaustive test of the six-input majority gate:
// all 64 input patterns against "at least four ones".
`timescale 1ns/1ps
module tb_majority_gate6;
  logic [5:0] in;
  logic       out;
  int checks = 0, failures = 0;

  majority_gate6 dut (.in(in), .out(out));

  initial begin
    for (int v = 0; v < 64; v++) begin
      in = 6'(v);
      #1;
      checks++;
      if (out !== ($countones(in) >= 4)) begin
        failures++;
        $display("FAIL in=%b out=%b", in, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
