// tb_majority_logic -- codewords of the (31,16) code (random data times
// g(X)) with 0..3 random errors. With at most three errors the second-step
// decision must equal the error on bit 30, and each first-step decision
// must equal the parity of the errors on its set's common positions.
`timescale 1ns/1ps
module tb_majority_logic;
  import tb_code_pkg::*;
  logic [30:0] r;
  logic [5:0]  step1;
  logic        err30;
  int checks = 0, failures = 0;
  int hits30 = 0;

  // common positions of the six sets, from the published check equations
  localparam int COMMON [6][4] = '{'{0,7,11,30}, '{1,16,27,30}, '{2,23,25,30},
                                   '{4,10,17,30}, '{5,24,29,30}, '{6,8,22,30}};

  majority_logic dut (.r(r), .step1(step1), .err30(err30));

  initial begin
    logic [30:0] c, e;
    for (int t = 0; t < 4000; t++) begin
      c = encode(16'($urandom));
      e = '0;
      for (int k = 0; k < int'($urandom_range(3)); k++) e[$urandom_range(30)] = 1'b1;
      if (t % 8 == 0) e[30] = 1'b1;         // make bit-30 errors frequent
      if (popcount31(e) > 3) e[30] = 1'b0;
      r = c ^ e;
      #1;
      checks++;
      if (err30 !== e[30]) begin
        failures++;
        $display("FAIL err30 c=%h e=%h got %b", c, e, err30);
      end
      if (e[30]) hits30++;
      for (int s = 0; s < 6; s++) begin
        checks++;
        if (step1[s] !== (e[COMMON[s][0]] ^ e[COMMON[s][1]] ^ e[COMMON[s][2]] ^ e[COMMON[s][3]])) begin
          failures++;
          $display("FAIL step1[%0d] e=%h", s, e);
        end
      end
    end
    checks++;
    if (hits30 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
