// tb_tty_input -- a teletype model sends characters back to back at
// 110 baud while the block runs on an 880 Hz clock. After every second
// character the word must hold the two characters (first in data[7:0])
// and xfer_tgl must toggle once, during the second character's stop units
// (between 9 and 11 units after its start edge).
`timescale 1ns/1ps
module tb_tty_input;
  localparam real T880 = 1.0e9 / 880.0;
  localparam real UNIT = 1.0e9 / 110.0;
  logic clk = 0, rst = 1;
  logic tx, busy, xfer_tgl;
  logic [15:0] data;
  int checks = 0, failures = 0;

  tty_model u_tty (.tx(tx), .rx(1'b1));
  tty_input dut (.clk(clk), .rst(rst), .tty(tx), .data(data), .xfer_tgl(xfer_tgl), .busy(busy));
  always #(T880 / 2.0) clk = ~clk;

  real t_tgl;
  int  ntgl = 0;
  always @(xfer_tgl) if (!rst) begin t_tgl = $realtime; ntgl++; end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [7:0] c1, c2;
    real t2;
    int n0;
    repeat (3) @(posedge clk);
    rst = 0;
    u_tty.idle(3);
    #(T880 * 0.37);
    for (int p = 0; p < 24; p++) begin
      c1 = 8'($urandom); c2 = 8'($urandom);
      if (p == 0) begin c1 = 8'h00; c2 = 8'hFF; end
      n0 = ntgl;
      u_tty.send_char(c1);
      chk(ntgl == n0, "no transfer after one character");
      t2 = $realtime;
      u_tty.send_char(c2);
      chk(ntgl == n0 + 1, $sformatf("pair %0d: one transfer (%0d)", p, ntgl - n0));
      chk(data === {c2, c1}, $sformatf("pair %0d: data %h exp %h", p, data, {c2, c1}));
      chk((t_tgl - t2) > 9.0 * UNIT && (t_tgl - t2) < 11.0 * UNIT,
          $sformatf("pair %0d: transfer at %f units", p, (t_tgl - t2) / UNIT));
      if (p % 6 == 5) u_tty.idle(1 + p % 3);
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
