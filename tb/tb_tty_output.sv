// tb_tty_output -- hands 16-bit words to the output control (toggling
// xfer_tgl from another clock) and reads the teletype line with a 110-baud
// receiver model. Each word must come out as two characters, first
// data[7:0] then data[15:8], with correct start and stop units, and the
// pair must take 22 units (0.2 s).
`timescale 1ns/1ps
module tb_tty_output;
  localparam real T880 = 1.0e9 / 880.0;
  localparam real UNIT = 1.0e9 / 110.0;
  logic clk = 0, rst = 1, xfer_tgl = 0;
  logic [15:0] data = '0;
  logic tty, busy, tx_unused;
  int checks = 0, failures = 0;

  tty_model u_tty (.tx(tx_unused), .rx(tty));
  tty_output dut (.clk(clk), .rst(rst), .data(data), .xfer_tgl(xfer_tgl), .tty(tty), .busy(busy));
  always #(T880 / 2.0) clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [15:0] w;
    real t0, t1;
    logic [7:0] a, b;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (3) @(posedge clk);
    chk(tty === 1'b1, "idle line at mark");
    for (int p = 0; p < 20; p++) begin
      w = (p == 0) ? 16'hFF00 : 16'($urandom);
      #(3000.0 + $urandom_range(1000));
      data = w;
      xfer_tgl = ~xfer_tgl;
      @(negedge tty); t0 = $realtime;
      wait (!busy); t1 = $realtime;
      #(UNIT);
      chk(u_tty.rx_q.size() == 2, $sformatf("pair %0d: %0d characters", p, u_tty.rx_q.size()));
      if (u_tty.rx_q.size() == 2) begin
        a = u_tty.rx_q.pop_front(); b = u_tty.rx_q.pop_front();
        chk({b, a} === w, $sformatf("pair %0d: got %h%h exp %h", p, b, a, w));
      end
      u_tty.rx_q.delete();
      chk(u_tty.rx_bad == 0, "framing");
      chk((t1 - t0) > 21.5 * UNIT && (t1 - t0) < 22.5 * UNIT, $sformatf("pair length %f units", (t1 - t0) / UNIT));
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
