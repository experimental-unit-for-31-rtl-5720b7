// tty_model -- behavioural model of a 110-baud start-stop teletype line
// (ASR-33 style: one start unit, eight data bits least significant first,
// two stop units; 11 units of 1/110 s per character). Not synthesizable.
// send_char() drives tx; every character seen on rx is appended to rx_q,
// and rx_bad counts characters whose start or stop units were wrong.
`timescale 1ns/1ps
module tty_model #(
  parameter real UNIT_NS = 1.0e9 / 110.0
) (
  output logic tx,
  input  logic rx
);
  logic [7:0] rx_q[$];
  int         rx_bad = 0;

  initial tx = 1'b1;

  task automatic send_char(input logic [7:0] ch);
    tx = 1'b0;
    #(UNIT_NS);
    for (int i = 0; i < 8; i++) begin
      tx = ch[i];
      #(UNIT_NS);
    end
    tx = 1'b1;
    #(2.0 * UNIT_NS);
  endtask

  task automatic idle(input int units);
    tx = 1'b1;
    #(units * UNIT_NS);
  endtask

  initial begin : receiver
    logic [7:0] ch;
    forever begin
      @(negedge rx);
      #(0.5 * UNIT_NS);
      if (rx != 1'b0) continue;       // glitch, not a start unit
      for (int i = 0; i < 8; i++) begin
        #(UNIT_NS);
        ch[i] = rx;
      end
      #(UNIT_NS);
      if (rx != 1'b1) rx_bad++;
      rx_q.push_back(ch);
    end
  end
endmodule
