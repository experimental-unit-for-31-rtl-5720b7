// decoded_sipo -- 16-bit serial-in, parallel-out register for decoded data.
//
// Each shift takes din in at the top and moves the word one place down, so
// after 16 shifts the first bit taken in sits in q[0] and the last in q[15].
// The decoder delivers data bits in line order, so q[7:0] is the first
// character (least significant bit first on the line) and q[15:8] the second.
`timescale 1ns/1ps
module decoded_sipo #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         shift,
  input  logic         din,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)        q <= '0;
    else if (shift) q <= {din, q[W-1:1]};
  end
endmodule
