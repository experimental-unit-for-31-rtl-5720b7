// sync2 -- two-flip-flop synchronizer for a single asynchronous level.
// The output follows the input two clk edges later. Used wherever a signal
// crosses from one station's oscillator to another clock (the line, and the
// toggle flags that announce a parallel transfer). RESET_VAL sets the value
// both stages take while rst is high.
`timescale 1ns/1ps
module sync2 #(
  parameter logic RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
