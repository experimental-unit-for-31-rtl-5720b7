// tty_output -- teletype output control and 22-bit output register,
// clocked by the decoder station's 880 Hz oscillator.
//
// When xfer_tgl changes (it comes from the 307.2 kHz decoder side and is
// synchronized here), the 16 decoded data bits are loaded as two complete
// teletype characters: start unit (0), eight data bits least significant
// first, two stop units (1), for each character, 22 units in all. The
// register is then shifted out one unit every TTY_DIV ticks (110 Hz),
// shifting marks in behind, and the line returns to mark. data must stay
// stable for a few 880 Hz ticks after the toggle; the decoder holds it for
// a whole block. A toggle that arrives while a pair is still being sent is
// remembered and served when the pair is finished (this design's choice).
`timescale 1ns/1ps
module tty_output
  import ml_pkg::*;
#(
  parameter int unsigned TTY_DIV = 8    // 880 Hz / 110 Hz
) (
  input  logic        clk,       // 880 Hz
  input  logic        rst,
  input  logic [15:0] data,      // decoded word, data[7:0] = first character
  input  logic        xfer_tgl,  // asynchronous, toggles on a new word
  output logic        tty,       // teletype line, mark = 1
  output logic        busy
);
  logic                       tgl_s, tgl_seen, pending;
  logic [21:0]                sr;
  logic [$clog2(TTY_DIV)-1:0] cnt;
  logic [4:0]                 nunit;

  sync2 u_sync (.clk(clk), .rst(rst), .d(xfer_tgl), .q(tgl_s));

  assign tty = busy ? sr[0] : MARK;

  always_ff @(posedge clk) begin
    if (rst) begin
      tgl_seen <= 1'b0;
      pending  <= 1'b0;
      busy     <= 1'b0;
      sr       <= '1;
      cnt      <= '0;
      nunit    <= '0;
    end else begin
      if (tgl_s != tgl_seen) begin
        tgl_seen <= tgl_s;
        pending  <= 1'b1;
      end
      if (!busy && pending) begin
        pending <= 1'b0;
        busy    <= 1'b1;
        sr      <= {MARK, MARK, data[15:8], SPACE, MARK, MARK, data[7:0], SPACE};
        cnt     <= '0;
        nunit   <= '0;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
        if (cnt == $bits(cnt)'(TTY_DIV - 1)) begin
          sr    <= {MARK, sr[21:1]};
          nunit <= nunit + 1'b1;
          if (nunit == 5'd21) busy <= 1'b0;
        end
      end
    end
  end
endmodule
