// tty_input -- teletype input control and 16-bit input shift register,
// clocked by the encoder station's 880 Hz oscillator.
//
// A teletype character is 11 units of 1/110 s: a start unit (space), eight
// data bits sent least significant first, and two stop units (mark). When
// the synchronized line goes to space a 3-bit counter starts counting 880 Hz
// ticks; every time it reaches SAMPLE_AT (count 4) the line is sampled,
// which falls near the middle of each unit. A second counter numbers these
// samples 1..11; samples 1, 10 and 11 (start and stops) are not shifted in.
// After the second character's data bits, at its first stop sample,
// xfer_tgl toggles: the encoder station then loads data into the encoder
// register. data stays unchanged until the next character's first data
// bit, more than two units later, so the 307.2 kHz side can take it after
// synchronizing only the toggle. After sample 11 the control waits for the
// next start transition.
//
// data[7:0] is the first character, data[15:8] the second. The two-flop
// line synchronizer and the toggle handshake are this design's choices.
`timescale 1ns/1ps
module tty_input
  import ml_pkg::*;
#(
  parameter int unsigned TTY_DIV   = 8,  // 880 Hz / 110 Hz
  parameter int unsigned SAMPLE_AT = 4   // counter value that samples a unit
) (
  input  logic        clk,       // 880 Hz
  input  logic        rst,
  input  logic        tty,       // teletype line, mark = 1
  output logic [15:0] data,      // two received characters
  output logic        xfer_tgl,  // toggles when data holds two new characters
  output logic        busy       // a character is being read in
);
  logic                       line_s;
  logic [$clog2(TTY_DIV)-1:0] cnt;
  logic [3:0]                 unit;    // sample number within a character
  logic                       second;  // reading the second character
  logic                       sample;

  sync2 #(.RESET_VAL(MARK)) u_sync (.clk(clk), .rst(rst), .d(tty), .q(line_s));

  // cnt counts ticks since line_s went to space; it is loaded with 2 on the
  // tick that detects the transition, which is already one tick after it.
  assign sample = busy && (cnt == SAMPLE_AT[$clog2(TTY_DIV)-1:0]);

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      cnt      <= '0;
      unit     <= '0;
      second   <= 1'b0;
      data     <= '0;
      xfer_tgl <= 1'b0;
    end else if (!busy) begin
      if (line_s == SPACE) begin
        busy <= 1'b1;
        cnt  <= 2;
        unit <= '0;
      end
    end else begin
      cnt <= cnt + 1'b1;
      if (sample) begin
        unit <= unit + 1'b1;
        // samples 2..9 (unit 1..8 before the increment) are data bits
        if (unit >= 4'd1 && unit <= 4'd8) data <= {line_s, data[15:1]};
        if (unit == 4'd9 && second) xfer_tgl <= ~xfer_tgl;
        if (unit == 4'd10) begin
          busy   <= 1'b0;
          second <= ~second;
        end
      end
    end
  end
endmodule
