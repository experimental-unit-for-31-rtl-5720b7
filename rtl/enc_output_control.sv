// enc_output_control -- output control of the encoder station
// (307.2 kHz clock).
//
// When the input control toggles go_tgl (synchronized here), the two
// characters are loaded into the encoder register and a block is sent at
// 19.2 kHz, BIT_DIV = 16 clocks per bit: first one start bit (space), then
// the N = 31 code bits, then the line rests at mark, which is also the
// stop signal. The encoder register is shifted at the end of every code bit
// (31 shifts). While the start bit is on the line the error generator's
// register is stepped four times on consecutive 307.2 kHz clocks and
// counters A, B and C are loaded with the values after the first three
// steps. The counters are stepped
// down at the end of the start bit and of each code bit but the last, so
// during code bit n a counter loaded with n reads zero. With err_en = 1 the
// error pulse inverts the bit on the line. line is registered, so it lags
// the internal sequence by one clock. A block takes (N+1)*BIT_DIV = 512
// clocks, about 1.67 ms.
`timescale 1ns/1ps
module enc_output_control
  import ml_pkg::*;
#(
  parameter int unsigned BIT_DIV = 16   // 307.2 kHz / 19.2 kHz
) (
  input  logic clk,
  input  logic rst,
  input  logic go_tgl,      // asynchronous, toggles when two characters are ready
  input  logic enc_bit,     // output end of the encoder register
  input  logic err,         // error pulse from the error generator
  input  logic err_en,      // error generator switched in
  output logic load,        // parallel transfer into the encoder register
  output logic shift,       // shift the encoder register
  output logic lfsr_shift,  // step the error address register
  output logic tr_a,
  output logic tr_b,
  output logic tr_c,
  output logic count_down,  // step the error counters
  output logic line,        // data channel, mark = 1
  output logic busy
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA} state_t;
  state_t                     state;
  localparam int unsigned PW = $clog2(BIT_DIV);
  localparam logic [PW-1:0] PH_LAST = PW'(BIT_DIV - 1);
  logic [PW-1:0]              phase;
  logic [4:0]                 slot;     // code bit being sent, 1..31
  logic                       tgl_s, tgl_seen;
  logic                       line_d;

  sync2 u_sync (.clk(clk), .rst(rst), .d(go_tgl), .q(tgl_s));

  assign busy = (state != S_IDLE);

  always_comb begin
    load       = (state == S_IDLE) && (tgl_s != tgl_seen);
    shift      = 1'b0;
    lfsr_shift = 1'b0;
    tr_a       = 1'b0;
    tr_b       = 1'b0;
    tr_c       = 1'b0;
    count_down = 1'b0;
    line_d     = MARK;
    unique case (state)
      S_START: begin
        line_d     = SPACE;
        // four steps on consecutive clocks; each counter takes the value
        // of the previous step in the same clock as the next step
        lfsr_shift = (phase >= PW'(1)) && (phase <= PW'(4));
        tr_a       = (phase == PW'(2));
        tr_b       = (phase == PW'(3));
        tr_c       = (phase == PW'(4));
        count_down = (phase == PH_LAST);
      end
      S_DATA: begin
        line_d     = enc_bit ^ (err_en & err);
        shift      = (phase == PH_LAST);
        count_down = (phase == PH_LAST) && (slot != 5'(N));
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      phase    <= '0;
      slot     <= '0;
      tgl_seen <= 1'b0;
      line     <= MARK;
    end else begin
      line <= line_d;
      unique case (state)
        S_IDLE: if (load) begin
          tgl_seen <= tgl_s;
          state    <= S_START;
          phase    <= '0;
        end
        S_START: begin
          phase <= (phase == PH_LAST) ? '0 : phase + 1'b1;
          if (phase == PH_LAST) begin
            state <= S_DATA;
            slot  <= 5'd1;
          end
        end
        S_DATA: begin
          phase <= (phase == PH_LAST) ? '0 : phase + 1'b1;
          if (phase == PH_LAST) begin
            slot <= slot + 1'b1;
            if (slot == 5'(N)) state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
  // a new pair is only taken between blocks
  a_load_idle: assert property (@(posedge clk) disable iff (rst) load |-> (state == S_IDLE));
endmodule
