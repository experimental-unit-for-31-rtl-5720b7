// decoder_control -- timing of the receiving station (307.2 kHz clock).
//
// The line idles at mark (1). A mark-to-space transition starts a block:
// the control then samples the line in the middle of each 19.2 kHz bit time
// (BIT_DIV = 16 clocks per bit, sample BIT_DIV/2 clocks after the edge) and
// shifts the decoder register once per sample, N+1 = 32 times, so the start
// bit passes through and drops off the right end. It then switches the
// register to feedback and shifts it K = 16 times on consecutive 307.2 kHz
// clocks, shifting each decoded digit into the 16-bit register; this takes
// one 19.2 kHz bit time (about 52 us). Finally xfer_tgl toggles to tell the
// output side, which runs on its own 880 Hz clock, that a new 16-bit word
// is ready. The synchronizer on the line input is this design's addition.
//
// Timing: shift pulses are one clock wide. The first sample comes
// BIT_DIV/2+2 clocks after the edge reaches the line input (two of them in
// the synchronizer); xfer_tgl changes K+1 clocks after the last sample.
`timescale 1ns/1ps
module decoder_control
  import ml_pkg::*;
#(
  parameter int unsigned BIT_DIV = 16   // 307.2 kHz / 19.2 kHz
) (
  input  logic clk,
  input  logic rst,
  input  logic line,          // data channel, asynchronous
  output logic line_bit,      // synchronized line for the decoder register
  output logic shift,         // shift the 31-bit decoder register
  output logic sel_feedback,  // decoder register input switch
  output logic sipo_shift,    // shift the 16-bit output-side register
  output logic xfer_tgl,      // toggles when a decoded word is ready
  output logic busy           // a block is being received or decoded
);
  typedef enum logic [1:0] {S_IDLE, S_RECV, S_DECODE} state_t;
  state_t state;
  localparam int unsigned PW = $clog2(BIT_DIV);
  localparam logic [PW-1:0] PH_LAST = PW'(BIT_DIV - 1);
  localparam logic [PW-1:0] PH_MID  = PW'(BIT_DIV/2 - 1);
  logic [PW-1:0]              phase;
  logic [5:0]                 nbit;

  sync2 #(.RESET_VAL(MARK)) u_sync (.clk(clk), .rst(rst), .d(line), .q(line_bit));

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      phase    <= '0;
      nbit     <= '0;
      xfer_tgl <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (line_bit == SPACE) begin
          state <= S_RECV;
          phase <= '0;
          nbit  <= '0;
        end
        S_RECV: begin
          phase <= (phase == PH_LAST) ? '0 : phase + 1'b1;
          if (phase == PH_MID) begin
            nbit <= nbit + 1'b1;
            if (nbit == 6'(N)) begin        // this is the 32nd sample
              state <= S_DECODE;
              nbit  <= '0;
            end
          end
        end
        S_DECODE: begin
          nbit <= nbit + 1'b1;
          if (nbit == 6'(K-1)) begin
            state    <= S_IDLE;
            xfer_tgl <= ~xfer_tgl;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    shift        = 1'b0;
    sipo_shift   = 1'b0;
    sel_feedback = (state == S_DECODE);
    busy         = (state != S_IDLE);
    if (state == S_RECV && phase == PH_MID) shift = 1'b1;
    if (state == S_DECODE) begin
      shift      = 1'b1;
      sipo_shift = 1'b1;
    end
  end
  // decoding shifts always move both registers with the switch on feedback
  a_decode_shift: assert property (@(posedge clk) disable iff (rst)
                                   sipo_shift |-> (shift && sel_feedback));
endmodule
