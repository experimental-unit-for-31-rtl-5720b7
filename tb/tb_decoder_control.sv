// tb_decoder_control -- sends start-stop blocks (start bit + 31 random
// bits, 16 clocks per bit, at a random phase to the clock) and checks that
// the control shifts the register 32 times, each time near the middle of a
// bit and with the right bit on line_bit, then shifts 16 times on
// consecutive clocks with the feedback switch closed (one 19.2 kHz bit
// time = 52 us at 307.2 kHz), and then toggles xfer_tgl once.
`timescale 1ns/1ps
module tb_decoder_control;
  localparam real TCLK = 10.0;
  logic clk = 0, rst = 1, line = 1;
  logic line_bit, shift, sel_feedback, sipo_shift, xfer_tgl, busy;
  int checks = 0, failures = 0;

  decoder_control dut (.clk(clk), .rst(rst), .line(line), .line_bit(line_bit), .shift(shift),
    .sel_feedback(sel_feedback), .sipo_shift(sipo_shift), .xfer_tgl(xfer_tgl), .busy(busy));
  always #5 clk = ~clk;

  logic [31:0] sent;              // sent[0] = start bit
  logic [31:0] got;
  int nrecv, ndec, last_recv_cyc, first_dec_cyc, last_dec_cyc, cyc, tgl_cyc;
  real t_edge;
  real sample_pos[$];
  logic tgl_prev;

  always @(posedge clk) begin
    cyc++;
    if (shift && !sel_feedback) begin
      got[nrecv] = line_bit;
      sample_pos.push_back(($realtime - t_edge) / (16.0 * TCLK) - real'(nrecv));
      nrecv++;
      last_recv_cyc = cyc;
    end
    if (shift && sel_feedback) begin
      if (ndec == 0) first_dec_cyc = cyc;
      last_dec_cyc = cyc;
      ndec++;
      if (!sipo_shift) begin failures++; $display("FAIL sipo_shift missing"); end
    end
    if (xfer_tgl != tgl_prev) tgl_cyc = cyc;
    tgl_prev = xfer_tgl;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic tgl0;
    cyc = 0; tgl_prev = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    for (int b = 0; b < 40; b++) begin
      sent = {31'($urandom), 1'b0};
      nrecv = 0; ndec = 0; got = '0;
      sample_pos.delete();
      tgl0 = xfer_tgl;
      #($urandom_range(100) * 0.1);     // random phase against the clock
      t_edge = $realtime;
      for (int i = 0; i < 32; i++) begin
        line = sent[i];
        #(16.0 * TCLK);
      end
      line = 1;
      #(40.0 * 16.0 * TCLK);
      chk(nrecv == 32, $sformatf("block %0d: %0d receive shifts", b, nrecv));
      chk(got === sent, $sformatf("block %0d: sampled %h sent %h", b, got, sent));
      foreach (sample_pos[i])
        chk(sample_pos[i] > 0.3 && sample_pos[i] < 0.8, $sformatf("sample %0d at %f of the bit", i, sample_pos[i]));
      chk(ndec == 16, $sformatf("block %0d: %0d decode shifts", b, ndec));
      chk(first_dec_cyc == last_recv_cyc + 1 && last_dec_cyc == first_dec_cyc + 15,
          "decode shifts on 16 consecutive clocks right after reception");
      chk(xfer_tgl != tgl0 && tgl_cyc == last_dec_cyc + 1, "transfer toggles after decoding");
      chk(!busy, "idle after the block");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
