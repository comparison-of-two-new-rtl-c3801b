// tb_bpsk_modulator: runs the AC'97 BPSK modulator against a codec model and
// drives a random modulating bit that changes at frame starts. For sel = 0
// the frame on out_1 must be the driver's frame (active tag, command, the
// PCM sample of step k of the 440 Hz oscillator); for sel = 1 every bit of
// it must be inverted, so the PCM slots carry ~x = -x-1, the carrier shifted
// by 180 degrees. Counts frames of each kind (both must occur) and checks
// that the codec model, which honours the frame-valid bit, takes its DAC
// value only from frames sent with sel = 0.
module tb_bpsk_modulator;
  timeunit 1ns; timeprecision 1ps;
  import bpsk_tb_pkg::*;
  int checks = 0, failures = 0;

  localparam int unsigned INIT = 2;
  localparam longint unsigned INC = (64'd440 << 32) / 64'd48000;

  logic bit_clk = 0;
  logic [1:0] sw = 2'b01;
  logic sel = 0;
  logic out_1, sync, rst_n;
  int   n_sel0 = 0, n_sel1 = 0;

  bpsk_modulator #(.INIT_FRAMES(INIT)) dut (
    .aud_bit_clk(bit_clk), .sw(sw), .sel(sel),
    .out_1(out_1), .aud_sync(sync), .aud_reset(rst_n)
  );

  ac97_codec_model codec (.bit_clk(bit_clk), .sync(sync), .sdo(out_1));

  always #40.69 bit_clk = ~bit_clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    int unsigned f, k;
    logic        frame_sel;
    logic [19:0] inv;
    logic [15:0] exp_tag;
    logic [19:0] exp_s1, exp_s3;
    logic signed [15:0] exp_s, last_dac;
    logic [6:0]  r;
    last_dac = '0;
    frame_sel = 0;
    for (f = 0; f < INIT + 300; f++) begin
      @(codec.frame_no);
      // frame f was sent with frame_sel; choose the bit for frame f+1 now,
      // at the start of that frame's SYNC pulse
      if (f >= INIT) begin
        k = f - INIT;
        inv = frame_sel ? 20'hFFFFF : 20'h00000;
        r = (k % 3 == 0) ? 7'h02 : (k % 3 == 1) ? 7'h04 : 7'h18;
        exp_tag = 16'hF800 ^ inv[15:0];
        exp_s1 = {1'b0, r, 12'h000} ^ inv;
        exp_s = sine_ref(phase_idx(longint'(k), INC));
        exp_s3 = {exp_s, 4'h0} ^ inv;
        chk(codec.tag === exp_tag, $sformatf("frame %0d sel %0d tag %h", f, frame_sel, codec.tag));
        chk(codec.slot1 === exp_s1, $sformatf("frame %0d slot1 %h", f, codec.slot1));
        chk(codec.slot3 === exp_s3, $sformatf("frame %0d pcm %h exp %h", f, codec.slot3, exp_s3));
        chk(codec.slot4 === exp_s3, $sformatf("frame %0d right pcm", f));
        if (frame_sel) begin
          // the inverted sample is the carrier shifted by 180 degrees
          chk(16'(codec.slot3[19:4]) === 16'(-exp_s - 16'sd1), "inverted sample is -x-1");
          chk(codec.dac_l === last_dac, "codec kept its value for an inverted frame");
          n_sel1++;
        end else begin
          chk(codec.dac_l === exp_s, "codec took the carrier sample");
          last_dac = codec.dac_l;
          n_sel0++;
        end
      end
      frame_sel = (f + 1 >= INIT) ? 1'($urandom_range(0, 1)) : 1'b0;
      sel = frame_sel;
    end
    chk(codec.frame_errs == 0, "framing");
    chk(n_sel0 > 0, "no carrier frame");
    chk(n_sel1 > 0, "no inverted frame");
    $display("frames: carrier=%0d inverted=%0d", n_sel0, n_sel1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
