// tb_sine_wave: runs the AC'97 driver against a codec model at a 12.288 MHz
// bit clock with 4 idle frames. Checks for every frame: 256 bit clocks
// between SYNC pulses, 16-bit SYNC, idle tag during the start-up frames,
// then the active tag, the command cycle 02h/04h/18h with the volume word
// set by sw, and the PCM sample of step k of a 440 Hz oscillator at 48 kHz
// (left = right). Changes sw twice and checks that the codec registers
// follow. RESET# must stay high. A second instance set to 400 Hz, the other
// carrier frequency, must repeat its samples every 120 frames (within one
// table step).
module tb_sine_wave;
  timeunit 1ns; timeprecision 1ps;
  import bpsk_tb_pkg::*;
  int checks = 0, failures = 0;

  localparam int unsigned INIT = 4;
  localparam longint unsigned INC = (64'd440 << 32) / 64'd48000;

  logic bit_clk = 0;
  logic [1:0] sw = 2'b00;
  logic sdo, sync, rst_n;

  sine_wave #(.INIT_FRAMES(INIT)) dut (
    .aud_bit_clk(bit_clk), .sw(sw),
    .aud_sdo(sdo), .aud_sync(sync), .aud_reset(rst_n)
  );

  ac97_codec_model codec (.bit_clk(bit_clk), .sync(sync), .sdo(sdo));

  // 400 Hz instance
  localparam longint unsigned INC400 = (64'd400 << 32) / 64'd48000;
  logic sdo4, sync4, rst4_n;
  logic [19:0] hist400 [$];

  sine_wave #(.TONE_HZ(400), .INIT_FRAMES(INIT)) dut400 (
    .aud_bit_clk(bit_clk), .sw(2'b00),
    .aud_sdo(sdo4), .aud_sync(sync4), .aud_reset(rst4_n)
  );

  ac97_codec_model codec400 (.bit_clk(bit_clk), .sync(sync4), .sdo(sdo4));

  initial begin
    int unsigned f4;
    for (f4 = 0; f4 < INIT + 400; f4++) begin
      @(codec400.frame_no);
      if (f4 >= INIT) begin
        chk(codec400.slot3 === {sine_ref(phase_idx(longint'(f4 - INIT), INC400)), 4'h0},
            $sformatf("400 Hz frame %0d", f4));
        hist400.push_back(codec400.slot3);
        // 120 frames per period; the 32-bit increment is truncated, so allow
        // one table step (at most 32767*2*pi/512 = 403 LSB)
        if (hist400.size() > 120) begin
          int d;
          d = int'($signed(codec400.slot3[19:4])) - int'($signed(hist400[hist400.size() - 121][19:4]));
          chk(d <= 403 && d >= -403, $sformatf("400 Hz period is 120 frames (diff %0d)", d));
        end
      end
    end
  end

  always #40.69 bit_clk = ~bit_clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [15:0] vol(logic [1:0] s);
    return {2'b00, s, 4'b0000, 2'b00, s, 4'b0000};
  endfunction

  initial begin
    int unsigned f, k;
    logic [6:0]  exp_reg;
    logic [15:0] exp_dat;
    logic signed [15:0] exp_s;
    for (f = 0; f < INIT + 400; f++) begin
      @(codec.frame_no);
      chk(rst_n === 1'b1, "RESET# asserted");
      if (f > 0) chk(codec.sync_len == 16, $sformatf("frame %0d sync length %0d", f, codec.sync_len));
      if (f < INIT) begin
        chk(codec.tag === 16'h0000, $sformatf("frame %0d idle tag %h", f, codec.tag));
      end else begin
        k = f - INIT;
        chk(codec.tag === 16'hF800, $sformatf("frame %0d tag %h", f, codec.tag));
        case (k % 3)
          0: begin exp_reg = 7'h02; exp_dat = vol(sw); end
          1: begin exp_reg = 7'h04; exp_dat = vol(sw); end
          default: begin exp_reg = 7'h18; exp_dat = 16'h0808; end
        endcase
        chk(codec.slot1 === {1'b0, exp_reg, 12'h000}, $sformatf("frame %0d slot1 %h", f, codec.slot1));
        chk(codec.slot2 === {exp_dat, 4'h0}, $sformatf("frame %0d slot2 %h exp %h", f, codec.slot2, exp_dat));
        exp_s = sine_ref(phase_idx(longint'(k), INC));
        chk(codec.slot3 === {exp_s, 4'h0}, $sformatf("frame %0d pcm %h exp %h", f, codec.slot3, exp_s));
        chk(codec.slot4 === codec.slot3, $sformatf("frame %0d right != left", f));
      end
      // change sw on a frame boundary, well before the next frame's slots
      if (f == INIT + 100) sw = 2'b10;
      if (f == INIT + 250) sw = 2'b11;
      if (f == INIT + 150) begin
        chk(codec.regs[7'h02] === vol(2'b10), "master volume after sw=10");
        chk(codec.regs[7'h04] === vol(2'b10), "headphone volume after sw=10");
        chk(codec.regs[7'h18] === 16'h0808, "PCM out gain");
      end
    end
    chk(codec.frame_errs == 0, $sformatf("framing errors %0d", codec.frame_errs));
    chk(codec.regs[7'h02] === vol(2'b11), "master volume after sw=11");
    chk(codec.valid_frames == 400, $sformatf("valid frames %0d", codec.valid_frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
