// tb_bpsk_top: end-to-end test of both modulators at their default sizes.
//
// The 100 MHz modulator is checked on every clock against the sine formula
// and the LFSR recurrence: carrier for bit 0, inverted carrier for bit 1,
// one bit per 10 clocks. At the same time the AC'97 modulator runs from a
// 12.288 MHz bit clock through its full 1024-frame start-up and then 300
// active frames, decoded by a codec model; the modulating bit changes at
// random frame starts and sw changes once. Every frame is compared with the
// expected one (inverted as a whole while sel = 1).
// Each mechanism must occur at least once: LFSR bits 0 and 1, idle start-up
// frames, carrier and inverted AC-link frames, the three register writes, a
// volume change through sw.
module tb_bpsk_top;
  timeunit 1ns; timeprecision 1ps;
  import bpsk_tb_pkg::*;
  int checks = 0, failures = 0;

  localparam int unsigned INIT = 1024;     // the driver's default start-up
  localparam int unsigned ACTIVE = 300;
  localparam longint unsigned INC_SG = 64'd429496730;
  localparam longint unsigned INC_AC = (64'd440 << 32) / 64'd48000;

  logic clk = 0, rst = 1;
  logic sg_lfsr;
  logic signed [15:0] sg_dds, sg_inv, sg_bpsk;
  logic bit_clk = 0;
  logic [1:0] sw = 2'b00;
  logic sel = 0;
  logic out_1, sync, rst_n;
  bit   done = 0;

  // mechanism counters
  int n_sg_bit0 = 0, n_sg_bit1 = 0, n_idle = 0, n_carrier = 0, n_inverted = 0;
  int n_wr02 = 0, n_wr04 = 0, n_wr18 = 0, n_vol_change = 0;

  bpsk_top dut (
    .clk(clk), .rst(rst),
    .sg_lfsr_out(sg_lfsr), .sg_dds_out(sg_dds), .sg_inv_out(sg_inv), .sg_bpsk_out(sg_bpsk),
    .aud_bit_clk(bit_clk), .sw(sw), .sel(sel),
    .out_1(out_1), .aud_sync(sync), .aud_reset(rst_n)
  );

  ac97_codec_model codec (.bit_clk(bit_clk), .sync(sync), .sdo(out_1));

  always #5 clk = ~clk;
  always #40.69 bit_clk = ~bit_clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // first modulator, every clock
  initial begin
    logic signed [15:0] exp_c;
    bit exp_b;
    int t;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    t = 0;
    while (!done) begin
      exp_c = (t == 0) ? 16'sd0 : sine_ref(phase_idx(longint'(t - 1), INC_SG));
      if (t % 10 == 0) begin
        exp_b = lfsr_ref((t / 10) % 255);
        if (exp_b) n_sg_bit1++; else n_sg_bit0++;
      end
      chk(sg_dds === exp_c, $sformatf("t=%0d carrier %0d exp %0d", t, sg_dds, exp_c));
      chk(sg_lfsr === exp_b, $sformatf("t=%0d bit", t));
      chk(sg_bpsk === (exp_b ? 16'(-exp_c - 16'sd1) : exp_c), $sformatf("t=%0d bpsk", t));
      t++;
      @(negedge clk);
    end
  end

  // second modulator, every frame
  initial begin
    int unsigned f, k;
    logic        fsel;
    logic [19:0] inv;
    logic [6:0]  r;
    logic [15:0] d;
    logic signed [15:0] s;
    logic [1:0]  sw_frame, sw_next;
    fsel = 0;
    sw_frame = sw;
    for (f = 0; f < INIT + ACTIVE; f++) begin
      @(codec.frame_no);
      chk(rst_n === 1'b1, "RESET# high");
      if (f < INIT) begin
        chk(codec.tag === 16'h0000, $sformatf("frame %0d idle tag %h", f, codec.tag));
        n_idle++;
      end else begin
        k = f - INIT;
        inv = fsel ? 20'hFFFFF : 20'h0;
        case (k % 3)
          0: begin r = 7'h02; d = {2'b00, sw_frame, 4'h0, 2'b00, sw_frame, 4'h0}; end
          1: begin r = 7'h04; d = {2'b00, sw_frame, 4'h0, 2'b00, sw_frame, 4'h0}; end
          default: begin r = 7'h18; d = 16'h0808; end
        endcase
        s = sine_ref(phase_idx(longint'(k), INC_AC));
        chk(codec.tag === (16'hF800 ^ inv[15:0]), $sformatf("frame %0d tag", f));
        chk(codec.slot1 === ({1'b0, r, 12'h0} ^ inv), $sformatf("frame %0d slot1", f));
        chk(codec.slot2 === ({d, 4'h0} ^ inv), $sformatf("frame %0d slot2 %h", f, codec.slot2));
        chk(codec.slot3 === ({s, 4'h0} ^ inv), $sformatf("frame %0d pcm", f));
        chk(codec.slot4 === codec.slot3, $sformatf("frame %0d right", f));
        if (fsel) n_inverted++;
        else begin
          n_carrier++;
          if (r == 7'h02) n_wr02++;
          if (r == 7'h04) n_wr04++;
          if (r == 7'h18) n_wr18++;
          if (r == 7'h02 && codec.regs[7'h02] === 16'h2020) n_vol_change++;
        end
      end
      // the next frame's words were latched one bit before this point, so
      // a sw change shows from the frame after next
      sw_next = sw;
      if (f == INIT + ACTIVE / 2) sw = 2'b10;
      sw_frame = sw_next;
      fsel = (f + 1 >= INIT) ? 1'($urandom_range(0, 1)) : 1'b0;
      sel = fsel;
    end
    chk(codec.frame_errs == 0, "framing");
    done = 1;
    @(negedge clk);
    chk(n_sg_bit0 > 0, "no LFSR bit 0");
    chk(n_sg_bit1 > 0, "no LFSR bit 1");
    chk(n_idle == INIT, "start-up frames");
    chk(n_carrier > 0, "no carrier frame");
    chk(n_inverted > 0, "no inverted frame");
    chk(n_wr02 > 0 && n_wr04 > 0 && n_wr18 > 0, "a register write never happened");
    chk(n_vol_change > 0, "sw change never reached the codec");
    $display("first modulator: bit0=%0d bit1=%0d", n_sg_bit0, n_sg_bit1);
    $display("AC'97 modulator: idle=%0d carrier=%0d inverted=%0d writes 02h=%0d 04h=%0d 18h=%0d volume changes seen=%0d",
             n_idle, n_carrier, n_inverted, n_wr02, n_wr04, n_wr18, n_vol_change);
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
