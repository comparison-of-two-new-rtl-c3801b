// sine_wave: AC'97 driver that makes an LM4550 codec play a sine carrier.
//
// The codec supplies the 12.288 MHz bit clock (aud_bit_clk); one AC-link
// frame is 256 bit clocks, giving 48 kHz frames. The driver counts bit
// clocks, drives SYNC high for 16 bits at the start of each frame and
// serialises the frame on aud_sdo, MSB first:
//   slot 0  tag: frame valid, slot 1..4 valid, codec ID 00
//   slot 1  command address (write) of one mixer register
//   slot 2  command data
//   slot 3  left PCM sample, slot 4 right PCM sample (same value)
//   slots 5..12 zero
// After INIT_FRAMES idle frames (tag all zero, giving the codec time to
// become ready) every frame is active. The command slots write, in turn, the
// master volume (02h), headphone volume (04h) and PCM-out gain (18h), so the
// PCM path reaches the line and headphone outputs; the writes repeat for ever
// so a change of sw takes effect within four frames. sw[1:0] sets the
// master and headphone attenuation to 0, -12, -24 or -36 dB.
// The PCM sample is a 16-bit sine from a dds stepped once per frame, sent
// left-justified in the 20-bit slot; the default tone is 440 Hz.
//
// Timing: outputs change on the rising edge of aud_bit_clk (the codec samples
// on the falling edge). SYNC rises one bit clock before bit 15 of slot 0, as
// in the AC'97 link protocol. aud_reset (active-low RESET# of the codec) is
// held deasserted: the driver has no clock of its own before the codec runs.
// There is no reset input; all registers take their power-up values, as on
// an FPGA after configuration (declaration initialisers, which lint reports
// as assignments to initialised variables: that is intended here). The
// first idle frame also resets the oscillator.
//
// The block's name and ports follow the document's schematic; the frame
// layout is the AC'97 standard; the choice of registers follows the codec's
// DAC-to-LINE_OUT path. Idle-frame count, volume coding of sw, 16-bit
// samples and the repeated command cycle are this design's choices.
module sine_wave
  import bpsk_pkg::*;
#(
  parameter int unsigned TONE_HZ     = 440,
  parameter int unsigned INIT_FRAMES = 1024    // ~21 ms at 48 kHz, at least 1
) (
  input  logic       aud_bit_clk,
  input  logic [1:0] sw,
  output logic       aud_sdo,
  output logic       aud_sync,
  output logic       aud_reset
);

  localparam int unsigned PHASE_W = 32;
  localparam logic [PHASE_W-1:0] PHASE_INC =
      PHASE_W'((64'(TONE_HZ) << PHASE_W) / AC97_FRAME_HZ);
  localparam int unsigned WAIT_W = $clog2(INIT_FRAMES + 1);

  if (INIT_FRAMES < 1) begin : g_bad_init
    $error("sine_wave: INIT_FRAMES must be at least 1");
  end

  // Power-up state
  logic [7:0]        bit_cnt    = 8'hFF;   // first edge ends a frame
  logic [WAIT_W-1:0] wait_cnt   = '0;
  logic              init_done  = 1'b0;
  logic [1:0]        cmd_idx    = 2'd0;
  logic              por_rst    = 1'b1;    // clears the oscillator once

  // Slot words of the frame being sent
  logic [15:0] tag_q  = AC97_TAG_IDLE;
  logic [19:0] cmd_a_q = '0;
  logic [19:0] cmd_d_q = '0;
  logic [19:0] pcm_q   = '0;

  logic signed [15:0] sample;
  logic               frame_end;
  logic               tone_ce;
  logic [15:0]        vol_word;
  ac97_reg_e          cmd_reg;
  logic [15:0]        cmd_data;
  logic               frame_bit;

  always_comb frame_end = (bit_cnt == 8'(AC97_FRAME_BITS - 1));
  // step the oscillator one clock before the frame's words are latched
  always_comb tone_ce   = (bit_cnt == 8'(AC97_FRAME_BITS - 2)) && init_done;

  dds #(
    .PHASE_W  (PHASE_W),
    .PHASE_INC(PHASE_INC)
  ) u_osc (
    .clk (aud_bit_clk),
    .rst (por_rst),
    .ce  (tone_ce),
    .sine(sample)
  );

  // Volume register word: no mute, equal left/right attenuation in 1.5 dB steps
  always_comb vol_word = {2'b00, sw, 4'b0000, 2'b00, sw, 4'b0000};

  always_comb begin
    unique case (cmd_idx)
      2'd0:    begin cmd_reg = REG_MASTER_VOL; cmd_data = vol_word;    end
      2'd1:    begin cmd_reg = REG_HP_VOL;     cmd_data = vol_word;    end
      default: begin cmd_reg = REG_PCM_OUT;    cmd_data = PCM_OUT_0DB; end
    endcase
  end

  always_ff @(posedge aud_bit_clk) begin
    bit_cnt <= bit_cnt + 8'd1;
    por_rst <= 1'b0;
    if (frame_end) begin
      if (!init_done) begin
        wait_cnt  <= wait_cnt + 1'b1;
        init_done <= (32'(wait_cnt) == INIT_FRAMES - 1);
        tag_q     <= AC97_TAG_IDLE;
        cmd_a_q   <= '0;
        cmd_d_q   <= '0;
        pcm_q     <= '0;
      end else begin
        tag_q   <= AC97_TAG_ACTIVE;
        cmd_a_q <= {1'b0, cmd_reg, 12'h000};   // bit 19 = 0: write
        cmd_d_q <= {cmd_data, 4'h0};
        pcm_q   <= {sample, 4'h0};
        cmd_idx <= (cmd_idx == 2'd2) ? 2'd0 : cmd_idx + 2'd1;
      end
    end
  end

  // Bit of the current frame at position bit_cnt
  always_comb begin
    if (bit_cnt < 8'(AC97_SLOT1_POS))
      frame_bit = tag_q[4'(8'(AC97_TAG_BITS - 1) - bit_cnt)];
    else if (bit_cnt < 8'(AC97_SLOT2_POS))
      frame_bit = cmd_a_q[5'(8'(AC97_SLOT2_POS - 1) - bit_cnt)];
    else if (bit_cnt < 8'(AC97_SLOT3_POS))
      frame_bit = cmd_d_q[5'(8'(AC97_SLOT3_POS - 1) - bit_cnt)];
    else if (bit_cnt < 8'(AC97_SLOT4_POS))
      frame_bit = pcm_q[5'(8'(AC97_SLOT4_POS - 1) - bit_cnt)];
    else if (bit_cnt < 8'(AC97_SLOT5_POS))
      frame_bit = pcm_q[5'(8'(AC97_SLOT5_POS - 1) - bit_cnt)];
    else
      frame_bit = 1'b0;
  end

  // Registered outputs; SYNC leads slot 0 by one bit clock
  logic sdo_q  = 1'b0;
  logic sync_q = 1'b0;
  always_ff @(posedge aud_bit_clk) begin
    sdo_q  <= frame_bit;
    sync_q <= frame_end || (bit_cnt < 8'(AC97_TAG_BITS - 1));
  end

  // AC-link framing rules: SYNC rises only at a frame boundary and stays high
  // for exactly the 16 bit clocks of slot 0.
  a_sync_rise: assert property (@(posedge aud_bit_clk) $rose(aud_sync) |-> bit_cnt == 8'd0);
  a_sync_len:  assert property (@(posedge aud_bit_clk)
                                 $rose(aud_sync) |-> aud_sync [*AC97_TAG_BITS] ##1 !aud_sync);

  always_comb begin
    aud_sdo   = sdo_q;
    aud_sync  = sync_q;
    aud_reset = 1'b1;
  end

endmodule
