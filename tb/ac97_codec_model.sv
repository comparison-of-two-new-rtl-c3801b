// ac97_codec_model: behavioural model of the receive side of an AC'97 codec
// (LM4550), for testbenches only.
//
// It samples SYNC and SDATA_OUT on the falling edge of BIT_CLK. A rising
// SYNC marks the bit before slot 0; the next 256 samples form one frame.
// After each frame it publishes the raw tag and slots 1..4 and increments
// frame_no. Like the real codec it acts only on valid frames: a register
// write when the tag marks frame, slot 1 and slot 2 valid and slot 1 bit 19
// is 0; a new DAC value (left channel, top 16 bits of slot 3) when the tag
// marks frame and slot 3 valid. It also counts framing errors (a SYNC rise
// that is not exactly 256 bits after the previous one) and records the
// length of the last SYNC pulse in bit clocks.
module ac97_codec_model (
  input  logic bit_clk,
  input  logic sync,
  input  logic sdo
);

  int unsigned  frame_no    = 0;
  int unsigned  frame_errs  = 0;
  int unsigned  sync_len    = 0;
  logic [15:0]  tag         = '0;
  logic [19:0]  slot1       = '0;
  logic [19:0]  slot2       = '0;
  logic [19:0]  slot3       = '0;
  logic [19:0]  slot4       = '0;
  logic [15:0]  regs [128];
  logic signed [15:0] dac_l = '0;
  int unsigned  valid_frames = 0;

  logic [255:0] shreg   = '0;
  int           idx     = -1;      // -1: not yet locked to SYNC
  logic         sync_d  = 1'b0;
  int unsigned  sync_hi = 0;

  initial foreach (regs[i]) regs[i] = '0;

  always @(negedge bit_clk) begin
    if (idx >= 0 && idx < 256) begin
      shreg[255 - idx] = sdo;
      idx++;
      if (idx == 256) begin
        tag   = shreg[255:240];
        slot1 = shreg[239:220];
        slot2 = shreg[219:200];
        slot3 = shreg[199:180];
        slot4 = shreg[179:160];
        if (tag[15]) valid_frames++;
        if (tag[15] && tag[14] && tag[13] && !slot1[19])
          regs[slot1[18:12]] = slot2[19:4];
        if (tag[15] && tag[12])
          dac_l = slot3[19:4];
        frame_no++;
      end
    end
    if (sync) sync_hi++;
    if (!sync && sync_d) sync_len = sync_hi;
    if (sync && !sync_d) begin
      if (idx >= 0 && idx != 256) frame_errs++;
      idx     = 0;
      sync_hi = 1;
    end
    sync_d = sync;
  end

endmodule
