// bpsk_pkg: constants shared by the two BPSK modulators.
//
// Holds the AC-link (AC'97) frame layout used by sine_wave and the register
// indices of the LM4550 codec that lie on the PCM-to-line-out path: master
// volume 02h, headphone volume 04h and PCM-out volume 18h. The frame layout
// (one 16-bit tag slot followed by twelve 20-bit slots, 256 bit clocks per
// frame, 48 kHz frame rate) is the AC'97 standard; the register numbers are
// those printed on the codec's block diagram.
package bpsk_pkg;

  // AC-link frame
  localparam int unsigned AC97_FRAME_BITS = 256;
  localparam int unsigned AC97_TAG_BITS   = 16;
  localparam int unsigned AC97_SLOT_BITS  = 20;
  localparam int unsigned AC97_FRAME_HZ   = 48000;

  // First bit position of slots 1..4 inside a frame
  localparam int unsigned AC97_SLOT1_POS = AC97_TAG_BITS;
  localparam int unsigned AC97_SLOT2_POS = AC97_SLOT1_POS + AC97_SLOT_BITS;
  localparam int unsigned AC97_SLOT3_POS = AC97_SLOT2_POS + AC97_SLOT_BITS;
  localparam int unsigned AC97_SLOT4_POS = AC97_SLOT3_POS + AC97_SLOT_BITS;
  localparam int unsigned AC97_SLOT5_POS = AC97_SLOT4_POS + AC97_SLOT_BITS;

  // Slot 0 tag: frame valid, command address/data valid, PCM left/right valid
  localparam logic [15:0] AC97_TAG_IDLE   = 16'h0000;
  localparam logic [15:0] AC97_TAG_ACTIVE = 16'b1111_1000_0000_0000;

  // LM4550 mixer registers on the DAC -> LINE_OUT / HP_OUT path
  typedef enum logic [6:0] {
    REG_MASTER_VOL = 7'h02,
    REG_HP_VOL     = 7'h04,
    REG_PCM_OUT    = 7'h18
  } ac97_reg_e;

  // PCM-out gain of 0 dB on both channels (08h per channel)
  localparam logic [15:0] PCM_OUT_0DB = 16'h0808;

  // Sine table of both oscillators: 2**SINE_LUT_AW words of
  // round(32767 * sin(2*pi*i / 2**SINE_LUT_AW)), 16-bit two's complement.
  localparam int unsigned SINE_LUT_AW = 9;
  localparam int unsigned SINE_LUT_W  = 16;
  localparam real         SINE_PI     = 3.14159265358979323846;

endpackage
