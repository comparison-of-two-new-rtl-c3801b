// bpsk_top: the two BPSK modulators side by side.
//
// bpsk_sysgen runs on a 100 MHz clock and puts out 16-bit BPSK samples of a
// 10 MHz carrier keyed by an internal LFSR. bpsk_modulator runs on the
// codec's 12.288 MHz AC-link bit clock, keys a 440 Hz carrier played by an
// external AC'97 codec with the external bit sel, and drives the codec's
// SDATA_OUT, SYNC and RESET# lines. The two share no signals; each keeps its
// own ports, prefixed sg_ for the first and named as on the board for the
// second. Both are the document's designs, proposed as two ways of building
// the same modulator; placing them in one top is this design's packaging.
module bpsk_top (
  // first modulator
  input  logic               clk,
  input  logic               rst,
  output logic               sg_lfsr_out,
  output logic signed [15:0] sg_dds_out,
  output logic signed [15:0] sg_inv_out,
  output logic signed [15:0] sg_bpsk_out,
  // second modulator (AC'97 codec side)
  input  logic               aud_bit_clk,
  input  logic [1:0]         sw,
  input  logic               sel,
  output logic               out_1,
  output logic               aud_sync,
  output logic               aud_reset
);

  bpsk_sysgen u_sysgen (
    .clk     (clk),
    .rst     (rst),
    .lfsr_out(sg_lfsr_out),
    .dds_out (sg_dds_out),
    .inv_out (sg_inv_out),
    .bpsk_out(sg_bpsk_out)
  );

  bpsk_modulator u_ac97 (
    .aud_bit_clk(aud_bit_clk),
    .sw         (sw),
    .sel        (sel),
    .out_1      (out_1),
    .aud_sync   (aud_sync),
    .aud_reset  (aud_reset)
  );

endmodule
