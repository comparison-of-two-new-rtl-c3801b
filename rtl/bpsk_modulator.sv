// bpsk_modulator: BPSK modulator built around the board's AC'97 codec.
//
// sine_wave streams a sine carrier to the codec over the AC-link on aud_sdo.
// That serial line feeds input d0 of a one-bit multiplexer directly and
// input d1 through an inverter; the modulating bit, brought in on a Pmod pin
// as sel, chooses between them and the result leaves as out_1, the line that
// goes to the codec's SDATA_OUT pin. aud_sync and aud_reset go straight from
// sine_wave to the codec.
//
// Inverting the serial line turns every PCM sample x into ~x = -x-1, the
// carrier shifted by 180 degrees. It also inverts the slot-0 tag and the
// command slots of the frame, so a codec that honours the frame-valid bit
// ignores frames sent while sel = 1 and holds its last sample; see the
// design notes. sel is used asynchronously, so a change of the modulating
// bit takes effect at once, possibly in the middle of a frame.
//
// The structure (SINE_WAVE, INV, M2_1 and the nets between them) and the port
// names are those of the document's schematic; sel = 1 selecting the inverted
// line is the usual multiplexer convention.
module bpsk_modulator
  import bpsk_pkg::*;
#(
  parameter int unsigned TONE_HZ     = 440,
  parameter int unsigned INIT_FRAMES = 1024
) (
  input  logic       aud_bit_clk,
  input  logic [1:0] sw,
  input  logic       sel,
  output logic       out_1,
  output logic       aud_sync,
  output logic       aud_reset
);

  logic aud_sdo;
  logic aud_sdo_n;

  sine_wave #(
    .TONE_HZ    (TONE_HZ),
    .INIT_FRAMES(INIT_FRAMES)
  ) xlxi_9 (
    .aud_bit_clk(aud_bit_clk),
    .sw         (sw),
    .aud_sdo    (aud_sdo),
    .aud_sync   (aud_sync),
    .aud_reset  (aud_reset)
  );

  inverter #(.W(1)) xlxi_7 (
    .i(aud_sdo),
    .o(aud_sdo_n)
  );

  mux2 #(.W(1)) xlxi_5 (
    .d0 (aud_sdo),
    .d1 (aud_sdo_n),
    .sel(sel),
    .o  (out_1)
  );

endmodule
