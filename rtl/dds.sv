// dds: direct digital synthesizer (numerically controlled oscillator).
//
// A PHASE_W-bit phase accumulator adds PHASE_INC on every cycle with ce
// high; its top LUT_AW bits address a full-wave sine table, so the output
// frequency is f_ce * PHASE_INC / 2**PHASE_W. The table holds
// round(A * sin(2*pi*i / 2**LUT_AW)), A = 2**(OUT_W-1) - 1, in two's
// complement; it is computed at elaboration by a constant function and
// becomes a ROM (one block RAM at the default 512 x 16). The sample is registered: on a ce edge the output
// takes the table word of the phase held before that edge, so the first
// sample after reset is sin(0) = 0. Synchronous active-high reset clears
// phase and output.
//
// The phase accumulator plus lookup table structure is the one described for
// the oscillator; the widths are this design's choice. The default increment
// gives 10 MHz at a 100 MHz clock with ce tied high.
module dds
  import bpsk_pkg::*;
#(
  parameter int unsigned      PHASE_W   = 32,
  parameter logic [PHASE_W-1:0] PHASE_INC = 32'd429496730,  // round(2**32 * 10 MHz / 100 MHz)
  parameter int unsigned      LUT_AW    = SINE_LUT_AW,
  parameter int unsigned      OUT_W     = SINE_LUT_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    ce,
  output logic signed [OUT_W-1:0] sine
);

  typedef logic [OUT_W-1:0] lut_t [2**LUT_AW];

  function automatic lut_t sine_table();
    lut_t t;
    real  a, x;
    a = real'((2**(OUT_W-1)) - 1);
    for (int i = 0; i < 2**LUT_AW; i++) begin
      x    = a * $sin(2.0 * SINE_PI * real'(i) / real'(2**LUT_AW));
      t[i] = OUT_W'($rtoi((x >= 0.0) ? x + 0.5 : x - 0.5));
    end
    return t;
  endfunction

  localparam lut_t LUT = sine_table();

  logic [PHASE_W-1:0] phase;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      sine  <= '0;
    end else if (ce) begin
      phase <= phase + PHASE_INC;
      sine  <= LUT[phase[PHASE_W-1 -: LUT_AW]];
    end
  end

endmodule
