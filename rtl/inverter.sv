// inverter: bitwise NOT of a W-bit word.
//
// In both modulators this block makes the 180-degree-shifted copy of the
// carrier. For a two's-complement sample x the result ~x equals -x-1, so the
// inverted sine is the negated sine offset by one LSB, which is what a
// "not" block does. With W = 1 it inverts a single line (the serial AC-link
// data of the second modulator). Purely combinational, no latency. The
// document draws this block as a NOT gate in both designs; the width
// parameter is this design's.
module inverter #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] i,
  output logic [W-1:0] o
);

  always_comb o = ~i;

endmodule
