// mux2: two-input multiplexer, W bits wide.
//
// The modulating bit drives sel and picks the carrier (d0) or the inverted
// carrier (d1), which is the whole BPSK operation. Port names d0, d1, sel
// follow the multiplexers of both modulators. sel = 0 passes d0 and sel = 1
// passes d1, the usual convention for such a block. Combinational.
module mux2 #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic         sel,
  output logic [W-1:0] o
);

  always_comb o = sel ? d1 : d0;

endmodule
