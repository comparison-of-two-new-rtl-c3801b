// lfsr: pseudo-random bit source for the modulating signal.
//
// An N-bit Fibonacci shift register with XOR feedback. Each cycle with ce
// high it shifts left by one and feeds the XOR of the tap bits into bit 0;
// dout is the most significant bit. The defaults (8 bits, polynomial
// x^8 + x^6 + x^5 + x^4 + 1, seed FFh) give a maximal sequence of 255 bits;
// the width, taps and seed are this design's choice. Synchronous active-high
// reset loads the seed. dout changes one clock after a ce.
module lfsr #(
  parameter int unsigned   N    = 8,
  parameter logic [N-1:0]  TAPS = 8'b1011_1000,  // bits 7,5,4,3 -> x^8+x^6+x^5+x^4+1
  parameter logic [N-1:0]  SEED = '1
) (
  input  logic clk,
  input  logic rst,
  input  logic ce,
  output logic dout
);

  logic [N-1:0] q;

  always_ff @(posedge clk) begin
    if (rst)     q <= SEED;
    else if (ce) q <= {q[N-2:0], ^(q & TAPS)};
  end

  always_comb dout = q[N-1];

endmodule
