// bpsk_sysgen: BPSK modulator with an on-chip carrier at 100 MSps.
//
// An LFSR makes the pseudo-random modulating bits, a DDS makes a 10 MHz sine
// from a phase accumulator and a lookup table, an inverter makes its
// 180-degree copy (~x = -x-1) and a multiplexer, steered by the LFSR bit,
// passes one of the two. With the 100 MHz clock one carrier period is
// exactly 10 samples. The LFSR steps once every BIT_CYCLES clocks; the
// default of 10 makes one bit last exactly one carrier period. The four
// observation outputs are the signals the model brings out for display:
// lfsr_out, dds_out, inv_out and bpsk_out.
//
// Timing: synchronous active-high reset. The DDS sample is registered; the
// inverter and the multiplexer are combinational, so bpsk_out follows
// dds_out and lfsr_out in the same cycle. After reset the first LFSR step is
// BIT_CYCLES clocks later.
//
// The blocks and their connections (LFSR to sel; DDS to d0 and to the
// inverter; inverter to d1), the 10 ns clock and the 10 MHz carrier are the
// document's. LFSR polynomial, bit rate, DDS widths and the reset are this
// design's choices.
module bpsk_sysgen
  import bpsk_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned CARRIER_HZ = 10_000_000,
  parameter int unsigned BIT_CYCLES = 10
) (
  input  logic               clk,
  input  logic               rst,
  output logic               lfsr_out,
  output logic signed [15:0] dds_out,
  output logic signed [15:0] inv_out,
  output logic signed [15:0] bpsk_out
);

  localparam logic [31:0] PHASE_INC =
      32'(((64'(CARRIER_HZ) << 32) + 64'(CLK_HZ / 2)) / 64'(CLK_HZ));
  localparam int unsigned DIV_W = (BIT_CYCLES > 1) ? $clog2(BIT_CYCLES) : 1;

  logic [DIV_W-1:0] div_cnt;
  logic             bit_ce;

  always_comb bit_ce = (32'(div_cnt) == BIT_CYCLES - 1);

  always_ff @(posedge clk) begin
    if (rst || bit_ce) div_cnt <= '0;
    else               div_cnt <= div_cnt + 1'b1;
  end

  lfsr u_lfsr (
    .clk (clk),
    .rst (rst),
    .ce  (bit_ce),
    .dout(lfsr_out)
  );

  dds #(
    .PHASE_W  (32),
    .PHASE_INC(PHASE_INC)
  ) u_dds (
    .clk (clk),
    .rst (rst),
    .ce  (1'b1),
    .sine(dds_out)
  );

  inverter #(.W(16)) u_inv (
    .i(dds_out),
    .o(inv_out)
  );

  mux2 #(.W(16)) u_mux (
    .d0 (dds_out),
    .d1 (inv_out),
    .sel(lfsr_out),
    .o  (bpsk_out)
  );

endmodule
