// tb_bpsk_sysgen: runs the 100 MSps modulator for 300 bit periods and checks,
// cycle by cycle, the carrier against the sine formula, the inverted carrier
// against -x-1, the modulating bits against the LFSR recurrence, the bit
// period of 10 clocks, and the BPSK output: carrier for bit 0, inverted
// carrier for bit 1. Counts both kinds of bit; each must occur.
module tb_bpsk_sysgen;
  timeunit 1ns; timeprecision 1ps;
  import bpsk_tb_pkg::*;
  int checks = 0, failures = 0;

  localparam longint unsigned INC = 64'd429496730;

  logic clk = 0, rst = 1;
  logic lfsr_out;
  logic signed [15:0] dds_out, inv_out, bpsk_out;
  int   n_bit0 = 0, n_bit1 = 0;

  bpsk_sysgen dut (
    .clk(clk), .rst(rst), .lfsr_out(lfsr_out),
    .dds_out(dds_out), .inv_out(inv_out), .bpsk_out(bpsk_out)
  );

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    logic signed [15:0] exp_c;
    bit exp_b;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    // cycle t after reset release (t = 0 here): carrier is step t-1, bit is t/10
    for (int t = 0; t < 3000; t++) begin
      exp_c = (t == 0) ? 16'sd0 : sine_ref(phase_idx(longint'(t - 1), INC));
      exp_b = lfsr_ref(t / 10);
      chk(dds_out === exp_c, $sformatf("t=%0d carrier %0d exp %0d", t, dds_out, exp_c));
      chk(inv_out === 16'(-exp_c - 16'sd1), $sformatf("t=%0d inverted %0d", t, inv_out));
      chk(lfsr_out === exp_b, $sformatf("t=%0d bit %0d exp %0d", t, lfsr_out, exp_b));
      chk(bpsk_out === (exp_b ? 16'(-exp_c - 16'sd1) : exp_c),
          $sformatf("t=%0d bpsk %0d", t, bpsk_out));
      if (t % 10 == 0) begin
        if (exp_b) n_bit1++; else n_bit0++;
      end
      @(negedge clk);
    end
    chk(n_bit0 > 0, "no bit 0 seen");
    chk(n_bit1 > 0, "no bit 1 seen");
    $display("bits: zero=%0d one=%0d", n_bit0, n_bit1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
