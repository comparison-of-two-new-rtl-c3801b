// tb_dds: runs the oscillator at its default setting (10 MHz at a 100 MHz
// clock, ce always high) and compares every sample with the sine formula.
// Checks the one-clock table latency, that a carrier period is 10 samples,
// and that the phase and output hold while ce is low.
module tb_dds;
  timeunit 1ns; timeprecision 1ps;
  import bpsk_tb_pkg::*;
  int checks = 0, failures = 0;

  localparam longint unsigned INC = 64'd429496730;

  logic clk = 0, rst = 1, ce = 1;
  logic signed [15:0] sine;
  logic signed [15:0] prev;
  longint unsigned k;

  dds dut (.clk(clk), .rst(rst), .ce(ce), .sine(sine));

  always #5 clk = ~clk;

  task automatic check_sample(longint unsigned step);
    logic signed [15:0] exp;
    exp = sine_ref(phase_idx(step, INC));
    checks++;
    if (sine !== exp) begin
      failures++; $display("FAIL step %0d: sine=%0d exp=%0d", step, sine, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    checks++; if (sine !== 0) begin failures++; $display("FAIL reset value %0d", sine); end
    // after the n-th enabled edge the output is the word of step n-1
    k = 0;
    repeat (300) begin
      @(negedge clk);
      check_sample(k);
      k++;
    end
    // periodicity: 10 samples per carrier period
    for (int n = 0; n < 5; n++) begin
      prev = sine;
      repeat (10) @(negedge clk);
      k += 10;
      checks++;
      if (sine !== prev) begin failures++; $display("FAIL period: %0d vs %0d", sine, prev); end
    end
    // hold with ce low
    ce = 0;
    prev = sine;
    repeat (7) @(negedge clk);
    checks++; if (sine !== prev) begin failures++; $display("FAIL hold"); end
    ce = 1;
    @(negedge clk);
    check_sample(k);  // the step sequence resumes where it stopped
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
