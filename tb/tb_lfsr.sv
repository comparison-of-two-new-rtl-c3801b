// tb_lfsr: steps the LFSR with a random clock enable and compares every
// output bit with the recurrence of x^8+x^6+x^5+x^4+1. Also checks that the
// output holds while ce is low, that the sequence repeats after exactly 255
// steps and that reset reloads the seed.
module tb_lfsr;
  timeunit 1ns; timeprecision 1ps;
  import bpsk_tb_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1, ce = 0, dout;
  bit   ref_seq [600];

  lfsr dut (.clk(clk), .rst(rst), .ce(ce), .dout(dout));

  always #5 clk = ~clk;

  task automatic check(bit exp, string what);
    checks++;
    if (dout !== exp) begin failures++; $display("FAIL %s: dout=%0d exp=%0d", what, dout, exp); end
  endtask

  initial begin
    int step;
    for (int n = 0; n < 600; n++) ref_seq[n] = lfsr_ref(n);
    // period of the reference itself: 255
    for (int n = 0; n < 300; n++) begin
      checks++; if (ref_seq[n] != ref_seq[n+255]) failures++;
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    step = 0;
    @(negedge clk);
    check(ref_seq[0], "after reset");
    while (step < 520) begin
      @(negedge clk);
      ce = ($urandom_range(0, 2) != 0);
      @(negedge clk);
      if (ce) step++;
      check(ref_seq[step], $sformatf("step %0d", step));
      ce = 0;
    end
    rst = 1; @(negedge clk); rst = 0;
    check(ref_seq[0], "reset reload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
