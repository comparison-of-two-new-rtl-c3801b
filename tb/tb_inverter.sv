// tb_inverter: checks that the inverter returns the bitwise complement, for
// a 1-bit and a 16-bit instance, and that for a 16-bit two's-complement word
// the result equals -x-1 (the 180-degree carrier).
module tb_inverter;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;

  logic        i1, o1;
  logic [15:0] i16, o16;

  inverter #(.W(1))  dut1 (.i(i1),  .o(o1));
  inverter #(.W(16)) dut16(.i(i16), .o(o16));

  initial begin
    for (int v = 0; v < 2; v++) begin
      i1 = 1'(v); #1;
      checks++; if (o1 !== 1'(1 - v)) begin failures++; $display("FAIL 1-bit in=%0d out=%0d", v, o1); end
    end
    for (int n = 0; n < 2000; n++) begin
      i16 = (n < 4) ? 16'(n * 16'h5555) : 16'($urandom);
      #1;
      checks++;
      if (16'(-$signed(i16) - 16'sd1) !== o16) begin
        failures++; $display("FAIL in=%h out=%h", i16, o16);
      end
    end
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
