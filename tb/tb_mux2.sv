// tb_mux2: drives random words on d0 and d1 and both values of sel, and
// checks that sel = 0 passes d0 and sel = 1 passes d1.
module tb_mux2;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;

  logic [15:0] d0, d1, o;
  logic        sel;

  mux2 #(.W(16)) dut (.d0(d0), .d1(d1), .sel(sel), .o(o));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      d0 = 16'($urandom); d1 = 16'($urandom); sel = 1'(n & 1);
      #1;
      checks++;
      if (o !== (sel ? d1 : d0)) begin
        failures++; $display("FAIL sel=%0d d0=%h d1=%h o=%h", sel, d0, d1, o);
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
