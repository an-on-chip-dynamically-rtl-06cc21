// Exhaustive test of the 2x2 crossbar.
module tb_crossbar_switch;
  timeunit 1ns; timeprecision 1ps;
  logic sel, a0, a1, y0, y1;
  int checks = 0, failures = 0;

  crossbar_switch dut (.*);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel, a0, a1} = 3'(v);
      #1;
      checks++;
      if ({y0, y1} != (sel ? {a1, a0} : {a0, a1})) begin
        failures++;
        $display("FAIL sel=%0d a0=%0d a1=%0d -> y0=%0d y1=%0d", sel, a0, a1, y0, y1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
