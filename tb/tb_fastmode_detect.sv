// Test of fast-mode detection against a reference model: random shift
// directions and limit flags, fastmode compared after every sclk edge.
module tb_fastmode_detect;
  timeunit 1ns; timeprecision 1ps;
  import recal_pkg::*;
  logic rst = 0, sclk = 0, slr = 0, min = 0, notmax = 1, fastmode;
  int checks = 0, failures = 0;
  int n_set = 0;
  logic prev; bit have;

  fastmode_detect dut (.*);

  initial begin
    #1 rst = 1; #5 rst = 0;
    checks++; if (fastmode) failures++;
    have = 0;
    // directed: two lefts set it, a right clears it, two rights set it
    // unless at the maximum
    for (int i = 0; i < 400; i++) begin
      logic exp;
      slr    = (i < 4) ? SHIFT_LEFT : 1'($urandom_range(0, 1));
      min    = (i < 4) ? 1'b0 : ($urandom_range(0, 4) == 0);
      notmax = (i < 4) ? 1'b1 : ($urandom_range(0, 4) != 0);
      exp    = have && (slr == prev) && ((slr == SHIFT_LEFT) ? !min : notmax);
      #5 sclk = 1; #5 sclk = 0;
      prev = slr; have = 1;
      checks++;
      if (fastmode != exp) begin
        failures++;
        $display("FAIL step %0d: fastmode=%0d expected %0d", i, fastmode, exp);
      end
      if (fastmode) n_set++;
    end
    checks++; if (n_set == 0) begin failures++; $display("FAIL: never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
