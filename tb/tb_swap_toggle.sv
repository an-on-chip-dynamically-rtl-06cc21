// Test of the swap toggle: every rising grant toggles dsel, swapack
// follows the grant after D1 in both directions, and reset selects line 0.
module tb_swap_toggle;
  timeunit 1ns; timeprecision 1ps;
  logic rst = 0, g = 0, dsel, swapack;
  int checks = 0, failures = 0;

  swap_toggle #(.D1_PS(5000)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $realtime, what); end
  endtask

  initial begin
    #1 rst = 1; #5 rst = 0; #5;
    check(dsel == 0 && swapack == 0, "reset state");
    for (int i = 0; i < 6; i++) begin
      logic prev_sel;
      prev_sel = dsel;
      g = 1;
      #0.1 check(dsel == ~prev_sel, "dsel did not toggle on the grant");
      #4.8 check(swapack == 0, "swapack before D1");
      #0.2 check(swapack == 1, "swapack not raised after D1");
      #10 g = 0;
      #4.9 check(swapack == 1, "swapack fell before D1");
      #0.2 check(swapack == 0, "swapack not lowered after D1");
      check(dsel == ~prev_sel, "dsel changed on the falling grant");
      #10;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
