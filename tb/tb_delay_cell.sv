// Test of one delay cell: the shift-register stage (reset, left, right) and
// the two routing modes (delayed on to the next cell, or tapped onto the
// completion chain).
module tb_delay_cell;
  timeunit 1ns; timeprecision 1ps;
  import recal_pkg::*;
  logic rst = 0, sclk = 0, slr = 0, sin_l = 0, sin_r = 0, din = 0, or_in = 0;
  logic sout, dout, or_out;
  int checks = 0, failures = 0;

  delay_cell #(.DELAY_PS(3000)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $realtime, what); end
  endtask

  task automatic pulse_sclk();
    #5 sclk = 1; #5 sclk = 0;
  endtask

  initial begin
    #1 rst = 1; #5 rst = 0;
    check(sout == 0, "reset does not clear the stage");
    // sout = 0: din goes through the delay element, not to the tap
    #10 din = 1;
    #1  check(or_out == 0, "tap active while sout low");
    #1.9 check(dout == 0, "dout too early");
    #0.2 check(dout == 1, "dout not delayed by 3 ns");
    or_in = 1; #0.1 check(or_out == 1, "or_in not passed on");
    or_in = 0; din = 0; #5;
    // shift left loads the right neighbour
    slr = SHIFT_LEFT; sin_r = 1; sin_l = 0; pulse_sclk();
    check(sout == 1, "left shift did not load sin_r");
    // sout = 1: din tapped, delay element idle
    din = 1; #0.1 check(or_out == 1, "tap not active while sout high");
    #5 check(dout == 0, "delay element used while sout high");
    din = 0; #0.1 check(or_out == 0, "tap did not follow din");
    // shift right loads the left neighbour
    slr = SHIFT_RIGHT; sin_l = 0; sin_r = 1; pulse_sclk();
    check(sout == 0, "right shift did not load sin_l");
    slr = SHIFT_RIGHT; sin_l = 1; pulse_sclk();
    check(sout == 1, "right shift did not load sin_l = 1");
    rst = 1; #1 rst = 0;
    check(sout == 0, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
