// Test of the behavioural delay element: a pulse appears on y exactly
// DELAY_PS later, overlapping pulses are kept (transport delay), and
// set_delay() changes the delay.
module tb_delay_element;
  timeunit 1ns; timeprecision 1ps;
  logic a = 1'b0, y;
  int checks = 0, failures = 0;

  delay_element #(.DELAY_PS(2000)) dut (.a(a), .y(y));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $realtime, what); end
  endtask

  initial begin
    #10;
    check(y == 1'b0, "y not low at start");
    a = 1'b1;
    #1.9 check(y == 1'b0, "y rose too early");
    #0.2 check(y == 1'b1, "y did not rise after 2 ns");
    #1   a = 1'b0;   // fall at t+3
    #1.9 check(y == 1'b1, "y fell too early");
    #0.2 check(y == 1'b0, "y did not fall 2 ns after a");
    // short pulse shorter than the delay is carried through
    #5 a = 1'b1; #0.5 a = 1'b0;
    #1.6 check(y == 1'b1, "short pulse lost");
    #0.5 check(y == 1'b0, "short pulse too long");
    dut.set_delay(5000);
    #5 a = 1'b1;
    #4.9 check(y == 1'b0, "new delay not applied");
    #0.2 check(y == 1'b1, "y did not rise after 5 ns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
