// Test of the falling-handshake decoupler with a model inner channel that
// acknowledges ri after 10 ns and withdraws 10 ns after ri falls. Checks
// that ri is released as soon as ai rises even when din stays high, that
// dout only falls after din and ai are both low, and that no new inner
// request starts before the user completes the outer handshake.
module tb_decoupler;
  timeunit 1ns; timeprecision 1ps;
  logic rst = 0, din = 0, dout, ri, ai;
  int checks = 0, failures = 0;

  decoupler dut (.*);
  delay_element #(.DELAY_PS(10000)) u_inner (.a(ri), .y(ai));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $realtime, what); end
  endtask

  int ri_rises = 0;
  always @(posedge ri) ri_rises++;

  initial begin
    #1 rst = 1; #5 rst = 0; #5;
    for (int i = 0; i < 20; i++) begin
      int hold;
      hold = (i % 2) ? 200 : 3;   // long holds and early releases
      din = 1;
      #0.01 check(ri == 1, "ri did not follow din");
      wait (dout);
      #0.01 check(ri == 0, "ri not released when ai rose");
      #(hold);
      check(dout == 1, "dout fell while din high");
      if (hold == 3) check(ai == 1, "test setup: ai expected still high");
      din = 0;
      #0.01;
      if (hold == 3) check(dout == 1, "dout fell before ai returned low");
      wait (!dout);
      check(ai == 0, "dout fell while ai high");
      #5;
    end
    check(ri_rises == 20, "one inner request per outer request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
