// Test of the Q-element with a 10 ns delay line model between ro and ai:
// after r rises, a must rise only after ro has gone through a full rising
// and falling cycle (20 ns), and fall promptly after r falls. The order of
// the inner events is checked on every cycle.
module tb_q_element;
  timeunit 1ns; timeprecision 1ps;
  logic rst = 0, r = 0, a, ro, ai;
  int checks = 0, failures = 0;
  int ro_rise = 0, ro_fall = 0;

  q_element dut (.*);
  delay_element #(.DELAY_PS(10000)) u_line (.a(ro), .y(ai));

  always @(posedge ro) ro_rise++;
  always @(negedge ro) ro_fall++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $realtime, what); end
  endtask

  initial begin
    #1 rst = 1; #5 rst = 0; #5;
    check(a == 0 && ro == 0, "not idle after reset");
    for (int i = 0; i < 20; i++) begin
      realtime t0;
      int r0, f0;
      r0 = ro_rise; f0 = ro_fall;
      t0 = $realtime; r = 1;
      wait (a);
      check($realtime - t0 > 19.99 && $realtime - t0 < 20.01,
            $sformatf("r->a %0.2f ns, expected 20", $realtime - t0));
      check(ro_rise == r0 + 1 && ro_fall == f0 + 1, "inner channel did not make one full cycle");
      check(ai == 0, "a rose before ai returned low");
      #($urandom_range(1, 30)) r = 0;
      #0.01 check(a == 0, "a did not fall with r");
      check(ro == 0, "ro restarted while r low");
      #($urandom_range(1, 30));
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
