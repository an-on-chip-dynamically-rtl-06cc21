// Test of the one-hot calibration state machine: idle until a tick, then
// Sclear, Scount, Swait, Slr, Sshift, Sswap, one reference period each;
// back to idle without fast mode, or straight to Scount with fast mode, so
// a fast-mode recalibration repeats every five periods.
module tb_cal_fsm;
  timeunit 1ns; timeprecision 1ps;
  import recal_pkg::*;
  logic rst = 0, clk32 = 0, tick = 0, fastmode = 0;
  cal_state_t st;
  int checks = 0, failures = 0;

  cal_fsm dut (.*);

  always #10 clk32 = ~clk32;

  task automatic expect_state(cal_state_t e, string name);
    @(posedge clk32); #1;
    checks++;
    if (st != e) begin failures++; $display("FAIL @%0t: state %b, expected %s", $realtime, st, name); end
  endtask

  initial begin
    #1 rst = 1; #4 rst = 0;
    #1 checks++; if (st != ST_WAIT_HZ) begin failures++; $display("FAIL: reset state"); end
    repeat (3) expect_state(ST_WAIT_HZ, "SwaitHz");
    @(negedge clk32) tick = 1; @(negedge clk32) tick = 0;
    #0; // the rising edge inside the tick moved to Sclear
    checks++; if (st != ST_CLEAR) begin failures++; $display("FAIL: tick did not start"); end
    expect_state(ST_COUNT, "Scount");
    expect_state(ST_WAIT, "Swait");
    expect_state(ST_LR, "Slr");
    expect_state(ST_SHIFT, "Sshift");
    expect_state(ST_SWAP, "Sswap");
    expect_state(ST_WAIT_HZ, "SwaitHz");
    expect_state(ST_WAIT_HZ, "SwaitHz");
    // fast mode: Sswap -> Scount, five-period loop
    @(negedge clk32) tick = 1; @(negedge clk32) tick = 0;
    fastmode = 1;
    for (int k = 0; k < 3; k++) begin
      expect_state(ST_COUNT, "Scount");
      expect_state(ST_WAIT, "Swait");
      expect_state(ST_LR, "Slr");
      expect_state(ST_SHIFT, "Sshift");
      expect_state(ST_SWAP, "Sswap");
    end
    fastmode = 0;
    expect_state(ST_WAIT_HZ, "SwaitHz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
