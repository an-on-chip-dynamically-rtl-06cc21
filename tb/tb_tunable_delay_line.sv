// Test of the tunable delay line (8 cells of 1 ns): from reset the delay is
// the full eight cells; each left shift removes one cell down to zero, each
// right shift adds one back up to eight. At every setting the rising and
// the falling edge are both measured, the shift register must hold a
// thermometer code and min/notmax must flag the ends.
module tb_tunable_delay_line;
  timeunit 1ns; timeprecision 1ps;
  import recal_pkg::*;
  localparam int N = 8;
  logic rst = 0, sclk = 0, slr = 0, din = 0;
  logic dout, min, notmax;
  logic [N-1:0] state;
  int checks = 0, failures = 0;

  tunable_delay_line #(.N_CELLS(N), .CELL_DELAY_PS(1000)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $realtime, what); end
  endtask

  task automatic shift(logic dir);
    slr = dir; #5 sclk = 1; #5 sclk = 0; #5;
  endtask

  task automatic measure(int k);
    realtime t0;
    logic [N-1:0] expect_state;
    expect_state = ~((N)'((1 << k) - 1));    // k leading zeros from the left
    if (k == N) expect_state = '0;
    check(state == expect_state, $sformatf("state %b for %0d cells", state, k));
    check(min == (k == 0), "min flag");
    check(notmax == (k != N), "notmax flag");
    t0 = $realtime; din = 1;
    wait (dout);
    check($realtime - t0 > k - 0.01 && $realtime - t0 < k + 0.01,
          $sformatf("rise delay %0.2f for %0d cells", $realtime - t0, k));
    #20 t0 = $realtime; din = 0;
    wait (!dout);
    check($realtime - t0 > k - 0.01 && $realtime - t0 < k + 0.01,
          $sformatf("fall delay %0.2f for %0d cells", $realtime - t0, k));
    #20;
  endtask

  initial begin
    #1 rst = 1; #5 rst = 0; #5;
    measure(N);
    for (int k = N - 1; k >= 0; k--) begin shift(SHIFT_LEFT); measure(k); end
    shift(SHIFT_LEFT); measure(0);           // saturates at the minimum
    for (int k = 1; k <= N; k++) begin shift(SHIFT_RIGHT); measure(k); end
    shift(SHIFT_RIGHT); measure(N);          // saturates at the maximum
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
