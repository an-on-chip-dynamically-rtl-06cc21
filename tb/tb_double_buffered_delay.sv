// Test of the double-buffered delay line (two 6-cell lines of 1 ns).
// For both values of dsel it checks that din/dout uses one line and
// cin/cout the other, that sclk/slr only shift the line being calibrated,
// and that the shared fast-mode flag follows that line's limits.
module tb_double_buffered_delay;
  timeunit 1ns; timeprecision 1ps;
  import recal_pkg::*;
  localparam int N = 6;
  logic rst = 0, dsel = 0, din = 0, cin = 0, sclk = 0, slr = 0;
  logic dout, cout, fastmode;
  logic [N-1:0] state0, state1;
  int checks = 0, failures = 0;

  double_buffered_delay #(.N_CELLS(N), .CELL_DELAY_PS(1000)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $realtime, what); end
  endtask

  function automatic int cells(logic [N-1:0] s);
    for (int i = 0; i < N; i++) if (s[i]) return i;
    return N;
  endfunction

  task automatic shift(logic dir);
    slr = dir; #5 sclk = 1; #5 sclk = 0; #5;
  endtask

  task automatic measure_use(int k);
    realtime t0 = $realtime;
    din = 1; wait (dout);
    check($realtime - t0 > k - 0.01 && $realtime - t0 < k + 0.01,
          $sformatf("use delay %0.2f, expected %0d", $realtime - t0, k));
    din = 0; wait (!dout); #10;
  endtask

  task automatic measure_cal(int k);
    realtime t0 = $realtime;
    cin = 1; wait (cout);
    check($realtime - t0 > k - 0.01 && $realtime - t0 < k + 0.01,
          $sformatf("cal delay %0.2f, expected %0d", $realtime - t0, k));
    cin = 0; wait (!cout); #10;
  endtask

  initial begin
    #1 rst = 1; #5 rst = 0; #5;
    // dsel = 0: line 1 is calibrated
    shift(SHIFT_LEFT); shift(SHIFT_LEFT);
    check(cells(state0) == N && cells(state1) == N - 2, "dsel=0 shifted the wrong line");
    check(fastmode == 1'b1, "two left shifts did not set fast mode");
    measure_use(N); measure_cal(N - 2);
    // swap: line 0 calibrated, line 1 in use
    dsel = 1; #5;
    measure_use(N - 2); measure_cal(N);
    shift(SHIFT_LEFT);
    check(cells(state0) == N - 1 && cells(state1) == N - 2, "dsel=1 shifted the wrong line");
    shift(SHIFT_RIGHT);
    check(fastmode == 1'b0, "direction change did not clear fast mode");
    check(cells(state0) == N, "right shift on line 0");
    shift(SHIFT_RIGHT);   // line 0 already at maximum: no fast mode
    check(fastmode == 1'b0, "fast mode set at the maximum");
    measure_use(N - 2); measure_cal(N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
