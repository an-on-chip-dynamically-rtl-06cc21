// Test of the calibration control module with a model delay line between
// cin and cout (a plain delay, changed between calibrations) and a model
// swap responder. For each calibration it checks that
//  * the counter equals the number of oscillations seen on cin,
//  * the count lies between one reference period divided by the loop
//    period bounds (two line delays plus 0..60 ns of arbiter and
//    Q-element overhead),
//  * slr is right (longer) when the count exceeds MAX_COUNT and left
//    otherwise,
//  * sclk pulses once, after slr is valid, and swapreq completes a
//    four-phase handshake with swapack,
//  * with fast mode the next calibration starts five periods later.
module tb_control_module;
  timeunit 1ns; timeprecision 1ps;
  import recal_pkg::*;
  localparam real TREF = 30517.578;
  logic rst = 0, clk32 = 0, fastmode = 0, swapack = 0, cout;
  logic sclk, slr, swapreq, cin;
  cal_state_t st;
  logic [15:0] count;
  int checks = 0, failures = 0;
  int osc = 0, n_cal = 0, n_left = 0, n_right = 0, n_fast = 0;
  int line_ps = 20000;
  realtime last_count = 0;

  control_module #(.DIV_STAGES(3)) dut (.*);
  delay_element #(.DELAY_PS(20000)) u_line (.a(cin), .y(cout));

  always #(TREF / 2.0) clk32 = ~clk32;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $realtime, what); end
  endtask

  always @(posedge cin) osc++;
  always @(posedge st.clear or posedge st.swap) osc = 0;

  always @(posedge st.count) begin
    if (last_count > 0 && fastmode) begin
      n_fast++;
      check($realtime - last_count > 4.9 * TREF && $realtime - last_count < 5.1 * TREF,
            "fast-mode recalibration not five periods apart");
    end
    last_count = $realtime;
  end

  always @(posedge st.lr) begin
    real lo, hi;
    #100;   // after slr is sampled
    n_cal++;
    lo = TREF / (2.0 * line_ps / 1000.0 + 60.0);
    hi = TREF / (2.0 * line_ps / 1000.0);
    check(count == 16'(osc), $sformatf("count %0d, oscillations %0d", count, osc));
    check(real'(count) > lo - 1.0 && real'(count) < hi + 1.0,
          $sformatf("count %0d outside [%0.1f, %0.1f] for %0d ps", count, lo, hi, line_ps));
    check(slr == ((count > 254) ? SHIFT_RIGHT : SHIFT_LEFT), "wrong shift direction");
    if (slr == SHIFT_LEFT) n_left++; else n_right++;
  end

  always @(posedge sclk) check(st.shift && !st.count, "sclk outside Sshift");

  // swap responder: acknowledge 20 ns after the request, release 20 ns after
  always @(posedge swapreq) begin
    check(st.swap, "swapreq outside Sswap");
    #20 swapack = 1;
    wait (!swapreq);
    #20 swapack = 0;
  end

  initial begin
    #1 rst = 1; #200 rst = 0;
    // short line: oscillates fast, counts high, shifts right
    line_ps = 20000; u_line.set_delay(line_ps);
    repeat (2) @(posedge st.swap);
    // long line: counts low, shifts left
    @(negedge st.swap); line_ps = 100000; u_line.set_delay(line_ps);
    repeat (2) @(posedge st.swap);
    // fast mode: back-to-back calibrations
    fastmode = 1;
    @(negedge st.swap); line_ps = 60000; u_line.set_delay(line_ps);
    repeat (4) @(posedge st.swap);
    fastmode = 0;
    repeat (2) @(posedge st.swap);
    #(3 * TREF);
    check(n_cal >= 10, "too few calibrations");
    check(n_left > 0 && n_right > 0, "both directions not seen");
    check(n_fast >= 3, "fast-mode loop not seen");
    check(!swapreq && !swapack, "swap handshake not complete");
    $display("calibrations=%0d left=%0d right=%0d fastloops=%0d", n_cal, n_left, n_right, n_fast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
