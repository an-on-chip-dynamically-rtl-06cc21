// Temperature-sweep experiment on the recalibrated delay line.
//
// Reproduces the measurement procedure used to evaluate the design: fast
// mode disabled, one calibration per tick, and one pulse sent through the
// user path after every swap, so that successive results alternate
// between the two lines. The tick comes every 32 reference periods
// (DIV_STAGES = 5) instead of every second to keep the run short. Line 1's
// cells are 4 % slower than line 0's, standing in for a layout difference
// between the two lines. The cell delay follows a temperature profile:
// switch-on hot (9.0 ns), more heat (9.5 ns), cooling to 6.0 ns, a steady
// phase, and re-heating to 9.0 ns.
// Checks:
//  * after the initial convergence every measured delay lies within the
//    target plus or minus one line step (two cells) and a small path offset,
//  * calibrations come only on ticks (no fast-mode repeats),
//  * during cooling the lines are lengthened (right shifts dominate), and
//    during re-heating shortened,
//  * the step between the two settings a line alternates between is larger
//    when hot than when cold.
module tb_temperature_sweep;
  timeunit 1ns; timeprecision 1ps;
  import recal_pkg::*;

  localparam int  N      = 25;
  localparam real TREF   = 30517.578;
  localparam real TARGET = TREF / 254.0;

  logic rst = 1'b0, clk32 = 1'b0, din = 1'b0;
  logic dout, dsel, fastmode, sclk, slr, swapreq, swapack;
  cal_state_t cal_state;
  logic [15:0] cal_count;
  logic [N-1:0] l0, l1;
  int checks = 0, failures = 0;

  recal_delay_top #(.DIV_STAGES(5), .FASTMODE_EN(1'b0)) dut (
    .rst(rst), .clk32(clk32), .din(din), .dout(dout),
    .dsel(dsel), .fastmode(fastmode), .sclk(sclk), .slr(slr),
    .swapreq(swapreq), .swapack(swapack), .cal_state(cal_state),
    .cal_count(cal_count), .line0_state(l0), .line1_state(l1));

  always #(TREF / 2.0) clk32 = ~clk32;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $realtime, what); end
  endtask

  // ---- temperature ----
  event temp_ev;
  int   cell_ps = 9000;
  task automatic set_temp(int ps);
    cell_ps = ps;
    -> temp_ev;
    #1;
  endtask
  for (genvar i = 0; i < N; i++) begin : g_temp
    always @(temp_ev) begin
      dut.u_dbl.u_line0.g_cell[i].u_cell.u_dly.set_delay(cell_ps);
      dut.u_dbl.u_line1.g_cell[i].u_cell.u_dly.set_delay(cell_ps * 104 / 100);
    end
  end

  // ---- calibration spacing: only on ticks ----
  realtime last_count = 0;
  always @(posedge cal_state.count) begin
    if (last_count > 0)
      check($realtime - last_count > 31.5 * TREF, "calibration repeated without a tick");
    last_count = $realtime;
  end

  // ---- shift statistics per phase ----
  int phase = 0;
  int n_left[5], n_right[5];
  always @(posedge sclk) if (slr == SHIFT_LEFT) n_left[phase]++; else n_right[phase]++;

  // ---- one pulse after every swap ----
  bit   settled = 0;
  real  dmin = 1.0e9, dmax = 0.0;
  real  last_d[2] = '{0.0, 0.0};
  real  step_sum[5] = '{default: 0.0};
  int   step_n[5] = '{default: 0};
  always @(negedge swapack) begin
    realtime t0;
    real d;
    int line;
    #200;
    line = dsel;
    t0 = $realtime;
    din = 1'b1;
    wait (dout);
    d = $realtime - t0;
    din = 1'b0;
    wait (!dout);
    if (settled) begin
      check(d > TARGET - 2.0 * 2.0 * 9.5 - 12.0 && d < TARGET + 2.0 * 2.0 * 9.5 + 12.0,
            $sformatf("line %0d delay %0.1f ns far from %0.1f", line, d, TARGET));
      if (d < dmin) dmin = d;
      if (d > dmax) dmax = d;
      if (last_d[line] > 0.0 && d != last_d[line]) begin
        step_sum[phase] += (d > last_d[line]) ? d - last_d[line] : last_d[line] - d;
        step_n[phase]++;
      end
    end
    last_d[line] = d;
  end

  localparam realtime TICK = 32 * TREF;

  initial begin
    #1 rst = 1'b1;
    #200 rst = 1'b0;
    // switch-on while hot: converge one cell per tick on each line
    set_temp(9000);
    #(45 * TICK);
    settled = 1;
    check(dut.u_dbl.u_line0.min == 0 && l0 != '0, "line 0 did not settle inside its range");
    // continued heat
    phase = 1;
    set_temp(9500);
    #(20 * TICK);
    // freezer spray: cells get faster, 9.5 -> 6.0 ns
    phase = 2;
    for (int ps = 9500; ps >= 6000; ps -= 125) begin
      set_temp(ps);
      #(2 * TICK);
    end
    // steady
    phase = 3;
    #(20 * TICK);
    // re-heat, 6.0 -> 9.0 ns
    phase = 4;
    for (int ps = 6000; ps <= 9000; ps += 125) begin
      set_temp(ps);
      #(2 * TICK);
    end
    #(10 * TICK);
    $display("delay range after convergence: %0.1f .. %0.1f ns (target %0.1f)", dmin, dmax, TARGET);
    for (int k = 0; k < 5; k++)
      $display("phase %0d: left %0d right %0d mean step %0.1f ns", k, n_left[k], n_right[k],
               step_n[k] ? step_sum[k] / step_n[k] : 0.0);
    check(n_right[2] > n_left[2], "cooling did not lengthen the lines");
    check(n_left[4] > n_right[4], "re-heating did not shorten the lines");
    check(step_n[1] > 0 && step_n[3] > 0, "no alternating steps seen");
    check(step_sum[1] / step_n[1] > step_sum[3] / step_n[3], "step not larger when hot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1s;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
