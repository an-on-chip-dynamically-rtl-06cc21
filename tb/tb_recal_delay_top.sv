// End-to-end test of the recalibrated delay line.
//
// Runs the whole design with a real 32.768 kHz reference but a 16-period
// calibration tick (DIV_STAGES = 4) instead of one second, so that many
// calibrations fit in a short simulation. A user process issues four-phase
// din/dout requests at random intervals and measures each delay. The test
//  * checks the delay of every request settles to the 120 ns target within
//    the granularity of the lines (two cells per step, since the Q-element
//    sends both edges through the line) once calibration has converged,
//  * heats the cells (9.5 ns per cell) and checks the delay is pulled back,
//  * checks a fast-mode recalibration comes every five reference periods,
//  * checks a swap never happens while the calibration oscillator runs,
//  * counts each mechanism: swaps, left and right shifts, fast mode,
//    a request arriving during a swap, a din held high across a swap,
//    calibration oscillations; the shift registers must always hold a
//    thermometer code;
//    a mechanism that never happens counts as a failure.
module tb_recal_delay_top;
  timeunit 1ns; timeprecision 1ps;
  import recal_pkg::*;

  localparam int  N          = 25;
  localparam int  CW         = 16;
  localparam real TREF       = 30517.578;   // 1 / 32.768 kHz in ns
  localparam real TARGET     = TREF / 254.0;
  localparam real TOL        = 32.0;        // two steps of 2 x 7.5 ns plus path mismatch

  logic rst = 1'b0, clk32 = 1'b0, din = 1'b0;
  logic dout, dsel, fastmode, sclk, slr, swapreq, swapack;
  cal_state_t cal_state;
  logic [CW-1:0] cal_count;
  logic [N-1:0] l0, l1;

  recal_delay_top #(.DIV_STAGES(4)) dut (
    .rst(rst), .clk32(clk32), .din(din), .dout(dout),
    .dsel(dsel), .fastmode(fastmode), .sclk(sclk), .slr(slr),
    .swapreq(swapreq), .swapack(swapack), .cal_state(cal_state),
    .cal_count(cal_count), .line0_state(l0), .line1_state(l1));

  always #(TREF / 2.0) clk32 = ~clk32;

  int checks = 0, failures = 0;
  int n_swap = 0, n_left = 0, n_right = 0, n_fast = 0, n_fastloop = 0;
  int n_req_in_swap = 0, n_held_swap = 0, n_req = 0, n_osc = 0;
  bit settled = 0;
  realtime last_count_start = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $realtime, what);
    end
  endtask

  function automatic int cells(logic [N-1:0] s);
    // delay elements in use = leading zeros of the thermometer code
    for (int i = 0; i < N; i++) if (s[i]) return i;
    return N;
  endfunction

  function automatic bit thermo(logic [N-1:0] s);
    // legal code: zeros then ones (bit 0 = left)
    for (int i = 1; i < N; i++) if (s[i-1] && !s[i]) return 0;
    return 1;
  endfunction


  // ---- mechanism counters and rule checks ----
  always @(posedge swapack) begin
    n_swap++;
    check(!cal_state.count, "swap while calibration oscillator runs");
    if (din && dout) n_held_swap++;
  end
  always @(posedge sclk) begin
    if (slr == SHIFT_LEFT) n_left++; else n_right++;
  end
  always @(negedge sclk) begin
    checks++;
    if (!thermo(l0) || !thermo(l1)) begin
      failures++; $display("FAIL: shift register not thermometer coded");
    end
  end
  always @(posedge fastmode) n_fast++;
  always @(posedge dut.u_ctl.osc_grant) n_osc++;
  always @(posedge cal_state.count) begin
    if (last_count_start > 0 && fastmode &&
        ($realtime - last_count_start) < 5.5 * TREF) begin
      n_fastloop++;
      check(($realtime - last_count_start) > 4.5 * TREF, "fast-mode loop not five periods");
    end
    last_count_start = $realtime;
  end
  always @(posedge dut.swap_grant) if (dut.use_req) n_req_in_swap++;
  always @(posedge dut.use_req) if (swapreq) n_req_in_swap++;

  // ---- user requests ----
  realtime t0, d;
  task automatic request(int hold_ns);
    t0 = $realtime;
    din = 1'b1;
    wait (dout);
    d = $realtime - t0;
    n_req++;
    if (settled) begin
      check(d > TARGET - TOL && d < TARGET + TOL,
            $sformatf("delay %0.1f ns outside %0.1f +- %0.1f", d, TARGET, TOL));
    end
    #(hold_ns);
    din = 1'b0;
    wait (!dout);
  endtask


  task automatic traffic(realtime t_end, bit long_holds);
    while ($realtime < t_end) begin
      case ($urandom_range(0, 19))
        0: begin  // aim a request at a swap
          @(posedge swapreq);
          request($urandom_range(10, 200));
        end
        1: if (long_holds) request($urandom_range(20000, 80000));
           else            request($urandom_range(10, 200));
        default: begin
          #($urandom_range(300, 3000));
          request($urandom_range(10, 200));
        end
      endcase
    end
  endtask

  initial begin
    #1 rst = 1'b1;
    #200 rst = 1'b0;
    // startup: both lines at maximum delay; fast mode pulls them in
    traffic(8ms, 0);
    settled = 1;
    check(cells(l0) < N && cells(l1) < N, "lines never left the maximum delay");
    traffic(20ms, 1);
    $display("cool: line0=%0d line1=%0d cells, last delay %0.1f ns", cells(l0), cells(l1), d);
    // temperature rise: every cell 9.5 ns instead of 7.5 ns
    settled = 0;
    tb_heat_cells(9500);
    traffic(28ms, 0);
    settled = 1;
    traffic(40ms, 0);
    $display("hot:  line0=%0d line1=%0d cells, last delay %0.1f ns", cells(l0), cells(l1), d);
    $display("requests=%0d swaps=%0d left=%0d right=%0d fastmode=%0d fastloops=%0d req_in_swap=%0d held_swap=%0d osc=%0d",
             n_req, n_swap, n_left, n_right, n_fast, n_fastloop, n_req_in_swap, n_held_swap, n_osc);
    check(n_swap > 0, "no swap");
    check(n_left > 0, "no left shift");
    check(n_right > 0, "no right shift");
    check(n_fast > 0, "fast mode never set");
    check(n_fastloop > 0, "no fast-mode recalibration loop");
    check(n_req_in_swap > 0, "no request met a swap");
    check(n_held_swap > 0, "no swap while din was held high");
    check(n_osc > 0, "calibration oscillator never ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  event heat_ev;
  int heat_ps;
  task automatic tb_heat_cells(int ps);
    heat_ps = ps;
    -> heat_ev;
    #1;
  endtask
  for (genvar i = 0; i < N; i++) begin : g_heat_do
    always @(heat_ev) begin
      dut.u_dbl.u_line0.g_cell[i].u_cell.u_dly.set_delay(heat_ps);
      dut.u_dbl.u_line1.g_cell[i].u_cell.u_dly.set_delay(heat_ps);
    end
  end

  // watchdog
  initial begin
    #80ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
