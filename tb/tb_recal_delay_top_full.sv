// Full-size run of the recalibrated delay line with every parameter at its
// default: 25 cells of 7.5 ns, MAX_COUNT 254 (120 ns target) and the
// 15-stage divider, i.e. one calibration tick per second of the 32.768 kHz
// reference. After reset both lines are at their maximum delay; the test
// checks that requests then take the full length of the line, that the
// first calibration starts on the first tick (half a second after reset,
// when the last divider stage first rises), that the second one a second
// later sets fast mode, that fast mode then converges
// both lines within a few milliseconds, and that afterwards every request
// is delayed by 120 ns within the line granularity.
module tb_recal_delay_top_full;
  timeunit 1ns; timeprecision 1ps;
  import recal_pkg::*;

  localparam real TREF   = 30517.578;
  localparam real TARGET = TREF / 254.0;
  localparam real TOL    = 32.0;

  logic rst = 1'b0, clk32 = 1'b0, din = 1'b0;
  logic dout, dsel, fastmode, sclk, slr, swapreq, swapack;
  cal_state_t cal_state;
  logic [15:0] cal_count;
  logic [24:0] l0, l1;
  int checks = 0, failures = 0;
  int n_shift = 0, n_swap = 0, n_fast = 0;
  realtime first_count = 0;
  real dmin = 1.0e9, dmax = 0.0, d_uncal = 0.0;

  recal_delay_top dut (
    .rst(rst), .clk32(clk32), .din(din), .dout(dout),
    .dsel(dsel), .fastmode(fastmode), .sclk(sclk), .slr(slr),
    .swapreq(swapreq), .swapack(swapack), .cal_state(cal_state),
    .cal_count(cal_count), .line0_state(l0), .line1_state(l1));

  always #(TREF / 2.0) clk32 = ~clk32;

  always @(posedge sclk) n_shift++;
  always @(posedge swapack) n_swap++;
  always @(posedge fastmode) n_fast++;
  always @(posedge cal_state.count) if (first_count == 0) first_count = $realtime;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $realtime, what); end
  endtask

  task automatic request(output real d);
    realtime t0 = $realtime;
    din = 1'b1;
    wait (dout);
    d = $realtime - t0;
    #50 din = 1'b0;
    wait (!dout);
  endtask

  initial begin
    real d;
    #1 rst = 1'b1;
    #200 rst = 1'b0;
    #1000;
    repeat (5) begin
      request(d);
      d_uncal = d;
      check(d > 2.0 * 25 * 7.5, $sformatf("uncalibrated delay %0.1f ns shorter than the full line", d));
      #1000;
    end
    wait (first_count > 0);
    check(first_count > 0.49e9 && first_count < 0.51e9,
          $sformatf("first calibration at %0.3f ms", first_count / 1.0e6));
    // one shift per second until two in the same direction set fast mode
    wait (fastmode);
    check($realtime > 1.49e9 && $realtime < 1.51e9,
          $sformatf("fast mode set at %0.3f ms, expected on the second tick", $realtime / 1.0e6));
    #10ms;
    check(n_fast > 0, "fast mode never set");
    check(n_shift >= 30, "too few shifts to converge");
    repeat (200) begin
      #($urandom_range(500, 5000));
      request(d);
      check(d > TARGET - TOL && d < TARGET + TOL,
            $sformatf("delay %0.1f ns outside %0.1f +- %0.1f", d, TARGET, TOL));
      if (d < dmin) dmin = d;
      if (d > dmax) dmax = d;
    end
    $display("uncalibrated delay %0.1f ns, calibrated delays %0.1f .. %0.1f ns", d_uncal, dmin, dmax);
    $display("shifts=%0d swaps=%0d fastmode=%0d last delay %0.1f ns", n_shift, n_swap, n_fast, d);
    check(n_swap > 0, "no swap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
