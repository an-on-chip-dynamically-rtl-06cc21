// Double-buffered delay line.
//
// Two tunable delay lines sit behind two 2x2 crossbars. dsel chooses which
// line serves the user (din -> dout) and which one is being calibrated
// (cin -> cout):
//   dsel = 0 : line 0 in use, line 1 calibrated
//   dsel = 1 : line 1 in use, line 0 calibrated
// The shift-register controls sclk and slr go only to the line being
// calibrated (sclk is gated by dsel; dsel must not change while sclk is
// high). One fast-mode detector is shared by both lines and sees the limit
// flags of the line being calibrated. Which dsel value selects which line
// is this implementation's choice.
//
// A line set to its minimum (no delay element in use) is a purely
// combinational path from its input to its output. Together with the
// Q-element that drives and watches each line, this closes a combinational
// loop (ro -> line -> ai -> Q-element state -> ro), which lint tools report.
// The loop is intended: it is the self-timed handshake of the Q-element, it
// settles after one inner cycle (ro falls once ai has risen), and in
// silicon the gates on it have delay.
module double_buffered_delay #(
  parameter int  N_CELLS       = 25,
  parameter int  CELL_DELAY_PS = 7500
) (
  input  logic rst,
  input  logic dsel,
  input  logic din,
  output logic dout,
  input  logic cin,
  output logic cout,
  input  logic sclk,
  input  logic slr,
  output logic fastmode,
  output logic [N_CELLS-1:0] state0,
  output logic [N_CELLS-1:0] state1
);
  timeunit 1ns; timeprecision 1ps;

  logic in0, in1, out0, out1;
  logic sclk0, sclk1;
  logic min0, min1, notmax0, notmax1;
  logic cal_min, cal_notmax;

  crossbar_switch u_xin  (.sel(dsel), .a0(din),  .a1(cin),  .y0(in0),  .y1(in1));
  crossbar_switch u_xout (.sel(dsel), .a0(out0), .a1(out1), .y0(dout), .y1(cout));

  assign sclk0 = sclk & dsel;
  assign sclk1 = sclk & ~dsel;

  tunable_delay_line #(.N_CELLS(N_CELLS), .CELL_DELAY_PS(CELL_DELAY_PS)) u_line0 (
    .rst(rst), .sclk(sclk0), .slr(slr), .din(in0), .dout(out0),
    .min(min0), .notmax(notmax0), .state(state0));

  tunable_delay_line #(.N_CELLS(N_CELLS), .CELL_DELAY_PS(CELL_DELAY_PS)) u_line1 (
    .rst(rst), .sclk(sclk1), .slr(slr), .din(in1), .dout(out1),
    .min(min1), .notmax(notmax1), .state(state1));

  assign cal_min    = dsel ? min0    : min1;
  assign cal_notmax = dsel ? notmax0 : notmax1;

  fastmode_detect u_fast (
    .rst(rst), .sclk(sclk), .slr(slr), .min(cal_min), .notmax(cal_notmax),
    .fastmode(fastmode));

endmodule
