// Calibration control module.
//
// Measures how many oscillations the delay line under calibration completes
// in one period of the 32.768 kHz reference and nudges its delay by one
// cell towards the target, then asks for the two lines to be swapped.
//
// Parts:
//  * ref_divider / cal_fsm : the 1 Hz tick and the one-hot state machine.
//  * calibration loop      : a NOR gate (with the global reset as its
//    second input) drives the lower request of an arbiter; its grant drives
//    a Q-element whose inner channel is cin/cout, i.e. the calibration line.
//    The Q-element's acknowledge feeds back into the NOR, so the loop
//    oscillates with a period close to the delay of the user's path, which
//    contains the same arbiter and Q-element. The upper arbiter request is
//    the inverse of Scount: outside Scount it holds the arbiter and stops
//    the loop cleanly, without runt pulses.
//  * ripple_counter        : counts rising edges of the lower grant; cleared
//    in Sclear (and in Sswap, see cal_fsm).
//  * slr flip-flop         : clocked by Slr; a count above MAX_COUNT means
//    the line is too fast, so it is shifted right (longer), otherwise left.
//  * sclk                  : the Sshift state bit.
//  * swapreq flip-flop     : set by Sswap, cleared by swapack. The module
//    does not wait for swapack before the next calibration.
// FASTMODE_EN = 0 ignores fastmode, so calibration happens only on the
// 1 Hz tick; the published measurements of the design were taken that way
// to make the slow initial convergence visible. The default enables it.
// MAX_COUNT = 254 is one reference period (30518 ns) divided by the 120 ns
// target delay of the FPGA implementation of the design.
module control_module
  import recal_pkg::*;
#(
  parameter int  COUNT_W        = 16,
  parameter int  MAX_COUNT      = 254,
  parameter int  DIV_STAGES     = 15,
  parameter int  LCLK_PERIOD_PS = 4000,
  parameter bit  FASTMODE_EN    = 1'b1
) (
  input  logic               rst,
  input  logic               clk32,
  input  logic               fastmode,
  output logic               sclk,
  output logic               slr,
  output logic               swapreq,
  input  logic               swapack,
  output logic               cin,
  input  logic               cout,
  output cal_state_t         st,
  output logic [COUNT_W-1:0] count
);
  timeunit 1ns; timeprecision 1ps;

  logic tick;
  logic stop_req, osc_req, osc_grant, stop_grant, q_ack;
  logic cnt_clr, swap_clr;
  logic fast_cal;

  ref_divider #(.DIV_STAGES(DIV_STAGES)) u_div (.rst(rst), .clk32(clk32), .tick(tick));

  assign fast_cal = fastmode & FASTMODE_EN;

  cal_fsm u_fsm (.rst(rst), .clk32(clk32), .tick(tick), .fastmode(fast_cal), .st(st));

  // Calibration oscillator.
  assign stop_req = ~st.count;
  assign osc_req  = ~(q_ack | rst);

  // stop_grant is left unconnected on purpose: a clocked state machine
  // cannot safely wait for it, so Swait simply allows a full reference
  // period for the arbiter to settle.
  arbiter #(.LCLK_PERIOD_PS(LCLK_PERIOD_PS)) u_arb (
    .rst(rst), .r1(stop_req), .r2(osc_req), .g1(stop_grant), .g2(osc_grant));

  q_element u_q (.rst(rst), .r(osc_grant), .a(q_ack), .ro(cin), .ai(cout));

  // Oscillation counter and comparator.
  assign cnt_clr = rst | st.clear | st.swap;

  ripple_counter #(.COUNT_W(COUNT_W)) u_cnt (.clr(cnt_clr), .cnt_clk(osc_grant), .count(count));

  always_ff @(posedge st.lr or posedge rst)
    if (rst) slr <= SHIFT_LEFT;
    else     slr <= (count > COUNT_W'(MAX_COUNT)) ? SHIFT_RIGHT : SHIFT_LEFT;

  assign sclk = st.shift;

  // Swap request: four-phase with swapack.
  assign swap_clr = rst | swapack;

  always_ff @(posedge st.swap or posedge swap_clr)
    if (swap_clr) swapreq <= 1'b0;
    else          swapreq <= 1'b1;

endmodule
