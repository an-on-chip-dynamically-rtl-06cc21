// Dynamically recalibrated delay line: top level.
//
// A self-timed circuit raises din and gets dout back after a delay held
// close to a target (120 ns with the defaults) whatever the process,
// voltage and temperature, using only the slow 32.768 kHz real-time-clock
// crystal as reference. Two tunable delay lines are used: one serves
// din/dout while the other is measured against the reference and adjusted
// by one cell; then they are swapped.
//
// User path : din -> decoupler -> arbiter (lower input) -> Q-element ->
//             line in use (rising and falling event) -> Q-element ->
//             decoupler -> dout.
// Swap path : control module swapreq -> arbiter (upper input) -> toggle
//             flip-flop (dsel) and D1 -> swapack.
// Calibration: control module oscillates the other line through its own
//             arbiter and Q-element and counts oscillations per reference
//             period (see control_module).
// din/dout is a four-phase handshake: raise din, wait for dout high, lower
// din, wait for dout low. Thanks to the decoupler the internal path is
// already released when dout rises, so a din held high never blocks a swap.
// A request that meets a swap in progress is delayed by the swap (the
// arbiter) but never sees a line while it is being switched.
// rst clears every shift register (longest delay), selects line 0 for use
// and puts the controller in SwaitHz; din must be low during rst.
// The user and calibration paths are self-timed loops through the lines;
// with a line at its minimum they are combinational loops through the
// Q-elements, which is intended (see double_buffered_delay).
// The structure follows the design; the arbiter timing, D1 and the
// encodings are this implementation's choices (see the blocks).
module recal_delay_top
  import recal_pkg::*;
#(
  parameter int  N_CELLS        = 25,
  parameter int  CELL_DELAY_PS  = 7500,
  parameter int  MAX_COUNT      = 254,
  parameter int  COUNT_W        = 16,
  parameter int  DIV_STAGES     = 15,
  parameter int  LCLK_PERIOD_PS = 4000,
  parameter int  D1_PS          = 5000,
  parameter bit  FASTMODE_EN    = 1'b1
) (
  input  logic               rst,
  input  logic               clk32,
  input  logic               din,
  output logic               dout,
  // observation
  output logic               dsel,
  output logic               fastmode,
  output logic               sclk,
  output logic               slr,
  output logic               swapreq,
  output logic               swapack,
  output cal_state_t         cal_state,
  output logic [COUNT_W-1:0] cal_count,
  output logic [N_CELLS-1:0] line0_state,
  output logic [N_CELLS-1:0] line1_state
);
  timeunit 1ns; timeprecision 1ps;

  logic use_req, use_ack;     // decoupler <-> arbiter / Q-element
  logic use_grant, swap_grant;
  logic line_in, line_out;    // Q-element inner channel to the line in use
  logic cin, cout;

  decoupler u_dec (.rst(rst), .din(din), .dout(dout), .ri(use_req), .ai(use_ack));

  arbiter #(.LCLK_PERIOD_PS(LCLK_PERIOD_PS)) u_arb (
    .rst(rst), .r1(swapreq), .r2(use_req), .g1(swap_grant), .g2(use_grant));

  q_element u_q (.rst(rst), .r(use_grant), .a(use_ack), .ro(line_in), .ai(line_out));

  swap_toggle #(.D1_PS(D1_PS)) u_swap (
    .rst(rst), .g(swap_grant), .dsel(dsel), .swapack(swapack));

  double_buffered_delay #(.N_CELLS(N_CELLS), .CELL_DELAY_PS(CELL_DELAY_PS)) u_dbl (
    .rst(rst), .dsel(dsel),
    .din(line_in), .dout(line_out),
    .cin(cin), .cout(cout),
    .sclk(sclk), .slr(slr), .fastmode(fastmode),
    .state0(line0_state), .state1(line1_state));

  control_module #(
    .COUNT_W(COUNT_W), .MAX_COUNT(MAX_COUNT), .DIV_STAGES(DIV_STAGES),
    .LCLK_PERIOD_PS(LCLK_PERIOD_PS), .FASTMODE_EN(FASTMODE_EN)
  ) u_ctl (
    .rst(rst), .clk32(clk32), .fastmode(fastmode),
    .sclk(sclk), .slr(slr), .swapreq(swapreq), .swapack(swapack),
    .cin(cin), .cout(cout), .st(cal_state), .count(cal_count));

endmodule
