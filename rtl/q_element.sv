// Q-element: turns one request on r into a full four-phase cycle on the
// inner channel (ro, ai) before acknowledging on a.
//
// Sequence: r+ ro+ ai+ ro- ai- a+ r- a-
// so both a rising and a falling event have passed through the delay line
// connected between ro and ai before a rises. The delay seen from r to a is
// therefore two line delays, and the arbiter in front is held until the
// line is back at rest.
// Implementation (this design's own, a speed-independent latch form):
//   x  : state latch, set by ai, cleared when r and ai are both low
//   ro = r & ~x
//   a  = r & x & ~ai
// rst clears x; r must be low while rst is high.
module q_element (
  input  logic rst,
  input  logic r,
  output logic a,
  output logic ro,
  input  logic ai
);
  timeunit 1ns; timeprecision 1ps;

  logic x;

  always_latch
    if (rst)                x = 1'b0;
    else if (ai || !r)      x = ai;

  assign ro = r & ~x;
  assign a  = r & x & ~ai;

  // The inner channel must follow four-phase order: ai may only rise while
  // ro is high.
  property p_ai_rise_after_ro;
    @(posedge ai) disable iff (rst) ro;
  endproperty
  a_ai_rise_after_ro: assert property (p_ai_rise_after_ro)
    else $error("q_element: ai rose while ro was low");

endmodule
