// Falling-handshake decoupler between the user's request din/dout and the
// arbiter input of the delay path (ri/ai).
//
// The user's rising edge is passed on (ri rises). As soon as the delay path
// acknowledges (ai rises), dout rises and ri is withdrawn at once, so the
// arbiter, and with it a pending delay-line swap, is released without
// waiting for the user to lower din. dout falls only once din is low and the
// inner handshake has returned to zero (ai low); only then can a new
// request start.
//   din+ -> ri+ -> ai+ -> (dout+, ri-) -> ai- ; din- -> dout-
// Implementation (this design's own):
//   dout : latch, set by ai, cleared when din and ai are both low
//   ri   = din & ~dout & ~ai
module decoupler (
  input  logic rst,
  input  logic din,
  output logic dout,
  output logic ri,
  input  logic ai
);
  timeunit 1ns; timeprecision 1ps;

  always_latch
    if (rst)                 dout = 1'b0;
    else if (ai || !din)     dout = ai;

  assign ri = din & ~dout & ~ai;

endmodule
