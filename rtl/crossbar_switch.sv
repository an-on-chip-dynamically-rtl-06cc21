// 2x2 crossbar switch of the double-buffered delay line.
//
// With sel = 0, a0 drives y0 and a1 drives y1; with sel = 1 they are
// crossed. One level of multiplexing, so changing sel is the only critical
// step of a swap. Used once to steer the use and calibration inputs into the
// two lines and once to steer the two line outputs back.
module crossbar_switch (
  input  logic sel,
  input  logic a0,
  input  logic a1,
  output logic y0,
  output logic y1
);
  timeunit 1ns; timeprecision 1ps;

  assign y0 = sel ? a1 : a0;
  assign y1 = sel ? a0 : a1;
endmodule
