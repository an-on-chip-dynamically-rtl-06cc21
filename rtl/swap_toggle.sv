// Swap toggle: holds dsel, the selection of the delay line in use.
//
// The swap request reaches this block through the arbiter that also guards
// the user's delay path, so the grant g arrives only while no delay is in
// progress. The rising edge of g toggles dsel (which switches the
// crossbars); the acknowledge swapack is g delayed by D1, a matched delay
// covering the crossbar change. The four-phase swapreq/swapack handshake is
// completed by the controller lowering swapreq, which releases g, and
// swapack falls D1 later. rst selects line 0 for use.
// The D1 delay element is behavioural; 5 ns is an assumed value.
module swap_toggle #(
  parameter int  D1_PS = 5000
) (
  input  logic rst,
  input  logic g,
  output logic dsel,
  output logic swapack
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(posedge g or posedge rst)
    if (rst) dsel <= 1'b0;
    else     dsel <= ~dsel;

  delay_element #(.DELAY_PS(D1_PS)) u_d1 (.a(g), .y(swapack));

endmodule
