// One cell of the tunable delay line.
//
// A cell has three parts:
//  * delay:      while the cell's stage bit sout is low, the incoming event
//                din is gated through an AND gate into the delay element and
//                leaves on dout towards the next cell;
//  * tap:        while sout is high, din is steered onto the completion
//                chain instead (tap = din & sout), so the line ends here;
//  * completion: a linear OR chain, or_out = tap | or_in, that carries the
//                tapped event back to the line output, one OR gate per cell.
//  * control:    one stage of a bidirectional shift register clocked by sclk.
//                slr = SHIFT_LEFT loads the right neighbour's bit (sin_r),
//                SHIFT_RIGHT the left neighbour's (sin_l). An asynchronous
//                reset clears the stage, which selects the longest delay.
// The cell structure follows the design; the AND/tap gating, the OR-chain
// direction and the asynchronous reset are this implementation's choices.
module delay_cell
  import recal_pkg::*;
#(
  parameter int  DELAY_PS = 7500
) (
  input  logic rst,
  input  logic sclk,
  input  logic slr,
  input  logic sin_l,   // stage bit of the left neighbour (or 0 at the end)
  input  logic sin_r,   // stage bit of the right neighbour (or 1 at the end)
  output logic sout,
  input  logic din,
  output logic dout,
  input  logic or_in,
  output logic or_out
);
  timeunit 1ns; timeprecision 1ps;

  logic gated, tap;

  always_ff @(posedge sclk or posedge rst)
    if (rst)                     sout <= 1'b0;
    else if (slr == SHIFT_LEFT)  sout <= sin_r;
    else                         sout <= sin_l;

  assign gated  = din & ~sout;
  assign tap    = din & sout;
  assign or_out = tap | or_in;

  delay_element #(.DELAY_PS(DELAY_PS)) u_dly (.a(gated), .y(dout));

endmodule
