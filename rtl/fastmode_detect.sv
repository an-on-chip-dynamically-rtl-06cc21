// Fast-mode detection.
//
// On every sclk edge the detector records the shift direction slr. If the
// shift about to be made is in the same direction as the previous one, and
// the line being shifted has not yet reached the limit in that direction
// (min for a left shift, notmax = 0 for a right shift), fastmode is set;
// otherwise it is cleared. fastmode therefore changes only on sclk and is
// stable long before the controller samples it at the end of its swap
// state. The limits are sampled before the shift takes effect, i.e. they
// tell whether this shift could still move the line.
// The condition follows the design; evaluating it with two flip-flops on
// sclk is this implementation's choice.
module fastmode_detect
  import recal_pkg::*;
(
  input  logic rst,
  input  logic sclk,
  input  logic slr,
  input  logic min,
  input  logic notmax,
  output logic fastmode
);
  timeunit 1ns; timeprecision 1ps;

  logic last_slr;
  logic have_last;  // no previous shift after reset

  always_ff @(posedge sclk or posedge rst)
    if (rst) begin
      last_slr  <= SHIFT_RIGHT;
      have_last <= 1'b0;
      fastmode  <= 1'b0;
    end else begin
      last_slr  <= slr;
      have_last <= 1'b1;
      fastmode  <= have_last && (slr == last_slr) &&
                   ((slr == SHIFT_LEFT) ? !min : notmax);
    end

endmodule
