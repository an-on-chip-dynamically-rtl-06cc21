// Ripple counter for the calibration oscillations.
//
// Bit 0 toggles on every rising edge of cnt_clk (one per oscillation of the
// calibration loop); bit i toggles on the falling edge of bit i-1. clr
// clears all bits asynchronously. The value settles a few flip-flop delays
// after the last edge, long before the controller samples it. The counter
// wraps at 2**COUNT_W; 16 bits is this design's choice and leaves a wide
// margin over any count a sensible delay setting produces.
module ripple_counter #(
  parameter int COUNT_W = 16
) (
  input  logic clr,
  input  logic cnt_clk,
  output logic [COUNT_W-1:0] count
);
  timeunit 1ns; timeprecision 1ps;

  for (genvar i = 0; i < COUNT_W; i++) begin : g_bit
    logic q;
    if (i == 0) begin : g_first
      always_ff @(posedge cnt_clk or posedge clr)
        if (clr) q <= 1'b0;
        else     q <= ~q;
    end else begin : g_next
      always_ff @(negedge count[i-1] or posedge clr)
        if (clr) q <= 1'b0;
        else     q <= ~q;
    end
    assign count[i] = q;
  end

endmodule
