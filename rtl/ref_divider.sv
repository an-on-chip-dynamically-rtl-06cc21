// Reference divider: produces the calibration tick from the 32.768 kHz
// reference clock.
//
// A chain of DIV_STAGES toggle flip-flops (a ripple divider) divides clk32
// by 2**DIV_STAGES; with the default of 15 stages the last stage is a 1 Hz
// square wave. That wave is synchronised on the falling edge of clk32 and
// its rising edge is turned into tick, a pulse one clk32 period long that
// runs from falling edge to falling edge, so the controller, clocked on the
// rising edge, sees exactly one tick per period of the last stage.
// The divider and the falling-edge synchroniser follow the design; the
// edge detection is this design's choice.
module ref_divider #(
  parameter int DIV_STAGES = 15
) (
  input  logic rst,
  input  logic clk32,
  output logic tick
);
  timeunit 1ns; timeprecision 1ps;

  logic [DIV_STAGES-1:0] t;
  logic hz_s, hz_d;

  for (genvar i = 0; i < DIV_STAGES; i++) begin : g_stage
    logic q;
    if (i == 0) begin : g_first
      always_ff @(posedge clk32 or posedge rst)
        if (rst) q <= 1'b0;
        else     q <= ~q;
    end else begin : g_next
      always_ff @(negedge t[i-1] or posedge rst)
        if (rst) q <= 1'b0;
        else     q <= ~q;
    end
    assign t[i] = q;
  end

  always_ff @(negedge clk32 or posedge rst)
    if (rst) begin
      hz_s <= 1'b0;
      hz_d <= 1'b0;
    end else begin
      hz_s <= t[DIV_STAGES-1];
      hz_d <= hz_s;
    end

  assign tick = hz_s & ~hz_d;

endmodule
