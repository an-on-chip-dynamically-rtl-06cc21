// Behavioural model of the arbiter's local clock.
//
// Not synthesizable: in silicon this is a gated ring oscillator. While en is
// high it produces a clock of period PERIOD_PS (first rising edge half a
// period after en rises); when en falls the current cycle is finished and
// clk rests low. The 4 ns default is an assumed FPGA ring-oscillator period.
module local_clock_gen #(
  parameter int  PERIOD_PS = 4000
) (
  input  logic en,
  output logic clk
);
  timeunit 1ns; timeprecision 1ps;

  initial clk = 1'b0;

  always begin
    if (en) begin
      #(PERIOD_PS / 2000.0) clk = 1'b1;
      #(PERIOD_PS / 2000.0) clk = 1'b0;
    end else begin
      @(posedge en);
    end
  end

endmodule
