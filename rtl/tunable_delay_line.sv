// Tunable delay line: a chain of N_CELLS delay cells.
//
// The shift-register bits of the cells form a thermometer code
// 0..0 1..1; the event entering on din passes through the delay element of
// every leading cell whose bit is 0 and is tapped off at the first cell
// whose bit is 1. With every bit clear (the reset state) the event runs
// through all cells and the last cell's dout closes the completion chain, so
// the delay ranges from 0 to N_CELLS element delays plus the OR chain.
// Zeros enter from the left, ones from the right: a left shift (slr = 1)
// shortens the delay by one element, a right shift lengthens it.
//   min    = leftmost bit set  : shortest delay, no further left shift helps
//   notmax = rightmost bit set : not at the longest delay
// sclk and slr only need to be stable around the sclk edge; the line must
// not be in use while it is shifted (the double buffering ensures that).
// N_CELLS = 25 and the per-cell delay follow the FPGA implementation of the
// design.
module tunable_delay_line #(
  parameter int  N_CELLS       = 25,
  parameter int  CELL_DELAY_PS = 7500
) (
  input  logic rst,
  input  logic sclk,
  input  logic slr,
  input  logic din,
  output logic dout,
  output logic min,
  output logic notmax,
  output logic [N_CELLS-1:0] state   // shift-register contents, bit 0 = leftmost
);
  timeunit 1ns; timeprecision 1ps;

  logic [N_CELLS:0]   d;       // d[i] enters cell i
  logic [N_CELLS:0]   orc;     // orc[i] leaves cell i towards the output
  logic [N_CELLS-1:0] s;

  assign d[0]        = din;
  assign orc[N_CELLS] = d[N_CELLS];   // longest delay: end of the line

  for (genvar i = 0; i < N_CELLS; i++) begin : g_cell
    delay_cell #(.DELAY_PS(CELL_DELAY_PS)) u_cell (
      .rst   (rst),
      .sclk  (sclk),
      .slr   (slr),
      .sin_l (i == 0 ? 1'b0 : s[(i == 0) ? 0 : i-1]),
      .sin_r (i == N_CELLS-1 ? 1'b1 : s[(i == N_CELLS-1) ? i : i+1]),
      .sout  (s[i]),
      .din   (d[i]),
      .dout  (d[i+1]),
      .or_in (orc[i+1]),
      .or_out(orc[i])
    );
  end

  assign dout   = orc[0];
  assign min    = s[0];
  assign notmax = s[N_CELLS-1];
  assign state  = s;

endmodule
