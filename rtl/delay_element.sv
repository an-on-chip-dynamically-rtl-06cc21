// Behavioural model of the delay element inside one delay cell (also used
// for the matched delay D1 of the swap logic).
//
// This is not synthesizable logic: the real element is whatever the target
// technology offers (a routed logic block on an FPGA, a chain of buffers in a
// standard-cell process). The model is a transport delay of DELAY_PS
// picoseconds from a to y; y starts low. The default of 7500 ps is the
// middle of the 7-8 ns per cell measured on an FPGA implementation of the
// design at room temperature.
//
// set_delay(ps) changes the delay at run time, so that a testbench can
// emulate the drift of a cell with temperature.
module delay_element #(
  parameter int DELAY_PS = 7500
) (
  input  logic a,
  output logic y
);
  timeunit 1ns; timeprecision 1ps;

  real dly_ns = DELAY_PS / 1000.0;

  function automatic void set_delay(int ps);
    dly_ns = ps / 1000.0;
  endfunction

  initial y = 1'b0;

  // Every edge of a is queued with its due time and applied in order, so
  // pulses shorter than the delay are kept (transport delay).
  logic    v_q[$];
  realtime t_q[$];

  always @(a) begin
    v_q.push_back(a);
    t_q.push_back($realtime + dly_ns);
  end

  always begin
    wait (v_q.size() != 0);
    if (t_q[0] > $realtime) #(t_q[0] - $realtime);
    y = v_q.pop_front();
    void'(t_q.pop_front());
  end

endmodule
