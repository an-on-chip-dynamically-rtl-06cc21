// One-hot calibration state machine, clocked by the 32.768 kHz reference.
//
//   SwaitHz --tick--> Sclear -> Scount -> Swait -> Slr -> Sshift -> Sswap
//   Sswap   --fastmode--> Scount      Sswap --!fastmode--> SwaitHz
//
// Every state lasts one reference period (30.5 us) except SwaitHz, which
// waits for the 1 Hz tick. Each state bit comes straight from its own
// flip-flop, so it is glitch free and is used elsewhere as a strobe or a
// clock (counter clear, oscillator enable, slr sample, sclk, swap request).
// The state sequence follows the design. In fast mode the design quotes a
// recalibration every five reference periods; to obtain that, Sswap returns
// directly to Scount and the counter is also cleared during Sswap (see the
// control module), which is this design's reading.
module cal_fsm
  import recal_pkg::*;
(
  input  logic       rst,
  input  logic       clk32,
  input  logic       tick,
  input  logic       fastmode,
  output cal_state_t st
);
  timeunit 1ns; timeprecision 1ps;

  cal_state_t nxt;

  always_comb begin
    nxt = st;
    case (1'b1)
      st.wait_hz:  nxt = tick ? ST_CLEAR : ST_WAIT_HZ;
      st.clear:    nxt = ST_COUNT;
      st.count:    nxt = ST_WAIT;
      st.wait_cnt: nxt = ST_LR;
      st.lr:       nxt = ST_SHIFT;
      st.shift:    nxt = ST_SWAP;
      st.swap:     nxt = fastmode ? ST_COUNT : ST_WAIT_HZ;
      default:     nxt = ST_WAIT_HZ;
    endcase
  end

  always_ff @(posedge clk32 or posedge rst)
    if (rst) st <= ST_WAIT_HZ;
    else     st <= nxt;

  a_onehot: assert property (@(posedge clk32) disable iff (rst) $onehot(st))
    else $error("cal_fsm: state is not one-hot");

endmodule
