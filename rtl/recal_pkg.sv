// Shared types and constants of the recalibrated delay line.
//
// The shift direction of the tunable delay lines is carried on one wire,
// slr. Shifting left moves the first set stage of the thermometer-coded
// shift register towards the input, which shortens the delay; shifting right
// lengthens it. The encoding (1 = left) is this design's choice.
//
// The calibration controller is a one-hot state machine; its state is a
// packed struct so that every state bit has a name and can be used directly
// as a glitch-free strobe or clock, as the controller requires.
package recal_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam logic SHIFT_LEFT  = 1'b1;  // decrease delay
  localparam logic SHIFT_RIGHT = 1'b0;  // increase delay

  // One-hot controller state, one bit per state.
  typedef struct packed {
    logic wait_hz;  // SwaitHz: idle, waiting for the 1 Hz tick
    logic clear;    // Sclear : clear the oscillation counter
    logic count;    // Scount : calibration oscillator running
    logic wait_cnt; // Swait  : oscillator stopped, counter settling
    logic lr;       // Slr    : sample the >MaxCount comparison into slr
    logic shift;    // Sshift : clock the shift register (sclk)
    logic swap;     // Sswap  : start the swapreq/swapack handshake
  } cal_state_t;

  localparam cal_state_t ST_WAIT_HZ = '{wait_hz: 1'b1, default: 1'b0};
  localparam cal_state_t ST_CLEAR   = '{clear:   1'b1, default: 1'b0};
  localparam cal_state_t ST_COUNT   = '{count:   1'b1, default: 1'b0};
  localparam cal_state_t ST_WAIT    = '{wait_cnt:1'b1, default: 1'b0};
  localparam cal_state_t ST_LR      = '{lr:      1'b1, default: 1'b0};
  localparam cal_state_t ST_SHIFT   = '{shift:   1'b1, default: 1'b0};
  localparam cal_state_t ST_SWAP    = '{swap:    1'b1, default: 1'b0};

endpackage
