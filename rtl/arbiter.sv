// Two-way arbiter (mutual-exclusion element) built from clocked logic.
//
// Requests r1 and r2 are four-phase: a request is granted by raising its
// grant (g1, g2), held while the request stays high, and released when it
// falls. At most one grant is high at any time.
//
// Structure, as in the clocked arbiter of the FPGA implementation of this
// design: input flip-flops sample the requests, a small state machine
// (IDLE, GRANT1, GRANT2) decides, and the state flip-flops drive the grants.
// Everything is clocked by a locally generated clock that runs only while
// the arbiter has something to do: a free arbiter with a request, or a
// grant whose request has been withdrawn. A request that stays pending
// behind the other grant does not keep the clock running. Requests
// sampled in the same cycle go to r1. A
// decision takes two to three local clock periods; metastability of the
// input flip-flops is assumed to resolve within one period.
// The enable condition, the tie rule and the state encoding are this
// design's choices.
module arbiter #(
  parameter int  LCLK_PERIOD_PS = 4000
) (
  input  logic rst,
  input  logic r1,
  input  logic r2,
  output logic g1,
  output logic g2
);
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic [1:0] {IDLE = 2'b00, GRANT1 = 2'b01, GRANT2 = 2'b10} arb_state_t;

  arb_state_t state;
  logic s1, s2;
  logic lclk, en;

  assign g1 = (state == GRANT1);
  assign g2 = (state == GRANT2);

  assign en = ((r1 | r2) & ~g1 & ~g2) | (g1 & ~r1) | (g2 & ~r2) |
              (s1 ^ r1) | (s2 ^ r2);

  local_clock_gen #(.PERIOD_PS(LCLK_PERIOD_PS)) u_lclk (.en(en), .clk(lclk));

  always_ff @(posedge lclk or posedge rst)
    if (rst) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
    end else begin
      s1 <= r1;
      s2 <= r2;
    end

  always_ff @(posedge lclk or posedge rst)
    if (rst) state <= IDLE;
    else begin
      unique case (state)
        IDLE:    state <= s1 ? GRANT1 : (s2 ? GRANT2 : IDLE);
        GRANT1:  state <= s1 ? GRANT1 : (s2 ? GRANT2 : IDLE);
        GRANT2:  state <= s2 ? GRANT2 : (s1 ? GRANT1 : IDLE);
        default: state <= IDLE;
      endcase
    end

  a_mutex: assert property (@(posedge lclk) disable iff (rst) !(g1 && g2))
    else $error("arbiter: both grants high");

endmodule
