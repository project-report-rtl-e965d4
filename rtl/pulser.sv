// pulser: turns each 0->1 transition of its input into a one-cycle pulse.
//
// A three-state machine: ZERO waits for the input to rise, PULSE drives
// the output high for exactly one cycle, STANDBY waits for the input to
// fall again.  The pulse appears the cycle after the input is seen high.
// The states follow the original design; the reset is synchronous,
// active low.
module pulser (
  input  logic clk,
  input  logic reset_n,
  input  logic key_in,
  output logic key_out
);
  typedef enum logic [1:0] {ZERO, PULSE, STANDBY} state_e;
  state_e state, next_state;

  always_ff @(posedge clk) begin
    if (!reset_n) state <= ZERO;
    else          state <= next_state;
  end

  always_comb begin
    next_state = state;
    unique case (state)
      ZERO:    if (key_in)  next_state = PULSE;
      PULSE:                next_state = STANDBY;
      STANDBY: if (!key_in) next_state = ZERO;
      default:              next_state = ZERO;
    endcase
  end

  assign key_out = (state == PULSE);
endmodule
