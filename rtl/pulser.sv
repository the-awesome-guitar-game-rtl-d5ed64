// Press-to-pulse converter.
//
// Turns each press of a debounced active-low button into exactly one clock of
// low output, so that holding a button down does not raise interrupts again
// and again. Three states, as in the original design: ZERO waits for the
// input to go low, ONE_PULSE drives the output low for one clock, ONE_STANDBY
// waits for the input to go high again before the next press can count.
//
// Interface: key_in_n debounced button (0 = pressed), pulse_n one-clock low
// pulse, reset synchronous, active high.
// Timing: Moore output; the pulse is the clock after the first low sample.
module pulser
  import tagg_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic key_in_n,
  output logic pulse_n
);

  pu_state_e state, next_state;

  always_ff @(posedge clk) begin
    if (reset) state <= PU_ZERO;
    else       state <= next_state;
  end

  always_comb begin
    next_state = state;
    pulse_n    = 1'b1;
    unique case (state)
      PU_ZERO:        if (!key_in_n) next_state = PU_ONE_PULSE;
      PU_ONE_PULSE: begin
        pulse_n    = 1'b0;
        next_state = PU_ONE_STANDBY;
      end
      PU_ONE_STANDBY: if (key_in_n) next_state = PU_ZERO;
      default:        next_state = PU_ZERO;
    endcase
  end

endmodule
