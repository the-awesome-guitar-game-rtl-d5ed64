// Button debouncer for an active-low push button or guitar switch.
//
// A four-state machine. In ZERO (released) the output is high and the counter
// is held clear; the first low sample on the input moves to ZERO_TO_ONE, where
// the output stays high while the debounce counter runs. When the counter
// reaches SETTLE_CYCLES the machine enters ONE (pressed, output low) and waits
// for the input to go high again; ONE_TO_ZERO then holds the output low for
// another SETTLE_CYCLES before returning to ZERO. Bounces during either wait
// are ignored because the input is not looked at there. This is the state
// machine of the original design, including its polarity and the 500000-clock
// (10 ms at 50 MHz) hold-off; the encoding of the states is this design's.
//
// Interface: key_in_n raw (0 = pressed), key_out_n debounced (0 = pressed),
// reset synchronous, active high.
// Timing: a press is reported SETTLE_CYCLES + 2 clocks after the first low
// sample, a release SETTLE_CYCLES + 2 clocks after the first high sample.
module debouncer
  import tagg_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES = tagg_pkg::DEBOUNCE_CYCLES,
  parameter int unsigned CNT_WIDTH     = tagg_pkg::DEBOUNCE_CNT_W
) (
  input  logic clk,
  input  logic reset,
  input  logic key_in_n,
  output logic key_out_n
);

  db_state_e              state, next_state;
  logic                   clear_cnt;
  logic [CNT_WIDTH-1:0]   cnt;
  logic                   settled;

  debounce_counter #(.WIDTH(CNT_WIDTH)) u_cnt (
    .clk   (clk),
    .clear (clear_cnt),
    .count (cnt)
  );

  assign settled = (32'(cnt) >= SETTLE_CYCLES);

  always_ff @(posedge clk) begin
    if (reset) state <= DB_ZERO;
    else       state <= next_state;
  end

  always_comb begin
    next_state = state;
    clear_cnt  = 1'b1;
    key_out_n  = 1'b1;
    unique case (state)
      DB_ZERO: begin
        if (!key_in_n) next_state = DB_ZERO_TO_ONE;
      end
      DB_ZERO_TO_ONE: begin
        clear_cnt = 1'b0;
        if (settled) next_state = DB_ONE;
      end
      DB_ONE: begin
        key_out_n = 1'b0;
        if (key_in_n) next_state = DB_ONE_TO_ZERO;
      end
      DB_ONE_TO_ZERO: begin
        clear_cnt = 1'b0;
        key_out_n = 1'b0;
        if (settled) next_state = DB_ZERO;
      end
      default: next_state = DB_ZERO;
    endcase
  end

endmodule
