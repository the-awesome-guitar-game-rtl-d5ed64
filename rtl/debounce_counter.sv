// Debounce counter: free-running up counter with a synchronous clear.
//
// The debouncer holds `clear` high while the button is stable and releases it
// to time the settle interval; `count` then rises by one every clock. The
// default width of 19 bits is the original design's, enough to reach the
// 500000-clock hold-off (2**19 = 524288). The counter wraps at 2**WIDTH.
// Timing: `count` is registered; a clear seen at edge n gives count = 0 after
// that edge.
module debounce_counter #(
  parameter int unsigned WIDTH = tagg_pkg::DEBOUNCE_CNT_W
) (
  input  logic             clk,
  input  logic             clear,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk) begin
    if (clear) count <= '0;
    else       count <= count + 1'b1;
  end

endmodule
