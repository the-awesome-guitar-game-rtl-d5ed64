// Loadable down counter.
//
// While `load` is high the counter takes `di`; otherwise it decreases by one
// every clock, wrapping from zero to all ones. This is the 32-bit counter of
// the original design, whose load input was called reset. In this design it
// holds the count of the beat timer, which keeps `load` high (reloading the
// current or newly written value) whenever the timer is not counting.
// Timing: registered output, one clock from `load`/`di` to `count`.
module down_counter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             load,
  input  logic [WIDTH-1:0] di,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk) begin
    if (load) count <= di;
    else      count <= count - 1'b1;
  end

endmodule
