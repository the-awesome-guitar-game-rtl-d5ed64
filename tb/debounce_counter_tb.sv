// Testbench of debounce_counter: clear, counting and wrap-around at 2**WIDTH.
module debounce_counter_tb;
  localparam int W = 4;
  logic         clk = 0;
  logic         clear;
  logic [W-1:0] count;
  int checks = 0, failures = 0;

  debounce_counter #(.WIDTH(W)) dut (.clk(clk), .clear(clear), .count(count));

  always #5 clk = !clk;

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (count !== exp) begin
      failures++;
      $display("FAIL %s: count=%0d expected %0d", what, count, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1;
    @(posedge clk); @(posedge clk); #1;
    check(0, "after clear");
    clear = 0;
    for (int i = 1; i <= 40; i++) begin
      @(posedge clk); #1;
      check(W'(i % (1 << W)), "counting");
    end
    clear = 1;
    @(posedge clk); #1;
    check(0, "clear mid-count");
    clear = 0;
    @(posedge clk); #1;
    check(1, "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
