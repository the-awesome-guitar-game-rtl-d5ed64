// Testbench of down_counter: load, decrement every clock, wrap below zero.
module down_counter_tb;
  logic        clk = 0;
  logic        load;
  logic [31:0] di, count, expect_v;
  int checks = 0, failures = 0;

  down_counter #(.WIDTH(32)) dut (.clk(clk), .load(load), .di(di), .count(count));

  always #5 clk = !clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int trial = 0; trial < 4; trial++) begin
      load = 1;
      di   = (trial == 3) ? 32'd2 : $urandom;
      @(posedge clk); #1;
      expect_v = di;
      checks++;
      if (count !== expect_v) begin failures++; $display("FAIL load %h got %h", di, count); end
      load = 0;
      di   = $urandom;               // must be ignored while counting
      for (int i = 0; i < 6; i++) begin
        @(posedge clk); #1;
        expect_v = expect_v - 32'd1;
        checks++;
        if (count !== expect_v) begin
          failures++;
          $display("FAIL step %0d: %h expected %h", i, count, expect_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
