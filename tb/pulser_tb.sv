// Testbench of pulser: one low pulse per press, one clock after the press is
// first sampled, however long the press is held.
module pulser_tb;
  logic clk = 0, reset, key_in_n, pulse_n;
  int checks = 0, failures = 0;
  int pulses = 0, presses = 0;

  pulser dut (.clk(clk), .reset(reset), .key_in_n(key_in_n), .pulse_n(pulse_n));

  always #5 clk = !clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!reset && !pulse_n) pulses++;

  initial begin
    reset = 1; key_in_n = 1;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    for (int p = 0; p < 20; p++) begin
      automatic int hold = 2 + ($urandom % 8);
      automatic int gap  = 1 + ($urandom % 5);
      #1 key_in_n = 0;
      presses++;
      @(posedge clk); #1;                 // press sampled here
      checks++;
      if (pulse_n !== 1'b0) begin failures++; $display("FAIL press %0d: no pulse one clock after press", p); end
      @(posedge clk); #1;
      checks++;
      if (pulse_n !== 1'b1) begin failures++; $display("FAIL press %0d: pulse longer than one clock", p); end
      repeat (hold) begin
        @(posedge clk); #1;
        checks++;
        if (pulse_n !== 1'b1) begin failures++; $display("FAIL press %0d: pulse while held", p); end
      end
      key_in_n = 1;
      repeat (gap) @(posedge clk);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (pulses != presses) begin failures++; $display("FAIL %0d pulses for %0d presses", pulses, presses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
