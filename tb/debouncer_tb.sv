// Testbench of debouncer.
//
// Drives bouncy presses and releases and checks, every clock, the output of
// the debouncer against a reference written here from the specification: a
// change of the input is taken at once, the output follows SETTLE+2 clocks
// after the first sample of the change, and the input is ignored while the
// hold-off runs. A directed part checks the press latency and that a single
// clock glitch still gives one full debounced press.
module debouncer_tb;
  localparam int S = 20;
  logic clk = 0, reset, key_in_n, key_out_n;
  int checks = 0, failures = 0;

  debouncer #(.SETTLE_CYCLES(S), .CNT_WIDTH(6)) dut (
    .clk(clk), .reset(reset), .key_in_n(key_in_n), .key_out_n(key_out_n));

  always #5 clk = !clk;

  // Reference: the output flips S+1 clocks after the clock that first saw the
  // input differ from it; the input is not looked at in between.
  logic ref_out = 1'b1;
  int   ref_wait = -1;        // clocks left until the output flips, -1 idle
  logic ref_vis;

  always @(posedge clk) begin
    if (reset) begin
      ref_out <= 1'b1; ref_wait <= -1;
    end else if (ref_wait < 0) begin
      if (key_in_n != ref_out) ref_wait <= S + 1;
    end else if (ref_wait == 1) begin
      ref_out  <= !ref_out;
      ref_wait <= -1;
    end else begin
      ref_wait <= ref_wait - 1;
    end
  end

  assign ref_vis = ref_out;

  always @(negedge clk) if (!reset) begin
    checks++;
    if (key_out_n !== ref_vis) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t out=%b ref=%b", $time, key_out_n, ref_vis);
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t_press, t_out;
  initial begin
    reset = 1; key_in_n = 1;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    repeat (5) @(posedge clk);
    // directed: clean press, measure latency in clocks
    #1 key_in_n = 0;
    t_press = 0;
    while (key_out_n) begin @(posedge clk); #1; t_press++; end
    checks++;
    if (t_press != S + 2) begin failures++; $display("FAIL press latency %0d, expected %0d", t_press, S + 2); end
    key_in_n = 1;
    t_out = 0;
    while (!key_out_n) begin @(posedge clk); #1; t_out++; end
    checks++;
    if (t_out != S + 2) begin failures++; $display("FAIL release latency %0d, expected %0d", t_out, S + 2); end
    repeat (3) @(posedge clk);
    // random bouncy presses
    for (int p = 0; p < 30; p++) begin
      automatic int n = $urandom % (3 * S);
      for (int i = 0; i < n; i++) begin
        #1 key_in_n = ($urandom % 4 == 0) ? !key_in_n : key_in_n;
        @(posedge clk);
      end
      #1 key_in_n = $urandom % 2;
      repeat ($urandom % (3 * S)) @(posedge clk);
    end
    #1 key_in_n = 1;
    repeat (3 * S) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
