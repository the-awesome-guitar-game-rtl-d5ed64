// Testbench of input_controller.
//
// Short debounce (S) and lock-out (W) times. Checks: a press on one switch
// raises the interrupt S+4 clocks after the raw input falls and reads back as
// that switch's bit; the interrupt stays up until a write, falls the clock
// after it and the press register clears; a press during the lock-out is
// ignored, while one after W+2 clocks is accepted; a chip-selected read does
// not acknowledge; two switches pressed together are both reported.
module input_controller_tb;
  localparam int S = 12;
  localparam int W = 40;
  logic        clk = 0, reset_n;
  logic        chipselect, read, write;
  logic [9:0]  address;
  logic [15:0] writedata, readdata;
  logic        inter;
  logic [4:0]  switch_n;
  int checks = 0, failures = 0;

  input_controller #(.NUM_SWITCHES(5), .SETTLE_CYCLES(S), .WAIT_CYCLES(W)) dut (
    .clk(clk), .reset_n(reset_n), .chipselect(chipselect), .read(read),
    .write(write), .address(address), .writedata(writedata),
    .readdata(readdata), .inter(inter), .switch_n(switch_n));

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ack();
    #1 chipselect = 1; write = 1; writedata = 16'h0;
    @(posedge clk); #1;
    chipselect = 0; write = 0;
  endtask

  // press switches `mask` for `hold` clocks; return clocks until inter rose
  task automatic press(input logic [4:0] mask, input int hold, output int lat);
    #1 switch_n = ~mask;
    lat = 0;
    for (int i = 0; i < hold; i++) begin
      @(posedge clk); #1;
      if (inter && lat == 0) lat = i + 1;
    end
    switch_n = '1;
    for (int i = hold; i < hold + 3 * S && lat == 0; i++) begin
      @(posedge clk); #1;
      if (inter && lat == 0) lat = i + 1;
    end
  endtask

  int lat;
  initial begin
    reset_n = 0; chipselect = 0; read = 0; write = 0; address = 0; writedata = 0;
    switch_n = '1;
    repeat (4) @(posedge clk);
    #1 reset_n = 1;
    repeat (3) @(posedge clk); #1;
    check(!inter && readdata == 0, "idle after reset");

    for (int k = 0; k < 5; k++) begin
      press(5'(1 << k), S + 10, lat);
      check(lat == S + 4, $sformatf("switch %0d interrupt latency %0d, expected %0d", k + 1, lat, S + 4));
      check(readdata == 16'(1 << k), $sformatf("switch %0d readdata %h", k + 1, readdata));
      // a read must not acknowledge
      #1 chipselect = 1; read = 1;
      @(posedge clk); #1; chipselect = 0; read = 0;
      repeat (5) @(posedge clk); #1;
      check(inter, "interrupt held until written");
      ack();
      check(!inter, "interrupt falls the clock after the write");
      check(readdata == 0, "press register cleared by the write");
      repeat (2 * S + 6) @(posedge clk);   // let the debouncer return to released
      repeat (W) @(posedge clk);
    end

    // press during lock-out is ignored
    press(5'b00001, S + 6, lat);
    check(lat != 0, "press accepted before lock-out test");
    ack();
    press(5'b00100, S + 6, lat);           // arrives inside the W-clock lock-out
    check(lat == 0 && !inter, "press ignored during lock-out");
    repeat (W + S) @(posedge clk);
    press(5'b10000, S + 6, lat);
    check(lat == S + 4 && readdata == 16'h0010, "press accepted after lock-out");
    ack();
    repeat (W + 2 * S + 6) @(posedge clk);

    // two switches together
    press(5'b01010, S + 6, lat);
    check(lat == S + 4 && readdata == 16'h000A, $sformatf("chord readdata %h", readdata));
    ack();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
