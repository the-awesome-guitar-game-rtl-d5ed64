// Testbench of i2c_controller, with an I2C slave model on the bus.
//
// The control clock and its step tick are made here (HALF system clocks per
// half period). Each transfer sends a random 24-bit word; the slave model
// decodes START, three bytes and STOP and must see the same word. The
// transfer must end with done and take 33 steps from GO to done (steps 0 to 32). The third
// transfer is refused by the slave and must come back with nack set.
module i2c_controller_tb;
  localparam int HALF = 3;
  logic        clk = 0, rst_n;
  logic        tick, ctrl_clk;
  logic [23:0] data;
  logic        go, done, nack, scl, sda_drive_low, slave_low, sda;
  int checks = 0, failures = 0;
  int hc = 0;

  i2c_controller dut (.clk(clk), .rst_n(rst_n), .tick(tick), .ctrl_clk(ctrl_clk),
    .data(data), .go(go), .done(done), .nack(nack), .scl(scl), .sda_i(sda),
    .sda_drive_low(sda_drive_low));

  i2c_slave_model #(.NACK_TRANSFER(2)) u_slave (.clk(clk), .enable(rst_n), .scl(scl), .sda(sda), .drive_low(slave_low));

  assign sda = !(sda_drive_low || slave_low);

  always #5 clk = !clk;

  // control clock: toggles every HALF clocks, tick at its rise
  always @(posedge clk) begin
    if (hc == HALF - 1) begin hc <= 0; ctrl_clk <= !ctrl_clk; end
    else hc <= hc + 1;
  end
  assign tick = (hc == HALF - 1) && !ctrl_clk;

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

  int steps;
  logic [23:0] sent [6];
  initial begin
    ctrl_clk = 0; rst_n = 0; go = 0; data = 0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    repeat (4 * HALF) @(posedge clk);
    check(scl && sda && !done, "bus idle after reset");
    for (int n = 0; n < 6; n++) begin
      sent[n] = 24'($urandom);
      // raise GO at a tick, as a sequencer on the same control clock would
      @(posedge clk iff tick); #1;
      data = sent[n]; go = 1;
      steps = 0;
      while (!done) begin @(posedge clk iff tick); #1; steps++; end
      check(steps == 33, $sformatf("transfer %0d took %0d steps, expected 33", n, steps));
      check(nack == (n == 2), $sformatf("transfer %0d nack=%b", n, nack));
      @(posedge clk iff tick); #1 go = 0;
      repeat (4 * HALF) @(posedge clk);
    end
    check(u_slave.n_stops == 6, $sformatf("%0d STOPs seen", u_slave.n_stops));
    check(u_slave.n_trans == 6, $sformatf("%0d transfers decoded", u_slave.n_trans));
    for (int n = 0; n < 6; n++)
      check(u_slave.trans[n] == sent[n], $sformatf("transfer %0d: slave saw %h, sent %h", n, u_slave.trans[n], sent[n]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
