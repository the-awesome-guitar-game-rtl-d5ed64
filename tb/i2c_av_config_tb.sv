// Testbench of i2c_av_config, with an I2C slave model that refuses one write.
//
// A small clock ratio (CLK_FREQ/I2C_FREQ = 4) keeps the run short. The slave
// model records every acknowledged three-byte write; the sequence must be the
// 50 register writes of the codec and video decoder table, in order, with the
// audio ones addressed to 0x34 and the video ones to 0x40. The write the slave
// refuses must be sent again, and config_done must rise at the end.
module i2c_av_config_tb;
  logic clk = 0, rst_n, scl, sda, sda_drive_low, slave_low, config_done;
  int checks = 0, failures = 0;

  localparam int NACK_AT = 3;

  i2c_av_config #(.CLK_FREQ(8), .I2C_FREQ(2), .LUT_SIZE(50)) dut (
    .clk(clk), .rst_n(rst_n), .scl(scl), .sda_i(sda),
    .sda_drive_low(sda_drive_low), .config_done(config_done));

  i2c_slave_model #(.MAX_TRANS(64), .NACK_TRANSFER(NACK_AT)) u_slave (
    .clk(clk), .enable(rst_n), .scl(scl), .sda(sda), .drive_low(slave_low));

  assign sda = !(sda_drive_low || slave_low);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // Expected register writes: 10 audio codec settings, then 40 video decoder
  // settings, as {register, value} words.
  localparam logic [15:0] TABLE [50] = '{
    16'h001A, 16'h021A, 16'h047B, 16'h067B, 16'h08F8, 16'h0A06, 16'h0C00, 16'h0E01,
    16'h1002, 16'h1201,
    16'h1500, 16'h1741, 16'h3a16, 16'h5004, 16'hc305, 16'hc480, 16'h0e80, 16'h5020,
    16'h5218, 16'h58ed, 16'h77c5, 16'h7c93, 16'h7d00, 16'hd048, 16'hd5a0, 16'hd7ea,
    16'he43e, 16'hea0f, 16'h3112, 16'h3281, 16'h3384, 16'h37A0, 16'he580, 16'he603,
    16'he785, 16'h5000, 16'h5100, 16'h0050, 16'h1000, 16'h0402, 16'h0b00, 16'h0a20,
    16'h1100, 16'h2b00, 16'h2c8c, 16'h2df2, 16'h2eee, 16'h2ff4, 16'h30d2, 16'h0e05};

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int j;
  logic [23:0] exp_w;
  initial begin
    rst_n = 0;
    repeat (5) @(posedge clk);
    #1 rst_n = 1;
    check(!config_done, "not done after reset");
    wait (config_done);
    repeat (200) @(posedge clk);
    // the refused write is transfer NACK_AT: it is recorded (three bytes) but
    // must be followed by the same word again
    check(u_slave.n_trans == 51, $sformatf("%0d transfers, expected 51", u_slave.n_trans));
    check(u_slave.n_started == 51, $sformatf("%0d STARTs, expected 51", u_slave.n_started));
    j = 0;
    for (int i = 0; i < 50; i++) begin
      exp_w = {(i < 10) ? 8'h34 : 8'h40, TABLE[i]};
      check(u_slave.trans[j] == exp_w, $sformatf("write %0d: %h expected %h", i, u_slave.trans[j], exp_w));
      if (j == NACK_AT) begin
        j++;
        check(u_slave.trans[j] == exp_w, "refused write sent again");
      end
      j++;
    end
    repeat (1000) @(posedge clk);
    check(u_slave.n_started == 51 && scl && sda, "bus stays idle after the table");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
