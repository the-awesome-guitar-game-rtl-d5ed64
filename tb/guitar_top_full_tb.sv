// Full-size testbench of guitar_top: every parameter at its default (50 MHz
// clock, 65535-clock power-on reset, 500000-clock debounce, 30000-clock
// lock-out, 20 kHz configuration clock).
//
// One complete operation of the board: power-on reset; the player presses
// guitar button 3, the processor takes the interrupt, reads which button it
// was and acknowledges; a beat is timed with the beat timer and arrives as an
// interrupt of controller 6; a word goes to the SRAM and back; and the codec
// and video decoder receive all 50 configuration writes. Latencies are
// checked against the default timing.
module guitar_top_full_tb;
  localparam int POR = 65535;
  localparam int S   = 500_000;

  logic        clk = 0;
  logic [3:0]  KEY = '1;
  logic [35:0] GPIO_0 = '1;
  logic        reset_n;
  logic [5:0]  ic_cs = '0, ic_rd = '0, ic_wr = '0;
  logic [5:0][15:0] ic_rdata;
  logic [5:0]  ic_irq;
  logic        t_cs = 0, t_wr = 0;
  logic [4:0]  t_addr = '0;
  logic [15:0] t_wdata = '0, t_rdata;
  logic        s_cs = 0, s_rd = 0, s_wr = 0;
  logic [17:0] s_addr = '0;
  logic [15:0] s_wdata = '0, s_rdata;
  logic [15:0] dq_i, dq_o;
  logic        dq_oe;
  logic [17:0] sram_addr;
  logic        ub_n, lb_n, we_n, ce_n, oe_n;
  logic        scl, sda, sda_low, slave_low, av_done, aud_xck;
  int checks = 0, failures = 0;

  guitar_top dut (
    .CLOCK_50(clk), .KEY(KEY), .GPIO_0(GPIO_0), .reset_n(reset_n),
    .ic_chipselect(ic_cs), .ic_read(ic_rd), .ic_write(ic_wr), .ic_address('0),
    .ic_writedata('0), .ic_readdata(ic_rdata), .ic_irq(ic_irq),
    .tmr_chipselect(t_cs), .tmr_read(1'b0), .tmr_write(t_wr), .tmr_address(t_addr),
    .tmr_writedata(t_wdata), .tmr_readdata(t_rdata),
    .sram_chipselect(s_cs), .sram_read(s_rd), .sram_write(s_wr), .sram_address(s_addr),
    .sram_byteenable(2'b11), .sram_writedata(s_wdata), .sram_readdata(s_rdata),
    .SRAM_DQ_I(dq_i), .SRAM_DQ_O(dq_o), .SRAM_DQ_OE(dq_oe), .SRAM_ADDR(sram_addr),
    .SRAM_UB_N(ub_n), .SRAM_LB_N(lb_n), .SRAM_WE_N(we_n), .SRAM_CE_N(ce_n), .SRAM_OE_N(oe_n),
    .I2C_SCLK(scl), .I2C_SDAT_I(sda), .I2C_SDAT_DRIVE_LOW(sda_low),
    .av_config_done(av_done), .AUD_XCK(aud_xck));

  sram_model #(.DEPTH_LOG2(8)) u_mem (
    .addr(sram_addr), .dq_in(dq_o), .dq_in_en(dq_oe), .dq_out(dq_i),
    .ce_n(ce_n), .we_n(we_n), .oe_n(oe_n), .ub_n(ub_n), .lb_n(lb_n));

  i2c_slave_model #(.MAX_TRANS(64)) u_slave (
    .clk(clk), .enable(reset_n), .scl(scl), .sda(sda), .drive_low(slave_low));
  assign sda = !(sda_low || slave_low);

  always #10 clk = !clk;    // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tmr_write(input logic [4:0] a, input logic [15:0] d);
    #1 t_cs = 1; t_wr = 1; t_addr = a; t_wdata = d;
    @(posedge clk); #1 t_cs = 0; t_wr = 0;
  endtask

  int t0, lat;
  initial begin
    @(posedge reset_n);
    check(cyc == POR + 1, $sformatf("reset released after %0d clocks", cyc));
    repeat (10) @(posedge clk);

    // guitar button 3, held 15 ms
    #1 GPIO_0[2] = 0; t0 = cyc;
    while (!ic_irq[2] && cyc - t0 < 2 * S) @(posedge clk);
    lat = cyc - t0;
    check(lat == S + 4, $sformatf("button interrupt after %0d clocks, expected %0d", lat, S + 4));
    check(ic_irq == 6'b000100, $sformatf("only controller 3 interrupts: %b", ic_irq));
    #1 ic_cs[2] = 1; ic_rd[2] = 1;
    #1 check(ic_rdata[2] == 16'h0004, $sformatf("controller 3 readdata %h", ic_rdata[2]));
    ic_rd[2] = 0; ic_wr[2] = 1;
    @(posedge clk); #1 ic_cs[2] = 0; ic_wr[2] = 0;
    @(posedge clk); #1;
    check(!ic_irq[2], "interrupt acknowledged");
    repeat (250_000) @(posedge clk);
    #1 GPIO_0[2] = 1;

    // beat: 1000 clocks, then the beat controller's debounce
    tmr_write(5'd1, 16'h0); tmr_write(5'd0, 16'd1000); tmr_write(5'd2, 16'h1);
    t0 = cyc;
    while (!ic_irq[5] && cyc - t0 < 2 * S) @(posedge clk);
    lat = cyc - t0;
    // 1002 clocks to expiry, one to register the pulse, then the controller path
    check(lat == 1002 + 1 + S + 4 - 1, $sformatf("beat interrupt after %0d clocks", lat));
    check(ic_rdata[5] == 16'h0001, "beat controller readdata");
    #1 ic_cs[5] = 1; ic_wr[5] = 1;
    @(posedge clk); #1 ic_cs[5] = 0; ic_wr[5] = 0;

    // SRAM word
    #1 s_cs = 1; s_wr = 1; s_addr = 18'h00042; s_wdata = 16'hC0DE;
    @(posedge clk); #1 s_wr = 0; s_cs = 0;
    @(posedge clk); #1 s_cs = 1; s_rd = 1;
    @(posedge clk);
    check(s_rdata == 16'hC0DE, $sformatf("SRAM read %h", s_rdata));
    #1 s_rd = 0; s_cs = 0;

    // configuration
    wait (av_done);
    repeat (10) @(posedge clk);
    check(u_slave.n_trans == 50, $sformatf("%0d configuration writes", u_slave.n_trans));
    check(u_slave.trans[0] == 24'h34001A && u_slave.trans[49] == 24'h400e05, "first and last writes");
    $display("configuration finished at clock %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
