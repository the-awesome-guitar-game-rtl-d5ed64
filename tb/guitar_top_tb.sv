// End-to-end testbench of guitar_top at reduced timing: one whole song.
//
// The testbench plays the part of the game software on the processor and of
// the player. Game: for each of NB beats the "processor" loads the time to the
// next beat into the beat timer (generated intervals, scaled), takes the
// beat interrupt from controller 6, prompts a random button 1-5 and then
// scores the first correct button interrupt before the next beat. The
// "player" presses the prompted button (sometimes a wrong one) on the guitar
// cable GPIO_0[4:0], with contact bounce. Every button
// interrupt is checked to come from the pressed button's controller with the
// right readdata, and the final score must equal the correct presses.
// Then: a press inside the post-acknowledge lock-out must be lost, the SRAM is
// written and read through the bridge, the I2C configuration must deliver its
// 50 writes to a slave model, and a second top built with USE_KEYS = 1 must
// take its buttons from KEY and ignore GPIO_0. Each mechanism is counted; one
// that never happened counts as a failure.
module guitar_top_tb;
  import tagg_pkg::*;

  localparam int POR  = 200;
  localparam int S    = 20;
  localparam int W    = 60;
  localparam int NB   = 540;                 // beats in one song of the game
  localparam int BEAT_SCALE = 16;
  // beat intervals in beat-list units: 20 to 43, about the spacing of a song
  // at 100-150 beats per minute
  function automatic int beat_gap(input int n);
    return 20 + ((n * 7 + 3) % 24);
  endfunction

  logic        clk = 0;
  logic [3:0]  KEY = '1;
  logic [35:0] GPIO_0 = '1;
  logic        reset_n;
  logic [5:0]  ic_cs = '0, ic_rd = '0, ic_wr = '0;
  logic [9:0]  ic_addr = '0;
  logic [15:0] ic_wdata = '0;
  logic [5:0][15:0] ic_rdata;
  logic [5:0]  ic_irq;
  logic        t_cs = 0, t_rd = 0, t_wr = 0;
  logic [4:0]  t_addr = '0;
  logic [15:0] t_wdata = '0, t_rdata;
  logic        s_cs = 0, s_rd = 0, s_wr = 0;
  logic [17:0] s_addr = '0;
  logic [1:0]  s_be = '0;
  logic [15:0] s_wdata = '0, s_rdata;
  logic [15:0] dq_i, dq_o;
  logic        dq_oe;
  logic [17:0] sram_addr;
  logic        ub_n, lb_n, we_n, ce_n, oe_n;
  logic        scl, sda, sda_low, slave_low, av_done, aud_xck;

  int checks = 0, failures = 0;

  guitar_top #(.POR_CYCLES(POR), .SETTLE_CYCLES(S), .WAIT_CYCLES(W),
               .I2C_FREQ(10_000_000), .USE_KEYS(1'b0)) dut (
    .CLOCK_50(clk), .KEY(KEY), .GPIO_0(GPIO_0), .reset_n(reset_n),
    .ic_chipselect(ic_cs), .ic_read(ic_rd), .ic_write(ic_wr), .ic_address(ic_addr),
    .ic_writedata(ic_wdata), .ic_readdata(ic_rdata), .ic_irq(ic_irq),
    .tmr_chipselect(t_cs), .tmr_read(t_rd), .tmr_write(t_wr), .tmr_address(t_addr),
    .tmr_writedata(t_wdata), .tmr_readdata(t_rdata),
    .sram_chipselect(s_cs), .sram_read(s_rd), .sram_write(s_wr), .sram_address(s_addr),
    .sram_byteenable(s_be), .sram_writedata(s_wdata), .sram_readdata(s_rdata),
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

  // Second top: board push buttons as the button source.
  logic [3:0]       KEY_k = '1;
  logic [35:0]      GPIO_k = '1;
  logic [5:0]       k_cs = '0, k_wr = '0;
  logic [5:0][15:0] k_rdata;
  logic [5:0]       k_irq;
  logic             k_rst_n, k_scl, k_sda_low, k_done, k_xck;
  logic [15:0]      k_t_rdata, k_s_rdata, k_dq_o;
  logic             k_dq_oe, k_ub, k_lb, k_we, k_ce, k_oe;
  logic [17:0]      k_sram_addr;

  guitar_top #(.POR_CYCLES(POR), .SETTLE_CYCLES(S), .WAIT_CYCLES(W),
               .I2C_FREQ(10_000_000), .USE_KEYS(1'b1)) dut_k (
    .CLOCK_50(clk), .KEY(KEY_k), .GPIO_0(GPIO_k), .reset_n(k_rst_n),
    .ic_chipselect(k_cs), .ic_read('0), .ic_write(k_wr), .ic_address('0),
    .ic_writedata('0), .ic_readdata(k_rdata), .ic_irq(k_irq),
    .tmr_chipselect(1'b0), .tmr_read(1'b0), .tmr_write(1'b0), .tmr_address('0),
    .tmr_writedata('0), .tmr_readdata(k_t_rdata),
    .sram_chipselect(1'b0), .sram_read(1'b0), .sram_write(1'b0), .sram_address('0),
    .sram_byteenable('0), .sram_writedata('0), .sram_readdata(k_s_rdata),
    .SRAM_DQ_I('0), .SRAM_DQ_O(k_dq_o), .SRAM_DQ_OE(k_dq_oe), .SRAM_ADDR(k_sram_addr),
    .SRAM_UB_N(k_ub), .SRAM_LB_N(k_lb), .SRAM_WE_N(k_we), .SRAM_CE_N(k_ce), .SRAM_OE_N(k_oe),
    .I2C_SCLK(k_scl), .I2C_SDAT_I(1'b1), .I2C_SDAT_DRIVE_LOW(k_sda_low),
    .av_config_done(k_done), .AUD_XCK(k_xck));

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // mechanism counters
  int n_por = 0, n_button_irq = 0, n_bounce_filtered = 0, n_lockout_drop = 0;
  int n_beat_irq = 0, n_sram_rw = 0, n_i2c_writes = 0, n_key_mode = 0, n_aud_clk = 0;
  int n_success = 0, n_fail_beats = 0;

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // power-on reset: released after POR + 1 clocks
  int clk_count = 0;
  always @(posedge clk) clk_count <= clk_count + 1;
  initial begin
    @(posedge reset_n);
    check(clk_count == POR + 1, $sformatf("reset released after %0d clocks, expected %0d", clk_count, POR + 1));
    n_por++;
  end

  // audio clock: CLOCK_50 / 4
  initial begin
    int t0, t1;
    @(posedge aud_xck); t0 = clk_count;
    @(posedge aud_xck); t1 = clk_count;
    check(t1 - t0 == 4, $sformatf("audio clock period %0d clocks", t1 - t0));
    n_aud_clk++;
  end

  // ------------------------------------------------------------ bus tasks
  task automatic ic_ack(input int k);
    #1 ic_cs[k] = 1; ic_wr[k] = 1; ic_addr = '0; ic_wdata = '0;
    @(posedge clk); #1 ic_cs[k] = 0; ic_wr[k] = 0;
  endtask

  task automatic ic_read_reg(input int k, output logic [15:0] d);
    #1 ic_cs[k] = 1; ic_rd[k] = 1;
    #1 d = ic_rdata[k];
    @(posedge clk); #1 ic_cs[k] = 0; ic_rd[k] = 0;
  endtask

  task automatic tmr_write(input logic [4:0] a, input logic [15:0] d);
    #1 t_cs = 1; t_wr = 1; t_addr = a; t_wdata = d;
    @(posedge clk); #1 t_cs = 0; t_wr = 0;
  endtask

  task automatic set_timer(input int clocks);
    tmr_write(5'd1, 16'(clocks >> 16));
    tmr_write(5'd0, 16'(clocks));
    tmr_write(5'd2, 16'h1);
  endtask

  // ------------------------------------------------------------- player
  int   prompt = 0;             // button the game asks for, 1..5, 0 none
  event prompt_ev;
  int   expected_score = 0;
  int   pressed_button = 0;     // button of the last player press
  int   bounces_in_press = 0;

  task automatic press_button(input int b, input int bounces);
    for (int i = 0; i < bounces; i++) begin
      GPIO_0[b-1] = 0; repeat (1 + $urandom % 2) @(posedge clk);
      GPIO_0[b-1] = 1; repeat (1 + $urandom % 2) @(posedge clk);
    end
    GPIO_0[b-1] = 0;
    repeat (S + 10) @(posedge clk);
    GPIO_0[b-1] = 1;
  endtask

  initial begin
    forever begin
      @(prompt_ev);
      repeat (5 + $urandom % 10) @(posedge clk);
      begin
        automatic int b = ($urandom % 4 != 0) ? prompt : 1 + (prompt % 5);   // 1 in 4 wrong
        if (b == prompt) expected_score++;
        pressed_button   = b;
        bounces_in_press = 2 + $urandom % 3;
        press_button(b, bounces_in_press);
      end
    end
  end

  // --------------------------------------------------------------- game
  int score = 0, irqs_this_press = 0;
  bit flag = 0;
  logic [15:0] d;

  initial begin
    @(posedge reset_n);
    repeat (5) @(posedge clk);
    set_timer(beat_gap(0) * BEAT_SCALE);
    for (int beat = 0; beat < NB; ) begin
      @(posedge clk); #1;
      if (ic_irq[5]) begin
        ic_read_reg(5, d);
        check(d == 16'h0001, $sformatf("beat controller readdata %h", d));
        ic_ack(5);
        n_beat_irq++;
        if (beat > 0) begin
          if (!flag) n_fail_beats++;
          if (irqs_this_press == 1 && bounces_in_press > 0) n_bounce_filtered++;
          check(irqs_this_press == 1, $sformatf("%0d interrupts for one bouncy press", irqs_this_press));
        end
        irqs_this_press = 0;
        beat++;
        flag = 0;
        if (beat < NB) begin                 // prompt only while beats remain
          set_timer(beat_gap(beat) * BEAT_SCALE);
          prompt = 1 + $urandom % 5;
          -> prompt_ev;
        end
      end else if (|ic_irq[4:0]) begin
        for (int k = 0; k < 5; k++) if (ic_irq[k]) begin
          ic_read_reg(k, d);
          check(k + 1 == pressed_button, $sformatf("interrupt from controller %0d, button %0d pressed", k + 1, pressed_button));
          check(d == 16'(1 << k), $sformatf("controller %0d readdata %h", k + 1, d));
          ic_ack(k);
          n_button_irq++;
          irqs_this_press++;
          if (!flag && k + 1 == prompt) begin
            flag = 1; score++; n_success++;
          end
        end
      end
    end
    // let the last press finish
    repeat (3 * S + W + 20) @(posedge clk);
    check(score == expected_score, $sformatf("score %0d, expected %0d", score, expected_score));
    check(n_fail_beats == (NB - 1) - score, "missed beats plus hits equal prompts");

    // ---- lock-out: pressing the same button again right after the
    // acknowledge is lost (the lock-out is per controller)
    GPIO_0[0] = 0; repeat (S + 8) @(posedge clk); GPIO_0[0] = 1;
    check(ic_irq[0], "press before lock-out test");
    ic_ack(0);
    repeat (S + 4) @(posedge clk);                                  // debouncer back to released
    GPIO_0[0] = 0; repeat (S + 8) @(posedge clk); GPIO_0[0] = 1;   // pulse lands inside W
    repeat (W + 3 * S) @(posedge clk);
    check(ic_irq == 6'b0, $sformatf("press inside lock-out raised no interrupt (%b)", ic_irq));
    if (ic_irq == 6'b0) n_lockout_drop++;

    // ---- SRAM through the bridge
    for (int i = 0; i < 16; i++) begin
      #1 s_cs = 1; s_wr = 1; s_addr = 18'(i * 3); s_be = 2'b11; s_wdata = 16'(16'hA500 + i * 7);
      @(posedge clk); #1 s_wr = 0; s_cs = 0; @(posedge clk);
    end
    for (int i = 0; i < 16; i++) begin
      #1 s_cs = 1; s_rd = 1; s_addr = 18'(i * 3);
      @(posedge clk);
      check(s_rdata == 16'(16'hA500 + i * 7), $sformatf("SRAM word %0d read %h", i, s_rdata));
      if (s_rdata == 16'(16'hA500 + i * 7)) n_sram_rw++;
      #1 s_rd = 0; s_cs = 0;
    end

    // ---- board-key mode on the second top
    GPIO_k[0] = 0; repeat (S + 8) @(posedge clk); GPIO_k[0] = 1;
    repeat (5) @(posedge clk);
    check(k_irq == 6'b0, "GPIO ignored when keys are the source");
    for (int k = 0; k < 4; k++) begin
      KEY_k[k] = 0; repeat (S + 8) @(posedge clk); KEY_k[k] = 1;
      check(k_irq == 6'(1 << k), $sformatf("KEY%0d interrupt pattern %b", k, k_irq));
      check(k_rdata[k] == 16'(1 << k), "KEY readdata");
      if (k_irq == 6'(1 << k)) n_key_mode++;
      #1 k_cs[k] = 1; k_wr[k] = 1; @(posedge clk); #1 k_cs[k] = 0; k_wr[k] = 0;
      repeat (W + 3 * S) @(posedge clk);
    end

    // ---- audio / video configuration
    wait (av_done);
    repeat (100) @(posedge clk);
    n_i2c_writes = u_slave.n_trans;
    check(n_i2c_writes == 50, $sformatf("%0d configuration writes", n_i2c_writes));
    check(u_slave.trans[0] == 24'h34001A && u_slave.trans[9] == 24'h341201 &&
          u_slave.trans[10] == 24'h401500 && u_slave.trans[49] == 24'h400e05,
          "first and last codec and video writes");

    // ---- every mechanism happened
    check(n_por == 1,            "power-on reset released");
    check(n_aud_clk == 1,        "audio clock divider");
    check(n_beat_irq == NB,      $sformatf("%0d beat interrupts", n_beat_irq));
    check(n_button_irq > 0,      "button interrupts");
    check(n_success > 0,         "correct presses scored");
    check(n_fail_beats > 0,      "missed prompts counted");
    check(n_bounce_filtered > 0, "bounce filtered");
    check(n_lockout_drop > 0,    "lock-out dropped a press");
    check(n_sram_rw == 16,       "SRAM read-back");
    check(n_key_mode == 4,       "board-key mode");
    $display("beats=%0d button_irqs=%0d score=%0d/%0d missed=%0d bounce_filtered=%0d lockout=%0d sram=%0d i2c=%0d keys=%0d",
             n_beat_irq, n_button_irq, score, NB - 1, n_fail_beats, n_bounce_filtered,
             n_lockout_drop, n_sram_rw, n_i2c_writes, n_key_mode);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
