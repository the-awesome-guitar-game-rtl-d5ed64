// Board top of the guitar game hardware.
//
// The game runs as software on a soft processor; this top holds the hardware
// around it. The processor system itself (CPU, JTAG UART, Avalon
// interconnect) is not part of this RTL: the Avalon slave ports of the
// peripherals below are brought out instead, one select/read/write set per
// peripheral, with shared address and write data.
//
//  * Power-on reset: a 16-bit counter holds reset_n low for POR_CYCLES clocks
//    after configuration, then releases it for good.
//  * Input controllers 1-5: one per guitar button. Controller k sees only
//    button k on its switch input k, the others are tied released. With
//    USE_KEYS = 0 the buttons are GPIO_0[4:0] (the guitar cable); with
//    USE_KEYS = 1 controllers 1-4 take the board push buttons KEY[3:0] and
//    controller 5 is idle, the bench set-up of the original board.
//    Each raises irq[k-1] on a press; the software acknowledges by writing to
//    the controller and can read which button it was.
//  * Beat timer and input controller 6: the software loads the time to the
//    next beat into the timer and starts it; when it runs out, its expiry
//    pulse is fed to controller 6 as a press, which interrupts the processor.
//  * SRAM controller: bridge to the 256K x 16 SRAM.
//  * Audio/video I2C configuration: stands beside the rest, programming the
//    codec and video decoder after reset.
//  * A 2-bit counter divides the 50 MHz clock by four for the audio codec.
//
// Bidirectional pins are split into input, output and enable (SRAM data) or
// into an open-drain pair (I2C data); the pad ring joins them. All logic runs
// on CLOCK_50.
//
// From the original design: the power-on reset, the one-controller-per-button
// wiring, GPIO_0[4:0] and KEY as the button sources, the SRAM bridge and the
// clock divider. This design's choices: the USE_KEYS switch between the two
// source mappings, the timer-to-controller-6 link (the original says only
// that controller 6 signalled beats), the brought-out Avalon ports and the
// use of the divided clock as AUD_XCK.
//
// The power-on counter and the audio clock divider take their first value
// from the register declaration, not from a reset: they are what makes the
// reset, so nothing comes before them but FPGA configuration, which loads
// those values. GPIO_0[35:5] are not used by this design. The beat timer's
// running flag is left open here; software learns of a beat through the
// interrupt of controller 6.
module guitar_top
  import tagg_pkg::*;
#(
  parameter int unsigned POR_CYCLES    = 65535,
  parameter int unsigned SETTLE_CYCLES = tagg_pkg::DEBOUNCE_CYCLES,
  parameter int unsigned WAIT_CYCLES   = tagg_pkg::IRQ_WAIT_CYCLES,
  parameter int unsigned I2C_FREQ      = 20_000,
  parameter bit          USE_KEYS      = 1'b0
) (
  input  logic                    CLOCK_50,
  input  logic [3:0]              KEY,
  input  logic [35:0]             GPIO_0,
  output logic                    reset_n,
  // input controllers 1-6, Avalon slaves
  input  logic [5:0]              ic_chipselect,
  input  logic [5:0]              ic_read,
  input  logic [5:0]              ic_write,
  input  logic [9:0]              ic_address,
  input  logic [15:0]             ic_writedata,
  output logic [5:0][15:0]        ic_readdata,
  output logic [5:0]              ic_irq,
  // beat timer, Avalon slave
  input  logic                    tmr_chipselect,
  input  logic                    tmr_read,
  input  logic                    tmr_write,
  input  logic [4:0]              tmr_address,
  input  logic [15:0]             tmr_writedata,
  output logic [15:0]             tmr_readdata,
  // SRAM controller, Avalon slave
  input  logic                    sram_chipselect,
  input  logic                    sram_read,
  input  logic                    sram_write,
  input  logic [17:0]             sram_address,
  input  logic [1:0]              sram_byteenable,
  input  logic [15:0]             sram_writedata,
  output logic [15:0]             sram_readdata,
  // SRAM pins
  input  logic [15:0]             SRAM_DQ_I,
  output logic [15:0]             SRAM_DQ_O,
  output logic                    SRAM_DQ_OE,
  output logic [17:0]             SRAM_ADDR,
  output logic                    SRAM_UB_N,
  output logic                    SRAM_LB_N,
  output logic                    SRAM_WE_N,
  output logic                    SRAM_CE_N,
  output logic                    SRAM_OE_N,
  // audio / video configuration bus
  output logic                    I2C_SCLK,
  input  logic                    I2C_SDAT_I,
  output logic                    I2C_SDAT_DRIVE_LOW,
  output logic                    av_config_done,
  output logic                    AUD_XCK
);

  localparam int unsigned POR_W = $clog2(POR_CYCLES + 1);

  // ---------------------------------------------------------------- reset
  logic [POR_W-1:0] por_cnt = '0;
  logic             por_rst_n = 1'b0;

  always_ff @(posedge CLOCK_50) begin
    if (32'(por_cnt) == POR_CYCLES) begin
      por_rst_n <= 1'b1;
    end else begin
      por_rst_n <= 1'b0;
      por_cnt   <= por_cnt + 1'b1;
    end
  end

  assign reset_n = por_rst_n;

  // ---------------------------------------------------------- audio clock
  logic [1:0] audio_clock = '0;

  always_ff @(posedge CLOCK_50) audio_clock <= audio_clock + 1'b1;

  assign AUD_XCK = audio_clock[1];

  // --------------------------------------------------- button controllers
  logic [4:0]      button_n;
  logic [5:0][4:0] sw_n;
  logic            beat_expired;

  assign button_n = USE_KEYS ? {1'b1, KEY} : GPIO_0[4:0];

  always_comb begin
    sw_n = '1;
    for (int k = 0; k < NUM_BUTTONS; k++) sw_n[k][k] = button_n[k];
    sw_n[5][0] = !beat_expired;
  end

  for (genvar k = 0; k < 6; k++) begin : g_ic
    input_controller #(
      .NUM_SWITCHES  (NUM_BUTTONS),
      .SETTLE_CYCLES (SETTLE_CYCLES),
      .WAIT_CYCLES   (WAIT_CYCLES)
    ) u_ic (
      .clk        (CLOCK_50),
      .reset_n    (por_rst_n),
      .chipselect (ic_chipselect[k]),
      .read       (ic_read[k]),
      .write      (ic_write[k]),
      .address    (ic_address),
      .writedata  (ic_writedata),
      .readdata   (ic_readdata[k]),
      .inter      (ic_irq[k]),
      .switch_n   (sw_n[k])
    );
  end

  // ----------------------------------------------------------- beat timer

  beat_timer #(.ADDR_WIDTH(5)) u_timer (
    .clk        (CLOCK_50),
    .reset_n    (por_rst_n),
    .chipselect (tmr_chipselect),
    .read       (tmr_read),
    .write      (tmr_write),
    .address    (tmr_address),
    .writedata  (tmr_writedata),
    .readdata   (tmr_readdata),
    .running    (),
    .expired    (beat_expired)
  );

  // ----------------------------------------------------------------- SRAM
  sram_controller #(.ADDR_WIDTH(18), .DATA_WIDTH(16)) u_sram (
    .chipselect (sram_chipselect),
    .read       (sram_read),
    .write      (sram_write),
    .address    (sram_address),
    .byteenable (sram_byteenable),
    .writedata  (sram_writedata),
    .readdata   (sram_readdata),
    .sram_dq_i  (SRAM_DQ_I),
    .sram_dq_o  (SRAM_DQ_O),
    .sram_dq_oe (SRAM_DQ_OE),
    .sram_addr  (SRAM_ADDR),
    .sram_ub_n  (SRAM_UB_N),
    .sram_lb_n  (SRAM_LB_N),
    .sram_we_n  (SRAM_WE_N),
    .sram_ce_n  (SRAM_CE_N),
    .sram_oe_n  (SRAM_OE_N)
  );

  // ------------------------------------------------- audio/video config
  i2c_av_config #(
    .CLK_FREQ (tagg_pkg::CLK_HZ),
    .I2C_FREQ (I2C_FREQ),
    .LUT_SIZE (50)
  ) u_avcfg (
    .clk           (CLOCK_50),
    .rst_n         (por_rst_n),
    .scl           (I2C_SCLK),
    .sda_i         (I2C_SDAT_I),
    .sda_drive_low (I2C_SDAT_DRIVE_LOW),
    .config_done   (av_config_done)
  );

endmodule
