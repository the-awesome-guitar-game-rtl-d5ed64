// Guitar input controller: Avalon slave that turns button presses into an
// interrupt for the processor.
//
// Each of the NUM_SWITCHES active-low switch inputs passes through a debouncer
// and a pulser, so one press gives one clock of low pulse. A three-state
// machine then handles the interrupt handshake with the processor:
//   IDLE    - waits for a pulse on any switch; the pulsed switches are latched
//             into the press register and the machine enters PRESSED.
//   PRESSED - holds `inter` high until the processor writes to the peripheral
//             (any address, any data), which is how the software acknowledges.
//   WAITST  - `inter` low; presses are ignored until the lock-out counter,
//             cleared while in PRESSED and counting elsewhere, exceeds
//             WAIT_CYCLES.
// The debounce/pulse chain, the three states, the write-to-acknowledge rule
// and the 30000-clock lock-out are the original design's. The press register
// read back on readdata (bit k = switch k+1 was pressed), cleared by the
// acknowledging write, is this design's choice: the original leaves readdata
// unassigned, while its proposal describes a location holding the pressed
// colour that the processor clears.
//
// Timing: a press reaches PRESSED SETTLE_CYCLES + 4 clocks after the raw input
// goes low (debouncer, pulser, controller register); `inter` falls the clock
// after the acknowledging write and new presses are accepted WAIT_CYCLES + 2
// clocks after it. Avalon: zero read latency, readdata valid whenever
// selected; `read`, `address` and `writedata` are not decoded.
module input_controller
  import tagg_pkg::*;
#(
  parameter int unsigned NUM_SWITCHES  = tagg_pkg::NUM_BUTTONS,
  parameter int unsigned SETTLE_CYCLES = tagg_pkg::DEBOUNCE_CYCLES,
  parameter int unsigned WAIT_CYCLES   = tagg_pkg::IRQ_WAIT_CYCLES
) (
  input  logic                    clk,
  input  logic                    reset_n,
  // Avalon slave
  input  logic                    chipselect,
  input  logic                    read,
  input  logic                    write,
  input  logic [9:0]              address,
  input  logic [15:0]             writedata,
  output logic [15:0]             readdata,
  output logic                    inter,
  // raw switches, 0 = pressed
  input  logic [NUM_SWITCHES-1:0] switch_n
);

  localparam int unsigned WCNT_W = $clog2(WAIT_CYCLES + 2);

  logic                    reset;
  logic                    we;
  logic [NUM_SWITCHES-1:0] dswitch_n;   // debounced
  logic [NUM_SWITCHES-1:0] pswitch_n;   // pulsed
  logic [NUM_SWITCHES-1:0] pressed_q;
  logic [WCNT_W-1:0]       wait_cnt;
  ic_state_e               state, next_state;

  assign reset = !reset_n;
  assign we    = chipselect && write;

  for (genvar i = 0; i < NUM_SWITCHES; i++) begin : g_sw
    debouncer #(.SETTLE_CYCLES(SETTLE_CYCLES)) u_db (
      .clk       (clk),
      .reset     (reset),
      .key_in_n  (switch_n[i]),
      .key_out_n (dswitch_n[i])
    );
    pulser u_pu (
      .clk      (clk),
      .reset    (reset),
      .key_in_n (dswitch_n[i]),
      .pulse_n  (pswitch_n[i])
    );
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= IC_IDLE;
      wait_cnt  <= '0;
      pressed_q <= '0;
    end else begin
      state <= next_state;
      if (state == IC_PRESSED)                    wait_cnt <= '0;
      else if (32'(wait_cnt) <= WAIT_CYCLES)      wait_cnt <= wait_cnt + 1'b1;
      if (state == IC_IDLE && !(&pswitch_n))      pressed_q <= ~pswitch_n;
      else if (we)                                pressed_q <= '0;
    end
  end

  always_comb begin
    next_state = state;
    inter      = 1'b0;
    unique case (state)
      IC_IDLE:    if (!(&pswitch_n)) next_state = IC_PRESSED;
      IC_PRESSED: begin
        inter = 1'b1;
        if (we) next_state = IC_WAITST;
      end
      IC_WAITST:  if (32'(wait_cnt) > WAIT_CYCLES) next_state = IC_IDLE;
      default:    next_state = IC_IDLE;
    endcase
  end

  assign readdata = 16'(pressed_q);

  // The interrupt is dropped the clock after the processor acknowledges it.
  a_ack_clears_irq: assert property (@(posedge clk) disable iff (reset)
    (inter && we) |=> !inter);

endmodule
