// Shared types and constants of the guitar game input hardware.
//
// The state encodings of the three small state machines (debouncer, pulser,
// input controller) and the default timing constants live here so that the
// modules and their testbenches agree on them. The numbers are the ones of the
// original board design: a 50 MHz clock, a 500000-clock debounce hold-off
// (10 ms) and a 30000-clock lock-out after an interrupt is acknowledged.
package tagg_pkg;

  // Board clock and timing defaults.
  localparam int unsigned CLK_HZ            = 50_000_000;
  localparam int unsigned DEBOUNCE_CYCLES   = 500_000;
  localparam int unsigned DEBOUNCE_CNT_W    = 19;      // 2**19 = 524288 > 500000
  localparam int unsigned IRQ_WAIT_CYCLES   = 30_000;
  localparam int unsigned NUM_BUTTONS       = 5;

  // Debouncer: ZERO = released, ONE = pressed; the *_TO_* states hold the
  // output while the debounce counter runs.
  typedef enum logic [1:0] {
    DB_ZERO        = 2'd0,
    DB_ZERO_TO_ONE = 2'd1,
    DB_ONE         = 2'd2,
    DB_ONE_TO_ZERO = 2'd3
  } db_state_e;

  // Pulser: one clock of ONE_PULSE per press.
  typedef enum logic [1:0] {
    PU_ZERO        = 2'd0,
    PU_ONE_PULSE   = 2'd1,
    PU_ONE_STANDBY = 2'd2
  } pu_state_e;

  // Input controller: interrupt raised in PRESSED, lock-out in WAITST.
  typedef enum logic [1:0] {
    IC_IDLE    = 2'd0,
    IC_PRESSED = 2'd1,
    IC_WAITST  = 2'd2
  } ic_state_e;

endpackage
