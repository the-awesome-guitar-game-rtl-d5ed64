# Guitar game input hardware

A rhythm game in the style of a toy guitar controller, running on a DE2-class
FPGA board. A soft processor plays the song, prompts the player for a
coloured fret button on each beat, and scores the presses. Everything that
has to be precise in time lives in hardware, outside the processor:

* getting a clean, single event out of a bouncing mechanical button;
* turning that event into an interrupt the software can take, acknowledge
  and not see twice;
* telling the software when the next beat has arrived;
* configuring the audio codec and video decoder at power-up;
* giving the processor a 16-bit SRAM and the codec its master clock.

This repository holds that hardware as synthesizable SystemVerilog. The
processor, its interconnect and the game software are not included. Their
bus ports come out of the top as plain Avalon-MM slave signals, so a
testbench or another CPU can take the software's place.

```
             GPIO_0[4:0] / KEY[3:0]
                    |
   +----------------v----------------+        +-------------+
   | input_controller x5 (buttons)   |--irq-->|             |
   |  debouncer -> pulser -> IDLE/   |        |  processor  |
   |  PRESSED/WAITST                 |<-bus---|  (not here) |
   +---------------------------------+        |             |
   | beat_timer --expired--> input_  |--irq-->|             |
   |                 controller #6   |<-bus---|             |
   +---------------------------------+        |             |
   | sram_controller  <-> SRAM pins  |<-bus---|             |
   +---------------------------------+        +-------------+
   | i2c_av_config -> i2c_controller -> I2C_SCLK / I2C_SDAT (codec, video)
   | power-on reset counter, audio clock divider (AUD_XCK)
```

## The button interrupt path

This is the part that decides whether the game feels right, and the part with
the most timing rules. Each guitar button has its own `input_controller`. A
press travels through three stages.

### 1. Debouncer (`debouncer`, `debounce_counter`)

Buttons are active low. The debouncer is a four-state machine:

| state         | output    | leaves when                              |
|---------------|-----------|------------------------------------------|
| ZERO          | released  | input sampled low                        |
| ZERO_TO_ONE   | released  | counter reaches `SETTLE_CYCLES`          |
| ONE           | pressed   | input sampled high                       |
| ONE_TO_ZERO   | pressed   | counter reaches `SETTLE_CYCLES`          |

The input is not looked at in the two waiting states, so any bounce there is
simply ignored. This is not a "stable for N cycles" filter. The first edge
is believed, and the debouncer then goes deaf for 500,000 clocks (10 ms at
50 MHz, 19-bit counter). A press shows on the output `SETTLE_CYCLES + 2`
clocks after the first low sample. A release shows the same number of
clocks after the first high sample.

### 2. Pulser (`pulser`)

A three-state Moore machine (ZERO, ONE_PULSE, ONE_STANDBY). It gives exactly
one clock of low output per debounced press, however long the button is
held. A held button therefore never raises a second interrupt.

### 3. Interrupt handshake (`input_controller`)

The controller's machine has three states:

* **IDLE**: waits for a pulse on any of its switch inputs. The switches that
  pulsed are latched into the press register, and the machine goes to
  PRESSED.
* **PRESSED**: `inter` (the interrupt request) is high. The software
  acknowledges by **writing anything to any address** of the controller. The
  data and the address are not decoded.
* **WAITST**: `inter` is low again. New presses are dropped until a
  lock-out counter passes `WAIT_CYCLES` (30,000 clocks, 0.6 ms). The counter
  is held clear in PRESSED.

Timing at the controller's ports:

* raw press to `inter` high: `SETTLE_CYCLES + 4` clocks (500,004 at the
  defaults);
* acknowledging write to `inter` low: 1 clock;
* acknowledging write to accepting presses again: `WAIT_CYCLES + 2` clocks.

An assertion in the module checks that an acknowledging write in PRESSED
always clears the request.

A press arriving while the controller is in PRESSED or WAITST is lost, not
queued. This is deliberate: the game scores one press per prompt. Because
each button has its own controller, pressing a different button is not
blocked by the lock-out.

**Register map** (zero read latency; `readdata` is valid whenever the
controller is selected):

| access          | meaning                                                        |
|-----------------|----------------------------------------------------------------|
| read, any addr  | bit k set = switch k+1 was pressed (latched in IDLE)           |
| write, any addr | acknowledge: clears the request and the press register         |

In the top, controller k (k = 1 to 5) sees only its own button, on switch
input k. So the software can tell the buttons apart either by which
interrupt fired or by the bit it reads back.

## Beats: the timer and the sixth controller

`beat_timer` is a one-shot, 32-bit down counter on the bus:

| address | write                          | read                      |
|---------|--------------------------------|---------------------------|
| 0       | low 16 bits of the period      | low 16 bits of the count  |
| 1       | high 16 bits of the period     | high 16 bits of the count |
| 2       | bit 0 = 1: start               | 0                         |

Once started, the timer decrements once per clock and stops at zero. The
count can be rewritten while the timer runs, and it then counts on from the
new value. When a started count reaches zero, `expired` pulses for one clock,
n + 2 clocks after the start write for a period of n. In the top, that pulse
is the "press" of the sixth `input_controller`. A beat therefore reaches the
software by the same interrupt and acknowledge protocol as a button. It also
passes through the same debounce delay: at the defaults the beat interrupt
comes about 10 ms after the timer expires. Software that wants the
interrupt on the beat should load a period `SETTLE_CYCLES + 4` clocks shorter.

The game loop this hardware was built for plays a song of 540 beats. For
each beat it loads the time to the next one, waits for the beat interrupt,
prompts a random button, and scores the first matching button interrupt
before the following beat.

## Audio and video configuration over I2C

`i2c_av_config` runs by itself after reset. It walks a built-in table of 50
16-bit register writes:

* entries 0–9 go to the audio codec at I2C address 0x34 (line-in and
  headphone levels, analogue and digital paths, power, data format, sampling
  control, activation);
* entries 10–49 go to the video decoder at address 0x40.

Each entry goes out as a three-byte write: slave address, register, value.
A write that is not acknowledged is retried. `config_done` rises after the
last entry.

The bus clock comes from a divider. It toggles a control clock every
`CLK_FREQ/I2C_FREQ + 1` system clocks, about 10 kHz at the defaults. Both
state machines move one step per control clock period, on a one-clock
`tick` enable, so everything stays on the 50 MHz clock. One write takes
about 37 periods, and the whole table about 0.19 s.

`i2c_controller` sends one transfer as 33 fixed steps, counted by a step
counter that is held at 0 while `go` is low:

| step  | action                                                      |
|-------|-------------------------------------------------------------|
| 0     | idle levels, clear flags                                    |
| 1     | latch data; SDA falls while SCL is high (START)             |
| 2     | SCL low                                                     |
| 3–29  | 27 bit slots: 3 × (8 data bits MSB first + 1 acknowledge)   |
| 30–32 | SDA low, SCL high, SDA rises (STOP); `done`                 |

In steps 4 to 30, SCL is the inverted control clock, so each slot has one
SCL pulse while its data is steady. SDA is an open-drain pair:
`sda_drive_low` out, `sda_i` in. `nack` reports a missing acknowledge in any
of the three acknowledge slots.

## SRAM bridge

`sram_controller` is purely combinational. It maps the Avalon slave directly
onto a 256K × 16 asynchronous SRAM:

* address to address;
* chip select, read and write to active-low CE, OE and WE;
* the two byte enables to active-low UB and LB;
* write data onto the bus only while `write` is high.

The bidirectional data pin is split into `SRAM_DQ_I`, `SRAM_DQ_O` and
`SRAM_DQ_OE`; the pad joins them. The bus master must use zero read latency
with one wait state for reads.

The SRAM holds 512 KB. That is enough for sprites and the beat stream, but
not for a song: 3 minutes of 8-bit audio at 8 kHz needs 1.44 MB, which is why
song audio belongs in SDRAM.

## Top level (`guitar_top`)

* **Power-on reset**: a counter loaded by FPGA configuration holds `reset_n`
  low for 65,535 clocks, then releases it for good. Every peripheral resets
  from it.
* **Audio clock**: a 2-bit counter divides the 50 MHz clock by four. Its top
  bit is `AUD_XCK` (12.5 MHz).
* **Button source**:
  * `USE_KEYS = 0` (the default) takes the guitar from `GPIO_0[4:0]`;
  * `USE_KEYS = 1` takes buttons 1–4 from the board's push buttons
    `KEY[3:0]`, for bench testing without the guitar, and leaves controller 5
    idle.
* **Bus ports**:
  * each input controller has its own `chipselect`, `read` and `write`;
    they share address and write data, and each has its own 16-bit
    `readdata` and interrupt;
  * the timer and the SRAM have their own port sets.

Parameters of the top: `POR_CYCLES` (65535), `SETTLE_CYCLES` (500000),
`WAIT_CYCLES` (30000), `I2C_FREQ` (20000) and `USE_KEYS` (0). The shared
constants and state encodings are in `tagg_pkg`.

## Where this differs from the original board design

These are choices made here; the rest follows the original design.

* **The press register.** The original controller never drives its read
  data. Here a read returns which switch pulsed, and the acknowledging write
  clears it. This matches the original intent: a location the processor
  reads and then clears.
* **The beat path as a whole.** The original project treated the timer and
  the sixth controller as a side track and finally counted beats in software,
  although its final program still loads and starts the timer. They are built
  here as one working path.
* **How a beat reaches controller 6.** The original says only that the sixth
  controller signalled beats. The timer's `expired` pulse, and the link from
  it to controller 6, are this design's.
* **The timer's extras.** The `running` and `expired` outputs are added,
  and reset also clears the count.
* **The I2C controller clocking.** It runs on the system clock with a step
  enable instead of a divided clock. SCL is high in the second half of each
  bit slot, so data never changes on a rising SCL. `done` is low after
  reset.
* **The configuration sequencer.** It has an extra RETRY step, so that a
  retried write cannot take the previous transfer's `done` as its own. It
  also adds `config_done`.
* **Bidirectional pins.** These are split into separate in, out and enable
  signals.

## Not included

* The soft processor, its JTAG UART, and the generated bus interconnect.
* The game software and the song data.
* Streaming audio to the codec.
* The sprite video controller.
* The SDRAM song storage.
* The SRAM chip and the guitar hardware. These exist only as simple models
  in the testbenches.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints a line
`TB_RESULT checks=N failures=M`. Compile with Verilator 5, listing the
package first and letting `-I` find the other modules:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    --top-module guitar_top_tb rtl/tagg_pkg.sv tb/guitar_top_tb.sv
./obj_dir/Vguitar_top_tb
```

Replace the top-module name and testbench file to run another testbench.

| testbench                | what it covers                                                         |
|--------------------------|------------------------------------------------------------------------|
| `debounce_counter_tb`    | clear and count, wrap                                                  |
| `debouncer_tb`           | random bouncing input against a reference model, latency               |
| `pulser_tb`              | one pulse per press, for random hold and gap times                     |
| `input_controller_tb`    | latency, readdata, acknowledge, lock-out, simultaneous presses         |
| `down_counter_tb`        | load and decrement                                                     |
| `beat_timer_tb`          | register map, count-down, expiry time, idle hold                       |
| `sram_controller_tb`     | pin mapping, random word and byte traffic through a model SRAM         |
| `i2c_controller_tb`      | bit sequence, START/STOP, step count, NACK detection (`i2c_slave_model`)|
| `i2c_av_config_tb`       | all 50 table writes, addresses, retry after a NACK                     |
| `guitar_top_tb`          | a whole 540-beat song end to end (see below)                           |
| `guitar_top_full_tb`     | the top with every parameter at its default                            |

`guitar_top_tb` runs at reduced timing: debounce 20 clocks, lock-out 60,
power-on 200, fast I2C. It plays the processor and the player:

* it loads beat periods into the timer and takes the beat interrupts;
* it prompts random buttons and presses them, with contact bounce and
  sometimes the wrong button;
* it scores the game and checks the score against the presses;
* it shows that a repeat press inside the lock-out is lost;
* it runs SRAM traffic and collects the 50 configuration writes on an I2C
  slave model;
* it repeats a press test on a second top with `USE_KEYS = 1`.

It counts each of these mechanisms and fails if any never happened.

`guitar_top_full_tb` runs about 9 million clocks, a few seconds in Verilator.
It checks these timings:

* the reset release at clock 65,536;
* a button interrupt 500,004 clocks after the press;
* the read-back value and the acknowledge;
* a timed beat interrupt;
* an SRAM word written and read back;
* the full 50-write configuration.
