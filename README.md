# RFID access controller for the MFRC522 reader

This is an access-control core for an FPGA. It sits between an MFRC522
13.56 MHz RFID reader and a door LED. When a card is held to the reader, the
controller runs the reader's ISO 14443A card-detect and anticollision
commands over SPI. This gives it the card's 4-byte UID, which it compares
with one stored UID. The LED lights when the two match. The whole design is
a single clock domain at 100 MHz. It has no memories and about 200
flip-flops.

Most of the design's difficulty is not in the logic. It is in speaking the
MFRC522's protocol exactly: the SPI mode, how each register access is framed,
and the order of register writes that makes the chip send a command to the
card. Most of this README covers those points.

## Structure

```
mfrc522_controller (top)
├── rfid_fsm        controller FSM: register scripts, UID capture, decision
├── spi_reg_access  one register read/write -> two-byte SPI frame
├── spi_master      SPI mode 0 byte shifter with clock divider (~3 MHz)
├── uid_comparator  32-bit UID == STORED_UID
└── led_output      holds the last decision on the LED
rfid_pkg            register addresses, command codes, state_t, reg_op_t
```

Top-level ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 100 MHz clock |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `scan_start` | in | 1 | start one card read; hold it high to scan continuously |
| `sclk`, `mosi`, `cs_n` | out | 1 | SPI to the reader |
| `miso` | in | 1 | SPI from the reader |
| `busy` | out | 1 | low only while waiting for `scan_start` |
| `led` | out | 1 | 1 after the authorised card, 0 after anything else |
| `uid` | out | 32 | UID of the last card read correctly; first UID byte in bits 31:24 |
| `uid_valid` | out | 1 | one-clock pulse when `uid` has been updated |

Parameters of the top: `CLK_FREQ_HZ` (100 000 000) and `SCLK_FREQ_HZ`
(3 000 000) set the SPI clock. `STORED_UID` (32'hDEADBEEF) is the
authorised card. `RESET_WAIT_CYCLES` (5000 clocks = 50 µs) is the pause after
the soft reset. `IRQ_POLL_LIMIT` (200) is how many interrupt polls go
unanswered before the controller decides there is no card.

## The controller FSM

The FSM has twelve states with fixed encodings. RESET=0, ANTENNA_ON=1,
WAIT_START=2, DONE=10 and ERROR=11 are the original design's numbers. The
numbers 3 to 9 were assigned here.

| # | state | what it does over SPI | next |
|---|---|---|---|
| 0 | RESET | CommandReg ← SoftReset (0x0F), then wait `RESET_WAIT_CYCLES` | ANTENNA_ON |
| 1 | ANTENNA_ON | read TxControlReg, write it back with bits 1:0 set (both antenna drivers on) | WAIT_START |
| 2 | WAIT_START | nothing; `busy`=0 | REQA on `scan_start` |
| 3 | REQA | CommandReg ← Idle; CommIrqReg ← 0x7F (clear); FIFOLevelReg ← 0x80 (flush); FIFO ← 0x26; CommandReg ← Transceive (0x0C); BitFramingReg ← 0x87 | 4 |
| 4 | WAIT_IRQ (REQA) | read CommIrqReg until RxIRq (bit 5) | 5, or ERROR |
| 5 | READ (ATQA) | FIFOLevelReg must read 2; read both ATQA bytes | 6, or ERROR |
| 6 | ANTICOLL | as REQA, but the FIFO gets 0x93 0x20 and BitFramingReg ← 0x80 | 7 |
| 7 | WAIT_IRQ (anticoll.) | as state 4 | 8, or ERROR |
| 8 | READ (UID) | FIFOLevelReg must read 5; read UID0..UID3 and BCC | 9, or ERROR |
| 9 | COMPARE | BCC must equal UID0^UID1^UID2^UID3; if so, load `uid` | DONE or ERROR |
| 10 | DONE | pulse `uid_valid`; decision = comparator result | RESET |
| 11 | ERROR | decision = refused | RESET |

Points that are easy to miss:

* **The reader's interrupt is polled, not wired.** The only connections to the
  reader are the four SPI lines. "Waiting for the interrupt" therefore means
  reading CommIrqReg over and over. Each poll is one full SPI access, about
  600 clocks. The loop ends when RxIRq is set, when ErrIRq (bit 1) is set, or
  after `IRQ_POLL_LIMIT` polls. Either of the last two leads to ERROR. With
  the defaults, a missing card is detected after about 1.2 ms.
* **REQA is a 7-bit frame.** BitFramingReg = 0x87 sets TxLastBits = 7 and
  StartSend. Anticollision uses whole bytes (0x80). The Transceive command is
  written first, and transmission starts only when StartSend is set.
* **Every read ends by going back to RESET.** DONE and ERROR both return to
  the initial state, so the reader is soft-reset and its antenna switched on
  again before each new `scan_start` is accepted. This costs about 70 µs per
  read. In return, no reader state carries over from one card to the next.
* **The decision.** `led_output` loads the result at every DONE or ERROR, so a
  failed read (no card, bad BCC, wrong FIFO level, ErrIRq) turns the LED off.
  `uid` changes only on a successful read.

In simulation, a successful read takes 17 613 clocks (0.18 ms) from
`scan_start` to `uid_valid`. That figure includes two card replies of 20 µs
each.

## SPI: timing and framing

`spi_master` implements SPI mode 0 (CPOL=0, CPHA=0), MSB first, 8 bits per
byte:

* SCLK idles low. Each SCLK phase lasts `HALF = ceil(CLK/(2·SCLK))` clocks.
  With the defaults that is 17 clocks, so one SCLK period is 34 clocks and
  SCLK runs at 2.94 MHz. The ratio is rounded so the clock never exceeds the
  requested ~3 MHz.
* MOSI holds bit 7 before the first rising edge, and changes to the next bit
  on each falling edge. MISO is sampled on each rising edge.
* `cs_n` falls, then half a period later comes the first rising edge (CS
  setup). Half a period after the last falling edge, `cs_n` rises (CS hold).
  It then stays high for at least half a period.
* Several bytes can share one chip-select frame. `last`=0 keeps `cs_n` low
  after the byte, and `ready` goes high again so the next byte can be started.

`spi_reg_access` builds the framing the MFRC522 expects. Each register access
is one chip-select frame of exactly two bytes:

```
byte 1 (address): { R/W̄ , addr[5:0] , 0 }      R/W̄ = 1 for a read
byte 2 (data)   : write -> wdata ; read -> 0x00 sent, register value received
```

Handshakes: `spi_master` takes `start` while `ready` is high, and pulses
`done` when each byte is finished. `spi_reg_access` takes `req` while `busy`
is low, and pulses `done` only after `cs_n` has risen again. A new request can
therefore follow at once. Assertions in both modules flag a request made while
the module is busy, and SCLK high while chip select is released.

## What follows the original design and what was chosen here

These parts follow the original design:

* the four-part split into SPI controller, RFID FSM, UID comparator and LED
  output;
* SPI mode 0, 8-bit transfers, ~3 MHz from 100 MHz, a clock divider and a
  shift register;
* the access sequence "CS low, address, data, CS high";
* the state names, their order and the return to the initial state;
* the state numbers listed above;
* the MFRC522 register and command codes (CommandReg 0x01, CommIrqReg 0x04,
  FIFODataReg 0x09, TxControlReg 0x14, SoftReset 0x0F, Transceive 0x0C) and
  the card commands REQA 0x26 and anticollision 0x93 0x20;
* the top-level port names;
* a 32-bit UID.

These are this design's own choices:

* The address-byte layout, FIFOLevelReg (0x0A), BitFramingReg (0x0D), the
  Idle command and the interrupt bit positions. These come from the MFRC522
  data sheet.
* The exact register scripts in the table above.
* Polling CommIrqReg instead of an IRQ pin.
* The poll limit, the 50 µs reset wait, the BCC and FIFO-level checks and the
  UID byte order.
* The meaning of `scan_start` and `busy`. The original design only names
  these ports.
* Card detection happens in WAIT_IRQ. The original description has the FSM
  reach WAIT_IRQ only once a card is detected. Here, REQA always goes on to
  WAIT_IRQ, and a missing card shows up as the poll limit running out.
* The CS setup and hold times.
* The stored UID. Only its leading byte, 0xDE, is taken from the original;
  the other three bytes are placeholders. Set `STORED_UID` for a real card.

Deliberate limits:

* Only cascade level 1 is implemented, so only 4-byte (single-size) UIDs can
  be read. 7- and 10-byte UIDs would need the 0x95/0x97 cascade levels and
  SELECT.
* There is no SELECT, HALT or authentication of card memory: the UID alone
  grants access. UIDs can be cloned, so treat this as a demonstrator rather
  than a secure lock.
* There is one stored UID.
* The LED has no time-out.
* The design synthesizes to about 206 flip-flop bits. The UID is held twice:
  once in the byte registers filled during the read, and once in the `uid`
  output, which changes only on success.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_spi_master` pairs the master with a mode 0 slave written in the
  testbench and uses random data in one- and two-byte frames. It checks the
  bytes received on both sides, 8 SCLK cycles per byte, an SCLK period of
  exactly 34 clocks, that MOSI is stable while SCLK is high, and the
  chip-select framing.
* `tb_spi_reg_access` puts a byte-level stand-in for the master, with random
  delays, in place of `spi_master`. It checks the address byte, the data
  byte, the `last` flags, the read data and that there is one `done` per
  access.
* `tb_rfid_fsm` answers the register port from a scripted reader. It
  compares the full access sequence of a read with a hand-written expected
  list. It also covers the authorised card, a foreign card, no card, a bad
  BCC, a wrong FIFO level, ErrIRq, and the state numbers.
* `tb_uid_comparator` and `tb_led_output` check the comparator and the LED
  unit.
* `tb_mfrc522_controller` is the system test, with every parameter at its
  default. It connects the top to `tb/mfrc522_model.sv`, a behavioural
  MFRC522 with one card. The model covers the SPI slave, CommandReg with
  SoftReset, CommIrqReg, a 64-byte FIFO, FIFOLevelReg, BitFramingReg,
  TxControlReg, and the card's answers to REQA and anticollision after a
  delay. The test reads the authorised card, a foreign card, no card, a card
  with a corrupt BCC, and runs continuous scanning. It checks the LED, the
  UID, the `uid_valid` pulses, the SCLK period, 16 SCLK cycles per frame and
  that the model sees no framing errors. It also counts that each mechanism
  happened at least once: soft reset, antenna on, REQA, IRQ polling,
  anticollision, grant, deny, no-card time-out, BCC error and continuous
  scan. It finishes in well under a second of host time.

The model was written from the MFRC522 data sheet and shares no code with
the RTL. It is still a model: it does not check SPI setup and hold times,
and it answers instantly once its reply delay is over. Before trusting the
design on hardware, check it against a real reader with a logic analyser.

## Simulating

Example with Verilator 5 (`--timing` is needed for the testbenches' delays):

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_mfrc522_controller \
    rtl/rfid_pkg.sv tb/tb_mfrc522_controller.sv
./obj_dir/Vtb_mfrc522_controller
```

Verilator finds the other modules by file name through `-I`. Substitute any
`tb_<module>` for the top module to run a single unit test. For lint, run
`verilator --lint-only -Wall -Irtl rtl/rfid_pkg.sv rtl/mfrc522_controller.sv`.
When it is used this way, the package constants that the top does not
reference show up as unused-parameter warnings. The assertions' use of
`rst_n` in `disable iff` shows up as a sync/async warning. Neither indicates a
circuit problem.
