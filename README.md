# Combiner-card I²C master

This is a small, single-master I²C controller for an FPGA. It keeps a
handful of board peripherals in step with registers inside the FPGA. On
the beam-loss-monitor combiner card those peripherals are:

* one 16-bit I²C port expander driving 16 front-panel LEDs, and
* two quad 8-bit digital potentiometers (U304, U308), eight wipers in
  all, that set the amplitude of a self-test modulation signal.

The I²C bus saves pins: two open-drain lines (SDA, SCL) replace a parallel
bus per peripheral. The core is kept small on purpose. It has no
multi-master arbitration and no clock stretching. It knows only one frame
shape, an address byte followed by two data bytes. There are three parts:

| Part | Top module | What the user sees |
|---|---|---|
| I²C core | `i2c_top_entity` | Ask for one transfer with `start`. `busy` and `error` report progress and outcome. |
| Change-detect interface | `i2c_interface_change_detect` | Drive ten byte-wide levels. A frame goes out whenever one of them changes. |
| Subsystem top | `i2c_combiner_top` | Clock divider + interface + core, as wired on the card. |

## Hierarchy

```
i2c_combiner_top
├── clock_divider                 local clock = clk_in / 2^DIV_WIDTH
├── i2c_interface_change_detect   ten inputs -> frame requests
│   ├── change_detect x10         (each: reg_8 + XOR)
│   ├── change_detect_register    ten RS flags
│   └── interface_scan_fsm        circular scan, address/command byte
└── i2c_top_entity                the I²C core
    ├── i2c_controller            user handshake, address map, watchdog
    └── frame_tx_rx               framer
        ├── reg_8 x3              frozen address / data_LO / data_HI
        ├── shift8                serial shift register
        ├── upcnt3                bit counter
        └── sda_io_logic x2       open-drain pins for SDA and SCL
```

`i2c_pkg` holds the shared constants: the component codes, the default
device addresses and the command-byte function.

## The framer: how a frame is put on the wire

`frame_tx_rx` is the part that needs the closest reading. Everything on
the bus is paced by a fixed **three-cycle slot** of the core clock. Each
data bit, each acknowledge bit, the START and the STOP take exactly one
slot:

| slot | phase 0 | phase 1 | phase 2 |
|---|---|---|---|
| START | SCL 1, SDA 1 | SCL 1, SDA **0** | SCL 0, SDA 0 |
| data bit | SCL 0, SDA ← bit | SCL 1 (SDA sampled at end) | SCL 0, shift |
| ack bit | SCL 0, SDA released | SCL 1 (SDA sampled at end) | SCL 0 |
| STOP | SCL 0, SDA 0 | SCL 1, SDA 0 | SCL 1, SDA **1** |

Within a data or acknowledge bit, SDA changes only at the start of phase
0, while SCL has been low for a whole cycle. It then stays put until
after SCL has fallen again. So the only SDA edges with SCL high are the
START and STOP conditions. An assertion in `frame_tx_rx` checks this
rule. Both lines are open drain: `sda_io_logic` either pulls a line low
or releases it to the board pull-up, and always reads the pin back.

**Loading a frame.** The controller freezes the bytes in the framer's
three `reg_8` registers with strobes on consecutive clocks:

* the first strobe carries the address byte (7-bit device address and
  the direction bit);
* for a write, the second carries the first data byte and the third the
  second data byte.

The framer starts the bus sequence right after the last strobe. Strobes
that arrive while a frame is on the bus are ignored.

**Sending and receiving.** `shift8` is loaded with each byte in turn and
shifts MSB first. In transmit its MSB drives SDA. In receive the sampled
SDA level enters at its LSB. `upcnt3` counts the eight bits. After every
transmitted byte comes an acknowledge bit. If the peripheral leaves SDA
high, the framer skips the rest of the frame, sends STOP and pulses
`timeout`. Otherwise it pulses `ack` after STOP. A read frame is the
address byte (direction = 1) followed by one received byte. The master
answers that byte with "no acknowledge", then sends STOP. The received
byte is `frame_out`.

**Frame lengths**, counted from the last strobe to the `ack`/`timeout`
pulse:

| frame | slots | core clocks |
|---|---|---|
| write (address + 2 bytes) | 1 + 3×9 + 1 | 87 |
| read (address + 1 byte) | 1 + 2×9 + 1 | 60 |
| address not acknowledged | 1 + 9 + 1 | 33 |

## The core: `i2c_top_entity`

Ports: `clock`, `reset`, `address[2:0]`, `data_HI[7:0]`, `data_LO[7:0]`,
`r_w`, `start` in; `data_RX[7:0]`, `busy`, `error` out; `sda`, `scl`
inout.

**Starting a transfer.** A rising edge on `start` while `busy` is low
starts one transfer. In that cycle the controller captures `address`,
`data_LO`, `data_HI` and `r_w`, so they may change afterwards. `busy`
goes high on the next clock and stays high until the transfer is over.
A `start` edge while `busy` is high has no effect. Holding `start` high
gives a single transfer.

**Component codes.** The 3-bit `address` is a component code, not an I²C
address:

| code | component | default 7-bit I²C address |
|---|---|---|
| 001 | LED port expander | `0100_000` (`EXP_BASE_ADDR`, `EXP_PHYS_ADDR`) |
| 010 | potentiometer U304 | `01011_00` (`POT_BASE_ADDR`, `POT1_PHYS_ADDR`) |
| 011 | potentiometer U308 | `01011_01` (`POT_BASE_ADDR`, `POT2_PHYS_ADDR`) |
| other | none | the start gives an `error` pulse and no transfer |

The LED expander is write-only. A read request with code 001 is
rejected the same way as an unused code.

The device addresses are parameters. Each is split into a family base and
the strap-pin bits, so parts from another supplier or other strapping need
only new parameter values.

**Byte order.** `data_LO` goes on the bus first and `data_HI` second. For
a potentiometer, `data_LO` is the command byte. Its two MSBs select one
of the four wipers, and the remaining bits are sent as 0. `data_HI` is
then the wiper position, 0 to 255. For the expander the two bytes are
the LED pattern: `data_LO` carries LEDs 7..0 and `data_HI` LEDs 15..8.
The specification names the bytes in both orders in different places.
This design follows the statement that `data_LO` is sent first, because
it matches the add-on interface (command byte or LED low byte first).

**Reads.** `r_w = 1` reads one byte from a potentiometer. The byte is
the wiper that the last write's command byte selected. `data_RX` takes
it when the frame ends and holds it until the next successful read. The
fall of `busy` marks the new value.

**Errors.** `error` is a one-cycle pulse. It comes in the cycle `busy`
falls, in three cases:

* a peripheral did not acknowledge a byte;
* the framer gave no answer within `WATCHDOG_CYCLES` (255) clocks of the
  last strobe;
* the component code is unused, or a read is asked of the LED expander
  (in these cases `busy` stays low).

After an error the core is idle again, and the transfer has to be asked
for again.

**Latency**, in clocks of `busy` high: 91 for a write, 62 for a read, 37
when the address is not acknowledged. These are the frame lengths above
plus one cycle per strobe (three for a write, one for a read) and one
cycle for the outcome.

## The change-detect interface: `i2c_interface_change_detect`

This interface sits in front of the core. The user then never deals with
`start`, `busy`, or addresses and command bytes. It has ten channels:

| channel | input | frame |
|---|---|---|
| 0, 1 | `LED_HI`, `LED_LO` | code 001, data_LO = `LED_LO`, data_HI = `LED_HI` |
| 2..5 | `POT_1_0..3` | code 010, data_LO = wiper number in bits 7:6, data_HI = value |
| 6..9 | `POT_2_0..3` | code 011, likewise |

Each input has a `change_detect`: a `reg_8` holds last cycle's value, and
the OR of the bitwise XOR with the current value flags a change. The
change sets that channel's flag in `change_detect_register` (ten clocked
RS flip-flops; set wins over clear).

`interface_scan_fsm` runs a pointer round the ten flags, one channel per
clock. When the pointer finds a set flag, `enable` is high and the core
is idle, it presents the channel's frame on `ADDRESS`/`DATA_LO`/`DATA_HI`.
It pulses `strobe` (wired to the core's `start`) and clears the flag.
Either LED flag produces one frame carrying both LED bytes and clears
both LED flags. The FSM waits for `TX_busy` to rise and fall. The data
is taken from the live inputs in the strobe cycle. A change that arrives
during the transfer sets the flag again, so the newer value follows in
a later frame.

If the transfer ends with `TX_error`, the FSM sets the flag again. The
channel is retried on the next round, and the other channels still get
their turns. `ERROR_LED` turns on at the first failure and stays on until
reset.

## Clocking and reset

All I²C logic runs on one clock, the MSB of `clock_divider`, a
free-running `DIV_WIDTH`-bit counter on the board clock. One bus bit
takes three of these clocks. So the I²C clock must stay at or below
300 kHz for the 100 kbit/s standard-mode limit.

| board clock | `DIV_WIDTH` | core clock | bus rate |
|---|---|---|---|
| 1 MHz | 9 (default, as wired on the card) | 1953 Hz | 651 bit/s |
| 1 MHz | 4–5 | 62.5 / 31.25 kHz | 20.8 / 10.4 kbit/s |
| 1 MHz | 2 (minimum) | 250 kHz | 83 kbit/s |

If transfers fail, the first remedy is a wider divider. Note that the
three-cycle slot gives SCL a high time of one core clock and a low time
of two. The I²C standard-mode minimums are 4.0 µs high and 4.7 µs low.
So the core clock must stay at or below 250 kHz to meet them; the
300 kHz figure only limits the bit rate.

Reset is synchronous and active high in every block. In
`i2c_combiner_top` it acts on the divided clock, so hold it for at least
two divided periods (2^(DIV_WIDTH+1) board clocks). The divider itself
has no reset.

## Departures and choices

These points are this design's own choices where the specification is
silent, or go beyond it:

* The default I²C device addresses and the watchdog length.
* The strobe sequence between controller and framer, and the phase order
  inside a bit.
* A missing acknowledge ends the frame at once.
* Reads are single-byte, answered with "no acknowledge". They return the
  wiper selected by the previous write's command byte.
* The command-byte bits below the wiper number are 0.
* Unused component codes and LED-expander reads are rejected with an
  error.
* In the interface: the retry after an error, the sticky `ERROR_LED`,
  the shared LED frame and the `enable` gating.
* `busy` rises one clock after the `start` edge, not in the same cycle.

Not implemented: multi-master arbitration (disabled by design), clock
stretching by a slave (SCL is only driven, never waited on), repeated
START, and multi-byte reads. The watchdog cannot fire with the framer
as built: the framer always ends a frame in bounded time. It guards
against a framer that never answers, and its testbench drives it by
holding back the framer's response.

## Simulation

The testbenches are self-checking and print
`TB_RESULT checks=N failures=M`. Each also has a cycle-count watchdog.
`tb/i2c_slave_model.sv` is a behavioural model of the three peripherals.
It acknowledges, stores expander and wiper writes, answers reads, and
can be switched off device by device to provoke a missing acknowledge.

| testbench | covers |
|---|---|
| `tb_reg_8`, `tb_shift8`, `tb_upcnt3`, `tb_change_detect`, `tb_change_detect_register`, `tb_clock_divider`, `tb_sda_io_logic` | leaf blocks against reference models |
| `tb_frame_tx_rx` | frames on the bus, frame lengths 87/60/33, 3-clock bit period |
| `tb_i2c_controller` | address map, byte order, busy/error timing, watchdog, edge-triggered start |
| `tb_i2c_top_entity` | core with peripherals: writes, read-back, missing acknowledge, busy 91/62/37 |
| `tb_interface_scan_fsm`, `tb_i2c_interface_change_detect` | scan order, frame contents, retry, enable |
| `tb_i2c_combiner_top` | whole subsystem at default parameters: see below |

`tb_i2c_combiner_top` runs at full size in under a second. It changes
the LEDs and all eight wipers and checks that the peripherals follow. It
also counts that each mechanism happened at least once:

* frames to each device;
* several changes pending at once;
* a change during a transfer;
* a missing acknowledge followed by a retry;
* `enable` holding updates back.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/i2c_pkg.sv rtl/*.sv tb/i2c_slave_model.sv tb/tb_i2c_combiner_top.sv \
  --top tb_i2c_combiner_top
./obj_dir/Vtb_i2c_combiner_top
```

The RTL uses tristate `inout` pins for SDA and SCL, and the testbenches
use `tri1` nets for the pull-ups. For an FPGA, keep the pins at the top
level, or replace `sda_io_logic` with the vendor's I/O buffer.
