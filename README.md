# TWI (I²C) communication analyser

A passive monitor for a Two-Wire-Interface (I²C) bus. It listens to SCL and
SDA, follows one frame bit by bit, and reports what it saw: the 7-bit slave
address, whether the master reads or writes, the first two data bytes, and
whether every acknowledge the slave owes was given. It never drives the bus.

The design follows the analyser described in the paper *Algorithmic Analysis
and Hardware Implementation of a Two-Wire-Interface Communication Analyser*.
Its central idea is that a TWI frame is almost fully predictable: once a Start
is seen, the position of every bit is known, and the only real branch point is
the acknowledge slot after each byte. There, two bits (direction and
acknowledge level) decide what comes next. The analyser is therefore a small
state machine with one bit counter and one Boolean branch table.

```
 scl_i ──►┌──────────────────────┐ start ┌──────────────────────────┐──► address_o, dir_o,
 sda_i ──►│ twi_condition_       │ stop  │ twi_monitor_fsm          │    read/write flags
          │ detector             │ bit   │   ┌────────────────────┐ │──► data_o[0..1]
          │ (sync + edge detect) │ sda   │   │ twi_branch_logic   │ │──► error_o, busy_o, done_o
          └──────────────────────┘──────►│   │ (ACK_DETECT exits) │ │──► expect_stop/byte_o
                                         │   └────────────────────┘ │──► bit_index_o, state_o
 op_reset_i ────────────────────────────►└──────────────────────────┘
```

## Files

| file | contents |
|---|---|
| `rtl/twi_pkg.sv` | state type `state_t`, address and byte widths |
| `rtl/twi_condition_detector.sv` | line synchroniser; Start, Stop and bit events |
| `rtl/twi_branch_logic.sv` | combinational branch table of the acknowledge slot |
| `rtl/twi_monitor_fsm.sv` | the monitor state machine and capture registers |
| `rtl/twi_analyser.sv` | top level |
| `tb/twi_bus_model.sv` | behavioural I²C master+slave that plays frames (simulation only) |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Counting bits in a frame

A 7-bit-address frame with *n* data bytes has a fixed number of bit slots:

    slots = 3 + 7 + 9·n + 1 = 11 + 9·n

The 3 are the Start, the direction bit and the terminating Stop (or
Repeated-Start); 7 is the address; each data byte brings 8 bits plus its
acknowledge; the final 1 is the acknowledge of the address byte. The analyser
exposes this count as `bit_index_o`. It starts at 1 on the Start and counts
every SCL rising edge after it. The SCL rising edge that precedes the SDA
edge of a Stop or Repeated-Start is the terminating slot. At `DONE`,
`bit_index_o = 11 + 9n`, so *n* can be recovered even when more bytes went by
than the analyser can store.

## The acknowledge branch

After the address byte and after every data byte, `ACK_DETECT` samples the
ninth bit and asks `twi_branch_logic` where to go. The prediction depends only
on the direction (`dir`: 0 write, 1 read) and the acknowledge level (`ack`:
0 ACK, 1 NACK):

| direction | ack | what the bus will carry next |
|---|---|---|
| write | 0 | another byte from the master, or a Stop |
| write | 1 | nothing valid: the slave refused, an error |
| read  | 0 | another data byte (the master asked for it) |
| read  | 1 | a Stop (the master ended the read) |

As equations: `stop_expected = !dir·!ack + dir·ack`, `next_byte = !ack`,
`error = !dir·ack`. The prediction of the last acknowledge slot is kept on
`expect_stop_o` and `expect_byte_o`.

The exit state combines this with the data byte counter and the capacity
`MAX_BYTES` (2, as in the paper):

| condition (first match wins) | exit state |
|---|---|
| NACK in a slot the slave owes: the address ACK, or a data ACK of a write | `ACK_ERROR` |
| NACK in a read (the master ends it) | `BUSY` |
| ACK, and `MAX_BYTES` bytes already captured | `BUSY` |
| ACK otherwise | `SNIFF_DATA` |

Points to know:

* The address acknowledge always comes from the slave, so a NACK there is an
  error in both directions.
* An error is reported even after the capacity is reached.
* **High-Speed-mode master code.** An Hs-mode transfer begins with a master
  code `0000 1xxx` at Fast-mode speed. No device acknowledges it, and a
  Repeated-Start at Hs speed follows. When the captured address matches
  `0000 1xx`, a NACK in the address slot leads to `BUSY` instead of
  `ACK_ERROR`. The following Repeated-Start then restarts the capture. The
  paper claims Hs-mode support but does not describe this case; the rule comes
  from the I²C specification.
* The paper's own exit table contradicts its branch table in two places. Once
  two bytes are captured, it gives read+NACK → `ACK_ERROR` and
  write+NACK → `BUSY`. It also gives read+NACK after the address → `BUSY`.
  This RTL follows the branch table and the protocol rules instead, as in the
  table above.

## The monitor state machine

| state | leaves on | to |
|---|---|---|
| `IDLE` | Start | `READ_ADDR` |
| `READ_ADDR` | 7th bit (bits stored MSB first, a down-counter is the bit position) | `READ_DIR` |
| `READ_DIR` | the direction bit (sets the READ or WRITE flag) | `ACK_DETECT` |
| `ACK_DETECT` | the acknowledge bit | branch table above |
| `SNIFF_DATA` | 8th bit (byte copied to `data_o[count]`, counter +1) | `ACK_DETECT` |
| `BUSY` | Stop | `DONE` |
| `ACK_ERROR` | operator reset only | `IDLE` |
| `DONE` | operator reset only | `IDLE` |

In addition:

* A Start or Repeated-Start in any of the states `READ_ADDR`...`BUSY` goes to
  `READ_ADDR`. It clears the address, direction, data and counters.
* A Stop in any of those states goes to `DONE`.
* `IDLE` ignores everything but a Start.
* `DONE` and `ACK_ERROR` ignore all bus events, so the result stays on the
  outputs until the operator presses reset (`op_reset_i`). That makes the
  analyser a single-shot capture, like an oscilloscope on single trigger.
  To follow the next frame, pulse `op_reset_i`.
* `BUSY` is not an error. It means "the capacity is reached (or the master
  has ended a read); wait for the Stop". Bits are still counted in `BUSY`.

The address register is 8 bits wide with a constant 0 MSB, so it has the
same width as a data byte (126 is shown as `8'h7E`). Data bits go first into a
temporary register. Only a complete byte is copied to `data_o`, so a byte cut
short by a Stop or Repeated-Start never reaches the outputs.

## Turning the wires into events

`twi_condition_detector` samples both lines with the system clock through a
`SYNC_STAGES`-deep synchroniser (default 2) and compares successive samples:

* SDA 1→0 while SCL stays 1: Start or Repeated-Start
* SDA 0→1 while SCL stays 1: Stop
* SCL 0→1: a bit; the SDA sample of the same cycle is its value

Each event is a one-cycle pulse, `SYNC_STAGES` clock edges after the change at
the pin. The state machine acts on it one edge later, so outputs change
`SYNC_STAGES + 1` edges after a bus event (checked for the Stop → `done_o`
path). There is no spike filter.

**Clock requirement.** Each SCL high and low phase, and the SCL-high time
around a Start or Stop edge, must span at least two system-clock samples. At
50 MHz (the clock used in the testbench) the shortest phase of each bus mode
is covered:

| mode | max SCL | shortest SCL phase (I²C spec) | samples at 50 MHz |
|---|---|---|---|
| Standard | 100 kHz | 4.0 µs high | ~200 |
| Fast | 400 kHz | 0.6 µs high | 30 |
| Fast-mode Plus | 1 MHz | 0.26 µs high | 13 |
| High-Speed | 3.4 MHz | 60 ns high | 3 |

Ultra-Fast mode (5 MHz, unidirectional, no acknowledge) is not supported: its
ninth bit would be reported as a missing acknowledge.

## Interface of `twi_analyser`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `op_reset_i` | in | 1 | operator reset, synchronous: back to `IDLE`, all captured values and flags cleared |
| `scl_i`, `sda_i` | in | 1 | the bus lines |
| `state_o` | out | `state_t` (3) | current state |
| `address_o` | out | 8 | slave address, MSB 0 |
| `dir_o`, `read_flag_o`, `write_flag_o` | out | 1 | direction bit and its two flags |
| `data_o` | out | `MAX_BYTES` × 8 | captured data bytes, `[0]` first on the bus |
| `byte_count_o` | out | `$clog2(MAX_BYTES+1)` | bytes captured |
| `error_o` | out | 1 | missing slave acknowledge |
| `busy_o`, `done_o` | out | 1 | state is `BUSY` / `DONE` |
| `expect_stop_o`, `expect_byte_o` | out | 1 | prediction of the last acknowledge slot |
| `bit_index_o` | out | `BIT_INDEX_W` (16) | bit slots since the Start |

Parameters: `MAX_BYTES = 2` (the paper's capacity), `SYNC_STAGES = 2` (at
least 2), `BIT_INDEX_W = 16`. All outputs are registered. The paper shows the
captured values on a display of the FPGA board it used. The kind of display is
not specified, so it is left to the integrator.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -Itb -y rtl -y tb rtl/twi_pkg.sv tb/twi_analyser_tb.sv \
    --top-module twi_analyser_tb
obj_dir/Vtwi_analyser_tb
```

Replace the testbench name for the others: `twi_analyser_capacity_tb`,
`twi_condition_detector_tb`, `twi_branch_logic_tb`, `twi_monitor_fsm_tb`.

* `twi_analyser_tb` runs the whole design at its default parameters from a
  50 MHz clock. It plays:
  * the reference sample communication (address 126 with one and with two
    data bytes of 255) in Standard, Fast, Fast-mode Plus and High-Speed
    timing
  * an Hs-mode frame with its master code
  * a write, Repeated-Start, read register access
  * frames beyond the capacity, address and data NACKs, a read ended by NACK
  * clock stretching
  * 40 random frames

  Every output is checked against a reference worked out from the protocol.
  The bit count is checked against 11 + 9n and the Stop-to-`DONE` latency
  against 3 edges. The test fails if any of these mechanisms never happened:
  Start, Repeated-Start, Stop, capture, the two kinds of `BUSY`, master code,
  error, operator reset, stretching, each bus mode.
* `twi_analyser_capacity_tb` sets `MAX_BYTES = 4` and sends frames of 0 to 6
  bytes in both directions. It checks that the capacity, `BUSY` and the
  error rule scale with the parameter.
* `twi_monitor_fsm_tb` drives the event inputs directly. It walks through
  every transition listed above and then runs 300 random frames.
* `twi_branch_logic_tb` checks every input combination against a table
  written out by hand.
* `twi_condition_detector_tb` checks the event stream and the latency of every
  bit.

The simulator is two-state, so every register has a reset value.

## Departures and limits

* Only 7-bit addressing. A 10-bit address appears as the reserved address
  `11110xx` followed by its second byte, which is captured as data byte 0.
* Only the first `MAX_BYTES` data bytes are stored. Later bytes are still
  counted in `bit_index_o`.
* A Repeated-Start restarts the capture. For a write/Repeated-Start/read
  access, only the read part remains at `DONE`.
* The paper gives no clock frequency, synchroniser or filter. Those parts and
  the 50 MHz figure are this design's own.
* The assertions in `twi_monitor_fsm` (Start, Stop and bit events never
  coincide; the byte count stays in range) use `rst_n` in `disable iff`.
  Verilator therefore reports `rst_n` as used both synchronously and
  asynchronously. This is expected.
