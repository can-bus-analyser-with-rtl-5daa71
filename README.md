# FPGA CAN bus receiver for a PC-based bus analyser

This design is the receiving half of a CAN bus analyser. It listens to the RX
line of a CAN transceiver. It decodes every frame and every bus error it sees
into a fixed-size message record and keeps the records in a FIFO. A PC reads
them out over a byte-wide parallel port. The PC also programs the bit rate and
the bit timing through the same port. The receiver never drives the bus. It
sends no acknowledge and no error flags, so it can watch a running network
without disturbing it.

It reports the kinds of traffic an analyser user wants to see:

| code | kind | meaning |
|---|---|---|
| 1 | DATA A | data frame, standard format (CAN 2.0A, 11-bit identifier) |
| 2 | DATA B | data frame, extended format (CAN 2.0B, 11 + 18-bit identifier) |
| 3 | REMOTE A | remote frame, standard format |
| 4 | REMOTE B | remote frame, extended format |
| 5 | ACK ERROR | the ACK slot stayed recessive: no node acknowledged |
| 6 | CRC ERROR | the received CRC does not match the frame |
| 7 | FORM ERROR | dominant bit in the CRC delimiter, ACK delimiter or EOF |
| 8 | STUFF ERROR | six equal bits where a stuff bit was due |
| 9 | OVERLOAD | overload frame after a frame |

Code 0 (NONE) is what the PC gets when it asks for a message and the FIFO is empty.

## Block chain

Everything runs on one clock, the oscillator clock `clk`. Slower rates are
expressed as one-cycle enable pulses, never as derived clocks.

```
 can_rx ─► can_btl ─► can_stuff ─► can_st_mach ─► can_stack ─► can_comm ◄─► PC
             ▲            ▲  │          │  ▲                     │
   can_brp ──┘ tq_en      │  └► can_crc ┘  │                     │
             ▲            └── destuff_en ──┘                     │
             └────────────── bit timing (BRP, segments, SJW) ─────┘
```

| module | role |
|---|---|
| `can_pkg` | message codes, message record `can_msg_t`, timing record `bit_timing_t` |
| `can_brp` | baud rate prescaler: one time quantum every 2·(BRP+1) clock cycles |
| `can_btl` | bit timing logic: hard sync and resync; samples the bus once per bit |
| `can_stuff` | removes stuff bits and reports stuff errors |
| `can_crc` | CRC-15 register |
| `can_st_mach` | frame decoder: walks the frame fields and writes message records |
| `can_stack` | FIFO of message records |
| `can_comm` | parallel-port state machine for timing setup and message read-out |
| `can_receiver` | top level: wires the above together |

The decoder is the only block that knows where in a frame the bus is, so it
steers three others:
- it opens the de-stuffing window (`destuff_en`);
- it clears and clocks the CRC register (`crc_clr`, `crc_en`);
- it allows hard synchronisation only while the bus is idle (`hard_sync_en`).

## Bit timing

The prescaler divides the oscillator into time quanta:
t_q = 2·(BRP+1) / f_osc, with BRP from 0 to 31. Each bit time is made of four segments:

```
| SYNC_SEG | PROP_SEG  | PHASE_SEG1 | PHASE_SEG2 |
|   1 tq   |  1..8 tq  |  1..8 tq   |  1..8 tq   |
                                    ^ sample point
```

`can_btl` counts quanta through the segments. It samples the synchronised RX
line once, at the end of PHASE_SEG1 (TSEG1 = PROP_SEG + PHASE_SEG1). The bit
rate is therefore f_osc / (2·(BRP+1)·(1+PROP_SEG+PHASE_SEG1+PHASE_SEG2)).

Transmitter and receiver clocks drift apart, so the bit boundary is pulled
back into place on recessive-to-dominant edges. The edge is looked for by
comparing the line at successive quantum ticks:

* **Hard synchronisation.** While the decoder reports an idle bus (or the last
  intermission bit), an edge restarts the bit. The quantum that holds the edge
  becomes SYNC_SEG. This aligns the receiver to the start-of-frame bit.
* **Resynchronisation, late edge.** An edge inside TSEG1 arrived e quanta after
  SYNC_SEG. TSEG1 is lengthened by min(e, SJW), so the sample point moves later.
* **Resynchronisation, early edge.** An edge inside PHASE_SEG2 arrived e quanta
  before the next SYNC_SEG. If e ≤ SJW, the edge quantum becomes the next
  SYNC_SEG. Otherwise PHASE_SEG2 is shortened by SJW.
* Only one synchronisation is allowed between two sample points. An edge inside SYNC_SEG needs no correction.

Timing values outside their ranges are clamped: segments to 1..8, SJW to 1..4.
The resynchronisation rules are those of the CAN specification. Only the
programmable ranges come from the original analyser.

## De-stuffing, CRC and the stuffed window

From SOF to the last CRC bit, a transmitter inserts a complementary bit after
every five equal bits. `can_stuff` counts runs of equal sampled bits all the
time. While `destuff_en` is high, the bit after a run of five is dropped if it
differs. If it is equal, `stuff_err` is raised in place of a bit. The one
subtle point is a stuff bit that follows the last CRC bit. The decoder has
already moved on to the CRC delimiter by then, so it keeps `destuff_en` high
for as long as `run5` (five equal bits pending) is set.

The CRC register is a serial LFSR for x^15+x^14+x^10+x^8+x^7+x^4+x^3+1. It is
held at zero outside frames and clocked with every de-stuffed bit from the
first identifier bit to the last CRC bit. It does not need to see the SOF
bit: a leading zero leaves a zero register unchanged. Because the received
CRC is shifted in as well, a correct frame leaves the register at zero
(`crc_ok`).

## Frame decoding and when records are written

`can_st_mach` follows the fields in this order:

```
SOF, ID1(11), RTR/SRR, IDE, [ID2(18), RTR, r1], r0, DLC(4), DATA(0..64), CRC(15),
CRC delimiter, ACK slot, ACK delimiter, EOF(7), intermission(3)
```

It collects ID1, ID2, RTR, IDE, DLC and the data bytes as they pass. A DLC
above 8 gives 8 data bytes. Remote frames have no data field. The reserved
bits and SRR are accepted with either value. One record is written:

* **Valid frame:** after the sixth EOF bit. This is the point at which a CAN
  receiver accepts a frame. The code is DATA/REMOTE, A/B, taken from IDE and RTR.
* **CRC error:** at the CRC delimiter, when the register is not zero. This is
  checked before the delimiter and the ACK slot.
* **Form error:** a dominant CRC delimiter, ACK delimiter or one of the first six EOF bits.
* **ACK error:** a recessive ACK slot.
* **Stuff error:** as soon as `can_stuff` reports it.
* **Overload:** a dominant seventh EOF bit or a dominant first or second
  intermission bit. This comes after the record of the frame itself. A
  dominant third intermission bit is the SOF of the next frame.

After an error or an overload, the decoder waits for eight consecutive
recessive bits. These are the error or overload delimiter, which ends the
error flags of the other nodes. It then checks the three intermission bits
and returns to idle. Error records carry whatever identifier, DLC and data
had been collected up to that point.

## Message record and FIFO

`can_msg_t` is 101 bits wide: code (4), DLC (4, as received), ID1 (11),
ID2 (18, zero for 2.0A) and data (64, first byte in bits 63:56, unused bytes
zero). `can_stack` stores these records in an array, which maps to embedded
RAM, 16 deep by default (`FIFO_DEPTH`). The read side is show-ahead. A record
that arrives while the FIFO is full is dropped and sets a sticky overflow
flag, which the PC can read and clear.

## Parallel-port protocol

Each byte moves in a four-phase handshake:
1. The PC sets `pc_data_in` and raises `pc_strobe`.
2. The receiver synchronises the strobe, takes the byte, puts its answer on
   `pc_data_out` and raises `pc_ack`. This takes about four clock cycles.
3. The PC reads the answer and drops the strobe. `pc_ack` then falls.

| command byte | action | answer |
|---|---|---|
| `0x1r`, then value | write timing register r | echo of the byte |
| `0x2r` | read timing register r | register value |
| `0x30` | status | `{overflow, full, empty, count[4:0]}` (count saturates at 31) |
| `0x40` | read oldest message | byte 0 of the record, or `0x00` if the FIFO is empty |
| 13 × any byte | (after `0x40`) | bytes 1..13 of the record |
| `0x50` | clear overflow flag | echo |

Timing registers: 0 BRP (0..31), 1 PROP_SEG, 2 PHASE_SEG1, 3 PHASE_SEG2 (each
1..8), 4 SJW (1..4). Written values are clamped into range. After reset:
BRP 0, PROP_SEG 3, PHASE_SEG1 3, PHASE_SEG2 3, SJW 1. This is 10 quanta of
2 clocks per bit, i.e. f_osc/20.

Message bytes, in order:

| byte | content |
|---|---|
| 0 | `{0000, code}` |
| 1 | `{0000, DLC}` |
| 2..5 | 29-bit identifier `{ID1, ID2}`, most significant byte first |
| 6..13 | data bytes 0..7 |

A PC program typically does this:
1. Write the five timing registers.
2. Poll the status byte.
3. Read `count` messages, 14 handshakes each.

## What follows the original analyser and what is this design's own

The block split and the block names come from the original analyser: BRP,
BTL, STUFF, CRC, ST_MACH, STACK and COMM. So do these features:
- the prescaler formula and its 0..31 range;
- the bit timing ranges;
- the CRC polynomial;
- stuff-bit removal;
- a decoder that outputs code, data length, ID1, ID2 and data;
- a FIFO in embedded memory;
- a parallel-port state machine that sets the timing and sends stored messages;
- the set of message kinds the analyser displays.

The following are choices of this design:
- **Clocking:** one clock with enables; the quantum is an enable pulse, not a clock.
- **Bit timing:** the exact synchronisation mechanics, one sample per bit, a
  two-flop input synchroniser, and clamping of timing values.
- **Decoder:** its behaviour at error boundaries and where each kind of record is written.
- **FIFO:** a depth of 16 and drop-on-full with an overflow flag.
- **Parallel port:** the whole protocol, meaning the handshake, the command
  codes, the status byte and the 14-byte record layout. The record encoding is
  also this design's.
- **Reset timing:** the power-up timing values.

Error frames sent by other nodes are not recorded as a kind of their own. The
receiver reports the error it detects itself, and an error flag seen in the
middle of a frame shows up as a stuff error.

The board around the receiver (CAN transceiver, port connector, power) and
the PC program are not part of this RTL.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_can_brp` | quantum period for every BRP, BRP change on the fly |
| `tb_can_btl` | stuffed random frames sent with ±1 % to ±2.5 % clock mismatch for three segment settings; every sampled bit equals the sent bit; hard sync delay to the first sample point |
| `tb_can_stuff` | de-stuffing of random frames against a reference stuffer, stuff error, pass-through when disabled |
| `tb_can_crc` | CRC against polynomial long division, zero remainder with the CRC appended, corrupted CRC |
| `tb_can_st_mach` | all frame kinds, DLC 0..8 and >8, each error kind, overload, back-to-back frames, de-stuffing window |
| `tb_can_stack` | random traffic against a queue model, full, overflow and its clear |
| `tb_can_comm` | register write, clamp and read-back, status, message bytes, empty read, ack latency |
| `tb_can_receiver` | end to end at default parameters (see below) |
| `tb_can_session` | a 17-message analyser session (mixed frames and errors, all-ones identifiers and data) read by the PC while the bus runs; no message may be lost |

`tb_can_receiver` runs the whole receiver with its default parameters. A bus
model drives stuffed frames whose bit time is 1.25 % off the receiver's, and
a PC model reads the messages through the port. It sends these frames:
- every frame kind;
- every error kind, each followed by an error flag;
- an overload frame;
- back-to-back frames;
- a burst of 18 frames that overflows the 16-entry FIFO.

Every record read back must match. The testbench also counts the design's
mechanisms and fails if any of them never happened: hard synchronisation,
resynchronisation, stuff-bit removal, FIFO overflow, each message kind,
register writes and empty reads. The shared frame builder (fields, CRC by long
division, stuffing) is `tb/can_tb_pkg.sv`.

To simulate with Verilator from the project root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_can_receiver \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/can_pkg.sv tb/can_tb_pkg.sv tb/tb_can_receiver.sv
./obj_dir/Vtb_can_receiver
```

For another testbench, change the top module and the last file name. `-Wno-fatal` keeps the testbenches' style warnings from stopping the build. The end-to-end run takes
well under a second.

## Limits

- The receiver is passive. It cannot acknowledge frames, so on a bus where it
  is the only other node every frame ends in an ACK error.
- CAN FD and other later formats are not decoded.
- Error frames are inferred from the errors the receiver detects (see above).
- The sample point is a single sample, with no triple sampling.
- `pc_data_in` is taken two clock cycles after the strobe edge. The PC must
  hold it stable while the strobe is high.
