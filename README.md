# BusyBox: front-end buffer tracking for a triggered detector readout

A triggered detector front end can hold only a few events in its buffers,
four or eight depending on its sampling rate. Each accepted trigger fills a
buffer, and the buffer is freed only when the data has been read out to the
DAQ receiver cards, called D-RORCs. The BusyBox sits between the trigger
system and the readout. It counts the buffers in use. When they are all
full, or when a new trigger would be unsafe for another reason, it raises
one **busy** line towards the Local Trigger Unit (LTU), which then holds
back further triggers.

The hard part is learning when a buffer becomes free. The BusyBox learns it
by asking the D-RORCs. After each trigger sequence it records the event ID,
that is the bunch-crossing number and the orbit number. It then asks every
enabled D-RORC over a serial link which event it has received. When all of
them report that event, one buffer is released.

This repository holds synthesizable SystemVerilog for one BusyBox FPGA with
120 D-RORC channels. It also holds self-checking testbenches for every
block, and an end-to-end testbench that drives the top with 120 D-RORC
models.

## The busy decision

`busy_controller` (clock B, 40 MHz) ORs four sources. The reason is kept in
`busy_src[3:0]`, which can be read over the control bus.

| bit | source | when |
|---|---|---|
| 0 | TTC receiver not ready | `ttcrx_ready` low |
| 1 | trigger sequence in progress | the sequence validator is between L0/L1a and the end of the sequence |
| 2 | buffers full | `buf_count >= buf_depth` (register, reset value 4, may be set to 8) |
| 3 | past-future protection | for `pfp_time` clocks after each L1 accept (reset value 3520 = 88 µs) |

How the buffer count moves:

- **Up** by one on every L0. In TPC mode it moves on L1 accept (L1a) instead.
- **Down** by one:
  - when the event ID check confirms an event that carried a payload;
  - when a sequence ends with an L2 reject or an L2 timeout, because then
    no data is read out. Orphan sequences do not count down.
  - on an L1 reject outside TPC mode.

A payload flag is written to a small FIFO (`payload_fifo`) at the end of
every sequence. The flag is popped by each confirmation from the event ID
check. That tells the controller whether the confirmed event really held a
buffer. The count saturates at 0 and at its maximum. Reset sets busy high.

## Trigger sequences and the Common Data Header

The trigger side follows the readout-control-unit trigger receiver.

- `chan_a_decoder` measures the pulse length on TTC channel A:
  - a one-clock pulse is an L0;
  - a two-clock pulse is an L1a;
  - any other length is an error.
- TTC channel B arrives already decoded: the `msg_l1a`, `msg_l2a` and
  `msg_l2r` strobes, plus BCID and orbit. Deserialising and Hamming-decoding
  channel B is not part of this design.
- `sequence_validator` is a four-state machine: IDLE, WAIT_L1A, WAIT_L1MSG
  and WAIT_L2.
  - L0 must be followed by L1a within `l1_window` clocks (240). Otherwise
    the sequence ends as an L1 reject.
  - Next comes the L1 message, then an L2 accept or reject within
    `l2_timeout` clocks (3520). Otherwise the sequence ends with a timeout.
  - A message that arrives with no trigger (an orphan) opens a sequence of
    its own.
  - At the end of each sequence the validator reports the event flags,
    error bits, BCID and orbit.
- `trigger_receiver` turns each finished sequence into a nine-word Common
  Data Header (CDH). Each word has 32 data bits plus even parity in bit 32.
  - Word 0: marker `A956` and the event flags.
  - Word 1: error bits.
  - Word 2: format version and BCID.
  - Word 3: orbit.
  - Words 4–8: zero.

  The header is written into `cdh_fifo`, a 128-word dual-clock FIFO with
  Gray-coded pointers, which carries it from clock B into clock A. A header
  is started only when the whole header fits.
- `trigger_busy_wrapper` maps the BusyBox control bus onto the trigger
  receiver's own 32-bit register port. The low address bit selects the
  16-bit half.

The event flags in word 0 are a choice of this design:

| bit | flag |
|---|---|
| 0 | payload |
| 1 | L0 |
| 2 | L1a |
| 3 | L2a |
| 4 | L2r |
| 5 | timeout |
| 6 | orphan |

## Event ID verification

This is the core of the design. `event_id_verification` runs on clock A
(200 MHz):

1. A header reader takes each CDH out of the FIFO, extracts
   `{bcid, orbit}` (36 bits) and pushes it into a 16-deep event ID queue.
2. The controller pops one event ID and increments a 4-bit **request ID**.
   It clears the EIDOK register, which has one bit per channel, and asks
   the transmitter to send *Request Event ID* (command `0100`) with that
   request ID.
3. The receiver delivers D-RORC replies into an inbox FIFO. A reply sets its
   channel's EIDOK bit only if both the request ID and the event ID match.
   A stale answer to an earlier request therefore never counts.
4. When `&(EIDOK | ~CHEN)` is true, every enabled channel has the event.
   `event_valid` then pulses, crosses to clock B and releases a buffer.
5. If the gate is still open after 400 clock-A cycles, the same request is
   sent again. `n_resend` counts these resends.

Events are checked one at a time and in order. A slow D-RORC therefore
holds back all later events, which is the intent: a buffer is free only when
every D-RORC has its data. `n_valid` counts confirmed events.

## The serial link to the D-RORCs

Each channel has one LVDS line out and one back, with 40 Mb/s signalling
and five clock-A cycles per bit.

**Frame** (`serial_encoder`, `serial_receiver`), 20 bits:

| bit | value |
|---|---|
| 0 | start 1 = 0 |
| 1 | start 2 = 1 |
| 2–17 | data bits 0..15, least significant first |
| 18 | even parity over the data |
| 19 | stop = 0 |

The line idles high.

**Command word** (16 bits) = `{H(cmd), H(request_id)}`. `H` maps four data
bits `d` to eight code bits `c`:

```
c0 = d0^d1^d3   c1 = d0^d2^d3   c2 = d0   c3 = d1^d2^d3
c4 = d1         c5 = d2         c6 = d3   c7 = ^c[6:0]   (overall parity)
```

**Reply** (48 bits):

| bits | field |
|---|---|
| 47:44 | request ID |
| 43:32 | BCID |
| 31:8 | orbit |
| 7:0 | D-RORC ID |

The reply is sent as three frames, most significant word first, with one
idle bit between frames.

**Oversampling receiver.** The far end runs on its own oscillator, so
`serial_receiver` does not track the edges. At the first low sample it
shifts in 100 samples, one whole frame. It then takes the majority of the
five samples of each bit. A frame with a bad start, stop or parity bit
pulses `err` and is dropped. If no next word arrives within 200 cycles, a
half-received reply is abandoned, so the receiver realigns after noise. The
unit test runs the sender 0.4 % fast.

**Transmitter.** `transmitter` sends the same command word on every enabled
channel at once. A command written over the control bus has priority over
the verification controller.

**Receiver tree.** `receiver` holds 120 `serial_receiver`s in eight branches
of 16.

- A `branch_controller` polls its 16 channels round-robin.
- A `backbone_controller` polls the eight branches round-robin.
- It stamps each message with channel number `16*branch + local`.

Each message goes both to the event ID check and to `rx_memory`.
`rx_memory` is a 1024-entry ring of `{channel, reply}` that the control
system can read as four 16-bit lanes per entry.

## Control bus and registers

The DCS board talks to the BusyBox over an asynchronous strobe/acknowledge
bus. `dcs_bus_arbiter` synchronises the strobe and decodes the address:

- bit 15 selects the FPGA (`FPGA_ID`);
- bits 14:12 select the module: 1 is the trigger receiver, 2 is control
  and status, 3 is the RX memory;
- bits 11:0 are the register address.

It acknowledges after the module's registered read data is captured.
`control_status` (module 2) holds these registers:

| offset | register |
|---|---|
| 0x000–0x007 | CHEN, channel enables; register n bit b is channel 16n+b; reset all on |
| 0x008 | buffer depth (4) |
| 0x009 | past-future time in clock-B cycles (3520) |
| 0x00A | TPC mode |
| 0x00B | write `[15:12]` command, `[11:8]` request ID to send a command to all enabled D-RORCs |
| 0x010 | `{busy, busy_src[3:0], buf_count[3:0]}` |
| 0x011 | current request ID |
| 0x012 | RX memory write pointer |
| 0x013 | number of confirmed events |
| 0x014 | number of resends |
| 0x015 | firmware version, 0x0101 |

In the RX memory (module 3), register `{entry[9:0], lane[1:0]}` reads
16 bits of a stored message.

## Clock domains

| clock | blocks |
|---|---|
| clock B, 40 MHz (TTC) | trigger side, busy controller, registers, bus arbiter |
| clock A, 200 MHz | serial link, receiver tree, event ID verification, RX memory write side |

How signals cross between the two clocks:

- CDH data: dual-clock FIFO.
- `event_valid` and transmit requests: toggle pulse synchronisers.
- Quasi-static registers (CHEN, TPC mode): two-flop synchronisers.
- The RX memory: true dual-port RAM.

In the FPGA, clock A is derived from clock B. Here both are inputs of
`busybox_top`.

## What departs from the original description, or had to be chosen

- **Bit order.** The protocol text says data goes most significant bit
  first. The example waveforms show least significant first, and this
  design follows the waveforms.
- **Hamming code.** The code above reproduces the published code words for
  commands `0100`, `0101` and `0110`. Its word for `0111` differs from the
  published one, which does not satisfy the same parity equations.
- **Decrement rule.** Two descriptions of when the count goes down differ.
  - One frees a buffer on every matching event ID.
  - The other makes the payload flag and the L2r/timeout cases explicit.

  This design follows the second, as laid out above.
- **Channel B** is taken as decoded messages. The detailed trigger-receiver
  test cases and the pre-pulse sequences are not implemented.
- Widths and interval values are choices of this design:
  - queue and inbox depths;
  - the resend interval;
  - the L1 window;
  - the CDH flag layout;
  - the trigger-receiver register map;
  - the bus handshake timing.
- The proposed *Query Event ID* and *Reset Event ID* commands have no
  dedicated logic. Either code can still be sent through register 0x00B.
- The TPC detector needs 216 D-RORCs and uses two FPGAs. Build it as two
  `busybox_top` instances with `FPGA_ID` 0 and 1, each with 120 channels,
  and OR their busy outputs.

The time limits give these rates:

- The past-future protection and the L2 timeout are both 88 µs. Triggers
  can therefore be accepted at up to about 11 kHz, which is above the
  8 kHz maximum Pb-Pb collision rate.
- One verification round of request and three-word reply takes about 2 µs.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/bb_pkg.sv tb/tb_busybox_top.sv --top-module tb_busybox_top
./obj_dir/Vtb_busybox_top
```

Replace the name to run a unit test, for example `tb_serial_receiver` or
`tb_event_id_verification`.

Two more benches drive the full-size top with the workloads it is meant
for:

- **`tb_busybox_rate`** plays an LTU that sends a trigger only while busy is
  low.
  - At 8 kHz, the highest Pb-Pb collision rate, all 12 offered triggers
    are accepted and verified.
  - At 200 kHz, the highest p-p collision rate, busy lets through 11 of 200
    offered triggers in 1 ms. Accepted triggers are always at least 88 µs
    apart.
- **`tb_busybox_tpc`** builds the TPC board: two `busybox_top` instances with
  `FPGA_ID` 0 and 1 and 216 D-RORC models, with the busy outputs ORed.
  - The FPGA-select bit reaches only the chosen FPGA.
  - In TPC mode both FPGAs verify all events and free every buffer.

`tb_busybox_top` runs the top with default parameters, 120 channels, and
takes well under a minute.

- It connects 120 behavioural D-RORC models (`tb/drorc_model.sv`). One of
  them reads out slowly, and channel 119 is disabled through CHEN.
- It drives TTC sequences and checks:
  - busy;
  - the buffer count;
  - the confirmed-event and resend counters;
  - the RX memory contents;
  - the effect of each of the four D-RORC commands.
- It counts every mechanism at least once:
  - buffers full;
  - past-future protection;
  - sequence busy;
  - TTC receiver not ready;
  - L1 reject;
  - L2 reject;
  - L2 timeout;
  - orphan message;
  - TPC mode;
  - request resend.
