# Floating multi-channel picoammeter: FPGA receiver

Gas detectors such as GEM stacks need the current on each electrode measured
while that electrode sits at several kilovolts. Here each electrode gets its own
battery-powered measurement node that floats at the electrode's potential. The
node converts the current to a voltage with a zero-burden op-amp stage and
digitises it with the 16-bit sigma-delta ADC of an MSP430F2013 microcontroller
about 1000 times a second. It sends each reading as light over a plastic
optical fibre. The fibre provides the high-voltage isolation. One LSB is about
4 pA, and the range is ±125 nA.

This repository holds the digital half of the system: the FPGA logic that
receives all fibres at once and delivers a steady packet stream to a PC
through a Cypress FX2LP USB controller.

```
 node 1 ──fibre──> serial_in[0] ─> sensor_rx ─┐
 node 2 ──fibre──> serial_in[1] ─> sensor_rx ─┤ 16-bit value per channel
   ...                                        ├──> packetizer ──> fifo_mega ──> fifo_fx2ip ──> FX2LP ──USB──> PC
 node N ──fibre──> serial_in[N-1] > sensor_rx ─┘        ^          (16k x 16)     SLWR/FD/FLAGB
                                                        │
                               data_clocker (2 kHz) ────┘          reset_gen ──> rst of every block
```

Each channel is received on its own. A timebase then reads every channel
twice as often as the nodes sample, so no reading is lost even though all
nodes run on their own clocks. The latest values go into one packet, and the
packets pass through a 32-kbyte FIFO. The FIFO keeps the stream whole when
the PC stops reading for a while.

## The link from a node

A node's serial port cannot send 14 useful bits as a normal UART frame, so it
sends a 16-bit word that carries its own framing. Bit 15 is sent first.

| bit | 15 | 14..9 | 8..1 | 0 |
|---|---|---|---|---|
| field | start bit = 1 | address A5..A0 | data D7..D0 | stop bit = 0 |

The line is 0 when idle, and a frame begins with a rising edge. This is the
polarity after the inversion at each receiver input. The optical receiver
output itself is high when idle. The link runs at 500 kbit/s, so one frame
lasts 32 µs.

A 16-bit reading does not fit in one 8-bit data field, so a node sends two
frames back to back:

| frame | address (`pam_pkg`) | carries |
|---|---|---|
| first | `CUR_ADDR_MSB` = 0 | reading bits 15..8 |
| second | `CUR_ADDR_LSB` = 1 | reading bits 7..0 |

At 1 kHz this keeps a node's transmitter LED on for 64 µs per millisecond, a
6.4 % duty cycle. That duty cycle is the main cost in the node's battery life.
The 6-bit address leaves room for other quantities, such as temperature or
supply voltage. The receiver ignores frames with any other address.

**Design choice:** the two address values and the order of the bytes are
this design's own (see `pam_pkg.sv`). Change them there if your node firmware
uses other values.

## Receiving a channel: `sensor_rx`

The receiver runs at `CLK_HZ` and takes `CLK_HZ/BAUD` clocks per bit: 48 at
24 MHz. It works in four steps:

1. A two-flip-flop synchroniser brings the line into the clock domain, and a
   0→1 edge starts a frame.
2. Half a bit later, the start bit is checked again. A shorter pulse is
   rejected as a glitch.
3. The other 15 bits are sampled in the middle of each bit period.
4. A frame whose stop bit is not 0 is dropped. Any upper byte still waiting
   for its partner is dropped with it.

An upper-byte frame is stored. The next lower-byte frame completes the value:
`data` is updated and `strobe` pulses for one clock. `data` changes about
15.5 bit periods after the start edge of the lower-byte frame, plus two
clocks for the synchroniser. A lower-byte frame that has no upper byte
before it is ignored. So is a frame with a foreign address; it does not break
a pending pair.

`active` stays high for `ACTIVE_TIMEOUT_CYCLES` (10 ms) after each complete
value. It drives the channel's lamp on the receiver board, so a dead node or
a broken fibre shows within 10 samples.

## Packets: `data_clocker` and `packetizer`

`data_clocker` produces a one-clock `strobe` every `CLK_HZ/PACKET_HZ` clocks:
2 kHz, or 12 000 clocks at 24 MHz. This is twice the node sampling rate,
which is the minimum for free-running nodes. At 2 kHz every reading appears
in at least one packet, and usually in two.

On each strobe, `packetizer` copies all channel values into a snapshot
register. It then writes `N_CH + 2` words into the FIFO on consecutive
clocks, starting one clock after the strobe:

| word | content |
|---|---|
| 0 | start word `0xA55A` (`PACKET_START_WORD`) |
| 1 .. N_CH | latest value of channel 1 .. N_CH (0 until a channel first reports) |
| N_CH + 1 | XOR of the N_CH channel words |

The snapshot means a channel that updates while its packet is being written
cannot corrupt that packet. **Design choices:** the start word's value, and
that the checksum covers only the channel words. The framing with a start
word, data words and an XOR checksum is taken from the original design.

## Buffering and USB: `fifo_mega` and `fifo_fx2ip`

`fifo_mega` is a 16 384 × 16-bit single-clock FIFO: a RAM array with read
and write pointers and a word count.

- `q` is registered and valid one clock after `rdreq`.
- A write to a full FIFO is dropped. The top module prints a simulation
  warning when that happens.
- With 8 channels it absorbs 0.82 s of host inactivity. The FX2LP's own
  endpoint buffer adds to this.

`fifo_fx2ip` feeds the FX2LP in slave-FIFO mode, with a single bulk IN
endpoint. It runs a three-state loop:

| state | action |
|---|---|
| IDLE | raise `read` if the FIFO is not empty and FLAGB says the endpoint has room |
| LOAD | put the FIFO word on FD and drive SLWR low |
| WRITE | SLWR goes high again and the FX2LP has taken the word |

One word moves every three clocks, or 16 Mbyte/s at 24 MHz. The packet
stream needs 40 kbyte/s. FLAGB is checked again before every word, so an
endpoint that fills up is never overrun. SLWR is held high while reset is
asserted.

The FX2LP pins that never change are tied as follows: PKTEND, SLRD and SLOE
high; FIFOADR[1:0] = 00. Polarities follow the FX2LP defaults: SLWR is
active low, and FLAGB is an active-low full flag (1 = room).

## Clocking, reset and lamps

- **Clock:** the whole receiver runs on one clock, `CLKin`, assumed to be
  24 MHz. The FX2LP's 24 MHz interface clock comes from an FPGA PLL, which is
  vendor IP and not part of this RTL. The top takes the PLL output on
  `pll_c0` and drives it out on `CLK24`. The design assumes this clock is a
  copy of `CLKin`, so the FX2 interface is synchronous to the logic.
- **Reset:** `reset_gen` holds `rst` high for 64 clocks after configuration.
  It uses registers with power-up values, since the board has no reset
  input. All resets are synchronous and active high.
- **Lamps:**
  - `LD0` blinks at 1 Hz while packets are produced.
  - `LD1` and `LD2` are active-low "channel 1 / channel 2 alive" lamps.
  - `LD3` mirrors FLAGB.
  - `ch_active[N_CH-1:0]` gives one active-high lamp per channel.

## Parameters

| parameter (top) | default | origin |
|---|---|---|
| `N_CH` | 8 | eight receivers in the original FPGA design |
| `BAUD` | 500 000 | original link rate |
| `PACKET_HZ` | 2 000 | original packet rate |
| `FIFO_DEPTH` | 16 384 | original FIFO size (32 kbyte) |
| `CLK_HZ` | 24 000 000 | this design's choice |
| `ACTIVE_TIMEOUT_CYCLES` | `CLK_HZ/100` (10 ms) | this design's choice |
| `BLINK_STROBES` | 1 000 | this design's choice |
| `RESET_CYCLES` | 64 | this design's choice |

A few constraints apply when changing them:

- `CLK_HZ/BAUD` must be at least 4. Any other integer ratio works.
- `FIFO_DEPTH` must be a power of two.
- The detector this system was built for needs 10 channels (one per GEM
  electrode plus the drift cathode), and the optical receiver board has 16
  inputs. Set `N_CH` to 10 or 16 for those; the packet simply grows.
- If the nodes sample faster (their hardware allows up to 5 kHz), raise
  `PACKET_HZ` to at least twice the sampling rate.

## Departures and open points

- **Fixed numbers** that the original design does not state have been
  chosen: the clock frequency, the start word, the current addresses and
  their byte order, the activity timeout, and the reset length.
- **FX2 interface:** the original uses its own interface logic, whose
  internals are not published. The three-clock handshake here is a simple
  stand-in. It is slower than the roughly 20 Mbyte/s the original system
  reaches over USB, which does not matter at 40 kbyte/s of data.
- **FIFO:** the original uses a vendor FIFO core. `fifo_mega` is a plain
  RTL equivalent; its `full` and `usedw` outputs are additions.
- **Not part of this RTL:**
  - the analog front end, the ADC and the node microcontroller with its
    firmware;
  - the optical transmitters and receivers;
  - the PLL;
  - the FX2LP itself;
  - the PC software.

  The testbenches model the node's serial output and the FX2LP's slave FIFO
  (`tb/node_tx_model.sv`, `tb/fx2_slave_model.sv`).
- **LED wiring:** the wiring of `LD1`–`LD3` is inferred from the original
  block diagram. Check it against your board.

## Files

| file | content |
|---|---|
| `rtl/pam_pkg.sv` | frame struct, addresses, start word |
| `rtl/sensor_rx.sv` | one optical channel receiver |
| `rtl/data_clocker.sv` | 2 kHz packet strobe and blink |
| `rtl/packetizer.sv` | packet builder |
| `rtl/fifo_mega.sv` | 16k-word FIFO |
| `rtl/fifo_fx2ip.sv` | FX2LP slave-FIFO writer |
| `rtl/reset_gen.sv` | power-up reset |
| `rtl/pam_receiver_top.sv` | the receiver |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/tb_pam_workloads.sv` | whole system at 10 and 16 channels and at 5 kHz sampling |
| `tb/pam_system_harness.sv` | one parameterised system (nodes, receiver, FX2LP) for `tb_pam_workloads` |
| `tb/node_tx_model.sv`, `tb/fx2_slave_model.sv` | behavioural models for the testbenches |

## Simulating

Every testbench ends by printing `TB_RESULT checks=<n> failures=<m>`. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/pam_pkg.sv tb/tb_pam_receiver_top.sv --top-module tb_pam_receiver_top
./obj_dir/Vtb_pam_receiver_top
```

Replace the testbench name to run another one. `pam_pkg.sv` must always come
first.

`tb_pam_receiver_top` runs the receiver at its default parameters for 40 ms
of simulated time and takes about a second. Eight nodes send readings at
about 1 kHz, each with its own period and phase. The host stops reading for
20 ms, which fills the FX2LP endpoint and builds up a backlog in the FIFO.
One node falls silent, so its lamp has to go out. The test then decodes every
packet that reached the host. It checks:

- the start word and the checksum of each packet;
- that each channel's readings arrive in order, with none missing;
- the 2 kHz packet spacing;
- the node duty cycle of 6.4 %;
- that each of these situations actually occurred.

`tb_pam_workloads` runs three complete systems side by side, with the same
checks and a host stall in each:

- 10 channels;
- 16 channels;
- 8 channels sampled at 5 kHz, with `PACKET_HZ` raised to 10 kHz.

The module testbenches cover further cases:

- `sensor_rx`: bad frames and glitches.
- `fifo_mega`: random traffic against a reference model, and a full
  16k-word fill.
- `fifo_fx2ip`: host stalls.
- `data_clocker`: strobe and blink timing.
- `reset_gen`: the reset length.
