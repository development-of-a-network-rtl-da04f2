# Revolution-frequency and tag distribution over White Rabbit

A synchrotron storage ring has an RF clock (508.58 MHz at SPring-8) and a
revolution ("zero-address") signal that comes once every 2436 RF buckets,
about 208.8 kHz. Experiments need that revolution signal at their own
station, shifted so that it lines up with a chosen electron bunch. The usual
answer is long RF cables and hand-tuned divider and delay modules.

This RTL does the job with time stamps sent over a White Rabbit (WR) network
instead. Every node on a WR network shares one absolute time, accurate to
well under a nanosecond. So a signal can be moved as a number:

* The **master node** time-stamps a zero-address pulse (time `T_I`). It treats
  the pulse as a pre-trigger for an output `N` turns later:
  `T_N = T_I + N * 2436 / f_RF`.
* It sends `T_N`, the decimation rate `D` and a shot number (the tag) to the
  slave. It does this for only one zero-address pulse in every `D`.
* The **slave node** adds the target bunch address `K` (in RF buckets) and a
  fine delay `F`: `T_O = T_N + K / f_RF + F`. At absolute time `T_O` it emits a
  pulse, then `D-1` more at the revolution period. The next message's `T_O`
  falls exactly `D` turns later, so the output is a continuous revolution
  signal locked to bunch `K`. A new message is needed only every `D` turns.

The RTL here is the FPGA logic of both nodes in the "improved" form of the
system:

* the master's FPGA sends the messages itself (through an Etherbone master
  core), not host software;
* `D < N` is supported, so several messages can be in flight before the
  first one is due.

## Files

| file | what it is |
|---|---|
| `rtl/timing_pkg.sv` | time format, RF constants, message and Wishbone types, time arithmetic |
| `rtl/delay_calc_master.sv` | master: `T_N` calculation and decimation |
| `rtl/fd_main_wb_slave_master.sv` | master: register bank (N, D, enable, T_I/T_N read-back, counters) |
| `rtl/spec_top_master.sv` | master node: interconnect + register bank + delay calculation |
| `rtl/fd_main_wb_slave_slave.sv` | slave: register bank (K, F, enable) and message mailbox |
| `rtl/delay_calc_slave.sv` | slave: `T_O` calculation and the queue of pending trains |
| `rtl/fd_channel_wb_slave.sv` | slave: output channel (absolute-time pulse + pulse train) and its registers |
| `rtl/spec_top_slave.sv` | slave node: interconnect + the three blocks above |
| `rtl/wb_intercon.sv` | Wishbone interconnect used in both nodes (2 masters, N slaves) |
| `rtl/timing_dist_top.sv` | top: both nodes side by side |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `workloads_tb.sv` |

The module names follow the block names of the original FPGA design: a
modified fine-delay core with `delay_calc_*` and `fd_*_wb_slave` inside a
`spec_top`.

## Time and arithmetic

Absolute time is `wr_time_t = {sec[39:0], ps[39:0]}`: TAI seconds and
picoseconds within the second. The slave receives the WR core's time as
`tm_sec` plus `tm_cycles`, a count of 8 ns cycles of the 125 MHz reference
clock.

Every offset the system adds is a whole number of RF buckets: `N * 2436` for
the pre-trigger and `K` for the bunch. `buckets_to_ps()` turns a bucket count
into picoseconds with one multiply. It multiplies by the RF period held as a
fixed-point constant with 32 fractional bits (`RF_PERIOD_Q`). The constant is
computed at elaboration from `RF_FREQ_HZ` and rounded. Its rounding error,
multiplied by the largest offset (65535 turns), stays under 0.02 ps.
`time_add_ps()` adds an offset shorter than one second and carries into the
seconds field.

The revolution period is taken as exactly 2436 RF periods (4789.806 ns). The
formula is often written as `N / 208.8 kHz`, but 208.8 kHz is a rounded
figure. Using it literally would move the output 0.54 ns per turn away from
the bunch.

## Master node

`delay_calc_master` takes one time stamp per `ts_valid` strobe. A phase
counter picks the first stamp after enable and then every `D`-th one; the
stamps in between only update `T_I` and the counters. For a picked stamp it
computes `T_N` combinationally. The message `{T_N, D, shot}` is valid on the
next clock edge and waits in a one-entry output register for the network
side's `msg_ready`. If that register is still full when the next message is
due, the new message is dropped and counted. The shot number is the index of
the zero-address pulse since enable. An assertion checks that a waiting
message does not change.

The register bank at byte address 0x000 holds:

| offset | register |
|---|---|
| 0x00 | CTRL (bit 0 = enable) |
| 0x04 | N |
| 0x08 | D |
| 0x0C–0x18 | last `T_I` (seconds high/low, picoseconds high/low) |
| 0x1C–0x28 | last `T_N`, same layout |
| 0x2C | zero-address signals seen |
| 0x30 | messages sent |
| 0x34 | messages dropped |

N and D reset to 1000 and 50, the improved system's main measured case.

## Getting the message to the slave

The transport is not part of this RTL: the Etherbone master core, WR
switches, fibre and Etherbone slave core. The master brings its messages
out as a valid-ready stream (`m_tx_*`). On the slave the message arrives as
six Wishbone writes through the Etherbone port (`s_eb_wb_*`) into the
mailbox of the main register bank (slave byte address 0x000):

| offset | register |
|---|---|
| 0x0C, 0x10 | `T_N` seconds, high 8 bits and low 32 bits |
| 0x14, 0x18 | `T_N` picoseconds, high 8 bits and low 32 bits |
| 0x1C | shot |
| 0x20 | D; **writing D commits the message** |

The other registers of this bank:

| offset | register |
|---|---|
| 0x00 | CTRL |
| 0x04 | K |
| 0x08 | F, in ps |
| 0x24 | queue level |
| 0x28 | messages lost to a full queue |
| 0x2C | output stops |
| 0x30 | messages received |

The host (PCIe, Wishbone master 0) and the network (Etherbone, master 1)
share the bus through `wb_intercon`. It grants the bus round robin, holds the
grant while `cyc` is high, decodes each slave with a base/mask pair, and
acknowledges unmapped addresses with zero so a stray access cannot hang.

## Slave node: why there is a queue

This is the part that is hardest to get right. A message leaves the master
`N` turns before its output is due. Another message follows every `D` turns.
When `D < N`, about `N/D` messages reach the slave before the first of them
may be played. The original system first supported only `D > N` for exactly
this reason. It later added `D < N`, because a smaller `D` anchors the
output to absolute time more often and gave the lowest jitter (D = 50,
N = 1000).

`delay_calc_slave` computes `T_O` for each committed message and appends
`{T_O, D, shot}` to a 32-entry FIFO (parameter `DEPTH`). The output channel
takes one train at a time from its head. The queue also counts two failure
modes:

* **Overflow**: a message arrives while the queue is full, so it is lost.
* **Underrun**: a train ends with nothing queued behind it. The output
  simply stops, which is what happens if the master's messages come late or
  not at all.

Clearing the slave's enable empties the queue and flushes the channel.

## Slave node: the output channel

`fd_channel_wb_slave` plays a train: the first pulse at `T_O`, then `D-1`
more. The period is the revolution period plus a signed tuning register
(TUNE, in 1/256 ps; -31.2 ps is -7987). The next pulse time is kept with 32
fractional picosecond bits, so a long train does not drift through rounding.
Because the trains abut, the next absolute-time pulse lands exactly one
period after the last generated one.

With a nonzero TUNE, each train drifts by `(D-1) * TUNE` and then snaps back
at the next absolute pulse. TUNE exists to correct a pulse generator whose
period is off. This logic's period is exact, so 0 is the right setting.

Each clock cycle, the channel compares the pending pulse time with the 8 ns
window of the current cycle, `[tm_sec, tm_cycles * 8000 ps, +8000 ps)`:

* **Inside the window**: on the next clock edge the channel raises
  `strobe_o` for one cycle. `fine_o` (0–7999 ps) gives the pulse's offset
  inside that window; it is meant for the analog fine-delay line after the
  FPGA. `pulse_o` is the same pulse stretched to WIDTH cycles.
  `pulse_time_o` and `shot_o` give the pulse's exact time and its tag (train
  shot + index).
* **Already in the past**: this happens when a message came too late. The
  pulse is skipped and counted as missed.

Channel registers (slave byte address 0x100):

| offset | register |
|---|---|
| 0x00 | WIDTH |
| 0x04 | TUNE |
| 0x08 | pulses |
| 0x0C | missed |
| 0x10 | busy |

Timing summary:

* a message is queued one cycle after the D write;
* a train is loaded one cycle after the channel goes idle;
* a pulse's strobe comes one cycle after the cycle whose window holds it.
  That is a fixed latency for the delay line to compensate.

## What is not here

* **Outside parts.** The WR core, the transceiver, the PCIe bridge, the
  Etherbone cores, the fine-delay card (its TDC and analog delay lines), the
  WR switches and the GPS reference are not here. Their signals are ports of
  the node modules.
* **Jitter.** The measured output jitter (97–254 ps one sigma) comes from
  those analog parts. It cannot be reproduced in RTL. The RTL places every
  pulse within 1 ps of its ideal time.
* **The initial system.** In the first version, host software sent the
  messages and only `D > N` worked. It is not built separately; this RTL
  covers both cases of `D`.
* **The original's stability problem.** The original improved system lost its
  output within milliseconds unless `K = 0` and `F = 0`, and sometimes
  stopped or hung. The cause was never found, so there is nothing to copy.
  This design has no such restriction: the tests run it with `K = 1234` and
  `F = 5 ns`.
* **Planned successors.** A planned extension distributes the 508.58 MHz RF
  clock itself over WR with a DDS, and an alternative counts RF buckets
  locally at the slave. Neither is implemented.
* **Software offset.** One summary of the original describes the slave's
  offset as computed by software. Here it is computed in the FPGA logic.

## Choices made here

These points are not fixed by the original design:

* the 125 MHz clock and the `{sec, ps}` time format;
* all register maps, widths (N, D 16 bit; K 12 bit; F 32 bit in ps) and
  reset values;
* the Wishbone classic protocol details and the commit-on-D mailbox;
* the shot number being the zero-address index;
* drop-on-busy in the master;
* the 32-entry queue;
* skipping late pulses;
* the tuning register's units.

On decimation, a timing chart of the original can be read as sending after
`D` idle turns, which would be a period of `D+1`. This RTL sends one message
per `D` turns, which is the only reading under which the trains join without
a gap.

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
Example with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/timing_pkg.sv tb/timing_dist_top_tb.sv --top-module timing_dist_top_tb
./obj_dir/Vtiming_dist_top_tb
```

`timing_dist_top_tb` runs both nodes end to end with every parameter at its
default, for about 2 million cycles (a few seconds). It also models the
parts outside the RTL: the WR time base (starting just before a second
boundary), a time-stamped zero-address signal, a network of fixed latency
that writes the slave's mailbox, and both hosts. Its four phases are:

1. D = 50, N = 1000: up to 21 trains in flight. The master is then stopped
   so the output runs dry.
2. D = 300, N = 200, K = 1234, F = 5 ns, TUNE = -31.2 ps.
3. D = 1, N = 100: the queue overflows.
4. N = 1: messages arrive late and pulses are skipped.

It checks every message against `T_I + N` turns and the decimation spacing.
It checks every pulse against `T_N + K/f_RF + F + i * period`, within 3 ps.
It also counts that each mechanism happened at least once: decimation, a
queue deeper than one, underrun, overflow, late pulses, absolute and train
pulses, bus contention, and a carry across a second.

`workloads_tb` runs the five measured operating points (D/N = 1000/900,
600/500, 300/200, 1000/1000, 50/1000). For each it checks that the output
runs without a break for at least two whole trains.

Expected values in all testbenches are computed in real arithmetic from
508.58 MHz and 2436, not from the RTL's fixed-point constants.
