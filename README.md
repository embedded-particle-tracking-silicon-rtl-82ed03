# EPTSM read-out peripheral

A silicon strip detector under test sits above a radioactive source. A front-end
chip, the PMFE (Particle Microscope Front-End), amplifies and discriminates the
charge on 64 strips and reports, bit by bit, which strips currently carry charge.
This RTL is the FPGA logic behind that chip. It records **every transition** of
every strip: which channel changed, in which direction and when. It buffers these
records and hands them to an embedded processor as 64-bit words through DMA burst
reads. Host software then turns rising/falling pairs into hit positions and
time-over-threshold, which is roughly proportional to the deposited charge.

The design comes from a data-acquisition system for silicon detector
characterisation built around a PowerPC FPGA board. The overall structure follows
that system's description:

- clocks are sent out to the chip;
- 16 *channel servers* each watch 4 channels;
- a *FIFO server* merges their local FIFOs into one main FIFO;
- a DMA handler serves bus reads;
- a register block serves software.

The widths, encodings, register map and timing details are this implementation's
own choices. The section "Where this RTL decides for itself" lists them.

```
             pmfe_dclk / pmfe_pclk                    bus (IPIF user side)
  PMFE  <-------------------------- pmfe_clkgen          ^        ^
  chip   ------ 8 serial wires ---> pmfe_deser           |        |
                                        | 64-bit state   |        |
                          +-------------+-----------+    |        |
                          v             v           v    |        |
                    channel_server x16 (4 ch each, local FIFO 16) |
                          |  {updown, channel, timestamp}         |
                          v                                       |
                     fifo_server  (+FIFO DCI) ---> main FIFO (512)|
                                                     |            |
                                                dma_handler ------+  (+DMA DCI, valid)
      reg_handler: CTRL / MASK / RAW / LOST / STATUS  ------------+
      cal_pulse_gen -> cal_pulse      loss_counter      timestamp_counter
```

## The front-end link: clocks, bit slots and the phase offset

The PMFE has no oscillator of its own because of noise, so the FPGA drives it
with two clocks:

* **data clock**, 50 MHz. Each edge of it shifts one bit out on each of the
  eight data wires, so each wire runs at 100 Mbit/s.
* **pulsed clock**. It is high for one data clock in every five and marks the
  start of a packet.

Five data clocks have ten edges, so a frame has ten **bit slots**. Eight of them
carry one bit each, so each wire delivers 8 bits and the eight wires together
deliver all 64 channel states once per frame. That is 10 million states per
channel per second.

The whole peripheral runs on a single system clock at **twice the data clock
(100 MHz)**:

* `pmfe_clkgen` counts slots 0..9.
* The data clock is high in even slots.
* The pulsed clock is high in slots 0 and 1.
* `dce` marks one system clock per data clock.

Sampling once per system clock is equivalent to sampling on both data-clock
edges. No second clock domain exists anywhere in the design.

The bits come back delayed by the cable and buffer round trip. `pmfe_deser`
takes bit *k* of wire *w* (channel 8w+k) on the clock edge where
`slot == (k + align) mod 10`. `align` comes from the CTRL register. To find it,
apply a static pattern to the channels (or just keep the chip quiet). Then step
`align` from 0 to 9 and keep the value at which the RAW register reads back the
pattern. The end-to-end testbench does exactly this. With a 23 ns round trip it
finds exactly one working value, 2.

The deserializer updates `chan_state` once per frame and pulses `frame`.

## Channel servers

Each channel server owns four adjacent channels. Its state machine advances
through the pulsed-clock period:

1. **SYNC.** On `frame` it latches its four channel bits.
2. **Channel steps.** On each of the next four data clocks it looks at one of
   its channels. It compares the latched bit with the last level it saw on that
   channel.

If the level changed, the server writes
`{updown = new level, channel id, timestamp}` into its local 16-entry FIFO. It
does so only if acquisition is enabled and the channel is not masked.

The server updates the "last level" in every case. So a masked or inhibited
channel does not produce a stale edge when it is re-enabled.

If the local FIFO is full, the transition is dropped and `lost` pulses. The loss
counter adds these pulses up for the LOST register.

The timestamp counts data clocks (20 ns) since the start of the run. A change is
only seen at the next frame and then at its channel's step. So a timestamp is
0 to about 10 data clocks after the real edge, plus the round-trip delay. The
effective time resolution is one frame, 100 ns.

## FIFO server: who gets emptied first

The 16 local FIFOs feed one main FIFO through a single write port. The FIFO
server moves at most one entry per clock:

* **Round robin.** While no local FIFO is at least half full (8 of 16), a
  pointer walks the servers. It takes one entry from each non-empty FIFO it
  passes.
* **Drain.** As soon as any FIFO is at least half full, the server picks the
  first half-full FIFO at or after the pointer. It empties that FIFO completely,
  then looks again. The reasoning is that a busy server is likely to stay busy.

Priority has only one level. If every FIFO is half full, they are drained one
after another.

Each entry gets the 8-bit **FIFO DCI** (data continuity indicator) as it enters
the main FIFO. It counts entries written since the run started.

While the main FIFO is full nothing moves. The back-pressure fills the local
FIFOs, and eventually transitions are lost and counted. No data is silently
corrupted.

Entering or leaving a drain costs one idle clock. At one entry per 10 ns the
server is far faster than any sustained hit rate, so the priority rule only
matters after the main FIFO has backed up. Typically that happens when software
has not read for a while.

## Packet format and the continuity counters

Every word read from the FIFO address is a `packet_t` (see `eptsm_pkg`):

| bits  | field      | meaning |
|-------|------------|---------|
| 63    | VALID      | 1 = a real transition; 0 = the FIFO was empty |
| 62    | UPDOWN     | new channel level: 1 rising (charge arrived), 0 falling |
| 61:54 | DMA DCI    | counts every word delivered on the bus, valid or not |
| 53:46 | FIFO DCI   | counts every entry written to the main FIFO |
| 45:40 | CHANNEL    | channel id 0..63 |
| 39:0  | TIMESTAMP  | data clocks since the run started |

Software may read more words than the FIFO holds, and the bus keeps running when
it does. The extra words come back with VALID = 0 and a zero payload. The two
counters let software check the stream:

* A gap in the FIFO DCI between consecutive valid words means entries were lost
  between the FIFO server and memory.
* The DMA DCI shows duplicated or missing bus words.

Both counters wrap at 256.

A rising edge of the run bit restarts the timestamp, both DCIs and the loss
count.

## Bus side

The ports are the user side of a vendor bus-interface block on a 64-bit
processor local bus. That block is not part of this RTL.

**DMA reads of the main FIFO.** Raise `bus2ip_fifo_ce`. Then hold either
`bus2ip_rdreq` (single read) or `bus2ip_burst` high for one clock per word. Each
request clock is answered on the following clock with one word on `ip2bus_data`
and `ip2bus_rdack`. So the last word arrives on the clock after the burst signal
falls. Bursts of any length work. The original software used 16-word bursts.

**Registers.** There is one read and one write chip enable per register
(`bus2ip_rdce` / `bus2ip_wrce`, bit *i* = register *i*). Writes honour the byte
enables, lane *b* = bits 8b+7..8b. Reads and writes are acknowledged one clock
later.

| # | name   | access | contents |
|---|--------|--------|----------|
| 0 | CTRL   | RW | [0] run, [1] calibration enable, [2] calibration type (0 burst, 1 continuous), [7:4] phase offset `align`, [47:32] pulses per burst, [63:48] pulse period in data clocks |
| 1 | MASK   | RW | bit c = 1 ignores channel c |
| 2 | RAW    | RO | current 64-bit channel state, for troubleshooting and phase search |
| 3 | LOST   | RO | [31:0] transitions dropped at full channel-server FIFOs (saturating) |
| 4 | STATUS | RO | [15:0] main FIFO occupancy, [16] main FIFO empty, [17] calibration busy, [18] acquisition enabled |

Register data and DMA data share `ip2bus_data`. Each path drives zeros when
idle, and the two are ORed.

## Calibration, mask and inhibit

* **Calibration.** The PMFE has a calibration input that injects charge at the
  front of its signal chain. A rising edge of CTRL[1] starts a burst of `count`
  pulses on `cal_pulse`. Each period is `period` data clocks, high for the first
  half. With CTRL[2] = 1 the pulses repeat while the enable is set. N pulses
  must give N hits per calibrated channel. The end-to-end test checks 100 pulses
  → exactly 100 rising and 100 falling transitions on each calibrated channel.
* **Acquisition gate.** Transitions are recorded only while CTRL[0] (run) is set
  and the external `acq_inhibit` input is low.

## Throughput

The numbers below come from this RTL at a 100 MHz system clock:

* FIFO server and main FIFO: 1 entry per clock, i.e. 100 M transitions/s.
* DMA read-out: one 64-bit word per clock.
* The embedded software of the original system moved about 2 Mbit/s to the
  host. That is about 31 k transitions/s, which is far below either figure.
* The absolute peak at the input is 64 channels × 10 M frames/s. Only short
  bursts of that can be absorbed:
  * 16 × 16 local FIFO entries plus 512 main FIFO entries are buffered;
  * the rest is counted in LOST.

## Where this RTL decides for itself

The following are not given by the design description and were chosen here:

* One 100 MHz clock domain, with clocks made by a counter. The original system
  used the FPGA's PLLs for the PMFE clocks and adjusted the clock phase. Here
  the phase adjustment is the deserializer's choice of sampling slot.
* Eight data bits in the first eight slots of the frame. Channel 8w+k is bit k
  of wire w.
* Field widths: 6-bit channel, 8-bit DCIs, 40-bit timestamp in data clocks. The
  64-bit total and the field order are the original ones.
* FIFO depths of 16 (local) and 512 (main). The half-full test is
  count ≥ depth/2.
* The FIFO server moves one entry per clock, and a drain starts at the pointer.
* Invalid words have a zero payload.
* The register map, one-clock acknowledges and the STATUS register.
* The calibration types (burst / continuous), the period unit and the 50 % duty
  cycle.
* Clearing the counters at run start, and the loss counter's width and
  saturation.
* All channels start low after reset. Reset is synchronous and active high.

Outside this RTL are:

* the vendor bus interface and DMA engine;
* the PowerPC, memory and Ethernet;
* the clock manager and the LVDS buffers;
* the PMFE itself;
* control of the detector's bias supplies.

Their signals appear as ports.

## Files

| file | contents |
|------|----------|
| `rtl/eptsm_pkg.sv` | sizes, record structs, register indices, CTRL layout |
| `rtl/eptsm_peripheral.sv` | top level |
| `rtl/pmfe_clkgen.sv`, `rtl/pmfe_deser.sv` | front-end link |
| `rtl/channel_server.sv`, `rtl/timestamp_counter.sv`, `rtl/loss_counter.sv` | transition logging |
| `rtl/fifo_server.sv`, `rtl/sync_fifo.sv` | merging and buffering |
| `rtl/dma_handler.sv`, `rtl/reg_handler.sv`, `rtl/cal_pulse_gen.sv` | bus side and calibration |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/pmfe_model.sv` | behavioural PMFE serializer with round-trip delay, used by the top-level test |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
`dma_handler` and the top level carry assertions for the bus rules:

* one word per request clock;
* no acknowledge without a request;
* never a register read and a FIFO read together.

`sync_fifo` and `reg_handler` assert against overflow, underflow and multiple
chip enables. Keep `--assert` on.

A watchdog in each testbench ends a hung run. The end-to-end test at full size
takes a few seconds:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/eptsm_pkg.sv tb/tb_eptsm_peripheral.sv --top-module tb_eptsm_peripheral -o sim
./obj_dir/sim
```

For any other block, replace the testbench name. The package file must come
first. `-Wno-fatal` keeps lint warnings, such as unused package constants, from stopping the build.

`tb_eptsm_peripheral` runs the top with its default parameters. It goes through
these phases:

1. phase search;
2. random hit traffic with masked channels, where every packet is compared with
   the generated edge (direction exact, timestamp within the expected latency)
   and the DCIs are checked for continuity;
3. an inhibited period;
4. the 100-pulse calibration;
5. an overflow run. It checks that packets read plus LOST equal the transitions
   generated, and that exactly the buffer capacity was delivered. Resuming the
   reads after the overflow also drains the half-full local FIFOs.

The block testbenches check each module against an independent model. For
example, `tb_fifo_server` predicts the pop vector every clock, and
`tb_channel_server` predicts every logged and every dropped transition.

To change sizes, set `CS_FIFO_DEPTH` and `MAIN_FIFO_DEPTH` on the top. The
channel organisation (8 wires × 8 bits, 4 channels per server) is fixed in
`eptsm_pkg` together with the packet format.
