# PTP adjustable clock for video over IP

When video moves from SDI links to IP networks, the sender and the receiver
no longer share a clock. Each FPGA produces its pixel (HDMI) clock from its
own crystal, which may be ±50 ppm off, so a decoder eventually consumes
frames faster or slower than the encoder makes them and its frame buffer
overflows or runs dry. The cure is to discipline the receiver's HDMI clock
to the sender's with the Precision Time Protocol (IEEE 1588): a soft
processor runs the PTP stack, measures the offset from the master and its
drift, and steers a local clock.

This repository holds the hardware half of that system, the **adjustable
clock**: a time-of-day counter (48-bit seconds, 32-bit nanoseconds) that
runs on the HDMI clock itself, that the processor reads, steps and tunes over
AXI4-Lite, and that drives the frequency command of the PICXO, the
transceiver-based oscillator producing the HDMI clock. The frequency loop is
therefore closed through the very clock being counted.

Next to it sits a second, independent design, the **hardware PTP
emulation**: the same servo loop with the network and the software removed.
Two Gray-coded counters, one on a reference clock and one on the HDMI clock,
are subtracted directly, and a tiny PI controller steers the HDMI clock. It
shows what the loop can reach when the offset measurement is perfect: the
two counters stay within ±1 tick (±8 ns at 125 MHz).

## Block structure

```
ptp_sync_top
├── adjustable_clock                      AXI clock | HDMI clock
│   ├── adjclk_axi_regs     AXI4-Lite registers  |
│   ├── async_fifo (cmd)    commands       ------+----->
│   ├── rtc                                       |  seconds/nanoseconds counter,
│   │                                             |  OFFSET_PPM / OFFSET_EN register
│   └── async_fifo (time)   sampled time   <-----+------
└── ptp_emulation                         reference clock | HDMI clock
    ├── gray_counter (master)             ----------------+
    ├── gray_counter (slave)                              |
    ├── emu_offset          master - slave, in ticks      |
    ├── emu_pi              1 Hz sampler + PI (P = I = 1) |
    └── picxo_cmd           ticks/interval -> OFFSET_PPM  |
```

Shared types and constants are in `ptp_clk_pkg`; `sync_2ff` is the
two-flop synchronizer used by the FIFOs and by `emu_offset`.

The processor, its AXI interconnect, the PICXO and the HDMI transceiver are
outside this RTL. `ptp_sync_top` brings their connections out as ports:
the AXI4-Lite slave port, `hdmi_clk` (from the transceiver), and
`clk_offset_ppm`/`clk_offset_en` (to the PICXO); likewise for the emulation.

## Using the adjustable clock from software

| Index | Byte address | Name            | Access | Effect |
|------:|-------------:|-----------------|--------|--------|
| 0 | 0x00 | Offset seconds     | W (R: last value) | add this signed value to the seconds, once |
| 1 | 0x04 | Offset nanoseconds | W (R: last value) | add this signed value to the nanoseconds, once |
| 2 | 0x08 | Update PPM         | W (R: last value) | new OFFSET_PPM for the PICXO (saturated to 22 bits signed) |
| 3 | 0x0C | Sample Time        | W (R: last value) | any write samples the counter into 4..6 |
| 4 | 0x10 | MSB Seconds        | R | sampled seconds, bits 47:32 (upper 16 bits zero) |
| 5 | 0x14 | LSB Seconds        | R | sampled seconds, bits 31:0 |
| 6 | 0x18 | Nanoseconds        | R | sampled nanoseconds |
| 7 | 0x1C | –                  | – | SLVERR |

The time is 80 bits wide and a transfer carries 32, so reading it is a
two-step affair: write Sample Time, then read 4, 5 and 6. The three reads
always belong to the same instant.

The three time services a PTP stack needs map onto the registers as follows:

* **get time** – write 3, read 4, 5, 6.
* **set time** (large errors, abrupt) – get the time, compute
  `target − current` in seconds and nanoseconds, write them to 0 and 1.
  Register 0 takes a signed 32-bit value; a step of more than 2^31 − 1
  seconds is written as several offsets.
* **adjust** – write a signed nanosecond step to 1, and/or a frequency
  command to 2. One OFFSET_PPM LSB is 1/8589.9346 ppm with the PICXO's
  ACC_STEP = 1 at 125 MHz, so a correction of *x* ppm is written as
  `round(8589.9346·x)`; the 22-bit range is about ±244 ppm.

Offsets are *relative*: the counter keeps running between the read and the
write, so a set-time is exact to within the few cycles the command takes to
land, not to the nanosecond.

## Crossing between the AXI clock and the HDMI clock

The counter has to run on the HDMI clock, because that is the clock whose
time it keeps, while the processor's registers run on the AXI clock. Every
write to registers 0–3 is therefore turned into a 34-bit command (2-bit
opcode, 32-bit data) and pushed into an asynchronous FIFO. The HDMI side pops
one command per cycle and applies it in that cycle:

* offset commands go straight into the counter's adders;
* Update PPM loads the OFFSET_PPM register and raises OFFSET_EN for good;
* Sample Time copies the counter's current value into a second
  asynchronous FIFO running the other way.

The AXI side drains that return FIFO into registers 4–6. This is the subtle
part: software reads registers 4–6 right after writing Sample Time, before
the sample can possibly have come back. The register block counts the
samples still in flight and holds a read of 4–6 (ARREADY low) until the
count is zero, so the read waits a few cycles instead of returning a stale
time. Reads of 0–3 are never held.

Both FIFOs use Gray-coded read and write pointers passed through two-flop
synchronizers; a synchronized pointer may be late but is never torn, so no
command is lost, repeated or corrupted. Writes are back-pressured
(AWREADY/WREADY low) while the command FIFO is full. With the AXI and HDMI
clocks near 100 and 125 MHz, an offset reaches the counter at most 5 HDMI
cycles after the AXI write begins.

## The counter

Each HDMI cycle the nanoseconds grow by `period_ns` (8 at 125 MHz). The next
value is formed as `ns + period_ns + offset_ns`, and 10^9 is subtracted from
it: if the difference is not negative the second has rolled over, the
nanoseconds take the difference and the seconds count up. The seconds
register loads `seconds + offset_s + carry`, enabled only when an offset or a
carry is present.

A negative nanosecond offset can push the next value below zero. That case
is handled with a borrow (add 10^9, take one from the seconds), which lets
the software write `new − current` without caring about its sign. Offsets
must stay within ±(10^9 − 1) ns; larger steps go through the seconds
register. An assertion checks that the nanoseconds never reach 10^9.

## The hardware PTP emulation

The master count (reference clock) enters the HDMI domain through a
two-flop synchronizer; the slave count is delayed by two registers too, so
both are taken at the same instant. Both are converted from Gray to binary
and subtracted: `offset = master − slave` in ticks, positive when the slave
lags. Two's-complement subtraction makes counter wrap-around harmless.

A divider raises a tick every `SAMPLE_CYCLES` HDMI cycles (125 000 000: one
second at 125 MHz, the default PTP Sync Interval). At each tick the PI
controller computes

```
acc(k) = acc(k−1) + o(k)
cmd(k) = o(k) + acc(k)          (P = I = 1)
```

`cmd` is in ticks per interval; `picxo_cmd` turns it into OFFSET_PPM:
one tick per interval is 10^6 / SAMPLE_CYCLES ppm, so the factor is
8589.9346 · 10^6 / SAMPLE_CYCLES (68.72 LSB per tick at the defaults),
applied as a fixed-point constant with 24 fractional bits, then saturated to
22 bits.

Why P = I = 1 works: with the command scaled this way, the sampled loop's
characteristic polynomial is `z² + (P + I − 2)z + (1 − P)`, which for
P = I = 1 is `z²`. Both poles sit at the origin, so a constant frequency
error is cancelled within two intervals and the offset then dithers by ±1
tick, the resolution of the counters. The gains need only adders.

At the default one-second interval one tick per interval is 0.008 ppm and
the command spans ±30 517 ticks per interval (±244 ppm). The integrator has
no anti-windup; a very large start-up skew saturates the PICXO command for a
few intervals before the loop settles.

## Departures and design choices

Taken from the original design: the block structure, the seven-register
map and its 16/32/32 split of the time, the 48/32-bit counter widths, FIFO
crossing in both directions, the rollover datapath of the counter, the
22-bit signed OFFSET_PPM command, the 125 MHz HDMI clock, the emulation's
Gray counters, one-second sampling and P = I = 1.

Choices made here, where the original leaves the point open:

* Byte address = 4 × register index; readback of 0–3; SLVERR on index 7;
  byte strobes honoured. The BRESP/RRESP low bit is therefore constant 0.
* Reads of the time registers are held while a sample is in flight.
* FIFO depth 16; up to 15 samples may be outstanding.
* The nanoseconds borrow path for negative offsets.
* Saturation of Update PPM to 22 bits; OFFSET_EN raised by the first
  Update PPM and never lowered.
* In the emulation, Gray-to-binary conversion happens before the
  subtraction (Gray codes cannot be subtracted), and the slave count is
  delayed to match the master's synchronizer.
* The PI form `o + Σo` and the OFFSET_PPM scaling of the emulation.
* Counter widths of 32 bits in the emulation; asynchronous active-low
  resets, one per clock domain.

## Simulation

All testbenches are self-checking and print
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ptp_clk_pkg.sv tb/tb_ptp_sync_top.sv --top-module tb_ptp_sync_top
./obj_dir/Vtb_ptp_sync_top
```

`--timescale` gives the RTL files, which carry no timescale of their own, the
testbenches' unit. `-Wno-fatal` keeps Verilator's width-extension warnings on
the testbenches' `check(...)` calls from stopping the build; with `-Wall` the RTL
shows only unused bits (AXI address bits 1:0, the top bits of an internal
sum), package constants unused by a given module, and resets that are also
used by the assertions' `disable iff`.

Replace the testbench name for the others:

| Testbench | What it shows |
|-----------|---------------|
| `tb_rtc` | cycle-exact model of the counter under random offsets; rollover, borrow, PPM saturation; 8 ns per cycle |
| `tb_async_fifo` | unrelated clocks, random traffic, full and empty, order and integrity, latency |
| `tb_adjclk_axi_regs` | command words, byte strobes, back-pressure, held reads, SLVERR |
| `tb_adjustable_clock` | every jump of the time outputs matches a written offset in order; get/set time; time past 2^32 s; borrow; rollover; PPM |
| `tb_gray_counter`, `tb_emu_offset`, `tb_emu_pi`, `tb_picxo_cmd` | unit checks of the emulation blocks |
| `tb_ptp_emulation` | closed loop with a 47 ppm crystal error: locks to ±1 tick, command cancels the error |
| `tb_ptp_sync_top` | end to end: software-like PTP slave steering the adjustable clock against a master biased by 50 ppm (mean command 49 ppm, offset within 100 ns), plus the emulation locking; every mechanism counted |
| `tb_ptp_sync_top_full` | the top at its default parameters: one set-time/read/frequency cycle (HDMI edge count over 1 ms confirms +100 ppm) and the emulation's first one-second interval |

`tb/picxo_hdmi_model.sv` is a behavioural stand-in for the PICXO and the
transceiver: a clock whose period follows `XTAL_PPM + OFFSET_PPM·ACC_STEP /
8589.9346` ppm. It needs a femtosecond time precision to resolve such small
period changes.

To keep run times short, `tb_ptp_emulation` and `tb_ptp_sync_top` shorten
the emulation's interval to 2^16 cycles (one tick per interval is then
15 ppm) and `tb_ptp_sync_top` runs its software servo every 20 µs with gains
P = 0.5, I = 0.3 instead of a real Sync Interval. The full-size testbench
simulates 1.0 s of time, about five and a half minutes of run time.

## Limits

* Timestamps of PTP packets are not part of this hardware; the software
  samples the clock when it handles a packet, which limits the achievable
  accuracy to what the processor's interrupt and stack latency allow.
* A time step is relative to the moment it lands, so the clock may move
  backwards; nothing in the hardware prevents it.
* The PICXO model in the testbenches is a behavioural clock with the
  documented ppm scaling, not the vendor's phase-interpolator loop; its
  settling and jitter are not modelled.
* Nothing here has been run on an FPGA or timed by synthesis; the
  checks are simulation only.
* The emulation measures a perfect offset by wire; it is a test of the
  control loop, not a network protocol.
