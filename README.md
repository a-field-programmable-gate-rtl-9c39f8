# 64-channel multi-hit TDC with trigger-matched readout

This is the logic of a 64-channel time-to-digital converter (TDC) for the
wire chambers, proportional tubes and hodoscopes of a fixed-target tracking
experiment. The original runs in a small, slow flash FPGA (Microsemi
ProASIC3). The requirement is a time resolution better than 4 ns. The design
gets 450 ps bins and keeps the logic small enough for 64 channels in one
low-cost device:

* **A short delay line at a moderate clock.** Each input runs through nine
  450 ps delay cells. All nine taps are sampled at 250 MHz. One 4 ns clock
  period is therefore split into nine fine bins.
* **Most logic at a quarter of that rate.** Only the delay-line sampling, the
  encoder, the bottom two bits of the coarse counter and the per-channel
  elimination run at 250 MHz. Everything else runs at 62.5 MHz.
* **Every edge, both polarities, with optional elimination.** Leading and
  trailing edges are both recorded. An optional multi-hit elimination window
  removes the after-pulses of wire chambers.
* **Trigger-matched, zero-suppressed readout.** Hits wait in circular
  buffers for up to 2048 ns. A trigger copies out only the words that hold
  hits, optionally only those in a time window, into an event buffer.
* **A scaler for every channel, almost for free.** Each channel has only an
  8-bit counter. One shared adder totals these counters into 32-bit sums.

All parameters are at the full published size: 64 channels, 9 taps, an
11-bit coarse counter, 2/4/8 circular buffers, 8 scaler buffers.

## Block structure

```
tdc_top
├── tc_counter                 coarse time: TC[10:2] at 62.5 MHz, TC[1:0] at 250 MHz
├── ch16_reg  ×4               (chained)
│   ├── ch4_reg  ×4
│   │   ├── delay9ph  ×4       9-tap delay line + 250 MHz sampling (behavioural)
│   │   ├── fine_encoder ×4    tap pattern -> edge, polarity, fine code 0..8
│   │   ├── mhe_counting ×4    multi-hit elimination + 8-bit hit counter
│   │   ├── pipe4 ×4           4-hit first layer buffer + scaler latch
│   │   └── hit_shifter ×4     chain that collects the 4 channels
│   ├── circ_buffer ×4         256-word trigger-latency memory per 4 channels
│   └── hit_shifter ×4         readout chain of the 16 channels
├── trigger_unit               trigger edge, time stamp, accept/reject
├── time_window                keeps hits whose age lies in [tw_lo, tw_hi]
├── output_buffer              512-word event buffer
├── scaler_buffer              adder + 8 × 64 × 32-bit totals
└── tdc_regs                   register file on a local bus
```

`tdc_pkg` holds the shared sizes, the hit word, the circular-buffer mode enum
and the register addresses. Each file starts with a comment that gives the
block's interface and timing in detail.

### The hit word (22 bits, `hit_t`)

| bits    | field  | meaning                                   |
|---------|--------|-------------------------------------------|
| [21:16] | `ch`   | channel 0..63                             |
| [15]    | `pol`  | 1 = rising edge, 0 = falling edge         |
| [14:4]  | `tc`   | coarse time, 4 ns units, wraps at 8192 ns |
| [3:0]   | `fine` | fine code 0..8                            |

The time of an edge, up to a constant common to all channels, is

    t = 4 ns · tc − 0.45 ns · fine

A larger fine code means the edge got further along the delay line before
the sampling clock edge, so it arrived earlier. With ideal cells the error
of one edge is within one bin (±0.45 ns, about 0.13 ns RMS). On real silicon
the bins differ in width and need a bin-by-bin calibration. That calibration
is done offline and is not part of the RTL.

## Clocks and the split coarse counter

The design needs two phase-aligned clocks. `clk62` is `clk250` divided by
four, and their rising edges coincide. Reset `rst` is synchronous and active
high, and must be released on a common edge. Signals cross between the two
domains without synchronisers. Each side samples the other side's registers
only on a common edge.

The 11-bit coarse counter (LSB 4 ns) is too fast for this FPGA as one
250 MHz counter, so it is split in two:

* `TC[10:2]` is a plain 9-bit counter at 62.5 MHz, one step per 16 ns.
* `TC[1:0]` is a 2-bit counter at 250 MHz with a synchronous clear (SCLR).
  The clear comes from a "4 ns pulser":
  - DF0 samples TC[2];
  - DF1 samples DF0;
  - a third flip-flop registers `DF0 & !DF1`, a single 4 ns pulse per rise
    of TC[2].

  The 2-bit counter therefore restarts every 32 ns on a rise of TC[2]. It
  runs freely through the other 16 ns steps, wrapping from 3 to 0.

Counting the registers, the clear takes effect three 250 MHz cycles after
TC[2] rises. `tc_counter` therefore delays `TC[10:2]` by three 250 MHz
registers before joining it with `TC[1:0]`. The result, `tc250`, is a
monotonic 11-bit time for the 250 MHz side. The same counter gives
`ph_last`, true in the 250 MHz cycle that ends on a 62.5 MHz edge. All
handovers from the 250 MHz side to the 62.5 MHz side use `ph_last`.
`tc_counter_tb` checks that `tc250` steps by exactly one on every 250 MHz
cycle.

## One channel: delay line to first layer buffer

`delay9ph` is a behavioural model. The delay cells are FPGA logic elements
and have no portable RTL, so each is modelled as an ideal 450 ps delay. The
nine taps are sampled into flip-flops by `clk250`. To target a device, put
the vendor's cell chain in place of this model, keeping its placement fixed.

`fine_encoder` looks at the nine taps together with tap 1 of the previous
sample. It takes the oldest 0/1 or 1/0 transition in that 10-bit line. The
transition's position is the fine code (0..8) and its direction is the
polarity. The encoder reports at most one edge per 4 ns cycle. Pulses
narrower than a clock period are not resolved.

`mhe_counting` is per channel:

* **Multi-hit elimination.** When enabled, a recorded edge opens a window of
  `16 ns + 4 ns · mhe_win` (`mhe_win` = 0..63, so 16..268 ns). Further edges
  of either polarity inside the window are dropped. There are two modes:
  - non-updating: the window keeps its length;
  - updating: every dropped edge restarts the window.

  With elimination on, a chamber pulse yields its leading edge only.
* **Hit counter.** An 8-bit counter counts the 16 ns periods in which the
  channel saw any edge. It counts before elimination. Every 2048 ns the
  counter is copied into the first layer buffer and restarted, on one common
  clock edge.

`pipe4` is the first layer buffer. It is a 4-entry FIFO, written at 250 MHz
and read at 62.5 MHz. If a fifth hit arrives while four are waiting, it is
dropped and a sticky flag is set (STATUS bit 2). Four hits per channel is
exactly what a double pulse needs (see the wave union bench below).

## Circular buffers and the trigger

Each group of four channels shares one `circ_buffer`. Inside `ch4_reg`, the
four channels' hits merge through a chain of `hit_shifter` stages. A word
already in the chain goes ahead of the stage's own channel. The circular
buffer then writes **one word every 16 ns**: the hit delivered in that cycle,
or an empty word. Its 256 words are organised by `CTRL.cb_mode`:

| cb_mode | pipelines | words each | history |
|---------|-----------|------------|---------|
| 0       | 2         | 128        | 2048 ns |
| 1       | 4         | 64         | 1024 ns |
| 2       | 8         | 32         | 512 ns  |

A group takes in at most one hit per 16 ns. A burst of up to four edges per
channel is smoothed out by the `pipe4` buffers.

When a trigger is accepted, every circular buffer does two things on the
same clock edge:

1. It moves its write pointer to the start of the next pipeline.
2. It reads out the pipeline it just filled, oldest word first, skipping
   empty words.

The four circular buffers of a `ch16_reg` feed a second `hit_shifter`
chain. The four `ch16_reg` blocks are chained into one stream. Readout
stalls when the event buffer is full, so a slow reader delays the copy but
loses no hits.

`trigger_unit` handles the trigger input:

* It samples `trig_in` through two 250 MHz flip-flops.
* It stamps the rising edge with `tc250`.
* It hands the trigger to the 62.5 MHz side at the next `ph_last`.

A trigger is accepted only when no copy is in progress (`cip` low) and the
buffers have finished their power-up clear. A trigger during a copy is
rejected and counted. An accepted copy lasts at least the pipeline length
(2048, 1024 or 512 ns), plus any stall.

`time_window` sits between the chain and the event buffer. For each hit it
computes `age = trigger tc − hit tc (mod 2048)` in 4 ns units. It passes the
hit if `tw_lo ≤ age ≤ tw_hi`, and otherwise drops the hit and counts it. The
trigger stamp and the hit stamp differ by about one 4 ns unit of pipeline
latency. Either widen the window by one unit, or calibrate the offset with a
test pulse. Reset opens the window fully (0..2047).

`output_buffer` is a 512-word first-word-fall-through FIFO. Reading the OUT
register pops it.

## Scaler

Every 2048 ns (when `TC[8:2]` wraps) all 64 counters are latched into their
`pipe4` scaler registers. These registers form a shift chain through all 64
channels. `scaler_buffer` then takes the channels one at a time, two
62.5 MHz cycles per channel (64 × 2 × 16 ns = 2048 ns):

* in the first cycle it reads the channel's 32-bit total;
* in the second it adds the 8-bit count and writes the total back.

One adder serves all 64 channels.

The memory holds 8 scaler buffers of 64 totals. `CTRL.sc_bank` selects the
buffer that accumulates, and it is sampled at the start of each sweep. Any
total in any buffer can be read through SCADDR/SCDATA. So a host can switch
to a fresh buffer and read the old one at leisure. After reset, all totals
are cleared (512 cycles). There is no other clear.

## Register map (local bus, synchronous to `clk62`)

The bus is a plain synchronous register port:

* a write takes effect on the clock edge where `bus_we` is high;
* `bus_rdata` is valid combinationally while `bus_re` is high.

| addr | name   | access | contents |
|------|--------|--------|----------|
| 0    | CTRL   | rw | [0] elimination on, [1] updating mode, [7:2] `mhe_win`, [9:8] `cb_mode`, [12:10] scaler buffer |
| 1    | TWIN   | rw | [10:0] `tw_lo`, [26:16] `tw_hi` (age in 4 ns units) |
| 2    | STATUS | r  | [0] copy in progress, [1] buffers initialised, [2] a hit was dropped in a first layer buffer, [3] event data available, [25:16] event buffer word count |
| 3    | OUT    | r  | [31] valid, [21:0] hit word; the read removes the word |
| 4    | SCADDR | rw | [8:0] {scaler buffer, channel} |
| 5    | SCDATA | r  | 32-bit total at SCADDR |
| 6    | EVCNT  | r  | [15:0] triggers accepted, [31:16] triggers rejected |
| 7    | TWOUT  | r  | [15:0] hits removed by the time window |

Reset values:

* elimination off;
* 2 × 2048 ns;
* scaler buffer 0;
* time window 0..2047.

A readout loop is:

1. Wait for STATUS[1].
2. After a trigger, read OUT until bit 31 is clear.
3. Then check STATUS: if bit 0 (copy in progress) or bit 3 (event data
   available) is still set, keep reading OUT.

## What follows the published design and what does not

These follow the published design:

* the block structure (Delay9ph, encoder, elimination and counting, Pipe4,
  hit data shifters, 4- and 16-channel groups, circular buffers, time window,
  output buffer, scaler adder and buffer, registers, trigger);
* the 9 × 450 ps delay line sampled at 250 MHz and the fine code 0..8;
* the 11-bit coarse counter with its split at TC[2] and the
  DF0/DF1/pulser/SCLR scheme;
* the 4-hit first layer buffer, read at 62.5 MHz;
* the 2/4/8 circular buffers of 2048/1024/512 ns;
* switching to the next circular buffer on a trigger, and copying only the
  valid hits;
* the elimination window of 6 bits, 4 ns steps from 16 ns, with updating
  and non-updating modes;
* the scaler: 16 ns resolution, 8-bit counters, latch and restart,
  one-channel-at-a-time transfer taking 2048 ns, adder, 32-bit totals,
  8 selectable buffers.

These are choices of this design:

* The encoder rule (oldest transition in the taps plus the previous tap 1),
  and that at most one edge per channel is taken per 4 ns cycle.
* The three-register alignment of `TC[10:2]` to `TC[1:0]`, and the reset
  values that make the joined count monotonic.
* The longest elimination window is 268 ns. A 6-bit setting in 4 ns steps
  from 16 ns ends there, so a 272 ns window is not available.
* The scaler counts edges before elimination.
* Overflow of a first layer buffer drops the new hit and sets a flag.
* The circular buffers write one word per 16 ns. This gives their 256-word
  size.
* A trigger during a copy is rejected.
* Memories are cleared after reset.
* The time-window encoding (age relative to the trigger, inclusive bounds).
* The event buffer depth (512) and the use of backpressure instead of
  dropping.
* The hit word layout, the register map and the whole host interface.

Not built:

* **The VMEbus slave.** The top brings out the simple register bus above.
  A VME slave would drive this bus.
* **The external wave union launcher and the NIM-to-ECL converter.** These
  are analog bench equipment. A timing model of the launcher is in
  `tb/wu_launcher.sv`.
* **Bin-width calibration and the wave-union averaging.** These are offline
  analysis. The wave union bench does the averaging in the testbench.

## Simulation

All benches are self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops. Each has a watchdog that
counts a failure if it hangs. With Verilator 5 (a two-state simulator, so
every register that is read is reset or initialised):

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/tdc_pkg.sv tb/tdc_top_tb.sv \
  --top-module tdc_top_tb -o sim
./obj_dir/sim
```

To run another bench, replace both occurrences of `tdc_top_tb`. There is one
bench per block, `tb/<block>_tb.sv`. `tb/tb_clkgen.sv` makes the two aligned
clocks.

* **`tdc_top_tb`** runs the whole design at full size through the register
  bus. Random edges at picosecond times go on all 64 inputs around each
  trigger. Every read word is checked against the expected channel,
  polarity and time (within ±0.46 ns). The bench runs events in all three
  buffer modes, a narrowed time window, both elimination modes, a trigger
  during a copy, an event dense enough to fill the event buffer and stall
  the copy, a first-layer overflow, and scaler totals in two scaler
  buffers. It counts each of these and fails if one never happened. It
  runs in about 1.5 minutes.
* **`wave_union_tb`** runs the published bench tests:
  - **Wave union.** Two launcher models (10 ns pulse, 25 ns reflection)
    feed 8 channels each through different cable skews. Every channel must
    record rise, fall, rise, fall. The bench forms the single-edge
    difference T1A−T1B and the 32-edge average WU_Ave. With the ideal
    delay model the spreads are 0.16 ns and 0.013 ns RMS. The bench
    requires the wave union to at least halve the spread.
  - **Modular method.** A hit/stop pair on channels 20/21, with the stop
    delayed by a further 7.2917 ns in each event. Every hit/stop time must
    match within 0.6 ns.

  Measured hardware reaches 200 ps, 108 ps and 69 ps. Real cells have
  unequal bin widths and noise, which the ideal model lacks.
* The block benches check exact behaviour, including:
  - cycle counts (the 2048 ns scaler sweep, the minimum copy length per mode);
  - handshake rules (an assertion in `hit_shifter` checks that an offered word is held until it is taken);
  - corner cases (FIFO full and empty, elimination window boundaries to
    the 4 ns step, coarse counter continuity).
