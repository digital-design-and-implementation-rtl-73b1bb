# Divergent-path true random number generators

A ring oscillator built from ordinary logic gates does not keep perfect time.
Its period jitters by a few percent from cycle to cycle and its frequency
wanders. A counter clocked by such an oscillator and read at fixed intervals is
therefore *slightly* unpredictable: after one interval it may have advanced by
99, 100 or 101 counts. On its own, that uncertainty is lost. Over the next
interval the counter keeps adding, and the small difference never grows.

The generators in this repository keep it. At every read they do two things:

1. They apply a **second, independent function** to the value they read (a
   rotation, a bit permutation).
2. They **load the result back** into the generator as its new starting point.

A one-count difference at one read then becomes a completely different starting
state for the next interval. Two runs of the same generator, started together
from the same reset, follow different paths and never rejoin them. This is the
*divergent-path* principle.

The result is a true random number generator made only of standard digital
cells: counters, LFSRs, multiplexers and ring oscillators, with no analogue
noise amplifier. All of it is written in synthesizable SystemVerilog except the
ring oscillators. Those are combinational loops and are given here as
behavioural models.

The design follows S. Mitchum's 2010 dissertation on digital true random number
generators, which built and measured these generators in silicon and in an FPGA.
The RTL, its comments and this text are an independent description. Section
"Original design versus this design's choices" lists which parts follow the
original and which are decisions made here.

## The principle in four bits (`dp_rng4`)

The smallest example is a 4-bit accumulator:

- On every oscillator edge it adds 7 modulo 16. Because 7 and 16 are coprime,
  it visits all 16 values.
- On a sample, the sum is **rotated left by one bit**. The rotated value is both
  the output and the accumulator's new content.

Say the oscillator made 9, 10 or 11 edges during the first interval. Starting
from 0, the raw sums are 15, 6 and 13, and the sampled values are 15, 12 and
11. From those three different starting points the second interval fans out
into up to nine paths, and so on.

`dp_rng4` is parameterised by width `W` and step `STEP`. Its `sample` input is
synchronous to the oscillator. It is a teaching block: the two real generators
below use the same idea with 32-bit words.

## The adder-shifter generator (ASTRNG)

This is the generator that was built as a chip.

`astrng_core` is the datapath:

```
 osc_up ──► 16-bit up counter ──┐
 osc_dn ──► 16-bit down counter ┤ {up,down} 32 bits
                                ▼
 osc_sh ──► 5-bit count ──► barrel rotator (rotate left by count)
                                ▼
 osc_tr ──► 2-bit count ──► bit transposer (group reversal)
                                ▼
                          random number ──► preload of up/down counters
```

### Four free-running counters

Four counters run all the time, each on its own ring oscillator:

- the two 16-bit counters are the "adder";
- the 5-bit shift count;
- the 2-bit transpose count.

The 32-bit word is split into an up counter and a down counter for two reasons.
Each half covers its whole range in 2^16 instead of 2^32 oscillator cycles. The
opposite directions also help balance ones and zeros.

On a read, `sample` captures all four counts in the bus-clock domain. The
counters are not stopped, and the oscillators are never synchronised to the
bus. The exact moment of capture relative to each oscillator is part of the
randomness. The shift and transpose counters cannot be preloaded; only the two
16-bit counters take feedback. (The original says so for the 5-bit counter.
For the 2-bit counter it is this design's choice.)

### Rotator and transposer

`barrel_rotator` rotates `{up, down}` left by the captured 5-bit count. Bit 31
wraps around to bit 0. It is built as five stages of 2:1 multiplexers (by 1, 2,
4, 8 and 16), so any shift takes one combinational pass.

`bit_transposer` then permutes the bits according to the captured 2-bit count.
Every count reverses bit order inside groups of a fixed size:

| count | group size | output bit *i* takes input bit                  |
|-------|------------|-------------------------------------------------|
| 00    | 32         | 31 − *i*                                        |
| 01    | 16         | 16·⌊*i*/16⌋ + 15 − (*i* mod 16)                 |
| 10    | 8          | 8·⌊*i*/8⌋ + 7 − (*i* mod 8)                     |
| 11    | 4          | 4·⌊*i*/4⌋ + 3 − (*i* mod 4)                     |

The testbench compares the module against the full 32 × 4 mapping written out
as a literal table.

### Feedback preload

The transposed word is the random number. Unless `inhibit_fb` is set, it is
also fed back: bits 31:16 go into the up counter and bits 15:0 into the down
counter. This feedback is the divergent path. Every read pushes the counters to
a point of their range that depends on all four noisy counts.

The preload crosses into each oscillator domain with a toggle handshake (see
"Crossing between oscillator and bus clocks"). A new preload is launched only
once both counters have acknowledged the previous one. If a read comes sooner,
its number is not fed back. A preload completes in well under 1 µs, so this
happens only when reads come faster than that.

### The chip around it (`astrng_chip`)

The chip adds four things around the datapath:

- **Four ring oscillators.** Each has four selectable speeds. It can hold one
  setting or rotate through all four.
- **Input multiplexer.** The `obo` pin chooses between the on-chip oscillators
  and four external oscillator inputs. The on-chip oscillators are always
  brought out on `osc_out`.
- **Control register, 14 bits.** `trng_pkg::ast_ctrl_t`, LSB first:
  - `[0]` run: oscillators enabled;
  - `[1]` inhibit_fb;
  - `[4:2]`, `[7:5]`, `[10:8]`, `[13:11]`: oscillator 0 to 3, each as
    `{rotate, fsel[1:0]}`.

  After reset the register is zero except `run`, which takes the value of the
  `irun` pin, so a chip can start generating straight out of reset.
- **A 16-bit bus** (`rng_bus_port`) with pins `cs`, `rnw`, `msw`, `creg`,
  `ack` and `d[15:0]`, plus the `Latch16` register.

A 32-bit number takes two reads:

1. A lower-word read (`msw=0, creg=0`) triggers a sample. It returns bits 15:0
   and parks bits 31:16 in `Latch16`.
2. An upper-word read (`msw=1`) returns `Latch16`. It does not touch the
   generator.

`creg=1` reads or writes the control register.

**Bus handshake.** The host raises `cs` with the other lines and holds them
until `ack` is high, then drops `cs`. `ack` stays high until `cs` falls. The
host must leave `cs` low for at least one clock before the next access, and an
assertion checks that `cs` is held. Latencies:

- register and upper-word accesses: `ack` rises at the first clock edge that
  sees `cs`;
- lower-word reads: `ack` rises at the fourth clock edge. The edges are
  issue sample, capture counts, register the rotated and transposed result,
  raise `ack`.

## The concatenated-LFSR generators (CLTRNG)

The later FPGA versions drop the counters, rotator and transposer. They use
maximal-length LFSRs instead, which behave like counters with a scrambled
count. `cltrng` is the datapath; `cltrng_fpga` wraps it with its oscillators
and the same bus port.

### The number

There are `NL` LFSRs of lengths `LW[i]`, each on its own ring oscillator. The
random number concatenates the low `CB[i]` bits of each one, with LFSR 0 in the
most significant position. The parameter vectors are packed 8-bit fields with
element 0 leftmost, e.g. `LW = {8'd16, 8'd13, 8'd9}`. Three versions are
instantiated in the top:

| instance | LFSR lengths   | bits used       | top-level prefix |
|----------|----------------|-----------------|------------------|
| 1        | 16, 13, 9      | 14, 11, 7       | `c1_`            |
| 2        | 27, 13, 12     | 11, 11, 10      | `c2_`            |
| 3        | 13, 11, 9, 7   | 11, 9, 7, 5     | `c3_`            |

The tap masks are in `trng_pkg::lfsr_taps`. Each LFSR shifts towards its MSB,
and the new LSB is the XOR of the tapped bits.

### Cross-coupled oscillators

The two top bits of each LFSR are not part of the number. They steer the
frequency selects of the other oscillators:

- oscillator *i* takes `fsel[1]` from the MSB of LFSR (*i*−1) mod NL;
- it takes `fsel[0]` from bit MSB−1 of LFSR (*i*−2) mod NL.

No oscillator is steered by its own LFSR. The result is that every oscillator
keeps changing speed, driven by the pseudo-random state of the others.

### Scrambled preload

At a sample every LFSR's state is captured. Each LFSR is then preloaded with
that captured state **bit-reversed**. This is the CLTRNG's divergent path: it
moves the LFSR to an unrelated point of its sequence.

A permutation of the LFSR's own bits can never create the all-zero lock-up
state of an XOR LFSR. That is why the LFSR is reloaded with a scramble of its
own bits rather than with arbitrary data.

### Whitening PRNG and output modes

`prng32` is a 32-bit maximal-length LFSR with taps at bits 31, 21, 1 and 0.
After every sample it is stepped exactly 32 times, so all its bits are new at
the next read. The 32 steps are counted by a small state machine. The PRNG is
clocked by the last LFSR's oscillator and started by a toggle request, so the
32 steps plus the handshake take about 35 oscillator periods (under 4 µs).

The 3-bit control register (`clt_ctrl_t`) has three fields:

| bit | field      | after reset |
|-----|------------|-------------|
| 0   | run        | `irun`      |
| 1   | enable TRNG | 1          |
| 2   | enable PRNG | 0          |

The output is `(TRNG & en_trng) ^ (PRNG & en_prng)`, which gives three
modes (with both bits clear the output is zero):

- raw TRNG;
- PRNG alone;
- their XOR. This is a TRNG whitened by the PRNG. Read the other way, it is
  also a PRNG whose regular LFSR patterns are broken up by the TRNG.

## Ring oscillator model (`ring_osc`)

The real part is an inverter ring. Switching stages in and out gives four
speeds. `ring_osc` models it behaviourally with delays, and it is the only
non-synthesizable module.

**Periods.** The defaults are the measured periods of the first oscillator of
the first fabricated chip: 64.1, 68.5, 83.3 and 98.0 ns. The other three chip
oscillators use their own measured columns, roughly 50 to 86 ns.

Five chips were measured, each slightly different. `astrng_chip`'s `CHIP`
parameter (1 to 5, default 1) selects which chip's periods its oscillators use,
and it also gives each chip its own noise seeds.

**Settings.** A setting change takes effect only at the end of a period, as a
real ring must do. In rotate mode the model steps through settings 0, 1, 2 and
3, one step every `ROT_CYCLES` periods.

**Noise.** Two terms, both drawn with `$urandom` and seeded per instance:

- *Frequency wander:* a random walk of the period offset, in steps of
  `WANDER_STEP_PPM` (0.2 %), bounded to ±`WANDER_PPM` (2 %).
- *White jitter:* each half period varies uniformly by ±`JITTER_PERMIL`
  (3 %).

White jitter alone averages out over a 10 to 40 µs read interval. The wander
term is what makes the count over one interval uncertain by a few counts, which
is the situation the generators are designed for.

How fast two runs diverge in simulation therefore depends on these assumed
magnitudes. The logic does not depend on them. Silicon behaves as its own
oscillators do.

## Crossing between oscillator and bus clocks

Each counter or LFSR lives in its oscillator's clock domain. Everything on the
bus side lives in `clk`. The crossings work as follows:

- **Counts and states, oscillator → bus.** They are captured directly by the
  sample register. Capturing a value that is changing is accepted on purpose:
  the capture instant is part of the randomness.
- **Preloads, bus → oscillator.** The bus side holds the preload word steady
  and toggles a request bit. `sync_2ff` brings the toggle into the oscillator
  domain. On the edge after that (the third oscillator edge) the counter or
  LFSR loads the word and toggles its acknowledge back. The bus side launches
  the next preload only once all acknowledges match.
- **PRNG stepping** uses the same toggle handshake.

All registers reset asynchronously on `rst` (active high). The oscillators are
stopped while `rst` is high or `run` is low.

## Top level (`trng_top`)

`trng_top` puts all the generators side by side. They share only `clk`, `rst`
and `irun`:

- the adder-shifter chip, prefix `a_`, with its bus, `obo`, `osc_in`,
  `osc_out`, and `a_fb`, which pulses when a feedback preload is launched;
- the three LFSR generators, prefixes `c1_`, `c2_` and `c3_`, each with its
  bus, oscillator outputs and feedback pulse;
- the 4-bit example, prefix `dp_`, with its own oscillator and sample inputs.

## Simulating

Everything runs with plain Verilator 5 (`--binary --timing`). The package must
come first. Example for the full-design testbench:

```
verilator --binary --timing --assert --no-sched-zero-delay -Mdir obj \
  rtl/trng_pkg.sv $(ls rtl/*.sv | grep -v trng_pkg) tb/tb_trng_top.sv \
  --top-module tb_trng_top
obj/Vtb_trng_top
```

`--no-sched-zero-delay` is correct here because no oscillator delay is ever
zero. Every testbench ends by printing `TB_RESULT checks=N failures=M`, and each
has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_barrel_rotator` | every shift of directed and random words against a reference rotate |
| `tb_bit_transposer` | all 4 × 32 bit positions against the literal transposition table |
| `tb_osc_counter` | up/down counting, wrap-around, preload handshake timing |
| `tb_lfsr_gen` | full maximal period for 7- to 16-bit lengths, preload |
| `tb_prng32` | exactly 32 steps per request, against a reference LFSR |
| `tb_rng_bus_port` | register access, two-word reads, `Latch16`, ack latency, against a stand-in generator |
| `tb_astrng_core` | hand-driven oscillator edges; every number against a reference model of count → rotate → transpose → feedback; inhibit |
| `tb_cltrng` | 3- and 4-LFSR versions: concatenation, cross-coupled selects, bit-reversed preload, PRNG, the four output modes |
| `tb_ring_osc` | period bands per setting, rotation through all settings, stop, independent seeds |
| `tb_astrng_chip` | control register, `irun`, `obo` external clocks, oscillator periods, feedback, bus latency |
| `tb_cltrng_fpga` | modes, run bit, rotation of oscillator speed driven by the LFSRs |
| `tb_dp_rng4` | the accumulator against a reference model, including the 9/10/11-edge example above |
| `tb_trng_top` | whole design at default parameters: reset-and-read of every generator (8 resets × 4 reads at 20 µs), every mechanism counted |
| `tb_multi_chip` | five chips (`CHIP` = 1..5) reset and read together at 20 µs, 4 reads × 8 resets; chips differ, no chip repeats a reading or a sequence |
| `tb_reset_and_read` | 8 runs × 20 reads per generator at the original intervals (20, 10, 40, 40 µs); runs must differ and no duplicate rows may remain after the third reading |
| `tb_divergence_histogram` | groups of 8 × 20 reads at 40 and 100 µs for the 3- and 4-LFSR versions; prints the histogram of duplicate rows per group |
| `tb_whitening_stats` | 16/13/9 generator read 1024 times in each mode (raw, PRNG, XOR); frequency, per-bit balance and runs statistics; PRNG and XOR streams must pass |

`tb_multi_chip`, `tb_reset_and_read` and `tb_divergence_histogram` reproduce
the divergence tests used on the original hardware:
reset, read at a fixed interval, and compare runs side by side.

The full statistical suites applied to the original hardware used 200 million
bits per generator. Whether this RTL passes them depends on real oscillator
jitter, which simulation can only imitate. `tb_whitening_stats` applies a few of
those statistics to a small simulated sample. It checks that the PRNG and
whitening paths are unbiased, not that the silicon is random.

## Original design versus this design's choices

**Follows the original:**

- the divergent-path principle and the 4-bit example (add 7, rotate left at a
  sample, load back);
- the ASTRNG structure:
  - 16-bit up and down counters, a 5-bit shift count and a 2-bit transpose
    count, each on its own oscillator;
  - latching at a read;
  - left rotation with wrap-around;
  - the four transpositions;
  - preload of the result unless feedback is inhibited;
- the control register contents (per oscillator: rotate and two frequency
  bits; plus run and inhibit-feedback), the pin set, and the 16-bit bus with
  its latch for the upper half;
- the measured oscillator periods;
- the CLTRNG structure:
  - LFSR lengths and bit contributions of all three versions;
  - the top two bits of each LFSR steering the other oscillators, never its own;
  - preload with a scramble of the LFSR's own bits;
- the 32-bit whitening LFSR (taps 31, 21, 1, 0, stepped 32 times per sample)
  and the TRNG / PRNG / XOR output selection.

**This design's own choices**, where the original gives the function but not
the detail:

- **Bus timing.** The bus is synchronous to an added `clk` input; the original
  chip had no clock pin and only says that `ack` low means "hold the transfer".
  The cs/ack protocol and its latencies are this design's.
- **Register layout.** The bit order inside both control registers is chosen
  here. So are the reset values of the LFSR generator's enable bits.
- **Feedback split.** The high half of the number goes to the up counter and
  the low half to the down counter.
- **Scramble.** It is a bit reversal.
- **Taps** for LFSR lengths other than 32: standard maximal-length taps.
- **Cross-coupling order.** Which LFSRs steer which oscillator follows the
  original: all the others for three LFSRs, and for four LFSRs the 7-bit
  oscillator is steered by the 9- and 11-bit LFSRs, and so on around. Which of
  the two drives `fsel[1]` and which `fsel[0]` is chosen here.
- **Skipping.** A preload or PRNG step is skipped if the previous one is still
  in flight.
- **Oscillator model:**
  - rotation order and rate;
  - the noise model and its magnitudes;
  - the periods of the FPGA oscillators, for which the chip's are reused.
- **Crossings.** The two-flop toggle handshake for every clock-domain crossing.

**Departures and limits:**

- The ring oscillator is a behavioural model. A synthesized version needs a
  real inverter ring with switchable stages, placed and kept by hand.
  Synthesizing that is technology work outside this RTL.
- The original measured five chips side by side. The top holds one chip
  instance. `tb_multi_chip` places five, each with its own measured
  oscillators.
- The original test equipment (processor board, interface boards, software) and
  the chip's pad ring are not part of this repository. The testbenches take
  their place.
- Divergence speed in simulation comes from the assumed noise model. It shows
  that the mechanism works, not how fast a given piece of silicon diverges.
