# Pulse-matched filter and PN correlator for impulse UWB

An impulse-based ultra-wideband receiver looks for a train of very short
pulses. The transmitter flips the sign of each pulse with a pseudo-random
(PN) code. The receiver's digital baseband has to find where in time the
pulse train sits, and decide whether it is there at all. This RTL is that
search engine. It does two things:

1. It matches the sampled signal against a stored pulse shape at 16 time
   offsets at once. This is the **pulse-matched filter**, a 64-tap FIR
   evaluated at 16 positions.
2. It adds up the matches of many successive pulses, each weighted by
   its ±1 PN chip, so the real pulse train builds up and noise averages
   out. It then reports the offset with the largest sum, and whether
   that sum is above a threshold.

The target rate is 1 GS/s of 4-bit ADC samples. The design takes 16
samples per clock, so 1 GS/s means a 62.5 MHz clock.

```
 in_samples[16] ──► tap_line ──taps[79]──► pmf ──pmf_out[16]──► correlator ──corr_out[16]──► peak_detector ──► threshold_detector ──► detected,
 (one frame/clk)    (79 x 4b)              ▲  (16 x 15b)        ▲   ▲  (once per symbol)    (max, addr)       (> threshold)          peak_val, peak_addr
                                           │                    │   │
                             coef_mem ─────┘        pn_gen ─code┘   └─ sign_flip per lane
                             (64 x 5b)              (LFSR)
```

## Frames, offsets and the 79-sample window

The samples arrive in **frames** of 16, one frame per clock. `in_samples[0]`
is the earliest sample of a frame. `tap_line` keeps the newest 79 samples
in `taps[0..78]`, oldest first. On each accepted frame the window moves
on by 16 samples.

The filter's template is 64 samples long. A 79-sample window therefore
holds 79 − 64 + 1 = 16 starting positions (**offsets**):

    pmf_out[k] = Σ_{i=0..63} taps[k+i] · coef[i],    k = 0..15

Because the window moves by exactly 16 samples per clock, the offsets of
one cycle start right where those of the previous cycle ended. Every
sample position is tried exactly once, and no offset is lost between
cycles.

The widths fit exactly. A 4-bit sample times a 5-bit coefficient needs 9
bits. A sum of 64 such products fits in 15 bits, and no more bits are
kept.

## The pulse-matched filter (`pmf`)

The filter is fully parallel: 16 × 64 = 1024 small multipliers, one
product per tap per offset. The 64 products of each offset are summed by
a balanced adder tree of 6 levels, rather than by a 64-long chain. The
tree is written level by level. Level 0 is the products, padded with
zeros to a power of two. Each node of the next level adds two
neighbouring nodes of the level below.

Parameter `PIPELINE` (default 1) puts a register between the
multipliers and the adder trees. With it the filter takes 2 cycles from
`taps` to `pmf_out`. Without it, it takes 1. The filter always produces
one set of 16 results per cycle.

The 64 coefficients (5-bit signed values) are held in `coef_mem`. A
host writes them one word per cycle through
`coef_wr_en`/`coef_wr_addr`/`coef_wr_data`. They are read in parallel.

## PN-weighted accumulation (`correlator`, `sign_flip`, `pn_gen`)

Each of the 16 lanes runs one symbol at a time:

1. It takes the PMF output of one offset.
2. It multiplies that value by the current chip, +1 or −1.
3. It adds the result into an accumulator.
4. After `N_ACC` = 16 accepted frames (one **symbol**), it loads the sum
   into an output register and starts the accumulator again.

So the accumulator runs at the frame rate f, and the output register
changes at f/N_ACC.

No multiplier is needed for the ±1 step. `sign_flip` is a mux between
the value and its two's-complement negation, and the chip drives the
select. Its output is one bit wider than its input, so negating the most
negative value cannot overflow.

The chip for the *i*-th frame of a symbol is bit *i* of the code word
`pn_code`. A bit value of 1 means −1. `pn_gen` makes this code word: it
is the first 16 output bits of a 7-bit maximal-length LFSR started from
a loadable seed.

- **Reset and load.** Reset loads seed 1. `pn_load`/`pn_seed` load a new
  seed.
- **The LFSR.** It shifts right. The new bit 6 is bit 0 XOR bit 1, the
  output is bit 0, and the period is 127.

A symbol sum has 16 terms, so it would need 4 more bits than a PMF
output. The peak detector takes 15-bit values, so the correlator divides
each sum by 16 (arithmetic shift, rounding down) and saturates to 15
bits. The output `corr_out` is therefore the mean signed match per pulse.

**Chip phase.** The correlator counts its chip index from reset, in
accepted frames. A pulse that starts in frame *f* only lies wholly inside
the window, and so gives its full match, when frame *f*+4 is accepted. A
transmitter whose pulses should add up has to weight them with the code
phase the receiver uses at that time. Finding that phase on a live
signal is acquisition, and it is not part of this RTL. The testbench
builds its stimulus with the phase already aligned.

## Peak and threshold

`peak_detector` finds the largest of the 16 symbol values, compared as
signed numbers. It uses a 4-level tree of compare-select cells. It
reports the value and its address, numbered **1..16**, where address 1 is
offset 0. On a tie the lower address wins. `threshold_detector` then sets
`detected` when that value is strictly greater than the `threshold`
input. It passes the value and address on with the decision.

## Interface and timing of `uwb_fir_top`

The top has no parameters. Its sizes come from `uwb_pkg`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset that clears every register |
| `in_valid`, `in_samples[16]` | in | 1, 16×4 signed | one frame of ADC samples |
| `coef_wr_en`, `coef_wr_addr`, `coef_wr_data` | in | 1, 6, 5 signed | coefficient write |
| `pn_load`, `pn_seed` | in | 1, 7 | load the PN code seed |
| `threshold` | in | 15 signed | detection threshold |
| `pmf_valid`, `pmf_out[16]` | out | 1, 16×15 signed | PMF results, one set per frame |
| `corr_valid`, `corr_out[16]` | out | 1, 16×15 signed | symbol results, one set per 16 frames |
| `det_valid`, `detected`, `peak_val`, `peak_addr` | out | 1, 1, 15 signed, 5 | decision per symbol |

A valid bit travels with the data through every stage. A cycle with
`in_valid` low is a stall: nothing advances, and the correlator's chip
counter waits too. Latencies are counted from the clock edge that
accepts a frame:

| output | cycles after the frame |
|---|---|
| `pmf_valid` | 3 (window 1, PMF 2) |
| `corr_valid` | 4, counted from the symbol's 16th frame |
| `det_valid` | 6 (peak 1, threshold 1) |

Load coefficients and PN seeds between symbols, with the pipeline
drained. A change in the middle of a symbol mixes old and new values
within that symbol.

## What is specified and what is chosen here

These follow the filter specification:

- the 79-sample window of 4-bit samples;
- the 64-sample template and the 16 offsets;
- the 15-bit filter and peak widths;
- ±1 weighting by a mux with a negator;
- accumulation over N pulses, with the output register at 1/N of the
  rate;
- maximum value and address 1..16;
- detection above a threshold.

The coefficient width is 5 bits. It agrees with the 15-bit output width.
A 6-bit figure also appears for it, but 6 bits would need a 16-bit
output.

These are choices of this design:

- the 16-sample frame interface;
- `N_ACC` = 16;
- dividing the sum by N and saturating it to 15 bits;
- the LFSR code generator and its size;
- the position of the pipeline register in the filter;
- signed comparison in the peak detector, and the tie rule;
- the coefficient write port, the valid handshake and the reset values.

Possible architectures for the filter range from a single serial adder,
shared in time, to fully parallel chains. This RTL is the fully parallel
one, with tree adders. The serial version and the generic
parallel/time-multiplexed variants were not built.

The following are not part of this RTL:

- the analog front end and ADC;
- the system control logic, including code acquisition and
  synchronisation;
- data recovery after detection.

Their signals are the top's ports.

## Files

- `rtl/uwb_pkg.sv` holds the shared sizes (79, 64, 16, 4, 5, 15, N_ACC,
  LFSR width and mask).
- There is one module per file: `tap_line`, `coef_mem`, `pmf`,
  `sign_flip`, `correlator`, `pn_gen`, `peak_detector`,
  `threshold_detector`, and the top `uwb_fir_top`.
- `tb/tb_<module>.sv` is a self-checking testbench for each module. Each
  compares against integer reference models, checks latencies, has a
  watchdog, and prints `TB_RESULT checks=N failures=M`.

`tb_uwb_fir_top` runs the whole chain at its default sizes, with a model
of the chain worked out independently of the RTL:

1. It loads a random template and a PN seed.
2. It streams symbols in which every frame carries a PN-signed copy of
   the template at a fixed offset, plus noise.
3. It streams noise-only symbols.
4. It reloads the template and seed, and repeats steps 2 and 3 at
   another offset.

It checks every PMF output, correlator output and detection result, and
the cycle on which each appears. Every symbol of a signal phase must be
detected, at the offset where the template was placed. It also counts stalls inside a symbol,
+1 and −1 chips, detections and non-detections, and reloads, and it
fails if any of them never happens.

## Simulating

With Verilator 5 (the package must come first):

```
verilator --binary --timing --assert -Wno-fatal rtl/uwb_pkg.sv rtl/*.sv \
    tb/tb_uwb_fir_top.sv --top-module tb_uwb_fir_top -Mdir obj
./obj/Vtb_uwb_fir_top
```

The same command with another `tb/tb_<module>.sv` and its top module
name runs a single block. The full-size end-to-end test finishes in well
under a second.

To change the sizes, edit `uwb_pkg`. The modules also take their sizes
as parameters whose defaults come from the package. `N_OFF` is derived
as `N_TAPS − N_COEF + 1`, and it is also the frame size of `tap_line`.
