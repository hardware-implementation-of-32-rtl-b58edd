# 32-bit high-speed direct digital frequency synthesizer

A direct digital frequency synthesizer (DDFS) makes a sine wave of
programmable frequency from a fixed clock. Each clock, a phase accumulator
adds a frequency control word (FCW) to a 32-bit phase. The top bits of the
phase address a sine table, and the table output drives a DAC:

    F_out = FCW / 2^32 * F_clk        resolution F_clk / 2^32 = 0.029 Hz at 125 MHz

This design attacks the two usual costs of a DDFS:

* **Speed of the accumulator.** The 32-bit adder loop is cut into four
  pipelined 8-bit slices. Each slice uses a Brent-Kung prefix adder, modified
  so that a carry can come in from the slice below. The two upper slices are
  further rebuilt as four-way *parallel* adders. They compute four
  successive phases at once and run at a quarter of the clock, and a 4:1
  multiplexer plays the phases back one per clock.
* **Size of the sine table.** A direct table for a 14-bit phase and 12-bit
  output holds 2^14 x 12 = 196,608 bits. Quarter-wave symmetry and a split of
  the angle into three 4-bit parts, A + B + C, bring it down to three 16-word
  sub-ROMs of 368 bits in total (534:1). One of those ROMs serves both
  sin A and cos A. The price is two small multipliers and two adders.

The RTL is plain synthesizable SystemVerilog. Its block structure follows a
published FPGA design (Cyclone III, 125 MHz). Where that description is silent
or inconsistent, the choices made here are listed under
[Departures and choices](#departures-and-choices).

## Signal chain and timing

```
 fcw ──► gated_preskew ──► phase_accumulator ──► phase[13:0] ──► phase_to_amplitude ──► amp[11:0] ──► (DAC / LPF, external)
 fcw_load ─┘   (36 flops)   4 x 8-bit slices       S[31:18]        3 sub-ROMs, 2 mult., 2 add
```

| port (ddfs_top) | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `fcw` | in | 32 | frequency control word; hold stable while `fcw_busy` |
| `fcw_load` | in | 1 | one-cycle strobe that starts loading `fcw` (ignored while busy) |
| `fcw_busy` | out | 1 | load in progress |
| `phase` | out | 14 | bits 31:18 of the accumulator |
| `phase_valid` | out | 1 | high once the pipeline holds real samples |
| `amp` | out | 12 | sine sample, offset binary (2048 + magnitude above the axis, 2047 − magnitude below) |
| `amp_mag` | out | 11 | quarter-wave magnitude (a rectified sine) |

Count cycle 0 as the first clock after reset, and let S(t) be the
accumulator value after t steps. Then `phase` in cycle t + 10 is
S(t)[31:18]. `amp` for that phase follows one clock later, so the latency
from a step to its amplitude is 11 clocks. A new FCW starts to count at the
first step that is a multiple of four after the strobe. For example, a
strobe in cycle k = 2 gives new steps from t0 = 4, and one in cycle
k = 3 gives t0 = 8. In general t0 = 4·⌈(k + 2)/4⌉. `fcw_busy` then stays
high until cycle t0 + 5.

## The phase accumulator

`phase_accumulator.sv` holds four 8-bit slices of the 32-bit sum. A plain
accumulator keeps one adder and one register per bit, and its carry must
ripple through all 32 bits in one clock. Here every 8-bit slice has its own
register, and carries cross between slices through flip-flops:

* **Slices 0 and 1 (bits 7:0 and 15:8)** are ordinary accumulators, one
  `bk_adder` and one 8-bit register each, stepping every clock. The carry out
  of slice 0 is registered, so slice 1 processes step t in cycle t + 1. These
  16 bits never reach the output, because the phase is truncated. Only the
  carries of slice 1 matter.
* **Carry collector ("4-DFF").** Each carry of slice 1 is written into
  its own bit of a 4-bit register: the carry of step 4g+j goes to bit j.
  It stays there until the Clk/4 tick, which is every cycle with `ph == 1`
  (`ph` is a free-running 2-bit count). The register then holds the four
  carries of group g, steps 4g … 4g+3.
* **Slices 2 and 3 (bits 23:16 and 31:24)** are `parallel_adder` instances
  that step only when `ph == 1`. Each step advances four accumulator steps
  at once (see below). Slice 2 registers the four carries it produced, and
  slice 3 uses them on the next Clk/4 tick. Slice 3 therefore works one group
  behind slice 2.
* **Alignment and playback.** Slice 2's four results (their top 6 bits, for
  phase bits 23:18) are delayed by one Clk/4 cycle so that they meet the
  same group's four results from slice 3 (8 bits each). Two 4:1
  multiplexers, selected by `ph + 2`, play the four samples out in cycles
  with `ph = 2, 3, 0, 1`. The 14-bit concatenation is registered as `phase`.

Timeline for group g (steps 4g … 4g+3):

| cycle | event |
|---|---|
| 4g … 4g+3 | slice 0 adds steps 4g … 4g+3 |
| 4g+1 … 4g+4 | slice 1 adds the same steps; carries enter the collector |
| 4g+5 (`ph`=1) | slice 2 computes the group's four states and four carries |
| 4g+9 (`ph`=1) | slice 3 computes the group; slice 2's results are copied to the alignment register |
| 4g+10 … 4g+13 | multiplexers select samples 0 … 3 |
| 4g+11 … 4g+14 | `phase` = S(4g+1) … S(4g+4) |

### Four steps in one adder delay

With state X and FCW slice N fixed for a group, the next four states are
X+N, X+2N, X+3N and X+4N. The carries c0 … c3 arriving from the slice below
add to them. `parallel_adder` builds them from four 8-bit Brent-Kung adders.
None of them waits for more than one other adder:

```
X1 = X  + N                   + cin c0
X2 = X  + {N[6:0], c0}        + cin c1      = X + 2N + c0 + c1   (mod 256)
X3 = X2 + N                   + cin c2
X4 = X  + {N[5:0], c0+c1+c2}  + cin c3      = X + 4N + c0+…+c3  (mod 256)
```

Shifting N up by one or two places multiplies it by 2 or 4. The places this
frees at the bottom of the operand are exactly wide enough to hold the sum of
the earlier carries, and each adder's own carry-in takes the last one. X4 is
fed back as the new state.

The slice above needs one carry per step, not per adder. The FCW bits shifted
out at the top are worth 256 each, so they are added back into a *wrap
count*. The per-step carries then follow by subtraction:

```
w2 = cout(X2) + N[7]               (wraps over steps 1-2)
w4 = cout(X4) + 2·N[7] + N[6]      (wraps over steps 1-4)
k1 = cout(X1),  k2 = w2 − k1,  k3 = cout(X3),  k4 = w4 − w2 − k3
```

Each k is 0 or 1, because one step of X + N + c is always below 512.

### Where the clock-rate gain comes from

The two lower slices step every clock, and each has one 8-bit adder
between registers. The parallel slices step every fourth clock, so most of
their paths have four clocks:

* Their state and FCW byte, and slice 3's carry inputs, change only on the
  tick.
* The collected carry of step 4g+j was written 4 − j clocks before the tick.
* Only the last carry, c3, has a one-clock path, and it reaches just the
  carry-in of the fourth adder. That is one 8-bit adder delay, the same as
  in a lower slice.

The full-rate parts are only that carry-in, the registers and the output
multiplexers. The RTL itself holds no timing constraints. To obtain the
speed-up, declare the paths into `parallel_adder` as multicycle paths with
the lengths given above.

## Loading a frequency word: skewed byte loads

In a pipelined accumulator, FCW byte i must change at the moment slice i
reaches the first step that uses the new word. The classic way is to delay
each byte through a triangle of registers:
N(L+1)/2 = 32·5/2 = 80 flip-flops for N = 32 bits and L = 4 slices.
`gated_preskew.sv` instead keeps the word on the input. A pulse runs down a
chain of four flip-flops, and each flip-flop enables one byte register at
its own moment. That costs N + L = 36 flip-flops in all:

| flop | fires in cycle | loads | why then |
|---|---|---|---|
| d0 (set by `fcw_load`) | t0 − 1, the first with `ph == 3` | byte 0 | slice 0 starts step t0 in cycle t0 |
| d1 | t0 | byte 1 | slice 1 is one step behind |
| d2 | t0 + 1 | byte 2 | before slice 2's tick at t0 + 5 (previous group at t0 + 1) |
| d3 (steps on the Clk/4 tick) | t0 + 5 | byte 3 | before slice 3's tick at t0 + 9 (previous group at t0 + 5) |

The word can only change at a group boundary, because the two upper slices
take four steps at a time. This is the "FCW held for four clock cycles"
limit of the parallel accumulator. The original describes these enables as
gated clocks. Here they are clock enables on the single clock, which is the
same logic in a synthesizable form.

## The modified Brent-Kung adder

`bk_adder.sv` is an 8-bit parallel-prefix adder (W is a power-of-two
parameter). Each bit forms a propagate p = x ^ y and a generate g = x & y.
(G,P) cells combine them, G = g″ | p″·g′ and P = p″·p′. The cells form a
Brent-Kung tree: an up-sweep at distances 1, 2, 4, and then a down-sweep
that fills in the remaining positions, 11 cells in all for 8 bits.

The modification concerns bit 0. Bit 0 has no generate cell. Its carry
comes from a multiplexer, C1 = p0 ? cin : x0, and is fed to the tree as the
group generate of position 0. That is how the carry from the slice below
enters. The sums are s_i = p_i ^ c_i with c_0 = cin, and `cout` is the group
generate of all 8 bits.

## The sine lookup

`phase_to_amplitude.sv` maps the 14-bit phase to a sample in one clock.

**Quarter-wave folding.** Phase bit 13 is the sign, and bit 12 tells a
rising quarter from a falling one. In a falling quarter the remaining 12
bits are one's-complemented. That mirrors the phase exactly because every
table entry is sampled half a phase LSB into its step, at angle
(π/2)(k + ½)/4096. Mirroring then needs no +1 adder.

**Angular split.** The folded phase k = 256·A + 16·B + C is split into
three 4-bit fields. The sine uses

    sin(A + B + C) ≈ sin A + cos A · sin B + cos A · sin C

which takes cos B = cos C = 1 and drops the sin A sin B sin C terms. All
tables are in units of the 11-bit output LSB (full scale 2047):

| ROM | size | word i holds |
|---|---|---|
| `sine_rom_a` | 16 × 11 | round(2047 · sin(π/2 · (i + ½)/16)) |
| `sine_rom_b` | 16 × 8, signed | round(2047 · sin(π/2 · 16(i − 8)/4096)) |
| `sine_rom_c` | 16 × 4 | round(2047 · sin(π/2 · (i + ½)/4096)) |

A is sampled at the centre of its coarse step. Its table read backwards is
therefore the cosine table, cos A = word(15 − i). One ROM gives both values,
with the second read port addressed through XOR gates tied high. Because A
sits at a step centre, B measures the angle from that centre as a signed
value from −8 to +7 middle steps. This keeps |B| below 0.05 rad, where
cos B ≈ 1 holds to within 0.12 %. C carries the half-LSB offset.

**Arithmetic.** The design computes cos A × sin B (11 × 8 bits, signed) and
cos A × sin C (11 × 4 bits). It rounds each product to the output LSB,
(p + 1024) >>> 11, adds both to sin A, and clamps the sum to 0 … 2047.
Rounding can push the sum up to 2050 near the top of the wave.

**Output.** The magnitude and the sign bit are registered. After the
register, a one's complement controlled by the sign gives the offset-binary
word `{~sign, mag ^ sign}` for a unipolar DAC.

**Accuracy.** Over all 16,384 phases the magnitude stays within 3.46 LSB of
2047 · sin(π/2 · (k + ½)/4096). In the end-to-end simulation, measured
against a sine of the full 32-bit phase, the 12-bit output has an SNR of
59–63 dB. The approximation limits this, not the word length: an ideal
12-bit word would give about 74 dB. The original reports 68 dB measured
after its DAC.

## Departures and choices

* **Parallel adder equations.** The original text writes the four states as
  N + k·X, with the roles of state and word swapped. Its drawing shifts the
  word and feeds back the state, and that version (X + k·N) is built here.
  How the lower slice's carries fill the freed low bits, and how the
  per-step carries are recovered, is this design's own construction (see
  above).
* **cos A from sin A.** The original describes the XOR-with-Vcc trick as
  complementing the sin A output data. That does not give a cosine. Here the
  XOR acts on the ROM address, with A sampled at its step centre, and sin B
  is signed as a result.
* **ROM sizes.** The tables are 16×11, 16×8 and 16×4, 368 bits in total,
  as in the original's text. One of its drawings shows 16×5 for ROM C, and
  another 2^8 × 4 for ROM B.
* **Own choices, not in the original:**
  - the exact enable cycles of the preskew chain, the `fcw_busy` output and
    the rule that `fcw` is held while it is high;
  - the latency of 10 + 1 clocks and the position of every pipeline
    register;
  - the amplitude scale of 2047, the product rounding, the clamp and the
    offset-binary output code;
  - synchronous reset of all state to zero, and `phase_valid`.
* **Not included:**
  - the DAC and low-pass filter, which are analog and off-chip;
  - the conventional pipelined accumulator with a triangle of preskew
    registers, a baseline that is only compared against;
  - the CLA, Kogge-Stone, Sklansky, Beaumont-Smith and ripple-carry adders
    of the speed comparison.

## Files

| file | contents |
|---|---|
| `rtl/ddfs_pkg.sv` | shared widths and the accumulator latency |
| `rtl/bk_adder.sv` | modified Brent-Kung adder |
| `rtl/parallel_adder.sv` | four-step parallel accumulator slice |
| `rtl/gated_preskew.sv` | FCW byte registers and load chain |
| `rtl/phase_accumulator.sv` | 32-bit pipelined accumulator, 14-bit phase out |
| `rtl/sine_rom_a.sv`, `sine_rom_b.sv`, `sine_rom_c.sv` | the three sub-ROMs |
| `rtl/phase_to_amplitude.sv` | folding, angular-split sine, output register |
| `rtl/ddfs_top.sv` | the synthesizer |
| `tb/tb_<block>.sv` | a self-checking testbench per block |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/ddfs_pkg.sv tb/tb_ddfs_top.sv --top-module tb_ddfs_top
./obj_dir/Vtb_ddfs_top
```

Swap in any other `tb_*` name to run that testbench instead. Every
testbench finishes in under a second.

What the testbenches check:

* `tb_bk_adder` tries all 131,072 input combinations.
* `tb_parallel_adder` runs 20,000 random groups against a step-by-step
  model, at 8-bit and 6-bit output widths.
* `tb_gated_preskew` checks the load cycle of every byte and the busy flag
  for strobes at all four Clk/4 phases.
* `tb_phase_accumulator` compares 30,000 cycles and 128 word reloads with a
  plain 32-bit accumulator, latency included.
* The ROM testbenches recompute every word with `$sin`.
* `tb_phase_to_amplitude` runs all 16,384 phases against a floating-point
  model and the exact sine.
* `tb_ddfs_top` runs the whole synthesizer at its default size. It loads
  FCW = 0x1FFFFFFF (F_clk/8, 15.625 MHz at 125 MHz), 0x0DFFFFFF and
  0x00100000. It checks every phase and amplitude, counts output periods
  against accumulator wrap-arounds, and measures the SNR.
* `tb_ddfs_resolution` loads FCW = 1, the 0.029 Hz step. The phase must
  advance after exactly 2^18 clocks, and must fall back after the same
  count with FCW = 0xFFFFFFFF.

Each testbench also fails if a deliberately broken copy of its block is
substituted: for example, a swapped bit-0 mux, one wrong ROM word, or an
off-by-one playback select.
