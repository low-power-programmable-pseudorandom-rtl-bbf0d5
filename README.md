# Parallel-feedback pseudorandom word generator with an 8-phase clock multiplier

A built-in self test for a 10 Gb/s serializer/deserializer needs a PRBS
source. A classic LFSR that produces one bit per clock would have to run at
10 GHz. This design produces the same bit stream 16 bits at a time instead: a
*parallel-feedback shift register* (PFSR) computes the next 16 bits of the
sequence from the previous ones in every cycle of a 625 MHz clock. Each word
can go straight into a 16:1 serializer, and the serializer's output is then an
ordinary PRBS.

The generator offers the five ITU-T/CCITT pattern lengths 2^7−1, 2^10−1,
2^15−1, 2^23−1 and 2^31−1. A *mark density controller* can lower the share of
ones from 1/2 to 1/4 or 1/8. A charge-pump PLL, the *clock multiplier unit*
(CMU), makes a 1.25 GHz clock with eight phases from a 625 MHz reference. Its
divide-by-two output is the generator's word clock. A 16:1 serializer uses
the eight phases to send each word as a 10 Gb/s stream.

The generator, its XOR operators, the mark density controller, the
serializer, the phase detector and the divider are synthesizable
SystemVerilog. The analog parts of
the PLL (charge pump, loop filter, ring VCO) are behavioural models that use
`real` values and delays. Together they let the whole chip-level loop be
simulated.

## How the parallel feedback works

Number the bits of the sequence y[1], y[2], … in the order they are sent. Every
pattern used here is a trinomial, so each bit follows from two earlier bits:

    y[m] = y[m-n] ^ y[m-n+a]

| pattern | n  | a | polynomial         |
|---------|----|---|--------------------|
| 2^7−1   | 7  | 1 | x^7 + x^6 + 1      |
| 2^10−1  | 10 | 3 | x^10 + x^7 + 1     |
| 2^15−1  | 15 | 1 | x^15 + x^14 + 1    |
| 2^23−1  | 23 | 5 | x^23 + x^18 + 1    |
| 2^31−1  | 31 | 3 | x^31 + x^28 + 1    |

**Register rows.** The state is an array of two rows of 18 flip-flops each. Row
0 holds y[1..18]: the 16 bits of the word on the output, plus the first two
bits of the next word. The mark density controller needs those two extra bits.
Row 1 holds y[17..34]. Each clock advances the whole sequence by 16 bits.

**Short patterns (n ≤ 16: 7, 10, 15) use one row.** The pattern's XOR operator
reads y[1..16] from row 0 and computes y[17..34]. That result becomes the new
row 0. Some of the new bits depend on other new bits: for n = 7, bit y[24]
needs y[17] and y[18]. So the operator is a staircase of XOR gates in which
later outputs reuse earlier ones.

**Long patterns (n = 23, 31) use both rows.** To produce y[33..50] the operator
must reach back 23 or 31 bits, which is more than one row holds. Row 1 loads
the operator's output, and row 0 loads the old row 1, so the rows act as a
two-word FIFO. In general a pattern of degree n needs ceil(n/16) rows. The
`prwg` module is written that way: it takes the word width, the number of
extension bits and the list of (n, a) pairs as parameters, and it sizes the
row array to fit the longest pattern.

**Recursive substitution (n = 7).** Applying the recurrence to itself gives
y[m] = y[m-14] ^ y[m-12]. The n = 7 operator uses this form. Its first twelve
outputs then come straight from stored bits, and the last six need only one of
those twelve. This shortens the longest path from three XOR gates to two, and
the 2^7−1 pattern has the deepest staircase, so it is the critical path.

There is a catch. The substituted form only links bits whose indices have the
same parity. It gives the right sequence only if the stored bits already
satisfy the original recurrence. From a reset state with a single one, the odd
and even bits would run as two unrelated sequences. So reset does not load a
single one. It loads row 0 with a genuine window of the 2^7−1 sequence: y[7] =
1, the earlier bits 0, and the later bits from the recurrence. This window
also has a one within the bits that every other pattern reads, so no pattern
can start in the all-zero state. One rule follows: **after switching to the
2^7−1 pattern, reset the generator.** For the other patterns a change of
`pat_sel` without a reset gives a short transient (two or three words) and
then a valid sequence.

## Mark density controller

Sixteen identical cells. Cell n computes

    D[n] = y[n] & (y[n+1] | S1) & (y[n+2] | S2)

| {S1,S2} | output                   | density of ones |
|---------|--------------------------|-----------------|
| 00      | y[n] & y[n+1] & y[n+2]   | 1/8             |
| 01      | y[n] & y[n+1]            | 1/4             |
| 10      | y[n] & y[n+2]            | 1/4             |
| 11      | y[n]                     | 1/2             |

An m-sequence of length 2^n−1 has one fewer zero than ones, so each density is
slightly below its nominal value, by a factor of (2^(n−1)−1)/2^(n−1). The
controller is combinational from row 0, so the select takes effect on the word
already on the output.

## Clock multiplier unit

    ref 625 MHz ─► PFD ─up/dn─► charge pump ─► loop filter ─Vc+/Vc−─► ring VCO ─► 8 phases, 1.25 GHz
                    ▲                                                     │
                    └──────────────────── ÷2 (word clock) ◄───────────────┘

- **`pfd`**: a tri-state phase frequency detector. There are two flip-flops
  with D tied high. The reference edge sets UP and the divided-clock edge sets
  DOWN. When both are high, an AND gate clears both. The reset path has no
  delay in this RTL.
- **`charge_pump`** (model): drives +I while only UP is high and −I while only
  DOWN is high. It holds when both inputs are high or both are low.
- **`loop_filter`** (model): a differential second-order filter. R1–C1–R2 are
  in series between Vc− and Vc+, with C2 across them. It integrates the pump
  current with forward Euler at every current change and every 5 ps. The
  common mode is fixed at 0.9 V; in the circuit, common-mode feedback in the
  pump holds it there.
- **`vco`** (model): a four-stage differential ring with eight outputs spaced
  45°. Its frequency is f = F_FREE + KVCO·(Vc+ − Vc−). `phase[k]` lags
  `phase[0]` by k·100 ps at 1.25 GHz, so the eight phases give the ten
  100 ps bit slots per nanosecond that a 10 Gb/s serializer needs.
- **`clk_div2`**: a toggle flip-flop on `phase[0]`.

The circuit's values are not known, so the loop values here are chosen: I =
100 µA, R1+R2 = 1 kΩ, C1 = 50 pF, C2 = 5 pF, F_FREE = 1.10 GHz and KVCO =
1 GHz/V. They give a natural frequency of about 5 MHz with a damping of about
0.8, which is on the order of the 10 MHz bandwidth reported for the silicon. From the
1.10 GHz free-running frequency the loop locks in about 0.3 µs. In lock, Vc+ − Vc− = 0.15 V.
Jitter, phase noise and supply effects are not modelled.

## Top level: `prwg_cmu_top`

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `ref_clk`   | in  | 1     | 625 MHz reference |
| `pll_rst_n` | in  | 1     | asynchronous active-low reset of the PLL |
| `gen_rst_n` | in  | 1     | asynchronous active-low reset of the generator (loads the seed) |
| `pat_sel`   | in  | 3     | `prwg_pkg::pattern_e`: 0..4 = 2^7−1, 2^10−1, 2^15−1, 2^23−1, 2^31−1 |
| `md_sel`    | in  | 2     | `prwg_pkg::md_sel_e`, {S1,S2} |
| `d`         | out | 16    | output word; `d[0]` is the oldest bit and is sent first |
| `word_clk`  | out | 1     | 625 MHz word clock (PLL output ÷ 2) |
| `phase`     | out | 8     | VCO phases |
| `up`, `dn`  | out | 1     | phase detector outputs (observation) |
| `vcp`, `vcn`| out | real  | control voltages (observation) |
| `sout`      | out | 1     | 10 Gb/s serial stream |

Timing: `d` changes just after each rising edge of `word_clk`, one new word
per cycle, which is 16 × 625 MS/s = 10 Gb/s of sequence. A new `pat_sel` is
used at the next rising edge. `md_sel` acts immediately.

## 16:1 serializer

The serializer has two multiplexer stages:

1. **Eight 2:1 multiplexers.** Lane j carries word bit j while the word clock
   is low, and bit j+8 while it is high. Each lane runs at 1.25 Gb/s.
2. **One 8:1 time-division multiplexer.** Lane j drives `sout` during the
   100 ps window in which `phase[j]` is high and `phase[j+1]` is still low.

Two registers keep each bit stable for its whole window. A word register
captures `d` at the rising edge of the word clock; the generator moves on to
its next word at that same edge. A holding register copies bits 8..15 at the
falling edge. Bit i of a captured word leaves `sout` 800 ps + i·100 ps after
the capture edge.

The source describes the serializer only as two stages of tree-like
multiplexers clocked by the eight phases. The 2 + 8 split, the registers and
the timing are this implementation's own choices. Stage 2 gates data with
clock phases, as a time-division multiplexer does in silicon. That needs care
in synthesis and static timing; the simulation here has zero delay.

## Modules

| file | kind | content |
|------|------|---------|
| `rtl/prwg_pkg.sv` | package | pattern enum, (n, a) tables, density select enum |
| `rtl/pfsr_xor_op.sv` | RTL | XOR operator of one pattern (with optional substitution) |
| `rtl/prwg.sv` | RTL | register rows, row multiplexers, operators, reset seed |
| `rtl/mdc_cell.sv`, `rtl/mdc.sv` | RTL | mark density controller |
| `rtl/serializer_16to1.sv` | RTL | 16:1 serializer on the eight phases |
| `rtl/pfd.sv`, `rtl/clk_div2.sv` | RTL | phase detector, divider |
| `rtl/charge_pump.sv`, `rtl/loop_filter.sv`, `rtl/vco.sv` | model | analog PLL parts |
| `rtl/cmu.sv` | model | PLL wrapper |
| `rtl/prwg_cmu_top.sv` | model | top level |

`prwg`, `pfsr_xor_op`, `mdc` and `mdc_cell`, `serializer_16to1`, `pfd` and
`clk_div2` are synthesizable. Anything that instantiates a model (`cmu`, the top) is
simulation-only.

## Changing the generator

- **Patterns.** The (n, a) pairs are in `prwg_pkg` (`PAT_DEG` and `PAT_TAP`),
  and `prwg` takes them as the parameters `DEG` and `TAP`. A pattern with
  n > 32 at 16-bit words adds a third row automatically. `RECUR` chooses, for
  each pattern, whether its operator uses the substituted form. If you enable
  it for a pattern, that pattern's sequence defines the reset seed (the first
  such pattern wins). Reset after switching to it.
- **Word width.** Set the parameter `M`. The row count becomes ceil(n/M) for
  the longest pattern. `prwg_tb` also runs an 8-bit configuration with up to
  four rows.
- **Mark density.** `mdc` is written for two extension bits (K = 3, densities
  down to 1/8). Deeper densities need more extension bits (`K` in `prwg`) and
  wider AND cells.
- **PLL.** The pump current, filter values, free-running frequency and VCO
  gain are parameters of `cmu`.

## Simulating

Every testbench in `tb/` checks its own results. Each one prints a line
`TB_RESULT checks=N failures=F` and has a watchdog. For example:

    verilator --binary --timing --assert -Irtl -Itb rtl/prwg_pkg.sv tb/prwg_tb.sv --top-module prwg_tb
    ./obj_dir/Vprwg_tb

Use the same command for `pfsr_xor_op_tb`, `mdc_tb`, `serializer_16to1_tb`,
`pfd_tb`, `clk_div2_tb`,
`charge_pump_tb`, `loop_filter_tb`, `vco_tb`, `cmu_tb` and `prwg_cmu_top_tb`.
Verilator finds the other modules through `-Irtl`. Each finishes in well under a
second.

What the tests establish:

- **`prwg_tb`** unpacks the words into a bit stream and checks every
  generated bit against the recurrence. For 2^7−1, 2^10−1 and 2^15−1 it also
  runs one full period, checks that the words repeat after exactly 2^n−1
  cycles, and counts 2^(n−1) ones per period. For the two long patterns it
  runs 3000 words. It also checks the extension bits and live pattern
  changes, including one from one-row to two-row mode. A second instance
  with 8-bit words checks the generic sizing: 2^9−1 in two rows, 2^23−1 in
  three and 2^31−1 in four.
- **`pfsr_xor_op_tb`** compares the operators with a bit-serial reference on
  random inputs. It also shows that the substituted and plain n = 7 operators
  agree on valid windows.
- **`mdc_tb`** checks the truth table on 500 random words per select, plus the
  measured densities over a 2^15−1 stream.
- **`cmu_tb`** and **`prwg_cmu_top_tb`** run the PLL from reset to lock. They
  check the period, the alignment and the eight phase offsets. The top test
  then runs every pattern and every density on the PLL's own word clock, at the
  default sizes. It follows every word onto the serial output, bit by bit.
  It requires each mechanism (five patterns, one-row and two-row mode, four
  densities, lock, up and down pumping, serial output) to have occurred.
- **`serializer_16to1_tb`** drives ideal phases and random words and checks
  every serial bit slot.

Not simulated: the full period of the two long patterns (8.4 million and 134
million words).

## Where this RTL departs from the published design, or fills gaps

- **Taps for 2^10−1 and 2^15−1.** These are taken from the ITU-T O.150/O.152
  polynomials. The other three are fixed by the design's own bit ranges and
  operator drawings.
- **Reset seed.** The published design presets a single flip-flop. Here reset
  loads a 2^7−1 window, for the reason given above.
- **Idle rows.** In one-row mode the published design keeps loading the
  second row from the long-pattern operators. Here the idle row holds its
  value. The output is the same.
- **Other own choices.** The pattern-select encoding, the bit order, the
  asynchronous resets and the split into a PLL reset and a generator reset are
  choices made here.
- **Analog parts.** The PFD is modelled as plain flip-flops, not true
  single-phase-clock dynamic logic. The charge pump, filter and VCO are ideal
  behavioural models with assumed values. Nothing here predicts the
  circuit's jitter or power.
- **Timing.** The published XOR operator trees are drawn gate by gate. Here
  they are written as a loop over output bits, which synthesis flattens into
  the same XOR network. Whether 625 MHz closes in a given process is not
  assessed. The silicon reached about 500 MS/s.
