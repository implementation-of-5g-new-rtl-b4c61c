# 5G NR secondary synchronization (SSS) detector

When a 5G NR handset searches for a cell, it first finds the primary
synchronization signal (PSS). That gives the symbol timing and the sector
number N_ID2 (0..2). The secondary synchronization signal (SSS) is then read
two OFDM symbols later, on the same 127 subcarriers. It names the cell ID group
N_ID1 (0..335). The physical cell ID is `3*N_ID1 + N_ID2`, one of 1008 values.

This RTL implements the SSS step. It takes the 127 received SSS subcarrier
values and N_ID2, checks all 336 possible SSS sequences, and returns the N_ID1
whose sequence correlates best, plus the cell ID. The arithmetic runs on
16-tap systolic FIR filters. Each processing element of a filter is built from
a Vedic multiplier and carry-select adders.

## The SSS and how the search is split up

Each SSS is a ±1 sequence of length 127. It is the product of two m-sequences:

```
d(n) = [1 - 2 x0((n+m0) mod 127)] * [1 - 2 x1((n+m1) mod 127)]
m0   = 15 * floor(N_ID1 / 112) + 5 * N_ID2
m1   = N_ID1 mod 112
x0(j+7) = x0(j+4) xor x0(j),   x1(j+7) = x1(j+1) xor x1(j),
x0(0..6) = x1(0..6) = 1 0 0 0 0 0 0
```

Once N_ID2 is known, N_ID1 splits into a group `q = N_ID1 div 112` (3 values,
which fixes m0) and a shift `m1` (112 values). The detector does not
correlate against 336 separate sequences. For each q it works in two steps:

1. **X0(m0) stage** (`sss_x0_despread`). Multiply the received samples by the
   x0 factor for that m0. Since that factor is ±1, this only flips sign bits.
   If q is right, what remains is x1 shifted by m1, plus noise.
2. **X1(m1) stage** (`sss_matched_filter`, two copies). Correlate the result
   with x1 at all 112 shifts. The filter produces one shift per clock.

The **comparator** (`sss_comp`) sees all 336 full correlations,
`N_ID1 = 112*q + m1`. It keeps the largest signed value. On a tie, the
lower N_ID1 wins.

The x0 and x1 sequences come from two 7-bit LFSRs (`mseq_gen`). These run for
127 clocks after reset and fill two 127-bit coefficient registers. After that,
the correlator can read any cyclic shift in a single clock.

## Doing a 127-long correlation on a 16-tap systolic filter

This part needs the most explanation. The filter has only 16 taps, but the
sequence is 127 long, and 112 shifts are needed for each q.

**The systolic FIR** (`systolic_fir`, `systolic_pe`) is a chain of 16
processing elements (PEs):

- Each PE holds one coefficient `w[i]`, which stays put.
- Samples pass along an x line, with two registers per PE.
- Partial sums pass along a y line, with one register per PE.
- Each PE adds `w[i] * x` to the partial sum arriving on the y line.

Because samples move at half the speed of the sums, the output of the last PE
is

```
y(t) = sum_{i=0}^{15} w[i] * x(t - 16 - i)
```

That is an ordinary FIR with a latency of 16 clocks. It accepts a new sample
every clock.

**Data as the template.** The matched filter (`sss_matched_filter`) swaps
the usual roles:

- The 16 de-spread samples `z(n0..n0+15)` of one segment are loaded, in
  reverse order, as the coefficients.
- The reference `s1(n0+tau) = 1 - 2 x1((n0+tau) mod 127)`, for
  `tau = 0..126`, is streamed in as samples.

The output at clock `31 + m1` after the load is then

```
corr(m1) = sum_{j=0}^{15} z(n0+j) * s1(n0+j+m1)
```

This is the segment's share of the correlation for shift m1. All 112 shifts
come out on 112 consecutive clocks. A pass takes `1 + 31 + 112 = 144` clocks.
The next pass can load new coefficients right away. No flush is needed:
outputs from clock 31 onward depend only on samples and partial sums that
entered after the load.

**Segments, branches and passes.** The 127 samples are padded to 128 and cut
into eight 16-sample segments. There are two matched filters, an *even* and
an *odd* branch, and they run in lockstep. In pass `p = 0..3`:

- the even branch takes segment `2p`;
- the odd branch takes segment `2p+1`.

The sum of the two outputs goes into a 112-entry accumulator, indexed by m1.
On the fourth pass, that sum plus the accumulator is the full correlation for
`(q, m1)`, and it goes straight to the comparator. Three groups × four passes
× 144 clocks gives **1728 clocks per search**.

**Signed arithmetic on unsigned multipliers.** Samples are 8-bit two's
complement. Inside the correlator they are kept as sign plus magnitude
(`sss_pkg::sm8_t`). The magnitude of -128 still fits in 8 bits. Each PE works
as follows:

1. Multiply the two magnitudes with an unsigned 8×8 Vedic multiplier.
2. Negate the product if the signs differ.
3. Add it to the y line with a 20-bit carry-select adder.

Twenty bits are enough for 16 full-scale products, and also for a whole
127-sample correlation.

## Arithmetic cells

- **`vedic_mul8`**: an 8×8 multiplier. Four 4×4 Vedic multipliers form
  HH, LH, HL and LL, the products of the 4-bit halves. Three 8-bit
  carry-select adders combine them:
  1. LH + HL, with carry C1;
  2. that sum + {0000, LL[7:4]}, with carry C2;
  3. HH + {000, C1|C2, sum2[7:4]}.

  The product is `{sum3, sum2[3:0], LL[3:0]}`.
- **`vedic_mul4`**: a 4×4 multiplier with the same structure one level down.
  It uses four 2×2 Vedic cells (`vedic_mul2`) and 4-bit carry-select adders.
- **`csel_adder`**: a carry-select adder in 4-bit groups. The lowest group is
  a ripple-carry adder (`rca`). Each higher group computes its sum for both
  carry-in 0 and carry-in 1, and the carry from the group below selects
  between them. The default width is 16 bits. The same module is used at 4,
  8 and 20 bits.

## Interface and timing of `sss_detector`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `in_valid` | in | 1 | `in_sample` is valid this clock |
| `in_head` | in | 1 | first of the 127 samples (subcarrier 0 of the SSS); also captures `n_id2_in` |
| `in_sample` | in | 8 | received SSS value, signed, after OFDM demodulation and equalization |
| `n_id2_in` | in | 2 | N_ID2 from the PSS stage |
| `ready` | out | 1 | a new block may start |
| `out_valid` | out | 1 | result valid |
| `n_id1` | out | 9 | detected cell ID group |
| `cell_id` | out | 10 | `3*n_id1 + N_ID2` |
| `peak` | out | 20 | correlation of the winning hypothesis |

Timing:

- **After reset.** `ready` rises 128 clocks after reset, once the sequence
  registers are full.
- **Loading.** Samples are accepted while `ready` is high. `in_valid` may
  have gaps. A new head restarts the load from the beginning.
- **Search.** Starting with the clock after the 127th sample is taken, the
  search takes 1728 clocks. During the search `ready` is low and heads are
  ignored.
- **Result.** `out_valid` then rises. It stays high, and `n_id1`, `cell_id`
  and `peak` stay stable, until the next head is accepted.

At 200 MHz, loading and searching one SSS takes about 9.3 µs.

## How far it can be trusted

Every module has a self-checking testbench in `tb/`. Each one compares against
values computed independently in the testbench:

- **Arithmetic cells.** `vedic_mul4` and `vedic_mul8` are tested exhaustively.
  `csel_adder` gets corner cases and random operands at 16 and 20 bits.
- **PE and FIR.** `systolic_pe` and `systolic_fir` are checked every clock
  against the direct-form sum. This covers the 16-clock latency and a
  coefficient reload in the middle of a stream.
- **Sequences and stages.** `mseq_gen` is checked against the recursions.
  `sss_x0_despread` and `sss_matched_filter` are checked against the formulas
  above, with the matched filter's output timing checked exactly.
- **Comparator.** `sss_comp` is checked against a running-maximum model that
  includes ties.
- **Whole detector.** `tb_sss_detector` runs the detector at its default size
  and compares it with a reference search over all 336 hypotheses
  (`tb/sss_ref_pkg.sv`). Cases:
  - N_ID1 = 140 (0x8C) for each N_ID2;
  - the group boundaries 0, 111, 112, 223, 224 and 335;
  - full-scale samples;
  - twelve random cells with heavy uniform noise.

  It checks N_ID1, the cell ID, the peak value and the 1728-clock latency. It
  also counts load gaps, load restarts, ignored heads, held results,
  filter passes and comparator updates, and fails if any of them never
  happens.

Not covered:

- No timing or power analysis has been done.
- No FPGA implementation has been done.

## Where this design departs from, or adds to, its source description

- **Even/odd split.** The source splits the received data into "even" and
  "odd" indexed parts, and says one part yields m0 and the other m1. That
  does not hold for the NR SSS defined above, because every sample depends on
  both m0 and m1. This design follows the equations instead:
  - the X0(m0) stage handles each of the three m0 candidates;
  - the two correlation branches keep the even/odd names, but they split the
    work by 16-sample segment.
- **One filter per branch.** The source diagram draws a systolic filter and a
  matched filter in each branch. Here they are one unit: the systolic FIR
  *is* the matched filter.
- **Choices made here.** The segment schedule, the accumulator, the
  coefficient loading, the sign/magnitude handling and the 20-bit sum width
  are all choices of this design. So are the 2×2 inside of the 4×4 Vedic
  multiplier, the handshake, the reset behaviour and the tie rule.
- **Storage.** The detector stores the 127 samples (1016 bits) and the
  accumulator (112 × 20 bits) in registers. So it needs more flip-flops than
  a minimal streaming design would.
- **Outside the design.** Frame timing from the SSS, the PSS detector and the
  OFDM demodulator (FFT) are not part of this design. N_ID2 and the
  frequency-domain samples are inputs.
- **Input scaling.** Noise-free inputs are detected exactly. With noise, the
  result is the true correlation maximum. In the end-to-end test, signals of
  amplitude 20 to 79 with uniform noise of ±60 still gave the sent cell in
  every case. No automatic gain or input scaling
  is provided: samples should already fill the 8-bit range sensibly.

## Files

`rtl/`:

| file | contents |
|---|---|
| `sss_pkg.sv` | constants, the sign/magnitude type, helper functions |
| `sss_detector.sv` | top level: sample buffer, controller, accumulator, wiring |
| `sss_x0_despread.sv` | X0(m0) stage |
| `sss_matched_filter.sv` | one correlation branch |
| `sss_comp.sv` | comparator |
| `mseq_gen.sv` | m-sequence LFSR and coefficient register |
| `systolic_fir.sv`, `systolic_pe.sv` | 16-tap systolic FIR and its PE |
| `vedic_mul8.sv`, `vedic_mul4.sv`, `vedic_mul2.sv` | Vedic multipliers |
| `csel_adder.sv`, `rca.sv` | carry-select and ripple-carry adders |

`tb/`: one `tb_<module>.sv` per module, plus `sss_ref_pkg.sv`, the reference
model.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_sss_detector \
    rtl/sss_pkg.sv tb/sss_ref_pkg.sv tb/tb_sss_detector.sv
./obj_dir/Vtb_sss_detector
```

Any other block works the same way: name its testbench as the top module and
list both packages first. The end-to-end test runs in well under a second.

When changing the design, keep these constraints in mind:

- `TAPS` and `SEQ_LEN` in `sss_pkg` are tied to the segment schedule in
  `sss_detector`: eight segments of 16 samples, and a 2-bit pass counter.
- `CORR_W` must hold 127 × 128.
