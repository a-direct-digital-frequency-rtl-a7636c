# ANPA direct digital frequency synthesizer

A direct digital frequency synthesizer (DDFS) makes a digital sine wave. A
phase accumulator adds a frequency control word to a phase register every
clock. A *sine mapper* turns the phase into a sine sample. The phase
accumulator is trivial. All the design effort goes into the sine mapper.

This sine mapper uses **automatic nonuniform piecewise linear approximation
(ANPA)**:

* Only a quarter period of the sine is approximated. The other three quarters
  come from mirroring the phase and negating the result.
* The quarter period is split into segments whose lengths are powers of two.
  The split comes from repeated bisection: a segment is halved while its
  approximation is not accurate enough. The steep part of the sine therefore
  gets short segments and the flat top gets long ones. Each segment starts on
  a multiple of its own length, so it is identified by a fixed number of
  phase MSBs (its own number, not a global one).
* In each segment the sine is a straight line, `gradient * x + offset`. The
  gradient is restricted to a sum of at most **QF** signed powers of two (QF
  is the *quantization factor*). Multiplying by it takes QF shifters and
  QF-1 adders, and no multiplier.

A table generator chooses the segmentation, the gradients and the offsets
offline from an accuracy target. The hardware is one generic datapath driven
by that table.

## The three configurations

`anpa_ddfs_top` holds three independent synthesizers side by side:

| instance  | resolution R | QF | segments | measured SFDR | worst error vs. ideal sine |
|-----------|--------------|----|----------|---------------|----------------------------|
| ANPA60    | 12 bit       | 1  | 26       | 60.8 dBc      | 14.4 LSB                   |
| ANPA90    | 16 bit       | 2  | 138      | 93.3 dBc      | 10.4 LSB                   |
| ANPA110   | 20 bit       | 3  | 205      | 110.7 dBc     | 21.8 LSB                   |

SFDR (spurious-free dynamic range) is the carrier power over the largest
spur. It was measured on one full output period at `fcw = 1`. The
resolutions, the QF values and the SFDR targets of 60, 90 and 110 dBc are
those of the original ANPA design. That design reports 26, 141 and 626
segments for the three targets. The tables shipped here meet the same SFDR
targets with 26, 138 and 205 segments. Their coefficients were regenerated,
because the original coefficients are not published. A segment count is
therefore a property of the table, not of the architecture.

The worst-case error is large for the bit width. This is expected: the
heuristic targets a *mean* absolute error per segment, and periodic errors
that keep the harmonics low matter more for SFDR than the peak error does.

## Datapath

```
fcw ──►(+)──►[phase reg]──┬──► phase
        ▲                 │
        └─────────────────┘
                          │ top R bits
                          ▼
                   quadrant_fold ──x (R-2 bits)──► segment_selector ──seg_idx──► coeff_rom
                     │        ▲                          ▲   (kappa, one-hot)      │   │
                     neg      │                          └── seg_start, seg_h ─────┘   │
                     │        │                                                 terms  │ beta
                     ▼        │           x ──► multiplierless_gradient ◄──────────┘   │
                   sine ◄─────┴── mag ◄── clamp ◄── >>>G ◄── (+) ◄──────────────────────┘
```

* **phase_accumulator**: `phase <= phase + fcw`, modulo 2^ACC_W. It is the
  only register in the design.
* **quadrant_fold**: `phase[R-1]` selects the sign. When `phase[R-2]` is set,
  the quarter phase is mirrored by one's complement, `x = ~phase[R-3:0]`. The
  quarter sine is sampled at `x + 0.5`, which makes this mirror exact (see
  below).
* **segment_selector**: segment *i* covers `[start_i, start_i + 2^(XW-h_i))`,
  where XW = R-2. `x` lies in it exactly when the top `h_i` bits of `x` and
  `start_i` agree. One comparator per segment gives the one-hot vector
  `kappa`, and an OR encoder turns it into `seg_idx`. An assertion flags a
  table whose segments overlap or leave gaps.
* **coeff_rom**: one word per segment. It derives the start points with the
  recursion `start_0 = 0`, `start_i = start_(i-1) + 2^(XW-h_(i-1))`, so the
  table stores only the size coefficients `h_i`. It outputs the gradient
  codes and the offset of the selected segment.
* **multiplierless_gradient**: QF instances of **shift_term** and an adder
  chain.
* **anpa_sine_mapper**: adds the offset, drops the guard bits, clamps the
  result and ties the parts above together.

**Timing.** Everything after the phase register is combinational. `sine` is
the sample of the current `phase` register value in the same cycle. After a
synchronous reset (`rst_n` low at a clock edge), phase is 0. A new `fcw` is
seen in `phase` after the next clock edge. There is no pipelining. The
original design has none either; it names pipelining as future work.

## Number format and arithmetic

This is the part to understand before changing anything.

Let `XW = R-2`, `Q = 2^XW` (points per quarter), `AMP = 2^(R-1)-1` and `G = 3`
guard bits. The target function is

```
ideal(x) = AMP * sin(pi/2 * (x + 0.5) / Q),   x = 0 .. Q-1
```

Sampling at `x + 0.5` makes the quarter wave symmetric under `x -> Q-1-x`.
The one's-complement mirror in the second and fourth quadrants therefore
reproduces a true sine, with no repeated sample at the peak or at zero.

Each gradient term is coded in 7 bits, `anpa_pkg::term_t = {en, neg,
shift[4:0]}`, and contributes

```
term = en ? (neg ? -1 : +1) * floor( (x << (G + 2)) >> shift ) : 0
```

This is `x * 2^(2 - shift)` with G fractional bits, truncated. It spans the
factors 4 (a left shift by 2, above the largest quarter-sine slope of about
pi LSB per step) down to 2^-29. Terms are added and subtracted, so a segment
can use, for example, `2^0 - 2^-3`. The phase `x` itself feeds the shifters,
not the offset of `x` inside its segment. The segment offset absorbs the
difference.

The output magnitude is

```
mag = clamp( (sum_j term_j + beta) >>> G , 0, AMP )
```

`beta` is signed, R+G+1 bits wide, with G fractional bits. It already
contains the rounding half LSB, `2^(G-1)`. `>>>` is an arithmetic shift
(floor). The clamp only acts at the ends of the range, where an offset tuned
for the mean error could step one code outside the valid range. Finally
`sine = neg ? -mag : mag` in R-bit two's complement.

**Table word** (one line of `rtl/anpaNN_coeffs.hex`, MSB first):

```
{ h_i[4:0], term[QF-1], ..., term[0], beta[R+G:0] }     width 5 + 7*QF + R+G+1
```

## How the tables are made

The tables come from a greedy bisection run from phase 0 towards the peak,
with a threshold `a` on the mean absolute error:

1. Take the largest candidate segment that starts at the current point and
   keeps the power-of-two alignment: length `lowbit(start)`, or Q at the
   start.
2. Fit a least-squares line to `ideal(x)` over the candidate. Take the
   representable gradient (a sum of at most QF terms, as above) closest to
   the line's slope.
3. Take as offset the median of `ideal(x) * 2^G - sum_j term_j(x)` over the
   segment. The median minimizes the sum of absolute errors. Add `2^(G-1)`.
4. Evaluate the exact hardware output over the candidate. If the mean
   absolute error exceeds `a`, halve the candidate and go back to step 2.
   Otherwise accept it and move on.

The thresholds used are a = 7 LSB (ANPA60), 3 LSB (ANPA90) and 6 LSB
(ANPA110). They were chosen so that each configuration meets its SFDR
target. A larger `a` gives fewer segments and a lower SFDR.

## Trade-off at 12 bits

With other tables, the same RTL covers the whole accuracy/complexity plane.
Tables built for SFDR targets of 50 to 65 dBc at 12 bits give the following
segment counts:

| target SFDR | QF 1 | QF 2 | QF 3 |
|-------------|------|------|------|
| 50 dBc      | 10   | 6    | 5    |
| 55 dBc      | 19   | 8    | 6    |
| 60 dBc      | 26   | 9    | 7    |
| 65 dBc      | 57   | 14   | 10   |

Each extra partial product costs one adder per sample and saves segments,
and so table words and comparators. At 12 bits one term is usually enough.
At 16 and 20 bits a single term would need hundreds to thousands of
segments, which is why the higher-resolution configurations use two and
three terms. `tb_anpa_sweep12` builds all twelve and checks them (tables in
`tb/sweep12_*.hex`).

## Files

| file | contents |
|------|----------|
| `rtl/anpa_pkg.sv` | term type, shift limits, width functions |
| `rtl/phase_accumulator.sv` | phase register and adder |
| `rtl/quadrant_fold.sv` | quarter-wave mirroring and sign |
| `rtl/segment_selector.sv` | per-segment MSB comparators, one-hot `kappa`, index |
| `rtl/coeff_rom.sv` | coefficient table, start-point recursion, word read |
| `rtl/shift_term.sv` | one signed power-of-two partial product |
| `rtl/multiplierless_gradient.sv` | QF partial products and adders |
| `rtl/anpa_sine_mapper.sv` | quarter-sine mapper |
| `rtl/anpa_ddfs.sv` | one synthesizer (defaults: ANPA60) |
| `rtl/anpa_ddfs_top.sv` | ANPA60, ANPA90 and ANPA110 side by side |
| `rtl/anpa60_coeffs.hex`, `anpa90_coeffs.hex`, `anpa110_coeffs.hex` | tables |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_anpa_sweep12` |
| `tb/anpa_ref_model.sv` | independent evaluation of a table, plus the ideal sine |

`$readmemh` paths are relative to the repository root (`"rtl/anpa60_coeffs.hex"`),
so simulations must be run from there.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=F`. For example, the
end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/anpa_pkg.sv \
    tb/tb_anpa_ddfs_top.sv --top-module tb_anpa_ddfs_top -Mdir obj -o sim
./obj/sim
```

`tb_anpa_ddfs_top` runs all three synthesizers at full size, in about 10
seconds:

* It steps every synthesizer through all of its phase values at `fcw = 1`
  and compares every sample with the reference model.
* It measures the SFDR of each output with a Goertzel filter per harmonic
  bin. ANPA60 is searched over all bins, ANPA90 over bins 2 to 511, and
  ANPA110 over the odd harmonics up to 1023. It requires 60, 90 and 110 dBc.
* It then applies 20,000 random frequency words, with a reset in between.
* It fails if any segment, quadrant, subtracting term, left-shifted term,
  accumulator wrap or reset never occurred.

`tb_anpa_sine_mapper` checks every quarter phase of all three tables against
the reference model, and against the ideal sine within the worst-case bound.
The unit tests cover:

* the accumulator's modular sum;
* the fold, exhaustively;
* shift terms and gradient sums, randomly;
* segment selection on random bisection segmentations;
* table decoding and coverage of the quarter wave.

## Departures from the original design, and limits

* **Coefficients**: regenerated, as described above. The segment counts differ
  for ANPA90 (138 against 141) and ANPA110 (205 against 626). The SFDR
  targets are met.
* **Own choices where the original is silent**:
  * accumulator width = R;
  * synchronous active-low reset to phase 0;
  * G = 3 guard bits;
  * shift range 2^2 .. 2^-29 and the 7-bit term code;
  * an enable bit per term;
  * sampling at x + 0.5 with one's-complement mirroring;
  * output scale 2^(R-1)-1;
  * the clamp;
  * the table word layout;
  * segment selection by parallel comparators and OR encoding.
* **Timing and area**: not reproduced. The original reports FPGA and 130 nm
  ASIC figures: 389, 278 and 133 MHz for the three configurations, with
  unregistered mappers. This RTL has the same single-register structure, but
  it has not been synthesized for any target. The original FPGA builds count
  15, 25 and 36 registers. Here only the 12-, 16- and 20-bit phase registers
  exist, because what the extra registers held is not known.
* **Table as memory**: the table is read with `$readmemh` into an array. On an
  FPGA this infers an initialised ROM. For an ASIC, the constant table folds
  into the comparators and multiplexers once the memory is treated as
  constant. The start-point recursion in `coeff_rom` is then also computed at
  synthesis time.
* **QF** is limited to 1..4 by the width of the gradient sum (checked at
  elaboration). `h_i` is at most 31.

## Using other configurations

Any point of the accuracy/complexity trade-off can be built. Generate a table
with the procedure above for the chosen R, QF and threshold `a`. Then
instantiate `anpa_ddfs` with `R`, `QF`, `M` (the number of table lines), `G`
and `COEFF_FILE`. The datapath does not depend on the table contents beyond
these parameters. The width `ACC_W` of the phase accumulator may be larger
than R for finer frequency steps; the mapper uses the top R bits.
