# Multi-precision floating-point complex multiplier and 128-point mixed-radix FFT

An FFT multiplies its data by twiddle factors, complex numbers on the unit circle.
Done in floating point, that needs a floating-point complex multiplier, which is
the largest and most power-hungry part of the datapath. This design makes the
precision of that multiplier selectable per FFT frame. Every number carries a
3-bit mode tag in front of an IEEE-754 double, and the tag decides how many
mantissa bits the arithmetic keeps: 8, 16, 23 or 52 bits, or "auto". An
application that needs low power runs in a narrow mode. One that needs accuracy
(the motivating case is EEG spectral analysis) runs at the full 52 bits.

The RTL contains:

* two significand multipliers: Karatsuba with Urdhva base cases (the default) and
  radix-4 Booth with a Wallace tree;
* a six-mode floating-point multiplier, an adder/subtractor, and three fused units:
  add-subtract, two-term dot product and three-term dot product;
* a complex multiplier that can be built in four structures (conventional, Golub,
  fused dot product, three-term fused);
* around them, a 128-point decimation-in-time FFT that uses one radix-2 stage and
  two radix-8 stages (128 = 2 x 8 x 8). This is the top, `mpfp_fft`.

## Number format and precision modes

```
 66   64 63  62        52 51                     0
+-------+---+------------+------------------------+
| mode  | s |  exponent  |        mantissa        |   67 bits (mpfp_t)
+-------+---+------------+------------------------+
```

| code | mode | mantissa bits kept |
|------|------|--------------------|
| 000  | 1 (auto) | narrowest of the modes below that holds every set mantissa bit of the operands |
| 001  | 2    | 8  |
| 010  | 3    | 16 |
| 011  | 4    | 23 |
| 100  | 5    | 23 |
| 101  | 6    | 52 (full double) |

Codes 110 and 111 act as mode 6. Modes 4 and 5 both keep 23 bits. To make them
differ, change `MODE4_BITS` / `MODE5_BITS` in `mpfp_pkg.sv`.

Each floating-point operation follows these rules (functions in `mpfp_pkg`):

1. **Mode of an operation.** It uses the highest mode code among its operands.
   It runs in auto mode only if every operand is tagged 000. Auto then resolves to
   a concrete mode.
2. **Operands.** Operand mantissas are cut to that mode's width before the
   arithmetic. In a narrow mode, the dropped bits reach the 53 x 53 multiplier as
   zeros. This gates the multiplier; it does not replace it with a narrower one.
3. **Result.** The exact result is cut once to the mode's width, which is
   rounding toward zero. It is tagged with the mode actually used, so auto
   results report the mode they were computed in.
4. **Range.** Subnormal inputs count as zero. Results below the normal range
   flush to zero, and results above it become infinity. NaN and infinity
   propagate: infinity times zero and infinity minus infinity give NaN.

Rounding toward zero is exact: adders keep a sticky bit, and the fused units add
exact 106-bit products. So every result equals the exact result of the cut
operands, truncated.

## Significand multipliers

Every product multiplies two 53-bit significands (hidden one plus mantissa). The
unit is chosen with the `MULT` parameter.

* **`karatsuba_mult`** (default, `MM_KARATSUBA_URDHVA`). Above 16 bits it splits
  each operand into halves, X = Xh*2^H + Xl, and forms three products:
  Xh*Yh, Xl*Yl and (Xh+Xl)(Yh+Yl). The middle term is their difference, so one
  multiplication becomes additions. The three sub-multipliers are the same module
  again, so 53 bits recurse down to 13-14 bit pieces.
* **`urdhva_mult`** handles those pieces "vertically and crosswise". Product bit
  k is the sum of all a[i]&b[j] with i+j = k, plus the carry from column k-1;
  the carries ripple upward.
* **`booth_wallace_mult`** (`MM_BOOTH_WALLACE`). Radix-4 Booth recoding turns the
  multiplier into 27 digits in {-2..+2}. The 27 partial products are reduced by
  levels of 3:2 carry-save adders, and one final adder sums the last two rows.

## Floating-point units

| module | function |
|--------|----------|
| `fp_prod_exact` | sign XOR, exponent sum minus bias, exact 106-bit significand product (no rounding) |
| `fp_mul_mp`     | `fp_prod_exact`, then a one-bit normalise, cut to the mode width, pack |
| `fp_align`      | puts the term with the larger exponent first; shifts the other right, ORing lost bits into a sticky bit |
| `fp_sumnorm`    | signed add (negates a negative difference), leading-one normalise, cut, pack |
| `fp_addsub`     | a +- b = `fp_align` + `fp_sumnorm` on 54-bit terms |
| `fused_addsub`  | X = A + B and Y = A - B: one shared `fp_align`, two `fp_sumnorm`; `op` = 1 gives Y = B - A |
| `fused_dot2`    | Y = AB +- CD: two exact products, one alignment, **one** rounding |
| `fused_dot3`    | X = AB +- CD, Y = CD +- EF: three exact products, CD shared; `op[0]` signs X, `op[1]` signs Y |

The fused units matter most when products nearly cancel. For example,
(1+2^-30)^2 - (1+2^-29) = 2^-60. The fused unit returns this exactly. Two rounded
products followed by a subtraction return 0.

## Complex multiplier structures (`cmul_mp`)

(a + jb)(c + jd) = (ac - bd) + j(bc + ad), where x = a + jb is the data and
w = c + jd is the twiddle.

| `METHOD` | real part | imaginary part | multipliers |
|----------|-----------|----------------|-------------|
| `CM_CONVENTIONAL` | ac - bd | bc + ad | 4 |
| `CM_GOLUB` (default) | a(c-d) + d(a-b) | d(a-b) + b(c+d) | 3, plus pre-adders c-d, a-b, c+d |
| `CM_FUSED_DOT`    | `fused_dot2`(a,c,b,d,-) | `fused_dot2`(b,c,a,d,+) | 4 inside two fused units |
| `CM_FUSED_3TERM`  | `fused_dot3` X with A=a, B=c-d, C=d, D=a-b | Y with E=b, F=c+d | 3 inside one fused unit |

The Golub form saves a multiplier because the product d(a-b) appears in both
parts. The three-term fused unit has exactly this shape: its CD product feeds
both outputs. So the unit is used here for the Golub form, and the conventional
form uses two two-term units.

No single combination is declared best. The defaults (Golub structure,
Karatsuba-Urdhva multiplier) are a choice; every other combination is a parameter
away.

## The FFT (`mpfp_fft`)

**Architecture.** The FFT is memory based: one processing element (`radix8_pe`)
and one memory of N complex words (N = 128 by default). A frame passes through
three phases:

1. **LOAD.** `in_ready` is high. Each accepted sample (`in_valid`) is written at
   its digit-reversed address, and its mode tag is replaced by the `mode` input
   sampled with the frame's first sample. The whole frame therefore runs in one
   precision.
2. **COMPUTE.** N/8 cycles per stage. Each cycle, the PE reads eight words,
   transforms them combinationally, and writes them back in place.
   * Stage 0 (radix 2) does four butterflies per cycle on adjacent pairs, with
     no twiddles.
   * Radix-8 stage s (span Lp = 2*8^(s-1)) runs butterfly b on addresses
     g*8*Lp + j + m*Lp, m = 0..7, where g = b / Lp and j = b mod Lp. Input m is
     multiplied by W_N^(j*m*N/(8*Lp)) before the 8-point DFT
     (decimation in time: X = A + BW, Y = A - BW).
3. **UNLOAD.** `out_valid` is high for N cycles. `out_data` / `out_index` give
   X[0..N-1] in natural order. There is no back-pressure.

**Reordering.** The input reordering matches the stage order. Write n as
t*(N/2) + u, where t is one bit and u has base-8 digits u_0..u_(K-1). Sample n
goes to address t + 2*(u with its base-8 digits reversed).

**Processing element.** `radix8_pe` has seven twiddle multipliers
(`cmul_mp`). They are followed by an 8-point DFT in three radix-2 layers built
from `cbfly` (complex `fused_addsub` pairs):

* a factor -j is a swap of real and imaginary parts plus one sign flip;
* the factors (1-j)/sqrt2 and -(1+j)/sqrt2 go through two more `cmul_mp`.

In radix-2 stages, the first layer takes the adjacent pairs instead, and its
outputs are the results.

**Twiddles.** `twiddle_rom` holds W_N^k = cos(2*pi*k/N) - j*sin(2*pi*k/N) for
k = 0..N-1 as doubles. The table is computed during elaboration with `$cos` /
`$sin`, so no data file is needed. Exact values are forced at the quarter points.

**Timing at N = 128.**

| phase | cycles |
|-------|--------|
| load | 128 (if the source does not stall) |
| compute | 48 (3 stages x 16) |
| unload | 128 |

There is one combinational path from memory read, through up to two complex
multipliers and three butterfly layers, to memory write. It is not pipelined.

**Parameters.**

* N must be 2*8^K: 16, 128 or 1024. Anything else stops elaboration.
* `METHOD` and `MULT` pass down to every complex multiplier.

**Reset.** `rst_n` is synchronous and active low. It resets the control (state,
counters, frame mode) but not the sample memory.

## Simulating

All units except the FFT are combinational. Every testbench prints
`TB_RESULT checks=N failures=M`. The floating-point testbenches import
`tb/tb_fp_pkg.sv`, which holds independent reference helpers (conversion to
`real`, own mode rules, tolerance tests). With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb --top-module tb_fp_mul_mp \
  rtl/mpfp_pkg.sv tb/tb_fp_pkg.sv tb/tb_fp_mul_mp.sv && ./obj_dir/Vtb_fp_mul_mp
```

| testbench | what it checks |
|-----------|----------------|
| `tb_urdhva_mult`, `tb_karatsuba_mult`, `tb_booth_wallace_mult` | bit-exact against `*`, corner and random operands |
| `tb_fp_mul_mp` | both significand multipliers, bit-exact against an integer reference; every mode, auto choices, specials |
| `tb_fp_addsub`, `tb_fused_addsub` | random sums and differences within the mode's precision; exact cases and specials |
| `tb_fused_dot2`, `tb_fused_dot3` | random dot products; the single-rounding case; the Golub mapping |
| `tb_cmul_mp` | all four structures and Booth-Wallace against the complex product in `real` |
| `tb_twiddle_rom` | all 128 entries against `$cos` / `$sin`, plus the five-digit samples of W64^k |
| `tb_radix8_pe` | radix-8 and radix-2 modes at 52- and 8-bit precision |
| `tb_mpfp_fft` | N = 16: five frames in different modes (incl. auto) with random input stalls; each frame against a direct DFT; the 4-cycle compute phase; counts every mechanism |
| `tb_mpfp_fft_full` | default N = 128: three frames (modes 6, 4, auto) against a 128-point DFT; checks the 48-cycle compute phase |

Builds that include the FFT or the PE take 2-3 minutes of C++ compilation. The
simulations themselves take well under a second.

Measured largest errors at N = 16 are about 1e-13 in mode 6, 0.2 in mode 2 and
6e-6 in mode 4, with outputs of magnitude about 20-50. The mode-2 and mode-4
errors match the 2^-8 and 2^-23 truncation steps.

## How far to trust it, and where it is this design's own

The following follow the source description:

* the format, mode codes and mantissa widths;
* sign XOR and exponent addition;
* the Karatsuba split with a 16-bit crossover to Urdhva;
* radix-4 Booth with a Wallace tree;
* the conventional and Golub structures;
* the interfaces of the fused units (operands, outputs, 1- or 2-bit operation input);
* the twiddle definition;
* a 128-point DIT FFT with radix-2 and radix-8 stages.

The following are this design's own choices, made where the source is silent:

* the auto-mode rule and the rule for operands with different tags;
* rounding toward zero, and the handling of range limits;
* the whole floating-point adder, and the reading of "fused" as exact products
  with one rounding;
* what the operation bit of the add-subtract unit does, and the bit assignment
  of the three-term unit's operation input;
* the default structure and multiplier;
* the memory-based FFT organisation, the radix-8 butterfly built from radix-2
  layers, the stage order, addressing and handshakes;
* the full-circle twiddle table.

Not built:

* radix-2-only and radix-4 FFTs (named only as comparison points);
* the carry-select and carry-save replacements for Urdhva's ripple;
* separate narrow multipliers per mode;
* any pipelining.

The design runs on one clock with no clock-domain crossings. It has no memory
macros: the sample memory is a register array with eight read and eight write
ports. Power, area and delay, the figures of merit that motivate the modes, are
not something this RTL measures.
