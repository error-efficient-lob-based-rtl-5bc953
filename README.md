# LOBAM: leading-one-bit approximate multipliers

An exact N x N multiplier spends most of its area and delay on its
partial-product array. LOBAM gets rid of that array. Each operand is cut
into two halves, and each half-by-half product is replaced by an
approximation that needs only shifts, one addition and one subtraction.
The approximation is built on the *leading one bit* (LOB) of each half.

This repository holds synthesizable SystemVerilog for the two published
variants, LOBAM0 and LOBAM1. It follows the architecture in E. Jagadeeswara
Rao and P. Samundiswary, "Error efficient LOB-based approximate multipliers
for error-tolerant applications". It also holds an image smoothing filter
that uses the multipliers, which is the application the variants were
evaluated with. The RTL was written from that description, and it is not
the authors' code. Where the description leaves something open, the choice
made here is stated below and in the header comment of each file.

## The approximation

Split an operand half `A` into its leading one `Ald` (the highest set bit,
as a one-hot value) and the rest `a'`, so `A = Ald + a'`. Do the same for
`B`. Then

    A*B = Ald*B + A*Bld - Ald*Bld + a'*b'

LOBAM keeps the first three terms and drops `a'*b'`:

    A*B  ~  Ald*B + A*Bld - Ald*Bld

Each kept term has a power of two as a factor, so it is a shift:

| term      | hardware                          |
|-----------|-----------------------------------|
| `Ald*B`   | `B << pos(A)`                     |
| `A*Bld`   | `A << pos(B)`                     |
| `Ald*Bld` | `Ald << pos(B)` (one bit set)     |

This gives the following properties. The testbenches check each one.

* **Size of the error.** The error is exactly `a'*b'`. It is never negative,
  so the result never exceeds the exact product.
* **Exact cases.** The result is exact when either half is zero or a power
  of two (then `a'` or `b'` is zero).
* **Worst case.** For W-bit halves the error is largest when both halves
  are `1111...1` (or `0111...1`). Then `a'` and `b'` are both
  `2^(W-1) - 1`. For 8 x 8 this gives a worst case of
  49*256 + 2*49*16 + 49 = 14,161 for LOBAM1, and
  49*256 + 2*49*16 + 15*15 = 14,337 for LOBAM0 (which drops all of `XL*YL`).
  The exhaustive testbench measures exactly these values.

## LOBAM0 and LOBAM1

With `X = XH*2^(N/2) + XL` and `Y = YH*2^(N/2) + YL`, the exact product is

    X*Y = XH*YH*2^N + (XH*YL + XL*YH)*2^(N/2) + XL*YL

* **LOBAM0** (`rtl/lobam0.sv`) computes the three upper partial products in
  arithmetic units AU-1..AU-3 and drops `XL*YL` completely.
* **LOBAM1** (`rtl/lobam1.sv`) adds AU-4 for `XL*YL`.

So for every input, `LOBAM0 <= LOBAM1 <= X*Y`. LOBAM1 costs one more AU and
one more adder.

Both variants have the same structure:

```
 x ─┬─ XH ─ lob_unit ─┐
    └─ XL ─ lob_unit ─┤        ┌─ AU-1 (XH,YH) ─────────────┐
 y ─┬─ YH ─ lob_unit ─┼────────┼─ AU-2 (XH,YL) ─┐            │
    └─ YL ─ lob_unit ─┘        ├─ AU-3 (XL,YH) ─┴─ A1 ─<<N/2─┴─ A2 ─┬─────── z   (LOBAM0)
                               └─ AU-4 (XL,YL) ─────────────────────┴─ A3 ─ z   (LOBAM1)
```

* The *extractor* is only the part-selects `{xh, xl} = x` and `{yh, yl} = y`.
* There is one LOB unit per operand half, shared by every AU that uses that
  half.
* The adder order shown (A1, then A2, then A3) is this design's choice.

All multiplier logic is combinational: no clock, no handshake, and the
latency is the gate delay. The published designs were synthesised for
1 GHz in 90 nm CMOS, with no pipeline registers described. If you need a
pipeline, register the AU outputs.

## Building blocks

| file | block | what it does |
|------|-------|--------------|
| `rtl/lob_unit.sv` | LOB unit | `ld[j] = a[j] & ~a[j+1] & ... & ~a[W-1]`, a chain of NOT/AND terms. Also gives the binary position `pos` of the leading one, which is what the shifters need. |
| `rtl/barrel_shifter.sv` | barrel shifter | Logarithmic left shifter: one 2:1-multiplexer level per bit of the shift amount. |
| `rtl/lob_au.sv` | arithmetic unit | Three barrel shifters form the three terms. A Han-Carlson adder adds the first two. A second Han-Carlson adder subtracts the third, as `+ ~t + 1`. When an operand is zero, its terms are forced to zero (zero is detected from the OR of its mask). |
| `rtl/hc_adder.sv` | Han-Carlson adder | Parallel-prefix adder with carry in and carry out. A Kogge-Stone tree runs over the odd bit positions only, and one final level fills in the even positions. It is used for A1-A3 and inside the AUs. |
| `rtl/lobam_pkg.sv` | package | `variant_e` (`LOBAM0`/`LOBAM1`) and an index-width helper. |

Some points to note when reading the code:

* **Where the LOB units sit.** The AU takes the mask and position of each
  operand as inputs; it does not compute them. In the multipliers, each
  half has one LOB unit and that unit feeds two AUs.
* **Range of the AU result.** The AU result always fits in `2W` bits,
  because it never exceeds `A*B`. The subtractor works on `2W+1` bits, and
  an immediate assertion checks that its top bit is clear and that it
  carried out (no borrow).
* **Range of the multiplier result.** The final adders never carry out,
  because the result never exceeds `X*Y`. The multipliers also assert this.
* **Operand width.** `N` must be even. An odd `N` stops elaboration with an
  error.

## Image smoothing filter

`rtl/isf.sv` computes one smoothed pixel per clock from a 3x3 window of
8-bit pixels:

    out = min(255, (sum_k AM8(window[k], KERNEL[k]) + 128) >> 8)

* `AM8` is an 8 x 8 LOBAM0 or LOBAM1, chosen by the `VARIANT` parameter.
* The nine products are added exactly. Only the multiplications are
  approximate.
* Timing: `window` and `in_valid` are sampled on the rising edge.
  `out_pix` and `out_valid` come one cycle later.
* `rst_n` is synchronous and active low. It clears `out_valid`.
* `window[k]` is in raster order: `k = 3*row + col`, with the centre at 4.

The published evaluation uses "the standard mask" without giving its
coefficients. The default `KERNEL` here is a 3x3 mean filter in Q8 (eight
coefficients of 28 and a centre of 32, which add up to 256). The
coefficients are deliberately not powers of two; with power-of-two
coefficients the LOB approximation would be exact. Also this design's own:

* the rounding constant, the clip to 255, the output register and the
  valid flag;
* the lack of line buffers.

The filter takes complete windows. Forming windows from a raster stream,
and handling the image border, is left to the surrounding system. The
testbench does this with replicated edges.

`rtl/lobam_top.sv` puts everything side by side. LOBAM0 and LOBAM1 at
`N = 16` share the operands `x` and `y`. Two filters share one window
stream: `isf0` uses LOBAM0 and `isf1` uses LOBAM1.

## Measured accuracy

The testbenches print these figures. The error is `exact - approximate`.
MRED is averaged over inputs whose exact product is non-zero.
NMED = MED / (2^N - 1)^2.

| size | variant | inputs | MED | MRED | WCE | NMED |
|------|---------|--------|-----|------|-----|------|
| 8 x 8 | LOBAM0 | all 65,536 | 1434.4 | 7.64e-2 | 14,337 | 2.21e-2 |
| 8 x 8 | LOBAM1 | all 65,536 | 1382.9 | 5.91e-2 | 14,161 | 2.13e-2 |
| 16 x 16 | LOBAM0 | 100,016 random | 1.172e8 | 9.01e-2 | 1,065,353,217 | 2.73e-2 |
| 16 x 16 | LOBAM1 | 100,016 random | 1.172e8 | 8.98e-2 | 1,065,304,321 | 2.73e-2 |

The 16 x 16 worst case is the maximum over the sample, not over all inputs.
The published error tables list different values:

* For 8 x 8, the published MED values are 1089 and 987, the same order as
  the values here.
* The published WCE and 16 x 16 figures cannot come from the equation
  implemented here. For example, a 16 x 16 MED of about 10^3 is not
  possible when the `XH*YH` error alone is weighted by 2^16.

Treat the table above, which is reproducible from this RTL, as the
reference for this implementation.

The image smoothing filter was run on two synthetic 256 x 256 images (the
standard test pictures are not included). Each filter's output was
compared with the same filter built with exact multipliers. The table
gives the PSNR and a global SSIM (one window covering the whole image):

| image | LOBAM0 PSNR | LOBAM1 PSNR | LOBAM0 SSIM | LOBAM1 SSIM |
|-------|-------------|-------------|-------------|-------------|
| gradient with blocks | 28.0 dB | 30.5 dB | 0.9947 | 0.9962 |
| noisy texture | 32.7 dB | 37.5 dB | 0.9963 | 0.9978 |

For every pixel, `pix0 <= pix1 <= exact` holds.

## Simulating

Every testbench checks itself and ends with
`TB_RESULT checks=<n> failures=<m>`. Each one has a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    --top-module tb_lobam_top rtl/lobam_pkg.sv tb/tb_lobam_top.sv -o sim
./obj_dir/sim
```

Always pass `rtl/lobam_pkg.sv` first; the other files are found through `-y`.

| testbench | what it covers | run time |
|-----------|----------------|----------|
| `tb_hc_adder` | 16- and 33-bit adders: corner cases and 20,000 random sums | < 1 s |
| `tb_lob_unit` | 8- and 5-bit LOB units, exhaustive | < 1 s |
| `tb_barrel_shifter` | two shifter sizes, exhaustive | < 1 s |
| `tb_lob_au` | 4- and 8-bit AUs, exhaustive, plus the exact-case and never-exceeds properties | < 1 s |
| `tb_lobam0`, `tb_lobam1` | 8 x 8 exhaustive, 16 x 16 corner cases and 100,016 random pairs; prints the metrics above | ~1 s |
| `tb_isf` | both filter variants: random windows, idle cycles, reset mid-stream, one-cycle latency, a hand-worked flat window | < 1 s |
| `tb_lobam_top` | whole design at default parameters: 50,005 multiplications, then two full 256 x 256 frames through both filters with idle cycles and a mid-frame reset; prints PSNR and SSIM; counts every mechanism and fails if one never occurs | ~5 s |

In each testbench, the reference model computes the approximation from its
defining formula with ordinary `*`. It does not copy the shifter/adder
structure of the RTL.

## Changing it

* **Multiplier size.** Set `N` on `lobam0`, `lobam1` or `lobam_top`. It must
  be even. All internal widths follow from `N`.
* **Filter.** Set `VARIANT`, `KERNEL` (nine 8-bit coefficients) and `SHIFT`
  (log2 of the mask sum). If the coefficients add up to more than
  `2^SHIFT`, the clip to 255 takes effect.
* **Synthesis.** The multipliers and the filter are plain combinational
  logic plus one register stage in the filter. There are no memories, no
  vendor cells and no technology-specific parts.

## Where this departs from the published description

* **LOB equation.** The published equation limits its product to bit
  `n-2`. Here the leading-one detector covers every bit of the half
  operand, top bit included.
* **Binary position.** The LOB unit's binary position output, the zero
  gating in the AU, and the use of the Han-Carlson adder as the AU's
  subtractor are additions of this design. They were needed because the
  shifters and subtractor are described only by name.
* **Barrel shifter and Han-Carlson adder.** These are textbook forms; the
  original gate-level designs are not described.
* **Adder order.** The order in which A1-A3 combine the partial products
  is chosen here.
* **Filter.** The filter's mask, rounding, clipping, register stage and
  window interface are all choices of this design.
* **Accuracy.** The figures differ from the published tables, as described
  under "Measured accuracy".
