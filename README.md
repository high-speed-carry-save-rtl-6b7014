# Linear convolution with vertical-and-crosswise carry save multipliers

This is a combinational datapath that computes the linear convolution of two
short, finite sequences:

    y[n] = sum_k x[k] * h[n-k],   n = 0 .. L+M-2

Here `x` is an input sequence of `L` samples and `h` is an impulse response of
`M` samples. Every product `x[k]*h[m]` comes from a dedicated unsigned
multiplier. An output adder then adds the products with `k + m = n` into
`y[n]`.

The multipliers are carry save arrays. Their columns follow the Vedic "vertical
and crosswise" rule (Urdhva-Tiryagbhyam) for forming a product digit by digit.
There is no clock: `y` settles after one multiplier delay plus one adder delay.

By default the design has 4-sample sequences of 4-bit samples and 8-bit
outputs. With `x = {1,2,3,4}` and `h = {2,3,4,5}` it produces
`y = {2,7,16,30,34,31,20}`.

## Structure

```
 x[0..L-1] ──┐
             ├─► L*M x csa_vedic_mult ──prod[k][m]──► conv_adder ──► y[0..L+M-2]
 h[0..M-1] ──┘        (each: carry save array
                       + vm_adder, built from full_adder)
```

| module           | role |
|------------------|------|
| `linear_conv`    | Top level. Holds one multiplier per `(x[k], h[m])` pair and the output adder. |
| `csa_vedic_mult` | N x N unsigned multiplier. It is a carry save array with diagonal carries, ending in a vector merging adder. |
| `vm_adder`       | W-bit ripple carry adder that merges the array's sum and carry vectors. |
| `full_adder`     | One-bit full adder, the cell used by both of the above. |
| `conv_adder`     | For each output `n`, adds the products `prod[k][n-k]`. |
| `lconv_pkg`      | Default sizes (`SAMPLE_W`, `SEQ_L`, `SEQ_M`, `Y_W`) and the output-length function. |

## The multiplier: vertical and crosswise, in carry save form

Vertical and crosswise multiplication builds digit `k` of a product from every
cross product `a[i]*b[k-i]`. It then adds the carry left over from digit
`k-1`. Take 1234 x 2116. The lowest digit is 4x6 = 24: write 4, carry 2. The
next is 3x6 + 4x1 = 22, and so on up to the top digit, 1x2.

In binary, the cross products of column `k` are the AND terms `a[i] & b[j]`
with `i + j = k`. `csa_vedic_mult` adds them in a carry save array:

* **Row 0** is the partial product row `a & {N{b[0]}}`. It has no carries.
* **Row j (1 .. N-1)** has N full adders. The adder at column `i+j` takes
  three inputs:
  * the new cross product `a[i] & b[j]`;
  * the sum bit that row `j-1` left in the same column;
  * the carry that row `j-1` produced one column lower.

  A carry therefore moves one column up and one row down ("diagonally").
  Carries never ripple within a row, so every row has the delay of a single
  full adder.
* **Low product bits.** The lowest column of each row is complete once that
  row is done, so row `j` gives product bit `p[j]`.
* **High product bits.** After row `N-1`, a sum vector (columns N .. 2N-2) and
  a carry vector (columns N .. 2N-1) are left. `vm_adder` adds them once to
  give `p[2N-1:N]`. An immediate assertion checks that this addition never
  carries out of 2N bits.

In `rtl/csa_vedic_mult.sv`, the per-row vectors are `g_row[j].s` and
`g_row[j].c`. Bit `i` of a row belongs to column `i+j`, and carry `c[i]` has
weight `i+j+1`. Where a half adder would do, the array uses a full adder with
one input tied to 0.

The critical path runs through `N-1` array rows and then the `N`-bit ripple
merge. The main lever on speed is the merge adder. You can replace `vm_adder`
with a faster adder without touching the array.

## The output adder and output width

`conv_adder` gives each output sample its own sum. Output `y[n]` adds
`min(n+1, L, M, L+M-1-n)` products: one at each end, four in the middle at the
default size. The sum is written as a behavioural loop, so synthesis chooses
the adder structure. A faster, hand-built adder tree could replace it behind
the same ports.

**Outputs are `Y_W = 8` bits wide by default, and larger sums wrap modulo
256.** The exact result for 4-bit, 4-sample sequences can reach 4 x 15 x 15 =
900, which needs 10 bits. The 8-bit width matches the reference results this
design reproduces, and it is enough for the worked example. To get exact
results at the default size, set `Y_W = 10`. In general, exact results need
`Y_W >= 2*SAMPLE_W + ceil(log2(min(L, M)))`.

## Parameters and ports of `linear_conv`

| parameter  | default | meaning |
|------------|---------|---------|
| `SAMPLE_W` | 4 | bits per sample of `x` and `h` (unsigned) |
| `L`        | 4 | length of `x` |
| `M`        | 4 | length of `h` |
| `Y_W`      | 8 | bits per output sample |

| port | direction | type | meaning |
|------|-----------|------|---------|
| `x`  | in  | `logic [SAMPLE_W-1:0] x [L]`   | input sequence, `x[0]` first |
| `h`  | in  | `logic [SAMPLE_W-1:0] h [M]`   | impulse response, `h[0]` first |
| `y`  | out | `logic [Y_W-1:0] y [L+M-1]`    | output sequence, `y[0]` at time `n = 0` |

Both sequences are taken to start at time 0, so the output also starts at 0.
The hardware grows as `L*M` multipliers of `SAMPLE_W^2` cells each.

## Choices this design makes

These points are implementation choices, not part of the reference design:

* **Fully combinational.** There are no registers, reset, valid/ready or
  clock. The design was characterised only by its combinational delay, about
  15 ns on an FPGA. To pipeline it, register `x`/`h`, the products, or `y`.
* **Unsigned arithmetic** throughout.
* **One multiplier per sample pair.** There is no time-multiplexed multiplier
  or sequencing.
* **Ripple carry vector merging adder.** The merging adder's structure was not
  specified, so the simplest one is used.
* **Full-adder cells everywhere.** No half adders are used, and the array's
  row 0 is plain AND gates.
* **Wrapping 8-bit outputs** (see above).

The multiplier takes a decimal digit-by-digit rule and maps it onto bit
columns of an array. That mapping is this design's reading. Its result is an
ordinary carry save array multiplier, and it is checked against
integer multiplication for every pair of 4-bit operands and for random
12-bit operands.

## Verification

Each testbench in `tb/` checks its own results and ends by printing
`TB_RESULT checks=<n> failures=<n>`. Each also has a watchdog that fails the
run if it hangs. Outputs are sampled one time unit after the inputs change.

| testbench | what it checks |
|-----------|----------------|
| `tb_vm_adder` | The 4-bit adder for every `a`, `b` and `cin`, plus 2000 random 12-bit additions. |
| `tb_csa_vedic_mult` | All 256 pairs of 4-bit operands, including 9 x 5 = 0x2D and 12 x 13 = 0x9C. At N = 12: 1234 x 2116 = 2611144, edge operands and 3000 random pairs. |
| `tb_conv_adder` | Random product matrices, at the default size and at L = 3, M = 5 with 12-bit outputs. |
| `tb_linear_conv` | The top at its default parameters: the worked example, a unit impulse (`y` must equal `h`), all-15 inputs and 5000 random vectors. The expected values are computed modulo 256. It counts wrapped outputs, exact outputs and vectors with all samples nonzero, and fails if any of these never occurs. |
| `tb_linear_conv_sizes` | The top at L = 5, M = 3, 6-bit samples and 15-bit outputs, with exact results (no wrap). |

To run one with Verilator, pass the package first and let Verilator find the
rest through `-y`:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/lconv_pkg.sv tb/tb_linear_conv.sv --top-module tb_linear_conv
./obj_dir/Vtb_linear_conv
```

For a lint check of the RTL alone:

```
verilator --lint-only -Wall -y rtl rtl/lconv_pkg.sv rtl/linear_conv.sv
```

The top lints without warnings. Linting a lower module on its own also reports the `lconv_pkg` constants that module does not use.

## Limits

* The reported delay (about 15 ns on an FPGA) cannot be checked in RTL
  simulation. There is no cycle count to check, because the design has no
  clock.
* A general N x N multiplier is supported through `N`. The decimal example
  1234 x 2116 needs N = 12, which is exercised in the multiplier testbench;
  the convolution top uses N = `SAMPLE_W`.
* Signed samples are not supported.
