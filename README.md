# Two-parallel 24-tap FIR filter with fast-FIR sub-filters and multiplier-free products

This is a 24-tap symmetric FIR filter that takes two input samples and
delivers two output samples on every clock. It saves hardware in two ways.

1. **Fast FIR algorithm (FFA).** Two-parallel filtering would normally need
   four half-length sub-filters. The FFA needs three. The variant used here
   is arranged so that two of those three sub-filters have symmetric
   coefficients, and each of those needs only half of its multipliers.
2. **Multiplier-free products ("LUT-less distributed arithmetic").** Every
   coefficient is a constant, so each product is built as a sum of shifted
   copies of the sample, one copy per set bit of the coefficient. There are
   no multipliers and no look-up tables.

Samples are 8-bit two's complement and outputs are 24-bit.

## The arithmetic

The 24 taps are `h(0) … h(23)`, with `h(k) = h(23-k)`. Split them into the
even taps `H0 = {h(0), h(2), …, h(22)}` and the odd taps
`H1 = {h(1), h(3), …, h(23)}`. Split the input the same way:
`X0 = x(2k)` and `X1 = x(2k+1)`. The two output streams
`Y0 = y(2k)` and `Y1 = y(2k+1)` are then

    Y0 = H0·X0 + z⁻¹·H1·X1          (z⁻¹ = one block = two samples)
    Y1 = H0·X1 + H1·X0

The design computes them from three sub-filter products:

    A = (H0+H1)(X0+X1)      B = (H0−H1)(X0−X1)      C = H1·X1
    Y0 = (A+B)/2 − C + z⁻¹C
    Y1 = (A−B)/2

Expand A and B to check this: A+B = 2(H0X0 + H1X1) and A−B = 2(H0X1 + H1X0).

Why this saves hardware: `H1` is `H0` reversed, because the full filter is
symmetric. As a result:

- the `H0+H1` sub-filter is **symmetric**: `a(i) = a(11−i)`.
- the `H0−H1` sub-filter is **antisymmetric**: `b(i) = −b(11−i)`.
- the `H1` sub-filter has no symmetry of its own.

The two symmetric sub-filters need 6 distinct products each. The `H1`
sub-filter needs 12. That makes 24 constant multipliers in all. A
conventional two-parallel FFA needs 1.5·N = 36. The structure also uses
2 pre-processing adders and 4 post-processing adders. That count does not
grow with the filter length.

**Exact halving.** The coefficients are first quantized to integers
`q(k) = round(h(k)·2¹³)`. The sub-filter coefficients are then formed from
those integers:

    a(i) = q(2i) + q(2i+1)
    b(i) = q(2i) − q(2i+1)
    c(i) = q(2i+1)

So `A+B` and `A−B` are always even, and the divide by two is a lossless
arithmetic shift. The output is bit-exact with the direct 24-tap convolution
`y(n) = Σ q(k)·x(n−k)`.

## Blocks

| module | role |
|---|---|
| `fir2p_pkg` | Constants, the coefficient table, the quantizer and the sub-filter coefficient functions. Also the port types `in_pair_t` and `out_pair_t`, and the `symmetry_e` enum. |
| `ffa_preadd` | Forms `X0+X1` and `X0−X1`, one bit wider than the inputs. Combinational. |
| `da_const_mult` | Multiplies by a constant using shift-and-add over the set bits of `|COEF|`. A negative coefficient adds one negation. Combinational. |
| `sym_subfilter` | A `TAPS`-tap transposed direct-form sub-filter. It has `ceil(TAPS/2)` products, and each product is added at tap `i` and at mirror tap `TAPS−1−i`. When `SYM = SYM_ODD`, the mirror tap subtracts the product instead. The symmetry of `COEFS` is checked when the design is elaborated. |
| `da_subfilter` | A `TAPS`-tap transposed direct-form sub-filter with one product per tap. It computes `H1·X1`. |
| `ffa_postadd` | Forms `Y0` and `Y1`. It holds the block-delay register for `C` and the output registers. |
| `fir2p_da_top` | Connects the pre-adders, the three sub-filters and the post-adders. |

### The transposed sub-filter

A sub-filter with coefficients `c(0) … c(M−1)` keeps `M−1` partial sums.
On every enabled clock, with the current input `x`:

    y      = c(0)·x + s(1)                  (combinational output)
    s(i)  <= c(i)·x + s(i+1),  1 ≤ i < M−1
    s(M−1)<= c(M−1)·x

All taps see the same input sample. That is why one product can serve two
taps: `c(i)·x` and `c(M−1−i)·x` are the same value, or its negative.

## Interface and timing (`fir2p_da_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset. It clears all filter memory, so earlier samples count as zero. |
| `in_valid` | in | 1 | `x_in` holds a block |
| `x_in` | in | `in_pair_t` (2×8) | `x0 = x(2k)`, `x1 = x(2k+1)` |
| `out_valid` | out | 1 | `y_out` holds a block |
| `y_out` | out | `out_pair_t` (2×24) | `y0 = y(2k)`, `y1 = y(2k+1)` |

- **Throughput:** one two-sample block per clock.
- **Latency:** one clock. `out_valid` is `in_valid` delayed by one cycle.
- **Input gaps:** when `in_valid` is low, every delay line and the `z⁻¹C` register hold their value. A gap in the input stream therefore does not change the result, and the output register also holds.
- **Critical path:** the path is combinational from the pre-adder, through the shift-add product and one tap adder, to the post-adders. There is no pipeline register inside it.

## Sizes and numbers

| item | value | origin |
|---|---|---|
| taps N | 24 (12 per sub-filter) | reference design |
| parallelism L | 2 | reference design |
| input / output width | 8 / 24 bits | reference design |
| coefficient values | `h(0)…h(11)` = 0.156394, 0.07832, 0.043769, 0.090583, 0.041809, 0.043890, 0.364409, 0.004082, 0.077261, 0.410924, 0.49934, 0.05092 (mirrored for `h(12)…h(23)`) | reference design |
| coefficient scale | 2¹³, rounded to nearest | this design's choice |
| quantized taps `q(0)…q(11)` | 1281, 642, 359, 742, 342, 360, 2985, 33, 633, 3366, 4091, 417 | computed by `fir2p_pkg::quant_taps` |
| internal sub-filter width | 26 bits | this design's choice |

The coefficient scale 2¹³ is the largest that keeps the worst-case output
inside 24 bits: `128 · Σ|q| = 128 · 30502 = 3,904,256 < 2²³`. The top refuses
to elaborate if `ACC_WIDTH` or `OUT_WIDTH` is too small for the coefficient
table.

The reference design specifies a low-pass filter: 48 kHz sampling, pass-band
edge 960 Hz, stop-band edge 1200 Hz. The coefficient values above do not give
that response. The DC gain is about 3.72, and tones at 1200 Hz and 12 kHz are
not strongly attenuated; `fir2p_workload_tb` measures the peak gain relative to DC. The results are 0.98 at 240 Hz, 0.77 at 960 Hz, 0.67 at 1200 Hz, 0.10 at 4.8 kHz and 0.27 at 12 kHz. The
hardware does not depend on the values. To use your own symmetric filter, edit
`H_REAL`, and `COEF_FRAC` if needed, in `fir2p_pkg`. Every sub-filter
coefficient and bound is derived from those two.

## Departures and choices

These points are not specified by the reference design; this implementation
chose them:

- **Quantization.** The reference names a maximum-absolute-difference
  quantizer but does not give it. Plain rounding to 13 fractional bits is used.
- **Number format.** Samples are two's complement.
- **Control.** The valid/enable handshake, the asynchronous reset and the
  output register (one clock of latency) are this design's.
- **Filter length.** The reference says "filter order 24" in one place, but
  everywhere else it uses 24 coefficients. This design has 24 taps, which
  means order 23.
- **Negative products.** Negative coefficients occur only in `H0−H1`. Each is
  built as its magnitude's shift-add followed by a negation. The bit patterns
  are plain binary, not recoded (for example to canonical signed digit).
- **The `H1` sub-filter.** The reference does not describe its inside. It uses
  the same transposed form as the other two.
- **No area or power figures.** The reference quotes area and power from a
  commercial synthesis flow. This RTL does not reproduce them.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>`, and each has a
watchdog.

| testbench | what it checks |
|---|---|
| `da_const_mult_tb` | Every 9-bit input against `x·COEF`, for coefficients 4508, −3333, 10, 1 and 65535. |
| `ffa_preadd_tb` | All 65,536 input pairs. |
| `sym_subfilter_tb` | The 12-tap symmetric and antisymmetric sub-filters of the design, plus 5-tap odd-length ones. Each is compared every cycle with a direct convolution, with random input gaps, full-scale stretches and a reset partway through. |
| `da_subfilter_tb` | The `H1` sub-filter and a 7-tap mixed-sign filter, under the same stimulus. |
| `ffa_postadd_tb` | The `Y0`/`Y1` equations, the delayed `C` skipping input gaps, and one-clock output timing. |
| `fir2p_da_top_tb` | The full design at default parameters, against a direct 24-tap convolution whose tap values are written out in the testbench. It checks the one-clock latency on every cycle. It counts input gaps, a reset in mid-stream, the full-scale output `−128·Σq` being reached, and blocks in which the delayed `H1X1` term contributes; any count of zero is a failure. |
| `fir2p_workload_tb` | The design on 48 kHz tones (240 Hz to 12 kHz), compared sample by sample with `fir2p_mult_ref`. That model is a behavioural version of the same FFA equations built with ordinary `*` multipliers. |

For example:

    verilator --binary --timing --top-module fir2p_da_top_tb -y rtl -y tb +libext+.sv \
        rtl/fir2p_pkg.sv tb/fir2p_da_top_tb.sv -o sim && ./obj_dir/sim

Name `rtl/fir2p_pkg.sv` first, because the modules import it. Lint a module
with `verilator --lint-only -Wall rtl/fir2p_pkg.sv rtl/<module>.sv -y rtl`.

**Remaining lint warning.** `ffa_postadd` computes `Y0` and `Y1` wider than the
output and keeps only the low 24 bits. The unused-bits warning for this is
intended: the true filter output always fits in 24 bits.
