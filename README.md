# Kerneltron: mixed-signal matrix-vector multipliers for kernel machines

A support vector machine classifies an input vector **X** by comparing it with many stored
templates (support vectors) **X**<sub>m</sub>. For inner-product kernels each comparison is
`f(X · X_m)`. The decision is the sign of `sum_m alpha_m y_m f(X · X_m) - b`. Nearly all of the
work is the matrix-vector product `Y_m = sum_n W_mn X_n` over hundreds of inputs and templates.

The Kerneltron architecture computes that product in a dense analog array. Each cell stores one
template bit as charge in a DRAM-like cell. It multiplies that bit by an input bit, and all
cells of a row add their charge on a shared sense line. Everything outside the array is digital.
Templates and inputs are split into bit planes, and each binary partial product is converted
to a number at the end of every row. The multi-bit result is then put together digitally.

This repository holds SystemVerilog for three variants of the idea. It also holds a digital
kernel classifier that turns the products into a decision.

| Variant | Array | Conversion per row | Main module |
|---|---|---|---|
| Kerneltron II (main) | 256 inputs x 128 rows, signed (XOR) cells | delta-sigma algorithmic ADC, 8 bits in 34 cycles | `kt2_core` |
| Kerneltron I | 512 x 128 per chip, unsigned (AND) cells | gray-code flash ADC per bit plane | `kt1_chip`, `kt1_multichip` |
| Stochastic encoding | 1024 x 128 signed cells | small flash ADC, inputs randomised | `kt_stoch` |

`kerneltron_top` places all three side by side. They share only clock and reset, and their
ports carry the prefixes `k2_`, `k1_` and `ks_`. The Kerneltron II path also feeds the
classifier (`bitplane_combiner` then `kernel_svm`).

## The arithmetic behind the array

Write an I-bit template element and a J-bit input as sums of bits:
`W = sum_i 2^(I-1-i) w^(i)` and `X = sum_j 2^j x^(j)` (or `2^(J-1-j)`, depending on the order).
Then

    Y_m = sum_i sum_j 2^(I-1-i) 2^j  *  sum_n w_mn^(i) x_n^(j)

The inner sum is a binary-binary product over all N inputs. That is what one array row
computes in one cycle for one template bit plane `i` (stored on its own row) and one input
plane `j` (presented on all columns at once). The template's I bit planes sit on I adjacent
rows. Input planes follow one another in time. The design differs from variant to variant
only in how the analog row sums are quantized and how the weights `2^...` are applied.

### The cell models

`cid_dram_array` is a behavioural model of the array. Charge is counted in integer sub-units,
64 per cell.

- **AND cells** (Kerneltron I): a cell adds one cell charge when its stored bit and its input
  bit are both 1. Every active input line also couples a little charge onto every row,
  whatever the template holds. This feed-through is set to 4 sub-units per active input, a
  value this design chose.
- **XOR cells** (Kerneltron II and stochastic): two cells form a complementary pair. Bits
  stand for +1/-1, and each pair adds +1 cell when input and template agree and -1 when they
  differ. The pair cancels the feed-through.
- **Leakage**: the even and odd columns of each row have separate refresh select lines.
  Each half row keeps a time stamp. A half row left without a write or refresh for more than
  `RETENTION` cycles loses its charge, which reads as "no charge". The default of 213,000
  cycles is 64 ms at a 300 ns clock. It is an assumption modelled on standard DRAM refresh.

`dram_refresh_ctrl` refreshes one half row per `REFRESH_PERIOD` (800) cycles, in the order
even, odd, next row, so the whole array is visited well inside the retention time. A request
that arrives while the template port is writing or reading waits, and `ref_deferred` shows
it.

## Kerneltron II: oversampled inputs and a delta-sigma algorithmic converter

This is the part that needs the most explanation.

**Unary input coding.** A signed 4-bit input X (-8..7) is not presented as 4 binary planes.
It is presented as 16 equal-weight planes of +1/-1: +1 for the first X+8 planes and -1 for
the rest, so the 16 bits sum to 2X (`unary_encoder`). For one template bit plane,
row r therefore sees in cycle k the charge

    Y_r[k] = sum_n w_rn * x_n[k]        (w, x in {+1, -1})

Summed over the 16 cycles this is `2 * sum_n w_rn X_n`. No digital weighting of input planes
is needed, because every plane has the same weight.

**Incremental delta-sigma step.** Each row has a first-order modulator (`ds_modulator`,
behavioural). Its input is `u = Y / (N * cell)`, scaled to [-1, 1]. On each cycle it does:

    y = sign(w)          (the first cycle of a step forces y = -1)
    w = w + alpha * (u - y)

A counter (`decim_shift_counter`) adds +1 or -1 per output bit. The integrator stays
bounded, so after the 16 input cycles plus one zero-input cycle the count equals the sum of
`u`, to within one count.

**Residue resampling.** The remaining error of the count is what is left in the integrator.
At the end of the step the integrator value is sampled as a residue, scaled by
`beta = 1/alpha`, and the integrator is reset. In the circuit this is done by swapping the
two capacitors of the switched-capacitor accumulator, so `alpha * beta = 1` holds however
badly the capacitors match. The counter is shifted left by 4 bits. The same modulator then
converts the residue for another 16 + 1 cycles, which yields the next 4 bits. Two steps give
8 bits in `2 x (16 + 1) = 34` cycles, against 257 cycles for a plain 8-bit incremental
conversion. The end result per row is

    q_r  ~=  16 * sum_k u[k]  =  32 * sum_n w_rn X_n / N          (+/- 1 LSB)

which is an 8-bit signed number for N = 256.

**Timing** (`kt2_sequencer`). `start` is accepted when idle. `busy` is high for 34 cycles and
`done` pulses in the next cycle. `q[]` then holds the results. In the same cycle
`output_serializer` starts to send them out, one row per cycle, on `sout`, `sout_idx` and
`sout_valid`. Inputs shifted during a conversion are ignored, and `x_dropped` flags them.

**Loading.** Templates enter serially: `w_sdi`/`w_shift` fill a 256-bit register, and
`w_write` stores it into row `w_row`. `w_read` copies a row back into the register so it can
be shifted out on `w_sdo`, for testing. Inputs enter one word per cycle through `x_shift`/`x_din`.
The word shifted in first ends up in the highest column.

**Classification.** `bitplane_combiner` merges the 4 rows of each 4-bit template, weighting
row i by `2^(3-i)`. `kernel_svm` then handles one template per cycle:

1. It takes the template result, shifts it right by `QSHIFT` (5) and saturates it to 8 bits.
2. It reads the kernel function `f` from a 256-entry table that the host writes.
3. It multiplies that value by the template's coefficient `alpha_m * y_m`.
4. It accumulates the products.

It then subtracts the bias and reports `score` and `decision = (score >= 0)`. The
classifier starts by itself when a conversion finishes and ends M+1 cycles later (33 cycles
for 32 templates).

## Kerneltron I: flash converters and a reference chip

`kt1_chip` uses unsigned AND cells. Templates load through two shift registers, one for the
even and one for the odd columns. The input bit planes are presented one per cycle, least
significant first. Every row has its own gray-coded flash converter (`flash_adc`,
behavioural: round to nearest, saturate, gray code). The converter is 5 bits by default.
Its step is set so that the full row (all cells on, plus feed-through) fills the range.

`kt1_multichip` builds the multi-chip system:

- **Chips.** P processor chips (default 2) receive the same inputs and hold different
  templates. A third chip holds all-zero templates.
- **Offset compensation.** The third chip's output is pure offset: feed-through that depends
  on the input, plus, since all chips share one refresh clock, the same leakage.
  `offset_comp` subtracts its code row by row from each processor's decoded code.
- **Reconstruction.** `shift_accumulate` rebuilds every template's product. Within a plane
  it weights the I rows by `2^(I-1-i)`. Across planes it shifts and accumulates, LSB plane
  first, so no multiplier is needed.
- **Timing.** A conversion takes XBITS + 1 = 5 busy cycles: four planes and a final
  accumulation. `done` follows.

The flash step is larger than one cell charge at full size (about 17.6 cells for 512
inputs), so results are in ADC units and carry quantization error. With a step of exactly
one cell, the result is the exact integer product. The testbench uses this to check the
datapath bit for bit.

## Stochastic encoding

The binary partial sums of real data use the whole range of a row, which needs a
high-resolution converter. If the input bits look like fair coin flips, a row sum of N
random +1/-1 terms stays within a few times `sqrt(N)` of zero. The converter then only needs
about `log2(sqrt(N))` bits plus a margin. `kt_stoch` makes the inputs look random:

- **Modulation** (`stoch_modulator`). Every column subtracts a fixed pseudo-random number
  `U_n` from its 8-bit input, `X~ = X - U`. U is uniform over a 12-bit signed range, about 15
  times the input range. The subtraction is done serially, least significant bit first,
  with one full adder and one borrow flip-flop per column. The U bits come from a per-column
  constant, generated at elaboration by an xorshift function of the column index and `SEED`.
  The result is a 13-bit two's-complement word, presented as 13 planes.
- **Conversion.** The XOR array forms each plane's row sum. An 8-bit flash converter with a
  step of one cell, centred on zero, resolves sums within +/-128 cells exactly. A code at
  either end of the range counts in `ovf_count` as a possible clip.
- **Reconstruction.** `shift_accumulate` adds the planes with weights `2^t`, and the sign
  plane is subtracted. The random part `sum_n W_n (1 - 2U_n)` does not depend on the input.
  A calibration conversion with all-zero inputs (`calibrate` high with `start`) measures it
  once, and `stoch_reconstruct` removes it from every later result. After calibration,
  `result[m] = 2 * sum_n W_mn X_n` exactly, as long as nothing clipped.
- **Timing.** Busy for 13 cycles, then `done`.

Templates on this path are 8 bits with +1/-1 digits on 8 rows, giving 16 templates per 128
rows.

## What follows the published architecture and what is this design's choice

The following follow the published architecture:

- The array sizes: 256 x 128 for Kerneltron II, 512 x 128 for Kerneltron I, 1024 inputs for
  the stochastic path.
- The cell arithmetic, AND or XOR, and the feed-through-free differential pair.
- The alternating even/odd refresh, template read-back and serial template loading, with
  separate even and odd registers in Kerneltron I.
- The 4-bit unary input coding over 16 cycles.
- The delta-sigma algorithmic conversion: first order, incremental steps, residue resampled
  with `alpha * beta = 1`, a counter shifted by 4 bits between steps, and 8 bits in 34 cycles.
- Bit-plane reconstruction by weighting and shift-and-accumulate.
- Offset compensation with a reference chip and a shared refresh clock.
- Stochastic encoding: subtracting a fixed uniform random offset, one full adder, one
  register and a ROM per column, and a precomputed offset product.
- The classifier structure: a look-up table kernel, weighted sum and threshold.

The following are this design's own choices:

- All timing and handshakes (start/busy/done), the serial output format, and the refresh
  period and order.
- Deferring refresh while the template port is in use, and dropping input shifts during a
  conversion.
- The sub-unit charge scale, the feed-through size and the retention time.
- The modulator's initial condition, `alpha = 0.5`, and counting +/-1 per bit.
- The flash resolutions: 5 bits for Kerneltron I and 8 bits for the stochastic path.
- Two processor chips in the Kerneltron I system.
- The stochastic ROM generator, and measuring the offset product by a calibration conversion.
- The classifier's table size, word widths and the `QSHIFT` scaling.

Some published figures disagree with each other:

- **Conversion length.** Both 32 and 34 cycles are quoted for an 8-bit conversion. This
  design uses the 34-cycle schedule, which includes the zero-input cycle of each step.
- **Range of the random offset.** It is given both as about `+/-sqrt(N)` and as "15 times
  the image range" (12-bit encoding). The 12-bit range is used.
- **Stochastic converter.** The published work suggests combining stochastic encoding with
  unary oversampling. This design uses per-plane flash conversion on that path instead.

Not built:

- **Wavelet stage.** Wavelet feature extraction ahead of the classifier can be folded into
  the templates, because both are linear. There is no separate stage.
- **Alternative converters.** Row-parallel converters that the work only compares with
  (non-radix-2 flash, algorithmic partial conversion, row-cumulative conversion) are not
  included.
- **Host and tiling.** There is no tiling controller for problems larger than one array. A
  pedestrian detector with 1,326 features and more than 4,000 support vectors would need
  about 750 Kerneltron II chips, or reloading of templates.

## How far to trust it

- `cid_dram_array`, `ds_modulator` (uses `real`) and `flash_adc` are **behavioural models**
  of analog circuits. They are exact and noise-free, and leakage is all-or-nothing. They say
  nothing about the mismatch, noise or nonlinearity that limit the real chips. Everything
  else is synthesizable RTL.
- The Kerneltron II results are checked against `32 * sum(w*X) / N`. They stay within
  +/-1 LSB in the tests, and the tests accept +/-2. With `alpha` changed to 0.43 the
  converter gives the same results.
- The Kerneltron I and stochastic paths are checked bit-exactly where the quantization
  allows it.

## Files and parameters

`rtl/kt_pkg.sv` holds the shared sizes: `KT2_N_IN = 256`, `KT2_ROWS = 128`, 4-bit templates
and inputs, `KT2_ELL = 4` and `KT2_STEPS = 2`; `KT1_N_IN = 512`, `KT1_ROWS = 128`,
`KT1_ADC_BITS = 5`; `CELL_UNITS = 64`. Each module's header comment describes its interface
and timing. The sizes of the top are its parameters `K2_*`, `K1_*` and `KS_*`.

## Simulating

Every testbench in `tb/` checks itself. It prints `TB_RESULT checks=<n> failures=<n>` and
has a watchdog. For example:

    verilator --binary --timing -Wno-fatal -y rtl -Irtl rtl/kt_pkg.sv tb/tb_kt2_core.sv \
        --top-module tb_kt2_core -Mdir obj && obj/Vtb_kt2_core

The testbenches:

- Each block has one, named `tb_<block>`, usually run at reduced size.
- `tb_kerneltron_top` runs all three paths end to end at reduced size. It counts every
  mechanism and fails if one never happens: conversions, residue steps, refreshes, refresh
  deferral, dropped inputs, serial output, read-back, both classifier decisions,
  feed-through compensation and calibration.
- `tb_kerneltron_full` does the same at the full default sizes, with no parameter changes.
  It includes an idle period longer than the retention time, and takes about two minutes.
