# Adjustable-precision divider and fingerprint normalizer

Dividing fixed-point numbers usually means converting operands to a common
scale, dividing integers and re-scaling the result. This divider skips that
step. Before dividing, it appends zeros to the dividend and to the divisor.
An ordinary restoring long division of the two padded numbers then yields the
quotient directly, in any chosen format of integer and fraction bits. One
quotient bit is produced per step, so a quotient of `n` bits takes `n` clocks,
whatever its value.

The repository holds two builds of that divider:

- an iterative one, one step per clock;
- a pipelined one, one result per clock.

It also holds the application the divider was designed for: the normalization
stage of fingerprint image enhancement. That stage maps every gray level to a
new one, so that the image has a prescribed mean and variance. It needs square
roots, computed by Newton iteration on the dividers, and one division per
pixel, done in the pipelined divider.

## Operand initialization: how precision is chosen

An operand format is written `I.F`: `I` integer bits, then `F` fraction bits,
unsigned. Let the dividend be `DVD_I.DVD_F`, the divisor `DVS_I.DVS_F`, and
the wanted quotient `Q_I.Q_F`, with `Q_W = Q_I + Q_F` bits.

Initialization appends zeros to each operand's raw bits:

| register | contents | width |
|---|---|---|
| partial dividend `A` | dividend, then `DVS_F + Q_F - DVD_F` zeros | `DVD_I + DVS_F + Q_F` |
| divisor `B` | divisor, then `Q_W` zeros | `DVS_I + DVS_F + Q_W` |

Why it works: the quotient bit of weight `2^j` (raw units) must be decided
against the divisor times `2^j`. Step `i` (i = 1 … `Q_W`) shifts `B` right by
one, leaving the divisor times `2^(Q_W-i)`. That is exactly the weight of
quotient bit `Q_W-i`. After `Q_W` steps, `B` is back to the raw divisor, and
the collected bits are

    quotient = floor( dividend_raw * 2^(DVS_F + Q_F - DVD_F) / divisor_raw )

This is the value `dividend / divisor` in `Q_I.Q_F` format, truncated. What is
left in `A` is the remainder, in units of the padded dividend. The pad length
of the dividend must not be negative (`DVS_F + Q_F >= DVD_F`); an elaboration
assertion checks this. The widths are computed by functions in
`rtl/divider_pkg.sv`.

Worked example: 128 / 11 with a 4.7 quotient. The dividend is 8.0, the
divisor 4.0. `A = 128·2^7 = 16384` (15 bits), `B = 11·2^11 = 22528` (15 bits).

| step | divisor after shift | partial dividend before | compare | bit |
|---|---|---|---|---|
| 1 | 11264 | 16384 | ≥ | 1 |
| 2 | 5632 | 5120 | < | 0 |
| 3 | 2816 | 5120 | ≥ | 1 |
| 4 | 1408 | 2304 | ≥ | 1 |
| 5 | 704 | 896 | ≥ | 1 |
| 6 | 352 | 192 | < | 0 |
| 7 | 176 | 192 | ≥ | 1 |
| 8 | 88 | 16 | < | 0 |
| 9 | 44 | 16 | < | 0 |
| 10 | 22 | 16 | < | 0 |
| 11 | 11 | 16 | ≥ | 1 |

The quotient is `1011.1010001` = 11.6328 (exact 11.6364), after 11 clocks;
the remainder is 5. The testbenches check this trace step by step.

The caller chooses `Q_I`. If the true quotient needs more integer bits, its
upper bits are lost; no overflow flag exists. A zero divisor gives an
all-ones quotient.

## The division step (`sub_divider`)

The step is combinational. It has three inputs (partial dividend, divisor,
partial quotient) and the same three outputs:

1. shift the divisor right by one bit;
2. compare the partial dividend with the shifted divisor;
3. if the dividend is not smaller, subtract and shift a 1 into the quotient
   from the right; otherwise keep the dividend and shift in a 0.

Equality counts as "not smaller", which exact quotients need. The shifted
divisor is an output, so the next step shifts it again. The subtraction is a
plain `-`; the synthesis tool picks the adder architecture (for example
carry-look-ahead), as the critical path is this subtract/compare.

## Two dividers

**`divider_iterative`** wraps one `sub_divider` with registers on its three
outputs, fed back to its inputs. In the clock where `start` is sampled, the
step reads the freshly padded operands and a zero quotient. The registers then
hold the state of step 1.

| cycle | event |
|---|---|
| t | `start` high, `busy` low |
| t+1 … t+Q_W-1 | `busy` high |
| t+Q_W | `done` pulses; `quotient`, `remainder` valid, held until next start |

A new `start` is accepted in the `done` cycle. A `start` while `busy` is
ignored.

**`divider_pipeline`** unrolls the loop into `Q_W` `sub_divider` stages, each
followed by registers. Operands presented with `in_valid` in cycle `t`
come out with `out_valid` in cycle `t+Q_W`, with a throughput of one division
per clock and no stalls. `in_tag` (`TAG_W` bits) travels alongside, so a
caller can keep per-operand data aligned. The cost is `Q_W` copies of the
three registers: at the default size about 3,600 flip-flops, against about 160
for the iterative build.

Both default to the 32-bit operand size at which the method's speed and area were reported:
32.0 dividend, 32.0 divisor, 32.7 quotient (39 clocks). The 7 fraction bits
follow the worked example. The 32 integer bits are chosen so that any 32-bit
quotient fits.

## Square roots (`sqrt_newton`)

The root of an unsigned integer `a` is refined with Newton's step

    m' = (m + a/m) / 2

1. **Start value.** The unit finds the largest integer whose square does not
   exceed `a`. It searches bit by bit, with one trial square per clock
   (`A_W/2` clocks).
2. **Newton steps.** `ITERS` steps follow. Each step runs on its own
   `divider_iterative`, with more quotient fraction bits than the step
   before. Step `k` uses `max(1, SF >> (ITERS-1-k))` fraction bits: 2, 4 and
   8 at the defaults. Early steps are far from the answer, so extra precision
   there would be wasted clocks.

The divisor is the current estimate in `A_W/2 . SF` format. The quotient has
`A_W/2 + 1` integer bits, which is enough because `a/m < m + 3` when
`m ≥ floor(sqrt(a))`.

The root has `A_W/2` integer and `SF` fraction bits. It saturates at all
ones, which only radicands just below `2^A_W` reach. A zero radicand returns
zero without dividing.

Timing, from `start` to `done`: `1 + A_W/2 + Σ(1 + A_W/2 + 1 + F_k) + 1`
clocks. That is 54 at the defaults (16-bit radicand, 8 fraction bits, 3
steps).

Accuracy: with the default schedule, the result is within 3/256 of the true
root; the testbench checks this for random radicands. The schedule trades
accuracy for speed. For example, √5 comes out as 2 → 2.25 → 2.21875 →
2.234375: the 4-bit middle step truncates 5/2.25 to 2.1875. A longer schedule
or a larger `SF` gives more digits.

## Normalization unit (`fp_normalizer`, top level)

For an image with mean `M` and variance `VAR`, the unit maps each gray level
`I` to an image with desired mean `M0` and variance `VAR0`:

    N = M0 + |I - M| · sqrt(VAR0) / sqrt(VAR)    if I > M
    N = M0 - |I - M| · sqrt(VAR0) / sqrt(VAR)    otherwise

The square roots depend only on the image, not on the pixel. The mean and
variance are computed elsewhere, beforehand, and supplied as inputs.

**Configuration.** Pulse `cfg_start` with `mean`, `variance`, `m0` and `var0`
held. Two `sqrt_newton` units run in parallel (54 clocks). `cfg_ready` then
rises and stays high until the next `cfg_start`; a `cfg_start` while the roots are being computed is ignored. The roots are visible on
`sqrt_var0` and `sqrt_var`.

**Pixel stream.** `pix_ready` equals `cfg_ready`, held low in a `cfg_start` cycle. While it is high, one pixel
per clock is accepted on `pix_valid`/`pix_in`. The pixel passes through
three parts:

| part | work | clocks |
|---|---|---|
| stage 1 | `abs(I - M) · sqrt(VAR0)`, 16.8 format; sign of `I - M` kept | 1 |
| `divider_pipeline` | divide by `sqrt(VAR)` (8.8), quotient 16.1; sign rides as tag | 17 |
| output stage | round quotient to integer, add to / subtract from `M0`, clamp to 0…255 | 1 |

Results leave in order on `out_valid`/`pix_out`, 19 clocks after their pixel,
with no stalls. Issue `cfg_start` only when no pixels are in flight. A zero
`variance` gives a zero divisor, and the output then clamps to 0 or 255.

Default formats: 8-bit pixels, 8-bit integer mean, 16-bit integer variances
(an 8-bit image has variance at most 127² = 16129), 8 root fraction bits, 1
quotient fraction bit for rounding.

## What follows the published method and what is this design's own

Taken from the method:

- the padding rule;
- the shift / compare / subtract step with a right shifter on the divisor and
  a left shifter on the quotient;
- one quotient bit per clock, with the step's outputs fed back;
- the pipeline of registered steps fed with a zero quotient;
- square roots by Newton steps on dividers of rising precision;
- the normalization formula and the use of the pipelined divider for the
  per-pixel work.

Chosen here, where the method is silent:

- `>=` as the compare (the method speaks only of "bigger");
- the padding of fractional dividends (subtract the dividend's own fraction
  bits);
- the quotient format for the 32-bit size (32.7);
- all handshakes (`start`/`busy`/`done`, valid bits, tags,
  `cfg_start`/`cfg_ready`);
- the asynchronous active-low reset `rst_n`;
- the remainder outputs;
- the bit-by-bit start value and the 2/4/8 precision schedule of the square
  root;
- every width in the normalizer; rounding, clamping, and where the division
  sits in the pixel path.

Not reproduced:

- the reported 242.1 MHz and about 1.85k gates for 32-bit operands, which
  belong to a particular 0.13 µm library and synthesis flow;
- the comparison dividers, which are other people's designs;
- the computation of image mean and variance.

## How far it is verified

Each module has a self-checking testbench in `tb/`. Each compares against
integer reference models written independently in the testbench, checks
cycle counts, and ends with a `TB_RESULT checks=… failures=…` line.

- `tb_sub_divider`: 2,000 random steps, with operands near the compare
  threshold and the equality case.
- `tb_divider_iterative`:
  - the 128/11 trace above, step by step;
  - 200 random 32-bit divisions at the default size, with quotient,
    remainder and 39-clock latency checked;
  - a fractional-divisor format.
- `tb_divider_pipeline`: a random stream with bubbles at the default size
  (39 stages), checked for order, latency, tags and back-to-back results,
  plus 128/11 on an 11-stage instance.
- `tb_sqrt_newton`: a bit-exact fixed-point model, the error bound against
  `$sqrt`, and the clock count, on edge values and random radicands.
- `tb_fp_normalizer`, at default parameters:
  - four image configurations with about 1,100 pixels;
  - every output and its 19-clock latency checked;
  - every mechanism is counted and must occur: reconfiguration, pixels
    above and below the mean, clamping at both ends, back-to-back output,
    pixels held off during configuration.

- `tb_normalize_image`: a whole 64 × 64 synthetic ridge image (mean about
  110, variance about 254) normalized to mean 100 and variance 100. The
  output statistics must land within 1.5 of the target mean and 10 % of the
  target variance; the run gives 99.99 and 100.4. The stream must take exactly
  pixels + 19 clocks.

Not verified: timing closure and area on any technology.

## Simulating

All files are plain SystemVerilog 2017. The package must come first. For
example, for the top-level testbench:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/divider_pkg.sv rtl/sub_divider.sv rtl/divider_iterative.sv \
        rtl/divider_pipeline.sv rtl/sqrt_newton.sv rtl/fp_normalizer.sv \
        tb/tb_fp_normalizer.sv --top-module tb_fp_normalizer
    ./obj_dir/Vtb_fp_normalizer

Any other testbench builds the same way, with its own name as the top module.
Each finishes in well under a second. `-Wno-fatal` keeps verilator's width
warnings on the testbenches' 64-bit reference arithmetic from stopping the
build.

## Files

| file | contents |
|---|---|
| `rtl/divider_pkg.sv` | padding and register-width functions |
| `rtl/sub_divider.sv` | one division step (combinational) |
| `rtl/divider_iterative.sv` | one step per clock, with the operands padded internally |
| `rtl/divider_pipeline.sv` | `Q_I+Q_F` registered steps, one result per clock |
| `rtl/sqrt_newton.sv` | start-value search plus Newton steps on iterative dividers |
| `rtl/fp_normalizer.sv` | top level: two square-root units and the pixel pipeline |
| `tb/tb_*.sv` | one self-checking testbench per module |
