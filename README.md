# FIR filter with radix-4 Booth tap multipliers

In a digital FIR filter most of the logic and most of the switching activity
sit in the tap multipliers. This design builds the filter around a multiplier
that needs fewer partial products: the **radix-4 (modified) Booth
multiplier**. A 16x16 Booth multiplier needs 8 partial products instead of the
16 of a plain shift-and-add array. The filter uses the **transposed** form,
which puts a register after every adder. Its critical path is one multiplier
plus one adder, whatever the filter length.

For comparison, two simpler multipliers are included. Both are sequential and
handle one multiplier bit per clock:

* a **shift-and-add** multiplier for unsigned operands;
* a **radix-2 Booth** multiplier for two's complement operands.

They stand beside the filter in the top level with ports of their own. The
filter does not use them.

All arithmetic is two's complement unless stated otherwise. The default
operand width is 16 bits, the width this design is built around. The filter
has 8 taps by default; that length is a free choice and can be set by
parameter.

## The radix-4 Booth multiplier (`booth_r4_mult`)

This is the part worth understanding first. It is purely combinational.

### Recoding the multiplier

Append a 0 below the multiplier's LSB, giving `y[-1] = 0`. Then read the
multiplier in overlapping groups of three bits, `{y[2i+1], y[2i], y[2i-1]}`
for `i = 0 .. N/2-1`. Consecutive groups share one bit. Each group is worth
the digit `-2*y[2i+1] + y[2i] + y[2i-1]`, which always lies in {-2, -1, 0, +1, +2}.
The multiplier then equals `sum_i digit_i * 4^i`, so

    MD * MR = sum_i (digit_i * MD) << 2i

Each partial product is one of 0, ±MD or ±2MD. None of these needs an adder
to form: 2MD is a wire shift, and -MD is made once and shared by all
partial products.

| triplet | digit | `neg` | `x` (|d|=1) | `z` (|d|=2) |
|---------|-------|-------|-------------|-------------|
| 000     | 0     | 0     | 0           | 0           |
| 001     | +1    | 0     | 1           | 0           |
| 010     | +1    | 0     | 1           | 0           |
| 011     | +2    | 0     | 0           | 1           |
| 100     | -2    | 1     | 0           | 1           |
| 101     | -1    | 1     | 1           | 0           |
| 110     | -1    | 1     | 1           | 0           |
| 111     | 0     | 0     | 0           | 0           |

For odd N the multiplier's sign bit is repeated once, so that the last group
still has three bits. There are `ceil(N/2)` partial products.

### The four parts

```
            MD ──┬───────────────────────────────┐
                 └─► twos_comp_gen ── -MD ──┐     │
                                            ▼     ▼
 MR,0 ─► booth_r4_encoder[i] ─ctrl─► booth_pp_gen[i] ─ pp[i] (N+2 bits)
                                            │
                          sign-extend to 2N, shift left 2i
                                            ▼
                              csa_tree (carry-save rows)
                                     sum, carry
                                            ▼
                                    sum + carry ─► prod (2N bits)
```

* `twos_comp_gen` forms `-MD` by inverting every bit and adding 1 through an
  explicit ripple chain of half adders. Its output is N+1 bits wide, so that
  `-(-2^(N-1))` is exact.
* `booth_r4_encoder` decodes one triplet into the three control lines in the
  table above. The `neg` line is this design's addition: two select lines
  alone cannot carry the sign.
* `booth_pp_gen` is a multiplexer. It picks `+MD` or `-MD` by `neg`, then
  passes the pick, its 1-bit left shift or zero. The result is an (N+2)-bit
  signed partial product, wide enough for the range -2^N .. +2^N.
* `csa_tree` folds the shifted partial products into one sum vector and one
  carry vector. It uses a linear chain of 3:2 carry-save rows (`csa_row`,
  full adders side by side). No carry ripples inside the chain. For 16-bit
  operands that is 6 rows.

The last step is one carry-propagate addition, `sum + carry`. It is written
as a plain `+` so that synthesis can pick the adder. All of these vectors are
worked modulo 2^(2N). Every partial product is sign-extended to 2N bits, and
that is enough to make the wrapped result exact: an N x N signed product
always fits in 2N bits.

### Choices to know about

* The operands are two's complement. For 16 bits that gives 8 partial
  products, not the 9 an unsigned radix-4 recoding needs.
* The carry-save array is a linear chain, not a Wallace tree. It is the
  simplest correct arrangement but not the shallowest: its depth is M-2
  full-adder levels. You can replace `csa_tree` with any tree that keeps the
  `sum + carry == Σ ops (mod 2^W)` contract.
* The multiplier has no registers and no pipelining.

## The transposed FIR filter (`fir_transposed`)

The filter computes `y[n] = Σ_{k=0}^{L-1} f[k] · x[n-k]`. In the transposed
form every tap multiplies the *current* sample by its weight, and the delay
line holds partial sums instead of samples:

```
z[L-1] <= f[L-1]·x[n]
z[k]   <= f[k]·x[n] + z[k+1]     1 <= k < L-1
y      <= f[0]·x[n] + z[1]
```

There is one `booth_r4_mult` per tap. The weight goes to the Booth-recoded
(MR) input and the sample to the multiplicand (MD) input.

* **Widths.** Samples and weights are N bits wide. The partial sums and the
  output are `2N + clog2(L)` bits (35 bits at the defaults), so no sum can
  overflow, even with every operand at -2^(N-1).
* **Timing.** The filter takes one sample per clock while `in_valid` is 1.
  `out_valid`/`y_out` follow exactly one clock later, because the output is
  registered. A cycle with `in_valid = 0` leaves all state alone, so samples
  may arrive at any rate up to the clock rate.
* **Weights** are input ports, `coef[L]`, and are meant to stay constant.
  If you change them while the filter runs, the change takes effect sample by
  sample: partial sums already in `z[]` keep the weights they were formed with.
  Run L samples through after a change before trusting the output, or reset.
* **Reset** is synchronous and active low (`rst_n`). It clears the partial
  sums and the output.

## The sequential multipliers

Both use the same handshake. Raise `start` for one clock with the operands
on `a` and `b`; `start` is ignored while `busy` is 1. A product takes **N
clocks**, 16 at the default width. The first bit or bit pair is handled on
the clock edge that accepts `start`, and the rest on the following N-1
edges. `done` pulses for one clock when the product is ready, and `product`
then holds until the next start.

* `shift_add_mult` (unsigned). At step i it adds the multiplicand, shifted i
  places left, if multiplier bit `y[i]` is 1, and adds 0 otherwise. The
  multiplicand register shifts left by one place per clock.
* `booth_r2_mult` (signed). At step i it looks at the pair
  `(y[i], y[i-1])`, with `y[-1] = 0`. Pair `01` adds the shifted
  multiplicand, `10` subtracts it, and `00` and `11` add nothing. Because the
  top pair has weight -2^(N-1), the result is a correct two's complement
  product without any correction step.

The handshake, the one-bit-per-clock schedule and the reset are choices of
this design. The arithmetic rules are the textbook ones described above.

## Top level (`fir_mult_top`)

`fir_mult_top` instantiates `fir_transposed` with the ports `fir_*`,
`shift_add_mult` with the ports `sa_*` and `booth_r2_mult` with the ports
`r2_*`. The three share only `clk` and `rst_n`. The top has two parameters:
`N` (16) and `TAPS` (8).

## Files

| file | contents |
|------|----------|
| `rtl/fir_pkg.sv` | default sizes and `booth_ctrl_t` (`neg`, `x`, `z`) |
| `rtl/twos_comp_gen.sv` | -MD by invert and ripple +1 |
| `rtl/booth_r4_encoder.sv` | triplet → Booth digit controls |
| `rtl/booth_pp_gen.sv` | 0/±MD/±2MD selection |
| `rtl/csa_row.sv`, `rtl/csa_tree.sv` | 3:2 row; carry-save chain |
| `rtl/booth_r4_mult.sv` | the combinational radix-4 Booth multiplier |
| `rtl/fir_transposed.sv` | L-tap transposed FIR |
| `rtl/shift_add_mult.sv`, `rtl/booth_r2_mult.sv` | sequential multipliers |
| `rtl/fir_mult_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench computes its expected values itself, from plain integer
arithmetic. Each one ends by printing `TB_RESULT checks=<n> failures=<m>`,
and each has a clock-count watchdog.

* `twos_comp_gen`: all 65,536 inputs.
* `booth_r4_encoder`: all eight triplets.
* `booth_pp_gen`: every 8-bit multiplicand against every digit.
* `csa_tree`: random and all-ones operand sets, for 8 and for 3 operands.
* `booth_r4_mult`:
  * 16x16 on all pairs of corner values and on 20,000 random pairs;
  * 8x8 exhaustive;
  * 7x7 exhaustive, which covers odd widths.
* `fir_transposed`, at default size:
  * an impulse response;
  * full-scale inputs at the most negative values;
  * random weights and samples with random idle cycles;
  * `out_valid` checked every clock for the 1-clock latency.
* `shift_add_mult`, `booth_r2_mult`:
  * corner values and 3,000 random pairs;
  * each product checked for exactly N clocks of latency, `busy` throughout,
    and a second `start` while busy that must be ignored.
* `tb_fir_mult_top` runs the whole top at its default parameters. It drives:
  * the filter with a symmetric low-pass-like set of weights, then with
    random weights;
  * both sequential multipliers at the same time, including small example
    operands (8·8, 8·16, 12·8, -12·8).

  It counts how often each mechanism occurred: every Booth digit value, idle
  filter cycles, ignored `start` pulses and every radix-2 bit-pair case. It
  fails if any of them never occurred.

* `tb_figure_examples` runs small hand-worked products at the widths of
  textbook illustrations: 4x4 shift-and-add (8·8 = 64), 8x8 radix-2 Booth
  (12·8 = 96, -12·8 = -96, -128·-128) and the same pairs through the 16x16
  radix-4 multiplier. It also checks the N-clock latency at those widths.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
  rtl/fir_pkg.sv tb/tb_fir_mult_top.sv --top-module tb_fir_mult_top
./obj_dir/Vtb_fir_mult_top
```

Each testbench finishes in well under a second.

## Limits and departures

* Nothing here has been checked for timing or area on a real target. The
  multipliers' only claimed property is that they are correct at any
  width N >= 4, and `fir_transposed` needs L >= 2.
* The filter's length and sample width, the weights as run-time ports, the
  `in_valid` qualifier and the output register are this design's own choices.
* A radix-8 Booth multiplier, the natural next step, is not included.
