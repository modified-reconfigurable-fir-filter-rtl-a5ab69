# FIR filter with APC-OMS look-up-table multipliers

A fixed-coefficient multiplier can be replaced by a memory: store every
product `A*X` and use `X` as the address. For a 5-bit input this table has 32
words. This design shrinks it to **nine words** by combining two ideas, and
builds a direct-form FIR filter whose every tap multiplier is such a
reduced look-up table (LUT).

* **Anti-symmetric product coding (APC).** For a 5-bit `X = x4..x0`, the
  products of `X` and of its two's complement add up to `32A`. So every
  product is `16A ± X'·A`, where `X'` is the low nibble `XL = x3..x0` when
  `x4 = 1` and the 4-bit two's complement of `XL` when `x4 = 0`. Only the 16
  multiples `0..15A` are needed, and an adder/subtractor steered by `x4`
  finishes the product.
* **Odd-multiple storage (OMS).** Among `0..15A` every even multiple is an
  odd multiple shifted left: `6A = 3A<<1`, `12A = 3A<<2`, `8A = A<<3`. So only
  `A, 3A, 5A, ..., 15A` are stored, and a barrel shifter of 0..3 positions
  recovers the rest.

Two inputs fall outside this pattern. `X = 00000` needs the APC word `16A`
(product `16A - 16A = 0`): a ninth word, `2A`, is stored at address `1000`
and shifted three times. `X = 10000` needs the APC word 0 (product `16A`):
a RESET signal clears the LUT output instead of storing a zero.

## The multiplier datapath

```
 X[4:0] ─► address generator ──d[3:0]──► 4-to-9 decoder ──w[8:0]──► 9-word LUT ──► barrel shifter ──► add/sub ──► P = A·X
              │ X'                                                   ▲  clr            ▲ s1 s0        ▲ x4, 16A
              └──────────────► control circuit ───────────────────────┴─────────────────┘
```

| Step | Module | What it computes |
|---|---|---|
| APC + OMS address | `apc_addr_gen` | `X'` as above; then `X''` = `X'` with its trailing zeros removed (an odd number); address `d2 d1 d0 = x''3 x''2 x''1`, `d3 = (X' == 0)` |
| shift count, RESET | `oms_shift_ctrl` | `s0 = ¬(x'0 ∨ ¬(x'1 ∨ ¬x'2))`, `s1 = ¬(x'0 ∨ x'1)`, which is the number of trailing zeros of `X'` (3 for `X' = 0`); `RESET = d3 ∧ x4` |
| word select | `addr_dec_4to9` | a 3-to-8 decoder of `d2..d0` enabled by `¬d3`, plus `w8 = d3` |
| storage | `oms_lut` | word `i` = `(2i+1)·A` for `i = 0..7`, word 8 = `2A`; each `W+4` bits; AND-OR read; RESET forces 0 |
| even multiples | `barrel_shifter` | two log stages: `<<1` if `s0`, then `<<2` if `s1` |
| product | `apc_add_sub` | `16A + word` if `x4 = 1`, `16A − word` if `x4 = 0` |

Worked examples with `A = 13`:

| X | x4 | X' | X'' | d | LUT word | shifts | APC word | product |
|---|---|---|---|---|---|---|---|---|
| 00110 (6) | 0 | 1010 | 0101 | 0010 | 5A = 65 | 1 | 130 | 208 − 130 = 78 |
| 11100 (28) | 1 | 1100 | 0011 | 0001 | 3A = 39 | 2 | 156 | 208 + 156 = 364 |
| 00000 (0) | 0 | 0000 | – | 1000 | 2A = 26 | 3 | 208 | 208 − 208 = 0 |
| 10000 (16) | 1 | 0000 | – | 1000 | (RESET) | 3 | 0 | 208 + 0 = 208 |

Widths: the largest stored word is `15A`, so the LUT is `W+4` bits wide. The
largest shifted word is `16A` (`W+5` bits). The product `0..31A` fits in
`W+5` bits. An assertion in `apc_oms_multiplier` checks that the shifter
never produces anything wider.

All of this, from the address mapping to the gate equations of the control
circuit and the 9-word layout, follows the published APC-OMS scheme. Two
parts of the multiplier are this design's own choices:

* **Part of the address generator is behavioural.** The APC mapping is a
  conditional two's complement. Bit `i` of `XL` flips when `x4 = 0` and any
  lower bit is one, which takes three XOR, three AND, two OR and one NOT
  gate. The trailing-zero removal is written as a small priority
  description and left to synthesis. The two's complement is taken first
  and the zeros are removed afterwards. That gives the same address for all
  32 inputs as the other order, and the testbench checks this
  exhaustively.
* **RESET uses the short form `d3 AND x4`.** This equals
  `NOT(x0+x1+x2+x3)·x4`.

## Reconfiguring the coefficients

The LUT words are flip-flops, not a ROM. A synchronous reset fills them with
the multiples of `DEFAULT_COEF`. A one-cycle `load` strobe fills them with the
multiples of `coef`, and the new products appear after the next clock edge.
The multiples are computed by the `oms_word()` function in `lut_mult_pkg`,
which gives `(2i+1)·A` for word `i` and `2A` for word 8. This load mechanism
is how this design makes the filter reconfigurable. The scheme itself only
assumes a coefficient that is fixed while the filter runs.

## The filter

`fir_filter` computes `y(n) = Σ_{k=0}^{N-1} h(k)·x(n−k)` in direct form:

* `x_in` feeds the tap-0 multiplier directly.
* A chain of `N−1` registers delays it for taps `1..N−1`. The chain advances
  only in cycles with `in_valid`.
* The `N` products are summed and registered.

Ports:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset (default coefficients, cleared delay line) |
| `in_valid`, `x_in` | in | 1, 5 | a new unsigned sample `x(n)` |
| `coef_we`, `coef_tap`, `coef_data` | in | 1, clog2(N), W | write `h(coef_tap) = coef_data`; takes effect from the next sample |
| `out_valid`, `y` | out | 1, W+5+clog2(N) | `y(n)`, one clock edge after its sample |

Throughput is one sample per clock, and the latency is one clock edge. The
multipliers are purely combinational. The output width holds the sum of `N`
largest products, so it cannot overflow.

Parameters (all typed, with defaults):

| Parameter | Default | Origin |
|---|---|---|
| input word length `L` (`lut_mult_pkg::XL`) | 5 | fixed by the scheme: the mapping, control equations and decoder are specific to 5 bits |
| LUT words (`lut_mult_pkg::LUT_WORDS`) | 9 | fixed by the scheme |
| `W`, coefficient width | 8 | this design's choice; the scheme works for any `W` |
| `N`, taps | 4 | this design's choice |
| `COEFS` | {25, 103, 103, 25} | this design's choice, an arbitrary symmetric set; when you change `N`, give a `COEFS` of `N` entries |

## Limits and departures

* **Unsigned data only.** Samples and coefficients are unsigned, which is
  the case the APC-OMS scheme is worked out for. Signed filters need extra
  sign handling that is not included here.
* **Only the 5-bit input word is supported.** Longer inputs would need the
  input split into 5-bit digits, with one LUT multiplier per digit and
  shifted partial sums. That is not built here.
* **Register placement is this design's choice.** There is one output
  register and no pipelining inside the multiplier. The critical path runs
  from the sample through the decoder, the LUT, the shifter, the
  adder/subtractor and the `N`-input sum.
* **No other multipliers are included.** There is no conventional 32-word
  LUT multiplier and no APC-only 16-word variant.

## Files

`rtl/`:

* `lut_mult_pkg.sv` holds the constants, types and `oms_word()`.
* Each multiplier sub-block has its own file: `apc_addr_gen.sv`,
  `oms_shift_ctrl.sv`, `addr_dec_4to9.sv`, `oms_lut.sv`, `barrel_shifter.sv`
  and `apc_add_sub.sv`.
* `apc_oms_multiplier.sv` is the complete multiplier.
* `fir_filter.sv` is the top.

`tb/` has one self-checking testbench per module, `<module>_tb.sv`. Each one:

* compares against plain integer arithmetic;
* has a watchdog;
* prints `TB_RESULT checks=<n> failures=<n>`.

The sub-block and multiplier tests are exhaustive over the 32 inputs. The
multiplier test covers the default coefficient and 23 loaded ones, at W = 8
and at W = 16. It also
counts that every shift count, RESET, add and subtract occurred.

`fir_filter_tb` runs the filter at its default parameters, with:

* an impulse;
* every input value;
* all-maximum samples and coefficients;
* about 3000 random samples with idle cycles and about 60 coefficient
  reloads;
* a mid-stream reset.

It checks every output and its timing. It fails if any multiplier mechanism,
a reload or an idle cycle never occurred.

## Simulating

With Verilator 5 (the package must come first):

```
verilator --binary --timing --assert -Irtl --top-module fir_filter_tb \
    rtl/lut_mult_pkg.sv tb/fir_filter_tb.sv
./obj_dir/Vfir_filter_tb
```

Replace `fir_filter_tb` by any other `<module>_tb` to test one block. Lint
with `verilator --lint-only -Wall -Irtl rtl/lut_mult_pkg.sv rtl/fir_filter.sv`.
The only remaining lint warning is that bit `x'3` of the APC word is not
used. The control circuit does not need it: the shift count is 3 whether
`X'` is `1000` or `0000`.
