# Self-timed single-precision floating-point multiplier

This is a multiplier for IEEE 754 single-precision (32-bit) numbers that has
no clock. A request/acknowledge handshake paces it instead. The exponent
adder is a carry look-ahead adder in dual-rail code, so it can tell when its
own result is complete. That completion signal is the multiplier's
acknowledge. The sender learns that the product is ready when the arithmetic
has actually finished, not when a worst-case clock period has passed.

The arithmetic is the textbook one. It has three independent parts, a
normalising step and special-value handling:

```
  a[31] ─┐                    b[31]
         └──► sign_unit (XOR) ─────────────────────────────┐
  a[30:23], b[30:23], req                                  │
         └──► exp_unit: st_cla (Ea+Eb, dual rail) ── done ─┼──► ack
                         cla_adder (−127) ── exp ──┐       │
  a[22:0], b[22:0]                                 ▼       ▼
         └──► mant_mul (1.fa × 1.fb, 48 bit) ──► normalizer ──► exception_unit ──► y, flags
```

## Number format and result

A word is `sign | exponent[7:0] | fraction[22:0]`. Its value is
(−1)^s · 2^(e−127) · 1.f. The multiplier computes:

* **sign** = sa XOR sb;
* **exponent** = ea + eb − 127, held inside the datapath as a 10-bit
  two's-complement number (range −127 … 384), so it never wraps;
* **significand** = (1.fa) × (1.fb), a 48-bit product in [1, 4);
* **normalisation**: if the product is 2 or more (bit 47 set), it is shifted
  right one place and the exponent is incremented;
* **truncation**: the 23 bits under the leading 1 are kept and the rest are
  dropped. Results are rounded toward zero, *not* to nearest. For example,
  445.65 × 745.78 gives `48A2489B`, where round-to-nearest would give
  `48A2489C`.

Special cases, checked in this order:

| condition | y | flag |
|---|---|---|
| an operand is NaN, or 0 × ∞ | `7FC00000` | `invalid` |
| an operand is ±∞ | ±∞ | — |
| an operand is zero or subnormal | ±0 | — |
| normalised exponent ≥ 255 | ±∞ | `overflow` |
| normalised exponent ≤ 0 | ±0 | `underflow` |
| otherwise | packed sign, exponent, fraction | — |

Subnormals are not supported. Subnormal operands count as zero, and results
too small for a normal number are flushed to zero. Zero and infinity results
carry the XOR sign.

## The self-timed carry look-ahead adder

This is the part worth reading closely.

### Single-rail carry look-ahead (`clc`, `cla_carry_gen`, `cla_adder`)

Each bit has a *carry look-ahead cell* that looks only at its own two
operand bits:

* generate `g = a·b`: a carry leaves this bit whatever comes in;
* propagate `p = a⊕b`: an incoming carry passes through;
* sum `s = p ⊕ c`, once the carry `c` into the bit is known.

The *carry generation logic* forms every carry straight from the g/p terms
and the carry-in, without waiting for the carry of the bit below to settle:

```
c[i+1] = g[i] + p[i]g[i−1] + p[i]p[i−1]g[i−2] + … + p[i]…p[0]c[0]
```

`cla_carry_gen` writes this out as a flat sum of products for each carry.
Its logic depth is the same for every bit; only the fan-in grows.
`cla_adder` is one row of cells plus one carry generation block. Its default
width is 4. The multiplier uses a 10-bit instance to subtract the bias: it
adds `~127` with a carry-in of 1.

### Dual-rail version with completion detection (`st_cla`)

In `st_cla` every bit travels on two wires, a true rail and a false rail:

| `x_t x_f` | meaning |
|---|---|
| 0 0 | spacer (no data yet) |
| 1 0 | valid 1 |
| 0 1 | valid 0 |

With both operand bits valid, a bit can *generate* (1,1), *kill* (0,0) or
*propagate* (one of each). A carry is known to be 1 through a chain of
propagates ending in a generate, and known to be 0 through a chain of
propagates ending in a kill. Both facts are look-ahead expressions of the
same form, so `st_cla` uses two `cla_carry_gen` instances:

* true-rail carries: `cla_carry_gen(g = generate, p = propagate, c0 = cin_t)`;
* false-rail carries: `cla_carry_gen(g = kill, p = propagate, c0 = cin_f)`.

A sum bit becomes valid once its half-sum and its incoming carry are valid:
`sum_t = p·c_f + (g+k)·c_t` and `sum_f = p·c_t + (g+k)·c_f`. The signal
`done` is the AND, over all sum bits and the carry-out, of "one rail is
high". Starting from the spacer, rails only rise, so `done` cannot rise
before every output holds its final value. With the inputs back at the
spacer every rail falls, and `done` with them.

`exp_unit` feeds the two 8-bit exponents into an 8-bit `st_cla`, gated by
`req`: with `req` low every rail is 0. The 9-bit sum then goes to the bias
subtractor.

## Handshake and timing (`fp_mul_st`)

`fp_mul_st` has a four-phase, return-to-zero interface:

1. The sender drives `a` and `b`, then raises `req`.
2. `ack` rises when the exponent adder is complete. `y`, `overflow`,
   `underflow` and `invalid` are valid while `ack` is high.
3. The sender drops `req`. The adder returns to its spacer and `ack` falls.
4. Only now may `a` and `b` change.

The outputs are not held: `y` is meaningful only while `ack` is high.

Only the exponent path is dual-rail. The sign XOR, the significand multiplier,
the normaliser and the exception logic are ordinary single-rail logic, and
the design **assumes** they settle no later than the exponent adder reports
completion. In zero-delay simulation this always holds. In a real
implementation the 24×24 multiplier is much slower than an 8-bit adder, so
`ack` needs a matched delay behind it. Otherwise the significand path must
be made dual-rail too. This is the main limit on how far the "self-timed"
property of this RTL can be trusted.

Deferred assertions check the protocol in simulation. `fp_mul_st` checks
that `ack` is never high while `req` is low. `st_cla` checks that no input
or output bit ever has both rails high.

The design has no storage, no clock and no reset. Everything is
combinational logic, and it synthesises as such.

## Where this design makes its own choices

The RTL follows a description that gives the multiplication steps, the
zero/infinity/overflow/underflow flow, the carry look-ahead structure and
equations, and one waveform example. These are this design's own choices:

* the four-phase interface, the dual-rail code and the completion
  detector. The description only calls the carry look-ahead adder
  self-timed, with carries "computed by using the input bits";
* truncation instead of rounding, chosen because it reproduces the
  published waveform result `48A2489B`;
* NaN handling (quiet NaN, `invalid` flag), treating subnormals as zero,
  and the overflow and underflow thresholds (IEEE 754 single limits);
* the significand multiplier is a behavioural `*`: its internal structure is
  left to synthesis;
* the standard generate/propagate definitions (g = AND, p = XOR,
  s = p XOR c).

Not built:

* a 64-bit (double-precision) version, which is mentioned only as future
  work;
* a drawing of an alignment/leading-zero-anticipation datapath (exponent
  difference, LZA, compensation shifter and so on) that appears with the
  design. Nothing in the multiplication procedure uses it, and its function
  is not described.

## Files

| file | contents |
|---|---|
| `rtl/fpmul_pkg.sv` | `float32_t` struct, widths, bias, special constants |
| `rtl/fp_mul_st.sv` | top level: handshake and datapath wiring |
| `rtl/sign_unit.sv` | sign XOR |
| `rtl/exp_unit.sv` | exponent add (self-timed) and bias subtract |
| `rtl/st_cla.sv` | dual-rail carry look-ahead adder with completion |
| `rtl/cla_adder.sv` | single-rail carry look-ahead adder |
| `rtl/clc.sv` | carry look-ahead cell |
| `rtl/cla_carry_gen.sv` | look-ahead carry logic |
| `rtl/mant_mul.sv` | 24×24 significand multiplier |
| `rtl/normalizer.sv` | normalising shift and truncation |
| `rtl/exception_unit.sv` | special operands, overflow, underflow, packing |
| `tb/tb_fp_ref_pkg.sv` | reference model (exact double-precision product, then truncated) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog if it hangs.

* `tb_fp_mul_st` runs complete handshakes. It checks that `ack` is low
  before `req`, high after it and low again after `req` falls. It covers:
  * the published examples: 5.25 × 286.75 = 1505.4375,
    6.25 × 585.25 = 3657.8125 (`45649D00`), 23 × 12, 44 × 5, 9 × 5, and
    445.65 × 745.78 = `48A2489B`;
  * signed zeros, infinities, NaNs, and overflow and underflow in both
    signs;
  * 3500 random operand pairs.

  It compares results against an exact double-precision product, truncated.
  It counts each mechanism (normalising shift, no shift, zero, infinity,
  NaN, overflow, underflow, negative result) and fails if any of them never
  occurs.
* `tb_st_cla` tests every 8-bit operand pair with both carry-ins. For each
  it checks that `done` is low in the spacer and low while only one operand
  is valid, that every output pair holds a valid code, and that the sum is
  correct.
* `tb_exp_unit` tests all 65,536 exponent pairs.
* The CLA cell and the 4-bit adder and carry logic are tested exhaustively.
* The other blocks get random and corner-case tests.

## Simulating

Everything is plain SystemVerilog-2017, and the whole design is checked at
its only size. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fpmul_pkg.sv tb/tb_fp_ref_pkg.sv rtl/*.sv tb/tb_fp_mul_st.sv \
    --top-module tb_fp_mul_st -o sim
./obj_dir/sim
```

Replace `tb_fp_mul_st` with any other `tb_<module>` to test one block. The
packages must come first on the command line. To lint a module:
`verilator --lint-only -Wall rtl/fpmul_pkg.sv rtl/*.sv --top-module <module>`.
