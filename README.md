# One IIR biquad, four ways to spend hardware

A second-order IIR section (a "biquad") is the usual building block of
recursive digital filters. This repository implements the same biquad four
times, each trading area against clocks per sample in a different way:

| Variant | Module | Arithmetic hardware | Clocks per sample |
|---|---|---|---|
| fully combinational | `biquad_comb` | 4 array multipliers, 3 adders | 1 |
| word-serial | `biquad_word_serial` | 1 adder (34 bit), Booth shift-and-add | 56 |
| combinational-sequential | `biquad_comb_seq` | 1 array multiplier, 1 CLA adder, 6-state FSM | 6 |
| bit-serial | `biquad_bit_serial` | 1-bit adders, serial x parallel multipliers, shift registers | 77 |

All four produce **bit-identical** output for the same input and
coefficients, because they share one fixed-point recursion (below). The
testbenches check every variant against one reference model, sample by
sample. `biquad_top` places the four variants side by side, each with its
own ports.

## The recursion and its number formats

The section is in direct form II: one delay line `w` is shared by the
feedback (denominator) and the feed-forward (numerator) paths. The
numerator has two taps:

```
s(n) = rnd(a2 * w(n-1)) + rnd(a3 * w(n-2))           21 bits, exact
w(n) = sat20( (x(n) - s(n)) << A1_SHIFT )            a(1) = 2**A1_SHIFT
y(n) = sat20( rnd(b1 * w(n)) + rnd(b2 * w(n-1)) )
```

- **Data** is 20-bit two's complement. This covers `x`, `w` and `y`.
- **Coefficients** are 14-bit two's complement with 14 fraction bits, so
  their range is [-0.5, 0.5). A filter whose true coefficients reach ±2 is
  stored as coefficients / 4.
- **a(1) restores the scale.** The leading denominator coefficient is a
  power of two, 4 by default (`A1_SHIFT = 2` in `biquad_pkg`), and is applied
  as a left shift rather than a multiplication.
- **Products** are 34 bits. `rnd` rounds a product to nearest, with ties
  rounding up: `(p + 2**13) >>> 14`. For these widths the result always fits
  20 bits, so the rounder never needs to saturate.
- **Where saturation is applied.** Only values that are stored or output
  are saturated to the 20-bit range: `w(n)` and `y(n)`.
- **The intermediates `s` and `x - s` are kept exact**, at 21 and 22 bits.
  This is deliberate. The bit-serial variant only learns that a word
  overflowed once its guard bits have streamed past, so it cannot clip in
  the middle of a chain. Keeping the intermediates exact lets all four
  variants agree bit for bit.
- **Feedback sign.** The feedback is subtracted, which matches the usual
  `1 + a2 z^-1 + a3 z^-2` denominator convention.
- **When `y` can overflow.** With these formats, `y` can exceed 20 bits in
  only one case: `b1 = b2 = -2**13` with `w(n) = w(n-1) = -2**19`. The
  saturation logic is present, but random stimulus essentially never
  exercises it. Saturation of `w` happens readily.

## The variants

### Fully combinational (`biquad_comb`)
This variant has four modified Baugh-Wooley array multipliers (`bw_mult`),
four rounders, the adders, and two saturators. `y` is a combinational
function of `x` and the registers `w(n-1)` and `w(n-2)`. It is valid in the
same cycle as `in_valid`, and the state advances on that clock edge.

The three adders are written as plain `+`/`-` and are not instances of
`cla_adder`. This is a departure. A bit-level look-ahead network combined
with four array multipliers made the C++ model that verilator builds take
many minutes to compile. A synthesis tool will choose a fast adder
structure here anyway.

### Word-serial (`biquad_word_serial`)
One 34-bit adder does everything. A multiplication recodes the 20-bit datum
into ten radix-4 Booth digits. Each digit adds or subtracts 0, 1 or 2 times
the coefficient, and the coefficient moves two places left per step.

A multiplication takes 13 cycles:
- 1 cycle clears the accumulator;
- 10 cycles add the partial products;
- 1 cycle adds the rounding constant `2**13`;
- 1 cycle reads bits 33..14.

The per-sample order is `a3*w2`, `a2*w1`, `s`, `w`, `b2*w1`, `b1*w`, `y`.
That is 4×13 + 3 = 55 busy cycles. With the accepting edge, a new sample
can enter every 56 clocks.

The interface is a handshake:
- `in_ready` is high while the block is idle;
- a sample is taken when `in_valid && in_ready`;
- `out_valid` pulses for one cycle with `y`.

### Combinational-sequential (`biquad_comb_seq`, `cs_controller`)
This variant keeps one array multiplier with its rounder and one
carry-look-ahead adder (`cla_adder`) with a saturator on its output. A
register file holds `x`, the coefficients, the state and the partial
results, and a multiplexer selects the adder operands. A six-state
controller runs the datapath:

| State | Multiplier | Adder |
|---|---|---|
| RESET (accept) | a3 · w(n-2) | – |
| S1 | a2 · w(n-1) | – |
| S2 | b2 · w(n-1) | s = p_a2 + p_a3 |
| S3 | – | w(n) = sat((x − s) << 2) |
| S4 | b1 · w(n) | – |
| END | – | y = sat(p_b1 + p_b2) |

The state variables are **ports**:
- `v1_prev` and `v2_prev` come in;
- `v1_next = w(n)` and `v2_next = w(n-1)` go out.

The parent stores `v1_next`/`v2_next` and feeds them back, as `biquad_top`
does. This way the same datapath could serve several sections in turn.

The controller waits in RESET until a sample is offered. In that state the
multiplier reads `v2_prev` and `a3` straight from the ports, because they
are not yet in the register file. After END it returns to RESET, so a
sample can enter every 6 clocks. `out_valid` pulses in the cycle after END,
with `y` and the next state.

### Bit-serial (`biquad_bit_serial`)
This is the hardest variant to follow. Words travel LSB first, one bit per
clock, and every multiplier is a serial × parallel shift-and-add unit
(`serial_mult`). Each multiplier takes the datum serially and holds the
14-bit coefficient in parallel. It produces the 34-bit product in 34
clocks: 20 data bits, then 14 copies of the sign bit.

**Registers and data path.**
- A P/S register converts the input sample.
- SR1 is a 14-stage delay. It lines `x(n)` up with the rounded products,
  which appear only after the 14 fraction bits have passed.
- SR2 holds `w(n-1)` and SR3 holds `w(n-2)`. Both circulate, so a word can
  be read while it is being rewritten.
- `serial_round` adds the rounding bit with a serial incrementer. The
  receiving register is simply not enabled during the 14 dropped bits.
- `serial_adder` (one full adder and a carry flip-flop) forms
  `s = p_a2 + p_a3` and then `x − s`.
- The a(1) stage delays the stream by `A1_SHIFT` cycles with zeros in
  front, which is a left shift.
- SR4 parks the rounded b(2) product. SR5 assembles `y`, and the S/P output
  register loads SR5 in parallel.

**Saturation.** SR2 and SR5 watch the guard bits above bit 19 of the word
arriving in them. At the last guard bit, they overwrite themselves with
+max or −min if the word did not fit.

**Cycle plan.** `bs_controller` sequences two passes:
- **Pass A, cycles 0–39.** Computes `w(n)`, moves `w(n-1)` into SR3, and
  stores the b(2) product in SR4.
- **Pass B, cycles 40–75.** Streams `w(n)` through the b(1) multiplier and
  adds SR4.

That is 76 busy cycles, so a sample can enter every 77 clocks.

## Supporting blocks

| Module | Role |
|---|---|
| `biquad_pkg` | widths, types (`data_t`, `coef_t`, `coefs_t`), state encodings |
| `cla_adder` | 4-bit look-ahead groups with explicit generate/propagate equations; group carries ripple |
| `bw_mult` | modified Baugh-Wooley signed multiplier, rows summed by a chain of adders |
| `round_unit`, `sat_unit` | the rounding and clamping described above; `sat_unit` also flags clipping |
| `serial_mult`, `serial_adder`, `serial_round` | bit-serial primitives |
| `cs_controller`, `bs_controller` | controllers of the sequential variants |

## Simulating

Each `tb/tb_<module>.sv` is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. Every testbench has a watchdog.
`tb/biquad_ref_pkg.sv` holds the reference model: a straight
integer-arithmetic version of the recursion above, written without any of
the RTL. The testbenches drive random and low-pass coefficient sets, and
random and full-scale inputs. They compare each output and check the
documented latency and sample rate.

Example, the end-to-end test of all four variants:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/biquad_pkg.sv tb/biquad_ref_pkg.sv tb/tb_biquad_top.sv \
  --top-module tb_biquad_top
./obj_dir/Vtb_biquad_top
```

The packages are listed first, and verilator finds the other modules in
`rtl/` by their file names. Any other testbench runs the same way with its
name in place of `tb_biquad_top`.

`tb_biquad_top` runs the top with default parameters. For each variant it
counts how often these happened, and fails if any never did:
- the sample handshake stalled (a sample was offered while the variant was busy; the three sequential variants only);
- `w` saturated;
- the coefficients changed between samples;
- the input sat idle.

## How far to trust it

**What is verified.** Every variant matches the reference model bit for
bit over hundreds of samples. This covers random coefficients, a stable
low-pass set (`a2 = -7043`, `a3 = 3318`, `b1 = 205`, `b2 = 164` at 1/4
scale), and inputs driven into saturation.

**The testbenches can fail.** Each was also run against a deliberately
broken copy of its module, for example:
- a carry term dropped in the adder;
- a Booth digit mis-decoded;
- the wrong sign on a saturation;

and each reported failures.

**What is not verified.**
- The `y` overflow case described above.
- Timing closure and area. The designs have not been through place and
  route.

## Departures and open choices

**Cycle counts.** The clock counts per sample differ from those usually
quoted for these four organisations, which are 1 / 13 / 7 / 90:
- **Word-serial: 56 instead of 13.** 13 clocks is the cost of one
  multiplication. A single adder needs four multiplications plus three
  additions per sample.
- **Combinational-sequential: 6 instead of 7.** Here RESET doubles as the
  first working state.
- **Bit-serial: 77 instead of 90.** This is this design's own two-pass
  plan.

**Formats.** Coefficient scaling (1/4, Q0.14), `a(1) = 4`, round-half-up
and keeping `s` unsaturated are choices. Change `A1_SHIFT` in
`biquad_pkg` for a different scale. `FRAC_W` is fixed by the 20/14/34-bit
widths.

**The fully combinational variant** uses behavioural adders, as described
above.

**Input gain.** The usual way to gain precision is to shift the input left
by a few extra bits before filtering (a gain of `2**n`). This is applied
outside these blocks, by placing the input sample in the upper bits of
the 20-bit word. For voice or multi-tone signals, 4 to 8 extra bits are
typical.

**Only one section is built.** A sixth-order low-pass built as three
parallel biquads is the natural application. It would need three
instances, coefficient sets for them, and an output adder, none of which
are included.
