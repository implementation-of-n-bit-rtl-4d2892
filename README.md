# N-bit SRT array divider

A generic, purely combinational unsigned integer divider. Given an N-bit
dividend and an N-bit divisor it returns the quotient and the remainder in a
single pass through N rows of logic. The key idea is SRT division with a
redundant number system: each row retires one quotient bit, and no row has
a carry that runs along its width. A row therefore has the same short delay
at 4 bits as at 64 bits. The carry-propagating work is done twice only, at
the very end, when the redundant quotient and remainder are converted back
to ordinary binary.

The width `N` is a parameter, so one description replaces a family of
fixed-width dividers: the 4-, 8- and 16-bit dividers, and the 11-bit
example, are all this one module at different `N`. The default is 16.

## Why a row needs no carry chain

Plain restoring or non-restoring division has to know the exact sign of
each partial remainder before it can choose the next quotient bit. Finding
that sign takes a full carry propagation across the remainder, so every
row has a full-width adder delay.

SRT removes that dependency in two ways.

**Redundant quotient digits.** Each quotient digit is -1, 0 or +1, not just
0 or 1. The recurrence is

    R(j+1) = 2 R(j) - q(j) * D,        with |R| < D kept at every step.

When the doubled remainder `y = 2R` is close to zero, both neighbouring
choices keep the bound. So the choice can be made from a rough estimate of
`y` and does not need its exact value.

**Borrow-save remainders.** The partial remainder is never converted to
binary. Each digit is a pair of bits `(p, n)` with value `p - n`, so -1, 0
or +1. Adding or subtracting a binary divisor to such a number takes one
full adder per digit. Each adder's carry becomes part of the digit to its
left in the next row and never ripples further (see `srt_tail_cell`).

### How the quotient digit is chosen

The divisor is normalised so that, seen as a fraction, `d` lies in
`[1/2, 1)`. The head cell of each row looks at the three leading digits of
`y = 2R`, at weights 2, 1 and 1/2. The last of these is aligned with the
divisor's leading `1`. From them it forms

    e = 2*y[2] + y[1] + y[1/2]/2          (one of -3.5 ... +3.5 in halves)

All digits below weight 1/2 together are worth less than 1/2 in magnitude,
so `|y - e| < 1/2`. The rule is simply the sign of `e`:

| estimate | digit  | why the bound |R'| < d still holds                   |
|----------|--------|----------------------------------------------------|
| e > 0    | q = +1 | y > 0 and y < 2d, so y - d lies in (-d, d)         |
| e = 0    | q = 0  | &#124;y&#124; < 1/2 <= d                           |
| e < 0    | q = -1 | y < 0 and y > -2d, so y + d lies in (-d, d)        |

The bound is strict. It starts strict, because the dividend is below
`d * 2^N`, and the table shows it stays strict.

### Keeping the remainder the same width

The divisor has no bits at weights 2 and 1, so no tail cell sits there. The
head cell folds the two leading digits of `y`, plus the carry from the
leading tail cell, into the one leading digit of the new remainder:
`2*y[2] + y[1] + carry`. The new remainder is below 1 in magnitude and the
digits below it add up to less than 1. So this sum is always -1, 0 or +1,
and the remainder stays N+1 digits wide in every row.

## The pieces

| module               | role                                                                  |
|----------------------|-----------------------------------------------------------------------|
| `srt_pkg`            | `bs_digit_t` (a `p`/`n` pair) and the constants `BS_ZERO/PLUS/MINUS`  |
| `srt_tail_cell`      | one digit of a row: add, subtract or pass one divisor bit              |
| `srt_head_cell`      | digit selection from three digits, and leading-digit folding          |
| `srt_addsub_row`     | one recurrence step: one head cell plus N tail cells                  |
| `srt_array`          | N rows stacked; gives N quotient digits and a borrow-save remainder   |
| `divisor_normalizer` | leading-one search; shifts divisor and dividend by the same amount     |
| `bs_converter`       | borrow-save to two's complement with a parallel-prefix subtractor      |
| `range_reducer`      | optional: scales the operands by 3/4 so the divisor starts with `10`   |
| `nbit_divider`       | the top: wires everything together and corrects the final result      |

### Tail cell

A quotient digit is also the two-bit control of its row. `q = +1`
subtracts the divisor, `q = -1` adds it and `q = 0` passes the remainder
unchanged. For an add, a full adder on `(y.p, d, ~y.n)` gives `2c + s`, and
`y + d = 2c - (1 - s)`. The cell keeps the negative bit `~s` and hands `c`
to the left as a positive bit. A subtract works the other way round: the
cell keeps `s` and hands `~c` to the left as a negative bit. Within one
row, what a cell keeps and what it receives from the right never use the
same bit, so the digit is a plain OR of the two.

### Normalisation and the final correction

`divisor_normalizer` counts the divisor's leading zeros `s`. It shifts the
divisor left by `s`, so that its top bit is 1, and shifts the dividend into
a 2N-bit value by the same `s`. The quotient is unchanged. The remainder
comes out scaled by `2^s`.

The array gives `x = Q*d + R` with `-d < R < d`. `nbit_divider` converts
both results to binary. If `R` is negative, it decrements `Q` and adds `d`
to `R`. It then shifts the remainder right by `s`. This correction step is
this implementation's addition: the original description of the array stops
at the redundant result.

### Quotient and remainder conversion

The quotient digits form a borrow-save number. Its value is `P - N`, which
is computed as `P + ~N + 1`. Each digit sets the signal for its position in
the carry network:

* digit 0 propagates (P);
* digit +1 generates (G);
* digit -1 kills (K).

The carries come from a Kogge-Stone prefix network, with the `+1` entering
as the carry into bit 0. The borrow-save remainder uses the same module.
The prefix topology is this implementation's choice.

### Divisor range reduction (option)

With `RANGE_REDUCE = 1`, a normalised divisor that starts with `11` has
both operands multiplied by 3/4, so every divisor the array sees starts with
`10`. The scaling keeps every bit by working in integers:

* a divisor starting `11` becomes `3*d` and the dividend becomes `3*x`;
* any other divisor becomes `4*d` and the dividend `4*x`.

Either way the operands are two bits wider, and the array has N+2 rows. The
quotient is unchanged. The remainder comes out three or four times too
large. A factor of 4 is undone with a shift. A factor of 3 is undone by
exact division: multiply by the inverse of 3 modulo 2^N, which is binary
`...10101011`. This is exact because the value is known to be a multiple
of 3.

The option is correct, but with the sign-of-estimate head cell used here it
buys no speed. Its purpose in the original scheme was a simpler head cell,
which is not reproduced (see below). It is off by default.

## Interface and timing

```
nbit_divider #(
  parameter int unsigned N            = 16,   // operand width, N >= 2
  parameter bit          RANGE_REDUCE = 0
) (
  input  logic [N-1:0] dividend, divisor,
  output logic [N-1:0] quotient,  remainder,
  output logic         div_by_zero
);
```

* Unsigned operands. `quotient = dividend / divisor` and
  `remainder = dividend % divisor` (rounding down).
* A zero divisor sets `div_by_zero`. The quotient is then all ones and the
  remainder equals the dividend.
* There is no clock, reset or handshake. The outputs are valid one
  combinational delay after the inputs settle. To use the divider in a
  clocked design, register its inputs and outputs and budget the array delay
  as a multicycle path, or pipeline between rows. `srt_array` has a clean
  row boundary for that.
* Size after generic synthesis at N = 16: about 3,700 word-level cells, no
  flip-flops. The array grows as N^2 and its delay as N. The converters'
  delay grows as log N.

## How far to trust it, and where it departs from the original

What was verified, in simulation with Verilator:

* every dividend/divisor pair at N = 4 and N = 8, with and without range
  reduction;
* 20,000 random pairs at N = 11 and N = 16 (random divisor widths, plus
  corner cases);
* 100,000 random pairs at the default configuration;
* the four published examples: `1010/0010`, `10101010/00000010`,
  `01010101010/00000000010` and `0000000010101010/0000000000000010`. Each
  divides by 2 with remainder 0.

An assertion in `nbit_divider` also checks, in every simulation, that the
remainder is below the divisor.

At N = 6, the array alone is checked against the identity `x = Q*d + R`,
`|R| < d` for every legal input. Each cell is checked exhaustively.

Departures and choices:

* **Head cell rule.** The original gives a selection table for the
  range-reduced divisor. It has thresholds at +/-1/2 and two codes for zero,
  `+0` and `-0`, which the converter tells apart. This design uses the
  plain sign rule above instead. That rule is valid for any normalised
  divisor, with or without range reduction.
* **Range-reduction condition.** The condition is taken to be the
  divisor's second bit. The first bit of a normalised divisor is always 1.
* **Timing figures.** The original reports combinational delays of 7 to
  9 ns for 4-, 8-, 16-bit and generic dividers on an FPGA. Those depend on
  its device and tools, and nothing here reproduces them.
* **Converter overlap.** The original lets the quotient converter run in
  parallel with digit selection, since digits arrive most significant
  first. In this combinational form that overlap is simply how the logic
  settles. There is no separate mechanism for it.
* **This implementation's own choices:** unsigned operands, the sign
  correction, remainder denormalisation, zero-divisor behaviour, the
  Kogge-Stone converter and two-bit widening for range reduction.

## Simulating

Every testbench is self-checking and ends with one
`TB_RESULT checks=<n> failures=<n>` line. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/srt_pkg.sv \
          tb/tb_nbit_divider.sv --top-module tb_nbit_divider -o sim
./obj_dir/sim
```

| testbench               | covers                                                        |
|-------------------------|---------------------------------------------------------------|
| `tb_nbit_divider`       | N = 4, 8, 11, 16; range reduction; published examples; counts each mechanism |
| `tb_nbit_divider_full`  | the top with default parameters, 100,000 random pairs          |
| `tb_srt_array`          | every legal input at N = 6                                    |
| `tb_srt_addsub_row`     | random remainders in random borrow-save encodings, N = 6      |
| `tb_srt_tail_cell`, `tb_srt_head_cell` | exhaustive                                     |
| `tb_bs_converter`, `tb_divisor_normalizer`, `tb_range_reducer` | random plus exhaustive |

The end-to-end testbenches count how often each mechanism fires: quotient
digits +1, 0 and -1, the negative-remainder correction, a normalising shift,
an already-normalised divisor, a zero divisor, and reduced and unreduced
divisors. A mechanism that never fires counts as a failure. All of them run
in a few seconds.

To change the width, override `N`. Nothing else depends on a fixed size.
