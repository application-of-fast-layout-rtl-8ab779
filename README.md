# Combinational signed-digit array dividers: radix 2, pseudo radix 4, radix 4

This RTL divides two floating-point mantissas, Q = A / D with A, D in [1, 2). It does so in
one combinational array, without a clock. The array is built from identical rows ("slices").
Each slice picks one quotient digit and subtracts that multiple of the divisor from the partial
remainder. The remainder is kept in a redundant signed-digit form, so a row has no carry
chain: the delay of a row is one head cell plus one tail cell, whatever the operand width.

The question behind the design is how far the radix can be raised usefully. A higher radix
halves the number of rows. It also makes the cells more complex and adds wiring and
pre-computation. Four variants are provided side by side:

| divider | digit set | rows for N-bit operands | divisor pre-processing |
|---|---|---|---|
| `r2_divider` | {-1, 0, 1} | N | none |
| `r2s_divider` | {-1, 0, 1} | N | scale by 3/4 when d_1 = 1 |
| `pr4_divider` | {-3 .. 3} | N/2 | scale into [1, 9/8), compute 3Y |
| `r4_divider` | {-2 .. 2} | N/2 | scale into [1, 9/8) |

The radix-2, pseudo-radix-4 and radix-4 dividers are the three main designs. The scaled
radix-2 divider is the intermediate step that leads from the first to the second. By itself it
is not expected to be faster than the unscaled one.

## Number representations

These are the hardest part to follow, so they come first.

**Borrow-save (BS) digits.** The radix-2 and pseudo-radix-4 remainders are vectors of digits
in {-1, 0, 1}. Each digit is stored as two bits, `pos - neg`. A remainder is therefore a pair of
bit vectors `r_pos`, `r_neg` with value `r_pos - r_neg`. Adding one more binary vector to such a
pair takes one layer of cells with no carry propagation (`bs_tail`). Each cell produces
`2*s_up_pos - s_neg = r_pos - r_neg + t`: the plus bit goes one position up, and the minus bit
stays. The BS result has one more digit at the top.

**Subtracting the divisor.** A multiple of the divisor is subtracted by adding its complemented
bits. The missing +1 (one unit in the last place) enters as the lowest plus bit of the slice
output. The integer part of the complement is a constant, and the head cell removes it. For
example, -D = -2 + sum(~d_i 2^-i) + 2^-n, so the tails add `~d_i` and the head subtracts 2.

**Radix-4 digits.** The `r4_divider` remainder uses digits in {-2 .. 2}, each on three bits with
value `-2*n + p + pp` (type `div_pkg::r4_digit_t`). This is the form of a radix-4 Booth digit.
Inside a slice, `pp` is a carry arriving from the next lower cell.

**Quotient digits.**
- Radix 2: `(q_pos, q_neg)`, value `q_pos - q_neg`.
- Pseudo radix 4: sign/magnitude, `pr4_qdigit_t {sign, mag}`. Here `sign = 1` means a positive
  digit, i.e. the multiple is subtracted.
- Radix 4: `r4_qdigit_t {add, u1, u2}`. `add = 1` means a negative digit (the multiple is
  added), `u1` selects Y and `u2` selects 2Y.

Two codes for zero are used on purpose. A "positive" zero is written as the complement of 0
plus one unit, with the head taking back the resulting constant. This lets the head's leftover
value stay inside one output bit or digit.

## The radix-2 array (`r2_divider`)

The first remainder is A itself. Bit b of the remainder vectors has weight 2^(b-N), and there
are N+3 digits, from weight 4 down to 2^-N. The head (`r2_head`) reads the top three digits.
Their integer value Sigma lies in [-4, 4] as long as |R| < 2D. The head picks q from the sign
alone:
- q = -1 (add D) if Sigma < 0;
- q = +1 (subtract D) if Sigma > 0;
- q = 0 otherwise.

This is enough to keep the next remainder inside (-2D, 2D). The head also forms the integer
part of R - qD (Sigma - 2, Sigma + 1 or Sigma). This value is always in [-3, 2] and is returned
on three bits. The N tail cells add the selected divisor bits: `~d_i` for q = +1, `d_i` for
q = -1. The slice output S is shifted one place left to become the next remainder, and a zero
digit enters at the bottom.

## Operand scaling (`k_determine`, `prescaler`)

The two radix-4 dividers multiply both operands by a factor K, so that the divisor Y = K*D lies
in [1, 9/8). The quotient does not change. With Y in that range, the leading bits of Y, 2Y and
3Y are constants (1.00, 10.0 and 11.0). A head cell can then choose the digit from the
remainder alone, without looking at the divisor.

K = 1 - k/16 depends only on d_1..d_5:

| D in | [1, 9/8) | [9/8, 19/16) | [19/16, 5/4) | [5/4, 11/8) | [11/8, 3/2) | [3/2, 13/8) | [13/8, 57/32) | [57/32, 2) |
|---|---|---|---|---|---|---|---|---|
| K | 1 | 15/16 | 7/8 | 13/16 | 3/4 | 11/16 | 5/8 | 9/16 |

`prescaler` writes K*V, for V = A or D, as X1 + X2 - X3:
- X1 is V or V/2;
- X2 and X3 are each taken by a four-way multiplexer from {0, V/16, V/8, V/4}.

One BS cell layer sums them without a carry chain. The results are:
- K*A in BS form: the first remainder of the pseudo-radix-4 divider.
- Y = K*D: one carry-propagate subtraction.
- F = 3Y, computed in parallel: P + 2P - M - 2M goes through two full-adder layers and one adder.
- K*A in binary: the radix-4 divider Booth-recodes it into its first remainder.

All scaled values carry N+4 fraction bits, which makes them exact.

## The pseudo-radix-4 array (`pr4_divider`)

All arithmetic is still binary BS, but each slice retires two quotient bits as one digit in
{-3 .. 3}. The remainder has digits from weight 2 down to 2^-(N+4).

The head (`pr4_head`) reads three digits with weights 2, 1 and 1/2. Their value Sigma is one of
the 15 halves in [-3.5, 3.5]. The digit is the integer part of Sigma, truncated toward zero:
- sign = 1 when Sigma > 0 (so Sigma = 0.5 gives "+0");
- sign = 0 otherwise (so -0.5 and 0 give "-0").

The leading part of q*Y is |q| + 0.5 for a positive digit and -|q| for a negative one. Once it
is removed, at most -0.5 is left. The head outputs that as `s_1_neg = r_1+ xor r_1- xor sign`.

Each tail (`pr4_tail`) works in three steps:
1. A multiplexer picks the bit of 0, Y, 2Y or 3Y.
2. An XOR with the sign complements it.
3. A `bs_tail` adds it.

The slice output loses two digits at the top. The remainder stays in (-4, 4) by construction,
so no range argument is needed.

## The radix-4 array (`r4_divider`)

The remainder digits are true radix-4 digits in {-2 .. 2}, and only Y and 2Y are needed. The
head (`r4_head`) forms E = 4*r_1 + r_2 in quarters and chooses:

| E (quarters) | -10..-7 | -6..-3 | -2..-1 | 0..2 | 3..6 | 7..10 |
|---|---|---|---|---|---|---|
| q | -2 | -1 | 0 (add form) | 0 | +1 | +2 |

On the remainder this places the thresholds between 0 and 1 at 7/12, and between 1 and 2 at
19/12. Each lies inside the overlap allowed for divisors in [1, 9/8), and likewise for the
negative side. With these choices the head's leftover, E - 4|q| - 1 when subtracting or
E + 4|q| when adding, is always in [-2, 1]. It fits a single digit, so the remainder stays
below 2/3 in magnitude by construction.

Each tail (`r4_tail`) selects the radix-4 digit of 0, Y or 2Y and inverts it unless `add` is
set. It adds the result to the remainder digit and splits the sum (range -2..5) into a carry
`pp` for the next digit up and a local part in -2..1. The lowest carry input is `~add`, the +1
of the complement.

## The scaled radix-2 array (`r2s_divider`)

When d_1 = 1 the operands are scaled by 3/4, which brings Y into [1, 1.5). K*A = A - A/4 is
loaded directly as plus and minus bits. The head (`r2s_head`) reads only two digits (weights 1
and 1/2) and applies this table:

| Sigma | -1.5 | -1 | -0.5 | 0 | 0.5 | 1 | 1.5 |
|---|---|---|---|---|---|---|---|
| (q+, q-) | (0,1) | (0,1) | (0,0) | (0,0) | (1,1) "-0" | (1,0) | (1,0) |
| s_1- | 1 | 0 | 1 | 0 | 0 | 1 | 0 |

The tail cells are the same as in `r2_divider`.

## Quotient and accuracy

In every divider the digit magnitudes are collected into a positive and a negative binary
vector. `quotient_converter` subtracts the two.

| divider | `quotient` | fraction bits | guarantee |
|---|---|---|---|
| r2, r2s | Q * 2^(N-1) | N-1 | \|A/D - Q\| < 2^-(N-1) |
| pr4, r4 | Q * 4^(N/2-1) | N-2 | \|A/D - Q\| < 4^-(N/2-1) |

The quotient is not rounded. The final partial remainder is brought out, so exact rounding or
a remainder-based correction can be added outside. The exact identities that tie the quotient
to the remainder are stated in the header of each divider module.

## Interface and parameters

`divider_top #(N = 32)` holds the four dividers. Each has its own ports, which are all plain
vectors:
- inputs `*_a_frac`, `*_d_frac`: the N fraction bits of 1.a and 1.d, with a_1 as the MSB;
- output `*_quotient`, N+1 bits;
- the final remainder ports (`*_rem_pos`/`*_rem_neg`, or `r4_rem` as 3-bit digits).

Every divider has the single parameter N, the number of fraction bits. It defaults to 32.
The radix-4 variants need N even and at least 4. Below 5 bits the scaling logic pads the divisor prefix with zeros. All blocks
are purely combinational: there is no clock, reset or handshake, and a result is valid one
array delay after the operands.

## Files

- `rtl/div_pkg.sv`: digit types and helper functions.
- Radix-2 cells: `rtl/bs_tail.sv`, `rtl/r2_head.sv`, `rtl/r2_slice.sv`, `rtl/r2s_head.sv`.
- Scaling: `rtl/k_determine.sv`, `rtl/prescaler.sv`.
- Pseudo-radix-4 cells: `rtl/pr4_head.sv`, `rtl/pr4_tail.sv`, `rtl/pr4_slice.sv`.
- Radix-4 cells: `rtl/r4_head.sv`, `rtl/r4_tail.sv`, `rtl/r4_slice.sv`.
- Dividers: `rtl/r2_divider.sv`, `rtl/r2s_divider.sv`, `rtl/pr4_divider.sv`, `rtl/r4_divider.sv`,
  `rtl/quotient_converter.sv`.
- Top: `rtl/divider_top.sv`.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
  - Every cell testbench is exhaustive.
  - The divider testbenches try all 65,536 operand pairs at N = 8 and random and corner
    operands at N = 16 and N = 32. They check the exact remainder identity, the remainder
    bound and the quotient error bound against values computed in the testbench.
  - `tb_divider_sizes` runs all four dividers at N = 4 (every operand pair) and N = 64
    (random operands) and checks the quotient error bound. N = 128 has also been simulated
    and passes, but its Verilator model takes over ten minutes to build.
  - `tb_divider_top` runs all four dividers at the default size. It counts every digit value,
    both zero codes and all eight scaling factors, and fails if any of them never occurs.

## Simulating

With Verilator 5 (the package file goes first):

    verilator --binary --timing --assert -Irtl rtl/div_pkg.sv tb/tb_divider_top.sv \
        --top-module tb_divider_top -Mdir obj_top && obj_top/Vtb_divider_top

Swap in any other testbench name the same way. Each testbench prints
`TB_RESULT checks=<n> failures=<m>`. For a lint run:
`verilator --lint-only -Wall -Irtl rtl/div_pkg.sv rtl/divider_top.sv`. The full-size top
testbench runs in well under a second. Lint reports only unused signal bits: constant low bits
of the shifted remainders, the unused outputs of the shared prescaler, and the index `k`.

## Where this RTL departs from the original design

- **Cells are written from their function.** Heads and tails implement the arithmetic
  identity or digit table that defines them; the published gate networks are not copied.
  - The radix-2 head's parity output here is `r_0+ xor r_0- xor q_neg`. This follows from the
    tail cell's convention (`q_pos` selects the complemented divisor). The original design
    states it with `q_pos`.
  - The radix-4 head uses its own `add/u1/u2` code. The selection thresholds, and the freedom
    to pick either zero near 0, are those of the original; the exact code table and head
    equations are not reproduced.
  - The pseudo-radix-4 head is not built as the original chain of BS adder cells.
- **Operand scaling.** The original computes K*D with two 4-input multiplexers and one
  carry-save layer. Here the layer is a BS layer and the multiplexer inputs are this design's
  own choice. The first pseudo-radix-4 remainder is K*A in BS form, with no carry chain, as in
  the original. The radix-4 divider instead carry-propagates K*A and Booth-recodes it; that is
  this design's choice.
- **Quotient converter.** It is a plain subtractor, the simplest correct choice. The original
  only names this block.
- **Operand size.** N counts the fraction bits of the mantissa. A "32-bit divider" is read as
  N = 32. The radix-2 array has one slice per quotient digit (N). The radix-4 arrays have N/2
  slices, so their quotient has one fraction bit fewer.
- **Not reproduced.** Layout, cell mapping, transistor sizing, and the published timing and
  area figures (for example 65 ns and 28 mm² for the 32-bit radix-2 divider in a 1.0 µm
  process) belong to the physical implementation and are not reflected in this RTL.
