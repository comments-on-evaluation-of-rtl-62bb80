# Two arithmetic shortcuts: carry-free A + B = K testing and complex multiplication from short table multipliers

This repository holds synthesizable SystemVerilog for two small, unrelated
arithmetic units that share one idea: avoid the expensive part of an
operation by re-encoding the operands.

* **`apb_eq_k`** decides whether `A + B = K` holds without ever adding
  `A + B`. It needs no carry propagation, so its delay is one full adder, one
  XOR and a logarithmic AND tree, whatever the word width. A typical use is
  resolving a compare-and-branch condition early in a pipelined CPU, in
  parallel with the ALU's own adder.
* **`poly_cmult`** multiplies two complex numbers whose parts are N-bit
  unsigned integers using only multipliers of N/4 bits (more generally
  N/2^M bits), each of which can be a small look-up ROM. The product is exact.

`arith_top` instantiates both side by side; they share no signal.

Everything is purely combinational: there is no clock, no reset and no
handshake. Results are valid one combinational delay after the inputs settle.
Registering inputs or outputs is left to the surrounding design.

## Carry-free A + B = K

### Idea

Work modulo 2^N. `A + B = K` is the same statement as

    A + B + ~K = 2^N - 1        (~K = 2^N - 1 - K, the bitwise complement)

that is, the three-operand sum is the all-ones word. A row of full adders
used as (3,2)-counters reduces the three operands to a carry-save pair with
`A + B + ~K = S + C (mod 2^N)` in one full-adder delay, where `C` is the
carry vector already moved one place to the left (`C[0] = 0`).

`S + C` is all ones exactly when `S = ~C`: `S + C = 2^N - 1` means
`S = 2^N - 1 - C`, and `2^N - 1 - C` is the bitwise complement of the N-bit
word `C`. Checking `S = ~C` needs no addition: every bit of `S ^ C` must
be 1. An N-input AND of those N XORs gives the answer `E`.

### Structure

| module     | what it is |
|------------|------------|
| `fa_cell`  | full adder / (3,2)-counter, `s = x^y^z`, `c = maj(x,y,z)` |
| `csa_row`  | N slices; slice i adds `a_i`, `b_i`, `~k_i`; carries shifted left, carry out of the top slice dropped |
| `and_tree` | N-input AND as a recursive balanced tree of 2-input ANDs, depth ceil(log2 N) |
| `apb_eq_k` | `csa_row` -> N XORs (`s ^ c`) -> `and_tree` -> `e` |

Ports of `apb_eq_k #(N = 32)`: inputs `a`, `b`, `k` (N bits), output `e`.
`e = 1` exactly when `(a + b) mod 2^N == k`. Because the test is modular it
gives the right answer for unsigned and 2's-complement operands alike, and
wrap-around of `a + b` is treated as ordinary modular arithmetic (no overflow
flag is produced).

Critical path: full adder (two XOR levels), one XOR, log2 N AND levels.
The carry of the most significant slice would leave the word, so that slice
is a bare three-input XOR instead of a full adder; the logic is otherwise
N full adders, N two-input XORs and N-1 two-input ANDs. The word width is
not fixed by the method; 32 bits is this design's default. `N` must be at
least 2.

## Complex multiplier from short multipliers

### Why

A ROM multiplier for two w-bit numbers needs 2^(2w) words, which is only
practical for small w. The goal is to multiply complex numbers with N-bit
parts using nothing larger than (N/4)-bit x (N/4)-bit multipliers, without
rounding.

### Polynomial encoding

Cut each part into four N/4-bit digits, `R = R3*2^(3N/4) + R2*2^(N/2) +
R1*2^(N/4) + R0`, likewise `I`. Then `A = R + jI` is the value at `x = j` of
the degree-7 polynomial with coefficients

| i   | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|-----|---|---|---|---|---|---|---|---|
| a_i | 2^(3N/4) R3 | 2^(3N/4) I3 | -2^(N/2) R2 | -2^(N/2) I2 | 2^(N/4) R1 | 2^(N/4) I1 | -R0 | -I0 |

The minus signs undo `x^2 = j^2 = -1`. Since `j^8 = 1`, the product of two
such polynomials can be reduced modulo `x^8 - 1`, which makes it an 8-point
**cyclic convolution**:

    c_k = sum over i of a_i * b_((k - i) mod 8)

Every product `a_i * b_j` is a product of two N/4-bit digits, a power of two
(a shift) and a sign. Finally, evaluating at `x = j`:

    P = c0 - c2 + c4 - c6        (real part of A*B)
    Q = c1 - c3 + c5 - c7        (imaginary part of A*B)

Because the coefficients carry power-of-two weights rather than irrational
factors, the result is exact.

Worked example, N = 8: `(150 + j230)(102 + j218)`. The digits (base 4) are
R(A) = 2,1,1,2, I(A) = 3,2,1,2, R(B) = 1,2,1,2, I(B) = 3,1,2,2. The
convolution gives `c = 7216, 37104, 31856, -13352, -7956, 4104, 2244, -1600`
and `P + jQ = -34840 + j56160`. Both testbenches of the multiplier check this
case value by value.

### Generalisation to M

The parameter `M` splits each part into 2^M digits of `DW = N/2^M` bits and
uses an `L = 2^(M+1)`-point convolution. Coefficient `2t` holds the real
digit of rank `2^M - 1 - t`, coefficient `2t+1` the imaginary digit of the
same rank, with weight `2^(rank*DW)` and a minus sign for odd `t`. `M = 2`
gives the table above and is the case the method is worked out for; other
values of `M` are this design's extension of the same pattern. `P` and `Q` become the alternating sums of the even
and odd `c_k`. `M` must be at least 1 and `N` a multiple of 2^M.

### Modules

| module         | what it does |
|----------------|--------------|
| `cm_pkg`       | functions giving each coefficient position's digit rank, sign and shift |
| `rom_mult`     | DW x DW-bit multiplier as a 2^(2 DW)-word table; contents `x*y`, computed at elaboration |
| `cyclic_conv`  | L*L `rom_mult`s; each product shifted by `shf_a + shf_b`, negated if `neg_a ^ neg_b`, summed into `c_k` |
| `pq_eval`      | alternating sums giving `P` and `Q` |
| `poly_cmult`   | the encoding of both operands (bit-field selection plus per-position constants), the convolution and `pq_eval` |

A coefficient travels as (digit, shift, sign) so that the multipliers only
ever see digits; the shifts and signs are constants per position and cost
only wiring and an adder/subtractor choice. With the defaults (N = 8, M = 2)
there are 64 ROMs of 16 four-bit words. An encoding whose coefficients
needed one bit more (N/4 + 1 bits, as happens when x is taken as an eighth
root of unity and the digits must be divided by the square root of 2) would
need tables four times as large, and would not be exact.

Ports of `poly_cmult #(N = 8, M = 2)`: inputs `a_re`, `a_im`, `b_re`, `b_im`
(N bits, unsigned); outputs `c[L]` (signed, 2N+M+3 bits), `p` and `q`
(signed, 2N+2 bits). `c` is exposed so the intermediate convolution can be
observed. A few of its bits are constant by construction (for example a
`c_k` none of whose terms has weight 1 is always even), and synthesis
removes the logic behind them.

Widths: every term is below 2^(2N) in magnitude, so `c_k` needs 2N+M+3 signed
bits for L terms. For unsigned N-bit parts, `|P| < 2^(2N)` and
`0 <= Q < 2^(2N+1)`, so 2N+2 signed bits hold both exactly.

## Top level

`arith_top #(CM_N = 8, CM_M = 2, EQ_N = 32)` brings out the multiplier's
ports with prefix `cm_` and the evaluator's with prefix `eq_`.

## Choices made here, and limits

* Operands of the complex multiplier are unsigned. Signed parts would need a
  signed top digit and signed table entries.
* Both units are combinational; no pipeline registers, no clock.
* The multiplier builds all L*L digit products in parallel. A design short
  of area could instead time-share fewer ROMs; that is not provided.
* The sum for each `c_k` is written as a plain adder chain; synthesis is free
  to rebalance it. No carry-save tree is spelled out.
* The A + B = K unit is not connected to any ALU or branch logic; it is the
  stand-alone comparator.
* The table-based multiplier is the only multiplier provided; a build that
  prefers ordinary multipliers would replace `rom_mult`.

## Verification

Each module has a self-checking testbench in `tb/` named `tb_<module>.sv`.
They print `TB_RESULT checks=<n> failures=<m>` and stop with a watchdog if
anything hangs.

* `tb_fa_cell`, `tb_rom_mult`: exhaustive.
* `tb_and_tree`: N = 32, 5 and 1; all ones, every single zero, random.
* `tb_csa_row`: S + C against A + B + ~K, and that S is the carry-free sum.
* `tb_apb_eq_k`: all 4096 triples at N = 4; at N = 32 random equal,
  unequal and off-by-one-bit cases, negative operands, overflow.
* `tb_cyclic_conv`, `tb_pq_eval`: example values and random data against an
  integer model.
* `tb_poly_cmult`: example, corners and random operands at N = 8 (M = 2) and
  N = 16 (M = 2 and M = 3) against the complex product.
* `tb_arith_top`: both units at default parameters; it also counts that
  negative and non-negative real parts, equal and unequal cases, equalities
  whose sum ripples a carry through 16 or more bits, and operands with the
  sign bit set all occur.

Running one with Verilator 5, from the repository root:

    verilator --binary --timing --assert -Irtl -Itb rtl/cm_pkg.sv \
        tb/tb_arith_top.sv --top-module tb_arith_top
    ./obj_dir/Vtb_arith_top

Lint: `verilator --lint-only -Wall -Irtl rtl/cm_pkg.sv rtl/arith_top.sv`.
