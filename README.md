# A rational arithmetic processor

This processor computes with exact fractions instead of floating point. A
number is stored as a ratio of two integers, so values such as 1/3 are held
exactly. Each result comes out in irreducible form: the numerator and
denominator share no common factor. Every value then has one unique stored
form, and the two halves stay as small as possible.

Reduction is the hard part. The obvious method finds the gcd and then divides
both halves by it, which needs a divider. This design needs none. It runs a
binary form of Euclid's subtractive gcd algorithm. Alongside it, four small
counters are kept, and they end up holding the reduced numerator and
denominator when the gcd is found. The hardware needs only adders, shifters
and comparisons.

The RTL is in `rtl/` (SystemVerilog 2017, synthesizable). Self-checking
testbenches are in `tb/`.

## Number format

Each operand is one sign bit plus two unsigned `N`-bit magnitudes: the
numerator, and a denominator that must be non-zero. The default is `N = 11`,
which gives a 24-bit word (1 + 11 + 1 + 11, as in the format the design was
sized for). The ports carry the three fields as separate signals. How they
are packed into a word is left to the user.

In the formulas below the first operand is `J/L` and the second is `K/M`.

## Operations

| `op`     | result                         | numerator hardware | denominator hardware |
|----------|--------------------------------|--------------------|----------------------|
| `OP_ADD` | `(J*M + K*L) / (L*M)`          | `J*M + K*L`        | `L*M`                |
| `OP_SUB` | `(J*M - K*L) / (L*M)`          | `J*M - K*L`        | `L*M`                |
| `OP_MUL` | `(J*K) / (L*M)`                | `J*K`              | `L*M`                |
| `OP_DIV` | `(J*M) / (L*K)`                | `J*M`              | `L*K`                |
| `OP_CMP` | condition codes                | `J*M`              | `L*K`                |

Signs are applied in the numerator hardware, so the denominator is always
positive. Every arithmetic result then goes through the reduction unit. A
comparison skips reduction and sets the condition codes instead.

## Numerator hardware: one adder for two products (`numerator_unit`, `num_regfile`)

An addition seems to need three multipliers: `J*M`, `K*L` and `L*M`. The
numerator needs only one adder, because the two products can be summed bit
by bit:

    J*M + K*L = sum over i of 2^i * (j_i*M + k_i*L)

At each bit position the term `j_i*M + k_i*L` is one of only four values:
0, M, L or M+L. These four values sit in a small register file. The bit
pair `{k_i, j_i}` addresses it through a 4-to-1 multiplexer. Each clock:

1. The selected word is added into the top of the `NUM` register.
2. `NUM`, `J` and `K` all shift right by one bit.

After `N` clocks, `NUM` holds the whole sum. The operation depends only on
what is loaded into registers 1 and 2 at start. Register 3 always gets
their sum.

| operation | reg 1 | reg 2 | K shift register |
|-----------|-------|-------|------------------|
| add       | ±M    | ±L    | K                |
| subtract  | ±M    | ∓L    | K                |
| multiply  | ±K    | 0     | 0                |
| divide    | ±M    | 0     | 0                |
| compare   | ±M    | 0     | 0                |

The ± is the sign of the operand that the product belongs to. For multiply
and divide, the sign is that of the result.

The K shift register is loaded with zero whenever register 2 is zero.
Without that, a position where both `j_i` and `k_i` are 1 would select
register 3 by mistake.

The register words are `N+2` bits, two's complement. The adder and the top
of `NUM` are `N+3` bits, and the result `num` is `2N+2` bits, signed. These
widths are needed because the sum of two `N×N` products takes `2N+1` bits
plus a sign.

## Denominator hardware (`denominator_unit`)

This is a plain `N×N` shift-and-add multiplier. It forms `L*M`, or `L*K`
for divide and compare. It is built the same way as the numerator unit:
one step per clock, `N` steps. Both units start together and finish in the
same cycle, and an assertion in the top level checks this.

## Reduction hardware (`reduction_unit`, `reduction_control`)

This is the core of the design.

### The invariant

Registers `X` and `Y` start as NUM and DEN. Counters start as `a = d = 1`
and `b = c = 0`. Every step keeps these two equations true:

    NUM' = a*X + c*Y
    DEN' = b*X + d*Y

Here `NUM'` and `DEN'` are NUM and DEN with their common factors of two
removed. Both `X` and `Y` are kept odd. The difference of two odd numbers is
even, so it can be halved until it is odd again. Halving an odd gcd's
multiple never removes a factor of the odd gcd.

### The steps

One step is taken per clock. The first rule that applies is the one used:

| condition                | step       | X, Y                | counters                   |
|--------------------------|------------|---------------------|----------------------------|
| X and Y both even        | normalize  | X/2, Y/2            | none                       |
| X even                   | force odd  | X/2                 | a = 2a                     |
| Y even                   | force odd  | Y/2                 | c = 2c, d = 2d             |
| X = Y (STOP)             | finish     | none                | none                       |
| Y < X (SWAP)             | swap       | exchange X and Y    | exchange a/c and b/d       |
| otherwise                | subtract   | Y = Y - X           | a = a + c, b = b + d       |

The "subtract" row keeps the invariant because
`a*X + c*Y = (a+c)*X + c*(Y-X)`.

When `X = Y`, both equal the odd gcd `g` of `NUM'` and `DEN'`. The invariant
then gives `NUM' = (a+c)*g` and `DEN' = (b+d)*g`. So the reduced ratio is
`(a+c)/(b+d)`.

The datapath has one `XW`-bit subtractor, forming `Y - X`. Its zero output
is STOP and its borrow output is SWAP. There are two `CW`-bit adders, `a+c`
and `b+d`. Each adder serves both the subtract step and the final output.

The control (`reduction_control`) is only the priority decision in the table
above, plus a run/idle state bit. Once `X` has been made odd, it stays odd,
so one decision table covers everything: the initial normalization, making
each term odd, and the swap/subtract/halve loop.

### Example: 420/231

This ratio is already normalized, because 231 is odd.

1. Force X odd twice: X = 105 and a = 4.
2. Subtract: Y = 126 and b = 1. Halve: Y = 63, c = 0, d = 2.
3. Swap, so X = 63 and Y = 105. Subtract: Y = 42, a = 4, b = 3. Halve:
   Y = 21, c = 8, d = 2.
4. Swap, so X = 21 and Y = 63. Subtract: Y = 42, a = 12, b = 5. Halve:
   Y = 21, c = 8, d = 6.
5. X = Y = 21, which is the gcd. The result is (12+8)/(5+6) = 20/11.

That is ten steps. This ratio is the first case in `tb_reduction_unit` and in
`tb_rat_processor`.

### Widths and overflow

`XW` defaults to `2N+1`. This holds the largest possible `J*M + K*L`. The
counters are `CW = N` bits wide, which is the width of a stored result.

None of `a`, `b`, `c`, `d` ever decreases. Each one is bounded by the final
`a+c` or `b+d`. So the counters overflow only if the reduced result itself
does not fit in `N` bits. The `ovf` output is therefore exact. It is set
when a counter shift or a counter adder carries out, or when the final sum
does. When `ovf` is set, `res_num` and `res_den` are meaningless. This
happens easily with large operands: for example, 2047/1 + 2047/1 = 4094/1
needs 12 bits.

### Time

The reduction takes one clock per step. The number of steps depends on the
data, and grows with the logarithm of the operands. Each subtract is
followed by at least one halving, and is preceded by at most one swap. So
the step count is at most three per operand bit, and the testbench checks
this bound.

The `gcd` output is `X` at the end, which is the *odd* part of the gcd. The
common power of two removed by normalization is not restored.

## Comparisons (`compare_unit`)

- **Ordering** (`gt`, `lt`, `ge`, `le`) uses cross products:
  `J/L # K/M` exactly when `J*M # L*K`, since both denominators are
  positive. The numerator unit supplies the signed `J*M`, the denominator
  unit supplies `L*K`, and the comparator applies the sign of `K`.
- **Equality** compares fields directly: `J = K`, `L = M` and equal signs.
  Zero counts as equal whatever its sign. This is exact only when both
  operands are irreducible, which is the form every arithmetic result comes
  out in. `ne` is the inverse of `eq`.
- For operands that are not reduced, such as 2/4 against 1/2, `eq` is 0
  while both `ge` and `le` are 1.

## Top level (`rat_processor`)

Handshake:

- Apply `op` and both operands together with a one-cycle `start` while
  `busy` is low.
- `done` pulses for one cycle when the results are valid.
- `res_sign`, `res_num`, `res_den`, `res_gcd`, `cc`, `ovf` and `div_zero`
  hold their values until the next operation.

Latency, counted from the cycle in which `start` is high:

- `N + 2` cycles for a comparison, a zero result or a division by zero.
- `N + 4 + S` cycles for a result that is reduced in `S` steps.

With the default `N = 11`, a typical result takes 30 to 70 cycles.

Special cases:

- **Zero numerator:** the result is +0/1 and no reduction is run. The
  reduction algorithm needs two non-zero terms, and `reduction_unit` asserts
  this.
- **Zero denominator:** this happens with a zero operand denominator, or when
  dividing by 0/M. It sets `div_zero` and gives 0/0.

The processor is not pipelined. It performs one operation at a time.

## What follows the published design, and what is this design's own

These parts follow the published description:

- the rational representation and the cross-product rules;
- the reduction algorithm, with its normalize, force-odd, swap and subtract
  steps;
- the register-file numerator unit, with contents 0, M, L, L+M addressed by
  `{k_i, j_i}`;
- the register contents for subtract, multiply and divide;
- a denominator multiplier matched in time to the numerator unit;
- the reduction datapath: X and Y with one wide adder giving STOP and SWAP,
  and counters a/c and b/d each with an adder feeding the output;
- the comparison rules.

These are this design's own choices:

- **Signed numbers.** One sign per number, with the sign applied by negating
  the register-file words.
- **Zeroed K register.** It is zeroed for multiply, divide and compare.
- **Widths.** The X/Y adder is `2N+1` bits rather than `2N`. The numerator
  adder is `N+3` bits rather than `N`.
- **Step scheduling.** The reduction loops are merged into one priority
  decision, taking one step per clock.
- **Flags and zero handling.** The `ovf` and `div_zero` flags, the +0/1 zero
  result, and the start/busy/done handshake.
- **Reset.** All registers use an asynchronous, active-low reset (`rst_n`).

These are not built:

- a faster numerator in which the register-file output feeds a carry-save
  adder tree instead of a single adder;
- a pipelined processor that reduces at the end of the pipeline using wider
  registers.

## Files

| file | contents |
|------|----------|
| `rtl/rat_pkg.sv` | operation codes `rat_op_e`, condition codes `rat_cc_t` |
| `rtl/num_regfile.sv` | four-word register file and 4:1 multiplexer |
| `rtl/numerator_unit.sv` | bit-serial `J*M ± K*L` / `J*K` / `J*M` |
| `rtl/denominator_unit.sv` | shift-and-add `L*M` / `L*K` |
| `rtl/reduction_control.sv` | reduction step sequencer |
| `rtl/reduction_unit.sv` | reduction datapath (X, Y, a, b, c, d) |
| `rtl/compare_unit.sv` | condition codes |
| `rtl/rat_processor.sv` | top level |
| `tb/rat_ref_pkg.sv` | reference gcd and reduction step counter for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. The
testbenches compare against plain integer arithmetic:

- a remainder-based gcd;
- exact cross-multiplied comparisons;
- a step-by-step replay of the reduction, used to predict the cycle count
  exactly.

`tb_rat_processor` runs the top level at its default size, `N = 11`. It runs
about 6000 random operations, and it counts every mechanism: each operation,
normalize, both force-odd steps, swap, subtract, overflow, zero result,
divide by zero, and each comparison outcome. It fails if any of them never
happens.

Example, from the repository root:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/rat_pkg.sv tb/rat_ref_pkg.sv tb/tb_rat_processor.sv \
        --top-module tb_rat_processor -Mdir obj_rat
    ./obj_rat/Vtb_rat_processor

Replace `tb_rat_processor` with any other `tb_*` name to run that block's
test. Every test finishes in well under a second.

To change the operand width, set `N` on `rat_processor`. The X/Y width
follows as `2N+1`, and the counters as `N`.
