# Bit-level Montgomery multiplier array

RSA encryption and decryption are long chains of modular multiplications `A*B mod M` on
numbers hundreds of bits wide. Montgomery's method avoids the trial division that a plain
modular reduction needs: instead of `A*B mod M` it computes

    P = (A*B + Q*M) / 2^N        with Q chosen bit by bit so that the division is exact,

which is congruent to `A*B * 2^-N (mod M)`. The unwanted factor `2^-N` cancels out if all
operands are kept in "Montgomery form" (`X * 2^N mod M`), so a whole exponentiation can be done
with this one operation. The modulus must be odd.

This RTL builds that operation as a two-dimensional array of one-bit cells, following
C. D. Walter's systolic arrangement in radix 2: one row per bit of `A`, one column per bit of
`B` and `M`. The default size is 3 x 3 (3-bit operands), the size of the FPGA prototype the
design was first tried on; the parameter `N` builds any size from 2 upwards.

## The algorithm the rows perform

    P := PI                                    (0 for a plain product)
    for i = 0 .. N-1:
        Q[i] := (P[0] + A[i]*B[0]) mod 2       choose the modulus multiple
        P    := (P + A[i]*B + Q[i]*M) / 2      always exact, because M is odd
    POUT := P

Row `i` of the array is iteration `i`. Adding `Q[i]*M` makes the low bit of the sum zero, so
the division by 2 is just wiring: the sum bit produced in column `j` becomes bit `j-1` of the
next row's partial product.

## Cells

**Rightmost cell, column 0 (`mm_cell_right`).** It forms `Q[i] = P[0] xor (A[i] and B[0])`
and broadcasts it along the row, together with `A[i]`. Its sum `P[0] + A[i]B[0] + Q[i]M[0]` is
0 or 2, so it emits no sum bit, only a carry of 0 or 1 into column 1.

**Typical cell, columns 1..N-1 (`mm_cell`).** It computes

    p_out + 2*carry_out = p_in + A[i]*B[j] + Q[i]*M[j] + carry_in

with a carry of value 0..3 carried on two wires, `c` (weight 1) and `d` (weight 2), bundled as
`syst_pkg::carry_t`. Within a row the carry never goes above 2: the rightmost cell emits at most
1, and a typical cell's sum is then at most 1+1+1+2 = 5. A gate-level version of this cell
(five half adders and two OR gates) is therefore exact, and so is the single 3-bit addition
used here.

## The array (`syst`)

- `A[i]` and `Q[i]` run along row `i`; `B[j]` and `M[j]` run down column `j`.
- The sum bit of row `i`, column `j` feeds row `i+1`, column `j-1`.
- The `c` wire of the leftmost carry of a row becomes the top bit (`N-1`) of the next partial
  product.
- `POUT` is the partial product leaving the last row.

**Latches between rows.** Each `B` and `M` bit passes from row `r` to row `r+1` through a
level-sensitive latch (`latch1`). Each latch has its own enable: `CLB[r*N+j]` for `B[j]` and
`CLM[r*N+j]` for `M[j]`. With every enable high, the array is one combinational path from the
inputs to `POUT`. Lowering an enable freezes the bit that all later rows see, while earlier rows
follow the inputs. There is no clock and no reset. The latches hold random values at power-up
until they are first opened.

### Result width: the thing to know before using it

Only `N` bits of partial product pass from row to row. The `d` wire of each row's leftmost
carry, which would be bit `N`, is dropped. The intermediate values of Montgomery's method stay
below `2M`, so this costs nothing when `2M <= 2^N`. Precisely, `POUT` is the exact Montgomery
product, congruent to `A*B*2^-N mod M` and below `2M`, whenever:

- `M` is odd,
- `M <= 2^(N-1)`,
- `B < M`,
- `PI = 0`.

The testbenches check this exhaustively at N = 3 and on random vectors at N = 16. Outside that
range (for example M = 7 with N = 3) a result can lose its top bit and come out wrong. The
testbenches model this truncation exactly. A designer who wants the full range for
`M < 2^N` should add one column, so that the `d` wire is kept. This design does not do that.

To remove the `2^-N` factor from a single product, apply the operation a second time with
`B = 2^(2N) mod M`. The result may also need a final subtraction of `M` to fall below `M`.

## Interface of the top, `syst #(N = 3)`

| port   | dir | width     | meaning                                                   |
|--------|-----|-----------|-----------------------------------------------------------|
| `AI`   | in  | N         | multiplier A; bit i enters row i                          |
| `BI`   | in  | N         | multiplicand B                                            |
| `MI`   | in  | N         | modulus M, must be odd                                    |
| `PI`   | in  | N         | initial partial product, normally 0                       |
| `CLB`  | in  | N*(N-1)   | enables of the B latches between rows, bit `row*N+col`    |
| `CLM`  | in  | N*(N-1)   | enables of the M latches between rows, bit `row*N+col`    |
| `POUT` | out | N         | result                                                    |

The result is valid once the combinational paths settle. The longest path is a carry chain
along each of the N rows. At N = 3 the top has 24 input bits and 3 output bits. That fits the
pin list of a small FPGA board, and this is how the prototype was driven: operands were set
with wires and the result was shown on LEDs.

Reference values at N = 3, with M = 5, PI = 0 and the latches open:

- A=7, B=3 gives 7.
- A=6, B=4 gives 3.
- With B=4, the A values 3, 7, 0, 4, 2, 6, 1, 5, 3 give 4, 6, 0, 2, 1, 3, 3, 5, 4.

## Files

| file                     | contents                                                        |
|--------------------------|-----------------------------------------------------------------|
| `rtl/syst_pkg.sv`        | `carry_t`, default size `SYST_N = 3`                             |
| `rtl/mm_cell.sv`         | typical cell                                                    |
| `rtl/mm_cell_right.sv`   | rightmost cell, derives `Q[i]`                                  |
| `rtl/latch1.sv`          | level-sensitive latch                                           |
| `rtl/syst.sv`            | the N x N array (top)                                           |
| `tb/syst_ref_pkg.sv`     | integer reference model of the array, with per-row B and M      |
| `tb/tb_mm_cell.sv`       | all 128 input combinations of the typical cell                  |
| `tb/tb_mm_cell_right.sv` | all 16 input combinations of the rightmost cell                 |
| `tb/tb_latch1.sv`        | transparency and hold                                           |
| `tb/tb_syst.sv`          | array at N = 3, see below                                        |
| `tb/tb_syst_wide.sv`     | array at N = 16, 5000 random products                            |

`tb_syst` does three things:

1. It applies the reference values above, with all latch enables toggling as they did on the
   prototype.
2. It sweeps every A, B, odd M and PI with the latches open.
3. It runs 4000 random steps with random latch enables. The expected values come from a
   behavioural model of the latch chain.

It counts how often the modulus was added, a top bit was dropped, a later row used a held
(stale) B or M, and all latches were open. A mechanism that never happened counts as a failure.
None of the designs has a clock, so no cycle counts are checked.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and exits. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/syst_pkg.sv tb/syst_ref_pkg.sv rtl/latch1.sv rtl/mm_cell.sv \
        rtl/mm_cell_right.sv rtl/syst.sv tb/tb_syst.sv --top-module tb_syst
    ./obj_dir/Vtb_syst

For another testbench, substitute its name. The cell and latch testbenches need only
`syst_pkg.sv` and their own module. To change the size, set `N` on `syst`. Then keep
`M <= 2^(N-1)` and `B < M`, or accept the truncation described above.

## Departures and choices

- The array has no registers between rows. Walter's fully systolic version pipelines every
  cell and gives its first output digit after 2n+2 clock cycles. That pipelined version is not
  built here: only `B` and `M` are latched between rows.
- The cells are written as additions, not as gate netlists. They are equivalent over every
  input the array can produce, and `tb_mm_cell` checks all 128 combinations.
- The cells have no pass-through outputs for `A`, `B`, `M` and `Q`. The array wires these
  directly.
- The width is generalised from a fixed 3 x 3 netlist to the parameter `N`, with the latch
  numbering `row*N+col`. The default stays 3.
- Verilator may say that it found no latch in `latch1` when linting the whole array. The
  synthesized netlist has one latch per instance (12 at N = 3), and the latch-hold tests pass.
