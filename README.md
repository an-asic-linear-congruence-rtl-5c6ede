# Residual processor: an exact solver for linear congruences

A system of linear equations solved in floating point suffers rounding; solved
in a residue number system it does not. The integer system is solved modulo
many primes independently, and the results are combined with the Chinese
Remainder Theorem. The work per prime is a system of linear congruences

    A x = b (mod m),  A of size n x n,  m an odd prime below 2^24,

and the hardware that solves one of them is a *residual processor* (RP). This
repository holds synthesizable SystemVerilog for one RP. It follows the
architecture of a published ASIC linear-congruence solver, which was
synthesized for 130 nm, 110 nm and 55 nm cell libraries. The block structure
and the elimination-time formula come from that design. What is not
described there (the arithmetic inside the units, the row-slot schedule, the
host protocol) is this implementation's own; the section "Where this RTL
departs from the original" lists those choices.

The processor takes the augmented matrix `(A|b)` as signed 72-bit integers,
reduces every element modulo `m`, and runs Gauss-Jordan elimination. It
returns `x_1 .. x_n` and `det(A) mod m`, or flags the matrix as singular.

## Architecture

```
            DB_IN (72-bit elements)                    DB_OUT (x_k)
                 |                                          ^
   +-------------v------------------------------------------+---------+
   | rp_control: FSM, step/row counters, address MUX,                  |
   |   input_reducer, mod_inverse (INV), det_unit (AU_D)               |
   +---+--------------------+----------------------+-------------------+
       | PO_1 (parallel)    | IDB_IN (rp_idb_if)   | row address
       |                    |  broadcast           v
   +---+--------------------|------------------------------------------+
   | rp_memory: column 1 .. column N_MAX+1                              |
   |   each column = sram_column (N_MAX x 24) + column_reg (REG_j)       |
   +---SO_2--SI_1-----SO_3--SI_2---- ... ---SO_{n+1}--SI_n-----SI_{n+1}--+
         |    ^        |    ^                  |     ^          ^
        AU_2--+       AU_3--+        ...     AU_{n+1}-+     AU_{n+2} (writes 0)
   pivot_unit: zero detect on new column-1 values, pivot flags,
               pivot index, pivot index vector
```

- **Matrix memory** (`rp_memory`). One SRAM per matrix column, `N_MAX + 1`
  columns of `N_MAX` words, all sharing one row address. A read or write-back
  moves a whole row at once. Each column has a register `REG_j`. It is
  loaded in parallel from its SRAM and shifted serially, MSB first. Its serial
  output is `SO_j` and its serial input `SI_j`.
- **Arithmetic units** (`arith_unit`). There are `N_MAX + 1` of them, one per
  column, all working on the same row at the same time. Unit `AU_j` reads
  column `j` from `SO_j` and writes its result into column `j-1` through
  `SI_{j-1}`. The last unit has no column to read and fills the freed
  rightmost column with zeros.
- **Control unit** (`rp_control`). It sequences everything and holds the
  modulus. It sends each AU the row multiplier one bit per cycle over the
  shared bus `IDB_IN`. It reads column 1 directly on the parallel bus `PO_1`.
- **Pivot unit** (`pivot_unit`). It chooses the pivot row of each step and
  remembers which rows have been used. It records, per step, which row was
  the pivot.

## How an elimination step works

The key idea is that **every step shifts the whole matrix one column to the
left**. The pivot column is therefore always column 1. The control unit
reads it in parallel, and the eliminated column simply falls off the left
edge. After `n` steps only the right-hand side is left, in column 1, and it
holds the solution.

Step `k` with pivot row `p` (normalising Gauss-Jordan):

| row | AU_j computes | row multiplier sent on IDB_IN |
|---|---|---|
| pivot row `p` (first) | `a'_pj = c * a_pj mod m`, kept in the AU as `P_j` | `c = a_p1^-1` |
| every other row `i` (ascending) | `a'_ij = a_ij - c * P_j mod m` | `c = a_i1` (read on PO_1) |

The results go into column `j-1`, so `a'_{i,j}` becomes the new `a_{i,j-1}`.

Each row gets a **row slot** of exactly `5z - 2` cycles (118 for z = 24).
`t` counts cycles from 0 within the slot:

| t | action |
|---|---|
| 0 | read the row from all SRAMs |
| 1 | load all column registers; `PO_1` now shows `a_i1` |
| 2 .. z+1 | shift the row serially from `SO_j` into `AU_j` (and capture `a_i1` as the multiplier) |
| 2z+1 | clear the product accumulators |
| 2z+2 .. 3z+1 | z multiplication steps, one multiplier bit per cycle, MSB first |
| 3z+2 | form the result (scaled value, or difference mod m) |
| 3z+3 .. 4z+2 | shift results serially into `SI_{j-1}` |
| 4z+3 | write the row back; the new column-1 value goes to the pivot search |
| rest | idle |

The multiplication is the interleaved method: `acc = 2*acc + bit*y mod m`,
with two conditional subtractions per bit (`modmul_step`).

**Pivot search costs no cycles.** While step `k` writes rows back, the new
column-1 value of each row passes the zero detect. The first non-zero value
of a row not yet used as a pivot becomes the pivot of step `k+1`. For step
1 the same happens while column 1 is loaded. This is partial pivoting by
first non-zero element, which is all exact arithmetic needs.

**The inverse is hidden too.** At the start of a step, `mod_inverse`
inverts the pivot. It uses the binary extended Euclidean algorithm and needs
at most `2z + 1` cycles. The pivot row is the first slot of the step, and
its multiplier is not needed before `t = 2z + 2`. That point is
`3 + 2z + 2` cycles after the inverter starts, so the inverse is always
ready in time. An assertion in `rp_control` checks this.

**Determinant.** `det_unit` multiplies the pivots together, one per step,
bit-serially in the background. It also tracks the sign of the row
permutation: at each step it adds the parity of the number of earlier pivot
rows with a larger index than the current one. `det(A)` is that sign times
the product of the pivots.

**Solution read-out.** Row `p_k`, the pivot row of step `k`, ends up
holding `x_k` in column 1. The pivot index vector supplies `p_k`, and the
address multiplexer uses it to read the solution out in unknown order.

## Timing

The elimination takes exactly

    elim(n, z) = ((z + (4z - 2)) n + 3) n + 14  cycles

counted over the cycles in which `phase == PH_ELIM`. This is the original
design's formula. Here it is met by construction: `n` steps of 3 bookkeeping
cycles and `n` row slots each, plus 12 cycles before the first step and 2
after the last (`rp_pkg`). For z = 24:

| n | elimination cycles | time |
|---|---|---|
| 100 | 1,180,314 | 3 ms at about 390 MHz |
| 1000 | 118,003,014 | 381 ms at 310 MHz |

These agree with the elimination times reported for the original at 130 nm:
3 ms for n = 100 and 380 ms for n = 1000, where it reached 310 MHz.
Loading takes 10 cycles per element, because the
reduction handles 8 bits per cycle. That is about `10 n (n+1)` cycles, or 8 %
of the elimination time. Read-out takes 3 cycles per solution word when the
host is always ready.

Only half of the AUs do useful work on average. Columns left of the
diagonal have already been eliminated, but every AU runs in every slot. This
matches the original design.

## Host interface (`residual_processor`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `cmd_start` | in | 1 | start a problem (accepted in `PH_IDLE` or `PH_DONE`) |
| `cfg_n` | in | clog2(N_MAX+1) | runtime dimension, 1 .. N_MAX |
| `cfg_m` | in | Z | odd prime modulus, 3 .. 2^Z-1 |
| `db_in`, `db_in_valid`, `db_in_ready` | in/in/out | Q*Z | elements of `(A|b)`, two's complement, row by row: `a_i1 .. a_in, b_i` |
| `db_out`, `db_out_valid`, `db_out_ready` | out/out/in | Z | `x_1 .. x_n` |
| `phase` | out | 3 | `rp_pkg::phase_e`: IDLE, LOAD, ELIM, OUT, DONE |
| `det` | out | Z | `det(A) mod m`, valid in DONE |
| `singular` | out | 1 | set in DONE if some step found no pivot |

A transfer happens on a clock edge where valid and ready are both high.
`cfg_n` and `cfg_m` are sampled with `cmd_start`. Elimination begins by
itself once the last element is stored. A singular matrix ends in DONE with
`singular = 1`, `det = 0` and no output words.

Parameters: `N_MAX` (default 1000) is the largest `n`. `Z` (24) is the word
and modulus width. `Q` (3) gives the input width as `Q*Z` = 72 bits. `BPC`
(8) is the number of input bits reduced per cycle. `Z` must be at least 6
for the row slot to fit in `5z - 2` cycles.

## Sizes

At the defaults the memory is 1001 SRAMs of 1000 x 24 bits, about 24.0 Mbit.
Logic synthesis gives roughly 50,000 word-level cells and 122,000 flip-flop
bits, most of them in the 1001 AUs (4 x 24 bits each). The memory dominates
area, as in the original. Matrix dimensions from the original evaluation
fit as follows:

| n | matrix memory needed | fits N_MAX = 1000 |
|---|---|---|
| 100 .. 1000 | n (n+1) x 24 bits | yes |
| 2000, 4000, 8000 | 96 Mbit, 384 Mbit, 1.5 Gbit | no: set `N_MAX` to n |

Larger sizes need only a larger `N_MAX`. The original reports that clock
frequency falls at such sizes, because of the fan-out of the row-wide buses
to thousands of AUs.

## Where this RTL departs from the original

Taken from the original: the block structure (column SRAMs with column
registers, serial AUs shifting the matrix left, `PO_1`, `IDB_IN`, control
unit with inverter and determinant unit, zero detect, pivot found, pivot
index, pivot flags, pivot index vector, step and row counters, address
multiplexer); the 24-bit modulus and 72-bit inputs; runtime `n` and `m`;
reduction of the inputs; and the elimination-time formula.

This implementation's own choices:
- the row-slot schedule inside the `5z - 2` cycles, and the 3 + 14 overhead
  cycles, which are padding apart from the pivot bookkeeping;
- the normalising Gauss-Jordan form, with the pivot row first in each step;
- the arithmetic: interleaved serial multiplication, binary extended
  Euclidean inversion, and determinant sign from pivot-row parity;
- pivot choice by first non-zero row, found during write-back;
- the host protocol (valid/ready), two's complement inputs, the output
  order, and the singular-matrix behaviour;
- loading writes each reduced element straight into its SRAM column;
- the SRAMs are plain synchronous single-port arrays standing in for
  compiler-generated macros.

Not built: the auxiliary units `G`, `M`, `N` and `Mo` of the original
control unit, whose functions are not known. Input reduction is done by
`input_reducer`, which may correspond to `Mo`. Also not built: the second
internal bus `IDB_OUT`, whose contents are not known (results are read
through `PO_1` instead). The surrounding modular system (several RPs, a
central control unit, a system bus and the CRT recombination) is not part
of this RTL.

## Verification

Each unit has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=F`.

| testbench | unit | what it checks |
|---|---|---|
| `tb_sram_column` | `sram_column` | reads against a shadow copy, write/idle behaviour of the read port |
| `tb_column_reg` | `column_reg` | parallel load, MSB-first shift out/in, load priority |
| `tb_rp_memory` | `rp_memory` | host loading, row read, all SO bits, SI shift-in, write-back |
| `tb_arith_unit` | `arith_unit` | scale and eliminate passes against `%` arithmetic |
| `tb_mod_inverse` | `mod_inverse` | `a * inv = 1 mod m`, latency at most 2z+1 |
| `tb_det_unit` | `det_unit` | signed pivot products, z-cycle multiply |
| `tb_input_reducer` | `input_reducer` | signed 72-bit reduction including extremes, latency |
| `tb_pivot_unit` | `pivot_unit` | pivot choice, flags, index vector, permutation parity |
| `tb_rp_control` | `rp_control` | load writes, slot strobes, row order, factors, pivot order, cycle count, singular stop (memory modelled) |
| `tb_residual_processor` | whole RP, N_MAX = 8 | 19 random systems, n = 1..8, several primes (3 to 2^24-3) |
| `tb_rp_n100` | whole RP, N_MAX = 100 | two 100 x 100 systems, memory full |
| `tb_rp_full` | whole RP, default N_MAX = 1000 | n = 6 and n = 100 |

The end-to-end tests compute the expected solution and determinant
independently: reduction with `%`, Gaussian elimination with row swaps, and
a Fermat inverse. They also check `A x = b (mod m)` directly, and check the
elimination cycle count against the formula. They count how often each
mechanism occurred and fail if one never did. The mechanisms are: a pivot
search skipping a zero, an odd row permutation, a singular matrix, negative
and wider-than-64-bit inputs, stalls on both buses, back-to-back problems,
and `n = N_MAX`.

The largest system simulated is `n = 100` on the default 1000-column
hardware, about 1.2 million cycles in roughly a minute. `n = 1000` (118
million cycles) has not been simulated.

Running a test with Verilator (5.x), from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
  rtl/rp_pkg.sv tb/tb_residual_processor.sv --top-module tb_residual_processor
./obj_dir/Vtb_residual_processor
```

`-y rtl` lets Verilator find every module and the `rp_idb_if` interface by
name. Only the package has to be named, ahead of the testbench. Replace the
testbench name to run another test. The shared end-to-end checking code is
in `tb/rp_tb_body.svh`.
