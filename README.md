# Mersenne modulo shadow datapaths

Arithmetic datapaths (multipliers, adders, dot products, matrix products) can
check themselves cheaply by running the same computation a second time on
*residues*. Map every input x to x mod M, do the same adds and multiplies
modulo M, and the result's residue must equal the residue of the main
datapath's output:

    x + y = z  implies  x' + y' = z'   (mod M)
    x * y = z  implies  x' * y' = z'   (mod M)

A fault anywhere in the main datapath or the shadow logic usually breaks that
equality and raises an `err` flag. The shadow logic is only n bits wide
(n = 2..8), so it is far smaller than duplicating the datapath.

This RTL uses Mersenne bases M = 2^n - 1. That choice makes every shadow
unit a plain network of full adders, AND/NAND gates and inverters. The
repository contains:

* the modulo functional units: a reducer (W bits down to an n-bit residue),
  an adder, a negator, a subtractor, a multiplier and a zero comparator;
* two self-checking multiply-accumulators (MACs), one combinational and one
  pipelined;
* five pipelined self-checking linear-algebra primitives: scalar-vector,
  inner, outer, matrix-vector and matrix-matrix products;
* a top level (`shadow_datapath_top`) that puts all of them side by side.

All RTL is synthesizable SystemVerilog-2017. Every module has a
self-checking testbench.

## Why 2^n - 1 makes everything full adders

Two facts about M = 2^n - 1 carry the whole design.

**Weights wrap around.** Since 2^n = 1 (mod M), a bit of weight 2^i may be
moved to weight 2^(i mod n). A W-bit integer is then the same, modulo M, as
a stack of ceil(W/n) rows of n bits each: bits 0..n-1 form row 0, bits
n..2n-1 form row 1, and so on. A carry leaving bit n-1 of a row has weight
2^n = 1, so it re-enters at bit 0.

**Zero has two encodings.** An n-bit residue ranges over 0..2^n-1. The
all-ones word equals M, which is again zero. The units accept and produce
both encodings ("non-normalized" residues) and never spend logic on
normalizing. Negation is then only a bitwise NOT, because
M - a = (2^n - 1) - a = ~a.

### Row reduction (`mod_row_reduce`, `mod_fa_row`)

This is the core of every unit. Take three rows, pass bit i of each through
one full adder, and you get two new rows. One holds the sum bits at their
own weights. The other holds the carry bits moved up one position, with the
top carry wrapped to bit 0 (`mod_fa_row`). Both new rows are ordinary
residues: the output is *not* a sum word and a carry word. Three rows
become two, so each full adder removes exactly one bit.

`mod_row_reduce` repeats this step Wallace-tree style. In each step the rows
are taken in consecutive triplets, and the 0-2 rows left over pass to the
next step unchanged. It stops when two rows remain. For a 32-bit input with
n = 2 this takes 16 rows down to 2 in 6 steps, using 14 two-bit full-adder
rows (28 full adders: one per bit removed, 32 - 4). The number of steps is
computed at elaboration by `mersenne_pkg::num_stages`.

Reducing only to two rows is deliberate. Adding the last two rows needs
half adders, which remove no bits. So wherever a consumer can take two rows
(the zero comparator, or another reduction tree), the datapaths pass 2n bits
and skip the final adder.

### The units

| module | function | how |
|---|---|---|
| `mod_part_reducer` | W bits to 2 rows (2n bits) | cut into rows, top row zero-padded, then `mod_row_reduce` |
| `mod_reducer` | W bits to n-bit residue | partial reducer + `mod_adder` |
| `mod_adder` | (a + b) mod M | ripple-carry adder, then its carry-out re-enters at bit 0 through a half-adder chain. The chain's MSB is a single OR gate, because a carry can never ripple out of the second stage (both inputs of that bit cannot be 1 at once) |
| `mod_negate` | -a mod M | bitwise NOT |
| `mod_subtractor` | (a - b) mod M | `mod_adder(a, ~b)` |
| `mod_pp_matrix` | n rows summing to a*b (or -(a*b)) | n x n AND array. Row j is `a & b[j]` rotated left by j. With `NEGATE=1` the ANDs become NANDs |
| `mod_multiplier` | (a * b) mod M | product array, row reduction, `mod_adder` |
| `mod_zero_cmp` | is a + b = 0 mod M? | true exactly when a = ~b, or both are all-zeros, or both are all-ones |

## Self-checking datapaths

### Multiply-accumulate (`sc_mac`, `sc_mac_pipe`)

The main datapath computes `y = a*b + c`, unsigned, truncated to W bits. The
shadow datapath computes, modulo M:

    y  +  (-(a' * b'))  +  (-c')   must be 0

The terms are built as follows:

* a and b go through full reducers to n-bit residues.
* Their product goes through a NAND array, giving n rows that sum to -(a'b').
* c goes through a *partial* reducer, giving two rows, which are inverted to
  get -c'.
* y is cut into ceil(W/n) rows.

All these rows enter one reduction tree. The two rows it leaves go to the
zero comparator, and `err = 1` when they do not sum to zero.

`sc_mac_pipe` cuts this into stages, so the slower shadow logic does not set
the clock period:

```
edge k     : a, b, c sampled (in_vld)
             main: y <= a*b+c                 -> out_vld, y    after edge k
             shadow 1: residues of a, b and inverted rows of c registered
edge k+1   : shadow 2: product array + reduction tree -> 2 rows registered
edge k+2   : shadow 3: zero comparator -> err registered -> err_vld, err after edge k+2
```

So `err` arrives two clocks after the result it judges. A new operation can
be issued every clock. The inversion of the c rows sits at the register
input, as an inverting flip-flop would.

### Linear-algebra primitives

The primitives use the same three-stage shadow pipeline. For each result
element, the back end `sc_out_check` reduces the W-bit result, the negated
residue products of all the terms that make up that element, and any
negated addend rows. Then it compares with zero and registers `err`. Each
input element has its own full reducer, whose residue is registered in
stage 1.

| module | computes | default size | input reducers + output checks | main multipliers |
|---|---|---|---|---|
| `sc_scalar_vec` | y[i] = s*v[i] | 3 elements | 4 + 3 = 7 | 3 |
| `sc_inner_prod` | y = sum a[i]*b[i] | 3 elements | 6 + 1 = 7 | 3 |
| `sc_outer_prod` | y[i][j] = a[i]*b[j] | 3 x 3 | 6 + 9 = 15 | 9 |
| `sc_matvec` | y[i] = sum_j m[i][j]*v[j] | 2x3 times 3 | 9 + 2 = 11 | 6 |
| `sc_matmul` | c = a*b | 2x2 times 2x2 | 8 + 4 = 12 | 8 |
| `sc_mac_pipe` | y = a*b + c | scalar | 3 + 1 = 4 | 1 |

The "reducers per multiplier" ratio in this table is a quick estimate of
the shadow area overhead: reducers dominate the shadow cost, and multipliers
dominate the main cost. Sizes are parameters: `LEN`, `ROWS`/`COLS`, `DIM`.
Each primitive ORs the `err` of all its result elements into one `err`.

### Top level (`shadow_datapath_top`)

`shadow_datapath_top #(N = 2, W = 32)` instantiates one of each datapath.
Their ports are prefixed `mac_`, `pmac_`, `svp_`, `ip_`, `op_`, `mv_` and
`mm_`, and the datapaths share only `clk` and `rst_n`. A combinational
residue unit (`ru_`) exposes the stand-alone reducer, adder, subtractor and
multiplier. Vector and matrix ports are packed arrays, element `[i]` (or
`[i][j]`, row-major) at the highest index first.

## What `err` tells you

* **Single-bit errors in a result are always caught.** Flipping bit k
  changes y by 2^k, which is never a multiple of 2^n - 1 for n >= 2.
* **Larger errors escape only if they alias.** A corrupted result is missed
  only when its error is a multiple of M. Wider residues make that rarer.
* **Overflow raises `err`.** A result that overflows W bits wraps k times,
  so it differs from the true value by k * 2^W. Modulo M, 2^W equals
  2^(W mod n), which is never zero and is invertible. So `err` is raised
  unless k happens to be a multiple of M. The testbenches model this
  exactly. If overflow is legal in your use, gate `err` accordingly.
* **Shadow faults cause false alarms, not wrong results.** A fault in the
  shadow logic can raise `err` while y is correct. It cannot make a wrong y
  look right unless it happens to cancel the error.
* **`err` is only meaningful while `err_vld` is 1.** It is held at 0
  otherwise.

`err` only detects. Recovery (restart, pipeline flush, rollback to a
checkpoint) belongs to the surrounding system.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 2 | residue width n; modulo base 2^N - 1. Any N >= 2 with W >= 2N |
| `W` | 32 | main datapath width |
| `LEN`, `ROWS`, `COLS`, `DIM` | 3, 2, 3, 2 | primitive sizes, see the table above |
| `TERMS`, `EXTRA` (`sc_out_check`) | 1, 0 | products per result, negated addend rows |
| `ROWS` (`mod_row_reduce`) | 16 | rows in the stack |
| `NEGATE` (`mod_pp_matrix`) | 0 | 1 gives a NAND array |

## Design choices

The following were chosen here rather than taken from the original
description:

* **Arithmetic is unsigned and truncated to W bits.** Overflow is flagged
  (see above).
* **Reset and handshake.** `rst_n` is asynchronous and active low. It
  clears only the valid bits (`out_vld`, `err_vld` and the internal stage-2
  valid). A single `in_vld` travels with each operation. There is no stall
  or back-pressure.
* **Triplet order.** The reduction tree takes consecutive rows as triplets.
  Any grouping gives the same residue. Only the gate-level delay profile
  would differ.
* **Zero comparator gates.** The comparator is written from its truth
  condition (complement, or both rows all-zero, or both all-one). It is not
  a specific gate network.
* **Primitive sizes** were inferred from the reducer and multiplier counts
  above. The 6-multiplier, 11-reducer matrix-vector product could also be
  3x2 times 2, and is set here to 2x3 times 3.
* **Primitive pipelining and `err`.** The primitives follow the MAC's
  pipelining. Their `err` is an OR over elements.
* **Constant-zero padding.** Padding bits of a reducer's top row are left
  as constant zeros. A synthesis tool turns the full adders they feed into
  half adders.
* **Standard-cell mapping** is left to synthesis. The RTL describes the
  intended full-adder, AND/NAND and OR structure with ordinary operators.
  The reported area and delay figures of hand-mapped 1x-cell netlists are
  not reproduced here.

## Verification

Each module has a testbench `tb/tb_<module>.sv`. Each one compares the
module with an independent model, uses a watchdog, and prints
`TB_RESULT checks=<n> failures=<n>`.

* **Arithmetic units** (`mod_*`) are checked exhaustively for several n
  (2-5). The reducers are checked randomly at 32 bits with n = 2 and n = 3,
  at 20 bits (padded) and at 16 bits with n = 8. Both encodings of zero are
  accepted where legal.
* **Datapath testbenches** stream operations with random gaps and
  back-to-back issue. Operands have a uniformly distributed number of
  leading zeros, so small results and overflows both occur. Each testbench
  checks the result at one clock, `err` at exactly two further clocks, and
  `err` against a residue model of the truncated result. The primitives run
  at W = 32 and 64, each with n = 2 and 3.
* `tb_shadow_datapath_top` drives the whole top at its default parameters.
  It counts a flagged error and a clean result for each datapath,
  back-to-back issue, and the all-ones zero leaving the residue unit. It
  fails if any of these never happens.
* `tb_workload_mac_sweep` runs the pipelined MAC at every width pair of its
  evaluation: 8-bit with n = 2..4, and 16, 32 and 64-bit with n = 2..8 (24
  configurations).
* `tb_workload_fault_injection` flips one register bit of the pipelined MAC
  (n = 2 and n = 5) per experiment, for the one clock in which that bit is
  used. The flipped bit is in the result register, the residue registers,
  the negated-c rows or the stage-2 rows. The testbench classifies each
  experiment as masked, detected or failed, and requires zero undetected
  wrong results. This is a register-level stand-in for gate-level fault
  injection: it does not flip combinational gate outputs.

Run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/mersenne_pkg.sv tb/tb_sc_mac_pipe.sv \
  --top-module tb_sc_mac_pipe -o sim
obj_dir/sim +verilator+rand+reset+2
```

`mersenne_pkg.sv` must be read first. Every other file is found by module
name in `rtl/` and `tb/`. The longest run is the whole-design testbench at
default parameters: about 20 s of simulation plus compile.

## Files

* `rtl/mersenne_pkg.sv`: elaboration-time row-count functions.
* `rtl/mod_*.sv`: modulo functional units.
* `rtl/sc_*.sv`: self-checking datapaths and the shared back end
  `sc_out_check`.
* `rtl/shadow_datapath_top.sv`: the top level.
* `tb/`: one testbench per module, the top-level test, and the two workload
  testbenches (`tb_workload_*`).
