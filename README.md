# Serial floating-point predistorter for pruned Volterra models

An RF power amplifier distorts its input in two ways: it compresses large
signals, and its output depends on past samples as well as the present one
(memory effects). A digital predistorter sits in front of the amplifier and
applies an approximate inverse of that distortion, so the chain as a whole
comes out linear. A Volterra series models both effects well, but the full
series grows too fast to use. A *pruned* series keeps only a few chosen terms
(basis functions) `phi_r`, each with a complex coefficient `theta_r`:

    y(n) = sum_{r=1..R} theta_r * phi_r(n)

This RTL implements a predistorter for such models in complex IEEE-754
single precision. Its main idea is that the basis functions are not fixed in
hardware. They are built one after another at run time, following a small
program called the **indices table**. The table is written by whatever tool
selected the model, for example the Basis Propagating Selection (BAPS)
algorithm. Any pruned Volterra model that can be written as such a table runs
on the same hardware. This includes memory polynomials, GMP and BAPS, with
causal terms only. The architecture follows the processor described in
*DSP Hardware Tradeoffs for Digital Predistortion based on Pruned Volterra
Series*. Where that description stops, this design makes its own choices, and
they are listed below.

## Building basis functions from two operations

Every basis function used here can be built from earlier ones with two
operations:

* **type I**: delay. `phi_r(n) = phi_i(n - m)` is basis function `i` as it was `m`
  samples ago.
* **type II**: triple product. `phi_r(n) = phi_i(n) * phi_j(n) * conj(phi_k(n))`
  multiplies three basis functions of the current sample, conjugating the
  third. This product raises the order of the nonlinearity by two.

There is also a **type 0** operation: `phi_1(n) = x(n)`, the input sample
itself.

Each table entry describes one basis function. It holds three 8-bit fields
and a 2-bit type (`dpd_pkg::entry_t`):

| type | code | f1 | f2 | f3 |
|------|------|----|----|----|
| 0    | 0    | 0  | 0  | 0  |
| I    | 1    | i  | m (delay) | 0 |
| II   | 2    | i  | j  | k  |

Basis functions are numbered from 1, in the order of the table. Here is a
six-entry example, which the top-level testbench runs with a memory depth of 2:

| r | f1 | f2 | f3 | type | meaning |
|---|----|----|----|------|---------|
| 1 | 0 | 0 | 0 | 0  | `x(n)` |
| 2 | 1 | 1 | 1 | II | `x x x* = |x|^2 x` |
| 3 | 1 | 2 | 2 | II | `x phi_2 phi_2*` |
| 4 | 2 | 1 | 0 | I  | `phi_2(n-1)` |
| 5 | 3 | 2 | 0 | I  | `phi_3(n-2)` |
| 6 | 1 | 2 | 4 | II | `x phi_2 phi_4*` |

## Where the basis functions live: the shift register file

`basis_mem` is a two-dimensional array of complex registers. There is one row
per basis function. There are `MEM_DEPTH + 1` columns, one per delay:

* Column `M0` holds the values being built for the current sample. Each
  entry writes its result into `M0` of its own row, so later entries can use
  it.
* Column `Mc` holds the same row as it was `c` samples earlier.

When a new sample is accepted, every column first moves one step
(`M0 -> M1 -> ... -> M_DEPTH`). A type I entry then reads row `i`, column
`m`. A type II entry reads three rows of column `M0`.

Most rows are never delayed, so most of the array does not need to shift.
`indices_table` works out, for every row, the largest delay that any type I
entry asks of it (`row_depth`). A register at row `r`, column `c >= 1`
shifts only if `c <= row_depth[r]`, and keeps its value otherwise. In the
six-entry example only rows 2 and 3 ever move beyond `M0`.

In silicon this enable would become clock gating. That saves most of the
array's switching power, because the delay registers then draw little next
to the type II multiplier. The RTL uses enables, not gated clocks, so that it
stays portable. Swapping in integrated clock-gating cells is a backend step.

A register that was held still under one table contains stale data under the
next table. For that reason, writing the indices table also clears the whole
memory. After a reload, the delayed terms start from zero, just as they do
after reset.

## Datapath

```
in_sample -> [input reg] --type 0------------------------\
                                                          mux -> basis -> MAC -> acc -> (gated by result_ready) -> out_sample
basis_mem --read port--> type I --------------------------/        ^
          --read port--> A, B, C regs -> type2_mul (II) --/   coeff_array[r]
     ^ write M0 <--------------- basis
```

* `bfg` (basis function generator). It contains the input register, the
  basis memory, the operand registers A/B/C, the type II multiplier and the
  output select. The memory has a single read port. A type II entry therefore
  reads `phi_i`, `phi_j` and `phi_k` in three cycles, then spends one cycle
  computing.
* `type2_mul`. This computes `(a * b) * conj(c)` with two chained `cplx_mul`
  units, all combinational in one cycle.
* `cplx_mul`. This uses four `fp32_mul` and two `fp32_add` units working in
  parallel.
* `mac`. This is a two-stage pipeline. The first stage forms `theta_r * phi_r`
  and registers it. The second stage adds the product to the accumulator. A
  new pair can enter every cycle.
* `coeff_array` and `indices_table`. These are register arrays, written
  through simple write ports and read combinationally at the index of the
  current entry.
* `dpd_ctrl`. This is the sequencer. It runs the handshake and steps through
  the entries. For each entry it decodes the type and issues the memory
  addresses, read and write enables, operand selects and output select.

### Number format

Every value is a complex number made of two IEEE-754 binary32 words
(`dpd_pkg::cfp_t`, `{re, im}`, 64 bits). The floating-point units round to
nearest, ties to even. They treat subnormal inputs as zero and flush results
below the smallest normal number to a signed zero. They produce the quiet NaN
`0x7FC00000` for invalid operations. Both units are combinational.

## Handshake and timing

The top level has a valid/ready sample interface:

1. The user places `x(n)` on `in_sample` and raises `sample_ready`.
2. The sample is captured at a rising edge where `sample_ready` and
   `request_sample` are both high. At that same edge the memory columns shift
   and the accumulator is cleared. `request_sample` and `result_ready` fall.
3. The controller runs the entries in order. Type 0 and type I entries take
   one cycle each. Type II entries take four.
4. One cycle later the last product is in the accumulator. The following
   cycle raises `result_ready` and `request_sample` together, and `out_sample`
   now shows `y(n)`. While `result_ready` is low, `out_sample` is forced to
   zero.
5. If `sample_ready` is still high, with the next sample already on
   `in_sample`, that sample is captured at the next edge. If not, the design
   waits.

After reset, `request_sample` is high and `result_ready` is low.

With `n0`, `n1` and `n2` entries of types 0, I and II:

* `result_ready` rises `2 + n0 + n1 + 4*n2` cycles after the capture edge.
* Back to back, the sample period is `3 + n0 + n1 + 4*n2` cycles.

Compared with a type I entry, a type II entry costs two more memory reads and
three more cycles. The MAC always takes two cycles per term, and the overhead
per sample is constant. The processing time therefore follows directly from
the mix of operations in the table. For the 13-entry tables that were
evaluated for this architecture:

| configuration | type I | type II | cycles/sample | Msample/s at 220 MHz |
|---------------|--------|---------|---------------|----------------------|
| CFG_1 | 9 | 3 | 25 | 8.8 |
| CFG_2 | 8 | 4 | 28 | 7.9 |
| CFG_3, baseline | 6 | 6 | 34 | 6.5 |
| baseline (one run) | 5 | 7 | 37 | 5.9 |
| CFG_4 | 9 | 3 | 25 | 8.8 |
| CFG_5 | 10 | 2 | 22 | 10.0 |
| CFG_6 | 12 | 0 | 16 | 13.8 |
| CFG_7 | 0 | 12 | 52 | 4.2 |

The type II product is the most expensive operation in power as well as in
time. A table with fewer type II entries runs faster and draws less power.
CFG_5 was reported as a good trade-off against the BAPS baseline: 37 % less
dynamic power, at a cost of 1.3 dB in NMSE and 0.6 dB in ACPR.

## Loading a model

Load the table and coefficients while `request_sample` is high, between
samples. An assertion checks this.

* Write entry `r`, numbered from 0 (basis function `r+1`), with `tbl_we`,
  `tbl_waddr = r` and `tbl_wdata`.
* Write its coefficient with `coef_we`, `coef_waddr = r` and `coef_wdata`.

Entry 0 should be type 0. All `N_BASIS` entries are run for every sample.
Other assertions flag type I entries whose row or delay is out of range, and
type II entries that point outside the table. If a type II entry names a row
that has not yet been built for the current sample, it reads that row's value
from the previous sample.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N_BASIS` | 13 | table entries and basis functions. This is the size of every evaluated model. |
| `MEM_DEPTH` | 4 | largest delay `m` a type I entry can use. The evaluated tables do not publish their delays, so this value is this design's choice. |

Both parameters must stay below 256 because of the 8-bit fields. The default
top has 5,730 flip-flop bits, most of them in the 13 x 5 x 64-bit basis
memory.

## What follows the source and what is this design's own

These points come from the description:

* the two operations and the table encoding (i, j, k / i, m, 0)
* the shift register file with column shift before each new sample
* table-driven gating of unused memory registers
* the single-port memory with sequential type II operand reads
* one cycle per floating-point operation
* the cycle costs of type I and type II entries
* the two-cycle MAC
* the sample-ready / request-sample handshake
* gating of the output by result-ready
* causal terms only
* 13 basis functions

These points are this design's own choices:

* the binary32 rounding details and flush-to-zero handling
* the 8-bit fields and type codes
* the write ports for the table and the coefficients
* clearing the memory when the table is reloaded
* asynchronous active-low reset
* `MEM_DEPTH = 4`
* the four-multiplier complex product and the product order `(a*b)*conj(c)`
* the one-cycle done state and the exact cycle overhead
* enables in place of gated clocks

Nothing here has been timed against the 220 MHz target. A type II compute
cycle chains two complex multiplications without a register between them.
That may need retiming or an extra pipeline stage in a real process. Power,
NMSE and ACPR are not modelled. Neither is the identification flow (BAPS
selection and indirect-learning coefficient fitting), which runs offline.

## Files

| file | contents |
|------|----------|
| `rtl/dpd_pkg.sv` | types: `fp32_t`, `cfp_t`, `op_type_e`, `entry_t`, `bfg_ctrl_t` |
| `rtl/dpd_top.sv` | top level |
| `rtl/dpd_ctrl.sv` | controller |
| `rtl/indices_table.sv`, `rtl/coeff_array.sv` | model storage |
| `rtl/bfg.sv`, `rtl/basis_mem.sv`, `rtl/type2_mul.sv` | basis function generator |
| `rtl/mac.sv`, `rtl/cplx_mul.sv`, `rtl/fp32_mul.sv`, `rtl/fp32_add.sv` | arithmetic |
| `tb/tb_fp_pkg.sv` | reference binary32 arithmetic (double precision, rounded by hand) |
| `tb/tb_dpd_pkg.sv` | reference model of the whole predistorter, control schedule per entry |
| `tb/*_tb.sv` | one self-checking testbench per module; `dpd_full_tb` runs the default-size design |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. Each one has a
watchdog. Build and run one, for example the full-size run of all
configurations, with:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/dpd_pkg.sv tb/tb_fp_pkg.sv tb/tb_dpd_pkg.sv tb/dpd_full_tb.sv \
        --top-module dpd_full_tb -o sim
    ./obj_dir/sim

Replace `dpd_full_tb` with any other testbench name to run that one instead.
The testbenches check the design against independent references:

* The floating-point units are compared bit for bit with correctly rounded
  double-precision results.
* The complex units, the MAC, the BFG and the full design are compared with a
  reference model that computes in binary32 in the datapath's order. Results
  must match within one unit in the last place. They must also agree with a
  pure double-precision model within a relative tolerance.
* The controller's control words are checked cycle by cycle.
* Latency and sample period are checked against the formulas above.

`dpd_top_tb` uses the six-entry example and random tables. It also counts
type 0, I and II operations, gated registers, idle waits, back-to-back
samples, non-zero delayed reads and table reloads. It fails if any of these
never occurs.

`dpd_full_tb` runs at the default size. It streams 32 samples through each
evaluated configuration. The published tables give only the order and number
of the operations, so the operands, delays and coefficients are random.
