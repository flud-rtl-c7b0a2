# FLUD — a streaming systolic array for block LU decomposition

This repository holds synthesizable SystemVerilog for an accelerator that
factors a dense square matrix `A` into `L·U`. `L` is unit lower triangular
and `U` is upper triangular. There is no pivoting. The matrix stays in external
memory and is overwritten in place: `U` takes the diagonal and everything
above it, and `L` (without its unit diagonal) takes everything below.

The main idea is that one array of processing elements (PEs) handles all four
kinds of block that appear in blocked LU. The design does not build a separate
unit for each kind. The array works on two kinds of parallelism at once:

* **column level**: the B PEs of a *PE group* (PEG) update the B elements of
  one matrix column in the same cycle;
* **iteration level**: the B PEGs form a chain. PEG `p` performs elimination
  step `p` of a block, so the B steps of a block are pipelined across the
  chain.

Blocks stream through the chain one column per cycle. A PEG keeps one column
of the first block of the current row of blocks and a single reciprocal, and
no other block-sized buffer. The whole array therefore stores `B × B` elements.

Default configuration: B = 32, so 32 PEGs of 32 PEs (1024 PEs), IEEE-754
single precision, matrices up to 16384 × 16384 (512 blocks per side).

## Block LUD as the array sees it

The matrix is cut into `B × B` blocks, `nb = N / B` per side. Round `r`
(r = 0 … nb-1) works on the trailing `(nb-r) × (nb-r)` blocks. It handles one
row of blocks at a time:

| row of blocks | first block (c = r) | other blocks (c > r) |
|---|---|---|
| i = r | **corner** C: plain LU of the block | **upper perimeter** U: `U ← L_C⁻¹·U` |
| i > r | **lower perimeter** L: `L ← L·U_C⁻¹` | **trailing** T: `T ← T − L·U` |

Each block enters PEG 0 as B columns. PEG `p` applies step `p` of the
elimination to every column it sees. The PEG's action depends on the state of
the column's block and on the column index `j` within that block:

| state | j < p | j = p | j > p |
|---|---|---|---|
| corner | forward | `r = 1/x[p]`; rows below p: `x·r`, stored | rows below p: `x[i] − buf[i]·x[p]` |
| upper | rows below p: `x[i] − buf[i]·x[p]` | same | same |
| lower | forward | all rows: `x·recip`, stored | all rows: `x[i] − buf[i]·top` |
| trailing | all rows: `x[i] − buf[i]·top` | same | same |

Terms in the table:

* `buf[i]` is the PEG's buffered column: column `p` of the first block in the
  row of blocks. This is an L-column of the corner block, or an L-column of
  the lower-perimeter block.
* `recip` is the reciprocal that the same PEG computed for the corner block
  of this round.
* `top` is a value that comes in on the PEG's *top input*. It is element `p`
  of column `j` of the finished block in row `r` and the same block column.
  For a lower block this is the corner block, which gives `U_C[p][j]`. For a
  trailing block it is the upper-perimeter block, which gives `U[p][j]`.

When a column leaves PEG B-1, all B steps have been applied, so the column is
finished for this round.

Why this works:

* **Corner and upper blocks.** These run Algorithm-1 LU, one step per PEG.
  The pivot row `p` of every later column is already final when the column
  reaches PEG `p`, because earlier PEGs have updated it.
* **Lower block.** This computes `L·U_C⁻¹` by forward substitution along the
  columns. The column scaled at `j = p` is stored as `buf`. Every later column
  `j` subtracts `buf·U_C[p][j]`.
* **Trailing blocks.** These get the rank-B update `T − L·U`, one rank-1 term
  per PEG.

The second block row of a round reads corner and upper results that the first
row wrote. To keep that ordering, the controller waits after each row of
blocks until all of its columns have been written back before it starts the
next row. This drain also means that a PEG's buffer is only refilled after the
previous row has passed.

## Hardware structure

```
flud_top
├── flud_controller      schedule, memory reads/writes, input FIFO (flud_fifo)
└── flud_array           B x { link FIFO -> flud_peg } plus B top-input FIFOs
    └── flud_peg (p)     shared FSM, divider (flud_recip), B x flud_pe
        └── flud_pe      buffer register + flud_mac (binary32 multiply-subtract)
```

* **Column tag** (`flud_pkg::col_tag_t`). Each column carries its block state,
  its index `j` in the block and its write-back address. A PEG needs nothing
  else to choose its operation, so the B PEs of a group share one small FSM
  instead of keeping per-PE control.
* **Links.** Each PEG sits behind a 2-entry FIFO that carries a tagged
  B-element column (34 + 32·B bits). A PEG is combinational from its input
  FIFO to the next FIFO, so a column costs one cycle per PEG. With no stalls
  a column crosses the array in B cycles.
* **Top inputs.** Each PEG has a one-element FIFO of depth B + 8. For a lower
  or trailing column, the controller reads the dependent column from memory
  and pushes element `p` into PEG `p`'s FIFO. PEG `p` pops the element when
  it consumes the matching left-hand column. The depth covers the B-cycle skew
  between PEG 0 and PEG B-1 plus the controller's queue, so the stream does
  not stall.
* **Divider.** Each PEG has one sequential reciprocal unit: radix-2 restoring
  division, 27 quotient bits, rounded, 29 cycles. It runs only on the corner
  pivot column. The pivot column waits in the input FIFO until `1/pivot` is
  ready, and the rows below are then multiplied by it. The reciprocal is kept
  for the lower-perimeter blocks of the same round.
* **Handshakes.** Every stream uses valid/ready. Back-pressure from a stalled
  PEG ripples back to the controller, which issues a read only when its input
  FIFO and every top FIFO have room for that read and for the one still in
  flight.

## External memory and host interface

The matrix is stored column-major as *column segments* of B elements. The
segment of block row `i` and global column `col` has address `col·nb + i`.
The kernel uses three ports:

| port | signals | protocol |
|---|---|---|
| main read | `rd_en`, `rd_addr`, `rd_data[B]` | data valid the cycle after `rd_en` |
| top read | `trd_en`, `trd_addr`, `trd_data[B]` | data valid the cycle after `trd_en` |
| write | `wr_en`, `wr_addr`, `wr_data[B]` | written at the clock edge |

The port has no back-pressure: memory must accept one read per port and one
write every cycle. For a memory with variable latency, put a FIFO in front of
`rd_data` and `trd_data`, and stall `rd_en` accordingly.

Host side:

1. Set `nb` (1 … NB_MAX). This sets the matrix size at run time: N = nb·B.
2. Pulse `start`.
3. `busy` stays high until the last column has been written, and `done`
   pulses once.

N must be a multiple of B. To use a smaller matrix, pad it with an identity
block tail.

## Timing

In steady state the array takes one column per cycle. The latency of one
factorization, in clock cycles, is:

```
row of blocks, first of a round : 31·B + b·B + 4      (B divider waits of 29+2 cycles, chained)
row of blocks, other rows       :    B + b·B + 4      (pipeline fill + b·B columns + drain)
round with b = nb - r blocks    : first row + (b-1) · other row
total                           : sum over r = 0 … nb-1
```

The corner block chains its dividers. PEG `p+1` can only start its division
after PEG `p` has released column `p+1`. This chain is the `(L_DIV + …)·B`
term of the latency model that the design was derived from. The MAC latency in
that term is one cycle here.

Peak work is 2·B² flops per cycle (B² multiply-subtracts), plus the divisions.
At B = 32 the formula above gives 84 % of that peak at N = 1024, 97 % at
N = 4096 and 99 % at N = 16384. The loss comes from the divider chain of each
corner block and from the pipeline fill and drain at every row of blocks.

Measured at B = 4, with the model value in brackets: N = 8 took 282 cycles
(284); N = 12 took 459 (464); N = 20 took 926 (940). At B = 32, N = 64 took
2186 cycles (model 2188), with a largest relative error of 4·10⁻⁷
against double-precision LU.

## Arithmetic

`flud_pkg` provides binary32 `fp_mul`, `fp_add` and `fp_msub`. Each rounds to
nearest-even. They do not handle subnormals (flushed to zero), NaN or
infinity inputs. A multiply-subtract rounds twice, so it is not fused. All
three functions are combinational. The design does not pipeline arithmetic
inside a PEG.

At the default size this combinational path is long: a multiply, an aligning
adder and a normalizer in one cycle. For a high clock rate, the place to add
pipelining is between `flud_mac` and the next link FIFO. That requires the
`valid` signals to be delayed with it.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `flud_top`, `flud_array`, `flud_peg`, `flud_controller` | `B` | 32 | PEs per PEG = number of PEGs = block size |
| `flud_top`, `flud_controller` | `NB_MAX` | 512 | largest matrix, in blocks per side (sizes the `nb` port) |
| `flud_top`, `flud_array` | `TOP_DEPTH` | B + 8 | depth of each top-input FIFO |
| `flud_array` | `LINK_DEPTH` | 2 | depth of each PEG-to-PEG FIFO |
| `flud_controller` | `IN_DEPTH` | 4 | controller input FIFO |
| `flud_pkg` | `COL_W`, `ADDR_W` | 8, 24 | column-index and address widths (B ≤ 256, N·nb ≤ 2²⁴) |

## Where this design departs from the published one

* **Single precision only.** The published design also generates
  half-precision (40 × 40 PEs) and double-precision (20 × 20 PEs) variants.
  Only binary32 is provided here.
* **Arithmetic units.** The published design uses vendor floating-point cores
  with multi-cycle latency. Here they are replaced by combinational binary32
  logic and a 29-cycle iterative reciprocal. The latency figures above are
  those of this implementation, not of a 255 MHz FPGA build.
* **PEG control.** The column tag, the valid/ready handshakes, the FIFO
  depths, the drain between rows of blocks, the memory addressing and the
  memory word width are choices of this implementation. The published design
  streams 512 bits from HBM; here one memory word is a whole B-element column.
  - The published text writes the corner update with a `+` and as
    `C[p+1:B][j] − C[p+1:B][j]`.
  - This design follows Algorithm 1 instead:
    `C[i][j] −= C[i][p]·C[p][j]`.
* **Not included.**
  - The non-grouped 2D baseline (one FSM and FIFOs per PE).
  - The host software.
  - The HBM memory.
  - The design-space-exploration and code-generation tool, whose role is
    covered by the parameters.
* **Memory layout.** Only the column-major layout is built. The published
  design can also take a row-major matrix by streaming blocks row by row.
* **Matrix size.** N must be a multiple of B. The published design claims
  arbitrary sizes but does not describe the padding.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_flud_mac` | 11 000 random and corner-case operations against real arithmetic; products exact, MAC within 1 ulp |
| `tb_flud_recip` | 400+ reciprocals correctly rounded; latency of 29 cycles; `busy` |
| `tb_flud_pe` | buffer written only by the pivot operation; MAC uses it |
| `tb_flud_fifo` | random traffic against a queue model; flags and count |
| `tb_flud_peg` | PEG 1 of B = 4 through all four states, with random gaps and back-pressure; pivot waits for the divider |
| `tb_flud_array` | first round of an 8 × 8 LU (B = 4) against a real-arithmetic reference; B-cycle fill latency |
| `tb_flud_controller` | read order against the schedule, tags, top reads, write-back in place, drain before each row, `done` (nb = 1, 3, 4) |
| `tb_flud_top` | full LU at B = 4 for N = 4, 8, 12 and 20, against double-precision LU (relative error 1e-4); cycle count within 5 % of the model; fails if any of these never happened: the four states, divider runs, forwarding, controller stalls, drains, back-pressure |
| `tb_flud_top_full` | default parameters (B = 32), a 64 × 64 matrix: two rounds with all four states |

`tb/tb_fp_pkg.sv` converts between binary32 and `real` for the reference
models.

The testbenches use `$urandom` and verilator's two-state semantics.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/flud_pkg.sv tb/tb_fp_pkg.sv tb/tb_flud_top.sv --top-module tb_flud_top
./obj_dir/Vtb_flud_top
```

The full-size testbench builds a model with 1024 combinational floating-point
units. Verilator's C++ build of it took about 30 minutes on a 4-core machine.
The simulation itself takes well under a second. The reduced testbench
`tb_flud_top` builds in about 10 seconds.
