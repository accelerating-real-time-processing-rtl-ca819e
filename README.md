# Single-precision matrix-multiplication offload for a neural-network parser

A transition-based dependency parser decides each parsing step with a small
fully connected neural network. Profiling such a parser shows that about
three quarters of its run time goes into one routine: dense single-precision
matrix products, with shapes that change as parsing goes on (for example
8 x 2304 times 2304 x 512, or 8192 x 512 times 512 x 93). The remedy followed
here is to leave the parser on the host and hand those products to an FPGA
card that holds the matrices in its own DRAM.

This repository holds the FPGA side in SystemVerilog. It has two
independent multipliers:

* **`matmul_kernel`, the blocked multiplier.** It works on 64 x 64
  submatrices kept on chip and has a 64-wide dot-product unit. This is the
  configuration used for the offload.
* **`systolic_matmul`, the systolic multiplier.** It is a grid of
  multiply-add units with a stationary B operand. It is offered as the
  faster way to build the same kernel, and its default size is 3 x 3.

`syntaxnet_fpga_top` places the two multipliers side by side. Each has its
own job port and its own port to board memory. The DRAM, the PCIe link, the
DMA engine and the host software are not part of this RTL.

## Number format

Every matrix element is an IEEE-754 single (`float`). `fp32_mul` and
`fp32_add` are combinational, round to nearest-even and pass infinities
through. This design makes three simplifications of its own:

* a subnormal input is read as zero;
* a result below the normal range is flushed to a signed zero;
* every NaN comes out as `7fc00000`.

The testbenches compare bit for bit against reference arithmetic done in
double precision and rounded once.

## Memory port and job port (both multipliers)

Matrices are stored row-major, one element per 32-bit word address:

* `A[i][j]` is at `a_base + i*k + j`;
* `B[i][j]` is at `b_base + i*n + j`;
* `C[i][j]` is at `c_base + i*n + j`.

A job (`mm_job_t` in `mm_pkg`) is three base addresses plus `m`, `k` and
`n`. It is taken when `start` is high and `busy` is low. `done` pulses for
one cycle after the last element of C has been written.

The memory port carries one word per transfer:

* A request (`mem_req_t`: `we`, `addr`, `wdata`) is offered with
  `mem_req_valid`. It is held unchanged until `mem_req_ready`.
* A read returns its data on `mem_rsp_valid` / `mem_rsp_data` exactly one
  cycle after it is accepted.
* Writes get no response.

An assertion in each multiplier checks that a request stays stable while it
waits. The protocol is this design's choice. A real DDR controller would
need a small adapter, for example a read-data FIFO, to give the fixed
latency.

## The blocked kernel (`matmul_kernel`, `dot_product`)

The kernel computes the textbook triple loop
`C[i][j] = sum_k A[i][k] * B[k][j]`. It cuts the loop into BLK x BLK
submatrices, with BLK = 64 by default. For every C submatrix `(bi, bj)`:

1. **Copy.** For each K step `kb`, read A submatrix `(bi, kb)` and B
   submatrix `(kb, bj)` from external memory into on-chip buffers. This
   takes 2·BLK² reads. B is stored transposed, so that one column of B can
   be read in a single cycle, just like one row of A.
2. **Compute.** Issue all BLK² pairs (row of A, column of B) to
   `dot_product`, one pair per cycle. This unit is the k loop fully
   unrolled: BLK multipliers, then a binary adder tree with a register
   after each level. Its latency is 1 + log2(BLK) cycles. Each result is
   added into an on-chip C buffer. The first K step writes into the buffer
   instead of adding.
3. **Write-back.** After the last K step, write the C submatrix to memory.
   This takes BLK² writes.

Copy, compute and write-back do not overlap. With a memory that never
stalls, a job takes this many cycles from `start` to `done`:

```
1 + T * ( KB * (3*BLK*BLK + 1 + 1 + log2(BLK)) + BLK*BLK )
    T  = (m/BLK)*(n/BLK)   C submatrices
    KB = k/BLK             K steps
```

For BLK = 64 that is 12,296 cycles per K step, of which 8,193 are spent
copying. The single-word memory port therefore limits the rate to about
2·64³ / 12,296 ≈ 43 flop/cycle, and the 64-wide dot-product unit is busy
only a third of the time. Widening the memory port, or overlapping the copy
of the next submatrices with the compute of the current ones, is the
obvious next step. The description this design follows does not say how
its kernel schedules these phases.

**Dimensions must be multiples of BLK.** The host pads every operand with
zeros. For example, an 8 x 512 by 512 x 93 product becomes 64 x 512 by
512 x 128, and the padded part of C comes out zero.

**Summation order.** Sums are formed by a pairwise tree within each K
step, then added across K steps in order. They can therefore differ in the
last bits from a sequential loop. The reference model in `tb/mm_ref_pkg.sv`
uses the same order.

## The systolic multiplier (`systolic_pe`, `systolic_array`, `systolic_matmul`)

### The arithmetic unit

Each unit has four registers:

* The **A register** passes the value from the left (`A`) to the right
  neighbour (`An`) one cycle later.
* The **B shift register** takes B from below. Its output goes up to the
  unit above (`Bn`), so a whole column of B can be shifted in from the
  bottom.
* The **held-B register** copies the shift register when `LD` is high.
  This value is the multiplier operand.
* The **sum register** holds `S + A * B_held`, where `S` is the partial
  sum from the unit above. It leaves downwards as `Sn`.

The multiply and the add happen in the same cycle.

### The grid

`systolic_array` wires ROWS x COLS units together:

* A flows right along each row.
* Partial sums flow down each column. The top row adds to +0.
* B shifts up each column.
* One `LD` line reaches every unit.

If element r of a vector x enters row r at cycle t0 + r (the diagonal
skew), column c delivers `sum_r x[r]*B[r][c]` during cycle t0 + ROWS + c.
The sum is accumulated top row first.

### Operating the grid

`systolic_matmul` computes C = A·B for A of size m x ROWS and B of size
ROWS x n, where n is a multiple of COLS. It handles one COLS-wide strip of
B at a time and repeats four steps:

1. **Load B.** The read unit fetches the strip into COLS bottom buffers,
   row 0 first. Once the array is empty, the sequencer pops all bottom
   buffers for ROWS cycles, then pulses `LD` once. Unit (r,c) now holds
   `B[r][c]`.
2. **Stream A with the skew.** The read unit fetches rows of A into ROWS
   left buffers (element r of each row goes into buffer r). To start row
   i, the sequencer pops left buffer 0. The same start bit travels down a
   delay line of ROWS + COLS - 1 stages, and stage r-1 pops left buffer r.
   This makes each lower row start one cycle later.
3. **Collect.** The same delay line tells when column c's sum is valid, at
   stage ROWS + c - 1. At that cycle the sum is pushed into result buffer
   c. The write unit drains the result buffers in row-major order.
4. **Repeat** with the next strip of B. The array is reloaded only after
   the delay line shows that the last row of the previous strip has left
   it.

Three rules let rows flow through the grid without any stall or enable
inside it:

* **A row starts only when it is complete.** All ROWS of its elements must
  be in the left buffers. Buffer r is popped exactly r cycles after
  buffer 0, so the element is guaranteed to be there.
* **A row starts only when there is room for its result.** Fewer than
  `R_DEPTH` rows may be started but not yet written back. This bounds the
  result buffers.
* **Reading stays bounded.** A new row of A is read only while fewer than
  `A_DEPTH` rows sit in the left buffers. A new strip of B is read only
  after the previous strip has been loaded.

Reads and writes share the one memory port, and writes go first. A request
that is waiting keeps its place until it is accepted.

With a memory that never stalls, a row of A needs ROWS reads and a row of
C needs COLS writes. The array therefore takes a new row about every
ROWS + COLS cycles: the memory port, not the grid, sets the pace.

The inner dimension of one job is exactly ROWS. Multiplying by a deeper
matrix means splitting k and adding the partial products outside.

## How far this follows the original design

Taken from the original description:

* the triple-loop kernel;
* the 64 x 64 submatrix size, and the copying of submatrices from external
  DRAM into on-chip memory;
* the parallel inner loop;
* zero padding to a multiple of the submatrix size;
* single-precision arithmetic;
* the systolic unit: its ports A/An, B/Bn, S/Sn and LD, its registers, and
  one multiplier and one adder;
* the grid layout with a sequencer, read and write units, and buffers on
  the left, at the bottom and at the output;
* the four operating steps, including the one-cycle skew between rows;
* the 3 x 3 array size, which is the size drawn for it.

This design's own choices:

* the memory and job protocols;
* one word per memory transfer;
* the phase schedule of the blocked kernel (no overlap);
* the adder tree inside the dot product;
* the subnormal, flush and NaN handling;
* +0 into the top of the array;
* buffer depths and the start and credit rules of the systolic sequencer;
* fixing the systolic job's inner dimension to ROWS.

Known differences:

* The original kernel also processes several C rows in parallel, and its
  speed scales with the number of submatrix rows. Here the blocked kernel
  produces one C element per cycle.
* The original kernel also ran with non-square submatrices (8 x 16 up to
  32 x 64). These were only measured for comparison; here the submatrix is
  square.
* The original systolic array was built through a high-level synthesis
  flow and was very slow because of long floating-point latencies. This
  RTL has single-cycle units and does not reproduce that.
* The 64-byte-aligned DMA buffers, the host-side copy and the padding are
  host software. They are not included.

## Files

| file | contents |
|------|----------|
| `rtl/mm_pkg.sv` | element, address, job and memory-request types |
| `rtl/fp32_mul.sv`, `rtl/fp32_add.sv` | single-precision multiplier and adder |
| `rtl/dot_product.sv` | unrolled, pipelined dot product with adder tree |
| `rtl/matmul_kernel.sv` | blocked 64 x 64 multiplier |
| `rtl/sync_fifo.sv` | first-word-fall-through FIFO (systolic buffers) |
| `rtl/systolic_pe.sv`, `rtl/systolic_array.sv` | arithmetic unit and grid |
| `rtl/systolic_matmul.sv` | sequencer, read, write and buffers around the grid |
| `rtl/syntaxnet_fpga_top.sv` | both multipliers side by side |
| `tb/fp_ref_pkg.sv`, `tb/mm_ref_pkg.sv` | reference arithmetic for the testbenches |
| `tb/dram_model.sv` | behavioural board memory with random stalls |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_workloads` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F` and stops itself. It
also has a watchdog. For example, to run the end-to-end test at the default
sizes:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mm_pkg.sv tb/fp_ref_pkg.sv tb/mm_ref_pkg.sv tb/tb_syntaxnet_fpga_top.sv \
    --top-module tb_syntaxnet_fpga_top -o sim
./obj_dir/sim
```

Substitute another testbench's name to run it. What the testbenches cover:

* **`tb_syntaxnet_fpga_top`** runs at the default parameters (BLK = 64,
  3 x 3 array). It does:
  * a 128³ product, with its cycle count checked against the formula above;
  * an 8 x 100 by 100 x 93 product, padded to 64 x 128 by 128 x 128, on a
    stalling memory;
  * two systolic jobs covering five B strips.

  It also counts memory stalls, accumulation over K steps, C submatrices
  written, padded jobs and array reloads.
* **`tb_workloads`** runs the blocked kernel at BLK = 64 on the three
  8-row layer shapes (the first three tabulated below), padded to 64 rows.
  It checks every cycle count and every element.
* **`tb_matmul_kernel`** uses BLK = 4. It checks cycle counts and runs
  stalled multi-submatrix jobs.
* **`tb_systolic_matmul`** uses a one-row result buffer, so that the
  result-room rule is actually exercised. It also counts rows that waited
  for data and array reloads.
* **The unit testbenches** cover the arithmetic, the FIFO, one arithmetic
  unit cycle by cycle, and the grid's skew timing.

Cycle counts for the parser's layer shapes (blocked kernel, BLK = 64, no
memory stalls):

| shape (padded) | cycles |
|---|---|
| 64x512 · 512x128 | 204,929 (simulated) |
| 64x512 · 512x512 | 819,713 (simulated) |
| 64x2304 · 2304x512 | 3,574,017 (simulated) |
| 8192x512 · 512x128 | 26,230,785 (formula) |
| 8192x512 · 512x512 | 104,923,137 (formula) |
| 8192x2304 · 2304x512 | 457,474,049 (formula) |

The 8192-row shapes differ from the simulated ones only in the number of
row submatrices. All of them fit easily in an 8 GB board memory: the
largest needs about 97 MB.

To change the sizes, set `BLK` (a power of two) on `matmul_kernel` or on
the top, and `ROWS`/`COLS` (`SA_ROWS`/`SA_COLS` on the top), `A_DEPTH` and
`R_DEPTH` on `systolic_matmul`. A 64 x 64 kernel holds 3 x 4096 words of
submatrix buffers and 64 multipliers and 63 adders (plus the accumulator
adder).
