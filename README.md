# Dense and sparse multi-precision matrix multipliers

Neural-network layers on a small FPGA next to a CPU are mostly matrix
products. Once a network has been quantized to 8, 4 or 2 bit weights and
pruned, two kinds of hardware compete for those products. A dense engine
(GEMM) does every multiplication but packs many narrow values into each
word. A sparse engine (SPMM) skips the pruned weights but pays for
irregular, indexed access. This RTL provides both, side by side. Each one
switches precision at run time and accepts any matrix shape up to a
compile-time limit, so a host can send each layer to whichever engine is
faster for that layer's shape, sparsity and precision.

The design is a register-transfer rewrite of a pair of accelerators that
were first described as high-level-synthesis blocks. Where that
description is silent (stream protocols, encodings, timing, the rule that
splits work between sparse threads), the choices here are this design's
own. They are listed under "Where this RTL makes its own choices".

## Packed words and precision

Every data port is 32 bits wide. A word holds four 8 bit, eight 4 bit or
sixteen 2 bit values. The values are two's complement, with field 0 in the
low bits, so 2 bit mode covers the ternary weights -1, 0 and +1. The 2 bit
`precision` input of each engine selects the mode:

| code | mode | values per word |
|------|------|-----------------|
| 0    | 8 bit | 4 |
| 1    | 4 bit | 8 |
| 2    | 2 bit (ternary) | 16 |
| 3    | same as 0 | 4 |

Matrices are packed along the shared (inner) dimension:

- A word of a row of A holds consecutive elements of that row.
- A word of a column of B holds the matching elements of that column.

The basic operation is therefore a word-by-word packed dot product
(`mp_dot32`): multiply the fields pairwise and add them up. Depending on
precision, that is 4, 8 or 16 multiply-adds per word pair. All shapes are
given as `sn` (rows of A), `sm` (32 bit words along the shared dimension)
and `sp` (columns of B). Results leave unpacked as 16 bit two's complement
numbers. They are accumulated modulo 2^16, so a sum that does not fit
wraps around. It is not saturated.

## The dense engine: `gemm_core`

Holding both matrices on chip does not scale. The engine keeps only:

- a **block of B**: `BW` columns, each `sm` words deep;
- **one row of A**.

With these it computes the `BW` results of that row for that block. In
each compute cycle it takes `BH` consecutive words of the A row. For every
column of the block it also takes the `BH` matching words, so `BW x BH`
packed dot products feed `BW` accumulators. At the defaults (`BW = 16`,
`BH = 2`) that is 32 word products per cycle. This means 128, 256 or 512
multiply-adds per cycle in 8, 4 or 2 bit mode.

The B block sits in `BW x BH` memory banks and the A row in `BH` banks.
Every word needed in one cycle therefore comes from a different bank. The
block memory is what limits the design: `BW x SM_MAX` words (2 Mbit at
the defaults).

Sequence of one operation (`start` latches precision and shape):

1. For each block of `BW` columns of B (the last block may be narrower):
   1. load the block, column by column, `sm` words each (one word per
      cycle from `b_*`);
   2. for each of the `sn` rows of A: load the row (`sm` words from
      `a_*`), compute for `ceil(sm/BH)` cycles, spend one cycle finishing
      the last accumulation, then send the block's results one per cycle
      on `c_*`.
2. Pulse `done`.

Lanes past the end of the row in the last compute step are masked off, so
`sm` need not be a multiple of `BH`. **A is streamed once per block of B.**
The host must send the whole of A again for every block. Results come out
block by block, row by row, in increasing column order within a block.

Busy time with streams that never stall, per block of `n` columns:
`n*sm + sn*(sm + ceil(sm/BH) + 1 + n)` cycles. Loading is not overlapped
with computing, so the compute array is idle while a row loads.

## The sparse engine: `spmm_core`

A is given in CSR form over **packed words**. A stored element is a 32 bit
word that has at least one non-zero field. `col_index` counts words, and
`row_index` (rowptr) has `sn+1` entries. This matters for performance: a
word with a single non-zero 2 bit weight costs as much as a full one. For
this reason, pruning in blocks of 16, 8 or 4 consecutive weights (one word
in 2, 4 or 8 bit mode) suits this engine.

The product is built one column `x` of B at a time, as a small dataflow
pipeline:

1. **Loader.** Takes the `sm` words of `x` from `b_*` and writes them into
   the local `x` memory of every thread.
2. **Row mapper** (`spmm_row_mapper`). Reads `row_index`. It forms each
   row's length as the difference of neighbouring entries and sends that
   length to the thread that owns the row, through a small FIFO per
   thread.
3. **Threads** (`spmm_thread`, four of them). Each thread repeatedly:
   - takes a row length;
   - streams that many `(col_index, value)` pairs from its own ports;
   - reads `x[col_index]` from its local memory;
   - multiplies it with the value word and accumulates.

   At the end of the row it emits one 16 bit result on its own output.
   A row of length zero gives 0.

The `x` memories have two banks. The loader fills the bank for the next
column while the threads read the current one. Loading B therefore hides
behind computing.

### How rows are split between threads

This is the least obvious part of the engine, and the host must apply the
same rule to know where each result comes from. The threads should get
equal numbers of non-zeros, and whole rows. Row `i` goes to thread

    t(i) = min(NT-1, floor(rowptr[i] * NT / nnz))        (t = 0 if nnz = 0)

In words, a row goes to the thread whose quarter of the non-zeros contains
the row's first non-zero. The hardware finds `t` with `NT-1` comparisons
(`rowptr[i]*NT >= j*nnz`) rather than a division. `rowptr` never
decreases, so:

- each thread owns one contiguous band of rows;
- the bands follow each other in thread order;
- empty rows go with the band they fall in.

A thread may own no rows at all, for example when there are fewer rows
than threads. The split is by rows, so one very long row keeps a single
thread busy while the others idle.

Each thread reads its non-zeros from its own `col_*` / `val_*` ports. When
a thread receives the first row of its band, `a_base_valid[t]` pulses and
`a_base[t]` carries `rowptr` of that row, the offset of the band's first
non-zero. The memory reader behind the thread's ports must restart there.
From then on it delivers consecutive `(col_index, value)` pairs, one per
handshake. The ports of one thread carry exactly the pairs of that
thread's band, so all four can read the same CSR arrays at different
offsets.

### Stream order

After `start` (which latches precision, `sn`, `sm`, `sp` and `nnz`), the
streams carry, for each column `p` of B in turn:

- `b_*`: the `sm` words of column `p`. The loader may run one column
  ahead.
- `rp_*`: all `sn+1` entries of `row_index`, sent again for every column.
- `col_*[t]`, `val_*[t]`: the band's pairs, from the announced base, again
  for every column.
- `c_*[t]`: the results of thread `t`'s rows, in increasing row order.

`done` pulses after the last column. Every thread handles one non-zero per
cycle inside a row. A row costs three extra cycles: one to take its
length, one for the last accumulation and one to hand out the result.

## The top: `mp_matmul_top`

The top holds one dense and one sparse engine with separate ports,
prefixed `gemm_` and `spmm_`. The two are independent: they can run
different precisions at the same time, and the host decides which layer
goes where. There is no shared bus, DMA or memory in this RTL. Every data
port is a valid/ready stream, and a system would put its memory readers
and writers behind them.

| parameter | default | meaning |
|-----------|---------|---------|
| `BW` | 16 | columns of B per dense block |
| `BH` | 2 | words of the A row per dense compute cycle |
| `NT` | 4 | sparse threads |
| `SM_MAX` | 4096 | largest `sm`, in words, for both engines |
| `RL_DEPTH` | 8 | depth of each thread's row-length FIFO |

`sn` and `sp` are limited only by the 32 bit shape inputs, because rows of
A and columns of B are streamed. `sm` may not exceed `SM_MAX` words. That
is 4096 values in 8 bit mode, 16384 in 4 bit mode and 65536 in 2 bit mode
along the shared dimension.

All streams use the usual valid/ready rule: a word moves on a rising edge
when both are high. Outputs hold a word stable until it is taken, and
assertions in the RTL check this. The reset `rst_n` is asynchronous and
active low.

## Which engine is faster

`tb_workloads` measures both engines at the default configuration. It uses
the layer shapes of a small activity-recognition network (LSTM gates of
512 x 32 and 512 x 128, a 384 -> 6 dense layer, and 1-D convolutions of
512 -> 64 and 64 -> 32 channels unrolled with a kernel width of 3), random
pruned weights and a batch of 4 activation columns, with streams that
never stall. Busy cycles from one run (the data are random, so counts vary slightly between seeds):

| layer (rows x values) | precision | sparsity | pruning | stored words | GEMM | SPMM |
|---|---|---|---|---|---|---|
| 512 x 128 | 8 bit | 90 % | per weight | 5634 | 27264 | 27288 |
| 512 x 128 | 8 bit | 99 % | per weight | 641 | 27264 | 7848 |
| 512 x 128 | 4 bit | 90 % | per weight | 4459 | 14912 | 22808 |
| 512 x 128 | 4 bit | 90 % | whole words | 807 | 14912 | 8560 |
| 512 x 128 | 2 bit | 95 % | per weight | 1853 | 8736 | 12864 |
| 512 x 128 | 2 bit | 95 % | whole words | 211 | 8736 | 5400 |
| 64 x 1536 | 8 bit | 90 % | per weight | 8363 | 38720 | 20356 |
| 64 x 1536 | 2 bit | 90 % | per weight | 4351 | 9920 | 10764 |
| 64 x 1536 | 2 bit | 90 % | whole words | 586 | 9920 | 1964 |
| 6 x 384 | 8 bit | 90 % | per weight | 204 | 1278 | 471 |

The dense engine gets faster as precision drops, because more values fit
in a word. The sparse engine does not gain as much, because with pruning
weight by weight most stored words still hold only one or two non-zeros.
Pruning whole words (4, 8 or 16 neighbouring weights together) restores
its advantage. With many rows and few stored words, the sparse engine's
time is dominated by the per-row overhead and by loading each column of
B. Neither engine overlaps loading with computing as fully as a production
design might, so treat these figures as relative, not absolute.

## Where this RTL makes its own choices

These points follow the published description:

- the tiling of the dense engine and its parameters;
- the CSR thread structure;
- the four threads with equal shares of non-zeros;
- port names and widths;
- the 16 bit results;
- the 4096-word limit;
- overlapping the columns of B in the sparse engine.

These points are this design's own:

- the precision codes and two's complement fields;
- packing B along the shared dimension;
- valid/ready streams with the stream orders above, where the original
  uses memory-mapped bus masters;
- the row-to-thread rule and the base-offset outputs;
- re-reading `row_index` and the non-zeros for every column of B;
- the two-bank `x` memory;
- wrap-around accumulation;
- the exact cycle timing of both engines;
- no overlap of loading and computing in the dense engine.

Not included: a variant of the sparse engine that packs A into narrower
(8 bit) words, which the original work considers as an alternative to
32 bit packing.

The host-side scheduler is not included. The original work pairs the
engines with simple linear models of run time (dense: rows, columns and
their product; sparse: stored words and columns) to split work between
them.

## Files

`rtl/`:

- `mp_pkg.sv`: word and result widths, precision type.
- `mp_dot32.sv`: packed multi-precision dot product of two words.
- `gemm_core.sv`: dense engine.
- `stream_fifo.sv`: small valid/ready FIFO.
- `spmm_row_mapper.sv`: row_index reader and row-to-thread split.
- `spmm_thread.sv`: one sparse compute thread with its `x` memory.
- `spmm_core.sv`: sparse engine (loader, mapper, FIFOs, threads).
- `mp_matmul_top.sv`: both engines side by side.

`tb/`: one self-checking testbench per module, plus `tb_ref_pkg.sv`. The
package holds the reference arithmetic, written independently of the RTL.
Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
with a watchdog if the design hangs.

- `tb_mp_dot32`: every precision code on random and extreme words.
- `tb_gemm_core`: many shapes, including a narrow last block and odd
  `sm`, in all precisions. Random stalls on every stream. Exact busy-cycle
  count in stall-free runs.
- `tb_spmm_row_mapper`: random `row_index` arrays, including empty and
  long rows and an all-empty matrix. Checks per-thread row lengths and
  base offsets.
- `tb_spmm_thread`: rows against both `x` banks, including empty rows.
  Checks the `len + 3` cycle cost per row.
- `tb_spmm_core`: random CSR matrices times dense matrices. A memory model
  serves the per-thread reads. Checks that B loading overlaps computing.
- `tb_mp_matmul_top`: runs at the default parameters. Both engines
  multiply the same pruned matrix at the same time, in each precision.
  All results are checked, and the test fails if any of these never
  happens: a precision switch, concurrent operation, a narrow block, odd
  `sm`, input and output stalls on both engines, empty rows, or loading
  that overlaps computing.
- `tb_workloads`: runs layer shapes of a small activity-recognition
  network through both engines. It compares their cycle counts at several
  sparsities and precisions, with and without block pruning.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_mp_matmul_top \
        rtl/mp_pkg.sv tb/tb_ref_pkg.sv rtl/mp_dot32.sv rtl/stream_fifo.sv \
        rtl/spmm_row_mapper.sv rtl/spmm_thread.sv rtl/spmm_core.sv \
        rtl/gemm_core.sv rtl/mp_matmul_top.sv tb/tb_mp_matmul_top.sv
    ./obj_dir/Vtb_mp_matmul_top

For the other testbenches, change the top module and list only the files
they need. Packages come first. Simulation is quick. Building the
full-size top takes about a minute, because the default dense block
memory has 64K words.

## How far to trust it

- Every module has been checked against independent reference arithmetic
  at random shapes, precisions and stall patterns. The top has been
  checked at its default parameters.
- The testbenches only ever apply `start` while an engine is idle. Inputs
  that violate the documented limits are not checked by the hardware: `sm`
  above `SM_MAX`, `col_index` outside `sm`, or a `row_index` that
  decreases (an assertion reports the last one in simulation).
- Nothing has been synthesised for a specific FPGA or timed. The dense
  engine's 32 parallel word products and wide reads are written
  behaviourally. A real implementation would need its memories mapped to
  block RAM as banked here.
