# Block LU decomposition engine with two linear arrays

This engine factors a dense n × n matrix A into a unit lower triangular L and an upper triangular U, so that A = L·U. It works in place in an on-chip memory and does no pivoting. The matrix is split into b × b blocks. Two pipelined arrays of processing elements (PEs) share one memory bank:

- **The LU array** has b PEs. It factors the diagonal block of each step and derives the L blocks below it and the U blocks to its right.
- **The MMS array** has r PEs. It performs the *matrix multiply/subtract* updates A22 ← A22 − L21·U12 of the trailing blocks.

The updates dominate the work: about n³/3 multiply-adds against about n²·b for everything else. So the schedule starts each update as soon as its two operand blocks exist. The LU array can then finish its smaller jobs in the shadow of the updates. While an array has nothing to do it is disabled, to save energy.

The defaults are N = 256, B = 16, R = 16, with 16-bit fixed-point data. In the published design, b = r = 16 is the energy-optimal point for matrices of 32 × 32 and larger.

## One step of the block algorithm

Step kk (0 … n/b−1) works on the trailing submatrix that starts at row and column kk·b. Let m = n/b − 1 − kk. The step has four kinds of operation:

| operation | input | result | array | count per step |
|---|---|---|---|---|
| opLU | diagonal block A11 | L11 (strictly lower part) and U11, in place | LU | 1 |
| opL | block A21(i) below it | L21(i) = A21(i)·U11⁻¹ | LU | m |
| opU | block A12(j) right of it | U12(j) = L11⁻¹·A12(j) | LU | m |
| opMMS | A22(i,j), L21(i), U12(j) | A22(i,j) − L21(i)·U12(j) | MMS | m² |

After the last step the bank holds L below the diagonal and U on and above it. The unit diagonal of L is implicit.

## The LU array (`lu_array`, `lu_pe`)

### Element stream

A b × b block enters PE 0 one element per cycle, in row-major order, and flows right through all b PEs. Each element is a token (`lu_tok_t`) that carries:

- its value;
- its row x and column y;
- the operation it belongs to.

Because the indices travel with the data, a PE needs no counters. PE j is responsible for column j of the factors.

### What PE j does with element (x, y) during opLU

- **y < j, and x > y.** The element is already l(x,y), replaced in flight by the PE that computed it. PE j multiplies it with u(y,j) from its storage and adds the product into its accumulator RegT.
- **y < j, and x ≤ y.** The element is a U value of another column. It only passes.
- **y = j.** The PE subtracts: t = a(x,j) − RegT, then clears RegT.
  - If x ≤ j, t is u(x,j).
  - If x = j, the PE also loads RegR with the reciprocal 1/t from the table.
  - If x > j, the PE normalises: l(x,j) = t·RegR. This value replaces the element on the forward path, so the PEs to the right use it.
  - In every case the result is written to storage word x and sent out on the result chain.
- **y > j.** The element only passes.

### Result chain and timing

The result chain (LU_in → LU_out) passes results of the PEs on the left. In the cycles where a PE has its own result, it inserts that result instead. The schedule ensures the two never meet; an assertion checks this.

Results leave PE b−1 in row-major order, b cycles after the matching input entered. The last result of a block is produced in cycle b² + b − 1. A new block can follow without any gap, so a stream of blocks costs b² cycles each.

### opL and opU

The same stream format carries opL and opU. Both reuse what the preceding opLU left in each PE. They never change the storage or RegR.

- **opL** multiplies every element left of the diagonal with the stored u(y,j), then always normalises with RegR.
- **opU** runs on the transposed block, since L11⁻¹·A12 = (A12ᵀ·L11⁻ᵀ)ᵀ. L has a unit diagonal, so opU needs no reciprocal and no normalisation. PE j needs row j of L11 instead of column j.

### How row j of L11 reaches PE j

Each PE has 2b storage words:

- the lower b hold column j of L11 and U11;
- the upper b hold row j of L11.

The values l(j,y) with y < j are made in PE y during opLU, and they pass PE j on the result chain. PE j copies them as they go by, so the data is already in place when opU starts.

The published design describes a data path from the result input to the storage for loading L11, but it does not give the storage size or the loading schedule. The 2b-word copy-on-the-fly is this implementation's own choice.

### Adder and multipliers

The accumulation and the subtraction share one adder/subtractor, as in the original PE. The normalisation has its own multiplier rather than sharing the accumulate multiplier. The original counts one multiplier per PE.

## The MMS array (`mms_array`, `mms_pe`)

The published design names this array's function, its size (r PEs) and its throughput (one b × b product every b³/r cycles), but not its insides. The organisation below is this implementation's own.

### Column groups and outer-product steps

The r PEs split the b result columns into b/r groups of r columns. PE j owns column g·r + j of group g, and keeps that column's partial sums for all b rows in its storage CBUF.

One group takes b *outer-product steps*, k = 0 … b−1. In step k the column C[·][k] streams down the array, one element per cycle. PE j then adds C[i][k]·D[k][col] into CBUF[i].

So a group costs b² cycles and a full product costs b³/r cycles. C is L21(i), D is U12(j), and the result overwrites A22(i,j).

### Tokens

Everything the array needs rides on its tokens (`mms_tok_t`), one token per cycle. A token may carry:

- **a C element**, with its row i and step k;
- **a D element for the following step**. It goes into one PE's DNEXT register and is moved to DCUR at the start of the step. Only the first r tokens of a step carry D, so one memory read port suffices.
- **a read-out request** for one result of the previous group, with its F element (the old A22 value) and its write-back address.

### Read-out

At the end of a group, CBUF is copied into a second storage COBUF, so the next group can start at once.

The r·b results of the finished group are read out by the next r·b tokens. On each, the addressed PE computes F − sum and puts it on the token. The token then carries the result to the end of the array, where the sequencer writes it to the bank.

After the last product of a step, plain idle tokens carry the remaining read-outs.

### Back-to-back products

When the next product's operands are already in memory as the current product enters its last step, its D row is prefetched on the current tokens. The product then follows without a gap ("chaining").

Otherwise r preload tokens bring its first D row before it starts.

## Scheduling a step (`lu_seq`, `mms_seq`, `block_lu_top`)

### The LU array's order

`lu_seq` feeds the LU array in this order:

1. opLU;
2. opL for L21(0) and opU for U12(0);
3. the remaining opL blocks;
4. the remaining opU blocks.

Blocks are streamed without gaps, so the first update can start after 3b² cycles. The results are written back in place, and the opU results are transposed back. A counter `blocks_done` tells how many blocks are already in memory.

### The MMS array's order

`mms_seq` walks the m² updates column by column. It starts update (i, j) once `blocks_done` shows both L21(i) and U12(j) are written. That is after 2 blocks (i = 0) or i + 3 blocks for L21(i), and after 3 blocks (j = 0) or m + 2 + j blocks for U12(j).

For most of each step only the MMS array is busy, and the LU array's clock enable is low. The top starts the next step when both sequencers report done.

### Latency

The ideal latency of this schedule is

  3bn − 2b² + (n·b²/6r)(n/b − 1)(2n/b − 1) + b − 1 cycles.

For n = 256 and b = r = 16 that is 329 231 cycles, or 2.74 ms at 120 MHz.

This RTL takes 333 917 cycles, 1.4 % more. Per step, the extra cycles come from:

- the memory's one-cycle read latency and the pipeline drains;
- the r preload cycles of the first update;
- the r·b read-out cycles after the last update.

These overheads are a fixed number of cycles per step, so they matter most for small matrices. Measured in simulation (one build per size, b = r as listed; µs at 120 MHz):

| n | b = r | ideal cycles | RTL cycles | RTL µs | extra |
|---|---|---|---|---|---|
| 8 | 8 | 71 | 77 | 0.6 | 8 % |
| 16 | 8 | 327 | 429 | 3.6 | 31 % |
| 32 | 16 | 1 295 | 1 613 | 13.4 | 25 % |
| 64 | 16 | 6 159 | 7 101 | 59.2 | 15 % |
| 128 | 16 | 41 487 | 43 677 | 364.0 | 5.3 % |
| 256 | 16 | 329 231 | 333 917 | 2 782.6 | 1.4 % |
| 512 | 16 | 2 690 575 | 2 700 253 | 22 502 | 0.36 % |
| 1 024 | 16 | 21 896 719 | 21 916 381 | 182 637 | 0.09 % |

The end-to-end testbenches check each cycle count against the formula plus these bounded overheads.

## Numbers and the reciprocal table (`lu_pkg`, `recip_lut`)

### Data format

Data is 16-bit two's complement in Q8.8 format: 8 integer bits and 8 fraction bits. Sums wrap on overflow. Products are computed at full width and shifted right arithmetically by 8 bits. The published design states only the 16-bit word width; the fraction split is this implementation's choice.

### Reciprocal table

Division uses a table of 1024 16-bit entries, Inv(i) = round(2¹⁵ / i). Entries 0 and 1 are saturated to 32767.

The table is indexed by |u| >> 6, so it covers |u| up to 256. The table value is computed at elaboration, and the sign of u is applied to the output. A normalisation x/u is then (x·Inv) >>> 13.

Pivots with a magnitude below about 0.25 lose precision. This suits diagonally dominant matrices, which need no pivoting. Matrices that need pivoting are outside the design's scope.

## Memory bank and host port (`mem_bank`, `block_lu_top`)

The bank is one array of N² words, with element (row, col) at address row·N + col. It has:

- four registered read ports: the LU array (or the host), and the C, D and F streams of the MMS array;
- two write ports: the LU array (or the host), and the MMS array.

An assertion forbids two ports writing the same word in one cycle.

### Host protocol

While `busy` is low, the host can write elements with `host_we`, `host_addr` and `host_wdata`. It can also read them: the data for `host_raddr` appears on `host_rdata` one cycle later.

A one-cycle `start` pulse begins the factorisation. `done` pulses once at the end.

### Observation outputs

Five outputs are for observation only:

- `lu_active` and `mms_active` are the two arrays' enables;
- `mms_preload` is high during D preload;
- `mms_chain` marks a product that follows the previous one without a gap;
- `mms_idle_readout` marks results read out by idle tokens.

### Matrix sizes

N must be a multiple of B, and B a multiple of R. Indices are 10 bits and addresses 20 bits, so N can be at most 1024.

At the default N = 256, a smaller matrix can be processed by placing it in the top-left corner of an identity matrix. It then takes the full 256 × 256 time.

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog. They compare against values computed independently of the RTL. `lu_ref_pkg` is a plain-loop model of the same block algorithm with the same fixed-point rounding.

| testbench | what it checks |
|---|---|
| `tb_lu_pkg` | the fixed-point product against real arithmetic; derived constants and token widths |
| `tb_recip_lut` | every table entry, both signs |
| `tb_lu_pe` | one PE (b = 16, j = 5) under opLU, opL and opU streams; the snooping of row j of L11 |
| `tb_lu_array` | bit-exact opLU/opL/opU results; the last result of a block in cycle b² + b − 1; gap-free streaming |
| `tb_mms_pe` | one PE against a direct F − C·D |
| `tb_mms_array` | two back-to-back products with b = 16, r = 8; results and exact token timing |
| `tb_mem_bank` | random traffic on all ports |
| `tb_block_lu_top` | end to end at n = 64, b = 16, r = 8 (see below) |
| `tb_block_lu_full` | the same at the defaults, n = 256, b = r = 16; about 334 k cycles |
| `tb_block_lu_workloads` | one build each for n = 8, 16 (b = r = 8) and 32, 64, 128, 512, 1024 (b = r = 16), run one after the other through `block_lu_run.sv`: every result word and the cycle count; about 2.5 minutes, mostly n = 1024 |

The two end-to-end benches share `block_lu_tb_body.svh`. Each one:

1. loads a random diagonally dominant matrix through the host port;
2. runs the factorisation;
3. compares every word of the bank with the reference model;
4. multiplies L·U out in real arithmetic as a further sanity check;
5. checks the latency.

They also count each mechanism and fail if any never occurs:

- opLU, opL and opU elements;
- opMMS column groups;
- cycles where opMMS overlaps opL/opU;
- cycles with the LU array disabled;
- D preloads;
- chained products;
- idle-token read-outs.

To run one with Verilator:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb --top-module tb_block_lu_top \
    rtl/lu_pkg.sv tb/lu_ref_pkg.sv rtl/recip_lut.sv rtl/lu_pe.sv rtl/lu_array.sv \
    rtl/mms_pe.sv rtl/mms_array.sv rtl/mem_bank.sv rtl/lu_seq.sv rtl/mms_seq.sv \
    rtl/block_lu_top.sv tb/tb_block_lu_top.sv
./obj_dir/Vtb_block_lu_top
```

## Where this implementation departs from the published design

- **LU storage.** Each LU PE stores 2b words, not b. The upper half holds row j of L11, copied during opLU.
- **LU PE multipliers.** Each LU PE has a separate multiplier for normalisation.
- **MMS array insides.** The outer-product organisation, the token format, the double-buffered D registers and the result buffer are this implementation's own. Only the function, the PE count and the throughput come from the original.
- **Number format.** The Q8.8 split, the table index mapping (|u| >> 6) and m = 15 are this implementation's choices.
- **Latency.** It is about 1.4 % above the ideal schedule at n = 256, for the reasons given under Latency.
- **Block disabling.** It uses clock enables, not gated clocks.
- **Memory mapping.** Storage is written as plain arrays. Mapping them to distributed or block RAM is left to synthesis.
- **Not built.** The energy model, the power estimates and the baseline designs the original is compared with are not part of this RTL.
