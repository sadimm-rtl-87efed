# SADIMM near-memory sparse-attention DIMM

## Main idea

Sparse attention (masked `S = Q·Kᵀ`, row softmax, `O = P·V`) is memory bound:
each product term is used once, so a GPU spends its time moving operands.
SADIMM puts the arithmetic inside a load-reduced DIMM, at three levels, and
sends each operation to the level where its data meet:

* **Bank** – one FP32 multiplier next to every DRAM bank. The data layout is
  *dimension based*: a bank holds one model dimension (a column slice of Q, K
  or V), so every multiply of an SDDMM or SpMM reads only its own bank and
  uses the full internal bank bandwidth (512 banks per DIMM working at once).
* **Bank group** – one FP32 adder per bank group adds the partial products of
  its 4 banks (the first step of the reduction over dimensions).
* **Rank** – in the buffer chip, two FP32 accumulators finish the reduction
  over the bank groups of all chips and a softmax unit normalises each
  completed score row. Only finished rows leave the DIMM.

Because the reduction is a tree that grows narrower toward the host, the
channel carries one word per output element instead of one per product.

## What is here

`rtl/` holds one DIMM: `sadimm_dimm` (top) with 2 ranks × 8 chips × 8 bank
groups × 4 banks = 512 near-bank units.

| module | role |
| --- | --- |
| `sadimm_pkg` | 82-bit instruction, address layout, reduction word |
| `inst_fifo` | first-word-fall-through queue (instruction queues, buffers) |
| `fp32_mul`, `fp32_add` | combinational IEEE single precision, round to nearest even, subnormals flushed |
| `fp32_recip` | 25-cycle restoring reciprocal (softmax divisor) |
| `dram_bank` | behavioural bank: open row, tRCD/tCL/tRP = 16 cycles, activation counter |
| `bank_nmp` | bank queue, decoder, operand register, multiplier, 32-word output buffer |
| `bg_nmp` | 4 banks, broadcast of instructions, 16 B input / 32 B output buffer, one adder |
| `softmax_unit` | max, split-table exponential, sum, reciprocal, normalise |
| `rank_nmp` | rank queue, routing, two-half reduction, 16 KB row buffer, softmax, 32 KB output buffer |

`tb/` has a self-checking testbench for each block and two end-to-end benches
of the top (`sadimm_dimm_tb` on a reduced array, `sadimm_dimm_full_tb` on the
default 512-unit DIMM); both share `sadimm_flow`.

## Instruction

82 bits, MSB first: `d_mode(1) nmp_level(2) op_redu(3) ddr_cmd(3) addr(34)
row_size(3) mat_mul(32) redu_tag(1) batch_end(1) reserved(2)`.

* `d_mode` 0 = plain memory access (WR of `mat_mul` to the addressed bank),
  1 = compute.
* `nmp_level` 01 rank, 10 bank group, 11 bank.
* `ddr_cmd` NOP, ACT, RD, PRE, WR, LDOP (operand ← bank word), LDOPI
  (operand ← `mat_mul`).
* `op_redu` NONE, SUM, AGG, SOFTMAX.
* `addr` = `{rank, chip[3], bg[3], bank[2], row[18], col[7]}`.
* `row_size` = log2 of the number of consecutive columns one RD streams.
* `redu_tag` marks which reduction a word belongs to; `batch_end` raises
  `batch_done` when the instruction finishes.

Field widths and the rank/bank-group level codes are from the design; the
command, reduction and bank-level encodings and the address bit order are
mine.

## Dataflow of one attention row

1. The host writes Q, K, V slices into the banks with memory-mode WR.
2. For score row `i`: `LDOP` loads `Q[i][d]` into every bank's operand
   register (each bank holds dimension `d`), then `RD` streams the surviving
   `K[j][d]` entries. Each bank emits `Q[i][d]·K[j][d]` tagged with element
   index `j`.
3. Bank groups add the 4 banks' words for the same `j`; the rank adds the
   64 bank groups' words per `j` into its row buffer.
4. A rank instruction `SOFTMAX` (or `SUM` for a raw score) waits until nothing
   is in flight below, then scans the row, skipping elements that never got a
   word (pruned by the sparse mask), and sends the result out.
5. `P` is written back and SpMM `P·V` follows the same path with the roles of
   the operands swapped.

## The hard parts

**Knowing when a row is complete.** Partial sums arrive from 128 sources per
rank at unknown times. The rank's `SUM`/`SOFTMAX` instruction is a barrier: it
is only executed once the bank-group and bank queues, read pipelines and all
buffers report idle (`busy` ORed up the tree). Instructions are executed in
order at every level, so everything issued before the barrier has reached the
row buffer by then.

**Stale data.** A word whose `redu_tag` differs from the tag of the latest
forwarded instruction is dropped and counted; the host toggles the tag per
row so leftovers of an aborted row cannot corrupt the next.

**Throughput of the rank reduction.** One adder with a read-modify-write loop
could take one word per cycle from 128 sources. The sources are split into
two halves (chips 0–3 and 4–7); each half has a round-robin arbiter, its own
accumulator and its own half of the 16 KB input buffer (2 × 2048 words), so
two words are reduced per cycle. When the row is finalised, adder 0 merges
the halves during the scan. Element valid bits live in a plain memory and
are cleared by a 2048-cycle sweep after reset, which keeps the buffer out of
flip-flops.

**Back-pressure without loss.** A bank issues a read only when its output
buffer has guaranteed room for every read in flight (credit counter over the
tCL pipeline). A bank group in SUM mode waits until all 4 banks have a word
for the element, adds them sequentially with its single adder, and stalls the
banks while its 32 B output buffer is full. Instructions are broadcast to a
bank group's banks (and a rank's bank groups) only when every receiver has
room, as a shared C/A bus would.

**AGG mode.** A bank-group `AGG` instruction makes the bank group forward
every bank word unsummed (vector aggregation), for layouts where the 4 banks
hold different output elements; the rank then does the whole reduction.

**Softmax.** `p_i = exp(s_i − max) / Σ exp(s_j − max)`. The row is loaded
once while the maximum is tracked, `d = max − s_i` is converted to 4.8 fixed
point, and `exp(−d) = EXP_HI[d[11:6]] · EXP_LO[d[5:0]]`, two 64-entry FP32
tables (`exp(−j/4)` and `exp(−j/256)`, `rtl/softmax_exp_*.hex`). The sum goes
through a 25-cycle reciprocal and each element is multiplied by it. A row of
`n` elements takes `3n + 27` cycles. Relative error against a double
reference is checked to stay below 1 % for probabilities above 1e-5.

## Sizes and timing

| item | value | source |
| --- | --- | --- |
| ranks / chips / bank groups / banks | 2 / 8 / 8 / 4 | design |
| tRCD, tCL, tRP | 16 cycles | design timing table |
| bank-group buffers | 16 B in, 32 B out | design |
| rank buffers | 16 KB in, 32 KB out | design |
| max row length | 2048 elements (11-bit index) | from the 16 KB input buffer |
| words per DRAM row | 128 FP32 per chip | 4 KB row buffer / 8 chips |
| DRAM rows modelled per bank | 1024 (real part: 32768) | reduced to keep simulation memory small; parameter `ROWS` |
| queue depth per level | 8 | my choice |

## Assumptions and deviations

* The DDR PHY, the DDR protocol engine of the buffer chip, the two-stage
  instruction transfer through the data bus and the host memory controller
  are not modelled; the host drives instructions directly with valid/ready.
* Results that go to the host are not written back to the banks by the
  rank itself; the host writes them back with memory-mode WR instructions
  (as the end-to-end bench does for P before the SpMM).
* The DRAM array is a behavioural model (no refresh, tCCD or tFAW).
* Buffer sizes are given twice: 16 B in / 32 B out in the description of
  both reduction levels, and 16 KB / 32 KB in the configuration table. The
  bank group uses the byte sizes (one word per bank); the rank uses the
  kilobyte sizes, because it must hold a whole score row of up to 2048
  elements.
* Floating point flushes subnormals to zero.
* The exponential uses a 64 × 64 split table and a truncating reciprocal.
* Rows longer than 2048 elements are not supported by one reduction.

## Running

Every testbench prints `TB_RESULT checks=N failures=M` and stops. With
Verilator (5.x, `--timing`), from the repository root so the `.hex` files are
found, for example:

```
verilator --binary --timing --top-module sadimm_dimm_tb \
  rtl/sadimm_pkg.sv tb/fp_ref_pkg.sv tb/tb_inst_pkg.sv rtl/*.sv \
  tb/sadimm_flow.sv tb/sadimm_dimm_tb.sv -o sim && obj_dir/sim
```

The end-to-end bench counts row reductions, softmax rows, AGG-mode rows,
pruned elements, back-pressure stalls, batch completions and row activations,
and fails if any of them never happened.

`sadimm_dimm_tb` runs the flow on a reduced array (2 ranks × 2 chips × 2 bank
groups × 2 banks, 16-word rows) in well under a second, including output
back-pressure from a slow host. `sadimm_dimm_full_tb` runs the same flow on
the default 512-unit DIMM with no parameter overrides; its C++ build takes
about 9 minutes and the simulation about 5 (roughly one million cycles,
under 300 MB of memory). Block benches check the cycle counts that are
fixed by design: the tCL read latency, the activation and precharge
penalties, and the `3n + 27` cycles of a softmax row.
