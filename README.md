# Mix-GEMM μ-engine: mixed-precision matrix multiply on a CPU's own multiplier

Neural-network inference runs well on narrow integers of 2 to 8 bits, often with different
widths for activations and weights. A 64-bit CPU multiplier, however, multiplies one pair of
numbers per cycle no matter how narrow they are. The μ-engine in this repository sits next to
the integer multiplier(s) in the execution stage of a RISC-V core and uses them for
**binary segmentation**: several narrow elements are packed, with padding, into one 64-bit
operand so that one ordinary multiplication yields an inner product of 3 to 7 element pairs.
Four custom instructions feed the engine: `set`, `put_a`, `put_b` and `get`. The engine then
runs the inner loop of a blocked GEMM by itself. The core is free to load the next data in the
meantime.

The default build is the dual-issue version. It has two multipliers, a C tile of 8 × 8, and
512-byte input scratchpads. The engine takes any width from 2 to 8 bits for each operand,
signed or unsigned, and can change width per matrix with one `set`.

## Binary segmentation in one example

Take a = (4, 7, 3, 6) at 3 bits and b = (3, 2, 0, 1) at 2 bits, with a 16-bit multiplier. The
clustering width is `cw = 8` bits per element, and an input-cluster holds `ics = 2` elements.

| step | first half | second half |
|---|---|---|
| A cluster: lane l at bit (ics−1−l)·cw | 4·256 + 7 = 1031 | 3·256 + 6 = 774 |
| B cluster, **reversed**: lane l at bit l·cw | 3 + 2·256 = 515 | 0 + 1·256 = 256 |
| product | 530965 | 198144 |
| slice [15:8] = bits from (ics−1)·cw, cw wide | 26 = 4·3 + 7·2 | 6 = 3·0 + 6·1 |

The sum of the slices is 32, the inner product. Reversing one operand makes the cross terms
a_l·b_l all land at the same power 2^((ics−1)·cw). Other cross terms land above or below. The
padding keeps them from spilling into the slice. It needs

    cw ≥ 1 + bw_a + bw_b + ceil(log2(ics + 1)),   ics = floor(64 / cw)

For a 64-bit multiplier this gives ics = 7 at a2-w2 (cw = 8), 4 at a6-w4 (cw = 14) and 3 at a8-w8
(cw = 19). Software solves these rules and writes `ics`, `cw` and `slice_lsb = (ics−1)·cw` into
the configuration. The hardware never divides.

**Signed data.** The engine sign-extends each lane before packing. It merges lanes by
*addition*, not by OR, so that negative lanes borrow correctly. The partial sums below the
slice can then be negative and take one unit out of the slice. The filter therefore adds bit
`slice_lsb − 1` to the slice (round to nearest), which gives the exact value. The padding bound
keeps the lower sums below half a slice unit. For unsigned data this step changes nothing.
The rounding and the add-merge are this design's own. The packing, slicing and reversal are the
standard method.

## Data format and the element window (`mxg_dsu_sel`)

A μ-vector is one 64-bit word holding `epv = floor(64 / bw)` elements. Element e sits at bits
`[e·bw +: bw]` and the unused top bits are zero. The element counts per width are:

| bw | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|----|---|---|---|---|---|---|---|
| epv | 32 | 21 | 16 | 12 | 10 | 9 | 8 |

Each issued cycle consumes `n_take = NUM_MUL · ics` elements of each operand, fewer on the
last cycle of a reduction. That count rarely divides `epv`, so a cycle often needs elements
from two consecutive μ-vectors. Each operand has a selection block that keeps the unused tail
of the previous word in a hold register. It builds a 128-bit window:

    window = hold | (need ? next_word << (rem · bw) : 0)     (need = n_take > rem)

The low `n_take` elements of the window are the cycle's operands. After the cycle the window is
shifted right by `n_take · bw` and becomes the new hold, and `rem` is updated. A new reduction
always starts on a fresh word, so the hold is dropped on its last cycle.

The A and B operands can have different widths and therefore different word counts. One
reduction covers `K = min(kua·epv_a, kub·epv_b)` elements. Any extra elements in the longer
operand are zero padding that software adds. A reduction takes `ceil(K / (NUM_MUL·ics))`
cycles. With one multiplier this is 11 cycles for a8-w8 with kua/kub = 4/4 (K = 32, ics = 3).
It is 10 cycles for a8-w6 with 4/3 (K = 30, ics = 3) and 8 cycles for a6-w4 with 3/2 (K = 30,
ics = 4).

## Scratchpad hardware loops (`mxg_sp_a`, `mxg_sp_b`)

The core writes the A μ-panel row by row: `mr` rows of `kua` words. It then writes the B μ-panel
column by column: `nr` columns of `kub` words. Each `put` carries up to two words. When `kua` or
`kub` is odd, the last put of a row has a dummy second word, which the scratchpad drops. The
engine computes C element (row, col) as a dot product of A row `row` and B column `col`. Rows
are the inner loop and columns the outer loop.

* **SP A** reads all `mr·kua` words in order and starts again from the top, `nr` times in all.
  A word is freed as it is read in the last pass.
* **SP B** reads one column of `kub` words `mr` times: after the last word it jumps back by
  `kub − 1`. It then moves on to the next column and frees the old one.

Both are circular buffers (`MR·KU` and `NR·KU` words). Freeing words early lets the core start
the next context's puts while the current one is still computing. A put into a full scratchpad
stalls the core (`wr_ready` low). A read waits for words that have not been written yet
(`rd_valid`). Computation therefore starts as soon as both heads are valid.

## Issue and the pipeline (`mxg_ctrl`, `mxg_dsu`, `mxg_dcu`, `mxg_dfu`)

The control unit holds the configuration and walks (row, col, context). It issues a cycle
(`fire`) when three conditions hold:

* every operand that needs a new word has one at its head;
* the core is not writing a new configuration in the same cycle;
* for the first cycle of a new result, the accumulator slot is free (see below).

An issued cycle always runs to the end; the datapath has no stall.

| edge | stage | content |
|---|---|---|
| 0 | issue | windows formed, scratchpads popped |
| 1 | E register | windows, valid element count, bookkeeping |
| 2 | C register | `NUM_MUL` pairs of input-clusters, driven to the multipliers (`mul_a`, `mul_b`, `mul_valid`) |
| 2 + `MUL_LAT` | product | `mul_res` from the core's multiplier |
| 3 + `MUL_LAT` | F register | DFU slices; then the accumulator is written on this edge |

Multiplier m packs elements `[m·ics, (m+1)·ics)` of the window, so the two multipliers work on
consecutive sub-vectors. Each DCU (`mxg_dcu`) has one lane per possible cluster element, seven
in all. Each lane does three things:

* masks each lane, and sign-extends it when the operand is signed;
* places it at its cw-spaced position, reversed for B;
* zeroes lanes past the end of the reduction.

## Accumulator and the slot handshake (`mxg_acc_sp`)

The accumulator has `mr·nr` slots, one per C element, numbered `row + col·mr`. The DFU results
of both multipliers are added and accumulated into the slot. The first cycle of the first
context overwrites the slot, so slots never need clearing. Later cycles and later contexts
(`n_ctx` of them, the kc/ku steps of the blocked GEMM) add to it.

Each slot has two state bits:

* `resv` is set when the final cycle for the slot is *issued*;
* `done` is set when that cycle's value is *written*.

`get(idx)` stalls until slot `idx` is done, returns it sign-extended to 64 bits, and clears
both bits. The control unit does not start the next μ-kernel's first reduction into a slot
whose `resv` is still set. The next kernel's puts and its computation can therefore overlap
the gets of the previous kernel without losing a result. The per-slot handshake is this
design's own. The original only requires that gets stall until data is ready.

## Instructions and configuration (`mxg_issue_arb`, `mxg_pkg`)

The top, `mxg_uengine`, takes two issue slots `{in_valid, in_op, in_rs1, in_rs2}`. A
dual-issue core may send two `mxg` instructions in one cycle. The arbiter serves slot 0 first
and then slot 1, raising `pair_stall` for one cycle so that the core holds the pair. The
instructions are:

| op | meaning | waits while |
|---|---|---|
| `set` | load configuration `{rs2, rs1}` | a scratchpad holds data, a reduction is partly issued, or the pipeline is busy |
| `put_a` / `put_b` | write μ-vectors rs1 and rs2 | the scratchpad is full |
| `get` | `rd` = C slot `rs1[7:0]` | the slot is not final |

Configuration word (`mxg_cfg_t`, LSB first): `bw_a[3:0]`, `bw_b[3:0]`, `sgn_a`, `sgn_b`,
`ics[3:0]`, `cw[6:0]`, `slice_lsb[6:0]`, `kua[7:0]`, `kub[7:0]`, `mr[7:0]`, `nr[7:0]`,
`n_ctx[15:0]`. The remaining bits are unused. The opcode values and this layout are this
design's choice.

A μ-kernel from software's side:

1. `set` once per matrix shape and width.
2. For each of `n_ctx` contexts: `mr` rows of A (`put_a`), then `nr` columns of B (`put_b`).
3. `mr·nr` gets.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_MUL` | 2 | multipliers used (1 = single-issue version) |
| `MR`, `NR` | 8 | largest C tile; accumulator has MR·NR slots |
| `KU` | 8 | largest kua/kub; SP A holds MR·KU words, SP B NR·KU |
| `MUL_W` | 64 | multiplier operand width |
| `ACC_W` | 32 | accumulator slot width (256 B for 64 slots) |
| `ICS_MAX` | 7 | most lanes per cluster |
| `MUL_LAT` | 1 | multiplier latency in cycles (assumed) |

The single-issue design point is `NUM_MUL = 1, MR = NR = KU = 4`: 128 B per input scratchpad and
64 B of accumulators.

## Departures and limits

* Storage is flip-flops. The original uses latches for the scratchpads and accumulators, and
  clock gating is not modelled.
* The multiplier is not part of the engine. Its operands and product are ports, and its latency
  `MUL_LAT` is a guess.
* The engine does not decode instructions. The core delivers `op`, `rs1` and `rs2`, and the
  opcode encoding is made up.
* `set` waits for the engine to drain. The original reconfigures "once per GEMM" and does not say
  what happens mid-flight.
* There are signed rounding in the filter, add-merge in the DCU, and the per-slot handshake in
  the accumulator, as described above.
* Accumulator overflow wraps at 32 bits. This is enough for signed 8 × 8-bit sums of over
  100 000 terms.
* Software must supply a legal configuration: `ics·cw ≤ 64`, `mr ≤ MR`, `nr ≤ NR`,
  `kua, kub ≤ KU`. An assertion in `mxg_ctrl` checks the sizes.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_mxg_dcu` | the example above at 16 bits, plus random clusters at 64 bits |
| `tb_mxg_dfu` | the example's slices, plus random signed and unsigned inner products through a real product |
| `tb_mxg_dsu_sel` | random reductions; every window against the element list |
| `tb_mxg_dsu` | both multipliers' clusters two edges after issue, and the scratchpad pops |
| `tb_mxg_sp_a`, `tb_mxg_sp_b` | read order over three contexts, put stalls, early freeing |
| `tb_mxg_acc_sp` | overwrite/accumulate, get stalls, slot reservation |
| `tb_mxg_ctrl` | sequencing, and the 11/10/8 cycles per reduction of the single-issue examples |
| `tb_mxg_issue_arb` | order and one-cycle pair stall |
| `tb_mxg_uengine` | end to end at default parameters (below) |
| `tb_mxg_uengine_si` | end to end at the single-issue point (`NUM_MUL = 1`, 4 × 4, `KU = 4`); 11/10/8 cycles per reduction for a8-w8, a8-w6, a6-w4 |
| `tb_mxg_workloads` | every width pair (below) |

`tb_mxg_uengine` runs random GEMM tiles at the default parameters through both issue slots and
compares every result with an integer GEMM. It covers mixed widths, signed data, several
contexts and back-to-back kernels. It also checks the number of issued cycles and counts how
often each mechanism occurs:

* put stall;
* get stall;
* paired instructions;
* dummy odd word;
* cross-word concatenation;
* waiting on an unread slot.

`tb_mxg_workloads` runs every width pair from a2-w2 to a8-w8 (activation at least as wide as
the weight) through a full 8 × 8 tile. It prints the MAC/cycle reached. The per-multiplier
cluster size drops from 4 to 3 at a7-w6 and a8-w5, where the throughput of the original
design drops too.

The same testbench then computes two complete 128 × 128 × 128 GEMMs and checks all results. It
tiles them into 8 × 8 blocks of C, as the software does. The engine alone, with the puts and
gets but no memory stalls, reaches:

| GEMM | MAC/cycle |
|---|---|
| a8-w8 | 5.66 |
| a4-w2 | 11.04 |

To simulate with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/mxg_pkg.sv tb/tb_mxg_uengine.sv \
              --top-module tb_mxg_uengine -Mdir obj -o sim && obj/sim

Any other testbench works the same way with its name in place of `tb_mxg_uengine`.
`tb/mxg_mul_model.sv` is a behavioural multiplier with `LAT` pipeline stages for the
testbenches.
