# Conflict-free multi-symbol CABAC arithmetic encoder (H.264/AVC)

CABAC, the entropy coder of the H.264 Main and High profiles, ends in a binary
arithmetic encoder. It codes one bin at a time. Each bin reads a probability
state from a context memory, updates the state, writes it back, and narrows the
coding interval (`range`, `low`). To reach a high bin rate at a modest clock,
this encoder codes **N bins per cycle** (N = 4 by default, N = 2 also
supported). It uses N one-bin engines whose `range` and `low` updates are
chained within a single cycle.

The limit on such a design is the context memory. N bins need N reads and N
writes per cycle. A dual-port SRAM split into N banks (context `c` in bank
`c % N`) has exactly that many ports, but only if the N contexts of a cycle
fall into N different banks. When two of them share a bank, the group has to
be cut, and the cycle codes fewer bins. Most collisions come from a few
contexts used over and over during residual coding:

* the `last_significant_coeff_flag` contexts, whose bins alternate with the
  `significant_coeff_flag` bins;
* the `coded_block_pattern` contexts.

These 44 **critical contexts** are held in a flip-flop **Critical Register
Array (CRA)** instead. The CRA has a read and a write port per lane, so they
can never collide. The other 452 contexts stay in the banked SRAM. The
combination is the **Hybrid Context Memory (HCM)**.

## Pipeline

Every lane runs the same seven stages. Lane *i+1* uses the `range` and `low`
that lane *i* produced in the same cycle.

| stage | module | work |
|---|---|---|
| AG context | `ctx_ag` | Classify each context as critical or normal and pick its bank. Find the first bank conflict and cut the group there. Issue the reads. |
| read context | `hybrid_ctx_mem` | SRAM banks and CRA return the states. A bank crossbar (`ctx % N`) and a critical/normal mux pick each lane's state. |
| update context | `ctx_update` | Pick the up-to-date state (see below). Apply the H.264 state transition. |
| write context | `hybrid_ctx_mem` | Write the new states to their bank or to the CRA. |
| range | `range_stage` | N chained range updates. Produces the renormalisation shift and the amount added to `low`. |
| low | `low_stage` | N chained `low` updates. Each renormalisation step becomes an event: bit 0, bit 1, or outstanding. |
| output | `output_stage` | Resolve outstanding bits. Drop the first bit of each slice. Emit the bitstream as slots. |
| (packing) | `bit_packer` | Pack the slots into 32-bit words through a FIFO. |

A bin accepted in cycle *t* reaches the output registers at the clock edge
that ends cycle *t+6*, so it is visible from cycle *t+7*. Its packed bits
follow in a word a few cycles later. The pipeline never stalls. Throughput is
lost only to a group cut short by a bank conflict, and to the rare cycle in
which the packer's FIFO is too full to take more (see below). Otherwise N
bins enter every cycle.

## Context memory

* **Critical contexts (CRA, 44 entries).** The context indices are the H.264
  ones:
  * `coded_block_pattern`: 73–84 (12 contexts);
  * `last_significant_coeff_flag`, Luma 4x4: 195–209 (15);
  * `last_significant_coeff_flag`, Chroma DC: 210–212 (3);
  * `last_significant_coeff_flag`, Chroma AC: 213–226 (14).

  CRA entry numbers are 0–11 for the CBP contexts, followed by 12–43 for the
  last-flag contexts, in order (`cabac_pkg::cra_index`).
* **Normal contexts (SRAM).** There are N banks of `ceil(496/N)` words. A word
  is 7 bits: a 6-bit state index and the MPS bit. Context `c` is at bank
  `c % N`, row `c / N`. The rows of critical contexts are left unused, so the
  mapping stays a plain modulo. Each bank has one write port and one
  synchronous read port. A read and a write of the same word at the same edge
  return the old word.
* **Conflict rule (`ctx_ag`).** Two *different* normal contexts in the same
  bank are a conflict. The group is accepted up to the bin before the second
  one, and the rest is offered again the next cycle. Several bins of the
  *same* context are not a conflict: the first does the single read and the
  last does the single write. Bypass and terminate bins use no context.

With the last-flags in the CRA, a run of `sig`/`last` bins from a 4x4 block
goes through the 4-lane encoder at 4 bins per cycle. The consecutive `sig`
contexts fall into consecutive banks, and the `last` contexts need no bank.
The test bench measures 3.999 bins/cycle on such a stream.

## Keeping states coherent (the subtle part)

With a pipeline of read, update and write, a group can read a context that an
older group has not yet written back. Group *g* reads the memory at the edge
that ends its AG cycle, and that read misses the writes of three older groups:

* *g-1*, which is in the write stage while *g* updates;
* *g-2*, which wrote one edge after *g*'s read;
* *g-3*, which wrote at the same edge as *g*'s read, so the SRAM returned the
  old word.

`ctx_update` therefore compares each bin's context with the contexts written
by those three groups. It also compares it with the earlier bins of its own
group. It takes the newest match, in this order:

1. The latest earlier bin of the same group with the same context. The state
   it produced is passed straight on, so bins of one group are chained in
   coding order.
2. The write of group *g-1*, then *g-2*, then *g-3*.
3. The state read from the memory.

The write port of lane 0 also carries the initialisation writes. Because the
forwarding sources are taken from the actual write-port signals, an
initialisation write is forwarded like any other.

## Interval arithmetic and output format

The range and low arithmetic is the H.264 binary arithmetic encoder:

* 9-bit `range`, 10-bit `low`;
* `rangeLPS` looked up from `pStateIdx` and range bits 7:6;
* renormalisation until `range` ≥ 256;
* bypass bins code with the thresholds doubled;
* the terminate bin: a 1 flushes the slice (7 shifts, one resolved bit, then
  `low` bit 8 and a stop bit 1), after which `range`, `low` and the output
  state restart for the next slice.

A run of outstanding bits can be any length, so it cannot be resolved into a
fixed number of bits per cycle without a stall. `out_slot` therefore carries
one slot per event position, `N*10` in all. Each slot is
`{valid, skip, b, ostd[15:0]}` and means: write `b` unless `skip` is set,
then write `ostd` copies of `~b`. Read the slots in index order to get the
bitstream.

## Packing into words (`bit_packer`)

The slots of each cycle are pushed as one entry into a 16-entry FIFO. The
packer walks the head entry slot by slot. It can cut into a long outstanding
run. Each cycle it gathers bits until its accumulator holds up to 63, and
it emits at most one 32-bit word. Every full word is emitted with the first bit in bit 31 and `word_nbits = 32`. At
the end of a slice, the partial word is flushed with `word_last` set and its
bit count in `word_nbits`, so each slice starts on a word boundary. The unused
low bits of that word are zero.

Normally an entry packs in one cycle. An entry with a long outstanding run
takes several, and the FIFO then fills. The encoder pipeline has no stall
path: its range and low chain advances every cycle. Instead the
packer raises `space_ok` only while the FIFO has room for at least 8 more
entries. That is enough for every group already between acceptance and the
FIFO. While `space_ok` is low, `in_take` is 0. In the end-to-end streams of the
test benches this never happens; a bench made of long runs makes it happen.

## Interface of `multi_symbol_ae`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `in_num` | in | number of bins offered on `in_sym[0..in_num-1]` (0..N) |
| `in_sym[N]` | in | `symbol_t`: `kind` (regular/bypass/terminate), `bin`, 9-bit `ctx` |
| `in_take` | out | bins accepted this cycle (combinational). Offer the rest again, starting at lane 0. |
| `init_we`, `init_ctx`, `init_state` | in | Load a context state. Use only while no group is in the context stages (`busy` low). No bin is accepted in that cycle. |
| `out_slot[N*10]`, `out_slice_end` | out | bitstream slots, as above; `out_slice_end` marks slots that end a slice |
| `word_valid`, `word[31:0]`, `word_nbits[5:0]`, `word_last` | out | packed bitstream, first bit in bit 31 |
| `busy` | out | a group is in flight, or bits are still waiting to be packed |
| `stat_conflict`, `stat_fwd[2:0]`, `stat_chain`, `stat_crit[N]` | out | event flags: group cut, forwarding used per distance, same-context chain, critical lanes |
| `range_q`, `low_q`, `ostd_q` | out | coder state, for observation |

Contexts must be initialised (from the slice QP and the standard's m,n tables)
through `init_*` before coding. That computation is not part of this design.

## What is and is not here

Implemented:

* the N-lane encoder with its seven-stage pipeline;
* the Hybrid Context Memory: banked dual-port SRAM, CRA, crossbar and select
  muxes;
* conflict detection;
* the update stage, with same-group chaining and three-deep forwarding;
* the range, low and output stages;
* packing into 32-bit words.

Choices of this design where the published architecture gives no detail:

* the `in_num`/`in_take` handshake;
* the forwarding network, and the sharing of one read and one write by bins of
  the same context;
* the terminate/flush bin, which follows H.264;
* the initialisation port;
* the unused SRAM rows for critical contexts;
* registered reads in the CRA;
* the slot output format and the 16-bit outstanding counter, which an
  assertion checks for overflow;
* the word width, the FIFO depth, and holding off input (rather than stalling)
  when the FIFO is short of room.

Not included:

* the binarizer;
* the context-index generator (it derives contexts from neighbouring data);
* the context initialisation tables.

Published results not reproduced here: the design was reported at 1.92 and
3.70 bins/cycle on real video sequences, 333 MHz with 12.6 K gates for 2
symbols, and 185 MHz with about 34.6–34.9 K gates for 4 symbols, in 0.18 µm.
This RTL has not been timed or synthesised to gates. The bins/cycle figures
below come from synthetic streams.

## Verification

Every module has a self-checking bench in `tb/`. Each compares the module
against a model written differently from the RTL.
`tb/cabac_ref_pkg.sv` is a bit-serial reference encoder that follows the
standard's flow charts.

`tb_multi_symbol_ae` runs the default 4-lane encoder, and
`tb_multi_symbol_ae_n2` runs the 2-lane version. Each bench:

* loads all 496 contexts;
* checks the 7-cycle latency;
* streams about 24 000 bins over 9 slices;
* requires both the slots and the packed words to match the reference
  bitstream bit for bit.

The streams are in three phases:

* groups in distinct banks, where N bins per cycle is required;
* 4x4 residual `sig`/`last` runs;
* a mixed phase with a small context pool, which forces conflicts, chains and
  every forwarding distance.

Measured throughput:

| phase | 4 lanes | 2 lanes |
|---|---|---|
| distinct banks | 4.0 bins/cycle | 2.0 bins/cycle |
| `sig`/`last` runs | 3.999 bins/cycle | 2.0 bins/cycle |
| mixed | 3.36 bins/cycle | 1.90 bins/cycle |

`tb_workload_residual` codes three slices of 396 synthetic macroblocks each,
for both lane counts. The macroblocks hold header bins, CBP bins, and 4x4
residual blocks whose coefficient density stands for a low, middle or high
QP. The densities are 70 %, 40 % and 15 % of coefficients non-zero.

A cycle model of the grouping rule, run on the same bin stream, must predict
the encoder's cycle count exactly. Run again with every context banked, the
same model shows what a plain multi-bank memory without the CRA would reach.

| density | 4 lanes | 4 lanes, no CRA | 2 lanes | 2 lanes, no CRA |
|---|---|---|---|---|
| 70 % | 3.74 | 2.99 | 1.94 | 1.84 |
| 40 % | 3.66 | 3.07 | 1.93 | 1.83 |
| 15 % | 3.59 | 3.16 | 1.93 | 1.82 |

All figures are bins/cycle. For comparison, the published averages on real
sequences are 3.70 and 1.92 with the hybrid memory, and 2.27–2.45 and
1.63–1.71 with a plain banked memory.
The synthetic macroblocks only approximate real syntax, so treat these
figures as a sanity check, not a reproduction.

`tb_bit_packer` drives the packer with random slots and long outstanding runs.
It checks every packed bit, the word lengths and the slice ends, and it
requires the FIFO to reach its hold level.

## Files and simulation

`rtl/cabac_pkg.sv` holds the types, the H.264 tables and the critical-context
map, and is read before everything else. The other modules are one per file:

* `ctx_ag`, `dp_sram_bank`, `critical_reg_array`, `hybrid_ctx_mem`;
* `ctx_update`, `range_stage`, `low_stage`, `output_stage`, `bit_packer`;
* `multi_symbol_ae`, the top.

To simulate with Verilator:

```sh
verilator --binary --timing --assert -Irtl -Itb \
  rtl/cabac_pkg.sv tb/cabac_ref_pkg.sv rtl/*.sv tb/tb_multi_symbol_ae.sv \
  --top-module tb_multi_symbol_ae -o sim
./obj_dir/sim
```

Each bench prints `TB_RESULT checks=<n> failures=<n>`. To change the number
of lanes, set `N` on `multi_symbol_ae`. It must be a power of two, and the
bank depth follows from it.
