# Sliding-window MAP decoder with a sub-banked single-port memory

A turbo decoder spends most of its time in its two soft-input soft-output
(SISO) decoders, which run the MAP algorithm: a forward recursion (alpha), a
backward recursion (beta) and, per trellis stage, a soft output that combines
both. The sliding-window form cuts the frame into short blocks and starts each
backward recursion from a "dummy" recursion run over a few blocks further on,
so the decoder does not have to wait for, or store, the whole frame.

To produce one soft output every clock, such a decoder must read and write
several blocks of data and alpha metrics in the same cycle. This design does it
with plain single-port RAMs: the memory is split into sub-banks of one block
each, and a time-slot schedule guarantees that no sub-bank is touched twice in
a cycle. The number of sub-banks is the minimum for that guarantee,
following the sub-banking scheme of Tiwari, Zhu and Chakrabarti
("Memory Sub-Banking Scheme for High Throughput MAP-Based SISO Decoders"):

* `p + 2q` data sub-banks and `p + 1` alpha sub-banks, each `L/q` words deep,
  where `eta = p/q` is the ratio of actual to dummy backward-recursion stages
  and `L` is the window (dummy) length.

The default build is the configuration `eta = 2` (p = 2, q = 1): four data
sub-banks, three alpha sub-banks, blocks of `L = 32` stages, frames of
`N = 1024` stages, and an 8-state 3GPP constituent code. Every sub-bank
assignment it makes matches the published memory-layout table for `eta = 2`.

## The time-slot schedule

A frame of `N` stages is split into `K = N / (L/q)` blocks `D1 .. DK`. A *time
slot* is the `L/q` cycles needed to process one block; every unit handles one
stage per cycle. Blocks are grouped `p` at a time; group `n` is blocks
`D(np-p+1) .. D(np)`. Numbering slots so that slot `s` is where
`alpha(s+1)` is computed:

| unit | what it does in slot `s` |
|---|---|
| input | block `D(s+2q)` arrives and is written to a free data sub-bank |
| forward (alpha) | reads `D(s+1)`, writes `alpha(s+1)` to a free alpha sub-bank |
| dummy beta | for group `n`, slots `np-q .. np-1`: runs backward over `D(np+q) .. D(np+1)`, from equal metrics |
| actual beta + soft output | for group `n`, slots `np .. np+p-1`: runs backward over `D(np) .. D(np-p+1)`, reading data and alpha, one soft output per cycle |

The first block arrives in slot `1-2q`; the frame ends in slot `K+p-1`, so a
frame takes `K + p + 2q - 1` slots, i.e. `N + (p+2q-1)·L/q` cycles plus the
pipeline delay. With `q = 1` the dummy recursion runs directly on the block
being loaded, so it never reads memory; with `q > 1` its later blocks are read
back from the data sub-banks.

When `q > p` (`eta < 1`) a dummy pass lasts `q` slots but a new one starts
every `p` slots, so `ceil(q/p)` dummy units take turns (group `n` uses unit
`n mod ceil(q/p)`); the data memory has one read port per dummy unit. The sub-bank
counts stay `p+2q` and `p+1`. Near the frame end a dummy window
`D(np+q) .. D(np+1)` would reach past the last block `D(K)`; it then covers only
`D(K) .. D(np+1)`, starting from equal metrics at `D(K)`.

For the default `eta = 2` the first slots look like this (sub-bank numbers,
`W` = written, `R` = read):

| slot | data 0 | data 1 | data 2 | data 3 | alpha 0 | alpha 1 | alpha 2 | dummy | output |
|---|---|---|---|---|---|---|---|---|---|
| 0 | R D1 | W D2 | | | W a1 | | | | |
| 1 | D1 | R D2 | W D3 | | a1 | W a2 | | on D3 | |
| 2 | D1 | R D2 | R D3 | W D4 | a1 | R a2 | W a3 | | block 2 |
| 3 | R D1 | W D5 | D3 | R D4 | R a1 | W a4 | a3 | on D5 | block 1 |
| 4 | W D6 | R D5 | D3 | R D4 | W a5 | R a4 | a3 | | block 4 |
| 5 | R D6 | D5 | R D3 | W D7 | a5 | W a6 | R a3 | on D7 | block 3 |
| 6 | R D6 | D5 | W D8 | R D7 | a5 | R a6 | W a7 | | block 6 |

Each column has at most one access per slot, and within a slot the reads of
one sub-bank are one per cycle, so single-port RAMs suffice.

## Why `p+2q` and `p+1` sub-banks are enough, and how they are handed out

A block's data and alpha words become obsolete in the slot where its soft
outputs are produced; from the next slot on, the sub-bank can take a new
block. At any moment the live data blocks are the `p` of the group being
output, the blocks loaded ahead of it for the forward and dummy recursions and
the block being loaded; after subtracting the sub-banks that fall free just in
time, `p + 2q` remain. The alpha side needs the `p` alphas of the group being
output plus one sub-bank for the alpha currently computed: `p + 1`.

The controller (`sw_controller`) does not hard-code a table. It keeps two
first-in first-out free lists (`bank_freelist`), one per memory, and a small
map from block number to sub-bank:

* at the end of each slot, the data and alpha sub-banks of the block just
  output are pushed onto their free lists;
* at the start of each slot, the block to be loaded and the alpha to be
  computed each pop a sub-bank. If a list is empty, the bank being pushed in
  the same cycle is handed over directly (`ev_bank_reuse` marks this for data).

Assertions check that a pop never finds the list empty and that no sub-bank is
addressed by two ports in one cycle. Both hold for every configuration tested
(`eta` = 1, 3/2, 2, 5/2, 3, 4, 5), which confirms the bank counts.

### The alpha bypass

One cycle-level collision is not visible at slot granularity. At the first
cycle of a group's backward pass, the beta side reads the alpha of the last
stage of block `D(np)`, and because the alpha unit writes one cycle after it
reads, that very word is being written in the same cycle. `alpha_mem` then
performs only the write and returns the written word on the read port one
cycle later, as a read would have done (`alpha_bypass` marks it). No other
read/write pair ever meets in one sub-bank.

## Datapath

* **Branch metrics.** Each input stage carries the systematic, parity and
  a-priori LLRs (6-bit signed, two fractional bits). The stored data word is
  `{ga, gb} = {Lsys + Lapr, Lpar}` (2 × 7 bits); the metric of a transition
  with information bit `u` and parity bit `c` is `u·ga + c·gb`.
* **Forward unit** (`alpha_unit`): `alpha_t[s'] = max*(alpha_{t-1}[s] + gamma)`
  over the two transitions into `s'`, starting at state 0. The register value,
  i.e. the alphas *entering* a stage, is what is stored.
* **Backward units** (`beta_unit`): `ceil(q/p)` dummy units and one actual
  unit. A dummy unit starts each pass from equal metrics; the actual unit
  starts from the final register of the dummy unit that served its group, read
  directly (no memory), or from equal metrics for the last group of the frame.
* **Soft output** (`llr_unit`): `LLR = max*_{u=1}(alpha + gamma + beta) -
  max*_{u=0}(...)`, extrinsic `= LLR - ga`, both 14-bit.
* **Arithmetic.** `max*(x,y) = max(x,y) + d`, with `d` = 3, 2, 1, 0 for
  `|x-y|` = 0, 1..3, 4..7, ≥ 8 (`ln(1+e^-|x-y|)` at two fractional bits).
  State metrics are 12 bits and are renormalised every stage by subtracting
  the metric of state 0. Unreachable start states get −256.
* **Code.** 8-state RSC of the 3GPP turbo code: feedback `1+D^2+D^3`, parity
  `1+D+D^3` (`siso_pkg::next_state`, `siso_pkg::parity_bit`).

## Interface and timing (`siso_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `start` | in | 1 | begin a frame (ignored while `busy`) |
| `busy` | out | 1 | frame in progress |
| `in_ready` | out | 1 | the decoder takes an input stage this cycle |
| `in_valid`, `in_sys`, `in_par`, `in_apr` | in | 1, 6, 6, 6 | input stage; must be valid whenever `in_ready` is high |
| `out_valid`, `out_idx`, `out_llr`, `out_ext` | out | 1, log2 N, 14, 14 | soft output and its stage index |
| `done` | out | 1 | with the last soft output of the frame |
| `alpha_bypass`, `ev_handoff`, `ev_equal_start`, `ev_bank_reuse`, `mem_conflict` | out | 1 | event flags for monitoring |

* The input is a stream with no back-pressure: after `start`, `in_ready` is
  high for `N` consecutive cycles. Blocks come in order, but **the `L/q`
  stages of each block come last stage first**, so the dummy recursion can run
  on them as they are written.
* Soft outputs come one per cycle, with no gaps, group by group; inside a
  group the blocks and the stages run backwards. `out_idx` tells where each
  belongs (a consumer writes it into the interleaver memory).
* The first output appears `(p+2q-1)·L/q + 2` cycles after the first input;
  from the first input to the last output the frame takes
  `N + (p+2q-1)·L/q + 2` cycles (default: 1024 + 96 + 2). The `+2` is the
  synchronous RAM read and the output register.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `P`, `Q` | 2, 1 | `eta = P/Q`, below or above 1; `L` must be a multiple of `Q` |
| `L` | 32 | window length in stages (8 × the constraint length 4); sub-bank depth is `L/Q` |
| `N` | 1024 | frame length; `N/(L/Q)` must be a multiple of `P` |

Word widths are in `siso_pkg`. The default memory is 4 × 32 × 14 bits of data
and 3 × 32 × 96 bits of alpha, about 11 kbit. The scheme's size rule,
`(3p+4q+1)·W·L/q`, assumes a data word twice as wide as an alpha word `W`;
here the data word holds only two branch-metric components, so the data
sub-banks are much narrower than that rule assumes.

## What is not here

* **`M > 1`** (several blocks interleaved through pipelined recursion units
  for a faster clock). The scheme keeps the same sub-bank count and makes each
  sub-bank `M` times deeper; only `M = 1` is built. With `M > 1` the frame is
  cut into `M` segments, and every segment after the first needs a starting
  point for its forward recursion; how that start is obtained, and in which
  order the segments' data would arrive, is left open here.
* **Dual-port variant** (`2(p+q)-1` sub-banks) and the non-optimal,
  fewer-sub-bank configurations: alternatives, not built.
* **The turbo loop** (second SISO decoder, interleaver and de-interleaver,
  iteration control), the encoder and the channel: the interleaver
  permutation and iteration count are outside this design.
* Choices of this design rather than of the scheme: the code, all widths,
  the max* table, `L`, `N`, the reversed stage order inside a block, the
  number of dummy units for `eta < 1`, the shortened dummy passes at the frame
  end, the
  stream interface, the free-list allocation, the alpha bypass and starting
  the last group from equal metrics (no trellis termination).

## Files

| file | contents |
|---|---|
| `rtl/siso_pkg.sv` | widths, word types, trellis and max* functions |
| `rtl/siso_decoder.sv` | top level |
| `rtl/sw_controller.sv` | slot schedule, sub-bank allocation, address generation |
| `rtl/bank_freelist.sv` | FIFO of free sub-banks |
| `rtl/data_mem.sv`, `rtl/alpha_mem.sv` | the two sub-banked memories |
| `rtl/sp_ram.sv` | one single-port sub-bank (synchronous read) |
| `rtl/alpha_unit.sv`, `rtl/beta_unit.sv`, `rtl/llr_unit.sv` | recursion and soft-output units |
| `tb/siso_ref_pkg.sv` | reference decoder on whole arrays, with the trellis derived from the generator polynomials |
| `tb/siso_frame_test.sv` | end-to-end frame test used by the decoder testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification and simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<m>`.

* `tb_siso_decoder`: two random frames at the default size; every soft output,
  its index and its position in the output order against the reference model;
  first-output and last-output cycle counts; no sub-bank conflict; the bypass,
  dummy handoff, frame-end start and same-boundary reuse each happen.
* `tb_siso_decoder_eta`: one frame each for `eta` = 1, 3/2, 3, 5/2, 4, 5 and,
  with several dummy units, `eta` = 2/3, 1/2, 1/3, 1/4, 1/10.
* `tb_sw_controller`: the `eta = 2` slot table above, sub-bank by sub-bank,
  plus address order and frame length.
* Unit testbenches for the RAM, free list, both memories and the three
  arithmetic units.

To run one with Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb \
  rtl/siso_pkg.sv tb/siso_ref_pkg.sv rtl/*.sv \
  tb/siso_frame_test.sv tb/tb_siso_decoder.sv \
  --top-module tb_siso_decoder -o sim
./obj_dir/sim
```

Replace the last testbench file and top name for the others (the unit
testbenches need only the packages and `rtl/*.sv`). All files pass
`verilator --lint-only -Wall` without errors; the remaining warnings are unused
bits (the top bits of wide intermediate sums, and status outputs of the
controller that the top does not use).
