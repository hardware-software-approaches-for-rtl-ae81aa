# Variation-tolerant instruction fetch: Current Frame Register and latency-annotated I-cache

At small process nodes, random dopant placement makes some SRAM cells slow. A
cache line or TLB entry that holds one slow cell needs an extra cycle to
read. The simple fix is to clock every access at the slowest latency, but in
the fetch stage that slows every instruction. This RTL keeps the fast path
fast and pays the extra cycle only where it is needed. It uses three
mechanisms:

1. **Current Frame Register (CFR).** The last instruction-page translation
   is kept in one register built from robust cells. While fetch stays in
   the same page, the physical tag comes from the CFR and the slow iTLB is
   not used at all. Only a page change pays the iTLB's worst-case
   latency (hardware-managed CFR).
2. **Line reshuffling.** A programmable address decoder in each cache way
   rearranges the lines of every group of 8 consecutive sets. The perfect
   lines then serve the low set indices of the group and the slow lines the
   high ones. This packs the slow lines into fewer sets.
3. **Latency hints in the code.** A compiler knows which sets are slow from a
   one-bit-per-set latency table. It writes the latency of the next set to be
   fetched into a spare bit of two kinds of instruction: the last instruction
   of each cache block, and any branch whose target leaves the block. The
   fetch stage reads the bit and waits exactly that long. No runtime
   predictor or latency table is needed.

A fetch that enters a new block completes in **one cycle** when the CFR holds
the translation and the hint says "perfect set". It takes **two cycles** when
either the translation comes from the iTLB or the set is slow. The two waits
overlap, so the cost is their maximum, not their sum.

## Block diagram

```
 core redirect (pc, hint, exc) ─┐                       ┌──> fetch_queue ──> decode (4/cycle)
                                v                       │        8 entries
                         ┌────────────┐  instrs  ┌──────┴─────┐
                         │ fetch_ctrl │<─────────│fetch_buffer│<─── block (bypass in same cycle)
                         └─┬───────┬──┘          └────────────┘           ^
              VPN, start   │       │ VA, wait = 1 + hint                  │
                           v       v                                      │
                   ┌────────────┐ ptag ┌──────────────────────────────┐   │
                   │ addr_xlate │─────>│ icache  64KB 4-way 64B LRU   │───┘
                   │  cfr  ─?─┐ │      │  set_map x2 ─ line_reshuffle │
                   │  itlb <──┘ │      │  latency map (March test)    │
                   └─────┬──────┘      └──────┬───────────────────────┘
                   page walk port          refill port (next level)
```

| File | Role |
|---|---|
| `rtl/ifetch_pkg.sv` | sizes, `xlat_t`, `fq_entry_t`, `fetch_evt_t` |
| `rtl/cfr.sv` | Current Frame Register and VPN comparator |
| `rtl/itlb.sv` | 128-entry fully associative iTLB, fixed worst-case latency |
| `rtl/addr_xlate.sv` | HMCFR translation: CFR compare, iTLB enable, tag select, CFR refill |
| `rtl/line_reshuffle.sv` | programmable decoder of one reshuffling group |
| `rtl/set_map.sv` | reshuffled row per way and the set latency for a set index |
| `rtl/icache.sv` | VI-PT L1 instruction cache with latency map and hint-driven wait |
| `rtl/fetch_buffer.sv` | one-block buffer between cache and core |
| `rtl/fetch_ctrl.sv` | PC sequencing, hint decode, access start, exception interlock |
| `rtl/fetch_queue.sv` | 8-entry, 4-wide fetch queue |
| `rtl/ifetch_top.sv` | the whole fetch stage |

## Default configuration

| Item | Value |
|---|---|
| L1 I-cache | 64 KB, 4 ways, 64-byte blocks, 256 sets, LRU, 1 cycle for a perfect set |
| Imperfect set | 2 cycles (one hint bit) |
| iTLB | 128 entries, fully associative, 2 cycles on every lookup |
| Page size | 8 KB |
| Reshuffling degree | 3 (groups of 8 consecutive sets, per way) |
| Fetch width / fetch queue | 4 instructions per cycle / 8 entries |
| Address widths | 64-bit virtual, 40-bit physical (own choice) |
| Instruction | 32 bits, hint in bit 0 (own choice) |
| Top parameters | `LAT_BITS` = 1 hint bit, `BASE_LAT` = 1 cycle, `MAX_EXTRA` = 1 (interlock wait beyond `BASE_LAT`) |

The sizes are package constants in `ifetch_pkg`. The cache, iTLB and fetch
modules also take them as parameters, so they can be tested at other sizes.
The top itself exposes only the three latency parameters.

## Line reshuffling

The way decoder is the part that is hardest to see from the code. Take a
group of N = 2^R lines of one way, each marked perfect (f = 0) or imperfect
(f = 1) by a March test. Physical line k is given a group address as
follows:

* perfect line k: the number of perfect lines below k;
* imperfect line k: N-1 minus the number of imperfect lines below k.

The perfect lines therefore take addresses 0, 1, 2, … in order, and the
imperfect lines take N-1, N-2, … in order. Example, R = 2, f = (1,0,1,0):
addresses 0 and 1 go to the perfect lines 1 and 3, address 2 goes to line 2,
and address 3 to line 0. The placement depends only on the fault bits. In
silicon these bits program the pass transistors of the last two decode
levels.

A set uses one line from each way, so its latency is the largest of those
lines' latencies (`set_map`). Because every way moves its perfect lines to the
low addresses of the group, the slow lines of different ways tend to end up
in the same sets. With 25% slow lines the test sees about 100 of the 256 sets
slow, against 176 without reshuffling.

The cache stores a per-line latency map (`fm_we` write port), which is loaded
once before use. Writing it invalidates the cache, because it moves lines
between rows. The port `tbl_idx`/`tbl_lat` reads the resulting set latency.
That is the table a compiler uses to write the hints.

## Translation timing (HMCFR)

`addr_xlate` compares the CFR's VPN with the fetch VPN in the cycle the
access starts.

* **Hit:** the iTLB is not enabled, and the CFR's PFN is registered as the
  physical tag. The tag is ready after one edge.
* **Miss:** the iTLB is enabled and answers after 2 edges. Its PFN is selected
  as the tag in that cycle and also written into the CFR.
* **iTLB miss:** `ptw_req` is raised and stays high until `ptw_resp`. The walk
  result fills both the iTLB and the CFR.

Every iTLB lookup is given the latency of its slowest entries. The CFR is what
hides that latency, so the iTLB needs no per-entry timing.

## Cache access and hint timing

`fetch_ctrl` starts an access in the cycle the PC leaves the buffered block.
The cache index and the VPN go out together, with a wait of
`BASE_LAT + hint`. The hint comes from one of three places:

* **Sequential flow:** the hint bit of the last instruction of the block just
  left.
* **Redirect:** `redirect_hint`, which the core copies from the redirecting
  branch. With less-conservative or code-relocation encoding that bit covers
  both the fall-through and the target, so a mispredicted branch's hint stays
  valid.
* **Exception entry and the first fetch after reset:** the worst case
  (interlock), because no annotated instruction precedes them.

The cache reads its arrays `req_lat` edges after the request. It compares
tags once the physical tag is valid, so an access ends after
max(wait, translation). A hit pulses `resp_valid` with the whole block, and
`fetch_buffer` presents it to the fetch controller in the same cycle. A miss
requests the block from the next level, writes it into the LRU way's
reshuffled row, and replays the compare. If a wait is shorter than the set
really needs, `resp_lat_violation` (and `evt.lat_violation`) flags it. That
can only happen if the code's hints disagree with the loaded latency map.

## Top-level interface (`ifetch_top`)

* **Core side:** `redirect_valid/pc/hint/exc` redirects fetch. `fq_head[4]`,
  `fq_count` and `fq_pop_cnt` form the decode side of the queue.
  `fetch_pb` gives the protection bits of the current translation.
* **Memory side:** `l2_req`/`l2_addr` is a one-cycle request with a physical
  block address; the answer comes on `l2_resp_valid`/`l2_resp_data`.
  `ptw_req`/`ptw_vpn` with `ptw_resp`/`ptw_pfn`/`ptw_pb` is the page-walk
  port.
* **Configuration:** `fm_*` writes the latency map; `tbl_idx`/`tbl_lat` reads
  the set-latency table. `ctx_flush` clears the CFR, the iTLB and the buffer.
* **Observation:** `pc` is the fetch PC. `evt` carries one-cycle event
  pulses (`fetch_evt_t`) for CFR hits, iTLB lookups and misses, cache
  accesses, slow accesses, interlocks, cache misses, bypasses, latency
  violations and redirects.

Reset is active-low and asynchronous. After reset, fetch starts at address 0
with the worst-case wait.

## Departures and own choices

* The reference cache is 64 KB with 4 ways of 64-byte blocks. That needs 14
  index and offset bits, while an 8 KB page gives only 13. The cache
  therefore indexes with virtual-address bit 13, and it stores the whole PFN
  as its tag so that the physical compare stays exact.
* The iTLB is enabled only on a CFR miss. Starting it on every fetch and
  cancelling it on a CFR hit would give the same timing.
* Own choices: the hint's bit position, the address and protection-bit
  widths, the iTLB replacement policy (same VPN, else first free, else round
  robin), the refill and page-walk handshakes, the same-cycle buffer bypass,
  passing the branch's hint with the redirect, and the reset interlock.
* The cache is not pipelined. The slower non-pipelined cache with three
  latencies is selected with the top's parameters `LAT_BITS = 2`,
  `BASE_LAT = 3` and `MAX_EXTRA = 2`. A perfect set then takes 3 cycles and
  a slow one 4 or 5, with two hint bits per annotated instruction. The
  three-stage pipelined cache variant is not built.
* Not included: the compiler passes that write the hints and relocate code,
  the March test itself, the page-table walker, the next-level cache and
  memory, and the out-of-order core and branch predictor. The testbenches
  model the parts they need.
* Also not built: the alternative software-managed CFR (a per-instruction
  "use TLB" bit), and the baseline schemes.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `tb_line_reshuffle` checks all 16 fault patterns of a 4-line group against
  the published mapping table. It also checks all 256 patterns of an 8-line
  group against an independent placement, for one-hot, bijective selection
  with perfect lines first.
* `tb_set_map` and `tb_icache` compare the rows, the set latencies and the
  latency table with a reference. They also check miss/refill data, exact
  hit latency, waiting for a late tag, the violation flag, LRU order and
  invalidation on map write.
* `tb_cfr`, `tb_itlb` and `tb_addr_xlate` check the CFR's one-cycle path and
  the iTLB's exact two-cycle latency. They also cover page walks, CFR reload,
  round-robin replacement, cancel and flush.
* `tb_fetch_buffer`, `tb_fetch_queue` and `tb_fetch_ctrl` check the bypass,
  the queue against a reference model, and the wait requested for every
  access. The last covers sequential hints, redirect hints and the
  interlock; the hints of other instructions must be ignored.
* `tb_ifetch_top` runs the whole stage at its default size, in three phases
  with 15%, 25% and 40% slow lines (about 21,000 instructions each). It plays
  the compiler (hints from its own reshuffle model), the core (random pops,
  branches across pages, exceptions), the next level (12 cycles) and the page
  table (30 cycles). It checks every delivered instruction. Every access that
  neither misses the cache nor the iTLB must take exactly max(1 + hint, 1 or
  2), and no access may wait too little. Each mechanism must occur in every
  phase. In a typical run about 80% of translations hit the CFR.

* `tb_ifetch_3lat` runs the same end-to-end test on the three-latency
  configuration, with 25% slow lines of 4 or 5 cycles. It checks exact 3-,
  4- and 5-cycle accesses, and that interlocked accesses wait 5 cycles.
  This test found a buffer bug: a redirect returned into the buffered block
  while the next block's access was completing, and the buffer served the
  incoming block's data. The buffer now serves its stored block in that
  cycle.

For each testbench, a copy of its module with a deliberate bug was used to
confirm that the testbench fails.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ifetch_pkg.sv tb/tb_ifetch_top.sv --top-module tb_ifetch_top
./obj_dir/Vtb_ifetch_top
```

Replace `tb_ifetch_top` with any other testbench name. The full-size run takes
a few seconds. Verilator is two-state, so every state element that is read is
reset.
