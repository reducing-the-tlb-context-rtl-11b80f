# Banked TLB with sequential prefetching

A conventional x86-style TLB loses all of its translations on every context
switch: the next task starts with an empty TLB and pays a page-table walk for
every page it touches again. This design keeps them. The 1024 entries of each
TLB are split into 32 banks of 32 entries, and each bank belongs to one task.
A context switch only clears a "current" mark; when a task runs again, its
bank is found by a tag and its translations are still there. A small
prefetch buffer, filled by a sequential prefetcher, catches the pages next to
each miss.

The architecture follows *Reducing the TLB Context Switching Miss Ratio With
Banked and Prefetching Mechanism* (C.-J. Chen and W.-M. Cheng). The RTL here
is an independent implementation. Where that description leaves a detail
open, this design makes its own choice. Those choices are listed in
[Design choices](#design-choices-beyond-the-architecture).

Default configuration:

| item | value |
|---|---|
| virtual address | 32 bits, VPN = VA[31:15] |
| page size | 32 KB (15-bit offset) |
| physical address | 32 bits, so the PPN is 17 bits (design choice) |
| banks per side | 32 |
| entries per bank | 32, fully associative, LRU |
| sides | ITLB and DTLB; they share the bank tags |
| prefetch buffer | 17 entries per side |
| prefetch pattern | VPN-8 .. VPN-1 and VPN+1 .. VPN+9 (17 pages) |
| task tag | 17 bits: the PPN of the task's first fetched page (x86 style), or an ASID |

## Structure

```
                 +------------------- bank_tag_unit (shared) --------------------+
 ctx_switch ---->| 32 x {task tag, valid, current, LRU rank}                     |
 clear_tlb  ---->| cur_onehot, flush_vec  ---------------+----------------------- |
                 +----------------------------------------|----------------------+
                        ^ act_valid/act_tag               |            |
                        |                                 v            v
 ITLB lookup --> tlb_side (ACTIVATE=1)                tlb_side (ACTIVATE=0) <-- DTLB lookup
                   32 x tlb_bank (32 entries each)      same structure
                   prefetch_buffer (17)
                   translation_mux
                   tlb_ctrl (prefetch & control)
                        |  mem_req / mem_rsp                  |  mem_req / mem_rsp
                        v                                     v
                 memory system (page-table walk, outside this design)
```

| file | role |
|---|---|
| `rtl/tlb_pkg.sv` | default sizes and the answer-source enum `tlb_src_e` |
| `rtl/lru_rank.sv` | true-LRU bookkeeping by recency ranks (used for entries and for banks) |
| `rtl/tlb_bank.sv` | one bank: 32-entry CAM, LRU replacement, flash flush |
| `rtl/prefetch_buffer.sv` | 17-slot fully associative buffer of prefetched translations |
| `rtl/translation_mux.sv` | select = current AND hit, else prefetch-buffer hit; forms the PA |
| `rtl/bank_tag_unit.sv` | the 32 bank tags: activation, victim choice, context switch, clear |
| `rtl/tlb_ctrl.sv` | per-side controller: hits, miss walks, bank insertion, prefetch rounds |
| `rtl/tlb_side.sv` | one ITLB or DTLB: banks + prefetch buffer + mux + controller |
| `rtl/banked_tlb.sv` | top: both sides and the shared bank tags |

## How a lookup is answered

The VPN goes to all 32 banks and to the prefetch buffer at the same time.
Every bank compares it with its 32 entries. Bank *b* may answer only if it
hits **and** its current bit is set. At most one bank is current, so the
selection is a plain AND-OR multiplexer. If no current bank hits but the
prefetch buffer does, the buffer answers. The PA is the selected PPN joined
with VA[14:0]. Both kinds of hit are combinational and answer in the lookup
cycle.

The controller (`tlb_ctrl`) then acts on the outcome:

* **Current-bank hit.** The entry becomes most recently used. Nothing else
  happens.
* **Prefetch-buffer hit.** The translation is copied into the current bank,
  replacing the LRU entry (or an empty one). A new prefetch round starts
  around this page.
* **Miss in both.** The page is requested from the memory system.
  * If the walk faults, the fault is returned and nothing is stored or
    prefetched.
  * If a bank is current, the translation goes into it, is returned, and a
    prefetch round starts.
  * If no bank is current, a bank is activated first (next section).

## Bank tags and context switches

This is the part that differs most from a normal TLB. Each bank has a tag
register in `bank_tag_unit` with these fields:

* **task tag.** Which task owns the bank.
* **valid.** The bank holds a task's translations.
* **current.** The bank belongs to the running task. At most one bank is
  current; an assertion checks this.
* **LRU rank.** Recency among the banks, used to choose a victim.

The ITLB and the DTLB share these tags. Bank *b* of the ITLB and bank *b* of
the DTLB therefore belong to the same task and are flushed together.

**Context switch** (`ctx_switch` pulse). The unit clears every current bit,
and both prefetch buffers are emptied. No translations are lost. Until a
bank is current again, no bank can answer.

**Activation.** The first instruction fetch after a switch finds no current
bank, so it always misses and is walked. Its walked PPN becomes the task tag.
With `USE_ASID = 1` the `asid` input is the tag instead. Then:

* If a valid bank already carries this tag, it becomes current again with
  all its entries. `bank_reused` pulses.
* Otherwise the unit picks the lowest-numbered invalid bank, or else the
  least recently activated bank. It flushes that bank in both sides, writes
  the tag, and sets valid and current.

Either way the bank becomes most recently used. Then the walked translation
is stored in it. If the reused bank already held that page, the entry is only
touched, so no duplicate is created.

With the PPN as task tag, a task finds its bank again only if its first fetch
after each switch falls in the same page as the fetch that opened the bank.
This holds, for example, when tasks resume through a fixed entry stub. If it
does not hold, the task opens a new bank and the old one ages out through
LRU. With ASIDs this restriction does not exist.

Only the ITLB opens banks, because the first access of a task is an
instruction fetch. If a DTLB miss arrives while no bank is current, it is
walked and answered (source `SRC_BYPASS`) but not stored. A prefetch round
still starts around it.

**Clear TLB** (`clear_tlb` pulse). The operating system sends this when it
swaps a page out or releases a page frame, since translations may then be
stale.

* With `CLEAR_ALL = 1` (the default, for processors without ASIDs), every
  bank of both sides is flushed and every valid and current bit is cleared.
* With `CLEAR_ALL = 0`, only the current bank is flushed and invalidated.

Both prefetch buffers are emptied in either case.

## Sequential prefetching

A prefetch round starts after every walk that succeeds and after every
prefetch-buffer hit. It is centred on that page and fetches 17 pages, one at
a time, over the same memory port as demand walks:
VPN-8, VPN-7, .., VPN-1, VPN+1, .., VPN+9. Page *k* of the round goes into
prefetch-buffer slot *k*.

* A page outside the 17-bit VPN range is not requested, and its slot is
  emptied.
* A page that faults also leaves its slot empty.

During a round, lookups that hit the current bank are still answered. Any
other lookup is held off with `lk_ready = 0` until the round ends. A context
switch or clear TLB cuts the round short. If a request has already been
presented, it is completed and its answer dropped.

## Interfaces and timing

All ports of `banked_tlb` are plain signals. The ITLB uses the `i_` prefix
and the DTLB the `d_` prefix:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset (clears every valid/current bit) |
| `ctx_switch`, `clear_tlb` | in | 1 | one-cycle OS events |
| `asid` | in | 17 | task tag when `USE_ASID = 1` |
| `x_lk_valid`, `x_lk_ready`, `x_lk_va` | in/out/in | 1/1/32 | lookup handshake; a lookup is taken when valid and ready are both high |
| `x_rsp_valid`, `x_rsp_pa`, `x_rsp_fault`, `x_rsp_src` | out | 1/32/1/2 | answer: PA, fault, source (`SRC_BANK`, `SRC_PB`, `SRC_WALK`, `SRC_BYPASS`) |
| `x_mem_req_valid`, `x_mem_req_ready`, `x_mem_req_vpn`, `x_mem_req_prefetch` | out/in/out/out | 1/1/17/1 | page request to the memory system; held until ready |
| `x_mem_rsp_valid`, `x_mem_rsp_ppn`, `x_mem_rsp_fault` | in | 1/17/1 | page-table answer; one request outstanding per side |
| `cur_valid`, `cur_idx` | out | 1/5 | the current bank |
| `bank_activate`, `bank_reused` | out | 1 | a bank was made current this cycle / it already belonged to the task |
| `i_prefetching`, `d_prefetching` | out | 1 | a prefetch round is running |

Latencies are counted from the lookup cycle to the answer cycle. L is the
memory system's answer time in cycles after it accepts a request.

| case | latency |
|---|---|
| current-bank hit or prefetch-buffer hit | 0 (same cycle, combinational) |
| miss, a bank is current | L + 2 (one cycle to present the request, L, answer in the response cycle) |
| miss that activates a bank | L + 3 (one more cycle for the bank-tag update) |
| miss while a prefetch round runs | waits for the round: up to 17 × (L + 1) cycles more |

Apply `ctx_switch` and `clear_tlb` only while neither side is waiting for a
page walk. A prefetch round may be running.

## Design choices beyond the architecture

These follow the architecture in spirit, but the details are this design's:

* **Widths.** The physical address is 32 bits, so the PPN and the task tag
  are 17 bits.
* **Handshakes.** Lookups use valid/ready. The memory port also uses
  valid/ready for requests, with one outstanding request per side and a
  separate response strobe.
* **LRU.** Both the entries of a bank and the banks themselves use true LRU
  by recency ranks. Invalid entries or banks are filled first.
* **Clear TLB.** It clears the current bit as well as the valid bits and
  flushes the banks. This combines the two descriptions of the event: flush
  all banks, and invalidate the bank tags.
* **DTLB with no current bank.** The DTLB never opens a bank. Its misses
  while no bank is current are returned but not stored.
* **Prefetch requests.** Prefetches are serial, on the demand port.
  Out-of-range and faulting pages leave their slot empty. No round starts
  after a faulting walk.
* **Hits during a round.** Only current-bank hits are served while a round
  runs.
* **Task tag.** By default the tag is the PPN produced by the walk that opens
  the bank. An ASID input is available as an option.
* **Prefetch-buffer size.** The prefetch buffer has 17 entries, one per
  prefetched page.

Not included:

* The distance prefetcher (a 64-row table with 2 predicted distances per row
  and a 16-entry buffer) is an alternative that the architecture evaluates
  and rejects in favour of sequential prefetching.
* The page-table walk itself belongs to the processor and the operating
  system. Its port is brought out instead.
* Entry attributes such as protection and dirty bits are not modelled; an
  entry holds only a VPN, a PPN and a valid bit.
* The comparison TLBs (a single 1024-entry fully associative TLB, flushed on
  every switch or tagged with an ASID per entry) are reference points only
  and are not part of this design.

## Size

After coarse synthesis with yosys, the default top has about 48 k word-level
cells, 12.7 k flip-flop bits and 72 k memory bits. Of these, 2 × 1024 entries
× 34 bits are the bank arrays.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tlb_bank_tb` | CAM hits and PPNs against a time-stamp LRU model over random lookups, inserts and flushes |
| `prefetch_buffer_tb` | slot writes, empty slots, flush, lowest-slot priority |
| `translation_mux_tb` | the current-AND-hit select and the PA against the rule, 5000 random cases |
| `bank_tag_unit_tb` | activation (reuse, invalid-first, LRU eviction), flush vector, context switch, clear, against a model, with 40 tasks on 32 banks |
| `tlb_ctrl_tb` | walk and activation latency, activation tag, the exact order and slots of the 17 prefetches, fault handling, prefetch-buffer hit, stall and service during a round, range edge, abort |
| `tlb_side_tb` | one side at 4 × 8: answers against the page table, bank reuse across switches, two tasks, LRU eviction |
| `banked_tlb_tb` | whole design at its default size: 40 tasks, 160 time slices, context switches and clears; every answer checked; every mechanism counted and required |
| `banked_tlb_asid_tb` | whole design with `USE_ASID = 1`, `CLEAR_ALL = 0` at 4 × 8: bank found by ASID from any resume page, clear limited to the running task's bank, bank reclaim with 6 tasks |

The testbenches use a behavioural memory system (`tb/mem_system_model.sv`).
Its page tables are computed, not stored: `ppn = (vpn*7 + task*131 + 3) mod
2^17`. A page faults when its low nibble XOR (task×5) is 0xF and the VPN is
at least 0x40.

To simulate with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/tlb_pkg.sv tb/tb_mem_pkg.sv tb/mem_system_model.sv rtl/lru_rank.sv \
  rtl/tlb_bank.sv rtl/prefetch_buffer.sv rtl/translation_mux.sv \
  rtl/bank_tag_unit.sv rtl/tlb_ctrl.sv rtl/tlb_side.sv rtl/banked_tlb.sv \
  tb/banked_tlb_tb.sv --top-module banked_tlb_tb -o sim
./obj_dir/sim
```

It builds in about 20 s and runs in about 20 s at the full default size. It
prints how often each answer source and each mechanism occurred, and the
miss ratio of each side on its synthetic workload.

The tests show that the RTL matches the behaviour described above. They do
not reproduce the published miss rates: those come from SPEC95 traces run
under a simulator with context switches every million instructions, and no
such traces are used here. The synthetic workload in `banked_tlb_tb` is only
meant to exercise every path.
