# A programmable taint-propagation engine

Dynamic taint tracking attaches a small tag, the *taint*, to every value a
program handles. For example, the taint can record "derived from network
input" or "is a heap pointer". The rules decide how a taint moves from an
instruction's sources to its result. Security checks and debugging tools
are built on these rules. In software such tracking costs several times the
run time. Hard-wiring one set of rules into a processor makes it
permanent and cannot be changed later.

This engine is a hardware accelerator for any set of rules. It sits behind the
commit stage of an out-of-order core and is built on three ideas:

* **The policy is software.** The hardware keeps no fixed rule. The first
  time it sees a combination {opcode, source taints} it asks a software
  handler for the result taint and for an exception bit. It then caches the
  answer in a 128-entry *Taint Propagation Cache* (TPC).
* **The common case needs no lookup.** Under most policies, untainted inputs
  give an untainted result, and a single tainted input is simply copied. A
  2-bit-per-opcode *Filter TPT* tells the hardware for which opcodes the
  current policy allows these two shortcuts. The single-ported TPC is then
  rarely used, and a trivial result can be forwarded to a dependent
  instruction in the same cycle.
* **Memory taints are ordinary data.** The taint of every 32-bit memory word
  lives in a packed array in normal memory, which starts at a base register.
  A small *taint L1* (TL1) caches it. The core prefetches a taint as soon as
  it knows a load's or store's address. The rest of the memory system
  (L2, DRAM, coherence) needs no change.

The taint size can be set at run time from 0 to 16 bits, and 0 turns the
engine off. Registers, buses and memory are not widened at all.

## Where the engine sits

```
 core commit ──bundle (≤4 instr)──▶ S1 ─▶ S2 ─▶ S3 ─▶ S4 ──▶ cm_* (commit)
 core AGU   ──pf_addr──▶ taint_index ─▶ TL1 prefetch probe
                          TRF, Filter TPT, TL1 reads │  TPC  │ TL1 write + DL1 handshake
```

The core hands over bundles of up to four (`NLANES`) instructions. They are
already decoded, in program order and no longer speculative. Each
instruction is an `ft_instr_t` (see `ft_pkg`) with these fields:

* an 8-bit opcode (or opcode class);
* up to two source registers and one destination register;
* flags for "reads a memory taint" (load), "writes a memory taint" (store,
  `taintm`) and "also writes the data cache" (store);
* the data address.

Lane 0 is the oldest instruction of a bundle.

The top, `flexitaint`, has these interfaces. All of them are synchronous to
`clk`, with an asynchronous active-low `rst_n`.

| group | signals | use |
|---|---|---|
| configuration | `cfg_valid/ready/we/sel/opc/wdata/kernel`, `cfg_rdata`, `cfg_err` | TPCHR, FTCR, MTBR and the Filter TPT; writes are accepted only when the engine is empty |
| instructions | `in_valid`, `in_ready`, `in_bundle` | valid/ready; the bundle must stay stable while it waits |
| prefetch | `pf_valid`, `pf_addr` | the data address of a load or store, as soon as it is known |
| TPC miss | `tpc_miss`, `tpc_miss_key`, `tpc_handler`; `tpc_fill_*` | the core runs the handler at `tpc_handler` and writes the entry back |
| load replay | `ld_taint_read`, `ld_taint_tag` | the load's taint has been read; the core may stop treating it as replay-vulnerable |
| stores | `st_valid`, `st_addr`, `st_dl1_hit`, `st_dl1_we` | atomic commit with the data L1 |
| commit | `cm_valid`, `cm_tag`, `cm_taint`, `cm_exc` | up to four instructions per cycle, each with its result taint and exception bit |
| coherence | `inv_valid`, `inv_addr`, `inv_ready` | invalidate one taint line (by taint address), as for a data line |
| next level | `mem_req_*`, `mem_resp_*`, `tl1_busy` | TL1 line fills and write-backs to the L2 |
| counters | `events` | per-cycle counts of filter hits, TPC hits and misses, forwards, stalls, silent and non-silent stores, retries |

## Memory taints: the packed array and the taint L1

Word address `A[31:2]` has a taint slot of `s` bits, where `s` is the taint
size rounded up to a power of two (1, 2, 4, 8 or 16). The slot's address is:

```
bit_offset  = A[31:2] << log2(s)
taint_byte  = MTBR + bit_offset / 8
taint_bit   = bit_offset % 8
```

`taint_index` computes this. Two instances serve the pre-commit reads and
the commit write. A third serves the prefetch path. With 2-bit taints, one
64-byte TL1 line covers 256 words, which is 1 KB of data, or 16 data-cache
lines. This density is why a 4 KB TL1 is enough. It also means that taint
lines are shared more widely between cores than the data lines they
describe.

`taint_l1` is 4 KB, 4-way, with 64-byte lines, write-back and
write-allocate. It has five kinds of access:

* **Two read ports** (`NRD`), used by the pre-commit stage. They answer in
  the same cycle with hit/miss and the 16 bits starting at the slot.
* **One write port**, used at commit. `wr_valid` asks for a tag check only,
  and `wr_hit` comes back in the same cycle. `wr_en` performs the masked
  write. The check and the write are separate, so the commit logic can hold
  back the taint write when the data cache misses.
* **A prefetch probe.** On a miss it starts a fill if the fill engine is
  idle; otherwise the prefetch is dropped.
* **Demand misses** on any port also start a fill. The requester retries
  until it hits.
* **Coherence invalidations** (`inv_*`). These take a taint line away when
  another core is about to write it. An invalidation is accepted while no
  fill is in flight, ahead of any miss. The line stops hitting at once, and
  if it is dirty it is written back first.

One fill is in flight at a time. A dirty victim is written back first, and
the victim is invalidated at that point. Replacement is round-robin per set.
A slot never crosses a byte boundary in a way the masks cannot handle,
because slots are powers of two and 16-bit slots are byte-aligned.

## Propagation: Filter TPT, TPC and the miss handler

This is the core of the design. Each lane in the propagation stage (S3)
has three source taints. Any source the instruction does not use counts as
zero. The three sources are:

* `t1`, the taint of the first source register;
* `t2`, the taint of the second source register;
* `tm`, the memory taint, which loads only use.

The lane's Filter TPT entry and the number of non-zero sources choose the
rule:

| entry | 0 non-zero | 1 non-zero | 2 or 3 non-zero |
|---|---|---|---|
| `00` | TPC | TPC | TPC |
| `01` | result 0 | TPC | TPC |
| `10` | result 0 | copy it | TPC |
| `11` | (not defined; treated as `00`) | | |

**TPC.** The cache is direct-mapped with 128 entries and is looked up once
per cycle.

* The key is `{opcode, t1, t2, tm}`, 56 bits wide, with each taint
  zero-extended to 16 bits.
* The index is the XOR of the key's 7-bit pieces.
* The full key is stored as the tag, so two keys that fold to the same index
  never alias.
* An entry holds a 16-bit result taint and an exception bit.

**Miss.** On a miss the stage holds and raises `tpc_miss` with the key and
the handler address (`tpc_handler`, from TPCHR). The core runs the handler.
The handler writes `{key, taint, exception}` through `tpc_fill_*`, and the
lookup then hits on retry. A handler is the whole policy. For example, a
2-bit "input OR, pointer XOR on `sub`" rule is simply a function of its
arguments.

**Same-cycle dependences.** Lanes are resolved oldest first, within one
cycle where possible.

* **Trivial results.** A zero or copied result is forwarded straight to
  younger lanes in the same cycle, whether they read it as a register source
  or as a memory source.
* **TPC results.** These are not forwarded. The first lane that needs the
  TPC can still use it this cycle. Every younger lane that reads its result,
  and every lane after that one, waits a cycle. A second lane that needs the
  TPC also waits, because the TPC has only one port.
* **Independent lanes** after a TPC lane are not held.
* **Two passes.** The logic works in two passes to avoid a false
  combinational loop. The first pass works out the sources, the trivial
  results and the first lane that needs the TPC. The second pass reads the
  TPC answer and decides which lanes finish.

**Exceptions.** A lane whose TPC entry has the exception bit set still
commits, and `cm_exc` flags it. Raising the trap is the core's job.

## The four stages, cycle by cycle

| stage | work |
|---|---|
| S1 pre-commit | TRF reads for both sources of every lane, Filter TPT reads, TL1 reads for the memory operations (at most two per bundle). A TL1 miss holds the bundle here until the fill completes |
| S2 | second lookup stage; in this RTL all lookups answer in one cycle, so S2 holds their results and keeps them up to date |
| S3 propagation | the rules above; TPC lookup; TRF write of register results |
| S4 commit | store taint write and data-cache handshake; `cm_*` outputs |

An isolated instruction accepted at clock edge 0 commits in the cycle after
edge 3, so `cm_valid` is high from edge 3 to edge 4. Stalls, from the
youngest stage back, are as follows:

* S4 holds for a store retry.
* S3 holds on a TPC miss or a partial bundle.
* S1 holds on a TL1 miss.

**Hazards.** The pipeline keeps no scoreboard. Instead, every write also
updates the copies that are still in flight.

* A TRF write in S3 updates the source taints held in S2 and S3. S1's reads
  see same-cycle writes.
* A store's taint commit in S4 updates the memory taints held in S1 to S3.
* A load in S3 takes its memory taint from the youngest older store to the
  same word. It looks first in its own bundle, then at the store in S4.

## Stores: silent writes and atomic commit

A store reads its word's old taint in S1, like a load. The old taint is used
only for comparison, because no example rule makes it a source.

At commit the new taint is compared with the old one. If they are equal the
taint write is *silent* and is skipped, and the store only writes the data
cache.

Otherwise the taint write and the data write must be atomic. Another core
must never see new data with an old taint, or the other way round. The
engine therefore:

1. checks the TL1 tag (`wr_valid` → `wr_hit`);
2. raises `st_valid` with the address and samples `st_dl1_hit` from the core
   in the same cycle;
3. writes both only if both hit (`tl1_wr_en`, `st_dl1_we`);
4. otherwise writes neither, holds the store, and retries next cycle. A TL1
   miss starts the fill in the meantime.

A `taintm` instruction writes a memory taint without touching data, so only
the TL1 hit matters for it. One store commits per cycle.

The old taint a store read in S1 can go stale if another core rewrites the
taint line before the store commits. So whenever a TL1 line is
invalidated, every store then in flight loses its right to skip the write:
it writes its taint even if the taint looks unchanged. This costs at most a
few extra writes and keeps the silent-write shortcut safe with several
cores.

For loads the engine does the reverse. It reports through `ld_taint_read`
the cycle in which the taint was read, because the data and its taint must
be read atomically. Until that cycle the core must keep the load exposed to
replay on a coherence invalidation of its line.

## Configuration, context and the off switch

| register | content |
|---|---|
| TPCHR | handler address. Only kernel mode may write it (`cfg_kernel`); a user-mode write is refused with `cfg_err`. Every write flash-clears the TPC, so switching policy is one write |
| FTCR | taint size 0..16; larger values are clamped to 16. 0 turns the engine off |
| MTBR | base address of the packed taint array |
| Filter TPT | 256 × 2 bits, addressed by `cfg_opc` |

Together these registers are the per-process context. A context switch
saves and restores them through the same port; reads are combinational.
Writes wait for `cfg_ready`, which is high only when the pipeline is empty.
A mode change therefore never splits a bundle.

With FTCR = 0:

* bundles go straight to S4 and commit a cycle later with zero taints;
* the TRF, TL1 and TPC are not touched;
* prefetches are dropped.

Reset clears every register and taint, and sets every filter entry to
`00`, which leaves the engine off.

A typical start-up sequence:

1. allocate and clear the taint array;
2. write TPCHR;
3. write the Filter TPT entries;
4. write MTBR;
5. write FTCR last.

## Modules

| file | module | role | default parameters |
|---|---|---|---|
| `rtl/ft_pkg.sv` | package | types, constants, `tpc_fold`, `taint_mask`, `slot_log2` | 4 lanes, 256 opcodes, 16-bit max taint, 32 registers |
| `rtl/flexitaint.sv` | top | config + pipeline + TL1 + prefetch index | `W=4`, `TL1_BYTES=4096`, `TL1_WAYS=4`, `TL1_LINE=64`, `TL1_PORTS=2` |
| `rtl/ft_pipeline.sv` | S1–S4 | propagation pipeline | `W=4`, `NRD=2` |
| `rtl/taint_regfile.sv` | TRF | architectural register taints, R0 reads 0, write-through | 32 × 16 bits, 8 read / 4 write ports |
| `rtl/filter_tpt.sv` | Filter TPT | 2-bit entry per opcode | 256 entries, 4 read ports (+1 in the pipeline for read-back) |
| `rtl/tpc.sv` | TPC | direct-mapped propagation cache, flash clear | 128 entries |
| `rtl/taint_index.sv` | | data address → taint byte and bit | |
| `rtl/taint_l1.sv` | TL1 | taint cache | 4 KB, 4-way, 64 B, 2 read ports |
| `rtl/ft_config.sv` | | TPCHR, FTCR, MTBR, filter access | |

Synthesis of the top gives about 3,200 flip-flop bits, plus 43,520 memory
bits for the TL1 data and tags and the TPC.

## Simulating

The testbenches use plain Verilator 5 with `--timing`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ft_pkg.sv tb/ft_tb_policy_pkg.sv tb/tb_flexitaint.sv \
    --top-module tb_flexitaint -o sim
obj_dir/sim
```

Every testbench ends with the line
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog. The
testbenches are:

* `tb_flexitaint` runs the whole engine end to end at its default sizes.
  - **Policy.** It uses a 2-bit policy: the left bit tracks input tainting,
    the right bit tracks heap pointers.
  - **Core model.** The core side is modelled: a software miss handler with
    a random delay, a data L1 that sometimes misses stores, prefetches
    issued three bundles ahead, and an L2 with a random latency.
  - **Phases.** The program runs three phases: policy on, engine off, and
    TPCHR rewritten (flash clear).
  - **Checks.** Every commit is compared with an in-order reference model.
    The test also counts each mechanism, 18 in all: filter zero, filter
    copy, TPC hit, TPC miss, register forward, memory forward, dependence
    stall, TL1 stall, silent store, non-silent store, store retry, taint
    exception, TL1 fill, write-back, engine-off commit, miss after flash
    clear, load-taint report and TL1 invalidation. A model of other cores
    invalidates hot taint lines now and then. It fails if any of these
    mechanisms never happened.
  - **Latency.** It checks the four-stage latency.
* `tb_ft_workloads` runs each policy on each TL1 geometry.
  - **Policies.** 1-bit input tainting, 1-bit heap-pointer tracking and the
    2-bit combination.
  - **Geometries.** 4 KB/64 B, 2 KB/64 B, 8 KB/64 B and 4 KB/32 B.
  - **Output.** It prints cycles, the share of TPC lookups, TPC misses, the
    non-silent store share and the TL1 fills. The instruction streams are
    random, so these numbers show behaviour only, not the performance of
    real programs.
* `tb_ft_pipeline` runs directed, cycle-exact cases: the four-stage latency,
  a same-cycle forwarding chain, TPC dependence and port stalls, a miss and
  its fill, the exception bit, silent and non-silent stores, a store held by
  a data-cache miss, store-to-load forwarding in one bundle, a TL1 miss,
  one bundle per cycle when nothing stalls, and a store that must write its
  taint after an invalidation. It ends with 600 random back-to-back bundles
  of adds, loads and stores, checked commit by commit against an in-order
  model.
* `tb_taint_l1` checks the TL1 against a byte-array model: hits, misses,
  write-backs, prefetch fills, masks, invalidations and a slow L2.
* `tb_taint_regfile`, `tb_filter_tpt`, `tb_tpc`, `tb_taint_index` and
  `tb_ft_config` are unit tests with random stimulus against reference
  models.

The policies are in `tb/ft_tb_policy_pkg.sv`. To try a new policy, change
`policy()` and `filt_of()` there. The hardware does not change.

## Departures from the published design, and limits

Where the published design gives a size or a behaviour, the RTL follows
it. These are this design's own choices, or points it leaves out:

* **Lookup stages.** Lookups take one cycle, so the second lookup stage only
  carries their results. The stage count and the latency still match the
  published four stages.
* **Memory operations per bundle.** At most two memory operations per bundle
  (one per TL1 read port), and an assertion checks this. The core must split
  bundles that have more.
* **Stores.** One store commits per cycle.
* **Taint sizes.** Sizes that are not a power of two use the next
  power-of-two slot in memory, so 3-bit taints take 4 bits.
* **TPC index.** The fold of the key to 7 bits is an XOR of 7-bit pieces,
  and the tag holds the full key.
* **Filter code 11** is undefined and treated as `00`.
* **Exceptions.** An instruction with the exception bit set still commits,
  with `cm_exc` set.
* **Configuration.** Writes wait for an empty pipeline. Only TPCHR is
  limited to kernel mode.
* **TL1 policy.** One fill at a time, round-robin replacement, write-back.
  Prefetches that arrive during a fill are dropped.
* **Coherence.** The TL1 has an invalidation port but keeps no
  shared/exclusive states: the protocol that drives it belongs to the L2
  side. Stores in flight during an invalidation write their taint without
  the silent check.
* **Not included.** There is no load-replay logic. The engine reports when
  a load's taint has been read, and the core's existing replay machinery
  must do the rest. The multi-core system, the data caches, the L2 and the
  miss handler software are outside this RTL.
* **Engine off.** With the engine off, bundles still pass through the commit
  stage, so they commit one cycle after acceptance.
