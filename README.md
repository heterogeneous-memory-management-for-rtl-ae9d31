# Heterogeneous memory manager: 3D-stacked DRAM plus external DRAM, with QoS

A system with a small, fast 3D-stacked DRAM next to the processor and a
large, slower external DRAM (ex-DRAM) has to decide which data lives where.
This design does it in hardware, under the operating system's page tables
and invisible to applications:

* every 4 KB block of physical memory sits in one of the two memories;
* a hardware monitor measures how busy each memory is;
* while the 3D-DRAM has headroom, recently used blocks are pulled into it;
* when it gets busy, it is reserved for the most important applications, and
  blocks of less important ones are swapped out or pushed to the ex-DRAM;
* every request carries one of three QoS classes, and each memory controller
  serves its three class queues with a priority rule.

The relocation policy and the QoS rules follow the published scheme
"Heterogeneous Memory Management for 3D-DRAM and external DRAM with QoS".
That scheme describes the policy and the blocks but not their circuits. The
circuits, widths, handshakes and the block copy engine are this
implementation's own, and the section *Departures and choices* lists them.

## Block diagram

```
 cores ──core_req──► comb_mem_ctrl ──ctl_req──┬─► dram_ctrl (3D-DRAM 1) ──dram_cmd[0]──► 3D-DRAM
   ▲                 │  tlb                   ├─► dram_ctrl (3D-DRAM 2) ──dram_cmd[1]──► 3D-DRAM
   └──core_rsp───────┤  lock, obs_*          └─► dram_ctrl (ex-DRAM)   ──dram_cmd[2]──► ex-DRAM
                     │                               │ busy (x3)
 OS ◄─tlb_miss/refill┤                               ▼
                     │                         monitor_unit ──region_3d/region_ex, eval──┐
                     ▲ rl_req / rl_rsp / upd_* / lock_*                                  ▼
                     └───────────────────────────────────────────────────────── reloc_unit
 OS ◄── need_*, alloc_*, done_* ───────────────────────────────────────────────  mru_regs
 OS ──► os_free_* ─────────────────────────────────────────────────────────────  free_space_regs
                                                                                 access_cam
                                                                                 block_keeper
                                                                                 reloc_fsm
```

Each `dram_ctrl` holds three `req_queue`s (one per class) and a
`qos_arbiter`. The cores, the DRAM devices, the OS and the caches are
outside the design and connect through ports of `hmm_top`.

## QoS classes

| class | `app_t` | priority | typical use |
|---|---|---|---|
| latency sensitive | `APP_LAT` (0) | highest | general-purpose code |
| bandwidth sensitive | `APP_BW` (1) | middle | multimedia streams |
| insensitive | `APP_INS` (2) | lowest | not memory bound |

Software assigns the class; it travels with every core request. The numeric
value is also the priority rank, so "lower priority" means a larger value.
A block is taken to belong to the class of the requests that use it.

## Request path

`comb_mem_ctrl` takes one core request per cycle: read or write, 32-bit
virtual address, 64-bit data, class and an 8-bit tag. It translates the
address with a 64-entry fully associative TLB (`tlb`). The block number
decides the memory: blocks below `N3D_BLOCKS` are 3D-DRAM, all others are
ex-DRAM. The two 3D controllers share the 3D address space, interleaved on
physical address bit `INTLV_BIT` (default 6, so 64 bytes go to one
controller and the next 64 to the other). The request is pushed into the
queue of its class at the chosen controller, in the same cycle, if that
queue has room.

On a TLB miss the request waits, `tlb_miss`/`tlb_miss_vpn` are raised, and
the OS answers with `refill_valid/vpn/pbn`. There is no hardware page
walker.

A controller serves one request at a time. A read is busy `READ_LAT`
cycles (8 for the 3D-DRAM, 12 for the ex-DRAM) and its data arrives
`READ_LAT + 1` cycles after the command. A write is busy `WR_REC` cycles
(8 / 12). The next request is issued in the cycle the previous one ends,
so steady traffic keeps a controller busy 100% of the time. The devices
themselves are plain storage behind `dram_cmd`/`dram_rdata`; the latency is
modelled by the controller. Banks, row buffers and refresh are not
modelled.

Responses from the three controllers are merged, one per cycle, in fixed
order (3D 1, 3D 2, ex). A core response leaves through `core_rsp` with its
tag. The cores must match tags, because two controllers can answer out of
order.

## The QoS arbiter

Inside one controller, a queue that is alone is simply served in order.
When two or three queues hold requests:

1. The latency-sensitive queue wins the first `M` grants.
2. Then the bandwidth-sensitive and the insensitive queue get a turn,
   round-robin between the two.
3. A bandwidth-sensitive turn lasts up to `N` consecutive grants, as long as
   that queue has requests.
4. After a bandwidth-sensitive or insensitive grant, the latency-sensitive
   count starts again at zero.

So under heavy mixed traffic the pattern is M latency-sensitive grants, then
one turn of the others. `M = N = 4` by default; the scheme names M and N but
gives no values.

## Measuring load: the three regions

`monitor_unit` counts, for each controller, the cycles it is busy during a
period of `MON_PERIOD` cycles (default 10 000). At the end of each period
it compares the counts with two thresholds and puts each memory into one
region:

| region | utilization | meaning |
|---|---|---|
| LMU (low memory utilization) | below TH1 (80%) | queuing delay negligible; more traffic is cheap |
| HMU (high memory utilization) | TH1 up to below TH2 (95%) | latency rises steeply with load |
| C (congested) | TH2 and above | avoid |

The 3D-DRAM's utilization is the two 3D controllers' busy cycles added and
divided by twice the period. The comparison is made without division:
`busy × 1000 < avail × TH`. The thresholds are per mille. They are loaded
from the parameters at reset and can be rewritten at run time through
`cfg_we`/`cfg_th1`/`cfg_th2`. This is needed, for example, to run with
55%/80%, or to sweep TH1 from 730 to 860 with TH2 computed by software. The
unit pulses `eval` for one cycle when new regions are valid.

## What the relocation unit knows

`reloc_unit` groups four small stores around the decision logic
`reloc_fsm`.

* **MRU registers** (`mru_regs`). Six registers, one per memory × class.
  Each holds the block most recently accessed by a core request of that
  class in that memory. An entry stays valid for `MRU_LIFETIME` cycles
  after its last update. Every new access of the same class and memory
  overwrites it and restarts the lifetime. Entries holding a block that has
  just been relocated are cleared.
* **Free space registers** (`free_space_regs`). One known-free block for
  each memory. The OS writes them (`os_free_*`) and is asked for a new one
  through `need_3d`/`need_ex` when a register is empty. A relocation that
  vacates a block hands it back to the register of its memory. Making room
  in the ex-DRAM by paging to disk is the OS's job.
* **Access CAM** (`access_cam`). Finds 3D-DRAM blocks nobody has used
  lately:
  * One bit per 3D block (131 072 bits) is set on every core access to
    that block.
  * Every `CAM_PERIOD` cycles (1 M) the bit array is scanned, one block per
    cycle, and cleared as it goes. The first `CAM_L` (64) blocks found with
    a 0 bit are copied into a small CAM.
  * A later access to such a block sets its mark bit in the small CAM.
  * Unmarked entries are the un-accessed blocks offered to the decision
    logic (`unacc_*`).
  * The big array is a one-bit memory with a single port. A core access has
    priority over the scan in that cycle. The search is only needed in the
    small CAM, which is built from flip-flops.
* **Block keeper** (`block_keeper`). Remembers one 3D-DRAM block of the
  bandwidth-sensitive class and one of the insensitive class: the latest
  one accessed. These are the victims when a more important block must
  enter a full 3D-DRAM.

## Relocation decisions

At each `eval` pulse, if no relocation is running, `reloc_fsm` decides on
at most one relocation. An `eval` that arrives during a relocation is
remembered and handled when the unit is idle. The decision depends on the
region of the 3D-DRAM:

**3D-DRAM in LMU: promote.** Take the ex-DRAM MRU block of the highest
priority class that has a valid entry. Its destination is chosen in this
order:

1. If the 3D free-space register holds a block, move the ex block there.
   The vacated ex block becomes the ex free block.
2. Otherwise, if the access CAM offers an un-accessed 3D block and an ex
   free block exists, first *dump* the un-accessed block into that ex free
   block. Then promote into the slot it left.
3. Otherwise, if the block keeper holds a 3D block of a lower class than
   the ex block, *swap* the two. The insensitive kept block is used before
   the bandwidth-sensitive one.
4. Otherwise do nothing.

**3D-DRAM in HMU: swap by priority.** Take the 3D MRU block of the lowest
class and the ex MRU block of the highest class. If the ex block's class is
strictly higher, swap them. The 3D-DRAM then fills with the most important
data, and fewer distinct applications compete for it.

**3D-DRAM in C: swap, then demote.** Do the HMU swap, if there is one.
Then, if the ex-DRAM is in its LMU region and has a free block, move the 3D
MRU block of the lowest class to the ex-DRAM (*demote*). This takes load
off the 3D-DRAM.

**Allocation of new blocks.** The OS asks with `alloc_req` and gets
`alloc_pbn` from the same-cycle `alloc_ack`. The block is in the 3D-DRAM
if the 3D-DRAM is in LMU and has a free block. Otherwise it is in the
ex-DRAM. The answer takes the free block out of its register. Allocation is
answered only while no relocation runs, and only once the chosen memory has
a free block; until then `alloc_req` simply waits.

The four kinds of moves are reported on `done_kind`:

| kind | code | from → to |
|---|---|---|
| promote | 0 | ex → 3D free block |
| demote | 1 | 3D → ex free block |
| swap | 2 | ex ↔ 3D |
| dump | 3 | un-accessed 3D → ex free block (always followed by a promote) |

## How a block moves

The engine copies through the same controllers and queues as the cores, so
it needs no extra DRAM port. It works in 64-bit words (`WORDS` = 512 per
4 KB block):

* **Move** (promote, demote, dump): for each word, read the source, wait
  for the data, write it to the destination, wait for the write
  acknowledge.
* **Swap**: for each word index, read both blocks, then write each value to
  the other block. Only two words are buffered.

Its requests are flagged `reloc`. `comb_mem_ctrl` gives them priority over
core requests and returns their data to the engine, not to the cores.

Consistency while a block moves:

* **Lock.** From the start of a move until the translation is switched,
  `lock_*` names the one or two blocks involved. `comb_mem_ctrl` holds any
  core request whose translated block is one of them. Other blocks run
  normally.
* **Ordering with requests already queued.** A core write to the block may
  already sit in a controller queue when the lock goes up. Each copy request
  therefore uses the queue of the class that owns the location it touches
  (insensitive for a free or un-accessed slot). A given word always maps to
  the same controller, and a queue is first-in first-out. So such a write
  lands before the copy reads that word. This relies on a block being used
  by a single class.
* **Switch-over.** In the cycle after the last write is acknowledged:
  * the TLB entries pointing at the old block are redirected; for a swap,
    both redirections happen in the same cycle;
  * the vacated block goes to the free-space register;
  * `done_valid` with `done_kind`, `done_pbn_a` (old) and `done_pbn_b`
    (new) tells the OS to update its page table, and the caches to retag or
    evict lines of the two blocks.

  In the next cycle the MRU, keeper and CAM entries of the second block are
  cleared, and the unit returns to idle (or starts the promote that follows
  a dump).

A 4 KB move costs 512 reads and 512 writes. On an idle system that is about
`512 × (RD+1 + WR)` controller cycles plus handshakes, roughly 12 000 cycles
for an ex → 3D promote. This matters when choosing `MON_PERIOD`: at the
default 10 000 cycles, at most about one block moves per period.

## Top-level interface (`hmm_top`)

| group | ports | connects to |
|---|---|---|
| core | `core_req_valid/ready`, `core_req` (`core_req_t`), `core_rsp_valid/ready`, `core_rsp` (`mem_rsp_t`) | processor cores |
| TLB | `tlb_miss`, `tlb_miss_vpn`, `refill_valid/vpn/pbn` | OS miss handler |
| free space | `os_free_we_3d/pbn_3d`, `os_free_we_ex/pbn_ex`, `need_3d`, `need_ex` | OS allocator |
| allocation | `alloc_req`, `alloc_ack`, `alloc_pbn` | OS allocator |
| relocation | `done_valid`, `done_kind`, `done_pbn_a`, `done_pbn_b`, `reloc_busy` | OS page table, caches |
| configuration | `cfg_we`, `cfg_th1`, `cfg_th2` (per mille); `region_3d`, `region_ex` | software |
| DRAM | `dram_cmd_valid[3]`, `dram_cmd[3]` (`dram_cmd_t`), `dram_rdata[3]` | 0, 1 = 3D-DRAM channels, 2 = ex-DRAM |

The DRAM device returns read data on `dram_rdata` in the cycle after the
read command. Everything is clocked on `clk`, with synchronous active-low
reset `rst_n`.

Shared types and constants are in `hmm_pkg`:

* 4 KB blocks and 64-bit data;
* a 21-bit physical block number (8 GB of physical space);
* 32-bit virtual addresses and 8-bit tags;
* the request and response structs.

## Parameters of `hmm_top`

| parameter | default | origin |
|---|---|---|
| `N3D_BLOCKS` | 131072 (512 MB) | own choice |
| `TLB_ENTRIES` | 64 | own choice |
| `INTLV_BIT` | 6 | own choice |
| `QDEPTH` | 16 per class queue | own choice (the scheme assumes unbounded queues) |
| `M`, `N` | 4, 4 | names from the scheme, values own choice |
| `RD_LAT_3D`, `RD_LAT_EX` | 8, 12 | from the scheme |
| `WR_REC_3D`, `WR_REC_EX` | 8, 12 | 3D is 4 cycles below ex, per the scheme; 12 from DDR3-1600 tWR |
| `MON_PERIOD` | 10000 | own choice |
| `TH1`, `TH2` | 800, 950 per mille | from the scheme |
| `MRU_LIFETIME` | 10000 | own choice |
| `CAM_L`, `CAM_PERIOD` | 64, 1 000 000 | the scheme's example values |
| `WORDS` | 512 | 4 KB / 64 bits |

## Departures and choices

* Each controller serves one request at a time with fixed latencies. There
  is no bank-level parallelism, row-buffer model or refresh. "Busy" means a
  request is in service.
* The 3D-DRAM's double bandwidth comes from its two controllers. All three
  channels are 64 bits wide. Wider buses (128/256-bit ex-DRAM with a
  double-width 3D-DRAM) or a 32-bit ex / 64-bit 3D configuration need a
  different `DATA_W`. `DATA_W` is a package constant; the copy engine then
  moves `4096 × 8 / DATA_W` words per block (`WORDS`).
* Queues are finite (16 entries per class). A full queue stalls the core
  port.
* The 3D-DRAM is judged as one memory (both controllers added). The
  ex-DRAM's region is used only for the demotion step in the C region.
* In a swap, the kept block must be of a strictly lower class than the
  incoming block. In the HMU/C swap, the ex block's class must be strictly
  higher than the 3D block's.
* Only one relocation is in flight at a time. A period that ends during one
  is handled afterwards.
* The monitor reports its regions at the end of every period, not only when
  the load is outside the comfortable range. The relocation unit decides
  whether anything moves; in the LMU region it keeps pulling recently used
  ex-DRAM blocks in.
* One decision moves one block, except that a dump is always followed by the
  promotion it made room for, and in the C region a swap may be followed by
  a demotion.
* The flowchart of the scheme labels two of its tests "MRU-region" and
  "LRU-region". This design reads them as the HMU and LMU regions, as the
  scheme's text does.
* Requests to the two blocks being moved are held, not redirected.
* The OS interface (refill, free blocks, allocation, completion) consists of
  plain ports. Page-table updates, paging to disk and cache retagging are
  left to the OS and the cache controllers; the `done_*` ports tell them
  what to do.
* Not modelled: the processor cores, the DRAM devices (only a storage model
  in the testbenches) and the caches.

## Simulation

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_req_queue` | random traffic against a reference queue |
| `tb_qos_arbiter` | grant sequences for M/N under every mix of waiting queues; random queue states against the rule's properties (no starvation, run limits) |
| `tb_dram_ctrl` | read latency RD+1, write recovery, back-to-back busy, QoS order, data; random traffic in all classes against a reference memory |
| `tb_monitor_unit` | region boundaries, per-controller counting, run-time thresholds; random busy patterns with random thresholds |
| `tb_mru_regs` | update, lifetime expiry and restart, invalidation; random traffic against a reference model |
| `tb_free_space_regs` | OS writes, take/give precedence, need flags; random inputs against a reference model |
| `tb_block_keeper` | class selection and invalidation; random traffic against a reference model |
| `tb_access_cam` | scan, small-CAM fill, marking, take/invalidate; random periods against a reference model |
| `tb_tlb` | refill, replacement, single and swap updates; random refills, moves and swaps against a reference page table |
| `tb_comb_mem_ctrl` | translation, routing, interleave, back-pressure, lock, response merge; random requests against the routing rule |
| `tb_reloc_fsm` | every branch of the decision rules and the copy sequence, against emulated stores |
| `tb_reloc_unit` | the unit with its stores, copying through a memory model: promotion, dump, swap, demotion, swap chained with demotion, allocation |
| `tb_hmm_top` | end-to-end at small sizes (16 3D blocks, 8-word blocks, 1000-cycle periods) |
| `tb_hmm_top_full` | end-to-end with every parameter at its default (about 2.7 M cycles) |
| `tb_hmm_workloads` | the two load scenarios below, at the reduced sizes of `tb_hmm_top` |

The two end-to-end tests share `tb/hmm_tb_body.svh`. It contains:

* an OS model: page table, free-block pools, TLB refill, allocation, and
  tracking of `done_*`;
* cores with a shadow memory that check every read;
* `tb/dram_model.sv` as the three devices.

The traffic goes through light, heavy, moderate and light phases, with the
thresholds changed on the fly, and ends with a full read-back. The test
counts, and requires, each mechanism at least once:

* promotion, demotion, swap by priority, swap with a kept block, dump;
* all three regions;
* TLB misses;
* stalls on a full queue and on a locked block;
* arbitration under contention.

### Load scenarios

`tb_hmm_workloads` runs synthetic versions of the two stress cases the
scheme was evaluated with. Each thread is a random-access stream over its
own pages.

* **Blocker.** A latency-sensitive thread shares the system with a
  bandwidth-sensitive stream. The stream reads consecutive words at a fixed
  rate, which loads the 3D-DRAM to about 61%. Its pages fill the 3D-DRAM
  first. The thresholds are 55%/80%, so the 3D-DRAM sits in HMU. The
  relocation unit swaps the four latency-sensitive pages in and the same
  number of stream pages out. The thread's mean latency then drops from
  about 14.5 to about 13 cycles (seeds vary). The gain is small because the
  thread now queues behind the stream in the 3D-DRAM.
* **Threshold sweep.** Five latency-sensitive threads over 20 pages load
  the system heavily while TH1 is set to 0.73, 0.80 and 0.86. TH2 follows
  `TH1 × 0.95/0.8` up to 0.8 and `0.75 + TH1/4` above. The phases run one
  after the other on the same state, so the reported utilization, ex-DRAM
  share and latency per setting also reflect where the previous setting
  left the blocks.

Run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_hmm_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/hmm_pkg.sv tb/tb_hmm_top.sv
./obj_dir/Vtb_hmm_top
```

Replace `tb_hmm_top` by any testbench name. The reduced end-to-end test
runs in seconds, the full-size one in under a minute.
