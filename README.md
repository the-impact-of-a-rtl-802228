# A non-blocking cache hierarchy for a statically scheduled superscalar

A statically scheduled, in-order-issue superscalar (here, the Hatfield
Superscalar Architecture, HSA) depends on its caches more than a dynamically
scheduled machine does. The compiler packs many loads and stores into each
issue group and expands the code, and nothing in the processor can reorder
work around a load that misses. This RTL is a memory hierarchy built for
that situation. It accepts several loads and several stores per cycle, never
blocks on a store, keeps serving hits while misses are outstanding, and asks
main memory for each missing block only once, however many loads wait for
it.

The default configuration is a study's "Standard Model" with 2 KB caches:

| item | default | parameter |
|---|---|---|
| data cache | 2 KB, direct mapped, 32 sets of 64-byte (16-word) blocks, write back, allocate on write miss | `DSETS` |
| instruction cache | 2 KB, direct mapped, 32 sets, fetch group of 16 instructions that may cross a block boundary | `ISETS`, `FETCH_W` |
| data read ports / write ports | 2 / 2 | `NRP`, `NWP` |
| Data Write Buffer | 40 records | `DWB_DEPTH` |
| Outstanding References Buffer | 40 records | `ORB_DEPTH` |
| write buffer above main memory | 40 block records | `MWB_DEPTH` |
| bypass (return) lines | 1 | fixed |
| main memory | one non-pipelined port, one block read or write per 10 cycles | `MEM_LAT` |
| main memory size | 2^16 words (256 KB) | `hsa_cache_pkg::AW` |
| cache access time | 1 cycle (2 = pipelined two-cycle access) | `ACC_LAT` |

Setting `NRP = NWP = 16` gives the study's "Maximal Model" port count.
`DSETS = ISETS = 4, 8, 16, 64` give its 256 B, 512 B, 1 KB and 4 KB cache
models. Words are 32 bits. All addresses inside the hierarchy are word
addresses.

The processor itself is not included. Its fetch, load, store and prefetch
requests, and the instructions and data coming back, are the ports of the
top module `hsa_memory_system`.

## Structure of one data-cache level

```
 stores (NWP)        loads (NRP)           prefetch
     |                   |  |                  |
     v                   |  |                  |
 +-------------------+   |  |                  |
 | Data Write Buffer |<--+  |  (lookup)        |
 | 40-record queue   |--------------------------------> hit data, 1 cycle
 +-------------------+      |                  |
   | drain (hits)           v                  |
   | NWP ports     +------------------+        |
   +-------------->| cache array      |-----------------> hit data, 1 cycle
                   | direct mapped    |<------ fill (returned block)
   write miss      +------------------+
   of oldest  \          | miss                |
   record      \         v                     v
                +-----> miss multiplexor (1 reference / cycle)
                               |
                               v
                 Outstanding References Buffer (40 records)
                   | first reference to a block only
                   v
          block-request queue --> next level <-- write-back queue (dirty victims)
                                 (write buffer above memory, then memory)
                                      |
                         returned block --> fill + bypass line --> load data
```

The modules:

- `dcache`: the level above, wired together, plus the returned-block state
  machine and the bypass line.
- `data_write_buffer`: the write queue in front of the cache.
- `outstanding_refs_buffer`: the table of references waiting on the next
  level.
- `dcache_array`: tags, valid and dirty bits, and data.
- `miss_mux`: the multiplexor that takes one miss per cycle.
- `sync_fifo`: the queues toward the next level.
- `icache`: the instruction cache.
- `memory_write_buffer`: the write buffer above main memory.
- `mem_arbiter`: shares the memory port.
- `main_memory`: the ten-cycle memory.
- `hsa_memory_system`: the top module.
- `hsa_cache_pkg`: shared types, sizes and the event record.

## The Data Write Buffer: many virtual write ports, few real ones

The cache has as many real write ports as the processor needs on average
(two here). The buffer gives the processor as many write ports as it needs
at its peak. Every store goes into the buffer first and is visible there
from the next cycle. Each buffer record holds the word address, the data and
one status flag.

**Order.** Records form a queue, oldest first. Each cycle the oldest records
that hit in the cache are written into it, up to `NWP` of them, strictly in
order. Stopping at the first record that misses means two stores to one
address can never overtake each other. If two records for the same word
drain in the same cycle, the cache array gives the higher port (the younger
record) priority.

**Loads see the buffer.** Every load is looked up in the buffer and in the
cache in parallel. If the buffer holds the word, the youngest record for it
answers. So a load that follows a store to the same word completes at
normal hit speed, even if that store has not reached the cache. A load and a
store to the same word accepted in the same cycle: the load gets the older
value.

**Write miss (allocate on write miss).** When the oldest record misses in the
cache, it sends one write-miss reference through the miss multiplexor and
sets its status flag. The flag stops the record from asking again. While the
record waits, the queue behind it fills up. When the queue is full,
`wr_ready` drops and the processor must hold its store. After the block has
been installed, the return logic sends a wake-up for that block. The wake-up
clears the flag if the oldest record still belongs to that block. The record
then drains as an ordinary hit. If the block had been evicted again before
then, the record would simply ask for it again.

While a returned block is being written into the cache (one cycle), the
buffer does not drain. This keeps a word write and a block fill from landing
in the same set in the same cycle.

## The Outstanding References Buffer: one memory request per block

Every reference that needs the next level gets a record here. A reference is
a load miss, a write miss or a prefetch miss. A record holds the reference
kind, the block address, the word offset and, for loads, a 6-bit tag for the
destination register. A new reference is compared against all records at
once. If another record already names the same block, the new one is only
stored (a merge). Otherwise it is stored and a block request goes into the
request queue in the same cycle. A reference is refused when the table is
full, or when it needs a request and the request queue is full. A refused
load sees `rd_ready` low and must be held.

The miss multiplexor passes one reference per cycle into the table. Read
ports come first (lowest port first), then the Data Write Buffer's write
miss, then prefetch.

## Returned blocks and the bypass line

A returned block goes through three states in `dcache`:

1. **R_IDLE**: the block is taken from the next level (`mret_ready` is high
   only in this state).
2. **R_FILL**: the block is written into its set. If the block it replaces is
   dirty, that block goes into the write-back queue in the same cycle. The
   state waits here if the write-back queue is full.
3. **R_DELIV**: each cycle, one load record for this block is taken from the
   table. The word it asked for is sent from the returned block straight to
   the register file, over the single bypass line (`byp_valid`, `byp_id`,
   `byp_data`, registered). When no load records are left, the block's
   write-miss and prefetch records are freed, the write wake-up is sent, and
   the state returns to R_IDLE.

The bypass line means a load does not wait for a fill and then a second
cache read. Loads that miss therefore return out of order, tagged with the
`rd_id` they were issued with. Hits return one cycle after acceptance on
`rsp_*`. The bypass line can deliver in the same cycle as the hit ports.

A load that misses on a block whose fill is in progress merges with the
block's records and is answered in the same R_DELIV pass. Once the fill is
done, a load to that block simply hits.

## The write buffer above main memory

Dirty blocks leaving the data cache do not go straight to memory. They
enter a second write buffer (`memory_write_buffer`, 40 records, each a
whole block and its block address), which drains them to memory in order.
Every block read that the data cache sends toward memory is first compared
with all records in this buffer. If the buffer holds the block, the
youngest copy answers the read one cycle later, with no memory access
(`mwb_hit` pulses). This matters when a dirty block is evicted and needed
again before its write has reached memory.

A read is held while a write-back is waiting to enter the buffer. The data
cache queues a victim before any later miss on the same block, so every
older write of the block is in the buffer when the read is compared.

## Sharing the one memory port

Main memory has one port that does one 64-byte block read or write every ten
cycles, and the port is not pipelined. `mem_arbiter` shares it in a fixed
priority: write-backs from the buffer first, then instruction-cache reads,
then data-cache reads. A read that reaches memory never has an older write
of its block behind it: the buffer would have answered it.
Instruction and data regions are assumed not to overlap: stores are not
seen by the instruction cache.

## Instruction cache

`icache` returns 16 consecutive instruction words starting at any word
address. The group can straddle two blocks, which sit in adjacent sets. If
both blocks are present, the group appears one cycle after the fetch is
taken. Otherwise the cache fetches the missing block or blocks one at a
time and installs them. The instruction cache has its own bypass line: when
the last missing block returns, the group is built from that block while it
is being written, and appears one cycle after the return. No new fetch is
accepted in the meantime. `ic_miss` pulses when a fetch misses.

## Interfaces and timing (top module)

All handshakes are valid/ready. Requests are taken on the rising clock edge
when both are high. Reset `rst_n` is asynchronous and active low. Cache
contents (data and tags) are not reset; valid bits are.

| port group | direction | timing |
|---|---|---|
| `if_valid/if_addr/if_ready` | in/in/out | fetch request, held until taken |
| `if_rsp_valid/if_rsp_addr/if_rsp_instr[16]` | out | one cycle after a hit; after a miss, one cycle after the last block returns |
| `rd_valid/rd_addr/rd_id/rd_ready [NRP]` | in/in/in/out | load; `rd_ready` low means hold it |
| `rsp_valid/rsp_id/rsp_data [NRP]` | out | hit data, exactly one cycle after acceptance |
| `byp_valid/byp_id/byp_data` | out | data of loads that missed, any later cycle |
| `wr_valid/wr_addr/wr_data/wr_ready [NWP]` | in/in/in/out | store; port *i* is refused only when the buffer lacks room for it and the ports below it |
| `pf_valid/pf_addr/pf_ready` | in/in/out | prefetch; a hit is dropped at once |
| `dc_ev` | out | one-cycle event pulses (see `dcache_events_t`) |
| `mwb_hit` | out | pulse: a block read was answered by the write buffer above memory |

The processor must use distinct `rd_id` values for loads that are
outstanding at the same time.

## Where this departs from the study it follows

- With `ACC_LAT = 2` (the study's two-cycle caches) only the answer is
  delayed by a pipeline register. The lookup still happens in the cycle the
  read is accepted, and the write buffer still accepts a store in one cycle.
- The instruction cache blocks on a miss and has no outstanding-reference
  table: the stalled fetch stage has only one fetch outstanding. In the
  study, every cache could be given the same structure as the data cache.
- The write buffer above main memory holds whole blocks and has no status
  flag, since memory has no misses. A read that finds its block there is
  answered from the buffer; this lookup is this design's reading of "the
  data is visible at all times".
- Write-through, write combining, sub-blocks, associativity and replacement
  policies were options of the study's simulator that its experiments did not
  use. They are not built.
- These choices are this design's own: the valid/ready handshakes, the miss
  multiplexor's order and its rate of one reference per cycle, the size of
  the next-level queues (4), the memory size, a block as one ten-cycle memory
  access, the arbiter priority, and the register-tag width.
- The processor (pipeline, instruction buffer, register files, functional
  units) is outside this RTL.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a line
`TB_RESULT checks=N failures=M`:

| testbench | what it shows |
|---|---|
| `tb_hsa_memory_system` | whole hierarchy at default size: random fetches, loads, stores and prefetches against a shadow memory, every instruction and load value checked, hit latencies checked, memory never starting two accesses less than 10 cycles apart, and every mechanism (buffer hit, cache hit, miss, merge, write miss, write-back, bypass, buffer-full stall, double drain, prefetch, instruction miss, fetch across blocks, a block read answered by the write buffer above memory) seen at least once |
| `tb_dcache` | the data-cache level alone against a behavioural next level, same checks |
| `tb_cache_models` | the same synthetic program (array passes plus scattered accesses, with a loop of code being fetched) on eight configurations: 256 B to 4 KB caches, 16+16 data ports, two-cycle access, single issue; data checked in all, and run time must fall as the caches grow |
| `tb_memory_write_buffer`, `tb_data_write_buffer`, `tb_outstanding_refs_buffer`, `tb_dcache_array`, `tb_icache`, `tb_main_memory`, `tb_mem_arbiter`, `tb_miss_mux`, `tb_sync_fifo` | each block against a cycle-by-cycle model |

To simulate one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/hsa_cache_pkg.sv \
    tb/tb_hsa_memory_system.sv --top-module tb_hsa_memory_system
./obj_dir/Vtb_hsa_memory_system
```

Verilator finds the other modules through `-Irtl` by their file names. The
full-size end-to-end test runs in well under a second.

The testbenches check that the hierarchy is functionally correct. They do not
reproduce the study's performance numbers, which need the processor and its
compiled benchmarks. For orientation, `tb_cache_models` prints its own
program's cycle counts. They are about 56,000 cycles with 256 B caches,
33,000 with 2 KB and 5,300 with 4 KB, where the 1024-word scattered region
fits. With 2 KB caches a single-issue processor takes about 34,000 cycles
and 16+16 data ports take 29,000. Such a program is limited by the one
ten-cycle memory port; this is the effect the study measured.
