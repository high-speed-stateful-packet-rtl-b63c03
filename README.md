# Stateful TSS packet classifier with off-chip rule storage

This is a packet classifier for software-defined networking. It holds millions of
OpenFlow-style rules in external DDR4 memory and keeps per-rule statistics in the same
memory: packet count, byte count and last-seen time. It classifies one packet per clock
while the working set fits in an on-chip cache. At 300 MHz that is 300 million packets per
second.

The lookup algorithm is Tuple Space Search (TSS). Rules are grouped into tables. Every rule
of a table uses the same mask, so a lookup in one table is a single hash-and-compare. DDR4
has long and variable latency, and every hit must write its updated counters back. The
design therefore runs many lookups at once and lets them finish out of order. Whatever could
go wrong when two lookups touch the same rule is handled in the engine and in the memory
queues, not in the cache.

```
 traffic key ─►┌──────────────────────── MAE ─────────────────────────┐─► result
 service op  ─►│ input handler ─► allocated storage ─► action pipeline │
               │   (hash, tag)       (sessions)      (compare, update) │
               │        ▲ read channel         write channel │         │
               └────────┼──────────────────────────────────────┼─────┘
                        │ look-up recirculation ◄───────────────┘
               ┌────────┴───────────── cache ───────────────────┐
               │ 4-way, 16K lines, Tree-PLRU, write-allocate     │
               ├──────── load queue ◄──────► store queue ────────┤
               └──────────── interconnect (NUM_CH AXI4) ─────────┘
                                     │
                             DDR4 controllers (external)
```

## Rules, tables and buckets (`tss_pkg`, `crc32_hash`)

- **Rule line.** A rule is one 64-byte line, which is also one cache line and one 512-bit
  AXI beat. From the top bit down it holds:
  - the masked key (256 bits) and 7 reserved bits
  - the timestamp (48 bits)
  - the byte and packet counters (64 bits each)
  - the action (32 bits) and the priority (32 bits)
  - the table id (8 bits) and a valid bit
- **Shared memory.** All tables share one memory of 2^28 lines (16 GB).
- **Bucket address.** A rule's bucket is CRC-32 of `{table id, key & table mask}`, cut to
  28 bits. The CRC is the IEEE 802.3 form: reflected polynomial 0xEDB88320, initial value
  all ones, final inversion, message bit 0 first.
- **One rule per bucket.** There is no collision handling. An insert into a bucket that
  holds a different rule replaces it and reports `replaced`. The table id is part of both
  the hash and the compare, so two tables never see each other's rules.

Each table has a configuration word: valid, mask, maximum rule priority, and next table.
Tables form a chain in order of falling maximum priority. The configuration lives on chip in
a 256-entry memory. The service interface writes it with `OP_CFG`. In that instruction
`key` carries the mask, `prio` the maximum priority, `action[7:0]` the next table,
`action[8]` "has next" and `action[9]` "valid".

## Following a lookup through the engine (`mae`)

1. **Input handler** (`input_handler`). It picks one operation per cycle: a recirculated
   one first, otherwise traffic and service alternate. Traffic always starts at table 0.
   The handler reads the table's mask, hashes the masked key and asks the allocated
   storage for a tag. A recirculated operation keeps its tag and only updates its session.
   It then issues `{tag, bucket}` on the read channel.
2. **Allocated storage** (`alloc_storage`). Holds one session per tag: the operation, the
   key, the packet length, the payload, and the best match so far. It grants the lowest
   free tag. There are 64 tags. A new operation waits while none is free (`ev.no_tag`).
3. **Read channel.** Reads come back tagged, in any order. A read may be marked
   *cancelled* (see the load queue below).
4. **Action pipeline** (`action_pipeline`). It has four stages:
   - **Data Prep.** Registers the response and the session of its tag.
   - **Cmp Update.** Compares the rule with the masked key and the table id, then decides:
     - Hit, and the next table cannot hold a higher priority (or there is no next
       table): update the counters and timestamp, and write the rule.
     - Miss, or a hit that a higher-priority rule in the next table could still beat:
       recirculate to the next table and remember the best match.
     - End of the chain, with the best match from an earlier table: recirculate once
       more as `OP_STAT`. This re-reads that rule and updates its statistics.
     - End of the chain with no match: output the packet as unclassified.
     - Service operations (insert, delete, read, read-and-clear) act on the bucket.
     - A cancelled read is recirculated unchanged.
   - **Write/Reinsert.** Sends the rule to the write channel, or the session to the input
     handler.
   - **Write Confirm.** Results wait here in order until the cache has committed their
     write. Then the result leaves and the tag is freed.

### Write forwarding, the hardest part

The bucket data read from the cache can be older than writes that the pipeline has already
issued. An example: two packets of the same flow arrive a few cycles apart. The second read
was served before the first packet's updated counters reached the cache. If nothing catches
this, the second update overwrites the first and a count is lost.

Cmp Update therefore takes the rule from a more recent source when one exists. It uses the
first of these that matches the bucket address:

1. the Write stage (one cycle younger);
2. the newest matching entry in a log of the last `FWD_DEPTH` writes;
3. the data that was read.

The default is `FWD_DEPTH = TAGS + 16`. That is enough for the following reason. At most
`TAGS` writes are unconfirmed at any time, and the cache commits one write per cycle. So
every write that a read's data can be missing is still in the log.

Reads that are still waiting in the load queue when a write to their address commits are
not patched. They are cancelled and executed again. By then the line is in the cache, so the
retry hits.

## Cache (`tss_cache`)

- **Organisation.** 4 ways, 16384 lines (4096 sets), Tree-PLRU replacement. It does one
  read and one write per clock.
- **Reads.** A hit returns after `RD_LAT = 4` cycles. A miss goes to the load queue with
  its tag. The line comes back through the cache, which answers the MAE and, when it can,
  fills the line in.
- **Writes.** Every write is a whole rule, so writes allocate without reading memory. A
  write takes the hit way, else an invalid way, else the PLRU victim. A dirty victim goes to
  the store queue. The write commits 2 cycles after it is accepted and is acknowledged on
  `wr_ack`.
- **Cancellation.** Every committed write is also sent to the load queue as a
  *cancellation* of that address. Because of this the cache needs no record of pending
  misses, and a fill can never install stale data.
- **Same-cycle bypass.** A read looked up in the same cycle as a write to its line sees
  the new line.

## Load queue and store queue (`load_queue`, `store_queue`)

**Load queue**, 64 entries:

- **Merging.** There is one entry per missing address. Each entry has a bitmap of the tags
  waiting for it, so a second miss to the same address is merged (`ev.lq_merge`).
- **Bypass from the store queue.** A new miss first looks in the store queue. If the line
  is there, the miss is answered from it (`ev.lq_bypass`).
- **Memory reads.** Otherwise one AXI read is sent. Its ID is the entry index.
- **Cancellation.** A cancellation marks the entry of that address. Its tags are answered
  "cancelled" (`ev.lq_cancel`), and data arriving for it later is dropped.
- **Answers.** The entry answers one tag per cycle. Only the first answer asks the cache
  to fill the line.

**Store queue**, 64 entries, a circular buffer. Each entry is free, pending, in flight or
done.

- **Merging.** An eviction to an address that is still pending replaces that entry's data
  (`ev.sq_merge`).
- **Issue.** Entries are issued in order. A pending write waits while an older write to
  the same address is in flight, so DRAM sees them in order.
- **Retire.** Entries retire at the head after their AXI write response.
- **Read bypass.** The queue serves the load queue's lookups. The newest copy wins: a
  pending entry before an in-flight one.

## Memory interconnect (`mem_interconnect`)

- **Channel choice.** Line address modulo `NUM_CH` picks the DDR4 channel. The default is
  2; 1 and 4 also work.
- **Transactions.** Each access is a single AXI4 beat: len 0, 64-byte size, INCR burst.
- **Writes.** Each channel has a one-entry AW/W buffer.
- **Responses.** R and B responses from the channels are returned round-robin.
- **One read at a time.** The load queue offers one read at a time, and the read waits for
  its own channel. While one channel refuses AR, reads to the other channels wait too. This
  costs nothing with controllers that queue commands, but it would limit a memory that often
  refuses reads.
- **Memory.** The DDR4 controllers are not part of the RTL. The testbenches use a
  behavioural AXI4 memory, `tb/ddr4_axi_model.sv`. It has a fixed latency, an optional
  bandwidth limit per channel and random back-pressure.

## Top level (`tss_classifier_top`)

**Parameters**, with defaults:

| Parameter | Default |
|---|---|
| `TAGS` | 64 |
| `CACHE_LINES` | 16384 |
| `CACHE_WAYS` | 4 |
| `RD_LAT` | 4 |
| `LQ_DEPTH` | 64 |
| `SQ_DEPTH` | 64 |
| `NUM_CH` | 2 |

**Ports:**

- `tr_*`: traffic keys from a packet parser, valid/ready.
- `sv_*`: service instructions, valid/ready.
- `res_*`: results, valid/ready.
- `m_*`: one AXI4 master per DDR4 channel, as arrays of channel structs.
- `ev`: a struct of one-cycle event pulses for performance counters.

All resets are synchronous and active low.

## Where this design departs from the source architecture

- **Priority rule.** The source says both that a lookup stops once later tables cannot
  hold a higher-priority rule, and that a hit updates its counters and returns straight
  away. This design follows the first rule. A hit that a later table might still beat is
  carried along. Its statistics are then updated by an extra re-read (`OP_STAT`) when the
  chain ends.
- **Cache write latency.** It is 2 cycles; the source reports 5. The read latency of 4 is
  kept.
- **Dirty victims.** The cache is write-back to the store queue. The source does not say
  how evictions are handled.
- **Fills.** A fill is dropped when the write port is busy or the store queue is full.
- **Pipeline depth.** The engine has 3 input stages and 4 action stages. The source
  mentions an 8-stage main pipeline without listing the stages.
- **Invented details.** These are this design's own:
  - the forward log
  - the write-confirm result queue
  - the tag count (64)
  - channel interleaving by address modulo
  - the CRC variant
  - the rule field layout
  - the 256-bit key
  - the on-chip table configuration and the instruction encoding
- **Left out.** The packet parser and deparser, the Ethernet interfaces, the management
  software and the DDR4 controllers. Their signals are the top-level ports.
- **Not checked.** FPGA-specific memory mapping (UltraRAM and BRAM) and the 300 MHz timing
  target.

## Simulating

Every testbench in `tb/` checks itself and ends with a `TB_RESULT checks=N failures=M` line.
To build and run one with plain Verilator 5, run this from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -j 4 --top-module tb_tss_classifier_top \
  -y rtl -y tb +libext+.sv rtl/tss_pkg.sv tb/tb_tss_classifier_top.sv -o sim
./obj_dir/sim +verilator+seed+1
```

| Testbench | What it checks |
|---|---|
| `tb_crc32_hash` | against a byte-table CRC-32 |
| `tb_alloc_storage` | tag allocation order, session storage, occupancy |
| `tb_input_handler` | bucket addresses, tags, recirculation priority, table configuration |
| `tb_action_pipeline` | directed cases: hit, miss, chain, forwarding, cancelled reads, service ops |
| `tb_mae` | random operations against a reference rule table, with a model cache of random latency |
| `tb_tss_cache` | against a reference memory, including read latency, evictions, fills and cancellation |
| `tb_load_queue`, `tb_store_queue`, `tb_mem_interconnect` | random traffic against reference models |
| `tb_tss_classifier_top` | the whole classifier, at a small cache, against a reference rule table |
| `tb_tss_full_size` | the whole classifier at every default parameter |

**`tb_tss_classifier_top`** uses a 64-line cache. It:

- inserts rules into several chained tables and sends random packets and service
  operations;
- checks every result and counter;
- requires each mechanism to happen at least once: hit, miss, eviction, fill, load merge,
  cancellation, bypass, store merge, forwarding, next table, retry, statistics re-read and
  tag exhaustion;
- measures the hit rate of one lookup per clock (400 hits in about 411 cycles).

**`tb_tss_flows`** measures throughput under the worst-case workload. Packets are spread
uniformly over many flows, with 1, 2 and 4 channels side by side. The cache is scaled down
to 1024 lines. Each modelled channel does one 64-byte access per 4 cycles, with 80 cycles of
latency; these memory numbers are assumptions, not DRAM timing.

| Channels | 256 flows (fit in the cache) | 8192 flows (8× the cache) |
|---|---|---|
| 1 | 0.99 packets/clock | 0.14 packets/clock (43 Mpps at 300 MHz) |
| 2 | 0.99 packets/clock | 0.28 packets/clock (83 Mpps at 300 MHz) |
| 4 | 0.99 packets/clock | 0.52 packets/clock (155 Mpps at 300 MHz) |

Within the cache the rate is one packet per clock. Beyond it the rate is set by memory
bandwidth and grows with the number of channels.

**`tb_tss_full_size`** runs the full-size classifier, with 16K cache lines and 2 channels,
through inserts, lookups and reads.
