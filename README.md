# FMU: per-flow packet counting with a two-dimensional hash table

A router that wants per-flow statistics (for fair scheduling, anomaly
detection, traffic engineering) has to update a counter for every packet at
line rate, keyed by the packet's TCP/IP 5-tuple. The Flow Monitoring Unit
(FMU) in this repository does that in hardware with a fixed, short latency and
one packet per clock cycle. It trades exactness for speed: flows are not
stored individually but hashed into small tables, and collisions between
flows are tolerated and partly corrected.

The key idea is to use N small hash tables instead of one large one. Every
table is addressed by the same hash function with a different seed, so a
flow lands in an unrelated bucket in each table. An update touches one bucket
in every table, all in parallel; a query reads the N buckets of the flow and
combines them. Two flows that collide in one table are unlikely to collide in
all of them, and the combination step uses that.

The default configuration is N = 4 tables of S = 2048 entries.

## Queries

The unit serves two queries, one per clock cycle, in any mix:

* `UPDATE(k, v)`: add `v` to the count of flow `k`. For packet counting, `v = 1`.
* `GET(k)`: return the estimated count of flow `k`.

`k` is the 104-bit 5-tuple `flow_key_t` (source IP, destination IP, source
port, destination port, protocol).

## What a bucket holds

Each table `i` (module `fmu_table`) keeps three words per bucket:

| word     | meaning |
|----------|---------|
| `T_i[b]` | sum of all update values that hashed to bucket `b` |
| `C_i[b]` | collision counter of bucket `b` |
| `tag_i[b]` | 32-bit hash of the key that last updated `b`, plus a "used" bit |

An UPDATE adds `v` to `T`. If the bucket is in use and its tag differs from
the hash of the new key, another flow has been here since this flow's last
packet, so `C` is incremented. The new key's tag is then stored. A GET only
reads. As a result, `T` overstates a flow's count by the traffic of the
flows it shares the bucket with, and `C` roughly measures how much sharing
happened.

Two choices here are this design's own:

* A key is recognised by its 32-bit hash (the tag), not by the full 104-bit key.
* Only UPDATEs count as accesses for the collision counter.

## Four ways to answer a GET

`fmu_select` computes all four estimates from the N readings in parallel.
The query's `q_mode` chooses which one `get_value` returns. All four are also
available on `get_min`, `get_median`, `get_ce` and `get_hybrid`.

* **MIFMU (minimum)**: `min_i T_i`. Every `T_i` can only overstate the
  flow, so the smallest is the best single bound. This works well for large
  flows, whose own traffic dominates their buckets.
* **MEFMU (median)**: `median_i (T_i - sum/S)`. Here `sum` is the total of
  all update values so far, so `sum/S` is the average bucket content, and it
  is subtracted as the expected contribution of other flows. With an even
  N, the median is the mean of the two middle values, rounded down. The
  result is clamped at zero. The unit keeps `sum` in a 48-bit register
  (`total`).
* **CEFMU (collision estimate)**: `min_i (T_i - C_i)`, clamped at zero.
  This subtracts one count per observed interleaving with another flow, and
  is the most accurate technique for small flows.
* **HYFMU (hybrid)**: `MIFMU - D`, where `D = MIFMU - CEFMU` if MIFMU is
  below `threshold`, and `D = 0` otherwise. So a flow estimated at or above
  the threshold gets the minimum estimate, and a smaller one gets the
  collision estimate. `get_hy_min` shows which side was taken.

The following are this design's readings where the method leaves room:

* The threshold is compared with the MIFMU value. The comparison is inclusive.
* The median and `T - C` are clamped at zero.
* The median of an even number of values is the mean of the middle pair.

## Pipeline and timing

```
cycle t       query on q_*            (q_valid && ready)
t .. t+5      jenkins_hash, 6 stages  (each 9-step mix split in three)
t+6           bucket index = floor(hash * S / 2^32), memory read issued
t+7           read data back; UPDATE: T += v, C += collision, tag := key
t+8, t+9      fmu_select: register inputs, compute and register estimates
t+9           get_valid / get_value
```

`FMU_LATENCY = 9` cycles. There is no stall and no back-pressure: a new
query can enter every cycle. The tables, `sum` and the selection stages run
in lockstep, and answers come out in query order.

**Forwarding.** An UPDATE writes its bucket at the end of cycle `t+7`. By
then the next query has already issued its read for the same cycle. The
memories return the old word when a read and a write hit the same address
in the same cycle. So a query that immediately follows an UPDATE of the same
bucket takes the three words from a forwarding register instead
(`fwd_event`). Queries two or more cycles apart read the memory normally.
Back-to-back packets of one flow are common, so this path is exercised
constantly.

**Running sum.** `sum` is incremented when an UPDATE leaves the tables
(cycle `t+7`), not when it enters. A GET therefore sees exactly the updates
issued before it.

**Reset.** After reset, each table writes zeros to all S buckets, one per
cycle. During these S cycles `ready` is low and queries are ignored.

## The hash

`jenkins_hash` implements Bob Jenkins' 32-bit lookup2 hash:

1. `a` and `b` start at `0x9E3779B9`, and `c` starts at the seed.
2. Key bytes 0 to 11 are added little-endian into `a`, `b` and `c`. The
   key's most significant byte is byte 0.
3. The mix runs.
4. The length 13 is added to `c`, and byte 12 is added to `a`.
5. The mix runs again. The result is `c`.

Table `i` uses the seed `0x0BAD5EED + i * 0x9E3779B9`. The tables differ only
by this seed, so they all have identical timing.

The bucket index is `floor(hash * S / 2^32)`:

* It works for any `S`, not only powers of two, so table sizes such as 500
  or 16000 can be built.
* For a power-of-two `S` it reduces to the top bits of the hash.

## Files

| file | contents |
|------|----------|
| `rtl/fmu_pkg.sv` | key struct, query and mode enums, widths, latency constants, default seeds |
| `rtl/jenkins_hash.sv` | 6-stage seeded lookup2 hash |
| `rtl/fmu_ram.sv` | simple dual-port table memory, registered read-first read |
| `rtl/fmu_table.sv` | one hash table: hash, index, T/C/tag memories, read-modify-write, forwarding, clear |
| `rtl/fmu_select.sv` | the four estimates and the mode multiplexer |
| `rtl/fmu_top.sv` | N tables, running sum, selection; the unit's top level |
| `tb/fmu_ref_pkg.sv` | reference lookup2 model (loop form), index reduction, random keys |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/fmu_trace_runner.sv`, `tb/tb_fmu_workloads.sv` | trace-driven checks at many sizes |

Parameters of `fmu_top`:

* `N` is the number of tables.
* `S` is the number of entries per table.
* `SUM_W` is the width of the running sum.

Counter width (32 bits), key width and hash latency are set in `fmu_pkg`.
Each table stores 97 bits per entry. The default unit therefore holds
4 × 2048 × 97 ≈ 0.8 Mbit of table memory.

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_fmu_top rtl/fmu_pkg.sv tb/fmu_ref_pkg.sv tb/tb_fmu_top.sv
./obj_dir/Vtb_fmu_top
```

* `tb_jenkins_hash` compares the pipelined hash with a software-style loop
  model for two seeds. It also checks the 6-cycle latency and the rate of
  one key per cycle.
* `tb_fmu_ram` checks read latency and read-first behaviour against a model
  array.
* `tb_fmu_table` uses S = 12, a size that is not a power of two. Forty keys
  share the table, so there are many collisions. Every output is checked,
  including the collision and forwarding flags, the clear time and the
  query ignored during clearing.
* `tb_fmu_select` checks random readings against a sorting model in all
  modes, including ties, negative medians and both hybrid outcomes.
* `tb_fmu_top` runs the unit at its default size. It replays a skewed
  synthetic trace: 3000 flows, about 21,000 packets, with GETs mixed in.
  It then queries every flow in every mode. Every answer and its latency
  are checked against a full model of the tables. The testbench requires
  each of these to happen at least once: the clearing, collisions,
  forwarding, all four modes, both hybrid outcomes and a clamped median.
* `tb_fmu_workloads` runs the same kind of check on eleven configurations:
  * N = 4 with S = 500 to 16000;
  * a fixed total of 32K entries split into N = 1 to 16 tables.

For information, the testbenches also print the average relative error of
each technique against the true flow sizes. On these synthetic traces:

* the collision estimate and the hybrid beat the plain minimum for small
  tables;
* the minimum wins once tables are much larger than the number of flows;
* the median technique is the worst throughout.

The traces are synthetic, so the absolute numbers say nothing about real
traffic.

## Limits and departures

* **Throughput.** The design accepts one query per clock. A rate of 200M
  packets/s (64 Gbps of 40-byte packets) therefore needs a 200 MHz clock.
  No timing closure has been done for any device.
* **Entry size versus memory.** With T, C and a 33-bit tag per entry,
  entries are 97 bits. A device with about 3 Mbit of block RAM (the
  Virtex-II XC2V8000 class) fits about 31K entries. If C is not needed
  (MIFMU or MEFMU only), a 32-bit-per-entry variant would fit about 90K.
  The tag and C memories can be dropped in that case, but no such variant
  is provided.
* **Counters.** Counters wrap at 2^32, with no saturation.
* **Clearing.** Tables are cleared only by reset. There is no command to
  clear them or read them out during operation.
* **Mode per query.** The technique is chosen per query. A fixed build-time
  choice would save the logic of the unused estimates.
* **Host interface.** The host side is plain valid signals with no
  back-pressure. Any bus interface to a host processor is outside this RTL.
