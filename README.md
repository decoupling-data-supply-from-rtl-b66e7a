# DeSC communication hardware in SystemVerilog

DeSC (decoupled supply–compute) splits a program between two processors.
The **supplier device (SuppD)** is an out-of-order core that runs only the
memory-access part: address arithmetic, loads and store addresses. The
**computation device (CompD)** is a core or an accelerator that runs only the
arithmetic and never touches memory. The SuppD runs far ahead and streams
operands to the CompD. Computed store values flow back to the SuppD side,
which writes them to memory. Because the SuppD is not held up by
computation, it can keep many long-latency misses in flight. The CompD
finds its data waiting in a small buffer next to it.

This repository holds the hardware that sits between the two cores:

* the queues and buffers that carry values forward;
* the buffers that pair store addresses with store values;
* the logic that lets a load be satisfied by a store whose value the SuppD
  has never seen;
* a frequent-value compressor on the link.

The two cores and the cache hierarchy are not included. Their DeSC-related
signals are ports of `desc_top`.

```
 SuppD side                                               CompD side
 ----------                                               ----------
 PRODUCE commit ----------------------+
                                      v
 LOAD_PRODUCE  --> terminal load --> CommQ --> compressor ==link==> decompressor
 partial commit    buffer (CAM)     (FIFO)     (FVC)                (FVT)
        |                                                              |
        | address search                                               v
        v                                                          CommBuf (CAM) <-- CONSUME lookup by id
 STORE_ADDR --> store address buffer <---- value / STORE_INV ---- store value buffer <-- STORE_VAL
                (Addr, Awt, Cnt)    ---- forward count --------->  (Data, Cnt)        <-- forwarded CONSUME
                      |
                      v
                memory write
```

## The instruction contract seen at the ports

The compiler splits every memory operation of the original program into a
pair of instructions, one on each core. Every SuppD instruction has exactly
one counterpart on the CompD, in the same program order. That is the
invariant all of the hardware relies on.

| SuppD | CompD | Hardware path |
|---|---|---|
| `PRODUCE v` (value the SuppD computed or loaded) | `CONSUME` | `pr_*` → CommQ → CommBuf → `cs_*`/`cc_*` |
| `LOAD_PRODUCE a` (a *terminal* load: its value is used only by the CompD) | `CONSUME` | `lp_*` → terminal load buffer → CommQ → … |
| `STORE_ADDR a` | `STORE_VAL v` or `STORE_INV` | `sa_*` → SAB ← SVB ← `sv_*` |

Each forwarded item carries a program-order **id** (12 bits, wrapping), which
the SuppD assigns at dispatch. The CONSUME that needs the item carries the
same id. That is how the CompD consumes out of order.

Each store carries a **st_id**, the running count of stores (9 bits,
wrapping). Both sides count stores independently. Because a STORE_ADDR and
its STORE_VAL are in the same relative order on both sides, the counts agree.

`STORE_INV` stands for a store that the original program would have skipped
because of a branch only the CompD can evaluate. It frees the paired
address-buffer entry without writing memory.

## Forward path: CommQ, link, CommBuf

**CommQ** (`comm_queue`, 512 items) is a plain FIFO of `{id, fwd, fp, data}`.
Items enter only at commit, so nothing in it is speculative and it never
needs to be flushed. An item pushed at a clock edge is at the head in the
next cycle.

The head feeds the compressor. The compressor's output register is the link
register, and the decompressor's output register feeds the CommBuf. When
nothing stalls, an item pushed at edge *t* is in the CommBuf after edge
*t+3*:

* the push;
* the compression stage;
* the decompression stage.

The published interface has 1 cycle from CommQ to CommBuf with no compressor
in the path. Here the two compression stages add one cycle.

**CommBuf** (`comm_buffer`, 64 entries) is a CAM searched by id. A CONSUME
presents its id on `cs_id` and gets `cs_hit`/`cs_data` combinationally.

* The entry is not freed by the lookup. It is freed when the CONSUME
  commits (`cc_valid`, `cc_id`). This means a mis-speculated CONSUME on the
  CompD can never lose data.
* Every insertion is broadcast on `wake_valid`/`wake_id`, so the CompD's
  instruction window can wake a CONSUME that is already waiting.

The 64 entries set how far out of order the CompD can consume.

## Terminal loads and the reordering limit

Without extra hardware, a LOAD_PRODUCE that misses in the cache would sit at
the head of the SuppD's reorder buffer until its data returns. That would
block everything behind it, which is exactly the stall DeSC exists to avoid.
Because the load's value goes only to the CompD, the SuppD does not need it
itself.

**Partial commit.** The SuppD partially commits the load as soon as it has
issued and reached the ROB head (`lp_valid`, `lp_tag`). The load moves into
the **terminal load buffer** (`terminal_load_buffer`, 32 entries) and waits
there for its memory response (`ld_resp_*`, matched by tag). As soon as its
data is back it commits into the CommQ. This is out of program order: a
later load that hits the cache overtakes an earlier one that misses.

**The deadlock.** Out-of-order entry into the CommQ creates a deadlock risk.
The CompD can only look at the 64 items in its CommBuf. Suppose 64 items
younger than an outstanding terminal load have reached the CommBuf while the
CompD waits for that older load. Then the load's item can never enter, and
the CompD waits forever.

**The counter rule.** Each terminal load buffer entry has a counter, cleared
when it enters:

* when an entry commits, every *older* entry's counter increments;
* when a PRODUCE commits, *every* entry's counter increments.

The counter therefore counts the younger items that have overtaken the
entry. When the oldest entry's counter reaches N−1 = 63, two things happen:

* only that entry may commit;
* `block_produce` holds back PRODUCE commits.

So at most 63 younger items can ever be ahead of it, and the CommBuf keeps
room. In this design, when PRODUCE commits are not blocked they have priority
over terminal-load commits on the CommQ's single push port.

**Organisation.** The buffer is a CAM with an age matrix. A partial commit
takes the lowest free slot. `older[j][i]` records that slot *j* entered
before slot *i*. This gives, in one cycle:

* the oldest entry (for the limit);
* the oldest ready entry (the one that commits);
* the set of entries older than the one committing (for the counters).

## Stores: pairing addresses with values

**Store address buffer (SAB)** (`store_address_buffer`, 128 entries). A
STORE_ADDR reserves the tail entry at dispatch (`sa_al_*`, which returns its
st_id) and fills in the address when it is computed (`sa_aw_*`). When it
retires from the SuppD ROB (`sa_rt_valid`, in program order), its **awaiting**
bit is set.

**Store value buffer (SVB)** (`store_value_buffer`, 128 entries). On the
CompD, a STORE_VAL or STORE_INV reserves an SVB entry at dispatch
(`sv_al_*`). The value is written when computed (`sv_wr_*`). At commit
(`sv_cm_valid`), the value goes to the **head** of the SAB:

* If the head is awaiting, the pair is complete. The address buffer writes
  `(address, value)` to memory (`mem_*`, with a ready from the cache), or
  writes nothing for a STORE_INV. The entry is then freed.
* If the head is not awaiting yet, `sv_cm_ready` stays low and the CompD
  stalls. This happens when the CompD has temporarily caught up with the
  SuppD.

Because values arrive strictly in program order at the SAB head, memory sees
the stores in program order.

## Decoupled store-to-load forwarding

The SuppD may need to load a location whose store value only the CompD
knows. An example is `c[i] = f(c[i-1])`, where the SuppD reloads `c[i-1]`.
Reading memory would return a stale value.

**On the SuppD side.** When a LOAD_PRODUCE partially commits, the address
buffer is searched for the youngest awaiting store to the same address. At
that moment "awaiting" marks exactly the stores older than the load. On a
hit, the load needs no memory data. It enters the terminal load buffer
already complete. Its data field holds the store's **st_id** and its **Fwd**
bit is set (`lp_fwd` reports this).

**On the CompD side.** The CONSUME finds a CommBuf item with Fwd = 1. It reads
the value from the SVB entry that the st_id names. Since the SVB is a FIFO
indexed by st_id modulo its size, this is the published "st_id minus the
number of released entries". `cs_hit` is asserted only once that value has
been written.

**Keeping the SVB entry alive.** The SVB entry must stay until every
forwarded CONSUME has used it:

* Each SAB entry counts the loads forwarded from it (Cnt, 4 bits). A forward
  made in the very cycle the entry leaves is included.
* When the store leaves the SAB, the count is sent to the SVB.
* Every committed forwarded CONSUME decrements the SVB entry's count.
* The oldest SVB entry is freed once it has committed, its count has arrived,
  and the count has drained to zero.

The count can arrive after some uses, so the remaining count is kept two bits
wider than Cnt.

A forward candidate whose Cnt is already 15 makes the partial commit wait.

The SAB also has a dependence-check port (`dc_*`) for ordinary loads. It
reports whether an older store has the same address or has no address yet.

## Link compression

Much of the forwarded data repeats, or stays within a narrow range.

**Tables on both sides.** The **frequent-value CAM** (`fv_compressor`, 16
entries, 4 ways, true LRU) remembers recently sent values. The
**frequent-value table** (`fv_decompressor`) is a copy of it on the CompD
side. Both sides apply the same sequence of updates, in the shared `fv_table`
module, so the copies stay identical without any synchronisation traffic.
The code for a hit is the entry's location, set × 4 + way. For example, a
hit in set 6, way 2 is sent as 26.

The compressor has two modes. In the base mode the set index is the low bits
of the value. In the extended mode it is value bits [7:6], so a range of 64
integers shares an entry.

| Mode | Code | Meaning | Bits on the link |
|---|---|---|---|
| base (`EXTENDED=0`) | 1 + index | whole 32-bit value hit | 1 + 4 |
| base | 0 + value | miss | 1 + 32 |
| extended (default) | `01` | integer hit on bits [31:6]; index + the 6 low bits | 2 + 4 + 6 |
| extended | `10` | floating-point value hit on all 32 bits; index | 2 + 4 |
| extended | `11` | float missed, but its 9 sign/exponent bits hit a 4-entry table; 2-bit index + 23-bit mantissa | 2 + 2 + 23 |
| extended | `00` | uncompressed | 2 + 32 |

**Design rules here.** The published scheme does not settle the following,
and this design decides them as shown:

* The FVC stores whole 32-bit values. An integer compares only bits [31:6].
  A float compares all 32 bits.
* The sign/exponent table is updated on *every* uncompressed item. The
  2-bit code has no value meaning "uncompressed float", so the receiver
  cannot tell floats from integers, and both sides must update the same
  way.
* Forwarded items carry a store id, not data. They bypass the tables.
* Whether a value is a float comes from the `fp` flag of the PRODUCE or
  LOAD_PRODUCE (`pr_fp`, `lp_fp`).

`link_valid`/`link_nbits` report each transfer and its size, so the traffic
can be measured.

## Top level

`desc_top` wires the blocks together. Its parameters default to the main
configuration:

| Parameter | Default | Meaning |
|---|---|---|
| `EXTENDED` | 1 | extended compression scheme |
| `Q_DEPTH` | 512 | CommQ items |
| `CB_DEPTH` | 64 | CommBuf entries, and N of the reordering limit |
| `TL_DEPTH` | 32 | terminal load buffer entries (size chosen here) |
| `SA_DEPTH`, `SV_DEPTH` | 128 | store address / value buffer entries |

Shared sizes and types are in `desc_pkg`:

* `comm_item_t`, the CommQ item;
* `link_word_t`, the link word;
* `cmp_kind_e`, the compression code.

Port groups:

* `pr_*` — PRODUCE commit.
* `lp_*` and `ld_resp_*` — LOAD_PRODUCE partial commit and the load's memory
  response.
* `sa_*` — STORE_ADDR dispatch, address, retire and flush.
* `dc_*` — dependence check for ordinary loads.
* `mem_*` — store writes to memory.
* `cs_*` and `cc_*` — CONSUME lookup and commit.
* `wake_*` — the CONSUME wake-up broadcast.
* `sv_*` — STORE_VAL/STORE_INV dispatch, value, commit and flush.
* `link_*`, `commq_count`, `commbuf_count` — observation only.

All handshakes are valid/ready and take effect at the rising clock edge.
Reset (`rst_n`) is asynchronous and active low.

## Where this departs from the published design, and what is missing

**Latency.** CommQ to CommBuf takes 2 cycles instead of 1, because of the
compression and decompression stages.

**Completed LOAD_PRODUCEs.** A LOAD_PRODUCE whose data came back before it
reached the ROB head still passes through the terminal load buffer, for one
cycle, rather than committing straight into the CommQ. Its effect on the
reordering counters is the same as a PRODUCE commit.

**Choices the published design leaves open.** These are this design's own:

* the terminal load buffer size (32) and its age-matrix organisation;
* PRODUCE priority on the CommQ push port;
* true LRU rather than pseudo-LRU;
* the extended-mode set index;
* the sign/exponent-table update rule;
* the 4-bit saturating forward counter, and the stall when it is full;
* the flush ports on the SAB and SVB, which roll back mis-speculated
  reservations;
* the 6-bit memory tag and the 12-bit id.

**Not built:**

* the SuppD and CompD cores;
* caches, MSHRs and DRAM;
* the compiler that produces the two slices;
* a serializer for a serial link;
* precise exceptions on terminal loads (a faulting load simply never
  returns);
* the "magic address" path that sends a value from the CompD back to the
  SuppD (it can be done with an ordinary STORE_ADDR/STORE_VAL pair through
  memory).

**Stale-load race.** A store can leave the SAB between a load's issue and
the load's partial commit. That race is left to the SuppD core's own
load/store ordering.

**STORE_INV and forwarding.** Forwarding from a store that later turns out
to be a STORE_INV is not handled. The forwarded CONSUME would wait forever.
The compiler must not create that pattern.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_comm_queue` | FIFO order against a queue model, full/empty, simultaneous push and pop, push-to-head latency |
| `tb_comm_buffer` | out-of-order lookup and release against a model, wake broadcast, full buffer |
| `tb_terminal_load_buffer` | out-of-order commit, the N−1 limit and `block_produce` (directed), then random traffic compared every cycle with a program-ordered reference model |
| `tb_store_address_buffer` | pairing, awaiting stall, STORE_INV, forward search (youngest awaiting match), returned forward counts, dependence check, flush, capacity |
| `tb_store_value_buffer` | st_id read, ordered hand-off to the SAB, release only after the count drains, flush |
| `tb_fv_codec` | compressor (both modes): every link word against an independent model (`fv_ref_pkg`), decoded back by the model's decoder, one-cycle latency, every code exercised |
| `tb_fv_decompressor` | both modes: words made by the model's encoder decode to the original values under back-pressure on both sides; one-cycle latency; every code exercised |
| `tb_desc_top` | end to end at the default sizes (see below) |
| `tb_fvc_size_sweep` | the same stream through 16-, 32-, 64-, 128- and 256-entry extended compressor/decompressor pairs and a 16-entry base pair: every value decoded exactly, traffic per size reported |
| `tb_commq_size_sweep` | the whole top with CommQ + CommBuf = 128, 256, 512 (CommBuf 64) on one program with occasional 2000-cycle loads: every value checked, cycles per size reported |

### The end-to-end test

`tb_desc_top` plays the SuppD, the CompD and the memory. Memory latency is
random, some loads take 600 cycles, and memory sometimes refuses writes. The
test runs two phases:

1. A stream of 1200 PRODUCEs meets a slow consumer.
2. 400 iterations of a kernel:
   `c[i] = v[a[i]] + 3*b[i] + c[i-1]`, and `d[i] = c[i] ^ 0x5555` only when
   `c[i]` is odd (the STORE_INV case).

In this kernel, `v[a[i]]` is an indirect terminal load, `b[i]` is a float
PRODUCE, and the reload of `c[i-1]` is served by decoupled forwarding. The
test also injects wrong-path stores that are then flushed.

**Checks.** Every consumed value and the final memory are compared with a
sequential reference. The idle push-to-CommBuf latency is checked (3 edges).

**Mechanism counts.** The test counts each mechanism and fails if any of them
never happens:

* forwarding;
* out-of-order arrival;
* reordering-limit cycles;
* CommQ full and CommBuf full;
* CONSUME waits with wake-up;
* STORE_VAL stalls on a non-awaiting SAB head;
* STORE_INV;
* both flushes;
* memory back-pressure;
* each of the four link codes.

A typical run takes about 14,700 cycles and 0.1 s:

| Mechanism | Count |
|---|---|
| forwarded loads | 389 |
| reordering-limit cycles | about 2,000 |
| CommQ-full cycles | 713 |
| CommBuf-full cycles | about 4,600 |

On this synthetic data, compression sends about 80 % of the uncompressed
bits.

### Size sweeps

In `tb_fvc_size_sweep` the stream has a working set of about 96 values. The
table size trades hit rate against index width:

| Table | Hit rate | Share of the uncompressed bits |
|---|---|---|
| 16 entries | 33 % | 84 % |
| 32 entries | 50 % | 71 % |
| 64 entries | 66 % | 62 % |
| 128 entries | 75 % | 57 % |
| 256 entries | 80 % | 55 % |
| 16 entries, base mode | 9 % | 94 % |

In `tb_commq_size_sweep` the CompD is the bottleneck. The reordering limit
keeps the SuppD within 63 items of any outstanding load whatever the queue
size. As a result the three queue sizes finish within about 2.5 % of each
other: 27,810, 27,123 and 27,135 cycles for 3,000 items.

### Running

With Verilator 5 (two-state simulation, `--timing`):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/desc_pkg.sv tb/fv_ref_pkg.sv rtl/fv_table.sv rtl/fv_compressor.sv \
  rtl/fv_decompressor.sv rtl/comm_queue.sv rtl/comm_buffer.sv \
  rtl/terminal_load_buffer.sv rtl/store_address_buffer.sv \
  rtl/store_value_buffer.sv rtl/desc_top.sv tb/tb_desc_top.sv \
  --top-module tb_desc_top -Mdir obj_top
./obj_top/Vtb_desc_top +verilator+seed+7
```

For a unit test, replace the testbench and top module, for example
`tb/tb_store_value_buffer.sv --top-module tb_store_value_buffer`. Only the
package and the modules that test uses are needed.

## Files

* `rtl/desc_pkg.sv` — sizes, item and link-word types, compression codes.
* `rtl/desc_top.sv` — the top level.
* `rtl/comm_queue.sv`, `rtl/comm_buffer.sv` — the forward path.
* `rtl/terminal_load_buffer.sv` — terminal loads and the reordering limit.
* `rtl/store_address_buffer.sv`, `rtl/store_value_buffer.sv` — the store
  path and forwarding.
* `rtl/fv_table.sv`, `rtl/fv_compressor.sv`, `rtl/fv_decompressor.sv` —
  link compression.
* `tb/` — testbenches, and `fv_ref_pkg.sv`, the reference compression model.
