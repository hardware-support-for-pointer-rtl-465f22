# Hardware access table (HAT) for pointer-safety checking

Safe-pointer schemes for C and C++ attach a unique ID to every object. Before
each dereference they check that the object is still live: its ID must still
be in a table of live IDs. Allocations and procedure calls insert IDs,
deallocations and returns remove them, and checks look them up. In software
these hash-table operations cost more than anything else the checker does.

This RTL moves the table into hardware that sits beside the L2 cache. The
**hardware access table (HAT)** is a small 4-way set-associative store of
keys, built like a cache. It has one addition: every set owns a linked chain
of overflow lines in a pinned region of memory, reached through the L2 cache.
Elements that do not fit in the set are kept in that chain. When a lookup
misses in the set, the HAT fetches the chain one line at a time and searches
each line with the same four comparators. The software does not do this work.

The HAT comes in two forms:

* **Specialised HAT (`spechat`)**: used only for liveness checking. The
  processor writes each request into a memory-mapped **request queue** as two
  words, the request type and then the ID, and does not wait for an answer. A
  small **monitor FSM** runs each request on a tag-only HAT. A Find or Remove
  of an ID that is not live is a temporal safety violation. It stops the
  monitor and reports the request. Each element is one word, so a 64-byte line
  holds 15 IDs.
* **Generic HAT (`genhat`)**: a key→data associative memory that user code
  reaches through two new instructions, `HAT_find dest, key` and
  `HAT_insert data, key`. Inserting NULL (0) removes a key, and a find of a
  missing key returns NULL. A request takes 2 cycles to reach the HAT and 2
  cycles to return. Each element is two words, so a line holds 7.

`hat_top` contains both forms side by side. They share nothing, and each
has its own L2 port.

## Files

| file | contents |
|---|---|
| `rtl/hat_pkg.sv` | operation enum, queue type codes, empty-slot marker, event struct |
| `rtl/hat_compare.sv` | four lanes, each a 2:1 mux (cache way or line-buffer entry) feeding an equality comparator |
| `rtl/hat_core.sv` | the HAT: tag/data arrays, LRU, overflow pointers, line buffer, chain search, writeback, line allocator |
| `rtl/hat_queue.sv` | 64-word request FIFO |
| `rtl/hat_monitor_fsm.sv` | monitor state machine S/R/I/F/W/E |
| `rtl/spechat.sv` | queue + monitor + tag-only `hat_core` |
| `rtl/genhat.sv` | instruction interface with 2+2 cycles of wire delay + key/data `hat_core` |
| `rtl/hat_top.sv` | both systems side by side |
| `tb/l2_model.sv` | behavioural L2 for simulation only (associative array, 11-cycle reads) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_hat_top_full` at the default size |

## The table and its overflow chains (`hat_core`)

**Sets and lookup.** The default has 64 sets of 4 ways, which is 256
elements. The set index is the low 6 bits of the key, so the hash function is
just a bit mask. In one cycle a lookup compares the four ways of the set.
Replacement is LRU. Each entry has a valid bit, a dirty bit, the key, and in
the generic form a data word.

**Overflow memory.** The region is 4 MB, which is 65 536 lines of 64 bytes.
It starts at `OVF_BASE` and is reserved when the program starts. A line is
taken from it, with a simple incrementing pointer, when a set's chain has no
empty slot left for an evicted element. The new line is initialised to all
empty. Lines are never given back. A line is laid out as 32-bit words:

```
specialised:  w0..w14 = ID slots                        w15 = next line address
generic:      w(2j) = key j, w(2j+1) = data j, j=0..6   w14 unused, w15 = next
empty slot:   key == 32'hFFFF_FFFF     end of chain: next == 0
```

The key `32'hFFFF_FFFF` is therefore reserved, and an assertion checks that no
request uses it. The per-set overflow pointer holds the address of the first
line of the chain, or 0 if the set has no chain yet.

**Search on a miss.** The HAT reads the first line of the chain into the line
buffer (buffer "B"). It compares the buffer four slots per cycle: 4 cycles
for a specialised line and 2 for a generic one. It then follows the next
pointer. The search stops at a match or at the end of the chain. With the
model's 11-cycle L2, each line searched costs about 16 cycles.

**Exclusion algorithm (default, `EXCLUSION=1`).** An element is kept either in
the cache or in overflow memory, never in both.
* A Find (or a generic Insert) that hits in overflow moves the element into
  the cache and empties its slot.
* Every evicted element is written back to the **first empty slot of the
  chain**. This keeps recently used elements near the head of the chain. If
  that first empty slot is in the line that was just searched, the move and
  the writeback are done in a single line write. Otherwise the chain is
  walked again from its head.
* A Remove that hits in the cache is finished at once.

Worked example, all keys in one set. The cache holds 0, 64, 256 and 192, and
the overflow line holds 128, 320, 384 and one empty slot. After `Find 128`:
* exclusion: the cache holds 128, 64, 256, 192 and the line holds 0, 320,
  384, empty.
* inclusion: the line holds 128, 320, 384, 0.

`tb_hat_core` replays this example on both algorithms and checks the line
word by word.

**Inclusion algorithm (`EXCLUSION=0`, tag-only form only).**
* An overflow hit is copied into the cache as a clean entry.
* Only dirty (newly inserted) entries are written back.
* A Remove that hits a clean entry also clears its overflow copy.
* A Remove that hits a dirty entry is finished at once, because that ID has
  never been evicted.

**Insert misses.** The specialised HAT sees each ID inserted only once, so an
Insert that misses is placed in the cache without searching overflow. The
generic HAT does search overflow, so that a key is never stored twice.

**Running out of memory.** When no line is left, the evicted element is
dropped and the sticky `ovf_exhausted` flag is set. The table keeps running,
with the accepted loss of accuracy. A later check of a dropped ID is reported
as a violation, which is a false positive.

**Timing.** The core handles one operation at a time.
* A hit answers 2 cycles after the request is accepted: one cycle of table
  access and one to register the answer.
* `resp_valid` pulses as soon as the result is known. Any writeback that
  follows keeps `busy` high and `req_ready` low.

**L2 port.** The port uses `req_valid`/`req_ready` with `req_we` and an
address. A read returns one line on `resp_valid`, in order, any number of
cycles later. Writes get no reply.

## Monitor FSM and request queue (`spechat`)

Request words are `0` = remove, `1` = insert, `2` = find, each followed by
the ID. The FSM works as follows:

```
S --type 0--> R --ID X / Remove(X)--> W --HAT 1--> S
S --type 1--> I --ID X / Insert(X)--> W --HAT 0--> E (stop; error, err_op, err_id)
S --type 2--> F --ID X / Find(X)----> W
```

* Each transition takes one cycle.
* A word is taken from the queue only in S, R, I or F. In R, I and F it is
  taken only when the HAT is ready.
* An unknown type word is thrown away.
* E is left only by reset.
* Insert always answers 1, so only a Find or Remove of a non-live ID leads
  to E.

The processor is held back only when the 64-word queue is full.

Timing: a lone Find that hits ends with `done_pulse` 4 cycles after its type
word is written into an empty queue. `tb_spechat` checks this.

## Generic instruction interface (`genhat`)

* A request carries `req_op` (`HAT_FIND` or `HAT_INSERT`), the key, the data
  and a destination tag.
* It passes through `REQ_LAT` = 2 register stages to the HAT. The answer
  passes through `RESP_LAT` = 2 stages back, together with the tag.
* Inserts get an answer as well, so that the instruction can commit.
* Only one request is in flight at a time.
* A find that hits answers `REQ_LAT + 2 + RESP_LAT` = 6 cycles after it is
  accepted.

The load/store queue decides the order of finds and inserts that use the same
key, the same way it orders loads and stores. That queue is part of the
processor and is not in this RTL.

## Parameters and what they default to

| parameter | default | meaning |
|---|---|---|
| `SETS` | 64 | sets of 4 ways (256 elements) |
| `LINE_BYTES` | 64 | L2 line size |
| `OVF_LINES` | 65536 | overflow region (4 MB) |
| `OVF_BASE` | `0x0040_0000` (generic side in `hat_top`: `0x0080_0000`) | start of the region; must be non-zero |
| `Q_DEPTH` | 64 | request queue words |
| `EXCLUSION` | 1 | overflow algorithm |
| `REQ_LAT`, `RESP_LAT` | 2, 2 | generic interface wire delay |

At the defaults, `hat_top` synthesises to about 32 k flip-flops. Most of them
are the two tag/data arrays, which are written as registers.

## How far it can be trusted; departures

**Verified.** Every module has a self-checking testbench with a watchdog.
* Random operation streams are checked against reference models: a set of
  live IDs, or a key→data map. This is done on small configurations (4 sets)
  so that chains several lines long form.
* The Find 128 example is checked for both algorithms.
* Running out of overflow memory, a full queue, error detection and NULL
  handling are exercised.
* The hit latencies are checked.
* `tb_hat_top` runs both systems at once and counts every mechanism.
* `tb_hat_top_full` runs the default-size top. It allocates 300 IDs into one
  set, 20 overflow lines in all.

**Choices made in this RTL.**
* LRU replacement.
* The empty-slot marker and the line layout.
* The incrementing-pointer line allocator, which never frees lines.
* The L2 and request handshakes.
* Registered answers, one cycle after the table access.
* The generic HAT searches overflow on an Insert miss.
* One generic request in flight at a time.
* An unknown queue type word is thrown away.
* The error state is left only by reset.

**Capacity.** The reference capacity of 256 elements was followed. A
figure of 8 KB given elsewhere for the HAT cache was not used.

**Not built.**
* The processor core and its two new opcodes.
* The HAT bit in the load/store queue.
* The L1 and L2 caches.
* The optional TLB for dynamically allocated overflow memory. The design uses
  a pinned physical region instead.

**Not supported.** The inclusion algorithm for the generic HAT.

## Simulating

Each testbench is a top-level module. For example:

```
verilator --binary --timing --assert --top-module tb_hat_top -y rtl -y tb +libext+.sv \
          rtl/hat_pkg.sv tb/tb_hat_top.sv
./obj_dir/Vtb_hat_top
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. Swap in
another `tb_*` name to run a different testbench. All of them finish in
seconds.
