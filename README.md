# TCOR: a tile cache with optimal replacement

A tile-based GPU bins every primitive of a frame into a Parameter Buffer in
memory and then reads it back tile by tile. The write order and the read order
are both known before the reads start. When a primitive is binned, the Polygon
List Builder already knows the next tile that will read it. So the Tile Cache
that sits in front of the Parameter Buffer does not have to guess which line
to evict. It can use Belady's optimal policy (OPT): evict the line whose next
use lies farthest in the future.

TCOR makes this cheap. Each primitive's list entry carries an **OPT Number**,
which is the ID of the next tile that uses the primitive. Tiles are numbered in
traversal order, so "farthest next use" is just "largest OPT Number". The same
knowledge also tells the shared L2 when a block of Parameter Buffer data has
been read for the last time in the frame. Such dead blocks are evicted first
and never written back to memory.

This repository holds synthesizable SystemVerilog for that memory subsystem:
- the Polygon List Builder;
- the Tile Fetcher;
- the split Tile Cache: a Primitive List Cache and an Attribute Cache with OPT replacement;
- the L2 with dead-line-aware replacement.

It also has self-checking testbenches for every block.

## The Parameter Buffer and its two halves

The Parameter Buffer has two parts:

- **PB-Lists** holds one list per tile. An entry is a 32-bit PMD (primitive
  metadata): `{prim_id[15:0], num_attr[3:0], opt[11:0]}`.
- **PB-Attributes** holds the attributes of each primitive. An attribute is 48
  bytes, one per 64-byte memory block.

The lists are **interleaved**:
- The first 16 PMDs of every tile come first, one 64-byte block per tile, tile 0 first.
- Then the next 16 PMDs of every tile, and so on.
- PMD *i* of tile *t* is at block `pb_lists_ptr + (i/16)*NUM_TILES + t`, slot `i % 16`.

Because of this layout, each block of PB-Lists belongs to exactly one tile.
That tile's ID can be recovered from the address: `(addr - pb_lists_ptr) % NUM_TILES`.

Primitive IDs are handed out in arrival order and advance by the primitive's
attribute count. A primitive's ID is therefore also the block offset of its
first attribute: attribute *k* of primitive *p* lives at block
`pb_attr_ptr + p + k`. The 16 bytes a 48-byte attribute leaves free in its
block hold the 12-bit ID of the last tile that reads the primitive, in bits
[395:384].

## OPT Numbers and the Polygon List Builder (`polygon_list_builder`)

For each primitive, the binner hands the builder three things:
- the attribute count;
- the IDs of the tiles the primitive overlaps, in traversal order, with the last one flagged;
- the attributes.

The builder appends one PMD to each of those tiles' lists. The PMD written for
tile *t_j* carries *t_(j+1)* as its OPT Number. The PMD for the last tile
carries `OPT_NULL` (all ones), which means "never again". Each PMD therefore
goes out one tile later, when its successor is known.

PMDs are written through the Primitive List Cache. The builder keeps a counter
per tile for its list length. The Tile Fetcher reads this counter back. A list
that reaches `MAX_PRIMS_PER_TILE` drops further PMDs and raises
`ev_list_overflow`.

After the PMDs, the builder writes the primitive to the Attribute Cache. It
sends a header, then one beat per attribute:
- The header's OPT Number is the *first* tile, which is the first read that will follow.
- It also carries the *last* tile, for the L2.

## The Attribute Cache (`attribute_cache`, `attribute_buffer`, `opt_victim_select`, `xor_index`)

This is the core of the design. It caches whole primitives rather than memory
blocks, and it has two structures.

**Primitive Buffer.** It has SETS x WAYS lines (default 128 x 4). Each line holds:
- valid, lock and dirty bits;
- the tag;
- the 12-bit OPT Number;
- the 10-bit Attribute Buffer Pointer (ABP) of the primitive's first attribute.

The set comes from an XOR hash of the Primitive ID (`xor_index`): the low 7 ID
bits XOR the tag folded onto 7 bits. Because the fold depends only on the tag,
the hash is inverted for write-back addresses.

**Attribute Buffer.** It has 1024 entries of one 48-byte attribute each, with a
valid bit, a lock count and a next pointer. A primitive's attributes form a
linked list. The last entry points to itself, since every 10-bit value is a
real entry. Unused entries form a free list, built at reset as 0 -> 1 -> ... .
A primitive is admitted only when the free list holds enough entries for all
its attributes.

**Reads** come from the Tile Fetcher, with the PMD as the request.
- On a hit:
  - the line and the first attribute are locked;
  - the line's OPT Number is replaced by the PMD's, which is the primitive's next use after this one;
  - the ABP is returned.
- On a miss:
  1. A way is chosen by OPT (`opt_victim_select`): an empty way if there is one, else the unlocked way with the greatest OPT Number.
  2. Enough Attribute Buffer entries are freed.
  3. The attributes are fetched from the L2 one after another and chained into a new list.
  4. The ABP is returned.

**Writes** come from the Polygon List Builder.
- If the set has an empty way, the primitive is stored dirty.
- If not, the greatest unlocked OPT Number in the set is compared with the request's:
  - greater: that line is evicted and the write is cached;
  - equal or smaller: every resident primitive is needed sooner, so the write **bypasses** to the L2 (`ev_bypass`). Ties bypass.

**Evictions** only take unlocked lines. A dirty victim writes each of its
attributes back to the L2 (`ev_writeback`), together with the last-tile field.
Clean victims simply return their entries to the free list.

**Space shortage.** A set may have a free way while the Attribute Buffer is
short of entries. The cache then scans every set, one per cycle, for the
unlocked primitive with the greatest OPT Number and evicts it
(`ev_space_evict`). It repeats until there is room.
- A write whose OPT Number is not below that of the best candidate bypasses instead.
- A read that finds nothing evictable waits for the Rasterizer to release a primitive (`ev_lock_stall`).

**Locks.** A primitive stays locked from the read hit or fill until the
Rasterizer has consumed it. The Rasterizer reads the attribute list directly:
- it puts a pointer on `rs_ptr` and gets `rs_data` and `rs_next` back in the same cycle;
- when done, it releases the primitive with `rs_release` / `rs_release_ptr`.

The lock is a small counter, not a bit, because the same primitive can sit in
the output queue for two tiles at once.

## The Primitive List Cache (`primitive_list_cache`)

This is a conventional write-back, write-allocate, set-associative cache with
LRU replacement (age counters). It has 64-byte lines of 16 PMDs; the default
is 64 sets x 4 ways = 16 KiB. Requests are single PMDs: a block address, a slot
and 32 bits of data. A write miss fetches the line before merging. A dirty
victim is written back first. L2 requests carry the PB-Lists type.

## Dead lines in the L2 (`l2_cache`, `l2_victim_select`)

The L2 is 2048 sets x 8 ways x 64 B = 1 MiB, with a 12-cycle hit. Each line
carries two extra fields:
- a 2-bit type: PB-Lists, PB-Attributes or other;
- a 12-bit last tile. For PB-Lists it comes from the address, as above. For PB-Attributes it comes from bits [395:384] of the written block.

The L2 counts finished tiles (`tile_done` pulses from the Tile Fetcher,
cleared by `frame_start`). A Parameter Buffer line whose last tile is below that
count is **dead**.

The victim is taken in this order, with LRU inside each class:
1. an invalid way;
2. a dead line;
3. a line of other data;
4. a live Parameter Buffer line.

A dirty dead victim is dropped without a write-back (`ev_wb_skipped`). Other
data is preferred over live Parameter Buffer data because the other L1 caches
(vertices, textures, instructions) only hold clean lines, and because the
Parameter Buffer data will certainly be read again.

## Tile Fetcher and the Rasterizer side (`tile_fetcher`, `sync_fifo`)

After `fetch_start`, the fetcher visits tiles 0 .. NUM_TILES-1. For each tile
it reads the list length, and then for each entry:
1. reads the PMD through the Primitive List Cache;
2. asks the Attribute Cache for the primitive;
3. pushes the returned ABP into the output queue (`sync_fifo`, depth QDEPTH).

The Rasterizer pops the queue through `rq_valid` / `rq_ready` / `rq_abp`. A
full queue stalls the fetcher (`ev_queue_stall`). A tile is finished once its
last ABP has been pushed; `tile_done` then pulses and the L2 advances its count.

## Top level (`tcor_top`)

The top wires the builder and the fetcher to the two halves of the Tile Cache.
- Both stages share the Primitive List Cache, builder first.
- A fixed-priority arbiter (`l2_arbiter`) shares the single L2 port. The order is:
  1. the Attribute Cache;
  2. the Primitive List Cache;
  3. an external port (`ext_*`) that stands for the GPU's other L1 caches.

Ports, all plain signals or structs from `tcor_pkg`:

| Group | Signals | Meaning |
|---|---|---|
| control | `frame_start`, `fetch_start`, `pb_lists_ptr`, `pb_attr_ptr`, `fetch_busy`, `fetch_done`, `tiles_done` | start a frame (clears the tile count, restarts ID allocation), start fetching, base block addresses |
| binner | `prim_valid/ready`, `prim_num_attr`, `tile_valid/ready`, `tile_id`, `tile_last`, `attr_valid/ready`, `attr_data`, `prim_done` | one primitive: header, overlapped tiles, attributes |
| Rasterizer | `rq_valid/ready`, `rq_abp`, `rs_ptr`, `rs_data`, `rs_next`, `rs_release`, `rs_release_ptr` | output queue and Attribute Buffer access |
| other L1s | `ext_req_valid/ready`, `ext_req`, `ext_resp_valid`, `ext_resp_data` | L2 requests of type "other" |
| memory | `mem_req_valid/ready`, `mem_we`, `mem_addr`, `mem_wdata`, `mem_resp_valid`, `mem_rdata` | 64-byte block reads and writes |
| events | `ev` (`tcor_events_t`) | one-cycle pulses: hits, misses, bypasses, evictions, write-backs, dead victims, skipped write-backs, overflows, stalls, finished tiles |

All handshakes are valid/ready on the rising clock edge. The reset `rst_n` is
active low and asynchronous.

## Timing

- Primitive List Cache and Attribute Cache hits answer in the cycle after the request is accepted. A testbench sampling at clock edges sees the answer at the second edge.
- L2 hits answer `HIT_LAT` (12) cycles after acceptance.
- Misses add the L2 or memory latency for each block. An Attribute Cache miss costs one L2 access per attribute.
- The scan for space takes one cycle per Primitive Buffer set.
- Every cache is blocking: it serves one request at a time.

## Where this RTL departs from the published design

- **Blocking caches, no MSHRs.** Requests complete in order. The Tile Fetcher therefore needs no reorder queue between memory replies and its output queue.
- **Lock counter** instead of a lock bit, as explained above.
- **Lists end with a self-pointer** rather than a null pointer.
- **How the space shortage picks victims** (a scan of all sets for the greatest unlocked OPT Number) is this design's choice. So is the rule that a write bypasses when that scan finds nothing better.
- **Each Primitive Buffer line also stores the primitive's last tile**, so that write-backs can tag their blocks for the L2.
- **A write whose Primitive ID is still cached from the previous frame** evicts the stale copy first.
- **Field widths and details.** The 16/4 split of the PMD's non-OPT bits, the XOR fold, the Primitive Buffer set count (128), the queue depth and the arbitration order are all this design's own.
- **Tile traversal.** Tile IDs are numbered in traversal order. The Z-order traversal of the reference configuration is the binner's mapping from screen position to ID, outside this RTL.
- **What is not built here:** the binning overlap test, the geometry and raster pipelines, the other L1 caches and main memory. Their signals are ports of the top.

## Sizes and configurations

The defaults are the reference configuration:
- a 1960x768 screen in 32x32 tiles, which gives 1488 tiles;
- a 64 KiB Tile Cache, split into a 16 KiB Primitive List Cache and a 48 KiB Attribute Cache (1024 x 48 B);
- a 1 MiB 8-way L2 with a 12-cycle hit.

The larger 128 KiB Tile Cache (112 KiB Attribute Cache) needs `AC_ENTRIES=2389`, which gives 12-bit pointers. It is not the default.

Limits per frame:
- 16-bit Primitive IDs address 4 MiB of PB-Attributes. This covers the 0.1 to 1.8 MiB Parameter Buffer footprints typical of mobile games.
- `MAX_PRIMS_PER_TILE` (1024) limits each tile list.

## Simulating

Every block has a testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  --top-module tb_attribute_cache rtl/tcor_pkg.sv tb/tb_attribute_cache.sv
./obj_dir/Vtb_attribute_cache
```

| Testbench | What it checks |
|---|---|
| `tb_xor_index`, `tb_opt_victim_select`, `tb_l2_victim_select` | random inputs against reference models |
| `tb_attribute_buffer` | list building, the free list, free counts and locks |
| `tb_attribute_cache` | a three-primitive, nine-read example with hand-computed hits, misses, bypass and write-back counts, then random traffic that forces space evictions, checked against the data written |
| `tb_primitive_list_cache`, `tb_l2_cache` | random traffic against reference memories. The L2 test also checks the 12-cycle hit, dead-victim choice, skipped write-backs and the class priorities |
| `tb_polygon_list_builder`, `tb_tile_fetcher` | list contents, OPT Numbers, overflow, fetch order, queue stalls |
| `tb_tcor_top` | end to end at reduced sizes: the worked example, then a random frame with L2 traffic from the external port and a slow Rasterizer. It counts every event type and fails if any never occurs |
| `tb_tcor_full` | one complete frame at the default sizes (1488 tiles, full caches): every primitive must arrive in order with its attributes, and every read must hit |

The testbenches use two behavioural models: `tb_main_memory` (random 50–100
cycle latency) and `tb_l2_stub`.
