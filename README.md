# RBlox: range locks in hardware for accelerator data structures

A spatial dataflow accelerator has many compute tiles that walk shared
pointer-based data structures: B+trees, skip lists, hash buckets. They do
not issue loads and stores, so the usual tools for concurrent updates
(atomics, LL/SC, per-node mutexes) do not fit. This design synchronizes
tiles with **range locks** on data-structure *keys*, not on addresses. A
tile that will insert key 25 into a B+tree asks to lock the key range of
the subtree it will modify, for example `[24,34]`. The lock unit grants
the request if no conflicting lock overlaps that range.

Key ranges make two things cheap:

- **One lock per update.** An update enters at the root with a shared lock
  on the root's range. As it descends to a "safe" node, it *trims* that
  lock: the range contracts to the safe node's range and turns exclusive.
  This is hand-over-hand locking done by narrowing one entry. The lock
  table therefore needs one entry per tile, never more.
- **Instant locking.** The unit remembers recently unlocked safe ranges with
  the node pointer that goes with each. A later update to a key in such a
  range can lock it and jump straight to the node, skipping the descent
  from the root. Locking the range directly is equivalent to taking it
  through the ordered descent, because both pass the same conflict check.

Next to the lock unit sits a second, independent structure. It is a
**range-tagged index cache** (the METAL-IX scheme): a cache of index nodes
tagged by each node's `[Lo,Hi]` key range instead of its address. A key
lookup that hits an inner node starts its walk there. A lookup that hits a
leaf is answered without touching memory.

```
 tile 0 ..127                       range-lock unit
 req/resp ports ─► round-robin ─► link (2) ─► rblox_ctrl ─► link (2) ─► tile_resp_valid[tile]
                   tile_arbiter   link_pipe   ├─ ltable   (locked ranges, 128 entries)
                                              └─ utable   (unlocked ranges, 4 banks x 128 sets x 8 ways)
                                                    ├─ seg_map      (range -> banks/sets)
                                                    └─ utable_bank  x4

 lookups ─► metal_ix ─┬─ ix_cache  (64 sets x 16 ways, range tags, LRU) ─ ix_child_select
                      └─ ix_walker (4 walks in flight, memory port out)  ─ ix_child_select
```

`rtl/rblox_system.sv` is the top. The compute tiles and the memory are
outside this design: their ports come out of the top.

## Lock types and when they conflict

An LTable entry holds `[Lo,Hi]`, a type (shared `SH` or exclusive `EX`)
and a bitmap of the tiles holding it. Identical shared requests *join* one
entry, so all the updates waiting at the root share a single entry.

Two entries of different tiles that overlap are compatible when:

| held \ requested | SH | EX |
|---|---|---|
| **SH** | always | only if the SH range covers the EX range |
| **EX** | only if the SH range covers the EX range | never |

The row/column asymmetry matters. A shared lock on a wide range means "I
am reading the node at this level". An exclusive lock on a sub-range means
"I am changing things strictly inside this subtree". Because the subtree is
safe, that change cannot spread upward. So new updates may enter at the
root while others mutate leaves below. A shared lock that only partly
overlaps an exclusive range, or lies inside it, must wait. So must an
exclusive lock wider than a shared one.

Taking this rule was a judgment call. The original description also states
flatly that no tile may read a range overlapping another's exclusive range.
Read literally, that blocks every update at the root whenever any leaf is
locked, which defeats the scheme's own example of several updates
descending together. Tightening it back is a one-line change in
`ltable.sv`, in the `unique case ({ent[i].ltype, p_type})`.

## The operations

Every request is an `rb_req_t`: `op`, `lo`, `hi`, `ltype`, `trim`,
`lt_idx`, `node_ptr` and `safe`. The arbiter fills in `tile` with the port
number. The response `rb_resp_t` echoes `op` and `tile` and returns `ok`,
`lt_idx`, `node_ptr`, `lo`, `hi`, `locked_any` and `locked_ex`.

| op | what it does | ok = 0 when |
|---|---|---|
| `OP_LOCK`, `trim=0` | fresh lock: join an identical SH entry or take a free one. An EX grant drops overlapping UTable entries. | conflict, or `hi < lo` |
| `OP_LOCK`, `trim=1` | contract entry `lt_idx`, optionally changing type. A sole holder updates the entry in place. If others share the entry, the tile leaves it and takes a new one (one extra clock). | not a holder, the new range is not inside the old one (a lock never widens), or conflict |
| `OP_UNLOCK` | leave entry `lt_idx`. If the entry frees and `node_ptr != 0`, the range goes into the UTable with `safe`. | not a holder |
| `OP_TRYLOCK` | key in `lo`: look up the narrowest safe UTable range holding the key. Lock it EX and remove it from the UTable. Returns its range and `node_ptr`. | UTable miss, or conflict (then take the ordered path) |
| `OP_CHECK` | a lock-free reader asks whether `[lo,hi]` overlaps other tiles' locks | an EX lock overlaps (`locked_ex`) |
| `OP_FILL` | a reader registers an unlocked safe range and its node in the UTable | any lock overlaps it |

A denied tile simply retries later. The unit queues nothing and never
blocks on a denied request.

A typical update goes like this:

```
r = LOCK(0,4095,SH)                   // enter at the root (joins the shared root entry)
... descend until a safe node [lo,hi] ...
r = LOCK(lo,hi,EX, trim=1, lt_idx=r.lt_idx)   // retry while !ok
... mutate inside [lo,hi] ...
UNLOCK(r.lt_idx, node_ptr=&node, safe=1)      // remember it for instant locking
```

Or, when the UTable may already know the key:

```
r = TRYLOCK(key); if (r.ok) { mutate at r.node_ptr; UNLOCK(...) } else ordered path
```

## Timing

The controller does one operation at a time, so each check-and-update is
atomic. An LTable access costs `LT_LAT` clocks and a UTable access
`UT_LAT` clocks, both 5. From request accept to response in `rblox_ctrl`:

| operation | clocks |
|---|---|
| check, SH lock, SH trim, unlock without registering | `LT_LAT+1` = 6 |
| EX lock or trim (UTable drop), unlock that registers, fill | `LT_LAT+UT_LAT+2` = 12 |
| trim out of a shared entry | one more |
| trylock miss | `UT_LAT+2` = 7 |
| trylock hit | `2*UT_LAT+LT_LAT+3` = 18 (look up, lock, remove) |

Seen from a tile, add 1 clock of arbitration and `LINK` = 2 clocks each
way. A lone check is answered 11 clocks after the tile raises it.

## The UTable: exact ranges in banked sets

Ranges have any width, so they cannot index a set directly. The key space
is cut into aligned segments of `2^SEG_BITS` = 256 keys. Segment `s` maps
to bank `s mod 4` and set `(s / 4) mod 128`. A range is stored in every
segment it touches, and each copy keeps the exact bounds. Ranges spanning 4
or more segments are not stored; for those the UTable is only a hint.

A trylock probes just the key's own segment: one set in one bank, 8 ways
compared at once. Among the matching safe ways the narrowest range wins. A
fill or insert replaces, in order: an entry with an identical range, an
invalid way, or the way a per-set round-robin pointer names. The UTable is
best effort. Losing an entry only sends an update down the slow path;
correctness lives entirely in the LTable.

The 256-key segment is this design's choice; the original leaves the
mapping free. It matches the 256-key block the index cache uses.

## The index cache

`ix_cache` tags each way with a node's `[Lo,Hi]` and tree level. A node is
stored in the set of every 256-key block it covers, up to `REPL_MAX` = 4
blocks. A lookup matches `Lo <= key <= Hi` in all 16 ways. If several
nodes match (a leaf and its parent), the deepest one wins. Then the child
for the key is found with a parallel `<=` against the sorted separators,
taking the first separator greater than the key (`ix_child_select`). A
lookup takes 5 clocks. Replacement is LRU.

`ix_walker` runs up to 4 walks at once. A walk gives up the search unit
while it waits for memory (*Wait*) and when it holds a node to search
(*Search*), so one search unit serves all walks. Memory responses come
back tagged and may arrive in any order. Every node the walker reads is
offered back to the cache.

`metal_ix` joins the two:

- A leaf hit answers at once (`res_short=1`, `res_nodes=0`).
- An inner-node hit starts the walk at the cached child.
- A miss walks from `root_ptr`.

Refills take the cache ahead of new lookups, and a refill offered while the
cache is busy is dropped. Counters `n_hit`, `n_miss` and `n_fill` come out
of the top.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_TILES` | 128 | tile ports; also the LTable size (one entry per tile) |
| `LINK` | 2 | link stages each way between tiles and the unit |
| `LT_LAT`, `UT_LAT` | 5, 5 | table access time in clocks |
| `UT_BANKS`, `UT_SETS`, `UT_WAYS` | 4, 128, 8 | UTable shape, 4096 entries |
| `SEG_BITS` | 8 | UTable segment, 256 keys |
| `IX_SETS`, `IX_WAYS` | 64, 16 | index cache, 1024 entries |
| `IX_BLOCK_BITS` | 8 | index cache key block, 256 keys |
| `IX_LAT` | 5 | index cache lookup time |
| `IX_NCTX` | 4 | walks in flight in the walker |

Keys and pointers are 32 bits (`rblox_pkg`). An index node has up to 7
separators and 8 pointers (`IX_NKEYS`).

## Where this departs from the original design

- **Walkers.** The original uses 32 walkers with 4 walks each. Here there
  is one walker with 4 contexts.
- **Lock compatibility.** The shared/exclusive rule above is this design's
  reading.
- **Serial controller.** The LTable is monolithic: 128 comparators in
  parallel, one operation per 6 to 18 clocks for all tiles together. How
  requests from many tiles are ordered was not specified. A serial
  controller makes every check-and-update atomic without further
  machinery, but it is a throughput limit at 128 tiles.
- **256 tiles** need `N_TILES=256` (and a 256-entry LTable). **UTables
  above 4096 entries** need more ways. Both are parameters.
- **Locked and unlocked ranges may overlap.** The original keeps every
  UTable range disjoint from every LTable range. Here only exclusive grants
  remove overlapping UTable entries. A shared root lock overlaps
  everything, so wiping the UTable on every shared lock would leave nothing
  to lock instantly. A trylock still checks the LTable before it grants,
  so correctness does not depend on the UTable.
- **Cache policy.** The UTable replacement policy, the rule for dropping
  UTable entries under a granted exclusive lock, and how readers fill the
  UTable are this design's choices.
- **Not included.** The compute tiles, the HBM memory, the host CPU and
  the reuse-pattern controller of the index cache's framework.

## Simulating

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M`, and a watchdog counts a failure if the
test hangs. The packages go first on the command line:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rblox_pkg.sv tb/ix_tree_pkg.sv \
          tb/tb_rblox_system.sv --top-module tb_rblox_system
./obj_dir/Vtb_rblox_system
```

`tb_rblox_system` runs the top at full size with no parameter changes.

- **Phase 1, one tile alone.** It checks the latencies above.
- **Phase 2, 128 tiles.** All tiles run updates, trylocks, subtree
  (inner-node) exclusive locks, reader checks and fills on a 4096-key tree.
  A scoreboard of what each tile holds checks every grant against the
  compatibility table. Meanwhile 2000 index lookups run against a
  random-latency memory model of a three-level tree (`tb/ix_tree_pkg.sv`).
- **Mechanism counts.** It counts each mechanism and fails if one never
  happened: joins, trims in place and out of shared entries, denials,
  refused expansions, trylock hits and misses, registering unlocks, fills,
  tile contention, cache hits, misses, refills and leaf answers.

It runs in well under a minute.

The smaller testbenches check each block against a reference model:

- `tb_ltable` runs random commands and probes against a behavioural table.
- `tb_rblox_ctrl` steps through the hand-over-hand example with exact
  latencies.
- `tb_utable` and `tb_ix_cache` check placement, replacement and latency.
- `tb_ix_walker` checks out-of-order memory responses.
- The arbiter, link, segment mapper, comparator and child-select
  testbenches are exhaustive or random.
