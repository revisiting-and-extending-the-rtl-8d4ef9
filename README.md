# Elbow cache: a 2-way skewed data cache that relocates instead of evicting

A conventional cache buys fewer conflict misses with more ways, and pays for
every extra way on every access, because all ways of a set are read in
parallel. A *skewed* 2-way cache gets close to the conflict behaviour of a
4-way cache while reading only two locations per access: each of its two
way-banks is indexed by a different hash of the address, so two blocks that
collide in one bank usually do not collide in the other.

This RTL implements such a cache (32 KB, 64-byte blocks, two banks of 256
blocks) and extends it into an **elbow cache**: on a miss, instead of simply
evicting one of the two blocks that sit where the new block may go, the
cache may push one of them into *its own* other possible location, if the
block living there is older. The new block "uses its elbows" to make room.
Recency is tracked with small per-block timestamps taken from a counter of
cache allocations, which gives a global age order across both banks.

With `RELOCATE = 0` the same RTL is a plain timestamp-replaced skewed cache.

## Where a block may live: the skewing functions

Addresses are physical, 32 bits. With an 8 KB page, bits 12..0 are
available before address translation; call them `b12..b0`. Bits 13 and up
come from translation; call them `a0, a1, ...` (`a0` = address bit 13).
Bits `b5..b0` select the byte within the 64-byte block.

Each bank has 256 rows, so a row number has 8 bits:

| row bit | bank 0 (f1)        | bank 1 (f2)                    |
|---------|--------------------|--------------------------------|
| 7       | `a0`               | `a0`                           |
| 6..0    | `b12..b6 ^ a7..a1` | `rotr(b12..b6) ^ a7..a1`       |

`rotr` is a one-bit rotation to the right (the least significant bit becomes
the most significant). Both functions are XORs of an early operand (`b`,
untranslated) with a late one (`a`, from the TLB). Because the rotation is on
the early operand it is only wiring, and every XOR bit can be a
pass-transistor cell whose gates are driven by the early bit, so the late bit
only sees a pass-transistor delay. `ptl_xor` models one such cell at the
logic level (dual-rail in, dual-rail out: the row decoders want both
polarities of every row bit). The top row bit uses `a0` directly, so the
XOR can be restricted to bits that satisfy the early/late split; this
restricted skew is what the design uses.

`skew_unhash` runs the functions backwards. Tags store all of address bits
31..13, so for a block found in bank *k* at row *r*, `b12..b6` is recovered
as `r ^ a7..a1` (bank 0) or the left rotation of that (bank 1). That gives the
block's full address and therefore its row in the other bank, its
**alternate location**.

## Age without LRU: allocation-tick timestamps

True LRU is impractical here: there are no fixed sets, any pair of blocks can
compete. Instead:

* A global 11-bit **CAT counter** (cache allocation ticks, `cat_counter`)
  advances once per block allocated (per fill), not per access or cycle, so
  its resolution follows the miss ratio. 11 bits = log2(512 blocks) + 2, so
  it wraps after four times the capacity.
* Each block carries a **5-bit timestamp**, the top 5 bits of the counter at
  the time it was filled or last hit (`ts_array`, one per bank). A hit just
  overwrites it, no read-modify-write.
* The **distance** of a block is the current timestamp minus its own, modulo
  32 (`cat_distance`). Larger means older. One timestamp unit is 64
  allocations.

## Making room on a miss

This is the core of the design (`victim_select`, `reloc_window` and the
`S_LOOKUP`/`S_ALT` states of `elbow_cache`).

A load to address X misses. X may go to its bank 0 row `f1(X)`, holding
block **A**, or its bank 1 row `f2(X)`, holding block **B**. The cache then:

1. computes A's alternate location, row `f2(A)` of bank 1, which holds
   block **C**, and B's alternate location, row `f1(B)` of bank 0, which
   holds **D**;
2. reads the timestamps (and valid bits) of C and D;
3. evicts the oldest of A, B, C, D;
4. if that is C, moves A into C's place and fills X where A was; if D,
   moves B into D's place and fills X where B was. If the victim is A or B,
   X simply replaces it.

Relocation moves a whole block, which costs energy, so it is restricted:

* **Only young blocks are moved.** C can be the victim only if A has a
  distance of at most 3 (`MAX_MOVE_DIST`); likewise D and B. An older A is
  unlikely to be reused, so it may as well be evicted.
* **Budget.** At most 16 relocations in any 64 consecutive load misses
  (`WINDOW`, `MAX_RELOC`). `reloc_window` keeps one bit per miss for the last
  63 misses and a running count. A relocation is allowed for the current
  miss only while that count is below 16.

When C or D is the oldest block but may not be used, the older of A and B is
evicted. An invalid block counts as older than any valid one, so empty
locations fill first. Ties go to A, then B, C, D, so nothing is moved when an
equally old primary location exists. These three rules are choices of this
implementation.

Worked example, current timestamp 10: A has timestamp 9 (distance 1), B 8
(2), C 1 (9), D 7 (3), and the budget is not used up. C is oldest and A is
young, so A moves to C's row in bank 1, and X is written into A's old row in
bank 0. If A had timestamp 6 (distance 4), A would not be moved. A (distance
4) would then be evicted, being older than B.

The relocated block keeps its timestamp. X gets the current timestamp, and
the counter then advances.

## Cycle-level behaviour

One request is handled at a time (`req_ready` is high only in `S_IDLE`).

| state    | what happens |
|----------|--------------|
| `S_IDLE` | request accepted; both primary rows are read (tag, timestamp, data) through the two decoders |
| `S_LOOKUP` | tags compared. **Hit**: timestamp rewritten; a load answers in this cycle (one cycle after acceptance); a store writes its word. **Load miss**: the L2 block read is issued, A and B are saved, the alternate rows of C and D are computed and their tags and timestamps read |
| `S_ALT`  | victim chosen; if it is C or D, the relocation write (tag, timestamp, data) is done now, while the L2 read is in flight, so it adds no load latency |
| `S_FILL` | waits for the block; writes tag, data and timestamp into the chosen primary row, advances the CAT counter, answers the load |
| `S_WT`   | stores: waits until L2 accepts the written-through word, then acknowledges |

A load miss thus takes 3 cycles plus the L2 latency. Stores are write-through
with no allocation on a store miss. Every store sends one 64-bit word to L2.
`ev_hit`, `ev_miss` and `ev_reloc` pulse once per hit, load miss and
relocation. The cache's dynamic energy is modelled as hits, plus misses
times fill cost, plus misses times relocation frequency times relocation
cost, so these three counts are what that model needs.

### Ports of `elbow_cache`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `req_valid` / `req_ready` | in / out | 1 | request handshake |
| `req_we`, `req_addr`, `req_wdata` | in | 1, 32, 64 | store flag, byte address, store word (bits 5..3 select the word) |
| `resp_valid`, `resp_rdata` | out | 1, 64 | one-cycle pulse: load data or store acknowledge |
| `l2_req_valid` / `l2_req_ready` | out / in | 1 | L2 request handshake |
| `l2_req_we`, `l2_req_addr`, `l2_req_wdata` | out | 1, 32, 64 | write-through word, or block read (block-aligned address) |
| `l2_resp_valid`, `l2_resp_data` | in | 1, 512 | the block of an L2 read, any number of cycles later |
| `ev_hit`, `ev_miss`, `ev_reloc` | out | 1 | event pulses |

Parameters: `SIZE_BYTES` (32768), `BLOCK_BYTES` (64), `TS_BITS` (5),
`WINDOW` (64), `MAX_RELOC` (16), `MAX_MOVE_DIST` (3), `RELOCATE` (1).
`SIZE_BYTES` of 16 KB and 64 KB also work: the row then has 7 or 9 bits, with
no bits or with `a1 a0` used directly above the 7 XORed ones. The counter
widens with the block count (log2(blocks) + 2), while the timestamp stays
5 bits.

## Storage organisation

* `tag_array` (one per bank): valid bit and 19-bit tag (address bits 31..13)
  per row. The tag is wider than a set-associative cache would need, because
  the row number depends on page-offset bits; keeping all upper bits is what
  makes the alternate location computable.
* `ts_array` (one per bank): 5-bit timestamps, kept apart from the tags and
  data: 5 bits next to every 512-bit block.
* `data_array`: both banks' 64-byte blocks. Physically the intended layout
  interleaves the two banks bit-line by bit-line in one array, like a 2-way
  set-associative array, but with **two row decoders**, one per bank, each
  driving half of the cells. That is what lets the two banks be read at
  different rows in one access. It also puts the two copies of a bit next to
  each other, which helps relocation. In RTL the two banks are two
  memories with their own row addresses. Column multiplexers pick the word
  and the way-select multiplexer picks the bank that hit.

All arrays are single-ported with a registered read that holds until the
next read, so the block of A read in `S_IDLE` is still available for the
relocation write in `S_ALT`.

## What is not modelled, and where this RTL chooses for itself

From the original proposal: the skewing functions and their restriction to
early bits, the two-decoder array, the 5-bit allocation-tick timestamps and
11-bit counter, the four-candidate victim choice, the distance-3 and 16-in-64
relocation limits, the 32 KB / 64-byte / 2-bank geometry.

Choices made here, where the proposal says nothing: the processor and L2
handshakes and their timing, one outstanding request, write-through without
store allocation, 64-bit words, 32-bit physical addresses, invalid-first and
A-B-C-D tie rules, what is evicted when relocation is refused, the exact
split of `a` bits for cache sizes other than 32 KB, and reset behaviour
(valid bits, counter, window history and controller cleared; array contents
not).

Not modelled: the 1 MB 8-way L2 (only a port; the testbenches stand in a
memory with fixed latency), and the analog side of the SRAM (wordline
amplifiers, sense amplifiers, sub-array division). The access-time and energy
figures that motivate the design (for example, a hit costing about 17% more
than a 2-way set-associative cache but 75% and 44% of a 4-way and an 8-way
one) come from circuit-level models and are not reproduced here.

## Files

| module | role |
|--------|------|
| `elbow_pkg` | shared constants (address width, page size, word width) and the victim enum |
| `elbow_cache` | top: controller, L2 interface, wiring of everything below |
| `skew_hash`, `ptl_xor` | the two skewing functions and their XOR cell |
| `skew_unhash` | address of a resident block from bank, row and tag |
| `cat_counter`, `cat_distance` | allocation-tick time base and block age |
| `victim_select`, `reloc_window` | victim choice and relocation budget |
| `tag_array`, `ts_array`, `data_array` | per-bank storage |

Every module except the package and `skew_unhash` has a self-checking
testbench `tb/tb_<module>.sv`; `skew_unhash` is checked inside
`tb_skew_hash`, by rebuilding addresses from both banks' rows.
`tb_elbow_cache` runs the full-size cache through 200,000 random loads and
stores over a 1024-block working set (twice the capacity) with a hot subset.
It checks every loaded value against a memory model, and every hit/miss and
relocation decision against an independent reference model of the policy.
It also checks that a load hit answers one cycle after acceptance. It fails
if any mechanism never occurs: hits, misses, store hits and misses, empty
fills, relocation of A and of B, relocations refused by the budget and by
the distance limit, and counter wrap-around. `tb_skewed_cache` runs the same
with `RELOCATE = 0`; on that stream the elbow cache misses about 5% less
often than the plain skewed cache. `tb_cache_sizes` runs the same kind of
test, from the reusable environment `tb/cache_env.sv`, on a 16 KB and a
64 KB cache side by side.

## Simulating

Each testbench ends by printing `TB_RESULT checks=N failures=M`. With
Verilator 5:

```sh
verilator --binary --timing --assert -Irtl rtl/elbow_pkg.sv rtl/*.sv \
          tb/tb_elbow_cache.sv --top-module tb_elbow_cache -o sim
./obj_dir/sim
```

Replace `tb_elbow_cache` by any other testbench name to run a unit test;
`tb_cache_sizes` also needs `tb/cache_env.sv` on the command line. The
full-size run takes about a second.
