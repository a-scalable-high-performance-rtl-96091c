# A two-phase virus-signature scanner in SystemVerilog

This is a hardware engine that scans a byte stream against a large set of
virus signatures. The signatures may be tens of thousands of byte strings. It
works in two phases:

1. **Filtering.** A small on-chip table (32 kB) rejects almost every text
   position in about one clock cycle per look-up. It usually jumps several
   bytes at a time.
2. **Exact matching.** The few positions that survive ("alarms") are checked
   exactly against all signatures. The check walks a compressed trie that sits
   in external DRAM.

The trie can be as large as the signature set needs, so it lives in external
memory. The DRAM latency is therefore the cost to fight. Three things hide it
or avoid it:

- trie nodes are laid out so that one signature occupies consecutive
  addresses, and a prefetcher fetches the next one;
- a small node cache holds recently used nodes;
- a *trie-skip* mechanism lets one failed verification tell the filter how
  far it can safely jump. This defeats texts built to provoke many long
  partial matches.

Everything under `rtl/` is synthesizable. `tb/` has a testbench per block, an
end-to-end testbench, a reference model that builds the tables, and a
behavioural DDR model.

## Block map

```
             +--------------------------- vdp_top -----------------------------+
  host  ---> | control regs, table write port, statistics                     |
             |                                                                 |
             |  text_pump --> text_buffer --port A--> filtering_engine         |
             |      ^             |                     | shift_sig_table      |
             |      |             |                     | signature_check      |
             |      |             |                     | prefix_addr_ctrl     |
             |      |             |                     v alarm / resume       |
             |      |             +----port B----> exact_matching_engine       |
             |      |                                 | one_step_hash          |
             |      |                                 | address_generator      |
             |      |                       trie_cache -> trie_prefetch        |
             |      |                                 |        result_queue    |
             |      +--------- ls_interface (round robin) <----+---------------+
             +-------------------------------|---------------------------------+
                                              v  one 128-bit word per access
                                     external DDR (text, trie, results)
```

Types and widths shared by all blocks are in `rtl/vdp_pkg.sv`.

## Phase 1: the shift-signature table

The filter keeps a *pattern pointer* `P`. This is the text position where a
signature could start. `MIN_LEN` (default 8) is the length of the shortest
signature. Signatures are only examined through their first `MIN_LEN` bytes.

In each step the filter reads 4 text bytes at `P+MIN_LEN-4 .. P+MIN_LEN-1`,
the *search window*. The last two of these bytes form a 16-bit index, the
*bad character*. The index selects a 4-bit entry `{S, carry[2:0]}` from a
2^16-entry table (32 kB).

- **S = 1.** `carry` is a safe shift. `P` advances by `carry`. The table
  builder never stores 0 here; the hardware treats a 0 as 1.
- **S = 0.** The bad character ends the first `MIN_LEN` bytes of at least one
  signature. `carry` then holds a 3-bit signature of the whole 4-byte window.
  The window is hashed as `h = (w0 ^ w1 ^ w2 ^ w3) mod 3`.
  - If `carry[h]` is set, `P` is an **alarm** and is handed to phase 2.
  - If it is clear, no signature can start at `P`, and `P` advances by 1.

The shift and the signature share the same bits. The S flag is free because
a position whose shift would be 0 never needs a shift, and a position with a
non-zero shift never needs a signature.

How the table is built:

- For each signature `p` and each `j` in `0 .. MIN_LEN-2`, the pair
  `p[j],p[j+1]` gets shift `MIN_LEN-2-j`. An index takes the smallest value
  it receives.
- Indices that no signature uses get shift 7.
- Shifts larger than 7 are stored as 7.
- An index whose shift is 0 gets `S = 0`. Its signature is the OR of
  `1 << h(p[MIN_LEN-4 .. MIN_LEN-1])` over every signature `p` whose pair at
  `MIN_LEN-2` is that index.

The filter issues one table look-up per clock cycle. The table read is
registered, so the window for the next look-up is formed from the
combinational next pointer (`prefix_addr_ctrl.ptr_next`). The filter stalls
when the window is not yet in the text buffer.

## Phase 2: the trie in external memory

### Node format

Every node is one 128-bit memory word (`trie_node_t` in `vdp_pkg`).

| field | bits | meaning |
|---|---|---|
| `content` | 32 | up to 4 signature bytes, first byte in `[31:24]` |
| `len_m1` | 2 | number of valid bytes − 1 (the last node of a signature may be short) |
| `valid` | 1 | 0 for an empty root slot |
| `has_child`, `child` | 1 + 20 | node that continues after these 4 bytes |
| `has_sib`, `sibling` | 1 + 20 | alternative node for the same text position |
| `is_match`, `pid` | 1 + 16 | a signature ends here, with this ID |
| `skip` | 6 | pointer advance when the walk ends at this node |
| `jump_en`, `jump_node` | 1 + 20 | where to continue checking after the advance |
| `suffix_off` | 7 | text offset (from the new pointer) of the bytes compared at `jump_node` |

### Root hashing

The first 4 text bytes at the alarm position are hashed directly to a root
slot: `root = (slice * 0x9E3779B1) >> 16`, keeping 16 bits. Slots
`0 .. 2^16-1` of the trie table are the roots. Signatures whose first 4
bytes collide in one slot are chained through sibling pointers. The huge trie
is thus split into many small tries, each reached without any search.

### The walk

`exact_matching_engine` runs this sequence:

1. Read 4 text bytes at the current position from text-buffer port B.
2. Fetch the node at the address chosen by `address_generator`:
   - the hashed root on the first read;
   - the `child` after a node matched;
   - the `sibling` after a node mismatched;
   - `jump_node` after a skip.
3. Compare `len_m1+1` bytes.
   - A node matches only if it is valid and the bytes lie inside the text.
   - On a mismatch with `has_sib`, go back to step 2 with the sibling, at
     the same text position.
   - On a match with `is_match`, push `{pid, P}` to the result queue. The
     engine stalls if the queue is full. Then go to the trie-skip check.
   - On a match with a child, advance the text position by 4 and go back to
     step 1.
   - Otherwise (a mismatch with no sibling, or a match with nothing below),
     go to the trie-skip check.
4. **Trie-skip check.** `P += max(skip, 1)`.
   - If `jump_en` is set and `P` is still inside the text, continue at step 1
     with the node `jump_node` and text position `P + suffix_off`. Another
     alarm is verified without going back to the filter or to a root.
   - Otherwise hand `P` back to the filter as its new pointer.
   - With `skip_en = 0` the engine always resumes the filter at `P+1`.

A signature that is a prefix of another is not supported. The walk stops at
the first signature it reports, so the longer one is not reported. The table
builder in `tb/vdp_ref_pkg.sv` assumes that no signature is a prefix of
another.

### What the skip values mean

The `skip` of a node covers the bytes that were matched before that node:
the string `A` of its ancestors. `skip` is the smallest `s >= 1` such that
`A[s..]` is still a prefix of some signature, or has some signature as a
prefix. Any start position between `P+1` and `P+s-1` can then be ruled out
from bytes already seen. Roots have skip 1. A 6-bit field holds at most 63.
A longer safe skip is stored as 63, which is still correct, only slower.

For the jump, take the longest run of whole nodes at the start of `A[s..]`:
its first `4j` bytes, with `4j <= 127`. If those bytes form a path in the
trie and the path's last node has a child, `jump_en` is set. The walk then
continues at that child without comparing the `4j` bytes again.
`suffix_off = 4j` is where the child's bytes start, counted from the new
pointer. Any bytes of `A` after those `4j` are simply compared again.

This stays exact for three reasons:
- The path is the only way into the trie for a pattern that starts with
  those bytes.
- The jump node is still compared against the text.
- Its own skip value is computed from exactly the bytes on the path.

Example with signatures `thereisapattern...` and `eisaxxxx...`: the text
`thereisa...` matches nodes `ther`, `eisa` and fails below. The skip of the
failing node is 4, because `eisa` is the start of another signature. The jump
points to the child of the `eisa` root with `suffix_off = 4`. The engine
therefore continues comparing at `P+8` without the filter re-reading
`P+1 .. P+3`. `tb_exact_matching_engine` checks this case and a skip-only
case.

A long run of one repeated byte against a signature made of that byte is
the worst case for a trie walk. There the skip is 1, but the jump lands deep
in the signature's path, so each new position costs a few node reads instead
of a whole walk.

## Memory system

- **`ls_interface`** is a round-robin arbiter with three clients: 0 trie
  reads, 1 text reads, 2 result writes. It allows one read in flight. A read
  response returns to the client that issued it. An assertion checks that no
  response arrives while nothing is outstanding.
- **`text_pump`** reads the text as consecutive 16-byte words, one read in
  flight. It writes into `text_buffer` whenever the buffer has a free line.
- **`text_buffer`** is a circular buffer of 128 × 16 bytes with two 4-byte
  combinational read ports. Each port has an `avail` flag that says whether
  the addressed bytes have arrived. A line is freed only when the engine that
  owns the text has moved past it:
  - the filter while it scans;
  - the exact-match engine while it verifies, because its skip or jump may
    still look back.
- **`trie_prefetch`** sits between the cache and the arbiter:
  - After each demand read of node `A` it reads `A+1` into a one-node buffer.
  - A later demand for `A+1` is answered from the buffer, or from the read
    still in flight.
  - This relies on the table builder storing the nodes of one signature at
    consecutive addresses.
  - With `prefetch_en = 0` it only passes reads through.
- **`trie_cache`** is direct-mapped with 64 lines of one node each. It is
  read-only, fills on a miss, and is flushed at `start`.
- **`result_queue`** is a 16-entry FIFO of `{pid, position}`. Each entry is
  written as one 128-bit record at `result_base + n`.

## Top-level interface (`vdp_top`)

1. Load the table through `tbl_we/tbl_waddr/tbl_wdata`: one entry per cycle,
   2^16 entries.
2. Put the text, the trie and the result area in external memory. All
   addresses are 16-byte word addresses.
3. Set `text_base`, `text_len` (bytes), `trie_base` and `result_base`, and
   the enables `skip_en`, `prefetch_en` and `cache_en`.
4. Pulse `start`. `busy` stays high until `done`.

Every reported match also appears for one cycle on
`match_valid/match_pid/match_pos`. At the end, `result_count` holds the
number of records written.

`stats` holds 32-bit event counters for the scan:

- look-ups, shifts, signature rejections and alarms;
- filter stalls;
- nodes compared, sibling steps and matches;
- skips, skipped bytes and jumps;
- memory stall cycles;
- demand reads, prefetch reads, prefetch hits and cache hits;
- text reads, result writes and result-queue-full cycles.

The memory port is `m_req/m_we/m_addr/m_wdata`, accepted on `m_ready`. Read
data comes back later on `m_rvalid/m_rdata`. There is one read outstanding.

Parameters: `MIN_LEN` (8), `TB_LINES` (128), `ROOT_BITS` (16),
`CACHE_LINES` (64), `RQ_DEPTH` (16). The table index, node pointer, pattern
ID and skip widths are package constants.

The reset is asynchronous and active low. The table SRAM is not reset. It
must be loaded before the first scan.

## How far it can be trusted

Every block has a self-checking testbench with independently computed
expected values. Each testbench was also run against a deliberately broken
copy of its block and caught it.

`tb_vdp_top` runs the whole design with its default parameters against a
DDR model with 21-cycle random and 8-cycle sequential latency:

- 40 signatures of 8 to 40 bytes;
- a 3.9 kB text containing embedded signatures, a run of truncated
  signatures, and a long run of one repeated byte.

It builds both tables with the reference package, scans four times, and
checks every result record against a software matcher. It also requires each
mechanism to occur at least once: shifts, signature rejections, text stalls,
skips, a jump, prefetch hits, cache hits, a full text buffer, arbitration
conflicts and a full result queue (forced by holding the memory busy).

Measured in that run, the same 129 matches are found every time:

| scan configuration | cycles | look-ups | alarms | trie demand reads |
|---|---|---|---|---|
| no trie skip, no prefetch, no cache | 50 908 | 970 | 246 | 2 502 |
| trie skip | 19 893 | 520 | 58 | 593 |
| trie skip + prefetch | 21 153 | 520 | 58 | 263 |
| trie skip + prefetch + cache | 17 274 | 520 | 58 | 95 |

`tb_vdp_attack` runs a deep-search attack, also at default parameters:

- 150 random rules of 16 to 64 bytes;
- 6 kB texts in which 0, 25, 50 or 100 % of the segments are whole rules
  placed back to back, the rest random bytes.

Each text is scanned without enhancements and with all three enhancements.
The results are exact in every case. Cycles per text byte:

| attack share | no enhancement | skip + prefetch + cache | trie demand reads (plain / enhanced) |
|---|---|---|---|
| 0 % | 0.63 | 0.63 | 1 / 1 |
| 25 % | 2.33 | 2.39 | 296 / 57 |
| 50 % | 3.53 | 3.51 | 591 / 121 |
| 100 % | 6.38 | 5.91 | 1 558 / 316 |

A sub-pattern attack follows. One rule is 66 copies of `a`, and the text is
2 kB of `a` runs:

| configuration | cycles per byte | trie node reads |
|---|---|---|
| no enhancement | 286.7 | 34 753 |
| trie skip only | 52.3 | 4 140 |
| skip + prefetch + cache | 11.4 | 2 demand + 17 prefetch, the rest cache hits |

With trie skip, all 2 069 positions after the first are handled by jumps,
not by new alarms.

Three observations:

- **Clean text is limited by text reads.** Random text is shifted 6 to 7
  bytes per look-up, so the filter is not the limit. The limit is the text
  pump: one 16-byte read at a time at 8 cycles per sequential read.
- **Prefetch saves little time with this memory model.** It moves most trie
  reads off the demand path, but only one read is in flight at a time. A
  prefetched node therefore costs the same sequential latency as the demand
  read it replaces, and it competes with text reads for the single port.
  With little attack text, as in the 25 % case, or with the short nodes
  walks left after trie skip, as in `tb_vdp_top`, this can cost more time
  than it saves.
- **The cache gives most of the gain** when the same rules recur, as in
  `tb_vdp_top`. A memory that accepts several reads, or bursts of
  consecutive nodes, would be needed to turn prefetching into a larger speed
  gain.

Limits:

- The filter and the exact-match engine take turns; they never work at the
  same time.
- Only one external read is in flight at a time.
- The signature hash and the root hash are fixed functions of this design.
  A table built for different hash functions will not work.
- Signatures must be at least `MIN_LEN` bytes long, and none may be a prefix
  of another.
- The 4-bit table entry is fixed, so the shift is at most 7 and the signature
  has 3 bits. Table sizes other than 2^16 × 4 bits need a change of
  `CARRY_W` and of the signature hash.
- The host link (a PCI board interface) and the DRAM are outside this RTL.
  The DRAM is only modelled in `tb/ddr_model.sv`.

## Simulating

Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/vdp_pkg.sv tb/vdp_ref_pkg.sv tb/tb_vdp_top.sv --top-module tb_vdp_top
./obj_dir/Vtb_vdp_top
```

Replace `tb_vdp_top` by any other `tb_*` module to run that block's test.
Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog if it hangs. The end-to-end run takes well under a second.

`tb/vdp_ref_pkg.sv` is the place to start for changes to the data
structures:

- `build_table` fills the shift-signature table;
- `build_trie` lays out the trie, computes the skip and jump fields, and
  places each signature's nodes consecutively;
- `ref_matches` is the golden matcher.

Changing `sig_bit` or `root_of` there must go together with
`signature_check` or `one_step_hash` in `rtl/`.
