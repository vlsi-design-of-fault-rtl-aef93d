# RFTS: a two-stage pattern-matching fault checker

Data read back from a memory can be hit by many kinds of fault. The approach taken here
does not decode every word the same way. It keeps a **fault database**, a large set of
byte patterns, one per fault signature to be recognised. It scans the data stream for
any of them and reports each hit with its position. The database is only data, held in
one on-chip table and in off-chip memory. It can be replaced at run time without touching
the logic, which is what makes the system *reconfigurable*.

Scanning for tens of thousands of patterns at every byte position would be slow. The
checker therefore works in two stages:

1. A **filtering engine** uses a 32 KB on-chip table to throw away almost every position
   cheaply. Often it skips several positions at once.
2. An **exact-match engine** verifies the few candidate positions that survive. It walks
   a compact trie of all patterns, stored in an 8 MB off-chip memory.

The filter can give false positives, which the second stage rejects. It never gives false
negatives: every real occurrence reaches the second stage.

In what follows the data being checked is called the *text*: a string of 8-bit characters.

```
            off-chip memory (trie nodes + text), one read port
                 |
           load_store_if  (round robin, in-order responses)
             /          \
     text_pump          node_cache (direct-mapped, 64 nodes)
         |                    |
     text_buffer  ---->  exact_match_engine ----> match_pid / match_pos
      (256 chars)   slice       ^
         | window               | candidate / done
     filtering_engine ----------+
         |
      ss_table (16384 x 16 bit shift-signature table, loaded by the host)
```

## Stage 1: the shift-signature filter

The filter keeps a **pattern pointer** `p` and looks at the 8-character window
`text[p .. p+7]`. `WIN_LEN = 8` is also the shortest pattern the checker can hold. The
last two characters of the window form a *block*. The block is hashed (`sst_index`) to
one of 16384 table entries. Each 16-bit entry is

| bit 15 | bits 14..0 |
|---|---|
| S-flag | carry |

The two meanings of the carry are what makes the table work. One table holds two
different filters:

* **S-flag = 1, carry = shift.** No pattern has this block as the last two characters of
  its first 8 characters. The carry is the smallest distance from the block to such an
  end over all patterns, capped at 7. No pattern can start at any of the next `shift`
  positions, so the pointer jumps by that many characters. This is the classic
  bad-character shift of a Wu-Manber filter.
* **S-flag = 0, carry = signature.** At least one pattern's 8-character prefix ends in
  this block, so shifting is impossible. In a plain shift table the entry would only say
  0 and waste 15 bits. Here those bits hold a 15-bit Bloom filter of the *tail* of those
  prefixes: the four characters `p[4..7]`, hashed to two bit positions (`bloom_sig`), and
  the results of all such patterns ORed together. The filter hashes the window's own four
  tail characters the same way. If one of the two bits is missing from the carry, no
  pattern can start at `p`, and the pointer moves by 1. If both bits are present, `p` is a
  **candidate**.

A candidate goes to the exact-match engine. The filter waits for `eme_done` and then
moves on by 1. Each examined position takes two cycles: the table read, then the
decision. The filter stops when the window would pass the end of the text.

Building the table (done by the host; `tb/rfts_tb_pkg.sv` has a reference builder):

```
shift[i] = 7 for all i;  sig[i] = 0
for each pattern P, for j = 1..7:
    i = sst_index(P[j-1], P[j]);  shift[i] = min(shift[i], 7 - j)
for each pattern P:
    i = sst_index(P[6], P[7]);    sig[i] |= bloom_sig({P[7],P[6],P[5],P[4]})
entry[i] = shift[i] != 0 ? {1, shift[i]} : {0, sig[i]}
```

Only the first 8 characters of each pattern enter the table. Patterns may be longer;
stage 2 checks the rest.

## Stage 2: the compact trie and the exact-match walk

Every pattern is cut into 4-character **slices**. The trie has one node per distinct
slice path. Each node is one 128-bit memory word (`rfts_pkg::trie_node_t`):

| bits | field | meaning |
|---|---|---|
| 31:0 | `slice` | up to 4 characters, first in bits 7:0 |
| 34:32 | `slen` | characters of `slice` in use, 1..4 (less than 4 only for the last slice of a pattern) |
| 35 | `is_end` | a pattern ends with this node |
| 36 | `valid` | node present (matters for root buckets) |
| 55:40 | `pid` | pattern id when `is_end` |
| 82:64 | `child` | first node of the next slice level, 0 = none |
| 114:96 | `sibling` | next alternative at this level, 0 = none |

The first level is reached by hashing: `root_hash(first slice)` selects one of 65536
**root buckets**, at word addresses 0..65535. Each bucket holds the first node of a
sibling chain of first slices that share the hash. All other nodes live above address
65535, so pointer value 0 can mean "none".

For a candidate at position `p` the engine repeats four steps:

1. Take the next text slice, `text[p+4k .. p+4k+3]`. If that is not yet in the buffer it
   waits, unless the text ends first.
2. Form the node address: the root hash when `k = 0`, otherwise the pointer just followed.
3. Fetch the node through the node cache.
4. Compare its first `slen` characters with the text. A match also requires that the text
   does not end inside the slice.
   * **Match, `is_end`:** report `(pid, p)` on `match_*`. The engine holds until
     `match_ready`.
   * **Match, full slice:** descend to `child`, with `k+1`.
   * **Match, partial slice:** this is a leaf. Continue along `sibling`.
   * **No match:** follow `sibling`.
   * A zero pointer ends the check, and `done` pulses.

**Ordering rule.** In a sibling chain, partial slices must come *before* full slices.
Full slices at one level are all different, so at most one of them can match. Partial
slices can match alongside it: for example `IJ` and `IJKL` both match the text `IJKL`.
With the partial slices first, one pass finds every pattern that starts at `p`, without
a stack. The builder in `tb/rfts_tb_pkg.sv` puts a new partial slice at the head of the
chain and a new full slice at its tail.

One 16-byte node stores 4 pattern characters, so a trie without shared prefixes takes
four times the size of the pattern set.

## Keeping memory busy: pump, buffer, cache, shared port

* `text_pump` reads the text as consecutive 128-bit words (16 characters each) from
  `text_base`. It keeps as many reads in flight as `text_buffer` has free words, counting
  reads that are still outstanding. Text is therefore fetched while the engines work.
* `text_buffer` is a 16-word ring. It is addressed by absolute character position. A
  word can be overwritten once the filter pointer has passed it: the pointer is the
  release point, because while the exact-match engine works the filter waits at the
  candidate. The exact-match engine can look up to about 240 characters ahead of the
  pointer, which bounds the longest pattern (see Limits).
* `node_cache` is a direct-mapped cache of 64 one-node lines. A hit answers two cycles
  after the request is accepted; a miss adds one memory read. It handles one request at
  a time.
* `load_store_if` gives the single memory port to the pump (client 0) and the cache
  (client 1) round robin. It lets up to 8 reads be in flight, and uses a FIFO of client
  ids to route the in-order responses back.

## Using `rfts_top`

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `sst_we`, `sst_waddr`, `sst_wdata` | in | 1, 14, 16 | write one shift-signature entry per cycle |
| `cache_flush` | in | 1 | pulse after the trie in memory changes |
| `start` | in | 1 | pulse to check a text; only when idle |
| `text_base`, `text_len` | in | 19, 32 | word address of the text, its length in characters |
| `busy`, `done` | out | 1 | `done` rises when the text is fully checked and stays high until the next `start` |
| `mem_req_valid/ready/addr` | out/in/out | 1, 1, 19 | memory read request, one per accepted cycle |
| `mem_resp_valid/data` | in | 1, 128 | read data, in request order, any latency |
| `match_valid/ready/pid/pos` | out/in/out/out | 1, 1, 16, 32 | one report per occurrence: pattern id, start position |
| `st_*` | out | 32 each | shifts, signature rejects, candidates, false positives, matches, nodes compared, cache hits, cache misses |

A run goes like this:

1. The host writes all 16384 table entries and places the trie nodes and the text in
   memory.
2. It pulses `cache_flush`, then `start`.
3. It collects reports until `done`.

Reconfiguration is the same steps with new tables. Reports for one position come in
trie order. Positions come in increasing order.

Parameters of `rfts_top`: `TBUF_WORDS` (text buffer words, 16, a power of two),
`CACHE_LINES` (64, a power of two), `OUTST` (reads in flight, 8, a power of two). Fixed
sizes are in `rtl/rfts_pkg.sv`:

* `WIN_LEN` 8, `BLK_LEN` 2, `SLICE_LEN` 4.
* A table of 2^14 x 16 bit = 32 KB.
* Memory of 2^19 x 128 bit = 8 MB.
* `ROOT_AW` 16.
* `PID_W` 16, for up to 65536 patterns.

## What is given and what is chosen

These parts follow the source design:

* The two-stage structure: a filtering front end and an exact-match back end.
* A 32 KB on-chip table for more than 30 000 fault codes, and an 8 MB off-chip database.
* The merge of a shift table and a Bloom signature table into one table of S-flag plus
  carry. A signature is kept only where the shift is zero, and it is built from the
  pattern tails and indexed by the bad-character block.
* Skipping by the shift value, and moving by one after a comparison.
* The slice, hash, fetch and compare loop of the exact-match engine, over a compact trie
  with child and sibling pointers.
* A text buffer with a streaming text pump, caching of the off-chip data, and a shared
  load/store port.

These are this design's own choices:

* Character width, window, block and slice lengths.
* All hash functions, and two Bloom bits per signature.
* The node format, and hashing only at the root.
* The sibling ordering rule.
* The buffer, cache and FIFO sizes, and the handshakes.
* The filter waiting for each verification instead of running ahead.

Prefetching of trie nodes, and defences against inputs that make sibling chains long,
are not built. Only the text is prefetched. The majority-logic decoders (MLD, MLDD)
against which such a checker is usually compared are baselines and are not part of this
design.

## Limits

* Patterns must be 8 to about 240 characters long. The lower bound is the window. The
  upper bound is the text buffer: `16 x TBUF_WORDS - 16`.
* The trie as laid out needs 4 bytes of memory per pattern byte, minus shared prefixes,
  plus the text. A 2 MB pattern set with no shared prefixes fills the whole 8 MB, so it
  does not fit together with the unused root buckets and the text. The 30 000-pattern
  test below uses about 2.4 MB of nodes.
* `start` must not be pulsed while a run is in progress. Reads still in flight would
  land in the new run's buffer.
* Throughput: 2 cycles per examined position. A skip covers up to 7 positions. A
  candidate costs one node fetch per slice compared. In the full-size test below (30 000
  random patterns, random text) the checker needs about 5 cycles per character. Most of
  that comes from the high candidate rate that 30 000 patterns cause in a 16384-entry
  table.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it establishes |
|---|---|
| `tb_ss_table` | write/read of all entries, one-cycle latency, read-during-write |
| `tb_text_buffer` | window and slice contents at random positions, space and character counts |
| `tb_text_pump` | in-order words, exact word count, no overrun, read-ahead |
| `tb_load_store_if` | per-client order and data under contention and back-pressure |
| `tb_node_cache` | data, hit latency, hit and miss counts against a reference cache model, flush |
| `tb_filtering_engine` | every real pattern start becomes a candidate (no false negatives), order, statistics |
| `tb_exact_match_engine` | every position as a candidate: reports equal a direct search exactly |
| `tb_rfts_top` | 2000 patterns, two texts of 3000 characters, one reconfiguration in between |
| `tb_rfts_full` | 30 000 patterns of 8-40 characters, two 64 KB texts, one reconfiguration |
| `tb_rfts_codewords` | whole code words as fault patterns: 5000 faulty 73-bit words (10 characters), then a reconfiguration to 5000 faulty 273-bit words (35 characters), planted on word boundaries |

The system tests compare every `(position, pattern id)` report with a direct search
of the text. That search uses none of the hardware's hash functions. The system tests
also count each mechanism and fail if one never occurs:

* shift skips, signature rejects, candidates and false positives;
* matches, sibling steps and child descents;
* cache hits and misses;
* memory back-pressure, a full text buffer and match back-pressure;
* reconfiguration.

`tb/offchip_mem_model.sv` is a behavioural memory model: fixed latency, random ready,
in-order data. `tb/rfts_tb_pkg.sv` generates the pattern sets and the texts, builds both
tables and runs the reference search.

To run a test with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rfts_pkg.sv tb/rfts_tb_pkg.sv tb/tb_rfts_top.sv --top-module tb_rfts_top -o sim
./obj_dir/sim
```

Use another `tb_*.sv` file and top module to run another test. Add
`+verilator+rand+reset+2` to start unreset state at random values.
