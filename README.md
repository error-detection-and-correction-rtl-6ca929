# Cache error tolerance: same-tag repair, fault-bypassing line store, Bloom filter

Caches take up much of a processor's die, so radiation-induced bit flips (soft
errors) hit them often. Most protection schemes guard the data bits. This
design guards the **tags**, with almost no extra storage. It uses one
observation: because of spatial locality, neighbouring cache sets often hold
the *same* tag. Each stored tag keeps a pointer to an identical tag in the set
just above or just below. A tag that fails its check bit is repaired by
copying that neighbour.

Two smaller units sit beside the tag directory:

* a line store in which **faulty lines are bypassed** by renumbering line
  addresses, so the healthy lines keep a gap-free address range;
* a **Bloom filter**, a bit vector for fast set-membership tests.

The three units share only clock and reset. They appear side by side in the top
level `bloom_ecc_top`.

All sizes are small and fixed by default: 8 sets × 4 ways of 8-bit tags, 8
lines of 8 bits, and an 8-bit filter with 4 hash functions.

## 1. Tag repair with same-tag information (STI)

### Stored word

Each of the 8 × 4 tag entries is a 13-bit word (`sti_pkg::enc_t`):

```
 12      11      10       9..8    7..0
+------+-------+---------+-------+---------+
|parity| valid | set_loc |  way  |   tag   |
+------+-------+---------+-------+---------+
         \________ STI bits ______/
```

* `parity`: even parity over the 8 tag bits. It detects a flipped tag bit.
* `valid`: an identical tag exists in an adjacent set.
* `set_loc`: where that copy is. 0 means the set above (index − 1). 1 means
  the set below (index + 1).
* `way`: the way of that set that holds the copy. A 4-way cache needs 2 bits.

The first and last sets have only one neighbour. Sets do not wrap around.

### Encoding (`sti_encoder`)

For each way of a set, the encoder looks for the same tag in the set above and
in the set below. The set above is searched first, and within a set the lowest
way wins. The encoder is combinational. Its three inputs are the set being
encoded (`inp1`), the set above (`inp2`) and the set below (`inp3`).

A pointer goes stale when a neighbour changes. For that reason, after every
write to set *s*, the controller re-encodes sets *s*−1, *s* and *s*+1, one per
cycle. Re-encoding renews only the STI bits. It keeps the stored parity bit and
tag, so an upset that is already in the array stays detectable.

### Correction (`sti_corrector`)

A word whose parity fails is *detected*. It is *corrected* only when all of
these hold:

* its STI `valid` bit is set;
* the neighbour it points to exists;
* the copy there passes its own parity check.

If any of these fails, the word is *uncorrectable* (`due`). Its way then takes
no part in hit decisions.

The corrector returns three things:

* the tags to use (`resultant`);
* the repaired words with fresh parity, for write-back;
* per-way `detected` / `corrected` / `due` flags.

Limits of the scheme:

* A tag with no copy next door cannot be repaired.
* Parity covers only the tag. A flip in the STI bits is not detected. It
  matters only if that tag is later corrupted too, because the pointer is then
  followed to the wrong place.
* Two flips in the same tag cancel under parity and go unseen.

### Hit decision (`tag_compare`)

The lookup tag is compared twice: once with the tags as stored, once with the
corrected tags. Hit and hit way come from the corrected tags. Comparing the two
results names the failure that correction prevented:

| flag | meaning |
|---|---|
| `pseudo_hit`  | a stored tag matched only because it was corrupted |
| `pseudo_miss` | no stored tag matched, but a corrected tag does |
| `multi_hit`   | more than one stored tag in the set matched |

A detected error on a hit plays the same role as the more usual check: compare
the stored check bits with those computed from the lookup tag.

### Directory controller (`sti_tag_cache`, storage in `tag_array`)

Commands use a valid/ready handshake. `cmd_op` (`sti_pkg::op_e`) selects the command.

| command | action | timing |
|---|---|---|
| `OP_WRITE` | stores `cmd_tag` at (`cmd_set`, `cmd_way`) with fresh parity and no STI, then re-encodes the neighbours | `cmd_ready` is low for 2 cycles after acceptance at set 0 or 7, 3 cycles otherwise |
| `OP_LOOKUP` | reads the set and both neighbours in one cycle (combinational three-row read), corrects, compares; any repaired word is written back in the same cycle; `rsp_tag` is the hit way's tag | `rsp_*` valid exactly one cycle after acceptance; one lookup per cycle |
| `OP_READ` | returns the corrected tag of (`cmd_set`, `cmd_way`) in `rsp_tag`, with `rsp_tag_ok` low if it could not be repaired; repairs are written back as for a lookup | as `OP_LOOKUP` |

`OP_READ` is meant for evictions. A dirty victim is written back to the
address formed from its tag. If that tag has been corrupted, the line goes to
the wrong place: a replacement error. Reading the tag through the corrector
prevents this.

Two assertions in `sti_tag_cache`:

* every detected error is either corrected or flagged;
* re-encoding ends within three cycles.

The `inj_*` port flips one stored bit. It stands for a particle strike in tests
and can be tied to 0 in use.

Reset clears every word to tag 0 with no STI.

## 2. Line store that bypasses faulty lines (`interleaved_cache`, `line_remapper`)

Eight lines of 8 bits are split into two sets (banks). The store is
*low-order* interleaved: physical address bit A0 picks the set, and A2..A1 pick
the line inside it. A 2:1 multiplexer on A0 passes the selected set's output.
Consecutive addresses alternate between the sets, which is what makes the
organisation fast.

The alternative is high-order interleaving, with A2 picking the set. There, a
bad set could be dropped by forcing A2, but that is slower. In the low-order
arrangement a whole set cannot be dropped without breaking the addressing.
Faulty lines are therefore removed one by one:

* `fault_map` marks the faulty physical lines.
* Logical addresses are given first to the healthy lines, in ascending
  physical order, and then to the faulty ones.

With line 100 faulty:

| logical | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|---|---|---|---|---|---|---|---|---|
| physical | 000 | 001 | 010 | 011 | 101 | 110 | 111 | 100 (faulty) |

The same rule applies to any number of faults. `line_remapper` computes it
combinationally. For each physical line it counts the healthy lines below it.

Other behaviour:

* A read reaching a faulty line returns `rd_ok = 0` and data 0. A high-impedance
  bus would be the usual alternative; this design is two-valued.
* Writes to such an address are dropped.
* Reads have one cycle of latency (`rd_valid`).
* Writes are synchronous.
* The line contents are not reset.

## 3. Bloom filter (`bloom_filter`)

An N-bit vector, N = 8, with M = 4 hash functions. Insert ORs in the bits that
the key's hashes select. A query answers "member" when all those bits are set.
An inserted key is always reported. A key that was never inserted may be
reported too (a false positive), and this grows quickly as an 8-bit vector
fills.

Hash i is multiplicative:

    h_i(k) = bits [7:5] of (k × C_i mod 256),   C = B1, 77, 3D, 2F (hex)

The constants are the low bytes of the `MULT` table in the RTL. Other widths
work through `N`, `M` and `KEY_W`.

`clear` takes priority over `insert`. A query's answer (`q_valid`, `q_member`)
appears one cycle later. It reflects all inserts accepted before the query's
cycle.

## 4. Top level (`bloom_ecc_top`)

| prefix | unit |
|---|---|
| `tc_` | tag directory |
| `ic_` | line store |
| `bf_` | Bloom filter |

Parameters: `IC_LINES`, `IC_DATA_W`, `BF_N`, `BF_M`, `BF_KEY_W`. The
tag-directory geometry is set in `sti_pkg`: `WAYS`, `SETS`, `TAG_W`. If you
change `WAYS` (at least 2), the way field grows with it.

## How far it follows the underlying scheme, and where it is this design's own

These parts follow the scheme:

* the tag geometry (4 ways, 8 sets, 8-bit tags);
* the three STI fields;
* repairing a faulty tag from the adjacent copy;
* using a check code for detection;
* the notions of pseudo hit, pseudo miss and multi-hit;
* the 8-line, 2-set low-order arrangement with A0 selecting the set, and the
  renumbering rule for a single faulty line;
* the filter size (N = 8, M = 4).

These are this design's own choices:

* parity as the check code;
* bit order of the word and the `set_loc` polarity;
* search priority of the encoder;
* checking the source copy before using it;
* when pointers are refreshed, and the write-back of repaired tags;
* command interfaces and all timing;
* extending the renumbering rule to several faults;
* the flag used in place of a high-impedance output;
* the fault-map input;
* the hash functions.

The scheme's example encoded table carries STI pointers for only some of the
tags that have neighbouring copies, and no single search rule reproduces it.
The rule here is the one described in words: point to a copy in an adjacent
set whenever there is one.

What is not built:

* data arrays, valid/dirty bits and a replacement policy for the tag directory;
* tags and lookup for the line store;
* the cache-vulnerability-factor (CVF) analysis, which is a simulation metric,
  not hardware.

## Verification

Each unit has a self-checking testbench in `tb/`. Each prints one line
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `sti_encoder_tb` | the example tag table and 2000 random rows, against a reference search |
| `sti_corrector_tb` | 3000 random upsets in tag or parity bits, with and without a usable copy |
| `tag_compare_tb` | hand-made pseudo-hit and pseudo-miss cases and random rows |
| `tag_array_tb` | three-row reads, writes, bit flips and reset |
| `sti_tag_cache_tb` | fills the example table, then 1500 random writes, upsets, lookups and victim-tag reads against a full model of the stored words; checks write busy time, one-cycle response, write-back |
| `line_remapper_tb` | all 256 fault maps × 8 addresses |
| `interleaved_cache_tb` | data, flags, latency and physical placement for no fault, the single fault at 100, two faults and random maps |
| `bloom_filter_tb` | vector after each insert, all 256 queries per round, false positives and clear |
| `bloom_ecc_top_tb` | the whole top at default parameters (see below) |

`bloom_ecc_top_tb` uses hand-worked cases:

* a repaired pseudo miss;
* a repaired pseudo hit that also caused a multi-hit;
* an uncorrectable upset;
* an upset in a victim line's tag, corrected when `OP_READ` fetches the tag;
* the line store holding lines 1,5,3,7 / 2,6,4,8, before and after line 100
  fails;
* filter inserts, queries and clear.

It counts each mechanism and fails if one never occurs.

Each testbench also fails against a deliberately broken copy of its unit.

To run one with Verilator 5 (modules are found by file name in `rtl/` and
`tb/`; the package is named first):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/sti_pkg.sv tb/bloom_ecc_top_tb.sv --top-module bloom_ecc_top_tb -o sim
obj_dir/sim
```

Substitute any other testbench for `bloom_ecc_top_tb`. All of them finish in
well under a second.
