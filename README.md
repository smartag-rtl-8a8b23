# SMARTag: single-error correction for a parity-protected cache tag array

Cache tag arrays are usually protected only by parity, because a full ECC
per tag costs too many bits and adds decode latency to every lookup. Parity
can detect a flipped tag bit but cannot repair it. For a clean line that is
enough: the line is dropped and fetched again. For a dirty line the data is
lost.

SMARTag makes most tags correctable without extra storage. It relies on
address locality: the tags held in one set nearly always share their upper
bits. When two tags of a set have the same upper part, that part only needs
to be stored once. The freed bits of the second tag then hold a SEC-DED
(single-error-correcting, double-error-detecting) code covering both tags.
Lookups still use parity only. The code is decoded only after a parity check
fails.

This repository is the SystemVerilog RTL of such a tag array for a 32 KB,
4-way, 64-byte-line data cache with 32-bit addresses (128 sets, 19-bit
tags). It also includes self-checking testbenches for every module.

## Tag layout: upper part, lower part, UPL

A 19-bit tag is split into a 7-bit **upper part** and a 12-bit **lower part**.
Each way's entry stores:

| field    | bits | meaning |
|----------|------|---------|
| `stored` | 19   | either the tag itself, or `{7 check bits, own lower part}` |
| `parity` | 1    | even parity over `stored` |
| `upl`    | 2    | *upper part location*: the way whose upper part this tag uses |
| `dirty`  | 1    | line is dirty |
| `valid`  | 1    | line is valid |

A way whose UPL is its own number is a **keeper**: its `stored` field is its
tag. A way whose UPL names another way is an **ECC holder**:

- Its real upper part equals the keeper's, so it is not stored.
- The holder's upper 7 bits hold the check bits of a SEC-DED(38,31) code.
- The code's 31 data bits are `{keeper's 19-bit tag, holder's 12-bit lower
  part}`.

To rebuild any tag, a 4:1 multiplexer per way selects the upper part of the
way named by its UPL and appends the way's own lower part
(`smartag_tag_rebuild`). The code is never on this path.

### How a set is paired

Valid ways are grouped by equal upper parts. Within a group the
lowest-numbered way is the keeper.

| set state | group sizes | pairing (UPL of ways 0..3 for the set below) |
|-----------|-------------|-----------------------------------------------|
| S40 | 4 | two pairs (0,1) and (2,3): UPL = 0,0,2,2 |
| S30 | 3 + 1 | keeper 0 shared by holders 1 and 2: UPL = 0,0,0,3 |
| S22 | 2 + 2 | pairs (0,1) and (2,3): UPL = 0,0,2,2 |
| S20 | 2 + 1 + 1 | pair (0,1): UPL = 0,0,2,3 |
| S00 | all different | no code: UPL = 0,1,2,3 |

The examples assume the equal tags are the lowest ways. In general the same
rule (lowest way keeps, the others point at it) is applied to whatever ways
are equal. In S40 the second pair gets its own keeper, so two codes protect
four tags. Invalid ways never take part and keep UPL = own number.

A way is *ECC-protected* when it is a keeper or a holder of some pair. In S40
and S22 all four tags are protected; in S30 three, in S20 two, in S00 none.

## The code

SEC-DED(38,31) is an extended Hamming code:

- Data bit *i* sits at the *i*-th position in 3..37 that is not a power of
  two.
- Check bit *k* (0..5) is the XOR of the data bits whose position has bit *k*
  set.
- Check bit 6 is the XOR of all other 37 bits.

On decode, the syndrome (recomputed ⊕ received Hamming bits) is the position
of a single flipped bit. The overall parity separates single errors (odd)
from double errors (even with a non-zero syndrome). The position table and
the check masks are computed by constant functions in `smartag_pkg`
(`DATA_POS`, `HMASK`).

## When tags change: the miss path

Tags change only when a line is replaced. On `OP_FILL`, `smartag_set_update`
does the following:

1. rebuilds the four logical tags of the set through the UPLs;
2. replaces the victim's tag by the incoming one;
3. regroups the set (`smartag_classify`) and chooses new UPLs;
4. encodes one code per holder (one encoder each for ways 1..3; way 0 is
   always a keeper);
5. recomputes all four parity bits and writes the row back.

The whole row is rewritten on every fill. Even when the incoming tag has the
same upper part as the evicted one, the lower part, which the codes cover,
has changed. In that case the UPLs stay as they were (`resp_upl_update` = 0).
That situation is the one where the set state cannot change.

`OP_INVALIDATE` takes the same path with the victim dropped. This matters
when the dropped way is a keeper: its holders must get their upper part
back.

### Set states and miss conditions

Each fill reports the set's new state and the condition that caused the
change, compared against the three remaining valid tags:

| cond. | incoming upper part … | typical moves |
|-------|-----------------------|---------------|
| a | equals the evicted one | none |
| b | and the evicted one both differ from all remaining | none |
| c | equals one remaining (set was S00) | S00→S20 |
| d | differs from all remaining (evicted one did not) | S40→S30, S30→S20, S22→S20, S20→S00 |
| e | equals one remaining | S30→S22, S20→S22 |
| f | equals two remaining | S22→S30, S20→S30 |
| g | equals all three remaining | S30→S40 |

The new state is always recomputed from the new contents, not looked up
from a transition table. One move is missing from the usual state diagram:
in S20 `{A,A,B,C}`, replacing one `A` by a copy of `B` gives condition e and
leaves the set in S20.

## When a parity check fails: the correction step

Every request first checks the parity of all valid ways of the addressed set.
If one fails, `smartag_correct` handles the lowest failing way *e*:

- **e is in a pair**: either e is a holder (its UPL names keeper k), or e is
  a keeper and some valid way's UPL names e. The 38-bit codeword
  `{keeper stored, holder lower part, holder check bits}` is decoded. A single
  error anywhere in it is repaired, and both entries are rewritten with fresh
  parity. → `ST_CORRECTED`.
- **e is in no pair and clean**: the line is invalidated. The cache
  refetches it on the next access. → `ST_INVALIDATED`.
- **e is in no pair and dirty**: nothing can be done. → `ST_UNCORRECTABLE`;
  the row is left unchanged and the request ends without a hit.
- **Double error inside a pair** (parity fails in both keeper and holder,
  decoder reports two errors): every tag that takes its upper part from
  that keeper is lost. If all of them are clean they are invalidated;
  otherwise the error is uncorrectable.

After a repair the controller reads the row again and repeats until it is
clean. Only then does the original request (lookup, fill, …) proceed.
`resp_status` reports the worst outcome of the request.

Parity covers only the 19 `stored` bits. The valid, dirty and UPL bits are
outside both the parity and this fault model.

## Interface and timing (`smartag_tag_array`)

Parameters: `ADDR_W = 32`, `SETS = 128`, `LINE_BYTES = 64`. Their
combination must leave a 19-bit tag, because the code geometry depends on
it (elaboration fails otherwise). For example, a 16-set test array uses
`ADDR_W = 29`.

Requests use a valid/ready handshake. `req_ready` is high only when the array
is idle. A request is taken at the rising edge where `req_valid && req_ready`.

| request | fields used | response, cycles after acceptance |
|---------|-------------|-----------------------------------|
| `OP_LOOKUP` | `req_addr` | 1: `resp_hit`, `resp_way`, `resp_dirty`, `resp_state` |
| `OP_SET_DIRTY` (write hit) | `req_addr` (set), `req_way` | 1 |
| `OP_FILL` (miss replacement) | `req_addr`, `req_way` (victim, chosen by the cache), `req_dirty` | 2: `resp_state`, `resp_event`, `resp_upl_update`, `resp_evict_valid/dirty/tag` |
| `OP_INVALIDATE` | `req_addr` (set), `req_way` | 2, as for a fill |

Each failing way that is repaired adds 2 cycles (repair write, then reread).

Other timing rules:

- `resp_valid` is high for exactly one cycle, and the response signals are
  combinational during that cycle.
- The fill costs one cycle more than a lookup. That cycle is the scheme's
  whole performance cost: the code and the new UPLs are made while the line
  is replaced.
- After reset the array clears one set per cycle and `req_ready` stays low
  for `SETS` cycles.

`inj_valid`, `inj_set` and `inj_mask` XOR a mask into one stored row. This
port is a test hook that stands for particle strikes. Tie it to 0 in a real
design.

The array holds only tags. The data array, the choice of victim (e.g. LRU),
write-back of `resp_evict_dirty` lines and refetching invalidated lines
belong to the cache around it.

## Module map

| file | role |
|------|------|
| `rtl/smartag_pkg.sv` | geometry, entry/row types, enums, code tables |
| `rtl/smartag_tag_array.sv` | top: controller (clear, idle, check, reread, update) |
| `rtl/smartag_tag_mem.sv` | 128 × 96-bit rows, one-cycle synchronous read, fault port |
| `rtl/smartag_tag_rebuild.sv` | UPL multiplexers, parity check, protection flags |
| `rtl/smartag_classify.sv` | upper-part grouping, set state, UPLs |
| `rtl/smartag_transition.sv` | miss condition a..g |
| `rtl/smartag_set_update.sv` | fill-time rebuild with code generation |
| `rtl/smartag_correct.sv` | correction step |
| `rtl/secded_enc.sv`, `rtl/secded_dec.sv` | SEC-DED(38,31) encoder / decoder |

## Design choices beyond the scheme itself

- The whole set is one 96-bit row, read at once, with valid and dirty bits
  in the row.
- Only valid ways are paired. The pairing protects all valid tags, clean ones
  included, not only dirty ones. Clean tags would be correctable by
  invalidation anyway, so this is a superset of what protecting only dirty
  lines would give.
- The pairing rule for arbitrary sets, the bit order of the code, the parity
  coverage, the double-error handling, the correction loop, the request
  interface, reset clearing and the fault port are this design's own.
- A fill whose set already holds an error repairs the set first and then
  rebuilds it. The rebuild never encodes corrupted tags.

## Verification

Each module has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=N failures=M`. The testbenches compare against a
reference model in `tb/smartag_ref_pkg.sv`, written in a different style
from the RTL. In that model:

- check bits are the XOR of the positions of all set data bits;
- states come from counting equal upper parts;
- whole rows are built from logical tags.

What each testbench covers:

- **Codec**: every single-bit flip of random and corner words is corrected.
  Random double flips are detected. Codewords of neighbouring data words are
  at least 4 bits apart.
- **Pairing**: the example sets above, then thousands of random sets. Every
  state and every condition a..g must occur, and every (state, condition,
  new state) move is checked against the table above.
- **Correction**: single flips in paired, unpaired-clean and unpaired-dirty
  ways, parity-bit flips, and double errors in a pair.
- **Top (`tb_smartag_tag_array`)**: runs at the default size with about
  6000 random fills, lookups, write hits, invalidations and injected
  faults.
  - After every write it compares the stored row with the reference row.
  - It checks every latency.
  - It counts each mechanism and fails if one never happens: each state,
    each condition, UPLs kept, dirty eviction, corrected holder/keeper,
    parity-bit repair, invalidation, uncorrectable, double error, fill after
    repair.

### Behaviour under a cache-like access stream

`tb_smartag_locality` puts the array behind a small LRU, write-back,
write-allocate cache controller written in the testbench. It runs 20,000
accesses of a synthetic trace:

- 88% walk through four hot regions inside one 32 MB window, so those tags
  share their upper 7 bits;
- 10% go to a distant stack area;
- 2% go anywhere in memory;
- 30% of all accesses are writes.

Every 50 accesses one bit of a random valid tag entry is flipped. The
outcome must match the reference model's prediction. A typical run gives:

| measure | value |
|---------|-------|
| full sets in S40 / S30 / S22 / S20 / S00 | 23% / 60% / 0.1% / 15% / 3% |
| single-bit tag errors correctable | 85% |
| the same for a parity-only array (clean lines only) | 22% |

How much is protected depends entirely on how many tags of a set share
their upper bits. A program whose data and code sit closer together
shares more upper bits and is protected better than this deliberately
mixed trace. The trace is
only a stand-in: it is not a benchmark, and these numbers say nothing about
any particular program.

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/smartag_pkg.sv tb/smartag_ref_pkg.sv tb/tb_smartag_tag_array.sv \
  --top-module tb_smartag_tag_array -o sim && obj_dir/sim
```

Replace the last file and `--top-module` to run another testbench. The
top-level testbench takes about 20 seconds including the build.

## Limits

- The 7/12 split of the tag, the SEC-DED(38,31) code and the 4-way
  organisation are built into the types. Another geometry needs a new split
  and code, not only new parameters.
- Errors in the valid, dirty and UPL bits are neither detected nor
  corrected.
- A set with an uncorrectable error keeps it. Every later request to that
  set reports `ST_UNCORRECTABLE` until software or a machine-check handler
  intervenes.
