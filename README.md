# P-CAM: a probabilistic content addressable memory for very wide keys

A conventional binary CAM stores every key in full and compares all of them
in parallel. With keys of hundreds of bits (IPv6 5-tuples, encoded DNA or
protein fragments, feature vectors) the storage and match logic grow with the
key width and the table size, and soon become impractical. P-CAM gives up
strict determinism to get around this. It does not store the key. It stores a
short **fingerprint** of it in a few hash-selected cells, together with an
**address** that points into an ordinary value memory. Storage per entry is
`fingerprint + address` bits whatever the key width. A lookup touches a fixed
number of cells, so its latency stays constant. The price is a small,
tunable chance of a false positive, plus, if enabled, the eviction of old
entries when the table is overloaded.

This repository holds synthesizable SystemVerilog for the complete key-value
store: hash unit, sketch memory, address generator, address-select logic,
update and query controllers and value store. A self-checking testbench comes
with every block.

## The sketch: where a key lives

The sketch has `D` rows of `M` **fingerprint-address cells (FACs)**. One FAC
holds `{valid, fingerprint[FP_W], address[A_W]}`.

A key `x` is hashed once. The hash output is cut into `D` row indices
`h_1(x) .. h_D(x)` and one fingerprint `f(x)`. The key's FAC in row `i` is
`FAC[i][h_i(x)]`. Different keys may share a FAC: a hash collision. Different
keys may also have the same fingerprint: a fingerprint collision. The design
tolerates both, because a false answer needs the two to coincide in every row
and the addresses to agree as well.

The **address** comes from a counter, the address generator, which advances
once for every new key. The counter never wraps, so an address is also an age
stamp: a larger address means a younger entry. When all `N` addresses have
been handed out, `mem_full_o` rises and no further new keys are accepted. The
address indexes the value store, so a key's value sits at `V[address]`.
Several keys can deliberately share one address. That lets many keys map to
the same class or value (see class insertion below).

To first order, the chance of a false positive with `n` stored keys is

    P_fp ≈ [ (1 − e^(−n(n−1)/2M)) · (1 − e^(−n(n−1)/2^(FP_W+1))) · 2^(−A_W) ]^D

So `D`, `FP_W` and `M` are the knobs for accuracy. The reference
configuration is `D = 4` and `FP_W = 8`. It is reported to stay above 99.8 %
correct answers even at load factor `n/M = 1.0`.

## Reading a key: presence, address resolution, confidence

Reading a key is the subtle part of the design. The `D` FACs of the key are
read in parallel, and `pcam_addr_select` decides on them as follows.

1. **Presence.** The key is *absent* if any of its FACs is empty, or if none
   of them holds its fingerprint. An insertion always fills every empty FAC
   of the key, so an empty FAC proves the key was never inserted (or was
   deleted). Otherwise the key is *present*.
2. **Address.** Consider only the FACs whose fingerprint matches:
   * if they all hold the same address, that address is returned;
   * otherwise, if one address is held by **more than half** of them, it is
     returned (majority);
   * otherwise the **highest** address is returned. It belongs to the most
     recent entry, and older entries are more likely to have been copied into
     several rows and to appear more than once.
3. **Confidence vector** (`q_conf_o`, `D` bits). Bit `i` is set when row `i`
   matches the fingerprint and holds the returned address. The number of set
   bits is the number of rows that support the answer, from 1 (weakest) to
   `D` (strongest). The vector is zero for an absent key.
4. **Acceptance** (`q_accept_o`). This is set when the key is present and at
   least `cfg_conf_thresh_i` bits of the confidence vector are set. A system
   that cannot tolerate false positives can accept only high-confidence
   answers and check the rest against an exact backing store.

Example: a key has fingerprint `10`. Rows 1, 2 and 4 hold `(10, 2)` and row 3
holds `(01, 5)`. The key is present, the address is 2 and the confidence
vector is `1011`.

## Writing a key: fill, replace, evict, deny

An insertion (`OP_INSERT`) reads the key's `D` FACs and applies the first case
that fits. `pcam_update_policy` implements these cases, and `upd_kind_o`
reports which one applied.

| case | condition | action | `upd_kind_o` |
|---|---|---|---|
| fill | some FAC empty | write `(f, new address)` into every empty FAC, store the value at the new address | `UPD_FILL_EMPTY` |
| present | no FAC empty, some fingerprint matches | leave the sketch alone, store the value at the resolved address | `UPD_EXISTS` |
| replace duplicate | all taken by other fingerprints, two FACs hold an identical pair | overwrite the lowest-row FAC that has a twin | `UPD_REPL_DUP` |
| evict | all taken, all pairs distinct, `cfg_evict_en_i = 1` | overwrite the FAC with the smallest (oldest) address | `UPD_EVICT` |
| deny | all taken, all pairs distinct, `cfg_evict_en_i = 0` | nothing written | `UPD_DENY_EVICT` |
| full | a new address is needed but all `N` are used | nothing written | `UPD_DENY_FULL` |

A new address is consumed only by fill, replace duplicate and evict.

A **class insertion** (`upd_cls_en_i = 1`) stores the key under an existing
address, `upd_cls_addr_i`, instead of a new one. It follows the same cases,
but every FAC it writes gets the given address, and the value is written
there. The address generator does not advance, so a class insertion is never
refused for lack of addresses. Every key inserted this way returns the same
value-store entry. This is how many keys (for example, all prefixes owned by
one network) map to one class. Give an address that was handed out earlier.
The address still acts as the entry's age for eviction.
Replacing a duplicate loses nothing, because the other copy of that entry
remains. Eviction can lose an old key, so the sketch can give a false
negative. Setting `cfg_evict_en_i = 0` turns that into a refusal instead.
With eviction off, and no deletions, every stored key is always found. That
is the deterministic mode: load the table below capacity and watch
`mem_full_o`. The only remaining error is then a rare, one-sided false
positive.

`mem_full_o` has two sources. It is high once the address generator has
handed out all `N` addresses, and it stays high from then on. It is also
high after a denied insertion (`UPD_DENY_EVICT` or `UPD_DENY_FULL`), until
the next insertion that writes the sketch. Deletions and value overwrites
leave it unchanged.

A deletion (`OP_DELETE`) looks the key up exactly as a query does. If the key
is present, the FACs that support the answer (the set bits of the confidence
vector) are cleared (`UPD_DEL_HIT`). Otherwise nothing changes
(`UPD_DEL_MISS`). The value store entry is left as it is.

## Hardware organisation

```
            upd_key ──► pcam_hash ──┐                          ┌──► pcam_adgen (address counter)
                                    ▼                          │
   upd_* ──────────────────► pcam_update_fsm ──port B──► D x fac_ram ◄──port A── pcam_query_fsm ◄── pcam_hash ◄── q_key
            (pcam_update_policy inside)  │                     (sketch)            (pcam_addr_select inside)
                                         └─ write ──► pcam_value_store ◄── read ───┘
```

* **Two datapaths.** Updates and queries each have their own hash unit and
  controller. Each row is a dual-port RAM: port A belongs to queries (read
  only) and port B to updates (read, then write). A query and an update can
  therefore be in progress in the same cycle.
* **Hash** (`xoodoo_nc`, `pcam_hash`). The key is zero-padded to 384 bits and
  passed through four unrolled rounds of the Xoodoo permutation, all in
  combinational logic, so one key can be hashed per cycle. A permutation does
  not compress, so output bits stay independent enough to be sliced:
  `idx[i] = hash[i*IDX_W +: IDX_W]` and `fp = hash[D*IDX_W +: FP_W]`. Keys of 96
  bits use the same unit, padded.
* **Query timing.** This is a three-stage pipeline that accepts one query per
  cycle:
  * stage 1 registers the hashed indices and the fingerprint;
  * stage 2 reads the `D` FACs;
  * stage 3 resolves the answer and registers it. In the same cycle the
    resolved address reads the value store.

  A query presented in cycle `t` has `q_res_valid_o`, with match, address,
  confidence, acceptance and value, in cycle `t + 3`.
* **Update timing.** After reset the update controller writes every FAC empty.
  This takes `M` cycles, and `init_done_o` rises at the end; neither port
  accepts requests before then. After that, an operation goes through three
  states:
  * accept (`upd_ready_o` high);
  * read the FACs;
  * decide and write.

  `upd_done_o` pulses with the result three cycles after acceptance.
  Operations do not overlap, so each one sees the previous one's writes.
* **Read-during-write.** If a query reads a FAC in the same cycle that an
  update writes it, the query sees the old content. A query issued after
  `upd_done_o` sees the new content.

## Interface of `pcam_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `init_done_o` | out | 1 | post-reset sweep finished |
| `cfg_evict_en_i` | in | 1 | 1: evict oldest entry when needed; 0: deny |
| `cfg_conf_thresh_i` | in | `$clog2(D+1)` | set bits needed for `q_accept_o` |
| `upd_valid_i` / `upd_ready_o` | in/out | 1 | update handshake; hold the request until accepted |
| `upd_op_i` | in | `upd_op_e` | `OP_INSERT` or `OP_DELETE` |
| `upd_cls_en_i`, `upd_cls_addr_i` | in | 1, `A_W` | class insertion under an existing address |
| `upd_key_i`, `upd_value_i` | in | `KEY_W`, `VAL_W` | key, value |
| `upd_done_o`, `upd_kind_o`, `upd_addr_o` | out | 1, `upd_kind_e`, `A_W` | result pulse, outcome, address used |
| `mem_full_o` | out | 1 | all `N` addresses used, or the last insertion was denied |
| `q_valid_i` / `q_ready_o` | in/out | 1 | query strobe; `q_ready_o = init_done_o` |
| `q_key_i` | in | `KEY_W` | key |
| `q_res_valid_o`, `q_match_o`, `q_addr_o` | out | 1, 1, `A_W` | result strobe, presence, address |
| `q_conf_o`, `q_accept_o`, `q_value_o` | out | `D`, 1, `VAL_W` | confidence vector, acceptance, value |

The enums `upd_op_e` and `upd_kind_e` are defined in `rtl/pcam_pkg.sv`.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `KEY_W` | 384 | key width; at most 384 (shorter keys are zero-padded) |
| `D` | 4 | sketch rows |
| `M` | 2^19 | FACs per row; must be a power of two |
| `FP_W` | 8 | fingerprint bits |
| `N` | `M` | entries (addresses and value-store depth); `A_W = log2 N` |
| `VAL_W` | 32 | value bits |
| `ROUNDS` | 4 | Xoodoo rounds |

The defaults describe the largest reference configuration: 384-bit keys, four
rows, 8-bit fingerprints and 2^19 entries. That needs 4 × 2^19 × 28 bits
(about 56 Mbit) of sketch and 16 Mbit of value store. The other reference
points (tables of 512 and 20,000 entries, three rows, 96-bit keys) are the
same RTL with other parameters. A 20,000-entry table has to round `M` up to
32,768.

## Measured accuracy

`tb_pcam_accuracy` measures how often a stored key returns its own value. It
inserts unique random keys, with the values 0..`M`−1 in shuffled order. It
queries every stored key at load factors 0.25, 0.5 and 1.0, with eviction on.
Seventeen configurations run side by side, and every answer is also checked
against the reference model. Most use 4096 cells per row. Three use 512 cells,
the smallest table size in the published comparison. One run gave:

| `M` | rows `D` | `FP_W` | key bits | load 0.25 | load 0.5 | load 1.0 |
|---|---|---|---|---|---|---|
| 4096 | 4 | 8 | 384 | 100.00 % | 99.95 % | 99.87 % |
| 4096 | 4 | 8 | 96 | 100.00 % | 100.00 % | 99.90 % |
| 4096 | 3 | 8 | 384 | 100.00 % | 99.95 % | 99.38 % |
| 4096 | 2 | 8 | 384 | 99.70 % | 99.02 % | 94.48 % |
| 4096 | 3 | 4 | 384 | 99.90 % | 99.70 % | 98.38 % |
| 4096 | 4 | 3 | 384 | 100.00 % | 99.80 % | 97.80 % |
| 4096 | 4 | 4 | 384 | 100.00 % | 99.90 % | 98.97 % |
| 4096 | 4 | 6 | 384 | 100.00 % | 99.95 % | 99.78 % |
| 4096 | 4 | 10 | 384 | 100.00 % | 100.00 % | 99.95 % |
| 4096 | 3 | 3 | 384 | 99.90 % | 99.56 % | 96.75 % |
| 4096 | 2 | 3 | 384 | 99.41 % | 98.09 % | 91.99 % |
| 512 | 3 | 8 | 96 | 100.00 % | 100.00 % | 99.21 % |
| 512 | 4 | 8 | 96 | 100.00 % | 100.00 % | 100.00 % |
| 512 | 4 | 8 | 384 | 100.00 % | 100.00 % | 100.00 % |

The trends are the published ones:
* accuracy falls as the load rises and as rows are removed;
* it climbs steeply up to about 6 fingerprint bits and hardly at all beyond
  8;
* key width makes no difference, because the hash spreads every key evenly.

The published figures at full load are:
* 99.85 % (96-bit keys) and 99.83 % (384-bit keys) for four rows;
* 99.42 % and 99.6 % for three rows;
* "above 95 %" for two rows.

At load 0.25, three rows with 4-bit fingerprints are reported above 99.9 %.
The four- and three-row results here fall within 0.25 percentage points of
these. Two rows come out a little lower, at 94.5 %.

The testbench fails if an accuracy drops below a floor a little under the
published figures. The floors leave room for the smaller tables and for the
random seed. It also requires accuracy to improve from 3 to 8 fingerprint
bits for every row count.

It prints the confidence histogram for four rows. At load 0.5 about 43 % of
answers are backed by all four rows, 34 % by three, 17 % by two and 5 % by
one. At load 1.0 the split is about 22 / 30 / 27 / 21 %. The fingerprint size
barely changes either split.

## What follows the reference architecture and what is chosen here

These follow the published P-CAM architecture:
* the sketch of FACs;
* the never-wrapping address counter used as an age stamp;
* the presence, majority and highest-address rules;
* the confidence vector and threshold;
* the four insertion cases, with optional denial;
* delete-by-query;
* separate update and query datapaths on dual-port RAM;
* a single non-compressing hash per datapath, split into indices and
  fingerprint;
* four rounds over the 384-bit state;
* the three-cycle query latency;
* the default sizes.

These are this implementation's own choices:
* **Hash round function.** The non-cryptographic Xoodoo variant is specified
  elsewhere. Here the standard public Xoodoo round is used unchanged, with
  the last four of its twelve round constants. Indices and fingerprints are
  therefore reproducible, but they may differ bit for bit from other P-CAM
  implementations. The measured mean avalanche weight is 191.5 of 384 bits,
  against about 192 expected for a good diffusion. The 3-round, 96-bit
  single-sheet hash variant is not built; 96-bit keys go through the
  384-bit hash instead.
* **Bit slicing** of the hash output into indices and fingerprint, and hence
  power-of-two rows.
* **Empty cells.** A valid bit per FAC marks an empty cell, and an `M`-cycle
  sweep clears the sketch after reset.
* **Tie-breaks and readings of the rules:**
  * "majority" means more than half of the fingerprint-matching FACs;
  * the lowest row is taken when several FACs qualify;
  * the confidence vector counts only rows that agree with the returned
    address;
  * a delete clears only those rows.
* **Timing and handshakes:**
  * the split of the query pipeline into stages;
  * reading the value store in the third stage;
  * the three-cycle, non-overlapping update sequence;
  * the valid/ready handshake;
  * read-first RAM behaviour;
  * the update outcome codes;
  * supplying a shared class address with the insertion request. The idea
    of several keys sharing one address follows the architecture; how the
    address is supplied is chosen here.

Not included: ternary or prefix matching, and approximate (Hamming-distance)
matching. Both appear only as future directions for the architecture.

## Files

`rtl/` — one module per file:
* `pcam_pkg` — types and constants;
* `xoodoo_nc`, `pcam_hash` — hashing;
* `fac_ram` — one sketch row;
* `pcam_adgen` — address generator;
* `pcam_addr_select` — query decision;
* `pcam_update_policy` — update decision;
* `pcam_update_fsm`, `pcam_query_fsm` — the two controllers;
* `pcam_value_store` — value memory;
* `pcam_top` — the whole key-value store.

`tb/` — one self-checking testbench per module, `tb_<module>.sv`, plus:
* `pcam_ref_pkg.sv` — reference models, written independently of the RTL:
  * a bit-level Xoodoo;
  * the query and update rules over lists;
  * a whole behavioural P-CAM;
* `tb_pcam_top.sv` — end to end at reduced size (32 cells per row, 3-bit
  fingerprints). It runs an update stream and a parallel query stream
  against the reference model. It requires every mechanism to occur:
  * fill, duplicate replacement, eviction and update of a present key;
  * both denials;
  * delete hit and miss;
  * split address resolution;
  * accepted and below-threshold answers;
  * queries beside updates;
  * memory full;
  * class insertions, also with all addresses used.
* `tb_pcam_accuracy.sv` (with its helper `pcam_acc_run.sv`) — the accuracy
  experiment described under "Measured accuracy";
* `tb_pcam_full.sv` — the top at its default size (2^19-cycle sweep, then
  inserts, back-to-back queries, overwrites and deletes).

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
after a fixed time if the design hangs.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/pcam_pkg.sv tb/pcam_ref_pkg.sv tb/tb_pcam_top.sv \
    --top-module tb_pcam_top -o sim
./obj_dir/sim
```

Replace `tb_pcam_top` with any other testbench name. The full-size test
builds in about 15 s and runs in under a second.
