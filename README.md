# Packet classifier from LUT cascades for edge-valued decision diagrams

A 5-tuple packet classifier takes SA, DA (32 bits each), SP, DP (16 bits each) and
PRT (8 bits). It returns the number of the highest-priority rule that matches. Here
rules are numbered so that a larger number wins, and rule 0 is the default that
matches everything. This RTL builds the classifier from memories and adders, not
from a TCAM:

* The rule set is split into two groups: a large one (about 9600 rules in the
  reference set of 9816 ACL rules) and a small one (about 216).
* In each group, every header field goes through a *field function*. This maps the
  field value to the index of the segment it falls in. A segment is a stretch of
  values where the set of matching rules does not change.
* The five indices together drive a *Cartesian-product function*, which gives the
  group's best rule.
* Each of these functions is *M1-monotone*: it starts at 0 and goes up by 0 or 1
  from one input value to the next. Such a function has a small
  edge-valued multi-valued decision diagram, an EVMDD(k). That diagram is mapped
  onto a *LUT cascade with adders*: one small memory per k input bits, and an adder
  that sums the edge weights along the path.
* A translation memory turns the product function's monotone index back into a
  rule number.
* A maximum selector combines the two groups.

Rules can be changed while traffic flows. A one-rule range-matching CAM answers for
the rule being changed. Meanwhile, the memory words that change are written
through the lookup pipeline as *write bubbles*.

The top level, `pc_top`, has two such classifiers. Each takes two headers per
clock through the two ports of its memories, so the top takes four headers per
clock. At 500 MHz with minimum 40-byte packets that is 4 × 0.5 GHz × 320 bit =
640 Gb/s.

## The LUT cascade for an EVMDD(k) (`evmdd_cascade`)

This block is the core of the design and the hardest part to follow.

An n-bit key is cut into u = ⌈n/k⌉ *super variables* of k bits, most significant
first. The key is zero-padded at the top when k does not divide n. Stage j
(j = 0 is the top) is one memory, `lut_ram`:

```
address = { rails_in (from stage j-1) , key[k bits of stage j] }
word    = { rails_out (to stage j+1)  , weight (IDX_W bits)     }
```

*Rails* carry the identity of the diagram node the key has reached. *Weight* (the
"Arails") is the value of the edge just taken. Stage 0 has no rails in. The last
stage has no rails out, because its only successor is the zero terminal. An adder
per stage accumulates the weights, and the sum after the last stage is the
function value.

The number of rails out of stage j is `min(RAIL_W, k·(j+1))`, because level j
cannot hold more than 2^(k(j+1)) nodes. This keeps the first stages tiny. The
helpers are `pc_pkg::rail_out_w` and `rail_in_w`.

**Filling the tables.** Any M1-monotone step function can be written as
f(X) = #{ i : bᵢ ≤ X } for sorted start points 0 < b₁ < b₂ < … . A correct (not
necessarily minimal) diagram comes straight from the start points:

* After the top j+1 super variables, the key has reached prefix P, which covers
  2^m values (m = bits still to come).
* P gets a node of its own if some bᵢ lies strictly inside its range. Otherwise it
  goes to the shared constant-zero node.
* The edge from parent prefix P with digit d has weight
  #{ bᵢ : P·2^(m+k) < bᵢ ≤ (P·2^k + d)·2^m }. The weights along a key's path add
  up to f(key).
* The constant node's edges have weight 0 and lead back to the constant node.
* Node ids are given in ascending prefix order. The constant node takes the next
  free id.

The testbench package `tb/evmdd_host_pkg.sv` implements exactly this. It is the
model to read when generating tables in software. A real host would also merge
isomorphic nodes, which is what makes EVMDD cascades narrow. The hardware does not
care how the ids were chosen.

**Timing.** A key entered at cycle 0 is read by stage j at cycle j. Each memory
read is registered, and each adder has a register. The index appears at
cycle u + 1, flagged by `out_valid`. Every stage has `LANES` read ports, so each
lane is a full-rate pipeline.

**Write bubbles.** A `wr_bubble_t` has these fields:

* `valid`
* `grp`: rule group
* `tgt`: which cascade, or the translation memory
* `stage`
* `addr`
* `data`

A bubble enters with the keys of its cycle and moves one stage per clock. The stage
it names writes the word when the bubble arrives. Memories are write-before-read,
so keys entered before the bubble see the old word and keys entered with or after
it see the new one.

**The conventional cascade for comparison (`mtmdd_cascade`).** A multi-terminal
MDD(k) realises the same function without adders. Each node stands for one exact
sub-function, and the last LUT stores the value itself. Sub-functions that differ
only by a constant cannot share a node, so this form needs more rails. The module
uses the same pipeline and write bubbles as `evmdd_cascade`, with one clock less
latency (⌈n/k⌉). It is not used by the classifier; it is there so the two forms
can be compared on the same function. The testbench model builds its tables with
one node per live prefix plus one constant node per distinct value.

## A rule group (`group_classifier`)

The five field cascades have latencies of 17 clocks (SA, DA), 9 (SP, DP) and 5
(PRT) with k = 2. Shorter ones are delayed to 17. Their indices are concatenated
as `{SA, DA, SP, DP, PRT}`. The result is the key of the Cartesian-product cascade
(36 bits by default for the large group: 18 stages). The product cascade's output
index addresses `translation_mem`, whose word is the rule number.

The Cartesian-product function must be M1-monotone. So the host orders every valid
index combination as a number and walks them in order, numbering each run of equal
best-rule values. The run number is the product cascade's output, and the
translation table holds the rule of each run. Write bubbles reach the product
cascade and the translation memory delayed by 17 and 17 + 19 clocks, so they stay
in step with the packets they were sent with.

Group latency is 17 + (⌈CP_IN/k⌉ + 1) + 1: 37 clocks for the large group and 35 for
the small one at the default widths.

## One classifier and the top

`lut_classifier` delays the faster group to match the slower one. It picks the
larger rule number with `max_selector` and registers it, for a latency of 38.

`pc_top` adds these parts:

* **`range_match_cam`**: one rule, stored as four intervals (SA/DA prefixes become
  the interval they cover) plus an exact PRT value. Each `range_detector` is two
  bound registers, two comparators and an AND. `set` loads a rule in one clock and
  `clear` drops it in one clock. A miss returns rule 0. The CAM is looked up when a
  header enters, and its answer travels with the header.
* **`priority_encoder` and `result_mux`** per lane. A CAM match takes priority over
  the cascades' answer.
* **`update_sequencer`**: executes host commands (`cmd_t`) with a valid/ready
  handshake:

  | `op` | effect |
  |---|---|
  | `CMD_CAM_SET` | load `cmd.rule` into the CAM, raise `update_busy` |
  | `CMD_LUT_WRITE` | one write bubble {grp, tgt, stage, addr, data}, one per clock |
  | `CMD_CAM_CLEAR` | wait out the 39-clock pipeline latency, then clear the CAM and pulse `update_done` (40 clocks after the command) |

A bubble is sent to both classifiers at once. It takes the place of the lookup on
the first lane of each classifier (lanes 0 and 2). So `hdr_ready` is low on those
lanes in a cycle that carries a bubble, and an offered header is not taken. Lanes 1
and 3 are always ready. A header taken at cycle 0 has its `res_valid`/`res_rule`
at cycle 39. `res_cam_hit` tells that the answer came from the CAM.

### On-line update sequence

1. `CMD_CAM_SET` with the new rule.
2. `CMD_LUT_WRITE` for every memory word that differs between the old and new
   tables. This covers field cascades, product cascade and translation memory, in
   the rule's group.
3. `CMD_CAM_CLEAR`, then wait for `update_done`.

While the words are being rewritten, an unrelated header can see a mix of old and
new words and get a wrong rule. The CAM covers only headers inside the rule being
updated. How safe the in-between state is depends on how the host builds its tables.
An update that only re-labels nodes on the updated key's path disturbs nothing else.
A full rebuild, like the testbench's simple table generator makes, does not have
that property. The testbench therefore checks headers outside the new rule only
before the first and after the last write.

The CAM always wins when it matches. This is right for adding a rule whose number
is higher than every rule it overlaps. It is not right for adding a lower-priority
rule or for deleting one. A deletion is therefore done as plain writes of the
words that differ between the old tables and tables built without the rule. It has
no CAM cover: headers that the deleted rule matched may see either answer while
the words are being written.

## Sizes

Parameters and their defaults:

| parameter | default | meaning |
|---|---|---|
| `K` | 2 | bits per super variable (k = 2 gave the smallest memory and power) |
| `N_CLS`, `LANES` | 2, 2 | classifiers, and lanes (memory ports) per classifier |
| `G0_*_IDX_W` | SA 10, DA 10, SP 6, DP 7, PRT 3 | index widths of the large group's fields |
| `G0_CP_RAIL_W`, `G0_CP_IDX_W` | 10, 14 | product-cascade rails and index (up to 16384 runs) |
| `G1_*_IDX_W` | SA 8, DA 8, SP 5, DP 6, PRT 3 | the small group's field index widths |
| `G1_CP_RAIL_W`, `G1_CP_IDX_W` | 8, 8 | the small group's product cascade |
| `RULE_W` (package) | 14 | rule number, enough for 9816 rules |

Field cascades use rails = index width, the form of the known bound: a field with
p distinct entries needs at most ⌈log₂(2p+1)⌉ rails and as many weight bits. The
per-field widths of a real 10k-rule set are not known here. The defaults are
estimates that keep the total memory in the range of the reference
implementation.

Memory bits at the defaults, from the formula Σ 2^(k+rails_in)·(rails_out+IDX_W)
per cascade:

* Large group: 1.82 Mbit of field cascades, 1.27 Mbit of product cascade and
  0.23 Mbit of translation memory.
* Small group: 0.59 Mbit.
* One classifier: 3.9 Mbit (477 KB). The top has two, 7.8 Mbit.

The reference implementation reports 576 KB (256 block RAMs of 18 Kb) for its 9816
rules and both classifiers. The defaults here come to about 1.7 times that, because
every stage is given the full rail width, where a minimal diagram narrows. A rule set whose
fields have more segments than the widths allow will not fit. `build_cascade` in
the testbench package reports that, and the widths must then be raised.

## Where this RTL departs from, or fills in, the original architecture

* Rail/index widths, the word layout, the write-bubble and command formats, the
  drain wait, the order of indices in the product key and the field-alignment
  delays are this design's choices.
* The per-stage rail narrowing `min(RAIL_W, k(j+1))` is this design's choice.
  Real per-LUT rail counts come from the diagram.
* `lut_ram` has two read ports plus a write port. Because a bubble takes a lane-0
  slot, a block RAM's two ports suffice: port A reads or writes, port B reads. The
  model itself does not enforce this.
* Memories start at zero, so an empty classifier returns rule 0 for every header.
* The host software (building minimal EVMDDs, the path-local update algorithm) and
  the JTAG-UART link are not hardware here. The command port stands in for them.
* The 500 MHz clock target is not checked.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The host model is `tb/evmdd_host_pkg.sv`. Build
any of them with Verilator 5, for example the full design at default size:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pc_pkg.sv tb/evmdd_host_pkg.sv \
    rtl/*.sv tb/tb_pc_top.sv --top-module tb_pc_top -Wno-fatal
./obj_dir/Vtb_pc_top
```

(`rtl/pc_pkg.sv` must come first; listing it twice through `rtl/*.sv` is harmless.)

What the testbenches cover:

* **`tb_pc_top`** runs at default parameters, in about a second. It does the
  following:
  * loads random rule groups through the command port while traffic is offered on
    all four lanes (lane stalls occur);
  * checks every result against a direct search of the rule list, at exactly 39
    clocks;
  * performs an on-line addition of a new top-priority rule with traffic running,
    with CAM hits during the rewrite;
  * checks the classifier after `update_done`;
  * deletes the highest rule of the large group by rewriting only the words that
    change, then checks every header against the reduced rule set.
* **`tb_lut_classifier`** and **`tb_group_classifier`** check one classifier and one
  group at default widths.
* **`tb_evmdd_cascade`** checks a 16-bit cascade, including a rewrite under traffic
  and a bubble for another cascade.
* **`tb_cascade_k_sweep`** puts one 16-bit field function into EVMDD and MTMDD
  cascades with k = 1, 2, 3 and 4, eight side by side (k = 3 exercises the top
  padding). It checks every index and prints each cascade's memory. For its
  function (60 boundaries):
  * EVMDD, 7-bit rails: 33,780, 29,716, 43,920 and 46,768 bits;
  * MTMDD, 8-bit rails: 35,842, 34,248, 51,608 and 63,552 bits.

  The EVMDD form is smaller at every k, and k = 2 is smallest for both.
* The remaining testbenches check `lut_ram`, `translation_mem`, the CAM, range
  detector, selector, encoder, multiplexer and sequencer on their own.
