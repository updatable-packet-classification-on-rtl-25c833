# KickTree: an updatable multi-tree packet classifier

A packet classifier receives a packet header and returns the highest-priority rule that matches it. This one uses the 5-tuple header: source and destination address, source and destination port, and protocol. Each rule gives a range for every field. Classifiers built from decision trees search fast, but rule updates are usually slow, because rules get copied into several leaves and trees need rebuilding. This design avoids both problems, so the rule set can change while the hardware runs.

- **No rule copies.** The rule set is split over several small trees, and every rule lives in exactly one of them.
- **Bounded trees.** Each inner node tests three chosen header bits, so it has eight children. A leaf holds a linked list of at most *binth* rules (default 10). Trees are at most 8 levels deep.
- **Kicking out.** Suppose a rule has a wildcard at a bit some node tests, meaning the rule's range covers both values of that bit. Then the rule does not belong in that tree. It is "kicked" on to the next tree.
- **Insert.** A new rule is offered to tree 1, then tree 2, and so on. It lands in the first tree where it is not kicked out and whose leaf still has room.
- **Linear fallback.** A last, linear-search PE takes whatever no tree accepts.

All trees are searched in parallel for every packet. Updates go through the trees one after another. Worst-case search and update times are bounded by the tree depth, binth and the number of trees.

The RTL is SystemVerilog-2017 (`rtl/`), with self-checking testbenches (`tb/`).

## Structure

```
kt_top                     NUM_CORES (6) independent classifier cores
 └─ kt_classifier          one core
     ├─ kt_tree_pe × NUM_TREES (10)   one decision tree each
     │   ├─ kt_table_ram  node table (lower 2^n part + optional upper part)
     │   ├─ kt_table_ram  rule table
     │   ├─ kt_node_searcher   NS_UNITS (5) tree walkers, one node-table port
     │   ├─ kt_rule_processor  RP_UNITS (6) list scanners, one rule-table port
     │   │   └─ kt_rule_updater  insert/delete engine
     │   └─ kt_fifo        update bypass FIFO
     ├─ kt_linear_pe        last PE: unbounded list, linear scan
     └─ kt_resolver_tree    levels of kt_resolver2, merges NUM_TREES+1 results
```

Helper modules:

- `kt_sdp_ram`: one write port, one registered read port.
- `kt_rr_arbiter`: round-robin arbiter.
- `kt_fifo`: FIFO.

`kt_pkg` holds the entry formats, the command and result types, and the bit-selection and range-match functions.

## Table formats

A **node entry** (`node_t`) has these fields:

- `is_leaf` and `node_valid`;
- three bit selectors (`sel[i]`), each a field code plus a one-hot mask on that field;
- one address:
  - for an inner node, the address of its first child;
  - for a leaf, the address of its first rule.

The eight children of a node are stored at `addr + idx`. `idx` is built from the three selected header bits, with `sel[2]` as the most significant bit. A selector with an all-zero mask gives a constant 0, so a node can test fewer than three bits. The root of every tree is node address 0. An invalid node is empty: a search that reaches it finds nothing.

A **rule entry** (`rule_t`) has these fields:

- `next_valid` and `next_addr`, which chain the rules of one leaf;
- rule ID;
- priority (a larger value wins);
- a low/high range per field. Prefixes and exact values are also stored as ranges.

Each table is a `kt_table_ram` with two parts:

- a lower part of 2^LAW entries;
- an upper part of UDEPTH entries for the addresses just above it.

A table that needs 2^n + k entries therefore costs 2^n + k, not 2^(n+1). The per-tree depths are parameter arrays of `kt_classifier` (`NODE_LAW`, `NODE_UDEPTH`, `RULE_LAW`, `RULE_UDEPTH`). Their defaults are sized for the ClassBench `acl1` 100k-rule set:

| Tree | Node entries | Rule entries |
|---|---|---|
| 1 | 2^15 + 8192 | 2^17 |
| 2 | 2^12 | 2^14 |
| 3 to 10 | 2^10 | 2^12 |

The host builds the trees in software and loads them with the `cfg` write port:

- `cfg_core` and `cfg_pe` pick the destination;
- `tbl` picks the node table, the rule table, or the spare-region pointer (`CFG_SPARE`).

A PE takes new rule entries from two sources:

- first from a free list of entries released by deletes;
- otherwise from the spare region, which starts at the spare pointer and runs to the end of the rule table.

## A tree PE

**Node Searcher.**

- Each of its NS_UNITS units walks one job from the root to a leaf. A job is a packet header, or, for an update, the rule's low endpoints.
- The units share the node table's single read port through a round-robin arbiter.
- Each level costs one arbitration cycle plus one read cycle. A lone packet that reaches a leaf one level below the root is done 5 cycles after it is accepted.
- For updates, the unit keeps the node it ended on and that node's parent. These two cached levels let the update engine rewrite a leaf pointer without reading the tree again.
- An update also checks every node on its path. If the rule has a wildcard at a selected bit, the unit stops with "fail" and the rule is kicked on.
- A walk deeper than MAX_DEPTH also fails.

**Rule Processor.**

- Each of its RP_UNITS units scans one leaf's list and keeps the highest-priority match. The list is not assumed to be sorted.
- The units share the rule table's read port round-robin. The update engine (`kt_rule_updater`) is the arbiter's last requester.

**Insert.** The update engine does these steps in order:

1. Walk the leaf's list. It fails if the list already holds binth rules.
2. Take a free entry.
3. Write the rule at the head of the list.
4. Point the leaf at the new rule. An empty node becomes a leaf.

**Delete.** The engine walks the list to the rule with the given ID and unlinks it. It does this by rewriting the predecessor's `next` field, or the leaf pointer if the rule is first. A leaf left empty becomes invalid. The freed entry goes onto the free list.

**Update flow in a PE.**

- Only one update is inside a PE at a time. A waiting update takes the Node Searcher before waiting packets do.
- An update that an earlier PE already performed (result SUCCESS) does not enter the tree. It goes through the PE's bypass FIFO to the next PE.

## The linear PE

- It holds LIN_DEPTH (1024) rules in slots with valid bits.
- An insert takes the first free slot.
- A delete clears the slot that holds the rule ID.
- A search scans from slot 0 up to the highest slot ever used. It reads one slot per cycle and handles one packet at a time.
- Updates that reach it still pending are tried here. Anything that still fails is reported as UPDATE_FAILURE.

It exists so that inserts do not fail in practice. If many rules gather here, searches slow down: the scan length sets the core's packet rate. The intended remedy is to rebuild the trees in software.

## One core: parallel search, serial update

**Search.**

1. A header on `s_*` gets the next packet ID.
2. The header goes to all PEs in the same cycle. The input waits until every PE can take it.
3. Each PE returns `{pkt_id, found, rule_id, prio}`. Results come back out of order, both across PEs and within a PE.
4. `kt_resolver_tree` turns these into one in-order stream on `r_*`, with `r_code` RULE_FOUND or RULE_NOT_FOUND.

**Update.**

1. A command on `u_*` (INSERT or DELETE, rule ID, priority, ranges) enters PE 0 marked *pending*.
2. Each PE tries it until one succeeds.
3. Later PEs forward the result through their bypass FIFOs.
4. The linear PE issues the final result on `ur_*`.

A delete must carry the rule's ranges as well as its ID. That is how each tree finds the leaf that could hold the rule.

**Mode switch.** Searches and updates never overlap in a core:

- An update is accepted only when no packet is in flight and no PE is busy.
- From the moment an update is offered until its result has left, `s_ready` is low.
- `upd_mode` shows this state.

## Result collection and the balancer

`kt_resolver2` merges two result streams. Each channel has a reorder memory of 2^ROB_AW entries, indexed by the low packet-ID bits. Let *head* be the next packet ID to output:

- When both channels hold the head, the resolver pops both.
- It keeps the higher-priority match and writes it to an output FIFO.

**Balancer.** The balancer stops one fast channel from filling the shared window while the other lags. A channel is held off when both of these are true:

- it already holds the head;
- it holds more than BAL_THRESH entries more than the other channel.

A result whose ID lies outside the window is also held.

**The tree of resolvers.** `kt_resolver_tree` stacks ceil(log2 N) levels of these. With an odd number of streams at a level, the last one goes through a *bypass-mode* resolver. That resolver has one channel, keeps the order, and builds no second memory.

**In-flight limit.** The core admits at most 2^ROB_AW (64) packets in flight. This keeps every result inside every window. Without the limit, a slow channel could hold the head outside a fast channel's window, and the resolver would deadlock.

`throttled` shows when any balancer is holding a channel.

## Interfaces and timing

- All streams are valid/ready. Data transfer on a clock edge where both are high.
- Reset is synchronous and active low.
- Memories are not reset. Their arrays are cleared at time zero, so an unloaded node reads as invalid.
- `kt_top` brings each core's ports out as packed arrays indexed by core, plus one shared `cfg` bus.
- Packet latency in a tree is:
  - 1 cycle to accept;
  - 2 cycles per node level;
  - about 2 cycles per rule read, when the rule read port is uncontended;
  - plus a few cycles per resolver level.
- Throughput depends on the mix:
  - each tree PE runs up to 5 walks and 6 list scans at once;
  - every packet waits for all PEs, so the slowest PE sets the pace.
- The core's packet rate can be no higher than one packet per (linear-list length + 3) cycles.

## Departures from the published design and choices made here

- Entry field order and widths, the root address, the child index order and the result-code encoding are this design's own. So are the separate priority and ID fields, and an internal PENDING code for updates that no PE has done yet.
- The source describes the "last two levels" cache, the kick-out rule, round-robin sharing and the bypass FIFOs. It does not describe these details, which are chosen here:
  - head-of-list insertion;
  - the free list;
  - the spare pointer register;
  - one update per PE at a time.
- The source sizes tables per rule set and says that later trees may use larger binth and depth, without giving those values. Here:
  - trees 4 to 10 reuse tree 3's table depths;
  - every tree uses binth 10 and depth 8.
  
  All of these are per-tree parameter arrays.
- The resolver reads as soon as one result per channel is present, rather than after a batch of results. The balancer rule, its threshold (4), the window depth (64), the output FIFO depth (8), the bypass FIFO depth (4) and the in-flight limit are this design's own.
- The linear PE's size (1024) and its scanning scheme are chosen here.
- How the host builds trees (the software tree construction) is not part of the RTL. Neither is how packets are spread over the six cores.
- Memory type (distributed, block or ultra RAM) is left to synthesis inference.

**Capacity.** With the default parameters, one core holds rule sets shaped like ClassBench acl1, acl4, acl5 and ipc1 (100k rules).

Sets that need more trees, or bigger second and third trees, need the parameters changed. Examples:

- acl2 uses 21 trees;
- fw1 has 6239 nodes in tree 2.

The parameter arrays allow this without editing the RTL.

## Simulating

Each block has a testbench `tb/tb_<module>.sv`. Each one:

- prints `TB_RESULT checks=N failures=M`;
- stops itself with a watchdog;
- uses only `$urandom`.

Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/kt_pkg.sv tb/kt_tb_pkg.sv tb/tb_kt_top.sv --top tb_kt_top
./obj_dir/Vtb_kt_top
```

**Reference model.** `kt_tb_pkg` has the reference model used by the end-to-end tests:

- It keeps every rule and answers a search by brute force (highest priority over all rules).
- It predicts where an insert lands: the first tree whose root bits are fixed in the rule and whose leaf has room, else the linear PE, else failure.

**`tb_kt_classifier`** runs a small core: 3 trees, binth 2, 8 linear slots. It reaches all of these:

- the bypass FIFOs;
- linear-PE inserts;
- failed inserts;
- updates waiting for packets to drain;
- packets waiting for updates;
- the balancer.

**`tb_kt_top`** runs the full default configuration: 6 cores × (10 trees + linear PE), with the full table sizes. It does the following:

- Loads the roots of all cores.
- Runs inserts, deletes and about 870 searches per core, with all cores at once.
- Applies random and long back-pressure to the results.
- Counts bypass pushes, linear inserts, update waits, packet waits, in-flight-limit stalls and balancer activity. A count of zero is a failure.

It runs in a few seconds.
