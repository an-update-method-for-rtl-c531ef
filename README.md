# Longest-prefix-match CAM emulator: an LUT cascade on an edge-valued decision diagram

A router looks up each destination address in a table of prefixes and must
return the entry with the longest matching prefix. Ternary CAMs do this by
comparing the key with every entry at once, which burns power in every cell
on every lookup. This design does the same job with ordinary RAM: the lookup
is a chain of small memories, one read per memory, so only one word per
memory is activated per lookup.

The trick is to treat the lookup as an integer function of the key,
`f(key) = index of the longest stored prefix that matches key` (0 when none
matches), and to evaluate that function with a decision diagram cut into
levels. The key is split into `u = ceil(n/k)` groups of `k` bits ("super
variables" X_1 .. X_u, X_1 = most significant). Each level of the diagram is
one memory, a *cell*. A cell is addressed by its k key bits and by the number
of the current diagram node (the *rails* coming from the previous cell); it
returns the number of the next node and an integer *weight* for the edge it
followed. The result is the sum of the u weights. Because weights are
allowed on the edges (an *edge-valued* diagram, EVMDD(k)), whole subtrees
that differ only by a constant offset collapse into one node. This makes the
levels narrower, so fewer rails and smaller memories are needed than with a
diagram that holds the index only at its leaves.

With the defaults (32-bit IPv4 keys, k = 4, tables of up to 1023 prefixes)
the cascade has 8 cells, 1.56 Mbit of memory in all, and accepts one key per
clock with a latency of 9 clocks.

## Lookup path

```
 key[31:28]   key[27:24] (delayed 1)  ...            key[3:0] (delayed 7)
     |              |                                     |
  +------+  rails +------+  rails            rails   +------+
  |cell 0|------->|cell 1|-------> ... ------------->|cell 7|
  +------+  (4)   +------+  (8)              (10)    +------+
     | w0            | w1                               | w7
     v               v                                  v
    (+)----------->(+)-------------> ... ----------->(+)----> out_index
```

* `cascade_stage` is one cell: a `lut_ram` (the cell memory) plus a
  `weight_adder`. The memory word is `{next node, edge weight}`; the address
  is `{X_i, current node}`.
* Cell 0 has no rails in: the diagram has a single root, so its memory has
  only 2^k words. The last cell has no rails out: all of its edges go to the
  terminal, so its words hold only the weight.
* Rails between cell b-1 and cell b: `min(RAIL_W, k*b)`. Level b cannot hold
  more nodes than there are values of the first k*b key bits. It also holds
  at most 2^RAIL_W nodes, with `RAIL_W = ceil(log2(p+1))` for p prefixes.
  With the defaults that is 4, 8, then 10 rails.
* A cell with `r_in` rails in, `r_out` rails out and `a` weight bits holds
  `(r_out + a) * 2^(k + r_in)` bits. Per cell with the defaults: 224; 4,608;
  81,920; 4 x 327,680; 163,840.

### Timing

The cell memory has a registered read (block-RAM style). In the clock cycle
after cell i samples `{X_i, rails}`, its `rail_out` is ready and feeds cell
i+1 directly. The weight appears at the same time and is added one clock
later, so the running sum arrives at every adder just when that cell's
weight does. Key digit i is delayed i clocks in the top so that it meets the
rails of its own key. `out_valid` and `out_index` appear `u + 1` clocks
after `in_valid` (9 with the defaults). A new key can enter every clock.
Only the valid bits are reset. The adders are clock-enabled only for valid
lookups.

## What goes in the memories

The hardware evaluates whatever integer function its words encode. Building
those words is the work of the update host: software on a processor next to
the cascade. The host is not part of the RTL. The testbench host
(`tb/evmdd_host_pkg.sv`) shows one valid construction, and is the best
reference for anyone writing a real one:

1. **Nodes.** A node on level i stands for the key bits `v` consumed so far
   (i*k bits). On the early levels, where `i*k <= RAIL_W`, every path has
   its own node, numbered `v`. Those are the root, level 1 (16 nodes) and
   level 2 (256 nodes) with the defaults. On deeper levels a path gets a node
   of its own only if some stored prefix longer than i*k bits starts with
   `v`. Every other path leads to one shared node, number 0, below which the
   function is constant. Its edges all have weight 0 and lead to node 0
   again.
2. **Numbering.** On the deeper levels a node keeps its number for as long
   as it exists. A new node takes the lowest free number from 1 up. A
   level therefore needs at most one number per prefix longer than i*k
   bits, plus node 0. Stable numbers mean that an update rewrites only the
   nodes it really changes.
3. **Weights.** Take the edge from `v` with digit `j`. Its weight is
   `f(v j 0...0) - f(v 0...0)`, so every 0-edge has weight 0: this is the
   edge-valued normalisation. The root's edges carry the absolute value
   `f(j 0...0)`. Along any key's path the weights telescope to `f(key)`.
   The sum stops changing once the path enters the constant node.
4. **Negative weights.** Weights are stored modulo 2^W_W. The adders wrap
   around, so a negative weight in two's complement works as long as every
   complete path sums to a value in 0..2^W_W - 1. This lets the host give
   prefixes any index it likes. A host that numbers prefixes so that f
   never decreases as the key grows (each step up by at most one, an
   "M1-monotone" numbering) gets only non-negative weights and narrower
   diagrams.

The indices returned are the host's choice. The usual convention is: store
prefixes in order of decreasing length; the index is the position of the
first match; 0 means no match. The testbench host instead gives each prefix
a fixed index and returns the index of the longest match. This keeps
indices stable across updates.

The testbench host does not merge nodes whose subfunctions are equal, apart
from the constant node. Its diagrams are therefore correct but not
minimal. A fully reduced diagram needs fewer rails for the same table.

## Updating the table

Prefixes are added and deleted by rewriting cell words through the update
port: `upd_valid`, `upd_stage` (cell), `upd_node`, `upd_digit`,
`upd_rail`, `upd_weight`. The port accepts one word per clock, never
stalls, and does not stop lookups. The memory is read-first: a lookup that
reads the word being written in the same clock gets the old word.

The update procedure is:

1. Walk the diagram from the root along the changed prefix, turning each
   edge-valued node back into plain leaf values.
2. Change the value at the end of the path.
3. Walk back up, re-normalising the nodes into edge-valued form.
4. Rewrite the cell words of every node that changed.

Changing one prefix alters only the nodes on its path and the nodes it
creates: at most 2 x u x 2^k = 256 words with the defaults. The testbench
host recomputes the whole diagram in software. Thanks to the stable node
numbering it then writes only the words that differ, and it writes them
last cell first, so that new nodes exist before anything points to them.
In simulation, replacing one prefix by another (a deletion plus an
addition) in a full 1023-prefix table took 27 clocks of writes on average
and 245 at worst. At a 48 MHz clock that is about 196,000 updates per
second. A BGP router's peak is around 10^4 updates per second, so the
port is not the limit; the host's software is.

Coherence while an update is in flight is left to the host. A key that is
looked up while some of its path's words are new and others old can get a
wrong index. The testbenches check lookups only once an update's writes
are complete.

Capacity: level b must never need more than `2^min(RAIL_W, k*b)` node
numbers. An update can widen a level by at most one node per changed
prefix. With the defaults, 10 rails and a 10-bit index hold any table of up
to 1023 prefixes numbered as above; the testbench fills the table to
exactly 1023. For larger tables, raise `RAIL_W` and `W_W`.

## Parameters

| Parameter (`evmdd_cam`) | Default | Meaning |
|---|---|---|
| `N_BITS` | 32 | key length n (IPv4) |
| `K` | 4 | bits per super variable k |
| `RAIL_W` | 10 | most rails between two cells, ceil(log2(p+1)) for p = 1023 |
| `W_W` | 10 | weight and index width |
| `U`, `SEL_W`, `LATENCY` | 8, 3, 9 | derived (number of cells, `upd_stage` width, clocks); do not override |

The defaults live in `rtl/cam_pkg.sv`, together with `num_cells` and
`rails_at`. Choosing `K` trades cells (latency, adders) against memory:
each cell has 2^(k + r) words. Keys whose length is not a multiple of `K`
are padded with zeros at the low end.

## Relation to the published method

These follow the published method: the cascade of cells addressed by a
super variable and rails, the weight output of each cell and the adder
chain, the cell-size formula, the rail bound ceil(log2(p+1)), key length
32, the table sizes up to 1023 prefixes, and update by rewriting the words
of changed nodes.

These are this design's own choices:

* k = 4.
* The cap `k*b` on the early rails. Rails are sized for the worst case
  rather than for the table at hand, so the memory (1.56 Mbit) is larger
  than a table-specific cascade would need. It never has to be rebuilt
  after an update.
* The register placement and latency.
* The separate write port, with read-first behaviour.
* The port protocol.
* Wrap-around weights.
* The weight output is `W_W` bits in every cell. The published cell-size
  formula allows a different weight width a_i per cell.
* The testbench host gives prefixes fixed indices and does not reduce the
  diagram fully. The published method numbers entries so that the function
  is M1-monotone, which keeps the diagram narrower.

Not included:

* The host processor and the diagram update software.
* Any interface to a particular processor bus.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_lut_ram`: random reads and writes against a reference array,
  including same-address collisions (read-first) and held reads.
* `tb_weight_adder`: sums, wrap-around and the enable.
* `tb_cascade_stage`: first, middle, narrow-rail and last cells against
  reference tables, with rewrites during lookups and exact cycle timing.
* `tb_lpm_tables`: random tables of 255, 511 and 1023 prefixes, 3000
  checked lookups each. It checks that every level fits its rails. It also
  prints the memory that a cascade sized for exactly that table would need:
  0.34, 0.63 and 1.24 Mbit, against the 1.56 Mbit built.
* `tb_bgp_update_rate`: 200 prefix replacements in a full 1023-prefix
  table. It checks lookups after each one and requires at most 480 clocks
  per update, which is 100,000 updates/s at 48 MHz.
* `tb_evmdd_cam`: end to end at the default size, through the update port
  only. The testbench host does the following:
  1. loads 200 random prefixes and checks 2000 lookups;
  2. makes 40 single-prefix additions and deletions, with unchecked
     lookups running during the writes;
  3. fills the table to 1023 prefixes.

  Every result is checked against a direct longest-prefix search, and every
  latency must be exactly 9 clocks. It counts hits, misses, back-to-back
  lookups, writes in the same clock as a lookup, additions and deletions,
  and fails if any never happens. It also checks that every level's width
  fits its cell's rails, and that no single-prefix update writes more than
  2 x u x 2^k words. It runs in about a second.

To simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/cam_pkg.sv tb/evmdd_host_pkg.sv rtl/lut_ram.sv rtl/weight_adder.sv \
  rtl/cascade_stage.sv rtl/evmdd_cam.sv tb/tb_evmdd_cam.sv \
  --top-module tb_evmdd_cam
./obj_dir/Vtb_evmdd_cam
```

The other testbenches build the same way, with their own top module.

## Files

* `rtl/cam_pkg.sv`: default sizes and the helper functions `num_cells`,
  `rails_at` and `sel_width`.
* `rtl/lut_ram.sv`: cell memory.
* `rtl/weight_adder.sv`: weight adder.
* `rtl/cascade_stage.sv`: one cell.
* `rtl/evmdd_cam.sv`: top, with the cascade, key skew and update decode.
* `tb/evmdd_host_pkg.sv`: behavioural update host and reference lookup.
* `tb/tb_*.sv`: testbenches.
