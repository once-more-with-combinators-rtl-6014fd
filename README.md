# A combinator graph-reduction processor with a concurrent snapshot collector

This is RTL for a small processor that runs lazy functional programs
directly in hardware. A program is compiled to a graph built from a fixed
set of combinators (S, K, I, B, Y, the indexed families C_n and L_n, and a
few integer operators). Integers have variable precision. The processor evaluates the graph by rewriting it in
place until it reaches weak head normal form. It has no instruction set, no
software interpreter and no evaluation stack.

Garbage is reclaimed by a mark-and-sweep collector. The collector runs at the
same time as the program, so the program never pauses for a collection. The
collector works on a *snapshot* of the graph. The memory keeps that snapshot
cheaply: after a snapshot, the first write to each node goes to a second copy
of that node, and the old copy is left alone.

The aims are low energy and short, predictable latency for small embedded
(IoT-class) devices. Laziness, purity and variable-precision arithmetic are
meant to make such programs safer than C.

```
                 start/root                      host load / read
                     |                                 |
             +-------v---------+  mem port (priority)  |
             | reduction_engine|---------------+-------+
             |  bigint_unit    |               |
             +--+----------+---+        +------v-------+   2x nodes
        alloc   |          | snapshot   | snapshot_mem |-- node_ram
                |          | handshake  |  cur/wsn bits|
          +-----v-----+  +-v--------+   +------^-------+
          | free_list |<-| gc_unit  |----------+ mem port (snapshot reads,
          +-----------+  +----------+            compression writes)
             frees         mark stack, mark bits
```

## The graph

Each node is 56 bits wide (`ceph_pkg::node_t`):

| field  | bits | meaning |
|--------|------|---------|
| `tag`  | 2    | `T_APP` application, `T_COMB` combinator, `T_INT` integer, `T_IND` indirection |
| `left` | 32   | APP: function pointer; COMB: code in [7:0], index n in [15:8]; INT: one 32-bit limb; IND: target pointer |
| `right`| 10   | APP: argument pointer; INT: next limb (null in the last) |
| `back` | 10   | parent pointer, written by the engine while it walks down a spine |

Pointers are 10 bits wide, so there are 1024 usable nodes. Address 0 is the
null pointer. The widths are set in `ceph_pkg` (`AW`, `DW`). Everything else
derives from them. Booleans have no node type of their own. They are the
combinators `K` (true) and `KI` (false), which select one of two further
arguments.

## Reduction without a stack

`reduction_engine` is one state machine. It evaluates the graph in two phases.

**Unwind.** The engine starts at the root and follows the function (`left`)
pointers down the spine of applications. Each time it enters an application,
it writes the parent's address into that node's `back` field. The path back
up the spine is therefore stored in the graph itself, not in a stack. Pausing
or switching programs only needs the few pointer registers. The engine
follows indirections without doing anything else.

**Rewrite.** The engine stops descending when the head of the spine is a
combinator or an integer. It then climbs back up through the `back` pointers
and collects one argument per application node. It stops when it has as many
arguments as the head needs. The last application node it visits is the
*redex root*. The engine overwrites the redex root with the result, so every
node that shares it sees the result. Unwinding then continues from the redex
root. If the engine runs out of parents before it has enough arguments, the
graph is in weak head normal form. The engine raises `done` and shows the
head node on `result`.

| rule | result written to the redex root | new nodes |
|------|----------------------------------|-----------|
| `I x` | `IND x` | 0 |
| `K x y` / `KI x y` | `IND x` / `IND y` | 0 |
| `S f g x` | `APP(APP f x, APP g x)` | 2 |
| `B f g x` | `APP(f, APP g x)` | 1 |
| `Y f` | `APP(f, root)`: a cycle | 0 |
| `C_n f e1..en x` | `f x e1 .. en` | n |
| `L_n e1..en x` | `x e1 .. en` | n-1 |
| `v f` (v an integer) | `APP(f, v)` | 0 |
| `op a b` (+ - * quot == <) | `INT` result, or `K`/`KI` for comparisons | one per extra limb |

The `v f => f v` rule makes strict operators work without evaluating their
operands recursively. The compiler writes `a + b` inside out, as
`b (a (+))`. When `b` becomes a value it swaps with its function, which then
evaluates `a`. After `a` swaps as well, the operator node has two integer
arguments. The `L_n` family performs the same swap for partial applications
of operators.

An allocation request that is not granted stalls the engine until the
collector frees nodes. The engine stops with `error` in three cases:
`err_code` 1 is an operator applied to a non-integer, 2 is an integer wider
than the arithmetic unit's local memory or a division by zero, and 3 is a
C_n or L_n index above `MAXN` (6).

## Variable-precision integers

An integer is a chain of `INT` nodes. Each node holds one 32-bit limb, least
significant first, and points to the next limb through `right`. The value is
two's complement over the whole chain, so the top limb carries the sign.
Chains are kept as short as possible: a value that fits in 32 bits is a
single node.

For an operator, the engine walks both operand chains and streams the limbs
into two local memories inside `bigint_unit`. Each memory holds `LIMBS` (8)
limbs. The unit then works through the limbs one per cycle:

| operation | method | cycles, about |
|---|---|---|
| `+`, `-` | ripple carry over limbs | n + 1 |
| `==`, `<` | a subtraction, then test for zero or negative | n + 1 |
| `*` | schoolbook over sign-extended operands | (la + lb)² / 2 |
| `quot` | restoring division of the magnitudes, rounded towards zero | 32 × `LIMBS` |

Here n is the longer operand's limb count, and la and lb are the two
operands' limb counts.

Afterwards the unit drops redundant sign limbs. The engine allocates one node
for each limb above the first, writing the top limb first so that each new
node can point to the previous one. It then overwrites the redex root with
the lowest limb. A result wider than `LIMBS` limbs (256 bits) stops the
engine with error 2. The collector traces the `right` pointer of an integer
node like any other child.

## The snapshot memory

The collector must see a consistent graph while the program keeps rewriting
it. Copying the whole graph would take too long. Write barriers would add a
main-memory read to every write. `snapshot_mem` avoids both:

* Each logical node `a` has two physical slots, `{0,a}` and `{1,a}`. The RAM
  (`node_ram`) is therefore twice the usable size: 2048 × 56 bits.
* Two metadata bits per node are held in flip-flops and read combinationally:
  * `cur[a]` says which slot the running program sees.
  * `wsn[a]` says whether the node has been written since the last snapshot.
* **Taking a snapshot** clears every `wsn` bit in one cycle.
* **The first write** to a node after a snapshot goes to the other slot and
  flips `cur[a]`. Later writes go straight to the new slot.
* **A snapshot read** returns slot `~cur[a]` if `wsn[a]` is set, and slot
  `cur[a]` otherwise.

Each write costs a metadata lookup and update but no extra RAM cycle. Two
request ports share the single-port RAM: the program port always wins, and
the collector uses the free cycles. A read is accepted in the cycle its grant
is high, and its data arrives one cycle later.

## Concurrent collection

`gc_unit` runs one collection after another. It starts one whenever fewer
than `GC_THRESHOLD` (64) nodes are free, or when `gc_force` is set.

1. **Snapshot.** The collector clears its mark bits and requests a snapshot.
   The engine acknowledges only at a safe point: before fetching a node, or
   while it is stalled on an allocation. In that same cycle the memory takes
   the snapshot and the collector latches the engine's live pointers. These
   are 17 roots: root, current node, parent, redex root and its parent, head,
   partly built nodes, and the collected arguments.
2. **Mark.** Roots, and then the children of each marked node, are pushed on a
   stack with one entry per node. A node is marked when it is pushed, so it is
   never pushed twice. All reads come from the snapshot image. Nodes that the
   engine allocates during the collection are marked at once ("allocated
   black"), because the snapshot does not contain them.
3. **Sweep.** The collector frees, one per cycle, every allocated node that
   was unmarked. Such a node was garbage in the snapshot, so it is still
   garbage now. The sweep also handles chains of indirections. For every live
   indirection whose target is also an indirection, it follows the chain in
   the snapshot and rewrites the node in the live graph to point past the
   chain. After a sweep no indirection points to another. Indirections left
   without users are freed by the next collection.

The compression step relies on the engine never rewriting an indirection
node. That holds because redex roots are always application nodes.

`free_list` supplies addresses. It reuses freed addresses from a stack first,
and otherwise takes never-used addresses from a bump pointer. It also keeps
one allocated bit per node, which the sweep reads.

## Using the top level

`cephalopode_top` has one parameter, `GC_THRESHOLD`. To run a program:

1. While `busy` is low, write the program graph into nodes 1..N-1 through
   `host_req`, `host_we`, `host_addr` and `host_wdata`. Reads through the same
   port return `host_rdata` with `host_rvalid` one cycle later.
2. Pulse `host_init` with `host_next = N` to mark nodes 1..N-1 as allocated.
3. Pulse `start` with `root_in`, then wait for `done` or `error`.
   The head node appears on `result`. If it is an integer whose `right` is
   not null, read the further limbs through the host port by following
   `right` until it is null.
4. Before you load the next program, wait until `gc_busy` is low. A collection
   that is still sweeping would otherwise free the new nodes.

Counters report how often each mechanism ran: reductions, value swaps,
indirection follows, allocation stalls, redirected writes, collections, freed
nodes and compressed indirections.

Measured cycle counts at the default size, with collections running:

| program | graph nodes | cycles |
|---|---|---|
| `sum 200` of n·2³⁰ (non-tail recursive, two-limb sums) | 46 | 99 k |
| `fib 12` | 47 | 145 k |
| `sum (map (*2) [1..40])` | 93 | 50 k |
| 3×3 matrix × vector, summed | 178 | 9.3 k |
| 4-3-1 ReLU network | 258 | 13.5 k |
| `25!` (84 bits, three limbs) | 39 | 9.7 k |

## Simulating

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. List the packages first:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/ceph_pkg.sv tb/ceph_tb_pkg.sv \
    rtl/node_ram.sv rtl/bigint_unit.sv rtl/snapshot_mem.sv rtl/free_list.sv \
    rtl/gc_unit.sv rtl/reduction_engine.sv rtl/cephalopode_top.sv \
    tb/tb_workloads.sv --top-module tb_workloads
./obj_dir/Vtb_workloads
```

| testbench | what it checks |
|---|---|
| `tb_bigint_unit` | corner cases and random operands of every length against 1024-bit arithmetic, including normalisation, overflow and division by zero |
| `tb_snapshot_mem` | random two-port traffic and snapshots against a model that copies the whole graph at each snapshot; redirect count; read latency |
| `tb_free_list` | exact LIFO and bump reference model, including running dry |
| `tb_gc_unit` | freed set equals allocated and unreachable in the snapshot, with the program rewriting the root and allocating during marking; chain compression; a second collection |
| `tb_reduction_engine` | every rewrite rule, multi-limb operands and results, sharing, errors, and snapshot acknowledgement only at safe points, with random memory and allocation stalls |
| `tb_cephalopode_top` | `I (I (I (sum 200)))` over n·2³⁰, so every partial sum has two limbs, at the default size; every mechanism must occur |
| `tb_workloads` | one program per benchmark class, from the table above, plus `25!` and a big value kept live while collections run |

`tb/ceph_tb_pkg.sv` compiles lambda terms to combinator graphs by
Turner-style bracket abstraction, using S, K, I, B and C_1. It writes strict
operators inside out. Use it to write new test programs.

## Where this departs from the architecture and what is missing

The architecture fixes the overall organisation and the rules named above:
S/K/I, C_n and L_n, `v f => f v`, back pointers instead of a stack, the
lazily copied snapshot in doubled memory with fast metadata, the concurrent
mark-and-sweep over the snapshot with a pointer stack and mark bits, and
indirection compression during the sweep. Everything else is a choice made
here:

* **Integer size is bounded by the local memory.** The architecture plans to
  spill integers that outgrow the arithmetic unit's local memory into main
  memory. That is not built: such results stop the engine with error 2. The
  limb format, the algorithms, the rounding of `quot` and `LIMBS` = 8 are this
  design's own.
* **There are no list primitives.** The architecture has dedicated list
  primitives. They are not built here. Lists are encoded with combinators
  (Scott encoding) instead.
* **Sizes and the node format are this design's own.** They are 1024 nodes,
  32-bit limbs, `MAXN` = 6 and a collection threshold of 64.
* **Not built:**
  * I/O and multitasking (not designed in the architecture either)
  * clock gating
  * a program ROM: the graph is loaded through the host port instead
* **Collection start and roots are this design's own.** A collection is
  triggered by a free-space threshold. Snapshots are taken only at safe
  points, and the roots are the engine's live registers.
* **Deadlock when live data fills the memory.** If the live graph nears the
  memory size, the engine stalls on allocation and collections keep running
  without freeing enough. Non-tail recursion deeper than about 230 levels
  does this at the default size.
* **Metadata is in flip-flops.** The metadata and mark bits are flip-flop
  vectors cleared in one cycle. At much larger memory sizes they would become
  small on-chip RAMs with an epoch scheme.
