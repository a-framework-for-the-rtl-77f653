# Systolic-tree FIFO queue and LIFO stack

A queue or stack with constant response time, whatever its capacity, built
from a complete binary tree of identical small processors. Every node holds
at most one item and talks only to its parent and its two children. The root
is the only port to the outside world. Items ripple down the tree on an
insert or push. Holes ripple down the tree on a delete or pop. Each of these
waves moves one level per clock, and a new instruction can enter at the root
every clock. The root always holds the item that the next delete or pop will
return, so the answer is ready in the cycle of the request.

This RTL contains both structures of the design:

* `systolic_queue`: a FIFO queue. Its default is 6 levels, i.e. 63 nodes.
* `systolic_stack`: a LIFO stack. Its default is 4 levels, i.e. 15 nodes.

Data is 8 bits wide. `systolic_ds_top` places the two side by side. They
share a clock and reset and have nothing else in common.

## The node

Each node has:

* a data register `S` and its valid flag `LS`;
* a buffer register `B` and its flag `LB`. `B` holds an item that is passed
  to a child in the next clock;
* one-cycle instruction flags `IL`/`IR` (insert to the left or right child)
  and `DL`/`DR` (delete from the left or right child). These registered flags
  are the child's instruction inputs, so an instruction travels one level per
  clock;
* steering flags that keep the two subtrees balanced:
  * the queue node has `CI` (the side for the next forwarded insert) and `CD`
    (the side holding the oldest item below);
  * the stack node has a single flag `C` (the side holding the newest item
    below).

A node receives at most one instruction per clock. It handles it under one
of five conditions:

| # | condition | queue node | stack node |
|---|-----------|------------|------------|
| 1 | insert/push, node empty | `S<=d`, `LS<=1`, `CI<=CD<=0` | `S<=d`, `LS<=1`, `C<=0` |
| 2 | insert/push, node active | `B<=d`, `CI<=~CI`. Next clock, `B` goes left if the new `CI` is 1, right if 0 | `S<=d`, `B<=S`, `C<=~C`. Next clock, `B` goes right if the new `C` is 1, left if 0 |
| 3 | delete/pop, nothing below `S` | `LS<=0` | `LS<=0` |
| 4 | delete/pop, item in `B` | only when both children are empty: `S<=B`, `CD<=~CD` | always takes priority: `S<=B`, `C<=~C` |
| 5 | delete/pop, otherwise | `S <=` S of the child named by `CD` (0 = left), `CD<=~CD`, the delete goes to that child next clock | `S <=` S of the child named by `C` (0 = left), `C<=~C`, the pop goes to that child next clock |

In condition 4 the item in `B` was due to leave for a child in that same
clock. The node takes it back into `S`, and the child-side insert strobe is
masked for that cycle so the item is not duplicated. The flip of `CD` or `C`
undoes the side count that the item's arrival had advanced.

The alternation is what keeps the data ordered:

* **Queue.** Items forwarded below a node go left, right, left, right, and so
  on. Deletes pull from the subtrees in the same alternating order. So the
  oldest item below a node is always in the `S` of the child named by `CD`.
* **Stack.** The items below a node alternate sides in push order, and the
  newest is on side `C`. A push and a pop each flip `C`, so the order holds.

Because the split is balanced, a tree of `2**L-1` nodes holds exactly
`2**L-1` items. No leaf is ever sent an item while it is full, provided the
root refuses inserts at that count.

After fifteen inserts of 1..15 into an empty queue, the top four levels hold,
in heap order: 1 | 2 3 | 4 6 5 7 | 8 12 10 14 9 13 11 15.

After fifteen pushes of 1..15 into the 15-node stack, they hold:
15 | 14 13 | 12 10 11 9 | 8 4 6 2 7 3 5 1.

## Timing, and why the status is looked ahead

A parent copies the child's `S` in the same cycle it obeys a delete. The child
only learns of that delete one clock later, through `DL`/`DR`. So for one
cycle after being pulled, a child still shows `LS = 1` and a stale `S`.

The steering flags guarantee that a parent never pulls from the same child in
two consecutive cycles. However, the parent may need to know in that cycle
whether the child will still hold anything. Condition 3 ("is anything left
below me?") depends on it.

Each node therefore exports two status bits:

* `ls_o`: the raw `LS` flag.
* `ols_o`: the look-ahead status,
  `LS & ~(DEL & ~LB & ~LS_left & ~LS_right)`. This is the node's occupancy
  after the delete it is obeying now.

A parent decides its conditions on its children's `ols_o`. A node builds its
own `ols_o` from its children's raw `ls_o`. The children of a node being
pulled are never being pulled themselves in that cycle, so their raw flags
are current. The look-ahead logic is therefore one gate level deep and does
not chain down the tree, so the critical path does not grow with depth.

The other timing facts:

* The root's `S` is driven combinationally to `dout_o` during a delete or pop.
  The answer is valid in the request's own cycle (unit response time).
* One instruction is accepted every clock (unit pipeline interval).
* An inserted item reaches level k of the tree k-1 clocks after its insert.
* All flip-flops have an asynchronous, active-high reset `rst`.

## Interface of `systolic_queue` / `systolic_stack`

| port | dir | meaning |
|------|-----|---------|
| `ins_i`, `din_i[W-1:0]` | in | insert (queue) or push (stack) |
| `del_i` | in | delete (queue) or pop (stack) |
| `dout_o[W-1:0]`, `dout_valid_o` | out | item removed, in the same cycle. `dout_o` is 0 otherwise |
| `empty_o`, `full_o`, `count_o` | out | occupancy |
| `overflow_o` | out | insert/push refused because the tree is full (one-cycle pulse) |
| `underflow_o` | out | delete/pop refused because the tree is empty (one-cycle pulse) |

Issue at most one instruction per clock. If `ins_i` and `del_i` are both
high, the delete/pop is obeyed and the insert/push is refused.

Parameters:

* `W`: data width. Default 8.
* `LEVELS`: tree depth. The tree has `2**LEVELS-1` nodes.

`systolic_ds_top` brings out both sets of ports with the prefixes `q_`
(queue) and `s_` (stack). On the stack side, `ins_i`/`del_i` become
`s_push_i`/`s_pop_i`. Its parameters are `W`, `Q_LEVELS` (default 6) and
`S_LEVELS` (default 4). The defaults are shared through `systolic_ds_pkg`.

Nodes are numbered in heap order: node k has the children 2k+1 and 2k+2. To
inspect node k, look at `g_node[k].u_node`.

## Where this RTL goes beyond the original design, or departs from it

The node registers, flags, buses and the five conditions are the original
design's. The following points are this implementation's own:

* **Look-ahead status.** The original passes the raw `LS` to the parent. With
  back-to-back deletes, the parent would then copy an empty child.
* **Cancelling the buffer transfer.** When condition 4 takes `B` back, the
  transfer to the child that was due in that cycle is cancelled.
* **One-cycle flags.** `LB`, `IL`, `IR`, `DL` and `DR` hold only for one
  cycle. In the original register-transfer listing they are only ever set.
* **Item counter, full/empty flags and overflow/underflow refusal.** The
  original silently loses items pushed into a full tree: they end in a leaf's
  buffer.
* **Steering sense.** A forwarded queue item goes left when the complemented
  insert flag is 1. A forwarded stack item goes right when the complemented
  flag is 1. This is the sense that reproduces the reference data
  distributions and single-node traces. One line of the original listing
  reads the other way.
* **Stack condition 3.** It requires the children to be empty as well as the
  buffer. One version of the original listing tests only the buffer.
* **No control-step start input.** The original's start input only belonged
  to its description language. The node acts on every clock after reset.

Not in this RTL:

* the placement of the nodes on a processor grid (the tile-based embedding
  with 4x4 basic modules);
* the scan chain inserted by the place-and-route tool;
* the pad frame.

These are physical-design matters and do not change the logic.

## Verification

Every testbench is self-checking and ends with a `TB_RESULT` line.

* `tb/tb_queue_node.sv`, `tb/tb_stack_node.sv`: one node, with the children
  played by the testbench. They check the single-node reference traces cycle
  by cycle, every condition, the cancelled transfer and the look-ahead bit.
* `tb/tb_systolic_queue.sv`, `tb/tb_systolic_stack.sv`: the default-size
  trees. They check the 15-item reference distributions. They then run about
  16,000 random instructions, in phases that fill the tree and drain it
  again, against a behavioural FIFO or LIFO. Every answer must arrive in the
  cycle of its request.
* `tb/tb_systolic_ds_top.sv`: the whole top at default parameters, with both
  structures running random streams at once. Over all nodes, it counts every
  mechanism: conditions 1-5, refills from each side, look-ahead use,
  overflow and underflow. A mechanism that never fires counts as a failure.
* `tb/tb_paper_traces.sv`: replays the reference sequences on 3- and 7-node
  queues and stacks.
* `tb/tb_tree_sizes.sv`: random streams against the behavioural models for
  every small size: 1, 3, 7 and 15 nodes, queue and stack. The helper
  `tb/tree_size_checker.sv` does the checking. Each size must be filled to
  capacity at least once.

Each node also carries two assertions:

* a node never receives two instructions at once;
* the child chosen by the steering flag is non-empty whenever anything is
  below the node.

Each tree asserts that its item counter agrees with the root's `LS`.

Every testbench was also run against a deliberately broken copy of its
design, and each reported failures.

To simulate, for example the top:

    verilator --binary --timing --assert -Irtl \
      rtl/systolic_ds_pkg.sv rtl/queue_node.sv rtl/stack_node.sv \
      rtl/systolic_queue.sv rtl/systolic_stack.sv rtl/systolic_ds_top.sv \
      tb/tb_systolic_ds_top.sv --top-module tb_systolic_ds_top
    ./obj_dir/Vtb_systolic_ds_top

Every run finishes in well under a second.

`verilator --lint-only -Wall` reports unused-signal warnings for the leaf
nodes' child-side outputs. Leaves have no children, so those outputs go
nowhere.

## Files

| file | content |
|------|---------|
| `rtl/systolic_ds_pkg.sv` | data width and default tree depths |
| `rtl/queue_node.sv` | queue processing element |
| `rtl/stack_node.sv` | stack processing element |
| `rtl/systolic_queue.sv` | queue tree, counter and root interface |
| `rtl/systolic_stack.sv` | stack tree, counter and root interface |
| `rtl/systolic_ds_top.sv` | both structures side by side |
| `tb/*.sv` | the testbenches above |
