# Hardware data structures

Software builds on a small set of abstract data types: arrays, records,
lists, stacks, queues, tables, trees, sets and graphs. This library offers
each of them as a synchronous hardware building block. A block is a memory,
plus a small controller that carries out the type's operations on that
memory. A user of a block sees only an operation code, its operands, the
results and a few status flags (`ready`, `full`, `empty`, `member`,
`error`). The block hides the storage layout, whether that is cursors,
shifted arrays, sorted rows or an adjacency matrix.

The blocks follow the data-structure catalogue in J. M. Bink, *Data
Structures and VLSI* (Eindhoven University of Technology, 1991). That work
defines each type's operations, and gives one behavioural model per type
with a suggested mapping onto RAM or CAM. It also describes the two memory
primitives the types map onto: a RAM and a content addressable memory
(CAM). This RTL implements all of them in synthesizable SystemVerilog. It
keeps the catalogue's default sizes: mostly 4 elements of 4 bits, and the
tree has 4 trees over 8 nodes. Every size is a parameter.

`ds_top` places all thirteen blocks side by side. They share only the clock
and the reset. Each block's ports are brought out with a prefix (`stk_`,
`que_`, `tr_` …). The blocks are independent, so any one can be taken from
`rtl/` and used on its own.

## Common conventions

* **Clocking.** An operation is accepted on a rising edge of `clk` while
  `en` is high and, where the block has one, `ready` is high. The CAM has no
  `en`. It executes a command on every edge, and `CAM_MATCH` serves as the
  idle command.
* **Reset.** `rst_n` is active low and asynchronous. It empties every
  structure and clears the registered outputs. The RAMs and the CAM have no
  reset: the RAMs start with unknown contents, and the CAM is cleared with
  its `CAM_RESET` command.
* **Results.** All outputs are registered. They are valid after the edge
  that finishes the operation and hold until the next result. `member`,
  `error` (tree, set) and `n_op` (graph) are one-clock pulses.
* **Positions and names count from 1.** Array index, record id, list
  position, tree name, set name and graph node all count from 1, as in the
  abstract types. 0 is "none" or the null node, and a value outside the
  range is refused.
* **Opcodes** are enums in `ds_pkg` (`stack_op_e`, `set_op_e`, …), shared by
  the blocks and by the top.

## The memory primitives

**`ram`** is a synchronous RAM (16 × 8 by default):

* With `cs` high on a rising clock edge, it reads when `r_w` = 1 and writes
  `data_in` when `r_w` = 0.
* `data_out` holds otherwise.

**`async_ram`** has the same ports without a clock. The rising edge of `cs`
is the strobe.

**`cam`** holds `WORDS` cells of `WIDTH` bits (8 × 8 by default):

* **Matching.** A cell matches when it equals `match_data` in every bit
  where `match_mask` is 1. All cells are compared at once. A priority
  encoder returns the lowest matching address.
* **Match outputs.** `numomw` encodes the number of matches: `00` none,
  `01` one, `11` several.
* **Write rule.** The write commands update a cell as
  `(cell & ~reset_bits) | set_bits`, so setting wins over resetting.
* **Write commands.** `CAM_WRFIRST` writes the first match. `CAM_WRALL`
  writes every match with one mask pair, and every non-match with a second
  pair.
* **By address.** `CAM_RDADDR` and `CAM_WRADDR` access a cell by address.
  `CAM_RESET` loads every cell with a reset word.
* **Reading out a multiple response.** Mark all matches with `CAM_WRALL`.
  Then take them one at a time with `CAM_WRFIRST`, which clears the mark of
  the first. The outputs of a write command show the cells as they were
  before that edge, so each `CAM_WRFIRST` reports the match it is about to
  unmark.
* **No "full" state.** Software keeps a valid bit inside each word.

## Direct-access types

**`array_1d`** is an array of `NUM_ELEMENTS` elements. `ARR_UPDATE` writes
element `index` and `ARR_RETRIEVE` reads it. Index *i* is RAM word *i*−1.

**`record_store`** is a record whose fields are addressed by an id 1..n.
Each field has its own width (`FIELD_W`, an array parameter, at most
`MAX_ELEMENT_W`). An update keeps only the field's low bits. Fields are
stored in one RAM word each.

## Sequences

**`stack`** is a RAM plus a counter:

* `S_PUSH` stores at the counter, and `S_POP` returns and removes the top
  word. `S_TOP` reads the top without removing it, and `S_CLEAR` empties
  the stack.
* A push on a full stack and a pop on an empty one do nothing.
* Every operation takes one clock.

**`queue`** is a circular buffer:

* An enqueue cursor and a dequeue cursor wrap modulo `WORDCOUNT`. A
  registered full flag tells "equal cursors, empty" from "equal cursors,
  full".
* Every operation takes one clock.

**`list_store`** maps a list onto an array: position *p* is word *p*−1,
and END is count+1. Insert and delete must move the words behind the
position. The block moves one word per clock, with `ready` low meanwhile.
`L_LOCATE` compares one word per clock.

**`linked_list`** maps a list onto a RAM of `{data, next}` records linked
by cursors:

* Unused records form a free chain.
* Insert and delete relink records instead of moving data.
* To reach position *p*, the block walks the chain one link per clock.
  Delete returns the removed element. `next_out` says whether position
  *p*+1 exists.

Operation latencies are below. "Clocks" are the clocks `ready` stays low
after the accepting edge; 0 means the result is there right after that
edge.

| block | operation | clocks |
|---|---|---|
| list_store | CLEAR, RETRIEVE, END | 0 |
| list_store | INSERT at *p* | count − *p* + 2 |
| list_store | DELETE at *p* | count − *p* + 1 |
| list_store | LOCATE | position found, or count + 1 |
| linked_list | CLEAR, NXT | 0 |
| linked_list | RETRIEVE at *p* | *p* |
| linked_list | INSERT / DELETE at *p* | max(*p* − 1, 1) |

An operation on a position that does not exist (0, or beyond count+1 for
insert and beyond count otherwise) changes nothing.

## Keyed and hierarchical types

**`table_store`** stores (key, data) records unordered in words
0..count−1:

* `T_INSERT` replaces the data of an existing key, or appends a new record.
  On a full table it stores nothing and drops `member`.
* `T_DELETE` returns the record and fills its hole with the last record,
  so the storage stays dense.
* `T_RETRIEVE` and `T_MEMBER` look a key up.
* The key is compared with all stored keys at once, as in a CAM. Every
  operation therefore takes one clock, and `ready` is high whenever the
  block is out of reset.

**`tree`** keeps up to `MAX_TREES` named trees over a pool of `MAX_NODES`
nodes. This is the hardest block to follow.

* **Representation.** A node has a parent, a leftmost child, a right
  sibling and a label. These are four arrays indexed by node number, with 0
  as the null node. `tree_list[t]` is the root of tree *t*. Free nodes are
  chained through the left-child array.
* **Single-clock queries.** `TR_PARENT`, `TR_LEFT_CHILD` and
  `TR_RIGHT_SIBLING` take `node_in` and return `node_out`. `TR_LABEL`
  returns `label_out` and `TR_ROOT` returns the root of `t_in`. `TR_RESET`
  frees everything.
* **`TR_CREATE`** with `i_in` = *i* takes a free node *r* with `label_in`:
  * *i* = 0: *r* becomes the single-node tree `t_in`, which must be empty.
  * *i* ≥ 1: tree `t_in` becomes *r*'s first child, and the new tree keeps
    the name `t_in`. The names of the other *i*−1 subtrees follow on
    `t_in`, one per enabled clock, while `ready` is low. Each becomes
    *r*'s next child, and its name becomes free.
  * `t_out`, `node_out` and `label_out` report the new tree.
* **`TR_CLEAR`** frees a whole tree with a depth-first walk. In each clock
  the walk either steps down to a leftmost child, or frees a leaf and
  climbs to its parent. A *k*-node tree takes 2*k*−1 clocks.
* **Errors.** `error` pulses for an impossible request: no free node, a
  bad or wrongly occupied tree name, or an unused node. `full` means no
  free node is left; `empty` means no node is in use.

## Sets

**`set_store`** holds `NUM_SETS` sets of up to `EL_PER_SET` elements.
Each set has its own row, kept sorted in ascending order.

* **Single-clock operations.** These take one clock: `SET_INSERT` and
  `SET_DELETE` (the row shifts in parallel), `SET_MEMBER`, `SET_ASSIGN`
  (s1 := s2), `SET_CLEAR`, `SET_EQUAL`, `SET_MIN` and `SET_MAX`. Because
  the rows are sorted, MIN and MAX are single reads.
* **Equality result.** `SET_EQUAL` reports "not equal" on `error`.
* **Merges.** `SET_UNION`, `SET_INTERSECTION` and `SET_DIFFERENCE` compute
  s3 := s1 op s2 in one merge pass over the two sorted rows:
  * Each clock consumes the smaller head element, or both heads when they
    are equal. It may append one word to s3.
  * A merge takes (steps + 1) clocks, at most 2·`EL_PER_SET` + 1.
  * s1, s2 and s3 must be three different sets, else `error`.
  * A union that does not fit in a row is cut at `EL_PER_SET` elements
    and raises `error`.
* **Flags.** `full` and `empty` describe the set just written: s3 after a
  merge, s1 otherwise.

## Graphs

**`graph`** is a directed graph of `NUM_NODES` numbered nodes in
adjacency-matrix form:

* A node label array and a matrix of edge labels hold the graph. Label 0
  is null, so a node or an edge exists when its label is non-zero.
* Insert, delete and retrieve of nodes and edges each take one clock.
* `n_op` pulses when an operation is refused: a node out of range, a
  missing node, an existing node inserted again, or a node deleted while an
  edge still touches it.
* A refused retrieve returns the null label.

## Where this RTL departs from the original models

* **Single-clock table and graph.** The original interface drops `ready`
  at the start of every operation. Here the table compares keys in
  parallel, and every graph operation completes in one clock. So `ready`
  never drops for these two, and it is kept only for interface
  compatibility.
* **Sizes not given by the original.** It gives no RAM or CAM size, and no
  set size. RAMs are 16 × 8, the CAM is 8 × 8, and sets are 4 × 4 elements
  of 4 bits.
* **One-word-per-clock schedules.** The walk of the linked list, the shifts
  and search of the array list, the tree clearing walk, and the set merge
  all handle one word per clock. The original behavioural models give the
  result without a clock-level schedule. These schedules are this design's
  reading of the O(n) costs of each mapping.
* **Cases the original leaves open.** These are this design's choices:
  * the tree error conditions, including the rule that a new single-node
    tree (`i_in` = 0) needs an empty name;
  * the set difference merge, and the error on set overflow;
  * raising `n_op` for a missing node on node delete, and for a null label
    on node insert;
  * the CAM reset word, and the use of address `WORDS` as "no match".
* **Heaps** (dynamic memory allocation) are not covered.

## How far it can be trusted

Each block has a self-checking testbench in `tb/` (`tb_<block>.sv`):

* It drives thousands of random operations and compares every output with
  a reference model written independently in the testbench (queues and
  arrays in plain SystemVerilog).
* It checks the clock counts in the latency tables above, the tree's
  2*k*−1 clear time, and the set's steps+1 merge time.
* It counts the special cases (overflow, refusals, long walks, multiple
  CAM responses …) and fails if one never occurred.
* Every testbench has also been run against a copy of its block with one
  deliberate bug, and each such run reported failures.
* The stack, list, linked list, table, tree and set contain assertions
  that their fill counters never exceed capacity. Simulate with
  `--assert` to enable them.

`tb_ds_top` runs `ds_top` at its default sizes, with no parameter
override, through a scenario per block:

* the CAM multiple-response readout;
* stack and queue overflow, with the queue's cursors wrapping;
* linked-list walks and array-list shifts;
* table replacement and record moves;
* a two-child tree join and its clearing;
* set merges and union overflow;
* a refused graph node delete.

Each of these is counted, and the test fails if one does not happen.

## Simulating

The package must be compiled first. With Verilator 5:

```
verilator --binary --timing --assert rtl/ds_pkg.sv rtl/<block>.sv tb/tb_<block>.sv \
          --top-module tb_<block>
./obj_dir/Vtb_<block>
```

For the whole design:

```
verilator --binary --timing --assert rtl/ds_pkg.sv $(ls rtl/*.sv | grep -v ds_pkg) \
          tb/tb_ds_top.sv --top-module tb_ds_top
./obj_dir/Vtb_ds_top
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`. A
watchdog stops a hung run and counts it as a failure. The testbenches run
in a few seconds each.

To change a size, override the block's parameters. The testbenches
already instantiate their block with `#(...)` from local parameters at the
top of the file. In `ds_top` the blocks use their defaults, and the port
widths are written for those defaults.
