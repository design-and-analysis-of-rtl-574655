# Systolic-tree accelerator for frequent item set mining

Frequent item set mining finds the sets of items that appear together in at
least ξ transactions of a database. The FP-growth algorithm solves this in
software by compressing the database into a prefix tree (the FP-tree). It
then walks that tree recursively, with pointers and dynamic allocation. None
of that maps well onto hardware.

This design builds the same prefix tree in hardware, as a fixed array of
processing elements (PEs) arranged as a tree: a *systolic tree*. Each PE
holds one item and a count. Transactions stream in at one item per clock,
and every PE applies the same small rule to the item in front of it. As a
result the transactions settle into the same layout the FP-tree would have.
The tree is then queried: a candidate item set is streamed in the same way,
the PEs that end a matching path mark themselves, and their counts flow back
to the root, where they are added into the candidate's support.

A small tree only holds a database with few distinct items: with K children
per PE and W levels, up to N = min(K, W) items. A host processor therefore
splits ("projects") a large database into sub-databases of at most N items
and sends them one at a time. The host-side projection (FP-growth with
sub-root pointers) is software and is not part of this RTL. This RTL is the
FPGA side:

* load one projected database;
* enumerate and count its candidate item sets;
* report the frequent ones.

The default size is K = W = 4, which gives 340 general PEs and handles
projected databases of 4 items.

## Tree shape

```
            control PE
                |
               PE1 ------------------> PE2                 level 1
                |                       |
               PE3 ------> PE4         PE5 ------> PE6      level 2
                |           |           |           |
               PE7 -> PE8  PE9 -> PE10 PE11 -> PE12 PE13 -> PE14   level 3
```

(The drawing shows K = 2, W = 3; the default is K = W = 4.)

A PE is not wired to all of its children. It has two output "doors":

* the **bottom door** goes to its leftmost child;
* the **right door** goes to its next sibling.

Every PE therefore has exactly one input: from its parent if it is a leftmost
child, otherwise from its left sibling. To reach the rightmost child, a
message passes through all the children to its left. On the way back up, in
COUNT mode, counts travel the same links in reverse. A PE adds the count from
its right sibling (N_Right) to the count from its leftmost child (N_Bottom)
and sends the sum to whichever PE feeds its input.

A tree of W levels with K children per PE has K + K² + … + K^W general PEs,
plus the control PE. The farthest PE, the rightmost one on the bottom level,
is K·W hops from the control PE. `systolic_tree` generates the PEs level by
level, left to right, with index 0 = PE1. The geometry helpers are in
`fpm_pkg`.

## Messages and timing

Each downward link carries one message per clock. The message is an item or
one of four control signals (`fpm_pkg::msg_kind_e`):

| message     | meaning                                                    |
|-------------|------------------------------------------------------------|
| `MSG_CLEAR` | empty every PE (before a new projected database)           |
| `MSG_TXN`   | WRITE mode; a new transaction starts                       |
| `MSG_SCAN`  | SCAN mode; a new candidate item set starts                 |
| `MSG_COUNT` | COUNT mode; report the support of the candidate just scanned |
| `MSG_ITEM`  | one item (an 8-bit item number)                            |

Every hop costs one clock, and every output is registered. Control signals
are broadcast through both doors of every PE. Items only go where a PE's rule
sends them, and the rule never sends an item through a door that the control
signal did not use. So no item can overtake a control signal, and a control
signal reaches each PE after every earlier item and before every later one.
The tree needs no global mode wire and no stall logic. The host can send one
message per clock, back to back.

Items of a transaction, and of a candidate, must arrive in increasing item
order. The projected database's items are numbered 0 … n-1 in that order.

## The PE rules

Each PE (`general_pe`) keeps:

* a full bit, the item and a 20-bit count;
* WRITE flags `match` and `InPath`;
* SCAN flags `door` (bottom door open) and `IsLeaf`;
* a COUNT flag `Sent`.

### WRITE mode: building the tree

`MSG_TXN` clears `match` and sets `InPath`. For each item:

1. An empty PE stores the item with count 1 and sets `match`. The item goes
   no further.
2. If the PE already holds the item and `InPath` is set, it increments its
   count and sets `match`. The item goes no further.
3. Else, if `match` is clear, the PE is not on this transaction's path. It
   clears `InPath` and passes the item to its sibling.
4. Else the PE is on the path, and the item goes to its leftmost child.

The first item of a transaction moves right along level 1 until it finds its
own item or an empty PE. Each later item then follows the same path down one
more level. Transactions that share a prefix share PEs, exactly as in an
FP-tree.

Loading the example database below gives the tree shown in the table. The
database uses A, B, C, D = items 0 … 3 and has these transactions, in this
order: BCD, BC, ACD, ACD, ABC, ABC, ABD.

| PE    | 1   | 2   | 3   | 4 | 5   | 6   | 7   | 8 | 9 | 10 | 11  | 12 | 13  | 14  |
|-------|-----|-----|-----|---|-----|-----|-----|---|---|----|-----|----|-----|-----|
| holds | B:2 | A:5 | C:2 | – | C:2 | B:3 | D:1 | – | – | –  | D:2 | –  | C:2 | D:1 |

`tb_systolic_tree` checks every entry of this table.

### SCAN mode: finding the paths that contain a candidate

`MSG_SCAN` opens the bottom door and clears `IsLeaf`. For each item t
compared with the stored item c:

1. An empty PE stops t.
2. If t = c and the door is open, the PE sets `IsLeaf`.
3. If t < c, the PE clears `IsLeaf` and closes the door. Every item below
   this PE is larger than c, so t cannot be found there.
4. If t > c, the PE clears `IsLeaf` and passes t to the child if the door is
   open.

In every case except 1, t also goes to the sibling: the right door is always
open. This design adds one case that the four rules leave open. If t = c but
the door is already closed, t goes to the sibling only and `IsLeaf` stays
clear, because a PE with a closed door cannot lie on a matching path.

After the last item, `IsLeaf` is set exactly in the PEs that end a path
containing the whole candidate. The count stored in such a PE is the number
of transactions on that path that contain the candidate. For {B, D} on the
example tree these PEs are PE7 and PE14. PE5 closed its door when B
arrived, so PE11 never sees D.

### COUNT mode: collecting the support

`MSG_COUNT` clears `Sent`. From the next clock on, each PE sends
N_Right + N_Bottom upward every clock. On the first such clock it also adds
its own count if `IsLeaf` is set, and then sets `Sent`. The sums travel
toward the root one hop per clock, so each reporting PE's count reaches the
control PE exactly once.

## The control PE and the support latency

`control_pe` registers each host message before it goes to PE1, so the
control PE costs one clock. After a `MSG_COUNT` it adds its input for
2·K·W+1 clocks. That is the round trip to the farthest PE, K·W hops each way,
plus the clock on which the PE adds its own count. The control PE then
pulses `support_valid` with the sum, **2·K·W+2 clocks after the `MSG_COUNT`
was presented**: 34 clocks at K = W = 4. `busy` is high during the window.
A new `MSG_COUNT` inside the window restarts the sum, so one candidate is
counted at a time. The control PE also keeps the sticky `overflow` flag.

## Mining in hardware: `candidate_gen`

After a projected database is loaded, the host pulses `mine_start` and
supplies the number of items n and the threshold ξ. The generator then steps
a bit mask through 1 … 2ⁿ−1. For each mask it sends:

* `MSG_SCAN`;
* one clock per item position: the item if its bit is set, an idle link
  otherwise;
* `MSG_COUNT`.

It then waits for the support. A candidate whose support is ≥ ξ appears for
one clock on `pat_valid` / `pat_mask` / `pat_support`, where bit i of the
mask is item i. `mine_done` follows the last candidate.

There is no pruning and no overlap between candidates. Mining n items takes

    (2ⁿ − 1) · (N + 2·K·W + 5) + 1 clocks

That is 616 clocks for n = 4 at the default size. `tb_fpm_top` checks this
figure.

The host can also do the comparison itself, in software. It sends
`MSG_SCAN`, the items and `MSG_COUNT` through the host port and reads
`support` when `support_valid` pulses.

## Top level: `fpm_top`

| port | dir | meaning |
|------|-----|---------|
| `host_kind`, `host_item` | in | one message per clock from the host |
| `host_ready` | out | low while `candidate_gen` drives the tree; host messages are then ignored |
| `support`, `support_valid`, `count_busy` | out | result of a scan, and the collection window |
| `overflow` | out | sticky: a transaction did not fit; cleared by `MSG_CLEAR` |
| `mine_start`, `n_items`, `threshold` | in | start hardware mining of the loaded database |
| `mine_done`, `pat_valid`, `pat_mask`, `pat_support` | out | frequent patterns found |

To load a database, send `MSG_CLEAR`, then for each transaction `MSG_TXN`
followed by its items in increasing order. Wait 2·K·W clocks before scanning,
so the last items settle.

A database with at most N items, each transaction sorted, always fits. An
item that would be pushed through a door with no PE behind it is lost, and
`overflow` is set. That happens with a transaction longer than W, or with
more than K different items under one PE.

Reset (`rst`) is synchronous and active high. An assertion in `control_pe`
stops simulation if the items between two control signals are not in
strictly increasing order.

## Parameters and size

| parameter | default | meaning |
|-----------|---------|---------|
| `K` | 4 | children per PE (tree degree) |
| `W` | 4 | levels (tree depth) |
| `ITEM_W` | 8 | item number width |
| `CNT_W` | 20 | support counter width; holds 1 048 575 transactions |

At the defaults, a generic coarse synthesis of `fpm_top` gives about 31.9 k
word-level cells and 20.9 k flip-flop bits. Most of that is in the 340 PEs:
about 60 flip-flop bits and 90 cells each. A tree of K = W = 4 is the size
the approach was run at on an FPGA. A 5×5 tree, with 3 905 general PEs, did
not fit the large FPGA it was tried on.

The counter width is chosen so that the support of any pattern in the
largest common benchmark databases still fits. The largest is kosarak, with
990 002 transactions.

## Choices made in this design

The PE rules, the tree shape and the hop-by-hop control broadcast are the
method's own. The following are choices of this implementation:

* the message encoding, `MSG_CLEAR` and the host port with `host_ready`;
* the `overflow` flag;
* the SCAN case "equal item behind a closed door" described above;
* items that arrive in COUNT mode are dropped;
* the length of the control PE's collection window;
* the exhaustive, one-at-a-time candidate order in `candidate_gen`, where the
  original system matched candidates in a pipelined way without saying how;
* frequent patterns stream out as they are found; the original collected them
  all before returning them to the host, which here is left to the host side;
* the item and counter widths, and synchronous reset.

There is one inconsistency in how the method is described. In one place the
host compares each support with the threshold; in another, candidates are
generated and judged in hardware. Both are possible here: `candidate_gen`
judges in hardware, and host-driven scans return raw supports.

## Files

| file | contents |
|------|----------|
| `rtl/fpm_pkg.sv` | message and mode enums, PE rule enum, tree geometry functions |
| `rtl/general_pe.sv` | one general PE (WRITE / SCAN / COUNT rules) |
| `rtl/control_pe.sv` | root PE: input register, support collection, overflow flag |
| `rtl/systolic_tree.sv` | control PE plus the generated K-ary, W-level PE array |
| `rtl/candidate_gen.sv` | hardware candidate enumeration and threshold check |
| `rtl/fpm_top.sv` | top level: tree, candidate generator, host port |
| `tb/tb_general_pe.sv` | one PE, directed tests of every rule |
| `tb/tb_control_pe.sv` | forwarding, collection window, latency, overflow flag |
| `tb/tb_candidate_gen.sv` | generator against a stand-in tree with random data |
| `tb/tb_systolic_tree.sv` | K = 2, W = 3: the example tree, the {B, D} scan timing, all 15 supports, overflow |
| `tb/tb_fpm_top.sv` | whole design at default size: the example and 24 random databases, mining latency, host scans, overflow, and a count of every PE rule firing |
| `tb/tb_tree_sizes.sv` | whole design at the 12 sizes K = 1..4, W = 2..4, side by side: mining results and mining time |
| `tb/tb_workloads.sv` | default size: 4-item projected databases with as many transactions as each of six benchmark databases (3 196 to 990 002), mined and checked |

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
with a watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl \
    rtl/fpm_pkg.sv rtl/general_pe.sv rtl/control_pe.sv rtl/systolic_tree.sv \
    rtl/candidate_gen.sv rtl/fpm_top.sv tb/tb_fpm_top.sv --top-module tb_fpm_top
./obj_dir/Vtb_fpm_top
```

Swap in another testbench and its module list for the other tests. To lint:
`verilator --lint-only -Wall -Irtl rtl/fpm_pkg.sv <files> --top-module fpm_top`.
`tb_fpm_top` builds in about 30 s and runs in well under a second.
`tb_workloads` runs about 5 million clocks, roughly 80 s.

To change the tree size, override `K` and `W` on `fpm_top` or
`systolic_tree`. `candidate_gen` follows N = min(K, W).
