# Acyclic stable matching scheduler

A crossbar switch scheduler has to pair N inputs with N outputs every cell time. If
every input ranks the outputs and every output ranks the inputs (by queue length,
cell age, urgency), a good pairing is a *stable matching*: no input and output
would both rather be paired with each other than with their current partners.
The Gale–Shapley algorithm finds one, but needs up to N² sequential proposal
rounds, which is too slow for a line-rate scheduler.

This RTL implements a much faster scheduler for a restricted but important class of
instances: those whose *dependency graph* is **rooted**, which includes every
**acyclic** one. Many urgency-based CIOQ switch schedulers (most-urgent-cell-first,
critical-cell-first and similar) produce only such instances. For these
instances, an N × N array of small nodes finds the stable matching in exactly
**N clock cycles**.

## The idea: roots of the dependency graph

Write the instance as an N × N ranking matrix. Entry (i, j) holds a pair
**(h, v)**:

* h = `wr[i][j]` is the rank of output/woman j in input/man i's list;
* v = `mr[j][i]` is the rank of input/man i in output/woman j's list.

Ranks run from 1 (best) to N. Draw an edge from entry (i, j) to every entry in the
same row with a larger h, and to every entry in the same column with a larger v.
An entry with **(h, v) = (1, 1)** has no incoming edge. Man i and woman j rank each
other first, so that pair is in every stable matching. Such an entry is a
**root**.

Take a root out of play by deleting its row and its column. What remains is a
smaller instance. An entry's new ranks are its old ranks minus the number of
deleted entries in its row (or column) that ranked better. If a root exists at
every step, the instance is *rooted*. Removing roots one by one then yields the
unique stable matching. An acyclic graph always has a root, and deleting one
keeps it acyclic, so every acyclic instance is rooted.

Removing one root changes the ranks in a very simple way. A surviving entry
(k, l) loses exactly one row neighbour, (k, j), and exactly one column
neighbour, (i, l). So h drops by one exactly when h > h(k, j), and v drops by
one exactly when v > v(i, l). One compare and one decrement per rank are enough.

## The array

```
            c_0     c_1     c_2     c_3
         +-------+-------+-------+-------+
  r_0 ---| n0,0  | n0,1  | n0,2  | n0,3  |---> s_0
  r_1 ---| n1,0  |  ...  |       |       |---> s_1
  r_2 ---|       |       |       |       |---> s_2
  r_3 ---|       |       |       | n3,3  |---> s_3
   |     +-------+-------+-------+-------+
   +-- request lines of r_0..r_3 --> controller (priority encoder) --> grants
```

* **Node `sms_node`** (N² of them) stands for one entry. It holds the h and v
  registers, tests for (1, 1), and compares and decrements each register.
* **Row bus r_i and column bus c_j (`sms_bus`)**. Each node is tied to the bus
  of its row and the bus of its column. A bus is a wired-OR broadcast: every
  node drives 0 unless it has something to say. The row bus has four line
  groups: request, mask, rank value and matched index. The column bus has two:
  mask and rank value. Each line group is a separate `sms_bus` instance.
* **Controller `sms_controller`** receives the request line of every row bus. It
  grants the lowest-numbered requesting row.
* **Top `sms_scheduler`** wires the array together, sequences a run and
  collects the results `s_i` at the row ends.

### One iteration = one clock cycle

Everything below is combinational within one cycle. The node registers update on
the rising edge.

1. **Request.** Every node with (h, v) = (1, 1) raises its row bus's request
   line. A row never holds two roots, because the ranks in a row are distinct.
   Several rows may request at once.
2. **Grant.** The controller grants the lowest requesting row. The root in that
   row, say (i, j), *wins*. It raises the mask line of row bus r_i and of column
   bus c_j, and it drives its column index j onto r_i's index lines, which
   become `s[i]`.
3. **Broadcast.** Every node on the masked row r_i drives its v onto its own
   column bus. Every node on the masked column c_j drives its h onto its own
   row bus. Each surviving row and each surviving column gets exactly one value.
4. **Update.** Masked nodes, the winner included, clear to (0, 0), which marks
   them removed. A removed node never requests again and never decrements.
   Every other node decrements h if h is larger than the value on its row bus,
   and decrements v if v is larger than the value on its column bus. An idle
   value bus carries 0, which never triggers a decrement.

Roots that lose arbitration remain roots, because removal only deletes edges.
They win in later cycles. Every cycle matches exactly one row, so a run takes
N cycles.

The request → grant → mask → value → register path has no combinational loop.
Request depends only on registers. The mask depends on the grant, and each
value depends only on the *other* bus's mask. This is why the node's outputs
are separate continuous assignments and every bus line group is its own signal.

### Worked example (4 × 4)

Men's lists by rank of women 1..4: m1 {3,4,1,2}, m2 {1,2,3,4}, m3 {1,2,4,3},
m4 {2,3,1,4}. Women's lists by rank of men 1..4: w1 {3,2,1,4}, w2 {1,4,3,2},
w3 {1,2,3,4}, w4 {3,2,1,4}. Rows and columns are numbered from 1 here.

| cycle | roots requesting        | granted | row bus values (h)  | column bus values (v) | result      |
|-------|-------------------------|---------|---------------------|-----------------------|-------------|
| 1     | (1,3), (3,1)            | row 1   | r2=3, r3=4, r4=1    | c1=3, c2=1, c4=3      | s1 = col 3  |
| 2     | (3,1)                   | row 3   | r2=1, r4=1          | c2=2, c4=1            | s3 = col 1  |
| 3     | (4,2)                   | row 4   | r2=1                | c4=2                  | s4 = col 2  |
| 4     | (2,4)                   | row 2   | –                   | –                     | s2 = col 4  |

The result is {(1,3), (2,4), (3,1), (4,2)}. This is the stable matching that
Gale–Shapley also finds, but Gale–Shapley needs five proposal rounds for this
instance.

## Interface and timing (`sms_scheduler`)

| port      | dir | width      | meaning |
|-----------|-----|------------|---------|
| `clk`     | in  | 1          | clock |
| `rst_n`   | in  | 1          | synchronous, active-low reset |
| `start`   | in  | 1          | load `wr`/`mr` and start a run (ignored while `busy`) |
| `wr`      | in  | N·N·RW     | `wr[i][j]`: rank (1..N) of column/output j in row/input i's list |
| `mr`      | in  | N·N·RW     | `mr[j][i]`: rank (1..N) of row/input i in column/output j's list |
| `busy`    | out | 1          | a run is in progress |
| `done`    | out | 1          | one-cycle pulse after the last iteration |
| `no_root` | out | 1          | the run stopped because no node was a root |
| `s`       | out | N·IW       | `s[i]`: column matched to row i (0-based) |
| `s_valid` | out | N          | `s_valid[i]`: row i is matched |

`RW = clog2(N+1)` is the rank width and `IW = clog2(N)` the index width. With the
default N = 4, these are 3 and 2 bits.

* The edge on which `start` is sampled loads every node. `busy` rises.
* Iteration k (k = 1..N) happens in the k-th cycle after that edge. `s_valid`
  gains one bit per cycle, in grant order, lowest requesting row first.
* `done` is high for the one cycle following the N-th iteration. So `done` is
  seen **exactly N cycles after the start edge**, together with a complete `s`.
* If an instance is not rooted, the first iteration that finds no root ends
  the run. `done` and `no_root` then rise together, and `s_valid` shows the
  rows that were matched before the stall.
* `s`, `s_valid` and `no_root` hold until the next `start`.

The inputs must be complete, strict rankings: every list is a permutation of
1..N. Nothing checks this.

Assertions in the top check the bus rules every cycle: at most one grant, a
grant only to a requesting row, at most one masked column, the masked row equal
to the granted row, and the granted row driving its index.

## Parameters and size

`N` (default 4) is the only parameter that can be set. Every module takes it,
and the rank and index widths follow from it. The logic grows as N² nodes. Each
node has two RW-bit registers, two comparators and two decrementers. On top of
that come 6N bus line groups of N inputs each and one N-input priority encoder.
The critical path runs from a root's request through the row bus OR and the
priority encoder, then through the winner's mask on the column bus, then
through a masked node's value on a row bus, and into a comparator. It grows
with N through the encoder and the N-input OR of each bus.

The scheduler has been simulated at N = 2, 4, 6, 8, 10 and 12. These are the
sizes of the original area and timing study. That study reported timing growing
about linearly in N (about 62 ns at N = 2 and 480 ns at N = 12) and area
growing about as N² (about 1.2 k and 59 k two-input-NAND equivalents). Those
figures come from a different implementation and cell library, so they are not
a property of this RTL.

## Design choices and departures

The following follow the source design:

* the N × N node array with one row bus and one column bus per line;
* the (1, 1) root test;
* minimum-row-index arbitration by a priority encoder;
* the mask and broadcast protocol and the compare-and-decrement-by-one rule;
* one granted root per iteration and N iterations per run.

The following are this implementation's own choices:

* **One iteration per clock cycle.** The whole iteration is a single
  combinational path.
* **Two comparators and two decrementers per node.** The original node is
  described with a single comparator and a single adder, which suggests it
  time-shares them between h and v. Here both ranks update in the same cycle.
* **Rank width clog2(N+1).** The original calls the buses and registers
  "log n bits" wide, but rank N needs one more bit.
* **Buses as separate wired-OR line groups.** The original uses log n-bit buses
  whose first line carries the request to the controller. It does not say how
  request, grant, mask, value and index share the other lines.
* **Removed nodes are cleared to (0, 0).** The original clears the root this
  way. Here every masked node is cleared too, so 0 doubles as the "removed"
  mark and as the "bus idle" value.
* **The start/busy/done sequencing, the `no_root` flag, the synchronous reset
  and 0-based indices.**
* **One root per cycle rather than all roots at once.** An algorithm-level
  description would remove every current root in one round, finishing the
  4 × 4 example in 3 rounds. The hardware matches one root per iteration, so
  a run always takes N cycles.

## Limitations

* Only complete, strict, square instances are handled. Ties in a ranking list
  could produce two roots in one row. Both would be granted at once, which
  breaks the bus protocol (the assertions will fire). Lists shorter than N
  (an input with no cell for some output) and unequal numbers of inputs and
  outputs are not supported either. The original design is said to handle all
  three cases, but no mechanism is given for any of them.
* Non-rooted instances (those with cycles and no root at some step) are
  detected (`no_root`) but not solved. Only the rows matched before the stall
  are reported.
* There is no input checking, and no pipelining across runs. A new run can
  start in the cycle after `done`.

## Verification

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>`, and a watchdog ends it if it hangs.

| testbench | what it checks |
|-----------|----------------|
| `tb_sms_scheduler` | Full design at the default N = 4. It runs the worked example above, an acyclic instance with the matching {(1,1),(2,4),(3,3),(4,2)}, 300 random rooted instances and 100 uniformly random ones. For the two worked instances, it also confirms that Gale–Shapley needs 5 and 6 proposal rounds and that removing all roots at once needs 3 rounds. Each result is compared with man-proposing Gale–Shapley, with a reference root-removal model (grant order, stall point) and with a stability check. It also checks the N-cycle latency, `no_root` and a start while busy. It counts contended iterations, h and v decrements and stalls, and fails if any never occurs. |
| `tb_sms_sizes` | N = 2, 4, 6, 8, 10 and 12, with 40 random rooted instances each: matching, grant order and N-cycle latency. |
| `tb_sms_node` | One node driven by a testbench model of the buses: request, grant, mask, index, value broadcast and decrement rules, cycle by cycle. |
| `tb_sms_controller` | Every request pattern at N = 4, and random patterns at N = 12. |
| `tb_sms_bus` | Single-driver and arbitrary patterns against an OR computed in the testbench. |

The reference models and the generator of random rooted instances are in
`tb/sms_tb_pkg.sv`. The generator fixes a random matching and a random removal
order. Each man then ranks his partner above the partners of all later pairs,
and each woman does the same, so the instance is rooted by construction.

## Simulating

Each testbench builds with plain Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/sms_pkg.sv tb/sms_tb_pkg.sv rtl/sms_bus.sv rtl/sms_controller.sv \
  rtl/sms_node.sv rtl/sms_scheduler.sv tb/tb_sms_scheduler.sv \
  --top-module tb_sms_scheduler
./obj_dir/Vtb_sms_scheduler
```

For `tb_sms_sizes`, add `tb/sms_size_check.sv`. Every testbench finishes in well
under a second.

## Files

| file | contents |
|------|----------|
| `rtl/sms_pkg.sv` | rank/index width functions, sequencer state type |
| `rtl/sms_bus.sv` | one wired-OR bus line group |
| `rtl/sms_controller.sv` | minimum-row priority encoder and grant decode |
| `rtl/sms_node.sv` | processing element |
| `rtl/sms_scheduler.sv` | top: array, buses, controller, sequencing, assertions |
| `tb/sms_tb_pkg.sv` | Gale–Shapley, reference root removal, instance generators |
| `tb/sms_size_check.sv` | per-size random test driver used by `tb_sms_sizes` |
| `tb/tb_*.sv` | testbenches listed above |
