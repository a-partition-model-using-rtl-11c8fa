# Partitioned dataflow graphs on partially reconfigurable hardware

A program can be compiled into a dataflow graph. Each node is a small hardware
operator, and each arc is a bus that carries one item of data at a time. A
node fires as soon as data sits on all of its inputs. Mapped straight onto an
FPGA, such a graph computes with a lot of parallelism. A large program,
though, may give a graph that no device can hold.

The partition model deals with this. It cuts the graph into partitions, and
each partition is sized to fit one partially reconfigurable region (PRR) of
the FPGA. Partitions do not wire into each other. They exchange tagged frames
over one shared data bus, and a scheduler decides which partition may drive
that bus. A loop body can then live in a partition that is loaded into a
region once per loop iteration. Each such run is called an *activation*.

This repository is synthesizable SystemVerilog for that model, worked out
for one example: computing the Fibonacci number Fib(n) with a loop.

- Partition **p1** runs in the static part of the chip. It tests n and sets
  up the loop.
- Partition **p2** holds the loop body. It is placed in two regions, which
  run successive iterations in turn.
- A second example shares the same bus: the if/else partition
  `z = x > 0 ? a + b : c - d`. Two instances of it sit in two more regions,
  and successive operand groups alternate between them.
- Beside the bus, the same Fibonacci graph is also wired directly, without
  partitions, as a reference.

Partial reconfiguration itself (loading bitstreams into the regions) is not
modelled. Every region holds its partition permanently. Everything else is here: the
operators, the graph, the communicators, the frame format, the scheduler and
the I/O block. It is all RTL, with no behavioural models.

## Tokens and the str/ack handshake

Every arc between two operators is a 16-bit data bus with two control
wires:

- **str** (strobe) comes from the sender. A 1 means a token is on the bus.
- **ack** comes from the receiver. A 0 means "ready" and a 1 means "busy".

A token moves on a rising clock edge where `str = 1` and `ack = 0`. The
sender keeps its token on the bus until it has moved. The primitive, copy,
branch and merge operators and the communicators check this rule with
assertions (enable them with `--assert`).

Each operator ends every input arc in a one-token register, and its `ack` is
simply "this register is full". The graph is therefore a *static* dataflow
graph: at most one item of data waits on any arc. Each output also has a
register. An operator fires when:

- every input it needs holds a token, and
- its output register is empty, or is being emptied in that same cycle.

Firing consumes the inputs and writes the result. The latency is one clock
per operator. Because `ack` is registered, an arc passes at most one token
every two cycles. There are no combinational paths between operators, so any
graph built from them is free of combinational loops.

A synchronous active-low reset empties every register. After reset every
`ack` is 0, which is the "ready to receive" state that starts communication.

## The operators

| module | node | behaviour |
|---|---|---|
| `df_primitive` | add, sub, mul, div, and, or, not, =, ≠, <, >, ≤, ≥ | two operands in, one result out; `OP` picks the operation |
| `df_copy` | copy | one token in, the same token on `N_OUT` outputs (default 2) |
| `df_branch` | branch | a control token steers the data token to output `t` (TRUE) or `f` (FALSE) |
| `df_dmerge` | deterministic merge | a control token picks which input, `a` (TRUE) or `b` (FALSE), is read and passed on |
| `df_ndmerge` | non-deterministic merge | whichever input has a token first is passed on |
| `new_tag_area` | new tag | splits a group of values into tagged tokens that share a fresh activation number |
| `df_tag_op` | next tag / restore tag | attaches the running activation's tag to a token, advanced to the next iteration or restored on loop exit |

Conventions that apply throughout:

- **Truth values.** A comparison yields 1 for TRUE and 0 for FALSE. A control
  input treats any non-zero value as TRUE. Comparisons are signed by default
  (`SIGNED_CMP`).
- **Constants.** The graphs use constants such as "compare with 0" and
  "subtract 1". These are folded into the operator as an immediate operand
  (`USE_IMM`, `IMM`), so no node has to generate constant tokens. An operator
  with an immediate, and `OP_NOT`, hold `ackb` at 1, so the `b` port is never
  used.
- **Division by zero** gives all ones.
- **Deterministic merge.** The merge leaves the input it did not select
  untouched. A graph must therefore never send a token to the side that will
  not be read. The graphs here add a branch wherever the drawn graph would
  break this rule (see below).
- **Non-deterministic merge.** When both inputs hold a token, the older one
  goes first; tokens that arrive in the same cycle go `a` before `b`.
- **Wide branches.** `df_branch` has a width parameter. p1 uses it to steer
  its four loop-start values as one 64-bit group.

## The Fibonacci graph and how it is cut

The loop being computed starts from `i = 1`, `n' = n - 1`, `b = 0`, `a = 1`:

```
while (i < n') { i = i + 1;  (a, b) = (a + b, a); }
return a + b;
```

After k iterations `a = Fib(k+1)` and `b = Fib(k)`. The loop exits after
n - 2 iterations and returns a + b = Fib(n). When n < 2 the answer is n
itself.

### Partition p1 (`fib_partition1`): entry and exit

```
n ─ copy ─┬─ [n == 0] ─┐
          ├─ [n == 1] ─┴─ [or] ─ copy ─┬─ control of the start branch
          ├─ [n - 1] ─ start branch    ├─ control of the n-branch
          └─ n-branch                  └─ control of the return merge

start branch, data {i=1, n-1, b=0, a=1}:
    FALSE (n ≥ 2) → start output      TRUE → dropped
n-branch:
    TRUE (n < 2) → return merge       FALSE → dropped
return merge:
    TRUE → n                          FALSE → a coming back from p2
```

A dropped output is one whose ack is tied to 0, so its token is consumed and
discarded.

The n-branch is not part of the drawn graph. There, the copy of n goes
straight into the return merge. For n ≥ 2 that token would never be read, and
it would block the next computation.

### Partition p2 (`fib_partition2`): one loop iteration

```
i ─ copy ─┬─ [i < n] ─ copy(4) = go ─► control of all four branches
n ─ copy ─┘    │
          └────┼──────────────► n-branch
i ─────────── [i + 1] ───────► i-branch
a ─ copy ─┬─ [a + b] ◄─ b ───► sum-branch
          └─────────────────► a-branch
```

Each branch sends its value one of two ways:

- **TRUE (continue).** The value goes on to the next activation:
  i+1 → i, n → n, a+b → a, a → b.
- **FALSE (exit).** a+b goes back to p1 as the result. The exit values of
  i, n and a have no reader and are dropped.

**Worked example, n = 3.** p1 sends i=1, n'=2, b=0, a=1.

1. First activation: 1 < 2, so it continues with i=2, n'=2, a=1, b=1.
2. Second activation: 2 < 2 is false, so it exits with a+b = 2 = Fib(3).

That is two activations of p2, placed in the two regions.

### The unpartitioned reference (`fib_graph`)

`fib_graph` wires the same p1 and p2 node sets together directly:

- p1's start group is split by a new tag area.
- A non-deterministic merge at each loop entry takes either the start value
  or the value coming round the loop.
- p2's exit value a+b goes straight into p1's `a` input.

Tags are not carried on direct arcs, so the next-tag and restore-tag nodes
become plain wires here. It computes the same results as the partitioned
system and shows what the partitioning adds.

## Frames, tags and the shared bus

Partitions exchange 72-bit frames (`frame_t` in `chipcflow_pkg`). Fields are
listed most significant first:

| Synchronous | Partition | Activation | Iteration | Nesting | Arc | data |
|---|---|---|---|---|---|---|
| 8 | 8 | 8 | 8 | 4 | 4 | 32 |

- **Synchronous** holds `SYNC_WORD` (`8'hA5`) when a frame is on the bus.
  Any other value means the bus is idle.
- **Partition** and **Arc** name the destination node and its input.
- **Activation, Iteration, Nesting** form the tag (`tag_t`).
- **data** carries the 16-bit operator value, zero-extended.

Partition numbers are 0 for the I/O block and 1 for p1. Next come the p2
regions (2 and 3 by default), then the static side of the if/else example
(4) and its two regions (5 and 6). Each node's partition number is also its
requester number at the scheduler.

The nodes on the bus:

- **Input communicator (`comm_in`).** It takes every frame addressed to its
  partition into a one-token register per arc. It offers these registers to
  the partition as ordinary str/ack inputs. It reports which arc registers
  are free (`arc_free`), and it remembers the tag of the last frame it took
  (`cur_tag`).
- **Output communicator (`comm_out`).** Each output of the partition feeds a
  one-token port register, and each port has a fixed destination partition
  and arc. While any port is full, it raises `req` and shows the frame of the
  lowest full port.
- **Bus access and schedule (`comm_bus`).** Each cycle it grants the bus to
  one requester, round robin, but only to a requester whose destination arc
  register is free. The granted frame is on the bus in that same cycle, and
  the destination takes it at the clock edge. A frame is therefore never
  refused, and no arc ever holds two items.
- **I/O block (`io_block`).** It turns host requests into frames for p1 and
  result frames into host outputs.

**Tags.**

- The new tag area gives each computation that enters the loop a new
  activation number, with iteration 0 and nesting one level deeper.
- Next tag increments the iteration.
- Restore tag clears the iteration and steps the nesting back out.

In this design the tag labels frames and is checked by the testbench. It does
not steer tokens, because a static graph never has two tokens on one arc.
The iteration field of every frame sent to a region equals the loop
iteration it carries.

## Activations across regions

`chipcflow_fib_top` builds the following system:

```
host ⇄ io_block ─┐
       p1_static ─┤
  p2_prr (reg. 0) ─┤
  p2_prr (reg. 1) ─┼── comm_bus (one 72-bit data bus, round-robin schedule)
host ⇄ ifelse_static ─┤
ifelse_prr (reg. 0) ─┤
ifelse_prr (reg. 1) ─┘
```

- **`p1_static`** wraps `comm_in`, p1, the new tag area, a tag operator for
  the result, and `comm_out`.
- **`p2_prr`** wraps `comm_in`, p2, four next-tag operators, one restore-tag
  operator, and `comm_out`.

The regions form a ring. Region k sends its continue frames to region
(k+1) mod `N_PRR`. With the default `N_PRR = 2`, iteration j runs in region
j mod 2.

Two rules keep this correct:

1. **At least two regions.** The tag operators of a region read `cur_tag`,
   the tag of the last frame its `comm_in` took. With two or more regions,
   nothing comes back to a region until the next region has received all
   four of its continue values. So every tag operator of the region has
   already read `cur_tag` before a new frame can change it. A single region
   would need a tag register per activation. The top rejects `N_PRR < 2` at
   elaboration.
2. **One computation at a time.** The I/O block keeps `host_n_ack` at 1 from
   the moment it accepts an n until the host has taken the result. Tokens of
   two computations would otherwise interleave on the arcs of a shared
   region. `fib_graph` has the same gate.

Within the Fibonacci computation, p1 and p2 follow each other strictly, so
at most one of its communicators asks for the bus at a time. The if/else
example runs on the same bus at the same time. The scheduler therefore
arbitrates between requesters. It also holds back frames whose destination
arc is still full.

## Two instances of one partition: the if/else example

The if/else partition (`ifelse_partition`) is small:

- `x > 0` is copied three ways.
- The copies control a deterministic merge and two branches.
- One branch passes a+b to the merge's TRUE input or drops it.
- The other branch passes c-d to the merge's FALSE input or drops it.

The interesting part is how it is placed. Two instances of the same
partition live in two regions (`ifelse_prr`), each between its own input and
output communicator.

`ifelse_static` in the static part does the following:

1. **Splits each group.** It takes each operand group {x, a, b, c, d} from
   the host with one handshake. A new tag area gives the group the next
   activation number and splits it into five tagged tokens.
2. **Chooses a region.** Even activations go to the first region and odd
   ones to the second. So group 1 runs in instance 1, group 2 in instance 2,
   group 3 in instance 1 again, and so on.
3. **Keeps one group per region.** A region tags its result with the tag of
   the frames it last received. A second group arriving before the first
   result had left would change that tag. The static side therefore holds a
   busy bit per region:
   - it is set when a group is accepted for that region;
   - it is cleared when the region's result comes back;
   - while it is set, a host group bound for that region is refused.
4. **Returns the results.** The results come back on one arc, get a
   restore-tag and go to the host with their tag. The two regions can answer
   in either order. The activation number in `ie_z_tag` says which group a
   result belongs to.

## Timing

These figures were measured in simulation at the default size, from the
host's strobe of n to the result, with the Fibonacci computation alone on the
bus. The testbench delays the host's reads at random, so each varies by a
few cycles. While the if/else example also sends frames, a computation takes
longer; n = 15 takes about 265 cycles instead of 233.

| n | cycles |
|---|---|
| 0, 1 | 18–19 |
| 2 | 37–38 |
| 3 | 52–54 |
| 15 | 232–233 |
| 24 | 367 |

Each further loop iteration costs about 15 cycles: one p2 activation plus
four frames on the bus. The reference system was built in a Virtex-II FPGA.
Its published timings are in nanoseconds without a clock frequency, so they
cannot be compared cycle for cycle. What can be compared is the shape: a
fixed cost for n ≤ 2, then a linear rise with n, as here.

Values are 16 bits wide. Results are exact up to Fib(24) = 46368. From
Fib(25) on they wrap modulo 2^16. The 8-bit iteration field wraps after
255 iterations; this affects only the tag, not the result.

## How far it can be trusted

**What has been checked.**

- Every module has passed its own self-checking testbench in Verilator 5,
  with random stalls on every handshake.
- The full system has passed end to end, with both examples sharing the bus.
- Each testbench has been seen to fail against a deliberately broken copy of
  its module. For example: a swapped branch output, a tag that does not
  advance, a scheduler that ignores full destinations, or a region that does
  not mark itself busy.
- The RTL synthesizes with a generic open-source flow, with no latches and
  no combinational loops. At the default size the top is about 2,600 cells
  and 4,900 flip-flops.

**What has not been checked.**

- Nothing has been run on an FPGA.
- There is no timing analysis. The longest path is probably the scheduler's
  same-cycle path: each requester's frame, then the full flags of its
  destination arc, then the grant, then the bus multiplexer, then the
  destination register. It grows with the number of partitions.
- Two arguments are reasoned and tested but not proven formally:
  - the one about needing at least two regions;
  - the one about one group per if/else region.
- The full system has been simulated with `N_PRR = 2` and 3. To run it with
  3, change the default of `N_PRR` in `chipcflow_fib_top.sv`. Larger values
  have not been simulated.

## Where this departs from the drawn design

| change | reason |
|---|---|
| Partial reconfiguration and bus macros are not modelled | Each region holds its partition all the time. Bus macros (fixed routing anchors) become plain wires. |
| p1's initial values follow the printed order of the branch inputs: i=1, b=0, a=1 | The textual algorithm starts from a=0, b=1. Together with p2's update (a, b) → (a+b, a), the printed order is the one that gives Fib(n). |
| p2: TRUE continues and FALSE exits | The branch labels drawn in p2 are ambiguous. This is the reading under which the loop ends, and it gives the two activations stated for n = 3. |
| Extra branches on n in p1, and on the + and − results in the if/else partition | They drop tokens that a deterministic merge would never read. |
| Constants folded into operators as immediates | No node has to generate constant tokens. |
| Multi-output copies | The drawn graphs fan one copy out to three or four nodes. |
| One computation in flight | Needed for correctness of a shared static graph. |
| Region choice for the if/else instances by activation parity, with one group per region in flight | The source says only that the second group activates the second instance. |
| Both examples share one bus | Shows arbitration between partitions. The source describes them separately. |
| Choices not given by the source | Tag arithmetic, `SYNC_WORD`, partition and arc numbers, schedule policy, reset behaviour. |

## Files

Everything is in `rtl/`, and `chipcflow_pkg.sv` must be read first.

- **Operators:** `df_primitive`, `df_copy`, `df_branch`, `df_dmerge`,
  `df_ndmerge`, `new_tag_area`, `df_tag_op`
- **Graphs:** `fib_partition1`, `fib_partition2`, `fib_graph`,
  `ifelse_partition`
- **Bus and nodes:** `comm_in`, `comm_out`, `comm_bus`, `io_block`,
  `p1_static`, `p2_prr`, `ifelse_static`, `ifelse_prr`
- **Top:** `chipcflow_fib_top`

Every module has a self-checking testbench `tb/tb_<module>.sv`, which prints
`TB_RESULT checks=N failures=M`. Each one:

- compares outputs with values computed independently in the testbench,
- pauses its senders and makes its receivers busy at random, and
- stops itself with a watchdog.

`tb_chipcflow_fib_top` runs the top at its default parameters:

- n = 0 … 24 and 15 random n on the partitioned system,
- 200 if/else groups at the same time, with results matched by activation
  number,
- n = 0 … 24 on the unpartitioned graph.

It also counts that each mechanism occurred:

- early return, loop continue and loop exit;
- new activations, and both regions of each example in use;
- frames queued in a communicator;
- two requesters at once;
- a frame held back because its destination arc was full;
- host back-pressure, a refused input, and if/else results returned out of
  order.

To simulate a testbench with Verilator 5, run this from the top directory:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    rtl/chipcflow_pkg.sv $(ls rtl/*.sv | grep -v chipcflow_pkg) \
    tb/tb_chipcflow_fib_top.sv --top-module tb_chipcflow_fib_top
./obj_dir/Vtb_chipcflow_fib_top
```

Notes on the command:

- Replace the testbench name to run another one.
- The package is listed first and only once; listing it twice is an error.
- `--timescale` gives the RTL files, which carry no timescale of their own,
  the same time unit as the testbenches.
- The RTL builds without warnings. Some testbenches trigger width and
  lint warnings, and `-Wno-fatal` keeps those from stopping the build.
- Every testbench finishes in well under a second.

To change the design:

- `N_PRR` sets the number of regions.
- `DATA_W` in the package sets the operator width. It is 16; the frame's
  data field has room for up to 32.
- A new partition follows the pattern of `p2_prr`: a `comm_in` with one arc
  per input, the graph built from the operators, a tag operator on each
  output, and a `comm_out` whose `DEST_PID`/`DEST_ARC` parameters name where
  each output goes. Add it as one more requester on `comm_bus`.
