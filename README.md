# Fault-tolerant one-sided crossbar switches

A crossbar connects N processors to M memory modules so that any set of
one-to-one connections can be made at the same time. The classic
*two-sided* crossbar has exactly one crosspoint per processor–memory pair.
If that crosspoint breaks, the pair can never be connected again.

A *one-sided* crossbar avoids this. All ports sit on port-lines that cross
B shared bus-lines. A connection closes two crosspoints on the same
bus-line: one on the processor's port-line and one on the memory's. Any
free bus-line will do, so a broken crosspoint is bypassed by choosing
another bus-line. The price is crosspoints: B(N + M) instead of N·M.

This RTL implements the two in-between designs proposed by K. Wang and
C.-K. Wu ("Design and implementation of fault-tolerant and cost effective
crossbar switches for multiprocessor systems", IEE Proc. Computers and
Digital Techniques, 1999). Both keep a spare path for every connection and
use fewer crosspoints than the one-sided crossbar:

* **Modified one-sided crossbar.** The memories are split into g groups.
  Each group is wired to its own B/g bus-lines.
* **Ripple K one-sided crossbar.** Memory j is wired to K neighbouring
  bus-lines, j, j+1, …, j+K−1 (mod B). The window moves one bus-line from
  each memory to the next and wraps around.

Processors are wired to every bus-line in both designs. The top level,
`ft_crossbar_top`, contains both switches side by side. Each is 4 × 4 with
4 bus-lines: the modified switch uses g = 2 and the ripple switch K = 3.
These are the configurations the paper compares for area and delay.

## Crosspoint patterns

Below, `X` is a crosspoint, `.` is a missing one, and columns are
bus-lines 0–3. Processor rows are always full.

```
                 modified, g = 2     ripple, K = 3     one-sided
memory 0          X X . .             X X X .           X X X X
memory 1          X X . .             . X X X           X X X X
memory 2          . . X X             X . X X           X X X X
memory 3          . . X X             X X . X           X X X X
crosspoints       B(N + M/g) = 24     B(N + K) = 28     B(N + M) = 32
```

`xbar_pkg::xp_present` encodes these rules for any size, and
`xbar_pkg::xp_count` counts the crosspoints. Which side is "partial"
(has missing crosspoints) depends on the size. When N ≥ M it is the
memories, as drawn above. When M > N the roles swap: processors get the
groups or windows, and memories are wired to every bus-line. The number of
bus-lines is always B = min(N, M), the smallest that keeps the switch
nonblocking.

Two settings reduce to familiar designs. g = 1 or K = B gives the plain
one-sided crossbar (`TOPO_ONE_SIDED`). g = B or K = 1 gives one crosspoint
per memory, which is the two-sided crossbar redrawn.

## One switch cycle

```
req ──► priority_check ──► path_setup ──► demultiplexing ──► crosspoint_array ──► memories
           (arbiter)                          (switch)              ▲
                              grant ◄───────────┘             addr_p, data_p
```

Each switch (`crossbar_model`) is purely combinational. A request is
granted and its address reaches the memory in the same cycle. Read data
flows back in that cycle too. The processors and memories decide when to
sample; in the testbenches, memories write on the next rising edge.

1. **priority_check** settles conflicts. If several processors want the
   same memory module, the lowest-numbered one wins. The others lose for
   this cycle, and their requests are dropped rather than queued.
2. **path_setup** assigns a bus-line to each winning connection. It walks
   the winners in processor order. Each winner tries bus-lines starting
   from its memory's first bus-line (its group's base, or its own index for
   ripple K). It takes the first bus-line that meets three conditions:
   * the bus-line is unused this cycle;
   * both needed crosspoints exist;
   * neither crosspoint is marked faulty.

   Without faults every memory gets its own first bus-line, so every winner
   is connected. If no usable bus-line is free, the winner searches for a
   chain of moves (see below). A winner that still has no bus-line is not
   granted.
3. **demultiplexing** decodes each port-line's bus-line number into the
   one-hot controls `addr_c` and `data_c`. There is one pair per
   crosspoint.
4. **crosspoint_array** closes those crosspoints.

Outputs per port-line: `row_act` (the line is connected) and `row_bus`
(which bus-line it uses). Rows 0…N−1 are processors and rows N…N+M−1 are
memories.

## Fault tolerance

Each switch has an `xp_fault` input with one bit per crosspoint, using the
same row numbering. A set bit means "this crosspoint is known to be
broken". path_setup skips any bus-line whose crosspoint on either row is
faulty. That is the rerouting the design depends on. How faults are found
is outside this RTL; a diagnosis unit or software must supply the map.

Picking the first free usable bus-line is not always enough. Take memory
A, which can use bus-lines 0 and 1, and memory B, whose crosspoint on
bus-line 1 is broken. If A takes bus-line 0 first, B is left with nothing.
When a winner finds no free usable bus-line, path_setup therefore runs a
breadth-first search over the bus-lines already held:

1. The new connection takes a bus-line held by an earlier connection.
2. That connection moves to another bus-line it can use.
3. This repeats until some connection lands on a free bus-line.

This is an augmenting-path step of bipartite matching. Earlier connections
keep a bus-line, though possibly a different one. Serving the winners in
order this way yields a largest possible set of connections. So a fault
costs a connection only when no rearrangement of bus-lines could avoid it.

The search is unrolled to at most N levels per winner. Each level treats
the connections reached so far as one bit vector, so a level costs one
AND per bus-line rather than a loop over connections. Even so,
path_setup is the deepest logic in the switch, in line with the paper's
remark that the arbiter dominates the delay. The paper does not describe
its search, so this method is this design's own.

## How the crosspoints are modelled

This is the least obvious part of the RTL. In silicon a crosspoint is a
bidirectional switch between two wires. This RTL has no tri-state or
bidirectional nets. Instead every line is an **OR-chain with a fixed
direction**, and each crosspoint either adds its port-line to the bus-line
or adds the bus-line to its port-line. OR-ing gives the same result as
switching because the arbiter never puts two sources on one line.

* **Port-lines** flow from bus-line 0 to bus-line B−1. In `crosspoint`
  and `addr_box`, port `*_e` is the input end and `*_w` the output end.
* **Address and write-data bus-lines** flow from row 0 down to the last
  row (`*_n` in, `*_s` out). Processor rows lie above memory rows, so
  values go from processors to memories.
* **Read-data bus-lines** flow upward (`data_s_rd` in, `data_n_rd` out),
  from memories to processors.

Each crosspoint holds an `addr_box` and a `data_box`, with controls
`addr_c` and `data_c`. The `MEM_ROW` parameter gives the direction:

| box      | on a processor row           | on a memory row                 |
|----------|------------------------------|---------------------------------|
| addr_box | port-line ORed onto bus-line | bus-line ORed onto port-line    |
| data_box | write data onto bus; read data off bus | write data off bus; read data onto bus |

The write mode travels with the address as one extra address-line bit,
so `crosspoint_array` is built with AW = ADDR_W + 1. At the memory end the
switch splits that bit out as `mem_we`. `mem_sel` is set when the memory's
port-line is connected. Where a topology has no crosspoint, both lines pass
straight through and the control bits for that position are ignored.

## Interfaces

`xbar_pkg::req_t` is one processor's request:

| field   | width | meaning                         |
|---------|-------|---------------------------------|
| `valid` | 1     | request this cycle              |
| `write` | 1     | 1 = write, 0 = read             |
| `mem`   | 8     | memory module number (must be < M) |

`ft_crossbar_top` has one port set per switch, prefixed `mod_` (modified)
or `rip_` (ripple K):

| port               | dir | size              | meaning                          |
|--------------------|-----|-------------------|----------------------------------|
| `*_req`            | in  | N × req_t         | requests                         |
| `*_xp_fault`       | in  | (N+M) × B         | known-faulty crosspoints         |
| `*_grant`          | out | N                 | request granted this cycle       |
| `*_addr_p`         | in  | N × ADDR_W        | processor addresses              |
| `*_wdata_p`        | in  | N × DATA_W        | processor write data             |
| `*_rdata_p`        | out | N × DATA_W        | read data to processors (0 if not connected) |
| `*_mem_sel`        | out | M                 | memory connected this cycle      |
| `*_mem_we`         | out | M                 | write mode at memory             |
| `*_addr_m`         | out | M × ADDR_W        | memory addresses                 |
| `*_wdata_m`        | out | M × DATA_W        | memory write data                |
| `*_rdata_m`        | in  | M × DATA_W        | memory read data                 |

Parameters: `N = 4` and `M = 4` (from the paper), `G = 2` and `K = 3`
(from the paper's 4 × 4 comparison), `ADDR_W = 16` and `DATA_W = 32` (this
design's choice; the paper gives no widths). `crossbar_model` adds `TOPO`
(`TOPO_ONE_SIDED`, `TOPO_MODIFIED`, `TOPO_RIPPLE`). Elaboration stops with
an error if G does not divide both B and the partial-side port count, or
if K is outside 1…B.

## Where this RTL departs from the paper or fills gaps

* **No clock.** The paper reports arbiter and switch delays that add up to
  one path, so the switch is combinational. Registering the arbiter outputs
  would be a one-line change if a pipelined switch is wanted.
* **Data lines.** The paper draws four bidirectional data ports per
  crosspoint. Here each is split into a write half and a read half, as
  described above.
* **Conflict resolution.** Fixed priority by processor number is this
  design's choice; the paper only names the function. It is not fair under
  sustained load.
* **Path search.** First free bus-line, with an augmenting-path search when
  that fails, in processor order, as described above.
* **Faults.** Faults arrive as an input map; no detection logic is built.
* **Signal details.** The request encoding, `mem_sel`/`mem_we` and the
  widths are this design's choices.
* **Fig. 7 labels.** The paper's crosspoint drawing puts the labels
  addr_e/addr_w on the line through data_box. This RTL follows the text:
  addr_box switches address lines and data_box switches data lines.
* **Not built.** The one-sided and two-sided crossbars are the paper's
  baselines and are not in the top. `crossbar_model` still builds their
  crosspoint patterns (`TOPO_ONE_SIDED`, and `TOPO_MODIFIED` with G = B).
  Processors and memory modules are outside the switch; the testbenches
  use a small behavioural memory (`tb/mem_model.sv`).

## Verification

Every block has a self-checking testbench in `tb/`. Each prints one line,
`TB_RESULT checks=<n> failures=<n>`.

| testbench              | what it shows |
|------------------------|---------------|
| `tb_addr_box`, `tb_data_box`, `tb_crosspoint` | switching rules in both row roles; each control steers only its own box |
| `tb_crosspoint_array`  | random connection sets on the three 4 × 4 patterns; a control on a missing crosspoint switches nothing |
| `tb_demultiplexing`    | one-hot decode |
| `tb_priority_check`    | lowest-processor-wins against a reference |
| `tb_path_setup`        | legal, fault-free, unshared bus-lines; nonblocking without faults; the number of connections equals the best any assignment could reach, found by exhaustive search; also covers rerouting and a 4 × 8 switch (processors as the partial side) |
| `tb_arbiter`, `tb_xbar_switch` | the two halves of a switch |
| `tb_crossbar_model`    | complete switches at 8 × 4 (g = 2), 4 × 4 ripple K = 3, 4 × 4 g = 4 and 4 × 8 ripple K = 2; data end to end; crosspoint counts against the closed forms |
| `tb_ft_crossbar_top`   | both top-level switches at default size, with memories: reads return earlier writes; conflicts, all-four-connected cycles, rerouting around faults and refusals all occur |
| `tb_bandwidth`         | effective bandwidth for N = M = 2…16 at p = 0.5 and 1.0 |
| `tb_reliability`       | survival probability Q(i) and reliability R(t) under random crosspoint faults |

**Bandwidth.** Each cycle every processor requests with probability p,
picking a uniformly random memory. `tb_bandwidth` feeds the same random
request stream to the one-sided, modified, ripple and two-sided patterns.
All four grant exactly the same requests every cycle. Mean grants per
cycle over 4000 cycles, against B(1 − (1 − p/M)^N) and the paper's
simulated values:

| N = M        | 2     | 4     | 8     | 12    | 16     |
|--------------|-------|-------|-------|-------|--------|
| p = 0.5      | 0.874 | 1.658 | 3.187 | 4.833 | 6.328  |
| paper        | 0.88  | 1.66  | 3.23  | 4.80  | 6.37   |
| p = 1.0      | 1.509 | 2.742 | 5.253 | 7.778 | 10.325 |
| paper        | 1.50  | 2.73  | 5.25  | 7.78  | 10.30  |

**Reliability.** Q(i) is the fraction of full-load request sets
(p = 1) that this arbiter still serves completely when i random
crosspoints are faulty. It is estimated from 300 trials per i. It is
combined as R(t) = Σ C(Nc,i) Rc^(Nc−i) (1−Rc)^i Q(i), where
Rc = e^(−0.01 t) and the sum runs over every possible number of faults.

| switch              | Nc  | R(1 h) | R(10 h) | R(31.6 h) | R(100 h) |
|---------------------|-----|--------|---------|-----------|----------|
| 4 × 4 one-sided     | 32  | 1.000  | 0.998   | 0.826     | 0.087    |
| 4 × 4 modified g=2  | 24  | 0.998  | 0.885   | 0.437     | 0.028    |
| 4 × 4 ripple K=2    | 24  | 0.998  | 0.853   | 0.405     | 0.024    |
| 8 × 8 one-sided     | 128 | 1.000  | 1.000   | 0.986     | 0.088    |
| 8 × 8 modified g=2  | 96  | 1.000  | 0.991   | 0.679     | 0.009    |
| 8 × 8 ripple K=4    | 96  | 1.000  | 0.992   | 0.684     | 0.009    |

The one-sided switch is the most reliable. The 8 × 8 modified and ripple
switches stay near 1 for the first ten hours, and both have a higher R/Nc
than the one-sided switch at short times. This is the cost/reliability
trade-off the design is meant to offer. The testbench checks each of these
points.

Only the random fault model is covered. The paper's clustered-fault curves
are not reproduced, because it does not define the clustering procedure.

## Simulating

Any testbench runs with plain Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/xbar_pkg.sv \
          tb/tb_ft_crossbar_top.sv --top-module tb_ft_crossbar_top -o sim
./obj_dir/sim
```

Packages are found through `-y`. All runs finish in well under a second; `tb_bandwidth`
takes about a minute and a quarter to compile. For lint, run
`verilator --lint-only -Wall -Irtl -y rtl rtl/xbar_pkg.sv rtl/ft_crossbar_top.sv`.
It reports unused line segments at the open ends of the OR-chains; those
are expected.

To try another configuration, instantiate `crossbar_model` with different
`N`, `M`, `TOPO`, `G` and `K`. B follows as min(N, M).

## Files

`rtl/`: `xbar_pkg` (types, topology rules), `ft_crossbar_top`,
`crossbar_model`, `arbiter`, `priority_check`, `path_setup`,
`xbar_switch`, `demultiplexing`, `crosspoint_array`, `crosspoint`,
`addr_box`, `data_box`.

`tb/`: one `tb_<module>` per module, plus `tb_bandwidth`, `tb_reliability`,
`tb_ref_pkg` (crosspoint patterns written out by hand) and `mem_model`.
