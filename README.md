# Fault-tolerant systolic array for relational database operations

This design compares every tuple of a relation A with every tuple of a relation B on a
chain of very simple processors. Each processor is just a comparator and two shift
registers. From the comparison matrix `[C]` (`c_ij` is true when tuple `a_i` equals tuple
`b_j` in every attribute), the same pass also gives the set operations. Intersection,
difference and duplicate removal come straight out of the hardware. Union, projection and
join are built from these by the host.

What makes it interesting is **robustness to manufacturing faults**. The processors sit in
a mesh (for example a wafer). After testing, the good modules that can be reached from the
I/O port are chained into a one-dimensional pipeline that runs around a spanning tree of
the good modules. Neighbouring processors in that chain can be one link apart or several,
depending on the fault pattern. Every link adds one clock of delay. The algorithm is built
so that **the host sees exactly the same behaviour whatever that chain looks like**. It
pumps the same values at the same cycles and reads each result at the same cycle. No
addressing and no knowledge of the fault pattern is needed.

## The three streams and why they meet

Each cycle of the pipeline carries a *lane* (`rdb_pkg::lane_t`) with four fields:

| stream | carries | extra delay inside each processor |
|---|---|---|
| A | elements `a_ik`, or the wild card WC | none |
| B | elements `b_jk` | 1 cycle (buffer `B_i`) |
| C | running result `c_ij`, 1 bit | K = p+1 cycles (buffer `C_i[1..K]`) |
| X | running result `x_i`, 1 bit | none (rides with A) |

Every link register delays all four streams alike. So if processor `P_s` lies `d` links
after `P_1`, then a value pumped at cycle `t` reaches `P_s` at these cycles:

- A and X: `t + d`
- B: `t + s + d`
- C: `t + (p+1)s + d`

The term `d` is the same for all three streams. Whether two values meet therefore depends
only on `s` (the processor index) and never on the routing. That is the whole trick.

The host schedule below is chosen so that `c_ij`, `a_ik` and `b_jk` all arrive at processor
`s = r + k + i - j - 1` in the same cycle. That happens for k = 1..q, at successive
processors. Each processor computes:

    O_A = I_A            O_B = I_B
    O_C = I_C and (I_A == I_B)          (WC equals anything)
    O_X = I_X or (I_C and (I_A == I_B))

`c_ij` starts out True and is ANDed with one attribute comparison per processor. Before it
meets its first attribute, and after it has met its last one, the A stream holds the wild
card at the processors it passes, so `c_ij` is left unchanged there. `x_i` travels with
`a_iq` and meets each `c_ij` at the processor where `c_ij` takes its last attribute. It
therefore picks up `OR_j c_ij`.

Size of the machine for A with p tuples, B with r tuples (r <= p) and q attributes:
**N = p + q + r - 2 processors**, each C buffer **p + 1** stages long.

## Host schedule

Cycle `t = 0` is the first cycle of an operation. Indices are 1-based, and N = p+q+r-2.

| port | what | cycle |
|---|---|---|
| Port-C | `c_ij^0` = True (False in every other cycle) | `(p+1)(j-1) + p(p-i)` |
| Port-A | `a_ij` | `(p+1)r + p(p-1) + (p+1)(j-1) + (i-1)` |
| Port-A | WC | every other cycle |
| Port-B | `b_ij` | `p(p+r-1) + p(j-1) + (i-1)` |
| Port-X | False | every cycle |
| Output-Port-C | `c_ij^final` | `(p+1)(j-1) + p(p-i) + N(p+3)` |
| Output-Port-X | `x_i^final` | `(p+3)N - (p-i)` |

For the default size (p=4, q=2, r=3, N=7):

- a_11..a_41 go in at cycles 27..30 and a_12..a_42 at 32..35.
- b_11..b_31 go in at 24..26 and b_12..b_32 at 28..30.
- c_41 goes in at 0 and comes out at 49. c_13 goes in at 22 and comes out at 71.
- x_1..x_4 come out at 46..49.

The latency of every `c_ij` is N(p+3) cycles. X leaves 2N cycles after it enters. One
operation takes `(p+1)(r-1) + p(p-1) + N(p+3) + 1` cycles, which is O(p^2). That is 72
cycles at the default size.

Every `c_ij` enters the port at a different cycle. In the slot arithmetic,
`t = p(u+v) + u` with `u = j-1` and `v = p-i`. Because u < r <= p, `host_sequencer`
decodes a cycle number back into (i, j) with one division and one remainder by p.

## Operations

`host_sequencer` selects the operation (`op_e`) only by what it pumps and how it stores
the results. The array always computes the same thing.

- **OP_COMPARE**: `c_mat` = `[C]`.
- **OP_INTERSECT**: `x_vec[i]` is true when `a_i` occurs in B.
- **OP_DIFFERENCE**: the same pass, with X stored complemented. `x_vec[i]` is true when
  `a_i` is not in B.
- **OP_DEDUP**: A is compared with itself, so Port-B is read from the A memory. Port-C is
  seeded True only for `i < j`. This gives `x_i` true exactly when a later tuple equals
  `a_i`, so exactly one copy of each repeated tuple is left unmarked. This mode needs
  `R == P`, and an assertion flags a start in this mode otherwise.
- **Union, projection, join**: the host builds these from the above. Union is
  concatenation followed by duplicate removal. Projection is column selection followed by
  duplicate removal. Join compares the join columns. `tb_relational_ops` does all three
  on the top, acting as the host.

Operations can be issued back to back. When `done` rises, every True value has left the
pipeline, and the buffers hold only the False/WC filler that was pumped after the last
useful value.

## The mesh and its configuration

`mesh_network` is the physical side. It is a `ROWS x COLS` mesh of `mesh_module`s, 3 x 3
by default, with the I/O port in the bottom-left module.

**Inside a module.** Each module has a processor and a routing switch. The switch connects
the four arriving neighbour links (and the host input, in the I/O module) to:

- the processor input;
- the four leaving links;
- the host output.

Every leaving link starts with a lane register. That register is the one-cycle delay of an
inter-module link. The host input is also registered. A module's route is a `module_cfg_t`
with these fields:

- `proc_en`: the processor is part of the pipeline.
- `proc_src`: which arrival feeds the processor.
- `out_src[N/E/S/W]`: what drives each leaving link. This can be the processor output, an
  arrival passed straight on, or nothing.
- `io_src`: what drives the host output.

Faulty and unused modules get `CFG_UNUSED`.

**How the pipeline is routed.** The good modules reachable from the I/O port are chained
into a pipeline that walks around a spanning tree:

- Leave each module towards its first child.
- Come back from that child, then go to the next child, and so on.
- Finally return towards the parent.

Each module's processor sits on one of its passes. It does not have to be the first pass:
in the example machine, the pipeline passes through the modules of P_6 and P_7 on its way
to P_4 and uses their processors on the way back.

**The routing is an input.** The route table is a port (`cfg`) of `mesh_network` and of
the top. It must be held constant while the array runs. Computing it from a fault map, and
the circuit that would store or fuse it, are not part of this RTL. The testbench package
`tb_mesh_cfg_pkg` does the computation in simulation. It contains a depth-first tour
builder and the hand-written route table of the example machine.

**Equivalence with the abstract pipeline.** A pipeline wrapped around a tree of N modules
crosses each tree edge twice, plus the two I/O links, so it has 2N link registers.
`systolic_array` describes the same machine abstractly by the number of link registers on
each stretch of the pipeline, `LINK_LEN[0..N]`:

- `LINK_LEN[0]`: from the input port to `P_1`.
- `LINK_LEN[s]`: from `P_s` to `P_(s+1)`.
- `LINK_LEN[N]`: from `P_N` back to the output port.

An assertion checks that the entries sum to 2N and that none is 0. The default
`{1,1,1,4,2,1,1,3}` is the example machine:

- `P_1`, `P_2` and `P_3` are each one link from their predecessor.
- `P_3` to `P_4` takes four links, because the path detours through three other modules.
- `P_4` to `P_5` takes two links.
- `P_5` to `P_6` and `P_6` to `P_7` take one link each.
- Three links lead back to the I/O port.

Because only N matters at the ports, both forms give the same port output in every cycle
for any tree. `tb_mesh_network` checks this between two fault patterns and the abstract
pipeline.

**Choosing the array in the top.** `relational_engine` uses the mesh by default
(`USE_MESH = 1`). An assertion there requires `cfg` to enable exactly N processors. With
`USE_MESH = 0` the top uses `systolic_array` and ignores `cfg`, which is handy for sizes
where writing a route table is not wanted.

**Overriding `LINK_LEN`.** `LINK_LEN` is a packed array with an ascending index range, so
the leftmost byte of the concatenation is entry 0. For N = 8, for example:
`.LINK_LEN({8'd1, 8'd2, 8'd2, 8'd2, 8'd2, 8'd2, 8'd2, 8'd2, 8'd1})`.

## Module structure

```
relational_engine          top: host interface, relation memories, results, cfg port
├── host_sequencer         operation counter, slot decoding, port drive, result capture
├── mesh_network           (USE_MESH = 1) ROWS x COLS modules wired to neighbours
│   └── mesh_module        routing switch, link registers, processor
└── systolic_array         (USE_MESH = 0) N processors and N+1 link chains by LINK_LEN
    ├── link               LEN lane registers (a, b, c, x link buffers)
    │   └── shift_reg
    └── processor          B_i (1 stage), C_i[1..K] (K stages), PE
        ├── shift_reg
        └── pe             combinational comparator
rdb_pkg                    element width, lane_t, op_e, mesh route types
```

**Timing at the ports.** A value for cycle `t` is driven on `port_i` during cycle `t` and
is captured by the first link register at the end of that cycle. The output port is the
output of the last link register. With that convention all host cycles are exactly as in
the table above. Inside the array, positions are one cycle later than in a description
that counts the first link register as already holding the value in its pump cycle.

**Host interface of `relational_engine`.**

- While idle, write elements with `wr_en`, `wr_rel` (0 = A, 1 = B), `wr_tuple` (i-1),
  `wr_attr` (k-1) and `wr_data`. Writes while busy are ignored.
- Set `op` and pulse `start`. `busy` goes high on the next edge.
- `done` pulses in the cycle after the last extraction. After that, `c_mat[i-1][j-1]` and
  `x_vec[i-1]` hold the results until the next operation completes.

**Reset.** The reset is synchronous and clears every buffer. C and X become False and A
becomes WC, matching the first step of the algorithm.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `P`, `Q`, `R` | 4, 2, 3 | tuples of A, attributes, tuples of B (R <= P) |
| `USE_MESH` | 1 | 1: mesh routed by `cfg`; 0: abstract pipeline by `LINK_LEN` |
| `ROWS`, `COLS` | 3, 3 | mesh size (I/O port at the bottom-left module) |
| `LINK_LEN` | `{1,1,1,4,2,1,1,3}` | link registers per stretch, N+1 entries, sum 2N |
| `rdb_pkg::ELEM_W` | 8 | element width |

The defaults are the worked example of the design: seven processors in a 3 x 3 mesh with
two faulty modules. This implementation's own choices are:

- the element width;
- the wild card as a separate flag bit;
- the memory-based host interface and the `start`/`busy`/`done` handshake;
- the route encoding and the any-to-any routing switch. The source only
requires that WC "matches any element".

The source estimates that wafer-scale parts could handle relations of about 10^3 tuples.
The RTL is fully parameterised, but for p = 1000 it needs about 2000 processors with
1001-stage C buffers. This implementation has been simulated only up to P = R = 4.

## What is not modelled

- **Tie-points, fault testing, configuration and fuses.** A module has three tie-points
  where horizontal and vertical wires cross, and unused links are fused after testing.
  There is no circuit for either. The routing switch in `mesh_module` is a functional
  stand-in for the tie-points. The fault test and the computation of routes are left
  outside: routes arrive as the `cfg` port.
- **X on the A stream.** X has its own path here. A possible alternative is to append X
  as one extra bit of the A element.
- **Dedup needs R = P.** Duplicate removal uses the same machine with R = P. An array
  built with R < P cannot remove duplicates from A.

## Simulating

Each module has a self-checking testbench in `tb/`, and each one prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/rdb_pkg.sv \
          tb/tb_mesh_cfg_pkg.sv tb/tb_relational_engine.sv --top-module tb_relational_engine -Mdir obj
./obj/Vtb_relational_engine
```

| testbench | what it checks |
|---|---|
| `tb_pe` | PE equations, directed and random, including the wild card |
| `tb_shift_reg`, `tb_link` | delay and reset value |
| `tb_processor` | B delayed 1 cycle, C delayed K cycles, then the PE |
| `tb_systolic_array` | see below |
| `tb_mesh_module` | each route (processor, pass-through, host in/out, unused) is one register after its source |
| `tb_mesh_network` | the example mesh, a second fault pattern and the abstract pipeline give identical port output every cycle; a marker reaches `P_4` after 7 links and the output after 14 |
| `tb_host_sequencer` | see below |
| `tb_relational_engine` | see below |
| `tb_relational_engine_full` | the top at default parameters on the example mesh with a fixed example: full `[C]`, X and difference |
| `tb_relational_ops` | union, projection and join composed by the testbench around the top (P = R = 4), rerouted around a random faulty module each round; results held against a reference computed from the full tuples |

**`tb_systolic_array`.** The testbench generates the host streams from the timing
formulas. It runs them through two different link layouts and checks every `c_ij` and
`x_i`. It also checks that both layouts give identical port output in every cycle. Finally
it follows `c_41` to `P_6` and `P_7`, where it must meet `a_41`/`b_11` and then
`a_42`/`b_12`.

**`tb_host_sequencer`.** The testbench checks every port value in every cycle against the
example's published I/O times, and checks that results are captured in exactly the right
cycles. It also checks the dedup seeding pattern.

**`tb_relational_engine`.** This runs all four operations, back to back, on random
relations, with three engines:

- the default build, which is the example mesh;
- a P = R = 4 mesh with one faulty module, routed by a depth-first tour;
- a P = R = 4 abstract pipeline.

It checks the results against a reference model and checks the latency. It also requires
that the two routings agree in every cycle, and that each mechanism occurs at least once:
the wild card passing a True c value, a match, a mismatch, x being set, difference, and a
duplicate being found.
