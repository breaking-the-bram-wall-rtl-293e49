# Ring-pipelined grid energy for the Vina line search

AutoDock Vina scores a ligand pose by looking up pre-computed 3-D energy
grids, one map per ligand atom type, and interpolating between grid points.
The lookups sit in the innermost loop of the search (the Armijo line search
inside BFGS), so on an FPGA the grids must live in on-chip block RAM. A
realistic set of grids is tens of megabits, which fills most of one device's
BRAM. That leaves no room for the extra grid copies that more parallel
energy units would need.

This design gets around the limit by spreading the grids over a ring of
FPGAs. Each node stores only its own slab of every map. It keeps several
copies of that slab, one per energy unit. A line-search trial travels round
the ring as a packet. At each node the packet picks up the energy and
gradient of the atoms that lie in that node's slab. When every slab has been
visited, the node holding the packet finishes the trial. If the step was not
good enough, that same node starts the next trial. The ring is therefore one
long pipeline, N nodes deep, with many independent tasks in flight at once.

The RTL is SystemVerilog (IEEE 1800-2017). It follows the published
architecture "Breaking the BRAM Wall: Scalable Vina FPGA Acceleration via
Distributed Grid Storage and Cross-Board Long-Ring Pipelines". That
architecture fixes:

- the ring;
- the split of the grid over the nodes;
- the node structure: Tasks Buffer, Energy Tag Check, Task Scheduler and a
  pool of POT-U, P2C, PEC and DER units;
- the routing rules;
- the 18-bit fixed-point data width.

Everything else is this design's own choice and is marked as such below:
the packet format, the fixed-point scaling, the line-search test, queue
depths, link framing and arbitration. Some parts of Vina are not modelled at
all; they are listed in the section on what is not modelled.

## The task packet and its energy tag

Everything that moves is a `task_pkt_t` (see `rtl/vina_pkg.sv`, about 3950
bits). A packet carries the whole state of one trial, so any node can work
on it:

| field | meaning |
|---|---|
| `task_id`, `trial` | which AG task; how many times alpha has been halved |
| `x0`, `p`, `alpha` | line-search start point, direction, step |
| `e0`, `g0p` | energy and directional derivative at `x0` (from the processing system) |
| `x` | trial position `x0 + alpha*p` (written by POT-U) |
| `n_atoms`, `atype[]`, `offs[]` | the ligand: up to 32 atoms, type and offset from the ligand position |
| `coord[]` | atom coordinates (written by P2C) |
| `energy`, `grad[3]` | running sums, added to by each PEC |
| `origin`, `counter` | the **energy tag** |

The energy tag decides where a packet goes next. `origin` is the node whose
slab was summed first. `counter` is how many slabs have been summed so far.
Slabs are visited in ring order, so a packet arriving at node `k` needs that
node's slab exactly when both of these hold:

    counter < N   and   (k - origin) mod N == counter

The Energy Tag Check computes this flag. After a PEC adds its slab and
increments `counter`, the scheduler looks at the counter again:

- `counter < N`: the packet goes out on the SFP link (*forward*).
- `counter == N`: the packet stays on this node for a DER unit (*retain*).

A ring packet that fails the tag test is passed on unchanged (*bypass*). In
a correctly wired ring this never happens. The end-to-end test checks that
it does not.

## Life of one trial on a three-node ring

1. The processing system (PS) of node 0 pushes a task into node 0's Tasks
   Buffer.
2. The scheduler gives the task to an idle POT-U, which computes
   `x = x0 + alpha*p`. An idle P2C then computes
   `coord[i] = x + offs[i]`.
3. An idle PEC on node 0 starts the energy traversal. The scheduler sets the
   tag to `origin=0, counter=0` and clears the sums. The PEC adds slab 0 and
   sets `counter=1`.
4. `1 < 3`, so the packet is forwarded to node 1. Its tag check passes
   (`1-0 == 1`), a PEC adds slab 1 and the counter becomes 2. The packet is
   forwarded to node 2, which adds slab 2; the counter becomes 3.
5. `3 == N`, so node 2 keeps the packet for a DER unit. DER computes
   `gp = grad·p` and tests `energy <= e0 + 2^-13 * alpha * g0p`.
   - If the test passes, or 10 trials are used up, DER sends an
     `ag_result_t` to node 2's result port.
   - Otherwise DER halves `alpha`, increments `trial`, clears the tag and
     sums, and puts the packet into node 2's own Tasks Buffer. The next
     trial starts on node 2 and finishes on node 1.

A task therefore finishes on node `(start + N - 1) mod N`, and each retry
moves the work one node back round the ring. The testbenches check the
finishing node of every task.

## Inside a node

```
 PS task port ──► Tasks Buffer ◄── DER retries
                      │
 SFP in ─► RX queue ─► Energy Tag Check ─► Task Scheduler ◄─► POT-U x2, P2C x2,
                                               │              PEC x3 (own grid copy each),
                                               │              DER x2
                                               ├─► SFP out ─► next node
                                               └─► PS result port
```

The units are not grouped into fixed four-stage processing elements. Each
stage is one shared pool, and any finished unit of one stage can hand its
task to any idle unit of the next. This follows the description of a
dynamically scheduled, reusable computation pool. A fixed grouping is the
special case where every pool has the same size and routing is one-to-one.

### Task Scheduler (`task_scheduler`)

Every unit reports *idle* (its `in_ready`) and *done* (its `out_valid`).
In each cycle the scheduler makes at most one dispatch into each stage, and
it routes finished results. All of this is combinational; only the
round-robin pointers are registers.

| decision | rule |
|---|---|
| Tasks Buffer head → POT-U | lowest-numbered idle POT-U |
| POT-U done → P2C | round robin over finished POT-Us |
| → PEC | a ring packet that needs this node has priority over a locally started one (design choice) |
| PEC done, `counter < N` → SFP out | forward |
| PEC done, `counter == N` → DER | retain; can happen in the same cycle as a forward |
| ring packet not for this node → SFP out | bypass, only when no PEC result wants the link |
| DER result → PS port; DER retry → Tasks Buffer | |

The scheduler's `ev` output pulses one bit for each of these mechanisms. It
also pulses for the two stalls: a local task waiting with no idle POT-U, and
a ring task waiting with no idle PEC.

### Units and their timing

All units use the same interface. A unit is busy from the cycle it accepts a
packet until its result is taken. Latency is counted in clock edges after
the edge that accepts the packet.

| unit | work | latency |
|---|---|---|
| `potu_unit` | `x = x0 + alpha*p`, one axis per cycle through one multiplier, saturating | 3 |
| `p2c_unit` | `coord[i] = x + offs[i]`, one atom per cycle | max(n_atoms, 1) |
| `pec_unit` | trilinear energy and gradient of the atoms in this slab | n_atoms + 10·owned + 1 |
| `der_unit` | gp, Armijo test, result or retry | 1 |
| `energy_tag_check` | one register stage | 0 (output from the accepting edge) |
| `sfp_tx` → `sfp_rx` | 62 words of 64 bits | 62 cycles per packet |

The grid lookup is the slow stage. For a 32-atom ligand, PEC takes 11 cycles
per owned atom, while the arithmetic stages take a few cycles. This is why a
node has more PEC units than other units, and why each PEC has its own RAM
copy.

## The grid partition and the PEC arithmetic

All numbers are signed 18-bit fixed point with 10 fraction bits. Sums are
kept in 32-bit accumulators with the same scaling. Coordinates are in units
of the grid spacing, so the integer part of a coordinate is a grid index.

**Partition.** A map has `GX-1` cells along x. Node `k` owns cells
`X_LO = floor(k(GX-1)/N)` to `X_HI-1`, with `X_HI = floor((k+1)(GX-1)/N)`.
It stores planes `X_LO..X_HI`; the last plane is shared with the next node,
so every owned cell has all eight corners on the node. Each PEC's
`grid_bram` is laid out as follows, and the load port writes all copies at
once:

    address = ((type * PX + (x - X_LO)) * GY + y) * GZ + z,   PX = X_HI - X_LO + 1

**Interpolation.** For an atom in an owned cell `(ix,iy,iz)` with fraction
bits `(fx,fy,fz)`, the PEC reads the eight corners `V[k]`. Bit 0 of `k`
selects +x, bit 1 +y and bit 2 +z. The PEC then computes, with
`lerp(a,b,f) = a + ((b-a)*f >>> 10)`:

    c00=lerp(V0,V1,fx)  c10=lerp(V2,V3,fx)  c01=lerp(V4,V5,fx)  c11=lerp(V6,V7,fx)
    c0=lerp(c00,c10,fy) c1=lerp(c01,c11,fy) E=lerp(c0,c1,fz)
    dE/dz = c1-c0
    dE/dy = lerp(c10-c00, c11-c01, fz)
    dE/dx = lerp(lerp(V1-V0,V3-V2,fy), lerp(V5-V4,V7-V6,fy), fz)

The gradient is that of the interpolant, in energy per grid spacing. Atoms
outside the grid, or of a type beyond `NTYPES`, add nothing.

## The line-search decision (`der_unit`)

The architecture says only that DER does "the derivation and the AG
condition check". The rules here come from Vina's own line search:

- Armijo sufficient decrease with `c1 = 2^-13`, close to Vina's `1e-4`
  (set by `C1_SHIFT`).
- Step halving on failure.
- At most `MAX_TRIALS = 10` trials.

After the last trial the result is returned with `accepted = 0`. The result
also carries `gp = grad·p` at the new point, which the BFGS update in
software needs.

## Flow control and the in-flight limit

Links and units use valid/ready. A packet that leaves a PEC must be able to
reach the next node's RX queue. The software side must therefore keep the
number of outstanding tasks in the whole cluster at or below `RX_DEPTH` and
`TB_DEPTH` (16 each). With that bound, no cycle of full buffers can form
round the ring. Nothing in the hardware enforces the bound; the testbenches
hold to it (at most 12 tasks outstanding).

## Parameters (top `vina_ring_cluster`)

| parameter | default | origin |
|---|---|---|
| `N_NODES` | 3 | the three-board cluster of the published design |
| `C_POTU`, `C_P2C`, `C_PEC`, `C_DER` | 2, 2, 3, 2 | see the note below the table |
| `GX`, `GY`, `GZ`, `NTYPES` | 64, 64, 64, 4 | design choice: 18.9 Mb of grid in total |
| `TB_DEPTH`, `RX_DEPTH` | 16, 16 | design choice |
| `MAX_TRIALS` | 10 | Vina line search |
| `MAX_ATOMS`, `LINK_W` (package) | 32, 64 | design choice |

Unit counts: the published text asks for more than one POT-U, P2C and DER
unit. Its figures show three PEC units, and draw one DER and one or two
POT-U units.

**BRAM budget at the defaults.** Each node holds a slab of 22 planes, which
is 6.5 Mb per copy. Three PEC copies make 19.5 Mb per node, about 528 of a
ZCU102's 912 BRAM36 blocks. A grid larger than about 30 Mb would not fit with
three copies per node on that device. A single-node build (`N_NODES=1`)
needs `C_PEC=1` to fit.

The node id field is 4 bits and the counter 5 bits, so rings of up to 16
nodes can be built.

## What is not modelled

- **Conformation.** Only the ligand's position is searched: POT-U updates a
  translation and P2C translates rigid atom offsets. Vina's orientation
  (quaternion) and torsion degrees of freedom, their coordinate conversion
  and their derivatives are not built. The gradient is the translational one
  (the sum of the atom gradients).
- **Intramolecular energy.** The architecture computes it on the starting
  node but gives no formula. The packet energy is the intermolecular
  (grid) part only.
- **Out-of-grid penalty.** Vina's penalty for atoms outside the grid is not
  applied; those atoms contribute zero.
- **Processing system.** The BFGS loop, Hessian update, Metropolis test and
  mutation are software on the ARM cores. Each node's task, result and
  grid-load ports stand in for them.
- **Transceivers and clocks.** The SFP transceivers and fibre are replaced
  by a direct word channel with ready-based flow control, and the whole ring
  runs on one clock. A real build needs the vendor transceiver, a link layer
  with flow control, and clock-domain crossing at each SFP port.

## Simulation

All testbenches are self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M`. The reference arithmetic in
`tb/tb_ref_pkg.sv` is written separately from the RTL. The test grids come
from a formula (see the head of that file): a bowl plus a small ripple, so
some line-search trials fail and are retried.

Build and run one testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/vina_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_vina_ring_cluster.sv \
  --top-module tb_vina_ring_cluster -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_vina_ring_full` | the default-size cluster: loads all 64³×4 grid slabs, runs 12 tasks of 32 atoms, and checks each result bit-exact, including the finishing node |
| `tb_vina_ring_cluster` | 3 nodes on a 16³ grid with 60 tasks and back-pressure; requires every mechanism to occur (local and ring dispatch, forward, retain, retry, both stalls) and no bypass |
| `tb_vina_ring_scaling` | the same kind of 24-task batch on rings of 1, 2, 3, 4 and 6 nodes (16³ grid, default units per node, driven through `ring_harness`); every result bit-exact and from the right node; prints grid words per PEC copy and cycles per batch |
| `tb_fpga_node` | one node, with the testbench acting as the ring: local tasks, injected ring packets, and bypassed packets |
| `tb_task_scheduler` | directed tests of each dispatch and routing rule |
| `tb_pec_unit`, `tb_potu_unit`, `tb_p2c_unit`, `tb_der_unit` | arithmetic against the reference, and the latencies in the table above |
| `tb_energy_tag_check`, `tb_tasks_buffer`, `tb_sfp_link`, `tb_grid_bram` | the tag rule, retry priority, framing and RAM timing |

The full-size run loads about 360 000 words per node, which is most of its
roughly 400 000 simulated cycles. It takes seconds of simulation after a
build of about half a minute.

In the scaling run the grid words held per PEC copy fall from 16 384 (one
node) to 4 096 (six nodes), which is the point of the partition. With unit
counts held fixed per node the batch takes more cycles on longer rings,
because every trial now visits every node in turn; the throughput gain the
partition buys comes from spending the freed BRAM on more PEC copies
(`C_PEC`) and from more nodes sharing the task load, not from the ring itself.

## Files

`rtl/`: `vina_pkg` (types), `vina_ring_cluster` (top), `fpga_node`,
`task_scheduler`, `tasks_buffer`, `pkt_fifo`, `energy_tag_check`,
`potu_unit`, `p2c_unit`, `pec_unit`, `grid_bram`, `der_unit`, `sfp_tx`,
`sfp_rx`.

`tb/`: the testbenches above, `ring_harness` (one ring plus its driver and
checker, used by the scaling testbench) and `tb_ref_pkg`.
