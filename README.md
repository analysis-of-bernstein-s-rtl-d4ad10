# A routing mesh for sparse matrix-by-vector products over GF(2)

The linear-algebra step of the number field sieve finds vectors in the kernel
of a very large, very sparse bit matrix A. Block Wiedemann does this by
computing long chains v, Av, A²v, ... for K starting vectors at once. From
each chain it keeps only a few inner products u_j · (A^k v_i). Nearly all
the work is the product A·v over GF(2).

This RTL does that product on a two-dimensional mesh of small identical
nodes. Each node owns a few matrix columns. Each node turns its nonzero
entries into messages. A sorting-network style routing moves every message
to the node that owns its row, and that node XORs it in.

Only nearest neighbours are ever connected, so a mesh of side m finishes
each routing pass in about 2m clocks, whatever the matrix.

## The data held by one node

A node owns RHO consecutive columns c of the matrix. For each of them it holds:

* `P[c]`: K bits, the current vector entry of each of the K chains;
* `P'[c]`: K bits, where the new vector `A·P` is accumulated;
* its part of the entry list Q: up to QDEPTH = H·RHO entries.
  * Each entry is (local source column, destination).
  * The destination is written as (node row, node column, local column).
  * With this encoding, the compare-exchange elements never divide by RHO.
* a one-message register R. It holds a valid bit, the destination and the
  K-bit payload.
* an index I into Q.
* four "disabled neighbour" bits.

The destination of matrix row r is node `(r / RHO) / COLS`,
`(r / RHO) % COLS` and local column `r % RHO`. Equivalently,
`r = ((row·COLS)+col)·RHO + c`.

## One multiplication

`mesh_ctrl` sequences every node through the same commands:

1. **CLEAR**: every P' is set to zero.
2. **H·RHO iterations**. Each one is:
   1. **LOAD**: each node reads the next entry (c, dest) of Q. If `P[c]` is
      not zero, it puts the message `<dest, P[c]>` in R. If `P[c]` is all
      zero, the entry is skipped and nothing is sent. A message whose
      destination is the node itself is XORed into P' at once.
   2. **ROUTE**: clockwise transposition routing, described below, until the
      whole mesh is empty. When a message reaches its node, it is XORed into
      `P'[c]` and removed.
3. **COMMIT**: P ← P' in every node.
4. **Inner products**: `ip_unit` outputs `u_j · P` for j = 1..NU. Each result
   is a K-bit word, one bit per chain.

A run of `n_mult` multiplications is started by one `start` pulse.

## Clockwise transposition routing

Every clock, half of the mesh edges are active. The active pair of nodes
compare their messages and may swap them. The schedule cycles through four
phases. Rows and columns are counted from 1 here.

| phase | pairs that act |
|---|---|
| UP    | each node on an odd row with the node above it |
| RIGHT | each node on an odd column with the node to its right |
| DOWN  | each node on an odd row with the node below it |
| LEFT  | each node on an odd column with the node to its left |

So every node meets its neighbours in the order up, right, down, left.

The compare-exchange element (`cx_pair`) decides on one pair. It looks only
at the target coordinate along the pair's axis: the row for vertical pairs,
the column for horizontal ones.

* **Two messages for the same destination** are merged. One slot takes the
  XOR of the payloads and the other becomes empty. The merged message stays
  in the slot nearer the destination. If the XOR is zero, both slots become
  empty; for K = 1 this is exactly "two equal bits cancel".
* **Two messages, different targets**: they swap if that brings the farther
  one closer. For targets ta (upper or left) and tb, that is `ta >= tb`.
* **One message**: it moves if that brings it closer.
* **A message already in its target node** is delivered at once, during
  LOAD or during ROUTE. Delivered messages never reach a compare-exchange
  element.

Routing ends when an OR-tree over all valid bits reports the mesh empty. The
controller counts the clocks of each pass. It keeps the longest in
`route_max` and raises `over_budget` if a pass ever took more than 2m clocks.

### Ties are exchanged

When the two targets are equal, "exchange if it reduces the distance of the
farther message" and "exchange if ta > tb" disagree. The two messages are
then equally far, one each side of the coordinate they both want.

This design exchanges them. With a strict `>`, groups of such messages wait
for each other forever: routing deadlocked in simulation. With the distance
rule, no deadlock was seen in any run.

### Defective nodes

A node can be closed off by setting, in each of its neighbours, the disabled
bit that points at it. These bits are loaded with `ld_sel = LD_DIS`. The
effects are:

* A pair with a disabled bit across its edge never exchanges.
* A node with a disabled neighbour in one direction always exchanges on the
  two orthogonal edges, whatever the compare says. This forced exchange lets
  messages flow around the dead node.
* A closed-off node must own no columns, and no matrix row may point at it.
  Choosing which nodes to close off, and renumbering the columns around them,
  is done outside the device.

## Sizes

| parameter | default | full single-wafer configuration |
|---|---|---|
| ROWS × COLS (mesh) | 8 × 8 | 975 × 975 |
| RHO (columns per node) | 42 | 42.1 on average |
| K (chains, payload bits) | 208 | 208 |
| H (nonzeros per column) | 100 | 100 |
| QDEPTH (entries per node) | 4200 | about 4210 |
| D = ROWS·COLS·RHO | 2688 | 4·10⁷ |

Each node is built at full size. The mesh side is scaled down because of
tool limits, measured on this RTL:

* Verilator lint needs about 1 MB per node (967 MB at 32 × 32). 950,000
  nodes would need about 900 GB.
* Yosys synthesis of the flat mesh grows by about ×7.5 for each 4× more
  nodes: about 70 s at 4 × 4 and 457 s at 8 × 8.

Every size is a parameter. Widths of the coordinates, indices and entries
follow from ROWS, COLS, RHO and QDEPTH.

## Blocks

| module | role |
|---|---|
| `mesh_pkg` | phase, command and load-select enumerations; sizes of the full configuration |
| `cx_pair` | compare-exchange element for one mesh edge |
| `node_ram` | per-node entry memory, synchronous write, one-clock read |
| `mesh_node` | P, P', R, I and the Q memory; emits one message per LOAD, absorbs arrivals |
| `mesh_array` | the node grid, one `cx_pair` per edge with phase enables, empty flag, P read-out mux |
| `mesh_ctrl` | CLEAR / LOAD / ROUTE / COMMIT / inner-product sequence, routing-length statistics |
| `ip_unit` | table of two P-row selectors per u_j; reads and XORs them after every commit |
| `routing_mesh_top` | connects the above; host load port, P read port, run control, event flags |

### Timing

* A LOAD takes 2 clocks: the memory read and an idle clock.
* A ROUTE pass takes as many clocks as it needs. Each one has a fixed overhead.
* The inner products take 2·NU + 1 clocks.
* So a multiplication takes about `H·RHO·(route + 3) + 2·NU` clocks.

The `events` output flags, each clock, which mechanisms acted:

| bit | mechanism |
|---|---|
| 0 | exchange |
| 1 | combine |
| 2 | annihilation |
| 3 | forced exchange |
| 4 | blocked edge |
| 5 | delivery |
| 6 | message emitted |
| 7 | zero payload skipped |

## Where this design makes its own choices

* **End of routing.** Routing runs until the mesh is empty rather than for a
  fixed 2m clocks, so no message can be lost on an unlucky input. The
  length is measured instead. On 6 × 6 to 8 × 8 meshes, single passes took up
  to about 5m clocks; the 2m figure holds for large meshes.
* **Zero payloads** are not sent.
* **Integer RHO.** Every node has the same RHO, and it is an integer. A
  matrix column cannot be spread over several nodes (RHO < 1).
* **Storage.** P and P' are flip-flops, and Q is a plain memory array. The
  DRAM-based storage of a real device is not modelled.
* **Inner products** are computed after each commit, not overlapped with the
  next multiplication. Each u_j may have weight 1 or 2 only: two selector
  slots, the second optionally empty.
* **Loading.** The matrix, vectors, disabled bits and selectors are loaded
  through an addressed write port, one word per clock, while the device is
  idle.
* **Outside the RTL.** Multi-wafer links, clock distribution, defect mapping
  and the Wiedemann post-processing of the inner-product stream are not
  part of the RTL.

## Simulating

All testbenches are self-checking and print
`TB_RESULT checks=<n> failures=<n>`. For example:

```
verilator --binary --timing -Irtl rtl/mesh_pkg.sv rtl/cx_pair.sv rtl/node_ram.sv \
  rtl/mesh_node.sv rtl/mesh_array.sv rtl/mesh_ctrl.sv rtl/ip_unit.sv \
  rtl/routing_mesh_top.sv tb/tb_mesh_harness.sv tb/tb_routing_mesh_top.sv \
  --top-module tb_routing_mesh_top -Mdir obj && obj/Vtb_routing_mesh_top
```

### Unit testbenches

| testbench | what it checks |
|---|---|
| `tb_cx_pair` | random and directed pairs against a reference model of the rules above |
| `tb_node_ram` | writes and reads |
| `tb_mesh_node` | one node in a 4 × 4 mesh: loads, emission, skip, absorption, commit |
| `tb_mesh_array` | a 5 × 3 mesh: every message must arrive and be XORed correctly; message count never grows |
| `tb_mesh_ctrl` | command sequence and counts against a simulated mesh |
| `tb_ip_unit` | inner products and the 2·NU + 1 clock latency |

### System testbenches

Both use `tb_mesh_harness`. The harness:

* generates a random sparse matrix, with some list entries left unused, and
  random vectors;
* loads them through the host port;
* runs several multiplications;
* checks every inner product and the final vectors against a software model.

It also checks the routing-length bound on fault-free meshes. Every mechanism
must occur at least once.

* `tb_routing_mesh_top` runs a 6 × 6 mesh, and a 6 × 5 mesh with one node
  closed off.
* `tb_routing_mesh_full` runs the top at its default parameters. Verilator
  needs about ten minutes to build it; the run itself takes seconds. The
  generated matrix fills every list (268,800 entries, about one in eight
  left unused).
