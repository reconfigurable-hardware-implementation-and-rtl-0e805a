# Mesh routing multiplier for the matrix step of the Number Field Sieve

The matrix step of the Number Field Sieve needs many products of a huge,
very sparse matrix A over GF(2) with a block of K vectors. The block
Wiedemann algorithm needs about 3·D/K of them for a D×D matrix. This RTL
computes one such product for a sub-matrix, using *mesh routing*.

Each non-zero entry A[i][j] becomes a small packet. The packet starts in
the cell of a 2-D mesh that owns column j, picks up the K vector bits
v[j] there, and moves through the mesh to the cell that owns row i. There
its bits are xored into result word i. Every cell works in parallel and
talks only to its four neighbours. A product therefore costs a few hundred
clock cycles, whatever the number of non-zeros.

The default configuration is the "improved" single-FPGA design:

- a 12×12 mesh (`M`);
- each cell owns P = 16 columns and rows, so the sub-matrix is
  12·12·16 = 2304 square;
- at most D = 1 non-zero per column;
- K = 50 vectors at once.

With `P = 1` the same RTL becomes the "basic" design, with one column per
cell.

## The data, and where it lives

Matrix index x (a row or a column of the sub-matrix) belongs to cell
`x / P`, counted row-major, so the cell is at row `(x/P)/M` and column
`(x/P)%M`. Within that cell it is word `x % P`.

Each cell holds three stores and one register:

| store | size | contents |
|---|---|---|
| R | P·D entries | the cell's packets: destination (r, c, lo) and `src`, the column within the cell whose vector word the packet carries |
| P | P words of K bits | the vector words of the cell's own columns |
| P' | P words of K bits | the result words of the cell's own rows, being accumulated |
| CR | 1 packet | the packet the cell is routing now: valid bit, r, c, lo, K vector bits |

The stores are plain arrays with no reset, so they map onto distributed or
LUT RAM. The destination is split in two:

- (r, c) is the destination cell, the high bits of the row index;
- lo selects the word in P' there, the low bits of the row index.

The routing logic only compares r and c. lo matters only on arrival and
when deciding whether two packets can be merged.

## Clockwise transposition routing

Routing runs in *phases*. A phase takes one clock cycle. In each phase
every cell pairs with one neighbour and the pair does a compare-exchange.
Rows and columns are 0-based. The phases repeat in this order:

| phase | pairs |
|---|---|
| `PH_UP` | vertical pairs (1,2), (3,4), … Even rows pair with the row above. |
| `PH_RIGHT` | horizontal pairs (0,1), (2,3), … Even columns pair to the right. |
| `PH_DOWN` | vertical pairs (0,1), (2,3), … Even rows pair below. |
| `PH_LEFT` | horizontal pairs (1,2), (3,4), … Even columns pair to the left. |

As a result, a cell with row+column even meets its neighbours in the order
top, right, bottom, left (clockwise). The other cells meet theirs
anticlockwise. A cell with no partner in a phase sits out that phase and
keeps its packet. This happens at a mesh edge, or on every side of an odd
mesh.

Each cell decides alone, from the same information its partner sees. The
rules are symmetric, so the two decisions always agree, and no packet is
lost or duplicated. For a pair (low cell L, high cell H) in one dimension:

- a is the coordinate of L's packet in that dimension;
- b is the coordinate of H's packet;
- iL and iH are the two cells' coordinates.

| L valid | H valid | action |
|---|---|---|
| yes | yes, same destination cell and word | **merge**: one packet takes the xor of both vectors, the other is dropped. L keeps it if the coordinate ≤ iL, otherwise H keeps it. |
| yes | yes, different | **exchange** if a > b, so the packet with the larger coordinate moves up/right. |
| no | yes | L **takes** H's packet if b ≤ iL. |
| yes | no | H **takes** L's packet if a ≥ iH. |

A "take" is an exchange for the receiving cell and an annihilate for the
giving cell. For the both-valid case, "exchange if a > b" is the same as
"move the packet that is farther from its destination closer", a
property the comparator testbench checks exhaustively.

A packet is delivered in the same cycle it arrives at its destination
cell, or in the fetch cycle if it starts there. Delivery xors its vector
into `P'[lo]` and clears it from CR.

## One multiplication

`CMD_MULTIPLY` runs P·D *routing iterations*. Iteration t works like
this:

1. **Fetch** (one cycle). Every cell copies `R[t]` together with the
   vector word `P[src]` into CR. Empty slots give an invalid packet.
2. **Steps**. Phases run up, right, down, left, … one per cycle. The
   iteration ends when no cell holds a valid packet (the OR of all CR
   valid bits), or after `MAX_PHASES` = 4·M steps.
   - Reaching the limit with packets left drops them and sets
     `route_overrun`.
   - 4·M is the budget the design is sized for, but it is not a hard
     bound. With M = 12, random full-density iterations took 28 to 45
     steps. On an 8×8 mesh with P = 16, single iterations took up to 38
     steps against a budget of 32. A matrix that overruns is flagged,
     not silently accepted. Raise `MAX_PHASES` if the data needs it.

Then P **copy** cycles move P' into P and clear P'. The result is the
vector for the next multiplication, which is what the Wiedemann iteration
wants. A second `CMD_MULTIPLY` without reloading therefore computes A·(A·v).

Cycle count: at most P·D·(1 + X·4·M) + P + 1. At the defaults (X = 1)
this is 16·49 + 17 = 801 cycles. A full-density random 2304×2304 matrix
takes about 520 cycles.

### Two-cycle compare-exchange (`X = 2`)

At a fast platform clock, the path from a neighbour's CR through the
phase multiplexer and the comparator into CR is too long for one cycle.
`X = 2` breaks it with a register R1 in every cell, placed after the
neighbour multiplexer.

Each phase then takes two cycles:

1. `OP_SELECT`: every cell loads its partner's packet into R1.
2. `OP_STEP`: the cell compares and updates CR from R1.

Neither the phase nor any CR changes between the two cycles, so the
routing result is identical; only the time doubles.

## Loading and unloading

The cells are threaded row-major into *chains*. A chain enters at the
top-left cell of its lane and leaves at the bottom-right. With
`LANES` > 1, each group of M/LANES rows has its own chains. All lanes move
in lockstep on one `in_valid`/`in_ready` and one `res_ready`.

- **Packets** (`CMD_LOAD_PKT`). A load word is
  `{st, r, c, lo, ri, ci, src}`. Here (r, c, lo) is the row index of the
  entry and (ri, ci, src) its column index, both mapped as above. Every
  cell passes each word on one stage per accepted beat. A cell writes a
  word into R when st = 1 and (ri, ci) is its own coordinate.
  - Words for the lane's last cell go in first. All slots have then
    reached their cells after D·P·M·M/LANES beats.
  - Each cell takes P·D words, and st = 0 fills unused slots.
  - The load word is 1 + 4·CW + 2·LW bits, where CW = ⌈log2 M⌉ and
    LW = log2 P. That is 25 bits at the defaults.
- **Vectors** (`CMD_LOAD_VEC`). Words enter the first cell of the lane,
  first cell's words first. A cell keeps the first P valid words it sees.
  After that it forwards every word, with its valid bit, to the next cell
  one cycle later, so the valid bit ripples down the chain with the data.
  The command ends when every cell has its P words. Loading also clears
  P'.
- **Results** (`CMD_UNLOAD`). The unload chain is a valid/ready pipeline.
  After a start cycle each cell first emits its own P words, in order
  0..P-1, and then relays what comes from the cells before it. The lane's
  last cell therefore comes out first. The host may apply back-pressure
  with `res_ready`.

Timing at the defaults with one lane:

| command | beats |
|---|---|
| packet load | 2304 |
| vector load | 2304, plus the ripple |
| unload | 2304 |

`LANES` divides these by the number of lanes.

## Control and interface

`mesh_routing_top` accepts one command at a time (`cmd_valid`/`cmd_ready`,
type `mr_pkg::mesh_cmd_e`). `done` pulses when the command ends. The
controller (`mr_controller`) turns each command into one *operation* per
cycle (`mr_pkg::mesh_op_e`), which is broadcast to every cell. The cell's
control logic decodes the operation into enables for its units.

Reset is asynchronous and active low. It clears the controller, the
pointers, the chain valid bits and the CR valid bits. The stores are not
reset. Loading defines them: a packet load resets the R pointer, and a
vector load clears P'.

| parameter | default | meaning |
|---|---|---|
| `M` | 12 | mesh side |
| `P` | 16 | columns (and rows) per cell. 1 = basic design. |
| `D` | 1 | maximum non-zeros per column of the sub-matrix |
| `K` | 50 | vectors multiplied at once |
| `LANES` | 1 | parallel load/unload chains. Must divide M. |
| `MAX_PHASES` | 4·M | step limit per routing iteration |
| `X` | 1 | clock cycles per compare-exchange: 1, or 2 with register R1 |

## Files

| file | contents |
|---|---|
| `rtl/mr_pkg.sv` | operation, command, phase and direction enums, and the `idx_w` width helper |
| `rtl/mr_comparator.sv` | the compare-exchange decision (combinational) |
| `rtl/mr_current_packet.sv` | the CR register and its next-value logic |
| `rtl/mr_loading_unit.sv` | R, P, the packet, vector and unload chain stages, and fetch and copy |
| `rtl/mr_result_unit.sv` | P', destination check and xor |
| `rtl/mr_cell.sv` | one cell: constant status bits from (ROW, COL), neighbour selection per phase, the units above |
| `rtl/mr_mesh.sv` | the M×M array, neighbour links and chains |
| `rtl/mr_controller.sv` | the command sequencer |
| `rtl/mesh_routing_top.sv` | controller plus mesh |

## Verification

Every testbench prints `TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_mr_comparator` | Every pair of neighbouring cells on a line of 8 positions, every validity combination and a spread of destinations, with both cells of the pair evaluated. Checks against a distance-based reference, and that the two cells agree, so no packet is lost or duplicated. |
| `tb_mr_current_packet` | Random operation sequences against a model of CR. |
| `tb_mr_result_unit` | Random deliveries and clears against a model of P'. |
| `tb_mr_loading_unit` | A chain of three units: packet decode and skip, vector ripple and full flag, fetch, copy, and unload order with back-pressure. |
| `tb_mr_cell` | A middle cell and a corner cell of a 4×4 mesh with stand-in neighbours. Covers: each chain, delivery at fetch, the neighbour chosen in each phase, delivery while routing, annihilation, merge, exchange, sitting out a phase at the edge, copy and unload. |
| `tb_mr_mesh` | An odd 3×3 mesh with three lanes, driven with raw operations. Checks full-flag timing, that packets in flight never increase, the iteration length, and the complete A·v result. |
| `tb_mr_controller` | The operation sequence of every command against a behavioural mesh. Covers: stalls, fetch indices, phase order, copy indices, the step limit and the overrun flag. |
| `tb_mesh_routing_top` | End to end at four reduced sizes (4×4 P=4 D=2 K=8; 4×4 P=2 with two lanes; 6×6 P=1 at full density; 5×5 P=2 D=2 with X = 2, where every compare-exchange must be preceded by exactly one select cycle). Random sparse matrices go through the host interface with random input stalls and output back-pressure. Results are compared with A·v and A·A·v computed in the testbench. It checks the cycle budget of each multiplication and counts that every mechanism happened: input stall, output back-pressure, exchange, annihilation, merge, delivery at fetch, delivery while routing. |
| `tb_mr_workloads` | The other evaluated configurations, end to end at full density: basic 12×12 (P = 1, K = 70); basic 10×10 (K = 70, X = 2); improved 8×8 (P = 16, K = 64, X = 2). The 8×8 run allows 6·M steps, see above. |
| `tb_mesh_routing_full` | The same test with the top at its default parameters: a 2304×2304 matrix, K = 50, 4·M = 48 steps per iteration. It runs in well under a second. |

The reduced end-to-end configurations allow 8·M steps per iteration.
Very small meshes can need more than 4·M, since the bound is about the
average behaviour of a 12×12 mesh. At the default size the design's own
limit of 4·M = 48 is used and holds.

To simulate with plain verilator, for example the full-size test:

```
verilator --binary --timing -y rtl -y tb --top-module tb_mesh_routing_full \
  rtl/mr_pkg.sv tb/tb_mesh_routing_full.sv
./obj_dir/Vtb_mesh_routing_full
```

The other testbenches build the same way with their own file and top
module; `-y` lets verilator find the modules each one uses.

## Departures and choices

These points are not fixed by the published description. They are this
design's own choices:

- **Early end of routing.** An iteration stops when the mesh is empty,
  not after a fixed 4·M phases. 4·M remains the limit and the sizing
  figure.
- **Overrun.** Packets still in flight at the limit are dropped and
  flagged with `route_overrun`. Nothing retries them.
- **Merge.** Equal destination means the same cell *and* the same result
  word. The cell on the destination's side keeps the merged packet.
- **Unload handshake.** The unload chain is valid/ready instead of a
  plain shift register, so P can stay a RAM and the host can stall.
- **Interface.** The command set, the handshakes and the load word layout
  are this design's own.
- **Copy.** P' is copied into P after each multiplication, so repeated
  multiplications need no reload.

Not built:

- The further registers of the fast-clock variant, which are needed for
  large K. These are registered enables and multiplexer selects, and a
  three-cycle compare-exchange with registers inside the comparator. Only
  the two-cycle form with R1 (`X = 2`) is built.
- Meshes spread over many FPGAs, with time-multiplexed pins between the
  chips.
- The host memories and the software that splits a large matrix into
  sub-matrices and combines the partial products.

The sizes the published evaluation uses for 512- and 1024-bit numbers are
products of many such sub-matrix multiplications. One instance at the
defaults runs one 2304×2304 sub-product. Larger single meshes (for example
M = 120) are a parameter change but were not simulated.
