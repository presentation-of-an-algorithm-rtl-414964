# Reconfigurable mesh network-on-chip

An application-specific network-on-chip is usually built one of two ways.
Either a custom topology is generated for the application and then floor-planned,
which gives good networks but makes a hard two-step optimisation problem.
Or the cores are mapped onto a fixed grid such as a 2-D mesh, which is simple but
cannot adapt to the traffic.

This design sits between the two. The operators (routers) and the core slots have
fixed places on a grid, as in a mesh. Each core slot, though, can be connected to any
of the operators at the corners of its cell, through a multiplexer. Writing the
multiplexer settings decides which cores share an operator, and so what the network
topology is, without moving any core. Cores that talk to each other a lot can be put
on the same operator and exchange packets in a single operator hop.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It sizes itself from the
number of cores (16 by default, giving 4 x 4).

## The grid

```
  R(0,0) ---- R(0,1) ---- R(0,2) ---- R(0,3)
    |  slot 0   |  slot 1   |  slot 2   |  slot 3
  R(1,0) ---- R(1,1) ---- R(1,2) ---- R(1,3)
    |  slot 4   |  slot 5   |  slot 6   |  slot 7
  R(2,0) ---- R(2,1) ---- R(2,2) ---- R(2,3)
    |  slot 8   |  slot 9   |  slot 10  |  slot 11
  R(3,0) ---- R(3,1) ---- R(3,2) ---- R(3,3)
       slot 12     slot 13     slot 14     slot 15
```

- **Operators.** There are X rows by Y columns of operators. Each is linked to its
  north, east, south and west neighbours.
- **Slots.** There is one core slot per operator, numbered `row*Y + column`. Slot
  `(i, j)` lies in the cell whose corners are operators `(i, j)`, `(i, j+1)`,
  `(i+1, j)` and `(i+1, j+1)`.
- **Edge slots.** Slots in the last column or the last row have only two corner
  operators. Slot `(X-1, Y-1)` has only one.

A slot's **corner selection** `sel` (2 bits) says which corner operator it uses:

| sel | operator       |
|-----|----------------|
| 0   | `(i, j)`       |
| 1   | `(i, j+1)`     |
| 2   | `(i+1, j)`     |
| 3   | `(i+1, j+1)`   |

Bit 1 adds a row and bit 0 adds a column. Selections whose operator does not exist
are refused by the configuration registers.

Each operator has **eight ports**:

- Ports 0–3 are the mesh links N, E, S and W.
- Ports 4–7 are local ports. Port `4+k` is wired to the slot for which this operator
  is corner `k`. That is slot `(r, c)` for k = 0, `(r, c-1)` for k = 1, `(r-1, c)`
  for k = 2 and `(r-1, c-1)` for k = 3.

So one operator can serve up to four cores at once. A local port whose slot has chosen
another corner just stays idle.

## Sizing and the central operator

By default the top, `reconf_noc`, takes the number of cores `N_IP` and picks its own
grid size with `noc_pkg::grid_rows/grid_cols`:

- Start from N = `N_IP`.
- Look for `x * y == N` with `x >= y` and `(x - y)/x <= 1/3`, and keep the most nearly
  square pair.
- If there is none, try N+1, N+2, … until one is found.

16 cores give 4 x 4, 12 give 4 x 3, 7 give 3 x 3 (via N = 9). `X` and `Y` can also be
set directly.

`noc_pkg::central_row/central_col` give the **central operator** of an x-by-y grid:
`ceil(x/2), ceil(y/2)`, counted from 1. A placement procedure puts the most tightly
coupled group of cores there first.

## Configuration

`mux_config_regs` holds one corner selection per slot. These selections drive two
things:

- the slot's multiplexer (`core_link_mux`);
- the destination lookup in every operator.

Changing a setting therefore re-targets the wiring and the routing together.

| port       | dir | meaning |
|------------|-----|---------|
| `cfg_we`   | in  | write strobe |
| `cfg_core` | in  | slot index |
| `cfg_sel`  | in  | corner selection |
| `cfg_ack`  | out | high for one cycle after an accepted write |
| `cfg_err`  | out | high for one cycle after a refused write: slot out of range or corner operator missing |
| `cfg_sel_o`| out | read-back of all selections |

Reset puts every slot on corner 0, its own operator. The network then behaves as a
plain 2-D mesh with one core per operator.

**Change the configuration only while the network is empty.** Flits already in flight
were routed under the old settings.

## Packets and routing

Packets are single flits, `noc_pkg::flit_t` (48 bits):

| field  | bits | meaning |
|--------|------|---------|
| `dst`  | 8    | destination slot |
| `src`  | 8    | source slot |
| `data` | 32   | payload |

A packet is addressed to a **slot**, not to an operator. Routing a flit for slot `d`:

1. Look up `d`'s corner selection and compute the operator it is attached to:
   `(d / Y + sel[1], d % Y + sel[0])`.
2. Route dimension-ordered towards that operator: first along the row (E/W) until
   the column matches, then along the column (N/S).
3. At the target operator, leave on local port `4 + sel`.

Dimension-ordered routing with single-flit packets cannot deadlock on a mesh.
Packets between the same source and destination stay in order.

Inside each operator (`noc_router`):

- each input port has a `FIFO_DEPTH`-entry FIFO (`flit_fifo`);
- each output port has a round-robin arbiter (`rr_arbiter`) over the eight inputs;
- all links use a valid/ready handshake;
- `in_ready` depends only on FIFO occupancy, so no combinational path runs from one
  operator to the next.

**Timing.** A flit accepted at a clock edge can leave on the next cycle. Without
contention, a packet that crosses `h` operator-to-operator links passes through
`h + 1` operators. It shows up on the destination's `core_rx_valid` `h + 1` cycles
after the edge that accepted it on `core_tx`. Two cores on the same operator are one
cycle apart.

## Core slot multiplexer

`core_link_mux` is combinational:

- **Outgoing.** The slot's flit goes to all four corner links, but valid is raised
  only towards the selected operator. The slot sees that operator's ready.
- **Incoming.** The slot takes flit and valid from the selected operator's local port.
  Only that operator sees the slot's ready.
- **Missing corners** are tied off in the top.

## Top-level ports (`reconf_noc`)

Parameters: `N_IP = 16`, `X`, `Y` (derived from `N_IP`), `FIFO_DEPTH = 4`.

| port | dir | type | meaning |
|------|-----|------|---------|
| `clk`, `rst_n` | in | logic | clock; asynchronous active-low reset |
| `cfg_*` | | | configuration port, see above |
| `core_tx[X*Y]`, `core_tx_valid`, `core_tx_ready` | in/in/out | `flit_t`, logic | injection, one per slot |
| `core_rx[X*Y]`, `core_rx_valid`, `core_rx_ready` | out/out/in | `flit_t`, logic | delivery, one per slot |

The IP cores themselves are not part of this RTL. Connect them, or their network
interfaces, to the slot ports.

## Files

| file | contents |
|------|----------|
| `rtl/noc_pkg.sv` | flit type, port numbering, sizing and central-operator functions |
| `rtl/reconf_noc.sv` | top: grid of operators, slot multiplexers, configuration |
| `rtl/noc_router.sv` | eight-port operator |
| `rtl/flit_fifo.sv` | input FIFO |
| `rtl/rr_arbiter.sv` | round-robin output arbiter |
| `rtl/core_link_mux.sv` | slot multiplexer/demultiplexer |
| `rtl/mux_config_regs.sv` | corner-selection registers |
| `tb/tb_*.sv` | self-checking testbenches, one per module plus `tb_vopd` |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Each
has a watchdog. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/noc_pkg.sv tb/tb_reconf_noc.sv --top-module tb_reconf_noc
./obj_dir/Vtb_reconf_noc
```

Any of `tb_core_link_mux`, `tb_mux_config_regs`, `tb_noc_router` or `tb_vopd` can be
given as the top instead.

- **`tb_reconf_noc`** runs the full default network (16 slots, 4 x 4) through three
  configurations: the reset mesh, four clusters of four slots (around operators (1,1),
  (1,3), (3,1) and (3,3)), and back to the mesh.
  - It checks the zero-load latency `h + 1` and refused configuration writes.
  - It runs random all-to-all traffic with random receiver readiness, and checks that
    every packet arrives unaltered and in order.
  - It counts and requires: injection stalls, receiver backpressure, deliveries
    between slots sharing an operator, multi-hop deliveries, and deliveries through
    each of the four corner links.
- **`tb_noc_router`** checks one operator: one cycle of latency, the output chosen for
  every destination, and per-input ordering under random load.
- **`tb_vopd`** runs the traffic of a 16-core video object plane decoder (VOPD). It
  uses the decoder's 21 edge volumes, with volume/4 + 1 packets per edge, on two
  placements:
  - one core per operator (the reset mesh);
  - four clusters of at most four cores, with the most tightly coupled cluster on
    the central operator.

`tb_vopd` results:

| placement | cycles to finish | flits/cycle | mean latency | energy Σ V·((h+1)Es + h·El), Es = El = 1 |
|-----------|------------------|-------------|--------------|------------------------------------------|
| mesh      | 220 | 4.31 | 8.43 | 17911 |
| clustered | 261 | 3.63 | 7.68 | 13995 |

Clustering cuts the hop-weighted energy by 22% and lowers the mean latency. It also
concentrates traffic on four operators, and under this saturating injection it takes
longer to finish. The testbench checks only the energy reduction.

## Where this design makes its own choices

The architecture fixes the grid, the eight-port operators, the four local links per
operator and the multiplexer on each core link. Everything below is this
implementation's own choice:

- single-flit packets and the flit format;
- slot addressing and the configuration-based destination lookup in each operator;
- column-first dimension-ordered routing, input FIFOs and round-robin arbitration;
- the configuration port, refused writes and the reset state (plain mesh);
- the rule that reconfiguration happens only on an empty network.

Other points to know:

- **At most four cores per operator.** The hardware cannot attach more, because an
  operator has only four local ports. A placement that wants five cores on one
  operator must move one elsewhere. The VOPD testbench does that with the Padding
  core.
- **Configuration algorithm is not in the hardware.** The procedure that groups cores
  into clusters and places them runs offline. Only its result, the corner selections,
  enters the hardware.
- **No absolute performance figures.** No clock, flit width or technology was chosen
  for comparison with published numbers. The throughput and latency above are in
  flits and cycles of this RTL.
