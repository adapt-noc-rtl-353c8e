# Adapt-NoC: a mesh whose regions pick their own topology

A manycore chip that runs several applications at once sees very different
traffic in different places. A GPU kernel floods the network with memory
replies. A sparse CPU job barely uses the network. A bandwidth-hungry job
wants a short network diameter. One fixed topology cannot suit all of them.

This design is an 8x8 network-on-chip (NoC) that can be split at run time
into up to eight rectangular **subNoCs**, one per application. Each subNoC
runs its own topology:

| topology | what changes relative to the mesh |
|---|---|
| mesh  | nothing |
| cmesh | one router per 2x2 block serves all four cores; the other three routers are switched off; the remaining routers are joined by two-hop links |
| torus | wrap-around links join the two edge routers of every row and column of the subNoC |
| tree  | reply traffic from the memory controller gets long links that skip most of a row or column |

The topology is built from the same hardware every time. Three parts make
that possible:

* **Adaptable links.** Every row and every column has long wires with
  switchable repeaters.
* **Port muxes** in every router, so a router can be joined to a distant
  router without extra ports.
* **A reconfigurable routing table** in every router.

A small reinforcement-learning (RL) controller per subNoC picks the topology.
At the end of every 50,000-cycle epoch it looks at twelve statistics of the
subNoC, runs a small neural network (a deep Q-network, DQN), and switches the
subNoC to the topology with the highest predicted value.

All RTL is SystemVerilog-2017 in `rtl/`. Every block has a self-checking
testbench in `tb/`.

## Structure

```
adapt_noc_top
 ├─ topology_config           subNoC map + topologies -> every link, port, power and table setting
 ├─ 64 x adaptable_router     5 ports, 2 vnets x 2 VCs x 4 flits, 256-bit flits
 │    ├─ vc_buffer            one per virtual channel
 │    └─ rr_arbiter           switch allocation
 ├─ 64 x concentration_mux    joins the 4 cores of a 2x2 block to one router
 ├─ 64 x pg_controller        router / port power gating
 ├─ 32 x adaptable_link       2 channels x (8 rows + 8 columns), data and credit instances
 └─ 8 x subNoC slot
      ├─ state_monitor        12-entry state vector per epoch
      ├─ dqn_controller       12-15-15-4 DQN, one multiplier, one adder
      └─ reconfig_controller  epoch timer and switch sequence
```

`adapt_pkg` holds the sizes and the shared types:

* `flit_t` and `hdr_t`: the flit and its header (destination, source, virtual network, data/coherence bit, tag).
* `link_t` and `credit_t`: what one wire carries.
* `rte_t`: one routing-table entry (output port, mesh or express).
* `portcfg_t`: the mux settings of one router port.
* `region_t`: one subNoC as `x0, y0, w, h`.

## Adaptable links

Every row and every column carries two **channels**. A channel is a chain of
seven repeater stages, one between each pair of neighbouring routers. Each
stage `i` has two controls:

* `rep_on[i]`: 0 cuts the channel at that point. This is **segmentation**.
* `dir[i]`: which way the signal passes the stage. This is **reversal**.

`adaptable_link` models the chain as gated buffers. A cut stage passes zeros.
At every position the module reports the value passing in each direction.
The router at position `j` drives the channel with `tx_fw_en[j]` and reads it
from `rx_fw[j]`.

A channel can be configured in different ways:

* One segment from one end of the row to the other (the torus wrap-around).
* Several short two-hop segments (cmesh).
* Two opposite one-way segments (the tree; the two channels of a row act
  together as one reversible bidirectional link).

Each channel has a second `adaptable_link` instance, running the other way,
that carries the credits.

Express links, like mesh links, are registered once at the receiving router.
A hop therefore costs the same on either kind of link: 2 router cycles plus
1 link cycle. The longest express link here spans seven 1 mm tiles.

## The adaptable router

`adaptable_router` is a 5-port input-buffered router. It has:

* 2 virtual networks (request and reply).
* 2 virtual channels (VCs) per network, 4 flits deep.
* 256-bit flits, one flit per packet.

Each flit goes through two stages:

1. **Buffer write** into the input VC.
2. **Route lookup, VC choice, switch allocation and switch traversal**, all in
   the second cycle.

   * Switch allocation is separable round-robin: first one VC per input, then
     one input per output.
   * The flit lands in the output register. From there the top-level link
     register carries it to the next router.

So a hop is 3 cycles. A flit that crosses `h` hops with no contention arrives
`1 + 3h` cycles after it was offered. The end-to-end testbench checks this
latency.

**Injection bypass.** A flit from the local port that arrives at an empty VC
skips the buffer write. It competes for the switch in the cycle it arrives.

**Port muxes.** Every non-local port has two wires in and two wires out:

* Input side: the mesh link, or the adaptable channel the port is configured
  to listen to. `cfg_in_exp` selects which.
* Output side: the mesh link, or the configured channel. The routing-table
  entry of each flit says which wire it leaves on.

A port can therefore use its mesh link for some destinations and a long link
for others in the same cycle pattern. This is how the tree and torus keep the
mesh paths they still need.

**Credits.** Credit-based flow control keeps separate counters for the mesh
wire and for the express wire of each output. The two wires lead to different
routers.

**Deadlock.**

* Routing is dimension-ordered (X then Y) in every topology, and U-turns are
  forbidden.
* The torus wrap-around needs a dateline. A flit takes the upper VC of its
  virtual network after it has used an express hop in the current dimension.
  Otherwise it takes the lower VC.
* Request and reply are separate virtual networks. This breaks protocol
  dependencies.

**Gating inputs.**

* `power_on` and `port_on` gate the whole router or single ports.
* `table_busy` stalls route lookup while a new routing table is set up.

## Building the topologies (`topology_config`)

`topology_config` is combinational. It takes the eight subNoC descriptors and
the topology each one is running. From them it computes:

* router and port power requests;
* every port's mux and channel selection;
* every repeater enable and direction;
* all 64 routing tables (64 destinations x 2 virtual networks);
* the cores each concentration mux serves.

A router belongs to the lowest-numbered subNoC that covers it. Routers
outside every subNoC act as mesh routers. Below, a subNoC spans columns
`x0..xe` and rows `y0..ye`.

* **cmesh.** The router at the north-west corner of each aligned 2x2 block is
  the concentrator. The other three routers are powered down. Their cores
  reach the concentrator through its `concentration_mux`.
  * Concentrators are two tiles apart. They are joined by two-hop adaptable
    links: channel 0 carries east and south, channel 1 carries west and north.
  * A destination is routed to its block's concentrator, which ejects the flit
    to the right core.
  * Subnocs must start at even coordinates and have even sizes.
* **torus.** Channel 0 of a row runs from the west port of `x0` to the east
  port of `xe`. Channel 1 runs back. Columns are the same.
  * The routers at the subNoC's edge use their outward-facing ports, which are
    free, as the wrap-around endpoints.
  * Each packet goes the shorter way round.
  * A dimension with fewer than three routers gains nothing and stays mesh.
* **tree.** The root is the memory controller at `(x0, y0)`.
  * Channel 0 of row `y0` links the root straight to `xe`.
  * Channel 0 of every column links row `y0` straight to row `ye`.
  * Reply packets take such a link only when it is strictly shorter than the
    mesh path. Request packets stay on the mesh.
  * The far corner of the subNoC is two hops from the root.

## Reconfiguration

`reconfig_controller` runs the epoch timer of its subNoC. When the DQN
chooses a topology other than the current one, it goes through three phases:

1. **NOTIFY** for `(w+h-2)·(TR+TL)` cycles. This is the time a notice takes to
   reach every router of a `w x h` subNoC, with hop latency `TR = 2` and link
   latency `TL = 1`.
2. **DRAIN.** Injection into the subNoC is held until all its routers are
   empty.
3. **SETUP.** The new settings are applied and the routing tables are loaded.
   The tables then stay unavailable for `TS = 14` cycles, after which
   injection resumes.

Choosing the current topology again costs nothing (`keep`). After reset, and
after software writes a subNoC descriptor, the slot starts as a mesh.

`pg_controller` turns a router off only once it holds no flit. It turns a
router on at once.

## The RL controller

`state_monitor` accumulates twelve statistics over the epoch, for the nodes
of its subNoC:

* L1D, L1I and L2 misses, and retired instructions (per-core event inputs);
* coherence packets and data packets injected;
* router buffer occupancy and injection buffer occupancy;
* flits switched;
* the running topology, and the subNoC width and height.

At the end of the epoch each count is divided by its largest possible value
over the epoch. For example, occupancy is divided by `EPOCH x nodes x 80
slots`. The division uses a bit-serial restoring divider, which takes 72
cycles. Each result is a Q8.8 value in [0,1].

`dqn_controller` evaluates a 12-15-15-4 network with ReLU hidden layers.

* Weights and activations are Q8.8 and the accumulator is Q16.16.
* The datapath has one multiplier and one adder. It performs one
  multiply-accumulate per cycle.
* Weights are loaded by software. The network is trained off-line, so no
  training hardware is built.
* Weight memory holds 499 words. Each neuron is stored as its bias followed by
  its weights: layer 1 at 0..194, layer 2 at 195..434, output layer at
  435..498.
* Timing: 499 cycles of arithmetic, 4 cycles for the argmax, and 1 cycle for
  epsilon-greedy exploration. With probability `EPS/65536` (default 0.05) a
  pseudo-random topology from a 16-bit LFSR replaces the best one.
  `action_valid` rises 504 cycles after `start`.
* The action encoding is 0 mesh, 1 cmesh, 2 torus, 3 tree.

## Top-level interface

| port | meaning |
|---|---|
| `cfg_we, cfg_idx, cfg_region` | write subNoC slot `cfg_idx` (x0, y0, w, h, valid) |
| `w_we, w_sel, w_addr, w_data` | write word `w_addr` of the DQN weights of slot `w_sel` |
| `core_valid, core_flit, core_ready` | injection per node; a flit is taken when valid and ready |
| `ej_valid, ej_flit` | ejection per node, never back-pressured |
| `core_evt[n]` | per-cycle {instr, L2, L1I, L1D} miss/instruction events of node `n` |
| `cur_topo[k]` | topology running in slot `k` |
| `topo_switch_evt, topo_keep_evt, rl_decision_evt, rl_explore_evt, subnoc_hold` | per-slot event flags |
| `router_powered, bypass_evt, express_evt, gate_evt` | per-router status and event flags |

The flit header carries destination and source node numbers (`y*8 + x`), the
virtual network (0 request, 1 reply), a data/coherence bit for the statistics,
and a 16-bit tag. The top's parameters are:

* `EPOCH`, default 50000;
* `TS`, default 14;
* `EPS`, default 3277 = 0.05 · 65536.

The mesh size and the number of subNoC slots are set in `adapt_pkg`.

## Where this implementation departs from the original design

* **Reconfiguration drains.** The original scheme never stops a subNoC:
  1. add mesh routes;
  2. remove the old routes in channel-dependency order;
  3. add the new routes;
  4. remove the mesh routes.

  Here the subNoC stops injecting and drains before links change. This is
  simpler and keeps the credit counters of re-wired links consistent. The
  cost is a few hundred cycles of injection hold per switch.
* **The tree is smaller.**
  * The original tree maximises the root's fan-out and, in a 4x4 subNoC,
    reaches every router within two hops. Larger subNoCs use evenly spaced
    intermediate links.
  * Here the root has one extra outgoing link, on its free west port, because
    a five-port router has no more spare ports. Each column has one long link.
  * Only the far half of the subNoC gets closer. In a 4x4 some routers are
    still four hops away.
* **Memory-controller sharing is partial.** A subNoC can send to a
  neighbour's memory controller only over plain XY mesh routes. That works
  when the routers along the path are mesh-configured and powered. The
  dedicated peripheral-router connection is not built.
* **Packets are single flits**, so virtual cut-through and wormhole behave
  the same.
* **Other fixed choices.**
  * The cmesh concentrator is the north-west router of each 2x2 block, which
    needs even-aligned subNoCs.
  * The tree root (memory controller) is at the subNoC's north-west corner.
  * Express links take one cycle.
* **Not built.**
  * Combined topologies (torus requests with tree replies).
  * Irregular topologies.
  * Cores, caches, memory controllers and the off-line DQN training.

  They sit outside the NoC and connect through the top's ports.
* **Gating and repeaters are modelled as logic.** Power gating is enable
  signals. The quad-state repeaters are gated buffers. No power switches,
  tri-state drivers or layout are modelled.

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
(each has a watchdog). To build and run one with Verilator, put the package
first:

```
verilator --binary --timing --assert -Wno-fatal -j 8 \
    rtl/adapt_pkg.sv $(ls rtl/*.sv | grep -v adapt_pkg) tb/tb_adapt_noc_top.sv \
    --top-module tb_adapt_noc_top -Mdir obj_top
./obj_top/Vtb_adapt_noc_top
```

| testbench | what it checks |
|---|---|
| `tb_vc_buffer`, `tb_rr_arbiter` | FIFO order, full/empty/count; one-hot round-robin fairness |
| `tb_adaptable_link` | segmentation and reversal against a reference walk of the chain |
| `tb_adaptable_router` | random traffic through a single router against a reference model: delivery, credits, VC choice, the 2-cycle router latency and the 1-cycle bypass |
| `tb_concentration_mux` | core selection, hold, VC choice, ejection demux |
| `tb_topology_config` | walks all source/destination pairs through the computed tables and links for every topology; checks reachability and worst-case hop counts (4x4: mesh 6, torus 4, cmesh 2; 8x8: mesh 14, torus 8) |
| `tb_pg_controller` | gating only when idle, immediate wake-up |
| `tb_reconfig_controller` | epoch period, notify/drain/set-up timing, keep |
| `tb_state_monitor` | the twelve normalised attributes against counted values |
| `tb_dqn_controller` | Q-values against a reference computation, the 504-cycle latency, exploration |
| `tb_adapt_noc_top` | four 4x4 subNoCs, epoch 4000, nine epochs. Every flit must arrive once. Every topology is reached, and bypass, express hops, power gating, concentration, hold, keep, exploration and back-pressure must all occur. Checks the idle latency. |
| `tb_adapt_noc_full` | the top at its default parameters (50,000-cycle epochs): eight 2x4 subNoCs, each with weights that favour one topology; one epoch of traffic, a decision by every slot, then traffic on the new topologies; non-exploring slots must end on their preferred topology and every flit must be delivered |
| `tb_subnoc_sizes` | tiles the network with 2x4, 4x4, 4x8 and 8x8 subNoCs and runs each topology in turn under low-load memory-controller traffic; checks delivery and that cmesh, torus and tree beat mesh latency for 4x4 and larger |

Typical averages from `tb_subnoc_sizes` (cycles from injection to ejection,
low load, one 8x8 subNoC): mesh 20.7, cmesh 9.6, torus 13.3, tree 18.1. The
tree mainly shortens reply paths from the memory controller, so its gain on
mixed traffic is the smallest.

The three top-level testbenches take several minutes each to compile. Sizes such as 2x4 are rows x columns. Most of that
time goes into the routing-table logic of `topology_config`, which computes
64 x 64 x 2 entries.
