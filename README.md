# DPR: a pipelined routing controller for three-stage Clos switches

A symmetric three-stage Clos network C(n, m, n) has N = n² inputs. They sit in
n input modules of n ports each. Every input module has one link to each of
m middle modules, and every middle module has one link to each of n output
modules. A connection from input group i to output group j must pick a middle
module that is free on both of those links. If m ≥ 2n−1, any new connection
can always be routed without moving existing ones (strictly nonblocking).

The hard part of such a switch is **choosing the middle modules** for a whole
batch of requests fast enough. This RTL implements a distributed pipeline
routing (DPR) controller for that job. It uses O(N) very simple processing
elements joined by rings. Each one only shifts bits and ANDs two bits.
A batch of up to N connect/disconnect requests is handled in 2m + 2n − 2
steps, which is O(√N). The controller is wired to a three-stage Clos fabric.
The chosen middle module becomes the self-routing header of each
connection's data.

## Routing as edge colouring

The requests form a bipartite multigraph. Input group i and output group j are
vertices, and every connection i → j is an edge. A middle module is a
*colour*. The routing is valid when no two edges at the same vertex share a
colour.

The colouring rule that makes this parallel is a rotation. Call the set of
new edges from group i to group j the bundle E(i,j). In step k = 0 … m−1,
bundle E(i,j) may only try colour

    (i + j + k) mod m

Within one step, two bundles of the same input group (same i, different j)
try different colours. So do two bundles of the same output group. All n²
bundles can therefore try their colours at once without any arbitration. A
bundle takes the colour when it is free at both ends. Over m steps every
bundle sees every colour once.

Each input group i keeps an m-bit availability ring **ICSR_i**. Each output
group j keeps an m-bit ring **OCSR_j**. A bit is 1 when that colour is free.
The rings are rotated one place per step. Bit position p of ring g always
holds colour (g + p + k) mod m, so the bit a processing element needs is
always in the same physical cell. Cell j of ICSR_i and cell i of OCSR_j hold
the same colour in every step. The bundle's owner therefore only reads those
two cells, ANDs them, and on success clears both.

## Architecture

```
 input ring IR_i                          output ring OR_j
 IP(i,0) <- IP(i,1) <- ... <- IP(i,n-1)   OP(j,0) ... OP(j,n-1)
   |  ^                          |  ^       ^
   |  +---- ring wrap -----------+  |       |  one-bit link IP(i,j) <-> OP(j,i)
   +---------------------------------------+
 ICSR_i: cells 0..n-1 in IP(i,0..n-1),     OCSR_j: cells 0..n-1 in OP(j,0..n-1),
         cells n..m-1 in IP(i,n-1)                 cells n..m-1 in OP(j,n-1)
```

* **Input processing element IP(i,j)** (`input_pe`). It stands for input
  I(i,j) when it forms request tokens. It also acts as the *agent* for bundle
  E(i,j), meaning every connection from group i to group j. It owns cell j of
  ICSR_i and a modulo-m colour counter that starts at (i+j) mod m.
* **Output ring OR_j** (`output_ring`). It holds OCSR_j, whose cell i is
  reached over the link from IP(i,j). It also holds the OPs' counters. These
  always equal the matching IP counters; an assertion checks this.
* **Tokens** (`dpr_pkg::token_t`). A token carries the origin input p, the
  target group j and a colour. A CAR token asks for a connection. A CDR token
  releases one, and already carries its colour. Each ring link has one CAR
  lane and one CDR lane.
* **Sequencer** (`dpr_ctrl`). One state machine broadcasts the phase and
  step to every element.

## One routing cycle

| phase | clocks | what happens |
|---|---|---|
| PREP | 1 | Inputs' requests are latched and turned into tokens. In packet mode every colour is freed. |
| 1 distribute | n−1 | Tokens move around the input ring to their agent IP(i,j). |
| 2.1 erase | m | Circuit mode only. In step k the agent frees colour (i+j+k) mod m if it holds a CDR token of that colour. |
| 2.2 assign | m | In step k the agent gives colour (i+j+k) mod m to its lowest-origin uncoloured CAR token if c′ AND c″ = 1. |
| 3 return | n−1 | Tokens move on around the ring back to their origin inputs. |
| RESULT | 1 | Coloured tokens are handed to the input ports, which update their connections. |

`req_taken` marks PREP and `cycle_done` marks RESULT. From one to the other
takes 2n + 2m − 1 clocks in circuit mode and 2n + m − 1 in packet mode, so
the whole cycle is 28 clocks at C(5,9,5). With `run` held high the next
PREP follows RESULT directly.

Phases 1 and 3 are pipelined with no conflicts:

* **Phase 1.** In step k every element passes on the token that is still in
  transit. Otherwise it passes on its own token, if that token is not yet at
  its agent.
* **Phase 3.** In step k an element sends the stored token whose origin is
  n−k hops away. Any token it is already forwarding goes first, and the two
  can never coincide.

Each element keeps one slot per origin input. Its storage is therefore fixed
at n CAR and n CDR tokens.

## Tear-down, replacement and packet mode

* **Tear-down.** An input that drops a connection sends a CDR token with its
  old colour. The agent frees the colour in the erase subphase, so the
  colour can be reused in the same cycle.
* **Replacement.** Asking for a new output while connected sends a CDR token
  and a CAR token in the same cycle.
* **Packet mode.** When `packet_mode` is set, every routing cycle is one
  cell slot. All colours and connections are cleared at PREP, the erase
  subphase is skipped, and a new partial permutation is routed. Mode changes
  take effect only between cycles.

## How many middle modules

Strictly nonblocking operation needs m ≥ 2n − 1, and that is the default:
C(5, 9, 5). For that size a single pass of the rotation always colours every
edge. An edge of bundle E(i,j) can lose a colour only to an edge sharing
group i or group j. With t edges in the bundle, at most 2(n − t) colours are
blocked, which leaves at least 2t − 1 ≥ t free.

For a rearrangeable network (m = n), a single rotation pass is **not**
always enough. A software model of the same algorithm left edges uncoloured
in about 44 %, 85 % and 98 % of random full permutations for n = 3, 4 and 5.
The RTL never drops such a request silently. An uncoloured token is still
returned to its input, which pulses `route_fail` and stays unconnected. The
source of the request must then ask again. Use m ≥ 2n − 1 unless you accept
retries. `tb_dpr_switch_rearr` builds the switch as C(5,5,5) and routes
random full permutations as cell slots. About 15 % of the requests come back
uncoloured, and every one is reported.

## Top level: `dpr_switch`

Parameters:
* `N` = 5 (n), `M` = 9 (m) and `DW` = 8 (data width).
* `L` = 1. Setting it to 2 selects doubled shift registers, see below.
* `OVL` = 0. Setting it to 1 selects the overlapped-phase cell switch, see
  below. Arrays are
indexed `[i][p]`: group, then port in the group.

Inputs:
* `usr_add[i][p]` with `usr_grp`/`usr_port` asks for output O(j,q).
* `usr_del[i][p]` tears the input's connection down.
* `run` starts routing cycles. `packet_mode` selects cell-slot operation.

Outputs:
* `din[i][p]` appears at `dout[j][q]` through the fabric, with
  `dout_valid[j][q]` set. The data path is combinational.
* `conn_valid`, `conn_color` and `pending` show each input's state.
* `route_fail` pulses for a request that came back uncoloured.
* `fabric_conflict` reports a collision in a fabric crossbar. This cannot
  happen when the colouring is proper.
* `ev_assign`, `ev_erase` and `ev_wait` are per-element event strobes.

Requests are held in the input port until the next PREP. The requests in
flight must form a partial permutation: no output may be asked for twice or
while in use. Output contention has to be resolved by a scheduler in front
of the switch, which is not part of this RTL.

After reset every colour is free and no connection exists. Reset is
synchronous and active low.

## Modules

| module | role |
|---|---|
| `dpr_pkg` | widths (8-bit indices, so n ≤ 256; 9-bit colours, so m ≤ 512), token and request structs, phase enum |
| `dpr_switch` | top: router, N² input ports, Clos fabric |
| `dpr_router` | sequencer, n input rings, n output rings, IP–OP links |
| `dpr_ctrl` | phase/step sequencer |
| `input_ring` | n input elements in a ring plus ICSR_i |
| `input_pe` | token forming, forwarding, erase/assign, return |
| `output_ring` | OCSR_j and the OP colour counters |
| `input_ring_dsr`, `output_ring_dsr` | the same rings with doubled shift registers (L = 2) |
| `dpr_router_ovl` | router with one ring per phase, overlapping three cell slots (OVL = 1) |
| `csr_ring` | m-cell circular availability register with per-element write ports |
| `circ_counter` | modulo-m counter |
| `input_port` | per-input connection state and request tokens |
| `clos_fabric` | three stages of crossbars, self-routed by (colour, group, port) |
| `crossbar` | one crossbar module with collision detection |

Synthesis of the default C(5,9,5) switch gives about 12 k generic cells and
10.4 k flip-flop bits. Most of these are token storage in the 25 input
elements.

## Choices made in this RTL

Some points are design decisions made here:

* **Agent routing in phase 1.** A token stops at the element whose position
  equals the token's target group.
* **Phase 3 timing.** Tokens leave according to their remaining distance, so
  every token is home after n − 1 steps.
* **Colouring order.** An agent holding several uncoloured tokens tries the
  lowest origin first.
* **Extra clocks.** PREP and RESULT are one clock each on top of the
  2m + 2n − 2 algorithm steps.
* **Counters and link.** The output-side counters are kept, although they
  always equal the input-side ones. The IP–OP link is modelled as a read
  wire plus a write strobe.
* **Preset port.** `dpr_router` has a port that preloads the availability
  rings, used to start from given existing connections. The top ties it
  off.
* **Fabric.** The fabric stages and crossbars are plain combinational
  multiplexers.
* **Colour 2n − 1 with doubled registers.** This colour is never offered.
  Its register cell is ignored rather than held at 0, which has the same
  effect.
* **Two tokens per step.** With doubled registers, tokens are taken in
  origin order and each takes the first free colour.
* **Overlapped rows.** Whole token pools move from row to row at the end
  of each period, instead of single tokens as soon as they reach their
  agent.

## Simulating

Every block has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=… failures=…` line. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  +libext+.sv rtl/dpr_pkg.sv tb/tb_dpr_switch.sv --top-module tb_dpr_switch
./obj_dir/Vtb_dpr_switch
```

* **`tb_dpr_switch`** runs the full default switch end to end. It covers
  110 circuit-mode cycles of random set-up, tear-down and replacement, 20
  packet slots, mode switches and back-to-back cycles. It checks that every
  colouring is proper, that data reaches its output, the cycle length, and
  that every mechanism occurs at least once.
* **Other configurations.** `tb_dpr_switch_dsr`, `tb_dpr_switch_ovl` and
  `tb_dpr_switch_rearr` run the doubled-register, overlapped and C(5,5,5)
  configurations end to end.
* **`tb_dpr_router`** replays a worked example: group 1 routes five new
  connections while only colours {1, 3, 4, 7, 8} are free at the outputs.
  It then compares random batches against an independent model of the
  rotation algorithm, cycle by cycle.

## Doubled shift registers (L = 2)

With m = 2n − 1 the two colour subphases take most of the cycle. Setting
the parameter `L = 2` on `dpr_switch` or `dpr_router` halves them:

* **Two rings per group.** Each ring keeps two n-cell registers instead of
  one m-cell register. One holds colours 0 … n−1 and the other n … 2n−1.
  These are `input_ring_dsr` and `output_ring_dsr`.
* **Two colours per step.** Each element is offered colour
  (i + j + k) mod n and that colour plus n in every step.
* **Colour 2n−1.** This colour does not exist and is never offered.
* **Two tokens per step.** Each element can erase two colours and assign
  two colours in one step. Uncoloured tokens are taken in origin order, and
  each takes the first free offered colour.
* **Shorter cycle.** Both subphases last n steps, so a cycle is 4n − 2
  steps. PREP to RESULT is 4n − 1 clocks, 19 at C(5,9,5), against 27 for the
  basic rings.
* **Packing.** `icsr`/`ocsr` are then 2n bits wide: {upper register, lower
  register}.
* **Tests.** `tb_input_ring_dsr` and `tb_output_ring_dsr` test the rings.
  `tb_dpr_switch_dsr` runs the same end-to-end test as `tb_dpr_switch` on
  the doubled switch.

The same counting argument as above shows that one pass still colours every
edge. The tests check that steps with two assignments and with two erasures
both occur.

## Overlapped phases for cell switching (OVL = 1)

In a cell switch every slot routes a fresh permutation, so consecutive
routing cycles share no colour state. Only the colouring phase needs the
availability rings. `dpr_router_ovl` therefore gives each input group three
rows of elements, one row per phase:

* **Row 1** forms and distributes tokens.
* **Row 2** colours them. It holds the availability rings and the links to
  the output rings.
* **Row 3** returns the tokens.

At the end of every period each element hands its token pool to the element
in the same position in the next row (`pool_load`/`pool_in`/`pool_out` on
`input_pe`). Three slots are therefore in flight at once:

* **Period.** P = max(m, n + 1) clocks, which is the colouring phase or the
  token-forming clock plus n − 1 distribution steps, whichever is longer.
* **Throughput.** A new slot starts every P clocks: 9 at C(5,9,5), against
  19 clocks per cycle for the basic router in packet mode.
* **Freeing colours.** At the end of each colouring period every cell is
  set back to 1.
* **Latency.** Results appear 2P + n clocks after the requests were taken.

With `OVL = 1` the top holds each input's request until the next slot. It
keeps the requested output port for the two periods the token needs, and
holds each connection for one period. `tb_dpr_router_ovl` and
`tb_dpr_switch_ovl` test this form.

## Not implemented

The following are not built:

* the overlapped form for strictly nonblocking networks with tear-down. It
  would use four rows (distribute, erase, assign, return) and doubled
  registers. It is unclear how requests of consecutive groups would see a
  consistent colour state;
* a phase-free variant that processes tokens as soon as they arrive;
* the contention-resolving scheduler.
