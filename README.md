# Clos-UDN: a three-stage packet switch with NoC middle stages

A large data-centre switch is usually built as a three-stage Clos network:
input modules, central modules and output modules, each a small crossbar.
Such switches are expensive where it hurts most. The input modules need one
virtual output queue per destination, and those queues must run faster than
the line. A central scheduler also has to match input modules to central
modules in every time slot, over several iterations.

The Clos-UDN switch in this repository avoids both costs. It replaces every
central crossbar with a **unidirectional network-on-chip (UDN)**: a small mesh
of store-and-forward routers. Each router buffers packets and makes its own
round-robin decisions. The mesh therefore absorbs contention for the
central-to-output links, and no global matching is needed. The input modules
can then be very simple:

* each input port has one plain FIFO;
* each FIFO has a round-robin pointer that rotates over the central modules
  once per slot;
* the pointers of one input module start at different values, so two FIFOs
  never choose the same link.

The mesh routers run a little faster than the line (the *speedup*, SP = 2 by
default). That makes up for the lack of a matching algorithm.

Everything here is synthesizable SystemVerilog (IEEE 1800-2017). It has a
package, eight modules and self-checking Verilator testbenches.

## Structure and sizes

```
 IP(i,h) --> IM(i) --LI(i,r)--> CM(r) --LC(r,j)--> OM(j) --> OP(j,h)
             k input modules    m central modules  k output modules
             n FIFOs each       k x M router mesh  n output buffers each
```

| parameter (top) | default | meaning |
|---|---|---|
| `K` | 8 | number of input modules and output modules (k) |
| `N_PORT` | 8 | ports per IM/OM (n). It is also the number of central modules (m = n). |
| `DEPTH_M` | `K` | columns in each central mesh (M). The default is the full depth M = k. |
| `BD` | 4 | depth of every router input buffer |
| `SP` | 2 | router speedup: fabric clocks per time slot |
| `IQ_DEPTH` | 64 | depth of each input FIFO (design choice) |
| `OQ_DEPTH` | 512 | depth of each output buffer, at least m (design choice) |

With these defaults the switch is 64 x 64. It has 8 input modules of 8
FIFOs each, 8 central modules of 8 x 8 = 64 routers each (512 routers in
total), and 8 output modules with 8 output buffers each. The numbers of
modules, the m = n expansion, BD = 4, full mesh depth and SP = 2 describe
the evaluated configuration. The FIFO and output-buffer depths are this
implementation's own choices.

Link LI(i,r) joins input module i to **row i** of central module r. Link
LC(r,j) leaves **row j** of central module r for output module j. A packet
can take any central module: the mesh row it leaves by is its destination
output module.

| module | role |
|---|---|
| `clos_udn_pkg` | packet type, router port numbering |
| `clos_udn_switch` | top level: wires K IMs, N_PORT CMs and K OMs, and generates the slot timing |
| `slot_timer` | divides the fabric clock into time slots of SP clocks |
| `input_module` | IM(i): FIFOs, dispatch schedulers, credit counters for the LI links |
| `rr_dispatch_scheduler` | one FIFO's rotating link pointer |
| `pkt_fifo` | packet FIFO, used for IM queues and router buffers |
| `udn_cm` | CM(r): the K x DEPTH_M router mesh and its edge wiring |
| `noc_router` | mesh router: 3 buffered inputs, routing, per-output arbitration, credits |
| `rr_arbiter` | round-robin arbiter |
| `output_module` | OM(j): per-port output buffers taking up to m writes per slot |

## Time slots and speedup

The whole switch runs on one clock, the **fabric clock**. A time slot is SP
fabric clocks. `slot_timer` marks the first clock of each slot (`slot_tick`,
also a top-level output) and the last clock (`slot_end`).

* Input ports, LI links, LC links and output ports move **at most one
  packet per slot**, and only in the `slot_tick` clock.
* The routers inside the central modules move a packet one hop on **every**
  clock. They therefore run SP times faster than the links around them.

This is the speedup in its narrow sense: only the mesh routers run fast. The
IM FIFOs still do at most one write and one read per slot, twice the line
rate. The output buffers take up to m writes and one read per slot.

## Input modules: dispatch without matching

FIFO h of IM(i) stores only the packets of input port IP(i,h). Its
scheduler holds a link pointer. The pointer resets to h and moves on by one
(mod m) at the end of every slot, whatever happened in the slot. In slot s,
FIFO h may therefore use only link (h + s) mod m. The m pointers of one IM
are always a permutation, so two FIFOs never compete for a link. An
assertion in `input_module` checks this.

In the `slot_tick` clock, a non-empty FIFO sends its head packet on its link
if that link has a **credit**. There is one credit counter per LI link. It
starts at BD, the size of the west buffer of row i, column 0, in CM(r). It
drops by one for each packet sent. It rises by one for each `li_credit`
pulse that the CM returns when that buffer frees an entry. If there is no
credit, the packet waits for the next slot, when the pointer has moved to
another central module. The scheduler never searches for a free link.

## Inside a central module

The hardest part of the design is the central module: a K-row,
DEPTH_M-column mesh of `noc_router`s.

**Links.** Packets only ever move east (to the next column) or vertically.
No router has a west output. Each router has three inputs, each with a
BD-deep FIFO:

* `DIR_E`: from the west neighbour, or from the LI link in column 0;
* `DIR_N`: from the router above, carrying packets that travel down;
* `DIR_S`: from the router below, carrying packets that travel up.

It has three outputs: east, up and down. In the last column, the east
output is the LC link.

**Routing (Modulo XY).** Take a packet for output module j that enters at
row i. It travels east along row i to column `j mod DEPTH_M`. It moves up
or down in that column until it reaches row j. It then continues east along
row j and leaves on LC(r,j).

Each router works out the next hop from the destination field of the packet
and its own coordinates (`ROW`, `COL` parameters), so the header is never
rewritten. With the full depth M = k, every destination row has its own
turning column. With a shallower mesh, several rows share a turning column
through the modulo.

A packet turns vertically in one column only. Upward and downward packets
sit in different buffers. There is therefore no cyclic buffer dependency and
the routing cannot deadlock.

**Arbitration.** Each output has an `rr_arbiter`. It chooses among the
inputs whose head packet wants that output and can be sent now. Every input
asks for only one output, so the three grants never collide. Up to three
packets can leave a router in one clock. The arbiter's priority moves just
past the winner.

**Flow control.** Each router keeps a credit counter per output. The
counter starts at BD and mirrors the free space in the downstream input
buffer. A credit comes back (`in_credit`) in the clock a packet leaves a
buffer, and the upstream counter counts it one clock later. No packet is
ever dropped inside the switch.

**Exit.** The east output of the last column has no credit counter. It may
send a packet for output port h only when `east_ok[h]` is high. The central
module drives `east_ok[h]` as `slot_tick` AND "OM(j) buffer h has space".
Because of this gate, an LC link carries at most one packet per slot. A
packet whose output buffer is full waits in the router. Packets behind it
wait too (head-of-line blocking in the router FIFO), but packets in the
router's other inputs can still go.

**Timing.** A packet written into a buffer can leave at the next clock, so
it advances one hop per fabric clock. In an empty mesh, a packet offered on
LI at clock t leaves on LC in the first `slot_tick` clock at or after

    t + 1 + (DEPTH_M - 1) + |i - j|

## Output modules

OM(j) has one circular buffer per output port. In a slot, up to m packets
(one per central module) may arrive for the same port. They are written in
increasing central-module order. Each buffer sends at most one packet per
slot, in the `slot_tick` clock, to its output line. The output line is
assumed always ready.

`space[h]` is high while buffer h has at least m free entries, enough for
any single slot. It depends only on registered state. The central modules
therefore use it in the same clock without forming a combinational loop.

## Packet format and ordering

`packet_t` (48 bits) holds these fields:

* destination output module `dst_om` (j);
* destination port `dst_port` (h);
* source `src_im` and `src_port`;
* a 16-bit `seq`.

The switch reads only the destination fields. The source fields and `seq`
are payload that the testbenches use for checking. A packet moves as one
word, and each hop stores the whole packet.

Packets of one input-output flow can take different central modules, so
they **can leave out of order**. That is inherent to this dynamic dispatch.
Packets that enter the same central module on the same row for the same
destination follow the same route and stay in order.

## Interface of the top level (`clos_udn_switch`)

| port | dir | description |
|---|---|---|
| `clk`, `rst_n` | in | fabric clock; asynchronous active-low reset (empties every queue, restores all credits) |
| `slot_tick` | out | first clock of each slot |
| `ip_valid[N]`, `ip_pkt[N]` | in | packet offered on IP(i,h), index i*N_PORT+h; taken in a `slot_tick` clock when `ip_ready` is high |
| `ip_ready[N]` | out | FIFO(i,h) is not full |
| `op_valid[N]`, `op_pkt[N]` | out | packet leaving OP(j,h), index j*N_PORT+h; valid in that `slot_tick` clock only |

Latency through the empty default switch is 20 clocks (10 slots) from
IP(0,0) to OP(7,7). That is one slot in the input FIFO, 1 + 7 + 7 router
hops, rounding up to a slot boundary, and one slot in the output buffer.
`tb_clos_udn_full` checks this figure.

## Measured behaviour

`tb_clos_udn_workloads` drives the 64 x 64 switch with SP = 1, 2 and 4 from
unbounded line-card queues. Each run has 150 warm-up slots and a 600-slot
measurement window. Throughput is packets per output per slot. Delay is in
slots from packet generation to departure. One run (seed 1) gave:

| traffic | SP=1 thr / delay | SP=2 thr / delay | SP=4 thr / delay |
|---|---|---|---|
| Bernoulli uniform, load 0.3 | 0.30 / 13.3 | 0.30 / 8.0 | 0.30 / 5.5 |
| Bernoulli uniform, load 0.9 | 0.57 / 142 | 0.90 / 18.2 | 0.90 / 14.9 |
| Bernoulli uniform, load 1.0 | 0.56 / 186 | 0.90 / 53 | 0.92 / 43 |
| bursty (mean burst 10), load 0.8 | 0.56 / 162 | 0.81 / 51 | 0.83 / 50 |
| unbalanced w = 0.5, load 1.0 | 0.82 / 85 | 0.96 / 32 | 0.97 / 28 |
| unbalanced w = 1.0, load 1.0 | 1.00 / 10 | 1.00 / 6 | 1.00 / 4 |

These qualitative trends are expected for this kind of switch, and they
hold:

* speedup lowers the light-load delay;
* with SP >= 2 the switch carries 90 % uniform load and bursty traffic at
  load 0.8;
* throughput rises as traffic becomes more unbalanced.

Two results are lower than a switch of this kind is expected to reach, with
its expected figures in brackets:

* uniform throughput at SP = 1 (about 0.9);
* saturation throughput at SP = 2 (about 1.0).

Neither changes with deeper buffers, so they come from the mesh itself. The
likely cause is head-of-line blocking in the router FIFOs and in the input
FIFOs, whose scheduler may use only one link per slot. The architecture
names Modulo XY routing and round-robin arbitration without fixing their
details, so this implementation uses its own reading of them (above).
Treat these numbers as this RTL's behaviour, not as a reproduction.

Buffer depth matters for bursty traffic. With 16-entry input FIFOs and
32-entry output buffers, bursty load 0.8 was carried at only about 0.5.
Back-pressure from a full output buffer blocks the routers in front of it.
This is why the defaults are deep (64 and 512 entries).

## Design choices to know about

These points are this implementation's own, not part of the switch
architecture as published:

* Speedup is modelled as one fast clock with slot strobes, not as a
  separate clock domain for the central modules.
* The routing rule is the Modulo XY reading above: turn in column
  `j mod M`.
* Each router has one round-robin arbiter per output. The architecture
  speaks of one small RR arbiter per router.
* The input FIFO and output buffer depths, and the back-pressure on the
  input ports (`ip_ready`) and on the LC links (`space`). The architecture
  appears to assume unbounded queues.
* The packet header holds the absolute destination, not a relative offset.
* The network-interface blocks drawn at the edge of a stand-alone UDN
  switch are not modelled. The LI and LC links attach to the edge routers
  directly.
* A static-dispatch variant (fixed IM-to-CM paths for in-order delivery)
  has been proposed for this switch but is not described in enough detail
  to build. It is not included.
* The MSM/CRRD Clos switch used as a performance baseline for this
  architecture is not part of this design.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

```
verilator --binary --timing --assert -Irtl -y rtl rtl/clos_udn_pkg.sv \
          tb/tb_clos_udn_switch.sv --top-module tb_clos_udn_switch -Mdir obj
./obj/Vtb_clos_udn_switch
```

Use the same command for any other testbench by swapping the file and the
top-module name.

| testbench | what it checks |
|---|---|
| `tb_pkt_fifo` | random push/pop against a queue model |
| `tb_rr_arbiter` | grants against a reference RR model; fairness |
| `tb_rr_dispatch_scheduler`, `tb_slot_timer` | pointer sequence (h + slot) mod m; slot strobes for SP = 1, 2, 4 |
| `tb_input_module` | link choice, dispatch, credits, full FIFO and credit stalls, predicted every clock |
| `tb_noc_router` | routing against a reference function, per-input order, credits, LC gating, one-clock hop |
| `tb_udn_cm` | per-pair mesh latency in an empty mesh, delivery, per-flow order, LC gating |
| `tb_output_module` | multi-write ordering, space flag, one departure per port per slot |
| `tb_clos_udn_switch` | 16 x 16 switch end to end: exact latency, uniform and hot-spot traffic, exactly-once delivery to the right port; counts that FIFO-full, credit stall, router contention, vertical hops, output back-pressure and multi-arrival each occurred |
| `tb_clos_udn_full` | default 64 x 64 switch: single-packet latency, then a full all-to-all exchange (4096 packets) |
| `tb_clos_udn_workloads` | the traffic experiments above, with throughput checks for SP >= 2 and a delay-vs-speedup check |

The 64 x 64 testbenches take a few minutes to build, because each router
position is its own parameterisation, but only seconds to run.
