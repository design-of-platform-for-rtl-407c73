# Low-power mesh network-on-chip with express virtual channels

This is a configurable 2-D mesh network-on-chip aimed at low power, together
with the synthetic-traffic harness used to evaluate it. The default instance
is a 4x4 mesh of five-port virtual-channel routers. Three things cut the
energy per flit compared with a textbook five-stage router:

* **Merged allocation.** Virtual-channel allocation and switch allocation
  happen in the same cycle. That gives four pipeline stages per hop instead
  of five.
* **Clock gating.** The storage of every virtual-channel FIFO is clocked only
  in cycles when that FIFO is written.
* **Express virtual channels (EVCs).** Some straight runs of the mesh are
  declared *EVC paths*. A packet that travels the whole of such a path is
  buffered and arbitrated only at the two ends. At every router in between
  it goes straight from input link to output link in one cycle, with no
  buffer write, no allocation and no crossbar.

Around the mesh, every node has a traffic generator and a large source queue
in place of a processing element and network interface. The harness also has
monitors for virtual-channel occupancy and event strobes for every mechanism.
With these you can measure latency, throughput and buffer use for a
configuration before you commit to it.

## Packets and flits

A packet is 4 flits. A flit is 25 bits:

| bits  | field  | meaning |
|-------|--------|---------|
| 24    | valid  | flit present |
| 23:22 | type   | `01` head, `00` body, `10` tail, `11` head+tail |
| 21:20 | vc     | VC the flit occupies at the *receiving* input port |
| 19:0  | data   | payload; route fields in a head flit |

The data field of a head flit is laid out as:

| bits  | field | meaning |
|-------|-------|---------|
| 19:15 | HX    | signed columns still to travel (+ = East = higher column) |
| 14:10 | HY    | signed rows still to travel (+ = South = higher row) |
| 9:7   | PORT  | output port to take at the receiving router |
| 6:0   | -     | payload |

Routing is dimension-ordered (X first, then Y) and computed **one hop
ahead**. When a head flit leaves a router, its HX/HY are moved by the hops
it is about to cover, and PORT is recomputed for the next router
(`route_xy`). The allocator therefore reads the output port straight from the
buffer, so no routing stage is needed. Ports are numbered East 0, North 1,
West 2, South 3, Local 4 (`noc_pkg::port_e`).

The traffic generators fill the other three words with `{source, sequence}`,
a 20-bit generation time stamp and `{destination, sequence}`. The
testbenches use these words to check delivery and measure latency.

## Router pipeline (`lp_router`)

A flit that is not bypassed spends four cycles in each router-plus-link:

```
cycle   t        t+1              t+2                 t+3
        BW       SVA              ST                  LT
        write    VC+switch        crossbar ->         output register
        lane     allocation,      output register,    drives the link
                 pop into the     head rewritten      (link_pipe stage)
                 switch register, (route_xy)
                 credit upstream
```

* **BW.** `vc_buffer` writes the flit into the lane named by its `vc` field.
  Each lane is a small FIFO (`vc_fifo`). Its flip-flops hang off a latch-based
  clock gate (`clock_gate`) that opens only when the lane is written.
  Pointers and counters stay on the free-running clock.
* **SVA.** `sva_allocator` is a separable input-first allocator with
  round-robin arbiters. Stage 1 picks one eligible VC per input. Stage 2
  picks one input per output, and at stage 2 EVC requests beat normal ones.
  A VC is eligible when:
  * its input's switch register is free;
  * the output can take a flit;
  * for a head flit, a downstream VC is free; for a body or tail flit, its
    downstream VC has a credit.

  The winner is popped into the input's switch register, and its credit goes
  upstream in the same cycle.
* **ST.** The matrix crossbar (`crossbar`) moves the switch registers into
  the output registers. On the way, head flits get their route fields
  rewritten.
* **LT.** The output register drives the link. `link_pipe` adds
  `LINK_STAGES` register stages for flits forward and credits backward.

So a packet's head arrives at the destination's ejection port `4*h + 3`
cycles after it enters the first router, where `h` is the number of hops.
The testbenches check this exactly: 7 cycles for one hop, 19 for four.

**Flow control** is credit based per VC. Each router holds a credit counter
for every downstream VC, plus a busy bit that is set by a head and cleared by
a tail. `VC_SELECT` sets how a head flit picks a free downstream VC:

* `VCSEL_LAST_IDLE`: the highest-numbered VC that is idle *and* has all its
  credits back.
* `VCSEL_MAX_CREDIT`: the idle VC with the most credits.

A VC that a tail flit releases can be allocated again from the next cycle.

## Express virtual channels

### Roles

An EVC path is a straight run from a *source* router to a *sink* router.
The routers strictly between the two ends are *bypass* routers. The static
path list (`EVC_PATHS`, `NUM_EVC_PATHS`) is turned into per-port
configuration structures at elaboration time (`noc_pkg::calc_in_cfg`,
`calc_out_cfg`).

* **Sink input port.** `NEVC` of its `NVC` lanes become express lanes,
  numbered after the normal ones. With the defaults, lanes 0-1 are normal
  and 2-3 are express.
* **Bypass input port.** A flit that arrives with `evc_flag_in` set is not
  buffered.
  * `AGGRESSIVE=1`: the flit goes combinationally to the opposite output, so
    one cycle per bypass router, spent in the next link stage.
  * `AGGRESSIVE=0`: the flit goes into that output's register, so two
    cycles per bypass router.

  A normal flit that was granted the same output waits in its switch
  register until the EVC flit has passed. This shows as `ev_st_stall`.
* **Source output port.** A head flit whose X-Y route covers the *whole* path
  starting at this output becomes an EVC packet:
  * it is given an express lane at the sink, taken from a pool of credits
    the source keeps for those lanes;
  * its HX/HY rewrite covers the full path length;
  * it wins switch allocation over normal flits.

  Packets that would leave the path part-way use normal VCs.

Express-lane credits come back from the sink through the bypass routers,
which pass them upstream unchanged in the `evc` half of the credit bundle.
On a path with two bypass routers, an EVC flit therefore needs
4 + 1 + 1 + 4 = 10 cycles from entering the source router to leaving the
sink router, against 16 the normal way. On the default two-hop paths it
needs 4 + 1 + 3 = 8 cycles to the sink's ejection port, against 11.

### Default path map

The default map, `noc_pkg::default_evc_paths()`, is a uniform insertion for
the 4x4 mesh. It has 16 paths, each two hops long with one bypass router:

```
 rows:    (r,0) -> (r,2)   and   (r,2) -> (r,0)     for r = 0..3
 columns: (0,c) -> (2,c)   and   (2,c) -> (0,c)     for c = 0..3

     c=0     c=1     c=2     c=3
 r=0  S ====> B ====> K
      K <==== B <==== S          (same in every row, and in every column)
      S = source, B = bypass, K = sink
```

### Starvation limit (`evc_throttle`)

Because EVC flits have priority, a steady EVC stream could lock normal
traffic out of a source output. Every EVC source output therefore has an
ON:OFF counter. After `EVC_ON` consecutive cycles of EVC grants, EVC
requests are masked for `EVC_OFF` cycles. A cycle without an EVC grant
restarts the count. The defaults are 3:1, and a limit of 0 disables the
counter. `ev_throttle` shows the masked cycles.

## The evaluation harness (`lp_noc_top`)

Each node of the top level has four parts:

* **`traffic_gen`.** Every cycle it draws a 32-bit xorshift number and fires
  a packet when the low half is below a threshold, so it is a Bernoulli
  process with probability `rate/65536` packets per cycle. It has three
  patterns:
  * *uniform*: any other node;
  * *transpose*: node (r,c) sends to (c,r), and diagonal nodes stay silent;
  * *group*: up to 15 destination groups, each with a cumulative threshold
    and a destination mask, picking uniformly within the chosen group.

  The group pattern covers *locality* traffic: group d holds the nodes d
  hops away and has weight `N(d)*(1+alpha/(d+1))`. It also covers fully
  custom flows. The group tables are computed outside the RTL; the top-level
  testbench shows how.
* **`source_fifo`.** Holds 2048 packets. It serialises packets into flits,
  chooses a local input VC that has all its credits back, and keeps per-VC
  credits for the router's Local port. A packet pushed while the queue is
  full is dropped and sets the sticky `sq_overflow`.
* **`vc_monitor`** (one per router input port). While `measure` is high it
  keeps a histogram of how many VCs hold flits, plus the peak occupancy of
  each VC.
* **Outputs.** Ejected flits, queue counts, the free-running `time_now`
  counter and the event strobes of all routers are brought out. The event
  strobes are `ev_bypass`, `ev_evc_gnt`, `ev_throttle`, `ev_st_stall` and
  `ev_sa_conflict`.

Ejection always accepts, and its credits return in the same cycle.

## Module map

```
lp_noc_top
 +- traffic_gen  x16
 +- source_fifo  x16
 +- vc_monitor   x80
 +- lp_mesh
     +- lp_router x16
     |   +- vc_buffer x5  -- clock_gate, vc_fifo  (x4 lanes)
     |   +- sva_allocator -- rr_arbiter
     |   +- evc_throttle x5
     |   +- crossbar
     |   +- route_xy x5
     +- link_pipe x48
noc_pkg: types, constants, X-Y helper, EVC path list -> port configuration
```

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `ROWS`, `COLS` | 4, 4 | top, mesh | mesh size (HX/HY fields allow up to 10x10) |
| `DEPTH` | 4 | top, mesh, router | flits per VC |
| `NVC` | 4 | top, mesh | VCs per input port (at most `MAX_VC`) |
| `NEVC` | 2 | top, mesh | express lanes at a sink port |
| `EVC_PATHS`, `NUM_EVC_PATHS` | 4x4 uniform map, 16 | top, mesh | EVC path list; 0 paths gives a plain VC mesh |
| `AGGRESSIVE` | 1 | top, mesh, router | 1-cycle (1) or 2-cycle (0) bypass |
| `VC_SELECT` | `VCSEL_LAST_IDLE` | top, mesh, router | downstream VC choice |
| `EVC_ON`, `EVC_OFF` | 3, 1 | top, mesh, router | starvation limit |
| `CLOCK_GATING` | 1 | top, mesh, router | gate VC storage clocks |
| `LINK_STAGES` | 1 | top, mesh | register stages per link |
| `SQ_DEPTH` | 2048 | top | source queue, packets |
| `FLIT_DATA_W`, `PKT_LEN`, `MAX_VC` | 20, 4, 4 | `noc_pkg` | flit data width, packet length, VC field size |

## Simulating

Every testbench is self-checking. Each one prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. For example:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/noc_pkg.sv \
          tb/tb_lp_noc_top.sv --top-module tb_lp_noc_top -Mdir obj_top
./obj_top/Vtb_lp_noc_top
```

The same command works for any `tb/tb_<module>.sv`. Expect many width
warnings from `-Wall`; add `-Wno-fatal` if you enable it.

| testbench | what it shows |
|-----------|---------------|
| `tb_lp_noc_top` | The full default design runs three workloads, uniform, transpose and locality (alpha = 1), each 3000 cycles at 0.075 packet/cycle/node. It then overloads one node until its queue overflows. Every packet is checked at its destination; every accepted packet must arrive; every mechanism (bypass, EVC grant, throttle, stall, allocation conflict, overflow) must occur. It runs in about 1.5 minutes including compilation. |
| `tb_lp_mesh` | Exact head latencies for normal and EVC routes, the ON:OFF limit under a saturating EVC stream, and delivery of random all-to-all traffic. |
| `tb_lp_router` | A single router with node (0,1)'s roles: 3-cycle router delay, last-idle VC choice, same-cycle bypass, express credit forwarding, EVC sourcing on lane 3, 2-cycle non-aggressive bypass, and mixed load with all events. |
| `tb_sva_allocator` | Allocation rules on random inputs, round robin, EVC priority and throttled EVC. |
| others | One per block, each against a reference model. |

Measured head-to-ejection latency, including time in the source queue, at
0.075 packet/cycle/node with the defaults: about 22 cycles for uniform and
locality traffic and 36 for transpose.

## Departures and open points

* **Direction names.** East is the +column direction here. Drawings of the
  original platform put the next router to the right behind the West output.
  Only the names differ; the paths and behaviour are the same.
* **Own choices.** The following are this design's own choices:
  * the 5 control bits of the flit and the head-flit field positions;
  * look-ahead routing;
  * the allocator structure;
  * the per-lane credit scheme for express lanes;
  * holding normal flits in the switch register during a bypass;
  * the exact ON:OFF counting rule;
  * the packet payload format;
  * the Bernoulli injection process.
* **VC counts.** One `NVC` applies to every port. Buffer optimisation that
  gives each port its own VC count would need a per-port table in place of
  the single parameter. The configuration structures already carry a VC
  count per port.
* **Express lane depth.** Express lanes have the same depth as normal VCs
  (`DEPTH`). The original configuration sets both to 4 but allows them to
  differ. A separate depth would need per-lane FIFO sizes in `vc_buffer`.
* **Crossbar option.** A MUX-based crossbar option would behave the same as
  the matrix crossbar and is not provided.
* **Not included.** There is no low-latency (look-ahead bypass) router
  variant. Power estimation is not part of the RTL.
* **Ejection.** Ejection is ideal. A real network interface would return
  credits only as it consumes flits.
* **Clock gate.** `clock_gate` contains a level-sensitive latch on purpose.
  It is the usual glitch-free gating cell. Replace it with your library's
  integrated clock-gating cell for implementation.
