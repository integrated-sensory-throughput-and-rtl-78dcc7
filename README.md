# Flexible-priority arbitration for a mesh network-on-chip

In a network-on-chip router, every output link and every downstream virtual
channel (VC) is shared, so arbiters decide each cycle who may use them. A
plain round-robin arbiter rotates its priority after every grant, whatever the
traffic. This design instead adapts the priority scheme to the traffic. Each
router estimates its load from the requests waiting at its inputs and from a
load flag sent by its neighbours:

- **Light load:** all the router's arbiters use fixed priority, which is the
  simplest and fastest scheme.
- **Heavy load:** they switch to rotating priority, which shares the switch
  fairly and prevents starvation.

The arbiters sit in a conventional 5-port virtual-channel router. Nine such
routers form a 3 × 3 mesh with one core per node. The RTL is IEEE 1800-2017
SystemVerilog and synthesizable, apart from the testbenches.

The architecture follows the flexible-priority arbiter and router of
T. V. Sridhar and G. C. Krishnaiah, "Integrated Sensory Throughput and
Traffic-Aware Arbiter for High Productive Multicore Architectures",
*Journal of Sensors*, 2022. That article has since been retracted by its
publisher. It gives the arbiter's cell equations, the matrix-arbiter idea, the
allocator structure and the network size. It does not give:

- the routing algorithm;
- the flow control;
- the flit format;
- the load metric;
- the pipeline.

Those parts are this implementation's own choices; they are listed under
"Choices not fixed by the source" below.

## The flexible-priority arbiter

### Ring of priority cells (`prio_cell`, `fp_arbiter`)

The N:1 arbiter is a ring of identical cells. Cell *n* has a request `RQ`, a
priority input `PR` (the token) and a carry `Kin` from the cell before it:

```
GT_n   = RQ_n & (PR_n | Kin_n)          grant
Kout_n = ~RQ_n & (PR_n | Kin_n)         carry to the next cell
PR*_n  = GT_(n-1) | (PR_n & Kin_n)      token for the next arbitration
```

The carry runs from the token's cell around the ring until it meets a
requester, and that requester is granted. The token then moves to the cell
after the winner. If nobody requested, the carry comes all the way round to
the token's cell and the token stays.

The ring is written without a combinational loop. It is unrolled into two
passes:

1. The first pass starts at cell 0 with no carry and uses the token.
2. The second pass takes the first pass's carry-out and has no token.

A cell's grant is the OR of its two passes. The carry that reaches the token
cell in the second pass is the `Kin` of the token update.

The *flexible priority resolver* decides what the cells see as `PR`:

- **Fixed mode (`rotate = 0`):** the token is pinned to cell 0, so the
  lowest index always wins.
- **Rotating mode:** the stored token is used. It advances on every accepted
  grant (`upd = 1`).

The stored token is frozen while the arbiter is in fixed mode. When the mode
returns to rotating, rotation resumes where it stopped.

### Matrix arbiter (`fp_matrix_arbiter`)

Several input ports can compete for one output port. Those contests are
decided by a K:1 matrix arbiter. Bit `w[i][j]` (for `i < j`) says that
requester *i* goes before requester *j*. Only the upper triangle is stored,
K(K−1)/2 flip-flops, because the lower triangle is its complement. A requester
wins when no requester that goes before it is also requesting.

After a grant in rotating mode, the winner's row is cleared and its column is
set. The winner therefore goes to the back: this is least-recently-served
order. In fixed mode the arbiter uses the reset order (lowest index first) and
leaves the stored matrix untouched.

### Choosing the mode (`traffic_estimator`)

Each cycle the router computes a load count:

- the number of its input ports that hold a VC-allocation or switch request,
- plus the number of neighbours whose load flag is set.

If the count is at least `LOAD_THRESH` (default 3), the next cycle runs in
rotating mode; otherwise it runs in fixed mode. The decision is registered, so
the priorities are settled one cycle before the grants that use them. The
same bit goes out to the four neighbours as this router's load flag.

All arbiters of a router share the mode:

- the V:1 and (P·V):1 ring arbiters of the VC allocator;
- the V:1 ring arbiters of the switch allocator;
- the P:1 matrix arbiters of the switch allocator.

## The router (`router`)

Ports are numbered north = 0, south = 1, east = 2, west = 3, local = 4. A
flit passes through these stages, one clock cycle each:

| stage | module | what happens |
|---|---|---|
| buffer write | `input_port` / `flit_fifo` | the flit enters the FIFO of its VC |
| RC | `route_compute` | when a head flit reaches the front of an idle VC, XY routing picks the output port |
| VA | `vc_allocator` | the VC asks for a free VC of that output port; the output port marks it busy |
| SA + ST | `switch_allocator`, `crossbar` | an active VC with a flit and a downstream credit competes for the switch; the winner goes through the crossbar |
| LT | `output_port` | the flit is registered onto the output link |

A head flit therefore appears on the output link 4 cycles after it appeared on
the input link, if nothing blocks it. The following flits of the packet use the
stored route and output VC and can follow one per cycle. The tail flit returns
the input VC to idle, and when it leaves it frees the output VC.

**VC allocator.** This is separable and input-first:

1. Each waiting input VC has a V:1 arbiter over the free VCs of its output
   port.
2. Each output VC has a (P·V):1 arbiter over the input VCs that chose it.

A stage-1 arbiter advances only when its input VC also wins stage 2.

**Switch allocator:**

1. Each input port has a V:1 ring arbiter over its ready VCs. A V:1
   multiplexer then forwards the output port that the winning VC wants.
2. Each output port has a P:1 matrix arbiter over the input ports whose winner
   wants it.

Each input and each output is granted at most once per cycle.

**Flow control** is credit based. An `output_port` keeps, for each downstream
VC, a busy bit and a credit counter that starts at the buffer depth. A flit
may compete for the switch only if its output VC has a credit. Every flit
leaving an input buffer sends a credit back one cycle later.

## The network (`noc_mesh`) and its interfaces

`noc_mesh` is a `MESH_X × MESH_Y` (default 3 × 3) mesh. Node
`n = y·MESH_X + x` is in column `x` and row `y`, and row 0 is the northern
edge. Neighbours are joined by a link (`link_t`: valid, 3-bit VC, 32-bit flit)
and a credit return (`credit_t`) in each direction, plus the one-bit load flag.
Link inputs on the mesh boundary are tied off, because XY routing never uses
them.

**Flits** are 32 bits: a 2-bit type (body, head, tail, or head-and-tail) and a
30-bit field. A head flit carries the destination (x, y), the source (x, y)
and the packet length in words (`head_t` in `noc_pkg`). Body and tail flits
carry one 30-bit data word each.

**Network interface (`network_interface`), transmit side.** The core offers a
packet as a stream of words, `tx_valid` / `tx_ready`. It holds `tx_dst_x`,
`tx_dst_y` and `tx_len` (at least 1) steady for the whole packet. The NI
takes the lowest free VC with a credit, sends the head flit, then sends one
body flit per word with the last one typed tail.

**Network interface, receive side.** The NI accepts every ejected flit at
once and returns its credit. It hands each data word to the core one cycle
later as `rx_valid`, `rx_data`, `rx_src_x/y` and `rx_last`. The core cannot
stall the receive side.

Packets from different VCs can interleave at a receiver. A core that needs
whole packets must sort the words by source or by its own tag in the data.

`stat` reports, per router and cycle: the priority mode, whether some input
port lost switch allocation, whether some VC waited in VC allocation, and
whether some flit waited for a credit.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `MESH_X`, `MESH_Y` | 3, 3 | `noc_mesh` | mesh size (coordinates are 2 bits: up to 4 × 4) |
| `NUM_VC` | 4 | `noc_mesh`, `router`, `network_interface` | VCs per port, 1 to 8 (the source evaluates 2, 4 and 8) |
| `BUF_DEPTH` | 4 | same | flits per VC buffer (the source: four 32-bit buffers per input port) |
| `LOAD_THRESH` | 3 | `noc_mesh`, `router` | load count at which the arbiters switch to rotating priority |

Setting `LOAD_THRESH = 0` keeps every arbiter in rotating priority, which
turns the router into a plain round-robin router. A very large value keeps
every arbiter in fixed priority.

## Simulating

Every testbench in `tb/` is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and stops by itself; a watchdog ends runs that
hang. The modules find each other by file name:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/noc_pkg.sv tb/tb_noc_mesh_full.sv \
          --top-module tb_noc_mesh_full -Mdir obj_full
obj_full/Vtb_noc_mesh_full
```

Building the full mesh takes a few minutes of C++ compilation, mostly in the
VC allocators. Adding `-j 4` helps.

| testbench | what it checks |
|---|---|
| `tb_fp_arbiter` | grants against a round-robin pointer model in both modes, 4 and 7 requesters |
| `tb_fp_matrix_arbiter` | grants against a least-recently-served list model in both modes |
| `tb_traffic_estimator` | load count and registered mode decision |
| `tb_flit_fifo`, `tb_crossbar`, `tb_route_compute`, `tb_output_port` | each against a direct model |
| `tb_input_port` | routes, the VC state sequence, flit order per VC, credit return, head latency |
| `tb_vc_allocator`, `tb_switch_allocator` | every grant against a cycle-exact model of both stages in both modes |
| `tb_router` | one router under random traffic: 4-cycle latency, XY port choice, per-VC packet order, no buffer overrun, all packets delivered, mode changes and every kind of stall seen |
| `tb_network_interface` | packet assembly, credit stalls, reassembly with source |
| `tb_noc_mesh` | whole mesh with 2 VCs (shorter build): end-to-end delivery, zero-load latency, uniform-random and transpose traffic, injection-rate sweep |
| `tb_noc_mesh_full` | the same at the default parameters |

The end-to-end benches check the zero-load latency from the first `tx_valid`
to the first `rx_valid`: 4 cycles per router plus 3 cycles for the interface
and link registers. Between (0,0) and (2,2) that is 23 cycles. The benches
also count rotating cycles, mode changes, allocation conflicts, credit stalls
and core waits, and fail if any of these never occurs.

The injection-rate sweep uses 4-word packets (5 flits) at 0.02 to 0.14 flits
per node and cycle, with uniform-random destinations and with a transpose
pattern ((x,y) → (y,x); diagonal nodes stay silent). It prints the delivered
throughput. The two benches measured:

| FIR (flits/node/cycle) | uniform, 2 VCs | transpose, 2 VCs | uniform, 4 VCs | transpose, 4 VCs |
|---|---|---|---|---|
| 0.02 | 0.0198 | 0.0136 | 0.0200 | 0.0139 |
| 0.06 | 0.0585 | 0.0339 | 0.0583 | 0.0339 |
| 0.10 | 0.0854 | 0.0525 | 0.0853 | 0.0536 |
| 0.14 | 0.1112 | 0.0792 | 0.1117 | 0.0792 |

Throughput is averaged over all nine nodes, including the three silent ones
of the transpose pattern, and measured over the injection window. These
numbers come from this implementation's pipeline, flow control and traffic
generator. They are not a reproduction of the article's results. The article
reports about 0.016 to 0.024 flits per cycle at an injection rate of 0.14, so
it must measure throughput differently (its definition is not given), on a
router whose details it does not publish.

During the full-size run at 4 VCs the routers spent 26155 router-cycles in
rotating mode and changed mode 2346 times. The run also recorded 5018
switch-allocation conflicts, 153 VC-allocation conflicts, 11969 credit stalls
and 11419 cycles in which a core had to wait to inject.

## Choices not fixed by the source

The following are assumptions, not part of the source description:

- **Routing:** XY dimension-order routing. It is deadlock-free on a mesh.
- **Flow control:** credits, one per buffer word.
- **Buffers:** one 4-flit FIFO per VC (the source says "four buffers of 32-bit
  length" per input port).
- **Flit and packet format:** as described above. The VC number travels beside
  the flit.
- **Load metric:** the additive count of input requests and neighbour flags,
  with threshold 3. The source says only that the resolver looks at the input
  requests and at the load of the previous router, and that fixed priority
  suits light traffic and rotating priority heavy traffic.
- **Fixed order:** lowest index first, in both arbiter types.
- **Arbiter placement:** the ring arbiter is used in the VC allocator and in
  the first stage of the switch allocator; the matrix arbiter in the second
  stage of the switch allocator. The source describes both arbiters but does
  not say where each goes.
- **Pipeline:** one cycle for each of buffer write, RC, VA, SA+ST and LT.
- **Reset:** synchronous and active low everywhere.
- **Output VC release:** an output VC is freed when the tail flit leaves. A
  new packet may then queue behind the old one in the downstream FIFO.
- **Network interface:** its protocol is entirely this design's own.

The source writes the carry equation of the priority cell with an overbar
that would make the carry the complement of the grant. The cell drawing and
the working of a round-robin ring both give `Kout = ~RQ & (PR | Kin)`, which
is what is built.

## Not included

- The cores and memories that use the network are not part of the RTL. Their
  network-interface ports are the ports of `noc_mesh`.
- The source's area and critical-path figures (109.5 µm², 384.2 ps for the
  arbiter) depend on a cell library it does not name. They cannot be checked
  here.
- The 8-VC configuration is supported by the parameters but has not been
  simulated.
