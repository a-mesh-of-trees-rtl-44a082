# Mesh-of-trees interconnection network

A single-chip parallel processor whose first-level data cache is split into
many memory modules needs a network between the processing clusters and those
modules that moves close to one request per cycle per port. It also needs a
short, predictable latency. General-purpose topologies such as hypercubes,
butterflies and fat trees fall short because packets bound for different
destinations compete for the same links and buffers.

This RTL builds a **mesh of trees (MoT)** network for that job:

* every processing cluster (PC) is the root of its own binary **fan-out tree**;
* every memory module (MM) is the root of its own binary **fan-in tree**;
* leaf *j* of PC *i*'s fan-out tree is wired to leaf *i* of MM *j*'s fan-in
  tree.

So there is exactly one path from each PC to each MM. A fan-out tree only
reads destination bits, so two packets compete for a buffer only when they go
to the same MM. Even then they meet only inside that MM's fan-in tree. With
uniform traffic, each leaf carries 1/N packet per cycle, and each fan-in root
carries up to one packet per cycle. The network can therefore carry the full
1.0 packet per cycle per port, and under random traffic it comes close to that.

```
 PC0 ─► fan-out tree 0 ─┬─ leaf 0 ─► [pipe] ─► leaf 0 of fan-in tree 0 ─┐
                        ├─ leaf 1 ─► [pipe] ─► leaf 0 of fan-in tree 1  │   fan-in tree j ─► MMj
                        ⋮                                               │
 PC1 ─► fan-out tree 1 ─┬─ leaf 0 ─► [pipe] ─► leaf 1 of fan-in tree 0 ─┘
                        ⋮
```

Every path crosses `2·log2(N)+1` switch primitives: `log2(N)` fan-out nodes,
one pipeline node on the long leaf-to-leaf wire, and `log2(N)` arbitration
nodes. Each primitive takes one clock cycle, so with no contention a packet
needs `2·log2(N)+1` cycles: 13 at N = 64.

## Files and hierarchy

| file | module | role |
|---|---|---|
| `rtl/mot_pkg.sv` | package | default sizes (`MOT_N = 64`, `MOT_B = 80`), arbitration select type |
| `rtl/mot_network.sv` | `mot_network` | top: N fan-out trees, N×N leaf pipeline nodes, N fan-in trees |
| `rtl/mot_fanout_tree.sv` | `mot_fanout_tree` | N−1 fan-out nodes in a heap-numbered binary tree |
| `rtl/mot_fanin_tree.sv` | `mot_fanin_tree` | N−1 arbitration nodes in a heap-numbered binary tree |
| `rtl/mot_fanout_node.sv` | `mot_fanout_node` | 1 input → 2 double-buffered outputs, routing on one destination bit |
| `rtl/mot_arb_node.sv` | `mot_arb_node` | 2 inputs → 1 double-buffered output, fair arbitration |
| `rtl/mot_pipe_node.sv` | `mot_pipe_node` | 1 input → 1 double-buffered output (wire pipelining) |
| `rtl/mot_obuf.sv` | `mot_obuf` | the two-buffer output port shared by all three primitives |

Parameters of `mot_network`: `N` is the number of PCs, which is also the number
of MMs. It must be a power of two, at least 2, and defaults to 64. `W` is the
packet and channel width in bits and defaults to 80. The whole packet moves in
one cycle; it is never split into flits.

## The link protocol: req, data and kill-and-switch

This protocol is the part of the design that takes most care. Every link in
the network, including the PC inputs and MM outputs of `mot_network`, carries
three signals:

| signal | direction | meaning |
|---|---|---|
| `req` | forward | a packet is on the link; it stays high while the packet waits |
| `data` | forward | the packet (W bits) |
| `ks` | backward | *kill-and-switch*: toggles once for every packet the receiver captured |

The network has no global stall signal. Each stage learns about stalls only
from its immediate successor. The rules:

1. **Receiver.** At a clock edge where `req` is high and the receiver has a
   free buffer, it captures `data` and inverts its `ks` register.
2. **Sender.** In the cycle after a capture, the sender sees `ks` differ from
   the value it stored last. In that same cycle it drops its head packet
   (kill) and moves its read pointer to its other buffer (switch). The next
   packet, if there is one, is on `data` at once.

```
cycle               0      1      2      3      4
sender data        P0     P1     P1     P1     P2
sender req          1      1      1      1      1
receiver has room   y      n      n      y      y
capture at end      P0     -      -      P1     P2
ks (from receiver)  0      1      1      1      0
```

Read the example as follows. P0 is captured at the end of cycle 0. `ks` goes to
1, and in cycle 1 the sender sees the change and shows P1. The receiver has no
room in cycles 1 and 2, so `ks` does not toggle and P1 simply stays on the
link. P1 is captured at the end of cycle 3. `ks` goes back to 0, and in cycle
4 the sender shows P2.

An acknowledgement arrives one cycle after the capture. Every output port
therefore has **two** buffers (`mot_obuf`), in the manner of a relay station.
One buffer holds the packet shown on the link, and the other takes the packet
arriving meanwhile. A write pointer makes consecutive packets alternate
between the two buffers, and a read pointer reads them back in the same order.
A buffer freed by a kill can be refilled in the same cycle. This keeps a chain
of stages at one packet per cycle.

Every output of a stage depends only on that stage's registers and on the `ks`
register of the next stage. No combinational path crosses more than one link.

Connecting your own logic:

* **PC side.** Drive `pc_req[i]` and `pc_data[i]`. When `pc_ks[i]` changes,
  the packet was taken at the previous edge, so present the next one (or
  lower `pc_req`) in that same cycle. The testbench source
  `tb/mot_tb_source.sv` does this by putting a `mot_obuf` in front of the
  network.
* **MM side.** When `mm_req[j]` is high and you capture `mm_data[j]`, invert
  `mm_ks[j]` at that edge. Never toggle `mm_ks` without a capture; assertions
  in `mot_obuf` catch that.

## Switch primitives

**Fan-out node** (`mot_fanout_node`) has one input and two output ports. Output
0 is the "up" child and output 1 the "down" child. Each port is a `mot_obuf`.
The node reads bit `DBIT` of the packet: 0 selects output 0 and 1 selects
output 1. The packet is captured only if the selected port has a free buffer.
If that port is full, the packet waits on the input and blocks the packets
behind it, including those for the other port. This happens only when a
fan-in tree has backed up so far that the stall reaches the fan-out tree.

**Arbitration node** (`mot_arb_node`) has two inputs and one `mot_obuf` output.
When a buffer is free it grants one requesting input, captures that input's
packet and toggles that input's `ks`. A priority bit decides ties. After every
grant it points at the input that was *not* granted. So an input that loses a
conflict wins the next arbitration, which is the next cycle if the output
drains. Under saturation the two inputs alternate exactly. An assertion states
the rule, and the `conflict` output goes high in every cycle with a tie.

**Pipeline node** (`mot_pipe_node`) is a single `mot_obuf` with the same
capture-and-acknowledge rule. One of them sits on each of the N² leaf wires.
On silicon those wires run across the whole network.

## Routing and packet format

The destination MM is held in the **low `log2(N)` bits** of the packet. The
rest of the packet is payload that the network carries unchanged.

The fan-out tree is numbered like a heap. Node *k* (1 ≤ *k* < N) sits on
level ⌊log2 *k*⌋ and feeds nodes 2*k* and 2*k*+1. Node *k* on level *L* routes
on destination bit `log2(N)−1−L`, so the most significant bit is read at the
root. Leaf *j* (heap position N+*j*) therefore receives exactly the packets
for MM *j*. The fan-in tree uses the same numbering: node *k* merges node 2*k*
(input 0) with node 2*k*+1 (input 1), and leaf *i* carries PC *i*'s packets.
There is no routing decision in a fan-in tree.

Packet order is kept per PC–MM pair, because there is one path and every
buffer is first-in first-out. Packets from different PCs to one MM arrive in
the order arbitration gives them.

## Timing and measured behaviour

* **Latency.** A lone packet presented on `pc_req` at cycle *t* is on `mm_req`
  at cycle *t* + 2·log2(N) + 1. The fan-out tree adds log2(N) cycles, the
  leaf pipeline node one, and the fan-in tree log2(N). The testbenches check
  this exactly.
* **Rate.** Every port and every primitive moves up to one packet per cycle.
  A fan-in tree under saturation gives each leaf exactly 1/N of the root's
  packets.
* **Random traffic.** Every PC offers packets to uniformly random MMs through
  a queue in front of its port. Figures are from one run each. Latency is
  counted from the packet's creation, so it includes any wait in that queue,
  less the fixed two cycles the testbench source takes to present a packet:

| N | offered load (packets/cycle/port) | delivered | mean latency (cycles) |
|---|---|---|---|
| 8 | 1.0 | 0.948 | — |
| 8 | 0.1 / 0.5 / 0.9 | 0.10 / 0.50 / 0.90 | 7.0 / 7.5 / 11.4 |
| 16 | 1.0 | 0.957 | — |
| 16 | 0.1 / 0.5 / 0.9 | 0.10 / 0.50 / 0.90 | 9.1 / 9.5 / 13.3 |

  Throughput stays below 1.0 under random traffic because of short-term
  imbalance: several PCs pick the same MM in the same cycles. For reference,
  the network was originally reported, from its authors' own simulator, at
  0.951, 0.963 and 0.977 packets per cycle per port for N = 16, 32 and 64.
  It was also reported to grow its latency by about 1.6× between 0.1 and 0.9
  offered load. The runs above show 1.6× growth at N = 8 and 1.5× at N = 16.

* **Hot spot.** If every PC sends to MM 0, that MM still receives one packet
  per cycle. Its fan-in tree fills, and the stall spreads back through the
  leaf pipeline nodes into the fan-out trees and to the PCs. Traffic to other
  MMs then waits behind it. The MoT gives no isolation against an extreme
  hot spot; address hashing over the modules is meant to prevent one.

## Size

Each fan-out node has four W-bit buffers, and each arbitration and pipeline
node has two. At the defaults (N = 64, W = 80) the network holds 4032 fan-out
nodes, 4096 pipeline nodes and 4032 arbitration nodes. That is about
(4032·4 + 4096·2 + 4032·2)·80 ≈ 2.6 Mbit of packet buffers plus a few control
flops per node. Wiring, not logic, dominates the real cost of this network.
Its wire area grows as `N·(log2 N + 2)` channel widths across the chip.

## Where this RTL makes its own choices

The topology, the three primitives, the double-buffered output ports, the
fairness rule, the hop count and the default sizes (64 terminals, 80-bit
channels) follow the published design. The following points are not given
there and were chosen here:

* The `ks` encoding: a toggle per captured packet, acted on in the same cycle
  as it is seen. The control circuit of the two-buffer port is also this
  design's own.
* `req` as a level "packet present" signal.
* The destination sits in the low bits of the packet, and routing reads it
  most significant bit first.
* Exactly one pipeline node per leaf wire. Longer wires could take more in
  series, and each would add one cycle.
* Fairness is a single priority bit per arbitration node. After reset input 0
  wins the first tie.
* A fan-out node holds a blocked packet on its input: there is no bypass for
  packets bound for the other child.
* Reset is synchronous and active low. It empties every buffer; the buffer
  data themselves are not reset.
* Only the request direction (PC → MM) is built. Replies need a second
  network with the roles of the two sides swapped. The same RTL serves, with
  the MMs driving the `pc_*` ports.
* `arb_conflict` is an observation output added for testing. It can be left
  unconnected.

Not part of this RTL: the processing clusters, the memory modules (cache and
off-chip memory), the address hashing that spreads addresses over the modules,
and the physical floorplan that pairs fan-out and fan-in trees between the
clusters.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_mot_obuf` | order, no loss or duplication, at most two packets held, one packet per cycle at full rate |
| `tb_mot_pipe_node` | order and integrity, 1-cycle latency, full rate, backpressure |
| `tb_mot_fanout_node` | packets leave on the port selected by the routing bit, 1-cycle latency, full rate, input stalls |
| `tb_mot_arb_node` | per-input order, full rate, exact alternation under saturation, the loser of every conflict wins next |
| `tb_mot_fanout_tree` | every packet reaches the leaf of its destination, log2(N)-cycle latency, full rate, root stalls |
| `tb_mot_fanin_tree` | per-leaf order, log2(N)-cycle latency, full rate, equal 1/N shares under saturation |
| `tb_mot_network` | whole network at N = 8 (sequence below) |
| `tb_mot_network_n16` | the same sequence at N = 16 |

The network testbenches (`tb/mot_net_harness.sv`) run a fixed sequence:

1. Lone packets check the `2·log2(N)+1` latency.
2. Uniform traffic at 1.0 packet/cycle/port checks a throughput floor.
3. Loads 0.1, 0.5 and 0.9 are run and their latencies reported.
4. A hot spot checks one packet per cycle at the hot module and stalls
   reaching the PCs.
5. Random readiness at the MMs applies backpressure.
6. A final drain checks that every packet was delivered intact, to the right
   module and in order per pair.

Each mechanism must have happened at least once: arbitration conflicts, PC
stalls, MM-side holds and `ks` acknowledgements.

Run one, for example the network at N = 8:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mot_pkg.sv tb/mot_tb_pkg.sv tb/tb_mot_network.sv --top-module tb_mot_network
./obj_dir/Vtb_mot_network
```

**Largest size simulated: N = 16.** Verilator flattens the design and
produces about 19 kB of C++ per primitive. The default 64-terminal network,
with about 12,000 primitives, becomes more than 200 MB of C++. The simulator
cannot compile that in reasonable time, so N = 64 has been linted and
elaborated but not simulated. Nothing in the RTL depends on N beyond the
generate loops, and the tree and primitive code is the same at every size.
