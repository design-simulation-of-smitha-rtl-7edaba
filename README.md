# SMITHA: a three-dimensional network on chip in SystemVerilog

SMITHA (Scalable Modular Interconnect for Three-dimensional High-performance
Applications) is a network-on-chip topology built in two steps. A *level* is a
complete binary tree with its root removed, in which the nodes of every tree
layer (a *ring*) are also chained to their neighbours. Several levels are then
stacked, and each ring is joined to the same ring of the level above or below at
one of its two ends, the end alternating with the parity of level and ring.
Neighbouring nodes talk over narrow bit-serial links with a REQ/ACK handshake
and store whole packets in small buffers at every interface.

This repository is synthesizable RTL of that network: the node with its five
interfaces, one level, and the stacked network of three levels of three rings
(42 nodes) that the SMITHA proposal uses as its example. It also has a
self-checking testbench for every module.

## Topology and addresses

A node is named `(level, ring, node)`. Levels are numbered 1..`LEVELS` from the
bottom and rings 1..`RINGS` from the bottom of the tree. Ring `r` holds `2**r`
nodes, numbered from 0 at the right end to `2**r-1` at the left end. One level
with three rings:

```
  (3,7)-(3,6)-(3,5)-(3,4)-(3,3)-(3,2)-(3,1)-(3,0)      ring 3
      \   /       \   /       \   /       \   /
      (2,3) ----- (2,2) ----- (2,1) ----- (2,0)        ring 2
            \     /                 \     /
             (1,1) --------------- (1,0)               ring 1
```

Each node has five interfaces:

| interface | index (`port_e`) | attached to |
|-----------|------------------|-------------|
| LI  (left)       | 0 | `(r, k+1)`; at the left end (`k = 2**r-1`) the link to another level |
| RI  (right)      | 1 | `(r, k-1)`; at the right end (`k = 0`) the link to another level |
| TLI (top left)   | 2 | left child `(r+1, 2k+1)` |
| TRI (top right)  | 3 | right child `(r+1, 2k)` |
| BI  (bottom)     | 4 | parent `(r-1, k/2)` |

Ring 1 has no parent and the top ring has no children. Those interfaces are
still there, with their inputs tied low, and routing never uses them.

### Links between levels

Between level `l` and level `l+1`, ring `r` of both levels is joined at the
same end:

| levels | odd rings | even rings |
|--------|-----------|------------|
| odd `l` to `l+1`  | left ends (LI to LI)  | right ends (RI to RI) |
| even `l` to `l+1` | right ends (RI to RI) | left ends (LI to LI)  |

So in any ring one end leads up and the other leads down
(`smitha_pkg::up_side_left`). That is what makes routing between levels
simple. The ends that face past the bottom or the top level are not connected.
With the default three levels, the ring-2 right ends of levels 1 and 2 are
joined, for example, and so are the ring-2 left ends of levels 2 and 3.

## Packets

A packet is one 32-bit word, sent most significant bit first:

| bits  | 31:28 | 27:24 | 23:20 | 19:16 | 15:12 | 11:8 | 7:0 |
|-------|-------|-------|-------|-------|-------|------|-----|
| field | destination level | destination ring | destination node | source level | source ring | source node | data |

The field order is SMITHA's. The widths are this design's choice: four bits for
each address field (enough for 15 levels and rings and 16 nodes per ring) and
eight data bits. They are set in `smitha_pkg` (`LEV_W`, `RING_W`, `NODE_W`,
`DATA_W`). Changing them changes `PKT_W` and so the length of a transfer.

## The serial link

Every interface has one link in each direction. In each direction there are
three forward wires, bundled as `link_fwd_t`: `req`, `data` and `clk`. One wire,
`ack`, runs back. `clk` is a data strobe: it is high in every cycle that `data`
carries a valid bit, and all nodes share one system clock. One transfer:

```
cycle        0     1     2     3     4    ...   W+2   W+3
pop          _/‾\_________________________________________   sender takes the head of its send buffer
req          ____/‾‾‾‾‾‾‾‾‾\_____________________________
ack          __________/‾‾‾\______________________________   receiver: only if its receive buffer is not full
data/clk     ________________/b31 |b30 | ... |b0 \________   one bit per cycle
done         __________________________________________/‾\   packet complete in the receive register
```

* Sending side (`smitha_link_tx`): when its send buffer is not empty and its
  busy bit is clear, it loads the head packet into the temporary send register,
  sets busy and raises REQ. It holds REQ until ACK arrives, then shifts out
  `PKT_W` bits, and then clears busy.
* Receiving side (`smitha_link_rx`): an idle receiver answers a REQ with a
  one-cycle ACK only while its receive buffer is not full. If the buffer is
  full, REQ just waits; `stall` marks these cycles. The receiver then shifts
  the bits into its temporary receive register. `done` pulses when the packet
  is complete.

`done` comes `PKT_W + 3` cycles after the sender's pop (35 cycles with 32-bit
packets). It comes one cycle later if the receiver is just finishing the
previous packet. A link carries at most one packet every `PKT_W + 4` cycles.

## Inside an interface: bypass or wait

`smitha_interface` is an interface as SMITHA draws it: send buffer, temporary
send register, temporary receive register, receive buffer, busy bits and the
four pins. The part that takes most care is what happens to a packet just
received:

* If the receive buffer is empty, the new packet is offered at once to the
  node's control logic. If the control logic accepts it in that same cycle, it
  goes straight into the next interface's send buffer (*bypass*). The receive
  buffer is never written.
* If it is not accepted (its send buffer is full, or another packet won that
  buffer this cycle), it is written into the receive buffer.
* While the receive buffer holds packets, its head is the one offered, and new
  arrivals queue behind it. Packets that enter one interface therefore leave in
  order.

The receiver does not acknowledge a new REQ in the cycle a packet completes.
This way the full test always counts the packet that was just stored, and the
receive buffer cannot overflow.

## Node control logic and routing

`smitha_ctrl` is the node's control logic. It sees six candidates each cycle:
one per interface, plus the local processing element's injection port. It
routes each candidate with `smitha_route` and moves it into that interface's
send buffer only if the buffer is not full. Packets addressed to the node go to
the local delivery port. The receiver can hold delivery off with `ej_ready`.
When several candidates want the same output, a round-robin arbiter
(`smitha_rr_arb`) per output picks one. The others stay where they are and try
again the next cycle.

The routing function is deterministic. It has three phases, and each phase
moves a packet in one direction only:

1. **Level.** While the destination is in another level, the packet moves
   along its current ring towards the end that leads up (or down), and crosses
   there. In the ring's direction "keep going left" (or right) covers both the
   walk and the crossing.
2. **Ring.** In the right level, the packet climbs the tree through TLI/TRI,
   towards the child whose number is nearer the destination's ancestor, or it
   descends through BI, until it reaches the destination ring.
3. **Node.** It moves left (to higher node numbers) or right (to lower ones)
   along the ring, then is delivered.

A packet from (1,2,1) to (2,2,1), for example, goes right to (1,2,0), crosses
the ring-2 right-end link to (2,2,0), moves left to (2,2,1) and is delivered.
That is the route the SMITHA proposal shows. On an idle network each hop costs
`PKT_W + 5` cycles from send buffer to send buffer: one cycle into the send
buffer, REQ, ACK, `PKT_W` bits, and one cycle to forward. This example takes
3 × 37 = 111 cycles.

The algorithm and the arbitration are this design's own; SMITHA only says that
a routing algorithm picks the next interface. No formal proof of deadlock
freedom is given here. The argument is this: level changes are monotone in
level, tree moves are monotone in ring, and ring moves are monotone in node
number. Each packet crosses the phases in a fixed order and ends at a local
port, so no packet ever turns back. This holds as long as every node
eventually takes delivery of its packets (`ej_ready`). The testbenches include a hotspot load that
fills buffers back along whole routes, and it drains completely.

## Modules

| module | role |
|--------|------|
| `smitha_pkg`       | packet and address types, port numbering, link bundle, helpers |
| `smitha_fifo`      | send buffer and receive buffer (default depth 8) |
| `smitha_link_tx`   | temporary send register, send busy bit, REQ / serial output |
| `smitha_link_rx`   | temporary receive register, receive busy bit, ACK / serial input |
| `smitha_route`     | routing logic (combinational) |
| `smitha_interface` | one of the five interfaces |
| `smitha_rr_arb`    | round-robin arbiter |
| `smitha_ctrl`      | node control logic: routing, arbitration, local delivery |
| `smitha_node`      | a node: five interfaces and the control logic; parameters `LEVEL`, `RING`, `NODE` give its address |
| `smitha_level`     | one level (base topology), ring ends brought out |
| `smitha_top`       | the stacked network; parameters `LEVELS` (3), `RINGS` (3), `SB_DEPTH` (8), `RB_DEPTH` (8) |

The ports of `smitha_top` are the local ports of all nodes. They are flat
arrays indexed by `(level-1)*N + 2**ring-2 + node`, with `N = 2**(RINGS+1)-2`
nodes per level:

* `inj_valid/inj_pkt/inj_ready` inject a packet. This is a valid/ready
  handshake; `inj_ready` may depend on `inj_valid` in the same cycle.
* `ej_valid/ej_pkt` pulse with each delivered packet. `ej_valid` is only
  raised while `ej_ready` is high.
* `ev` carries per-node event pulses (`node_ev_t`: transfer start, packet
  received, bypass, buffered, REQ stalled), one bit per interface, for
  observation.

All flip-flops reset asynchronously on `rst_n` low. Buffer contents are not
reset.

## Where this design departs from SMITHA, or fills it in

* **Routing algorithm, arbitration, local port.** These are this design's own
  (see above). SMITHA does not say where packets enter or leave a node.
* **Numbering.** Levels and rings count from 1, as in SMITHA's figures and
  example route. One sentence of the SMITHA text counts levels from 0; that
  reading is not used.
* **Widths and depths.** Four-bit address fields, eight data bits and 8-packet
  buffers are choices. SMITHA leaves the data size open.
* **CLK pin.** It is a strobe in the common clock domain, not a separate clock
  driven by the sender.
* **Control logic placement.** SMITHA draws routing and control logic inside
  each interface. Here they are one block per node, because they choose between
  interfaces; the behaviour is the same. The send-start half of the control
  logic is in `smitha_link_tx`.
* **Rings are open chains.** No link joins a ring's two ends.
* **Not included:** the FPGA board SMITHA was demonstrated on.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/smitha_pkg.sv tb/tb_smitha_top.sv --top-module tb_smitha_top -Mdir obj
./obj/Vtb_smitha_top
```

| testbench | what it checks |
|-----------|----------------|
| `tb_smitha_pkg`       | packet layout, flat node index, which ring end leads up |
| `tb_smitha_fifo`      | random push/pop against a queue model; full at exactly `DEPTH` |
| `tb_smitha_link`      | sender and receiver back to back: data intact and in order, `PKT_W+3` latency, no ACK while the receive buffer is full |
| `tb_smitha_route`     | every source/destination pair of a 3×3 network walked hop by hop over an independent topology model; the example route hop by hop |
| `tb_smitha_interface` | two interfaces linked; bypass, buffering and REQ stall all occur; nothing lost or reordered |
| `tb_smitha_ctrl`      | exits worked out by hand; no write into a full send buffer; work-conserving; every candidate served within six cycles |
| `tb_smitha_node`      | a node between five neighbour models; every packet leaves by the right interface |
| `tb_smitha_level`     | all-to-all traffic within one level |
| `tb_smitha_top`       | full default network. Checks the example route and its 111-cycle latency, a hotspot load, and random all-to-all traffic. Requires at least one ring hop, tree hop up and down, level crossing up and down, bypass, buffered packet, REQ stall and full send buffer |

`tb_smitha_top` runs the network at its default parameters. It takes a few
minutes to compile and a few seconds to run.
