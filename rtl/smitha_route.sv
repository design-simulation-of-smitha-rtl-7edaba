// smitha_route: routing logic of a SMITHA node (combinational).
//
// Given the address of the current node and a packet's destination it names
// the interface the packet leaves by. The algorithm is deterministic and moves
// a packet through three phases, each monotone, so no packet ever turns back:
//   1. level phase  - while the destination is in another level, move along
//      the current ring towards the ring end that carries the link to the next
//      level in the wanted direction, and cross it (that end's LI or RI is the
//      inter-level link, so "keep going left/right" covers both steps);
//   2. ring phase   - in the right level, climb the tree (TLI/TRI, towards the
//      child whose number is nearer the destination's ancestor) or descend
//      it (BI) until the destination ring is reached;
//   3. node phase   - move left (higher node numbers) or right (lower node
//      numbers) along the ring to the destination node, then deliver locally.
// The SMITHA paper says that a routing algorithm picks the next interface and
// shows one route, (1,2,1) -> (1,2,0) -> (2,2,0) -> (2,2,1), which this
// algorithm reproduces; the algorithm itself is this design's own.
//
// Ports: cur = this node's address, dst = destination; port = chosen exit.
module smitha_route
  import smitha_pkg::*;
(
  input  addr_t cur,
  input  addr_t dst,
  output port_e port
);

  logic [NODE_W-1:0] anc;   // destination's ancestor in the ring above cur
  logic [RING_W-1:0] gap;   // rings between that ancestor and the destination

  always_comb begin
    gap  = dst.ring - cur.ring - RING_W'(1);
    anc  = dst.node >> gap;
    port = PORT_LOCAL;
    if (dst.level > cur.level) begin
      port = up_side_left(cur.level, cur.ring) ? PORT_L : PORT_R;
    end else if (dst.level < cur.level) begin
      port = up_side_left(cur.level, cur.ring) ? PORT_R : PORT_L;
    end else if (dst.ring > cur.ring) begin
      port = ({1'b0, anc} > {cur.node, 1'b0}) ? PORT_TL : PORT_TR;
    end else if (dst.ring < cur.ring) begin
      port = PORT_B;
    end else if (dst.node > cur.node) begin
      port = PORT_L;
    end else if (dst.node < cur.node) begin
      port = PORT_R;
    end
  end

endmodule
