// smitha_pkg: types and constants shared by the SMITHA network-on-chip RTL.
//
// A SMITHA network is a stack of LEVELS levels. Each level is a complete binary
// tree with its root removed; the layers of that tree are called rings and are
// numbered 1..RINGS from the bottom, ring r holding 2**r nodes numbered
// 0..2**r-1 from right to left. A node is addressed by (level, ring, node).
//
// Packet (MSB first on the serial link):
//   dest level | dest ring | dest node | src level | src ring | src node | data
// The field order follows the SMITHA paper's packet format; the field widths (4 bits
// for every address field, as the node-address registers of the SMITHA paper's
// waveform are four bits wide, and 8 data bits) are this design's choice.
//
// Each node has five interfaces, indexed by port_e: LI/RI to the left/right
// neighbour in the same ring (or, at a ring end, to the adjacent level), TLI/TRI
// to the left/right child in the ring above, BI to the parent in the ring below.
// PORT_LOCAL is the node's own processing element (injection and delivery).
package smitha_pkg;

  localparam int unsigned LEV_W  = 4;
  localparam int unsigned RING_W = 4;
  localparam int unsigned NODE_W = 4;
  localparam int unsigned DATA_W = 8;

  typedef struct packed {
    logic [LEV_W-1:0]  level;
    logic [RING_W-1:0] ring;
    logic [NODE_W-1:0] node;
  } addr_t;

  typedef struct packed {
    addr_t             dst;
    addr_t             src;
    logic [DATA_W-1:0] data;
  } pkt_t;

  localparam int unsigned PKT_W  = $bits(pkt_t);

  localparam int unsigned NPORTS = 5;   // physical interfaces per node

  typedef enum logic [2:0] {
    PORT_L     = 3'd0,
    PORT_R     = 3'd1,
    PORT_TL    = 3'd2,
    PORT_TR    = 3'd3,
    PORT_B     = 3'd4,
    PORT_LOCAL = 3'd5
  } port_e;

  // Forward wires of one serial link direction: request, serial data and the
  // data clock (a strobe marking each valid data bit). ACK runs the other way.
  typedef struct packed {
    logic req;
    logic data;
    logic clk;
  } link_fwd_t;

  // Per-node event pulses, one bit per interface, for observation.
  typedef struct packed {
    logic [NPORTS-1:0] tx_start;  // a packet starts leaving on this interface
    logic [NPORTS-1:0] rx_done;   // a packet has been fully received
    logic [NPORTS-1:0] bypass;    // received packet went straight to a send buffer
    logic [NPORTS-1:0] buffered;  // received packet had to wait in the receive buffer
    logic [NPORTS-1:0] rx_stall;  // REQ present but not acknowledged: receive buffer full
  } node_ev_t;

  // Side of ring `ring` in level `level` that carries the link to level+1:
  // 1 = left end (node 2**ring-1, its LI), 0 = right end (node 0, its RI).
  // Between an odd and the next even level odd rings are joined on the left and
  // even rings on the right; between an even and the next odd level the other way.
  function automatic logic up_side_left(input logic [LEV_W-1:0] level,
                                        input logic [RING_W-1:0] ring);
    return level[0] == ring[0];
  endfunction

  // Flat index of node (ring, node) inside one level: ring r starts at 2**r-2.
  function automatic int unsigned level_index(input int unsigned ring,
                                              input int unsigned node);
    return (1 << ring) - 2 + node;
  endfunction

endpackage
