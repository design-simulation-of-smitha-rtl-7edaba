// smitha_level: one level of a SMITHA network, the SMITHA paper's base topology.
//
// The nodes form a complete binary tree with the root removed: ring r
// (r = 1..RINGS) holds 2**r nodes, numbered 0 at the right end to 2**r-1 at
// the left end. Node (r,k) is joined
//   - to its left neighbour (r,k+1) through its LI and to its right neighbour
//     (r,k-1) through its RI, so each ring is a chain;
//   - to its children through TLI (r+1,2k+1) and TRI (r+1,2k);
//   - to its parent (r-1,k/2) through BI (ring 1 has no parent).
// The ring ends' free LI (left end) and RI (right end) are brought out as
// lend_*/rend_* ports, indexed by ring-1, for the links to adjacent levels.
// Interfaces with nothing attached (BI of ring 1, TLI/TRI of the top ring)
// see REQ and ACK held low and are never chosen by the routing logic.
//
// Local ports are flat arrays indexed by 2**r-2+k. The level number is the
// parameter LEVEL (1-based, as the levels are numbered in the SMITHA paper's
// figures).
module smitha_level
  import smitha_pkg::*;
#(
  parameter int unsigned LEVEL    = 1,
  parameter int unsigned RINGS    = 3,
  parameter int unsigned SB_DEPTH = 8,
  parameter int unsigned RB_DEPTH = 8,
  localparam int unsigned N       = (2 << RINGS) - 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // local processing elements
  input  logic      [N-1:0]      inj_valid,
  input  pkt_t      [N-1:0]      inj_pkt,
  output logic      [N-1:0]      inj_ready,
  output logic      [N-1:0]      ej_valid,
  output pkt_t      [N-1:0]      ej_pkt,
  input  logic      [N-1:0]      ej_ready,
  output node_ev_t  [N-1:0]      ev,
  // links at the left ends of the rings (LI of node 2**r-1)
  output link_fwd_t [RINGS-1:0]  lend_tx,
  input  logic      [RINGS-1:0]  lend_tx_ack,
  input  link_fwd_t [RINGS-1:0]  lend_rx,
  output logic      [RINGS-1:0]  lend_rx_ack,
  // links at the right ends of the rings (RI of node 0)
  output link_fwd_t [RINGS-1:0]  rend_tx,
  input  logic      [RINGS-1:0]  rend_tx_ack,
  input  link_fwd_t [RINGS-1:0]  rend_rx,
  output logic      [RINGS-1:0]  rend_rx_ack
);

  link_fwd_t [NPORTS-1:0] tx     [N];
  link_fwd_t [NPORTS-1:0] rx     [N];
  logic      [NPORTS-1:0] tx_ack [N];
  logic      [NPORTS-1:0] rx_ack [N];
  logic      [NPORTS-1:0] busy   [N];

  for (genvar r = 1; r <= RINGS; r++) begin : g_ring
    for (genvar k = 0; k < (1 << r); k++) begin : g_node
      localparam int unsigned I = (1 << r) - 2 + k;

      smitha_node #(
        .LEVEL(LEVEL), .RING(r), .NODE(k),
        .SB_DEPTH(SB_DEPTH), .RB_DEPTH(RB_DEPTH)
      ) u_node (
        .clk, .rst_n,
        .tx(tx[I]), .tx_ack(tx_ack[I]), .rx(rx[I]), .rx_ack(rx_ack[I]),
        .inj_valid(inj_valid[I]), .inj_pkt(inj_pkt[I]), .inj_ready(inj_ready[I]),
        .ej_valid(ej_valid[I]), .ej_pkt(ej_pkt[I]), .ej_ready(ej_ready[I]),
        .busy(busy[I]), .ev(ev[I])
      );

      // LI: left neighbour's RI, or the left end of the ring
      if (k < (1 << r) - 1) begin : g_li
        assign rx[I][PORT_L]     = tx[I+1][PORT_R];
        assign tx_ack[I][PORT_L] = rx_ack[I+1][PORT_R];
      end else begin : g_lend
        assign rx[I][PORT_L]     = lend_rx[r-1];
        assign tx_ack[I][PORT_L] = lend_tx_ack[r-1];
        assign lend_tx[r-1]      = tx[I][PORT_L];
        assign lend_rx_ack[r-1]  = rx_ack[I][PORT_L];
      end

      // RI: right neighbour's LI, or the right end of the ring
      if (k > 0) begin : g_ri
        assign rx[I][PORT_R]     = tx[I-1][PORT_L];
        assign tx_ack[I][PORT_R] = rx_ack[I-1][PORT_L];
      end else begin : g_rend
        assign rx[I][PORT_R]     = rend_rx[r-1];
        assign tx_ack[I][PORT_R] = rend_tx_ack[r-1];
        assign rend_tx[r-1]      = tx[I][PORT_R];
        assign rend_rx_ack[r-1]  = rx_ack[I][PORT_R];
      end

      // TLI/TRI: children (2k+1) and (2k) in ring r+1
      if (r < RINGS) begin : g_up
        localparam int unsigned CL = (2 << r) - 2 + 2 * k + 1;
        localparam int unsigned CR = (2 << r) - 2 + 2 * k;
        assign rx[I][PORT_TL]     = tx[CL][PORT_B];
        assign tx_ack[I][PORT_TL] = rx_ack[CL][PORT_B];
        assign rx[I][PORT_TR]     = tx[CR][PORT_B];
        assign tx_ack[I][PORT_TR] = rx_ack[CR][PORT_B];
      end else begin : g_top
        assign rx[I][PORT_TL]     = '0;
        assign tx_ack[I][PORT_TL] = 1'b0;
        assign rx[I][PORT_TR]     = '0;
        assign tx_ack[I][PORT_TR] = 1'b0;
      end

      // BI: parent (k/2) in ring r-1, reached through its TLI (k odd) or TRI
      if (r > 1) begin : g_down
        localparam int unsigned P  = (1 << (r - 1)) - 2 + k / 2;
        localparam port_e       PP = (k % 2 == 1) ? PORT_TL : PORT_TR;
        assign rx[I][PORT_B]     = tx[P][PP];
        assign tx_ack[I][PORT_B] = rx_ack[P][PP];
      end else begin : g_base
        assign rx[I][PORT_B]     = '0;
        assign tx_ack[I][PORT_B] = 1'b0;
      end
    end
  end

endmodule
