// smitha_node: a SMITHA router node with its five interfaces.
//
// The five interfaces are LI and RI (neighbours in the same ring, or the link
// to the adjacent level at a ring end), TLI and TRI (left and right child in
// the ring above) and BI (parent in the ring below), as in the SMITHA paper. Each
// has its own serial link (REQ, ACK, DATA, CLK in both directions), send and
// receive buffers and temporary registers (smitha_interface). The node's
// control logic (smitha_ctrl) forwards packets between interfaces with the
// routing logic (smitha_route). A local port, this design's addition since
// the SMITHA paper does not say where packets enter and leave, lets the attached
// processing element inject packets (inj_valid/inj_ready handshake) and take
// delivery of packets addressed to this node (ej_valid pulses with the packet
// in every cycle one is delivered; ej_ready low holds delivery off).
//
// The node's address is given by the parameters LEVEL, RING and NODE.
// Link arrays are indexed by port_e (0 LI, 1 RI, 2 TLI, 3 TRI, 4 BI).
module smitha_node
  import smitha_pkg::*;
#(
  parameter int unsigned LEVEL    = 1,
  parameter int unsigned RING     = 1,
  parameter int unsigned NODE     = 0,
  parameter int unsigned SB_DEPTH = 8,
  parameter int unsigned RB_DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // serial links, one per interface
  output link_fwd_t [NPORTS-1:0]   tx,
  input  logic      [NPORTS-1:0]   tx_ack,
  input  link_fwd_t [NPORTS-1:0]   rx,
  output logic      [NPORTS-1:0]   rx_ack,
  // local processing element
  input  logic                     inj_valid,
  input  pkt_t                     inj_pkt,
  output logic                     inj_ready,
  output logic                     ej_valid,
  output pkt_t                     ej_pkt,
  input  logic                     ej_ready,
  // status
  output logic      [NPORTS-1:0]   busy,
  output node_ev_t                 ev
);

  localparam addr_t HERE = '{level: LEV_W'(LEVEL), ring: RING_W'(RING), node: NODE_W'(NODE)};

  logic [NPORTS:0]      cand_valid, cand_grant;
  pkt_t [NPORTS:0]      cand_pkt;
  logic [NPORTS-1:0]    sb_full, sb_push;
  pkt_t [NPORTS-1:0]    sb_pkt;

  for (genvar p = 0; p < NPORTS; p++) begin : g_if
    smitha_interface #(.SB_DEPTH(SB_DEPTH), .RB_DEPTH(RB_DEPTH)) u_if (
      .clk, .rst_n,
      .tx(tx[p]), .tx_ack(tx_ack[p]), .rx(rx[p]), .rx_ack(rx_ack[p]),
      .sb_push(sb_push[p]), .sb_pkt(sb_pkt[p]), .sb_full(sb_full[p]),
      .cand_valid(cand_valid[p]), .cand_pkt(cand_pkt[p]), .cand_grant(cand_grant[p]),
      .busy(busy[p]),
      .ev_tx_start(ev.tx_start[p]), .ev_rx_done(ev.rx_done[p]),
      .ev_bypass(ev.bypass[p]), .ev_buffered(ev.buffered[p]), .ev_rx_stall(ev.rx_stall[p])
    );
  end

  assign cand_valid[NPORTS] = inj_valid;
  assign cand_pkt[NPORTS]   = inj_pkt;
  assign inj_ready          = cand_grant[NPORTS];

  smitha_ctrl u_ctrl (
    .clk, .rst_n, .here(HERE),
    .cand_valid, .cand_pkt, .cand_grant,
    .sb_full, .sb_push, .sb_pkt,
    .ej_valid, .ej_pkt, .ej_ready
  );

endmodule
