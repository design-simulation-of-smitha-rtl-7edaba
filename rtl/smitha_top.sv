// smitha_top: a three-dimensional SMITHA network on chip.
//
// LEVELS copies of the base topology (smitha_level) are stacked. Between
// level l and level l+1 each ring is joined to the same ring of the other
// level at one of its ends, through the free LI of the left-end nodes or the
// free RI of the right-end nodes of both rings:
//   l odd : odd rings at the left end,  even rings at the right end;
//   l even: odd rings at the right end, even rings at the left end.
// So each ring end serves exactly one inter-level link, and a ring's two ends
// lead to the two opposite adjacent levels. Ring ends that face past the
// bottom or top level are left unconnected (REQ and ACK held low). This is
// the stacking rule of the SMITHA paper; defaults LEVELS = 3 and RINGS = 3 are its
// example network of 42 nodes.
//
// The ports are the local ports of every node, flat arrays indexed by
// (level-1)*N + 2**ring-2 + node with N = 2**(RINGS+1)-2 nodes per level:
// inj_valid/inj_pkt/inj_ready inject a packet, ej_valid pulses with a packet
// delivered to that node (held off while ej_ready is low), and ev carries
// per-node event pulses for observation.
module smitha_top
  import smitha_pkg::*;
#(
  parameter int unsigned LEVELS   = 3,
  parameter int unsigned RINGS    = 3,
  parameter int unsigned SB_DEPTH = 8,
  parameter int unsigned RB_DEPTH = 8,
  localparam int unsigned N       = (2 << RINGS) - 2,
  localparam int unsigned NN      = LEVELS * N
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic     [NN-1:0]     inj_valid,
  input  pkt_t     [NN-1:0]     inj_pkt,
  output logic     [NN-1:0]     inj_ready,
  output logic     [NN-1:0]     ej_valid,
  output pkt_t     [NN-1:0]     ej_pkt,
  input  logic     [NN-1:0]     ej_ready,
  output node_ev_t [NN-1:0]     ev
);

  link_fwd_t [RINGS-1:0] lend_tx [LEVELS], lend_rx [LEVELS];
  link_fwd_t [RINGS-1:0] rend_tx [LEVELS], rend_rx [LEVELS];
  logic      [RINGS-1:0] lend_tx_ack [LEVELS], lend_rx_ack [LEVELS];
  logic      [RINGS-1:0] rend_tx_ack [LEVELS], rend_rx_ack [LEVELS];

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    localparam int unsigned B = (l - 1) * N;

    smitha_level #(
      .LEVEL(l), .RINGS(RINGS), .SB_DEPTH(SB_DEPTH), .RB_DEPTH(RB_DEPTH)
    ) u_level (
      .clk, .rst_n,
      .inj_valid(inj_valid[B +: N]), .inj_pkt(inj_pkt[B +: N]), .inj_ready(inj_ready[B +: N]),
      .ej_valid(ej_valid[B +: N]),   .ej_pkt(ej_pkt[B +: N]),   .ej_ready(ej_ready[B +: N]),
      .ev(ev[B +: N]),
      .lend_tx(lend_tx[l-1]), .lend_tx_ack(lend_tx_ack[l-1]),
      .lend_rx(lend_rx[l-1]), .lend_rx_ack(lend_rx_ack[l-1]),
      .rend_tx(rend_tx[l-1]), .rend_tx_ack(rend_tx_ack[l-1]),
      .rend_rx(rend_rx[l-1]), .rend_rx_ack(rend_rx_ack[l-1])
    );

    for (genvar r = 1; r <= RINGS; r++) begin : g_ring
      // which end of this ring leads up (to l+1) and which leads down (to l-1)
      localparam bit UP_LEFT = ((l % 2) == (r % 2));
      localparam bit HAS_UP  = (l < LEVELS);
      localparam bit HAS_DN  = (l > 1);

      // left end
      if (UP_LEFT && HAS_UP) begin : g_l_up
        assign lend_rx[l-1][r-1]     = lend_tx[l][r-1];
        assign lend_tx_ack[l-1][r-1] = lend_rx_ack[l][r-1];
      end else if (!UP_LEFT && HAS_DN) begin : g_l_dn
        assign lend_rx[l-1][r-1]     = lend_tx[l-2][r-1];
        assign lend_tx_ack[l-1][r-1] = lend_rx_ack[l-2][r-1];
      end else begin : g_l_open
        assign lend_rx[l-1][r-1]     = '0;
        assign lend_tx_ack[l-1][r-1] = 1'b0;
      end

      // right end
      if (!UP_LEFT && HAS_UP) begin : g_r_up
        assign rend_rx[l-1][r-1]     = rend_tx[l][r-1];
        assign rend_tx_ack[l-1][r-1] = rend_rx_ack[l][r-1];
      end else if (UP_LEFT && HAS_DN) begin : g_r_dn
        assign rend_rx[l-1][r-1]     = rend_tx[l-2][r-1];
        assign rend_tx_ack[l-1][r-1] = rend_rx_ack[l-2][r-1];
      end else begin : g_r_open
        assign rend_rx[l-1][r-1]     = '0;
        assign rend_tx_ack[l-1][r-1] = 1'b0;
      end
    end
  end

endmodule
