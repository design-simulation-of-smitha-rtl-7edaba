// smitha_interface: one of the five interfaces of a SMITHA node (LI, RI, TLI,
// TRI or BI).
//
// It holds a send buffer feeding the sending side (temporary send register,
// REQ out, ACK in, DATA and CLK out) and the receiving side (REQ in, ACK out,
// DATA and CLK in, temporary receive register) feeding a receive buffer, as
// in the SMITHA paper. Towards the node it offers one candidate packet to the
// node's control logic:
//   - the head of the receive buffer when the buffer holds packets, else
//   - the packet completed by the receive register in this cycle.
// When the control logic accepts (`cand_grant`) a packet that was just
// received, it goes straight to the next interface's send buffer without
// touching the receive buffer (bypass); when it is refused because that send
// buffer is full or another packet won it, it is stored in the receive
// buffer, as the SMITHA paper prescribes. Packets from the receive buffer are
// offered again each cycle until accepted, so arrival order is kept.
//
// The node writes packets to be sent through `sb_push`/`sb_pkt` and must
// respect `sb_full`.
module smitha_interface
  import smitha_pkg::*;
#(
  parameter int unsigned SB_DEPTH = 8,
  parameter int unsigned RB_DEPTH = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  // serial link
  output link_fwd_t tx,
  input  logic      tx_ack,
  input  link_fwd_t rx,
  output logic      rx_ack,
  // send buffer write port (from the node's control logic)
  input  logic      sb_push,
  input  pkt_t      sb_pkt,
  output logic      sb_full,
  // candidate packet for forwarding (to the node's control logic)
  output logic      cand_valid,
  output pkt_t      cand_pkt,
  input  logic      cand_grant,
  // status
  output logic      busy,
  output logic      ev_tx_start,
  output logic      ev_rx_done,
  output logic      ev_bypass,
  output logic      ev_buffered,
  output logic      ev_rx_stall
);

  pkt_t sb_head, rb_head, rx_pkt;
  logic sb_empty, sb_pop;
  logic rb_empty, rb_full, rb_push, rb_pop;
  logic rx_done, tx_busy, rx_busy;
  logic [$clog2(SB_DEPTH+1)-1:0] sb_count;
  logic [$clog2(RB_DEPTH+1)-1:0] rb_count;

  smitha_fifo #(.WIDTH(PKT_W), .DEPTH(SB_DEPTH)) u_send_buffer (
    .clk, .rst_n,
    .push(sb_push), .wr_data(sb_pkt),
    .pop(sb_pop),   .rd_data(sb_head),
    .empty(sb_empty), .full(sb_full), .count(sb_count)
  );

  smitha_link_tx u_tx (
    .clk, .rst_n,
    .sb_empty, .sb_data(sb_head), .sb_pop,
    .tx, .ack(tx_ack),
    .busy(tx_busy), .start(ev_tx_start)
  );

  smitha_link_rx u_rx (
    .clk, .rst_n,
    .rx, .ack(rx_ack),
    .rb_full, .done(rx_done), .pkt(rx_pkt),
    .busy(rx_busy), .stall(ev_rx_stall)
  );

  smitha_fifo #(.WIDTH(PKT_W), .DEPTH(RB_DEPTH)) u_receive_buffer (
    .clk, .rst_n,
    .push(rb_push), .wr_data(rx_pkt),
    .pop(rb_pop),   .rd_data(rb_head),
    .empty(rb_empty), .full(rb_full), .count(rb_count)
  );

  always_comb begin
    cand_valid = !rb_empty || rx_done;
    cand_pkt   = rb_empty ? rx_pkt : rb_head;
    rb_pop     = !rb_empty && cand_grant;
    // a new packet waits in the receive buffer unless it was forwarded at once
    rb_push    = rx_done && !(rb_empty && cand_grant);
  end

  assign ev_rx_done  = rx_done;
  assign ev_bypass   = rx_done && rb_empty && cand_grant;
  assign ev_buffered = rb_push;
  assign busy        = tx_busy || rx_busy;

  a_grant_valid: assert property (@(posedge clk) disable iff (!rst_n) cand_grant |-> cand_valid);

endmodule
