// tb_smitha_interface: self-checking test of one node interface.
//
// Two interfaces are joined by their serial links, as the facing interfaces
// of two neighbouring nodes are. Random packets are written into the send
// buffer of interface A (respecting sb_full); interface B offers every packet
// it receives as its forwarding candidate, and the testbench, playing B's
// node control logic, accepts candidates at random. Checked: every packet
// comes out of B exactly once and in order; a packet accepted in the cycle it
// is received never enters the receive buffer (bypass), one refused is kept
// (buffered); with grants withheld the receive buffer fills and further
// REQs are held off (stall) without loss. Traffic also runs from B to A at
// the same time to exercise both directions of the link.
module tb_smitha_interface;
  import smitha_pkg::*;

  localparam int unsigned D = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  link_fwd_t a2b, b2a;
  logic a_ack, b_ack;   // ACK driven by A (for b2a) and by B (for a2b)
  logic a_push, b_push, a_full, b_full;
  pkt_t a_pkt, b_pkt;
  logic a_cv, b_cv, a_grant, b_grant;
  pkt_t a_cp, b_cp;
  logic a_busy, b_busy;
  logic [4:0] a_ev, b_ev;   // tx_start, rx_done, bypass, buffered, rx_stall
  int checks = 0, failures = 0;
  int n_bypass = 0, n_buffered = 0, n_stall = 0;
  pkt_t exp_ab [$], exp_ba [$];
  int grant_pct = 50;

  smitha_interface #(.SB_DEPTH(D), .RB_DEPTH(D)) u_a (
    .clk, .rst_n, .tx(a2b), .tx_ack(b_ack), .rx(b2a), .rx_ack(a_ack),
    .sb_push(a_push), .sb_pkt(a_pkt), .sb_full(a_full),
    .cand_valid(a_cv), .cand_pkt(a_cp), .cand_grant(a_grant), .busy(a_busy),
    .ev_tx_start(a_ev[4]), .ev_rx_done(a_ev[3]), .ev_bypass(a_ev[2]),
    .ev_buffered(a_ev[1]), .ev_rx_stall(a_ev[0]));

  smitha_interface #(.SB_DEPTH(D), .RB_DEPTH(D)) u_b (
    .clk, .rst_n, .tx(b2a), .tx_ack(a_ack), .rx(a2b), .rx_ack(b_ack),
    .sb_push(b_push), .sb_pkt(b_pkt), .sb_full(b_full),
    .cand_valid(b_cv), .cand_pkt(b_cp), .cand_grant(b_grant), .busy(b_busy),
    .ev_tx_start(b_ev[4]), .ev_rx_done(b_ev[3]), .ev_bypass(b_ev[2]),
    .ev_buffered(b_ev[1]), .ev_rx_stall(b_ev[0]));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // B's received packets, checked when the testbench accepts them
  always @(posedge clk) if (rst_n) begin
    if (b_grant) begin
      check(exp_ab.size() > 0, "A->B packet expected");
      if (exp_ab.size() > 0) check(b_cp == exp_ab.pop_front(), "A->B packet in order and intact");
    end
    if (a_grant) begin
      check(exp_ba.size() > 0, "B->A packet expected");
      if (exp_ba.size() > 0) check(a_cp == exp_ba.pop_front(), "B->A packet in order and intact");
    end
    if (b_ev[2]) begin
      n_bypass++;
      check(b_ev[3] && !b_ev[1], "bypass only for a packet just received, not stored");
    end
    if (b_ev[1]) n_buffered++;
    if (b_ev[0]) n_stall++;
    check(!(b_ev[2] && b_ev[1]), "bypass and buffered exclusive");
  end

  // drive the node side between edges
  int sent_ab = 0, sent_ba = 0;
  localparam int NPKT = 120;
  always @(negedge clk) if (rst_n) begin
    a_push = 1'b0; b_push = 1'b0;
    if (sent_ab < NPKT && !a_full && ($urandom % 2)) begin
      a_pkt = pkt_t'({$urandom, $urandom});
      a_push = 1'b1;
      exp_ab.push_back(a_pkt);
      sent_ab++;
    end
    if (sent_ba < NPKT && !b_full && ($urandom % 3 == 0)) begin
      b_pkt = pkt_t'({$urandom, $urandom});
      b_push = 1'b1;
      exp_ba.push_back(b_pkt);
      sent_ba++;
    end
    b_grant = b_cv && (($urandom % 100) < grant_pct);
    a_grant = a_cv && (($urandom % 100) < 60);
  end

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_push = 0; b_push = 0; a_pkt = '0; b_pkt = '0; a_grant = 0; b_grant = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // stretch of no grants at B: receive buffer fills, REQs are held off
    grant_pct = 0;
    repeat (800) @(posedge clk);
    check(u_b.rb_full, "receive buffer full with grants withheld");
    grant_pct = 100;
    repeat (300) @(posedge clk);
    grant_pct = 40;
    wait (sent_ab == NPKT && sent_ba == NPKT && exp_ab.size() == 0 && exp_ba.size() == 0);
    repeat (10) @(posedge clk);
    check(!a_busy && !b_busy, "interfaces idle at the end");
    check(n_bypass > 0, "bypass happened");
    check(n_buffered > 0, "packet stored in receive buffer happened");
    check(n_stall > 0, "REQ held off by full receive buffer happened");
    $display("bypass=%0d buffered=%0d stall cycles=%0d", n_bypass, n_buffered, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
