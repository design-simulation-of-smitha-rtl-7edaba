// tb_smitha_level: self-checking test of one level (the base topology).
//
// A level of three rings (14 nodes) carries random traffic between all of
// its nodes: each node's local port injects packets for random destinations
// in the same level, and delivery is held off at random. Every packet must be
// delivered once, intact, at the node it is addressed to. The test also
// checks that packets travel along the rings (LI/RI), up the tree (TLI/TRI)
// and down it (BI), that some wait in a receive buffer and that some pass
// straight through, and that nothing leaves through the ring ends, which
// lead to other levels and are left open here.
module tb_smitha_level;
  import smitha_pkg::*;

  localparam int RINGS = 3;
  localparam int N     = (2 << RINGS) - 2;
  localparam int LEVEL = 1;
  localparam int NPKT  = 25;   // per node

  logic clk = 1'b0, rst_n = 1'b0;
  logic     [N-1:0] inj_valid, inj_ready, ej_valid, ej_ready;
  pkt_t     [N-1:0] inj_pkt, ej_pkt;
  node_ev_t [N-1:0] ev;
  link_fwd_t [RINGS-1:0] lend_tx, rend_tx;
  logic [RINGS-1:0] lend_rx_ack, rend_rx_ack;
  int checks = 0, failures = 0;
  int pending = 0, n_sent [N];
  int n_ring = 0, n_up = 0, n_down = 0, n_bypass = 0, n_buffered = 0, n_stall = 0;
  pkt_t expect_q [N][$];

  smitha_level #(.LEVEL(LEVEL), .RINGS(RINGS), .SB_DEPTH(4), .RB_DEPTH(4)) dut (
    .clk, .rst_n, .inj_valid, .inj_pkt, .inj_ready, .ej_valid, .ej_pkt, .ej_ready, .ev,
    .lend_tx, .lend_tx_ack('0), .lend_rx('0), .lend_rx_ack,
    .rend_tx, .rend_tx_ack('0), .rend_rx('0), .rend_rx_ack);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic int ring_of(input int i);
    int r = 1;
    while (i >= (2 << r) - 2) r++;
    return r;
  endfunction

  function automatic addr_t addr_of(input int i);
    addr_t a;
    int r = ring_of(i);
    a.level = LEV_W'(LEVEL); a.ring = RING_W'(r); a.node = NODE_W'(i - ((1 << r) - 2));
    return a;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (ej_valid[i]) begin
        int idx [$];
        idx = expect_q[i].find_first_index(x) with (x == ej_pkt[i]);
        check(ej_pkt[i].dst == addr_of(i), "delivered at its destination");
        check(idx.size() == 1, "delivered packet was sent and not delivered before");
        if (idx.size() == 1) begin expect_q[i].delete(idx[0]); pending--; end
      end
      if (inj_valid[i] && inj_ready[i]) inj_valid[i] <= 1'b0;
      n_ring     += $countones(ev[i].rx_done[1:0]);
      n_down     += $countones(ev[i].rx_done[3:2]);   // arrived from a child
      n_up       += ev[i].rx_done[4];                 // arrived from the parent
      n_bypass   += $countones(ev[i].bypass);
      n_buffered += $countones(ev[i].buffered);
      n_stall    += $countones(ev[i].rx_stall);
    end
    for (int r = 0; r < RINGS; r++) check(!lend_tx[r].req && !rend_tx[r].req, "nothing leaves the level");
  end

  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (!inj_valid[i] && n_sent[i] < NPKT && ($urandom % 16 == 0)) begin
        int d;
        d = $urandom % N;
        inj_pkt[i] = pkt_t'({addr_of(d), addr_of(i), 8'($urandom)});
        inj_valid[i] = 1'b1;
        expect_q[d].push_back(inj_pkt[i]);
        pending++;
        n_sent[i]++;
      end
      ej_ready[i] = ($urandom % 4) != 0;
    end
  end

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int done_sending;
    inj_valid = '0; inj_pkt = '0; ej_ready = '1;
    for (int i = 0; i < N; i++) n_sent[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do begin
      @(posedge clk);
      done_sending = 1;
      for (int i = 0; i < N; i++) if (n_sent[i] < NPKT) done_sending = 0;
    end while (!done_sending || pending != 0);
    check(pending == 0, "all packets delivered");
    check(n_ring > 0, "ring hops happened");
    check(n_up > 0, "hops up the tree happened");
    check(n_down > 0, "hops down the tree happened");
    check(n_bypass > 0, "bypass happened");
    check(n_buffered > 0, "receive-buffer waits happened");
    $display("ring=%0d up=%0d down=%0d bypass=%0d buffered=%0d stall=%0d", n_ring, n_up, n_down, n_bypass, n_buffered, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
