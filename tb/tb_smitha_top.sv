// tb_smitha_top: end-to-end test of the whole SMITHA network at its default
// size (3 levels of 3 rings, 42 nodes, buffers of 8 packets).
//
// Part 1 sends a single packet on the idle network from (1,2,1) to (2,2,1)
// and checks that it takes the route (1,2,1) -> (1,2,0) -> (2,2,0) -> (2,2,1),
// crossing from level 1 to level 2 through the right ends of ring 2, and that
// it arrives after exactly 3 * (PKT_W + 5) cycles: per hop one cycle into the
// send buffer, REQ, ACK, PKT_W serial bits, and one cycle to be forwarded.
// Part 2 makes every node send to (2,2,1) while that node takes no delivery
// for 3000 cycles, so buffers fill back along the routes, then lets it drain.
// Part 3 runs random all-to-all traffic from every node's local port with
// local delivery held off at random. Every packet must be delivered once,
// intact, at its destination. The test counts, and requires at least once:
// ring hops, hops up and down the tree, crossings to a higher and to a lower
// level, packets forwarded straight from the receive register (bypass),
// packets parked in a receive buffer, REQs held off by a full receive buffer,
// and send buffers found full by the control logic.
module tb_smitha_top;
  import smitha_pkg::*;

  localparam int LEVELS = 3;
  localparam int RINGS  = 3;
  localparam int N      = (2 << RINGS) - 2;
  localparam int NN     = LEVELS * N;
  localparam int NPKT   = 12;   // per node in part 2

  logic clk = 1'b0, rst_n = 1'b0;
  logic     [NN-1:0] inj_valid, inj_ready, ej_valid, ej_ready;
  pkt_t     [NN-1:0] inj_pkt, ej_pkt;
  node_ev_t [NN-1:0] ev;
  int checks = 0, failures = 0;
  int pending = 0, n_sent [NN];
  pkt_t expect_q [NN][$];
  longint cyc = 0;
  int n_ring = 0, n_tree_up = 0, n_tree_down = 0, n_lvl_up = 0, n_lvl_down = 0;
  int n_bypass = 0, n_buffered = 0, n_stall = 0, n_sb_full = 0, n_holdoff = 0;
  bit traffic_on = 0;
  bit hotspot = 0;
  int hot = 0;
  longint t_inj [NN], t_ej [NN];

  smitha_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  function automatic int idx_of(input int l, input int r, input int k);
    return (l - 1) * N + (1 << r) - 2 + k;
  endfunction

  function automatic addr_t addr_of(input int i);
    addr_t a;
    int l = i / N + 1, j = i % N, r = 1;
    while (j >= (2 << r) - 2) r++;
    a.level = LEV_W'(l); a.ring = RING_W'(r); a.node = NODE_W'(j - ((1 << r) - 2));
    return a;
  endfunction

  // node index and interface of every packet reception, for the route check
  int    rx_log_node [$];
  int    rx_log_port [$];

  // no-progress watchdog: packets outstanding but none delivered for too long
  int stuck = 0;
  always @(posedge clk) if (rst_n) begin
    if (pending > 0 && ej_valid == '0) stuck++;
    else stuck = 0;
    if (stuck > 8000) begin
      failures++;
      $display("FAIL: no packet delivered for %0d cycles, %0d outstanding", stuck, pending);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int i = 0; i < NN; i++) begin
      addr_t a;
      a = addr_of(i);
      if (ej_valid[i]) begin
        int idx [$];
        idx = expect_q[i].find_first_index(x) with (x == ej_pkt[i]);
        check(ej_pkt[i].dst == a, "delivered at its destination");
        check(idx.size() == 1, "delivered packet was sent and not delivered before");
        if (idx.size() == 1) begin expect_q[i].delete(idx[0]); pending--; end
      end
      if (ej_valid[i]) t_ej[i] = cyc;
      if (inj_valid[i] && inj_ready[i]) begin
        inj_valid[i] <= 1'b0;
        t_inj[i] = cyc;
      end
      for (int p = 0; p < NPORTS; p++) begin
        if (ev[i].rx_done[p]) begin
          rx_log_node.push_back(i);
          rx_log_port.push_back(p);
          if (p == PORT_L && a.node == NODE_W'((1 << a.ring) - 1) ||
              p == PORT_R && a.node == 0) begin
            // arrived over an inter-level link: from above or below?
            if (up_side_left(a.level, a.ring) == (p == PORT_L)) n_lvl_down++;
            else n_lvl_up++;
          end else if (p == PORT_L || p == PORT_R) n_ring++;
          else if (p == PORT_B) n_tree_up++;
          else n_tree_down++;
        end
      end
      n_bypass   += $countones(ev[i].bypass);
      n_buffered += $countones(ev[i].buffered);
      n_stall    += $countones(ev[i].rx_stall);
    end
  end

  // send buffers refusing a packet: a candidate waits while its route's buffer is full
  always @(posedge clk) if (rst_n) begin
    n_sb_full += $countones(dut.g_level[1].u_level.g_ring[2].g_node[0].u_node.sb_full);
    n_sb_full += $countones(dut.g_level[2].u_level.g_ring[2].g_node[0].u_node.sb_full);
    n_sb_full += $countones(dut.g_level[2].u_level.g_ring[1].g_node[1].u_node.sb_full);
  end

  always @(negedge clk) if (rst_n && traffic_on) begin
    for (int i = 0; i < NN; i++) begin
      if (!inj_valid[i] && n_sent[i] < NPKT && ($urandom % 12 == 0)) begin
        int d;
        d = hotspot ? hot : $urandom % NN;
        inj_pkt[i] = pkt_t'({addr_of(d), addr_of(i), 8'($urandom)});
        inj_valid[i] = 1'b1;
        expect_q[d].push_back(inj_pkt[i]);
        pending++;
        n_sent[i]++;
      end
      ej_ready[i] = hotspot ? (i != hot) : ($urandom % 8) != 0;
      if (!ej_ready[i]) n_holdoff++;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int src, dst, done_sending;
    longint lat;
    inj_valid = '0; inj_pkt = '0; ej_ready = '1;
    for (int i = 0; i < NN; i++) n_sent[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- part 1: the example route on an idle network ----
    src = idx_of(1, 2, 1);
    dst = idx_of(2, 2, 1);
    @(negedge clk);
    inj_pkt[src]   = pkt_t'({addr_of(dst), addr_of(src), 8'd25});
    inj_valid[src] = 1'b1;
    expect_q[dst].push_back(inj_pkt[src]);
    pending++;
    wait (pending == 0);
    lat = t_ej[dst] - t_inj[src];
    check(lat == 3 * (PKT_W + 5), $sformatf("example latency %0d cycles, expected %0d", lat, 3 * (PKT_W + 5)));
    @(posedge clk);
    check(pending == 0, "example packet delivered");
    check(rx_log_node.size() == 3, "example route has three hops");
    if (rx_log_node.size() == 3) begin
      check(rx_log_node[0] == idx_of(1, 2, 0) && rx_log_port[0] == PORT_L, "hop 1: (1,2,1) -> (1,2,0), into LI");
      check(rx_log_node[1] == idx_of(2, 2, 0) && rx_log_port[1] == PORT_R, "hop 2: (1,2,0) -> (2,2,0), RI to RI");
      check(rx_log_node[2] == idx_of(2, 2, 1) && rx_log_port[2] == PORT_R, "hop 3: (2,2,0) -> (2,2,1), into RI");
    end
    $display("example route: %0d hops, %0d cycles", rx_log_node.size(), lat);

    // ---- part 2: hotspot, every node sends to (2,2,1), which takes no delivery for a while ----
    hot = idx_of(2, 2, 1);
    hotspot = 1;
    for (int i = 0; i < NN; i++) n_sent[i] = NPKT - 3;
    traffic_on = 1;
    repeat (3000) @(posedge clk);
    hotspot = 0;
    do begin
      @(posedge clk);
      done_sending = 1;
      for (int i = 0; i < NN; i++) if (n_sent[i] < NPKT) done_sending = 0;
    end while (!done_sending || pending != 0);
    traffic_on = 0;
    check(pending == 0, "all hotspot packets delivered");
    for (int i = 0; i < NN; i++) n_sent[i] = 0;

    // ---- part 3: random all-to-all traffic ----
    traffic_on = 1;
    do begin
      @(posedge clk);
      done_sending = 1;
      for (int i = 0; i < NN; i++) if (n_sent[i] < NPKT) done_sending = 0;
    end while (!done_sending || pending != 0);
    traffic_on = 0;
    check(pending == 0, "all packets delivered");
    check(n_ring > 0,      "ring hops happened");
    check(n_tree_up > 0,   "hops up the tree happened");
    check(n_tree_down > 0, "hops down the tree happened");
    check(n_lvl_up > 0,    "crossings to a higher level happened");
    check(n_lvl_down > 0,  "crossings to a lower level happened");
    check(n_bypass > 0,    "bypass happened");
    check(n_buffered > 0,  "receive-buffer waits happened");
    check(n_stall > 0,     "REQ held off by a full receive buffer happened");
    check(n_sb_full > 0,   "full send buffer happened");
    check(n_holdoff > 0,   "local delivery held off");
    $display("packets=%0d cycles=%0d", NN * (NPKT + 3) + 1, cyc);
    $display("ring=%0d tree_up=%0d tree_down=%0d level_up=%0d level_down=%0d",
             n_ring, n_tree_up, n_tree_down, n_lvl_up, n_lvl_down);
    $display("bypass=%0d buffered=%0d rx_stall_cycles=%0d sb_full_cycles=%0d",
             n_bypass, n_buffered, n_stall, n_sb_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
