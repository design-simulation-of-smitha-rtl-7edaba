// tb_smitha_node: self-checking test of one SMITHA node, (2,2,1).
//
// Each of the node's five interfaces is faced by a neighbour model built from
// a sending side and a receiving side, as a neighbouring node's interface
// would be. Packets enter from the neighbours and from the local port, with
// destinations from a table whose correct exit was worked out by hand from
// the topology. Every packet must leave by the right interface or be
// delivered locally, intact and exactly once. Neighbours' receive buffers
// report full at random and local delivery is held off at random, so packets
// back up inside the node. Every interface must send and receive.
module tb_smitha_node;
  import smitha_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  link_fwd_t [NPORTS-1:0] n_tx, n_rx;
  logic [NPORTS-1:0] n_tx_ack, n_rx_ack;
  logic inj_valid, inj_ready, ej_valid, ej_ready;
  pkt_t inj_pkt, ej_pkt;
  logic [NPORTS-1:0] busy;
  node_ev_t ev;
  int checks = 0, failures = 0;

  smitha_node #(.LEVEL(2), .RING(2), .NODE(1), .SB_DEPTH(4), .RB_DEPTH(4)) dut (
    .clk, .rst_n, .tx(n_tx), .tx_ack(n_tx_ack), .rx(n_rx), .rx_ack(n_rx_ack),
    .inj_valid, .inj_pkt, .inj_ready, .ej_valid, .ej_pkt, .ej_ready, .busy, .ev);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic addr_t mk(input int l, input int r, input int k);
    addr_t a;
    a.level = LEV_W'(l); a.ring = RING_W'(r); a.node = NODE_W'(k);
    return a;
  endfunction

  addr_t dest_tab [8];
  int    port_tab [8];
  initial begin
    dest_tab[0] = mk(2, 2, 3); port_tab[0] = PORT_L;
    dest_tab[1] = mk(2, 2, 0); port_tab[1] = PORT_R;
    dest_tab[2] = mk(2, 3, 3); port_tab[2] = PORT_TL;
    dest_tab[3] = mk(2, 3, 2); port_tab[3] = PORT_TR;
    dest_tab[4] = mk(2, 1, 1); port_tab[4] = PORT_B;
    dest_tab[5] = mk(2, 2, 1); port_tab[5] = PORT_LOCAL;
    dest_tab[6] = mk(3, 3, 0); port_tab[6] = PORT_L;
    dest_tab[7] = mk(1, 1, 0); port_tab[7] = PORT_R;
  end

  // expected packets per exit (0..4 interfaces, 5 local)
  pkt_t expect_q [NPORTS+1][$];
  int   n_out [NPORTS+1];
  int   n_in  [NPORTS+1];
  int   pending = 0;
  localparam int NPKT = 60;   // per source

  // neighbour models
  pkt_t nb_q [NPORTS][$];
  logic [NPORTS-1:0] nb_empty, nb_pop, nb_rb_full, nb_done;
  pkt_t [NPORTS-1:0] nb_head, nb_pkt;
  logic [NPORTS-1:0] nb_busy_t, nb_busy_r, nb_stall, nb_start;
  bit   [NPORTS-1:0] pop_pending;

  for (genvar p = 0; p < NPORTS; p++) begin : g_nb
    assign nb_empty[p] = (nb_q[p].size() == 0);
    assign nb_head[p]  = nb_empty[p] ? '0 : nb_q[p][0];
    smitha_link_tx u_tx (.clk, .rst_n, .sb_empty(nb_empty[p]), .sb_data(nb_head[p]),
                         .sb_pop(nb_pop[p]), .tx(n_rx[p]), .ack(n_rx_ack[p]),
                         .busy(nb_busy_t[p]), .start(nb_start[p]));
    smitha_link_rx u_rx (.clk, .rst_n, .rx(n_tx[p]), .ack(n_tx_ack[p]), .rb_full(nb_rb_full[p]),
                         .done(nb_done[p]), .pkt(nb_pkt[p]), .busy(nb_busy_r[p]), .stall(nb_stall[p]));
  end

  task automatic expect_pkt(input int port, input pkt_t p);
    expect_q[port].push_back(p);
    pending++;
  endtask

  task automatic got_pkt(input int port, input pkt_t p);
    int idx [$];
    idx = expect_q[port].find_first_index(x) with (x == p);
    check(idx.size() == 1, $sformatf("packet leaves by interface %0d as routed", port));
    if (idx.size() == 1) begin
      expect_q[port].delete(idx[0]);
      pending--;
    end
    n_out[port]++;
  endtask

  function automatic pkt_t new_pkt(input int src, output int port);
    int t;
    t = $urandom % 8;
    port = port_tab[t];
    return pkt_t'({dest_tab[t], mk(2, 2, src), 8'($urandom)});
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (nb_pop[p]) pop_pending[p] = 1'b1;
      if (nb_done[p]) got_pkt(p, nb_pkt[p]);
    end
    if (ej_valid) begin
      check(ej_ready, "delivery only while ready");
      got_pkt(NPORTS, ej_pkt);
    end
    if (inj_valid && inj_ready) inj_valid <= 1'b0;
  end

  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (pop_pending[p]) begin void'(nb_q[p].pop_front()); pop_pending[p] = 1'b0; end
      if (n_in[p] < NPKT && nb_q[p].size() < 2 && ($urandom % 8 == 0)) begin
        int port;
        pkt_t pk;
        pk = new_pkt(p + 8, port);
        // a packet does not go back where it came from
        if (port != p) begin
          nb_q[p].push_back(pk);
          expect_pkt(port, pk);
          n_in[p]++;
        end
      end
      nb_rb_full[p] = ($urandom % 3) == 0;
    end
    if (!inj_valid && n_in[NPORTS] < NPKT && ($urandom % 4 == 0)) begin
      int port;
      inj_pkt = new_pkt(1, port);
      inj_valid = 1'b1;
      expect_pkt(port, inj_pkt);
      n_in[NPORTS]++;
    end
    ej_ready = ($urandom % 3) != 0;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int all_in;
    inj_valid = 0; inj_pkt = '0; ej_ready = 1; nb_rb_full = '0; pop_pending = '0;
    for (int p = 0; p <= NPORTS; p++) begin n_out[p] = 0; n_in[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do begin
      @(posedge clk);
      all_in = 1;
      for (int p = 0; p <= NPORTS; p++) if (n_in[p] < NPKT) all_in = 0;
    end while (!all_in || pending != 0);
    repeat (100) @(posedge clk);
    check(pending == 0, "every packet left the node");
    for (int p = 0; p <= NPORTS; p++) check(n_out[p] > 0, $sformatf("exit %0d used", p));
    check(busy == '0, "node idle at the end");
    $display("out per exit: %0d %0d %0d %0d %0d local %0d", n_out[0], n_out[1], n_out[2], n_out[3], n_out[4], n_out[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
