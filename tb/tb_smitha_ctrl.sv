// tb_smitha_ctrl: self-checking test of a node's control logic.
//
// The node is (2,2,1). Six candidate packets (five interfaces and local
// injection) are driven at random, each with a destination picked from a
// table whose correct exit interface was worked out by hand from the
// topology: a neighbour in the ring, a child, the parent, another level, or
// this node itself. Send buffers report full at random and local delivery is
// held off at random. Checked every cycle: a packet is only written to the
// send buffer of the interface it must leave by, never to a full one; each
// output takes at most one packet; every output with room that is wanted
// takes one (no idle cycle while a packet waits); a granted candidate was
// valid; and a candidate kept waiting is served within six cycles of room.
module tb_smitha_ctrl;
  import smitha_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  addr_t here;
  logic [NPORTS:0] cand_valid, cand_grant;
  pkt_t [NPORTS:0] cand_pkt;
  logic [NPORTS-1:0] sb_full, sb_push;
  pkt_t [NPORTS-1:0] sb_pkt;
  logic ej_valid, ej_ready;
  pkt_t ej_pkt;
  int checks = 0, failures = 0;
  int wait_cyc [NPORTS+1];
  int exp_port [NPORTS+1];

  smitha_ctrl dut (.*);

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

  // destinations and the exit each must take from node (2,2,1)
  addr_t dest_tab [9];
  int    port_tab [9];
  initial begin
    dest_tab[0] = mk(2, 2, 2); port_tab[0] = PORT_L;      // left neighbour
    dest_tab[1] = mk(2, 2, 0); port_tab[1] = PORT_R;      // right neighbour
    dest_tab[2] = mk(2, 3, 3); port_tab[2] = PORT_TL;     // left child
    dest_tab[3] = mk(2, 3, 2); port_tab[3] = PORT_TR;     // right child
    dest_tab[4] = mk(2, 1, 0); port_tab[4] = PORT_B;      // parent
    dest_tab[5] = mk(2, 2, 1); port_tab[5] = PORT_LOCAL;  // this node
    dest_tab[6] = mk(3, 1, 1); port_tab[6] = PORT_L;      // level 3: even ring of even level leaves left
    dest_tab[7] = mk(1, 3, 5); port_tab[7] = PORT_R;      // level 1: the other end
    dest_tab[8] = mk(2, 3, 7); port_tab[8] = PORT_TL;     // grandchild side, left
  end

  always @(posedge clk) if (rst_n) begin
    int takers [NPORTS+1];
    for (int o = 0; o <= NPORTS; o++) takers[o] = 0;
    for (int i = 0; i <= NPORTS; i++) begin
      if (cand_grant[i]) begin
        check(cand_valid[i], "grant only to a valid candidate");
        takers[exp_port[i]]++;
        if (exp_port[i] < NPORTS) begin
          check(sb_push[exp_port[i]] && sb_pkt[exp_port[i]] == cand_pkt[i], "packet written to its route's send buffer");
          check(!sb_full[exp_port[i]], "no write into a full send buffer");
        end else begin
          check(ej_valid && ej_pkt == cand_pkt[i] && ej_ready, "packet delivered locally");
        end
        wait_cyc[i] = 0;
      end else if (cand_valid[i]) begin
        bit room;
        room = (exp_port[i] < NPORTS) ? !sb_full[exp_port[i]] : ej_ready;
        if (room) begin
          wait_cyc[i]++;
          check(wait_cyc[i] <= NPORTS + 1, "candidate served within six cycles of room");
        end
      end
    end
    for (int o = 0; o <= NPORTS; o++) begin
      bit wanted, room;
      wanted = 1'b0;
      for (int i = 0; i <= NPORTS; i++) if (cand_valid[i] && exp_port[i] == o) wanted = 1'b1;
      room = (o < NPORTS) ? !sb_full[o] : ej_ready;
      check(takers[o] <= 1, "at most one packet per output");
      check((takers[o] == 1) == (wanted && room), "output with room serves a waiting packet");
      if (o < NPORTS) check(sb_push[o] == (takers[o] == 1), "no stray send-buffer write");
    end
  end

  // candidates persist until granted, as the interfaces keep them
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i <= NPORTS; i++) begin
      if (!cand_valid[i] || cand_grant_q[i]) begin
        cand_valid[i] = ($urandom % 3) != 0;
        begin
          int t;
          t = $urandom % 9;
          cand_pkt[i] = pkt_t'({dest_tab[t], mk(1, 1, i % 2), 8'($urandom)});
          exp_port[i] = port_tab[t];
        end
        wait_cyc[i] = 0;
      end
    end
    sb_full  = NPORTS'($urandom) & NPORTS'($urandom);
    ej_ready = ($urandom % 4) != 0;
  end

  logic [NPORTS:0] cand_grant_q;
  always @(posedge clk) cand_grant_q <= cand_grant;

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    here = mk(2, 2, 1);
    cand_valid = '0; cand_pkt = '0; sb_full = '0; ej_ready = 1'b1;
    for (int i = 0; i <= NPORTS; i++) begin wait_cyc[i] = 0; exp_port[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
