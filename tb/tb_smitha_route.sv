// tb_smitha_route: self-checking test of the routing logic.
//
// For every pair of nodes of a 3-level, 3-ring network it walks a packet hop
// by hop with the routing logic, following the chosen interface to the
// neighbouring node with a topology model written independently here (ring
// chains, tree links, inter-level links at the ring ends). It checks that each
// hop uses an interface that exists, that the packet reaches its destination
// within a hop bound, and that the SMITHA paper's example route
// (1,2,1) -> (1,2,0) -> (2,2,0) -> (2,2,1) is reproduced exactly.
module tb_smitha_route;
  import smitha_pkg::*;

  localparam int LEVELS = 3;
  localparam int RINGS  = 3;

  addr_t cur, dst;
  port_e port;
  int checks = 0, failures = 0;

  smitha_route dut (.cur, .dst, .port);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s cur=(%0d,%0d,%0d) dst=(%0d,%0d,%0d) port=%0d", what,
               cur.level, cur.ring, cur.node, dst.level, dst.ring, dst.node, port);
    end
  endtask

  // neighbour of node a through interface p; ok=0 when nothing is attached
  function automatic addr_t neighbour(input addr_t a, input port_e p, output bit ok);
    int l = a.level, r = a.ring, k = a.node;
    int last = (1 << r) - 1;
    addr_t n = a;
    ok = 1;
    case (p)
      PORT_L: if (k < last) n.node = NODE_W'(k + 1);
              else begin
                // left end: joined to level l+1 if (l%2==r%2), else to l-1
                if ((l % 2) == (r % 2)) begin ok = (l < LEVELS); n.level = LEV_W'(l + 1); end
                else begin ok = (l > 1); n.level = LEV_W'(l - 1); end
              end
      PORT_R: if (k > 0) n.node = NODE_W'(k - 1);
              else begin
                if ((l % 2) != (r % 2)) begin ok = (l < LEVELS); n.level = LEV_W'(l + 1); end
                else begin ok = (l > 1); n.level = LEV_W'(l - 1); end
              end
      PORT_TL: begin ok = (r < RINGS); n.ring = RING_W'(r + 1); n.node = NODE_W'(2 * k + 1); end
      PORT_TR: begin ok = (r < RINGS); n.ring = RING_W'(r + 1); n.node = NODE_W'(2 * k); end
      PORT_B:  begin ok = (r > 1); n.ring = RING_W'(r - 1); n.node = NODE_W'(k / 2); end
      default: ok = 0;
    endcase
    return n;
  endfunction

  function automatic addr_t mk(input int l, input int r, input int k);
    addr_t a;
    a.level = LEV_W'(l); a.ring = RING_W'(r); a.node = NODE_W'(k);
    return a;
  endfunction

  initial begin
    int longest = 0;
    // SMITHA paper's example route
    begin
      addr_t path [4];
      path[0] = mk(1, 2, 1); path[1] = mk(1, 2, 0); path[2] = mk(2, 2, 0); path[3] = mk(2, 2, 1);
      dst = path[3];
      for (int h = 0; h < 3; h++) begin
        bit ok;
        cur = path[h];
        #1;
        check(neighbour(cur, port, ok) == path[h + 1] && ok, "example route hop");
      end
      cur = path[3];
      #1;
      check(port == PORT_LOCAL, "example route delivery");
    end
    // all pairs
    for (int sl = 1; sl <= LEVELS; sl++)
    for (int sr = 1; sr <= RINGS; sr++)
    for (int sk = 0; sk < (1 << sr); sk++)
    for (int dl = 1; dl <= LEVELS; dl++)
    for (int dr = 1; dr <= RINGS; dr++)
    for (int dk = 0; dk < (1 << dr); dk++) begin
      int hops;
      bit ok;
      hops = 0;
      ok = 1;
      cur = mk(sl, sr, sk);
      dst = mk(dl, dr, dk);
      #1;
      while (port != PORT_LOCAL && ok && hops < 64) begin
        // climbing the tree towards a child that is the destination's
        // ancestor must pick that child
        if (cur.level == dst.level && dst.ring > cur.ring) begin
          int anc;
          anc = dst.node >> (dst.ring - cur.ring - 1);
          if ((anc >> 1) == cur.node)
            check(port == ((anc % 2) ? PORT_TL : PORT_TR), "climbs to the destination's ancestor");
        end
        cur = neighbour(cur, port, ok);
        hops++;
        #1;
      end
      check(ok, "route uses an existing link");
      check(cur == dst && port == PORT_LOCAL, "route reaches destination");
      if (hops > longest) longest = hops;
    end
    $display("longest route: %0d hops", longest);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
