// tb_smitha_link: self-checking test of one serial link, a sending side
// (smitha_link_tx) wired to a receiving side (smitha_link_rx).
//
// A queue in the testbench plays the send buffer and hands the sender random
// packets; the receiver's `done` packets are compared with them in order. The
// receive buffer's full flag is driven at random to check that no ACK is
// given while it is high (a stall) and that the transfer then waits. For an
// unstalled transfer the latency from the pop to `done` must be exactly
// PKT_W + 3 cycles (one more when the
// receiver is just finishing the previous packet): REQ registered, ACK registered, the sender's first
// registered bit, then one bit per cycle. Busy bits are checked against the
// phases of the exchange.
module tb_smitha_link;
  import smitha_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sb_empty, sb_pop, ack, tx_busy, start;
  logic [PKT_W-1:0] sb_data, pkt;
  link_fwd_t wire_fwd;
  logic rb_full, done, rx_busy, stall;
  int checks = 0, failures = 0;
  int stalls = 0, acks_while_full = 0;
  logic [PKT_W-1:0] to_send [$], in_flight [$];
  longint t_pop [$];
  longint cyc = 0;

  smitha_link_tx u_tx (.clk, .rst_n, .sb_empty, .sb_data, .sb_pop,
                       .tx(wire_fwd), .ack, .busy(tx_busy), .start);
  smitha_link_rx u_rx (.clk, .rst_n, .rx(wire_fwd), .ack, .rb_full, .done, .pkt,
                       .busy(rx_busy), .stall);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  assign sb_empty = (to_send.size() == 0);
  assign sb_data  = sb_empty ? '0 : to_send[0];

  bit stall_phase;
  logic full_q = 1'b0;
  bit pop_pending = 1'b0;

  // the testbench's send buffer changes only between clock edges
  always @(negedge clk) if (pop_pending) begin
    void'(to_send.pop_front());
    pop_pending = 1'b0;
  end
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ack) check(!full_q, "ACK only when receive buffer not full");
    full_q <= rb_full;
    if (stall) stalls++;
    if (sb_pop) begin
      in_flight.push_back(to_send[0]);
      // a receiver still finishing the previous packet delays ACK one cycle
      t_pop.push_back((!rx_busy && !done) ? cyc : cyc + 1);
      pop_pending = 1'b1;
    end
    if (done) begin
      longint lat;
      check(in_flight.size() > 0, "done without a packet in flight");
      if (in_flight.size() > 0) begin
        check(pkt == in_flight[0], "received packet equals sent packet");
        lat = cyc - t_pop[0];
        // seen here one edge after `done` rises, so PKT_W + 3 plus one
        if (!stall_phase) check(lat == PKT_W + 4, $sformatf("latency %0d, expected %0d", lat - 1, PKT_W + 3));
        void'(in_flight.pop_front());
        void'(t_pop.pop_front());
      end
    end
    if (wire_fwd.clk) check(rx_busy, "receive busy bit set while bits arrive");
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rb_full = 1'b0;
    stall_phase = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // phase 1: unstalled back-to-back packets, fixed latency
    for (int i = 0; i < 20; i++) to_send.push_back({$urandom, $urandom});
    to_send.push_back('1);
    to_send.push_back('0);
    wait (to_send.size() == 0 && in_flight.size() == 0);
    repeat (5) @(posedge clk);
    check(!tx_busy && !rx_busy, "busy bits clear when idle");
    // phase 2: receive buffer full at random
    stall_phase = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 40; i++) to_send.push_back({$urandom, $urandom});
    while (to_send.size() != 0 || in_flight.size() != 0) begin
      @(negedge clk);
      rb_full = ($urandom % 4) != 0;
    end
    rb_full = 1'b0;
    check(stalls > 0, "a REQ was held off by a full receive buffer");
    $display("stall cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
