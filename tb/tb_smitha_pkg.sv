// tb_smitha_pkg: self-checking test of the shared package.
//
// Checks the packet layout (field positions in the 32-bit word, destination
// level in the top four bits), the flat node index of a level (ring r starts
// at 2**r-2) and the rule that picks which ring end carries the link to the
// next level up, against values worked out by hand from the topology.
module tb_smitha_pkg;
  import smitha_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    pkt_t p;
    logic [PKT_W-1:0] w;
    check(PKT_W == 32, "packet is 32 bits");
    // (dst 2,2,1) <- (src 1,2,1), data 25
    p.dst.level = 4'd2; p.dst.ring = 4'd2; p.dst.node = 4'd1;
    p.src.level = 4'd1; p.src.ring = 4'd2; p.src.node = 4'd1;
    p.data = 8'd25;
    w = p;
    check(w == 32'h2211_2119, $sformatf("packet layout %h", w));
    check(w[31:28] == 4'd2, "destination level sent first");
    // flat index inside a level
    check(level_index(1, 0) == 0,  "(1,0) is node 0");
    check(level_index(1, 1) == 1,  "(1,1) is node 1");
    check(level_index(2, 0) == 2,  "(2,0) is node 2");
    check(level_index(2, 3) == 5,  "(2,3) is node 5");
    check(level_index(3, 0) == 6,  "(3,0) is node 6");
    check(level_index(3, 7) == 13, "(3,7) is node 13");
    // level 1 to 2: odd rings on the left, even rings on the right
    check(up_side_left(4'd1, 4'd1) == 1'b1, "level 1 ring 1 goes up on the left");
    check(up_side_left(4'd1, 4'd2) == 1'b0, "level 1 ring 2 goes up on the right");
    check(up_side_left(4'd1, 4'd3) == 1'b1, "level 1 ring 3 goes up on the left");
    // level 2 to 3: odd rings on the right, even rings on the left
    check(up_side_left(4'd2, 4'd1) == 1'b0, "level 2 ring 1 goes up on the right");
    check(up_side_left(4'd2, 4'd2) == 1'b1, "level 2 ring 2 goes up on the left");
    check(up_side_left(4'd2, 4'd3) == 1'b0, "level 2 ring 3 goes up on the right");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
