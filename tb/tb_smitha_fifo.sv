// tb_smitha_fifo: self-checking test of the send/receive buffer FIFO.
//
// Drives random push/pop traffic (never pushing into a full or popping an
// empty queue) and compares the head word, empty, full and count against a
// queue model kept in the testbench. Also fills the FIFO to DEPTH to see full
// rise exactly at DEPTH entries, and checks simultaneous push and pop on a
// full FIFO.
module tb_smitha_fifo;
  localparam int unsigned W = 16;
  localparam int unsigned D = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push, pop;
  logic [W-1:0] wr_data, rd_data;
  logic empty, full;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  smitha_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (model size %0d, count %0d)", what, model.size(), count);
    end
  endtask

  task automatic step(input bit p, input bit q, input logic [W-1:0] d);
    push = p; pop = q; wr_data = d;
    @(posedge clk);
    if (q) void'(model.pop_front());
    if (p) model.push_back(d);
    #1;
    push = 0; pop = 0;
    check(count == model.size(), "count");
    check(empty == (model.size() == 0), "empty");
    check(full == (model.size() == D), "full");
    if (model.size() > 0) check(rd_data == model[0], "head data");
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;
    check(empty && !full && count == 0, "reset state");
    // fill completely
    for (int i = 0; i < D; i++) step(1, 0, W'(16'hA000 + i));
    check(full, "full after DEPTH pushes");
    // push and pop together while full
    step(1, 1, 16'hBEEF);
    check(full, "still full after push+pop");
    // drain
    while (model.size() > 0) step(0, 1, '0);
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      bit p, q;
      p = ($urandom % 2) && (model.size() < D);
      q = ($urandom % 2) && (model.size() > 0);
      if (model.size() == D && ($urandom % 2)) begin p = 1; q = 1; end
      step(p, q, W'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
