// smitha_fifo: the send buffer and the receive buffer of a SMITHA interface.
//
// A synchronous first-in first-out queue of DEPTH words, written as a
// register array with read and write pointers and an occupancy count. The
// head word is always visible on rd_data while empty is low (show-ahead).
// push and pop may happen in the same cycle, also when the queue is full.
// A push into a full queue or a pop from an empty one is a protocol error and
// is flagged by assertions. The SMITHA paper names the two buffers and their
// full/empty tests; their depth (8, matching the 4-bit receive count of the
// SMITHA paper's waveform) and organisation are this design's choice.
//
// Timing: a pushed word is visible at the head one cycle later.
module smitha_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;

  assign empty   = (count == '0);
  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= incr(wp);
      if (pop)  rp <= incr(rp);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop  |-> !empty);

endmodule
