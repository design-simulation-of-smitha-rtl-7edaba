// smitha_link_rx: receiving side of a SMITHA interface (temporary receive
// register, receive busy bit and the receiving half of the control logic).
//
// While idle, a REQ from the neighbour is answered when the receive buffer is
// not full: the busy bit is set and ACK is driven high for one cycle. While
// REQ waits on a full receive buffer, `stall` is high. Once acknowledged, one
// bit of DATA is shifted into the temporary receive register on every cycle
// that CLK is high; after PKT_W bits the busy bit clears and `done` pulses for
// one cycle with the packet on `pkt`. The full-buffer test and the ACK follow
// the SMITHA paper; the one-cycle ACK pulse and the bit order are this design's.
//
// Timing: ACK is registered, one cycle after REQ is seen; `done` is high in
// the cycle after the last data bit is sampled.
module smitha_link_rx
  import smitha_pkg::*;
#(
  parameter int unsigned W = PKT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  // link side
  input  link_fwd_t    rx,
  output logic         ack,
  // receive buffer side
  input  logic         rb_full,
  output logic         done,
  output logic [W-1:0] pkt,
  // status
  output logic         busy,
  output logic         stall
);

  logic                  recv;
  logic [$clog2(W)-1:0]  cnt;

  assign busy  = recv;
  assign stall = !recv && rx.req && rb_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      recv <= 1'b0;
      ack  <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
      pkt  <= '0;
    end else begin
      ack  <= 1'b0;
      done <= 1'b0;
      if (!recv) begin
        if (rx.req && !rb_full && !ack && !done) begin
          ack  <= 1'b1;
          recv <= 1'b1;
          cnt  <= '0;
        end
      end else if (rx.clk) begin
        pkt <= {pkt[W-2:0], rx.data};
        cnt <= cnt + 1'b1;
        if (cnt == $clog2(W)'(W - 1)) begin
          recv <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
