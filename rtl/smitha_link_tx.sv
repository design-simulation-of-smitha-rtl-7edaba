// smitha_link_tx: sending side of a SMITHA interface (temporary send register,
// send busy bit and the sending half of the control logic).
//
// When the send buffer is not empty and the busy bit is clear, the head packet
// is popped into the temporary send register, the busy bit is set and REQ is
// raised. REQ is held until ACK is seen; then the packet is shifted out one
// bit per cycle, most significant bit first, on DATA with CLK high for every
// valid bit. After the last bit the busy bit clears. This follows the
// SMITHA paper's request/acknowledge/serial-transfer sequence; making CLK a
// data strobe sampled with the common system clock, and the bit order, are
// this design's choices.
//
// Timing: REQ rises the cycle after the pop; the first bit appears on DATA
// the cycle after ACK is sampled high; PKT_W bits follow back to back.
module smitha_link_tx
  import smitha_pkg::*;
#(
  parameter int unsigned W = PKT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  // send buffer side
  input  logic         sb_empty,
  input  logic [W-1:0] sb_data,
  output logic         sb_pop,
  // link side
  output link_fwd_t    tx,
  input  logic         ack,
  // status
  output logic         busy,
  output logic         start
);

  typedef enum logic [1:0] {TX_IDLE, TX_REQ, TX_SEND} tx_state_e;

  tx_state_e             state;
  logic [W-1:0]          sreg;
  logic [$clog2(W)-1:0]  cnt;

  assign busy   = (state != TX_IDLE);
  assign sb_pop = (state == TX_IDLE) && !sb_empty;
  assign start  = sb_pop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= TX_IDLE;
      sreg  <= '0;
      cnt   <= '0;
      tx    <= '0;
    end else begin
      tx.clk <= 1'b0;
      unique case (state)
        TX_IDLE: if (sb_pop) begin
          sreg   <= sb_data;
          tx.req <= 1'b1;
          state  <= TX_REQ;
        end
        TX_REQ: if (ack) begin
          tx.req <= 1'b0;
          cnt    <= '0;
          state  <= TX_SEND;
        end
        TX_SEND: begin
          tx.data <= sreg[W-1];
          tx.clk  <= 1'b1;
          sreg    <= sreg << 1;
          cnt     <= cnt + 1'b1;
          if (cnt == $clog2(W)'(W - 1)) state <= TX_IDLE;
        end
        default: state <= TX_IDLE;
      endcase
    end
  end

endmodule
