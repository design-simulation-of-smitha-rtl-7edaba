// smitha_ctrl: control logic of a SMITHA node.
//
// Every cycle it takes the candidate packet of each of the five interfaces
// (a packet waiting in, or just arriving at, its receive buffer) and the
// packet offered by the local processing element, asks the routing logic for
// each packet's next interface, and moves a packet into that interface's send
// buffer only if the send buffer is not full, as the SMITHA paper's control logic
// does. Packets for this node go to the local delivery port, which may hold
// them off with `ej_ready`. When several packets want the same output in one
// cycle a round-robin arbiter per output picks one (the SMITHA paper does not say
// how such conflicts are settled); the losers stay where they are.
//
// All of it is combinational except the arbiter pointers: a grant and the
// send-buffer write happen in the same cycle.
module smitha_ctrl
  import smitha_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  addr_t                here,
  // candidates: 0..4 the interfaces (port_e order), 5 the local injection
  input  logic [NPORTS:0]      cand_valid,
  input  pkt_t  [NPORTS:0]     cand_pkt,
  output logic  [NPORTS:0]     cand_grant,
  // send buffer write ports of the five interfaces
  input  logic  [NPORTS-1:0]   sb_full,
  output logic  [NPORTS-1:0]   sb_push,
  output pkt_t  [NPORTS-1:0]   sb_pkt,
  // local delivery
  output logic                 ej_valid,
  output pkt_t                 ej_pkt,
  input  logic                 ej_ready
);

  localparam int unsigned NIN = NPORTS + 1;

  port_e              dest [NIN];
  logic [NIN-1:0]     req  [NIN];   // req[out][in]
  logic [NIN-1:0]     gnt  [NIN];
  logic [NIN-1:0]     room;

  for (genvar i = 0; i < NIN; i++) begin : g_route
    smitha_route u_route (.cur(here), .dst(cand_pkt[i].dst), .port(dest[i]));
  end

  assign room = {ej_ready, ~sb_full};

  for (genvar o = 0; o < NIN; o++) begin : g_out
    for (genvar i = 0; i < NIN; i++) begin : g_req
      assign req[o][i] = cand_valid[i] && (dest[i] == port_e'(o));
    end
    smitha_rr_arb #(.N(NIN)) u_arb (
      .clk, .rst_n, .en(room[o]), .req(req[o]), .gnt(gnt[o])
    );
  end

  always_comb begin
    cand_grant = '0;
    sb_push    = '0;
    sb_pkt     = '0;
    ej_valid   = 1'b0;
    ej_pkt     = '0;
    for (int o = 0; o < NIN; o++) begin
      for (int i = 0; i < NIN; i++) begin
        if (gnt[o][i]) begin
          cand_grant[i] = 1'b1;
          if (o < NPORTS) begin
            sb_push[o] = 1'b1;
            sb_pkt[o]  = cand_pkt[i];
          end else begin
            ej_valid = 1'b1;
            ej_pkt   = cand_pkt[i];
          end
        end
      end
    end
  end

endmodule
