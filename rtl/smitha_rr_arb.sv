// smitha_rr_arb: round-robin arbiter used by the node control logic.
//
// Grants at most one of N requesters per cycle, when `en` is high, searching
// from the requester after the last one granted so that every requester is
// served within N grants. gnt is one-hot or zero and combinational in req;
// the priority pointer moves only on a grant.
module smitha_rr_arb #(
  parameter int unsigned N = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);

  logic [$clog2(N)-1:0] last;   // index granted most recently
  logic [$clog2(N)-1:0] pick;
  logic                 found;

  always_comb begin
    gnt   = '0;
    found = 1'b0;
    pick  = last;
    for (int unsigned i = 1; i <= N; i++) begin
      logic [$clog2(N):0] idx;
      idx = {1'b0, last} + ($clog2(N)+1)'(i);
      if (idx >= ($clog2(N)+1)'(N)) idx = idx - ($clog2(N)+1)'(N);
      if (!found && req[idx[$clog2(N)-1:0]]) begin
        found = 1'b1;
        pick  = idx[$clog2(N)-1:0];
      end
    end
    if (en && found) gnt[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            last <= $clog2(N)'(N - 1);
    else if (en && found)  last <= pick;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
