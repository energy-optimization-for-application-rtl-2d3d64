// rr_arbiter: round-robin arbiter over N requesters.
//
// grant is one-hot among the set bits of req (or zero when req is zero).
// The requester just after the last winner has the highest priority, so
// every requester is served within N rounds. The priority pointer moves
// only when advance is high in a cycle with a grant.
//
// Used by the switch arbiter, one instance per output port. The round-robin
// policy is this design's choice; the description only asks that the switch
// arbitrate each request.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last_q;   // index of the last winner
  logic [IW-1:0] win;
  logic          found;

  always_comb begin
    grant = '0;
    win   = '0;
    found = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(last_q) + k) % N);
      if (!found && req[idx]) begin
        found      = 1'b1;
        win        = IW'(idx);
        grant[idx] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                last_q <= IW'(N-1);
    else if (advance && found) last_q <= win;
  end

endmodule
