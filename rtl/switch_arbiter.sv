// switch_arbiter: the arbiter of a switch in normal mode.
//
// Each input buffer whose oldest flit is a packet head requests the output
// its route names (req / req_out). For every free output a round-robin
// arbiter picks one requester and locks the output to it; the lock is a
// register, so the head flit leaves one cycle after it first requested
// (one arbitration cycle per hop). While an output is locked the owner's
// flits cross whenever the owner's buffer holds a flit and the downstream
// buffer has room (out_ready); the flit marked tail releases the lock
// (wormhole switching). grant tells each input buffer to pop, and
// sel / sel_valid form the crossbar configuration ("select" to "config").
//
// en = 0 blocks new locks; the switch lowers it outside normal mode and in
// the cycle it changes mode. busy reports that some output is locked.
//
// The request/grant structure and the select path to the crossbar follow
// the five-port router of the design; wormhole locks, round-robin priority
// and the one-cycle arbitration stage are this design's own choices.
module switch_arbiter
  import noc_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           en,
  input  logic [NPORTS-1:0]              in_valid,   // buffer not empty
  input  logic [NPORTS-1:0]              in_head,    // oldest flit is a head
  input  logic [NPORTS-1:0]              in_tail,    // oldest flit is a tail
  input  logic [NPORTS-1:0][PORT_W-1:0]  req_out,    // route of the head flit
  input  logic [NPORTS-1:0]              out_ready,  // downstream has room
  output logic [NPORTS-1:0]              grant,      // pop this input now
  output logic [NPORTS-1:0][PORT_W-1:0]  sel,        // crossbar config per output
  output logic [NPORTS-1:0]              sel_valid,  // output carries a flit now
  output logic                           busy
);

  logic [NPORTS-1:0]             locked_q;
  logic [NPORTS-1:0][PORT_W-1:0] owner_q;
  logic [NPORTS-1:0]             owns;        // input p owns some output
  logic [NPORTS-1:0][NPORTS-1:0] cand;        // [output][input]
  logic [NPORTS-1:0][NPORTS-1:0] win;         // [output][input]

  assign busy = |locked_q;

  always_comb begin
    owns = '0;
    for (int o = 0; o < NPORTS; o++)
      if (locked_q[o]) owns[owner_q[o]] = 1'b1;
  end

  always_comb begin
    for (int o = 0; o < NPORTS; o++)
      for (int p = 0; p < NPORTS; p++)
        cand[o][p] = en && !locked_q[o] && in_valid[p] && in_head[p] && !owns[p]
                     && (req_out[p] == PORT_W'(o));
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_rr
    rr_arbiter #(.N(NPORTS)) u_rr (
      .clk    (clk),
      .rst_n  (rst_n),
      .req    (cand[o]),
      .advance(1'b1),
      .grant  (win[o])
    );
  end

  // Transfers of locked outputs.
  always_comb begin
    grant     = '0;
    sel       = owner_q;
    sel_valid = '0;
    for (int o = 0; o < NPORTS; o++) begin
      if (locked_q[o] && in_valid[owner_q[o]] && out_ready[o]) begin
        sel_valid[o]          = 1'b1;
        grant[owner_q[o]]     = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked_q <= '0;
      owner_q  <= '0;
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        if (locked_q[o]) begin
          if (sel_valid[o] && in_tail[owner_q[o]]) locked_q[o] <= 1'b0;
        end else if (|win[o]) begin
          locked_q[o] <= 1'b1;
          for (int p = 0; p < NPORTS; p++)
            if (win[o][p]) owner_q[o] <= PORT_W'(p);
        end
      end
    end
  end

  // An input never owns two outputs, and a grant is never given twice.
  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(sel_valid) == $countones(grant));

endmodule
