// multi_mode_switch: five-port wormhole switch with three operating modes.
//
// Normal mode: every port's input buffer is in use; the head flit of each
// buffer computes its output (XY routing), the arbiter locks that output to
// one input and the flits cross the crossbar to the neighbour's buffer.
// Lease-line mode: the switch passes flits along fixed lease lines, each
// joining one input buffer to one output (cfg.lease_en / cfg.lease_src per
// output; several lines may be active at once). No route is computed, no
// arbitration takes place and the crossbar is not used; buffers that feed
// no lease line refuse flits. Off mode: the switch accepts and sends
// nothing; in silicon its clock and supply would be cut.
//
// Mode changes: the controller presents the wanted configuration on
// mode_cmd. The switch adopts it at a packet boundary, so no packet is cut:
//   to NORMAL: no packet is part-way along a lease line;
//   to OFF:    no locked output, no packet on a lease line, all buffers empty;
//   to LEASE:  as for OFF, except that a buffer feeding a new lease line may
//              hold whole packets, provided its head flit routes to that
//              line's output.
// In the cycle the switch adopts a configuration it moves no flit.
// mode_pending is high while mode_cmd differs from the adopted cfg.
//
// Interface: per port a flit, a valid and a ready. A flit moves in a cycle
// where valid and ready are both high; out_valid is raised only when
// out_ready is high. in_ready depends only on registers.
// Timing: a head flit spends two cycles per hop in normal mode (buffer,
// then arbitration and crossbar) and one cycle in lease-line mode; body
// flits move one per cycle in both modes.
//
// The three modes and the lease lines that bypass arbiter and crossbar
// follow the design description. The packet-boundary rule for mode changes,
// the valid/ready links and XY routing are this design's own choices.
module multi_mode_switch
  import noc_pkg::*;
#(
  parameter int unsigned       BUF_DEPTH = 4,
  parameter logic [COORD_W-1:0] MY_X     = '0,
  parameter logic [COORD_W-1:0] MY_Y     = '0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // links, indexed by port_e
  input  flit_t [NPORTS-1:0]      in_flit,
  input  logic  [NPORTS-1:0]      in_valid,
  output logic  [NPORTS-1:0]      in_ready,
  output flit_t [NPORTS-1:0]      out_flit,
  output logic  [NPORTS-1:0]      out_valid,
  input  logic  [NPORTS-1:0]      out_ready,
  // mode control
  input  mode_cfg_t               mode_cmd,
  output mode_cfg_t               cfg,
  output logic                    mode_pending
);

  mode_cfg_t cfg_q;
  assign cfg = cfg_q;

  logic is_normal, is_lease;
  assign is_normal = (cfg_q.mode == MODE_NORMAL);
  assign is_lease  = (cfg_q.mode == MODE_LEASE);

  // ---------------------------------------------------------------- buffers
  flit_t [NPORTS-1:0]             front;
  logic  [NPORTS-1:0]             empty, full, pop, port_on;
  logic  [NPORTS-1:0][PORT_W-1:0] route;
  logic  [NPORTS-1:0]             head, tail;

  // Which inputs feed a lease line in the current configuration.
  always_comb begin
    port_on = '0;
    if (is_normal) port_on = '1;
    else if (is_lease)
      for (int d = 0; d < NPORTS; d++)
        if (cfg_q.lease_en[d]) port_on[cfg_q.lease_src[d]] = 1'b1;
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_buf
    assign in_ready[p] = port_on[p] && !full[p];

    flit_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
      .clk    (clk),
      .rst_n  (rst_n),
      .wr_en  (in_valid[p] && in_ready[p]),
      .wr_data(in_flit[p]),
      .rd_en  (pop[p]),
      .rd_data(front[p]),
      .empty  (empty[p]),
      .full   (full[p])
    );

    assign route[p] = xy_route(MY_X, MY_Y, front[p].dst_x, front[p].dst_y);
    assign head[p]  = is_head(front[p].ftype);
    assign tail[p]  = is_tail(front[p].ftype);
  end

  // ------------------------------------------------------------ mode change
  logic [NPORTS-1:0]             lease_busy_q;  // packet part-way on a lease line from input p
  logic [NPORTS-1:0]             cmd_src;       // input p feeds a line in mode_cmd
  logic [NPORTS-1:0][PORT_W-1:0] cmd_dst;       // ... and that line's output
  logic                          arb_busy, apply, can_apply;

  always_comb begin
    cmd_src = '0;
    cmd_dst = '0;
    for (int d = 0; d < NPORTS; d++)
      if (mode_cmd.lease_en[d]) begin
        cmd_src[mode_cmd.lease_src[d]] = 1'b1;
        cmd_dst[mode_cmd.lease_src[d]] = PORT_W'(d);
      end
  end

  always_comb begin
    can_apply = 1'b0;
    unique case (mode_cmd.mode)
      MODE_NORMAL: can_apply = !(|lease_busy_q);
      MODE_OFF:    can_apply = !(|lease_busy_q) && !arb_busy && (&empty);
      MODE_LEASE: begin
        can_apply = !(|lease_busy_q) && !arb_busy;
        for (int p = 0; p < NPORTS; p++)
          if (!empty[p] && !(cmd_src[p] && route[p] == cmd_dst[p])) can_apply = 1'b0;
      end
      default:     can_apply = 1'b0;
    endcase
  end

  assign mode_pending = (mode_cmd != cfg_q);
  assign apply        = mode_pending && can_apply;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cfg_q <= CFG_NORMAL;
    else if (apply) cfg_q <= mode_cmd;
  end

  // ------------------------------------------------ normal mode: arbiter + crossbar
  logic  [NPORTS-1:0]             grant, sel_valid, xb_valid;
  logic  [NPORTS-1:0][PORT_W-1:0] sel;
  flit_t [NPORTS-1:0]             xb_flit;

  switch_arbiter u_arb (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (is_normal && !apply),
    .in_valid (~empty & {NPORTS{is_normal}}),
    .in_head  (head),
    .in_tail  (tail),
    .req_out  (route),
    .out_ready(out_ready),
    .grant    (grant),
    .sel      (sel),
    .sel_valid(sel_valid),
    .busy     (arb_busy)
  );

  crossbar u_xbar (
    .in_flit  (front),
    .sel      (sel),
    .sel_valid(sel_valid),
    .out_flit (xb_flit),
    .out_valid(xb_valid)
  );

  // ----------------------------------------------------- lease-line mode
  logic  [NPORTS-1:0] ll_valid, ll_pop;
  flit_t [NPORTS-1:0] ll_flit;

  always_comb begin
    ll_pop = '0;
    for (int d = 0; d < NPORTS; d++) begin
      ll_flit[d]  = front[cfg_q.lease_src[d]];
      ll_valid[d] = is_lease && !apply && cfg_q.lease_en[d]
                    && !empty[cfg_q.lease_src[d]] && out_ready[d];
      if (ll_valid[d]) ll_pop[cfg_q.lease_src[d]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lease_busy_q <= '0;
    else
      for (int p = 0; p < NPORTS; p++)
        if (ll_pop[p]) lease_busy_q[p] <= !tail[p];
  end

  // ---------------------------------------------------------------- outputs
  always_comb begin
    for (int d = 0; d < NPORTS; d++) begin
      if (is_lease) begin
        out_flit[d]  = ll_flit[d];
        out_valid[d] = ll_valid[d];
      end else begin
        out_flit[d]  = xb_flit[d];
        out_valid[d] = xb_valid[d] && is_normal;
      end
    end
    pop = is_lease ? ll_pop : (grant & {NPORTS{is_normal}});
  end

  // A flit is sent only where the neighbour takes it.
  a_out_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid & ~out_ready) == '0);
  // A lease line carries only packets whose route is its own output.
  for (genvar d = 0; d < NPORTS; d++) begin : g_chk
    a_lease_route: assert property (@(posedge clk) disable iff (!rst_n)
      (ll_valid[d] && head[cfg_q.lease_src[d]]) |-> route[cfg_q.lease_src[d]] == PORT_W'(d));
  end

endmodule
