// noc_top: application-specific mesh NoC built from multi-mode switches.
//
// MESH_X x MESH_Y switches form a 2-D mesh; switch (x, y) has index
// n = y*MESH_X + x, its east port faces (x+1, y) and its north port faces
// (x, y+1). Each switch's local port (I) is brought out as the network
// interface of the core at that node. The global controller holds the
// switch-mode table and drives every switch's mode over its own mode-select
// line; with the controller never started, all switches stay in normal
// mode and the NoC is a plain wormhole mesh.
//
// Usage: load the table through tbl_*, pulse start at the beginning of the
// application's execution, inject packets on local_in_*. Flits leave on
// local_out_* at the destination node. Links at the mesh boundary are left
// unconnected (no flit is ever routed onto them by XY routing).
//
// Timing: per hop a head flit takes two cycles through a normal-mode switch
// and one through a lease-line switch; mode changes take effect one cycle
// after the table period begins, at the next packet boundary of the switch.
//
// The 3x3 mesh of nine switches, the per-switch modes and the global
// controller with its table follow the design description; link protocol,
// node numbering and boundary handling are this design's own choices.
module noc_top
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X    = 3,
  parameter int unsigned MESH_Y    = 3,
  parameter int unsigned BUF_DEPTH = 4,
  parameter int unsigned SMT_DEPTH = 16,
  localparam int unsigned NN       = MESH_X * MESH_Y
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // core network interfaces, indexed by node
  input  flit_t [NN-1:0]                 local_in_flit,
  input  logic  [NN-1:0]                 local_in_valid,
  output logic  [NN-1:0]                 local_in_ready,
  output flit_t [NN-1:0]                 local_out_flit,
  output logic  [NN-1:0]                 local_out_valid,
  input  logic  [NN-1:0]                 local_out_ready,
  // switch-mode table load port
  input  logic                           tbl_we,
  input  logic [$clog2(NN)-1:0]          tbl_sw,
  input  logic [$clog2(SMT_DEPTH)-1:0]   tbl_idx,
  input  smt_entry_t                     tbl_entry,
  // execution control and status
  input  logic                           start,
  output logic                           running,
  output logic [TIME_W-1:0]              now,
  output mode_cfg_t [NN-1:0]             sw_cfg,
  output logic  [NN-1:0]                 sw_pending
);

  flit_t [NPORTS-1:0] s_in_flit   [NN];
  logic  [NPORTS-1:0] s_in_valid  [NN];
  logic  [NPORTS-1:0] s_in_ready  [NN];
  flit_t [NPORTS-1:0] s_out_flit  [NN];
  logic  [NPORTS-1:0] s_out_valid [NN];
  logic  [NPORTS-1:0] s_out_ready [NN];
  mode_cfg_t [NN-1:0] mode_cmd;

  global_controller #(.NSW(NN), .DEPTH(SMT_DEPTH)) u_gc (
    .clk      (clk),
    .rst_n    (rst_n),
    .tbl_we   (tbl_we),
    .tbl_sw   (tbl_sw),
    .tbl_idx  (tbl_idx),
    .tbl_entry(tbl_entry),
    .start    (start),
    .running  (running),
    .now      (now),
    .mode_cmd (mode_cmd)
  );

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = y*MESH_X + x;

      // local port
      assign s_in_flit[N][P_LOCAL]   = local_in_flit[N];
      assign s_in_valid[N][P_LOCAL]  = local_in_valid[N];
      assign local_in_ready[N]       = s_in_ready[N][P_LOCAL];
      assign local_out_flit[N]       = s_out_flit[N][P_LOCAL];
      assign local_out_valid[N]      = s_out_valid[N][P_LOCAL];
      assign s_out_ready[N][P_LOCAL] = local_out_ready[N];

      // east neighbour
      if (x + 1 < MESH_X) begin : g_e
        assign s_in_flit[N][P_EAST]   = s_out_flit[N+1][P_WEST];
        assign s_in_valid[N][P_EAST]  = s_out_valid[N+1][P_WEST];
        assign s_out_ready[N][P_EAST] = s_in_ready[N+1][P_WEST];
      end else begin : g_e_edge
        assign s_in_flit[N][P_EAST]   = '0;
        assign s_in_valid[N][P_EAST]  = 1'b0;
        assign s_out_ready[N][P_EAST] = 1'b0;
      end
      // west neighbour
      if (x > 0) begin : g_w
        assign s_in_flit[N][P_WEST]   = s_out_flit[N-1][P_EAST];
        assign s_in_valid[N][P_WEST]  = s_out_valid[N-1][P_EAST];
        assign s_out_ready[N][P_WEST] = s_in_ready[N-1][P_EAST];
      end else begin : g_w_edge
        assign s_in_flit[N][P_WEST]   = '0;
        assign s_in_valid[N][P_WEST]  = 1'b0;
        assign s_out_ready[N][P_WEST] = 1'b0;
      end
      // north neighbour
      if (y + 1 < MESH_Y) begin : g_n
        assign s_in_flit[N][P_NORTH]   = s_out_flit[N+MESH_X][P_SOUTH];
        assign s_in_valid[N][P_NORTH]  = s_out_valid[N+MESH_X][P_SOUTH];
        assign s_out_ready[N][P_NORTH] = s_in_ready[N+MESH_X][P_SOUTH];
      end else begin : g_n_edge
        assign s_in_flit[N][P_NORTH]   = '0;
        assign s_in_valid[N][P_NORTH]  = 1'b0;
        assign s_out_ready[N][P_NORTH] = 1'b0;
      end
      // south neighbour
      if (y > 0) begin : g_s
        assign s_in_flit[N][P_SOUTH]   = s_out_flit[N-MESH_X][P_NORTH];
        assign s_in_valid[N][P_SOUTH]  = s_out_valid[N-MESH_X][P_NORTH];
        assign s_out_ready[N][P_SOUTH] = s_in_ready[N-MESH_X][P_NORTH];
      end else begin : g_s_edge
        assign s_in_flit[N][P_SOUTH]   = '0;
        assign s_in_valid[N][P_SOUTH]  = 1'b0;
        assign s_out_ready[N][P_SOUTH] = 1'b0;
      end

      multi_mode_switch #(
        .BUF_DEPTH(BUF_DEPTH),
        .MY_X     (COORD_W'(x)),
        .MY_Y     (COORD_W'(y))
      ) u_sw (
        .clk         (clk),
        .rst_n       (rst_n),
        .in_flit     (s_in_flit[N]),
        .in_valid    (s_in_valid[N]),
        .in_ready    (s_in_ready[N]),
        .out_flit    (s_out_flit[N]),
        .out_valid   (s_out_valid[N]),
        .out_ready   (s_out_ready[N]),
        .mode_cmd    (mode_cmd[N]),
        .cfg         (sw_cfg[N]),
        .mode_pending(sw_pending[N])
      );
    end
  end

endmodule
