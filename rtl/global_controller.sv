// global_controller: holds the switch-mode table and sets every switch's
// mode while the application runs.
//
// Before execution the table is loaded one record at a time through the
// tbl_* port: record tbl_idx of switch tbl_sw. Each switch has its own list
// of up to DEPTH records, written in order of start time, that must not
// overlap in time. A record names a period [t_start, t_end] in cycles from
// the start of execution and the configuration the switch takes in it:
// lease-line mode with its lease lines (the routing state), or off mode.
// Outside every record a switch is in normal mode, which is also what every
// switch does when the controller is not started at all.
//
// start (one-cycle pulse) clears the time counter and begins execution.
// From then on, per switch, a pointer walks the list: the record under the
// pointer is compared with the time counter, and the pointer moves on in
// the cycle that reaches the record's t_end. mode_cmd is registered: the
// configuration for time t appears on mode_cmd in the cycle where now = t+1.
// Loading while running is allowed but takes effect only for records the
// pointer has not yet passed.
//
// The table, its loading before execution and the default normal mode
// follow the design description. The record layout, one list per switch
// with a walking pointer, and the cycle-based time counter are this
// design's own choices.
module global_controller
  import noc_pkg::*;
#(
  parameter int unsigned NSW   = 9,
  parameter int unsigned DEPTH = 16
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // table load port
  input  logic                              tbl_we,
  input  logic [$clog2(NSW)-1:0]            tbl_sw,
  input  logic [$clog2(DEPTH)-1:0]          tbl_idx,
  input  smt_entry_t                        tbl_entry,
  // execution
  input  logic                              start,
  output logic                              running,
  output logic [TIME_W-1:0]                 now,
  output mode_cfg_t [NSW-1:0]               mode_cmd
);

  localparam int unsigned IDX_W = $clog2(DEPTH);

  smt_entry_t             tbl [NSW][DEPTH];
  logic [IDX_W:0]         len_q [NSW];
  logic [IDX_W:0]         ptr_q [NSW];
  logic [TIME_W-1:0]      now_q;
  logic                   run_q;
  mode_cfg_t [NSW-1:0]    cmd_q;

  smt_entry_t [NSW-1:0]   cur;       // record under each switch's pointer
  logic       [NSW-1:0]   cur_valid;

  always_comb begin
    for (int s = 0; s < NSW; s++) begin
      cur[s]       = tbl[s][ptr_q[s][IDX_W-1:0]];
      cur_valid[s] = (ptr_q[s] < len_q[s]);
    end
  end

  assign running  = run_q;
  assign now      = now_q;
  assign mode_cmd = cmd_q;

  always_ff @(posedge clk) begin
    if (tbl_we) tbl[tbl_sw][tbl_idx] <= tbl_entry;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSW; s++) len_q[s] <= '0;
    end else if (tbl_we && ({1'b0, tbl_idx} >= len_q[tbl_sw])) begin
      len_q[tbl_sw] <= {1'b0, tbl_idx} + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now_q <= '0;
      run_q <= 1'b0;
      cmd_q <= '{default: CFG_NORMAL};
      for (int s = 0; s < NSW; s++) ptr_q[s] <= '0;
    end else if (start) begin
      now_q <= '0;
      run_q <= 1'b1;
      cmd_q <= '{default: CFG_NORMAL};
      for (int s = 0; s < NSW; s++) ptr_q[s] <= '0;
    end else if (run_q) begin
      if (now_q != '1) now_q <= now_q + 1'b1;
      for (int s = 0; s < NSW; s++) begin
        if (cur_valid[s] && now_q >= cur[s].t_start && now_q <= cur[s].t_end)
          cmd_q[s] <= cur[s].cfg;
        else
          cmd_q[s] <= CFG_NORMAL;
        if (cur_valid[s] && now_q >= cur[s].t_end) ptr_q[s] <= ptr_q[s] + 1'b1;
      end
    end
  end

endmodule
