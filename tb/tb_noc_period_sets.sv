// tb_noc_period_sets: the three-message example of normal, lease-line and
// off periods, played on the centre switch of the 3x3 mesh.
//
// Three messages cross the centre switch (1,1), in time units of U cycles:
//   m1  W -> N  units 1..5  (core (0,1) to core (1,2))
//   m2  E -> S  units 4..9  (core (2,1) to core (1,0))
//   m3  E -> N  units 1..3  (core (2,1) to core (1,2))
// m1 and m3 share output N while both run, so units 1..3 are a normal
// period. Lease lines (W,N) and (E,S) cover units 4..5 and (E,S) alone
// covers units 6..9. From unit 10 on nothing passes: an off period. The
// table for the centre switch therefore holds three records:
//   units 4..5 lease {W->N, E->S};  units 6..9 lease {E->S};  units 10..19 off.
// Each message is a stream of 4-flit packets injected inside its units,
// away from their borders. Checks: every flit arrives intact and in order;
// the centre switch is in the configuration of each period in its middle;
// lease lines carry flits and packets of m1 and m3 contend in normal mode;
// after the last record the switch is back in normal mode.
module tb_noc_period_sets;
  import noc_pkg::*;

  localparam int MX = 3, NN = 9, U = 40, CENTRE = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  flit_t [NN-1:0] local_in_flit, local_out_flit;
  logic  [NN-1:0] local_in_valid, local_in_ready, local_out_valid, local_out_ready;
  logic tbl_we, start, running;
  logic [3:0] tbl_sw, tbl_idx;
  smt_entry_t tbl_entry;
  logic [TIME_W-1:0] now;
  mode_cfg_t [NN-1:0] sw_cfg;
  logic [NN-1:0] sw_pending;

  noc_top dut (.*);

  always #5 clk = ~clk;

  typedef struct { flit_t f; int rel_t; } tx_t;
  tx_t   src_q [NN][$];
  flit_t exp_q [NN][NN][$];
  int checks = 0, failures = 0, seq = 0, sent = 0, got = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (now=%0d)", what, now);
    end
  endtask

  // message: stream of 4-flit packets, one every 8 cycles, inside units ts..tf
  task automatic message(input int s, input int d, input int ts, input int tf);
    for (int t = ts*U + 4; t <= (tf+1)*U - 16; t += 8)
      for (int i = 0; i < 4; i++) begin
        tx_t x;
        x.f.ftype = (i == 0) ? FT_HEAD : (i == 3) ? FT_TAIL : FT_BODY;
        x.f.dst_x = 4'(d % MX);
        x.f.dst_y = 4'(d / MX);
        x.f.data  = {4'(s), 28'(seq)};
        x.rel_t   = t;
        seq++;
        src_q[s].push_back(x);
        exp_q[s][d].push_back(x.f);
        sent++;
      end
  endtask

  int tnow;
  assign tnow = running ? int'(now) : -1;

  always_comb begin
    for (int n = 0; n < NN; n++) begin
      local_in_valid[n] = (src_q[n].size() > 0) && (src_q[n][0].rel_t <= tnow);
      local_in_flit[n]  = (src_q[n].size() > 0) ? src_q[n][0].f : '0;
    end
  end

  int n_lease = 0, n_contend = 0;
  always @(posedge clk) if (rst_n) begin
    logic [NN-1:0] acc, ov;
    flit_t [NN-1:0] of;
    acc = local_in_valid & local_in_ready;
    ov  = local_out_valid;
    of  = local_out_flit;
    if (dut.g_y[1].g_x[1].u_sw.cfg.mode == MODE_LEASE)
      n_lease += $countones(dut.g_y[1].g_x[1].u_sw.out_valid);
    if ($countones(dut.g_y[1].g_x[1].u_sw.u_arb.cand[P_NORTH]) > 1) n_contend++;
    for (int n = 0; n < NN; n++) if (ov[n]) begin
      int s;
      s = int'(of[n].data[31:28]);
      if (s < NN && exp_q[s][n].size() > 0) begin
        check(of[n] == exp_q[s][n][0], "flit intact and in order");
        void'(exp_q[s][n].pop_front());
      end else check(1'b0, "unexpected flit");
      got++;
    end
    #1;
    for (int n = 0; n < NN; n++) if (acc[n]) void'(src_q[n].pop_front());
  end

  task automatic load(input int idx, input int u0, input int u1, input mode_cfg_t c);
    @(negedge clk);
    tbl_we = 1'b1; tbl_sw = 4'(CENTRE); tbl_idx = 4'(idx);
    tbl_entry.t_start = TIME_W'(u0 * U);
    tbl_entry.t_end   = TIME_W'((u1 + 1) * U - 1);
    tbl_entry.cfg     = c;
  endtask

  task automatic expect_at(input int t, input mode_cfg_t c, input string what);
    while (int'(now) < t) @(negedge clk);
    check(sw_cfg[CENTRE] == c, what);
  endtask

  mode_cfg_t l2, l1, off;

  initial begin
    tbl_we = 0; start = 0; tbl_sw = '0; tbl_idx = '0; tbl_entry = '0;
    local_out_ready = '1;
    l2 = CFG_NORMAL; l2.mode = MODE_LEASE;
    l2.lease_en[P_NORTH] = 1'b1; l2.lease_src[P_NORTH] = P_WEST;
    l2.lease_en[P_SOUTH] = 1'b1; l2.lease_src[P_SOUTH] = P_EAST;
    l1 = CFG_NORMAL; l1.mode = MODE_LEASE;
    l1.lease_en[P_SOUTH] = 1'b1; l1.lease_src[P_SOUTH] = P_EAST;
    off = CFG_NORMAL; off.mode = MODE_OFF;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load(0, 4, 5, l2);
    load(1, 6, 9, l1);
    load(2, 10, 19, off);
    @(negedge clk); tbl_we = 1'b0;

    // m2 and m3 share a source queue: queue them in time order
    message(3, 7, 1, 5);   // m1: (0,1) -> (1,2), W -> N at the centre
    message(5, 7, 1, 3);   // m3: (2,1) -> (1,2), E -> N at the centre
    message(5, 1, 4, 9);   // m2: (2,1) -> (1,0), E -> S at the centre

    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;

    expect_at(2*U,      CFG_NORMAL, "units 1..3: normal period");
    expect_at(4*U + U/2, l2,        "units 4..5: lease lines W->N and E->S");
    expect_at(8*U,      l1,         "units 6..9: lease line E->S");
    expect_at(15*U,     off,        "units 10..19: off period");
    expect_at(21*U,     CFG_NORMAL, "after the table: normal");
    check(got == sent, "every flit delivered");
    check(n_lease > 0, "lease lines carried flits");
    check(n_contend > 0, "m1 and m3 contended for output N");
    $display("flits sent=%0d delivered=%0d lease-line flits=%0d contention cycles=%0d",
             sent, got, n_lease, n_contend);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
