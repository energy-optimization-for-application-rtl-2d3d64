// tb_noc_top: end-to-end test of the 3x3 multi-mode NoC running MPEG-4
// decoder traffic.
//
// Cores sit on the mesh as: iq (0,2), transfer (1,2), mc (2,2),
// predict_acdc (0,1), idct (1,1), decoder_mbintra (2,1); the bottom row has
// no core. The eleven flows of the decoder's core graph are used, with
// packet counts proportional to their volumes. The run has three phases:
//   phase 1: only mc -> transfer;
//   phase 2: only iq -> transfer and transfer -> mc;
//   phase 3: all eleven flows at once.
// The testbench plays the role of the profiler: from the XY route of every
// flow it derives, for each switch and phase, the configuration -- off when
// no flow crosses the switch, lease-line mode with one line per
// (input, output) pair when the flows through it share no port, normal
// mode otherwise -- and loads the result into the switch-mode table.
// Packets are injected only inside each phase, away from its borders.
//
// Checks: every flit reaches the right core intact and in order per flow;
// a quiet two-hop packet takes four cycles in normal mode and two on lease
// lines; each mechanism happened: lease-line transfers, off-mode cycles,
// crossbar transfers, arbitration between contending heads, mode changes,
// and back-pressure at a core's network interface.
module tb_noc_top;
  import noc_pkg::*;

  localparam int MX = 3, MY = 3, NN = 9, DEPTH = 16;
  localparam int PH_LEN = 600, GUARD = 40;

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

  // ------------------------------------------------------------ workload
  typedef struct { int src; int dst; int vol; } flow_t;
  // node index = y*3 + x
  localparam int IQ = 6, TRANSFER = 7, MC = 8, PREDICT = 3, IDCT = 4, DECODER = 5;
  flow_t flows [11] = '{
    '{MC, TRANSFER, 89856}, '{TRANSFER, MC, 9072}, '{IQ, TRANSFER, 38072},
    '{IDCT, TRANSFER, 2778}, '{DECODER, PREDICT, 880}, '{PREDICT, DECODER, 107},
    '{DECODER, IQ, 72}, '{DECODER, IDCT, 65}, '{IQ, IDCT, 40},
    '{DECODER, TRANSFER, 24}, '{PREDICT, IDCT, 12}};

  typedef struct { flit_t f; int rel_t; } tx_t;
  tx_t   src_q [NN][$];
  flit_t exp_q [NN][NN][$];
  int checks = 0, failures = 0, seq = 0;
  int sent = 0, got = 0;
  int last_rx_time [NN];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (now=%0d)", what, now);
    end
  endtask

  task automatic add_packet(input int s, input int d, input int len, input int rel_t);
    for (int i = 0; i < len; i++) begin
      tx_t t;
      t.f.ftype = (len == 1) ? FT_SINGLE : (i == 0) ? FT_HEAD : (i == len-1) ? FT_TAIL : FT_BODY;
      t.f.dst_x = 4'(d % MX);
      t.f.dst_y = 4'(d / MX);
      t.f.data  = {4'(s), 28'(seq)};
      t.rel_t = rel_t;
      seq++;
      src_q[s].push_back(t);
      exp_q[s][d].push_back(t.f);
      sent++;
    end
  endtask

  // ------------------------------------------------ table from routes
  // used[phase][switch][in][out]
  logic used [3][NN][NPORTS][NPORTS];

  function automatic int opposite(input int o);
    case (o)
      P_EAST:  return P_WEST;
      P_WEST:  return P_EAST;
      P_NORTH: return P_SOUTH;
      P_SOUTH: return P_NORTH;
      default: return P_LOCAL;
    endcase
  endfunction

  task automatic mark_route(input int ph, input int s, input int d);
    int x, y, in_p, o;
    x = s % MX; y = s / MX; in_p = P_LOCAL;
    forever begin
      o = int'(xy_route(4'(x), 4'(y), 4'(d % MX), 4'(d / MX)));
      used[ph][y*MX + x][in_p][o] = 1'b1;
      if (o == P_LOCAL) break;
      case (o)
        P_EAST:  x++;
        P_WEST:  x--;
        P_NORTH: y++;
        default: y--;
      endcase
      in_p = opposite(o);
    end
  endtask

  // returns 1 and a config when the phase needs a table record
  function automatic logic phase_cfg(input int ph, input int sw, output mode_cfg_t c);
    logic any = 1'b0, clash = 1'b0;
    logic [NPORTS-1:0] in_used = '0;
    c = CFG_NORMAL;
    c.mode = MODE_LEASE;
    for (int i = 0; i < NPORTS; i++)
      for (int o = 0; o < NPORTS; o++)
        if (used[ph][sw][i][o]) begin
          any = 1'b1;
          if (in_used[i] || c.lease_en[o]) clash = 1'b1;
          in_used[i]     = 1'b1;
          c.lease_en[o]  = 1'b1;
          c.lease_src[o] = PORT_W'(i);
        end
    if (!any) begin
      c = CFG_NORMAL;
      c.mode = MODE_OFF;
      return 1'b1;
    end
    return !clash;
  endfunction

  int n_records = 0;
  int n_off_rec = 0, n_lease_rec = 0;

  task automatic load_table();
    int idx [NN];
    foreach (idx[s]) idx[s] = 0;
    for (int ph = 0; ph < 3; ph++)
      for (int sw = 0; sw < NN; sw++) begin
        mode_cfg_t c;
        if (phase_cfg(ph, sw, c)) begin
          @(negedge clk);
          tbl_we = 1'b1;
          tbl_sw = 4'(sw);
          tbl_idx = 4'(idx[sw]);
          tbl_entry.t_start = TIME_W'(ph * PH_LEN);
          tbl_entry.t_end   = TIME_W'(ph * PH_LEN + PH_LEN - 1);
          tbl_entry.cfg     = c;
          idx[sw]++;
          n_records++;
          if (c.mode == MODE_OFF) n_off_rec++; else n_lease_rec++;
        end
      end
    @(negedge clk);
    tbl_we = 1'b0;
  endtask

  // ------------------------------------------------ drivers and scoreboard
  int tnow;   // table time, far negative before start
  assign tnow = running ? int'(now) : -1000000;

  always_comb begin
    for (int n = 0; n < NN; n++) begin
      local_in_valid[n] = (src_q[n].size() > 0) && (src_q[n][0].rel_t <= tnow);
      local_in_flit[n]  = (src_q[n].size() > 0) ? src_q[n][0].f : '0;
    end
  end

  int n_bp = 0, cyc = 0;
  int acc_cyc [int];             // accept cycle per flit sequence number
  int last_head_lat [NN];        // latency of the last head flit per destination
  int ph1_lat_min = 1000, ph1_lat_max = -1;
  always @(posedge clk) if (rst_n) begin
    logic [NN-1:0] acc, ov;
    flit_t [NN-1:0] of;
    cyc++;
    for (int n = 0; n < NN; n++)
      if (local_in_valid[n] && local_in_ready[n])
        acc_cyc[int'(local_in_flit[n].data[27:0])] = cyc;
    acc = local_in_valid & local_in_ready;
    ov  = local_out_valid;
    of  = local_out_flit;
    for (int n = 0; n < NN; n++) begin
      if (local_in_valid[n] && !local_in_ready[n]) n_bp++;  // stall at a network interface
      if (ov[n]) begin
        int s;
        s = int'(of[n].data[31:28]);
        if (s < NN && exp_q[s][n].size() > 0) begin
          check(of[n] == exp_q[s][n][0], "flit intact and in order at its core");
          void'(exp_q[s][n].pop_front());
        end else check(1'b0, "flit at a core nobody sent to");
        last_rx_time[n] = int'(now);
        if (is_head(of[n].ftype) && acc_cyc.exists(int'(of[n].data[27:0]))) begin
          last_head_lat[n] = cyc - acc_cyc[int'(of[n].data[27:0])];
          if (running && int'(now) < PH_LEN && n == TRANSFER) begin
            if (last_head_lat[n] < ph1_lat_min) ph1_lat_min = last_head_lat[n];
            if (last_head_lat[n] > ph1_lat_max) ph1_lat_max = last_head_lat[n];
          end
        end
        got++;
      end
    end
    #1;
    for (int n = 0; n < NN; n++) if (acc[n]) void'(src_q[n].pop_front());
  end

  // ------------------------------------------------ mechanism counters
  int n_lease_flits = 0, n_xbar_flits = 0, n_off_cycles = 0, n_contend = 0;
  int n_mode_changes = 0, n_deferred = 0, n_stall = 0;
  mode_cfg_t [NN-1:0] prev_cfg;

  for (genvar y = 0; y < MY; y++) begin : g_my
    for (genvar x = 0; x < MX; x++) begin : g_mx
      always @(posedge clk) if (rst_n) begin
        int c;
        c = 0;
        for (int o = 0; o < NPORTS; o++)
          if ($countones(dut.g_y[y].g_x[x].u_sw.u_arb.cand[o]) > 1) c++;
        n_contend += c;
        n_stall += $countones(dut.g_y[y].g_x[x].u_sw.in_valid & ~dut.g_y[y].g_x[x].u_sw.in_ready);
        if (dut.g_y[y].g_x[x].u_sw.cfg.mode == MODE_LEASE)
          n_lease_flits += $countones(dut.g_y[y].g_x[x].u_sw.out_valid);
        if (dut.g_y[y].g_x[x].u_sw.cfg.mode == MODE_NORMAL)
          n_xbar_flits += $countones(dut.g_y[y].g_x[x].u_sw.out_valid);
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      if (sw_cfg[n].mode == MODE_OFF) n_off_cycles++;
      if (sw_cfg[n] != prev_cfg[n]) n_mode_changes++;
      if (sw_pending[n]) n_deferred++;
    end
    prev_cfg = sw_cfg;
  end

  // ------------------------------------------------ two-hop latency probe
  task automatic probe(output int lat);
    int guard = 0, cnt0;
    cnt0 = got;
    @(negedge clk);
    add_packet(MC, TRANSFER, 1, -1000000);
    while (got == cnt0 && guard < 100) begin @(negedge clk); guard++; end
    lat = last_head_lat[TRANSFER];
  endtask

  initial begin
    int lat_normal, lat_lease;
    tbl_we = 0; start = 0; tbl_sw = '0; tbl_idx = '0; tbl_entry = '0;
    local_out_ready = '1;
    foreach (prev_cfg[n]) prev_cfg[n] = CFG_NORMAL;
    foreach (used[a, b, c, d]) used[a][b][c][d] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // routes of each phase, then the table
    mark_route(0, MC, TRANSFER);
    mark_route(1, IQ, TRANSFER);
    mark_route(1, TRANSFER, MC);
    foreach (flows[i]) mark_route(2, flows[i].src, flows[i].dst);
    load_table();

    // quiet normal-mode packet before execution starts
    probe(lat_normal);

    // traffic
    for (int t = GUARD; t < PH_LEN - GUARD - 20; t += 10)
      add_packet(MC, TRANSFER, 4, t);
    for (int t = PH_LEN + GUARD; t < 2*PH_LEN - GUARD - 20; t += 10) begin
      add_packet(IQ, TRANSFER, 4, t);
      add_packet(TRANSFER, MC, 3, t + 3);
    end
    foreach (flows[i]) begin
      int npk;
      npk = (flows[i].vol + 999) / 1000;
      for (int k = 0; k < npk; k++)
        add_packet(flows[i].src, flows[i].dst, $urandom_range(1, 5),
                   2*PH_LEN + GUARD + (k * 1200) / npk);
    end

    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;

    // latency on lease lines: every mc -> transfer head of phase 1
    while (int'(now) < PH_LEN) @(negedge clk);
    lat_lease = ph1_lat_max;
    check(lat_normal == 4, "two-hop head latency in normal mode is four cycles");
    check(ph1_lat_min == 2 && ph1_lat_max == 2, "two-hop head latency on lease lines is two cycles");
    $display("two-hop head latency: normal=%0d lease=%0d", lat_normal, lat_lease);

    // phase 3 with back-pressure at the transfer core
    while (int'(now) < 2*PH_LEN) @(negedge clk);
    while (got != sent && int'(now) < 20000) begin
      @(negedge clk);
      local_out_ready[TRANSFER] = ($urandom_range(2) == 0);
    end
    local_out_ready = '1;
    repeat (5) @(negedge clk);

    check(got == sent, "every flit delivered");
    check(n_lease_flits > 0, "lease-line transfers happened");
    check(n_off_cycles > 0, "off mode happened");
    check(n_xbar_flits > 0, "crossbar transfers happened");
    check(n_contend > 0, "arbitration between contending heads happened");
    check(n_mode_changes > 0, "mode changes happened");
    check(n_stall > 0, "back-pressure (a flit held at a full buffer) happened");
    for (int n = 0; n < NN; n++) check(sw_cfg[n] == CFG_NORMAL, "all switches back to normal mode");
    $display("records=%0d (lease %0d, off %0d) flits sent=%0d delivered=%0d",
             n_records, n_lease_rec, n_off_rec, sent, got);
    $display("lease-line flits=%0d crossbar flits=%0d off switch-cycles=%0d contentions=%0d",
             n_lease_flits, n_xbar_flits, n_off_cycles, n_contend);
    $display("mode changes=%0d pending switch-cycles=%0d stalled link-cycles=%0d (at cores %0d)",
             n_mode_changes, n_deferred, n_stall, n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (last_rx_time[n]) last_rx_time[n] = -1;
    foreach (last_head_lat[n]) last_head_lat[n] = -1;
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
