// tb_noc_mpeg4: MPEG-4 decoder workload on the 3x3 multi-mode NoC, with the
// switch-mode table generated from a profiling run.
//
// Cores sit on the mesh as: iq (0,2), transfer (1,2), mc (2,2),
// predict_acdc (0,1), idct (1,1), decoder_mbintra (2,1). NPKT packets of
// PKT_LEN flits are injected, one every PERIOD cycles network-wide; each
// packet belongs to one of the decoder's eleven flows, picked at random
// with probability proportional to the flow's volume.
//
// For each injection period the same packet schedule runs four times:
//   1. normal mode only. This run is also the profile: for every switch it
//      records each packet's input port, output port, and entry and exit
//      times;
//   2. lease-line periods only;  3. off periods only;  4. both.
// Table generation follows the period definitions of the design: time is
// cut into BUCKET-cycle slots; a slot with no packet (within GUARD cycles)
// is an off period; a slot whose packets use (input, output) pairs that
// share no port is a lease-line period with those pairs as lease lines;
// any other slot is normal. Equal neighbouring slots merge into one
// period, periods shorter than THRESHOLD are dropped, and when a switch
// needs more records than the table holds the longest ones are kept.
//
// Checks, for every run: every flit reaches the right core, intact and in
// order; at most DEPTH records per switch are loaded; in run 4 lease-line
// transfers and off cycles both occur; and the mean head latency with
// lease lines is not above the normal-mode mean. Activity counts (switch-cycles per mode, crossbar and
// lease-line flit transfers) are printed for each run.
module tb_noc_mpeg4;
  import noc_pkg::*;

  localparam int MX = 3, MY = 3, NN = 9, DEPTH = 16;
  localparam int NPKT = 10000, PKT_LEN = 4;
  localparam int BUCKET = 200, GUARD = 60, THRESHOLD = 400;
  localparam int NPER = 4;
  localparam int PERIODS [NPER] = '{5, 10, 15, 20};

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

  localparam int IQ = 6, TRANSFER = 7, MC = 8, PREDICT = 3, IDCT = 4, DECODER = 5;
  localparam int NFLOW = 11;
  localparam int FSRC [NFLOW] = '{MC, TRANSFER, IQ, IDCT, DECODER, PREDICT, DECODER, DECODER, IQ, DECODER, PREDICT};
  localparam int FDST [NFLOW] = '{TRANSFER, MC, TRANSFER, TRANSFER, PREDICT, DECODER, IQ, IDCT, IDCT, TRANSFER, IDCT};
  localparam int FVOL [NFLOW] = '{89856, 9072, 38072, 2778, 880, 107, 72, 65, 40, 24, 12};

  int checks = 0, failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (now=%0d)", what, now);
    end
  endtask

  // ------------------------------------------------------------ schedule
  int pk_flow [NPKT];
  int pk_time [NPKT];

  typedef struct { flit_t f; int rel_t; } tx_t;
  tx_t   src_q [NN][$];
  flit_t exp_q [NN][NN][$];
  int sent = 0, got = 0;

  task automatic queue_schedule();
    for (int k = 0; k < NPKT; k++) begin
      int s, d;
      s = FSRC[pk_flow[k]];
      d = FDST[pk_flow[k]];
      for (int i = 0; i < PKT_LEN; i++) begin
        tx_t t;
        t.f.ftype = (i == 0) ? FT_HEAD : (i == PKT_LEN-1) ? FT_TAIL : FT_BODY;
        t.f.dst_x = 4'(d % MX);
        t.f.dst_y = 4'(d / MX);
        t.f.data  = {4'(s), 20'(k), 8'(i)};
        t.rel_t   = pk_time[k];
        src_q[s].push_back(t);
        exp_q[s][d].push_back(t.f);
        sent++;
      end
    end
  endtask

  // ------------------------------------------------ drivers and scoreboard
  int tnow;
  assign tnow = running ? int'(now) : -1;

  always_comb begin
    for (int n = 0; n < NN; n++) begin
      local_in_valid[n] = (src_q[n].size() > 0) && (src_q[n][0].rel_t <= tnow);
      local_in_flit[n]  = (src_q[n].size() > 0) ? src_q[n][0].f : '0;
    end
  end

  longint lat_sum = 0;
  int     lat_cnt = 0;
  int     head_acc [NPKT];

  always @(posedge clk) if (rst_n) begin
    logic [NN-1:0] acc, ov;
    flit_t [NN-1:0] of, inf;
    acc = local_in_valid & local_in_ready;
    ov  = local_out_valid;
    of  = local_out_flit;
    inf = local_in_flit;
    for (int n = 0; n < NN; n++) begin
      if (acc[n] && inf[n].ftype == FT_HEAD) head_acc[int'(inf[n].data[27:8])] = int'(now);
      if (ov[n]) begin
        int s;
        s = int'(of[n].data[31:28]);
        if (s < NN && exp_q[s][n].size() > 0) begin
          if (of[n] != exp_q[s][n][0]) check(1'b0, "flit intact and in order at its core");
          void'(exp_q[s][n].pop_front());
        end else check(1'b0, "flit at a core nobody sent to");
        if (of[n].ftype == FT_HEAD) begin
          lat_sum += longint'(int'(now) - head_acc[int'(of[n].data[27:8])]);
          lat_cnt++;
        end
        got++;
      end
    end
    #1;
    for (int n = 0; n < NN; n++) if (acc[n]) void'(src_q[n].pop_front());
  end

  // ------------------------------------------------ profile and activity
  localparam int MAXB = 4096;                 // buckets per run
  logic [NPORTS*NPORTS-1:0] pairs [NN][MAXB]; // (in,out) pairs seen per bucket
  logic profiling = 1'b0;
  int   n_lease_fl = 0, n_xbar_fl = 0, n_cyc_mode [3];

  for (genvar y = 0; y < MY; y++) begin : g_my
    for (genvar x = 0; x < MX; x++) begin : g_mx
      localparam int SW = y*MX + x;
      int ent [int];        // packet -> entry time at this switch
      int sd  [int];        // packet -> input port
      always @(posedge clk) if (rst_n && running) begin
        for (int p = 0; p < NPORTS; p++)
          if (dut.g_y[y].g_x[x].u_sw.in_valid[p] && dut.g_y[y].g_x[x].u_sw.in_ready[p] &&
              dut.g_y[y].g_x[x].u_sw.in_flit[p].ftype == FT_HEAD) begin
            ent[int'(dut.g_y[y].g_x[x].u_sw.in_flit[p].data[27:8])] = int'(now);
            sd[int'(dut.g_y[y].g_x[x].u_sw.in_flit[p].data[27:8])]  = p;
          end
        for (int o = 0; o < NPORTS; o++)
          if (dut.g_y[y].g_x[x].u_sw.out_valid[o]) begin
            if (dut.g_y[y].g_x[x].u_sw.cfg.mode == MODE_LEASE) n_lease_fl++;
            else n_xbar_fl++;
            if (profiling && dut.g_y[y].g_x[x].u_sw.out_flit[o].ftype == FT_TAIL) begin
              int pk, b0, b1;
              pk = int'(dut.g_y[y].g_x[x].u_sw.out_flit[o].data[27:8]);
              b0 = (ent[pk] - GUARD) / BUCKET;
              b1 = (int'(now) + GUARD) / BUCKET;
              if (b0 < 0) b0 = 0;
              if (b1 >= MAXB) b1 = MAXB - 1;
              for (int b = b0; b <= b1; b++) pairs[SW][b][sd[pk]*NPORTS + o] = 1'b1;
            end
          end
        n_cyc_mode[int'(dut.g_y[y].g_x[x].u_sw.cfg.mode)]++;
      end
    end
  end

  // ------------------------------------------------ table generation
  typedef struct { int t0; int t1; mode_cfg_t cfg; } rec_t;
  rec_t recs [NN][$];
  int   max_needed = 0;

  function automatic mode_cfg_t bucket_cfg(input logic [NPORTS*NPORTS-1:0] m);
    mode_cfg_t c;
    logic [NPORTS-1:0] in_used;
    c = CFG_NORMAL;
    in_used = '0;
    if (m == '0) begin
      c.mode = MODE_OFF;
      return c;
    end
    c.mode = MODE_LEASE;
    for (int i = 0; i < NPORTS; i++)
      for (int o = 0; o < NPORTS; o++)
        if (m[i*NPORTS + o]) begin
          if (in_used[i] || c.lease_en[o]) return CFG_NORMAL;   // potential collision
          in_used[i] = 1'b1;
          c.lease_en[o] = 1'b1;
          c.lease_src[o] = PORT_W'(i);
        end
    return c;
  endfunction

  task automatic make_table(input int nbuckets);
    for (int sw = 0; sw < NN; sw++) begin
      rec_t all [$];
      rec_t cur;
      recs[sw].delete();
      cur.t0 = 0;
      cur.cfg = bucket_cfg(pairs[sw][0]);
      for (int b = 1; b <= nbuckets; b++) begin
        mode_cfg_t c;
        c = (b < nbuckets) ? bucket_cfg(pairs[sw][b]) : ~cur.cfg;
        if (c != cur.cfg) begin
          cur.t1 = b * BUCKET - 1;
          if (cur.cfg.mode != MODE_NORMAL && (cur.t1 - cur.t0 + 1) >= THRESHOLD) all.push_back(cur);
          cur.t0 = b * BUCKET;
          cur.cfg = c;
        end
      end
      if (all.size() > max_needed) max_needed = all.size();
      // keep the longest DEPTH periods, in time order
      while (all.size() > DEPTH) begin
        int shortest = 0;
        foreach (all[i]) if (all[i].t1 - all[i].t0 < all[shortest].t1 - all[shortest].t0) shortest = i;
        all.delete(shortest);
      end
      recs[sw] = all;
    end
  endtask

  task automatic load_table(input logic use_lease, input logic use_off);
    int idx;
    for (int sw = 0; sw < NN; sw++) begin
      idx = 0;
      foreach (recs[sw][i]) begin
        if ((recs[sw][i].cfg.mode == MODE_LEASE && use_lease) ||
            (recs[sw][i].cfg.mode == MODE_OFF && use_off)) begin
          @(negedge clk);
          tbl_we = 1'b1;
          tbl_sw = 4'(sw);
          tbl_idx = 4'(idx);
          tbl_entry.t_start = TIME_W'(recs[sw][i].t0);
          tbl_entry.t_end   = TIME_W'(recs[sw][i].t1);
          tbl_entry.cfg     = recs[sw][i].cfg;
          idx++;
        end
      end
    end
    @(negedge clk);
    tbl_we = 1'b0;
  endtask

  // ------------------------------------------------ one run
  real lat_normal;

  task automatic run(input int period, input int policy);
    int guard = 0, run_len;
    string names [4] = '{"normal", "lease", "off", "lease+off"};
    real lat;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    lat_sum = 0; lat_cnt = 0; sent = 0; got = 0;
    n_lease_fl = 0; n_xbar_fl = 0;
    foreach (n_cyc_mode[i]) n_cyc_mode[i] = 0;
    if (policy != 0) load_table(policy == 1 || policy == 3, policy == 2 || policy == 3);
    profiling = (policy == 0);
    queue_schedule();
    run_len = NPKT * period;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while ((got != sent) && guard < run_len + 50000) begin @(negedge clk); guard++; end
    profiling = 1'b0;
    check(got == sent, "every flit delivered");
    lat = real'(lat_sum) / real'((lat_cnt > 0) ? lat_cnt : 1);
    if (policy == 0) lat_normal = lat;
    else if (policy != 2)
      check(lat <= lat_normal, "lease lines do not slow packets down");
    if (policy == 3) begin
      check(n_lease_fl > 0, "lease-line transfers happened");
      check(n_cyc_mode[MODE_OFF] > 0, "off periods happened");
    end
    if (policy == 0) check(n_xbar_fl > 0, "crossbar transfers happened");
    $display("period=%0d %-9s cycles=%0d flits=%0d mean-head-latency=%0.2f switch-cycles normal/lease/off=%0d/%0d/%0d flit-hops crossbar/lease=%0d/%0d",
             period, names[policy], guard, got, lat, n_cyc_mode[0], n_cyc_mode[1], n_cyc_mode[2], n_xbar_fl, n_lease_fl);
    repeat (5) @(negedge clk);
  endtask

  initial begin
    int cum [NFLOW];
    int total = 0;
    tbl_we = 0; start = 0; tbl_sw = '0; tbl_idx = '0; tbl_entry = '0;
    local_out_ready = '1;
    for (int f = 0; f < NFLOW; f++) begin total += FVOL[f]; cum[f] = total; end
    for (int pi = 0; pi < NPER; pi++) begin
      int period;
      period = PERIODS[pi];
      // schedule: one packet per PERIOD cycles, flows by volume
      for (int k = 0; k < NPKT; k++) begin
        int r;
        r = $urandom_range(total - 1);
        pk_flow[k] = 0;
        while (cum[pk_flow[k]] <= r) pk_flow[k]++;
        pk_time[k] = k * period;
      end
      foreach (pairs[s, b]) pairs[s][b] = '0;
      run(period, 0);
      make_table((NPKT * period) / BUCKET + 1);
      for (int sw = 0; sw < NN; sw++) check(recs[sw].size() <= DEPTH, "table records fit the table");
      $display("period=%0d periods found per switch (max)=%0d, longest %0d kept", period, max_needed, DEPTH);
      max_needed = 0;
      for (int policy = 1; policy < 4; policy++) run(period, policy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
