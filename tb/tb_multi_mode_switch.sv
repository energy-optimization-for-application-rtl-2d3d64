// tb_multi_mode_switch: self-checking test of one multi-mode switch.
//
// The switch sits at mesh position (1,1). Queues drive its five inputs and
// a scoreboard on its five outputs checks that every flit arrives on the
// output XY routing names, in order per input/output pair, and that
// packets never interleave on an output. Scenarios:
//  1. normal mode, random traffic with back-pressure;
//  2. head-flit latency: two cycles in normal mode, one in lease-line mode;
//  3. lease-line mode with two simultaneous lease lines (W->E, N->S); the
//     other inputs refuse flits;
//  4. off mode: requested while flits are buffered, adopted only once the
//     switch has drained; then nothing is accepted or sent;
//  5. a lease request waits while a buffered packet heads elsewhere;
//  6. a return to normal mode waits for the packet on a lease line to end.
module tb_multi_mode_switch;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  flit_t [NPORTS-1:0] in_flit, out_flit;
  logic  [NPORTS-1:0] in_valid, in_ready, out_valid, out_ready;
  mode_cfg_t mode_cmd, cfg;
  logic mode_pending;

  flit_t src_q [NPORTS][$];
  flit_t exp_q [NPORTS][NPORTS][$];   // [input][output]
  int    owner [NPORTS];
  int    checks = 0, failures = 0, seq = 0, cyc = 0;
  int    got_total = 0, sent_total = 0;
  int    last_out_cyc [NPORTS];
  int    hold_src = -1;                // input whose driver is paused

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  multi_mode_switch #(.BUF_DEPTH(4), .MY_X(4'd1), .MY_Y(4'd1)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  function automatic logic [3:0] dx(input int o);
    return (o == P_EAST) ? 4'd2 : (o == P_WEST) ? 4'd0 : 4'd1;
  endfunction
  function automatic logic [3:0] dy(input int o);
    return (o == P_NORTH) ? 4'd2 : (o == P_SOUTH) ? 4'd0 : 4'd1;
  endfunction

  task automatic add_packet(input int p, input int o, input int len);
    for (int i = 0; i < len; i++) begin
      flit_t f;
      f.ftype = (len == 1) ? FT_SINGLE : (i == 0) ? FT_HEAD : (i == len-1) ? FT_TAIL : FT_BODY;
      f.dst_x = dx(o);
      f.dst_y = dy(o);
      f.data  = {8'(p), 24'(seq)};
      seq++;
      src_q[p].push_back(f);
      exp_q[p][o].push_back(f);
      sent_total++;
    end
  endtask

  // input drivers
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      in_valid[p] = (src_q[p].size() > 0) && (p != hold_src);
      in_flit[p]  = (src_q[p].size() > 0) ? src_q[p][0] : '0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    logic [NPORTS-1:0] acc, ov;
    flit_t [NPORTS-1:0] of;
    acc = in_valid & in_ready;
    ov  = out_valid;
    of  = out_flit;
    for (int o = 0; o < NPORTS; o++) if (ov[o]) begin
      int p;
      p = int'(of[o].data[31:24]);
      check(out_ready[o], "no flit without ready");
      if (p < NPORTS && exp_q[p][o].size() > 0) begin
        check(of[o] == exp_q[p][o][0], "flit in order on its output");
        void'(exp_q[p][o].pop_front());
      end else begin
        check(1'b0, "unexpected flit");
      end
      if (is_head(of[o].ftype)) begin
        check(owner[o] == -1, "packets do not interleave");
        owner[o] = p;
      end else check(owner[o] == p, "body flit follows its head");
      if (is_tail(of[o].ftype)) owner[o] = -1;
      last_out_cyc[o] = cyc;
      got_total++;
    end
    #1;
    for (int p = 0; p < NPORTS; p++) if (acc[p]) void'(src_q[p].pop_front());
  end

  function automatic int pending_flits();
    int n = 0;
    for (int p = 0; p < NPORTS; p++) n += src_q[p].size();
    return n;
  endfunction

  task automatic drain();
    int guard = 0;
    while ((pending_flits() > 0 || got_total != sent_total) && guard < 20000) begin
      @(negedge clk); guard++;
    end
    check(got_total == sent_total, "all flits delivered");
  endtask

  task automatic set_mode(input mode_cfg_t c);
    int guard = 0;
    @(negedge clk);
    mode_cmd = c;
    while (cfg != c && guard < 1000) begin @(negedge clk); guard++; end
    check(cfg == c, "mode adopted");
  endtask

  // cycles (clock edges) from the edge a single head is accepted on input p
  // to the edge it is taken from output o
  task automatic latency(input int p, input int o, output int lat);
    int t0;
    @(negedge clk);
    add_packet(p, o, 1);
    @(posedge clk);
    t0 = cyc;
    last_out_cyc[o] = -1;
    while (last_out_cyc[o] < 0 && cyc < t0 + 50) @(posedge clk);
    #2;
    lat = last_out_cyc[o] - t0;
  endtask

  mode_cfg_t lease_cfg, lease_we, off_cfg;

  initial begin
    int lat_n, lat_l;
    foreach (owner[o]) owner[o] = -1;
    mode_cmd  = CFG_NORMAL;
    out_ready = '1;
    lease_cfg = CFG_NORMAL;
    lease_cfg.mode = MODE_LEASE;
    lease_cfg.lease_en[P_EAST]   = 1'b1; lease_cfg.lease_src[P_EAST]  = P_WEST;
    lease_cfg.lease_en[P_SOUTH]  = 1'b1; lease_cfg.lease_src[P_SOUTH] = P_NORTH;
    lease_we = CFG_NORMAL;
    lease_we.mode = MODE_LEASE;
    lease_we.lease_en[P_EAST] = 1'b1; lease_we.lease_src[P_EAST] = P_WEST;
    off_cfg = CFG_NORMAL;
    off_cfg.mode = MODE_OFF;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(cfg == CFG_NORMAL && in_ready == '1, "normal mode after reset");

    // 1. normal mode, random traffic
    for (int n = 0; n < 300; n++) begin
      int p, o;
      p = $urandom_range(NPORTS-1);
      do o = $urandom_range(NPORTS-1); while (o == p);
      add_packet(p, o, $urandom_range(1, 4));
    end
    while (pending_flits() > 0) begin
      @(negedge clk);
      out_ready = NPORTS'($urandom) | 5'b00001;
    end
    out_ready = '1;
    drain();

    // 2a. latency in normal mode
    latency(P_WEST, P_EAST, lat_n);
    check(lat_n == 2, "normal-mode head latency is two cycles");
    // 3. lease-line mode with two lines
    set_mode(lease_cfg);
    check(in_ready == ((5'b1 << P_WEST) | (5'b1 << P_NORTH)), "only lease-line inputs accept flits");
    latency(P_WEST, P_EAST, lat_l);
    check(lat_l == 1, "lease-line head latency is one cycle");
    $display("head latency: normal=%0d lease=%0d", lat_n, lat_l);
    for (int n = 0; n < 100; n++) begin
      add_packet(P_WEST, P_EAST, $urandom_range(1, 4));
      add_packet(P_NORTH, P_SOUTH, $urandom_range(1, 4));
    end
    while (pending_flits() > 0) begin
      @(negedge clk);
      out_ready = NPORTS'($urandom);
    end
    out_ready = '1;
    drain();

    // 6. back to normal waits for the packet on the lease line
    @(negedge clk);
    hold_src = -1;
    add_packet(P_WEST, P_EAST, 4);
    @(negedge clk);               // head accepted
    @(negedge clk);               // head sent, body accepted
    hold_src = P_WEST;            // pause: tail still upstream
    mode_cmd = CFG_NORMAL;
    repeat (5) begin
      @(negedge clk);
      check(cfg.mode == MODE_LEASE && mode_pending, "normal mode waits for the lease packet's tail");
    end
    hold_src = -1;
    drain();
    repeat (2) @(negedge clk);
    check(cfg == CFG_NORMAL, "normal mode after the tail");

    // 4. off mode waits for buffered flits
    out_ready[P_EAST] = 1'b0;
    add_packet(P_LOCAL, P_EAST, 3);
    repeat (4) @(negedge clk);
    mode_cmd = off_cfg;
    repeat (4) begin
      @(negedge clk);
      check(cfg.mode == MODE_NORMAL && mode_pending, "off mode waits while flits are buffered");
    end
    out_ready = '1;
    drain();
    repeat (3) @(negedge clk);
    check(cfg == off_cfg, "off mode adopted after draining");
    add_packet(P_SOUTH, P_NORTH, 2);
    repeat (6) begin
      @(negedge clk);
      check(in_ready == '0 && out_valid == '0, "off switch accepts and sends nothing");
    end
    set_mode(CFG_NORMAL);
    drain();

    // 5. lease request waits for a packet heading elsewhere
    out_ready[P_NORTH] = 1'b0;
    add_packet(P_WEST, P_NORTH, 2);
    repeat (4) @(negedge clk);
    mode_cmd = lease_we;
    repeat (4) begin
      @(negedge clk);
      check(cfg.mode == MODE_NORMAL, "lease waits for a packet routed elsewhere");
    end
    out_ready = '1;
    drain();
    repeat (3) @(negedge clk);
    check(cfg == lease_we, "lease adopted after the packet left");
    set_mode(CFG_NORMAL);

    $display("flits sent=%0d delivered=%0d", sent_total, got_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
