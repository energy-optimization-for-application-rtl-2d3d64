// tb_global_controller: self-checking test of the switch-mode table
// controller.
//
// Loads a random, time-ordered table for every switch (lease-line and off
// periods with random lease lines, some switches with no record at all),
// starts execution and checks every cycle that each switch's mode command
// equals the record covering the previous cycle's time, or normal mode when
// none does. Also checks that nothing but normal mode is issued before
// start, and that a second start replays the table from time zero.
module tb_global_controller;
  import noc_pkg::*;

  localparam int unsigned NSW   = 9;
  localparam int unsigned DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic tbl_we, start, running;
  logic [$clog2(NSW)-1:0]   tbl_sw;
  logic [$clog2(DEPTH)-1:0] tbl_idx;
  smt_entry_t               tbl_entry;
  logic [TIME_W-1:0]        now;
  mode_cfg_t [NSW-1:0]      mode_cmd;

  smt_entry_t ref_tbl [NSW][$];
  int checks = 0, failures = 0;
  int last_end = 0;
  int n_lease = 0, n_off = 0;

  always #5 clk = ~clk;

  global_controller #(.NSW(NSW), .DEPTH(DEPTH)) dut (.*);

  function automatic mode_cfg_t expected(input int sw, input int t);
    foreach (ref_tbl[sw][i])
      if (t >= int'(ref_tbl[sw][i].t_start) && t <= int'(ref_tbl[sw][i].t_end))
        return ref_tbl[sw][i].cfg;
    return CFG_NORMAL;
  endfunction

  task automatic run_and_check();
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    // now = 1 here: commands reflect time 0
    while (int'(now) < last_end + 5) begin
      for (int s = 0; s < NSW; s++) begin
        mode_cfg_t e;
        e = expected(s, int'(now) - 1);
        checks++;
        if (mode_cmd[s] != e) begin
          failures++;
          $display("FAIL sw %0d time %0d: got %h expected %h", s, int'(now)-1, mode_cmd[s], e);
        end
        if (e.mode == MODE_LEASE) n_lease++;
        if (e.mode == MODE_OFF)   n_off++;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    tbl_we = 0; start = 0; tbl_sw = '0; tbl_idx = '0; tbl_entry = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // build and load the table
    for (int s = 0; s < NSW; s++) begin
      int t, k;
      t = $urandom_range(3);
      k = (s == 4) ? 0 : ((s == 0) ? DEPTH : $urandom_range(DEPTH));
      for (int i = 0; i < k; i++) begin
        smt_entry_t e;
        e.t_start = TIME_W'(t);
        e.t_end   = TIME_W'(t + $urandom_range(8));
        e.cfg.mode = ($urandom_range(2) == 0) ? MODE_OFF : MODE_LEASE;
        e.cfg.lease_en  = (e.cfg.mode == MODE_LEASE) ? NPORTS'($urandom_range(1, 31)) : '0;
        for (int d = 0; d < NPORTS; d++)
          e.cfg.lease_src[d] = (e.cfg.mode == MODE_LEASE) ? PORT_W'($urandom_range(NPORTS-1)) : '0;
        ref_tbl[s].push_back(e);
        t = int'(e.t_end) + 1 + $urandom_range(4);
        if (int'(e.t_end) > last_end) last_end = int'(e.t_end);
        @(negedge clk);
        tbl_we = 1; tbl_sw = 4'(s); tbl_idx = 4'(i); tbl_entry = e;
      end
    end
    @(negedge clk); tbl_we = 0;
    // before start: all normal
    repeat (5) begin
      @(negedge clk);
      checks++;
      if (running || mode_cmd != '{default: CFG_NORMAL}) begin
        failures++;
        $display("FAIL command before start");
      end
    end
    run_and_check();
    run_and_check();   // restart replays the table
    checks++;
    if (n_lease == 0 || n_off == 0) begin
      failures++;
      $display("FAIL lease or off period never issued");
    end
    $display("lease-cycles=%0d off-cycles=%0d", n_lease, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
