// tb_switch_arbiter: self-checking test of the switch arbiter.
//
// The testbench models the five input buffers as queues of flits and pops
// one whenever the arbiter grants it. Checks:
//  - a lone head flit crosses exactly one cycle after it first requests;
//  - four inputs contending for one output are served round robin;
//  - out_ready low holds a locked transfer; en low blocks new locks;
//  - under random traffic every flit leaves on the output its packet's head
//    asked for, packets never interleave on an output, and all packets get
//    through (wormhole locks are released by the tail).
module tb_switch_arbiter;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en;
  logic [NPORTS-1:0] in_valid, in_head, in_tail, out_ready, grant, sel_valid;
  logic [NPORTS-1:0][PORT_W-1:0] req_out, sel;
  logic busy;

  typedef struct packed {
    flit_type_e       ftype;
    logic [PORT_W-1:0] dst;
    logic [15:0]       id;
  } tflit_t;

  tflit_t q [NPORTS][$];
  int checks = 0, failures = 0;
  int owner [NPORTS];
  logic [PORT_W-1:0] pkt_dst [NPORTS];
  int flits_sent = 0, flits_got = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  switch_arbiter dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      in_valid[p] = q[p].size() > 0;
      in_head[p]  = in_valid[p] && (q[p][0].ftype == FT_HEAD || q[p][0].ftype == FT_SINGLE);
      in_tail[p]  = in_valid[p] && (q[p][0].ftype == FT_TAIL || q[p][0].ftype == FT_SINGLE);
      req_out[p]  = in_valid[p] ? q[p][0].dst : '0;
    end
  end

  // scoreboard: sample at the clock edge, pop granted flits just after it
  always @(posedge clk) if (rst_n) begin
    logic [NPORTS-1:0] g;
    g = grant;
    for (int o = 0; o < NPORTS; o++) if (sel_valid[o]) begin
      int p;
      tflit_t f;
      p = int'(sel[o]);
      f = q[p][0];
      check(grant[p], "grant matches select");
      if (f.ftype == FT_HEAD || f.ftype == FT_SINGLE) begin
        check(owner[o] == -1, "head on a free output");
        check(f.dst == PORT_W'(o), "head leaves on its requested output");
        owner[o] = p;
      end else begin
        check(owner[o] == p, "body flit from the owning input");
      end
      if (f.ftype == FT_TAIL || f.ftype == FT_SINGLE) owner[o] = -1;
      flits_got++;
    end
    #1;
    for (int p = 0; p < NPORTS; p++) if (g[p]) void'(q[p].pop_front());
  end

  task automatic add_packet(input int p, input int dst, input int len);
    for (int i = 0; i < len; i++) begin
      tflit_t f;
      f.dst   = PORT_W'(dst);
      f.id    = 16'(flits_sent);
      f.ftype = (len == 1) ? FT_SINGLE : (i == 0) ? FT_HEAD : (i == len-1) ? FT_TAIL : FT_BODY;
      q[p].push_back(f);
      flits_sent++;
    end
  endtask

  task automatic wait_empty();
    int guard = 0;
    while ((q[0].size() + q[1].size() + q[2].size() + q[3].size() + q[4].size()) > 0 && guard < 5000) begin
      @(posedge clk); guard++;
    end
    @(posedge clk);
  endtask

  initial begin
    int first [$];
    foreach (owner[o]) owner[o] = -1;
    en = 1; out_ready = '1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. arbitration latency: head requests at this cycle, crosses next cycle
    add_packet(1, 3, 3);
    #1;
    check(grant == '0, "no transfer in the arbitration cycle");
    @(negedge clk);
    check(grant == 5'b00010 && sel_valid[3] && sel[3] == 3'd1, "head crosses one cycle after request");
    check(busy, "busy while locked");
    // 2. out_ready low holds the body flit
    out_ready[3] = 1'b0;
    #1;
    check(grant == '0, "out_ready low holds the transfer");
    @(negedge clk);
    out_ready[3] = 1'b1;
    wait_empty();
    check(!busy, "tail releases the lock");

    // 3. round robin: inputs 0..3 each send single-flit packets to output 4
    @(negedge clk);
    for (int k = 0; k < 3; k++) for (int p = 0; p < 4; p++) add_packet(p, 4, 1);
    repeat (9) begin
      @(negedge clk);
      for (int p = 0; p < NPORTS; p++) if (grant[p]) first.push_back(p);
    end
    wait_empty();
    check(first.size() >= 4, "round robin made progress");
    if (first.size() >= 4)
      check(first[0] != first[1] && first[0] != first[2] && first[0] != first[3] &&
            first[1] != first[2] && first[1] != first[3] && first[2] != first[3],
            "four contenders served in turn");

    // 4. en low blocks new locks
    @(negedge clk);
    en = 1'b0;
    add_packet(2, 0, 1);
    repeat (3) begin
      @(negedge clk);
      check(grant == '0 && !busy, "no lock while disabled");
    end
    en = 1'b1;
    wait_empty();

    // 5. random traffic with random back-pressure
    for (int n = 0; n < 400; n++) add_packet($urandom_range(NPORTS-1), $urandom_range(NPORTS-1), $urandom_range(1, 5));
    for (int c = 0; c < 20000 && (q[0].size() + q[1].size() + q[2].size() + q[3].size() + q[4].size()) > 0; c++) begin
      @(negedge clk);
      out_ready = NPORTS'($urandom);
    end
    out_ready = '1;
    wait_empty();
    check(flits_got == flits_sent, "every flit delivered");
    $display("flits sent=%0d delivered=%0d", flits_sent, flits_got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
