// tb_flit_buffer: self-checking test of the input buffer.
//
// Random pushes and pops (never into a full or out of an empty buffer) are
// compared against a queue model: the visible oldest flit, empty and full.
// A directed part fills the buffer to DEPTH and checks that full rises
// exactly then, and that a simultaneous push and pop keeps the count.
module tb_flit_buffer;
  import noc_pkg::*;

  localparam int unsigned DEPTH = 4;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  wr_en, rd_en, empty, full;
  flit_t wr_data, rd_data;
  flit_t model [$];
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  flit_buffer #(.DEPTH(DEPTH)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic flit_t rnd_flit();
    flit_t f;
    f.ftype = flit_type_e'($urandom_range(3));
    f.dst_x = COORD_W'($urandom);
    f.dst_y = COORD_W'($urandom);
    f.data  = $urandom;
    return f;
  endfunction

  task automatic step(input logic w, input logic r);
    wr_en   = w;
    rd_en   = r;
    wr_data = rnd_flit();
    @(posedge clk);
    if (r) void'(model.pop_front());
    if (w) model.push_back(wr_data);
    #1;
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == DEPTH), "full flag");
    if (model.size() > 0) check(rd_data == model[0], "oldest flit");
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    check(empty && !full, "empty after reset");
    // fill
    for (int i = 0; i < DEPTH; i++) step(1, 0);
    check(full, "full after DEPTH pushes");
    // push and pop together while full is not allowed; pop one then push+pop
    step(0, 1);
    step(1, 1);
    check(model.size() == DEPTH-1, "count kept by push+pop");
    // drain
    while (model.size() > 0) step(0, 1);
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      logic w, r;
      w = ($urandom_range(1) == 1) && (model.size() < DEPTH);
      r = ($urandom_range(1) == 1) && (model.size() > 0);
      step(w, r);
    end
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
