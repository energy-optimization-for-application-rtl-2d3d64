// tb_crossbar: self-checking test of the 5x5 crossbar.
//
// Random flits and random configurations; each output must carry the flit
// of the input its select names, and be valid exactly when enabled.
module tb_crossbar;
  import noc_pkg::*;

  flit_t [NPORTS-1:0]              in_flit, out_flit;
  logic  [NPORTS-1:0][PORT_W-1:0]  sel;
  logic  [NPORTS-1:0]              sel_valid, out_valid;
  int checks = 0, failures = 0;

  crossbar dut (.*);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      for (int p = 0; p < NPORTS; p++) begin
        in_flit[p]   = flit_t'({$urandom, $urandom});
        sel[p]       = PORT_W'($urandom_range(NPORTS-1));
        sel_valid[p] = 1'($urandom);
      end
      #1;
      for (int o = 0; o < NPORTS; o++) begin
        checks++;
        if (out_valid[o] != sel_valid[o] ||
            (sel_valid[o] && out_flit[o] != in_flit[sel[o]])) begin
          failures++;
          $display("FAIL output %0d sel %0d", o, sel[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
