// crossbar: the 5x5 switching fabric of a switch in normal mode.
//
// Every output has its own path from every input: output o carries input
// sel[o] when sel_valid[o] is set (the "config" from the arbiter's
// "select"), and no flit otherwise. Purely combinational; the flit is
// captured by the downstream input buffer. In lease-line mode the switch
// bypasses this block entirely.
//
// The fabric and its port names follow the five-port router of the design;
// building it as one multiplexer per output is this design's choice.
module crossbar
  import noc_pkg::*;
(
  input  flit_t [NPORTS-1:0]              in_flit,
  input  logic  [NPORTS-1:0][PORT_W-1:0]  sel,
  input  logic  [NPORTS-1:0]              sel_valid,
  output flit_t [NPORTS-1:0]              out_flit,
  output logic  [NPORTS-1:0]              out_valid
);

  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      out_flit[o]  = '0;
      out_valid[o] = sel_valid[o];
      for (int p = 0; p < NPORTS; p++)
        if (sel[o] == PORT_W'(p)) out_flit[o] = in_flit[p];
    end
  end

endmodule
