// flit_buffer: input buffer of one switch port (Buf I/E/W/N/S).
//
// A first-in first-out store of DEPTH flits, written by the upstream link
// ("write") and read by the switch ("read"). The oldest flit is always
// visible on rd_data while the buffer is not empty, so the switch can look
// at the head flit to compute its route before popping it. A write and a
// read may happen in the same cycle. full and empty come from registers
// only, so the upstream ready derived from them has no combinational path
// from anything downstream.
//
// Timing: a flit written at edge t is visible on rd_data after edge t.
// Writing while full or reading while empty is a protocol error (asserted).
//
// The buffer itself comes from the five-port router the design builds on;
// its depth and the circular-array structure are this design's own choice.
module flit_buffer
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   wr_en,
  input  flit_t  wr_data,
  input  logic   rd_en,
  output flit_t  rd_data,
  output logic   empty,
  output logic   full
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t               mem [DEPTH];
  logic [AW-1:0]       wr_ptr, rd_ptr;
  logic [AW:0]         count;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (wr_en) wr_ptr <= next_ptr(wr_ptr);
      if (rd_en) rd_ptr <= next_ptr(rd_ptr);
      case ({wr_en, rd_en})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));

endmodule
