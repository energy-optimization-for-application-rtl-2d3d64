// noc_pkg: types and constants shared by the multi-mode switch network.
//
// A switch has five ports: the local port of its core (I) and the four mesh
// directions E, W, N, S, as in the classic five-port wormhole router. Each
// switch runs in one of three modes: NORMAL (buffers, arbiter and crossbar
// in use), LEASE (fixed input-to-output lease lines, no arbitration, no
// crossbar) and OFF (switch idle and gated). The port and mode names follow
// the design description; the flit layout, the coordinate width, the time
// width of the switch-mode table and XY routing are this design's own choices.
package noc_pkg;

  localparam int unsigned NPORTS   = 5;   // I, E, W, N, S
  localparam int unsigned PORT_W   = 3;
  localparam int unsigned COORD_W  = 4;   // mesh up to 16 x 16
  localparam int unsigned DATA_W   = 32;  // flit payload
  localparam int unsigned TIME_W   = 20;  // cycle count of the mode table (> 120000 cycles)

  typedef enum logic [PORT_W-1:0] {
    P_LOCAL = 3'd0,
    P_EAST  = 3'd1,
    P_WEST  = 3'd2,
    P_NORTH = 3'd3,
    P_SOUTH = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    MODE_NORMAL = 2'd0,
    MODE_LEASE  = 2'd1,
    MODE_OFF    = 2'd2
  } mode_e;

  typedef enum logic [1:0] {
    FT_HEAD   = 2'd0,
    FT_BODY   = 2'd1,
    FT_TAIL   = 2'd2,
    FT_SINGLE = 2'd3   // one-flit packet: head and tail at once
  } flit_type_e;

  typedef struct packed {
    flit_type_e          ftype;
    logic [COORD_W-1:0]  dst_x;
    logic [COORD_W-1:0]  dst_y;
    logic [DATA_W-1:0]   data;
  } flit_t;

  // Configuration of one switch. In LEASE mode, output d is fed by the lease
  // line from input lease_src[d] when lease_en[d] is set; several lease lines
  // may be active at once.
  typedef struct packed {
    mode_e                            mode;
    logic [NPORTS-1:0]                lease_en;
    logic [NPORTS-1:0][PORT_W-1:0]    lease_src;
  } mode_cfg_t;

  // One record of the switch-mode table: the configuration holds from
  // t_start to t_end inclusive (cycles counted from the start of execution).
  typedef struct packed {
    logic [TIME_W-1:0] t_start;
    logic [TIME_W-1:0] t_end;
    mode_cfg_t         cfg;
  } smt_entry_t;

  localparam mode_cfg_t CFG_NORMAL = '{mode: MODE_NORMAL, lease_en: '0, lease_src: '0};

  function automatic logic is_head(input flit_type_e t);
    return (t == FT_HEAD) || (t == FT_SINGLE);
  endfunction

  function automatic logic is_tail(input flit_type_e t);
    return (t == FT_TAIL) || (t == FT_SINGLE);
  endfunction

  // Dimension-order (X first, then Y) routing; y grows towards north.
  function automatic logic [PORT_W-1:0] xy_route(input logic [COORD_W-1:0] my_x,
                                                 input logic [COORD_W-1:0] my_y,
                                                 input logic [COORD_W-1:0] dst_x,
                                                 input logic [COORD_W-1:0] dst_y);
    if (dst_x > my_x)      return P_EAST;
    else if (dst_x < my_x) return P_WEST;
    else if (dst_y > my_y) return P_NORTH;
    else if (dst_y < my_y) return P_SOUTH;
    else                   return P_LOCAL;
  endfunction

endpackage
