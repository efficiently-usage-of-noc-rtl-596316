// noc_pkg: types, constants and the routing function shared by the
// virtual-channel router and the 2x2 network.
//
// Flits are 8 bits wide, as is the flit buffer of the router. A packet is a
// head flit followed by a number of body flits. The head flit carries the
// destination router ID in bits [3:0] (the width of the router IDs L_ID[3:0])
// and the number of body flits that follow in bits [7:4]; the last flit of a
// packet is its tail. This packet format is this design's own choice.
//
// Router IDs are numbered row by row, MESH_X routers per row. The X
// coordinate grows towards the west and Y grows towards the south, so in the
// 2x2 array router 1 is west of router 0 and router 3 south of router 1.
// Routing is dimension ordered: X first, then Y.
package noc_pkg;

  localparam int unsigned FLIT_W  = 8;   // flit and buffer width in bits
  localparam int unsigned ID_W    = 4;   // router ID width, L_ID[3:0]
  localparam int unsigned NPORTS  = 5;   // local, north, east, south, west
  localparam int unsigned PORT_W  = 3;   // bits to index a port
  localparam int unsigned LEN_W   = 4;   // body-flit count field of a head flit
  localparam int unsigned MAX_PKT = 1 + (1 << LEN_W) - 1;  // 16 flits

  typedef logic [FLIT_W-1:0] flit_t;
  typedef logic [ID_W-1:0]   id_t;

  typedef enum logic [PORT_W-1:0] {
    P_L = 3'd0,
    P_N = 3'd1,
    P_E = 3'd2,
    P_S = 3'd3,
    P_W = 3'd4
  } port_e;

  // Fields of a head flit.
  function automatic id_t head_dest(flit_t f);
    return f[ID_W-1:0];
  endfunction

  function automatic logic [LEN_W-1:0] head_len(flit_t f);
    return f[FLIT_W-1:FLIT_W-LEN_W];
  endfunction

  function automatic flit_t make_head(id_t dest, logic [LEN_W-1:0] len);
    return {len, dest};
  endfunction

  // Dimension-ordered (XY) route computation.
  function automatic port_e xy_route(id_t here, id_t dest, int unsigned mesh_x);
    int unsigned hx, hy, dx, dy;
    hx = int'(here) % mesh_x;
    hy = int'(here) / mesh_x;
    dx = int'(dest) % mesh_x;
    dy = int'(dest) / mesh_x;
    if (dx > hx)      return P_W;
    else if (dx < hx) return P_E;
    else if (dy > hy) return P_S;
    else if (dy < hy) return P_N;
    else              return P_L;
  endfunction

endpackage
