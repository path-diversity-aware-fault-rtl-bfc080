// pdaftr_pkg: types and constants shared by the PDA-FTR router and mesh.
//
// Ports of a router are numbered N, E, W, S, L (0..4). The first four follow
// the column order of the FPD table (destination, N, E, W, S); L is the local
// port of the attached core. Coordinates follow the usual mesh convention:
// (0,0) is the south-west corner, x grows to the east and y to the north.
//
// A flit is a packed struct. Every flit carries the packet's source and
// destination coordinates so that a router needs no per-packet header
// decoding state; only a head flit's copy is used for routing. The flit
// width, coordinate width and FPD width are this design's own choices; the
// 5-port router, the 4-flit input buffer and the 5x5 observation window are
// the published configuration.
package pdaftr_pkg;

  // Coordinate width: 5 bits covers meshes up to 32x32 (the largest mesh
  // evaluated is 18x18).
  localparam int unsigned COORD_W = 5;
  // Payload bits per flit.
  localparam int unsigned DATA_W  = 32;
  // Width of one stored FPD value (saturating path count).
  localparam int unsigned FPD_W   = 4;
  // Number of router ports and of mesh directions.
  localparam int unsigned NPORTS  = 5;
  localparam int unsigned NDIRS   = 4;
  // Observation window side (hops) of the regional FPD table.
  localparam int unsigned W_OB    = 5;
  localparam int unsigned W_HALF  = W_OB / 2;
  // Entries of the regional table: every window position except the router.
  localparam int unsigned TBL_ENTRIES = W_OB * W_OB - 1;

  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [FPD_W-1:0]   fpd_t;

  // Router port / direction index.
  typedef enum logic [2:0] {
    P_N = 3'd0,
    P_E = 3'd1,
    P_W = 3'd2,
    P_S = 3'd3,
    P_L = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    FT_HEAD     = 2'd0,
    FT_BODY     = 2'd1,
    FT_TAIL     = 2'd2,
    FT_HEADTAIL = 2'd3
  } flit_type_e;

  typedef struct packed {
    flit_type_e          ftype;
    coord_t              src_x;
    coord_t              src_y;
    coord_t              dst_x;
    coord_t              dst_y;
    logic [DATA_W-1:0]   data;
  } flit_t;

  // One candidate output channel produced by the routing function.
  typedef struct packed {
    logic  valid;
    port_e dir;
  } coc_t;

  // Per-cycle event flags a router reports for performance monitoring.
  typedef struct packed {
    logic route_min;     // a head flit was routed in minimal mode
    logic route_nonmin;  // a head flit was routed in non-minimal (detour) mode
    logic far_lookup;    // table read for an out-of-window destination
    logic sel_none;      // selection case (a): no candidate available
    logic sel_one;       // selection case (b): exactly one candidate available
    logic sel_ebl;       // selection case (c): chosen by comparing EBL
    logic blocked_down;  // a reserved output waited for downstream space
    logic [2:0] unreachable; // packets with no usable channel discarded
  } router_ev_t;

  function automatic logic is_head(flit_type_e t);
    return (t == FT_HEAD) || (t == FT_HEADTAIL);
  endfunction

  function automatic logic is_tail(flit_type_e t);
    return (t == FT_TAIL) || (t == FT_HEADTAIL);
  endfunction

endpackage
