// pdaftr_mesh: MESH_X x MESH_Y mesh network-on-chip of PDA-FTR routers.
//
// Router (x, y) sits at node index n = y*MESH_X + x; its E output feeds the W
// input of (x+1, y), its N output the S input of (x, y+1), and so on. Ports
// on the mesh boundary are tied off: nothing arrives on them and they report
// no free buffer space, so nothing is sent through them.
//
// Permanent faults: fault_map[n] marks router n as faulty (as located by the
// chip's test and diagnosis before warm-up). A faulty router is cut off: its
// outgoing links stay idle, it reports no free buffer space to its
// neighbours and its local port accepts nothing. The routing algorithm
// avoids it because its FPD tables (loaded through cfg_*) give zero path
// diversity through it.
//
// FPD table warm-up: cfg_we writes one table entry (four FPD values) of the
// router at (cfg_x, cfg_y) for the destination at offset (cfg_dx, cfg_dy).
//
// Local ports (one per node, for the attached cores):
//   inject : inj_flit/inj_req in, inj_ack out (taken this cycle), inj_free
//            out (free slots of the local input buffer).
//   eject  : ej_flit/ej_req out, ej_free in (space in the core's receive
//            buffer; the router sends only while it is non-zero).
// ev[n] carries router n's per-cycle event flags.
// The 8x8 default is the mesh used for the synthetic-traffic evaluation; the
// 4-flit buffers are the evaluated buffer depth.
module pdaftr_mesh
  import pdaftr_pkg::*;
#(
  parameter int unsigned MESH_X = 8,
  parameter int unsigned MESH_Y = 8,
  parameter int unsigned DEPTH  = 4,
  localparam int unsigned NODES = MESH_X * MESH_Y,
  localparam int unsigned BUF_W = $clog2(DEPTH+1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NODES-1:0] fault_map,
  // FPD table warm-up load
  input  logic             cfg_we,
  input  coord_t           cfg_x,
  input  coord_t           cfg_y,
  input  logic signed [3:0] cfg_dx,
  input  logic signed [3:0] cfg_dy,
  input  fpd_t             cfg_fpd [NDIRS],
  // local injection
  input  flit_t            inj_flit [NODES],
  input  logic             inj_req  [NODES],
  output logic             inj_ack  [NODES],
  output logic [BUF_W-1:0] inj_free [NODES],
  // local ejection
  output flit_t            ej_flit  [NODES],
  output logic             ej_req   [NODES],
  input  logic [BUF_W-1:0] ej_free  [NODES],
  // monitoring
  output router_ev_t       ev       [NODES]
);

  // Raw router outputs.
  flit_t            r_flit_out [NODES][NPORTS];
  logic             r_req_out  [NODES][NPORTS];
  logic             r_ack_out  [NODES][NPORTS];
  logic [BUF_W-1:0] r_buf_out  [NODES][NPORTS];
  // Router inputs after wiring.
  flit_t            r_flit_in  [NODES][NPORTS];
  logic             r_req_in   [NODES][NPORTS];
  logic             r_ack_in   [NODES][NPORTS];
  logic [BUF_W-1:0] r_buf_in   [NODES][NPORTS];

  // Neighbour of node n in direction d (N, E, W, S); -1 outside the mesh.
  function automatic int neighbour(int n, int d);
    int x, y;
    x = n % int'(MESH_X);
    y = n / int'(MESH_X);
    unique case (d)
      0: return (y == int'(MESH_Y) - 1) ? -1 : n + int'(MESH_X);
      1: return (x == int'(MESH_X) - 1) ? -1 : n + 1;
      2: return (x == 0)                ? -1 : n - 1;
      default: return (y == 0)          ? -1 : n - int'(MESH_X);
    endcase
  endfunction

  // The port of the neighbour that faces direction d: N<->S, E<->W.
  function automatic int facing(int d);
    return 3 - d;
  endfunction

  // Forward direction: flits and their request strobes.
  always_comb begin
    for (int n = 0; n < int'(NODES); n++) begin
      for (int d = 0; d < int'(NDIRS); d++) begin
        int m;
        m = neighbour(n, d);
        if (m < 0) begin
          r_flit_in[n][d] = '0;
          r_req_in[n][d]  = 1'b0;
        end else begin
          r_flit_in[n][d] = r_flit_out[m][facing(d)];
          r_req_in[n][d]  = r_req_out[m][facing(d)] && !fault_map[m];
        end
      end
      r_flit_in[n][P_L] = inj_flit[n];
      r_req_in[n][P_L]  = inj_req[n] && !fault_map[n];
      ej_flit[n]        = r_flit_out[n][P_L];
      ej_req[n]         = r_req_out[n][P_L] && !fault_map[n];
    end
  end

  // Backward direction: acknowledges.
  always_comb begin
    for (int n = 0; n < int'(NODES); n++) begin
      for (int d = 0; d < int'(NDIRS); d++) begin
        int m;
        m = neighbour(n, d);
        r_ack_in[n][d] = (m >= 0) && r_ack_out[m][facing(d)] && !fault_map[m];
      end
      // The core takes every flit it has announced space for.
      r_ack_in[n][P_L] = r_req_out[n][P_L] && !fault_map[n];
      inj_ack[n]       = r_ack_out[n][P_L] && !fault_map[n];
    end
  end

  // Backward direction: free-slot counts (registered at their source).
  always_comb begin
    for (int n = 0; n < int'(NODES); n++) begin
      for (int d = 0; d < int'(NDIRS); d++) begin
        int m;
        m = neighbour(n, d);
        r_buf_in[n][d] = (m < 0 || fault_map[m]) ? '0 : r_buf_out[m][facing(d)];
      end
      r_buf_in[n][P_L] = ej_free[n];
      inj_free[n]      = fault_map[n] ? '0 : r_buf_out[n][P_L];
    end
  end

  for (genvar n = 0; n < int'(NODES); n++) begin : g_node
    localparam int unsigned X = n % MESH_X;
    localparam int unsigned Y = n / MESH_X;
    logic we;
    logic [NDIRS-1:0] nbr_fault;
    assign we = cfg_we && (cfg_x == coord_t'(X)) && (cfg_y == coord_t'(Y));
    always_comb begin
      for (int d = 0; d < int'(NDIRS); d++) begin
        int m;
        m = neighbour(n, d);
        nbr_fault[d] = (m >= 0) && fault_map[m];
      end
    end

    pdaftr_router #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .DEPTH(DEPTH)) u_router (
      .clk      (clk),
      .rst_n    (rst_n),
      .cur_x    (coord_t'(X)),
      .cur_y    (coord_t'(Y)),
      .nbr_fault(nbr_fault),
      .cfg_we   (we),
      .cfg_dx   (cfg_dx),
      .cfg_dy   (cfg_dy),
      .cfg_fpd  (cfg_fpd),
      .flit_in  (r_flit_in[n]),
      .req_in   (r_req_in[n]),
      .ack_out  (r_ack_out[n]),
      .buf_out  (r_buf_out[n]),
      .flit_out (r_flit_out[n]),
      .req_out  (r_req_out[n]),
      .ack_in   (r_ack_in[n]),
      .buf_in   (r_buf_in[n]),
      .ev       (ev[n])
    );
  end

endmodule
