// pdaftr_router: five-port wormhole router running the PDA-FTR algorithm.
//
// Blocks, as in the published router: one FIFO input buffer per port, a
// regional FPD table, the adaptive routing algorithm (routing function and
// selection function, one copy per input port), a matrix allocator and a 5x5
// crossbar. Ports are N, E, W, S and L (local core).
//
// Operation of a packet (wormhole switching):
//   cycle t   : the head flit is at the front of its input buffer. The FPD
//               table is read for its destination, the routing function gives
//               the candidate output channels, the selection function picks
//               one by effective buffer length and availability, and the
//               output's matrix arbiter grants one of the requesting inputs.
//   cycle t+1 : the output is reserved for the input; from now on every cycle
//               in which the downstream buffer reports a free slot one flit of
//               the packet crosses the crossbar (req_out high).
//   tail      : the cycle the tail flit crosses, the reservation is released.
// The router is not pipelined: route, select, allocate and traverse are all
// evaluated combinationally from registered state.
//
// Link protocol (per port): a sender drives flit and req; the receiving
// buffer raises ack in the same cycle when it takes the flit. buf_out is the
// number of free slots of this router's input buffer; the upstream router
// only sends when it is non-zero, so every req is acknowledged. buf_in of the
// local port is supplied by the attached core (its free space for ejection).
//
// Unreachable packets: when the routing function finds no candidate channel
// at all for a head flit (the destination cannot be reached from here under
// the odd-even turn rules because of faults), the packet is discarded from
// its input buffer, one flit per cycle up to the tail, and ev.unreachable counts
// it, so that the network keeps moving and the loss can be
// counted.
//
// The FPD table is loaded during warm-up through the cfg_* port (see
// pdaftr_fpd_table). ev reports, per cycle, which routing and selection cases
// occurred, for performance monitoring.
module pdaftr_router
  import pdaftr_pkg::*;
#(
  parameter int unsigned MESH_X = 8,
  parameter int unsigned MESH_Y = 8,
  parameter int unsigned DEPTH  = 4,
  localparam int unsigned BUF_W = $clog2(DEPTH+1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  coord_t           cur_x,
  input  coord_t           cur_y,
  // faulty neighbours (N, E, W, S), from fault diagnosis
  input  logic [NDIRS-1:0] nbr_fault,
  // FPD table warm-up load
  input  logic             cfg_we,
  input  logic signed [3:0] cfg_dx,
  input  logic signed [3:0] cfg_dy,
  input  fpd_t             cfg_fpd [NDIRS],
  // input links
  input  flit_t            flit_in [NPORTS],
  input  logic             req_in  [NPORTS],
  output logic             ack_out [NPORTS],
  output logic [BUF_W-1:0] buf_out [NPORTS],
  // output links
  output flit_t            flit_out [NPORTS],
  output logic             req_out  [NPORTS],
  input  logic             ack_in   [NPORTS],
  input  logic [BUF_W-1:0] buf_in   [NPORTS],
  // monitoring
  output router_ev_t       ev
);

  // ---------------------------------------------------------------- buffers
  logic  head_valid [NPORTS];
  flit_t head_flit  [NPORTS];
  logic  pop        [NPORTS];

  for (genvar p = 0; p < int'(NPORTS); p++) begin : g_fifo
    pdaftr_fifo #(.DEPTH(DEPTH)) u_fifo (
      .clk        (clk),
      .rst_n      (rst_n),
      .req_in     (req_in[p]),
      .flit_in    (flit_in[p]),
      .ack_out    (ack_out[p]),
      .free_slots (buf_out[p]),
      .head_valid (head_valid[p]),
      .head_flit  (head_flit[p]),
      .pop        (pop[p])
    );
  end

  // -------------------------------------------------------------- FPD table
  coord_t rd_dst_x [NPORTS];
  coord_t rd_dst_y [NPORTS];
  fpd_t   rd_fpd   [NPORTS][NDIRS];
  logic   rd_far   [NPORTS];

  always_comb begin
    for (int p = 0; p < int'(NPORTS); p++) begin
      rd_dst_x[p] = head_flit[p].dst_x;
      rd_dst_y[p] = head_flit[p].dst_y;
    end
  end

  pdaftr_fpd_table #(.NRD(NPORTS)) u_fpd_table (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_we   (cfg_we),
    .cfg_dx   (cfg_dx),
    .cfg_dy   (cfg_dy),
    .cfg_fpd  (cfg_fpd),
    .cur_x    (cur_x),
    .cur_y    (cur_y),
    .rd_dst_x (rd_dst_x),
    .rd_dst_y (rd_dst_y),
    .rd_fpd   (rd_fpd),
    .rd_far   (rd_far)
  );

  // ------------------------------------- routing and selection per input
  logic              reserved [NPORTS-1:0];
  logic [NPORTS-1:0] reserved_v;
  port_e             owner       [NPORTS];
  logic              route_valid [NPORTS];
  port_e             route_dir   [NPORTS];
  logic [NPORTS-1:0] gnt;

  coc_t              c0 [NPORTS];
  coc_t              c1 [NPORTS];
  logic              nonmin  [NPORTS];
  logic              at_dest [NPORTS];
  logic              want    [NPORTS];   // head flit waiting for an output
  logic              sel_req [NPORTS];
  port_e             sel_dir [NPORTS];
  logic [1:0]        sel_case [NPORTS];
  logic              req_valid [NPORTS];
  logic              dropping  [NPORTS];  // discarding an unreachable packet
  logic              drop_pop  [NPORTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < int'(NPORTS); p++) dropping[p] <= 1'b0;
    end else begin
      for (int p = 0; p < int'(NPORTS); p++)
        if (drop_pop[p]) dropping[p] <= !is_tail(head_flit[p].ftype);
    end
  end

  for (genvar p = 0; p < int'(NPORTS); p++) begin : g_route
    pdaftr_routing_function #(.MESH_X(MESH_X), .MESH_Y(MESH_Y)) u_rf (
      .cur_x   (cur_x),
      .cur_y   (cur_y),
      .src_x   (head_flit[p].src_x),
      .src_y   (head_flit[p].src_y),
      .dst_x   (head_flit[p].dst_x),
      .dst_y   (head_flit[p].dst_y),
      .in_port (port_e'(p)),
      .fpd     (rd_fpd[p]),
      .nbr_fault (nbr_fault),
      .c0      (c0[p]),
      .c1      (c1[p]),
      .nonmin  (nonmin[p]),
      .at_dest (at_dest[p])
    );

    pdaftr_selection_function #(.BUF_W(BUF_W)) u_sf (
      .c0        (c0[p]),
      .c1        (c1[p]),
      .fpd       (rd_fpd[p]),
      .buf_in    (buf_in),
      .reserved  (reserved_v),
      .req_valid (sel_req[p]),
      .req_dir   (sel_dir[p]),
      .sel_case  (sel_case[p])
    );

    assign want[p]      = head_valid[p] && is_head(head_flit[p].ftype) && !route_valid[p] &&
                          !dropping[p];
    // A head flit with no candidate channel at all is unreachable: the packet
    // is discarded from this input buffer, flit by flit, up to its tail.
    assign drop_pop[p]  = head_valid[p] && (dropping[p] || (want[p] && !c0[p].valid));
    assign req_valid[p] = want[p] && sel_req[p];
  end

  // -------------------------------------------------------------- allocator
  logic [NPORTS-1:0] release_out;

  pdaftr_allocator u_alloc (
    .clk         (clk),
    .rst_n       (rst_n),
    .req_valid   (req_valid),
    .req_dir     (sel_dir),
    .release_out (release_out),
    .gnt         (gnt),
    .reserved    (reserved_v),
    .owner       (owner),
    .route_valid (route_valid),
    .route_dir   (route_dir)
  );

  always_comb begin
    for (int o = 0; o < int'(NPORTS); o++) reserved[o] = reserved_v[o];
  end

  // ------------------------------------------------------ switch traversal
  logic xb_en [NPORTS];

  always_comb begin
    for (int o = 0; o < int'(NPORTS); o++) begin
      xb_en[o]       = reserved[o] && head_valid[owner[o]] && (buf_in[o] != '0);
      release_out[o] = xb_en[o] && is_tail(head_flit[owner[o]].ftype);
    end
  end

  always_comb begin
    for (int p = 0; p < int'(NPORTS); p++)
      pop[p] = (route_valid[p] && xb_en[route_dir[p]]) || drop_pop[p];
  end

  pdaftr_crossbar u_xbar (
    .in_flit   (head_flit),
    .sel       (owner),
    .en        (xb_en),
    .out_flit  (flit_out),
    .out_valid (req_out)
  );

  // ------------------------------------------------------------- monitoring
  always_comb begin
    ev = '0;
    for (int p = 0; p < int'(NPORTS); p++) begin
      if (want[p] && c0[p].valid) begin
        if (!at_dest[p]) begin
          if (nonmin[p]) ev.route_nonmin = 1'b1;
          else           ev.route_min    = 1'b1;
          if (rd_far[p]) ev.far_lookup   = 1'b1;
        end
        unique case (sel_case[p])
          2'b00:   ev.sel_none = 1'b1;
          2'b11:   ev.sel_ebl  = 1'b1;
          default: ev.sel_one  = 1'b1;
        endcase
      end
    end
    for (int o = 0; o < int'(NPORTS); o++)
      if (reserved[o] && head_valid[owner[o]] && (buf_in[o] == '0)) ev.blocked_down = 1'b1;
    for (int p = 0; p < int'(NPORTS); p++)
      if (drop_pop[p] && is_head(head_flit[p].ftype)) ev.unreachable = ev.unreachable + 3'd1;
  end

  // A grant only goes to an input that asked for an output.
  a_gnt_req: assert property (@(posedge clk) disable iff (!rst_n)
    (gnt & ~{req_valid[4], req_valid[3], req_valid[2], req_valid[1], req_valid[0]}) == '0);

  // Every flit sent is taken by the downstream buffer.
  for (genvar o = 0; o < int'(NPORTS); o++) begin : g_chk
    a_ack: assert property (@(posedge clk) disable iff (!rst_n) req_out[o] |-> ack_in[o]);
  end

endmodule
