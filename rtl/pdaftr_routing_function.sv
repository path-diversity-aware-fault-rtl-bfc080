// pdaftr_routing_function: candidate output channels (COC) of PDA-FTR.
//
// Two routing units work in parallel and a multiplexer picks one of them:
//   * Minimal path: the odd-even turn model's minimal routing function
//     (current, source and destination coordinates), further limited to the
//     turns the odd-even model allows for the port the packet arrived on, to
//     directions that stay inside the mesh, and to directions whose FPD value
//     is non-zero.
//   * Non-minimal path: every direction the odd-even turn rules allow from
//     the arrival port (no 180-degree turn, no east-to-north/south turn in an
//     even column, no north/south-to-west turn in an odd column) that stays
//     inside the mesh, from which the destination can still be reached under
//     those rules, and that has a non-zero FPD value. When no such direction
//     has a non-zero FPD, every such direction not leading into a faulty
//     neighbour is offered (the FPD table only counts minimal paths from
//     each neighbour, so a detour around a fault may see zeros everywhere).
// The minimal result is used when it holds at least one channel; when the
// FPD of every minimal direction is zero the packet is detoured through the
// non-minimal result. A packet whose destination is this router gets the
// local port. At most two candidates are passed on (c0, c1), the first two
// in N, E, W, S order; a minimal route never has more than two.
//
// Purely combinational; the router evaluates it in the same cycle as the
// selection function and the allocator.
//
// src_y is part of the interface (the source address as the flit carries
// it) but the odd-even minimal function only needs the source column, so
// lint reports it unused.
module pdaftr_routing_function
  import pdaftr_pkg::*;
#(
  parameter int unsigned MESH_X = 8,
  parameter int unsigned MESH_Y = 8
) (
  input  coord_t cur_x,
  input  coord_t cur_y,
  input  coord_t src_x,
  input  coord_t src_y,
  input  coord_t dst_x,
  input  coord_t dst_y,
  input  port_e  in_port,
  input  fpd_t   fpd [NDIRS],
  input  logic [NDIRS-1:0] nbr_fault,  // neighbour in direction d is faulty
  output coc_t   c0,
  output coc_t   c1,
  output logic   nonmin,   // detour (non-minimal) mode selected
  output logic   at_dest   // destination reached: local port
);

  logic [NDIRS-1:0] oe_min;     // odd-even minimal directions
  logic [NDIRS-1:0] legal;      // turn-legal, inside the mesh
  logic [NDIRS-1:0] usable;     // FPD non-zero
  logic [NDIRS-1:0] admissible; // detour that keeps the destination reachable
  logic [NDIRS-1:0] min_set, nonmin_fpd, nonmin_set, pick;
  logic             cur_odd;

  // Bit positions of the four directions in the masks above.
  localparam logic [1:0] B_N = 2'(P_N);
  localparam logic [1:0] B_E = 2'(P_E);
  localparam logic [1:0] B_W = 2'(P_W);
  localparam logic [1:0] B_S = 2'(P_S);

  assign cur_odd = cur_x[0];
  assign at_dest = (cur_x == dst_x) && (cur_y == dst_y);

  // Odd-even minimal routing function.
  always_comb begin
    oe_min = '0;
    if (dst_x == cur_x) begin
      if (dst_y > cur_y)      oe_min[B_N] = 1'b1;
      else if (dst_y < cur_y) oe_min[B_S] = 1'b1;
    end else if (dst_x > cur_x) begin
      if (dst_y == cur_y) begin
        oe_min[B_E] = 1'b1;
      end else begin
        if (cur_odd || (cur_x == src_x)) begin
          if (dst_y > cur_y) oe_min[B_N] = 1'b1;
          else               oe_min[B_S] = 1'b1;
        end
        if (dst_x[0] || (dst_x != cur_x + 1'b1)) oe_min[B_E] = 1'b1;
      end
    end else begin
      oe_min[B_W] = 1'b1;
      if (!cur_odd) begin
        if (dst_y > cur_y)      oe_min[B_N] = 1'b1;
        else if (dst_y < cur_y) oe_min[B_S] = 1'b1;
      end
    end
  end

  // Turn legality from the arrival port, and the mesh boundary.
  always_comb begin
    legal = '1;
    // no 180-degree turns
    if (in_port != P_L) legal[in_port[1:0]] = 1'b0;
    // travelling east (arrived from the west): no turn north/south in an even column
    if (in_port == P_W && !cur_odd) begin
      legal[B_N] = 1'b0;
      legal[B_S] = 1'b0;
    end
    // travelling north or south: no turn west in an odd column
    if ((in_port == P_N || in_port == P_S) && cur_odd) legal[B_W] = 1'b0;
    if (cur_y == coord_t'(MESH_Y - 1)) legal[B_N] = 1'b0;
    if (cur_y == '0)                   legal[B_S] = 1'b0;
    if (cur_x == coord_t'(MESH_X - 1)) legal[B_E] = 1'b0;
    if (cur_x == '0)                   legal[B_W] = 1'b0;
  end

  always_comb begin
    for (int d = 0; d < int'(NDIRS); d++) usable[d] = (fpd[d] != '0);
  end

  // Under the odd-even rules a packet that has travelled east can never
  // travel west again, and one travelling north or south in an odd column
  // can never turn west. A detour therefore goes east only when the
  // destination lies to the east, and north or south in an odd column only
  // when the destination is not to the west (and, in the destination's own
  // column, only towards it).
  always_comb begin
    admissible = '1;
    // east: only towards the destination, and not into an even destination
    // column on another row (no turn north/south there after moving east)
    if (dst_x <= cur_x) admissible[B_E] = 1'b0;
    if ((dst_x == cur_x + 1'b1) && !dst_x[0] && (dst_y != cur_y)) admissible[B_E] = 1'b0;
    if (cur_odd) begin
      if (dst_x < cur_x) begin
        admissible[B_N] = 1'b0;
        admissible[B_S] = 1'b0;
      end else if (dst_x == cur_x) begin
        if (dst_y <= cur_y) admissible[B_N] = 1'b0;
        if (dst_y >= cur_y) admissible[B_S] = 1'b0;
      end
    end
  end

  assign min_set    = oe_min & legal & usable;
  // Detour: directions with a non-zero FPD if there are any, otherwise any
  // direction that does not lead into a faulty router.
  assign nonmin_fpd = legal & admissible & usable;
  assign nonmin_set = (nonmin_fpd != '0) ? nonmin_fpd : (legal & admissible & ~nbr_fault);
  assign nonmin     = !at_dest && (min_set == '0);
  assign pick       = nonmin ? nonmin_set : min_set;

  // First two set directions in N, E, W, S order.
  always_comb begin
    c0 = '{valid: 1'b0, dir: P_N};
    c1 = '{valid: 1'b0, dir: P_N};
    if (at_dest) begin
      c0 = '{valid: 1'b1, dir: P_L};
    end else begin
      for (int d = 0; d < int'(NDIRS); d++) begin
        if (pick[d]) begin
          if (!c0.valid)      c0 = '{valid: 1'b1, dir: port_e'(d)};
          else if (!c1.valid) c1 = '{valid: 1'b1, dir: port_e'(d)};
        end
      end
    end
  end

endmodule
