// pdaftr_fpd_table: regional fault-location-based path diversity (FPD) table.
//
// Each router keeps, for every destination inside a W_OB x W_OB observation
// window centred on itself, one FPD value per mesh direction (N, E, W, S):
// the number of usable paths towards that destination when the packet leaves
// through that direction, with faulty routers (and, for faults that lie
// outside the source-destination rectangle, the congested region around them)
// removed. With the published 5x5 window this is (5*5-1)*4 = 96 values, a
// size that does not grow with the mesh.
//
// Lookup: a destination outside the window is replaced by the furthest
// window router in the same direction, i.e. both coordinate offsets are
// clamped to [-W_HALF, +W_HALF]; far_o flags such a lookup. A destination
// equal to the router itself reads as all zero. NRD independent combinational
// read ports serve the input ports of the router in the same cycle.
//
// Loading: the table is written during system warm-up, one destination entry
// (all four directions) per cycle, through cfg_we / cfg_dx / cfg_dy /
// cfg_fpd, with signed offsets of the destination from this router. Writes
// to the centre position are ignored. Reset clears the table, which makes
// every direction unusable until it is loaded.
module pdaftr_fpd_table
  import pdaftr_pkg::*;
#(
  parameter int unsigned NRD = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // warm-up write port
  input  logic                    cfg_we,
  input  logic signed [3:0]       cfg_dx,
  input  logic signed [3:0]       cfg_dy,
  input  fpd_t                    cfg_fpd [NDIRS],
  // this router's coordinates
  input  coord_t                  cur_x,
  input  coord_t                  cur_y,
  // read ports
  input  coord_t                  rd_dst_x [NRD],
  input  coord_t                  rd_dst_y [NRD],
  output fpd_t                    rd_fpd   [NRD][NDIRS],
  output logic                    rd_far   [NRD]
);

  localparam int signed HALF = W_HALF;
  localparam int unsigned IDX_W = $clog2(TBL_ENTRIES);

  fpd_t tbl [TBL_ENTRIES][NDIRS];

  // Window position (dx, dy) in [-HALF, HALF]^2, centre excluded, to a
  // row-major entry index.
  function automatic logic [IDX_W-1:0] entry_idx(int signed dx, int signed dy);
    int signed lin;
    lin = (dy + HALF) * int'(W_OB) + (dx + HALF);
    if (lin > HALF * int'(W_OB) + HALF) lin = lin - 1;
    return IDX_W'(lin);
  endfunction

  function automatic int signed clamp(int signed v);
    if (v > HALF)  return HALF;
    if (v < -HALF) return -HALF;
    return v;
  endfunction

  logic cfg_in_window;
  assign cfg_in_window = (int'(cfg_dx) >= -HALF) && (int'(cfg_dx) <= HALF) &&
                         (int'(cfg_dy) >= -HALF) && (int'(cfg_dy) <= HALF) &&
                         !((cfg_dx == 0) && (cfg_dy == 0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < int'(TBL_ENTRIES); e++)
        for (int d = 0; d < int'(NDIRS); d++)
          tbl[e][d] <= '0;
    end else if (cfg_we && cfg_in_window) begin
      for (int d = 0; d < int'(NDIRS); d++)
        tbl[entry_idx(int'(cfg_dx), int'(cfg_dy))][d] <= cfg_fpd[d];
    end
  end

  always_comb begin
    for (int r = 0; r < int'(NRD); r++) begin
      int signed dx, dy, cx, cy;
      dx = int'({1'b0, rd_dst_x[r]}) - int'({1'b0, cur_x});
      dy = int'({1'b0, rd_dst_y[r]}) - int'({1'b0, cur_y});
      cx = clamp(dx);
      cy = clamp(dy);
      rd_far[r] = (cx != dx) || (cy != dy);
      for (int d = 0; d < int'(NDIRS); d++)
        rd_fpd[r][d] = ((dx == 0) && (dy == 0)) ? '0 : tbl[entry_idx(cx, cy)][d];
    end
  end

endmodule
