// pdaftr_fpd_model_pkg: behavioural model of the warm-up FPD computation.
//
// Testbench-only. Builds the values that the warm-up process stores in each
// router's regional FPD table, from the list of faulty routers:
//   * the target is the destination, clamped to the router's observation
//     window (the furthest window router in the destination's direction);
//   * the FPD of direction d is the number of minimal paths from the
//     neighbour in direction d to the target (0 if that neighbour is outside
//     the mesh or faulty);
//   * paths follow the odd-even turn rules, starting with the move into the
//     neighbour;
//   * a path may not cross a faulty router. When no fault lies inside the
//     rectangle spanned by the router and the target (fault and
//     source-destination pair uncorrelated), it also may not cross the
//     congested region around a fault, taken here as the routers one hop
//     from it, unless that would leave no path at all. The target itself is
//     always allowed (a clamped target may be a faulty router);
//   * values saturate at the FPD width.
package pdaftr_fpd_model_pkg;
  import pdaftr_pkg::*;

  localparam int MAXN = 32;

  // Faulty-router map: bit x*MAXN + y is router (x, y).
  typedef bit [MAXN*MAXN-1:0] fault_grid_t;

  function automatic bit flt(fault_grid_t f, int x, int y);
    return f[x * MAXN + y];
  endfunction

  function automatic bit on_mesh(int kx, int ky, int x, int y);
    return (x >= 0) && (y >= 0) && (x < kx) && (y < ky);
  endfunction

  function automatic bit near_fault(int kx, int ky, fault_grid_t f, int x, int y);
    if (on_mesh(kx, ky, x + 1, y) && flt(f, x + 1, y)) return 1'b1;
    if (on_mesh(kx, ky, x - 1, y) && flt(f, x - 1, y)) return 1'b1;
    if (on_mesh(kx, ky, x, y + 1) && flt(f, x, y + 1)) return 1'b1;
    if (on_mesh(kx, ky, x, y - 1) && flt(f, x, y - 1)) return 1'b1;
    return 1'b0;
  endfunction

  // Odd-even turn rule: may a packet travelling t_in (0 N, 1 E, 2 W, 3 S)
  // leave a router in column col travelling t_out?
  function automatic bit turn_ok(int t_in, int t_out, int col);
    if (t_in == t_out) return 1'b1;
    if (t_in + t_out == 3) return 1'b0;                                   // 180 degrees
    if (t_in == 1 && (t_out == 0 || t_out == 3) && (col % 2 == 0)) return 1'b0;  // EN, ES
    if ((t_in == 0 || t_in == 3) && t_out == 2 && (col % 2 == 1)) return 1'b0;   // NW, SW
    return 1'b1;
  endfunction

  // Number of turn-legal minimal paths from (sx, sy), entered travelling t0,
  // to (tx, ty), avoiding blocked routers (the target is never blocked).
  function automatic int count_paths(int kx, int ky, fault_grid_t f, int sx, int sy,
                                     int t0, int tx, int ty, bit avoid_cong);
    int cnt [MAXN][MAXN][2];   // [i][j][entered by x step (0) / y step (1)]
    int stx, sty, w, h, mx, my, total;
    stx = (tx >= sx) ? 1 : -1;
    sty = (ty >= sy) ? 1 : -1;
    mx  = (stx > 0) ? 1 : 2;   // direction of an x step
    my  = (sty > 0) ? 0 : 3;   // direction of a y step
    w = (tx - sx) * stx;
    h = (ty - sy) * sty;
    for (int i = w; i >= 0; i--) begin
      for (int j = h; j >= 0; j--) begin
        int x, y;
        bit blocked;
        x = sx + i * stx;
        y = sy + j * sty;
        blocked = flt(f, x, y) || (avoid_cong && near_fault(kx, ky, f, x, y));
        for (int k = 0; k < 2; k++) begin
          int tin;
          tin = (k == 0) ? mx : my;
          if (i == w && j == h)  cnt[i][j][k] = 1;
          else if (blocked)      cnt[i][j][k] = 0;
          else begin
            cnt[i][j][k] = 0;
            if (i < w && turn_ok(tin, mx, x)) cnt[i][j][k] += cnt[i + 1][j][0];
            if (j < h && turn_ok(tin, my, x)) cnt[i][j][k] += cnt[i][j + 1][1];
            if (cnt[i][j][k] > 1000) cnt[i][j][k] = 1000;
          end
        end
      end
    end
    if (w == 0 && h == 0) return 1;
    if (flt(f, sx, sy) || (avoid_cong && near_fault(kx, ky, f, sx, sy))) return 0;
    total = 0;
    if (w > 0 && turn_ok(t0, mx, sx)) total += cnt[1][0][0];
    if (h > 0 && turn_ok(t0, my, sx)) total += cnt[0][1][1];
    return total;
  endfunction

  function automatic int fpd_raw(int kx, int ky, fault_grid_t f,
                                 int cx, int cy, int tx, int ty, int d, bit avoid_cong);
    int nx, ny;
    nx = cx + ((d == 1) ? 1 : (d == 2) ? -1 : 0);
    ny = cy + ((d == 0) ? 1 : (d == 3) ? -1 : 0);
    if (!on_mesh(kx, ky, nx, ny) || flt(f, nx, ny)) return 0;
    return count_paths(kx, ky, f, nx, ny, d, tx, ty, avoid_cong);
  endfunction

  // FPD value stored at router (cx, cy) for window offset (dx, dy), direction d
  // (0 N, 1 E, 2 W, 3 S). Congested routers are avoided only when no fault
  // lies in the rectangle between router and target, and only if some path
  // is left after removing them.
  function automatic int fpd_value(int kx, int ky, fault_grid_t f,
                                   int cx, int cy, int dx, int dy, int d);
    int tx, ty, c, maxv, any;
    bit corr;
    tx = cx + dx;
    ty = cy + dy;
    if (!on_mesh(kx, ky, tx, ty)) return 0;
    corr = 1'b0;
    for (int x = (cx < tx ? cx : tx); x <= (cx < tx ? tx : cx); x++)
      for (int y = (cy < ty ? cy : ty); y <= (cy < ty ? ty : cy); y++)
        if (flt(f, x, y) && !(x == tx && y == ty)) corr = 1'b1;
    any = 0;
    if (!corr)
      for (int e = 0; e < 4; e++) any += fpd_raw(kx, ky, f, cx, cy, tx, ty, e, 1'b1);
    c = fpd_raw(kx, ky, f, cx, cy, tx, ty, d, !corr && (any != 0));
    maxv = (1 << FPD_W) - 1;
    return (c > maxv) ? maxv : c;
  endfunction

endpackage
