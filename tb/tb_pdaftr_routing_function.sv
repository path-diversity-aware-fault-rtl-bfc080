// tb_pdaftr_routing_function: checks the candidate output channels.
//
// Directed cases follow the routing examples of the algorithm: a packet with
// two minimal candidates, one whose minimal candidate is cut by a fault
// (FPD 0) and is detoured non-minimally, and one with one minimal direction
// left. Then random current/source/destination positions, arrival ports, FPD
// values and faulty neighbours are compared with a reference written from
// the rules: odd-even minimal set, odd-even turn rules from the arrival port,
// mesh edges, detour admissibility, FPD zero exclusion and the fall-back to
// non-faulty directions, first two candidates in N, E, W, S order.
module tb_pdaftr_routing_function;
  import pdaftr_pkg::*;

  localparam int KX = 8, KY = 8;

  coord_t cur_x, cur_y, src_x, src_y, dst_x, dst_y;
  port_e  in_port;
  fpd_t   fpd [NDIRS];
  logic [NDIRS-1:0] nbr_fault;
  coc_t   c0, c1;
  logic   nonmin, at_dest;

  pdaftr_routing_function #(.MESH_X(KX), .MESH_Y(KY)) dut (.*);

  // small mesh for the directed cases
  coc_t   s_c0, s_c1;
  logic   s_nonmin, s_at_dest;
  pdaftr_routing_function #(.MESH_X(5), .MESH_Y(3)) dut_small (
    .cur_x, .cur_y, .src_x, .src_y, .dst_x, .dst_y, .in_port, .fpd, .nbr_fault,
    .c0(s_c0), .c1(s_c1), .nonmin(s_nonmin), .at_dest(s_at_dest));

  int checks = 0, failures = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // may a packet travelling t_in leave column col travelling t_out? (0 N 1 E 2 W 3 S)
  function automatic bit turn_ok(int t_in, int t_out, int col);
    if (t_in < 0) return 1;
    if (t_in + t_out == 3) return 0;
    if (t_in == 1 && (t_out == 0 || t_out == 3) && col % 2 == 0) return 0;
    if ((t_in == 0 || t_in == 3) && t_out == 2 && col % 2 == 1) return 0;
    return 1;
  endfunction

  task automatic reference(int kx, int ky, int cx, int cy, int sx, int dx, int dy, int inp,
                           int f [4], bit flt [4], output int e0, output int e1, output bit enm);
    bit oe [4], lg [4], ad [4], use_ [4], pick [4];
    int ex, ey, tin, n_min, n_nf;
    ex = dx - cx; ey = dy - cy;
    e0 = -1; e1 = -1; enm = 0;
    if (ex == 0 && ey == 0) begin e0 = 4; return; end
    oe[0] = ey > 0 && (ex == 0 || (ex > 0 && (cx % 2 == 1 || cx == sx)) || (ex < 0 && cx % 2 == 0));
    oe[3] = ey < 0 && (ex == 0 || (ex > 0 && (cx % 2 == 1 || cx == sx)) || (ex < 0 && cx % 2 == 0));
    oe[1] = ex > 0 && (ey == 0 || dx % 2 == 1 || ex != 1);
    oe[2] = ex < 0;
    tin = (inp == 4) ? -1 : 3 - inp;   // arrival port N means travelling S, etc.
    lg[0] = cy < ky - 1; lg[3] = cy > 0; lg[1] = cx < kx - 1; lg[2] = cx > 0;
    for (int d = 0; d < 4; d++) lg[d] = lg[d] && turn_ok(tin, d, cx);
    ad[1] = dx > cx && !(dx == cx + 1 && dx % 2 == 0 && dy != cy);
    ad[2] = 1;
    ad[0] = !(cx % 2 == 1 && (dx < cx || (dx == cx && dy <= cy)));
    ad[3] = !(cx % 2 == 1 && (dx < cx || (dx == cx && dy >= cy)));
    n_min = 0; n_nf = 0;
    for (int d = 0; d < 4; d++) begin
      use_[d] = f[d] != 0;
      n_min += (oe[d] && lg[d] && use_[d]);
      n_nf  += (lg[d] && ad[d] && use_[d]);
    end
    enm = (n_min == 0);
    for (int d = 0; d < 4; d++)
      pick[d] = (n_min != 0) ? (oe[d] && lg[d] && use_[d]) :
                (n_nf != 0)  ? (lg[d] && ad[d] && use_[d]) : (lg[d] && ad[d] && !flt[d]);
    for (int d = 0; d < 4; d++)
      if (pick[d]) begin
        if (e0 < 0) e0 = d;
        else if (e1 < 0) e1 = d;
      end
  endtask

  task automatic apply(int cx, int cy, int sx, int sy, int dx, int dy, int inp, int f [4], bit flt [4]);
    cur_x = coord_t'(cx); cur_y = coord_t'(cy); src_x = coord_t'(sx); src_y = coord_t'(sy);
    dst_x = coord_t'(dx); dst_y = coord_t'(dy); in_port = port_e'(inp);
    for (int d = 0; d < 4; d++) begin fpd[d] = fpd_t'(f[d]); nbr_fault[d] = flt[d]; end
    #1;
  endtask

  function automatic int enc(coc_t c);
    return c.valid ? int'(c.dir) : -1;
  endfunction

  initial begin
    int f [4];
    bit flt [4];
    int e0, e1;
    bit enm;
    // Two minimal candidates: local (1,4) to (4,0), FPD E 15 and S 20.
    f = '{0, 15, 0, 20}; flt = '{0, 0, 0, 0};
    apply(1, 4, 1, 4, 4, 0, 4, f, flt);
    check(enc(c0) == 1 && enc(c1) == 3 && !nonmin, "two minimal candidates E and S");
    // Minimal E cut by a fault: (0,1) to (4,1), FPD N 1, E 0, S 1 -> detour N or S.
    f = '{1, 0, 0, 1}; flt = '{0, 1, 0, 0};
    apply(0, 1, 0, 1, 4, 1, 4, f, flt);
    check(enc(s_c0) == 0 && enc(s_c1) == 3 && s_nonmin, "detour around fault: N and S");
    // Minimal S cut by a fault: (0,2) to (3,0), FPD E 3, S 0 -> E only.
    f = '{0, 3, 0, 0}; flt = '{0, 0, 0, 1};
    apply(0, 2, 0, 2, 3, 0, 4, f, flt);
    check(enc(s_c0) == 1 && enc(s_c1) == -1 && !s_nonmin, "one minimal candidate E");
    // Destination reached.
    apply(3, 3, 0, 0, 3, 3, 2, f, flt);
    check(enc(c0) == 4 && enc(c1) == -1 && at_dest, "local port at destination");
    // Travelling east in an even column may not turn north.
    f = '{5, 5, 5, 5}; flt = '{0, 0, 0, 0};
    apply(2, 2, 0, 2, 5, 5, 2, f, flt);
    check(enc(c0) == 1 && enc(c1) == -1, "no east-to-north turn in even column");

    for (int t = 0; t < 20000; t++) begin
      int cx, cy, sx, sy, dx, dy, inp;
      cx = $urandom_range(KX - 1); cy = $urandom_range(KY - 1);
      sx = ($urandom_range(3) == 0) ? cx : $urandom_range(KX - 1);
      sy = $urandom_range(KY - 1);
      dx = $urandom_range(KX - 1); dy = $urandom_range(KY - 1);
      inp = $urandom_range(4);
      for (int d = 0; d < 4; d++) begin
        f[d]   = ($urandom_range(2) == 0) ? 0 : $urandom_range(15);
        flt[d] = ($urandom_range(5) == 0);
      end
      apply(cx, cy, sx, sy, dx, dy, inp, f, flt);
      reference(KX, KY, cx, cy, sx, dx, dy, inp, f, flt, e0, e1, enm);
      check(enc(c0) == e0 && enc(c1) == e1 && (e0 == 4 || nonmin == enm),
            $sformatf("cur (%0d,%0d) src (%0d,%0d) dst (%0d,%0d) in %0d: got %0d/%0d/%0d expected %0d/%0d/%0d",
                      cx, cy, sx, sy, dx, dy, inp, enc(c0), enc(c1), nonmin, e0, e1, enm));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
