// tb_pdaftr_fpd_table: load and look-up test of the regional FPD table.
//
// A router at a random position is loaded with random values for all 24
// window positions (plus writes outside the window and at the centre, which
// must be ignored). Random destinations anywhere in a 16x16 area are then
// looked up on all read ports at once; the expected entry is the one of the
// destination clamped to the 5x5 window, the far flag must be set exactly for
// clamped look-ups, and the router's own address must read as zero.
module tb_pdaftr_fpd_table;
  import pdaftr_pkg::*;

  localparam int NRD = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              cfg_we;
  logic signed [3:0] cfg_dx, cfg_dy;
  fpd_t              cfg_fpd [NDIRS];
  coord_t            cur_x, cur_y;
  coord_t            rd_dst_x [NRD];
  coord_t            rd_dst_y [NRD];
  fpd_t              rd_fpd   [NRD][NDIRS];
  logic              rd_far   [NRD];

  pdaftr_fpd_table #(.NRD(NRD)) dut (.*);

  int checks = 0, failures = 0;
  int model [5][5][4];   // [dx+2][dy+2][dir]

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic write(int dx, int dy, int v [4]);
    @(negedge clk);
    cfg_we = 1; cfg_dx = 4'(dx); cfg_dy = 4'(dy);
    for (int d = 0; d < 4; d++) cfg_fpd[d] = fpd_t'(v[d]);
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    int v [4];
    cfg_we = 0; cfg_dx = 0; cfg_dy = 0;
    for (int d = 0; d < 4; d++) cfg_fpd[d] = '0;
    cur_x = 5'd7; cur_y = 5'd6;
    for (int r = 0; r < NRD; r++) begin rd_dst_x[r] = '0; rd_dst_y[r] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int dy = -2; dy <= 2; dy++)
      for (int dx = -2; dx <= 2; dx++) begin
        for (int d = 0; d < 4; d++) begin
          v[d] = (dx == 0 && dy == 0) ? 0 : $urandom_range(15);
          model[dx + 2][dy + 2][d] = v[d];
        end
        write(dx, dy, v);
      end
    // writes outside the window are ignored
    for (int d = 0; d < 4; d++) v[d] = 15;
    write(3, 0, v);
    write(-3, 1, v);
    write(0, 0, v);

    for (int t = 0; t < 400; t++) begin
      int ex [NRD], ey [NRD];
      @(negedge clk);
      for (int r = 0; r < NRD; r++) begin
        ex[r] = (t % 7 == 0 && r == 0) ? 7 : $urandom_range(15);
        ey[r] = (t % 7 == 0 && r == 0) ? 6 : $urandom_range(15);
        rd_dst_x[r] = coord_t'(ex[r]);
        rd_dst_y[r] = coord_t'(ey[r]);
      end
      #1;
      for (int r = 0; r < NRD; r++) begin
        int dx, dy, cx, cy;
        dx = ex[r] - 7; dy = ey[r] - 6;
        cx = dx > 2 ? 2 : dx < -2 ? -2 : dx;
        cy = dy > 2 ? 2 : dy < -2 ? -2 : dy;
        check(rd_far[r] == (cx != dx || cy != dy), $sformatf("far flag for (%0d,%0d)", ex[r], ey[r]));
        for (int d = 0; d < 4; d++) begin
          int exp_v;
          exp_v = (dx == 0 && dy == 0) ? 0 : model[cx + 2][cy + 2][d];
          check(int'(rd_fpd[r][d]) == exp_v,
                $sformatf("dst (%0d,%0d) dir %0d: got %0d expected %0d", ex[r], ey[r], d, rd_fpd[r][d], exp_v));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
