// tb_pdaftr_selection_function: checks the EBL-based output selection.
//
// Directed cases: both candidates free and the larger FPD x free-slot
// product wins (including the published weighting, where the normalising
// divisor is common to both candidates); the reserved candidate is skipped
// even when its EBL is larger (case b); nothing is requested when both are
// reserved (case a). Then random candidates, FPD values, free-slot counts
// and reservations against a reference that computes the normalised EBL
// with real arithmetic.
module tb_pdaftr_selection_function;
  import pdaftr_pkg::*;

  coc_t        c0, c1;
  fpd_t        fpd [NDIRS];
  logic [2:0]  buf_in [NPORTS];
  logic [NPORTS-1:0] reserved;
  logic        req_valid;
  port_e       req_dir;
  logic [1:0]  sel_case;

  pdaftr_selection_function #(.BUF_W(3)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic set(int d0, bit v0, int d1, bit v1, int f [4], int b [5], bit [4:0] r);
    c0 = '{valid: v0, dir: port_e'(d0)};
    c1 = '{valid: v1, dir: port_e'(d1)};
    for (int d = 0; d < 4; d++) fpd[d] = fpd_t'(f[d]);
    for (int p = 0; p < 5; p++) buf_in[p] = 3'(b[p]);
    reserved = r;
    #1;
  endtask

  initial begin
    int f [4], b [5];
    // E: FPD 3, 1 free slot; S: FPD 1, 4 free -> EBL E = 3/4*1, S = 1/4*4 -> S
    f = '{0, 3, 0, 1}; b = '{0, 1, 0, 4, 4};
    set(1, 1, 3, 1, f, b, 5'b00000);
    check(req_valid && req_dir == P_S && sel_case == 2'b11, "larger EBL wins (S)");
    // E: FPD 3, 4 free; S: FPD 1, 4 free -> E
    b = '{0, 4, 0, 4, 4};
    set(1, 1, 3, 1, f, b, 5'b00000);
    check(req_valid && req_dir == P_E, "larger EBL wins (E)");
    // E reserved: S chosen even though its EBL is lower
    set(1, 1, 3, 1, f, b, 5'b00010);
    check(req_valid && req_dir == P_S && sel_case == 2'b10, "case (b): only available candidate");
    // both reserved: no request
    set(1, 1, 3, 1, f, b, 5'b01010);
    check(!req_valid && sel_case == 2'b00, "case (a): no candidate available");
    // single candidate: local port
    set(4, 1, 0, 0, f, b, 5'b00000);
    check(req_valid && req_dir == P_L && sel_case == 2'b01, "single local candidate");

    for (int t = 0; t < 20000; t++) begin
      int d0, d1;
      bit v0, v1, a0, a1;
      bit [4:0] r;
      real sum, e0, e1;
      port_e exp_dir;
      d0 = $urandom_range(4); d1 = $urandom_range(3);
      v0 = $urandom_range(4) != 0; v1 = v0 && ($urandom_range(2) != 0) && d1 != d0;
      for (int d = 0; d < 4; d++) f[d] = $urandom_range(15);
      for (int p = 0; p < 5; p++) b[p] = $urandom_range(4);
      r = 5'($urandom);
      set(d0, v0, d1, v1, f, b, r);
      a0 = v0 && !r[d0];
      a1 = v1 && !r[d1];
      sum = ((d0 == 4) ? 0.0 : real'(f[d0])) + real'(f[d1]);
      if (sum == 0.0) sum = 1.0;
      e0 = ((d0 == 4) ? 0.0 : real'(f[d0])) / sum * real'(b[d0]);
      e1 = real'(f[d1]) / sum * real'(b[d1]);
      exp_dir = (a0 && a1) ? ((e1 > e0 + 1.0e-9) ? port_e'(d1) : port_e'(d0)) :
                a0 ? port_e'(d0) : port_e'(d1);
      check(req_valid == (a0 || a1), "request valid");
      check(sel_case == {a1, a0}, "availability case");
      if (a0 || a1)
        check(req_dir == exp_dir, $sformatf("choice %0d expected %0d", req_dir, exp_dir));
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
