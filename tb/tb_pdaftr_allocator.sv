// tb_pdaftr_allocator: matrix allocation and wormhole reservation.
//
// Inputs without a route request random outputs; reserved outputs are
// released at random (a tail crossing). A reference keeps, per output, the
// inputs in priority order (the last winner moves to the back, which is what
// a matrix arbiter does) and the reservation table. Checked every cycle: the
// grants, that a reserved output is never granted again, and the registered
// reservation, owner and per-input route.
module tb_pdaftr_allocator;
  import pdaftr_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              req_valid [NPORTS];
  port_e             req_dir   [NPORTS];
  logic [NPORTS-1:0] release_out;
  logic [NPORTS-1:0] gnt;
  logic [NPORTS-1:0] reserved;
  port_e             owner       [NPORTS];
  logic              route_valid [NPORTS];
  port_e             route_dir   [NPORTS];

  pdaftr_allocator dut (.*);

  int checks = 0, failures = 0;
  int  order [5][$];   // per output: inputs, highest priority first
  bit  m_res [5];
  int  m_own [5];
  bit  m_rv  [5];
  int  m_rd  [5];
  int  n_conflicts = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    for (int p = 0; p < 5; p++) begin req_valid[p] = 0; req_dir[p] = P_N; end
    release_out = '0;
    for (int o = 0; o < 5; o++) begin
      order[o] = {0, 1, 2, 3, 4};
      m_res[o] = 0; m_own[o] = 0; m_rv[o] = 0; m_rd[o] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      bit exp_gnt [5];
      int win [5];
      int nreq [5];
      @(negedge clk);
      for (int i = 0; i < 5; i++) begin
        req_valid[i] = !m_rv[i] && ($urandom_range(1) == 0);
        req_dir[i]   = port_e'($urandom_range(4));
      end
      for (int o = 0; o < 5; o++) release_out[o] = m_res[o] && ($urandom_range(3) == 0);
      // reference arbitration
      for (int i = 0; i < 5; i++) exp_gnt[i] = 0;
      for (int o = 0; o < 5; o++) begin
        win[o] = -1;
        nreq[o] = 0;
        for (int i = 0; i < 5; i++) if (req_valid[i] && int'(req_dir[i]) == o) nreq[o]++;
        if (!m_res[o])
          foreach (order[o][k])
            if (win[o] < 0 && req_valid[order[o][k]] && int'(req_dir[order[o][k]]) == o)
              win[o] = order[o][k];
        if (win[o] >= 0) exp_gnt[win[o]] = 1;
        if (nreq[o] > 1 && !m_res[o]) n_conflicts++;
      end
      #1;
      for (int i = 0; i < 5; i++) check(gnt[i] == exp_gnt[i], $sformatf("cycle %0d grant of input %0d", cyc, i));
      @(posedge clk);
      for (int o = 0; o < 5; o++) begin
        if (release_out[o]) begin m_res[o] = 0; m_rv[m_own[o]] = 0; end
        if (win[o] >= 0) begin
          int k[$];
          m_res[o] = 1; m_own[o] = win[o]; m_rv[win[o]] = 1; m_rd[win[o]] = o;
          k = order[o].find_first_index(x) with (x == win[o]);
          order[o].delete(k[0]);
          order[o].push_back(win[o]);
        end
      end
      #1;
      for (int o = 0; o < 5; o++) begin
        check(reserved[o] == m_res[o], $sformatf("reserved[%0d]", o));
        if (m_res[o]) check(int'(owner[o]) == m_own[o], $sformatf("owner[%0d]", o));
      end
      for (int i = 0; i < 5; i++) begin
        check(route_valid[i] == m_rv[i], $sformatf("route_valid[%0d]", i));
        if (m_rv[i]) check(int'(route_dir[i]) == m_rd[i], $sformatf("route_dir[%0d]", i));
      end
    end
    check(n_conflicts > 100, "contention exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
