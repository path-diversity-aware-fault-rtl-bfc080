// tb_pdaftr_mesh: end-to-end test of the 8x8 PDA-FTR mesh at its default size.
//
// Four fault scenarios are run one after the other (no, one, two and four
// faulty routers). For each: reset, FPD tables of all healthy routers loaded through
// the warm-up port from the behavioural FPD model, then every healthy node
// sends PKTS 8-flit wormhole packets to uniformly random healthy
// destinations with random gaps between packets. Every ejected flit is
// checked: it must reach the node named in it, the flits of a packet must
// arrive in order and unbroken, and the payload must carry the sequence that
// was sent. At the end every packet must have arrived exactly once or have
// been discarded by a router as unreachable; without faults none may be
// lost, with faults at most MAX_UNREACH_PCT percent.
// The router event flags are counted; each mechanism (minimal and detour
// routing, out-of-window lookup, selection cases a/b/c, downstream stalls,
// injection back-pressure) must have happened at least once.
module tb_pdaftr_mesh;
  import pdaftr_pkg::*;
  import pdaftr_fpd_model_pkg::*;

  localparam int KX    = 8;
  localparam int KY    = 8;
  localparam int NODES = KX * KY;
  localparam int DEPTH = 4;
  localparam int PLEN  = 8;     // flits per packet
  localparam int PKTS  = 12;    // packets per node per scenario
  localparam int BW    = $clog2(DEPTH + 1);
  localparam int MAX_UNREACH_PCT = 12; // bound on packets lost to faults

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NODES-1:0] fault_map;
  logic             cfg_we;
  coord_t           cfg_x, cfg_y;
  logic signed [3:0] cfg_dx, cfg_dy;
  fpd_t             cfg_fpd [NDIRS];
  flit_t            inj_flit [NODES];
  logic             inj_req  [NODES];
  logic             inj_ack  [NODES];
  logic [BW-1:0]    inj_free [NODES];
  flit_t            ej_flit  [NODES];
  logic             ej_req   [NODES];
  logic [BW-1:0]    ej_free  [NODES];
  router_ev_t       ev       [NODES];

  pdaftr_mesh dut (
    .clk, .rst_n, .fault_map,
    .cfg_we, .cfg_x, .cfg_y, .cfg_dx, .cfg_dy, .cfg_fpd,
    .inj_flit, .inj_req, .inj_ack, .inj_free,
    .ej_flit, .ej_req, .ej_free, .ev
  );

  int checks = 0;
  int failures = 0;

  // ------------------------------------------------------------ sources
  bit  run_traffic = 0;
  int  src_sent   [NODES];   // packets completed
  int  src_idx    [NODES];   // flit index within current packet
  int  src_dst    [NODES];
  int  src_gap    [NODES];
  bit  healthy    [NODES];
  int  healthy_list [$];
  int  inj_backpressure = 0;

  function automatic logic [DATA_W-1:0] payload(int src, int seq, int idx);
    return {8'(src), 16'(seq), 8'(idx)};
  endfunction

  always_comb begin
    for (int n = 0; n < NODES; n++) begin
      flit_t f;
      f.ftype = (src_idx[n] == 0) ? FT_HEAD : (src_idx[n] == PLEN - 1) ? FT_TAIL : FT_BODY;
      f.src_x = coord_t'(n % KX);
      f.src_y = coord_t'(n / KX);
      f.dst_x = coord_t'(src_dst[n] % KX);
      f.dst_y = coord_t'(src_dst[n] / KX);
      f.data  = payload(n, src_sent[n], src_idx[n]);
      inj_flit[n] = f;
      inj_req[n]  = run_traffic && healthy[n] && (src_sent[n] < PKTS) &&
                    (src_gap[n] == 0) && (inj_free[n] != '0);
    end
  end

  function automatic int pick_dst(int n);
    int d;
    do d = healthy_list[$urandom_range(healthy_list.size() - 1)];
    while (d == n);
    return d;
  endfunction

  always @(posedge clk) begin
    if (run_traffic) begin
      for (int n = 0; n < NODES; n++) begin
        if (!healthy[n] || src_sent[n] >= PKTS) continue;
        if (src_gap[n] != 0) begin
          src_gap[n] <= src_gap[n] - 1;
        end else if (inj_req[n]) begin
          checks++;
          if (!inj_ack[n]) begin
            failures++;
            $display("FAIL: node %0d injection not acknowledged with free space", n);
          end
          if (src_idx[n] == PLEN - 1) begin
            src_idx[n]  <= 0;
            src_sent[n] <= src_sent[n] + 1;
            src_dst[n]  <= pick_dst(n);
            src_gap[n]  <= $urandom_range(6);
          end else begin
            src_idx[n] <= src_idx[n] + 1;
          end
        end else if (inj_free[n] == '0) begin
          inj_backpressure++;
        end
      end
    end
  end

  // ------------------------------------------------------------ sinks
  int rx_pkts;
  int rx_expect_idx [NODES];
  int rx_cur_src    [NODES];
  int rx_count [NODES][NODES];  // [src][dst] packets received
  int tx_count [NODES][NODES];  // [src][dst] packets sent

  always_comb for (int n = 0; n < NODES; n++) ej_free[n] = BW'(DEPTH);

  always @(posedge clk) begin
    if (run_traffic) begin
      for (int n = 0; n < NODES; n++) begin
        if (ej_req[n]) begin
          flit_t f;
          int s, idx;
          f   = ej_flit[n];
          s   = int'(f.src_y) * KX + int'(f.src_x);
          idx = int'(f.data[7:0]);
          checks++;
          if (int'(f.dst_y) * KX + int'(f.dst_x) != n) begin
            failures++;
            $display("FAIL: node %0d received a flit for (%0d,%0d)", n, f.dst_x, f.dst_y);
          end
          if (idx != rx_expect_idx[n] || (idx != 0 && s != rx_cur_src[n]) ||
              int'(f.data[31:24]) != s) begin
            failures++;
            $display("FAIL: node %0d flit order: src %0d idx %0d expected idx %0d", n, s, idx, rx_expect_idx[n]);
          end
          if ((idx == 0) != is_head(f.ftype) || (idx == PLEN - 1) != is_tail(f.ftype)) begin
            failures++;
            $display("FAIL: node %0d flit type %0d at index %0d", n, f.ftype, idx);
          end
          rx_cur_src[n] <= s;
          if (idx == PLEN - 1) begin
            rx_expect_idx[n] <= 0;
            rx_count[s][n]++;
            rx_pkts++;
          end else begin
            rx_expect_idx[n] <= idx + 1;
          end
        end
      end
    end
  end

  // record what was sent, by destination
  always @(posedge clk) begin
    if (run_traffic)
      for (int n = 0; n < NODES; n++)
        if (inj_req[n] && inj_ack[n] && src_idx[n] == PLEN - 1)
          tx_count[n][src_dst[n]]++;
  end

  // ------------------------------------------------------------ events
  longint n_min, n_nonmin, n_far, n_none, n_one, n_ebl, n_block, n_unreach;
  int     scen_unreach;
  always @(posedge clk) begin
    if (run_traffic) begin
      for (int n = 0; n < NODES; n++) begin
        n_min    += ev[n].route_min;
        n_nonmin += ev[n].route_nonmin;
        n_far    += ev[n].far_lookup;
        n_none   += ev[n].sel_none;
        n_one    += ev[n].sel_one;
        n_ebl    += ev[n].sel_ebl;
        n_block  += ev[n].blocked_down;
        n_unreach += longint'(ev[n].unreachable);
        scen_unreach += int'(ev[n].unreachable);
      end
    end
  end

  // ------------------------------------------------------------ scenario
  fault_grid_t grid;

  task automatic load_tables();
    for (int n = 0; n < NODES; n++) begin
      if (!healthy[n]) continue;
      for (int dy = -int'(W_HALF); dy <= int'(W_HALF); dy++) begin
        for (int dx = -int'(W_HALF); dx <= int'(W_HALF); dx++) begin
          if (dx == 0 && dy == 0) continue;
          @(negedge clk);
          cfg_we <= 1'b1;
          cfg_x  <= coord_t'(n % KX);
          cfg_y  <= coord_t'(n / KX);
          cfg_dx <= 4'(dx);
          cfg_dy <= 4'(dy);
          for (int d = 0; d < NDIRS; d++)
            cfg_fpd[d] <= fpd_t'(fpd_value(KX, KY, grid, n % KX, n / KX, dx, dy, d));
        end
      end
    end
    @(negedge clk);
    cfg_we <= 1'b0;
  endtask

  task automatic run_scenario(int nf, int fx [4], int fy [4]);
    int total, cyc;
    rst_n = 1'b0;
    run_traffic = 0;
    fault_map = '0;
    grid = '0;
    for (int i = 0; i < nf; i++) begin
      fault_map[fy[i] * KX + fx[i]] = 1'b1;
      grid[fx[i] * MAXN + fy[i]] = 1'b1;
    end
    healthy_list.delete();
    for (int n = 0; n < NODES; n++) begin
      healthy[n] = !fault_map[n];
      if (healthy[n]) healthy_list.push_back(n);
    end
    for (int n = 0; n < NODES; n++) begin
      src_sent[n] = 0; src_idx[n] = 0; src_gap[n] = 0;
      rx_expect_idx[n] = 0; rx_cur_src[n] = 0;
      for (int m = 0; m < NODES; m++) begin rx_count[n][m] = 0; tx_count[n][m] = 0; end
    end
    for (int n = 0; n < NODES; n++) if (healthy[n]) src_dst[n] = pick_dst(n);
    rx_pkts = 0;
    scen_unreach = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_tables();
    total = healthy_list.size() * PKTS;
    run_traffic = 1;
    cyc = 0;
    while (rx_pkts + scen_unreach < total && cyc < 60000) begin
      @(posedge clk);
      cyc++;
    end
    repeat (5) @(posedge clk);
    run_traffic = 0;
    // every packet is either delivered or reported unreachable
    checks++;
    if (rx_pkts + scen_unreach != total) begin
      failures++;
      $display("FAIL: %0d faults: %0d delivered + %0d unreachable of %0d packets",
               nf, rx_pkts, scen_unreach, total);
    end
    // unreachable packets are rare, and absent without faults
    checks++;
    if ((nf == 0 && scen_unreach != 0) || scen_unreach * 100 > total * MAX_UNREACH_PCT) begin
      failures++;
      $display("FAIL: %0d faults: %0d unreachable packets", nf, scen_unreach);
    end
    for (int s = 0; s < NODES; s++)
      for (int d = 0; d < NODES; d++)
        if (rx_count[s][d] > tx_count[s][d]) begin
          checks++;
          failures++;
          $display("FAIL: %0d->%0d sent %0d received %0d", s, d, tx_count[s][d], rx_count[s][d]);
        end
    $display("scenario %0d faults: %0d delivered, %0d unreachable (%0d.%02d%%), %0d cycles",
             nf, rx_pkts, scen_unreach, scen_unreach * 100 / total,
             (scen_unreach * 10000 / total) % 100, cyc);
  endtask

  task automatic check_seen(string what, longint n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never exercised: %s", what);
    end else begin
      $display("  %-32s %0d", what, n);
    end
  endtask

  initial begin
    int fx [4], fy [4];
    cfg_we = 0; cfg_x = '0; cfg_y = '0; cfg_dx = '0; cfg_dy = '0;
    for (int d = 0; d < NDIRS; d++) cfg_fpd[d] = '0;
    n_min = 0; n_nonmin = 0; n_far = 0; n_none = 0; n_one = 0; n_ebl = 0; n_block = 0;
    n_unreach = 0;
    // fault-free mesh
    run_scenario(0, fx, fy);
    // one faulty router
    fx = '{3, 0, 0, 0}; fy = '{4, 0, 0, 0};
    run_scenario(1, fx, fy);
    // two faulty routers
    fx = '{2, 5, 0, 0}; fy = '{5, 2, 0, 0};
    run_scenario(2, fx, fy);
    // four faulty routers
    fx = '{2, 5, 2, 5}; fy = '{2, 2, 5, 5};
    run_scenario(4, fx, fy);

    $display("events (router-cycles):");
    check_seen("minimal routing", n_min);
    check_seen("non-minimal detour", n_nonmin);
    check_seen("out-of-window (furthest router)", n_far);
    check_seen("selection case (a) none free", n_none);
    check_seen("selection case (b) one free", n_one);
    check_seen("selection case (c) EBL compare", n_ebl);
    check_seen("downstream buffer full", n_block);
    check_seen("injection back-pressure", inj_backpressure);
    check_seen("unreachable packet discarded", n_unreach);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
