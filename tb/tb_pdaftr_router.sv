// tb_pdaftr_router: directed tests of one PDA-FTR router at (3,3) of an 8x8 mesh.
//
// The testbench plays the four neighbours and the local core: it writes the
// router's FPD table, sends 8-flit packets into chosen input ports, controls
// the free-slot counts the router sees downstream, and records every flit
// leaving each output. Checked:
//   1. straight east packet: all flits leave on E in order; the head leaves
//      two clock edges after it was written into the input buffer and the
//      body follows at one flit per cycle;
//   2. two minimal candidates: the output with the larger FPD x free-slot
//      product is chosen, for both orderings of the products;
//   3. two packets for the same output: the second waits for the first's
//      tail (no interleaving), and matrix arbitration serves both;
//   4. downstream full: nothing leaves while the free-slot count is zero;
//   5. minimal direction with FPD 0: the packet is detoured non-minimally;
//   6. no usable direction at all: the packet is discarded and counted.
module tb_pdaftr_router;
  import pdaftr_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              cfg_we;
  logic signed [3:0] cfg_dx, cfg_dy;
  fpd_t              cfg_fpd [NDIRS];
  logic [NDIRS-1:0]  nbr_fault;
  flit_t             flit_in [NPORTS];
  logic              req_in  [NPORTS];
  logic              ack_out [NPORTS];
  logic [2:0]        buf_out [NPORTS];
  flit_t             flit_out[NPORTS];
  logic              req_out [NPORTS];
  logic              ack_in  [NPORTS];
  logic [2:0]        buf_in  [NPORTS];
  router_ev_t        ev;

  pdaftr_router dut (
    .clk, .rst_n, .cur_x(5'd3), .cur_y(5'd3), .nbr_fault,
    .cfg_we, .cfg_dx, .cfg_dy, .cfg_fpd,
    .flit_in, .req_in, .ack_out, .buf_out,
    .flit_out, .req_out, .ack_in, .buf_in, .ev
  );

  int checks = 0, failures = 0;
  // clock edge number, taken from the simulation time (period 10)
  function automatic int edge_no();
    return int'($time / 10);
  endfunction

  // output monitor
  typedef struct { flit_t f; int cyc; } rec_t;
  rec_t outq [5][$];
  int   n_unreach = 0;
  always_comb for (int o = 0; o < 5; o++) ack_in[o] = req_out[o];
  // (registers are cleared at the first clock edge of reset; nothing is
  // recorded before reset ends)
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 5; o++) if (req_out[o]) outq[o].push_back('{flit_out[o], edge_no()});
    n_unreach += int'(ev.unreachable);
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic load(int dx, int dy, int n, int e, int w, int s);
    @(negedge clk);
    cfg_we = 1; cfg_dx = 4'(dx); cfg_dy = 4'(dy);
    cfg_fpd[0] = fpd_t'(n); cfg_fpd[1] = fpd_t'(e); cfg_fpd[2] = fpd_t'(w); cfg_fpd[3] = fpd_t'(s);
    @(negedge clk);
    cfg_we = 0;
  endtask

  function automatic flit_t mk(int sx, int sy, int dx, int dy, int tag, int idx);
    flit_t f;
    f.ftype = (idx == 0) ? FT_HEAD : (idx == 7) ? FT_TAIL : FT_BODY;
    f.src_x = coord_t'(sx); f.src_y = coord_t'(sy);
    f.dst_x = coord_t'(dx); f.dst_y = coord_t'(dy);
    f.data  = {16'(tag), 16'(idx)};
    return f;
  endfunction

  // send one packet into input port p (waits for free space); returns the
  // cycle at whose edge the head was written
  task automatic send(int p, int sx, int sy, int dx, int dy, int tag, output int head_cyc);
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      while (buf_out[p] == 0) @(negedge clk);
      flit_in[p] = mk(sx, sy, dx, dy, tag, i);
      req_in[p]  = 1;
      @(posedge clk);
      if (i == 0) head_cyc = edge_no();
      #1 req_in[p] = 0;
    end
  endtask

  task automatic expect_packet(int o, int tag, string what);
    bit ok;
    ok = outq[o].size() >= 8;
    if (ok) for (int i = 0; i < 8; i++) begin
      rec_t r;
      r = outq[o].pop_front();
      if (r.f.data != {16'(tag), 16'(i)}) ok = 0;
    end
    check(ok, what);
  endtask

  task automatic settle(int n);
    repeat (n) @(negedge clk);
  endtask

  function automatic int total_out();
    int t = 0;
    for (int o = 0; o < 5; o++) t += outq[o].size();
    return t;
  endfunction

  initial begin
    int hc, hc2;
    cfg_we = 0; cfg_dx = 0; cfg_dy = 0;
    for (int d = 0; d < 4; d++) cfg_fpd[d] = '0;
    nbr_fault = '0;
    for (int p = 0; p < 5; p++) begin
      flit_in[p] = '0; req_in[p] = 0; buf_in[p] = 3'd4;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // 1. straight east: (6,3) clamps to window position (+2, 0)
    load(2, 0, 0, 1, 0, 0);
    send(2, 0, 3, 6, 3, 1, hc);
    settle(12);
    check(outq[1].size() == 8, "test 1: eight flits on E");
    if (outq[1].size() == 8) begin
      check(outq[1][0].cyc == hc + 2, $sformatf("test 1: head latency %0d edges, expected 2", outq[1][0].cyc - hc));
      for (int i = 1; i < 8; i++) check(outq[1][i].cyc == outq[1][i - 1].cyc + 1 || outq[1][i].cyc == outq[1][i-1].cyc + 2,
                                        "test 1: body follows the head without gaps beyond the sender's");
    end
    expect_packet(1, 1, "test 1: packet intact on E");

    // 2. local packet to (5,5): N and E are both minimal
    load(2, 2, 1, 3, 0, 0);
    buf_in[0] = 3'd4; buf_in[1] = 3'd1;          // EBL N 1*4 = 4 > E 3*1 = 3
    send(4, 3, 3, 5, 5, 2, hc);
    settle(12);
    check(outq[0].size() == 8 && outq[1].size() == 0, "test 2a: larger EBL (N) chosen");
    expect_packet(0, 2, "test 2a: packet intact on N");
    buf_in[0] = 3'd2; buf_in[1] = 3'd4;          // EBL N 2 < E 12
    send(4, 3, 3, 5, 5, 3, hc);
    settle(12);
    check(outq[1].size() == 8 && outq[0].size() == 0, "test 2b: larger EBL (E) chosen");
    expect_packet(1, 3, "test 2b: packet intact on E");
    buf_in[0] = 3'd4;

    // 3. two packets for E at once (from W and from S): no interleaving
    fork
      send(2, 0, 3, 6, 3, 4, hc);
      send(3, 3, 0, 6, 3, 5, hc2);
    join
    settle(20);
    check(outq[1].size() == 16, "test 3: both packets left on E");
    if (outq[1].size() == 16) begin
      int first;
      first = int'(outq[1][0].f.data[31:16]);
      expect_packet(1, first, "test 3: first packet contiguous");
      expect_packet(1, first == 4 ? 5 : 4, "test 3: second packet contiguous");
    end

    // 4. downstream full: nothing leaves until space appears
    // (the input buffer fills after four flits, so the sender runs in parallel)
    buf_in[1] = 3'd0;
    fork
      send(2, 0, 3, 6, 3, 6, hc);
    join_none
    settle(10);
    check(outq[1].size() == 0 && ev.blocked_down, "test 4: stalled while downstream is full");
    check(buf_out[2] == 3'd0, "test 4: input buffer holds the stalled flits");
    buf_in[1] = 3'd4;
    wait fork;
    settle(12);
    expect_packet(1, 6, "test 4: delivered after space appeared");

    // 5. minimal E has FPD 0 at (5,3): detour N or S (odd column, arriving from W)
    load(2, 0, 2, 0, 0, 1);
    send(2, 0, 3, 5, 3, 7, hc);
    settle(12);
    check(outq[0].size() == 8 && outq[1].size() == 0, "test 5: detoured north (higher EBL)");
    expect_packet(0, 7, "test 5: packet intact");

    // 6. nothing usable: N, E and S neighbours faulty, every FPD zero, W is
    //    the U-turn -> discarded
    load(2, 0, 0, 0, 0, 0);
    nbr_fault = 4'b1011;
    send(2, 0, 3, 5, 3, 8, hc);
    settle(12);
    check(total_out() == 0, "test 6: unreachable packet not forwarded");
    check(n_unreach == 1, "test 6: unreachable packet counted once");
    check(buf_out[2] == 3'd4, "test 6: input buffer emptied");

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
