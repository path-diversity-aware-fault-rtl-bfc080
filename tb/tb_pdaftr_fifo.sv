// tb_pdaftr_fifo: random push/pop test of the 4-flit input buffer.
//
// A queue model tracks the expected contents. Each cycle the testbench
// offers a flit and/or pops at random; it checks ack_out (taken exactly
// when not full), free_slots (DEPTH minus occupancy), head_valid and the
// head flit against the model, including simultaneous push and pop.
module tb_pdaftr_fifo;
  import pdaftr_pkg::*;

  localparam int DEPTH = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        req_in, ack_out, head_valid, pop;
  flit_t       flit_in, head_flit;
  logic [2:0]  free_slots;

  pdaftr_fifo #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  flit_t model [$];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    req_in = 0; pop = 0; flit_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      req_in = ($urandom_range(99) < 60);
      pop    = ($urandom_range(99) < ((cyc / 500) % 2 ? 70 : 35));
      flit_in = '{ftype: flit_type_e'($urandom_range(3)), src_x: coord_t'($urandom),
                  src_y: coord_t'($urandom), dst_x: coord_t'($urandom),
                  dst_y: coord_t'($urandom), data: $urandom};
      #1;
      check(free_slots == 3'(DEPTH - model.size()), $sformatf("free_slots %0d, expected %0d", free_slots, DEPTH - model.size()));
      check(head_valid == (model.size() != 0), "head_valid");
      if (model.size() != 0) check(head_flit == model[0], "head flit");
      check(ack_out == (req_in && model.size() < DEPTH), "ack_out");
      @(posedge clk);
      if (pop && model.size() != 0) void'(model.pop_front());
      if (req_in && ack_out) model.push_back(flit_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
