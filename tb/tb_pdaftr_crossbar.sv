// tb_pdaftr_crossbar: random permutations through the 5x5 crossbar.
//
// Each trial gives every input a random flit, connects each output to a
// distinct input (a random permutation, as the allocator guarantees) with a
// random enable, and checks every output flit and valid.
module tb_pdaftr_crossbar;
  import pdaftr_pkg::*;

  flit_t in_flit  [NPORTS];
  port_e sel      [NPORTS];
  logic  en       [NPORTS];
  flit_t out_flit [NPORTS];
  logic  out_valid[NPORTS];

  pdaftr_crossbar dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int perm [5];
      for (int i = 0; i < 5; i++) perm[i] = i;
      for (int i = 4; i > 0; i--) begin
        int j, tmp;
        j = $urandom_range(i);
        tmp = perm[i]; perm[i] = perm[j]; perm[j] = tmp;
      end
      for (int i = 0; i < 5; i++) begin
        in_flit[i] = '{ftype: flit_type_e'($urandom_range(3)), src_x: coord_t'($urandom),
                       src_y: coord_t'($urandom), dst_x: coord_t'($urandom),
                       dst_y: coord_t'($urandom), data: $urandom};
        sel[i] = port_e'(perm[i]);
        en[i]  = $urandom_range(3) != 0;
      end
      #1;
      for (int o = 0; o < 5; o++) begin
        checks++;
        if (out_valid[o] != en[o] || (en[o] && out_flit[o] != in_flit[perm[o]])) begin
          failures++;
          $display("FAIL: output %0d", o);
        end
      end
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
