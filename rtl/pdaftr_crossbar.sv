// pdaftr_crossbar: 5x5 crossbar switch of the router.
//
// Output o carries the flit of the input named by sel[o] when en[o] is set;
// otherwise it is idle (valid low, flit zero). One multiplexer per output,
// purely combinational. The allocator guarantees that no two outputs select
// the same input with en set at once (each input holds at most one output).
module pdaftr_crossbar
  import pdaftr_pkg::*;
(
  input  flit_t in_flit   [NPORTS],
  input  port_e sel       [NPORTS],
  input  logic  en        [NPORTS],
  output flit_t out_flit  [NPORTS],
  output logic  out_valid [NPORTS]
);

  always_comb begin
    for (int o = 0; o < int'(NPORTS); o++) begin
      out_valid[o] = en[o];
      out_flit[o]  = en[o] ? in_flit[sel[o]] : '0;
    end
  end

endmodule
