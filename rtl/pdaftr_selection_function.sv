// pdaftr_selection_function: picks one output channel among the candidates.
//
// For each candidate output channel the effective buffer length (EBL) is the
// free-slot count of the downstream input buffer weighted by the FPD value of
// that direction. The published metric also divides by the sum of the
// candidates' FPD values; that divisor is common to both candidates, so the
// comparison is done on the products FPD(o) * free_slots(o) alone (one
// multiplier per candidate and one comparator, no divider).
//
// An availability check looks up the reservation table: a candidate whose
// output is held by another packet (wormhole reservation) is not available.
//   case (a) no candidate available      -> no request this cycle (retry next)
//   case (b) one candidate available     -> request it, whatever its EBL
//   case (c) both candidates available   -> request the one with the larger
//                                           EBL (c0 on a tie)
// Purely combinational.
module pdaftr_selection_function
  import pdaftr_pkg::*;
#(
  parameter int unsigned BUF_W = 3
) (
  input  coc_t             c0,
  input  coc_t             c1,
  input  fpd_t             fpd      [NDIRS],
  input  logic [BUF_W-1:0] buf_in   [NPORTS],  // downstream free slots per output
  input  logic [NPORTS-1:0] reserved,          // output held by another packet
  output logic             req_valid,
  output port_e            req_dir,
  output logic [1:0]       sel_case            // {avail1, avail0}
);

  localparam int unsigned EBL_W = FPD_W + BUF_W;

  logic             avail0, avail1;
  logic [EBL_W-1:0] ebl0, ebl1;

  function automatic fpd_t fpd_of(port_e p, fpd_t f [NDIRS]);
    return (p == P_L) ? '0 : f[p[1:0]];
  endfunction

  assign avail0 = c0.valid && !reserved[c0.dir];
  assign avail1 = c1.valid && !reserved[c1.dir];
  assign ebl0   = EBL_W'(fpd_of(c0.dir, fpd)) * EBL_W'(buf_in[c0.dir]);
  assign ebl1   = EBL_W'(fpd_of(c1.dir, fpd)) * EBL_W'(buf_in[c1.dir]);
  assign sel_case = {avail1, avail0};

  always_comb begin
    unique case ({avail1, avail0})
      2'b01:   begin req_valid = 1'b1; req_dir = c0.dir; end
      2'b10:   begin req_valid = 1'b1; req_dir = c1.dir; end
      2'b11:   begin req_valid = 1'b1; req_dir = (ebl1 > ebl0) ? c1.dir : c0.dir; end
      default: begin req_valid = 1'b0; req_dir = c0.dir; end
    endcase
  end

endmodule
