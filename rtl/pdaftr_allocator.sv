// pdaftr_allocator: matrix switch allocator with wormhole reservation table.
//
// Every input port whose head flit has been routed and selected presents one
// request (req_valid, req_dir). For every output port a matrix arbiter picks
// one of the inputs requesting it; the winner is recorded in the reservation
// table on the next clock edge: the output is then reserved for that input
// until the packet's tail flit has crossed it (release pulse from the
// router). The selection function reads the reservation table (reserved) so
// that it never asks for an output held by another packet.
//
// Timing: gnt is combinational in the request cycle; route_valid/route_dir
// (per input) and reserved/owner (per output) are registered and valid from
// the next cycle. A release and a new grant on the same output cannot occur
// in one cycle because a reserved output receives no request.
module pdaftr_allocator
  import pdaftr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid [NPORTS],
  input  port_e             req_dir   [NPORTS],
  input  logic [NPORTS-1:0] release_out,          // per output: tail crossed
  output logic [NPORTS-1:0] gnt,                  // per input, this cycle
  output logic [NPORTS-1:0] reserved,             // per output
  output port_e             owner       [NPORTS], // per output: holding input
  output logic              route_valid [NPORTS], // per input
  output port_e             route_dir   [NPORTS]  // per input
);

  logic [NPORTS-1:0] out_req [NPORTS];  // [output][input]
  logic [NPORTS-1:0] out_gnt [NPORTS];  // [output][input]

  always_comb begin
    for (int o = 0; o < int'(NPORTS); o++)
      for (int i = 0; i < int'(NPORTS); i++)
        out_req[o][i] = req_valid[i] && (req_dir[i] == port_e'(o)) && !reserved[o];
  end

  for (genvar o = 0; o < int'(NPORTS); o++) begin : g_arb
    pdaftr_matrix_arbiter #(.N(NPORTS)) u_arb (
      .clk     (clk),
      .rst_n   (rst_n),
      .req     (out_req[o]),
      .advance (1'b1),
      .gnt     (out_gnt[o])
    );
  end

  always_comb begin
    gnt = '0;
    for (int o = 0; o < int'(NPORTS); o++) gnt |= out_gnt[o];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reserved <= '0;
      for (int p = 0; p < int'(NPORTS); p++) begin
        owner[p]       <= P_N;
        route_valid[p] <= 1'b0;
        route_dir[p]   <= P_N;
      end
    end else begin
      for (int o = 0; o < int'(NPORTS); o++) begin
        if (release_out[o]) begin
          reserved[o]               <= 1'b0;
          route_valid[owner[o]]     <= 1'b0;
        end
        for (int i = 0; i < int'(NPORTS); i++) begin
          if (out_gnt[o][i]) begin
            reserved[o]    <= 1'b1;
            owner[o]       <= port_e'(i);
            route_valid[i] <= 1'b1;
            route_dir[i]   <= port_e'(o);
          end
        end
      end
    end
  end

  a_release_reserved: assert property (@(posedge clk) disable iff (!rst_n)
    (release_out & ~reserved) == '0);

endmodule
