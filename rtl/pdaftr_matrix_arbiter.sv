// pdaftr_matrix_arbiter: N-requester matrix arbiter (least recently served).
//
// A priority matrix holds, for every pair (i, j), whether requester i
// currently beats requester j. Requester i is granted when it requests and
// no other requester that beats it is requesting. When advance is high and a
// grant is given, the winner drops below every other requester (its row is
// cleared and its column set), so each requester waits at most N-1 grants.
// After reset the lower index wins. The grant is combinational from req and
// the registered matrix; the matrix updates on the clock edge.
module pdaftr_matrix_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);

  // prio[i][j] = 1: i beats j. Only i != j is used.
  logic [N-1:0] prio [N];

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      gnt[i] = req[i];
      for (int j = 0; j < int'(N); j++)
        if (j != i && req[j] && prio[j][i]) gnt[i] = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++)
        for (int j = 0; j < int'(N); j++)
          prio[i][j] <= (i < j);
    end else if (advance && (gnt != '0)) begin
      for (int i = 0; i < int'(N); i++) begin
        if (gnt[i]) begin
          for (int j = 0; j < int'(N); j++) begin
            if (j != i) begin
              prio[i][j] <= 1'b0;
              prio[j][i] <= 1'b1;
            end
          end
        end
      end
    end
  end

  a_onehot_gnt: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
