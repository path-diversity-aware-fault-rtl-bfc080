// pdaftr_fifo: input buffer of one router port.
//
// A DEPTH-entry circular FIFO of flits (4 flits in the published
// configuration). The upstream side offers a flit with req_in; the flit is
// written when the FIFO is not full, and ack_out tells the sender it was
// taken in the same cycle. The read side shows the oldest flit on head_flit
// with head_valid and removes it when pop is high (pop is ignored when
// empty). A write and a read may happen in the same cycle, also when full
// (the freed slot is not reused in that cycle: a full FIFO refuses the write).
//
// free_slots is the number of empty entries, taken from registers only. It is
// the buffer-occupancy figure (buf_out) that the upstream router multiplies
// with FPD to form the effective buffer length, and an upstream router only
// sends when it is non-zero, so a write is never refused in practice.
// Timing: one cycle from write to head_valid; reset empties the buffer.
module pdaftr_fifo
  import pdaftr_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // upstream side
  input  logic                     req_in,
  input  flit_t                    flit_in,
  output logic                     ack_out,
  output logic [$clog2(DEPTH+1)-1:0] free_slots,
  // router side
  output logic                     head_valid,
  output flit_t                    head_flit,
  input  logic                     pop
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH+1);

  flit_t            mem [DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;
  logic [CNT_W-1:0] count;
  logic             do_wr, do_rd;

  assign ack_out    = req_in && (count != CNT_W'(DEPTH));
  assign do_wr      = ack_out;
  assign do_rd      = pop && (count != '0);
  assign head_valid = (count != '0);
  assign head_flit  = mem[rd_ptr];
  assign free_slots = CNT_W'(DEPTH) - count;

  function automatic logic [PTR_W-1:0] next_ptr(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // Storage needs no reset: only entries that have been written are read.
  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= flit_in;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    count <= CNT_W'(DEPTH));

endmodule
