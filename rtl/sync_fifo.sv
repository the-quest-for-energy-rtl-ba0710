// sync_fifo: small single-clock first-in first-out queue.
//
// DEPTH entries of type T. push_i writes when not full, pop_i removes the head
// when not empty; head_o shows the oldest entry. Both may happen in one cycle.
// Used as the request FIFO in front of the master cache controller.
module sync_fifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 8,
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic clk_i,
  input  logic rst_ni,
  input  logic push_i,
  input  T     data_i,
  input  logic pop_i,
  output T     head_o,
  output logic empty_o,
  output logic full_o
);
  T [DEPTH-1:0]       mem_q;
  logic [PTR_W-1:0]   rd_q, wr_q;
  logic [PTR_W:0]     cnt_q;
  logic               do_push, do_pop;

  assign empty_o = (cnt_q == '0);
  assign full_o  = (cnt_q == (PTR_W+1)'(DEPTH));
  assign do_push = push_i && !full_o;
  assign do_pop  = pop_i && !empty_o;
  assign head_o  = mem_q[rd_q];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
      mem_q <= '0;
    end else begin
      if (do_push) begin
        mem_q[wr_q] <= data_i;
        wr_q <= (32'(wr_q) == DEPTH - 1) ? '0 : wr_q + 1'b1;
      end
      if (do_pop) rd_q <= (32'(rd_q) == DEPTH - 1) ? '0 : rd_q + 1'b1;
      cnt_q <= cnt_q + (PTR_W+1)'(do_push) - (PTR_W+1)'(do_pop);
    end
  end
endmodule
