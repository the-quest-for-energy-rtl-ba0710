// rr_arbiter: round-robin arbiter for N requesters.
//
// gnt_o is a one-hot grant chosen combinationally among req_i, starting the
// search at the requester after the one granted last; idx_o is its index and
// valid_o says that some request is granted. The priority pointer moves past
// the granted requester only when advance_i is high (the grant was consumed
// by a handshake), so a grant stays stable while the target is not ready.
// Used by the read-only interconnects and the AXI instruction bus, for which
// the reference architecture asks for a round-robin policy.
module rr_arbiter #(
  parameter int unsigned N = 8,
  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic [N-1:0]     req_i,
  input  logic             advance_i,
  output logic [N-1:0]     gnt_o,
  output logic [IDX_W-1:0] idx_o,
  output logic             valid_o
);
  logic [IDX_W-1:0] prio_q;   // requester with highest priority

  always_comb begin
    logic [IDX_W-1:0] cand;
    gnt_o   = '0;
    idx_o   = '0;
    valid_o = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      cand = IDX_W'((32'(prio_q) + k) % N);
      if (!valid_o && req_i[cand]) begin
        valid_o     = 1'b1;
        idx_o       = cand;
        gnt_o[cand] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)                   prio_q <= '0;
    else if (advance_i && valid_o) prio_q <= IDX_W'((32'(idx_o) + 1) % N);
  end
endmodule
