// sp_l0_buffer: per-core L0 instruction buffer of the single-port shared cache.
//
// Holds one 256-bit cache line (8 instructions) and its line address. A core
// fetch that falls in the held line is granted at once and answered from the
// buffer on the next cycle, without touching the shared banks. A fetch that
// misses the buffer is forwarded in the same cycle to the read-only crossbar;
// the grant the core sees is then the crossbar's grant, so a bank conflict
// stalls the core. The bank answers with the whole line, which is stored in the
// buffer while the requested instruction goes to the core in that same cycle.
// One line, the check-then-forward-in-the-same-cycle behaviour and the
// whole-line response follow the reference architecture; the single outstanding request per
// core and the handshake below are this design's choices.
//
// Core side (request/grant, then response): a request is accepted in a cycle
// where fetch_req_i and fetch_gnt_o are high; its instruction comes back with
// fetch_rvalid_o on a later cycle (the next one on an L0 hit or a bank hit).
// A new request may be granted in the cycle the previous response arrives;
// it then also hits if it falls in the line arriving in that cycle.
module sp_l0_buffer
  import icache_pkg::*;
(
  input  logic               clk_i,
  input  logic               rst_ni,
  // core fetch interface
  input  logic               fetch_req_i,
  input  logic [ADDR_W-1:0]  fetch_addr_i,
  output logic               fetch_gnt_o,
  output logic               fetch_rvalid_o,
  output logic [INSTR_W-1:0] fetch_rdata_o,
  // towards the read-only crossbar
  output logic               ic_req_o,
  output logic [ADDR_W-1:0]  ic_addr_o,
  input  logic               ic_gnt_i,
  input  logic               ic_rvalid_i,
  input  logic [LINE_W-1:0]  ic_rline_i,
  // event: a fetch was served by the L0 buffer
  output logic               l0_hit_o
);
  localparam int unsigned LA_W = ADDR_W - OFFS_W;

  logic              buf_valid_q;
  logic [LA_W-1:0]   buf_la_q;
  logic [LINE_W-1:0] buf_line_q;
  logic              wait_q;        // request forwarded, line not back yet
  logic [LA_W-1:0]   pend_la_q;
  logic [2:0]        pend_word_q;
  logic              hit_q;         // L0 hit answered this cycle
  logic [INSTR_W-1:0] hit_word_q;

  logic can_accept, l0_hit;

  logic in_hit;     // the fetch falls in the line arriving this cycle
  assign can_accept = !wait_q || ic_rvalid_i;
  assign in_hit     = wait_q && ic_rvalid_i && (pend_la_q == fetch_addr_i[ADDR_W-1:OFFS_W]);
  assign l0_hit     = fetch_req_i && can_accept &&
                      (in_hit || (buf_valid_q && buf_la_q == fetch_addr_i[ADDR_W-1:OFFS_W]));
  assign ic_req_o   = fetch_req_i && can_accept && !l0_hit;
  assign ic_addr_o  = fetch_addr_i;
  assign fetch_gnt_o = l0_hit || (ic_req_o && ic_gnt_i);
  assign l0_hit_o   = l0_hit;

  assign fetch_rvalid_o = hit_q || (wait_q && ic_rvalid_i);
  assign fetch_rdata_o  = hit_q ? hit_word_q : line_word(ic_rline_i, pend_word_q);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      buf_valid_q <= 1'b0;
      buf_la_q    <= '0;
      buf_line_q  <= '0;
      wait_q      <= 1'b0;
      pend_la_q   <= '0;
      pend_word_q <= '0;
      hit_q       <= 1'b0;
      hit_word_q  <= '0;
    end else begin
      hit_q <= l0_hit;
      if (l0_hit) hit_word_q <= line_word(in_hit ? ic_rline_i : buf_line_q, fetch_addr_i[4:2]);
      if (wait_q && ic_rvalid_i) begin
        buf_valid_q <= 1'b1;
        buf_la_q    <= pend_la_q;
        buf_line_q  <= ic_rline_i;
      end
      if (ic_req_o && ic_gnt_i) begin
        wait_q      <= 1'b1;
        pend_la_q   <= fetch_addr_i[ADDR_W-1:OFFS_W];
        pend_word_q <= fetch_addr_i[4:2];
      end else if (ic_rvalid_i) begin
        wait_q <= 1'b0;
      end
    end
  end

  // the crossbar only answers a core that has a request in flight
  a_resp_expected: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                    ic_rvalid_i |-> wait_q);
endmodule
