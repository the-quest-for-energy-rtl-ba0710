// tb_fetch_core: model of a processor fetch stage for the cache testbenches.
//
// After start_i it fetches a program-like address stream through the
// request/grant/response interface: ITERS passes over a loop body of
// BODY_WORDS instructions at BASE, and every CALL_EVERY passes a call into a
// library routine of LIB_WORDS instructions at LIB_BASE (CALL_EVERY = 0: no
// calls). A new request is presented as soon as the previous one is granted,
// so a cache answering every cycle runs it at one instruction per cycle. Every
// returned instruction is compared with tb_icache_pkg::instr_of() of its
// address. done_o rises when all responses have arrived.
module tb_fetch_core
  import tb_icache_pkg::*;
#(
  parameter int unsigned BASE       = 32'h1000,
  parameter int unsigned BODY_WORDS = 16,
  parameter int unsigned ITERS      = 4,
  parameter int unsigned LIB_BASE   = 32'h8000,
  parameter int unsigned LIB_WORDS  = 0,
  parameter int unsigned CALL_EVERY = 0
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        start_i,
  output logic        req_o,
  output logic [31:0] addr_o,
  input  logic        gnt_i,
  input  logic        rvalid_i,
  input  logic [31:0] rdata_i,
  output logic        done_o,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned fetches
);
  logic [31:0] stream[$];
  logic [31:0] inflight[$];
  int unsigned idx;
  logic        running;

  initial begin
    for (int unsigned it = 0; it < ITERS; it++) begin
      for (int unsigned i = 0; i < BODY_WORDS; i++) stream.push_back(BASE + 4*i);
      if (CALL_EVERY != 0 && (it % CALL_EVERY) == 0)
        for (int i = 0; i < int'(LIB_WORDS); i++) stream.push_back(LIB_BASE + 4*i);
    end
  end

  assign req_o  = running && idx < stream.size();
  assign addr_o = (idx < stream.size()) ? stream[idx] : '0;
  assign done_o = running && idx >= stream.size() && inflight.size() == 0;

  always @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      idx      <= 0;
      running  <= 1'b0;
      checks   = 0;
      failures = 0;
      fetches  = 0;
      inflight.delete();
    end else begin
      if (start_i) running <= 1'b1;
      if (rvalid_i) begin
        checks++;
        if (inflight.size() == 0) begin
          failures++;
          $display("%m: response without request");
        end else begin
          if (rdata_i !== instr_of(inflight[0])) begin
            failures++;
            $display("%m: addr %h got %h expected %h", inflight[0], rdata_i, instr_of(inflight[0]));
          end
          void'(inflight.pop_front());
        end
      end
      if (req_o && gnt_i) begin
        inflight.push_back(addr_o);
        idx <= idx + 1;
        fetches++;
      end
    end
  end
endmodule
