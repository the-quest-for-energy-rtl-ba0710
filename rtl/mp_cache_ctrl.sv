// mp_cache_ctrl: private cache controller (CC) of one core in the multi-port
// shared instruction cache.
//
// The TAG and DATA memories are shared by all cores, but every controller has
// its own read port into every bank, so lookups never contend. A fetch granted
// in cycle t is looked up in cycle t+1 (bank = address bits just above the
// line offset); on a hit the instruction is returned in t+1 and a new fetch can
// be granted in the same cycle. On a miss the controller sends the address
// through the 8x1 read-only interconnect to the master cache controller and
// waits; when the master signals (retry_i) that the line has been refilled,
// the controller looks the address up again. While the cache is disabled
// (enable_i low) every fetch is sent as a bypass request instead, and the
// instruction comes back from the master on byp_rvalid_i/byp_rdata_i.
// Miss forwarding, retry and bypass follow the reference architecture; the state machine
// and the one-fetch-in-flight rule are this design's choices.
module mp_cache_ctrl
  import icache_pkg::*;
#(
  parameter int unsigned NB_BANKS = 8,
  parameter int unsigned NB_SETS  = 4,
  localparam int unsigned BANK_W = (NB_BANKS > 1) ? $clog2(NB_BANKS) : 1,
  localparam int unsigned SET_W  = (NB_SETS > 1) ? $clog2(NB_SETS) : 1,
  localparam int unsigned TAG_W  = ADDR_W - OFFS_W - BANK_W
) (
  input  logic                               clk_i,
  input  logic                               rst_ni,
  // core fetch interface
  input  logic                               fetch_req_i,
  input  logic [ADDR_W-1:0]                  fetch_addr_i,
  output logic                               fetch_gnt_o,
  output logic                               fetch_rvalid_o,
  output logic [INSTR_W-1:0]                 fetch_rdata_o,
  // private read port into every bank
  output logic [SET_W-1:0]                   rd_set_o,
  output logic [TAG_W-1:0]                   rd_tag_o,
  input  logic [NB_BANKS-1:0]                rd_hit_i,
  input  logic [NB_BANKS-1:0][LINE_W-1:0]    rd_line_i,
  // miss / bypass request to the master cache controller
  output logic                               miss_req_o,
  output logic [ADDR_W-1:0]                  miss_addr_o,
  output logic                               miss_bypass_o,
  input  logic                               miss_gnt_i,
  input  logic                               retry_i,
  input  logic                               byp_rvalid_i,
  input  logic [INSTR_W-1:0]                 byp_rdata_i,
  // global service: cache enabled
  input  logic                               enable_i,
  // events
  output logic                               hit_o,
  output logic                               miss_o
);
  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_MISS, S_WAIT, S_BYP, S_BWAIT} state_e;

  state_e            st_q, st_d;
  logic [ADDR_W-1:0] addr_q;
  logic [BANK_W-1:0] bank;
  logic              hit, accept;

  assign bank     = (NB_BANKS > 1) ? BANK_W'(addr_q[OFFS_W +: BANK_W]) : '0;
  assign rd_tag_o = addr_q[ADDR_W-1:OFFS_W+BANK_W];
  assign rd_set_o = (NB_SETS > 1) ? SET_W'(rd_tag_o[SET_W-1:0]) : '0;
  assign hit      = (st_q == S_LOOKUP) && rd_hit_i[bank];

  assign fetch_gnt_o = fetch_req_i && (st_q == S_IDLE || hit);
  assign accept      = fetch_gnt_o;

  // a miss is sent in the cycle it is found
  assign miss_req_o    = (st_q == S_MISS) || (st_q == S_BYP) || (st_q == S_LOOKUP && !hit);
  assign miss_bypass_o = (st_q == S_BYP);
  assign miss_addr_o   = addr_q;

  always_comb begin
    fetch_rvalid_o = 1'b0;
    fetch_rdata_o  = line_word(rd_line_i[bank], addr_q[4:2]);
    if (hit) begin
      fetch_rvalid_o = 1'b1;
    end else if (st_q == S_BWAIT && byp_rvalid_i) begin
      fetch_rvalid_o = 1'b1;
      fetch_rdata_o  = byp_rdata_i;
    end
  end

  always_comb begin
    st_d = st_q;
    unique case (st_q)
      S_IDLE:   ;
      S_LOOKUP: st_d = hit ? S_IDLE : (miss_gnt_i ? S_WAIT : S_MISS);
      S_MISS:   if (miss_gnt_i) st_d = S_WAIT;
      S_WAIT:   if (retry_i) st_d = S_LOOKUP;
      S_BYP:    if (miss_gnt_i) st_d = S_BWAIT;
      S_BWAIT:  if (byp_rvalid_i) st_d = S_IDLE;
      default:  st_d = S_IDLE;
    endcase
    if (accept) st_d = enable_i ? S_LOOKUP : S_BYP;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      st_q   <= S_IDLE;
      addr_q <= '0;
    end else begin
      st_q <= st_d;
      if (accept) addr_q <= fetch_addr_i;
    end
  end

  assign hit_o  = hit;
  assign miss_o = (st_q == S_LOOKUP) && !hit;

  // a retry is only sent to a controller that is waiting for one
  a_retry_expected: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                     retry_i |-> st_q == S_WAIT);
  // bypass data only comes back for a bypass request
  a_byp_expected: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                   byp_rvalid_i |-> st_q == S_BWAIT);
endmodule
