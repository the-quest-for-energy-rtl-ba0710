// sp_cache_bank: one shared cache bank (CB) of the single-port shared cache,
// with its own cache controller.
//
// The bank holds a 4-way TAG/DATA memory (scm_bank, one read and one write
// port) and serves the fetches that the read-only crossbar routes to it. A
// request granted in cycle t is looked up in cycle t+1: on a hit the whole
// line goes back in t+1, so a bank hit costs the core no extra cycle. On a
// miss the bank does not block: the miss goes into a table of NB_MSHR pending
// refills (miss status holding registers), an AXI4 read burst is sent for the
// line with the table index as AXI ID, and the bank keeps serving other cores
// meanwhile. A later miss on a line that is already being refilled only adds
// the core to that entry's waiting mask. Refill beats (4 x 64 bit) are written
// into the chosen way as they arrive, after its valid bit is cleared on the
// first beat; the last beat writes the tag and sets the valid bit. In a cycle
// with no lookup the bank then reads the new line and sends it to every
// waiting core at once, freeing the entry; to make room for that cycle the bank
// refuses new requests while a finished entry waits.
//
// What follows the reference architecture: non-blocking misses, several pending refills, AXI
// IDs to match responses, single-cycle hit latency, 4 ways, pseudo-random
// replacement, progressive refill. This design's choices: the table size
// (NB_MSHR = NB_WAYS), merging of misses to the same line, the victim rule
// (an invalid way first, else the LFSR's pick; ways with a refill in
// flight are skipped) and the 16-bit LFSR polynomial x^16+x^14+x^13+x^11+1.
//
// Request: req_i/addr_i/core_i, accepted when gnt_o is high; gnt_o does not
// depend on req_i. Response: rvalid_o with rline_o and rmask_o (one bit per
// core). AXI4 read master: ar_* and r_* (r_ready_o is always high).
module sp_cache_bank
  import icache_pkg::*;
#(
  parameter int unsigned NB_CORES = 8,
  parameter int unsigned NB_BANKS = 8,
  parameter int unsigned NB_WAYS  = 4,
  parameter int unsigned NB_SETS  = 8,
  parameter int unsigned NB_MSHR  = 4,
  localparam int unsigned CORE_W = (NB_CORES > 1) ? $clog2(NB_CORES) : 1,
  localparam int unsigned BANK_W = (NB_BANKS > 1) ? $clog2(NB_BANKS) : 1,
  localparam int unsigned SET_W  = (NB_SETS > 1) ? $clog2(NB_SETS) : 1,
  localparam int unsigned WAY_W  = (NB_WAYS > 1) ? $clog2(NB_WAYS) : 1,
  localparam int unsigned MSHR_W = (NB_MSHR > 1) ? $clog2(NB_MSHR) : 1,
  localparam int unsigned TAG_W  = ADDR_W - OFFS_W - BANK_W
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  // bank index of this bank, part of the refill address
  input  logic [BANK_W-1:0]    bank_id_i,
  // request from the crossbar
  input  logic                 req_i,
  input  logic [ADDR_W-1:0]    addr_i,
  input  logic [CORE_W-1:0]    core_i,
  output logic                 gnt_o,
  // response to the crossbar
  output logic                 rvalid_o,
  output logic [NB_CORES-1:0]  rmask_o,
  output logic [LINE_W-1:0]    rline_o,
  // AXI4 refill master (read channels)
  output logic                 ar_valid_o,
  input  logic                 ar_ready_i,
  output axi_ar_t              ar_o,
  input  logic                 r_valid_i,
  output logic                 r_ready_o,
  input  axi_r_t               r_i,
  // events
  output logic                 hit_o,     // lookup hit
  output logic                 refill_o,  // miss that started a refill
  output logic                 merge_o    // miss merged into a pending refill
);
  typedef enum logic [1:0] {M_FREE, M_AR, M_R, M_DONE} mstate_e;

  typedef struct packed {
    mstate_e             st;
    logic [TAG_W-1:0]    tag;
    logic [WAY_W-1:0]    way;
    logic [NB_CORES-1:0] mask;
    logic [BEAT_W-1:0]   beat;
  } mshr_t;

  mshr_t [NB_MSHR-1:0] mshr_q;

  // lookup stage
  logic              s1_valid_q;
  logic [ADDR_W-1:0] s1_addr_q;
  logic [CORE_W-1:0] s1_core_q;

  logic [15:0] lfsr_q;

  function automatic logic [SET_W-1:0] set_of(input logic [TAG_W-1:0] tag);
    return (NB_SETS > 1) ? tag[SET_W-1:0] : '0;
  endfunction

  // ---- lookup port ----
  logic [TAG_W-1:0]  s1_tag;
  logic              any_done;
  logic [MSHR_W-1:0] done_idx;
  logic [SET_W-1:0]  rd_set;
  logic [TAG_W-1:0]  rd_tag;
  logic              rd_hit;
  logic [WAY_W-1:0]  rd_way;
  logic [LINE_W-1:0] rd_line;
  logic [NB_SETS-1:0][NB_WAYS-1:0] valid_bits;

  assign s1_tag = s1_addr_q[ADDR_W-1:OFFS_W+BANK_W];

  always_comb begin
    any_done = 1'b0;
    done_idx = '0;
    for (int unsigned e = NB_MSHR; e > 0; e--)
      if (mshr_q[e-1].st == M_DONE) begin
        any_done = 1'b1;
        done_idx = MSHR_W'(e-1);
      end
  end

  assign rd_tag = s1_valid_q ? s1_tag : mshr_q[done_idx].tag;
  assign rd_set = set_of(rd_tag);

  // ---- miss handling ----
  logic              s1_miss, s1_match, s1_alloc;
  logic [MSHR_W-1:0] match_idx, free_idx;
  logic [$clog2(NB_MSHR+1)-1:0] nfree;
  logic [NB_WAYS-1:0] locked;
  logic [WAY_W-1:0]   victim;

  assign s1_miss = s1_valid_q && !rd_hit;

  always_comb begin
    s1_match  = 1'b0;
    match_idx = '0;
    free_idx  = '0;
    nfree     = '0;
    locked    = '0;
    for (int unsigned e = NB_MSHR; e > 0; e--) begin
      if (mshr_q[e-1].st == M_FREE) begin
        free_idx = MSHR_W'(e-1);
        nfree    = nfree + 1'b1;
      end
      if ((mshr_q[e-1].st == M_AR || mshr_q[e-1].st == M_R) && mshr_q[e-1].tag == s1_tag) begin
        s1_match  = 1'b1;
        match_idx = MSHR_W'(e-1);
      end
      if ((mshr_q[e-1].st == M_AR || mshr_q[e-1].st == M_R) &&
          set_of(mshr_q[e-1].tag) == set_of(s1_tag))
        locked[mshr_q[e-1].way] = 1'b1;
    end
  end

  assign s1_alloc = s1_miss && !s1_match;

  // victim: first invalid unlocked way, else LFSR pick moved to the next unlocked way
  always_comb begin
    logic found;
    logic [WAY_W-1:0] cand;
    found  = 1'b0;
    victim = '0;
    for (int unsigned w = 0; w < NB_WAYS; w++)
      if (!found && !locked[w] && !valid_bits[set_of(s1_tag)][w]) begin
        found  = 1'b1;
        victim = WAY_W'(w);
      end
    for (int unsigned k = 0; k < NB_WAYS; k++) begin
      cand = WAY_W'((32'(lfsr_q[WAY_W-1:0]) + k) % NB_WAYS);
      if (!found && !locked[cand]) begin
        found  = 1'b1;
        victim = cand;
      end
    end
  end

  // a new request needs a free entry beyond the one the current lookup may take,
  // and must leave the lookup port free for a finished refill
  assign gnt_o = (nfree > (s1_valid_q ? 1 : 0)) && !any_done;

  // ---- AXI read address ----
  logic              ar_pend;
  logic [MSHR_W-1:0] ar_idx;
  always_comb begin
    ar_pend = 1'b0;
    ar_idx  = '0;
    for (int unsigned e = NB_MSHR; e > 0; e--)
      if (mshr_q[e-1].st == M_AR) begin
        ar_pend = 1'b1;
        ar_idx  = MSHR_W'(e-1);
      end
  end
  assign ar_valid_o = ar_pend;
  assign ar_o.addr  = {mshr_q[ar_idx].tag, bank_id_i, {OFFS_W{1'b0}}};
  assign ar_o.id    = AXI_ID_W'(ar_idx);
  assign ar_o.len   = 8'(BEATS - 1);

  // ---- AXI read data, written into the array as it arrives ----
  logic [MSHR_W-1:0] r_idx;
  logic              r_fire;
  assign r_ready_o = 1'b1;
  assign r_fire    = r_valid_i;
  assign r_idx     = r_i.id[MSHR_W-1:0];

  scm_bank #(
    .NB_WAYS(NB_WAYS), .NB_SETS(NB_SETS), .TAG_W(TAG_W), .NB_RPORTS(1)
  ) i_scm (
    .clk_i, .rst_ni,
    .rd_set_i      (rd_set),
    .rd_tag_i      (rd_tag),
    .rd_hit_o      (rd_hit),
    .rd_way_o      (rd_way),
    .rd_line_o     (rd_line),
    .wr_set_i      (set_of(mshr_q[r_idx].tag)),
    .wr_way_i      (mshr_q[r_idx].way),
    .wr_inval_i    (r_fire && mshr_q[r_idx].beat == '0),
    .wr_tag_i      (r_fire && r_i.last),
    .wr_tag_data_i (mshr_q[r_idx].tag),
    .wr_data_i     (r_fire),
    .wr_chunk_i    (mshr_q[r_idx].beat),
    .wr_wdata_i    (r_i.data),
    .flush_i       (1'b0),
    .valid_o       (valid_bits)
  );

  // ---- responses ----
  always_comb begin
    rvalid_o = 1'b0;
    rmask_o  = '0;
    rline_o  = rd_line;
    if (s1_valid_q) begin
      if (rd_hit) begin
        rvalid_o = 1'b1;
        rmask_o[s1_core_q] = 1'b1;
      end
    end else if (any_done) begin
      rvalid_o = 1'b1;
      rmask_o  = mshr_q[done_idx].mask;
    end
  end

  assign hit_o    = s1_valid_q && rd_hit;
  assign refill_o = s1_alloc;
  assign merge_o  = s1_miss && s1_match;

  // ---- state ----
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      s1_valid_q <= 1'b0;
      s1_addr_q  <= '0;
      s1_core_q  <= '0;
      lfsr_q     <= 16'hACE1;
      for (int unsigned e = 0; e < NB_MSHR; e++) mshr_q[e] <= '{st: M_FREE, default: '0};
    end else begin
      lfsr_q <= {lfsr_q[14:0], lfsr_q[15] ^ lfsr_q[13] ^ lfsr_q[12] ^ lfsr_q[10]};
      s1_valid_q <= req_i && gnt_o;
      if (req_i && gnt_o) begin
        s1_addr_q <= addr_i;
        s1_core_q <= core_i;
      end
      // finished refill answered (only when no lookup used the port)
      if (!s1_valid_q && any_done) mshr_q[done_idx].st <= M_FREE;
      if (ar_valid_o && ar_ready_i) mshr_q[ar_idx].st <= M_R;
      if (r_fire) begin
        mshr_q[r_idx].beat <= mshr_q[r_idx].beat + 1'b1;
        if (r_i.last) mshr_q[r_idx].st <= M_DONE;
      end
      if (s1_miss && s1_match) mshr_q[match_idx].mask[s1_core_q] <= 1'b1;
      if (s1_alloc) begin
        mshr_q[free_idx].st   <= M_AR;
        mshr_q[free_idx].tag  <= s1_tag;
        mshr_q[free_idx].way  <= victim;
        mshr_q[free_idx].mask <= NB_CORES'(1) << s1_core_q;
        mshr_q[free_idx].beat <= '0;
      end
    end
  end

  // a refill beat must belong to an entry waiting for data
  a_r_known_id: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                 r_valid_i |-> mshr_q[r_idx].st == M_R);
  // the allocation is guaranteed by the grant rule
  a_alloc_room: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                 s1_alloc |-> mshr_q[free_idx].st == M_FREE);
  // the AXI address is held until accepted
  a_ar_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                ar_valid_o && !ar_ready_i |=> ar_valid_o && $stable(ar_o));
endmodule
