// mp_master_cc: master cache controller of the multi-port shared cache.
//
// Receives miss and bypass requests from the private cache controllers through
// a FIFO and turns them into AXI4 reads towards L2. A content-addressable
// table (CAM) of NB_CAM entries tracks the refills in flight, keyed by line
// address; the entry index is the AXI ID, so responses may return in any
// order. A miss on a line that is already in the CAM only adds the requesting
// core to the entry's core mask (refill merging): one AXI burst then serves all
// cores that missed on that line. Otherwise the first free entry is taken, a
// victim way is picked and a 4-beat burst is requested. When the beats come
// back the master clears the victim's valid bit on the first beat and writes
// the line chunk by chunk through the banks' single write port; on the last
// beat it writes the tag, sets the valid bit, frees the entry and pulses
// retry_o for every core in the mask, which then look the line up again.
//
// Global services: enable_i switches the cache on and off (off = bypass: each
// fetch becomes a single-beat AXI read whose 32-bit word goes back to its core
// on byp_rvalid_o/byp_rdata_o); flush_req_i, once no refill is in flight,
// clears every valid bit in one cycle and answers with a one-cycle flush_ack_o.
//
// From the reference architecture: FIFO, CAM with address key, core IDs and AXI ID fields,
// merging, invalidate-then-progressive-update, retry notification, flush,
// enable and bypass. This design's choices: NB_CAM = FIFO depth = NB_CORES
// (each core has at most one request outstanding, so neither can overflow),
// the victim rule (invalid way first, else a 16-bit LFSR pick, skipping ways
// with a refill in flight), and that a line refilled between a core's miss and
// the processing of its request may be refilled a second time into another
// way (both copies hold the same instructions, the banks answer from the
// lowest way).
module mp_master_cc
  import icache_pkg::*;
#(
  parameter int unsigned NB_CORES = 8,
  parameter int unsigned NB_BANKS = 8,
  parameter int unsigned NB_SETS  = 4,
  parameter int unsigned NB_WAYS  = 4,
  localparam int unsigned NB_CAM = NB_CORES,
  localparam int unsigned CORE_W = (NB_CORES > 1) ? $clog2(NB_CORES) : 1,
  localparam int unsigned BANK_W = (NB_BANKS > 1) ? $clog2(NB_BANKS) : 1,
  localparam int unsigned SET_W  = (NB_SETS > 1) ? $clog2(NB_SETS) : 1,
  localparam int unsigned WAY_W  = (NB_WAYS > 1) ? $clog2(NB_WAYS) : 1,
  localparam int unsigned CAM_W  = (NB_CAM > 1) ? $clog2(NB_CAM) : 1,
  localparam int unsigned TAG_W  = ADDR_W - OFFS_W - BANK_W,
  localparam int unsigned LA_W   = ADDR_W - OFFS_W
) (
  input  logic                                          clk_i,
  input  logic                                          rst_ni,
  // requests from the read-only interconnect
  input  logic                                          req_valid_i,
  input  logic [ADDR_W-1:0]                             req_addr_i,
  input  logic                                          req_bypass_i,
  input  logic [CORE_W-1:0]                             req_core_i,
  output logic                                          req_ready_o,
  // AXI4 refill interface
  output logic                                          ar_valid_o,
  input  logic                                          ar_ready_i,
  output axi_ar_t                                       ar_o,
  input  logic                                          r_valid_i,
  output logic                                          r_ready_o,
  input  axi_r_t                                        r_i,
  // write channel to the TAG and DATA banks
  output logic [NB_BANKS-1:0]                           wr_bank_o,
  output logic [SET_W-1:0]                              wr_set_o,
  output logic [WAY_W-1:0]                              wr_way_o,
  output logic                                          wr_inval_o,
  output logic                                          wr_tag_o,
  output logic [TAG_W-1:0]                              wr_tag_data_o,
  output logic                                          wr_data_o,
  output logic [BEAT_W-1:0]                             wr_chunk_o,
  output logic [AXI_DATA_W-1:0]                         wr_wdata_o,
  output logic                                          flush_o,
  input  logic [NB_BANKS-1:0][NB_SETS-1:0][NB_WAYS-1:0] valid_i,
  // notifications to the private controllers
  output logic [NB_CORES-1:0]                           retry_o,
  output logic [NB_CORES-1:0]                           byp_rvalid_o,
  output logic [INSTR_W-1:0]                            byp_rdata_o,
  // global services, from the cluster control unit
  input  logic                                          enable_i,
  output logic                                          enable_o,
  input  logic                                          flush_req_i,
  output logic                                          flush_ack_o,
  // events
  output logic                                          refill_o,
  output logic                                          merge_o,
  output logic                                          bypass_o
);
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic              bypass;
    logic [CORE_W-1:0] core;
  } req_t;

  typedef enum logic [1:0] {E_FREE, E_AR, E_R} estate_e;

  typedef struct packed {
    estate_e             st;
    logic                bypass;
    logic [ADDR_W-1:0]   addr;     // key: line address (word address for bypass)
    logic [NB_CORES-1:0] cores;    // cores to notify
    logic [WAY_W-1:0]    way;
    logic [BEAT_W-1:0]   beat;
  } cam_t;

  cam_t [NB_CAM-1:0] cam_q;
  logic [15:0]       lfsr_q;
  logic              enable_q;

  // ---- request FIFO ----
  req_t head;
  logic fifo_empty, fifo_full, pop;

  sync_fifo #(.T(req_t), .DEPTH(NB_CORES)) i_fifo (
    .clk_i, .rst_ni,
    .push_i  (req_valid_i),
    .data_i  ('{addr: req_addr_i, bypass: req_bypass_i, core: req_core_i}),
    .pop_i   (pop),
    .head_o  (head),
    .empty_o (fifo_empty),
    .full_o  (fifo_full)
  );
  assign req_ready_o = !fifo_full;

  function automatic logic [LA_W-1:0] la_of(input logic [ADDR_W-1:0] a);
    return a[ADDR_W-1:OFFS_W];
  endfunction
  function automatic logic [BANK_W-1:0] bank_of(input logic [ADDR_W-1:0] a);
    return (NB_BANKS > 1) ? BANK_W'(a[OFFS_W +: BANK_W]) : '0;
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(input logic [ADDR_W-1:0] a);
    return a[ADDR_W-1:OFFS_W+BANK_W];
  endfunction
  function automatic logic [SET_W-1:0] set_of(input logic [ADDR_W-1:0] a);
    return (NB_SETS > 1) ? SET_W'(a[OFFS_W+BANK_W +: SET_W]) : '0;
  endfunction

  // ---- CAM search, free entry, locked ways ----
  logic              busy, cam_hit, has_free;
  logic [CAM_W-1:0]  hit_idx, free_idx;
  logic [NB_WAYS-1:0] locked;

  always_comb begin
    busy     = 1'b0;
    cam_hit  = 1'b0;
    has_free = 1'b0;
    hit_idx  = '0;
    free_idx = '0;
    locked   = '0;
    for (int unsigned e = NB_CAM; e > 0; e--) begin
      if (cam_q[e-1].st == E_FREE) begin
        has_free = 1'b1;
        free_idx = CAM_W'(e-1);
      end else begin
        busy = 1'b1;
        if (!cam_q[e-1].bypass && !head.bypass &&
            la_of(cam_q[e-1].addr) == la_of(head.addr)) begin
          cam_hit = 1'b1;
          hit_idx = CAM_W'(e-1);
        end
        if (!cam_q[e-1].bypass && bank_of(cam_q[e-1].addr) == bank_of(head.addr) &&
            set_of(cam_q[e-1].addr) == set_of(head.addr))
          locked[cam_q[e-1].way] = 1'b1;
      end
    end
  end

  // victim way for the head request
  logic [WAY_W-1:0] victim;
  always_comb begin
    logic found;
    logic [WAY_W-1:0] cand;
    found  = 1'b0;
    victim = '0;
    for (int unsigned w = 0; w < NB_WAYS; w++)
      if (!found && !locked[w] && !valid_i[bank_of(head.addr)][set_of(head.addr)][w]) begin
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

  // a pending flush stops new refills so that the CAM drains
  logic do_merge, do_alloc, do_flush;
  assign do_flush = flush_req_i && !busy;
  assign do_merge = !fifo_empty && !flush_req_i && cam_hit;
  assign do_alloc = !fifo_empty && !flush_req_i && !cam_hit && has_free &&
                    (head.bypass || locked != '1);
  assign pop      = do_merge || do_alloc;

  // ---- AXI read address ----
  logic             ar_pend;
  logic [CAM_W-1:0] ar_idx;
  always_comb begin
    ar_pend = 1'b0;
    ar_idx  = '0;
    for (int unsigned e = NB_CAM; e > 0; e--)
      if (cam_q[e-1].st == E_AR) begin
        ar_pend = 1'b1;
        ar_idx  = CAM_W'(e-1);
      end
  end
  assign ar_valid_o = ar_pend;
  always_comb begin
    ar_o.id = AXI_ID_W'(ar_idx);
    if (cam_q[ar_idx].bypass) begin
      ar_o.addr = {cam_q[ar_idx].addr[ADDR_W-1:3], 3'b000};
      ar_o.len  = 8'd0;
    end else begin
      ar_o.addr = {la_of(cam_q[ar_idx].addr), {OFFS_W{1'b0}}};
      ar_o.len  = 8'(BEATS - 1);
    end
  end

  // ---- AXI read data ----
  logic [CAM_W-1:0] r_idx;
  cam_t             r_ent;
  logic             r_line;
  assign r_ready_o = 1'b1;
  assign r_idx     = CAM_W'(r_i.id);
  assign r_ent     = cam_q[r_idx];
  assign r_line    = r_valid_i && !r_ent.bypass;

  always_comb begin
    wr_bank_o     = '0;
    wr_bank_o[bank_of(r_ent.addr)] = r_line;
    wr_set_o      = set_of(r_ent.addr);
    wr_way_o      = r_ent.way;
    wr_inval_o    = r_line && r_ent.beat == '0;
    wr_tag_o      = r_line && r_i.last;
    wr_tag_data_o = tag_of(r_ent.addr);
    wr_data_o     = r_line;
    wr_chunk_o    = r_ent.beat;
    wr_wdata_o    = r_i.data;
  end
  assign flush_o     = do_flush;
  assign flush_ack_o = do_flush;

  // a miss merged into the entry whose last beat arrives in this very cycle
  // is retried together with the others
  always_comb begin
    retry_o = (r_line && r_i.last) ? r_ent.cores : '0;
    if (do_merge && r_line && r_i.last && hit_idx == r_idx) retry_o[head.core] = 1'b1;
  end
  assign byp_rvalid_o = (r_valid_i && r_ent.bypass) ? r_ent.cores : '0;
  assign byp_rdata_o  = r_ent.addr[2] ? r_i.data[63:32] : r_i.data[31:0];

  assign enable_o = enable_q;
  assign refill_o = do_alloc && !head.bypass;
  assign merge_o  = do_merge;
  assign bypass_o = do_alloc && head.bypass;

  // ---- state ----
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      lfsr_q   <= 16'hACE1;
      enable_q <= 1'b0;
      for (int unsigned e = 0; e < NB_CAM; e++) cam_q[e] <= '{st: E_FREE, default: '0};
    end else begin
      lfsr_q   <= {lfsr_q[14:0], lfsr_q[15] ^ lfsr_q[13] ^ lfsr_q[12] ^ lfsr_q[10]};
      enable_q <= enable_i;
      if (ar_valid_o && ar_ready_i) cam_q[ar_idx].st <= E_R;
      if (r_valid_i) begin
        cam_q[r_idx].beat <= cam_q[r_idx].beat + 1'b1;
        if (r_i.last) cam_q[r_idx].st <= E_FREE;
      end
      if (do_merge) cam_q[hit_idx].cores[head.core] <= 1'b1;
      if (do_alloc) begin
        cam_q[free_idx].st     <= E_AR;
        cam_q[free_idx].bypass <= head.bypass;
        cam_q[free_idx].addr   <= head.addr;
        cam_q[free_idx].cores  <= NB_CORES'(1) << head.core;
        cam_q[free_idx].way    <= victim;
        cam_q[free_idx].beat   <= '0;
      end
    end
  end

  a_r_known_id: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                 r_valid_i |-> cam_q[r_idx].st == E_R);
  a_ar_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                ar_valid_o && !ar_ready_i |=> ar_valid_o && $stable(ar_o));
  a_no_overflow: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                  req_valid_i |-> !fifo_full);
endmodule
