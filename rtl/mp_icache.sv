// mp_icache: multi-port shared instruction cache (MP) of a processor cluster.
//
// Only the TAG and DATA memories are shared: NB_BANKS banks of 4 ways, each
// with one write port and one read port per core. Every core keeps a private
// cache controller with a direct, contention-free path to all banks, so a hit
// costs the same single cycle as in a private cache. Misses and bypass fetches
// go through an 8x1 read-only interconnect to one master cache controller,
// which merges misses to the same line, refills lines over a 64-bit AXI4
// port, writes them into the banks and tells the waiting controllers to
// retry. The master also offers the global services: enable (bypass when
// disabled) and flush. Banks are interleaved per 32-byte line. Defaults give
// the 4K-MP configuration of the reference architecture: 8 cores, 8 banks of 512 bytes.
// Timing: hit, response one cycle after the grant; miss, L2 latency + 7
// cycles from grant to response with an idle AXI port.
module mp_icache
  import icache_pkg::*;
#(
  parameter int unsigned NB_CORES    = 8,
  parameter int unsigned NB_BANKS    = 8,
  parameter int unsigned NB_WAYS     = 4,
  parameter int unsigned CACHE_BYTES = 4096,
  localparam int unsigned CORE_W  = (NB_CORES > 1) ? $clog2(NB_CORES) : 1,
  localparam int unsigned BANK_W  = (NB_BANKS > 1) ? $clog2(NB_BANKS) : 1,
  localparam int unsigned NB_SETS = CACHE_BYTES / (NB_BANKS * NB_WAYS * LINE_BYTES),
  localparam int unsigned SET_W   = (NB_SETS > 1) ? $clog2(NB_SETS) : 1,
  localparam int unsigned WAY_W   = (NB_WAYS > 1) ? $clog2(NB_WAYS) : 1,
  localparam int unsigned TAG_W   = ADDR_W - OFFS_W - BANK_W
) (
  input  logic                              clk_i,
  input  logic                              rst_ni,
  // core fetch interfaces
  input  logic [NB_CORES-1:0]               fetch_req_i,
  input  logic [NB_CORES-1:0][ADDR_W-1:0]   fetch_addr_i,
  output logic [NB_CORES-1:0]               fetch_gnt_o,
  output logic [NB_CORES-1:0]               fetch_rvalid_o,
  output logic [NB_CORES-1:0][INSTR_W-1:0]  fetch_rdata_o,
  // AXI4 refill interface
  output logic                              ar_valid_o,
  input  logic                              ar_ready_i,
  output axi_ar_t                           ar_o,
  input  logic                              r_valid_i,
  output logic                              r_ready_o,
  input  axi_r_t                            r_i,
  // global services
  input  logic                              enable_i,
  input  logic                              flush_req_i,
  output logic                              flush_ack_o,
  // events for performance counters
  output logic [NB_CORES-1:0]               hit_o,
  output logic [NB_CORES-1:0]               miss_o,
  output logic                              refill_o,
  output logic                              merge_o,
  output logic                              bypass_o
);
  // private read ports
  logic [NB_CORES-1:0][SET_W-1:0]                 cc_set;
  logic [NB_CORES-1:0][TAG_W-1:0]                 cc_tag;
  logic [NB_BANKS-1:0][NB_CORES-1:0]              b_hit;
  logic [NB_BANKS-1:0][NB_CORES-1:0][WAY_W-1:0]   b_way;
  logic [NB_BANKS-1:0][NB_CORES-1:0][LINE_W-1:0]  b_line;
  logic [NB_CORES-1:0][NB_BANKS-1:0]              cc_hit;
  logic [NB_CORES-1:0][NB_BANKS-1:0][LINE_W-1:0]  cc_line;

  // miss path
  logic [NB_CORES-1:0]              m_req, m_bypass, m_gnt;
  logic [NB_CORES-1:0][ADDR_W-1:0]  m_addr;
  logic                             ic_valid, ic_bypass, ic_ready;
  logic [ADDR_W-1:0]                ic_addr;
  logic [CORE_W-1:0]                ic_core;
  logic [NB_CORES-1:0]              retry, byp_rvalid;
  logic [INSTR_W-1:0]               byp_rdata;
  logic                             cache_en;

  // write channel
  logic [NB_BANKS-1:0]                          wr_bank;
  logic [SET_W-1:0]                             wr_set;
  logic [WAY_W-1:0]                             wr_way;
  logic                                         wr_inval, wr_tag, wr_data, flush;
  logic [TAG_W-1:0]                             wr_tag_data;
  logic [BEAT_W-1:0]                            wr_chunk;
  logic [AXI_DATA_W-1:0]                        wr_wdata;
  logic [NB_BANKS-1:0][NB_SETS-1:0][NB_WAYS-1:0] valid_bits;

  always_comb begin
    for (int unsigned c = 0; c < NB_CORES; c++)
      for (int unsigned b = 0; b < NB_BANKS; b++) begin
        cc_hit[c][b]  = b_hit[b][c];
        cc_line[c][b] = b_line[b][c];
      end
  end

  for (genvar c = 0; c < NB_CORES; c++) begin : g_cc
    mp_cache_ctrl #(.NB_BANKS(NB_BANKS), .NB_SETS(NB_SETS)) i_cc (
      .clk_i, .rst_ni,
      .fetch_req_i    (fetch_req_i[c]),
      .fetch_addr_i   (fetch_addr_i[c]),
      .fetch_gnt_o    (fetch_gnt_o[c]),
      .fetch_rvalid_o (fetch_rvalid_o[c]),
      .fetch_rdata_o  (fetch_rdata_o[c]),
      .rd_set_o       (cc_set[c]),
      .rd_tag_o       (cc_tag[c]),
      .rd_hit_i       (cc_hit[c]),
      .rd_line_i      (cc_line[c]),
      .miss_req_o     (m_req[c]),
      .miss_addr_o    (m_addr[c]),
      .miss_bypass_o  (m_bypass[c]),
      .miss_gnt_i     (m_gnt[c]),
      .retry_i        (retry[c]),
      .byp_rvalid_i   (byp_rvalid[c]),
      .byp_rdata_i    (byp_rdata),
      .enable_i       (cache_en),
      .hit_o          (hit_o[c]),
      .miss_o         (miss_o[c])
    );
  end

  for (genvar b = 0; b < NB_BANKS; b++) begin : g_bank
    scm_bank #(
      .NB_WAYS(NB_WAYS), .NB_SETS(NB_SETS), .TAG_W(TAG_W), .NB_RPORTS(NB_CORES)
    ) i_scm (
      .clk_i, .rst_ni,
      .rd_set_i      (cc_set),
      .rd_tag_i      (cc_tag),
      .rd_hit_o      (b_hit[b]),
      .rd_way_o      (b_way[b]),
      .rd_line_o     (b_line[b]),
      .wr_set_i      (wr_set),
      .wr_way_i      (wr_way),
      .wr_inval_i    (wr_inval && wr_bank[b]),
      .wr_tag_i      (wr_tag && wr_bank[b]),
      .wr_tag_data_i (wr_tag_data),
      .wr_data_i     (wr_data && wr_bank[b]),
      .wr_chunk_i    (wr_chunk),
      .wr_wdata_i    (wr_wdata),
      .flush_i       (flush),
      .valid_o       (valid_bits[b])
    );
  end

  mp_ro_interco #(.NB_CORES(NB_CORES)) i_interco (
    .clk_i, .rst_ni,
    .req_i    (m_req),
    .addr_i   (m_addr),
    .bypass_i (m_bypass),
    .gnt_o    (m_gnt),
    .valid_o  (ic_valid),
    .addr_o   (ic_addr),
    .bypass_o (ic_bypass),
    .core_o   (ic_core),
    .ready_i  (ic_ready)
  );

  mp_master_cc #(
    .NB_CORES(NB_CORES), .NB_BANKS(NB_BANKS), .NB_SETS(NB_SETS), .NB_WAYS(NB_WAYS)
  ) i_master (
    .clk_i, .rst_ni,
    .req_valid_i   (ic_valid),
    .req_addr_i    (ic_addr),
    .req_bypass_i  (ic_bypass),
    .req_core_i    (ic_core),
    .req_ready_o   (ic_ready),
    .ar_valid_o, .ar_ready_i, .ar_o,
    .r_valid_i, .r_ready_o, .r_i,
    .wr_bank_o     (wr_bank),
    .wr_set_o      (wr_set),
    .wr_way_o      (wr_way),
    .wr_inval_o    (wr_inval),
    .wr_tag_o      (wr_tag),
    .wr_tag_data_o (wr_tag_data),
    .wr_data_o     (wr_data),
    .wr_chunk_o    (wr_chunk),
    .wr_wdata_o    (wr_wdata),
    .flush_o       (flush),
    .valid_i       (valid_bits),
    .retry_o       (retry),
    .byp_rvalid_o  (byp_rvalid),
    .byp_rdata_o   (byp_rdata),
    .enable_i      (enable_i),
    .enable_o      (cache_en),
    .flush_req_i   (flush_req_i),
    .flush_ack_o   (flush_ack_o),
    .refill_o      (refill_o),
    .merge_o       (merge_o),
    .bypass_o      (bypass_o)
  );
endmodule
