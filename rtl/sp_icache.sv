// sp_icache: single-port shared instruction cache (SP) of a processor cluster.
//
// NB_CORES cores share NB_BANKS cache banks whose total capacity is
// CACHE_BYTES. Every core fetches through its own one-line L0 buffer; L0
// misses cross a 256-bit read-only crossbar (round-robin per bank, banks
// interleaved per 32-byte line) to the shared banks. Each bank has its own
// non-blocking controller, 4-way TAG/DATA memory and AXI4 refill master; the
// AXI4 instruction bus merges the bank refill ports into one 64-bit AXI4 read
// port towards L2. Timing seen by a core: L0 hit or bank hit, response on the
// cycle after the grant; bank conflict, no grant that cycle; bank miss, the
// line comes back when the 4-beat refill is done (L2 latency + 6 cycles).
// Structure, widths and capacity follow the reference architecture (default 8 banks of
// 1 kB for 8 cores, the 8K-SP configuration); the handshakes are this
// design's choice.
module sp_icache
  import icache_pkg::*;
#(
  parameter int unsigned NB_CORES    = 8,
  parameter int unsigned NB_BANKS    = 8,
  parameter int unsigned NB_WAYS     = 4,
  parameter int unsigned CACHE_BYTES = 8192,
  parameter int unsigned NB_MSHR     = 4,
  localparam int unsigned CORE_W = (NB_CORES > 1) ? $clog2(NB_CORES) : 1,
  localparam int unsigned BANK_W = (NB_BANKS > 1) ? $clog2(NB_BANKS) : 1,
  localparam int unsigned NB_SETS = CACHE_BYTES / (NB_BANKS * NB_WAYS * LINE_BYTES)
) (
  input  logic                                clk_i,
  input  logic                                rst_ni,
  // core fetch interfaces
  input  logic [NB_CORES-1:0]                 fetch_req_i,
  input  logic [NB_CORES-1:0][ADDR_W-1:0]     fetch_addr_i,
  output logic [NB_CORES-1:0]                 fetch_gnt_o,
  output logic [NB_CORES-1:0]                 fetch_rvalid_o,
  output logic [NB_CORES-1:0][INSTR_W-1:0]    fetch_rdata_o,
  // AXI4 refill port
  output logic                                ar_valid_o,
  input  logic                                ar_ready_i,
  output axi_ar_t                             ar_o,
  input  logic                                r_valid_i,
  output logic                                r_ready_o,
  input  axi_r_t                              r_i,
  // events for performance counters
  output logic [NB_CORES-1:0]                 l0_hit_o,
  output logic [NB_CORES-1:0]                 conflict_o,
  output logic [NB_BANKS-1:0]                 bank_hit_o,
  output logic [NB_BANKS-1:0]                 refill_o,
  output logic [NB_BANKS-1:0]                 merge_o
);
  logic [NB_CORES-1:0]               ic_req, ic_gnt, ic_rvalid;
  logic [NB_CORES-1:0][ADDR_W-1:0]   ic_addr;
  logic [NB_CORES-1:0][LINE_W-1:0]   ic_rline;

  logic [NB_BANKS-1:0]               b_req, b_gnt, b_rvalid;
  logic [NB_BANKS-1:0][ADDR_W-1:0]   b_addr;
  logic [NB_BANKS-1:0][CORE_W-1:0]   b_core;
  logic [NB_BANKS-1:0][NB_CORES-1:0] b_rmask;
  logic [NB_BANKS-1:0][LINE_W-1:0]   b_rline;

  logic [NB_BANKS-1:0]  m_ar_valid, m_ar_ready, m_r_valid, m_r_ready;
  axi_ar_t [NB_BANKS-1:0] m_ar;
  axi_r_t  [NB_BANKS-1:0] m_r;

  for (genvar c = 0; c < NB_CORES; c++) begin : g_l0
    sp_l0_buffer i_l0 (
      .clk_i, .rst_ni,
      .fetch_req_i    (fetch_req_i[c]),
      .fetch_addr_i   (fetch_addr_i[c]),
      .fetch_gnt_o    (fetch_gnt_o[c]),
      .fetch_rvalid_o (fetch_rvalid_o[c]),
      .fetch_rdata_o  (fetch_rdata_o[c]),
      .ic_req_o       (ic_req[c]),
      .ic_addr_o      (ic_addr[c]),
      .ic_gnt_i       (ic_gnt[c]),
      .ic_rvalid_i    (ic_rvalid[c]),
      .ic_rline_i     (ic_rline[c]),
      .l0_hit_o       (l0_hit_o[c])
    );
  end

  sp_ro_xbar #(.NB_CORES(NB_CORES), .NB_BANKS(NB_BANKS)) i_xbar (
    .clk_i, .rst_ni,
    .core_req_i    (ic_req),
    .core_addr_i   (ic_addr),
    .core_gnt_o    (ic_gnt),
    .core_rvalid_o (ic_rvalid),
    .core_rline_o  (ic_rline),
    .bank_req_o    (b_req),
    .bank_addr_o   (b_addr),
    .bank_core_o   (b_core),
    .bank_gnt_i    (b_gnt),
    .bank_rvalid_i (b_rvalid),
    .bank_rmask_i  (b_rmask),
    .bank_rline_i  (b_rline),
    .conflict_o    (conflict_o)
  );

  for (genvar b = 0; b < NB_BANKS; b++) begin : g_bank
    sp_cache_bank #(
      .NB_CORES(NB_CORES), .NB_BANKS(NB_BANKS), .NB_WAYS(NB_WAYS),
      .NB_SETS(NB_SETS), .NB_MSHR(NB_MSHR)
    ) i_bank (
      .clk_i, .rst_ni,
      .bank_id_i  (BANK_W'(b)),
      .req_i      (b_req[b]),
      .addr_i     (b_addr[b]),
      .core_i     (b_core[b]),
      .gnt_o      (b_gnt[b]),
      .rvalid_o   (b_rvalid[b]),
      .rmask_o    (b_rmask[b]),
      .rline_o    (b_rline[b]),
      .ar_valid_o (m_ar_valid[b]),
      .ar_ready_i (m_ar_ready[b]),
      .ar_o       (m_ar[b]),
      .r_valid_i  (m_r_valid[b]),
      .r_ready_o  (m_r_ready[b]),
      .r_i        (m_r[b]),
      .hit_o      (bank_hit_o[b]),
      .refill_o   (refill_o[b]),
      .merge_o    (merge_o[b])
    );
  end

  axi_instr_bus #(.NB_MST(NB_BANKS)) i_bus (
    .clk_i, .rst_ni,
    .mst_ar_valid_i (m_ar_valid),
    .mst_ar_ready_o (m_ar_ready),
    .mst_ar_i       (m_ar),
    .mst_r_valid_o  (m_r_valid),
    .mst_r_ready_i  (m_r_ready),
    .mst_r_o        (m_r),
    .slv_ar_valid_o (ar_valid_o),
    .slv_ar_ready_i (ar_ready_i),
    .slv_ar_o       (ar_o),
    .slv_r_valid_i  (r_valid_i),
    .slv_r_ready_o  (r_ready_o),
    .slv_r_i        (r_i)
  );
endmodule
