// icache_cluster_top: instruction-cache subsystem of an 8-core ultra-low-power
// cluster, with both shared cache architectures side by side.
//
// The two architectures are alternatives for the same place in the cluster:
// the single-port shared cache (SP) suits larger capacities and the
// multi-port shared cache (MP) suits capacities of a few kB. This top carries
// one of each, each with its own eight core fetch ports and its own 64-bit
// AXI4 refill port towards L2, so either can be used or compared: SP at its
// 8 kB default, MP at 4 kB. The cores, the AXI4 cluster bus and L2 lie outside
// and connect through these ports. The MP global-service inputs (enable,
// flush) come from the cluster control unit. Event outputs feed performance
// counters. The pairing of the two in one top is this design's choice.
module icache_cluster_top
  import icache_pkg::*;
#(
  parameter int unsigned NB_CORES       = 8,
  parameter int unsigned NB_BANKS       = 8,
  parameter int unsigned NB_WAYS        = 4,
  parameter int unsigned SP_CACHE_BYTES = 8192,
  parameter int unsigned MP_CACHE_BYTES = 4096
) (
  input  logic                              clk_i,
  input  logic                              rst_ni,
  // SP cache: core fetch ports
  input  logic [NB_CORES-1:0]               sp_fetch_req_i,
  input  logic [NB_CORES-1:0][ADDR_W-1:0]   sp_fetch_addr_i,
  output logic [NB_CORES-1:0]               sp_fetch_gnt_o,
  output logic [NB_CORES-1:0]               sp_fetch_rvalid_o,
  output logic [NB_CORES-1:0][INSTR_W-1:0]  sp_fetch_rdata_o,
  // SP cache: AXI4 refill port
  output logic                              sp_ar_valid_o,
  input  logic                              sp_ar_ready_i,
  output axi_ar_t                           sp_ar_o,
  input  logic                              sp_r_valid_i,
  output logic                              sp_r_ready_o,
  input  axi_r_t                            sp_r_i,
  // SP cache: events
  output logic [NB_CORES-1:0]               sp_l0_hit_o,
  output logic [NB_CORES-1:0]               sp_conflict_o,
  output logic [NB_BANKS-1:0]               sp_bank_hit_o,
  output logic [NB_BANKS-1:0]               sp_refill_o,
  output logic [NB_BANKS-1:0]               sp_merge_o,
  // MP cache: core fetch ports
  input  logic [NB_CORES-1:0]               mp_fetch_req_i,
  input  logic [NB_CORES-1:0][ADDR_W-1:0]   mp_fetch_addr_i,
  output logic [NB_CORES-1:0]               mp_fetch_gnt_o,
  output logic [NB_CORES-1:0]               mp_fetch_rvalid_o,
  output logic [NB_CORES-1:0][INSTR_W-1:0]  mp_fetch_rdata_o,
  // MP cache: AXI4 refill port
  output logic                              mp_ar_valid_o,
  input  logic                              mp_ar_ready_i,
  output axi_ar_t                           mp_ar_o,
  input  logic                              mp_r_valid_i,
  output logic                              mp_r_ready_o,
  input  axi_r_t                            mp_r_i,
  // MP cache: global services
  input  logic                              mp_enable_i,
  input  logic                              mp_flush_req_i,
  output logic                              mp_flush_ack_o,
  // MP cache: events
  output logic [NB_CORES-1:0]               mp_hit_o,
  output logic [NB_CORES-1:0]               mp_miss_o,
  output logic                              mp_refill_o,
  output logic                              mp_merge_o,
  output logic                              mp_bypass_o
);
  sp_icache #(
    .NB_CORES(NB_CORES), .NB_BANKS(NB_BANKS), .NB_WAYS(NB_WAYS),
    .CACHE_BYTES(SP_CACHE_BYTES)
  ) i_sp (
    .clk_i, .rst_ni,
    .fetch_req_i    (sp_fetch_req_i),
    .fetch_addr_i   (sp_fetch_addr_i),
    .fetch_gnt_o    (sp_fetch_gnt_o),
    .fetch_rvalid_o (sp_fetch_rvalid_o),
    .fetch_rdata_o  (sp_fetch_rdata_o),
    .ar_valid_o     (sp_ar_valid_o),
    .ar_ready_i     (sp_ar_ready_i),
    .ar_o           (sp_ar_o),
    .r_valid_i      (sp_r_valid_i),
    .r_ready_o      (sp_r_ready_o),
    .r_i            (sp_r_i),
    .l0_hit_o       (sp_l0_hit_o),
    .conflict_o     (sp_conflict_o),
    .bank_hit_o     (sp_bank_hit_o),
    .refill_o       (sp_refill_o),
    .merge_o        (sp_merge_o)
  );

  mp_icache #(
    .NB_CORES(NB_CORES), .NB_BANKS(NB_BANKS), .NB_WAYS(NB_WAYS),
    .CACHE_BYTES(MP_CACHE_BYTES)
  ) i_mp (
    .clk_i, .rst_ni,
    .fetch_req_i    (mp_fetch_req_i),
    .fetch_addr_i   (mp_fetch_addr_i),
    .fetch_gnt_o    (mp_fetch_gnt_o),
    .fetch_rvalid_o (mp_fetch_rvalid_o),
    .fetch_rdata_o  (mp_fetch_rdata_o),
    .ar_valid_o     (mp_ar_valid_o),
    .ar_ready_i     (mp_ar_ready_i),
    .ar_o           (mp_ar_o),
    .r_valid_i      (mp_r_valid_i),
    .r_ready_o      (mp_r_ready_o),
    .r_i            (mp_r_i),
    .enable_i       (mp_enable_i),
    .flush_req_i    (mp_flush_req_i),
    .flush_ack_o    (mp_flush_ack_o),
    .hit_o          (mp_hit_o),
    .miss_o         (mp_miss_o),
    .refill_o       (mp_refill_o),
    .merge_o        (mp_merge_o),
    .bypass_o       (mp_bypass_o)
  );
endmodule
