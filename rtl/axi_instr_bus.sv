// axi_instr_bus: AXI4 instruction bus that merges the refill ports of several
// cache banks onto the single AXI4 instruction master port of the cluster.
//
// Only the read channels exist: instruction caches never write. Read-address
// requests of the NB_MST masters are arbitrated round-robin; the winner's
// request goes out with its master index placed in the top MST_W bits of the
// ID, so the read data can be routed back by ID without any state. Each
// master may use the low AXI_ID_W-MST_W ID bits. Both directions are
// combinational, so the bus adds no cycle to the refill path, as the reference architecture
// requires. The reference architecture names the bus and its protocol; the ID scheme and
// arbitration policy are this design's choices.
module axi_instr_bus
  import icache_pkg::*;
#(
  parameter int unsigned NB_MST = 8,
  localparam int unsigned MST_W = (NB_MST > 1) ? $clog2(NB_MST) : 1
) (
  input  logic                    clk_i,
  input  logic                    rst_ni,
  // masters (cache banks)
  input  logic [NB_MST-1:0]       mst_ar_valid_i,
  output logic [NB_MST-1:0]       mst_ar_ready_o,
  input  axi_ar_t [NB_MST-1:0]    mst_ar_i,
  output logic [NB_MST-1:0]       mst_r_valid_o,
  input  logic [NB_MST-1:0]       mst_r_ready_i,
  output axi_r_t [NB_MST-1:0]     mst_r_o,
  // slave side: the cluster instruction master port
  output logic                    slv_ar_valid_o,
  input  logic                    slv_ar_ready_i,
  output axi_ar_t                 slv_ar_o,
  input  logic                    slv_r_valid_i,
  output logic                    slv_r_ready_o,
  input  axi_r_t                  slv_r_i
);
  localparam int unsigned LOW_W = AXI_ID_W - MST_W;

  logic [NB_MST-1:0] arb_gnt;
  logic [MST_W-1:0]  arb_idx;
  logic [MST_W-1:0]  r_dst;

  rr_arbiter #(.N(NB_MST)) i_arb (
    .clk_i, .rst_ni,
    .req_i     (mst_ar_valid_i),
    .advance_i (slv_ar_ready_i),
    .gnt_o     (arb_gnt),
    .idx_o     (arb_idx),
    .valid_o   (slv_ar_valid_o)
  );

  always_comb begin
    slv_ar_o    = mst_ar_i[arb_idx];
    slv_ar_o.id = {arb_idx, mst_ar_i[arb_idx].id[LOW_W-1:0]};
  end
  assign mst_ar_ready_o = arb_gnt & {NB_MST{slv_ar_ready_i}};

  assign r_dst = slv_r_i.id[AXI_ID_W-1 -: MST_W];
  always_comb begin
    for (int unsigned m = 0; m < NB_MST; m++) begin
      mst_r_o[m]       = slv_r_i;
      mst_r_o[m].id    = AXI_ID_W'(slv_r_i.id[LOW_W-1:0]);
      mst_r_valid_o[m] = slv_r_valid_i && (r_dst == MST_W'(m));
    end
  end
  assign slv_r_ready_o = mst_r_ready_i[r_dst];

  // a master's ID must fit in the bits the bus leaves it
  for (genvar m = 0; m < NB_MST; m++) begin : g_chk
    a_id_fits: assert property (@(posedge clk_i) disable iff (!rst_ni)
      mst_ar_valid_i[m] |-> (mst_ar_i[m].id >> LOW_W) == '0);
  end
endmodule
