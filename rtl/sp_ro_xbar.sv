// sp_ro_xbar: read-only logarithmic crossbar of the single-port shared cache.
//
// Connects NB_CORES L0 buffers to NB_BANKS shared cache banks, 256 bits wide.
// Banks are interleaved at cache-line granularity: the bank of a fetch is the
// address field just above the 32-byte line offset. Each bank has its own
// round-robin arbiter, so that several cores asking the same bank in one cycle
// are served one per cycle and the others are stalled (no grant). The
// request path is combinational (a request is granted in the cycle it is
// made, when its bank is ready); the response path carries one line per bank
// together with a mask of the cores it is meant for, so a bank can answer
// every core waiting for the same refilled line at once. Interleaving,
// round-robin policy and single-cycle path follow the reference architecture; the core
// mask on the response is this design's choice.
module sp_ro_xbar
  import icache_pkg::*;
#(
  parameter int unsigned NB_CORES = 8,
  parameter int unsigned NB_BANKS = 8,
  localparam int unsigned CORE_W = (NB_CORES > 1) ? $clog2(NB_CORES) : 1,
  localparam int unsigned BANK_W = (NB_BANKS > 1) ? $clog2(NB_BANKS) : 1
) (
  input  logic                                clk_i,
  input  logic                                rst_ni,
  // core (L0) side
  input  logic [NB_CORES-1:0]                 core_req_i,
  input  logic [NB_CORES-1:0][ADDR_W-1:0]     core_addr_i,
  output logic [NB_CORES-1:0]                 core_gnt_o,
  output logic [NB_CORES-1:0]                 core_rvalid_o,
  output logic [NB_CORES-1:0][LINE_W-1:0]     core_rline_o,
  // bank side
  output logic [NB_BANKS-1:0]                 bank_req_o,
  output logic [NB_BANKS-1:0][ADDR_W-1:0]     bank_addr_o,
  output logic [NB_BANKS-1:0][CORE_W-1:0]     bank_core_o,
  input  logic [NB_BANKS-1:0]                 bank_gnt_i,
  input  logic [NB_BANKS-1:0]                 bank_rvalid_i,
  input  logic [NB_BANKS-1:0][NB_CORES-1:0]   bank_rmask_i,
  input  logic [NB_BANKS-1:0][LINE_W-1:0]     bank_rline_i,
  // event: some core requested a bank and was not granted (bank conflict)
  output logic [NB_CORES-1:0]                 conflict_o
);
  logic [NB_BANKS-1:0][NB_CORES-1:0] bank_sel;   // core c targets bank b
  logic [NB_BANKS-1:0][NB_CORES-1:0] arb_gnt;
  logic [NB_BANKS-1:0][CORE_W-1:0]   arb_idx;

  always_comb begin
    bank_sel = '0;
    for (int unsigned c = 0; c < NB_CORES; c++) begin
      if (NB_BANKS > 1)
        bank_sel[core_addr_i[c][OFFS_W +: BANK_W]][c] = core_req_i[c];
      else
        bank_sel[0][c] = core_req_i[c];
    end
  end

  for (genvar b = 0; b < NB_BANKS; b++) begin : g_bank
    rr_arbiter #(.N(NB_CORES)) i_arb (
      .clk_i, .rst_ni,
      .req_i     (bank_sel[b]),
      .advance_i (bank_gnt_i[b]),
      .gnt_o     (arb_gnt[b]),
      .idx_o     (arb_idx[b]),
      .valid_o   (bank_req_o[b])
    );
    assign bank_addr_o[b] = core_addr_i[arb_idx[b]];
    assign bank_core_o[b] = arb_idx[b];
  end

  always_comb begin
    core_gnt_o    = '0;
    core_rvalid_o = '0;
    core_rline_o  = '0;
    for (int unsigned b = 0; b < NB_BANKS; b++) begin
      for (int unsigned c = 0; c < NB_CORES; c++) begin
        if (arb_gnt[b][c] && bank_gnt_i[b]) core_gnt_o[c] = 1'b1;
        if (bank_rvalid_i[b] && bank_rmask_i[b][c]) begin
          core_rvalid_o[c] = 1'b1;
          core_rline_o[c]  = bank_rline_i[b];
        end
      end
    end
  end

  assign conflict_o = core_req_i & ~core_gnt_o;
endmodule
