// mp_ro_interco: 8x1 read-only interconnect of the multi-port shared cache.
//
// Collects the miss and bypass requests of the NB_CORES private cache
// controllers (a 32-bit address plus a bypass flag each) and hands one per
// cycle, round-robin, to the master cache controller, tagged with the index of
// the requesting core. A request is granted in the cycle it is presented if the
// master can take it (ready_i, which must not depend on valid_o). The reference
// architecture gives the 8x1 shape and the 32-bit width; the round-robin policy
// and handshake are this design's choices.
module mp_ro_interco
  import icache_pkg::*;
#(
  parameter int unsigned NB_CORES = 8,
  localparam int unsigned CORE_W = (NB_CORES > 1) ? $clog2(NB_CORES) : 1
) (
  input  logic                             clk_i,
  input  logic                             rst_ni,
  input  logic [NB_CORES-1:0]              req_i,
  input  logic [NB_CORES-1:0][ADDR_W-1:0]  addr_i,
  input  logic [NB_CORES-1:0]              bypass_i,
  output logic [NB_CORES-1:0]              gnt_o,
  output logic                             valid_o,
  output logic [ADDR_W-1:0]                addr_o,
  output logic                             bypass_o,
  output logic [CORE_W-1:0]                core_o,
  input  logic                             ready_i
);
  logic [NB_CORES-1:0] arb_gnt;

  rr_arbiter #(.N(NB_CORES)) i_arb (
    .clk_i, .rst_ni,
    .req_i     (req_i),
    .advance_i (ready_i),
    .gnt_o     (arb_gnt),
    .idx_o     (core_o),
    .valid_o   (valid_o)
  );

  assign addr_o   = addr_i[core_o];
  assign bypass_o = bypass_i[core_o];
  assign gnt_o    = arb_gnt & {NB_CORES{ready_i}};
endmodule
