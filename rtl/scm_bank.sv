// scm_bank: TAG and DATA standard-cell memory of one 4-way cache bank.
//
// Holds NB_SETS sets of NB_WAYS ways; each way has a valid bit, a tag and a
// 256-bit line. The memory has NB_RPORTS read ports and one write port, as the reference
// architecture describes: one read port per bank in the single-port (SP) cache and
// one per core in the multi-port (MP) cache, while refills use the single
// write port. A read port is combinational: it takes a set index and a tag and
// returns, in the same cycle, whether a valid way of that set holds the tag
// (rd_hit_o), which way (lowest one wins) and that way's line. The tag compare
// sits next to the array so that each port needs one line of output instead
// of four; this placement is this design's choice.
//
// Write port (all take effect at the clock edge):
//   wr_inval_i  clears the valid bit of (wr_set_i, wr_way_i)
//   wr_tag_i    writes wr_tag_data_i into the tag of (wr_set_i, wr_way_i) and
//               sets its valid bit
//   wr_data_i   writes the 64-bit refill beat wr_wdata_i into chunk wr_chunk_i
//               of the line of (wr_set_i, wr_way_i)
//   flush_i     clears every valid bit
// The reference architecture builds the arrays from latches with clock-gated writes; here
// they are written as register arrays, which have the same behaviour at the
// port level. Valid bits are reset; tags and data need no reset because they
// are never read without their valid bit.
module scm_bank
  import icache_pkg::*;
#(
  parameter int unsigned NB_WAYS   = 4,
  parameter int unsigned NB_SETS   = 8,
  parameter int unsigned TAG_W     = 24,
  parameter int unsigned NB_RPORTS = 1,
  localparam int unsigned SET_W = (NB_SETS > 1) ? $clog2(NB_SETS) : 1,
  localparam int unsigned WAY_W = (NB_WAYS > 1) ? $clog2(NB_WAYS) : 1
) (
  input  logic                                clk_i,
  input  logic                                rst_ni,
  // read ports
  input  logic [NB_RPORTS-1:0][SET_W-1:0]     rd_set_i,
  input  logic [NB_RPORTS-1:0][TAG_W-1:0]     rd_tag_i,
  output logic [NB_RPORTS-1:0]                rd_hit_o,
  output logic [NB_RPORTS-1:0][WAY_W-1:0]     rd_way_o,
  output logic [NB_RPORTS-1:0][LINE_W-1:0]    rd_line_o,
  // write port
  input  logic [SET_W-1:0]                    wr_set_i,
  input  logic [WAY_W-1:0]                    wr_way_i,
  input  logic                                wr_inval_i,
  input  logic                                wr_tag_i,
  input  logic [TAG_W-1:0]                    wr_tag_data_i,
  input  logic                                wr_data_i,
  input  logic [BEAT_W-1:0]                   wr_chunk_i,
  input  logic [AXI_DATA_W-1:0]               wr_wdata_i,
  input  logic                                flush_i,
  // valid bits of every way, for the replacement logic
  output logic [NB_SETS-1:0][NB_WAYS-1:0]     valid_o
);
  logic [NB_SETS-1:0][NB_WAYS-1:0]              valid_q;
  logic [NB_SETS-1:0][NB_WAYS-1:0][TAG_W-1:0]   tag_q;
  logic [NB_SETS-1:0][NB_WAYS-1:0][LINE_W-1:0]  data_q;

  assign valid_o = valid_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      valid_q <= '0;
    end else if (flush_i) begin
      valid_q <= '0;
    end else begin
      if (wr_inval_i) valid_q[wr_set_i][wr_way_i] <= 1'b0;
      if (wr_tag_i)   valid_q[wr_set_i][wr_way_i] <= 1'b1;
    end
  end

  always_ff @(posedge clk_i) begin
    if (wr_tag_i)  tag_q[wr_set_i][wr_way_i] <= wr_tag_data_i;
    if (wr_data_i) data_q[wr_set_i][wr_way_i][wr_chunk_i*AXI_DATA_W +: AXI_DATA_W] <= wr_wdata_i;
  end

  always_comb begin
    for (int unsigned p = 0; p < NB_RPORTS; p++) begin
      rd_hit_o[p]  = 1'b0;
      rd_way_o[p]  = '0;
      rd_line_o[p] = '0;
      for (int unsigned w = NB_WAYS; w > 0; w--) begin
        if (valid_q[rd_set_i[p]][w-1] && tag_q[rd_set_i[p]][w-1] == rd_tag_i[p]) begin
          rd_hit_o[p]  = 1'b1;
          rd_way_o[p]  = WAY_W'(w-1);
          rd_line_o[p] = data_q[rd_set_i[p]][w-1];
        end
      end
    end
  end
endmodule
