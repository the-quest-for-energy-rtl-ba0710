// tb_mp_master_cc: self-checking testbench of the master cache controller of
// the multi-port cache.
//
// Requests are driven directly; an L2 model answers the AXI reads and a model
// of the eight TAG/DATA banks follows the master's write channel (and feeds
// its valid bits back). Checked: three cores missing on one line cause one
// burst and are retried in the same cycle, with the line in the model holding
// the L2 data; a flush waits for the refills in flight and then clears every
// valid bit; bypass requests are single-beat reads answered with the right
// word; and under random traffic every retried core finds its line valid and
// correct, and every AXI read belongs to a refill or a bypass.
module tb_mp_master_cc;
  import icache_pkg::*;
  import tb_icache_pkg::*;

  localparam int unsigned NC = 8, NB = 8, NS = 4, NW = 4, LAT = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        rq_v, rq_byp, rq_rdy;
  logic [31:0] rq_addr;
  logic [2:0]  rq_core;
  logic        arv, arr, rv, rr;
  axi_ar_t     ar;
  axi_r_t      r;
  logic [NB-1:0] wr_bank;
  logic [1:0]  wr_set, wr_way, wr_chunk;
  logic        wr_inval, wr_tag, wr_data, flush, enable, en_o, flush_req, flush_ack;
  logic [23:0] wr_tag_data;
  logic [63:0] wr_wdata;
  logic [NB-1:0][NS-1:0][NW-1:0] valid;
  logic [NC-1:0] retry, brv;
  logic [31:0]   bdata;
  logic          refill, merge, bypass;
  int unsigned   arc, rc;

  mp_master_cc #(.NB_CORES(NC), .NB_BANKS(NB), .NB_SETS(NS), .NB_WAYS(NW)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .req_valid_i(rq_v), .req_addr_i(rq_addr), .req_bypass_i(rq_byp), .req_core_i(rq_core),
    .req_ready_o(rq_rdy),
    .ar_valid_o(arv), .ar_ready_i(arr), .ar_o(ar), .r_valid_i(rv), .r_ready_o(rr), .r_i(r),
    .wr_bank_o(wr_bank), .wr_set_o(wr_set), .wr_way_o(wr_way), .wr_inval_o(wr_inval),
    .wr_tag_o(wr_tag), .wr_tag_data_o(wr_tag_data), .wr_data_o(wr_data), .wr_chunk_o(wr_chunk),
    .wr_wdata_o(wr_wdata), .flush_o(flush), .valid_i(valid),
    .retry_o(retry), .byp_rvalid_o(brv), .byp_rdata_o(bdata),
    .enable_i(enable), .enable_o(en_o), .flush_req_i(flush_req), .flush_ack_o(flush_ack),
    .refill_o(refill), .merge_o(merge), .bypass_o(bypass)
  );

  axi_l2_model #(.LATENCY(LAT)) l2 (
    .clk_i(clk), .rst_ni(rst_n), .ar_valid_i(arv), .ar_ready_o(arr), .ar_i(ar),
    .r_valid_o(rv), .r_ready_i(rr), .r_o(r), .ar_count(arc), .r_count(rc)
  );

  // bank model
  logic [23:0]  m_tag[NB][NS][NW];
  logic [255:0] m_line[NB][NS][NW];
  initial valid = '0;

  int unsigned checks = 0, failures = 0, n_refill = 0, n_merge = 0, n_byp = 0, n_flush = 0, n_single = 0;
  int unsigned cyc = 0, retry_cyc[NC];
  bit          busy[NC], obyp[NC];
  logic [31:0] oaddr[NC];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit line_ok(input logic [31:0] a);
    logic [2:0] b = a[7:5];
    logic [1:0] s = a[9:8];
    for (int w = 0; w < NW; w++)
      if (valid[b][s][w] && m_tag[b][s][w] == a[31:8]) return m_line[b][s][w] == line_of(a);
    return 0;
  endfunction

  always begin
    @(negedge clk);
    #4;
    if (rst_n) begin
      cyc++;
      if (arv && arr) n_single += int'(ar.len == 8'd0);
      n_refill += int'(refill); n_merge += int'(merge); n_byp += int'(bypass);
      check($countones(wr_bank) <= 1, "one bank written at a time");
      for (int b = 0; b < NB; b++) if (wr_bank[b]) begin
        if (wr_inval) valid[b][wr_set][wr_way] = 0;
        if (wr_data)  m_line[b][wr_set][wr_way][wr_chunk*64 +: 64] = wr_wdata;
        if (wr_tag) begin valid[b][wr_set][wr_way] = 1; m_tag[b][wr_set][wr_way] = wr_tag_data; end
      end
      if (flush) begin
        check(!busy[3], "no flush while a refill is in flight");
        valid = '0; n_flush++;
      end
      for (int c = 0; c < NC; c++) begin
        if (retry[c]) begin
          check(busy[c] && !obyp[c] && line_ok(oaddr[c]), $sformatf("retry of core %0d", c));
          busy[c] = 0; retry_cyc[c] = cyc;
        end
        if (brv[c]) begin
          check(busy[c] && obyp[c] && bdata == instr_of(oaddr[c]), $sformatf("bypass data core %0d", c));
          busy[c] = 0;
        end
      end
      if (rq_v && rq_rdy) begin busy[rq_core] = 1; oaddr[rq_core] = rq_addr; obyp[rq_core] = rq_byp; end
    end
  end

  task automatic send(input int c, input logic [31:0] a, input bit b);
    @(negedge clk);
    rq_v <= 1; rq_addr <= a; rq_core <= 3'(c); rq_byp <= b;
    do @(posedge clk); while (!rq_rdy);
    @(negedge clk);
    rq_v <= 0;
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rq_v = 0; rq_addr = 0; rq_core = 0; rq_byp = 0; enable = 1; flush_req = 0;
    foreach (busy[c]) busy[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // merge
    send(0, 32'h0000_4A24, 0);
    send(1, 32'h0000_4A20, 0);
    send(2, 32'h0000_4A3C, 0);
    wait (!busy[0] && !busy[1] && !busy[2]);
    check(arc == 1 && n_merge == 2 && n_refill == 1, "three misses, one burst");
    check(retry_cyc[0] == retry_cyc[1] && retry_cyc[1] == retry_cyc[2], "retried together");
    // flush waits for a refill in flight
    send(3, 32'h0000_8000, 0);
    @(negedge clk);
    flush_req = 1;
    wait (n_flush == 1);
    flush_req = 0;
    check(valid == '0 && !busy[3], "flush after the refill, all invalid");
    // bypass
    send(4, 32'h0000_1234, 1);
    wait (!busy[4]);
    check(arc == 3 && n_byp == 1, "bypass is one read");
    // random
    for (int n = 0; n < 3000; n++) begin
      automatic int c = $urandom_range(0, NC-1);
      if (!busy[c])
        send(c, {20'h0, 4'($urandom_range(0, 9)), 3'($urandom_range(0, 7)), 5'($urandom)} & 32'hFFFF_FFFC,
             ($urandom_range(0, 9) == 0));
      else @(negedge clk);
    end
    repeat (100) @(posedge clk);
    foreach (busy[c]) check(!busy[c], $sformatf("core %0d served", c));
    check(arc == n_refill + n_byp, $sformatf("bursts %0d = refills %0d + bypass %0d", arc, n_refill, n_byp));
    check(n_single == n_byp, "bypass reads are single beats");
    check(n_merge > 10, $sformatf("merges %0d", n_merge));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
