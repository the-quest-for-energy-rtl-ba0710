// tb_sp_icache: self-checking testbench of the single-port shared cache.
//
// Part 1 drives core 0 alone and checks the timing: a cold miss answers
// LAT + 6 cycles after the grant (L2 model latency LAT), an L0 hit and a bank
// hit one cycle after the grant, and eight fetches in one line take eight
// cycles. Part 2 lets all eight cores run the same loop with library calls so
// that bank conflicts, refill merging and hits under a pending refill all
// happen; every instruction is checked against the L2 image and every
// mechanism must have been seen at least once.
module tb_sp_icache;
  import icache_pkg::*;
  import tb_icache_pkg::*;

  localparam int unsigned NC  = 8;
  localparam int unsigned NB  = 8;
  localparam int unsigned LAT = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NC-1:0]              req, gnt, rvalid;
  logic [NC-1:0][31:0]        addr, rdata;
  logic                       ar_valid, ar_ready, r_valid, r_ready;
  axi_ar_t                    ar;
  axi_r_t                     r;
  logic [NC-1:0]              l0_hit, conflict;
  logic [NB-1:0]              bank_hit, refill, merge;
  int unsigned                ar_count, r_count;

  sp_icache dut (
    .clk_i(clk), .rst_ni(rst_n),
    .fetch_req_i(req), .fetch_addr_i(addr), .fetch_gnt_o(gnt),
    .fetch_rvalid_o(rvalid), .fetch_rdata_o(rdata),
    .ar_valid_o(ar_valid), .ar_ready_i(ar_ready), .ar_o(ar),
    .r_valid_i(r_valid), .r_ready_o(r_ready), .r_i(r),
    .l0_hit_o(l0_hit), .conflict_o(conflict), .bank_hit_o(bank_hit),
    .refill_o(refill), .merge_o(merge)
  );

  axi_l2_model #(.LATENCY(LAT)) l2 (
    .clk_i(clk), .rst_ni(rst_n),
    .ar_valid_i(ar_valid), .ar_ready_o(ar_ready), .ar_i(ar),
    .r_valid_o(r_valid), .r_ready_i(r_ready), .r_o(r),
    .ar_count(ar_count), .r_count(r_count)
  );

  // core models for part 2: one shared kernel, different start phases
  logic                phase2;
  logic [NC-1:0]       c_req, c_done;
  logic [NC-1:0][31:0] c_addr;
  int unsigned         c_checks[NC], c_fail[NC], c_fetch[NC];
  for (genvar c = 0; c < NC; c++) begin : g_core
    tb_fetch_core #(
      .BASE(32'h0001_0000 + 64*c), .BODY_WORDS(48), .ITERS(6),
      .LIB_BASE(32'h0004_0000), .LIB_WORDS(40), .CALL_EVERY(2)
    ) core (
      .clk_i(clk), .rst_ni(rst_n), .start_i(phase2),
      .req_o(c_req[c]), .addr_o(c_addr[c]), .gnt_i(gnt[c] & phase2),
      .rvalid_i(rvalid[c] & phase2), .rdata_i(rdata[c]), .done_o(c_done[c]),
      .checks(c_checks[c]), .failures(c_fail[c]), .fetches(c_fetch[c])
    );
  end

  logic [NC-1:0]       m_req;
  logic [NC-1:0][31:0] m_addr;
  assign req  = phase2 ? c_req  : m_req;
  assign addr = phase2 ? c_addr : m_addr;

  int unsigned checks = 0, failures = 0;
  int unsigned n_l0 = 0, n_conf = 0, n_bhit = 0, n_refill = 0, n_merge = 0, n_hum = 0;

  always @(posedge clk) if (rst_n && phase2) begin
    n_l0     += $countones(l0_hit & gnt);
    n_conf   += $countones(conflict);
    n_bhit   += $countones(bank_hit);
    n_refill += $countones(refill);
    n_merge  += $countones(merge);
    if (bank_hit != '0 && ar_count * 4 > r_count) n_hum++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one fetch on core 0; returns cycles from grant to response
  task automatic fetch0(input logic [31:0] a, output int unsigned lat);
    m_req[0]  <= 1'b1;
    m_addr[0] <= a;
    @(posedge clk);
    while (!gnt[0]) @(posedge clk);
    m_req[0] <= 1'b0;
    lat = 0;
    do begin
      #1;
      lat++;
      if (!rvalid[0]) @(posedge clk);
    end while (!rvalid[0] && lat < 200);
    check(rdata[0] == instr_of(a), $sformatf("core0 data at %h", a));
    @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned lat, t0;
    phase2 = 1'b0;
    m_req  = '0;
    m_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // ---- part 1: timing on core 0 ----
    fetch0(32'h0000_2004, lat);
    check(lat == LAT + 6, $sformatf("cold miss latency %0d, expected %0d", lat, LAT + 6));
    check(ar_count == 1 && ar.len == 8'd3, "one 4-beat refill burst");
    fetch0(32'h0000_2008, lat);
    check(lat == 1, $sformatf("L0 hit latency %0d", lat));
    // the same line is still in its bank: reach it again after another line
    fetch0(32'h0000_2104, lat);   // other bank, miss
    fetch0(32'h0000_2010, lat);   // back to the first line: L0 miss, bank hit
    check(lat == 1, $sformatf("bank hit latency %0d", lat));
    check(ar_count == 2, "no refill on a bank hit");
    // eight back-to-back fetches in one cached line: one per cycle
    m_req[0] <= 1'b1;
    m_addr[0] <= 32'h0000_2100;
    t0 = 0;
    for (int k = 0; k < 8; ) begin
      @(posedge clk);
      t0++;
      if (gnt[0]) begin
        k++;
        m_addr[0] <= 32'h0000_2100 + 32'(4 * k);
        if (k == 8) m_req[0] <= 1'b0;
      end
    end
    check(t0 == 8, $sformatf("8 fetches in %0d cycles", t0));
    repeat (3) @(posedge clk);

    // ---- part 2: eight cores ----
    phase2 = 1'b1;
    wait (&c_done);
    repeat (5) @(posedge clk);
    for (int c = 0; c < NC; c++) begin
      checks   += c_checks[c];
      failures += c_fail[c];
      check(c_checks[c] == c_fetch[c] && c_fetch[c] == 6 * 48 + 3 * 40,
            $sformatf("core %0d fetched %0d answered %0d", c, c_fetch[c], c_checks[c]));
    end
    check(n_l0 > 0,     "L0 hits seen");
    check(n_conf > 0,   "bank conflicts seen");
    check(n_refill > 0, "refills seen");
    check(n_merge > 0,  "merged misses seen");
    check(n_hum > 0,    "bank hit while a refill is pending seen");
    check(ar_count == 2 + n_refill, $sformatf("AXI requests %0d = refills %0d", ar_count, 2 + n_refill));
    $display("l0=%0d conflicts=%0d bankhits=%0d refills=%0d merges=%0d hit-under-miss=%0d",
             n_l0, n_conf, n_bhit, n_refill, n_merge, n_hum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
