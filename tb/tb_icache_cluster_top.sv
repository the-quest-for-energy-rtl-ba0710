// tb_icache_cluster_top: end-to-end testbench of the cluster instruction-cache
// subsystem at its default size (8 cores, 8 kB SP cache, 4 kB MP cache).
//
// Eight fetching cores drive each cache with the same program: a shared loop
// of 48 instructions with a call into a 1280-instruction (5 kB) library every
// third pass, so that the MP cache also sees capacity misses. Each cache has
// its own L2 model. Every instruction is checked, and every mechanism of the
// two caches must occur at least once: SP L0 hits, bank conflicts, refills,
// merged refills and bank hits under a pending refill; MP hits, misses,
// refills, merged refills; then an MP flush and MP bypass fetches with the
// cache disabled.
module tb_icache_cluster_top;
  import icache_pkg::*;
  import tb_icache_pkg::*;

  localparam int unsigned NC  = 8;
  localparam int unsigned NB  = 8;
  localparam int unsigned LAT = 8;
  localparam int unsigned BODY = 48, ITERS = 7, LIBW = 1280, EVERY = 3;
  localparam int unsigned PER_CORE = ITERS * BODY + ((ITERS + EVERY - 1) / EVERY) * LIBW;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NC-1:0]       sp_req, sp_gnt, sp_rvalid, mp_req, mp_gnt, mp_rvalid;
  logic [NC-1:0][31:0] sp_addr, sp_rdata, mp_addr, mp_rdata;
  logic                sp_arv, sp_arr, sp_rv, sp_rr, mp_arv, mp_arr, mp_rv, mp_rr;
  axi_ar_t             sp_ar, mp_ar;
  axi_r_t              sp_r, mp_r;
  logic [NC-1:0]       sp_l0, sp_conf, mp_hit, mp_miss;
  logic [NB-1:0]       sp_bhit, sp_refill, sp_merge;
  logic                mp_refill, mp_merge, mp_byp;
  logic                enable, flush_req, flush_ack;
  int unsigned         sp_arc, sp_rc, mp_arc, mp_rc;

  icache_cluster_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .sp_fetch_req_i(sp_req), .sp_fetch_addr_i(sp_addr), .sp_fetch_gnt_o(sp_gnt),
    .sp_fetch_rvalid_o(sp_rvalid), .sp_fetch_rdata_o(sp_rdata),
    .sp_ar_valid_o(sp_arv), .sp_ar_ready_i(sp_arr), .sp_ar_o(sp_ar),
    .sp_r_valid_i(sp_rv), .sp_r_ready_o(sp_rr), .sp_r_i(sp_r),
    .sp_l0_hit_o(sp_l0), .sp_conflict_o(sp_conf), .sp_bank_hit_o(sp_bhit),
    .sp_refill_o(sp_refill), .sp_merge_o(sp_merge),
    .mp_fetch_req_i(mp_req), .mp_fetch_addr_i(mp_addr), .mp_fetch_gnt_o(mp_gnt),
    .mp_fetch_rvalid_o(mp_rvalid), .mp_fetch_rdata_o(mp_rdata),
    .mp_ar_valid_o(mp_arv), .mp_ar_ready_i(mp_arr), .mp_ar_o(mp_ar),
    .mp_r_valid_i(mp_rv), .mp_r_ready_o(mp_rr), .mp_r_i(mp_r),
    .mp_enable_i(enable), .mp_flush_req_i(flush_req), .mp_flush_ack_o(flush_ack),
    .mp_hit_o(mp_hit), .mp_miss_o(mp_miss), .mp_refill_o(mp_refill),
    .mp_merge_o(mp_merge), .mp_bypass_o(mp_byp)
  );

  axi_l2_model #(.LATENCY(LAT)) l2_sp (
    .clk_i(clk), .rst_ni(rst_n), .ar_valid_i(sp_arv), .ar_ready_o(sp_arr), .ar_i(sp_ar),
    .r_valid_o(sp_rv), .r_ready_i(sp_rr), .r_o(sp_r), .ar_count(sp_arc), .r_count(sp_rc)
  );
  axi_l2_model #(.LATENCY(LAT)) l2_mp (
    .clk_i(clk), .rst_ni(rst_n), .ar_valid_i(mp_arv), .ar_ready_o(mp_arr), .ar_i(mp_ar),
    .r_valid_o(mp_rv), .r_ready_i(mp_rr), .r_o(mp_r), .ar_count(mp_arc), .r_count(mp_rc)
  );

  logic                run;
  logic [NC-1:0]       sp_done, mp_done, c_req;
  logic [NC-1:0][31:0] c_addr;
  int unsigned sp_chk[NC], sp_fail[NC], sp_fch[NC], mp_chk[NC], mp_fail[NC], mp_fch[NC];

  for (genvar c = 0; c < NC; c++) begin : g_core
    tb_fetch_core #(.BASE(32'h0001_0000 + 64*c), .BODY_WORDS(BODY), .ITERS(ITERS),
                    .LIB_BASE(32'h0004_0000), .LIB_WORDS(LIBW), .CALL_EVERY(EVERY)) sp_core (
      .clk_i(clk), .rst_ni(rst_n), .start_i(run),
      .req_o(sp_req[c]), .addr_o(sp_addr[c]), .gnt_i(sp_gnt[c]),
      .rvalid_i(sp_rvalid[c]), .rdata_i(sp_rdata[c]), .done_o(sp_done[c]),
      .checks(sp_chk[c]), .failures(sp_fail[c]), .fetches(sp_fch[c])
    );
    tb_fetch_core #(.BASE(32'h0001_0000 + 64*c), .BODY_WORDS(BODY), .ITERS(ITERS),
                    .LIB_BASE(32'h0004_0000), .LIB_WORDS(LIBW), .CALL_EVERY(EVERY)) mp_core (
      .clk_i(clk), .rst_ni(rst_n), .start_i(run),
      .req_o(c_req[c]), .addr_o(c_addr[c]), .gnt_i(mp_gnt[c] & run),
      .rvalid_i(mp_rvalid[c] & run), .rdata_i(mp_rdata[c]), .done_o(mp_done[c]),
      .checks(mp_chk[c]), .failures(mp_fail[c]), .fetches(mp_fch[c])
    );
  end

  logic [NC-1:0]       m_req;
  logic [NC-1:0][31:0] m_addr;
  assign mp_req  = run ? c_req  : m_req;
  assign mp_addr = run ? c_addr : m_addr;

  int unsigned checks = 0, failures = 0;
  int unsigned n_l0 = 0, n_conf = 0, n_sprefill = 0, n_spmerge = 0, n_hum = 0;
  int unsigned n_hit = 0, n_miss = 0, n_mprefill = 0, n_mpmerge = 0, n_byp = 0, n_flush = 0;

  always @(posedge clk) if (rst_n) begin
    n_l0       += $countones(sp_l0 & sp_gnt);
    n_conf     += $countones(sp_conf);
    n_sprefill += $countones(sp_refill);
    n_spmerge  += $countones(sp_merge);
    if (sp_bhit != '0 && sp_arc * 4 > sp_rc) n_hum++;
    n_hit      += $countones(mp_hit);
    n_miss     += $countones(mp_miss);
    n_mprefill += int'(mp_refill);
    n_mpmerge  += int'(mp_merge);
    n_byp      += int'(mp_byp);
    n_flush    += int'(flush_ack);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic mp_fetch0(input logic [31:0] a);
    int unsigned n;
    m_req[0]  <= 1'b1;
    m_addr[0] <= a;
    @(posedge clk);
    while (!mp_gnt[0]) @(posedge clk);
    m_req[0] <= 1'b0;
    n = 0;
    do begin
      #1;
      n++;
      if (!mp_rvalid[0]) @(posedge clk);
    end while (!mp_rvalid[0] && n < 200);
    check(mp_rdata[0] == instr_of(a), $sformatf("MP core0 data at %h", a));
    @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ar0;
    run = 1'b0; m_req = '0; m_addr = '0; enable = 1'b1; flush_req = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    run = 1'b1;
    wait (&sp_done && &mp_done);
    repeat (5) @(posedge clk);
    run = 1'b0;
    for (int c = 0; c < NC; c++) begin
      checks   += sp_chk[c] + mp_chk[c];
      failures += sp_fail[c] + mp_fail[c];
      check(sp_chk[c] == PER_CORE && sp_fch[c] == PER_CORE, $sformatf("SP core %0d count", c));
      check(mp_chk[c] == PER_CORE && mp_fch[c] == PER_CORE, $sformatf("MP core %0d count", c));
    end
    check(sp_arc == n_sprefill, "SP: one AXI burst per refill");
    check(mp_arc == n_mprefill, "MP: one AXI burst per refill");

    // MP flush, then a line fetched before must be refilled
    mp_fetch0(32'h0001_0000);
    flush_req <= 1'b1;
    @(posedge clk);
    while (!flush_ack) @(posedge clk);
    flush_req <= 1'b0;
    @(posedge clk);
    ar0 = mp_arc;
    mp_fetch0(32'h0001_0000);
    check(mp_arc == ar0 + 1, "MP refill after flush");
    // MP disabled: bypass
    enable <= 1'b0;
    repeat (2) @(posedge clk);
    mp_fetch0(32'h0001_0004);
    mp_fetch0(32'h0004_0100);
    enable <= 1'b1;
    repeat (2) @(posedge clk);

    check(n_l0 > 0,       $sformatf("SP L0 hits %0d", n_l0));
    check(n_conf > 0,     $sformatf("SP bank conflicts %0d", n_conf));
    check(n_sprefill > 0, $sformatf("SP refills %0d", n_sprefill));
    check(n_spmerge > 0,  $sformatf("SP merged misses %0d", n_spmerge));
    check(n_hum > 0,      $sformatf("SP hits under refill %0d", n_hum));
    check(n_hit > 0,      $sformatf("MP hits %0d", n_hit));
    check(n_miss > 0,     $sformatf("MP misses %0d", n_miss));
    check(n_mprefill > 0, $sformatf("MP refills %0d", n_mprefill));
    check(n_mpmerge > 0,  $sformatf("MP merged misses %0d", n_mpmerge));
    check(n_flush == 1,   $sformatf("MP flushes %0d", n_flush));
    check(n_byp == 2,     $sformatf("MP bypass fetches %0d", n_byp));
    $display("SP: l0=%0d conflicts=%0d refills=%0d merges=%0d hit-under-refill=%0d",
             n_l0, n_conf, n_sprefill, n_spmerge, n_hum);
    $display("MP: hits=%0d misses=%0d refills=%0d merges=%0d flush=%0d bypass=%0d",
             n_hit, n_miss, n_mprefill, n_mpmerge, n_flush, n_byp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
