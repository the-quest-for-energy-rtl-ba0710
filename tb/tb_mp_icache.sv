// tb_mp_icache: self-checking testbench of the multi-port shared cache.
//
// Part 1 drives core 0 alone: a cold miss answers LAT + 7 cycles after the
// grant (L2 model latency LAT), a hit one cycle after it, and eight fetches in
// a cached line take eight cycles. Part 2 runs all eight cores on one shared
// loop with library calls: refills, merged misses and hits on every core must
// be seen and every instruction must match the L2 image. Part 3 flushes the
// cache (a cached line must miss again afterwards) and part 4 disables it, so
// that fetches are served as single-beat bypass reads.
module tb_mp_icache;
  import icache_pkg::*;
  import tb_icache_pkg::*;

  localparam int unsigned NC  = 8;
  localparam int unsigned LAT = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NC-1:0]        req, gnt, rvalid;
  logic [NC-1:0][31:0]  addr, rdata;
  logic                 ar_valid, ar_ready, r_valid, r_ready;
  axi_ar_t              ar;
  axi_r_t               r;
  logic                 enable, flush_req, flush_ack;
  logic [NC-1:0]        hit, miss;
  logic                 refill, merge, bypass;
  int unsigned          ar_count, r_count;

  mp_icache dut (
    .clk_i(clk), .rst_ni(rst_n),
    .fetch_req_i(req), .fetch_addr_i(addr), .fetch_gnt_o(gnt),
    .fetch_rvalid_o(rvalid), .fetch_rdata_o(rdata),
    .ar_valid_o(ar_valid), .ar_ready_i(ar_ready), .ar_o(ar),
    .r_valid_i(r_valid), .r_ready_o(r_ready), .r_i(r),
    .enable_i(enable), .flush_req_i(flush_req), .flush_ack_o(flush_ack),
    .hit_o(hit), .miss_o(miss), .refill_o(refill), .merge_o(merge), .bypass_o(bypass)
  );

  axi_l2_model #(.LATENCY(LAT)) l2 (
    .clk_i(clk), .rst_ni(rst_n),
    .ar_valid_i(ar_valid), .ar_ready_o(ar_ready), .ar_i(ar),
    .r_valid_o(r_valid), .r_ready_i(r_ready), .r_o(r),
    .ar_count(ar_count), .r_count(r_count)
  );

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
  int unsigned n_hit = 0, n_miss = 0, n_refill = 0, n_merge = 0, n_byp = 0;
  logic [NC-1:0] hit_seen;

  always @(posedge clk) if (rst_n) begin
    n_hit    += $countones(hit);
    n_miss   += $countones(miss);
    n_refill += int'(refill);
    n_merge  += int'(merge);
    n_byp    += int'(bypass);
    if (phase2) hit_seen |= hit;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

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
    int unsigned lat, t0, ar0;
    phase2    = 1'b0;
    m_req     = '0;
    m_addr    = '0;
    enable    = 1'b1;
    flush_req = 1'b0;
    hit_seen  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // ---- part 1: timing ----
    fetch0(32'h0000_2004, lat);
    check(lat == LAT + 7, $sformatf("cold miss latency %0d, expected %0d", lat, LAT + 7));
    check(ar_count == 1, "one refill burst");
    fetch0(32'h0000_2018, lat);
    check(lat == 1, $sformatf("hit latency %0d", lat));
    m_req[0]  <= 1'b1;
    m_addr[0] <= 32'h0000_2000;
    t0 = 0;
    for (int k = 0; k < 8; ) begin
      @(posedge clk);
      t0++;
      if (gnt[0]) begin
        k++;
        m_addr[0] <= 32'h0000_2000 + 32'(4 * k);
        if (k == 8) m_req[0] <= 1'b0;
      end
    end
    check(t0 == 8, $sformatf("8 fetches in %0d cycles", t0));
    repeat (3) @(posedge clk);
    check(ar_count == 1, "no refill on hits");

    // ---- part 2: eight cores ----
    phase2 = 1'b1;
    wait (&c_done);
    repeat (5) @(posedge clk);
    phase2 = 1'b0;
    for (int c = 0; c < NC; c++) begin
      checks   += c_checks[c];
      failures += c_fail[c];
      check(c_checks[c] == c_fetch[c] && c_fetch[c] == 6 * 48 + 3 * 40,
            $sformatf("core %0d fetched %0d answered %0d", c, c_fetch[c], c_checks[c]));
    end
    check(hit_seen == '1, "every core hit");
    check(n_refill > 0, "refills seen");
    check(n_merge > 0,  "merged misses seen");
    check(ar_count == n_refill, $sformatf("AXI requests %0d = refills %0d", ar_count, n_refill));

    // ---- part 3: flush ----
    fetch0(32'h0000_2004, lat);
    check(lat == 1, "line cached before flush");
    flush_req <= 1'b1;
    @(posedge clk);
    while (!flush_ack) @(posedge clk);
    flush_req <= 1'b0;
    @(posedge clk);
    ar0 = ar_count;
    fetch0(32'h0000_2004, lat);
    check(lat == LAT + 7, $sformatf("miss after flush, latency %0d", lat));
    check(ar_count == ar0 + 1, "refill after flush");

    // ---- part 4: disabled cache, bypass ----
    enable <= 1'b0;
    repeat (2) @(posedge clk);
    ar0 = ar_count;
    fetch0(32'h0000_2008, lat);
    check(ar_count == ar0 + 1 && ar.len == 8'd0, "bypass is a single-beat read");
    fetch0(32'h0000_300C, lat);
    check(n_byp == 2, $sformatf("bypass requests %0d", n_byp));
    enable <= 1'b1;
    repeat (2) @(posedge clk);

    $display("hits=%0d misses=%0d refills=%0d merges=%0d bypass=%0d", n_hit, n_miss, n_refill, n_merge, n_byp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
