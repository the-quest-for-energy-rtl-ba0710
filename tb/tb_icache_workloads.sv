// tb_icache_workloads: runs program models of the seven benchmark programs on
// both caches at their default size (8 cores, 8 kB SP cache, 4 kB MP cache).
//
// The benchmarks themselves are not available, so each is replaced by a
// synthetic program with the benchmark's code size and control-flow class
// (see tb_prog_core): BFS 1.8 kB and MD 5.0 kB short jumps; CT 2.9 kB,
// FAST 2.7 kB and SLIC 26.1 kB long jumps; HOG 31.1 kB and SRAD 30.2 kB
// library calls. All eight cores run the same program, as in a parallel
// kernel, and each program starts from reset with cold caches. Each program runs two passes on both caches at once, with L2 models
// of latency 8. Checked: every instruction; in the first pass the SP cache
// refills each line of a program that fits exactly once however many cores
// miss on it, and both caches refill every line at least once; in the second pass a program that fits
// in a cache causes no refill in it, and one that does not fit causes
// refills. Cycles and refills per pass are printed for each program.
module tb_icache_workloads;
  import icache_pkg::*;
  import tb_icache_pkg::*;

  localparam int unsigned NC = 8, NB = 8, LAT = 8, NW = 7;
  localparam int unsigned SP_BYTES = 8192, MP_BYTES = 4096;   // the top's defaults

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NC-1:0]       sp_req, sp_gnt, sp_rvalid, mp_req, mp_gnt, mp_rvalid;
  logic [NC-1:0][31:0] sp_addr, sp_rdata, mp_addr, mp_rdata;
  logic                sp_arv, sp_arr, sp_rv, sp_rr, mp_arv, mp_arr, mp_rv, mp_rr;
  axi_ar_t             sp_ar, mp_ar;
  axi_r_t              sp_r, mp_r;
  logic [NC-1:0]       sp_l0, sp_conf, mp_hit, mp_miss;
  logic [NB-1:0]       sp_bhit, sp_refill, sp_merge;
  logic                mp_refill, mp_merge, mp_byp, flush_ack;
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
    .mp_enable_i(1'b1), .mp_flush_req_i(1'b0), .mp_flush_ack_o(flush_ack),
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

  // program set: name, code size in tenths of kB, class, loop/routine length, repeats
  string       w_name[NW]  = '{"BFS", "MD", "CT", "FAST", "SLIC", "HOG", "SRAD"};
  int unsigned w_tenth[NW] = '{18, 50, 29, 27, 261, 311, 302};
  int unsigned w_style[NW] = '{0, 0, 1, 1, 1, 2, 2};
  int unsigned w_chunk[NW] = '{12, 12, 40, 40, 40, 64, 64};
  int unsigned w_reps[NW]  = '{4, 4, 3, 3, 2, 2, 2};

  logic        start;
  logic [31:0] base;
  int unsigned words, chunk, reps, style;
  logic [NC-1:0] sp_done, mp_done;
  int unsigned sp_chk[NC], sp_fail[NC], sp_fch[NC], mp_chk[NC], mp_fail[NC], mp_fch[NC];

  for (genvar c = 0; c < NC; c++) begin : g_core
    tb_prog_core sp_core (
      .clk_i(clk), .rst_ni(rst_n), .start_i(start), .base_i(base), .words_i(words),
      .chunk_i(chunk), .reps_i(reps), .style_i(style),
      .req_o(sp_req[c]), .addr_o(sp_addr[c]), .gnt_i(sp_gnt[c]),
      .rvalid_i(sp_rvalid[c]), .rdata_i(sp_rdata[c]), .done_o(sp_done[c]),
      .checks(sp_chk[c]), .failures(sp_fail[c]), .fetches(sp_fch[c])
    );
    tb_prog_core mp_core (
      .clk_i(clk), .rst_ni(rst_n), .start_i(start), .base_i(base), .words_i(words),
      .chunk_i(chunk), .reps_i(reps), .style_i(style),
      .req_o(mp_req[c]), .addr_o(mp_addr[c]), .gnt_i(mp_gnt[c]),
      .rvalid_i(mp_rvalid[c]), .rdata_i(mp_rdata[c]), .done_o(mp_done[c]),
      .checks(mp_chk[c]), .failures(mp_fail[c]), .fetches(mp_fch[c])
    );
  end

  int unsigned checks = 0, failures = 0;
  int unsigned cyc = 0, n_sp = 0, n_mp = 0, sp_end = 0, mp_end = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    n_sp += $countones(sp_refill);
    n_mp += int'(mp_refill);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // add the fetch checks of the cores for program w (before they are reset)
  task automatic collect(input int w);
    for (int c = 0; c < NC; c++) begin
      checks += sp_chk[c] + mp_chk[c];
      failures += sp_fail[c] + mp_fail[c];
      check(sp_chk[c] == sp_fch[c] && mp_chk[c] == mp_fch[c] && sp_fch[c] == mp_fch[c],
            $sformatf("%s core %0d: every fetch answered", w_name[w], c));
    end
  endtask

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned lines, sp0, mp0, c0;
    bit fit_sp, fit_mp;
    start = 0; base = 0; words = 0; chunk = 1; reps = 1; style = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < NW; w++) begin
      // every program starts from reset, with cold caches
      if (w > 0) begin
        collect(w - 1);
        @(negedge clk);
        rst_n = 0;
        repeat (2) @(negedge clk);
        rst_n = 1;
      end
      lines  = (w_tenth[w] * 1024 / 10 + LINE_BYTES - 1) / LINE_BYTES;
      fit_sp = lines * LINE_BYTES <= SP_BYTES;
      fit_mp = lines * LINE_BYTES <= MP_BYTES;
      for (int p = 0; p < 2; p++) begin
        @(posedge clk);
        base = 32'h0010_0000 * (w + 1); words = lines * WORDS_LINE;
        chunk = w_chunk[w]; reps = w_reps[w]; style = w_style[w];
        sp0 = n_sp; mp0 = n_mp; c0 = cyc;
        start = 1;
        @(negedge clk);
        #1 start = 0;
        sp_end = 0; mp_end = 0;
        while (sp_end == 0 || mp_end == 0) begin
          @(posedge clk);
          #1;
          if (sp_end == 0 && &sp_done) sp_end = cyc;
          if (mp_end == 0 && &mp_done) mp_end = cyc;
        end
        $display("%-4s %0d.%0d kB pass %0d: SP %0d cycles %0d refills | MP %0d cycles %0d refills",
                 w_name[w], w_tenth[w] / 10, w_tenth[w] % 10, p, sp_end - c0, n_sp - sp0,
                 mp_end - c0, n_mp - mp0);
        if (p == 0) begin
          check(fit_sp ? n_sp - sp0 == lines : n_sp - sp0 >= lines,
                $sformatf("%s: SP refills each of %0d lines once (%0d)", w_name[w], lines, n_sp - sp0));
          check(n_mp - mp0 >= lines, $sformatf("%s: MP refills every line", w_name[w]));
        end else begin
          check((n_sp - sp0 == 0) == fit_sp, $sformatf("%s: SP second-pass refills %0d, fits %0d",
                                                       w_name[w], n_sp - sp0, fit_sp));
          check((n_mp - mp0 == 0) == fit_mp, $sformatf("%s: MP second-pass refills %0d, fits %0d",
                                                       w_name[w], n_mp - mp0, fit_mp));
        end
      end
    end
    repeat (5) @(posedge clk);
    collect(NW - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
