// tb_sp_cache_bank: self-checking testbench of one shared cache bank (SP).
//
// The bank (index 3, 2 sets x 4 ways, 4 refill entries) is driven directly,
// with an L2 model of latency LAT behind it. Directed part: a cold miss is
// answered LAT + 6 cycles after its grant; two cores missing on the same line
// cause one AXI burst and are answered in the same cycle; a hit is answered
// one cycle after its grant while another refill is still pending. Random
// part: cores fetch from 12 lines of the bank (more than its 8 ways), so
// evictions, merges and several refills in flight occur; every response is
// checked against the L2 image and against the cores waiting for it.
module tb_sp_cache_bank;
  import icache_pkg::*;
  import tb_icache_pkg::*;

  localparam int unsigned NC = 8, LAT = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        req, gnt, rvalid;
  logic [31:0] addr;
  logic [2:0]  core;
  logic [NC-1:0] rmask;
  logic [255:0]  rline;
  logic        arv, arr, rv, rr, hit, refill, merge;
  axi_ar_t     ar;
  axi_r_t      r;
  int unsigned arc, rc;

  sp_cache_bank #(.NB_CORES(NC), .NB_BANKS(8), .NB_WAYS(4), .NB_SETS(2), .NB_MSHR(4)) dut (
    .clk_i(clk), .rst_ni(rst_n), .bank_id_i(3'd3),
    .req_i(req), .addr_i(addr), .core_i(core), .gnt_o(gnt),
    .rvalid_o(rvalid), .rmask_o(rmask), .rline_o(rline),
    .ar_valid_o(arv), .ar_ready_i(arr), .ar_o(ar), .r_valid_i(rv), .r_ready_o(rr), .r_i(r),
    .hit_o(hit), .refill_o(refill), .merge_o(merge)
  );

  axi_l2_model #(.LATENCY(LAT)) l2 (
    .clk_i(clk), .rst_ni(rst_n), .ar_valid_i(arv), .ar_ready_o(arr), .ar_i(ar),
    .r_valid_o(rv), .r_ready_i(rr), .r_o(r), .ar_count(arc), .r_count(rc)
  );

  int unsigned checks = 0, failures = 0, n_merge = 0, n_refill = 0, n_hit = 0;
  int unsigned cyc = 0;
  bit          busy[NC];
  logic [31:0] out_addr[NC];
  int unsigned gnt_cyc[NC], rsp_cyc[NC];
  logic [NC-1:0] last_mask;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // a line address of bank 3
  function automatic logic [31:0] la(input int unsigned n);
    return 32'({19'(n), 3'd3, 5'd0}) | 32'h0010_0000;
  endfunction

  // sample point: late in every cycle
  always begin
    @(negedge clk);
    #4;
    if (rst_n) begin
      cyc++;
      if (rvalid) begin
        last_mask = rmask;
        for (int c = 0; c < NC; c++) if (rmask[c]) begin
          check(busy[c] && rline == line_of(out_addr[c]), $sformatf("response to core %0d", c));
          busy[c]    = 0;
          rsp_cyc[c] = cyc;
        end
      end
      if (req && gnt) begin
        busy[core]     = 1;
        out_addr[core] = addr;
        gnt_cyc[core]  = cyc;
      end
      n_merge  += int'(merge);
      n_refill += int'(refill);
      n_hit    += int'(hit);
    end
  end

  task automatic issue(input int c, input logic [31:0] a);
    @(negedge clk);
    req <= 1; addr <= a; core <= 3'(c);
    do @(posedge clk); while (!(gnt && req));
    @(negedge clk);
    req <= 0;
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 0; addr = 0; core = 0;
    foreach (busy[c]) busy[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // cold miss latency
    issue(0, la(1) + 32'h8);
    wait (!busy[0]);
    check(rsp_cyc[0] - gnt_cyc[0] == LAT + 6, $sformatf("miss latency %0d", rsp_cyc[0] - gnt_cyc[0]));
    check(arc == 1, "one burst");
    // merge: two cores, same line
    fork
      issue(1, la(2));
      begin @(negedge clk); @(negedge clk); end
    join
    issue(2, la(2) + 32'h1C);
    wait (!busy[1] && !busy[2]);
    check(arc == 2 && n_merge == 1, "merged refill");
    check(rsp_cyc[1] == rsp_cyc[2] && last_mask == 8'b0000_0110, "both answered together");
    // hit under miss
    issue(3, la(5));
    issue(4, la(1));
    @(negedge clk); #4;
    check(!busy[4] && busy[3] && rsp_cyc[4] - gnt_cyc[4] == 1, "hit answered while refill pending");
    wait (!busy[3]);
    // random traffic
    for (int n = 0; n < 1500; n++) begin
      automatic int c = $urandom_range(0, NC-1);
      if (!busy[c]) issue(c, la($urandom_range(0, 11)) + 32'(4 * $urandom_range(0, 7)));
      else @(negedge clk);
    end
    repeat (100) @(posedge clk);
    foreach (busy[c]) check(!busy[c], $sformatf("core %0d answered", c));
    check(n_merge > 5 && n_refill > 20 && n_hit > 100,
          $sformatf("merges %0d refills %0d hits %0d", n_merge, n_refill, n_hit));
    check(arc == n_refill, "one burst per refill");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
