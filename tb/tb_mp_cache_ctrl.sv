// tb_mp_cache_ctrl: self-checking testbench of the private cache controller
// of the multi-port cache.
//
// The shared banks are modelled by a set of present lines answering the
// controller's read port combinationally; the master cache controller by a
// model that grants miss requests at random, adds the line to the set a few
// cycles later and pulses retry, and answers bypass requests with the word.
// A core model fetches a loop of 40 instructions (5 lines) eight times, then
// the cache is disabled and the loop is fetched once more. Checked: every
// instruction, one miss request per line with the cache on, hit latency of one
// cycle after the grant, one bypass request per fetch with the cache off.
module tb_mp_cache_ctrl;
  import icache_pkg::*;
  import tb_icache_pkg::*;

  localparam int unsigned NB = 8, NS = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        req, gnt, rvalid, mreq, mbyp, mgnt, retry, brv, enable, hit, miss, start;
  logic [31:0] addr, rdata, maddr, bdata;
  logic [1:0]  rset;
  logic [23:0] rtag;
  logic [NB-1:0] rhit;
  logic [NB-1:0][255:0] rline;
  logic        done;
  int unsigned c_chk, c_fail, c_fch;

  mp_cache_ctrl #(.NB_BANKS(NB), .NB_SETS(NS)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .fetch_req_i(req), .fetch_addr_i(addr), .fetch_gnt_o(gnt),
    .fetch_rvalid_o(rvalid), .fetch_rdata_o(rdata),
    .rd_set_o(rset), .rd_tag_o(rtag), .rd_hit_i(rhit), .rd_line_i(rline),
    .miss_req_o(mreq), .miss_addr_o(maddr), .miss_bypass_o(mbyp), .miss_gnt_i(mgnt),
    .retry_i(retry), .byp_rvalid_i(brv), .byp_rdata_i(bdata),
    .enable_i(enable), .hit_o(hit), .miss_o(miss)
  );

  tb_fetch_core #(.BASE(32'h2000), .BODY_WORDS(40), .ITERS(8)) core (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start),
    .req_o(req), .addr_o(addr), .gnt_i(gnt), .rvalid_i(rvalid), .rdata_i(rdata),
    .done_o(done), .checks(c_chk), .failures(c_fail), .fetches(c_fch)
  );

  // bank model: lines present in the shared arrays
  bit present[logic [26:0]];
  always_comb
    for (int b = 0; b < NB; b++) begin
      rhit[b]  = present.exists({rtag, 3'(b)});
      rline[b] = line_of({rtag, 3'(b), 5'b0});
    end
  int unsigned checks = 0, failures = 0;

  // master model
  int unsigned n_miss_req = 0, n_byp_req = 0, n_hit = 0;
  logic        m_busy, m_byp;
  logic [31:0] m_addr;
  int unsigned m_cnt;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mgnt <= 0; retry <= 0; brv <= 0; m_busy <= 0; bdata <= 0;
    end else begin
      retry <= 0; brv <= 0;
      mgnt  <= !m_busy && ($urandom_range(0, 1) == 1);
      if (mreq && mgnt) begin
        m_busy <= 1; m_addr <= maddr; m_byp <= mbyp; m_cnt <= $urandom_range(2, 9);
        if (mbyp) n_byp_req++; else n_miss_req++;
        mgnt <= 0;
      end else if (m_busy) begin
        if (m_cnt == 0) begin
          m_busy <= 0;
          if (m_byp) begin brv <= 1; bdata <= instr_of(m_addr); end
          else begin present[m_addr[31:5]] = 1; retry <= 1; end
        end else m_cnt <= m_cnt - 1;
      end
    end
  end

  logic hit_d;
  always @(posedge clk) if (rst_n) begin
    if (hit_d) begin
      checks++;
      if (!rvalid) begin failures++; $display("FAIL: hit not answered one cycle after grant"); end
    end
    hit_d <= gnt && enable && present.exists(addr[31:5]) && !(rvalid && !hit);
    if (hit) n_hit++;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; enable = 1; hit_d = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1;
    wait (done);
    @(negedge clk);
    checks += 3;
    if (c_chk != 320 || c_fail != 0) begin failures++; $display("FAIL: responses %0d", c_chk); end
    if (n_miss_req != 5) begin failures++; $display("FAIL: %0d miss requests, expected 5", n_miss_req); end
    if (n_hit != 320) begin failures++; $display("FAIL: %0d hits, expected 320", n_hit); end
    failures += c_fail;
    // cache disabled: bypass
    enable = 0;
    for (int k = 0; k < 6; k++) begin
      @(negedge clk);
      force req = 1'b1;
      force addr = 32'h2000 + 32'(4 * k);
      do @(posedge clk); while (!gnt);
      @(negedge clk);
      release req; release addr;
      force req = 1'b0;
      while (!rvalid) @(negedge clk);
      checks++;
      if (rdata != instr_of(32'h2000 + 32'(4 * k))) begin failures++; $display("FAIL: bypass data"); end
      release req;
    end
    checks++;
    if (n_byp_req != 6) begin failures++; $display("FAIL: %0d bypass requests", n_byp_req); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
