// tb_sp_l0_buffer: self-checking testbench of the L0 instruction buffer.
//
// A core model fetches a 20-instruction loop (2.5 lines) twelve times; a
// crossbar model grants forwarded requests at random and answers with the
// whole line one to three cycles later. Checked: every instruction, that the
// buffer forwards exactly one request per line change (3 per pass), that a
// fetch in the buffered line is answered one cycle after its grant and never
// reaches the crossbar.
module tb_sp_l0_buffer;
  import icache_pkg::*;
  import tb_icache_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        req, gnt, rvalid, ic_req, ic_gnt, ic_rvalid, l0_hit, start;
  logic [31:0] addr, rdata, ic_addr;
  logic [255:0] ic_rline;
  logic        done;
  int unsigned c_checks, c_fail, c_fetch;

  sp_l0_buffer dut (
    .clk_i(clk), .rst_ni(rst_n),
    .fetch_req_i(req), .fetch_addr_i(addr), .fetch_gnt_o(gnt),
    .fetch_rvalid_o(rvalid), .fetch_rdata_o(rdata),
    .ic_req_o(ic_req), .ic_addr_o(ic_addr), .ic_gnt_i(ic_gnt),
    .ic_rvalid_i(ic_rvalid), .ic_rline_i(ic_rline), .l0_hit_o(l0_hit)
  );

  tb_fetch_core #(.BASE(32'h1000), .BODY_WORDS(20), .ITERS(12)) core (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start),
    .req_o(req), .addr_o(addr), .gnt_i(gnt), .rvalid_i(rvalid), .rdata_i(rdata),
    .done_o(done), .checks(c_checks), .failures(c_fail), .fetches(c_fetch)
  );

  // crossbar model
  logic [31:0] x_addr;
  int          x_cnt;
  logic        x_busy;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ic_gnt <= 0; x_busy <= 0; x_cnt <= 0; ic_rvalid <= 0; ic_rline <= '0;
    end else begin
      ic_gnt    <= ($urandom_range(0, 2) != 0);
      ic_rvalid <= 0;
      if (ic_req && ic_gnt) begin
        x_busy <= 1; x_addr <= ic_addr; x_cnt <= $urandom_range(0, 2);
      end else if (x_busy) begin
        if (x_cnt == 0) begin
          ic_rvalid <= 1; ic_rline <= line_of(x_addr); x_busy <= 0;
        end else x_cnt <= x_cnt - 1;
      end
    end
  end

  int unsigned checks = 0, failures = 0, n_fwd = 0, n_hit = 0;
  logic hit_d;
  always @(posedge clk) if (rst_n) begin
    if (ic_req && ic_gnt) n_fwd++;
    if (l0_hit) n_hit++;
    // an L0 hit is answered in the next cycle
    if (hit_d) begin
      checks++;
      if (!rvalid) begin failures++; $display("FAIL: L0 hit not answered next cycle"); end
    end
    hit_d <= l0_hit && gnt;
    if (l0_hit && ic_req) begin
      checks++; failures++; $display("FAIL: L0 hit forwarded");
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; hit_d = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1;
    wait (done);
    repeat (3) @(posedge clk);
    checks   += c_checks + 3;
    failures += c_fail;
    if (c_checks != 240) begin failures++; $display("FAIL: %0d responses", c_checks); end
    if (n_fwd != 36) begin failures++; $display("FAIL: %0d forwarded requests, expected 36", n_fwd); end
    if (n_hit != 240 - 36) begin failures++; $display("FAIL: %0d L0 hits", n_hit); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
