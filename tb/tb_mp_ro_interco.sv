// tb_mp_ro_interco: self-checking testbench of the 8x1 miss interconnect.
//
// Eight requesters raise random miss/bypass requests and hold them until
// granted; the master side is ready at random. Checked every cycle: at most
// one grant, only when ready and only to a requester, the output carries the
// granted requester's address, bypass flag and index, and no requester waits
// for more than NB_CORES-1 grants to others (round robin).
module tb_mp_ro_interco;
  import icache_pkg::*;

  localparam int unsigned NC = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NC-1:0]        req, byp, gnt;
  logic [NC-1:0][31:0]  addr;
  logic                 valid, bypass, ready;
  logic [31:0]          oaddr;
  logic [2:0]           ocore;

  mp_ro_interco #(.NB_CORES(NC)) dut (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req), .addr_i(addr), .bypass_i(byp), .gnt_o(gnt),
    .valid_o(valid), .addr_o(oaddr), .bypass_o(bypass), .core_o(ocore), .ready_i(ready)
  );

  int unsigned checks = 0, failures = 0, n_gnt = 0;
  int unsigned waitg[NC];
  logic [NC-1:0] granted = '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; byp = '0; addr = '0; ready = 0;
    foreach (waitg[c]) waitg[c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      req = req & ~granted;
      for (int c = 0; c < NC; c++)
        if (!req[c] && $urandom_range(0, 3) != 0) begin
          req[c] = 1; addr[c] = $urandom; byp[c] = ($urandom_range(0, 3) == 0);
        end
      ready = ($urandom_range(0, 3) != 0);
      #1;
      check($countones(gnt) <= 1 && (gnt & ~req) == '0, "one grant to a requester");
      check((gnt != '0) == (ready && req != '0), "grant when ready");
      check(valid == (req != '0), "valid");
      if (gnt != '0) begin
        n_gnt++;
        check(gnt[ocore] && oaddr == addr[ocore] && bypass == byp[ocore], "payload of granted core");
      end
      for (int c = 0; c < NC; c++) begin
        if (req[c] && !gnt[c] && gnt != '0) waitg[c]++;
        if (gnt[c]) waitg[c] = 0;
        check(waitg[c] < NC, $sformatf("core %0d starved", c));
      end
      granted = gnt;
    end
    check(n_gnt > 1500, $sformatf("grants %0d", n_gnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
