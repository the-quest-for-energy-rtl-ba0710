// tb_sp_ro_xbar: self-checking testbench of the 8x8 read-only crossbar.
//
// Cores raise random requests to random banks and hold them until granted;
// banks accept at random. Checked every cycle: a core is granted only by the
// bank its address maps to (line interleaving), at most one core per bank, the
// bank sees the granted core's address and index, conflict_o flags exactly the
// waiting cores, no core waits longer than NB_CORES-1 grants of its bank
// (round robin), and bank responses reach exactly the cores in their mask.
module tb_sp_ro_xbar;
  import icache_pkg::*;

  localparam int unsigned NC = 8, NB = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NC-1:0]          core_req, core_gnt, core_rvalid, conflict;
  logic [NC-1:0][31:0]    core_addr;
  logic [NC-1:0][255:0]   core_rline;
  logic [NB-1:0]          bank_req, bank_gnt, bank_rvalid;
  logic [NB-1:0][31:0]    bank_addr;
  logic [NB-1:0][2:0]     bank_core;
  logic [NB-1:0][NC-1:0]  bank_rmask;
  logic [NB-1:0][255:0]   bank_rline;

  sp_ro_xbar #(.NB_CORES(NC), .NB_BANKS(NB)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .core_req_i(core_req), .core_addr_i(core_addr), .core_gnt_o(core_gnt),
    .core_rvalid_o(core_rvalid), .core_rline_o(core_rline),
    .bank_req_o(bank_req), .bank_addr_o(bank_addr), .bank_core_o(bank_core),
    .bank_gnt_i(bank_gnt), .bank_rvalid_i(bank_rvalid), .bank_rmask_i(bank_rmask),
    .bank_rline_i(bank_rline), .conflict_o(conflict)
  );

  int unsigned checks = 0, failures = 0, n_gnt = 0, n_conf = 0;
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
    core_req = '0; core_addr = '0; bank_gnt = '0; bank_rvalid = '0; bank_rmask = '0; bank_rline = '0;
    foreach (waitg[c]) waitg[c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      core_req = core_req & ~granted;
      // new requests for idle cores; banks 0..3 are hot to provoke conflicts
      for (int c = 0; c < NC; c++)
        if (!core_req[c] && $urandom_range(0, 2) != 0) begin
          core_req[c]  = 1;
          core_addr[c] = 32'({12'($urandom_range(0, 4095)), 3'($urandom_range(0, (cyc % 2 != 0) ? 7 : 3)), 5'($urandom)});
        end
      bank_gnt = NB'($urandom) | NB'($urandom);
      // responses: each core listed by one bank at most
      bank_rvalid = '0; bank_rmask = '0;
      for (int c = 0; c < NC; c++)
        if ($urandom_range(0, 1) != 0) begin
          automatic int b = $urandom_range(0, NB-1);
          bank_rvalid[b] = 1; bank_rmask[b][c] = 1;
        end
      for (int b = 0; b < NB; b++) bank_rline[b] = {8{$urandom}};
      #1;
      for (int b = 0; b < NB; b++) if (bank_req[b]) begin
        check(bank_addr[b] == core_addr[bank_core[b]] && core_req[bank_core[b]] &&
              bank_addr[b][7:5] == 3'(b), $sformatf("bank %0d request", b));
      end
      for (int c = 0; c < NC; c++) begin
        automatic int b = int'(core_addr[c][7:5]);
        if (core_gnt[c]) begin
          n_gnt++;
          check(core_req[c] && bank_req[b] && bank_gnt[b] && bank_core[b] == 3'(c),
                $sformatf("core %0d grant", c));
        end
        check(conflict[c] == (core_req[c] && !core_gnt[c]), "conflict flag");
        if (conflict[c]) n_conf++;
        check(core_rvalid[c] == (|(bank_rvalid & {NB{1'b1}} & {bank_rmask[7][c], bank_rmask[6][c],
              bank_rmask[5][c], bank_rmask[4][c], bank_rmask[3][c], bank_rmask[2][c],
              bank_rmask[1][c], bank_rmask[0][c]})), "response valid routing");
        for (int bb = 0; bb < NB; bb++)
          if (bank_rvalid[bb] && bank_rmask[bb][c])
            check(core_rline[c] == bank_rline[bb], "response line routing");
      end
      // round-robin bound
      for (int c = 0; c < NC; c++) begin
        automatic int b = int'(core_addr[c][7:5]);
        if (core_req[c] && !core_gnt[c] && bank_gnt[b] && bank_req[b]) waitg[c]++;
        if (core_gnt[c]) waitg[c] = 0;
        check(waitg[c] < NC, $sformatf("core %0d starved", c));
      end
      granted = core_gnt;
      @(posedge clk);
    end
    check(n_conf > 100 && n_gnt > 1000, $sformatf("grants %0d conflicts %0d", n_gnt, n_conf));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
