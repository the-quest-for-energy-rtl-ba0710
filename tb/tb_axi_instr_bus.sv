// tb_axi_instr_bus: self-checking testbench of the AXI4 instruction bus.
//
// Eight masters each issue 20 read bursts (random line addresses, their own
// IDs 0..3) through the bus to an L2 model, one burst at a time. Each master
// checks that it receives exactly its own four beats, with its own ID and the
// expected data, and that the last beat is marked. The bus must forward each
// request once and keep the top ID bits for routing.
module tb_axi_instr_bus;
  import icache_pkg::*;
  import tb_icache_pkg::*;

  localparam int unsigned NM = 8, NREQ = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NM-1:0]  m_arv, m_arr, m_rv, m_rr;
  axi_ar_t [NM-1:0] m_ar;
  axi_r_t  [NM-1:0] m_r;
  logic     s_arv, s_arr, s_rv, s_rr;
  axi_ar_t  s_ar;
  axi_r_t   s_r;
  int unsigned arc, rc;

  axi_instr_bus #(.NB_MST(NM)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .mst_ar_valid_i(m_arv), .mst_ar_ready_o(m_arr), .mst_ar_i(m_ar),
    .mst_r_valid_o(m_rv), .mst_r_ready_i(m_rr), .mst_r_o(m_r),
    .slv_ar_valid_o(s_arv), .slv_ar_ready_i(s_arr), .slv_ar_o(s_ar),
    .slv_r_valid_i(s_rv), .slv_r_ready_o(s_rr), .slv_r_i(s_r)
  );

  axi_l2_model #(.LATENCY(5)) l2 (
    .clk_i(clk), .rst_ni(rst_n), .ar_valid_i(s_arv), .ar_ready_o(s_arr), .ar_i(s_ar),
    .r_valid_o(s_rv), .r_ready_i(s_rr), .r_o(s_r), .ar_count(arc), .r_count(rc)
  );

  int unsigned checks = 0, failures = 0;
  int unsigned done_cnt[NM];
  assign m_rr = '1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  for (genvar m = 0; m < NM; m++) begin : g_m
    logic [31:0] a;
    logic [7:0]  id;
    int unsigned beat;
    initial begin
      m_arv[m] = 0; m_ar[m] = '0; done_cnt[m] = 0;
      wait (rst_n);
      repeat (NREQ) begin
        @(negedge clk);
        a  = 32'({16'($urandom_range(0, 65535)), 5'b0});
        id = 8'($urandom_range(0, 3));
        m_ar[m] = '{addr: a, id: id, len: 8'd3};
        m_arv[m] = 1;
        do @(posedge clk); while (!m_arr[m]);
        #1 m_arv[m] = 0;
        beat = 0;
        while (beat < 4) begin
          @(posedge clk);
          if (m_rv[m]) begin
            check(m_r[m].data == beat_of(a + 32'(8 * beat)) && m_r[m].id == id &&
                  m_r[m].last == (beat == 3), $sformatf("master %0d beat %0d", m, beat));
            beat++;
          end
        end
        done_cnt[m]++;
      end
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
    int unsigned total;
    repeat (2) @(posedge clk);
    rst_n = 1;
    do begin
      @(posedge clk);
      total = 0;
      for (int m = 0; m < NM; m++) total += done_cnt[m];
    end while (total < NM * NREQ);
    repeat (10) @(posedge clk);
    check(arc == NM * NREQ, $sformatf("forwarded %0d requests", arc));
    check(rc == 4 * NM * NREQ, "all beats delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
