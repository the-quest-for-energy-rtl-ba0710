// tb_scm_bank: self-checking testbench of the 4-way TAG/DATA memory.
//
// A reference model (arrays of valid bits, tags and lines) is updated with
// every write; random refills (invalidate on the first beat, four data beats,
// tag and valid on the last), invalidations and flushes are mixed with random
// lookups on two read ports, and each port's hit, way and line are compared
// with the model in the same cycle.
module tb_scm_bank;
  import icache_pkg::*;

  localparam int unsigned W = 4, S = 4, TW = 24, P = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [P-1:0][1:0]        rd_set;
  logic [P-1:0][TW-1:0]     rd_tag;
  logic [P-1:0]             rd_hit;
  logic [P-1:0][1:0]        rd_way;
  logic [P-1:0][255:0]      rd_line;
  logic [1:0]               wr_set, wr_way, wr_chunk;
  logic                     wr_inval, wr_tag, wr_data, flush;
  logic [TW-1:0]            wr_tag_data;
  logic [63:0]              wr_wdata;
  logic [S-1:0][W-1:0]      valid;

  scm_bank #(.NB_WAYS(W), .NB_SETS(S), .TAG_W(TW), .NB_RPORTS(P)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .rd_set_i(rd_set), .rd_tag_i(rd_tag), .rd_hit_o(rd_hit), .rd_way_o(rd_way), .rd_line_o(rd_line),
    .wr_set_i(wr_set), .wr_way_i(wr_way), .wr_inval_i(wr_inval), .wr_tag_i(wr_tag),
    .wr_tag_data_i(wr_tag_data), .wr_data_i(wr_data), .wr_chunk_i(wr_chunk), .wr_wdata_i(wr_wdata),
    .flush_i(flush), .valid_o(valid)
  );

  bit          m_valid[S][W];
  logic [TW-1:0]  m_tag[S][W];
  logic [255:0]   m_line[S][W];
  logic [TW-1:0]  tags[6] = '{24'h000011, 24'h000022, 24'h0ABC33, 24'h000044, 24'h123455, 24'h000066};

  int unsigned checks = 0, failures = 0, n_hit = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic idle_w();
    wr_inval <= 0; wr_tag <= 0; wr_data <= 0; flush <= 0;
  endtask

  // compare both read ports with the model (combinational, after settling)
  task automatic lookup();
    for (int p = 0; p < P; p++) begin
      rd_set[p] = 2'($urandom_range(0, S-1));
      rd_tag[p] = tags[$urandom_range(0, 5)];
    end
    #1;
    for (int p = 0; p < P; p++) begin
      bit h = 0; int way = 0;
      for (int w = W-1; w >= 0; w--)
        if (m_valid[rd_set[p]][w] && m_tag[rd_set[p]][w] == rd_tag[p]) begin h = 1; way = w; end
      check(rd_hit[p] == h, $sformatf("port %0d hit", p));
      if (h) begin
        n_hit++;
        check(rd_way[p] == 2'(way) && rd_line[p] == m_line[rd_set[p]][way], $sformatf("port %0d line", p));
      end
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle_w();
    rd_set = '0; rd_tag = '0; wr_set = 0; wr_way = 0; wr_chunk = 0; wr_tag_data = 0; wr_wdata = 0;
    foreach (m_valid[s, w]) m_valid[s][w] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    lookup();
    for (int it = 0; it < 400; it++) begin
      automatic int unsigned op = $urandom_range(0, 19);
      @(negedge clk);
      if (op < 12) begin
        // refill one line in four beats, looking up between beats
        automatic int s = $urandom_range(0, S-1), w = $urandom_range(0, W-1);
        automatic logic [TW-1:0] t = tags[$urandom_range(0, 5)];
        for (int b = 0; b < 4; b++) begin
          automatic logic [63:0] d = {$urandom, $urandom};
          wr_set <= 2'(s); wr_way <= 2'(w); wr_chunk <= 2'(b); wr_wdata <= d;
          wr_data <= 1; wr_inval <= (b == 0); wr_tag <= (b == 3); wr_tag_data <= t;
          @(posedge clk);
          if (b == 0) m_valid[s][w] = 0;
          m_line[s][w][b*64 +: 64] = d;
          if (b == 3) begin m_valid[s][w] = 1; m_tag[s][w] = t; end
          @(negedge clk);
          idle_w();
          lookup();
        end
      end else if (op < 18) begin
        lookup();
      end else if (op < 19) begin
        automatic int s = $urandom_range(0, S-1), w = $urandom_range(0, W-1);
        wr_set <= 2'(s); wr_way <= 2'(w); wr_inval <= 1;
        @(posedge clk);
        m_valid[s][w] = 0;
        @(negedge clk); idle_w(); lookup();
      end else begin
        flush <= 1;
        @(posedge clk);
        foreach (m_valid[s, w]) m_valid[s][w] = 0;
        @(negedge clk); idle_w(); lookup();
        check(valid == '0, "flush clears all valid bits");
      end
    end
    check(n_hit > 10, $sformatf("hits seen %0d", n_hit));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
