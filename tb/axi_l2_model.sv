// axi_l2_model: behavioural model of the L2 memory seen through the AXI4 bus
// (testbench only, not synthesizable).
//
// Accepts every read-address request at once (ar_ready high), queues them and
// answers them in order, one 64-bit beat per cycle. The first beat of a
// request appears LATENCY cycles after the cycle the request was accepted. The
// memory content is tb_icache_pkg::instr_of(). ar_count counts accepted
// requests and r_count data beats.
module axi_l2_model
  import icache_pkg::*;
  import tb_icache_pkg::*;
#(
  parameter int unsigned LATENCY = 8
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        ar_valid_i,
  output logic        ar_ready_o,
  input  axi_ar_t     ar_i,
  output logic        r_valid_o,
  input  logic        r_ready_i,
  output axi_r_t      r_o,
  output int unsigned ar_count,
  output int unsigned r_count
);
  typedef struct {
    logic [31:0]     addr;
    logic [7:0]      id;
    int unsigned     len;
    longint unsigned t;
  } req_s;

  req_s            q[$];
  int unsigned     beat;
  longint unsigned cyc;

  assign ar_ready_o = 1'b1;

  always @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      q.delete();
      beat      = 0;
      cyc       = 0;
      ar_count <= 0;
      r_count  <= 0;
      r_valid_o <= 1'b0;
      r_o       <= '0;
    end else begin
      cyc++;
      if (ar_valid_i && ar_ready_o) begin
        q.push_back('{addr: ar_i.addr, id: ar_i.id, len: 32'(ar_i.len), t: cyc + 64'(LATENCY) - 1});
        ar_count <= ar_count + 1;
      end
      if (r_valid_o && r_ready_i) begin
        r_count <= r_count + 1;
        if (beat == q[0].len) begin
          void'(q.pop_front());
          beat = 0;
        end else begin
          beat++;
        end
      end
      if (q.size() > 0 && cyc >= q[0].t) begin
        r_valid_o <= 1'b1;
        r_o.data  <= beat_of(q[0].addr + 32'(8 * beat));
        r_o.id    <= q[0].id;
        r_o.last  <= (beat == q[0].len);
      end else begin
        r_valid_o <= 1'b0;
      end
    end
  end
endmodule
