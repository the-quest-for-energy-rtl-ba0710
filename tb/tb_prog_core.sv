// tb_prog_core: model of a processor fetch stage that runs a synthetic program
// chosen at run time, for the workload testbench.
//
// On start_i (sampled at the falling clock edge) it appends the address
// stream of one pass over a program of words_i instructions at base_i, and
// fetches it through the request/grant/response interface, presenting a new
// request as soon as the previous one is granted.
// The program shape follows three control-flow classes:
//   style 0  short jumps: loops of chunk_i instructions (under two cache
//            lines), each run reps_i times, laid one after the other;
//   style 1  long jumps: loops of chunk_i instructions (several lines), each
//            run reps_i times, visited alternately from the two halves of the
//            code so that every loop is followed by a far jump;
//   style 2  library calls: a 16-instruction main loop in the first quarter
//            of the code calls, reps_i times per routine, routines of chunk_i
//            instructions that cover the rest of the code.
// Every pass touches every instruction of the program at least once. Every
// returned instruction is compared with tb_icache_pkg::instr_of(); checks,
// failures and fetches accumulate over passes. done_o is high when the pass is
// complete and all responses have arrived.
module tb_prog_core
  import tb_icache_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        start_i,
  input  logic [31:0] base_i,
  input  int unsigned words_i,
  input  int unsigned chunk_i,
  input  int unsigned reps_i,
  input  int unsigned style_i,
  output logic        req_o,
  output logic [31:0] addr_o,
  input  logic        gnt_i,
  input  logic        rvalid_i,
  input  logic [31:0] rdata_i,
  output logic        done_o,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned fetches
);
  logic [31:0] stream[$];
  logic [31:0] inflight[$];
  int unsigned idx;

  task automatic run_loop(input int unsigned first, input int unsigned len, input int unsigned n);
    for (int unsigned r = 0; r < n; r++)
      for (int unsigned i = first; i < first + len && i < words_i; i++)
        stream.push_back(base_i + 4*i);
  endtask

  task automatic build();
    int unsigned nch, half, main_w, lib_w, mpos;
    case (style_i)
      0: for (int unsigned o = 0; o < words_i; o += chunk_i) run_loop(o, chunk_i, reps_i);
      1: begin
        nch  = (words_i + chunk_i - 1) / chunk_i;
        half = (nch + 1) / 2;
        for (int unsigned k = 0; k < half; k++) begin
          run_loop(k * chunk_i, chunk_i, reps_i);
          if (k + half < nch) run_loop((k + half) * chunk_i, chunk_i, reps_i);
        end
      end
      default: begin
        main_w = words_i / 4;
        lib_w  = words_i - main_w;
        mpos   = 0;
        for (int unsigned o = 0; o < main_w; o += 16) run_loop(o, 16, 1);
        for (int unsigned o = 0; o < lib_w; o += chunk_i)
          for (int unsigned r = 0; r < reps_i; r++) begin
            run_loop(mpos, 16, 1);
            mpos = (mpos + 16 >= main_w) ? 0 : mpos + 16;
            run_loop(main_w + o, chunk_i, 1);
          end
      end
    endcase
  endtask

  assign req_o  = idx < stream.size();
  assign addr_o = (idx < stream.size()) ? stream[idx] : '0;
  assign done_o = idx >= stream.size() && inflight.size() == 0;

  // a new pass is appended at the falling edge, away from the rising edge
  // at which the cache samples the request
  always @(negedge clk_i) if (rst_ni && start_i) build();

  always @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      idx      <= 0;
      checks   = 0;
      failures = 0;
      fetches  = 0;
      stream.delete();
      inflight.delete();
    end else begin
      if (rvalid_i) begin
        checks++;
        if (inflight.size() == 0) begin
          failures++;
          $display("%m: response without request");
        end else begin
          if (rdata_i !== instr_of(inflight[0])) begin
            failures++;
            $display("%m: addr %h got %h expected %h", inflight[0], rdata_i, instr_of(inflight[0]));
          end
          void'(inflight.pop_front());
        end
      end
      if (req_o && gnt_i) begin
        inflight.push_back(addr_o);
        idx <= idx + 1;
        fetches++;
      end
    end
  end
endmodule
