// Workload testbench comparing the pipeline with and without cross-level
// scheduling on the same skewed PageRank graph (400 nodes, rows of 0 to 39
// edges). Four copies of selene_pr_top run side by side:
//   fixed point, II = 2:       MAX_CTX = 2 (rows interleaved) and MAX_CTX = 1;
//   single precision, II = 7:  MAX_CTX = 7 (rows interleaved) and MAX_CTX = 1.
// MAX_CTX = 1 is the barrier-free pipeline alone: a new row may enter as soon
// as the previous one has issued its last iteration, but rows never share the
// pipeline, so one token issues every II cycles. Every score of every copy is
// checked against a reference (Q16.16, or single precision with rounding
// after every addition in edge order). Cycle checks, with T = edges + rows
// tokens: a MAX_CTX = 1 run needs at least II * T cycles; an interleaved run
// must stay within T plus 10 % and a fixed drain, so the speedup approaches II.
module tb_selene_pr_ablation;
  import selene_pkg::*;
  import tb_fp_ref::*;
  localparam int N_MAX = 1024, E_MAX = 8192, N = 400;
  localparam int NI = 4;
  localparam int II_OF [NI] = '{2, 2, 7, 7};
  localparam bit FL_OF [NI] = '{1'b0, 1'b0, 1'b1, 1'b1};

  logic clk = 0, rst_n = 0, start = 0;
  node_t num_nodes;
  logic host_we [NI];
  logic [1:0] host_sel; logic [15:0] host_addr; data_t host_wdata [NI];
  node_t host_raddr;
  data_t host_rdata [NI];
  logic done [NI], fwd_err [NI];
  logic [31:0] run_cycles [NI];
  logic [5:0] events [NI];

  selene_pr_top #(.II(2), .MAX_CTX(2)) u_fx2 (
    .clk, .rst_n, .host_we(host_we[0]), .host_sel, .host_addr, .host_wdata(host_wdata[0]),
    .start, .num_nodes, .done(done[0]), .run_cycles(run_cycles[0]), .host_raddr,
    .host_rdata(host_rdata[0]), .fwd_err(fwd_err[0]), .events(events[0]));
  selene_pr_top #(.II(2), .MAX_CTX(1)) u_fx1 (
    .clk, .rst_n, .host_we(host_we[1]), .host_sel, .host_addr, .host_wdata(host_wdata[1]),
    .start, .num_nodes, .done(done[1]), .run_cycles(run_cycles[1]), .host_raddr,
    .host_rdata(host_rdata[1]), .fwd_err(fwd_err[1]), .events(events[1]));
  selene_pr_top #(.II(7), .MAX_CTX(7), .FLOAT(1'b1)) u_fl7 (
    .clk, .rst_n, .host_we(host_we[2]), .host_sel, .host_addr, .host_wdata(host_wdata[2]),
    .start, .num_nodes, .done(done[2]), .run_cycles(run_cycles[2]), .host_raddr,
    .host_rdata(host_rdata[2]), .fwd_err(fwd_err[2]), .events(events[2]));
  selene_pr_top #(.II(7), .MAX_CTX(1), .FLOAT(1'b1)) u_fl1 (
    .clk, .rst_n, .host_we(host_we[3]), .host_sel, .host_addr, .host_wdata(host_wdata[3]),
    .start, .num_nodes, .done(done[3]), .run_cycles(run_cycles[3]), .host_raddr,
    .host_rdata(host_rdata[3]), .fwd_err(fwd_err[3]), .events(events[3]));

  always #5 clk = ~clk;

  int    row_ptr [N+1];
  node_t col_idx [E_MAX];
  data_t c_fx [N_MAX], c_fl [N_MAX];
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n)
    for (int k = 0; k < NI; k++) if (fwd_err[k]) chk(0, $sformatf("copy %0d: forwarding validity error", k));

  // one write to all copies; contrib differs between the two number formats
  task automatic host_write(input int sel, input int addr, input data_t d_fx, input data_t d_fl);
    @(negedge clk);
    for (int k = 0; k < NI; k++) begin
      host_we[k] = 1; host_wdata[k] = FL_OF[k] ? d_fl : d_fx;
    end
    host_sel = 2'(sel); host_addr = 16'(addr);
    @(negedge clk);
    for (int k = 0; k < NI; k++) host_we[k] = 0;
  endtask

  function automatic bit all_done();
    for (int k = 0; k < NI; k++) if (!done[k]) return 0;
    return 1;
  endfunction

  initial begin
    int tokens, cyc [NI];
    host_sel = 0; host_addr = 0; host_raddr = 0; num_nodes = 0;
    for (int k = 0; k < NI; k++) begin host_we[k] = 0; host_wdata[k] = 0; end
    for (int k = 0; k < N_MAX; k++) begin
      c_fx[k] = $urandom % (1 << 18);
      c_fl[k] = {1'b0, 8'(117 + $urandom % 10), 23'($urandom)};
    end
    for (int k = 0; k < E_MAX; k++) col_idx[k] = node_t'($urandom % N_MAX);
    row_ptr[0] = 0;
    for (int k = 0; k < N; k++) begin
      int len;
      case ($urandom % 8)
        0, 1:    len = 0;
        2, 3, 4: len = 1 + $urandom % 4;
        5, 6:    len = 5 + $urandom % 12;
        default: len = 16 + $urandom % 24;
      endcase
      row_ptr[k+1] = row_ptr[k] + len;
    end
    tokens = row_ptr[N] + N;

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < N_MAX; k++) host_write(2, k, c_fx[k], c_fl[k]);
    for (int k = 0; k <= N; k++) host_write(0, k, data_t'(row_ptr[k]), data_t'(row_ptr[k]));
    for (int k = 0; k < row_ptr[N]; k++) host_write(1, k, data_t'(col_idx[k]), data_t'(col_idx[k]));
    @(negedge clk); start = 1; num_nodes = node_t'(N);
    @(negedge clk); start = 0;
    while (!all_done()) @(negedge clk);

    for (int i = 0; i < N; i++) begin
      longint unsigned acc;
      logic [31:0] facc, e_fx, e_fl;
      acc = 0; facc = '0;
      for (int j = row_ptr[i]; j < row_ptr[i+1]; j++) begin
        acc += c_fx[col_idx[j]];
        facc = to_f32(from_f32(facc) + from_f32(c_fl[col_idx[j]]));
      end
      e_fx = data_t'(((acc & 64'hFFFF_FFFF) * 64'd55706) >> 16);
      e_fl = to_f32(from_f32(32'h3F59_999A) * from_f32(facc));
      host_raddr = node_t'(i);
      @(negedge clk);
      for (int k = 0; k < NI; k++)
        chk(host_rdata[k] == (FL_OF[k] ? e_fl : e_fx),
            $sformatf("copy %0d score[%0d] = %h exp %h", k, i, host_rdata[k], FL_OF[k] ? e_fl : e_fx));
    end

    for (int k = 0; k < NI; k++) cyc[k] = int'(run_cycles[k]);
    $display("%0d rows, %0d edges, %0d tokens", N, row_ptr[N], tokens);
    for (int p = 0; p < 2; p++) begin
      int ii, fast, slow;
      ii = II_OF[2*p]; fast = cyc[2*p]; slow = cyc[2*p+1];
      $display("%s II = %0d: interleaved %0d cycles, one row at a time %0d cycles, speedup %0d.%02d",
               p ? "single precision," : "fixed point,     ", ii, fast, slow,
               slow / fast, (slow * 100 / fast) % 100);
      chk(slow >= ii * tokens, $sformatf("II = %0d, MAX_CTX = 1: %0d cycles, below %0d", ii, slow, ii * tokens));
      chk(fast <= tokens + tokens / 10 + 8 * ii,
          $sformatf("II = %0d interleaved: %0d cycles for %0d tokens", ii, fast, tokens));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
