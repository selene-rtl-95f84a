// Workload testbench for selene_pr_top in single precision: FLOAT = 1 with
// II = 7, the initiation interval set by a 7-cycle floating-point adder, so
// up to seven rows are accumulated in the pipeline at once. The reference
// adds the contributions of each row in edge order, starting from zero, and
// rounds every sum and the final product by 0.85 to single precision, which
// is the order the hardware uses; scores must match bit for bit. Two runs:
// a 200-node graph with skewed row lengths and empty rows, and 64 rows of 5
// edges, whose cycle count must show the seven contexts sharing the pipeline:
// 64 * 6 tokens at one per cycle plus fill and drain. The drain is long at
// II = 7: once rows run out, the last row's six tokens issue one per round of
// seven slots, about 42 cycles. One context at a time would need seven cycles
// per token, 2688 in all.
module tb_selene_pr_float;
  import selene_pkg::*;
  import tb_fp_ref::*;
  localparam int N_MAX = 1024, E_MAX = 8192;
  logic clk = 0, rst_n = 0, start = 0, done, fwd_err;
  node_t num_nodes;
  logic [31:0] run_cycles;
  logic host_we; logic [1:0] host_sel; logic [15:0] host_addr; data_t host_wdata;
  node_t host_raddr; data_t host_rdata;
  logic [5:0] events;

  selene_pr_top #(.II(7), .FLOAT(1'b1)) dut (.*);
  always #5 clk = ~clk;

  int    row_ptr [N_MAX+1];
  node_t col_idx [E_MAX];
  data_t contrib [N_MAX];
  int checks = 0, failures = 0, multi = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (events[4]) multi++;
    if (fwd_err) chk(0, "forwarding validity error");
  end

  task automatic host_write(input int sel, input int addr, input data_t d);
    @(negedge clk);
    host_we = 1; host_sel = 2'(sel); host_addr = 16'(addr); host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic load_and_run(input int n, output int cycles);
    for (int k = 0; k <= n; k++) host_write(0, k, data_t'(row_ptr[k]));
    for (int k = 0; k < row_ptr[n]; k++) host_write(1, k, data_t'(col_idx[k]));
    @(negedge clk); start = 1; num_nodes = node_t'(n);
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    cycles = int'(run_cycles);
    for (int k = 0; k < n; k++) begin
      logic [31:0] acc, exp_s;
      acc = '0;
      for (int j = row_ptr[k]; j < row_ptr[k+1]; j++)
        acc = to_f32(from_f32(acc) + from_f32(contrib[col_idx[j]]));
      exp_s = to_f32(from_f32(32'h3F59_999A) * from_f32(acc));
      host_raddr = node_t'(k);
      @(negedge clk);
      chk(host_rdata == exp_s, $sformatf("score[%0d] = %h exp %h", k, host_rdata, exp_s));
    end
  endtask

  initial begin
    int cyc;
    host_we = 0; host_sel = 0; host_addr = 0; host_wdata = 0; host_raddr = 0; num_nodes = 0;
    // contributions in [2^-10, 1): sums stay exact in the double-precision reference
    for (int k = 0; k < N_MAX; k++) contrib[k] = {1'b0, 8'(117 + $urandom % 10), 23'($urandom)};
    for (int k = 0; k < E_MAX; k++) col_idx[k] = node_t'($urandom % N_MAX);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < N_MAX; k++) host_write(2, k, contrib[k]);

    row_ptr[0] = 0;
    for (int k = 0; k < 200; k++)
      row_ptr[k+1] = row_ptr[k] + ((k % 9 == 4) ? 0 : ((k % 13 == 0) ? 20 + int'($urandom % 20) : int'($urandom % 6)));
    load_and_run(200, cyc);
    $display("run 1: 200 nodes, %0d edges, %0d cycles", row_ptr[200], cyc);

    row_ptr[0] = 0;
    for (int k = 0; k < 64; k++) row_ptr[k+1] = row_ptr[k] + 5;
    load_and_run(64, cyc);
    $display("run 2: 64 rows of 5 edges, %0d cycles", cyc);
    chk(cyc >= 384 && cyc <= 384 + 42 + 16, $sformatf("run 2 took %0d cycles, exp 384 + drain (42) + fill", cyc));
    chk(multi > 0, "never more than one context in flight");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
