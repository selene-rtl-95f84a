// End-to-end testbench for selene_pr_top at its default sizes (1024 nodes,
// 8192 edges, II = 2). It loads a graph in CSR form through the host port,
// runs the kernel, reads every score back and compares it with
// score[i] = (0.85 * sum_{j in row i} contrib[col_idx[j]]) in Q16.16,
// computed here. Three runs:
//   1. a 24-node graph with empty rows and one long row;
//   2. the full-size graph: 1024 nodes, all 8192 edges, row lengths skewed
//      (many short and empty rows, a few long ones);
//   3. 64 rows of 5 edges each, where the cycle count must show the two
//      contexts sharing the pipeline: 64 * 6 tokens issue one per cycle, so
//      the run takes 384 cycles plus a fixed fill and drain, where a pipeline
//      without interleaving would need twice the issue cycles.
// Each mechanism must occur at least once: outer dispatch, inner dispatch,
// bubble, two outer contexts in flight, Stage 1 held back by a full outer
// context queue, and an empty inner loop. The inner-result queue never fills
// in this top (Stage 3 accepts one result per cycle), so a Stage 2 stall
// cannot occur here; it is exercised by the Stage 2 testbench.
module tb_selene_pr_top;
  import selene_pkg::*;
  localparam int N_MAX = 1024, E_MAX = 8192;
  logic clk = 0, rst_n = 0, start = 0, done, fwd_err;
  node_t num_nodes;
  logic [31:0] run_cycles;
  logic host_we; logic [1:0] host_sel; logic [15:0] host_addr; data_t host_wdata;
  node_t host_raddr; data_t host_rdata;
  logic [5:0] events;

  selene_pr_top dut (.*);
  always #5 clk = ~clk;

  int    row_ptr [N_MAX+1];
  node_t col_idx [E_MAX];
  data_t contrib [N_MAX];
  int checks = 0, failures = 0;
  int ev_cnt [6];
  int n_empty_rows = 0;
  string ev_name [6] = '{"outer dispatch", "inner dispatch", "bubble", "stage 2 stall",
                         "two contexts in flight", "stage 1 held by full queue"};

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 6; k++) if (events[k]) ev_cnt[k]++;
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
    for (int k = 0; k < n; k++) if (row_ptr[k] == row_ptr[k+1]) n_empty_rows++;
    @(negedge clk); start = 1; num_nodes = node_t'(n);
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    cycles = int'(run_cycles);
    for (int k = 0; k < n; k++) begin
      longint unsigned acc, p;
      data_t exp_s;
      acc = 0;
      for (int j = row_ptr[k]; j < row_ptr[k+1]; j++) acc += contrib[col_idx[j]];
      p = (acc & 64'hFFFF_FFFF) * 64'd55706;
      exp_s = data_t'(p >> 16);
      host_raddr = node_t'(k);
      @(negedge clk);
      chk(host_rdata == exp_s, $sformatf("score[%0d] = %h exp %h", k, host_rdata, exp_s));
    end
  endtask

  initial begin
    int cyc, tokens;
    host_we = 0; host_sel = 0; host_addr = 0; host_wdata = 0; host_raddr = 0; num_nodes = 0;
    for (int k = 0; k < N_MAX; k++) contrib[k] = $urandom % (1 << 18);
    for (int k = 0; k < E_MAX; k++) col_idx[k] = node_t'($urandom % N_MAX);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // contrib is loaded once for all nodes: rows may point at any node
    for (int k = 0; k < N_MAX; k++) host_write(2, k, contrib[k]);

    // ---- run 1: small graph
    row_ptr[0] = 0;
    for (int k = 0; k < 24; k++) row_ptr[k+1] = row_ptr[k] + ((k % 5 == 2) ? 0 : (k == 7 ? 30 : int'($urandom % 6)));
    load_and_run(24, cyc);
    $display("run 1: 24 nodes, %0d edges, %0d cycles", row_ptr[24], cyc);

    // ---- run 2: full size, skewed row lengths, exactly E_MAX edges
    begin
      int left;
      left = E_MAX;
      row_ptr[0] = 0;
      for (int k = 0; k < N_MAX; k++) begin
        int len;
        case ($urandom % 8)
          0, 1:    len = 0;
          2, 3, 4: len = 1 + $urandom % 4;
          5, 6:    len = 5 + $urandom % 12;
          default: len = 16 + $urandom % 24;
        endcase
        if (k == N_MAX - 1) len = left;
        if (len > left) len = left;
        left -= len;
        row_ptr[k+1] = row_ptr[k] + len;
      end
    end
    load_and_run(N_MAX, cyc);
    tokens = E_MAX + N_MAX;
    $display("run 2: %0d nodes, %0d edges, %0d cycles (%0d tokens)", N_MAX, row_ptr[N_MAX], cyc, tokens);
    chk(row_ptr[N_MAX] == E_MAX, "full-size graph does not use all edges");
    chk(cyc >= tokens / 2, "run 2 faster than the issue rate allows");

    // ---- run 3: uniform rows, cycle count
    row_ptr[0] = 0;
    for (int k = 0; k < 64; k++) row_ptr[k+1] = row_ptr[k] + 5;
    load_and_run(64, cyc);
    $display("run 3: 64 rows of 5 edges, %0d cycles", cyc);
    chk(cyc >= 384 && cyc <= 384 + 16, $sformatf("run 3 took %0d cycles, exp 384 + fill/drain", cyc));

    for (int k = 0; k < 6; k++) begin
      $display("%-28s %0d", ev_name[k], ev_cnt[k]);
      if (k != 3) chk(ev_cnt[k] > 0, {ev_name[k], " never happened"});
    end
    $display("%-28s %0d", "empty inner loops", n_empty_rows);
    chk(n_empty_rows > 0, "no empty inner loop");
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
