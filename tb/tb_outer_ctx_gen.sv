// Self-checking testbench for outer_ctx_gen (Stage 1). A row_ptr model with
// one-cycle reads and a queue model with random pops stand in for the array
// and the outer context queue. Checks: contexts arrive in order with the right
// i, s, e and acc0 = 0; no push ever exceeds the queue depth; the queue's
// backpressure holds Stage 1 back; with a consumer that pops every cycle one
// context is produced per cycle.
module tb_outer_ctx_gen;
  import selene_pkg::*;
  localparam int QD = 4;
  localparam int N  = 200;
  logic clk = 0, rst_n = 0, start = 0;
  node_t num_nodes;
  logic rp_re, oc_valid, busy;
  node_t rp_addr0, rp_addr1;
  edge_t rp_q0, rp_q1;
  outer_ctx_t oc_data;
  logic [$clog2(QD+1)-1:0] oc_count;
  edge_t row_ptr [N+1];
  outer_ctx_t q[$];
  int checks = 0, failures = 0, n_seen = 0, n_blocked = 0, n_issued = 0, n_run = 0;
  bit pop_always;

  outer_ctx_gen #(.Q_DEPTH(QD)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // row_ptr array model, one-cycle read
  always_ff @(posedge clk) if (rp_re) begin
    rp_q0 <= row_ptr[rp_addr0];
    rp_q1 <= row_ptr[rp_addr1];
  end
  assign oc_count = ($clog2(QD+1))'($size(q));

  // queue model and checker
  always @(posedge clk) if (rst_n) begin
    if (busy && !rp_re && n_issued < n_run) n_blocked++;
    if (rp_re) n_issued++;
    if ($size(q) > 0 && (pop_always || ($urandom % 3 == 0))) begin
      outer_ctx_t c;
      c = q.pop_front();
      chk(c.i == node_t'(n_seen), $sformatf("i %0d exp %0d", c.i, n_seen));
      chk(c.s == row_ptr[n_seen] && c.e == row_ptr[n_seen+1], $sformatf("bounds of %0d", n_seen));
      chk(c.acc0 == '0, "acc0");
      n_seen++;
    end
    if (oc_valid) begin
      chk($size(q) < QD, "push into a full queue");
      q.push_back(oc_data);
    end
  end

  task automatic run(input int n, input bit pa, output int cycles);
    pop_always = pa; n_seen = 0; n_issued = 0; n_run = n;
    @(negedge clk); start = 1; num_nodes = node_t'(n);
    @(negedge clk); start = 0;
    cycles = 1;
    while (busy || $size(q) > 0) begin @(negedge clk); cycles++; end
    chk(n_seen == n, $sformatf("saw %0d contexts, exp %0d", n_seen, n));
  endtask

  initial begin
    int cyc;
    row_ptr[0] = 0;
    for (int k = 1; k <= N; k++) row_ptr[k] = row_ptr[k-1] + edge_t'($urandom % 6);
    num_nodes = 0; pop_always = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(N, 0, cyc);
    chk(n_blocked > 0, "backpressure never held Stage 1");
    run(N, 1, cyc);
    // N contexts, one per cycle: issue, load, push, pop.
    chk(cyc <= N + 3, $sformatf("throughput: %0d cycles for %0d contexts", cyc, N));
    run(0, 1, cyc);
    $display("blocked cycles %0d", n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
