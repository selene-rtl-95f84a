// Self-checking testbench for loop_ctrl, the cross-level context selector.
// Outer contexts with random inner-loop lengths (including empty loops) are
// offered with random gaps while the pipeline advance is randomly withheld.
// Every issued token is checked against the scheduling rules, kept here as
// an independent slot model:
//   * slots are visited round-robin, one per advancing cycle;
//   * a slot holding a context always issues that context's next iteration
//     (j = previous j + 1, fwd = 1) exactly II advancing cycles later;
//   * a free slot takes the next outer context in queue order (j = s, fwd = 0,
//     acc0 passed) if one is offered, and issues a bubble otherwise;
//   * enable/exit follow j < e; every context issues e - s + 1 tokens;
//   * the number of contexts in flight never exceeds MAX_CTX.
// A second instance with MAX_CTX = 1 (no interleaving) is checked the same way.
module tb_loop_ctrl;
  import selene_pkg::*;
  localparam int NCTX = 300;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  outer_ctx_t ctxs [NCTX];

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int k = 0; k < NCTX; k++) begin
      ctxs[k].i    = node_t'(k);
      ctxs[k].s    = edge_t'($urandom % 1000);
      ctxs[k].e    = ctxs[k].s + edge_t'(($urandom % 4 == 0) ? 0 : $urandom % 7);
      ctxs[k].acc0 = $urandom;
    end
  end

  // ---- one checked instance per configuration
  logic done_a, done_b;
  int   maxinfl_a, maxinfl_b, bub_a, bub_b;
  tb_loop_ctrl_run #(.II(2), .MAX_CTX(2), .NCTX(NCTX)) u_a (
    .clk, .rst_n, .ctxs, .done(done_a), .checks_o(), .max_inflight(maxinfl_a), .bubbles(bub_a));
  tb_loop_ctrl_run #(.II(3), .MAX_CTX(1), .NCTX(NCTX)) u_b (
    .clk, .rst_n, .ctxs, .done(done_b), .checks_o(), .max_inflight(maxinfl_b), .bubbles(bub_b));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_a && done_b);
    checks    += u_a.checks + u_b.checks;
    failures  += u_a.failures + u_b.failures;
    chk(maxinfl_a == 2, $sformatf("II=2 run never interleaved two contexts (max %0d)", maxinfl_a));
    chk(maxinfl_b == 1, $sformatf("MAX_CTX=1 run had %0d contexts in flight", maxinfl_b));
    chk(bub_a > 0, "no bubble was ever issued");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    checks   += u_a.checks + u_b.checks;
    failures += u_a.failures + u_b.failures + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
