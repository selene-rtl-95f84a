// Self-checking testbench for stage2_pipe, the barrier-free inner-loop
// pipeline. Array models (one-cycle reads that hold while not enabled) supply
// col_idx and contrib; a queue model supplies outer contexts; the result side
// is randomly not ready, which must freeze the stage.
// Phase 1: random rows (empty rows included), random offer gaps, random
//          backpressure. Every row must come out once with
//          acc = sum of contrib[col_idx[j]] over its row.
// Phase 2: 40 rows of 5 edges each, always offered, always accepted. With
//          II = 2 the two slots keep the pipeline full: the 240 tokens
//          (5 iterations + 1 exit token per row) are dispatched in 240
//          consecutive cycles with no bubble, one token per cycle, against
//          one token per II cycles without interleaving.
// Counts outer dispatches, inner dispatches, bubbles, stalls and cycles with
// two contexts in flight; each must occur.
module tb_stage2_pipe;
  import selene_pkg::*;
  localparam int NE = 4096, NN = 512;
  logic clk = 0, rst_n = 0;
  logic oc_valid, oc_ready, ci_re, ct_re, ir_valid, ir_ready, busy, fwd_err;
  logic ev_outer, ev_inner, ev_bubble, ev_stall, ev_multi;
  outer_ctx_t oc_data;
  edge_t ci_addr; node_t ci_q, ct_addr; data_t ct_q;
  inner_res_t ir_data;

  stage2_pipe dut (.*);
  always #5 clk = ~clk;

  node_t col_idx [NE];
  data_t contrib [NN];
  outer_ctx_t rows[$];
  data_t exp_acc [NN];
  bit    seen [NN];
  int checks = 0, failures = 0, n_res = 0, n_rows = 0;
  int c_outer = 0, c_inner = 0, c_bubble = 0, c_stall = 0, c_two = 0;
  int offer_pct = 100, ready_pct = 100;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always_ff @(posedge clk) begin
    if (ci_re) ci_q <= col_idx[ci_addr];
    if (ct_re) ct_q <= contrib[ct_addr];
  end

  logic offer;
  assign oc_valid = offer && $size(rows) > 0;
  assign oc_data  = ($size(rows) > 0) ? rows[0] : '0;

  always @(negedge clk) begin
    offer    = ($urandom % 100) < offer_pct;
    ir_ready = ($urandom % 100) < ready_pct;
  end

  bit held = 0;
  inner_res_t held_d;

  always @(posedge clk) if (rst_n) begin
    int infl;
    // a refused result must be offered again, unchanged, in the next cycle
    if (held) chk(ir_valid && ir_data == held_d, "result dropped under backpressure");
    held   = ir_valid && !ir_ready;
    held_d = ir_data;
    if (oc_valid && oc_ready) void'(rows.pop_front());
    if (ir_valid && ir_ready) begin
      int k;
      k = int'(ir_data.i);
      chk(!seen[k], $sformatf("row %0d returned twice", k));
      chk(ir_data.acc == exp_acc[k], $sformatf("row %0d acc %h exp %h", k, ir_data.acc, exp_acc[k]));
      seen[k] = 1;
      n_res++;
    end
    chk(!fwd_err, "forwarding validity check failed");
    if (ev_outer) c_outer++;
    if (ev_inner) c_inner++;
    if (ev_bubble) c_bubble++;
    if (ev_stall) c_stall++;
    infl = c_outer - n_res;   // outer contexts dispatched and not yet returned
    if (ev_multi) begin
      c_two++;
      chk(infl >= 2, "several contexts reported in flight, fewer dispatched");
    end
  end

  task automatic add_row(input int i, input int s, input int len);
    outer_ctx_t r;
    r.i = node_t'(i); r.s = edge_t'(s); r.e = edge_t'(s + len); r.acc0 = '0;
    exp_acc[i] = '0;
    for (int j = s; j < s + len; j++) exp_acc[i] += contrib[col_idx[j]];
    seen[i] = 0;
    rows.push_back(r);
  endtask

  initial begin
    int base, first_d, last_d, cyc, tokens, bub0;
    for (int k = 0; k < NE; k++) col_idx[k] = node_t'($urandom % NN);
    for (int k = 0; k < NN; k++) contrib[k] = $urandom % (1 << 20);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- phase 1
    offer_pct = 60; ready_pct = 50; base = 0;
    for (int i = 0; i < 300; i++) begin
      int len;
      len = ($urandom % 5 == 0) ? 0 : $urandom % 9;
      add_row(i, base, len);
      base += len;
    end
    n_rows = 300;
    while (n_res < n_rows) @(posedge clk);
    repeat (10) @(posedge clk);
    chk(!busy, "busy after phase 1");
    // ---- phase 2
    @(negedge clk);
    offer_pct = 100; ready_pct = 100;
    for (int i = 0; i < 40; i++) add_row(300 + i, i * 5, 5);
    n_rows += 40;
    first_d = -1; last_d = -1; cyc = 0; tokens = 0; bub0 = 0;
    while (n_res < n_rows) begin
      #1;
      if (ev_outer || ev_inner) begin
        if (first_d < 0) first_d = cyc;
        last_d = cyc; tokens++;
      end else if (first_d >= 0 && $size(rows) > 0) bub0++;
      cyc++;
      @(negedge clk);
    end
    chk(tokens == 240, $sformatf("phase 2 tokens %0d", tokens));
    chk(last_d - first_d + 1 == 240, $sformatf("phase 2 dispatch window %0d cycles, exp 240", last_d - first_d + 1));
    chk(bub0 == 0, $sformatf("phase 2 bubbles %0d", bub0));
    $display("outer %0d inner %0d bubble %0d stall %0d two-in-flight %0d", c_outer, c_inner, c_bubble, c_stall, c_two);
    chk(c_outer == n_rows, "outer dispatch count");
    chk(c_inner > 0 && c_bubble > 0 && c_stall > 0 && c_two > 0, "a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
