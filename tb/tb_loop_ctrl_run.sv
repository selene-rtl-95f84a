// Driver and rule checker for one loop_ctrl instance (used by tb_loop_ctrl).
// Offers the contexts in ctxs[] in order with random gaps, withholds the
// pipeline advance at random, and checks every issued token against a slot
// model of the schedule (see tb_loop_ctrl).
module tb_loop_ctrl_run
  import selene_pkg::*;
#(
  parameter int II      = 2,
  parameter int MAX_CTX = 2,
  parameter int NCTX    = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  outer_ctx_t ctxs [NCTX],
  output logic       done,
  output int         checks_o,
  output int         max_inflight,
  output int         bubbles
);
  int checks = 0, failures = 0;
  logic adv, oc_valid, oc_ready, n_outer, n_inner, busy;
  outer_ctx_t oc_data;
  stage_tok_t tok;
  slot_t      n_active;

  loop_ctrl #(.II(II), .MAX_CTX(MAX_CTX)) dut (.*);

  // slot model
  int   slot_ctx [II];   // -1 free
  int   next_j   [II];
  longint last_t [II];
  longint t = 0;         // advancing-cycle index
  int   head = 0;        // next context to offer
  int   exited = 0, n_tokens = 0, exp_tokens = 0, ev_out = 0, ev_in = 0;
  bit   adv_d = 0, ocv_d = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL(II=%0d,MAX=%0d): %s", II, MAX_CTX, msg); end
  endtask

  assign checks_o = checks;
  assign oc_data  = ctxs[head < NCTX ? head : 0];

  initial begin
    for (int k = 0; k < NCTX; k++) exp_tokens += int'(ctxs[k].e - ctxs[k].s) + 1;
    for (int k = 0; k < II; k++) slot_ctx[k] = -1;
    done = 0; max_inflight = 0; bubbles = 0;
  end

  // stimulus
  always @(negedge clk) begin
    adv      = !rst_n ? 1'b0 : (($urandom % 100) < 85);
    oc_valid = rst_n && head < NCTX && (($urandom % 100) < 60);
  end

  always @(posedge clk) if (rst_n) begin
    // the registered token reflects the selection of the previous advancing edge
    if (adv_d) begin
      int sl, c, inflight;
      sl = int'((t - 1) % II);
      chk(int'(tok.slot) == sl, $sformatf("slot %0d exp %0d", tok.slot, sl));
      if (slot_ctx[sl] >= 0) begin
        c = slot_ctx[sl];
        chk(tok.valid && tok.fwd, "occupied slot did not issue its inner context");
        chk(int'(tok.i) == c && tok.j == edge_t'(next_j[sl]), $sformatf("ctx %0d j %0d exp %0d", tok.i, tok.j, next_j[sl]));
        chk(t - 1 - last_t[sl] == II, "inner context not reissued after II cycles");
      end else if (tok.valid) begin
        c = head - 1;
        chk(!tok.fwd, "new context issued with fwd");
        chk(32'(sl) < MAX_CTX, "context admitted beyond MAX_CTX");
        chk(int'(tok.i) == c && tok.j == ctxs[c].s && tok.acc0 == ctxs[c].acc0, "first token of new context");
        slot_ctx[sl] = c;
      end else begin
        chk(!(ocv_d && 32'(sl) < MAX_CTX), "bubble while a context was offered");
        bubbles++;
      end
      if (tok.valid) begin
        c = slot_ctx[sl];
        n_tokens++;
        chk(tok.enable == (tok.j < ctxs[c].e) && tok.exit_ == !(tok.j < ctxs[c].e), "enable/exit");
        next_j[sl] = int'(tok.j) + 1;
        last_t[sl] = t - 1;
        if (tok.exit_) begin slot_ctx[sl] = -1; exited++; end
      end
      inflight = 0;
      for (int k = 0; k < II; k++) if (slot_ctx[k] >= 0) inflight++;
      if (inflight > max_inflight) max_inflight = inflight;
      chk(int'(n_active) == inflight, $sformatf("n_active %0d exp %0d", n_active, inflight));
    end
    if (n_outer) ev_out++;
    if (n_inner) ev_in++;
    adv_d = adv;
    ocv_d = oc_valid;
    if (adv) t++;
    if (oc_valid && oc_ready) head++;
    if (exited == NCTX && !done) begin
      chk(n_tokens == exp_tokens, $sformatf("tokens %0d exp %0d", n_tokens, exp_tokens));
      chk(ev_out == NCTX && ev_out + ev_in == exp_tokens, "dispatch event counts");
      chk(!busy, "busy after all contexts exited");
      done = 1;
    end
  end
endmodule
