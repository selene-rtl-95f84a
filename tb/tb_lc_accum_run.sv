// One checked run of lc_accum for a given II and adder latency, used by
// tb_lc_accum. Tokens are generated the way the control unit schedules them:
// slot t % II on advancing cycle t, a context keeps its slot for e - s
// iterations plus an exit token, and a free slot starts a new context
// (fwd = 0) or idles. Each enabled token brings a random operand c. Every
// finished context must leave with acc = acc0 + sum of its operands, exactly
// ADD_LAT advancing cycles after its exit token entered, and no forwarded
// token may find its slot invalid. The pipeline advance is withheld at
// random. checks and failures are read by the enclosing testbench; done
// rises when all NCTX contexts have left.
module tb_lc_accum_run
  import selene_pkg::*;
#(
  parameter int II      = 2,
  parameter int ADD_LAT = 2,
  parameter int NCTX    = 400
) (
  input  logic clk,
  input  logic rst_n,
  output logic done
);
  logic adv;
  stage_tok_t tok;
  data_t c;
  logic res_valid, fwd_err, busy;
  inner_res_t res;
  int checks = 0, failures = 0;

  lc_accum #(.II(II), .ADD_LAT(ADD_LAT)) dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL(II=%0d,ADD_LAT=%0d): %s", II, ADD_LAT, msg); end
  endtask

  int    s_ctx [II];
  int    s_left[II];
  data_t exp_acc [NCTX];
  longint exit_t [NCTX];
  int    started = 0, finished = 0, n_fwd = 0;
  longint t = 0;


  initial begin
    tok = '0; c = '0; adv = 0;
    for (int k = 0; k < II; k++) s_ctx[k] = -1;
    done = 0;
    @(posedge clk iff rst_n);
    while (finished < NCTX) begin
      @(negedge clk);
      // check the output of this cycle
      #1;
      adv = ($urandom % 100) < 85;
      #1;
      if (adv && res_valid) begin
        int k;
        k = int'(res.i);
        chk(res.acc == exp_acc[k], $sformatf("ctx %0d acc %h exp %h", k, res.acc, exp_acc[k]));
        chk(t - exit_t[k] == ADD_LAT, $sformatf("ctx %0d result latency %0d", k, t - exit_t[k]));
        finished++;
      end
      // present the token of advancing cycle t (it enters on this edge if adv)
      if (adv) begin
        int sl;
        sl  = int'(t % II);
        tok = '0;
        c   = $urandom % 100000;
        if (s_ctx[sl] < 0 && started < NCTX && ($urandom % 4 != 0)) begin
          s_ctx[sl]  = started;
          s_left[sl] = $urandom % 6;
          exp_acc[started] = $urandom % 1000000;
          tok.acc0 = exp_acc[started];
          tok.fwd  = 0;
          tok.valid = 1;
          started++;
        end else if (s_ctx[sl] >= 0) begin
          tok.valid = 1;
          tok.fwd   = 1;
          tok.acc0  = $urandom;  // must be ignored
          n_fwd++;
        end
        if (tok.valid) begin
          tok.slot   = slot_t'(sl);
          tok.i      = node_t'(s_ctx[sl]);
          tok.enable = s_left[sl] > 0;
          tok.exit_  = s_left[sl] == 0;
          if (tok.enable) exp_acc[s_ctx[sl]] += c;
          if (tok.exit_) begin exit_t[s_ctx[sl]] = t; s_ctx[sl] = -1; end
          else s_left[sl]--;
        end
        t++;
      end
      // the token now presented enters on the next edge if adv is high
      #1;
      chk(!fwd_err, "forwarded token found an invalid slot");
    end
    chk(n_fwd > 0, "no forwarding happened");
    done = 1;
  end

endmodule
