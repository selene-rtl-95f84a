// Stage 2: the barrier-free inner-loop pipeline with cross-level scheduling.
//
// Pipeline (one token per cycle, all registers advance together on adv):
//   cycle 0  loop_ctrl selects a context (inner first, else a new outer one),
//            tests j < e and registers the token              -> t1
//   cycle 1  F: v = col_idx[j]   (read enabled only if enable) -> t2, v
//   cycle 2  G: c = contrib[v]   (read enabled only if enable) -> t3, c
//   cycle 3  H: acc = (fwd ? forwarded acc : acc0) + (enable ? c : 0),
//            ADD_LAT cycles, then to the inner-result queue on exit or back
//            to the loop-carried context status buffer otherwise.
// A slot is revisited every II cycles, so a context's next token reaches H in
// the cycle its previous sum leaves the adder (ADD_LAT = II, the default) and
// picks it up through the buffer's bypass; with a shorter adder
// (ADD_LAT < II) the sum waits in the buffer until then. Up to II outer-loop
// contexts share the pipeline this way, and a new one enters as soon as a
// slot frees, never waiting for the pipeline to drain.
//
// Backpressure: when an exiting result finds the inner-result queue full,
// adv goes low and the whole stage, control unit included, holds for that
// cycle; the fixed spacing between a slot's tokens is therefore preserved.
// ev_* are one-cycle event strobes (outer dispatch, inner dispatch, bubble,
// stall, more than one outer context in flight) for performance counting.
//
// The stage split F / G / H, the load and operator latencies and the control
// bits follow the example architecture; freezing the whole stage on
// backpressure is this design's choice.
module stage2_pipe
  import selene_pkg::*;
#(
  parameter int II      = 2,
  parameter int MAX_CTX = II,
  parameter int ADD_LAT = II,
  parameter bit FLOAT   = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       oc_valid,
  output logic       oc_ready,
  input  outer_ctx_t oc_data,
  output logic       ci_re,
  output edge_t      ci_addr,
  input  node_t      ci_q,
  output logic       ct_re,
  output node_t      ct_addr,
  input  data_t      ct_q,
  output logic       ir_valid,
  input  logic       ir_ready,
  output inner_res_t ir_data,
  output logic       busy,
  output logic       fwd_err,
  output logic       ev_outer,
  output logic       ev_inner,
  output logic       ev_bubble,
  output logic       ev_stall,
  output logic       ev_multi
);
  logic       adv;
  stage_tok_t t1, t2, t3;
  logic       res_valid;
  logic       n_outer, n_inner, ctl_busy, h_busy;
  slot_t      n_active;

  assign adv = !(res_valid && !ir_ready);

  loop_ctrl #(.II(II), .MAX_CTX(MAX_CTX)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .adv      (adv),
    .oc_valid (oc_valid),
    .oc_ready (oc_ready),
    .oc_data  (oc_data),
    .tok      (t1),
    .n_outer  (n_outer),
    .n_inner  (n_inner),
    .busy     (ctl_busy),
    .n_active (n_active)
  );

  // F: v = col_idx[j]
  assign ci_re   = adv && t1.valid && t1.enable;
  assign ci_addr = t1.j;
  // G: c = contrib[v]
  assign ct_re   = adv && t2.valid && t2.enable;
  assign ct_addr = ci_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t2 <= '0;
      t3 <= '0;
    end else if (adv) begin
      t2 <= t1;
      t3 <= t2;
    end
  end

  lc_accum #(.II(II), .ADD_LAT(ADD_LAT), .FLOAT(FLOAT)) u_h (
    .clk       (clk),
    .rst_n     (rst_n),
    .adv       (adv),
    .tok       (t3),
    .c         (ct_q),
    .res_valid (res_valid),
    .res       (ir_data),
    .fwd_err   (fwd_err),
    .busy      (h_busy)
  );

  assign ir_valid  = res_valid;
  assign ev_outer  = n_outer;
  assign ev_inner  = n_inner;
  assign ev_bubble = adv && !n_outer && !n_inner;
  assign ev_stall  = !adv;
  assign ev_multi  = (n_active > slot_t'(1));

  // Tokens in flight in t1..t3 or in the adder, or contexts holding a slot.
  assign busy = ctl_busy || t1.valid || t2.valid || t3.valid || h_busy;
endmodule
