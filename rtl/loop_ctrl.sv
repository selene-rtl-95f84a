// Cross-level loop control unit: the readiness-aware context selector (MUX1)
// and the inner-loop control node E of the barrier-free pipeline.
//
// The pipeline holds up to II outer-loop contexts at once, one per context
// slot. A round-robin pointer visits one slot per advancing cycle, so each
// slot is visited exactly every II cycles, the initiation interval imposed by
// the loop-carried accumulation. On a visit:
//   * if the slot holds an in-flight inner context it is "ready" (its previous
//     iteration issued II cycles ago) and its next inner iteration j is issued
//     with fwd = 1: inner contexts always win;
//   * otherwise, if the slot index is below MAX_CTX and the outer context queue
//     has an entry, that outer context is popped into the slot and its first
//     iteration j = s is issued with fwd = 0, so it starts from its own initial
//     accumulator rather than a value forwarded from an earlier context;
//   * otherwise a bubble (valid = 0) is issued.
// For every issued token the unit evaluates the inner-loop condition j < e:
// true gives enable = 1, exit = 0 and the slot keeps j + 1 for its next visit;
// false gives enable = 0, exit = 1 and frees the slot, so the next visit can
// accept a new outer context at once, without waiting for the pipeline to
// drain. The exit token itself travels down the pipeline to carry the final
// accumulator out. The token is registered (one cycle from selection to tok).
// Everything holds while adv is low. busy and n_active report whether and how
// many slots hold an in-flight context.
//
// Slot-based round-robin issue, inner priority, the fwd/enable/exit bits and
// the bound of II in-flight contexts follow the architecture; holding the
// inner-context feedback queue as one register set per slot is this design's
// choice. MAX_CTX = 1 gives the barrier-free pipeline without interleaving of
// outer iterations.
module loop_ctrl
  import selene_pkg::*;
#(
  parameter int II      = 2,
  parameter int MAX_CTX = II
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       adv,
  input  logic       oc_valid,
  output logic       oc_ready,
  input  outer_ctx_t oc_data,
  output stage_tok_t tok,
  output logic       n_outer,
  output logic       n_inner,
  output logic       busy,
  output slot_t      n_active
);
  // Per-slot inner context: the implicit inner-context queue.
  logic  act [II];
  node_t ci  [II];
  edge_t cj  [II];
  edge_t ce  [II];
  slot_t rr;

  // Array index: the slot number cut to the width the II entries need.
  localparam int IW = (II > 1) ? $clog2(II) : 1;
  logic [IW-1:0] ri;
  assign ri = rr[IW-1:0];

  logic       take_inner, take_outer;
  stage_tok_t nxt;
  edge_t      j_sel, e_sel;
  logic       cont;

  always_comb begin
    take_inner = act[ri];
    take_outer = !take_inner && (32'(rr) < MAX_CTX) && oc_valid;
    j_sel      = take_inner ? cj[ri] : oc_data.s;
    e_sel      = take_inner ? ce[ri] : oc_data.e;
    cont       = (j_sel < e_sel);
    nxt        = '0;
    nxt.valid  = take_inner || take_outer;
    nxt.slot   = rr;
    nxt.i      = take_inner ? ci[ri] : oc_data.i;
    nxt.j      = j_sel;
    nxt.acc0   = take_inner ? '0 : oc_data.acc0;
    nxt.fwd    = take_inner;
    nxt.enable = nxt.valid && cont;
    nxt.exit_  = nxt.valid && !cont;
  end

  assign oc_ready = adv && take_outer;
  assign n_outer  = adv && take_outer;
  assign n_inner  = adv && take_inner;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rr  <= '0;
      tok <= '0;
      for (int k = 0; k < II; k++) act[k] <= 1'b0;
    end else if (adv) begin
      rr  <= (32'(rr) == II-1) ? '0 : rr + 1'b1;
      tok <= nxt;
      if (nxt.valid) act[ri] <= cont;
    end
  end

  always_ff @(posedge clk) begin
    if (adv && nxt.valid) begin
      ci[ri] <= nxt.i;
      cj[ri] <= j_sel + 1'b1;
      ce[ri] <= e_sel;
    end
  end

  always_comb begin
    busy     = 1'b0;
    n_active = '0;
    for (int k = 0; k < II; k++) begin
      busy     |= act[k];
      n_active += slot_t'(act[k]);
    end
  end

  // Never more than MAX_CTX contexts in flight; a slot beyond the bound never fills.
  for (genvar k = MAX_CTX; k < II; k++) begin : g_bound
    a_bound: assert property (@(posedge clk) disable iff (!rst_n) !act[k]);
  end
endmodule
