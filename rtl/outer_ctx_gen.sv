// Stage 1: outer-loop context generator (PageRank nodes A, B, C, D).
//
// After start it walks the outer loop i = 0 .. num_nodes-1. For each i it
// reads row_ptr[i] and row_ptr[i+1] on two read ports in one cycle (loads C
// and D), and one cycle later pushes the outer context {i, s, e, acc0 = 0}
// (B initialises the accumulator) into the outer context queue. One iteration
// can issue per cycle. Flow control is by credit: an iteration issues only if
// the queue occupancy plus the load still in flight leaves room, so a push is
// never refused and the queue's backpressure simply holds i. busy stays high
// until the last context has been pushed.
//
// The walk, the two loads and the queue push follow the example kernel; the
// credit scheme and carrying i inside the context (so that results that finish
// out of order can still be stored at the right node) are this design's
// choices.
module outer_ctx_gen
  import selene_pkg::*;
#(
  parameter int Q_DEPTH = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  node_t                        num_nodes,
  output logic                         rp_re,
  output node_t                        rp_addr0,
  output node_t                        rp_addr1,
  input  edge_t                        rp_q0,
  input  edge_t                        rp_q1,
  output logic                         oc_valid,
  output outer_ctx_t                   oc_data,
  input  logic [$clog2(Q_DEPTH+1)-1:0] oc_count,
  output logic                         busy
);
  node_t i_q, n_q, i_pend;
  logic  run_q, pend_q;

  // Issue when there is work and the queue will have room for the result.
  assign rp_re    = run_q && (i_q != n_q) &&
                    ((32'(oc_count) + 32'(pend_q)) < Q_DEPTH);
  assign rp_addr0 = i_q;
  assign rp_addr1 = i_q + 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run_q  <= 1'b0;
      pend_q <= 1'b0;
      i_q    <= '0;
      n_q    <= '0;
      i_pend <= '0;
    end else begin
      pend_q <= rp_re;
      if (rp_re) begin
        i_pend <= i_q;
        i_q    <= i_q + 1'b1;
      end
      if (start) begin
        run_q <= 1'b1;
        i_q   <= '0;
        n_q   <= num_nodes;
      end else if (run_q && (i_q == n_q) && !pend_q) begin
        run_q <= 1'b0;
      end
    end
  end

  assign oc_valid     = pend_q;
  assign oc_data.i    = i_pend;
  assign oc_data.s    = rp_q0;
  assign oc_data.e    = rp_q1;
  assign oc_data.acc0 = '0;
  assign busy         = run_q || pend_q;

  a_push_fits: assert property (@(posedge clk) disable iff (!rst_n)
                                oc_valid |-> 32'(oc_count) < Q_DEPTH);
endmodule
