// Barrier-free pipelined PageRank pull kernel with cross-level scheduling.
//
// Computes, for every node i < num_nodes of a graph in compressed sparse row
// form,
//     score[i] = DAMPING * sum_{j = row_ptr[i]}^{row_ptr[i+1]-1} contrib[col_idx[j]]
// i.e. the irregular two-level loop nest "for i { acc = 0; for j in row i
// { acc += contrib[col_idx[j]] } score[i] = DAMPING * acc }".
//
// Structure:
//   Stage 1 (outer_ctx_gen)  loads the row bounds of node i and pushes the
//                            outer context {i, s, e, 0} into OC_Q.
//   OC_Q    (ctx_fifo)       outer context queue.
//   Stage 2 (stage2_pipe)    one pipeline shared by all inner-loop iterations
//                            of up to II outer iterations at once; the control
//                            unit interleaves them slot by slot and admits a
//                            new outer iteration as soon as one exits.
//   IR_Q    (ctx_fifo)       inner result queue {i, acc}.
//   Stage 3 (outer_epilogue) multiplies by DAMPING and stores score[i].
//   Arrays  (sync_ram)       row_ptr (two read ports), col_idx, contrib, score.
//
// Host interface: while idle, host_we writes host_wdata to array host_sel
// (0 row_ptr, 1 col_idx, 2 contrib) at host_addr. A one-cycle start pulse with
// num_nodes begins a run; done rises when all num_nodes scores are stored and
// stays high until the next start; run_cycles counts the cycles of the last
// run. host_raddr reads score with one cycle of latency. fwd_err reports a
// failed forwarding validity check (never expected); events carries one-cycle
// observation strobes for performance counting (see the end of the module).
// FLOAT = 1 switches the data to IEEE single precision (adder and multiplier
// from fp32_pkg); a floating-point adder is deeper, so II (= adder latency)
// is then normally raised as well, e.g. to 7. ADD_LAT (default II) may be set
// below II, for an II chosen larger than the adder needs. By default data are unsigned
// Q16.16. row_ptr must be non-decreasing with row_ptr[num_nodes] <= E_MAX and
// col_idx entries below N_MAX. The host port, fixed-point format and array
// sizes are this design's choices; the three-stage structure, the queues and
// the Stage 2 architecture follow the barrier-free, cross-level scheduled
// pipeline this RTL implements.
module selene_pr_top
  import selene_pkg::*;
#(
  parameter int N_MAX     = 1024,
  parameter int E_MAX     = 8192,
  parameter int II        = 2,
  parameter int MAX_CTX   = II,
  parameter int ADD_LAT   = II,
  parameter int OCQ_DEPTH = 4,
  parameter int IRQ_DEPTH = 4,
  parameter bit FLOAT     = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  node_t       num_nodes,
  output logic        done,
  output logic [31:0] run_cycles,
  input  logic        host_we,
  input  logic [1:0]  host_sel,
  input  logic [15:0] host_addr,
  input  data_t       host_wdata,
  input  node_t       host_raddr,
  output data_t       host_rdata,
  output logic        fwd_err,
  output logic [5:0]  events
);
  localparam int RPD = N_MAX + 1;
  localparam int RPA = $clog2(RPD);
  localparam int NA  = $clog2(N_MAX);
  localparam int EA  = $clog2(E_MAX);

  // ---------------- arrays
  logic [1:0][RPA-1:0]    rp_raddr;
  logic [1:0][EDGE_W-1:0] rp_rdata;
  logic                   rp_re;
  node_t                  rp_a0, rp_a1;
  logic [0:0][NODE_W-1:0] ci_rdata;
  logic [0:0][DATA_W-1:0] ct_rdata, sc_rdata;
  logic                   ci_re, ct_re, sc_we;
  edge_t                  ci_addr;
  node_t                  ct_addr, sc_addr;
  data_t                  sc_data;

  assign rp_raddr[0] = RPA'(rp_a0);
  assign rp_raddr[1] = RPA'(rp_a1);

  sync_ram #(.WIDTH(EDGE_W), .DEPTH(RPD), .NRD(2)) u_row_ptr (
    .clk(clk), .we(host_we && host_sel == 2'd0), .waddr(RPA'(host_addr)),
    .wdata(host_wdata[EDGE_W-1:0]), .re({2{rp_re}}), .raddr(rp_raddr), .rdata(rp_rdata));

  sync_ram #(.WIDTH(NODE_W), .DEPTH(E_MAX), .NRD(1)) u_col_idx (
    .clk(clk), .we(host_we && host_sel == 2'd1), .waddr(EA'(host_addr)),
    .wdata(host_wdata[NODE_W-1:0]), .re(ci_re), .raddr(EA'(ci_addr)), .rdata(ci_rdata));

  sync_ram #(.WIDTH(DATA_W), .DEPTH(N_MAX), .NRD(1)) u_contrib (
    .clk(clk), .we(host_we && host_sel == 2'd2), .waddr(NA'(host_addr)),
    .wdata(host_wdata), .re(ct_re), .raddr(NA'(ct_addr)), .rdata(ct_rdata));

  sync_ram #(.WIDTH(DATA_W), .DEPTH(N_MAX), .NRD(1)) u_score (
    .clk(clk), .we(sc_we), .waddr(NA'(sc_addr)),
    .wdata(sc_data), .re(1'b1), .raddr(NA'(host_raddr)), .rdata(sc_rdata));

  assign host_rdata = sc_rdata[0];

  // ---------------- Stage 1 and OC_Q
  logic                           oc_push, oc_valid, oc_ready;
  outer_ctx_t                     oc_in, oc_out;
  logic [$clog2(OCQ_DEPTH+1)-1:0] oc_count;
  logic                           oc_in_ready;
  logic                           s1_busy;

  outer_ctx_gen #(.Q_DEPTH(OCQ_DEPTH)) u_stage1 (
    .clk(clk), .rst_n(rst_n), .start(start), .num_nodes(num_nodes),
    .rp_re(rp_re), .rp_addr0(rp_a0), .rp_addr1(rp_a1),
    .rp_q0(rp_rdata[0]), .rp_q1(rp_rdata[1]),
    .oc_valid(oc_push), .oc_data(oc_in), .oc_count(oc_count), .busy(s1_busy));

  ctx_fifo #(.WIDTH(OUTER_CTX_W), .DEPTH(OCQ_DEPTH)) u_oc_q (
    .clk(clk), .rst_n(rst_n),
    .in_valid(oc_push), .in_ready(oc_in_ready), .in_data(oc_in),
    .out_valid(oc_valid), .out_ready(oc_ready), .out_data(oc_out), .count(oc_count));

  // ---------------- Stage 2 and IR_Q
  logic       ir_push, ir_in_ready, ir_valid, ir_ready;
  inner_res_t ir_in, ir_out;
  logic       s2_busy, ev_outer, ev_inner, ev_bubble, ev_stall, ev_multi;
  logic [$clog2(IRQ_DEPTH+1)-1:0] ir_count;

  stage2_pipe #(.II(II), .MAX_CTX(MAX_CTX), .ADD_LAT(ADD_LAT), .FLOAT(FLOAT)) u_stage2 (
    .clk(clk), .rst_n(rst_n),
    .oc_valid(oc_valid), .oc_ready(oc_ready), .oc_data(oc_out),
    .ci_re(ci_re), .ci_addr(ci_addr), .ci_q(ci_rdata[0]),
    .ct_re(ct_re), .ct_addr(ct_addr), .ct_q(ct_rdata[0]),
    .ir_valid(ir_push), .ir_ready(ir_in_ready), .ir_data(ir_in),
    .busy(s2_busy), .fwd_err(fwd_err),
    .ev_outer(ev_outer), .ev_inner(ev_inner), .ev_bubble(ev_bubble), .ev_stall(ev_stall), .ev_multi(ev_multi));

  ctx_fifo #(.WIDTH(INNER_RES_W), .DEPTH(IRQ_DEPTH)) u_ir_q (
    .clk(clk), .rst_n(rst_n),
    .in_valid(ir_push), .in_ready(ir_in_ready), .in_data(ir_in),
    .out_valid(ir_valid), .out_ready(ir_ready), .out_data(ir_out), .count(ir_count));

  // ---------------- Stage 3
  logic [NODE_W:0] n_done;
  logic            s3_busy;

  outer_epilogue #(.FLOAT(FLOAT)) u_stage3 (
    .clk(clk), .rst_n(rst_n), .start(start),
    .ir_valid(ir_valid), .ir_ready(ir_ready), .ir_data(ir_out),
    .sc_we(sc_we), .sc_addr(sc_addr), .sc_data(sc_data), .n_done(n_done), .busy(s3_busy));

  // ---------------- run control
  logic  run_q;
  node_t n_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run_q      <= 1'b0;
      done       <= 1'b0;
      n_q        <= '0;
      run_cycles <= '0;
    end else if (start) begin
      run_q      <= 1'b1;
      done       <= 1'b0;
      n_q        <= num_nodes;
      run_cycles <= '0;
    end else if (run_q) begin
      run_cycles <= run_cycles + 1'b1;
      if (n_done == {1'b0, n_q}) begin
        run_q <= 1'b0;
        done  <= 1'b1;
      end
    end
  end

  // Stage 1 pushes only with a credit; the queue must never refuse it.
  a_oc_credit: assert property (@(posedge clk) disable iff (!rst_n) oc_push |-> oc_in_ready);
  // Everything has drained when the last score is stored.
  a_drained: assert property (@(posedge clk) disable iff (!rst_n)
                              done |-> !(s1_busy || s2_busy || s3_busy || oc_valid || ir_valid));

  // Observation strobes: Stage 1 held back by a full OC_Q, several outer
  // contexts in flight, Stage 2 stalled, bubble, inner dispatch, outer dispatch.
  assign events = {s1_busy && !rp_re && !oc_in_ready, ev_multi, ev_stall, ev_bubble, ev_inner, ev_outer};

  logic unused;
  assign unused = ^{ir_count, host_addr};
endmodule
