// Loop-carried operator stage (node H of the example): forwarding multiplexer,
// pipelined adder and result demultiplexer.
//
// A token arriving with its operand c first gets its accumulator input from
// the forwarding multiplexer: with fwd = 1 the value the same context produced
// on its previous iteration, read from the loop-carried context status buffer
// at the token's slot; with fwd = 0 the context's initial value acc0. The
// adder (ADD_LAT cycles, one operation per cycle) adds c when the token's
// enable is set and passes the accumulator through otherwise. When the result
// leaves the adder the demultiplexer routes it by the token's exit bit: an
// exiting context's result {i, acc} goes to the inner-result queue and its
// buffer entry is cleared; any other result is written back to the buffer for
// the context's next iteration. Everything holds while adv is low. busy is
// high while an operation is inside the adder.
//
// The validity check of the architecture is kept as a check: a token with
// fwd = 1 must find its slot valid. fwd_err flags a violation, and an
// assertion stops a simulation on it. The adder latency may be anything from
// 1 to II: a slot's next token arrives II cycles after the previous one, so a
// result that leaves the adder earlier waits in the status buffer, and one
// that leaves exactly II cycles later passes the buffer by.
module lc_accum
  import selene_pkg::*;
#(
  parameter int II      = 2,
  parameter int ADD_LAT = II,
  parameter bit FLOAT   = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       adv,
  input  stage_tok_t tok,
  input  data_t      c,
  output logic       res_valid,
  output inner_res_t res,
  output logic       fwd_err,
  output logic       busy
);
  logic       buf_valid;
  data_t      buf_data;
  data_t      acc_in;
  logic       o_valid;
  data_t      o_acc;
  stage_tok_t o_tok;

  // MUX2: forwarded loop-carried value or the context's initial value.
  assign acc_in  = tok.fwd ? buf_data : tok.acc0;
  assign fwd_err = adv && tok.valid && tok.fwd && !buf_valid;

  pipe_fu #(
    .LAT    (ADD_LAT),
    .IS_MUL (1'b0),
    .FLOAT  (FLOAT),
    .DATA_W (DATA_W),
    .FRAC   (FRAC),
    .TAG_W  (TOK_W)
  ) u_add (
    .clk       (clk),
    .rst_n     (rst_n),
    .adv       (adv),
    .in_valid  (tok.valid),
    .en_op     (tok.enable),
    .a         (acc_in),
    .b         (c),
    .in_tag    (tok),
    .out_valid (o_valid),
    .y         (o_acc),
    .out_tag   (o_tok),
    .busy      (busy)
  );

  // DEMUX: exit -> inner result queue, otherwise -> status buffer.
  lc_status_buf #(.II(II)) u_buf (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (adv && o_valid && !o_tok.exit_),
    .clr_en   (adv && o_valid && o_tok.exit_),
    .wr_slot  (o_tok.slot),
    .wr_data  (o_acc),
    .rd_slot  (tok.slot),
    .rd_valid (buf_valid),
    .rd_data  (buf_data)
  );

  assign res_valid = o_valid && o_tok.exit_;
  assign res.i     = o_tok.i;
  assign res.acc   = o_acc;

  initial begin
    assert (ADD_LAT >= 1 && ADD_LAT <= II) else $error("lc_accum: ADD_LAT must be 1 to II");
  end
  a_fwd_valid: assert property (@(posedge clk) disable iff (!rst_n) !fwd_err);
endmodule
