// Pipelined functional unit (fixed point or single precision) with a
// per-operation enable.
//
// Computes y = en_op ? (a + b) : a  when IS_MUL = 0 (loop-carried adder H), or
//          y = en_op ? (a * b) >> FRAC : a  when IS_MUL = 1 (damping multiply I),
// on unsigned Q(DATA_W-FRAC).FRAC numbers, and delivers it LAT cycles after the
// operation entered, together with an opaque tag (the token that rides with
// the data). One operation can enter every cycle. All stages advance only
// while adv is high, so a global stall freezes operations in flight without
// losing or duplicating any. A disabled operation passes operand a unchanged,
// which is how an inner-loop operation is switched off for a token that only
// carries a context's accumulated value. busy is high while any operation is
// in flight.
//
// With FLOAT = 1 (DATA_W = 32) the operation is IEEE single-precision add or
// multiply instead (see fp32_pkg for its simplifications).
//
// The latencies (2 for the adder, 3 for the multiplier) are those of the
// schedule this design implements; the fixed-point format and the
// floating-point option are this design's choices. The result is formed in the first stage and delayed by the rest.
module pipe_fu
  import fp32_pkg::*;
#(
  parameter int  LAT    = 2,
  parameter bit  IS_MUL = 1'b0,
  parameter bit  FLOAT  = 1'b0,
  parameter int  DATA_W = 32,
  parameter int  FRAC   = 16,
  parameter int  TAG_W  = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              adv,
  input  logic              in_valid,
  input  logic              en_op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic [TAG_W-1:0]  in_tag,
  output logic              out_valid,
  output logic [DATA_W-1:0] y,
  output logic [TAG_W-1:0]  out_tag,
  output logic              busy
);
  logic [DATA_W-1:0]   res;
  logic [2*DATA_W-1:0] prod;

  always_comb begin
    prod = '0;
    if (!en_op) begin
      res = a;
    end else if (FLOAT) begin
      res = IS_MUL ? DATA_W'(fp_mul(32'(a), 32'(b))) : DATA_W'(fp_add(32'(a), 32'(b)));
    end else if (IS_MUL) begin
      prod = {{DATA_W{1'b0}}, a} * {{DATA_W{1'b0}}, b};
      res  = prod[FRAC +: DATA_W];
    end else begin
      res = a + b;
    end
  end

  logic              v_q [LAT];
  logic [DATA_W-1:0] d_q [LAT];
  logic [TAG_W-1:0]  t_q [LAT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < LAT; k++) v_q[k] <= 1'b0;
    end else if (adv) begin
      v_q[0] <= in_valid;
      for (int k = 1; k < LAT; k++) v_q[k] <= v_q[k-1];
    end
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      d_q[0] <= res;
      t_q[0] <= in_tag;
      for (int k = 1; k < LAT; k++) begin
        d_q[k] <= d_q[k-1];
        t_q[k] <= t_q[k-1];
      end
    end
  end

  assign out_valid = v_q[LAT-1];
  assign y         = d_q[LAT-1];
  assign out_tag   = t_q[LAT-1];

  always_comb begin
    busy = 1'b0;
    for (int k = 0; k < LAT; k++) busy |= v_q[k];
  end
endmodule
