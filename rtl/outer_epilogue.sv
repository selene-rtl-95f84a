// Stage 3: outer-loop tail of the example kernel (nodes I and J).
//
// Pops finished reductions {i, acc} from the inner-result queue whenever one
// is present (it is always ready: the multiplier accepts one operation per
// cycle and the store never stalls), scales acc by DAMPING in a MUL_LAT-cycle
// pipelined multiplier (I), and writes score[i] on the cycle the
// product leaves the multiplier (J). n_done counts stored scores since the
// last start. Results may arrive in any node order, since outer-loop
// iterations of different lengths finish out of order; each carries its own i.
//
// The multiply-then-store tail and its 3-cycle multiplier follow the example;
// the damping value 0.85 (Q16.16, or 0x3F59999A in single precision when
// FLOAT = 1) is this design's choice.
module outer_epilogue
  import selene_pkg::*;
#(
  parameter int    MUL_LAT = 3,
  parameter bit    FLOAT   = 1'b0,
  parameter data_t DAMPING = FLOAT ? 32'h3F59_999A : 32'd55706
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       ir_valid,
  output logic       ir_ready,
  input  inner_res_t ir_data,
  output logic       sc_we,
  output node_t      sc_addr,
  output data_t      sc_data,
  output logic [NODE_W:0] n_done,
  output logic       busy
);
  logic  m_valid;
  node_t m_i;

  assign ir_ready = 1'b1;

  pipe_fu #(
    .LAT    (MUL_LAT),
    .IS_MUL (1'b1),
    .FLOAT  (FLOAT),
    .DATA_W (DATA_W),
    .FRAC   (FRAC),
    .TAG_W  (NODE_W)
  ) u_mul (
    .clk       (clk),
    .rst_n     (rst_n),
    .adv       (1'b1),
    .in_valid  (ir_valid),
    .en_op     (1'b1),
    .a         (ir_data.acc),
    .b         (DAMPING),
    .in_tag    (ir_data.i),
    .out_valid (m_valid),
    .y         (sc_data),
    .out_tag   (m_i),
    .busy      (busy)
  );

  assign sc_we   = m_valid;
  assign sc_addr = m_i;

  always_ff @(posedge clk) begin
    if (!rst_n || start) n_done <= '0;
    else if (sc_we)      n_done <= n_done + 1'b1;
  end
endmodule
