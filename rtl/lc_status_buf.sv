// Loop-carried context status buffer.
//
// One entry per context slot (II entries), each a valid bit and the current
// value of the loop-carried variable (the accumulator) of the outer-loop
// context in that slot. When a result of the loop-carried operator leaves the
// operator, the stage either stores it here (wr_en: the context continues) or
// clears the entry (clr_en: the context exited and its result left for the
// next stage). The forwarding multiplexer reads the entry of the slot whose
// token is entering the operator (rd_slot). Because a slot is revisited
// exactly every II cycles, the value it needs is written in the same cycle it
// is read when the operator latency equals II; the read therefore bypasses
// the array when the written slot is the one being read. Valid bits reset to
// 0; values are not reset.
//
// The entry count (II), the valid bit and the per-slot round-robin use follow
// the architecture; the write-through bypass realises its remark that a value
// produced exactly II cycles later can skip the buffer.
module lc_status_buf
  import selene_pkg::*;
#(
  parameter int II = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wr_en,
  input  logic  clr_en,
  input  slot_t wr_slot,
  input  data_t wr_data,
  input  slot_t rd_slot,
  output logic  rd_valid,
  output data_t rd_data
);
  logic  vld [II];
  data_t val [II];

  // Array indices: slot numbers cut to the width the II entries need.
  localparam int IW = (II > 1) ? $clog2(II) : 1;
  logic [IW-1:0] wi, ri;
  assign wi = wr_slot[IW-1:0];
  assign ri = rd_slot[IW-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < II; k++) vld[k] <= 1'b0;
    end else if (wr_en) begin
      vld[wi] <= 1'b1;
    end else if (clr_en) begin
      vld[wi] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) val[wi] <= wr_data;
  end

  always_comb begin
    if ((wr_en || clr_en) && (wr_slot == rd_slot)) begin
      rd_valid = wr_en;
      rd_data  = wr_data;
    end else begin
      rd_valid = vld[ri];
      rd_data  = val[ri];
    end
  end

  a_slot_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 (wr_en || clr_en) |-> 32'(wr_slot) < II);
endmodule
