// Context queue: a synchronous FIFO with a ready/valid interface on both sides.
//
// It decouples the stages of the pipeline, carrying outer contexts from
// Stage 1 to Stage 2 and finished reductions from Stage 2 to Stage 3. A producer
// pushes when in_valid && in_ready; a consumer pops when out_valid && out_ready.
// in_ready means "not full" and does not look at out_ready, so a full queue
// stalls its producer for a cycle even if the consumer pops (a design choice
// that keeps the two handshakes independent). The head entry is visible on
// out_data in the same cycle it becomes valid (fall-through of the storage
// array, no extra latency). count gives the occupancy so that a producer with
// a load in flight can use credit-based flow control. Depth and width are
// parameters; the queue is built from a register array and two pointers.
module ctx_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [WIDTH-1:0]           in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [WIDTH-1:0]           out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;
  logic             push, pop;

  assign in_ready  = (count != CW'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // Handshake rules: never push into a full queue or pop an empty one.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH));
  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> count != '0);
endmodule
