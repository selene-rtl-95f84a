// On-chip array with one write port and NRD synchronous read ports.
//
// Models the on-chip arrays of the kernel (row_ptr, col_idx, contrib, score).
// A read port whose re bit is high at a clock edge presents mem[raddr] on its
// rdata lane from the next cycle on and holds it while re stays low, so a
// stalled pipeline keeps the loaded value. Writes take effect at the clock
// edge; a read of the address being written in the same cycle returns the old
// value. Contents are not reset. The one-cycle read latency is this design's
// choice, matching the one-cycle loads of the schedule it implements.
module sync_ram #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 1024,
  parameter int NRD   = 1
) (
  input  logic                                   clk,
  input  logic                                   we,
  input  logic [$clog2(DEPTH)-1:0]               waddr,
  input  logic [WIDTH-1:0]                       wdata,
  input  logic [NRD-1:0]                         re,
  input  logic [NRD-1:0][$clog2(DEPTH)-1:0]      raddr,
  output logic [NRD-1:0][WIDTH-1:0]              rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  for (genvar p = 0; p < NRD; p++) begin : g_rd
    always_ff @(posedge clk) begin
      if (re[p]) rdata[p] <= mem[raddr[p]];
    end
  end
endmodule
