// Shared types and widths of the barrier-free PageRank pipeline.
//
// The pipeline moves three kinds of bundles between its stages:
//   outer_ctx_t  an outer-loop context {i, s, e, acc0} produced by Stage 1 and
//                queued in the outer context queue;
//   stage_tok_t  one issued pipeline token: which context slot it belongs to,
//                the node index i, the inner index j, the initial acc value and
//                the three control bits fwd / enable / exit that the control
//                unit attaches (forward the loop-carried value, perform the
//                inner-loop operations, the context leaves after this token);
//   inner_res_t  a finished inner-loop reduction {i, acc} for Stage 3.
// Widths are fixed here (16-bit node and edge indices, 32-bit data in unsigned
// Q16.16 fixed point); array depths are parameters of the modules that use them.
package selene_pkg;
  localparam int NODE_W = 16;   // node index width (i, v)
  localparam int EDGE_W = 16;   // edge index width (j, s, e)
  localparam int DATA_W = 32;   // data width (acc, contrib, score)
  localparam int FRAC   = 16;   // fraction bits of the fixed-point format
  localparam int SLOT_W = 4;    // context-slot index width (II up to 16)

  typedef logic [NODE_W-1:0] node_t;
  typedef logic [EDGE_W-1:0] edge_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [SLOT_W-1:0] slot_t;

  typedef struct packed {
    node_t i;
    edge_t s;
    edge_t e;
    data_t acc0;
  } outer_ctx_t;

  typedef struct packed {
    logic  valid;
    slot_t slot;
    node_t i;
    edge_t j;
    data_t acc0;
    logic  fwd;
    logic  enable;
    logic  exit_;
  } stage_tok_t;

  typedef struct packed {
    node_t i;
    data_t acc;
  } inner_res_t;

  localparam int OUTER_CTX_W = $bits(outer_ctx_t);
  localparam int INNER_RES_W = $bits(inner_res_t);
  localparam int TOK_W       = $bits(stage_tok_t);
endpackage
