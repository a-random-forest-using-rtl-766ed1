// mdd_level_stage: one height of an MDD(k) as one pipeline stage.
//
// The stage receives a feature vector and an edge pointer. The pointer is
// either a node of this height (terminal flag clear) or a class label already
// reached higher up (terminal flag set). For a node, the stage forms the
// super-variable value of this height (super_variable_eval) and reads the
// outgoing edge from the node memory at address {node, value}: the node
// memory is the multiplexer tree of the height, held in on-chip memory with
// 2^k edges per node. A terminal pointer passes through unchanged, so paths
// shorter than the number of heights simply ride along. The new pointer,
// the feature vector and an auxiliary word (the running vote counts in the
// forest) are registered: one stage = one clock of latency, and a new input
// can be accepted every clock.
//
// Edge pointer layout: {terminal, index[IDX_W-1:0]}. The index is a node
// number of the next height or, when terminal, a class label. The node memory
// has 2^clog2(NODES) slots of 2^k edges, and the node field is read modulo
// that, so NODES is best a power of two. NODE_W + k must fit the 16-bit
// write address.
//
// Table loading (wr_*) selects one of: the feature index, one of the k
// constants, or one edge (wr_addr = node * 2^k + value). Node memory is not
// reset; every edge a path can reach must be loaded before use. Writes and
// lookups may overlap; a lookup then sees the old or new edge depending on
// the clock edge order of the write, as for any on-chip RAM.
module mdd_level_stage #(
  parameter int unsigned NUM_FEAT = rf_pkg::DEF_NUM_FEAT,
  parameter int unsigned FEAT_W   = rf_pkg::DEF_FEAT_W,
  parameter int unsigned K        = rf_pkg::DEF_K,
  parameter int unsigned NODES    = rf_pkg::DEF_NODES,
  parameter int unsigned NUM_CLASS = rf_pkg::DEF_NUM_CLASS,
  parameter int unsigned AUX_W    = 1,
  localparam int unsigned IDX_W   = rf_pkg::ptr_idx_w(NODES, NUM_CLASS),
  localparam int unsigned PTR_W   = IDX_W + 1,
  localparam int unsigned NODE_W  = (NODES > 1) ? $clog2(NODES) : 1,
  localparam int unsigned ADDR_W  = NODE_W + K
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // table loading
  input  logic                             wr_en,
  input  rf_pkg::cfg_sel_e                 wr_sel,
  input  logic [rf_pkg::CFG_ADDR_W-1:0]    wr_addr,
  input  logic [rf_pkg::CFG_DATA_W-1:0]    wr_data,
  // pipeline input
  input  logic                             in_valid,
  input  logic [NUM_FEAT-1:0][FEAT_W-1:0]  in_feats,
  input  logic [AUX_W-1:0]                 in_aux,
  input  logic [PTR_W-1:0]                 in_ptr,
  // pipeline output (registered)
  output logic                             out_valid,
  output logic [NUM_FEAT-1:0][FEAT_W-1:0]  out_feats,
  output logic [AUX_W-1:0]                 out_aux,
  output logic [PTR_W-1:0]                 out_ptr
);

  localparam int unsigned KIDX_W = (K > 1) ? $clog2(K) : 1;

  logic [K-1:0]       sv_value;
  logic [PTR_W-1:0]   edge_mem [2**ADDR_W];
  logic [PTR_W-1:0]   next_ptr;
  logic [ADDR_W-1:0]  rd_addr;

  super_variable_eval #(
    .NUM_FEAT(NUM_FEAT), .FEAT_W(FEAT_W), .K(K)
  ) u_sv (
    .clk        (clk),
    .rst_n      (rst_n),
    .wr_feat_en (wr_en && wr_sel == rf_pkg::CFG_FEATURE),
    .wr_thr_en  (wr_en && wr_sel == rf_pkg::CFG_THRESH),
    .wr_thr_idx (wr_addr[KIDX_W-1:0]),
    .wr_data    (wr_data[FEAT_W-1:0]),
    .feats      (in_feats),
    .sv_value   (sv_value)
  );

  // Node memory: written one edge at a time.
  always_ff @(posedge clk) begin
    if (wr_en && wr_sel == rf_pkg::CFG_EDGE)
      edge_mem[wr_addr[ADDR_W-1:0]] <= wr_data[PTR_W-1:0];
  end

  assign rd_addr = {in_ptr[NODE_W-1:0], sv_value};

  always_comb begin
    if (in_ptr[PTR_W-1]) next_ptr = in_ptr;        // terminal already reached
    else                 next_ptr = edge_mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    out_feats <= in_feats;
    out_aux   <= in_aux;
    out_ptr   <= next_ptr;
  end

endmodule
