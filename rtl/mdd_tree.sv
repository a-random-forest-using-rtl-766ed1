// mdd_tree: one decision tree of the forest, evaluated as an MDD(k).
//
// A tree is held as a multi-valued decision diagram with LEVELS heights.
// Every height tests one feature only once on any path, which is what makes
// the MDD path shorter than the binary tree's. The heights are a chain of
// mdd_level_stage pipeline stages: the pointer enters as node 0 of the first
// height (the root), each stage follows one edge, and after LEVELS clocks the
// pointer holds {terminal, class label}. A path that ends early carries its
// terminal through the remaining stages. A new feature vector can enter
// every clock.
//
// Interface: in_valid/in_feats/in_aux enter the pipeline; out_* leave it
// LEVELS clocks later, with out_term (a terminal was reached) and out_label.
// in_aux is carried alongside unchanged (the forest uses it for the vote
// counts). Table loading: wr_en with wr_level selects the height; wr_sel,
// wr_addr and wr_data are as in mdd_level_stage.
//
// The level-per-stage pipeline follows the source design's fully pipelined
// multiplexer trees; the root always being node 0 of height 0 and a height
// with no work for a path being skipped through the terminal flag only (a
// path that skips a height in the middle passes it through a node whose
// edges all point to the same child) are this design's choices.
module mdd_tree #(
  parameter int unsigned NUM_FEAT  = rf_pkg::DEF_NUM_FEAT,
  parameter int unsigned FEAT_W    = rf_pkg::DEF_FEAT_W,
  parameter int unsigned K         = rf_pkg::DEF_K,
  parameter int unsigned LEVELS    = rf_pkg::DEF_LEVELS,
  parameter int unsigned NODES     = rf_pkg::DEF_NODES,
  parameter int unsigned NUM_CLASS = rf_pkg::DEF_NUM_CLASS,
  parameter int unsigned AUX_W     = 1,
  localparam int unsigned IDX_W    = rf_pkg::ptr_idx_w(NODES, NUM_CLASS),
  localparam int unsigned PTR_W    = IDX_W + 1
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             wr_en,
  input  logic [rf_pkg::CFG_LVL_W-1:0]     wr_level,
  input  rf_pkg::cfg_sel_e                 wr_sel,
  input  logic [rf_pkg::CFG_ADDR_W-1:0]    wr_addr,
  input  logic [rf_pkg::CFG_DATA_W-1:0]    wr_data,
  input  logic                             in_valid,
  input  logic [NUM_FEAT-1:0][FEAT_W-1:0]  in_feats,
  input  logic [AUX_W-1:0]                 in_aux,
  output logic                             out_valid,
  output logic [NUM_FEAT-1:0][FEAT_W-1:0]  out_feats,
  output logic [AUX_W-1:0]                 out_aux,
  output logic                             out_term,
  output logic [IDX_W-1:0]                 out_label
);

  logic                             v    [LEVELS+1];
  logic [NUM_FEAT-1:0][FEAT_W-1:0]  f    [LEVELS+1];
  logic [AUX_W-1:0]                 a    [LEVELS+1];
  logic [PTR_W-1:0]                 p    [LEVELS+1];

  assign v[0] = in_valid;
  assign f[0] = in_feats;
  assign a[0] = in_aux;
  assign p[0] = '0;                 // root: node 0 of height 0

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    mdd_level_stage #(
      .NUM_FEAT(NUM_FEAT), .FEAT_W(FEAT_W), .K(K), .NODES(NODES),
      .NUM_CLASS(NUM_CLASS), .AUX_W(AUX_W)
    ) u_stage (
      .clk       (clk),
      .rst_n     (rst_n),
      .wr_en     (wr_en && (32'(wr_level) == l)),
      .wr_sel    (wr_sel),
      .wr_addr   (wr_addr),
      .wr_data   (wr_data),
      .in_valid  (v[l]),
      .in_feats  (f[l]),
      .in_aux    (a[l]),
      .in_ptr    (p[l]),
      .out_valid (v[l+1]),
      .out_feats (f[l+1]),
      .out_aux   (a[l+1]),
      .out_ptr   (p[l+1])
    );
  end

  assign out_valid = v[LEVELS];
  assign out_feats = f[LEVELS];
  assign out_aux   = a[LEVELS];
  assign out_term  = p[LEVELS][PTR_W-1];
  assign out_label = p[LEVELS][IDX_W-1:0];

endmodule
