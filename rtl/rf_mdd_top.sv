// rf_mdd_top: fully pipelined random-forest classifier built from MDD trees.
//
// A random forest classifies a feature vector by letting every tree vote for
// a class and taking the majority. Here each tree is stored as a
// multi-valued decision diagram MDD(k) (mdd_tree), whose paths test each
// feature at most once and are therefore short. The trees are connected in
// series: a feature vector enters tree 0, and after every tree a voter slice
// (vote_accumulator) adds that tree's vote to a per-class count that travels
// with the vector. After the last tree, majority_detector picks the class
// with the most votes. Every stage is registered and nothing stalls, so one
// feature vector is accepted and one class is produced every clock once the
// pipeline is full.
//
// Interface:
//   cfg       table-loading write port (rf_pkg::cfg_wr_t): tree, height,
//             target (feature index / constant / edge), address, data.
//             Load all tables before streaming vectors.
//   in_valid, in_feats   one vector of NUM_FEAT n-bit signed fixed-point
//             features per clock (no back-pressure).
//   out_valid, out_class, out_votes, out_counts   the winning class, its
//             vote count and all class counts, LATENCY clocks after input.
// Timing: LATENCY = NUM_TREES * (LEVELS + 1) + max(1, clog2(NUM_CLASS)).
// An assertion flags table writes to a tree or height that does not exist.
//
// The series chain of trees with registers and voters between them, the
// on-chip tables, the signed fixed-point features and the default forest
// size (50 trees, 4 features, 3 classes, MDD paths of at most 4 heights)
// follow the source design. k = 4 constants per height, 16 node slots per
// height, the write-port layout and the tie rule are this design's choices.
module rf_mdd_top #(
  parameter int unsigned NUM_TREES = rf_pkg::DEF_NUM_TREES,
  parameter int unsigned NUM_FEAT  = rf_pkg::DEF_NUM_FEAT,
  parameter int unsigned NUM_CLASS = rf_pkg::DEF_NUM_CLASS,
  parameter int unsigned FEAT_W    = rf_pkg::DEF_FEAT_W,
  parameter int unsigned K         = rf_pkg::DEF_K,
  parameter int unsigned LEVELS    = rf_pkg::DEF_LEVELS,
  parameter int unsigned NODES     = rf_pkg::DEF_NODES,
  localparam int unsigned CNT_W    = $clog2(NUM_TREES + 1),
  localparam int unsigned LBL_W    = (NUM_CLASS > 1) ? $clog2(NUM_CLASS) : 1,
  localparam int unsigned IDX_W    = rf_pkg::ptr_idx_w(NODES, NUM_CLASS),
  localparam int unsigned LATENCY  = NUM_TREES * (LEVELS + 1) +
                                     ((NUM_CLASS > 1) ? $clog2(NUM_CLASS) : 1)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  rf_pkg::cfg_wr_t                 cfg,
  input  logic                            in_valid,
  input  logic [NUM_FEAT-1:0][FEAT_W-1:0] in_feats,
  output logic                            out_valid,
  output logic [LBL_W-1:0]                out_class,
  output logic [CNT_W-1:0]                out_votes,
  output logic [NUM_CLASS-1:0][CNT_W-1:0] out_counts
);

  localparam int unsigned AUX_W = NUM_CLASS * CNT_W;

  // Chain state between trees: entry t feeds tree t.
  logic                            cv [NUM_TREES+1];
  logic [NUM_FEAT-1:0][FEAT_W-1:0] cf [NUM_TREES+1];
  logic [NUM_CLASS-1:0][CNT_W-1:0] cc [NUM_TREES+1];

  assign cv[0] = in_valid;
  assign cf[0] = in_feats;
  assign cc[0] = '0;

  for (genvar t = 0; t < NUM_TREES; t++) begin : g_tree
    logic                            tv;
    logic [NUM_FEAT-1:0][FEAT_W-1:0] tf;
    logic [AUX_W-1:0]                ta;
    logic                            tterm;
    logic [IDX_W-1:0]                tlabel;

    mdd_tree #(
      .NUM_FEAT(NUM_FEAT), .FEAT_W(FEAT_W), .K(K), .LEVELS(LEVELS),
      .NODES(NODES), .NUM_CLASS(NUM_CLASS), .AUX_W(AUX_W)
    ) u_tree (
      .clk       (clk),
      .rst_n     (rst_n),
      .wr_en     (cfg.we && (32'(cfg.tree) == t)),
      .wr_level  (cfg.level),
      .wr_sel    (cfg.sel),
      .wr_addr   (cfg.addr),
      .wr_data   (cfg.data),
      .in_valid  (cv[t]),
      .in_feats  (cf[t]),
      .in_aux    (AUX_W'(cc[t])),
      .out_valid (tv),
      .out_feats (tf),
      .out_aux   (ta),
      .out_term  (tterm),
      .out_label (tlabel)
    );

    vote_accumulator #(
      .NUM_FEAT(NUM_FEAT), .FEAT_W(FEAT_W), .NUM_CLASS(NUM_CLASS),
      .CNT_W(CNT_W), .LBL_W(IDX_W)
    ) u_vote (
      .clk        (clk),
      .rst_n      (rst_n),
      .in_valid   (tv),
      .in_feats   (tf),
      .in_counts  (ta),
      .in_term    (tterm),
      .in_label   (tlabel),
      .out_valid  (cv[t+1]),
      .out_feats  (cf[t+1]),
      .out_counts (cc[t+1])
    );
  end

  majority_detector #(
    .NUM_CLASS(NUM_CLASS), .CNT_W(CNT_W)
  ) u_major (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (cv[NUM_TREES]),
    .in_counts (cc[NUM_TREES]),
    .out_valid (out_valid),
    .out_class (out_class),
    .out_votes (out_votes)
  );

  // The full count vector, delayed to line up with the detector's result.
  localparam int unsigned DET_LAT = (NUM_CLASS > 1) ? $clog2(NUM_CLASS) : 1;
  logic [NUM_CLASS-1:0][CNT_W-1:0] cnt_dly [DET_LAT+1];
  assign cnt_dly[0] = cc[NUM_TREES];
  for (genvar d = 0; d < DET_LAT; d++) begin : g_cdly
    always_ff @(posedge clk) cnt_dly[d+1] <= cnt_dly[d];
  end
  assign out_counts = cnt_dly[DET_LAT];

  // A table write must name an existing tree and height.
  always_ff @(posedge clk) begin
    if (cfg.we)
      assert (32'(cfg.tree) < NUM_TREES && 32'(cfg.level) < LEVELS)
        else $error("table write to tree %0d height %0d outside the forest",
                    cfg.tree, cfg.level);
  end

endmodule
