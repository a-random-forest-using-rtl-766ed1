// vote_accumulator: the voter slice placed after each tree of the forest.
//
// The forest's trees are connected in series. Between one tree and the next
// sits a register stage with a voter: the vote counts travel down the chain
// with the feature vector, and each slice adds one to the count of the class
// its tree reached. When the vector leaves the last slice its counts hold
// the votes of all trees, so no all-to-all collection of labels is needed.
// A tree whose path did not end in a terminal, or whose label is not a
// valid class, casts no vote (this design's choice; a well-formed table
// never does that).
//
// Interface: in_valid, in_feats, in_counts (one CNT_W-bit count per class),
// in_term, in_label from the tree; out_* registered. Timing: one clock of
// latency, one vector per clock. Counts do not saturate: CNT_W must hold the
// number of trees.
module vote_accumulator #(
  parameter int unsigned NUM_FEAT  = rf_pkg::DEF_NUM_FEAT,
  parameter int unsigned FEAT_W    = rf_pkg::DEF_FEAT_W,
  parameter int unsigned NUM_CLASS = rf_pkg::DEF_NUM_CLASS,
  parameter int unsigned CNT_W     = $clog2(rf_pkg::DEF_NUM_TREES + 1),
  parameter int unsigned LBL_W     = (NUM_CLASS > 1) ? $clog2(NUM_CLASS) : 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  input  logic [NUM_FEAT-1:0][FEAT_W-1:0]    in_feats,
  input  logic [NUM_CLASS-1:0][CNT_W-1:0]    in_counts,
  input  logic                               in_term,
  input  logic [LBL_W-1:0]                   in_label,
  output logic                               out_valid,
  output logic [NUM_FEAT-1:0][FEAT_W-1:0]    out_feats,
  output logic [NUM_CLASS-1:0][CNT_W-1:0]    out_counts
);

  logic [NUM_CLASS-1:0][CNT_W-1:0] next_counts;

  always_comb begin
    next_counts = in_counts;
    for (int c = 0; c < NUM_CLASS; c++)
      if (in_term && (32'(in_label) == c))
        next_counts[c] = in_counts[c] + CNT_W'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    out_feats  <= in_feats;
    out_counts <= next_counts;
  end

endmodule
