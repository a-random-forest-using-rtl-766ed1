// super_variable_eval: value of the super variable tested at one MDD height.
//
// At each height of an MDD(k) one feature of the input vector is compared
// with k constants. Each comparison is one binary variable of the decision
// tree ("feature <= constant", the test a tree node makes); grouping the k
// comparisons of the same feature gives a k-bit super variable whose value
// selects one of the 2^k edges of the current node. This block holds the
// height's feature index and its k constants in registers written through a
// simple write port, and computes the k-bit value combinationally.
//
// Features and constants are n-bit signed fixed point (two's complement),
// compared as signed integers; this replaces the 32-bit floating point of
// software libraries, as in the source design. Bit j of sv_value is
// (feature <= thr[j]). After reset the feature index is 0 and every constant
// is the largest positive value, so every bit is 1 until loaded.
//
// Interface: wr_feat_en loads wr_data into the feature index; wr_thr_en loads
// wr_data into constant wr_thr_idx. Timing: writes take effect on the next
// clock edge; feats to sv_value is purely combinational.
module super_variable_eval #(
  parameter int unsigned NUM_FEAT = rf_pkg::DEF_NUM_FEAT,
  parameter int unsigned FEAT_W   = rf_pkg::DEF_FEAT_W,
  parameter int unsigned K        = rf_pkg::DEF_K,
  localparam int unsigned FIDX_W  = (NUM_FEAT > 1) ? $clog2(NUM_FEAT) : 1,
  localparam int unsigned KIDX_W  = (K > 1) ? $clog2(K) : 1
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             wr_feat_en,
  input  logic                             wr_thr_en,
  input  logic [KIDX_W-1:0]                wr_thr_idx,
  input  logic [FEAT_W-1:0]                wr_data,
  input  logic [NUM_FEAT-1:0][FEAT_W-1:0]  feats,
  output logic [K-1:0]                     sv_value
);

  logic [FIDX_W-1:0]        feat_sel;
  logic [K-1:0][FEAT_W-1:0] thr;
  logic [FEAT_W-1:0]        x;

  localparam logic [FEAT_W-1:0] MAX_POS = {1'b0, {(FEAT_W-1){1'b1}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      feat_sel <= '0;
      thr      <= {K{MAX_POS}};
    end else begin
      if (wr_feat_en) feat_sel <= wr_data[FIDX_W-1:0];
      if (wr_thr_en && (32'(wr_thr_idx) < K)) thr[wr_thr_idx] <= wr_data;
    end
  end

  // Feature select multiplexer; an index past the last feature reads 0.
  always_comb begin
    x = '0;
    if (32'(feat_sel) < NUM_FEAT) x = feats[feat_sel];
  end

  always_comb begin
    for (int j = 0; j < K; j++)
      sv_value[j] = ($signed(x) <= $signed(thr[j]));
  end

endmodule
