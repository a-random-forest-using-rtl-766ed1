// majority_detector: picks the most frequent label from the vote counts.
//
// After the last tree the running counts hold one vote total per class; the
// forest's answer is the class with the most votes. The search is a
// pipelined tournament: classes are paired, each pair keeps the one with
// more votes, and a register follows every round, so a new count vector can
// enter every clock. On equal votes the lower class number wins (this
// design's choice, which matches taking the first maximum).
//
// Interface: in_valid/in_counts in; out_valid, out_class (winning class) and
// out_votes (its vote count) after LAT = max(1, clog2(NUM_CLASS)) clocks.
module majority_detector #(
  parameter int unsigned NUM_CLASS = rf_pkg::DEF_NUM_CLASS,
  parameter int unsigned CNT_W     = $clog2(rf_pkg::DEF_NUM_TREES + 1),
  localparam int unsigned LBL_W    = (NUM_CLASS > 1) ? $clog2(NUM_CLASS) : 1,
  localparam int unsigned ROUNDS   = (NUM_CLASS > 1) ? $clog2(NUM_CLASS) : 1,
  localparam int unsigned SLOTS    = 2**ROUNDS
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            in_valid,
  input  logic [NUM_CLASS-1:0][CNT_W-1:0] in_counts,
  output logic                            out_valid,
  output logic [LBL_W-1:0]                out_class,
  output logic [CNT_W-1:0]                out_votes
);

  typedef struct packed {
    logic             used;   // slot holds a real class
    logic [LBL_W-1:0] cls;
    logic [CNT_W-1:0] votes;
  } cand_t;

  // cand[r] holds SLOTS >> r candidates entering round r.
  cand_t cand  [ROUNDS+1][SLOTS];
  logic  valid [ROUNDS+1];

  always_comb begin
    for (int s = 0; s < SLOTS; s++) begin
      cand[0][s].used  = (s < NUM_CLASS);
      cand[0][s].cls   = LBL_W'(s);
      cand[0][s].votes = (s < NUM_CLASS) ? in_counts[s] : '0;
    end
  end
  assign valid[0] = in_valid;

  for (genvar r = 0; r < ROUNDS; r++) begin : g_round
    localparam int unsigned N = SLOTS >> (r + 1);
    for (genvar s = 0; s < N; s++) begin : g_pair
      cand_t a, b, w;
      assign a = cand[r][2*s];
      assign b = cand[r][2*s+1];
      // b wins only with strictly more votes (or when a is empty).
      assign w = (b.used && (!a.used || b.votes > a.votes)) ? b : a;
      always_ff @(posedge clk) cand[r+1][s] <= w;
    end
    for (genvar s = N; s < SLOTS; s++) begin : g_unused
      always_ff @(posedge clk) cand[r+1][s] <= '0;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) valid[r+1] <= 1'b0;
      else        valid[r+1] <= valid[r];
    end
  end

  assign out_valid = valid[ROUNDS];
  assign out_class = cand[ROUNDS][0].cls;
  assign out_votes = cand[ROUNDS][0].votes;

endmodule
