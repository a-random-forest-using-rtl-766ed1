// tb_vote_accumulator: checks the voter slice between two trees.
// Drives random count vectors and labels each clock and checks, one clock
// later, that exactly the count of the voted class went up by one (none for
// a non-terminal or out-of-range label) and that the features and valid
// follow.
module tb_vote_accumulator;
  localparam int NF = 4, W = 14, NC = 3, CW = 6, LW = 4;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_term = 0;
  logic [NF-1:0][W-1:0] in_feats = '0;
  logic [NC-1:0][CW-1:0] in_counts = '0;
  logic [LW-1:0] in_label = '0;
  logic out_valid;
  logic [NF-1:0][W-1:0] out_feats;
  logic [NC-1:0][CW-1:0] out_counts;

  vote_accumulator #(.NUM_FEAT(NF), .FEAT_W(W), .NUM_CLASS(NC), .CNT_W(CW),
                     .LBL_W(LW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_vote = 0, n_novote = 0;
  logic exp_valid = 0, checking = 0;
  logic [NF-1:0][W-1:0] exp_feats;
  int exp_cnt [NC];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (checking) begin
      #1;
      checks++;
      if (out_valid !== exp_valid || out_feats !== exp_feats) begin
        failures++; $display("FAIL valid/features");
      end
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (int'(out_counts[c]) != exp_cnt[c]) begin
          failures++; $display("FAIL count %0d got %0d exp %0d", c, out_counts[c], exp_cnt[c]);
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      in_valid = $urandom_range(0, 1);
      in_feats = {$urandom, $urandom};
      for (int c = 0; c < NC; c++) in_counts[c] = CW'($urandom_range(0, 50));
      in_term = ($urandom_range(0, 7) != 0);
      in_label = LW'($urandom_range(0, 4));
      exp_valid = in_valid; exp_feats = in_feats;
      for (int c = 0; c < NC; c++) exp_cnt[c] = int'(in_counts[c]);
      if (in_term && int'(in_label) < NC) begin
        exp_cnt[in_label]++; n_vote++;
      end else n_novote++;
      checking = 1;
    end
    @(negedge clk);
    checking = 0;
    checks++;
    if (n_vote == 0 || n_novote == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
