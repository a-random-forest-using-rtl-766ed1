// tb_super_variable_eval: checks the super-variable value of one MDD height.
// Loads random feature indices and constants, applies random signed
// fixed-point features and compares every bit with (feature <= constant)
// worked out on integers. Also checks the after-reset value (all ones).
module tb_super_variable_eval;
  localparam int NF = 4, W = 14, K = 4;

  logic clk = 0, rst_n = 0;
  logic wr_feat_en = 0, wr_thr_en = 0;
  logic [1:0] wr_thr_idx = '0;
  logic [W-1:0] wr_data = '0;
  logic [NF-1:0][W-1:0] feats = '0;
  logic [K-1:0] sv_value;

  int checks = 0, failures = 0;
  int thr_m [K];
  int fsel_m;

  super_variable_eval #(.NUM_FEAT(NF), .FEAT_W(W), .K(K)) dut (.*);

  always #5 clk = ~clk;

  function automatic int to_int(logic [W-1:0] v);
    return (v >= (1 << (W-1))) ? int'(v) - (1 << W) : int'(v);
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_value(string what);
    logic [K-1:0] exp;
    for (int j = 0; j < K; j++) exp[j] = (to_int(feats[fsel_m]) <= thr_m[j]);
    checks++;
    if (sv_value !== exp) begin
      failures++;
      $display("FAIL %s: feat=%0d got %b exp %b", what, to_int(feats[fsel_m]), sv_value, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // after reset: feature 0, all constants = max positive
    fsel_m = 0;
    for (int j = 0; j < K; j++) thr_m[j] = (1 << (W-1)) - 1;
    for (int i = 0; i < 20; i++) begin
      feats = {$urandom, $urandom};
      #1 check_value("reset");
    end
    for (int round = 0; round < 100; round++) begin
      @(negedge clk);
      wr_feat_en = 1; wr_data = W'($urandom_range(0, NF-1)); fsel_m = int'(wr_data);
      @(negedge clk);
      wr_feat_en = 0;
      for (int j = 0; j < K; j++) begin
        wr_thr_en = 1; wr_thr_idx = 2'(j); wr_data = W'($urandom);
        if (round % 4 == 0 && j == 1) wr_data = '0;
        thr_m[j] = to_int(wr_data);
        @(negedge clk);
      end
      wr_thr_en = 0;
      for (int i = 0; i < 10; i++) begin
        feats = {$urandom, $urandom};
        // sometimes hit a constant exactly, to test the <= boundary
        if (i == 0) feats[fsel_m] = W'(thr_m[0]);
        if (i == 1) feats[fsel_m] = W'(thr_m[1] + 1);
        #1 check_value("random");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
