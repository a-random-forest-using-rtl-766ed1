// tb_rf_mdd_top: end-to-end test of the MDD random-forest classifier at its
// default size (50 trees of 4 heights, 4 features, 3 classes, k = 4, 16
// nodes per height).
// Two random forests are loaded one after the other through the table
// port. For each, random feature vectors are streamed in bursts of one per
// clock with random gaps, and every result is compared with a model that
// walks all trees from their roots, counts the votes and takes the first
// class with the most votes. The latency of 50 * (4 + 1) + 2 clocks is
// checked for every result, and a burst must come out one result per clock.
// Mechanisms counted, each of which must occur: paths ending before the
// last height, full-length paths, a tree casting no vote (the second
// forest has a few non-terminal edges at its last height), a tie between
// classes, back-to-back results, pipeline bubbles, and a table reload.
module tb_rf_mdd_top;
  import rf_pkg::*;
  localparam int T = DEF_NUM_TREES, NF = DEF_NUM_FEAT, NC = DEF_NUM_CLASS;
  localparam int W = DEF_FEAT_W, K = DEF_K, L = DEF_LEVELS, NODES = DEF_NODES;
  localparam int E = 1 << K, PW = 5, CW = $clog2(T + 1);
  localparam int LAT = T * (L + 1) + 2;

  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg = '0;
  logic in_valid = 0;
  logic [NF-1:0][W-1:0] in_feats = '0;
  logic out_valid;
  logic [1:0] out_class;
  logic [CW-1:0] out_votes;
  logic [NC-1:0][CW-1:0] out_counts;

  rf_mdd_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_short = 0, n_full = 0, n_novote = 0, n_tie = 0, n_b2b = 0, n_bubble = 0;
  int n_reload = 0, n_results = 0;

  int fsel_m [T][L];
  int thr_m [T][L][K];
  logic [PW-1:0] mem_m [T][L][NODES * E];

  function automatic int to_int(logic [W-1:0] v);
    return (v >= (1 << (W-1))) ? int'(v) - (1 << W) : int'(v);
  endfunction

  // Walk tree t: label, or -1 when the path ends at no terminal.
  function automatic int walk(int t, logic [NF-1:0][W-1:0] f, output int depth);
    int node = 0;
    for (int l = 0; l < L; l++) begin
      int code = 0;
      logic [PW-1:0] e;
      for (int j = 0; j < K; j++) if (to_int(f[fsel_m[t][l]]) <= thr_m[t][l][j]) code += (1 << j);
      e = mem_m[t][l][node * E + code];
      if (e[PW-1]) begin depth = l + 1; return int'(e[3:0]); end
      node = int'(e[3:0]);
    end
    depth = L;
    return -1;
  endfunction

  task automatic cfg_write(int t, int lvl, cfg_sel_e s, int a, int d);
    @(negedge clk);
    cfg.we = 1; cfg.sel = s; cfg.tree = CFG_TREE_W'(t); cfg.level = CFG_LVL_W'(lvl);
    cfg.addr = CFG_ADDR_W'(a); cfg.data = CFG_DATA_W'(d);
  endtask


  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected results in order.
  int exp_cls_q [$], exp_votes_q [$], in_cyc_q [$];
  logic [NC-1:0][CW-1:0] exp_cnt_q [$];
  int cyc = 0, last_out = -10;
  int ec, ev, c0;
  logic [NC-1:0][CW-1:0] ecnt;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      checks++;
      n_results++;
      if (cyc - last_out == 1) n_b2b++;
      last_out = cyc;
      if (exp_cls_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        ec = exp_cls_q.pop_front();
        ev = exp_votes_q.pop_front();
        ecnt = exp_cnt_q.pop_front();
        c0 = in_cyc_q.pop_front();
        if (int'(out_class) != ec || int'(out_votes) != ev || out_counts !== ecnt ||
            cyc - c0 != LAT) begin
          failures++;
          $display("FAIL class %0d/%0d votes %0d/%0d latency %0d/%0d", out_class, ec,
                   out_votes, ev, cyc - c0, LAT);
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 2; r++) begin
      // Load forest r, one table word per clock.
      for (int t = 0; t < T; t++)
        for (int l = 0; l < L; l++) begin
          fsel_m[t][l] = $urandom_range(0, NF-1);
          cfg_write(t, l, CFG_FEATURE, 0, fsel_m[t][l]);
          for (int j = 0; j < K; j++) begin
            thr_m[t][l][j] = $urandom_range(0, 2000) - 1000;
            cfg_write(t, l, CFG_THRESH, j, thr_m[t][l][j] & ((1 << W) - 1));
          end
          for (int a = 0; a < NODES * E; a++) begin
            if (l == L-1 && r == 1 && $urandom_range(0, 15) == 0)
              mem_m[t][l][a] = {1'b0, 4'($urandom_range(0, NODES-1))};
            else if (l == L-1 || $urandom_range(0, 3) == 0)
              mem_m[t][l][a] = {1'b1, 4'($urandom_range(0, NC-1))};
            else
              mem_m[t][l][a] = {1'b0, 4'($urandom_range(0, NODES-1))};
            cfg_write(t, l, CFG_EDGE, a, int'(mem_m[t][l][a]));
          end
        end
      @(negedge clk);
      cfg.we = 0;
      if (r > 0) n_reload++;
      // Stream vectors: bursts with gaps.
      for (int i = 0; i < 1500; i++) begin
        int d, lab, best, bn, ties;
        int cnt [NC];
        logic [NC-1:0][CW-1:0] pc;
        @(negedge clk);
        in_valid = (i % 100 < 60) || ($urandom_range(0, 2) == 0);
        if (!in_valid) n_bubble++;
        for (int f = 0; f < NF; f++) in_feats[f] = W'($urandom_range(0, 2400) - 1200);
        if (in_valid) begin
          for (int c = 0; c < NC; c++) cnt[c] = 0;
          for (int t = 0; t < T; t++) begin
            lab = walk(t, in_feats, d);
            if (d < L) n_short++; else n_full++;
            if (lab < 0) n_novote++; else cnt[lab]++;
          end
          best = 0; bn = cnt[0]; ties = 0;
          for (int c = 1; c < NC; c++)
            if (cnt[c] > bn) begin best = c; bn = cnt[c]; ties = 0; end
            else if (cnt[c] == bn) ties = 1;
          n_tie += ties;
          for (int c = 0; c < NC; c++) pc[c] = CW'(cnt[c]);
          exp_cls_q.push_back(best); exp_votes_q.push_back(bn);
          exp_cnt_q.push_back(pc); in_cyc_q.push_back(cyc);
        end
      end
      @(negedge clk);
      in_valid = 0;
      repeat (LAT + 4) @(negedge clk);
    end
    $display("results %0d: short paths %0d, full paths %0d, no-vote trees %0d, ties %0d,",
             n_results, n_short, n_full, n_novote, n_tie);
    $display("back-to-back results %0d, bubbles %0d, reloads %0d", n_b2b, n_bubble, n_reload);
    checks++;
    if (exp_cls_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_cls_q.size()); end
    checks++;
    if (n_short == 0 || n_full == 0 || n_novote == 0 || n_tie == 0 || n_b2b == 0 ||
        n_bubble == 0 || n_reload == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
