// rf_forest_workload: runs one forest shape through rf_mdd_top and checks
// it against the binary trees it was made from.
//
// For each of the T trees it grows a random binary decision tree (BDT) over
// L of the F features, with at most K distinct constants per feature, in
// F_W-bit signed fixed point. It then converts the BDT into the MDD(K) the
// hardware evaluates:
//   * height l tests feature ord[l]; its constants are the sorted distinct
//     constants the BDT compares that feature with, unused ones are set to
//     the largest value (their comparison is always true);
//   * the n constants cut the feature into n+1 intervals, and interval i is
//     the super-variable value whose bits j >= i are 1; any other value maps
//     to the interval of its lowest set bit;
//   * every combination of intervals is classified by the BDT, and the
//     diagram is built from the last height up: an edge into a part of the
//     diagram that always gives the same class becomes a terminal of that
//     class, and nodes with the same edges are merged.
// A tree whose MDD needs more than NODES nodes at some height is grown
// again. The forest is loaded through the table port, NVEC random vectors
// (some exactly on constants) are streamed, and every result must equal the
// majority vote (lowest class on a tie) of the BDTs evaluated directly with
// if-then-else tests. It also reports node counts and longest paths of the
// BDTs against the MDDs; an MDD node there is one with at least two
// different edges, and heights a tree does not test are ordered last.
module rf_forest_workload #(
  parameter string NAME = "forest",
  parameter int T = 50, parameter int F = 4, parameter int C = 3,
  parameter int L = 4, parameter int NODES = 16, parameter int K = 4,
  parameter int W = 14, parameter int NVEC = 300
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import rf_pkg::*;
  localparam int E = 1 << K;
  localparam int IDX_W = ptr_idx_w(NODES, C);
  localparam int LBL_W = (C > 1) ? $clog2(C) : 1;
  localparam int CW = $clog2(T + 1);
  localparam int LAT = T * (L + 1) + ((C > 1) ? $clog2(C) : 1);
  localparam int MAXI = 9, MAXN = 2 * MAXI + 1, MAXD = 6;
  localparam int MAXV = (1 << (W - 1)) - 1;

  cfg_wr_t cfg;
  logic in_valid;
  logic [F-1:0][W-1:0] in_feats;
  logic out_valid;
  logic [LBL_W-1:0] out_class;
  logic [CW-1:0] out_votes;
  logic [C-1:0][CW-1:0] out_counts;

  rf_mdd_top #(.NUM_TREES(T), .NUM_FEAT(F), .NUM_CLASS(C), .FEAT_W(W), .K(K),
               .LEVELS(L), .NODES(NODES)) dut (.*);

  // The BDTs.
  int b_n [T];
  int b_feat [T][MAXN], b_thr [T][MAXN], b_left [T][MAXN], b_right [T][MAXN];
  int b_leaf [T][MAXN], b_cls [T][MAXN], b_dep [T][MAXN];
  int ord [T][L];            // feature tested at each height
  int pool_n [T][L];         // constants available per height's feature
  int pool [T][L][K];
  // The MDD tables.
  int nthr [T][L];
  int thr [T][L][K];
  int edge_m [T][L][NODES * E];
  int nodes_at [T][L];       // node slots used per height
  int real_at [T][L];        // of those, nodes with at least two different edges
  int mdd_lp [T];            // longest path counted in such nodes

  int bdt_nodes = 0, mdd_nodes = 0, slots = 0, bdt_lpl = 0, mdd_lpl = 0, regrown = 0;

  function automatic int to_int(logic [W-1:0] v);
    return (v >= (1 << (W-1))) ? int'(v) - (1 << W) : int'(v);
  endfunction

  function automatic int bdt_eval(int t, int x [F]);
    int n = 0;
    while (!b_leaf[t][n]) n = (x[b_feat[t][n]] <= b_thr[t][n]) ? b_left[t][n] : b_right[t][n];
    return b_cls[t][n];
  endfunction

  task automatic grow(int t);
    int perm [F];
    int target, tries, lf, h, j;
    for (int f = 0; f < F; f++) perm[f] = f;
    for (int f = F - 1; f > 0; f--) begin
      j = $urandom_range(0, f);
      h = perm[f]; perm[f] = perm[j]; perm[j] = h;
    end
    for (int l = 0; l < L; l++) begin
      int base = $urandom_range(0, 1600) - 800, step = $urandom_range(1, 200);
      ord[t][l] = perm[l];
      pool_n[t][l] = $urandom_range(1, K);
      for (int k = 0; k < K; k++) pool[t][l][k] = base + k * step;
    end
    b_n[t] = 1; b_leaf[t][0] = 1; b_cls[t][0] = $urandom_range(0, C-1); b_dep[t][0] = 0;
    target = $urandom_range(2, MAXI);
    for (int s = 0; s < target; s++) begin
      for (tries = 0; tries < 20; tries++) begin
        lf = $urandom_range(0, b_n[t] - 1);
        if (b_leaf[t][lf] && b_dep[t][lf] < MAXD) break;
      end
      if (tries == 20) break;
      h = $urandom_range(0, L - 1);
      b_leaf[t][lf] = 0;
      b_feat[t][lf] = ord[t][h];
      b_thr[t][lf] = pool[t][h][$urandom_range(0, pool_n[t][h] - 1)];
      b_left[t][lf] = b_n[t]; b_right[t][lf] = b_n[t] + 1;
      for (int c = 0; c < 2; c++) begin
        b_leaf[t][b_n[t] + c] = 1;
        b_cls[t][b_n[t] + c] = $urandom_range(0, C-1);
        b_dep[t][b_n[t] + c] = b_dep[t][lf] + 1;
      end
      b_n[t] += 2;
    end
    // Heights whose feature the tree tests come first, so that paths end
    // as soon as the tested features are resolved.
    begin
      int no [L], pn [L], pv [L][K];
      int m = 0;
      for (int pass = 0; pass < 2; pass++)
        for (int l = 0; l < L; l++) begin
          bit used = 0;
          for (int n = 0; n < b_n[t]; n++)
            if (!b_leaf[t][n] && b_feat[t][n] == ord[t][l]) used = 1;
          if (used == (pass == 0)) begin
            no[m] = ord[t][l]; pn[m] = pool_n[t][l];
            for (int k = 0; k < K; k++) pv[m][k] = pool[t][l][k];
            m++;
          end
        end
      for (int l = 0; l < L; l++) begin
        ord[t][l] = no[l]; pool_n[t][l] = pn[l];
        for (int k = 0; k < K; k++) pool[t][l][k] = pv[l][k];
      end
    end
  endtask

  // Convert BDT t to its MDD; 0 when a height needs more than NODES nodes.
  function automatic bit to_mdd(int t);
    int nI [L];
    int rep [L][K+1];
    int pcount [L+1];
    int cst_next [], id_next [], cst_cur [], id_cur [], lp_next [], lp_cur [];
    int diff, lpm;
    int x [F];
    int e [K+1];
    int ids [string];
    string sig;
    int nn, q, rem, iv, same;
    // constants of each height
    for (int l = 0; l < L; l++) begin
      nthr[t][l] = 0;
      for (int k = 0; k < pool_n[t][l]; k++) begin
        bit used = 0;
        for (int n = 0; n < b_n[t]; n++)
          if (!b_leaf[t][n] && b_feat[t][n] == ord[t][l] && b_thr[t][n] == pool[t][l][k]) used = 1;
        if (used) begin thr[t][l][nthr[t][l]] = pool[t][l][k]; nthr[t][l]++; end
      end
      for (int k = nthr[t][l]; k < K; k++) thr[t][l][k] = MAXV;
      nI[l] = nthr[t][l] + 1;
      for (int i = 0; i < nI[l]; i++)
        rep[l][i] = (i < nthr[t][l]) ? thr[t][l][i] : ((nthr[t][l] > 0) ? thr[t][l][nthr[t][l]-1] + 1 : 0);
    end
    pcount[0] = 1;
    for (int l = 0; l < L; l++) pcount[l+1] = pcount[l] * nI[l];
    // classes of all interval combinations (height 0 = most significant digit)
    cst_next = new[pcount[L]];
    id_next = new[pcount[L]];
    lp_next = new[pcount[L]];
    for (int p = 0; p < pcount[L]; p++) begin
      for (int f = 0; f < F; f++) x[f] = 0;
      rem = p;
      for (int l = L - 1; l >= 0; l--) begin
        x[ord[t][l]] = rep[l][rem % nI[l]];
        rem = rem / nI[l];
      end
      cst_next[p] = bdt_eval(t, x);
      id_next[p] = -1;
      lp_next[p] = 0;
    end
    for (int l = L - 1; l >= 0; l--) begin
      cst_cur = new[pcount[l]];
      id_cur = new[pcount[l]];
      lp_cur = new[pcount[l]];
      ids.delete();
      nn = 0;
      real_at[t][l] = 0;
      for (int p = 0; p < pcount[l]; p++) begin
        same = 1;
        sig = "";
        for (int i = 0; i < nI[l]; i++) begin
          q = p * nI[l] + i;
          e[i] = (cst_next[q] >= 0) ? ((1 << IDX_W) | cst_next[q]) : id_next[q];
          if (cst_next[q] < 0 || cst_next[q] != cst_next[p * nI[l]]) same = 0;
          sig = {sig, $sformatf("%0d,", e[i])};
        end
        cst_cur[p] = same ? cst_next[p * nI[l]] : -1;
        id_cur[p] = -1;
        // a node whose edges all lead to the same place only passes a
        // height; it is not a node of the diagram proper
        diff = 0; lpm = 0;
        for (int i = 0; i < nI[l]; i++) begin
          if (e[i] != e[0]) diff = 1;
          if (lp_next[p * nI[l] + i] > lpm) lpm = lp_next[p * nI[l] + i];
        end
        lp_cur[p] = same ? 0 : lpm + diff;
        if (!same || l == 0) begin
          if (!ids.exists(sig)) begin
            if (nn == NODES) return 0;
            ids[sig] = nn;
            if (diff) real_at[t][l]++;
            for (int code = 0; code < E; code++) begin
              iv = nthr[t][l];
              for (int j = nthr[t][l] - 1; j >= 0; j--) if (code[j]) iv = j;
              edge_m[t][l][nn * E + code] = e[iv];
            end
            nn++;
          end
          id_cur[p] = ids[sig];
        end
      end
      nodes_at[t][l] = nn;
      for (int n = nn; n < NODES; n++)
        for (int code = 0; code < E; code++) edge_m[t][l][n * E + code] = 1 << IDX_W;
      cst_next = cst_cur;
      id_next = id_cur;
      lp_next = lp_cur;
    end
    mdd_lp[t] = lp_next[0];
    return 1;
  endfunction

  task automatic cfg_write(int t, int l, cfg_sel_e s, int a, int d);
    @(negedge clk);
    cfg.we = 1; cfg.sel = s; cfg.tree = CFG_TREE_W'(t); cfg.level = CFG_LVL_W'(l);
    cfg.addr = CFG_ADDR_W'(a); cfg.data = CFG_DATA_W'(d);
  endtask

  int exp_q [$], cyc_q [$];
  logic [C-1:0][CW-1:0] cnt_q [$];
  int cyc = 0, ec, c0;
  logic [C-1:0][CW-1:0] ecnt;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("%s: FAIL unexpected result", NAME); end
      else begin
        ec = exp_q.pop_front(); ecnt = cnt_q.pop_front(); c0 = cyc_q.pop_front();
        if (int'(out_class) != ec || out_counts !== ecnt || cyc - c0 != LAT) begin
          failures++;
          $display("%s: FAIL class %0d exp %0d, latency %0d exp %0d", NAME, out_class, ec,
                   cyc - c0, LAT);
        end
      end
    end
  end

  initial begin
    int x [F];
    int cnt [C];
    int best, lp;
    logic [C-1:0][CW-1:0] pc;
    done = 0; checks = 0; failures = 0;
    cfg = '0; in_valid = 0; in_feats = '0;
    for (int t = 0; t < T; t++) begin
      grow(t);
      while (!to_mdd(t)) begin regrown++; grow(t); end
      bdt_nodes += b_n[t];
      lp = 0;
      for (int n = 0; n < b_n[t]; n++) if (b_dep[t][n] > lp) lp = b_dep[t][n];
      bdt_lpl += lp;
      for (int l = 0; l < L; l++) begin
        mdd_nodes += real_at[t][l];
        slots += nodes_at[t][l];
      end
      mdd_lpl += mdd_lp[t];
    end
    @(posedge rst_n);
    for (int t = 0; t < T; t++)
      for (int l = 0; l < L; l++) begin
        cfg_write(t, l, CFG_FEATURE, 0, ord[t][l]);
        for (int k = 0; k < K; k++) cfg_write(t, l, CFG_THRESH, k, thr[t][l][k] & ((1 << W) - 1));
        for (int a = 0; a < NODES * E; a++) cfg_write(t, l, CFG_EDGE, a, edge_m[t][l][a]);
      end
    @(negedge clk);
    cfg.we = 0;
    for (int v = 0; v < NVEC; v++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      for (int f = 0; f < F; f++) begin
        x[f] = $urandom_range(0, 2400) - 1200;
        if ($urandom_range(0, 3) == 0) begin
          int t = $urandom_range(0, T - 1), n = $urandom_range(0, b_n[t] - 1);
          if (!b_leaf[t][n] && b_feat[t][n] == f) x[f] = b_thr[t][n];
        end
        in_feats[f] = W'(x[f]);
      end
      if (in_valid) begin
        for (int c = 0; c < C; c++) cnt[c] = 0;
        for (int t = 0; t < T; t++) cnt[bdt_eval(t, x)]++;
        best = 0;
        for (int c = 1; c < C; c++) if (cnt[c] > cnt[best]) best = c;
        for (int c = 0; c < C; c++) pc[c] = CW'(cnt[c]);
        exp_q.push_back(best); cnt_q.push_back(pc); cyc_q.push_back(cyc);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%s: FAIL results missing", NAME); end
    $display("%s: %0d trees, BDT nodes %0d, MDD nodes %0d (node slots used %0d), sum of longest paths BDT %0d MDD %0d, regrown %0d",
             NAME, T, bdt_nodes, mdd_nodes, slots, bdt_lpl, mdd_lpl, regrown);
    done = 1;
  end
endmodule
