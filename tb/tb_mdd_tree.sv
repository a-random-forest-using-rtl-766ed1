// tb_mdd_tree: checks one tree held as an MDD(k) with LEVELS heights.
// Builds a random, well-formed MDD (the last height points only to
// terminals, the others to nodes of the next height or early terminals),
// loads it, streams random feature vectors one per clock and compares the
// label with a model that walks the same diagram from the root. Checks the
// latency of LEVELS clocks and that both early-ending and full-length paths
// occurred.
module tb_mdd_tree;
  import rf_pkg::*;
  localparam int NF = 4, W = 14, K = 4, L = 4, NODES = 16, NC = 3, AW = 6;
  localparam int PW = 5, E = 1 << K;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [CFG_LVL_W-1:0] wr_level = '0;
  cfg_sel_e wr_sel = CFG_FEATURE;
  logic [CFG_ADDR_W-1:0] wr_addr = '0;
  logic [CFG_DATA_W-1:0] wr_data = '0;
  logic in_valid = 0;
  logic [NF-1:0][W-1:0] in_feats = '0;
  logic [AW-1:0] in_aux = '0;
  logic out_valid, out_term;
  logic [NF-1:0][W-1:0] out_feats;
  logic [AW-1:0] out_aux;
  logic [3:0] out_label;

  mdd_tree #(.NUM_FEAT(NF), .FEAT_W(W), .K(K), .LEVELS(L), .NODES(NODES),
             .NUM_CLASS(NC), .AUX_W(AW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_short = 0, n_full = 0;
  int fsel_m [L];
  int thr_m [L][K];
  logic [PW-1:0] mem_m [L][NODES * E];

  function automatic int to_int(logic [W-1:0] v);
    return (v >= (1 << (W-1))) ? int'(v) - (1 << W) : int'(v);
  endfunction

  // Walk the diagram; returns the label, and the number of heights used.
  function automatic int walk(logic [NF-1:0][W-1:0] f, output int depth);
    int node = 0;
    for (int l = 0; l < L; l++) begin
      int code = 0;
      logic [PW-1:0] e;
      for (int j = 0; j < K; j++) if (to_int(f[fsel_m[l]]) <= thr_m[l][j]) code += (1 << j);
      e = mem_m[l][node * E + code];
      if (e[PW-1]) begin depth = l + 1; return int'(e[3:0]); end
      node = int'(e[3:0]);
    end
    depth = L;
    return -1;
  endfunction

  task automatic cfg_write(int lvl, cfg_sel_e s, int a, int d);
    @(negedge clk);
    wr_en = 1; wr_level = CFG_LVL_W'(lvl); wr_sel = s;
    wr_addr = CFG_ADDR_W'(a); wr_data = CFG_DATA_W'(d);
    @(negedge clk);
    wr_en = 0;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected results, queued at input time and matched L clocks later.
  int exp_q [$];
  logic [AW-1:0] aux_q [$];
  int cyc = 0, in_cyc_q [$];
  always @(posedge clk) cyc++;

  int e, c0;
  logic [AW-1:0] a;
  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        e = exp_q.pop_front();
        a = aux_q.pop_front();
        c0 = in_cyc_q.pop_front();
        if (!out_term || int'(out_label) != e || out_aux !== a || cyc - c0 != L) begin
          failures++;
          $display("FAIL label %0d/%0d term %b aux %h/%h latency %0d", out_label, e,
                   out_term, out_aux, a, cyc - c0);
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      for (int l = 0; l < L; l++) begin
        fsel_m[l] = $urandom_range(0, NF-1);
        cfg_write(l, CFG_FEATURE, 0, fsel_m[l]);
        for (int j = 0; j < K; j++) begin
          thr_m[l][j] = $urandom_range(0, 2000) - 1000;
          cfg_write(l, CFG_THRESH, j, thr_m[l][j] & ((1 << W) - 1));
        end
        for (int a = 0; a < NODES * E; a++) begin
          if (l == L-1 || $urandom_range(0, 3) == 0)
            mem_m[l][a] = {1'b1, 4'($urandom_range(0, NC-1))};
          else
            mem_m[l][a] = {1'b0, 4'($urandom_range(0, NODES-1))};
          cfg_write(l, CFG_EDGE, a, int'(mem_m[l][a]));
        end
      end
      for (int i = 0; i < 400; i++) begin
        int d, lab;
        @(negedge clk);
        in_valid = ($urandom_range(0, 4) != 0);
        for (int f = 0; f < NF; f++) in_feats[f] = W'($urandom_range(0, 2400) - 1200);
        in_aux = AW'($urandom);
        if (in_valid) begin
          lab = walk(in_feats, d);
          if (d < L) n_short++; else n_full++;
          exp_q.push_back(lab); aux_q.push_back(in_aux); in_cyc_q.push_back(cyc);
        end
      end
      @(negedge clk);
      in_valid = 0;
      repeat (L + 2) @(negedge clk);
    end
    checks++;
    if (exp_q.size() != 0 || n_short == 0 || n_full == 0) begin
      failures++;
      $display("FAIL left=%0d short=%0d full=%0d", exp_q.size(), n_short, n_full);
    end
    $display("short paths %0d, full paths %0d", n_short, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
