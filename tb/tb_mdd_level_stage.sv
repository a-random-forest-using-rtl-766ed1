// tb_mdd_level_stage: checks one MDD height as a pipeline stage.
// Fills the node memory with random edges, loads the height's feature and
// constants, then streams one random (feature vector, pointer) per clock and
// compares the registered next pointer with a model that forms the
// super-variable value from integer comparisons and reads its own copy of
// the edge table. Terminal pointers must pass through unchanged; feature
// vector, auxiliary word and valid must follow with one clock of latency.
module tb_mdd_level_stage;
  import rf_pkg::*;
  localparam int NF = 4, W = 14, K = 4, NODES = 16, NC = 3, AW = 8;
  localparam int PW = 5;   // {terminal, 4-bit index}

  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  cfg_sel_e wr_sel = CFG_FEATURE;
  logic [CFG_ADDR_W-1:0] wr_addr = '0;
  logic [CFG_DATA_W-1:0] wr_data = '0;
  logic in_valid = 0;
  logic [NF-1:0][W-1:0] in_feats = '0;
  logic [AW-1:0] in_aux = '0;
  logic [PW-1:0] in_ptr = '0;
  logic out_valid;
  logic [NF-1:0][W-1:0] out_feats;
  logic [AW-1:0] out_aux;
  logic [PW-1:0] out_ptr;

  mdd_level_stage #(.NUM_FEAT(NF), .FEAT_W(W), .K(K), .NODES(NODES),
                    .NUM_CLASS(NC), .AUX_W(AW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_term = 0, n_node = 0;
  logic [PW-1:0] mem_m [NODES * (1 << K)];
  int thr_m [K];
  int fsel_m;

  function automatic int to_int(logic [W-1:0] v);
    return (v >= (1 << (W-1))) ? int'(v) - (1 << W) : int'(v);
  endfunction

  function automatic logic [PW-1:0] model(logic [NF-1:0][W-1:0] f, logic [PW-1:0] p);
    int code = 0;
    if (p[PW-1]) return p;
    for (int j = 0; j < K; j++) if (to_int(f[fsel_m]) <= thr_m[j]) code += (1 << j);
    return mem_m[int'(p[3:0]) * (1 << K) + code];
  endfunction

  task automatic cfg_write(cfg_sel_e s, int a, int d);
    @(negedge clk);
    wr_en = 1; wr_sel = s; wr_addr = CFG_ADDR_W'(a); wr_data = CFG_DATA_W'(d);
    @(negedge clk);
    wr_en = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected outputs of the previous clock's input.
  logic exp_valid = 0;
  logic [PW-1:0] exp_ptr;
  logic [NF-1:0][W-1:0] exp_feats;
  logic [AW-1:0] exp_aux;
  logic checking = 0;

  always @(posedge clk) begin
    if (checking) begin
      #1;
      checks++;
      if (out_valid !== exp_valid) begin
        failures++; $display("FAIL valid got %b exp %b", out_valid, exp_valid);
      end
      if (exp_valid) begin
        checks++;
        if (out_ptr !== exp_ptr || out_feats !== exp_feats || out_aux !== exp_aux) begin
          failures++;
          $display("FAIL ptr got %h exp %h aux %h/%h", out_ptr, exp_ptr, out_aux, exp_aux);
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      fsel_m = $urandom_range(0, NF-1);
      cfg_write(CFG_FEATURE, 0, fsel_m);
      for (int j = 0; j < K; j++) begin
        thr_m[j] = $urandom_range(0, 4000) - 2000;
        cfg_write(CFG_THRESH, j, thr_m[j] & ((1 << W) - 1));
      end
      for (int a = 0; a < NODES * (1 << K); a++) begin
        mem_m[a] = PW'($urandom);
        if (mem_m[a][PW-1]) mem_m[a][3:0] = 4'($urandom_range(0, NC-1));
        cfg_write(CFG_EDGE, a, int'(mem_m[a]));
      end
      checking = 1;
      for (int i = 0; i < 500; i++) begin
        @(negedge clk);
        in_valid = ($urandom_range(0, 3) != 0);
        for (int f = 0; f < NF; f++) in_feats[f] = W'($urandom_range(0, 4400) - 2200);
        in_aux = AW'($urandom);
        in_ptr = PW'($urandom);
        if (in_ptr[PW-1]) n_term++; else n_node++;
        exp_valid = in_valid; exp_feats = in_feats; exp_aux = in_aux;
        exp_ptr = model(in_feats, in_ptr);
      end
      @(negedge clk);
      in_valid = 0; exp_valid = 0;
      @(negedge clk);
      checking = 0;
    end
    checks++;
    if (n_term == 0 || n_node == 0) begin
      failures++; $display("FAIL terminal pass-through or node lookup never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
