// tb_majority_detector: checks the pipelined majority search.
// Streams random vote-count vectors (many with ties), one per clock, for
// five and three classes and compares class and vote count with the first
// maximum found by a linear scan, clog2(classes) clocks later.
module tb_majority_detector;
  localparam int CW = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_tie = 0;

  // Class counts 3 (the forest's default) and 5 (an uneven tournament).
  logic v3 = 0, o3v;
  logic [2:0][CW-1:0] c3 = '0;
  logic [1:0] o3c;
  logic [CW-1:0] o3n;
  majority_detector #(.NUM_CLASS(3), .CNT_W(CW)) dut3 (
    .clk(clk), .rst_n(rst_n), .in_valid(v3), .in_counts(c3),
    .out_valid(o3v), .out_class(o3c), .out_votes(o3n));

  logic v5 = 0, o5v;
  logic [4:0][CW-1:0] c5 = '0;
  logic [2:0] o5c;
  logic [CW-1:0] o5n;
  majority_detector #(.NUM_CLASS(5), .CNT_W(CW)) dut5 (
    .clk(clk), .rst_n(rst_n), .in_valid(v5), .in_counts(c5),
    .out_valid(o5v), .out_class(o5c), .out_votes(o5n));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected results in flight, indexed by the cycle they are due.
  int cyc = 0;
  int e3c [int], e3n [int], e5c [int], e5n [int];
  always @(posedge clk) begin
    #1;
    cyc++;
    checks += 2;
    if (o3v !== e3c.exists(cyc)) begin failures++; $display("FAIL valid3 at %0d", cyc); end
    else if (o3v && (int'(o3c) != e3c[cyc] || int'(o3n) != e3n[cyc])) begin
      failures++; $display("FAIL 3: got %0d/%0d exp %0d/%0d", o3c, o3n, e3c[cyc], e3n[cyc]);
    end
    if (o5v !== e5c.exists(cyc)) begin failures++; $display("FAIL valid5 at %0d", cyc); end
    else if (o5v && (int'(o5c) != e5c[cyc] || int'(o5n) != e5n[cyc])) begin
      failures++; $display("FAIL 5: got %0d/%0d exp %0d/%0d", o5c, o5n, e5c[cyc], e5n[cyc]);
    end
  end

  initial begin
    int best, bn, ties;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      v3 = $urandom_range(0, 3) != 0;
      v5 = $urandom_range(0, 3) != 0;
      for (int c = 0; c < 3; c++) c3[c] = CW'($urandom_range(0, 6));
      for (int c = 0; c < 5; c++) c5[c] = CW'($urandom_range(0, 6));
      if (v3) begin
        best = 0; bn = int'(c3[0]); ties = 0;
        for (int c = 1; c < 3; c++)
          if (int'(c3[c]) > bn) begin best = c; bn = int'(c3[c]); end
          else if (int'(c3[c]) == bn) ties = 1;
        e3c[cyc + 2] = best; e3n[cyc + 2] = bn; n_tie += ties;
      end
      if (v5) begin
        best = 0; bn = int'(c5[0]);
        for (int c = 1; c < 5; c++)
          if (int'(c5[c]) > bn) begin best = c; bn = int'(c5[c]); end
        e5c[cyc + 3] = best; e5n[cyc + 3] = bn;
      end
    end
    @(negedge clk);
    v3 = 0; v5 = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (n_tie == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
