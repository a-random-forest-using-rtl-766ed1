// tb_rf_workloads: the classifier at the forest shapes of seven data sets.
// Each instance of rf_forest_workload builds a random forest with the tree
// count, feature count, class count and longest MDD path of one data set
// (Iris at the default parameters), converts its binary trees into MDDs,
// runs random vectors through rf_mdd_top and checks every result against
// the binary trees' majority vote. The trees are random, not trained on the
// data sets, and are kept small (at most 9 tests each) so that every height
// fits the default 16 node slots. Iris and Hayes-Roth run with their full
// tree counts (50 and 15); the five larger shapes run 6 of their 25-30
// trees each, with their full feature, class and height counts, to keep the
// simulator's build time to a few minutes.
module tb_rf_workloads;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int N = 7;
  logic done [N];
  int ck [N], fl [N];

  rf_forest_workload #(.NAME("Iris"), .T(50), .F(4), .C(3), .L(4)) w0 (
    .clk(clk), .rst_n(rst_n), .done(done[0]), .checks(ck[0]), .failures(fl[0]));
  rf_forest_workload #(.NAME("Hayes-Roth"), .T(15), .F(5), .C(3), .L(5)) w1 (
    .clk(clk), .rst_n(rst_n), .done(done[1]), .checks(ck[1]), .failures(fl[1]));
  rf_forest_workload #(.NAME("Contraceptive Method"), .T(6), .F(9), .C(3), .L(9)) w2 (
    .clk(clk), .rst_n(rst_n), .done(done[2]), .checks(ck[2]), .failures(fl[2]));
  rf_forest_workload #(.NAME("Glass Identification"), .T(6), .F(10), .C(7), .L(10)) w3 (
    .clk(clk), .rst_n(rst_n), .done(done[3]), .checks(ck[3]), .failures(fl[3]));
  rf_forest_workload #(.NAME("Hepatitis"), .T(6), .F(19), .C(2), .L(15)) w4 (
    .clk(clk), .rst_n(rst_n), .done(done[4]), .checks(ck[4]), .failures(fl[4]));
  rf_forest_workload #(.NAME("Dermatology"), .T(6), .F(33), .C(6), .L(15)) w5 (
    .clk(clk), .rst_n(rst_n), .done(done[5]), .checks(ck[5]), .failures(fl[5]));
  rf_forest_workload #(.NAME("Ionosphere"), .T(6), .F(34), .C(2), .L(20)) w6 (
    .clk(clk), .rst_n(rst_n), .done(done[6]), .checks(ck[6]), .failures(fl[6]));

  int checks, failures, all_done;

  initial begin
    repeat (400000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < N; i++) begin checks += ck[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int i = 0; i < N; i++) if (!done[i]) all_done = 0;
    end while (!all_done);
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin checks += ck[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
