// Axiline at the three benchmark sizes: logistic regression over 54
// features, SVM over 200 features and linear regression over 784 features,
// each a separate engine with 8 lanes (7, 25 and 98 chunks per sample). Each
// trains on a few samples and then infers (tb_axiline_run does the checking).
module tb_axiline_benchmarks;
  import axl_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks [3], failures [3];
  logic finished [3];

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2] + 1);
    $finish;
  end

  tb_axiline_run #(.ALG(ALG_LOGREG), .F(54))  u_logreg (.clk, .rst_n, .checks(checks[0]), .failures(failures[0]), .finished(finished[0]));
  tb_axiline_run #(.ALG(ALG_SVM),    .F(200)) u_svm    (.clk, .rst_n, .checks(checks[1]), .failures(failures[1]), .finished(finished[1]));
  tb_axiline_run #(.ALG(ALG_LINREG), .F(784)) u_linreg (.clk, .rst_n, .checks(checks[2]), .failures(failures[2]), .finished(finished[2]));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(posedge clk);   // the drivers clear their flags at time 0
    wait (finished[0] && finished[1] && finished[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2]);
    $finish;
  end
endmodule
