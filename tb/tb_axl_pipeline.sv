// Testbench of the Axiline pipeline on its own, for all three algorithms at
// once (linear regression, logistic regression, SVM), with 4 lanes and
// 3 chunks per sample. The testbench plays the control block: it drives sel
// and ena[1] with each chunk, ena[2] one cycle after the last chunk and
// ena[3] DLY = C + 1 cycles after each chunk, and keeps the weight store,
// writing each w_new back. It checks pred and grad one cycle after ena[2]
// and every updated weight chunk against tb_axl_ref_pkg, so the timing of
// the delay chain is checked along with the arithmetic.
module tb_axl_pipeline;
  import axl_pkg::*;
  import tb_axl_ref_pkg::*;
  localparam int L = 4, C = 3, DLY = C + 1, P = C + 3, NS = 12, LR = 16, DECAY = 256;

  logic clk = 0, rst_n = 0;
  logic [3:1] ena;
  logic sel;
  logic signed [15:0] x [L];
  logic signed [15:0] w [3][L];
  logic signed [15:0] y [3];
  logic signed [15:0] sum [3], pred [3], grad [3];
  logic signed [15:0] w_new [3][L];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  for (genvar a = 0; a < 3; a++) begin : g_alg
    axl_pipeline #(.ALG(axl_alg_e'(a)), .LANES(L), .DW(16), .FRAC(8), .DLY(DLY),
                   .LR(LR), .DECAY(DECAY)) dut (
      .clk, .rst_n, .ena, .sel, .x, .w(w[a]), .y(y[a]),
      .sum(sum[a]), .pred(pred[a]), .grad(grad[a]), .w_new(w_new[a]));
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  int xs [NS][C*L];               // samples
  int ys [3][NS];
  int wstore [3][C*L];            // weight store fed back from w_new
  int wref [3][C*L];              // reference weights
  int href [3][NS], gref [3][NS];

  initial begin : main
    int s, o, prev_s, prev_o;
    bit prev_e2, prev_e3;
    for (int i = 0; i < NS; i++) begin
      for (int f = 0; f < C*L; f++) xs[i][f] = int'($urandom % 512) - 256;
      ys[0][i] = int'($urandom % 1024) - 512;
      ys[1][i] = ($urandom % 2) ? ONE : 0;
      ys[2][i] = ($urandom % 2) ? ONE : -ONE;
    end
    for (int a = 0; a < 3; a++)
      for (int f = 0; f < C*L; f++) begin
        wstore[a][f] = int'($urandom % 256) - 128;
        wref[a][f] = wstore[a][f];
      end
    ena = '0; sel = 0;
    foreach (x[l]) x[l] = '0;
    for (int a = 0; a < 3; a++) begin y[a] = '0; foreach (w[a][l]) w[a][l] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    prev_e2 = 0; prev_e3 = 0; prev_s = 0; prev_o = 0;
    for (int c = 0; c < NS * P + 2 * C + 4; c++) begin
      @(negedge clk);
      // results of the previous edge
      if (prev_e2)
        for (int a = 0; a < 3; a++) begin
          check(pred[a] == 16'(href[a][prev_s]), $sformatf("alg %0d sample %0d pred %0d vs %0d",
                a, prev_s, pred[a], href[a][prev_s]));
          check(grad[a] == 16'(gref[a][prev_s]), $sformatf("alg %0d sample %0d grad %0d vs %0d",
                a, prev_s, grad[a], gref[a][prev_s]));
        end
      if (prev_e3)
        for (int a = 0; a < 3; a++)
          for (int l = 0; l < L; l++) begin
            int f, r;
            f = (prev_o - DLY) * L + l;
            r = sgd(wref[a][f], gref[a][prev_s], xs[prev_s][f], DECAY);
            check(w_new[a][l] == 16'(r), $sformatf("alg %0d sample %0d w[%0d] %0d vs %0d",
                  a, prev_s, f, w_new[a][l], r));
            wstore[a][f] = w_new[a][l];
            wref[a][f] = r;
          end
      // controls for the next edge; sample s starts at cycle s * P
      ena = '0; sel = 0;
      prev_e2 = 0; prev_e3 = 0;
      for (int k = 0; k < 2; k++) begin
        s = c / P - k;
        o = c - s * P;
        if (s < 0 || s >= NS) continue;
        if (o == C)
          for (int a = 0; a < 3; a++) begin   // reference for this sample, from the weights it read
            longint acc;
            acc = 0;
            for (int f = 0; f < C*L; f++) acc += longint'(xs[s][f]) * longint'(wref[a][f]);
            stage2(a, acc, ys[a][s], LR, href[a][s], gref[a][s]);
          end
        if (o < C) begin
          ena[1] = 1; sel = (o == 0);
          for (int l = 0; l < L; l++) begin
            x[l] = 16'(xs[s][o*L+l]);
            for (int a = 0; a < 3; a++) w[a][l] = 16'(wstore[a][o*L+l]);
          end
          for (int a = 0; a < 3; a++) y[a] = 16'(ys[a][s]);
        end
        if (o == C) begin ena[2] = 1; prev_e2 = 1; prev_s = s; end
        if (o >= DLY && o < DLY + C) begin ena[3] = 1; prev_e3 = 1; prev_s = s; prev_o = o; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
