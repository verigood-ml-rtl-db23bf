// Testbench of the Axiline engine (control, weight store and pipeline) for
// all three algorithms side by side, with 10 features on 4 lanes (3 chunks
// per sample). It loads random weights, trains on a stream of samples, reads
// the weights back and compares them with a sequential SGD reference model
// (tb_axl_ref_pkg), and then runs inference with the trained weights. It
// checks every prediction, that a prediction comes C + 1 cycles after the
// first chunk of its sample, that training accepts a sample every C + 3
// cycles and inference every C cycles, and the count of weight write-backs.
module tb_axiline;
  import axl_pkg::*;
  import tb_axl_ref_pkg::*;
  localparam int F = 10, L = 4, C = (F + L - 1) / L, FW = $clog2(C * L);
  localparam int NS = 10, NI = 8, LR = 16, DECAY = 256;

  logic clk = 0, rst_n = 0, train;
  logic w_we;
  logic [FW-1:0] w_addr, w_rd_addr;
  logic signed [15:0] w_wdata;
  logic signed [15:0] w_rd_data [3];
  logic s_valid;
  logic s_ready [3];
  logic signed [15:0] s_x [L];
  logic signed [15:0] s_y [3];
  logic pred_valid [3], busy [3];
  logic signed [15:0] pred [3];
  logic [31:0] updates [3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  for (genvar a = 0; a < 3; a++) begin : g_alg
    axiline #(.ALG(axl_alg_e'(a)), .FEATURES(F), .LANES(L), .LR(LR), .DECAY(DECAY)) dut (
      .clk, .rst_n, .train, .w_we, .w_addr, .w_wdata, .w_rd_addr,
      .w_rd_data(w_rd_data[a]), .s_valid, .s_ready(s_ready[a]), .s_x, .s_y(s_y[a]),
      .pred_valid(pred_valid[a]), .pred(pred[a]), .busy(busy[a]), .updates(updates[a]));
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  int xs [NS+NI][C*L];
  int ys [3][NS+NI];
  int wref [3][C*L];
  int href [3][NS+NI];
  int take_cyc [NS+NI];
  int npred [3];

  // reference: sequential SGD over the training samples, then inference
  function automatic void reference();
    longint acc;
    int g;
    for (int s = 0; s < NS + NI; s++)
      for (int a = 0; a < 3; a++) begin
        acc = 0;
        for (int f = 0; f < C*L; f++) acc += longint'(xs[s][f]) * longint'(wref[a][f]);
        stage2(a, acc, ys[a][s], LR, href[a][s], g);
        if (s < NS)
          for (int f = 0; f < C*L; f++) wref[a][f] = sgd(wref[a][f], g, xs[s][f], DECAY);
      end
  endfunction

  int cyc = 0;
  always @(negedge clk) begin
    cyc <= cyc + 1;
    for (int a = 0; a < 3; a++)
      if (rst_n && pred_valid[a]) begin
        int s;
        s = npred[a];
        check(s < NS + NI, "extra prediction");
        if (s < NS + NI) begin
          check(pred[a] == 16'(href[a][s]), $sformatf("alg %0d sample %0d pred %0d vs %0d",
                a, s, pred[a], href[a][s]));
          check(cyc - take_cyc[s] == C + 1, $sformatf("alg %0d sample %0d latency %0d",
                a, s, cyc - take_cyc[s]));
        end
        npred[a]++;
      end
  end

  int w0 [3][C*L];
  initial begin : main
    int s, k, now;
    for (int i = 0; i < NS + NI; i++) begin
      for (int f = 0; f < C*L; f++) xs[i][f] = (f < F) ? int'($urandom % 512) - 256 : 0;
      ys[0][i] = int'($urandom % 1024) - 512;
      ys[1][i] = ($urandom % 2) ? ONE : 0;
      ys[2][i] = ($urandom % 2) ? ONE : -ONE;
    end
    for (int a = 0; a < 3; a++) begin
      npred[a] = 0;
      for (int f = 0; f < C*L; f++) begin
        w0[a][f] = int'($urandom % 256) - 128;
        wref[a][f] = w0[a][f];
      end
    end
    train = 1; w_we = 0; w_addr = '0; w_wdata = '0; w_rd_addr = '0; s_valid = 0;
    foreach (s_x[l]) s_x[l] = '0;
    foreach (s_y[a]) s_y[a] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // the host port is shared, so all three instances start from one weight set
    for (int f = 0; f < C*L; f++) begin
      @(negedge clk);
      w_we = 1; w_addr = FW'(f); w_wdata = 16'(w0[0][f]);
    end
    @(negedge clk) w_we = 0;
    for (int a = 0; a < 3; a++) for (int f = 0; f < C*L; f++) wref[a][f] = w0[0][f];
    reference();
    // stream: training samples, then inference samples
    s = 0; k = 0;
    while (s < NS + NI) begin
      train = (s < NS);
      s_valid = 1;
      for (int l = 0; l < L; l++) s_x[l] = 16'(xs[s][k*L+l]);
      for (int a = 0; a < 3; a++) s_y[a] = 16'(ys[a][s]);
      now = cyc;
      #1;
      if (s_ready[0]) begin
        check(s_ready[1] && s_ready[2], "instances in step");
        if (k == 0) begin
          take_cyc[s] = now;
          if (s > 0 && s != NS)
            check(take_cyc[s] - take_cyc[s-1] == ((s < NS) ? C + 3 : C),
                  $sformatf("sample %0d period %0d", s, take_cyc[s] - take_cyc[s-1]));
        end
        if (k == C - 1) begin k = 0; s++; end
        else k++;
      end
      @(negedge clk);
      if (s == NS && k == 0) begin   // let training finish before reading the weights
        s_valid = 0;
        while (busy[0]) @(negedge clk);
        for (int a = 0; a < 3; a++) begin
          check(updates[a] == 32'(NS * C), $sformatf("alg %0d updates %0d", a, updates[a]));
          for (int f = 0; f < C*L; f++) begin
            w_rd_addr = FW'(f);
            #1 check(w_rd_data[a] == 16'(wref[a][f]), $sformatf("alg %0d trained w[%0d] %0d vs %0d",
                     a, f, w_rd_data[a], wref[a][f]));
          end
        end
        @(negedge clk);
      end
    end
    s_valid = 0;
    repeat (C + 4) @(negedge clk);
    for (int a = 0; a < 3; a++) begin
      check(npred[a] == NS + NI, $sformatf("alg %0d predictions %0d", a, npred[a]));
      check(updates[a] == 32'(NS * C), "inference left the weights alone");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
