// Test driver for one Axiline instance of any algorithm and size, used by the
// benchmark-size testbench. It builds its own engine, loads random weights,
// trains on NS samples, reads the trained weights back and then infers NI
// samples, comparing every prediction and weight with a sequential SGD
// reference model (tb_axl_ref_pkg). It checks the C + 1 cycle prediction
// latency and the C + 3 (training) and C (inference) sample periods.
module tb_axiline_run
  import axl_pkg::*;
  import tb_axl_ref_pkg::*;
#(
  parameter axl_alg_e ALG = ALG_LOGREG,
  parameter int F = 54, parameter int L = 8,
  parameter int NS = 4, parameter int NI = 3
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int C = (F + L - 1) / L, FW = $clog2(C * L), LR = 16, DECAY = 256;

  logic train, w_we, s_valid, s_ready, pred_valid, busy;
  logic [FW-1:0] w_addr, w_rd_addr;
  logic signed [15:0] w_wdata, w_rd_data, s_y, pred;
  logic signed [15:0] s_x [L];
  logic [31:0] updates;

  axiline #(.ALG(ALG), .FEATURES(F), .LANES(L), .LR(LR), .DECAY(DECAY)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL alg %0d F %0d: %s", int'(ALG), F, what); end
  endtask

  int xs [NS+NI][C*L];
  int ys [NS+NI];
  int wref [C*L];
  int href [NS+NI];
  int take_cyc [NS+NI];
  int npred = 0, cyc = 0;

  always @(negedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && pred_valid) begin
      check(npred < NS + NI, "extra prediction");
      if (npred < NS + NI) begin
        check(pred == 16'(href[npred]), $sformatf("sample %0d pred %0d vs %0d", npred, pred, href[npred]));
        check(cyc - take_cyc[npred] == C + 1, $sformatf("sample %0d latency %0d", npred, cyc - take_cyc[npred]));
      end
      npred++;
    end
  end

  initial begin : main
    int s, k, now, g;
    longint acc;
    checks = 0; failures = 0; finished = 0;
    train = 1; w_we = 0; w_addr = '0; w_wdata = '0; w_rd_addr = '0; s_valid = 0; s_y = '0;
    foreach (s_x[l]) s_x[l] = '0;
    for (int i = 0; i < NS + NI; i++) begin
      for (int f = 0; f < C*L; f++) xs[i][f] = (f < F) ? int'($urandom % 512) - 256 : 0;
      case (ALG)
        ALG_LINREG: ys[i] = int'($urandom % 1024) - 512;
        ALG_LOGREG: ys[i] = ($urandom % 2) ? ONE : 0;
        default:    ys[i] = ($urandom % 2) ? ONE : -ONE;
      endcase
    end
    for (int f = 0; f < C*L; f++) wref[f] = int'($urandom % 64) - 32;
    wait (rst_n === 1'b1);
    for (int f = 0; f < C*L; f++) begin
      @(negedge clk);
      w_we = 1; w_addr = FW'(f); w_wdata = 16'(wref[f]);
    end
    @(negedge clk) w_we = 0;
    for (s = 0; s < NS + NI; s++) begin
      acc = 0;
      for (int f = 0; f < C*L; f++) acc += longint'(xs[s][f]) * longint'(wref[f]);
      stage2(int'(ALG), acc, ys[s], LR, href[s], g);
      if (s < NS)
        for (int f = 0; f < C*L; f++) wref[f] = sgd(wref[f], g, xs[s][f], DECAY);
    end
    s = 0; k = 0;
    while (s < NS + NI) begin
      train = (s < NS);
      s_valid = 1;
      for (int l = 0; l < L; l++) s_x[l] = 16'(xs[s][k*L+l]);
      s_y = 16'(ys[s]);
      now = cyc;
      #1;
      if (s_ready) begin
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
      if (s == NS && k == 0) begin
        s_valid = 0;
        while (busy) @(negedge clk);
        check(updates == 32'(NS * C), $sformatf("updates %0d", updates));
        for (int f = 0; f < C*L; f++) begin
          w_rd_addr = FW'(f);
          #1 check(w_rd_data == 16'(wref[f]), $sformatf("trained w[%0d] %0d vs %0d", f, w_rd_data, wref[f]));
        end
        @(negedge clk);
      end
    end
    s_valid = 0;
    repeat (C + 4) @(negedge clk);
    check(npred == NS + NI, $sformatf("predictions %0d", npred));
    finished = 1;
  end
endmodule
