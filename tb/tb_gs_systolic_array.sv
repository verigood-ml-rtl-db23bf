// Self-checking testbench for gs_systolic_array (4 x 3 array, 4 weight slots).
// Loads random weights into every PE and random biases, streams input vectors
// back to back (switching weight slot between vectors), and checks every
// column's result against a matrix-vector product computed here, including
// the M + n + 1 cycle latency of column n.
module tb_gs_systolic_array;
  localparam int M = 4, N = 3, ACT_W = 8, WGT_W = 8, PSUM_W = 32, WD = 4, NV = 12;
  logic clk = 0, rst_n = 0;
  logic in_valid, bias_en;
  logic signed [ACT_W-1:0] act_in [M];
  logic [1:0] w_slot;
  logic w_wr_en [M];
  logic [1:0] w_wr_col [M];
  logic [1:0] w_wr_addr [M];
  logic signed [WGT_W-1:0] w_wr_data [M];
  logic signed [PSUM_W-1:0] bias [N];
  logic out_valid [N];
  logic signed [PSUM_W-1:0] out_data [N];
  int checks = 0, failures = 0;
  logic signed [WGT_W-1:0] W [WD][M][N];
  logic signed [ACT_W-1:0] X [NV][M];
  int slot_of [NV];
  int t_in [NV];
  int got [N];
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  gs_systolic_array #(.M(M), .N(N), .ACT_W(ACT_W), .WGT_W(WGT_W), .PSUM_W(PSUM_W),
                      .WMEM_DEPTH(WD)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // check results as they appear at the bottom of each column
  for (genvar n = 0; n < N; n++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n && out_valid[n]) begin
        automatic int v = got[n];
        automatic logic signed [PSUM_W-1:0] e = bias_en ? bias[n] : 0;
        for (int m = 0; m < M; m++) e += PSUM_W'(X[v][m]) * PSUM_W'(W[slot_of[v]][m][n]);
        check(out_data[n] == e, $sformatf("col %0d vec %0d got %0d exp %0d", n, v, out_data[n], e));
        check(cyc - t_in[v] == M + n + 1, $sformatf("col %0d latency %0d", n, cyc - t_in[v]));
        got[n] = v + 1;
      end
    end
  end

  initial begin
    in_valid = 0; bias_en = 1; w_slot = 0;
    for (int m = 0; m < M; m++) begin
      act_in[m] = 0; w_wr_en[m] = 0; w_wr_col[m] = 0; w_wr_addr[m] = 0; w_wr_data[m] = 0;
    end
    for (int n = 0; n < N; n++) begin bias[n] = PSUM_W'($signed(32'($urandom % 2000)) - 1000); got[n] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // weights: every row bus writes in parallel
    for (int s = 0; s < WD; s++)
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        for (int m = 0; m < M; m++) begin
          w_wr_en[m] = 1; w_wr_col[m] = 2'(n); w_wr_addr[m] = 2'(s);
          w_wr_data[m] = WGT_W'($urandom);
          if (s == 1 && n == 0 && m == 0) w_wr_data[m] = -128;
          W[s][m][n] = w_wr_data[m];
        end
      end
    @(negedge clk);
    for (int m = 0; m < M; m++) w_wr_en[m] = 0;
    for (int v = 0; v < NV; v++) begin
      for (int m = 0; m < M; m++) X[v][m] = ACT_W'($urandom);
      slot_of[v] = v % WD;
    end
    X[1][0] = -128;
    for (int v = 0; v < NV; v++) begin
      @(negedge clk);
      in_valid = 1; w_slot = 2'(slot_of[v]);
      for (int m = 0; m < M; m++) act_in[m] = X[v][m];
      t_in[v] = cyc + 1;   // sampled at the coming edge
    end
    @(negedge clk) in_valid = 0;
    repeat (M + N + 6) @(negedge clk);
    for (int n = 0; n < N; n++) check(got[n] == NV, $sformatf("col %0d produced %0d", n, got[n]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
