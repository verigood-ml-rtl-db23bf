// Self-checking testbench for gs_obuf (4 banks x 8 rows): writes skewed
// per-column results in overwrite mode, then accumulates a second pass,
// reads rows back through the row port and single words through the
// load/store port, and compares with a model kept here.
module tb_gs_obuf;
  localparam int N = 4, PW = 32, D = 8;
  logic clk = 0, rst_n = 0, start = 0, acc = 0;
  logic wr_valid [N];
  logic signed [PW-1:0] wr_data [N];
  logic [2:0] rd_addr;
  logic signed [PW-1:0] rd_data [N];
  logic ls_wr_en = 0, ls_rd_en = 0;
  logic [4:0] ls_wr_addr, ls_rd_addr;
  logic [PW-1:0] ls_wr_data, ls_rd_data;
  int checks = 0, failures = 0;
  logic signed [PW-1:0] model [N][D];

  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  gs_obuf #(.N(N), .PSUM_W(PW), .DEPTH(D)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // one pass: row r of column n is written at cycle r + n (skewed like the array)
  task automatic pass(input logic accumulate);
    @(negedge clk) begin start = 1; acc = accumulate; end
    @(negedge clk) start = 0;
    for (int t = 0; t < D + N; t++) begin
      for (int n = 0; n < N; n++) begin
        int r = t - n;
        wr_valid[n] = (r >= 0 && r < D);
        wr_data[n] = PW'($signed($urandom % 20000) - 10000);
        if (wr_valid[n]) model[n][r] = accumulate ? model[n][r] + wr_data[n] : wr_data[n];
      end
      @(negedge clk);
    end
    for (int n = 0; n < N; n++) wr_valid[n] = 0;
  endtask

  task automatic read_all;
    for (int r = 0; r < D; r++) begin
      rd_addr = 3'(r);
      @(negedge clk);
      for (int n = 0; n < N; n++)
        check(rd_data[n] == model[n][r], $sformatf("row %0d bank %0d: %0d vs %0d", r, n, rd_data[n], model[n][r]));
    end
  endtask

  initial begin
    for (int n = 0; n < N; n++) begin wr_valid[n] = 0; wr_data[n] = 0; end
    rd_addr = 0; ls_wr_addr = 0; ls_rd_addr = 0; ls_wr_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    pass(0);
    read_all();
    pass(1);
    read_all();
    // load/store port: write two words, read back words
    @(negedge clk) begin ls_wr_en = 1; ls_wr_addr = 5'd6; ls_wr_data = 32'd777; end
    model[2][1] = 777;
    @(negedge clk) begin ls_wr_addr = 5'd31; ls_wr_data = -32'sd5; end
    model[3][7] = -5;
    @(negedge clk) ls_wr_en = 0;
    for (int e = 0; e < N * D; e++) begin
      ls_rd_en = 1; ls_rd_addr = 5'(e);
      @(negedge clk);
      check(ls_rd_data == model[e % N][e / N], $sformatf("word %0d", e));
    end
    ls_rd_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
