// SVM inference on TABLA at full default size (8 PUs of 8 PEs) for the
// 143-feature indoor-localisation benchmark size: the 143 features and
// weights are spread over the 64 PEs, 3 per PE (the last 49 slots are zero),
// and each PE sums its three products before the chip-wide reduction of
// tb_tabla_prog_pkg. PU 0 / PE 0 ends with w.x in r3 and the class
// decision w.x > b in r5. Three samples with random data are classified;
// the score and the decision are compared with a model, and the number of
// cycles per classification is reported and bounded.
module tb_tabla_svm;
  import tabla_pkg::*;
  import tb_tabla_prog_pkg::*;
  localparam int NPU = 8, NPE = 8, NF = 3, FEAT = 143, NSAMP = 3;

  logic clk = 0, rst_n = 0, start, halted, gbus_busy, pbus_busy, any_stall;
  logic [2:0] host_pu, host_pe;
  logic imem_we, reg_we;
  logic [5:0] imem_addr;
  logic [31:0] imem_wdata;
  logic [3:0] reg_addr, reg_rd_addr;
  logic [15:0] reg_wdata, reg_rd_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial begin
    repeat (30000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  tabla dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wreg(int u, int e, int r, logic [15:0] v);
    @(negedge clk);
    host_pu = 3'(u); host_pe = 3'(e); reg_we = 1; reg_addr = 4'(r); reg_wdata = v;
    @(negedge clk) reg_we = 0;
  endtask

  initial begin : main
    logic [31:0] p [$];
    logic signed [15:0] x [NPU*NPE*NF], w [NPU*NPE*NF];
    logic signed [15:0] total, bias;
    int cyc;
    start = 0; host_pu = 0; host_pe = 0; imem_we = 0; imem_addr = 0; imem_wdata = 0;
    reg_we = 0; reg_addr = 0; reg_wdata = 0; reg_rd_addr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // the model: weights stay, programs stay
    for (int i = 0; i < NPU*NPE*NF; i++) w[i] = (i < FEAT) ? 16'($signed($urandom % 128) - 64) : 16'sd0;
    bias = 16'($signed($urandom % 64) - 32);
    for (int u = 0; u < NPU; u++)
      for (int e = 0; e < NPE; e++) begin
        pe_prog(u, e, NPU, NPE, 1, p, NF);
        foreach (p[i]) begin
          @(negedge clk);
          host_pu = 3'(u); host_pe = 3'(e); imem_we = 1; imem_addr = 6'(i); imem_wdata = p[i];
        end
        @(negedge clk) imem_we = 0;
        for (int j = 0; j < NF; j++)
          wreg(u, e, (j == 0) ? 1 : 5 + 2 * j, w[(u * NPE + e) * NF + j]);
      end
    wreg(0, 0, 4, bias);
    for (int s = 0; s < NSAMP; s++) begin
      // a new sample: features only
      total = 0;
      for (int i = 0; i < NPU*NPE*NF; i++) begin
        x[i] = (i < FEAT) ? 16'($signed($urandom % 512) - 256) : 16'sd0;
      end
      for (int u = 0; u < NPU; u++)
        for (int e = 0; e < NPE; e++)
          for (int j = 0; j < NF; j++) begin
            int i;
            i = (u * NPE + e) * NF + j;
            total += fmul(x[i], w[i]);
            wreg(u, e, (j == 0) ? 0 : 4 + 2 * j, x[i]);
          end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!halted) begin @(negedge clk); cyc++; end
      host_pu = 0; host_pe = 0; reg_rd_addr = 3;
      #1 check(reg_rd_data == total, $sformatf("sample %0d score %0d vs %0d", s, $signed(reg_rd_data), total));
      reg_rd_addr = 5;
      #1 check(reg_rd_data == ((total > bias) ? 16'd256 : 16'd0), $sformatf("sample %0d decision", s));
      $display("sample %0d: score %0d, class %0d, %0d cycles", s, total, total > bias, cyc);
      check(cyc <= 2 * NF + 2 * NPE + 3 * NPU + 10, $sformatf("classification took %0d cycles", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
