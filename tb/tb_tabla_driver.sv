// Test driver for one TABLA instance, used by the TABLA and top-level
// testbenches. Loads a feature and a weight into every PE of every PU and
// the dot-product program (tb_tabla_prog_pkg), runs it twice with fresh
// data, and checks the total and the decision bit in PU 0 / PE 0. Counts the
// cycles the global bus, the PE buses and PE stalls were active and reports a
// failure for any mechanism that never happened.
module tb_tabla_driver
  import tabla_pkg::*;
  import tb_tabla_prog_pkg::*;
#(
  parameter int NPU = 8, parameter int NPE = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        start,
  input  logic        halted,
  input  logic        gbus_busy,
  input  logic        pbus_busy,
  input  logic        any_stall,
  output logic [$clog2(NPU)-1:0] host_pu,
  output logic [$clog2(NPE)-1:0] host_pe,
  output logic        imem_we,
  output logic [5:0]  imem_addr,
  output logic [31:0] imem_wdata,
  output logic        reg_we,
  output logic [3:0]  reg_addr,
  output logic [15:0] reg_wdata,
  output logic [3:0]  reg_rd_addr,
  input  logic [15:0] reg_rd_data,
  output logic        finished,
  output int          checks,
  output int          failures
);
  int n_gbus = 0, n_pbus = 0, n_stall = 0;

  always @(posedge clk) begin
    if (rst_n && gbus_busy) n_gbus++;
    if (rst_n && pbus_busy) n_pbus++;
    if (rst_n && any_stall) n_stall++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL tabla %s", what); end
  endtask

  initial begin
    logic [31:0] p [$];
    logic signed [15:0] x, w, total;
    int cyc;
    checks = 0; failures = 0; finished = 0;
    start = 0; host_pu = 0; host_pe = 0; imem_we = 0; imem_addr = 0; imem_wdata = 0;
    reg_we = 0; reg_addr = 0; reg_wdata = 0; reg_rd_addr = 0;
    wait (rst_n === 1'b1);
    for (int rep = 0; rep < 2; rep++) begin
      total = 0;
      for (int u = 0; u < NPU; u++)
        for (int e = 0; e < NPE; e++) begin
          x = 16'($signed($urandom % 512) - 256);
          w = 16'($signed($urandom % 512) - 256);
          total += fmul(x, w);
          pe_prog(u, e, NPU, NPE, 1, p);
          foreach (p[i]) @(negedge clk) begin
            host_pu = $bits(host_pu)'(u); host_pe = $bits(host_pe)'(e);
            imem_we = 1; imem_addr = 6'(i); imem_wdata = p[i];
          end
          @(negedge clk) begin imem_we = 0; reg_we = 1; reg_addr = 0; reg_wdata = x; end
          @(negedge clk) begin reg_addr = 1; reg_wdata = w; end
          @(negedge clk) begin reg_addr = 4; reg_wdata = 0; end
          @(negedge clk) reg_we = 0;
        end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!halted) begin @(negedge clk); cyc++; end
      host_pu = 0; host_pe = 0; reg_rd_addr = 3;
      #1 check(reg_rd_data == total, $sformatf("total %0d vs %0d", $signed(reg_rd_data), total));
      reg_rd_addr = 5;
      #1 check(reg_rd_data == ((total > 0) ? 16'd256 : 16'd0), "decision bit");
      // chain of NPE PEs, then NPU PUs, then the global bus
      check(cyc <= 2 * NPE + 3 * NPU + 10, $sformatf("run took %0d cycles", cyc));
    end
    $display("tabla mechanisms: global_bus=%0d pe_bus=%0d stall_cycles=%0d", n_gbus, n_pbus, n_stall);
    check(n_gbus == 2, "global bus used once per run");
    check(n_pbus >= 2, "PE buses used in every run");
    check(n_stall > 0, "PE stalls happened");
    finished = 1;
  end
endmodule
