// End-to-end testbench of a reduced GeneSys (8 x 8 array, 6 rows per tile):
// tb_genesys_driver runs a two-tile matrix product with bias, ReLU, an
// element-wise add and a cast through the instruction memory and checks the
// stored results.
module tb_genesys;
  import gs_pkg::*;
  localparam int M = 8, N = 8, R = 6;
  logic clk = 0, rst_n, imem_we, start, busy, done, finished;
  logic [7:0] imem_waddr;
  logic [31:0] imem_wdata;
  logic mem_req [4], mem_we [4], mem_gnt [4], mem_rvalid [4];
  logic [23:0] mem_addr [4];
  logic [31:0] mem_wdata [4], mem_rdata [4];
  int checks, failures, cycles;

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  genesys #(.M(M), .N(N)) dut (.*);

  tb_genesys_driver #(.M(M), .N(N), .R(R)) drv (
    .clk, .rst_n, .imem_we, .imem_waddr, .imem_wdata, .start, .busy, .done,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .finished, .checks, .failures, .cycles,
    .obs_ld_start(dut.ld_start), .obs_st_start(dut.st_start), .obs_half(dut.g_half),
    .obs_gemm_start(dut.gemm_start), .obs_gemm_flags(dut.gemm_flags),
    .obs_simd_start(dut.simd_start), .obs_simd_op(dut.simd_op),
    .obs_overlap(dut.gstate != 2'd0 && dut.mi_busy[0]));

  initial begin
    @(posedge clk);   // the driver clears its flag at time 0
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
