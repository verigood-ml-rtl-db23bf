// End-to-end testbench of a reduced TABLA (4 PUs of 4 PEs): a distributed
// dot product over every PE, summed over the neighbour links, the PE buses,
// the inter-PU links and the global bus (see tb_tabla_driver).
module tb_tabla;
  localparam int NPU = 4, NPE = 4;
  logic clk = 0, rst_n = 0, start, halted, gbus_busy, pbus_busy, any_stall, finished;
  logic [1:0] host_pu, host_pe;
  logic imem_we, reg_we;
  logic [5:0] imem_addr;
  logic [31:0] imem_wdata;
  logic [3:0] reg_addr, reg_rd_addr;
  logic [15:0] reg_wdata, reg_rd_data;
  int checks, failures;

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  tabla #(.NPU(NPU), .NPE(NPE)) dut (.*);
  tb_tabla_driver #(.NPU(NPU), .NPE(NPE)) drv (.*);

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(posedge clk);   // the driver clears its flag at time 0
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
