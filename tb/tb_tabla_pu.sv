// Self-checking testbench for tabla_pu (4 PEs): loads features and weights,
// runs the dot-product program (neighbour chain, then PE bus back to PE 0)
// and checks the sum, the decision bit, that the PE bus carried the word,
// that PEs stalled on their links, and the cycle count of the run.
module tb_tabla_pu;
  import tabla_pkg::*;
  import tb_tabla_prog_pkg::*;
  localparam int NPE = 4, NPU = 2, DW = 16;
  logic clk = 0, rst_n = 0, start = 0, halted, bus_busy, any_stall;
  logic [1:0] host_pe;
  logic imem_we = 0, reg_we = 0;
  logic [5:0] imem_addr;
  logic [31:0] imem_wdata;
  logic [3:0] reg_addr, reg_rd_addr;
  logic [DW-1:0] reg_wdata, reg_rd_data;
  logic gb_wr_valid, gb_wr_ready = 0, gb_wr_dest;
  logic [DW-1:0] gb_wr_data;
  logic gb_rd_valid [NPU];
  logic [DW-1:0] gb_rd_data [NPU];
  logic gb_rd_pop [NPU];
  logic pn_in_valid = 0, pn_in_pop, pn_out_valid, pn_out_ready = 0;
  logic [DW-1:0] pn_in_data = 0, pn_out_data;
  int checks = 0, failures = 0, n_bus = 0, n_stall = 0, cyc = 0;

  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tabla_pu #(.NPE(NPE), .NPU(NPU), .DW(DW)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst_n && bus_busy) n_bus++;
    if (rst_n && any_stall) n_stall++;
  end

  initial begin
    logic [31:0] p [$];
    logic signed [DW-1:0] x [NPE], w [NPE];
    logic signed [DW-1:0] total;
    for (int s = 0; s < NPU; s++) begin gb_rd_valid[s] = 0; gb_rd_data[s] = 0; end
    host_pe = 0; imem_addr = 0; imem_wdata = 0; reg_addr = 0; reg_wdata = 0; reg_rd_addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      total = 0;
      for (int e = 0; e < NPE; e++) begin
        x[e] = DW'($signed($urandom % 1024) - 512);
        w[e] = DW'($signed($urandom % 1024) - 512);
        total += fmul(x[e], w[e]);
        pe_prog(0, e, NPU, NPE, 0, p);
        foreach (p[i]) @(negedge clk) begin
          host_pe = 2'(e); imem_we = 1; imem_addr = 6'(i); imem_wdata = p[i];
        end
        @(negedge clk) begin imem_we = 0; reg_we = 1; reg_addr = 0; reg_wdata = x[e]; end
        @(negedge clk) begin reg_addr = 1; reg_wdata = w[e]; end
        @(negedge clk) begin reg_addr = 4; reg_wdata = 0; end
        @(negedge clk) reg_we = 0;
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!halted) begin @(negedge clk); cyc++; end
      // PE 0 waits for the chain: NPE - 1 neighbour hops, 2 cycles through the bus
      check(cyc <= NPE + 8, $sformatf("run took %0d cycles", cyc));
      host_pe = 0; reg_rd_addr = 3;
      #1 check(reg_rd_data == total, $sformatf("sum %0d vs %0d", $signed(reg_rd_data), total));
      reg_rd_addr = 5;
      #1 check(reg_rd_data == ((total > 0) ? 16'd256 : 16'd0), "decision bit");
    end
    check(n_bus == 2, $sformatf("PE bus transfers %0d", n_bus));
    check(n_stall > 0, "PEs stalled on links");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
