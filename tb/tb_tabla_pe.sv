// Self-checking testbench for tabla_pe. Runs a short program that uses every
// operand and destination kind (registers, neighbour link, PE bus, global
// bus, inter-PU link), offers each input only after some delay and holds
// some outputs not-ready for a while, then checks every produced value, the
// register contents, that the PE stalled while waiting, and that it halted.
module tb_tabla_pe;
  import tabla_pkg::*;
  localparam int NPE = 4, NPU = 2, DW = 16, FRAC = 8;
  logic clk = 0, rst_n = 0, start = 0, halted, stalled;
  logic imem_we = 0, reg_we = 0;
  logic [5:0] imem_addr;
  logic [31:0] imem_wdata;
  logic [3:0] reg_addr, reg_rd_addr;
  logic [DW-1:0] reg_wdata, reg_rd_data;
  logic nb_in_valid = 0, nb_in_pop, nb_out_valid, nb_out_ready = 0;
  logic [DW-1:0] nb_in_data, nb_out_data;
  logic bus_wr_valid, bus_wr_ready = 0;
  logic [1:0] bus_wr_dest;
  logic [DW-1:0] bus_wr_data;
  logic bus_rd_valid [NPE];
  logic [DW-1:0] bus_rd_data [NPE];
  logic bus_rd_pop [NPE];
  logic gb_wr_valid, gb_wr_ready = 1;
  logic gb_wr_dest;
  logic [DW-1:0] gb_wr_data;
  logic gb_rd_valid [NPU];
  logic [DW-1:0] gb_rd_data [NPU];
  logic gb_rd_pop [NPU];
  logic pn_in_valid = 0, pn_in_pop, pn_out_valid, pn_out_ready = 1;
  logic [DW-1:0] pn_in_data, pn_out_data;
  int checks = 0, failures = 0, stall_cycles = 0;
  logic signed [DW-1:0] r0, r1, nbv, busv, gbv, pnv;
  logic [DW-1:0] got_nb [$], got_bus [$], got_gb [$], got_pn [$];
  logic [1:0] got_bus_dest [$];

  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tabla_pe #(.NPE(NPE), .NPU(NPU), .DW(DW), .FRAC(FRAC), .NREG(16), .IDEPTH(64)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic signed [DW-1:0] fm(logic signed [DW-1:0] a, logic signed [DW-1:0] b);
    logic signed [2*DW-1:0] p = a * b;
    return DW'(p >>> FRAC);
  endfunction

  always @(posedge clk) begin
    if (stalled) stall_cycles++;
    if (nb_out_valid && nb_out_ready) got_nb.push_back(nb_out_data);
    if (bus_wr_valid && bus_wr_ready) begin got_bus.push_back(bus_wr_data); got_bus_dest.push_back(bus_wr_dest); end
    if (gb_wr_valid && gb_wr_ready) got_gb.push_back(gb_wr_data);
    if (pn_out_valid && pn_out_ready) got_pn.push_back(pn_out_data);
    if (nb_in_pop) nb_in_valid <= 0;
    if (bus_rd_pop[2]) bus_rd_valid[2] <= 0;
    if (gb_rd_pop[1]) gb_rd_valid[1] <= 0;
    if (pn_in_pop) pn_in_valid <= 0;
  end

  initial begin
    logic [31:0] prog [$];
    logic signed [DW-1:0] r2, r3, t;
    for (int s = 0; s < NPE; s++) begin bus_rd_valid[s] = 0; bus_rd_data[s] = 0; end
    for (int s = 0; s < NPU; s++) begin gb_rd_valid[s] = 0; gb_rd_data[s] = 0; end
    nb_in_data = 0; pn_in_data = 0; imem_addr = 0; imem_wdata = 0; reg_addr = 0; reg_wdata = 0; reg_rd_addr = 0;
    r0 = 16'sd384; r1 = -16'sd200;                       // 1.5 and -0.78
    nbv = 16'sd77; busv = 16'sd1000; gbv = -16'sd50; pnv = 16'sd20;
    prog.push_back(tb_instr(TB_MUL, LOC_REG, 0, LOC_REG, 1, LOC_REG, 2));
    prog.push_back(tb_instr(TB_ADD, LOC_REG, 2, LOC_NB, 0, LOC_NB, 0));
    prog.push_back(tb_instr(TB_SUB, LOC_BUS, 2, LOC_REG, 0, LOC_BUS, 3));
    prog.push_back(tb_instr(TB_MAX, LOC_GBUS, 1, LOC_PUNB, 0, LOC_REG, 3));
    prog.push_back(tb_instr(TB_GT, LOC_REG, 3, LOC_REG, 0, LOC_PUNB, 0));
    prog.push_back(tb_instr(TB_PASS, LOC_REG, 3, LOC_REG, 0, LOC_GBUS, 1));
    prog.push_back(tb_instr(TB_MIN, LOC_REG, 1, LOC_REG, 0, LOC_REG, 4));
    prog.push_back(tb_instr(TB_NOP, LOC_REG, 0, LOC_REG, 0, LOC_REG, 0));
    prog.push_back(tb_instr(TB_HALT, LOC_REG, 0, LOC_REG, 0, LOC_REG, 0));
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk) begin imem_we = 1; imem_addr = 6'(i); imem_wdata = prog[i]; end
    end
    @(negedge clk) begin imem_we = 0; reg_we = 1; reg_addr = 0; reg_wdata = r0; end
    @(negedge clk) begin reg_addr = 1; reg_wdata = r1; end
    @(negedge clk) reg_we = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (4) @(negedge clk);
    nb_in_valid = 1; nb_in_data = nbv;          // instruction 1 was waiting
    repeat (3) @(negedge clk);
    nb_out_ready = 1;                           // ...and then its output
    repeat (2) @(negedge clk);
    bus_rd_valid[2] = 1; bus_rd_data[2] = busv; bus_wr_ready = 1;
    repeat (2) @(negedge clk);
    gb_rd_valid[1] = 1; gb_rd_data[1] = gbv;
    repeat (3) @(negedge clk);
    pn_in_valid = 1; pn_in_data = pnv;
    repeat (20) @(negedge clk);
    r2 = fm(r0, r1);
    r3 = (gbv > pnv) ? gbv : pnv;
    t = r2 + nbv;
    check(got_nb.size() == 1 && got_nb[0] == t, "ADD to neighbour");
    check(got_bus.size() == 1 && got_bus[0] == DW'(busv - r0) && got_bus_dest[0] == 2'd3, "SUB to PE bus, dest 3");
    check(got_pn.size() == 1 && got_pn[0] == ((r3 > r0) ? 16'sd256 : 16'sd0), "GT to PU link");
    check(got_gb.size() == 1 && got_gb[0] == r3, "PASS to global bus");
    reg_rd_addr = 2; #1 check(reg_rd_data == r2, "MUL into r2");
    reg_rd_addr = 3; #1 check(reg_rd_data == r3, "MAX into r3");
    reg_rd_addr = 4; #1 check(reg_rd_data == ((r1 < r0) ? r1 : r0), "MIN into r4");
    check(halted, "halted");
    check(stall_cycles >= 10, $sformatf("stalled %0d cycles waiting for links", stall_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
