// Self-checking testbench for gs_controller. Loads a short program of setup
// and unit instructions, answers every unit start with a done pulse after a
// random delay, and checks the order and fields of the issued commands, the
// configuration register values, the 3-cycle cost of a setup instruction and
// the final done pulse.
module tb_gs_controller;
  import gs_pkg::*;
  logic clk = 0, rst_n = 0, imem_we = 0, start = 0, busy, done;
  logic [7:0] imem_waddr;
  logic [31:0] imem_wdata;
  logic [23:0] cfg [NCFG];
  logic ld_start, st_start, st_obuf, gemm_start, simd_start;
  gs_tgt_e ld_tgt;
  logic [1:0] gemm_flags, simd_flags;
  simd_op_e simd_op;
  logic ld_done = 0, st_done = 0, gemm_done = 0, simd_done = 0;
  int checks = 0, failures = 0;
  logic [31:0] prog [$];
  string seen [$];
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  gs_controller #(.IMEM_DEPTH(256)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // unit model: record each command, answer after 1..6 cycles
  initial begin
    forever begin
      @(posedge clk); #1;
      if (ld_start || st_start || gemm_start || simd_start) begin
        automatic string s;
        automatic logic l = ld_start, st = st_start, g = gemm_start;
        if (ld_start) s = $sformatf("LD%0d", ld_tgt);
        else if (st_start) s = $sformatf("ST%0d", st_obuf);
        else if (gemm_start) s = $sformatf("GEMM%0d", gemm_flags);
        else s = $sformatf("SIMD%0d.%0d", simd_op, simd_flags);
        seen.push_back(s);
        repeat (1 + $urandom % 6) @(negedge clk);
        if (l) ld_done = 1; else if (st) st_done = 1; else if (g) gemm_done = 1; else simd_done = 1;
        @(negedge clk);
        ld_done = 0; st_done = 0; gemm_done = 0; simd_done = 0;
      end
    end
  end

  initial begin
    int t0, t1;
    string expv [$];
    prog.push_back(instr(OP_CFG, 4'(R_EXT_BASE), 24'h123456));
    prog.push_back(instr(OP_CFG, 4'(R_CNT0), 24'd7));
    prog.push_back(instr(OP_LOAD, 4'(TGT_WBUF), 24'd0));
    prog.push_back(instr(OP_LOAD, 4'(TGT_OBUF), 24'd0));
    prog.push_back(instr(OP_GEMM, 4'd0, 24'd2));
    prog.push_back(instr(OP_SIMD, 4'(SIMD_RELU), 24'd1));
    prog.push_back(instr(OP_CFG, 4'(R_SHIFT), 24'd5));
    prog.push_back(instr(OP_STORE, 4'd1, 24'd0));
    prog.push_back(instr(OP_STORE, 4'd0, 24'd0));
    prog.push_back(instr(OP_END, 4'd0, 24'd0));
    expv = '{"LD1", "LD4", "GEMM2", "SIMD5.1", "ST1", "ST0"};
    imem_waddr = 0; imem_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk) begin imem_we = 1; imem_waddr = 8'(i); imem_wdata = prog[i]; end
    end
    @(negedge clk) imem_we = 0;
    @(negedge clk) start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    while (cfg[R_CNT0] != 24'd7 && cyc - t0 < 50) @(negedge clk);
    t1 = cyc;
    check(t1 - t0 == 1 + 2 * 3, $sformatf("start plus two setup instructions took %0d cycles", t1 - t0));
    check(busy, "busy while running");
    while (!done) @(negedge clk);
    @(negedge clk);
    check(!busy, "idle after END");
    check(cfg[R_EXT_BASE] == 24'h123456 && cfg[R_SHIFT] == 24'd5, "config registers");
    check(seen.size() == expv.size(), $sformatf("%0d commands issued", seen.size()));
    foreach (expv[i])
      check(i < seen.size() && seen[i] == expv[i], $sformatf("command %0d: %s", i, i < seen.size() ? seen[i] : "none"));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
