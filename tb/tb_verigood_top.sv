// Full-size end-to-end testbench of the top level, with every parameter at
// its default (GeneSys 32 x 32, TABLA 8 PUs of 8 PEs, Axiline logistic
// regression over 54 features on 8 lanes). The three engines run at the
// same time:
//   GeneSys  tb_genesys_driver runs a 32-row, K = 64 matrix product over two
//            double-buffered tiles with bias, ReLU, element-wise add and cast;
//   TABLA    tb_tabla_driver runs a 64-PE distributed dot product and its
//            decision twice;
//   Axiline  this file trains on a stream of samples and then infers, and
//            compares predictions and trained weights with tb_axl_ref_pkg.
// Each engine's results are checked, and each mechanism (memory stalls,
// buffer swaps, GEMM modes, SIMD operations, bus arbitration and PE stalls,
// weight write-back and the training/inference mode switch) is counted; one
// that never happened counts as a failure.
module tb_verigood_top;
  import gs_pkg::*;
  import axl_pkg::*;
  import tb_axl_ref_pkg::*;

  localparam int F = 54, L = 8, C = (F + L - 1) / L, FW = $clog2(C * L);
  localparam int NS = 6, NI = 4, LR = 16, DECAY = 256;

  logic clk = 0, rst_n;
  // GeneSys
  logic gs_imem_we, gs_start, gs_busy, gs_done;
  logic [7:0] gs_imem_waddr;
  logic [31:0] gs_imem_wdata;
  logic gs_mem_req [4], gs_mem_we [4], gs_mem_gnt [4], gs_mem_rvalid [4];
  logic [23:0] gs_mem_addr [4];
  logic [31:0] gs_mem_wdata [4], gs_mem_rdata [4];
  // TABLA
  logic tb_start, tb_halted, tb_gbus_busy, tb_pbus_busy, tb_any_stall;
  logic [2:0] tb_host_pu, tb_host_pe;
  logic tb_imem_we, tb_reg_we;
  logic [5:0] tb_imem_addr;
  logic [31:0] tb_imem_wdata;
  logic [3:0] tb_reg_addr, tb_reg_rd_addr;
  logic [15:0] tb_reg_wdata, tb_reg_rd_data;
  // Axiline
  logic ax_train, ax_w_we, ax_s_valid, ax_s_ready, ax_pred_valid, ax_busy;
  logic [FW-1:0] ax_w_addr, ax_w_rd_addr;
  logic signed [15:0] ax_w_wdata, ax_w_rd_data, ax_s_y, ax_pred;
  logic signed [15:0] ax_s_x [L];
  logic [31:0] ax_updates;

  int gs_checks, gs_failures, gs_cycles, ta_checks, ta_failures;
  int ax_checks = 0, ax_failures = 0;
  logic gs_finished, ta_finished, ax_finished = 0;

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", gs_checks + ta_checks + ax_checks,
             gs_failures + ta_failures + ax_failures + 1);
    $finish;
  end

  verigood_top dut (.*);

  tb_genesys_driver drv_gs (
    .clk, .rst_n, .imem_we(gs_imem_we), .imem_waddr(gs_imem_waddr), .imem_wdata(gs_imem_wdata),
    .start(gs_start), .busy(gs_busy), .done(gs_done),
    .mem_req(gs_mem_req), .mem_we(gs_mem_we), .mem_addr(gs_mem_addr), .mem_wdata(gs_mem_wdata),
    .mem_gnt(gs_mem_gnt), .mem_rvalid(gs_mem_rvalid), .mem_rdata(gs_mem_rdata),
    .finished(gs_finished), .checks(gs_checks), .failures(gs_failures), .cycles(gs_cycles),
    .obs_ld_start(dut.u_gs.ld_start), .obs_st_start(dut.u_gs.st_start), .obs_half(dut.u_gs.g_half),
    .obs_gemm_start(dut.u_gs.gemm_start), .obs_gemm_flags(dut.u_gs.gemm_flags),
    .obs_simd_start(dut.u_gs.simd_start), .obs_simd_op(dut.u_gs.simd_op),
    .obs_overlap(dut.u_gs.gstate != 2'd0 && dut.u_gs.mi_busy[0]));

  tb_tabla_driver drv_ta (
    .clk, .rst_n, .start(tb_start), .halted(tb_halted), .gbus_busy(tb_gbus_busy),
    .pbus_busy(tb_pbus_busy), .any_stall(tb_any_stall), .host_pu(tb_host_pu),
    .host_pe(tb_host_pe), .imem_we(tb_imem_we), .imem_addr(tb_imem_addr),
    .imem_wdata(tb_imem_wdata), .reg_we(tb_reg_we), .reg_addr(tb_reg_addr),
    .reg_wdata(tb_reg_wdata), .reg_rd_addr(tb_reg_rd_addr), .reg_rd_data(tb_reg_rd_data),
    .finished(ta_finished), .checks(ta_checks), .failures(ta_failures));

  // ------------------------------------------------------------ Axiline
  task automatic ax_check(input logic cond, input string what);
    ax_checks++;
    if (!cond) begin ax_failures++; $display("FAIL axiline %s", what); end
  endtask

  int xs [NS+NI][C*L];
  int ys [NS+NI];
  int wref [C*L];
  int href [NS+NI];
  int take_cyc [NS+NI];
  int npred = 0, cyc = 0, n_mode_switch = 0, n_ax_busy = 0;
  logic last_train = 1;

  always @(negedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && ax_busy) n_ax_busy++;
    if (rst_n && ax_train != last_train) n_mode_switch++;
    last_train <= ax_train;
    if (rst_n && ax_pred_valid) begin
      ax_check(npred < NS + NI, "extra prediction");
      if (npred < NS + NI) begin
        ax_check(ax_pred == 16'(href[npred]), $sformatf("sample %0d pred %0d vs %0d",
                 npred, ax_pred, href[npred]));
        ax_check(cyc - take_cyc[npred] == C + 1, $sformatf("sample %0d latency %0d",
                 npred, cyc - take_cyc[npred]));
      end
      npred++;
    end
  end

  initial begin : ax_main
    int s, k, now, g;
    longint acc;
    ax_train = 1; ax_w_we = 0; ax_w_addr = '0; ax_w_wdata = '0; ax_w_rd_addr = '0;
    ax_s_valid = 0; ax_s_y = '0;
    foreach (ax_s_x[l]) ax_s_x[l] = '0;
    for (int i = 0; i < NS + NI; i++) begin
      for (int f = 0; f < C*L; f++) xs[i][f] = (f < F) ? int'($urandom % 512) - 256 : 0;
      ys[i] = ($urandom % 2) ? ONE : 0;
    end
    for (int f = 0; f < C*L; f++) wref[f] = int'($urandom % 128) - 64;
    wait (rst_n === 1'b1);
    for (int f = 0; f < C*L; f++) begin
      @(negedge clk);
      ax_w_we = 1; ax_w_addr = FW'(f); ax_w_wdata = 16'(wref[f]);
    end
    @(negedge clk) ax_w_we = 0;
    for (s = 0; s < NS + NI; s++) begin
      acc = 0;
      for (int f = 0; f < C*L; f++) acc += longint'(xs[s][f]) * longint'(wref[f]);
      stage2(1, acc, ys[s], LR, href[s], g);
      if (s < NS)
        for (int f = 0; f < C*L; f++) wref[f] = sgd(wref[f], g, xs[s][f], DECAY);
    end
    s = 0; k = 0;
    while (s < NS + NI) begin
      ax_train = (s < NS);
      ax_s_valid = 1;
      for (int l = 0; l < L; l++) ax_s_x[l] = 16'(xs[s][k*L+l]);
      ax_s_y = 16'(ys[s]);
      now = cyc;
      #1;
      if (ax_s_ready) begin
        if (k == 0) begin
          take_cyc[s] = now;
          if (s > 0 && s != NS)
            ax_check(take_cyc[s] - take_cyc[s-1] == ((s < NS) ? C + 3 : C),
                     $sformatf("sample %0d period %0d", s, take_cyc[s] - take_cyc[s-1]));
        end
        if (k == C - 1) begin k = 0; s++; end
        else k++;
      end
      @(negedge clk);
      if (s == NS && k == 0) begin
        ax_s_valid = 0;
        while (ax_busy) @(negedge clk);
        ax_check(ax_updates == 32'(NS * C), $sformatf("updates %0d", ax_updates));
        for (int f = 0; f < C*L; f++) begin
          ax_w_rd_addr = FW'(f);
          #1 ax_check(ax_w_rd_data == 16'(wref[f]), $sformatf("trained w[%0d] %0d vs %0d",
                      f, ax_w_rd_data, wref[f]));
        end
        @(negedge clk);
      end
    end
    ax_s_valid = 0;
    repeat (C + 4) @(negedge clk);
    ax_check(npred == NS + NI, $sformatf("predictions %0d", npred));
    $display("axiline mechanisms: weight_writebacks=%0d predictions=%0d mode_switches=%0d busy_cycles=%0d",
             ax_updates, npred, n_mode_switch, n_ax_busy);
    ax_check(ax_updates == 32'(NS * C), "weight write-back happened, and only in training");
    ax_check(n_mode_switch > 0, "training to inference switch happened");
    ax_finished = 1;
  end

  initial begin
    @(posedge clk);   // the drivers clear their flags at time 0
    wait (gs_finished && ta_finished && ax_finished);
    $display("TB_RESULT checks=%0d failures=%0d", gs_checks + ta_checks + ax_checks,
             gs_failures + ta_failures + ax_failures);
    $finish;
  end
endmodule
