// Top level: the three machine-learning engines side by side.
//
//   genesys  programmable DNN accelerator (systolic array + SIMD array),
//            four off-chip memory channels and an instruction-memory host port
//   tabla    programmable dataflow platform for non-DNN algorithms
//            (PUs of PEs on neighbour links and arbitrated buses), host port
//   axiline  hard-wired training pipeline for one small algorithm
//            (logistic regression by default), weight port and sample stream
//
// The engines are independent: each has its own ports, prefixed gs_, tb_ and
// ax_, and they share only clock and reset. Every parameter keeps the
// engine's default: GeneSys 32 x 32 PEs with 8-bit data, TABLA 8 PUs of
// 8 PEs, Axiline logistic regression over 54 features.
module verigood_top
  import gs_pkg::*;
  import axl_pkg::*;
#(
  parameter int unsigned GS_M   = 32,
  parameter int unsigned GS_N   = 32,
  parameter int unsigned TB_NPU = 8,
  parameter int unsigned TB_NPE = 8,
  parameter axl_alg_e    AX_ALG = ALG_LOGREG,
  parameter int unsigned AX_FEATURES = 54,
  parameter int unsigned AX_LANES    = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // ---------------- GeneSys
  input  logic          gs_imem_we,
  input  logic [7:0]    gs_imem_waddr,
  input  logic [31:0]   gs_imem_wdata,
  input  logic          gs_start,
  output logic          gs_busy,
  output logic          gs_done,
  output logic          gs_mem_req   [4],
  output logic          gs_mem_we    [4],
  output logic [23:0]   gs_mem_addr  [4],
  output logic [31:0]   gs_mem_wdata [4],
  input  logic          gs_mem_gnt   [4],
  input  logic          gs_mem_rvalid[4],
  input  logic [31:0]   gs_mem_rdata [4],
  // ---------------- TABLA
  input  logic          tb_start,
  output logic          tb_halted,
  output logic          tb_gbus_busy,
  output logic          tb_pbus_busy,
  output logic          tb_any_stall,
  input  logic [$clog2(TB_NPU)-1:0] tb_host_pu,
  input  logic [$clog2(TB_NPE)-1:0] tb_host_pe,
  input  logic          tb_imem_we,
  input  logic [5:0]    tb_imem_addr,
  input  logic [31:0]   tb_imem_wdata,
  input  logic          tb_reg_we,
  input  logic [3:0]    tb_reg_addr,
  input  logic [15:0]   tb_reg_wdata,
  input  logic [3:0]    tb_reg_rd_addr,
  output logic [15:0]   tb_reg_rd_data,
  // ---------------- Axiline
  input  logic          ax_train,
  input  logic          ax_w_we,
  input  logic [$clog2(((AX_FEATURES + AX_LANES - 1) / AX_LANES) * AX_LANES)-1:0] ax_w_addr,
  input  logic signed [15:0] ax_w_wdata,
  input  logic [$clog2(((AX_FEATURES + AX_LANES - 1) / AX_LANES) * AX_LANES)-1:0] ax_w_rd_addr,
  output logic signed [15:0] ax_w_rd_data,
  input  logic          ax_s_valid,
  output logic          ax_s_ready,
  input  logic signed [15:0] ax_s_x [AX_LANES],
  input  logic signed [15:0] ax_s_y,
  output logic          ax_pred_valid,
  output logic signed [15:0] ax_pred,
  output logic          ax_busy,
  output logic [31:0]   ax_updates
);

  genesys #(.M(GS_M), .N(GS_N)) u_gs (
    .clk, .rst_n,
    .imem_we   (gs_imem_we),
    .imem_waddr(gs_imem_waddr),
    .imem_wdata(gs_imem_wdata),
    .start     (gs_start),
    .busy      (gs_busy),
    .done      (gs_done),
    .mem_req   (gs_mem_req),
    .mem_we    (gs_mem_we),
    .mem_addr  (gs_mem_addr),
    .mem_wdata (gs_mem_wdata),
    .mem_gnt   (gs_mem_gnt),
    .mem_rvalid(gs_mem_rvalid),
    .mem_rdata (gs_mem_rdata)
  );

  tabla #(.NPU(TB_NPU), .NPE(TB_NPE)) u_tabla (
    .clk, .rst_n,
    .start      (tb_start),
    .halted     (tb_halted),
    .gbus_busy  (tb_gbus_busy),
    .pbus_busy  (tb_pbus_busy),
    .any_stall  (tb_any_stall),
    .host_pu    (tb_host_pu),
    .host_pe    (tb_host_pe),
    .imem_we    (tb_imem_we),
    .imem_addr  (tb_imem_addr),
    .imem_wdata (tb_imem_wdata),
    .reg_we     (tb_reg_we),
    .reg_addr   (tb_reg_addr),
    .reg_wdata  (tb_reg_wdata),
    .reg_rd_addr(tb_reg_rd_addr),
    .reg_rd_data(tb_reg_rd_data)
  );

  axiline #(.ALG(AX_ALG), .FEATURES(AX_FEATURES), .LANES(AX_LANES)) u_ax (
    .clk, .rst_n,
    .train     (ax_train),
    .w_we      (ax_w_we),
    .w_addr    (ax_w_addr),
    .w_wdata   (ax_w_wdata),
    .w_rd_addr (ax_w_rd_addr),
    .w_rd_data (ax_w_rd_data),
    .s_valid   (ax_s_valid),
    .s_ready   (ax_s_ready),
    .s_x       (ax_s_x),
    .s_y       (ax_s_y),
    .pred_valid(ax_pred_valid),
    .pred      (ax_pred),
    .busy      (ax_busy),
    .updates   (ax_updates)
  );

endmodule
