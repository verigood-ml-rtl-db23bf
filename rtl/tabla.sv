// TABLA platform for non-DNN machine learning (regression, SVM and the like).
//
// A two-level dataflow machine: NPU processing units, each holding NPE
// processing engines. The PUs talk over two mechanisms, as the PEs inside a
// PU do: a global bus shared by all PUs, arbitrated by one leader and one
// follower per PU (tabla_bus), and a neighbour bus, here a ring of FIFO links
// from PU i to PU i+1 (last to first), which spares the global bus the
// traffic between adjacent PUs. PE 0 of each PU is the PU's port onto both.
//
// The host loads each PE's program and registers through the host_* ports
// (host_pu, host_pe select the PE), pulses `start`, and waits for `halted`
// (every PE has executed HALT). The off-chip memory interface with its AXI
// ports is not part of this block: operands are loaded and results read
// through the host register port. The default size, 8 PUs of 8 PEs, is the
// first configuration the document reports; link depths and the PE
// instruction set are this design's choices.
module tabla
  import tabla_pkg::*;
#(
  parameter int unsigned NPU    = 8,
  parameter int unsigned NPE    = 8,
  parameter int unsigned DW     = 16,
  parameter int unsigned FRAC   = 8,
  parameter int unsigned NREG   = 16,
  parameter int unsigned IDEPTH = 64,
  parameter int unsigned LDEPTH = 2,
  localparam int unsigned PE_W  = (NPE > 1) ? $clog2(NPE) : 1,
  localparam int unsigned PU_W  = (NPU > 1) ? $clog2(NPU) : 1,
  localparam int unsigned R_W   = (NREG > 1) ? $clog2(NREG) : 1,
  localparam int unsigned I_W   = (IDEPTH > 1) ? $clog2(IDEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            halted,
  output logic            gbus_busy,   // the global bus moved a word this cycle
  output logic            pbus_busy,   // some PE bus moved a word this cycle
  output logic            any_stall,   // some PE is waiting
  input  logic [PU_W-1:0] host_pu,
  input  logic [PE_W-1:0] host_pe,
  input  logic            imem_we,
  input  logic [I_W-1:0]  imem_addr,
  input  logic [31:0]     imem_wdata,
  input  logic            reg_we,
  input  logic [R_W-1:0]  reg_addr,
  input  logic [DW-1:0]   reg_wdata,
  input  logic [R_W-1:0]  reg_rd_addr,
  output logic [DW-1:0]   reg_rd_data
);

  logic            g_wr_valid [NPU];
  logic [PU_W-1:0] g_wr_dest  [NPU];
  logic [DW-1:0]   g_wr_data  [NPU];
  logic            g_wr_ready [NPU];
  logic            g_rd_valid [NPU][NPU];
  logic [DW-1:0]   g_rd_data  [NPU][NPU];
  logic            g_rd_pop   [NPU][NPU];
  logic            grant_valid;
  logic [PU_W-1:0] grant_src;

  logic            l_push [NPU];
  logic [DW-1:0]   l_din  [NPU];
  logic            l_pop  [NPU];
  logic [DW-1:0]   l_dout [NPU];
  logic            l_full [NPU];
  logic            l_empty[NPU];

  logic            pu_halted [NPU];
  logic            pu_bus    [NPU];
  logic            pu_stall  [NPU];
  logic [DW-1:0]   pu_rd     [NPU];

  tabla_bus #(.NODES(NPU), .DW(DW)) u_gbus (
    .clk, .rst_n,
    .wr_valid(g_wr_valid), .wr_dest(g_wr_dest), .wr_data(g_wr_data), .wr_ready(g_wr_ready),
    .rd_valid(g_rd_valid), .rd_data(g_rd_data), .rd_pop(g_rd_pop),
    .grant_valid, .grant_src
  );

  for (genvar u = 0; u < NPU; u++) begin : g_pu
    localparam int unsigned PREV = (u + NPU - 1) % NPU;

    tabla_fifo #(.W(DW), .DEPTH(LDEPTH)) u_link (
      .clk, .rst_n,
      .push(l_push[u]), .din(l_din[u]), .pop(l_pop[(u + 1) % NPU]),
      .dout(l_dout[u]), .full(l_full[u]), .empty(l_empty[u])
    );

    tabla_pu #(.NPE(NPE), .NPU(NPU), .DW(DW), .FRAC(FRAC), .NREG(NREG), .IDEPTH(IDEPTH),
               .LDEPTH(LDEPTH)) u_pu (
      .clk, .rst_n, .start,
      .halted      (pu_halted[u]),
      .bus_busy    (pu_bus[u]),
      .any_stall   (pu_stall[u]),
      .host_pe,
      .imem_we     (imem_we && host_pu == PU_W'(u)),
      .imem_addr, .imem_wdata,
      .reg_we      (reg_we && host_pu == PU_W'(u)),
      .reg_addr, .reg_wdata, .reg_rd_addr,
      .reg_rd_data (pu_rd[u]),
      .gb_wr_valid (g_wr_valid[u]),
      .gb_wr_dest  (g_wr_dest[u]),
      .gb_wr_data  (g_wr_data[u]),
      .gb_wr_ready (g_wr_ready[u]),
      .gb_rd_valid (g_rd_valid[u]),
      .gb_rd_data  (g_rd_data[u]),
      .gb_rd_pop   (g_rd_pop[u]),
      .pn_in_valid (!l_empty[PREV]),
      .pn_in_data  (l_dout[PREV]),
      .pn_in_pop   (l_pop[u]),
      .pn_out_valid(l_push[u]),
      .pn_out_data (l_din[u]),
      .pn_out_ready(!l_full[u])
    );
  end

  always_comb begin
    halted    = 1'b1;
    pbus_busy = 1'b0;
    any_stall = 1'b0;
    for (int u = 0; u < NPU; u++) begin
      halted    &= pu_halted[u];
      pbus_busy |= pu_bus[u];
      any_stall |= pu_stall[u];
    end
  end

  assign gbus_busy   = grant_valid;
  assign reg_rd_data = pu_rd[host_pu];

endmodule
