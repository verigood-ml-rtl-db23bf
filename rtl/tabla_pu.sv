// TABLA processing unit (PU).
//
// NPE processing engines joined in two ways, as in the document: a neighbour
// bus, here a ring of FIFO links from PE i to PE i+1 (the last PE feeding
// PE 0), and a shared PE bus whose arbiter is one leader plus one follower
// per PE (tabla_bus). Adjacent PEs use the neighbour link so the shared bus
// is kept free for other traffic. PE 0 is the PU's port to the rest of the
// chip: its global-bus and inter-PU neighbour ports are brought out, while the
// same ports of the other PEs are tied off.
//
// Host access selects one PE by host_pe for instruction and register loads
// and register reads. `halted` is high when every PE has executed HALT.
// Link FIFO depth is this design's choice.
module tabla_pu
  import tabla_pkg::*;
#(
  parameter int unsigned NPE    = 8,
  parameter int unsigned NPU    = 8,
  parameter int unsigned DW     = 16,
  parameter int unsigned FRAC   = 8,
  parameter int unsigned NREG   = 16,
  parameter int unsigned IDEPTH = 64,
  parameter int unsigned LDEPTH = 2,   // neighbour link FIFO depth
  localparam int unsigned PE_W  = (NPE > 1) ? $clog2(NPE) : 1,
  localparam int unsigned PU_W  = (NPU > 1) ? $clog2(NPU) : 1,
  localparam int unsigned R_W   = (NREG > 1) ? $clog2(NREG) : 1,
  localparam int unsigned I_W   = (IDEPTH > 1) ? $clog2(IDEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            halted,
  output logic            bus_busy,     // the PE bus moved a word this cycle
  output logic            any_stall,    // some PE is waiting on a link or the bus
  // host access
  input  logic [PE_W-1:0] host_pe,
  input  logic            imem_we,
  input  logic [I_W-1:0]  imem_addr,
  input  logic [31:0]     imem_wdata,
  input  logic            reg_we,
  input  logic [R_W-1:0]  reg_addr,
  input  logic [DW-1:0]   reg_wdata,
  input  logic [R_W-1:0]  reg_rd_addr,
  output logic [DW-1:0]   reg_rd_data,
  // PE 0: global bus follower port
  output logic            gb_wr_valid,
  output logic [PU_W-1:0] gb_wr_dest,
  output logic [DW-1:0]   gb_wr_data,
  input  logic            gb_wr_ready,
  input  logic            gb_rd_valid [NPU],
  input  logic [DW-1:0]   gb_rd_data  [NPU],
  output logic            gb_rd_pop   [NPU],
  // PE 0: neighbour link between PUs
  input  logic            pn_in_valid,
  input  logic [DW-1:0]   pn_in_data,
  output logic            pn_in_pop,
  output logic            pn_out_valid,
  output logic [DW-1:0]   pn_out_data,
  input  logic            pn_out_ready
);

  logic            b_wr_valid [NPE];
  logic [PE_W-1:0] b_wr_dest  [NPE];
  logic [DW-1:0]   b_wr_data  [NPE];
  logic            b_wr_ready [NPE];
  logic            b_rd_valid [NPE][NPE];
  logic [DW-1:0]   b_rd_data  [NPE][NPE];
  logic            b_rd_pop   [NPE][NPE];
  logic            grant_valid;
  logic [PE_W-1:0] grant_src;

  // neighbour ring: link i carries PE i -> PE (i+1) % NPE
  logic            l_push [NPE];
  logic [DW-1:0]   l_din  [NPE];
  logic            l_pop  [NPE];
  logic [DW-1:0]   l_dout [NPE];
  logic            l_full [NPE];
  logic            l_empty[NPE];

  logic            pe_halted [NPE];
  logic            pe_stall  [NPE];
  logic [DW-1:0]   pe_rd     [NPE];

  tabla_bus #(.NODES(NPE), .DW(DW)) u_bus (
    .clk, .rst_n,
    .wr_valid(b_wr_valid), .wr_dest(b_wr_dest), .wr_data(b_wr_data), .wr_ready(b_wr_ready),
    .rd_valid(b_rd_valid), .rd_data(b_rd_data), .rd_pop(b_rd_pop),
    .grant_valid, .grant_src
  );

  for (genvar i = 0; i < NPE; i++) begin : g_pe
    localparam int unsigned PREV = (i + NPE - 1) % NPE;
    logic          gbv [NPU];
    logic [DW-1:0] gbd [NPU];
    logic          gbp [NPU];
    logic          gwv, gwr, pov, por, pip, piv;
    logic [PU_W-1:0] gwd;
    logic [DW-1:0] gwdat, podat, pidat;

    tabla_fifo #(.W(DW), .DEPTH(LDEPTH)) u_link (
      .clk, .rst_n,
      .push(l_push[i]), .din(l_din[i]), .pop(l_pop[(i + 1) % NPE]),
      .dout(l_dout[i]), .full(l_full[i]), .empty(l_empty[i])
    );

    if (i == 0) begin : g_port
      assign gbv = gb_rd_valid;
      assign gbd = gb_rd_data;
      assign gb_rd_pop = gbp;
      assign gb_wr_valid = gwv;
      assign gb_wr_dest  = gwd;
      assign gb_wr_data  = gwdat;
      assign gwr = gb_wr_ready;
      assign piv = pn_in_valid;
      assign pidat = pn_in_data;
      assign pn_in_pop = pip;
      assign pn_out_valid = pov;
      assign pn_out_data  = podat;
      assign por = pn_out_ready;
    end else begin : g_tie
      for (genvar s = 0; s < NPU; s++) begin : g_t
        assign gbv[s] = 1'b0;
        assign gbd[s] = '0;
      end
      assign gwr   = 1'b0;
      assign piv   = 1'b0;
      assign pidat = '0;
      assign por   = 1'b0;
    end

    tabla_pe #(.NPE(NPE), .NPU(NPU), .DW(DW), .FRAC(FRAC), .NREG(NREG), .IDEPTH(IDEPTH)) u_pe (
      .clk, .rst_n, .start,
      .halted      (pe_halted[i]),
      .stalled     (pe_stall[i]),
      .imem_we     (imem_we && host_pe == PE_W'(i)),
      .imem_addr, .imem_wdata,
      .reg_we      (reg_we && host_pe == PE_W'(i)),
      .reg_addr, .reg_wdata, .reg_rd_addr,
      .reg_rd_data (pe_rd[i]),
      .nb_in_valid (!l_empty[PREV]),
      .nb_in_data  (l_dout[PREV]),
      .nb_in_pop   (l_pop[i]),
      .nb_out_valid(l_push[i]),
      .nb_out_data (l_din[i]),
      .nb_out_ready(!l_full[i]),
      .bus_wr_valid(b_wr_valid[i]),
      .bus_wr_dest (b_wr_dest[i]),
      .bus_wr_data (b_wr_data[i]),
      .bus_wr_ready(b_wr_ready[i]),
      .bus_rd_valid(b_rd_valid[i]),
      .bus_rd_data (b_rd_data[i]),
      .bus_rd_pop  (b_rd_pop[i]),
      .gb_wr_valid (gwv),
      .gb_wr_dest  (gwd),
      .gb_wr_data  (gwdat),
      .gb_wr_ready (gwr),
      .gb_rd_valid (gbv),
      .gb_rd_data  (gbd),
      .gb_rd_pop   (gbp),
      .pn_in_valid (piv),
      .pn_in_data  (pidat),
      .pn_in_pop   (pip),
      .pn_out_valid(pov),
      .pn_out_data (podat),
      .pn_out_ready(por)
    );
  end

  always_comb begin
    halted    = 1'b1;
    any_stall = 1'b0;
    for (int i = 0; i < NPE; i++) begin
      halted    &= pe_halted[i];
      any_stall |= pe_stall[i];
    end
  end

  assign bus_busy    = grant_valid;
  assign reg_rd_data = pe_rd[host_pe];

endmodule
