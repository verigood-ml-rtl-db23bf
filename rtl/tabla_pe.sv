// TABLA processing engine (PE).
//
// A small in-order engine that executes a program from its own instruction
// memory, one instruction per cycle. Each instruction takes operands from the
// register file, the neighbour link, the PE bus or (in PE 0 of a PU) the
// global bus and the inter-PU neighbour link, applies one ALU operation and
// sends the result to any of those places. An instruction waits (stalls)
// until every FIFO it reads holds data and the place it writes can accept
// it; then it reads, pops and writes in the same cycle. HALT stops the PE and
// raises `halted` until the next `start`. Data are DW-bit signed fixed-point
// numbers with FRAC fraction bits.
//
// The host loads instructions (imem_*) and registers (reg_*) and reads
// registers back asynchronously (reg_rd_*). The document only names the PE
// and shows its links (PE bus, neighbour chain, PE 0 on the global bus); the
// instruction set, register file, fixed-point format and stall rule are this
// design's choices (encoding in tabla_pkg).
module tabla_pe
  import tabla_pkg::*;
#(
  parameter int unsigned NPE    = 8,     // PEs on the PU bus
  parameter int unsigned NPU    = 8,     // PUs on the global bus
  parameter int unsigned DW     = 16,
  parameter int unsigned FRAC   = 8,
  parameter int unsigned NREG   = 16,
  parameter int unsigned IDEPTH = 64,
  localparam int unsigned PE_W  = (NPE > 1) ? $clog2(NPE) : 1,
  localparam int unsigned PU_W  = (NPU > 1) ? $clog2(NPU) : 1,
  localparam int unsigned R_W   = (NREG > 1) ? $clog2(NREG) : 1,
  localparam int unsigned I_W   = (IDEPTH > 1) ? $clog2(IDEPTH) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 halted,
  output logic                 stalled,
  // host access
  input  logic                 imem_we,
  input  logic [I_W-1:0]       imem_addr,
  input  logic [31:0]          imem_wdata,
  input  logic                 reg_we,
  input  logic [R_W-1:0]       reg_addr,
  input  logic [DW-1:0]        reg_wdata,
  input  logic [R_W-1:0]       reg_rd_addr,
  output logic [DW-1:0]        reg_rd_data,
  // neighbour link within the PU
  input  logic                 nb_in_valid,
  input  logic [DW-1:0]        nb_in_data,
  output logic                 nb_in_pop,
  output logic                 nb_out_valid,
  output logic [DW-1:0]        nb_out_data,
  input  logic                 nb_out_ready,
  // PE bus (follower port)
  output logic                 bus_wr_valid,
  output logic [PE_W-1:0]      bus_wr_dest,
  output logic [DW-1:0]        bus_wr_data,
  input  logic                 bus_wr_ready,
  input  logic                 bus_rd_valid [NPE],
  input  logic [DW-1:0]        bus_rd_data  [NPE],
  output logic                 bus_rd_pop   [NPE],
  // global bus (follower port, used by PE 0)
  output logic                 gb_wr_valid,
  output logic [PU_W-1:0]      gb_wr_dest,
  output logic [DW-1:0]        gb_wr_data,
  input  logic                 gb_wr_ready,
  input  logic                 gb_rd_valid [NPU],
  input  logic [DW-1:0]        gb_rd_data  [NPU],
  output logic                 gb_rd_pop   [NPU],
  // neighbour link between PUs (used by PE 0)
  input  logic                 pn_in_valid,
  input  logic [DW-1:0]        pn_in_data,
  output logic                 pn_in_pop,
  output logic                 pn_out_valid,
  output logic [DW-1:0]        pn_out_data,
  input  logic                 pn_out_ready
);

  logic [31:0]          imem [IDEPTH];
  logic signed [DW-1:0] rf   [NREG];
  logic [I_W-1:0]       pc;
  logic                 running;
  logic [31:0]          ir;
  tb_op_e               op;
  tb_loc_e              ak, bk, dk;
  logic [3:0]           ai, bi, di;
  logic                 use_a, use_b, use_d;
  logic                 a_ok, b_ok, d_ok, fire;
  logic signed [DW-1:0] a, b, res;
  logic signed [2*DW-1:0] prod;

  assign ir = imem[pc];
  assign op = tb_op_e'(ir[31:28]);
  assign ak = tb_loc_e'(ir[27:25]);
  assign ai = ir[24:21];
  assign bk = tb_loc_e'(ir[20:18]);
  assign bi = ir[17:14];
  assign dk = tb_loc_e'(ir[13:11]);
  assign di = ir[10:7];

  assign use_a = running && op != TB_NOP && op != TB_HALT;
  assign use_b = use_a && op != TB_PASS;
  assign use_d = use_a;

  // operand availability and value
  function automatic logic src_ok(tb_loc_e k, logic [3:0] i, logic nbv, logic pnv,
                                  logic bv [NPE], logic gv [NPU]);
    unique case (k)
      LOC_REG:  return 1'b1;
      LOC_NB:   return nbv;
      LOC_BUS:  return bv[PE_W'(i)];
      LOC_GBUS: return gv[PU_W'(i)];
      default:  return pnv;
    endcase
  endfunction

  function automatic logic signed [DW-1:0] src_val(tb_loc_e k, logic [3:0] i,
      logic signed [DW-1:0] regs [NREG], logic [DW-1:0] nbd, logic [DW-1:0] pnd,
      logic [DW-1:0] bd [NPE], logic [DW-1:0] gd [NPU]);
    unique case (k)
      LOC_REG:  return regs[R_W'(i)];
      LOC_NB:   return nbd;
      LOC_BUS:  return bd[PE_W'(i)];
      LOC_GBUS: return gd[PU_W'(i)];
      default:  return pnd;
    endcase
  endfunction

  assign a_ok = !use_a || src_ok(ak, ai, nb_in_valid, pn_in_valid, bus_rd_valid, gb_rd_valid);
  assign b_ok = !use_b || src_ok(bk, bi, nb_in_valid, pn_in_valid, bus_rd_valid, gb_rd_valid);
  always_comb begin
    unique case (dk)
      LOC_REG:  d_ok = 1'b1;
      LOC_NB:   d_ok = nb_out_ready;
      LOC_BUS:  d_ok = bus_wr_ready;
      LOC_GBUS: d_ok = gb_wr_ready;
      default:  d_ok = pn_out_ready;
    endcase
    if (!use_d) d_ok = 1'b1;
  end

  assign fire    = running && a_ok && b_ok && d_ok;
  assign stalled = running && !fire;

  assign a = src_val(ak, ai, rf, nb_in_data, pn_in_data, bus_rd_data, gb_rd_data);
  assign b = src_val(bk, bi, rf, nb_in_data, pn_in_data, bus_rd_data, gb_rd_data);
  assign prod = a * b;

  always_comb begin
    unique case (op)
      TB_ADD:  res = a + b;
      TB_SUB:  res = a - b;
      TB_MUL:  res = DW'(prod >>> FRAC);
      TB_MAX:  res = (a > b) ? a : b;
      TB_MIN:  res = (a < b) ? a : b;
      TB_GT:   res = (a > b) ? DW'(1 << FRAC) : '0;
      default: res = a;
    endcase
  end

  // pops: a FIFO named by both operands is popped once
  always_comb begin
    nb_in_pop = fire && ((use_a && ak == LOC_NB) || (use_b && bk == LOC_NB));
    pn_in_pop = fire && ((use_a && ak == LOC_PUNB) || (use_b && bk == LOC_PUNB));
    for (int s = 0; s < NPE; s++)
      bus_rd_pop[s] = fire && ((use_a && ak == LOC_BUS && PE_W'(ai) == PE_W'(s)) ||
                               (use_b && bk == LOC_BUS && PE_W'(bi) == PE_W'(s)));
    for (int s = 0; s < NPU; s++)
      gb_rd_pop[s] = fire && ((use_a && ak == LOC_GBUS && PU_W'(ai) == PU_W'(s)) ||
                              (use_b && bk == LOC_GBUS && PU_W'(bi) == PU_W'(s)));
  end

  // result pushes
  assign nb_out_valid = fire && use_d && dk == LOC_NB;
  assign nb_out_data  = res;
  assign bus_wr_valid = fire && use_d && dk == LOC_BUS;
  assign bus_wr_dest  = PE_W'(di);
  assign bus_wr_data  = res;
  assign gb_wr_valid  = fire && use_d && dk == LOC_GBUS;
  assign gb_wr_dest   = PU_W'(di);
  assign gb_wr_data   = res;
  assign pn_out_valid = fire && use_d && dk == LOC_PUNB;
  assign pn_out_data  = res;

  assign reg_rd_data = rf[reg_rd_addr];

  always_ff @(posedge clk) begin
    if (imem_we) imem[imem_addr] <= imem_wdata;
    if (fire && use_d && dk == LOC_REG) rf[R_W'(di)] <= res;
    else if (reg_we)                    rf[reg_addr] <= reg_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      halted  <= 1'b0;
      pc      <= '0;
    end else if (start) begin
      running <= 1'b1;
      halted  <= 1'b0;
      pc      <= '0;
    end else if (fire) begin
      if (op == TB_HALT) begin
        running <= 1'b0;
        halted  <= 1'b1;
      end else begin
        pc <= pc + 1'b1;
      end
    end
  end

endmodule
