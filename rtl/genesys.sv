// GeneSys DNN accelerator.
//
// A programmable engine built around two compute arrays: an M x N
// weight-stationary systolic array for convolutions and fully connected layers
// (as matrix multiplications) and a 1 x N SIMD vector unit for everything else
// (activations, pooling, element-wise operations, requantisation). The parts:
//
//   gs_controller      instruction memory, decoder, execution FSM, config registers
//   gs_mem_if x 4      tile load/store engines, each on its own memory channel:
//                        ch 0  IBUFF interface      (load)
//                        ch 1  ParamBuf interface   (load into WBUFF and BBUFF)
//                        ch 2  OBUFF interface      (load and store)
//                        ch 3  SIMD LD_ST interface (load and store, vector memory)
//   IBUFF              M banks, one per array row, double buffered
//   WBUFF              the weight scratchpads inside the PEs (WMEM_DEPTH slots)
//   BBUFF              N biases, added below the last array row
//   gs_systolic_array  the PE array
//   gs_obuf            OBUFF, one bank per array column
//   gs_simd            SIMD vector unit with its vector memory
//
// A GEMM instruction computes, for r = 0 .. ROWS-1,
//   OBUFF[r][n] (+)= sum_m IBUFF[m][r] * W[slot][m][n] (+ bias[n])
// with one input row entering the array per cycle; it ends when the last
// column has delivered ROWS results, ROWS + M + N + 1 cycles after the first
// IBUFF read. The IBUFF half read is the one its interface filled last, so the
// next tile can be loaded into the other half meanwhile.
//
// Memory channel protocol (per channel, this design's own): mem_req with
// mem_addr, mem_we and mem_wdata is accepted when mem_gnt is high; read data
// returns in order on mem_rvalid/mem_rdata. Words are DW bits; activations,
// weights and biases are taken from the low bits of a word. The instruction
// memory is written directly by the host (imem_* ports) rather than through
// a memory channel. Channels 0 and 1 only load, so their mem_we and mem_wdata
// outputs stay at zero; they keep the port so all four channels look alike. The block structure and the channels follow the document's
// system view; the ISA encoding (gs_pkg), the data layouts and the sizes
// marked as defaults are this design's choices.
module genesys
  import gs_pkg::*;
#(
  parameter int unsigned M          = 32,
  parameter int unsigned N          = 32,
  parameter int unsigned ACT_W      = 8,
  parameter int unsigned WGT_W      = 8,
  parameter int unsigned PSUM_W     = 32,
  parameter int unsigned WMEM_DEPTH = 16,
  parameter int unsigned IB_DEPTH   = 64,   // rows per IBUFF bank (two halves)
  parameter int unsigned OB_DEPTH   = 64,   // rows per OBUFF bank
  parameter int unsigned VDEPTH     = 64,   // vector memory rows
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned AW         = 24,
  localparam int unsigned DW        = 32,
  localparam int unsigned NCH       = 4,
  localparam int unsigned IA_W      = (IMEM_DEPTH > 1) ? $clog2(IMEM_DEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // host: program load and run
  input  logic            imem_we,
  input  logic [IA_W-1:0] imem_waddr,
  input  logic [31:0]     imem_wdata,
  input  logic            start,
  output logic            busy,
  output logic            done,
  // memory channels
  output logic            mem_req   [NCH],
  output logic            mem_we    [NCH],
  output logic [AW-1:0]   mem_addr  [NCH],
  output logic [DW-1:0]   mem_wdata [NCH],
  input  logic            mem_gnt   [NCH],
  input  logic            mem_rvalid[NCH],
  input  logic [DW-1:0]   mem_rdata [NCH]
);

  localparam int unsigned LM_W  = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned LN_W  = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned IR_W  = $clog2(IB_DEPTH);
  localparam int unsigned WA_W  = (WMEM_DEPTH > 1) ? $clog2(WMEM_DEPTH) : 1;
  localparam int unsigned OA_W  = $clog2(OB_DEPTH);
  localparam int unsigned VA_W  = $clog2(VDEPTH);
  localparam int unsigned BAW_I = LM_W + IR_W;          // IBUFF element address
  localparam int unsigned BAW_P = LM_W + LN_W;          // WBUFF/BBUFF element address
  localparam int unsigned BAW_O = LN_W + OA_W;          // OBUFF element address
  localparam int unsigned BAW_V = LN_W + VA_W;          // vector memory element address
  localparam int unsigned BAW   = 16;                   // common width of the interface ports

  // ------------------------------------------------------------- controller
  logic [23:0] cfg [NCFG];
  logic        ld_start, st_start, st_obuf, gemm_start, simd_start;
  gs_tgt_e     ld_tgt;
  logic [1:0]  gemm_flags, simd_flags;
  simd_op_e    simd_op;
  logic        ld_done, st_done, gemm_done, simd_done;

  gs_controller #(.IMEM_DEPTH(IMEM_DEPTH)) u_ctrl (
    .clk, .rst_n,
    .imem_we, .imem_waddr, .imem_wdata,
    .start, .busy, .done,
    .cfg,
    .ld_start, .ld_tgt, .st_start, .st_obuf,
    .gemm_start, .gemm_flags, .simd_start, .simd_op, .simd_flags,
    .ld_done, .st_done, .gemm_done, .simd_done
  );

  // ------------------------------------------------------ memory interfaces
  logic           mi_start [NCH];
  logic           mi_store [NCH];
  logic           mi_done  [NCH];
  logic           mi_busy  [NCH];
  logic           mi_tag   [NCH];
  logic           mi_half  [NCH];
  logic           b_wr_en  [NCH];
  logic [BAW-1:0] b_wr_addr[NCH];
  logic [DW-1:0]  b_wr_data[NCH];
  logic           b_rd_en  [NCH];
  logic [BAW-1:0] b_rd_addr[NCH];
  logic [DW-1:0]  b_rd_data[NCH];
  logic [15:0]    mi_count [2];
  logic [AW-1:0]  mi_stride[2];
  logic           param_is_w;   // ParamBuf load target: 1 WBUFF, 0 BBUFF

  assign mi_count[0]  = cfg[R_CNT0][15:0];
  assign mi_count[1]  = cfg[R_CNT1][15:0];
  assign mi_stride[0] = AW'(cfg[R_STR0]);
  assign mi_stride[1] = AW'(cfg[R_STR1]);

  assign mi_start[0] = ld_start && ld_tgt == TGT_IBUF;
  assign mi_start[1] = ld_start && (ld_tgt == TGT_WBUF || ld_tgt == TGT_BBUF);
  assign mi_start[2] = (ld_start && ld_tgt == TGT_OBUF) || (st_start && st_obuf);
  assign mi_start[3] = (ld_start && ld_tgt == TGT_VMEM) || (st_start && !st_obuf);
  assign mi_store[0] = 1'b0;
  assign mi_store[1] = 1'b0;
  assign mi_store[2] = st_start;
  assign mi_store[3] = st_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      param_is_w <= 1'b0;
    else if (mi_start[1])            param_is_w <= (ld_tgt == TGT_WBUF);
  end

  for (genvar c = 0; c < NCH; c++) begin : g_mi
    gs_mem_if #(.AW(AW), .DW(DW), .BAW(c == 0 ? BAW_I : BAW), .DBUF(c == 0)) u_mi (
      .clk, .rst_n,
      .start      (mi_start[c]),
      .store      (mi_store[c]),
      .base       (AW'(cfg[R_EXT_BASE])),
      .count      (mi_count),
      .stride     (mi_stride),
      .buf_base   ((c == 0 ? BAW_I : BAW)'(cfg[R_BUF_BASE])),
      .busy       (mi_busy[c]),
      .done       (mi_done[c]),
      .tag        (mi_tag[c]),
      .ready_half (mi_half[c]),
      .mem_req    (mem_req[c]),
      .mem_we     (mem_we[c]),
      .mem_addr   (mem_addr[c]),
      .mem_wdata  (mem_wdata[c]),
      .mem_gnt    (mem_gnt[c]),
      .mem_rvalid (mem_rvalid[c]),
      .mem_rdata  (mem_rdata[c]),
      .buf_wr_en  (b_wr_en[c]),
      .buf_wr_addr(b_wr_addr[c][(c == 0 ? BAW_I : BAW)-1:0]),
      .buf_wr_data(b_wr_data[c]),
      .buf_rd_en  (b_rd_en[c]),
      .buf_rd_addr(b_rd_addr[c][(c == 0 ? BAW_I : BAW)-1:0]),
      .buf_rd_data(b_rd_data[c])
    );
    if (c == 0) begin : g_pad
      assign b_wr_addr[c][BAW-1:BAW_I] = '0;
      assign b_rd_addr[c][BAW-1:BAW_I] = '0;
    end
  end

  // remembers whether the running channel 2/3 transfer is a store
  logic st_pending;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          st_pending <= 1'b0;
    else if (st_start)   st_pending <= 1'b1;
    else if (ld_start)   st_pending <= 1'b0;
  end

  assign ld_done = mi_done[0] || mi_done[1] || ((mi_done[2] || mi_done[3]) && !st_pending);
  assign st_done = (mi_done[2] || mi_done[3]) && st_pending;


  // ------------------------------------------------------------------ IBUFF
  logic                    ib_rd_en;
  logic [IR_W-1:0]         ib_rd_row;
  logic signed [ACT_W-1:0] ib_rd_data [M];

  for (genvar m = 0; m < M; m++) begin : g_ibank
    logic signed [ACT_W-1:0] mem [IB_DEPTH];
    always_ff @(posedge clk) begin
      if (b_wr_en[0] && b_wr_addr[0][LM_W-1:0] == LM_W'(m))
        mem[b_wr_addr[0][BAW_I-1:LM_W]] <= b_wr_data[0][ACT_W-1:0];
      if (ib_rd_en) ib_rd_data[m] <= mem[ib_rd_row];
    end
  end
  assign b_rd_data[0] = '0;

  // ------------------------------------------------------- WBUFF and BBUFF
  logic                     w_wr_en   [M];
  logic [LN_W-1:0]          w_wr_col  [M];
  logic [WA_W-1:0]          w_wr_addr [M];
  logic signed [WGT_W-1:0]  w_wr_data [M];
  logic signed [PSUM_W-1:0] bias      [N];

  for (genvar m = 0; m < M; m++) begin : g_wbus
    assign w_wr_en[m]   = b_wr_en[1] && param_is_w &&
                          b_wr_addr[1][BAW_P-1:LN_W] == (BAW_P-LN_W)'(m);
    assign w_wr_col[m]  = b_wr_addr[1][LN_W-1:0];
    assign w_wr_addr[m] = WA_W'(cfg[R_WSLOT]);
    assign w_wr_data[m] = b_wr_data[1][WGT_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (b_wr_en[1] && !param_is_w)
      bias[b_wr_addr[1][LN_W-1:0]] <= PSUM_W'($signed(b_wr_data[1]));
  end
  assign b_rd_data[1] = '0;

  // ------------------------------------------------------------------- GEMM
  typedef enum logic [1:0] {G_IDLE, G_RUN, G_DRAIN} gstate_e;
  gstate_e         gstate;
  logic [15:0]     g_rows, g_issued, g_outcnt;
  logic [WA_W-1:0] g_slot;
  logic            g_acc, g_bias, g_half;
  logic            arr_valid;
  logic            arr_out_valid [N];
  logic signed [PSUM_W-1:0] arr_out [N];
  logic            ob_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gstate    <= G_IDLE;
      g_rows    <= '0;
      g_issued  <= '0;
      g_outcnt  <= '0;
      g_slot    <= '0;
      g_acc     <= 1'b0;
      g_bias    <= 1'b0;
      g_half    <= 1'b0;
      arr_valid <= 1'b0;
      gemm_done <= 1'b0;
    end else begin
      gemm_done <= 1'b0;
      arr_valid <= ib_rd_en;
      if (arr_out_valid[N-1]) g_outcnt <= g_outcnt + 1'b1;
      unique case (gstate)
        G_IDLE: if (gemm_start) begin
          gstate   <= G_RUN;
          g_rows   <= (cfg[R_ROWS][15:0] == '0) ? 16'd1 : cfg[R_ROWS][15:0];
          g_issued <= '0;
          g_outcnt <= '0;
          g_slot   <= WA_W'(cfg[R_WSLOT]);
          g_acc    <= gemm_flags[GEMM_ACC];
          g_bias   <= gemm_flags[GEMM_BIAS];
          g_half   <= mi_half[0];
        end
        G_RUN: begin
          g_issued <= g_issued + 1'b1;
          if (g_issued + 1'b1 == g_rows) gstate <= G_DRAIN;
        end
        G_DRAIN: if (arr_out_valid[N-1] && g_outcnt + 1'b1 == g_rows) begin
          gstate    <= G_IDLE;
          gemm_done <= 1'b1;
        end
        default: gstate <= G_IDLE;
      endcase
    end
  end

  assign ib_rd_en  = (gstate == G_RUN);
  assign ib_rd_row = {g_half, g_issued[IR_W-2:0]};
  assign ob_start  = gemm_start && (gstate == G_IDLE);

  gs_systolic_array #(
    .M(M), .N(N), .ACT_W(ACT_W), .WGT_W(WGT_W), .PSUM_W(PSUM_W), .WMEM_DEPTH(WMEM_DEPTH)
  ) u_array (
    .clk, .rst_n,
    .in_valid (arr_valid),
    .act_in   (ib_rd_data),
    .w_slot   (g_slot),
    .w_wr_en, .w_wr_col, .w_wr_addr, .w_wr_data,
    .bias_en  (g_bias),
    .bias     (bias),
    .out_valid(arr_out_valid),
    .out_data (arr_out)
  );

  // ------------------------------------------------------------------ OBUFF
  logic [OA_W-1:0]          ob_rd_addr;
  logic signed [PSUM_W-1:0] ob_rd_data [N];

  gs_obuf #(.N(N), .PSUM_W(PSUM_W), .DEPTH(OB_DEPTH)) u_obuf (
    .clk, .rst_n,
    .start     (ob_start),
    .acc       (g_acc),
    .wr_valid  (arr_out_valid),
    .wr_data   (arr_out),
    .rd_addr   (ob_rd_addr),
    .rd_data   (ob_rd_data),
    .ls_wr_en  (b_wr_en[2]),
    .ls_wr_addr(b_wr_addr[2][BAW_O-1:0]),
    .ls_wr_data(b_wr_data[2]),
    .ls_rd_en  (b_rd_en[2]),
    .ls_rd_addr(b_rd_addr[2][BAW_O-1:0]),
    .ls_rd_data(b_rd_data[2])
  );

  // ------------------------------------------------------------------- SIMD
  gs_simd #(.N(N), .DW(DW), .VDEPTH(VDEPTH), .ODEPTH(OB_DEPTH)) u_simd (
    .clk, .rst_n,
    .start       (simd_start),
    .op          (simd_op),
    .src1_obuf   (simd_flags[SIMD_SRC1_OBUF]),
    .src2_imm    (simd_flags[SIMD_SRC2_IMM]),
    .src1        (VA_W'(cfg[R_SRC1])),
    .src2        (VA_W'(cfg[R_SRC2])),
    .dst         (VA_W'(cfg[R_DST])),
    .rows        (cfg[R_ROWS][15:0]),
    .imm         (DW'($signed(cfg[R_IMM]))),
    .shift       (cfg[R_SHIFT][4:0]),
    .busy        (),
    .done        (simd_done),
    .obuf_rd_addr(ob_rd_addr),
    .obuf_rd_data(ob_rd_data),
    .ls_wr_en    (b_wr_en[3]),
    .ls_wr_addr  (b_wr_addr[3][BAW_V-1:0]),
    .ls_wr_data  (b_wr_data[3]),
    .ls_rd_en    (b_rd_en[3]),
    .ls_rd_addr  (b_rd_addr[3][BAW_V-1:0]),
    .ls_rd_data  (b_rd_data[3])
  );

endmodule
