// GeneSys SIMD vector unit with its vector memory.
//
// A 1 x N array of lanes for the layers that are not convolutions or fully
// connected layers (activation, pooling, element-wise operations, casts). As
// the document describes, there is no register file: operands are read
// straight from the scratchpads (source 1 from OBUFF or the vector memory,
// source 2 from the vector memory or an immediate), executed, and written
// back to the vector memory. One command processes `rows` consecutive rows
// (ITERATOR/LOOP setup in the controller) at one row of N lanes per cycle.
//
// Pipeline: cycle 0 issues the read addresses, cycle 1 has the synchronous
// read data and registers the lane results, cycle 2 writes them back. A
// command therefore takes rows + 2 cycles after `start`; `done` pulses in the
// cycle after the last write-back. A row written by a command must not be
// read by the same command within two rows (no forwarding path).
//
// The vector memory is VDEPTH rows of N lanes. The load/store interface sees
// it as a flat word array: element e is lane e % N of row e / N; ls_rd_data
// appears one cycle after ls_rd_en. The operation set follows the document's
// instruction classes (ALU, CALCULUS, COMPARISON, DATATYPE CAST); the
// individual operations, the saturating cast and the pipeline depth are this
// design's choices.
module gs_simd
  import gs_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter int unsigned DW     = 32,
  parameter int unsigned VDEPTH = 64,
  parameter int unsigned ODEPTH = 64,
  parameter int unsigned CAST_W = 8,
  localparam int unsigned VA_W  = (VDEPTH > 1) ? $clog2(VDEPTH) : 1,
  localparam int unsigned OA_W  = (ODEPTH > 1) ? $clog2(ODEPTH) : 1,
  localparam int unsigned LN_W  = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned EA_W  = VA_W + LN_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // command
  input  logic                 start,
  input  simd_op_e             op,
  input  logic                 src1_obuf,
  input  logic                 src2_imm,
  input  logic [VA_W-1:0]      src1,
  input  logic [VA_W-1:0]      src2,
  input  logic [VA_W-1:0]      dst,
  input  logic [15:0]          rows,
  input  logic signed [DW-1:0] imm,
  input  logic [4:0]           shift,
  output logic                 busy,
  output logic                 done,
  // OBUFF read port (synchronous, one cycle)
  output logic [OA_W-1:0]      obuf_rd_addr,
  input  logic signed [DW-1:0] obuf_rd_data [N],
  // load/store interface port, word-wide
  input  logic                 ls_wr_en,
  input  logic [EA_W-1:0]      ls_wr_addr,
  input  logic [DW-1:0]        ls_wr_data,
  input  logic                 ls_rd_en,
  input  logic [EA_W-1:0]      ls_rd_addr,
  output logic [DW-1:0]        ls_rd_data
);

  localparam logic signed [DW-1:0] CAST_MAX = DW'((64'sd1 <<< (CAST_W - 1)) - 1);
  localparam logic signed [DW-1:0] CAST_MIN = -DW'(64'sd1 <<< (CAST_W - 1));

  // ---------------------------------------------------------------- control
  logic          run;
  logic [15:0]   issued;
  logic [VA_W-1:0] rd1_addr, rd2_addr, wr_row_s1, wr_row_s2;
  logic          vld_s1, vld_s2;
  simd_op_e      op_q;
  logic          s1_obuf_q, s2_imm_q;
  logic signed [DW-1:0] imm_q;
  logic [4:0]    shift_q;
  logic [VA_W-1:0] src1_q, src2_q, dst_q;
  logic [15:0]   rows_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; issued <= '0; vld_s1 <= 1'b0; vld_s2 <= 1'b0; done <= 1'b0;
      wr_row_s1 <= '0; wr_row_s2 <= '0; op_q <= SIMD_ADD; s1_obuf_q <= 1'b0;
      s2_imm_q <= 1'b0; imm_q <= '0; shift_q <= '0; src1_q <= '0; src2_q <= '0;
      dst_q <= '0; rows_q <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        run <= 1'b1; issued <= '0; op_q <= op; s1_obuf_q <= src1_obuf;
        s2_imm_q <= src2_imm; imm_q <= imm; shift_q <= shift;
        src1_q <= src1; src2_q <= src2; dst_q <= dst;
        rows_q <= (rows == '0) ? 16'd1 : rows;
      end else if (run) begin
        issued <= issued + 1'b1;
        if (issued + 1'b1 == rows_q) run <= 1'b0;
      end
      vld_s1    <= run;
      wr_row_s1 <= dst_q + VA_W'(issued);
      vld_s2    <= vld_s1;
      wr_row_s2 <= wr_row_s1;
      if (vld_s2 && !vld_s1 && !run) done <= 1'b1;
    end
  end

  assign busy         = run || vld_s1 || vld_s2;
  assign rd1_addr     = src1_q + VA_W'(issued);
  assign rd2_addr     = src2_q + VA_W'(issued);
  assign obuf_rd_addr = OA_W'(src1_q) + OA_W'(issued);

  // ------------------------------------------------------------------ lanes
  function automatic logic signed [DW-1:0] lane_op(simd_op_e o, logic signed [DW-1:0] a,
                                                   logic signed [DW-1:0] b, logic [4:0] sh);
    logic signed [DW-1:0] t;
    unique case (o)
      SIMD_ADD:  return a + b;
      SIMD_SUB:  return a - b;
      SIMD_MUL:  return a * b;
      SIMD_MAX:  return (a > b) ? a : b;
      SIMD_MIN:  return (a < b) ? a : b;
      SIMD_RELU: return (a < 0) ? '0 : a;
      SIMD_ABS:  return (a < 0) ? -a : a;
      SIMD_GT:   return (a > b) ? DW'(1) : '0;
      SIMD_EQ:   return (a == b) ? DW'(1) : '0;
      SIMD_CAST: begin
        t = a >>> sh;
        if (t > CAST_MAX)      return CAST_MAX;
        else if (t < CAST_MIN) return CAST_MIN;
        else                   return t;
      end
      default:   return a;   // SIMD_MOV
    endcase
  endfunction

  logic [LN_W-1:0] ls_lane_q;
  logic [DW-1:0]   ls_row [N];

  for (genvar n = 0; n < N; n++) begin : g_lane
    logic signed [DW-1:0] vmem [VDEPTH];
    logic signed [DW-1:0] rd1, rd2, res;
    logic signed [DW-1:0] a, b;

    always_ff @(posedge clk) begin
      rd1 <= vmem[rd1_addr];
      rd2 <= vmem[rd2_addr];
      ls_row[n] <= vmem[ls_rd_addr[EA_W-1:LN_W]];
      if (vld_s2)
        vmem[wr_row_s2] <= res;
      else if (ls_wr_en && ls_wr_addr[LN_W-1:0] == LN_W'(n))
        vmem[ls_wr_addr[EA_W-1:LN_W]] <= ls_wr_data;
    end

    assign a = s1_obuf_q ? obuf_rd_data[n] : rd1;
    assign b = s2_imm_q  ? imm_q : rd2;

    always_ff @(posedge clk) begin
      if (vld_s1) res <= lane_op(op_q, a, b, shift_q);
    end
  end

  always_ff @(posedge clk) begin
    if (ls_rd_en) ls_lane_q <= ls_rd_addr[LN_W-1:0];
  end
  assign ls_rd_data = ls_row[ls_lane_q];

endmodule
