// GeneSys shared definitions.
//
// Holds the instruction encoding of the GeneSys controller and the operation
// codes of the SIMD vector unit. The document names the instruction classes of
// the SIMD ISA (ALU, CALCULUS, COMPARISON, DATATYPE CAST as execution
// instructions; DATATYPE CONFIG, ITERATOR CONFIG, LOOP as setup instructions)
// but not their encoding: every bit position below is this design's own choice.
//
// Controller instruction, 32 bits:
//   [31:28] opcode (gs_op_e)
//   [27:24] sub-field: config register index (OP_CFG), load target (OP_LOAD),
//           SIMD operation (OP_SIMD), store source (OP_STORE)
//   [23:0]  immediate (OP_CFG value) or flags (OP_GEMM, OP_SIMD)
package gs_pkg;

  typedef enum logic [3:0] {
    OP_END   = 4'd0,  // stop, raise done
    OP_CFG   = 4'd1,  // setup: write a configuration register (iterator/loop/base)
    OP_LOAD  = 4'd2,  // tile load from off-chip into IBUFF/WBUFF/BBUFF/VMEM
    OP_STORE = 4'd3,  // tile store from vector memory to off-chip
    OP_GEMM  = 4'd4,  // run the systolic array over a tile
    OP_SIMD  = 4'd5,  // one SIMD vector operation over a range of rows
    OP_SYNC  = 4'd6   // wait until a background load has finished
  } gs_op_e;

  // load targets, instr[26:24]; a store uses instr[24]: 0 vector memory, 1 OBUFF
  typedef enum logic [2:0] {
    TGT_IBUF = 3'd0,
    TGT_WBUF = 3'd1,
    TGT_BBUF = 3'd2,
    TGT_VMEM = 3'd3,
    TGT_OBUF = 3'd4
  } gs_tgt_e;

  // configuration registers written by OP_CFG
  localparam int unsigned NCFG       = 16;
  localparam int unsigned R_EXT_BASE = 0;   // off-chip base address
  localparam int unsigned R_CNT0     = 1;   // inner loop count
  localparam int unsigned R_STR0     = 2;   // inner loop stride (words)
  localparam int unsigned R_CNT1     = 3;   // outer loop count
  localparam int unsigned R_STR1     = 4;   // outer loop stride (words)
  localparam int unsigned R_ROWS     = 5;   // rows in a GEMM / SIMD operation
  localparam int unsigned R_WSLOT    = 6;   // weight scratchpad slot for GEMM and WBUFF loads
  localparam int unsigned R_SRC1     = 7;   // SIMD source 1 base row
  localparam int unsigned R_SRC2     = 8;   // SIMD source 2 base row
  localparam int unsigned R_DST      = 9;   // SIMD destination base row
  localparam int unsigned R_IMM      = 10;  // SIMD immediate operand
  localparam int unsigned R_SHIFT    = 11;  // DATATYPE CONFIG: cast shift amount
  localparam int unsigned R_BUF_BASE = 12;  // on-chip element base of a load or store

  // LOAD flag: instr[23] set starts the load in the background; later
  // instructions run while it transfers, OP_SYNC waits for it, and a further
  // LOAD, STORE or END waits for it too
  localparam int unsigned LOAD_BG = 23;

  // GEMM flags, instr[1:0]
  localparam int unsigned GEMM_ACC  = 0;   // accumulate into OBUFF instead of overwriting
  localparam int unsigned GEMM_BIAS = 1;   // add BBUFF bias below the array

  // SIMD flags, instr[1:0]
  localparam int unsigned SIMD_SRC1_OBUF = 0;  // source 1 read from OBUFF (else VMEM)
  localparam int unsigned SIMD_SRC2_IMM  = 1;  // source 2 is the immediate (else VMEM)

  typedef enum logic [3:0] {
    // ALU class
    SIMD_ADD  = 4'd0,
    SIMD_SUB  = 4'd1,
    SIMD_MUL  = 4'd2,
    SIMD_MAX  = 4'd3,
    SIMD_MIN  = 4'd4,
    // CALCULUS class
    SIMD_RELU = 4'd5,
    SIMD_ABS  = 4'd6,
    // COMPARISON class
    SIMD_GT   = 4'd7,
    SIMD_EQ   = 4'd8,
    // DATATYPE CAST class: arithmetic shift right then saturate to CAST_W bits
    SIMD_CAST = 4'd9,
    SIMD_MOV  = 4'd10
  } simd_op_e;

  function automatic logic [31:0] instr(gs_op_e op, logic [3:0] sub, logic [23:0] imm);
    return {op, sub, imm};
  endfunction

endpackage
