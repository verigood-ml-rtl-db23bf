// TABLA shared definitions: the processing-engine instruction encoding.
//
// The document names the TABLA processing engine and its buses but does not
// give the PE's instruction set; this encoding is this design's own. One
// 32-bit instruction reads up to two operands and writes one result:
//   [31:28] op     (tb_op_e)
//   [27:25] A kind (tb_loc_e)  [24:21] A index
//   [20:18] B kind             [17:14] B index
//   [13:11] D kind             [10:7]  D index
// Index meaning per kind: REG register number, BUS source/destination PE in
// the PU, GBUS source/destination PU; NB and PUNB ignore it.
package tabla_pkg;

  typedef enum logic [3:0] {
    TB_NOP  = 4'd0,
    TB_ADD  = 4'd1,
    TB_SUB  = 4'd2,
    TB_MUL  = 4'd3,   // fixed-point product, shifted right by FRAC
    TB_MAX  = 4'd4,
    TB_MIN  = 4'd5,
    TB_PASS = 4'd6,   // D = A
    TB_GT   = 4'd7,   // D = (A > B) ? 1.0 : 0
    TB_HALT = 4'd8
  } tb_op_e;

  typedef enum logic [2:0] {
    LOC_REG  = 3'd0,  // local register file
    LOC_NB   = 3'd1,  // neighbour link inside the PU (from the left, to the right)
    LOC_BUS  = 3'd2,  // PE bus of the PU
    LOC_GBUS = 3'd3,  // global bus between PUs (PE 0 only)
    LOC_PUNB = 3'd4   // neighbour link between PUs (PE 0 only)
  } tb_loc_e;

  function automatic logic [31:0] tb_instr(tb_op_e op, tb_loc_e ak, int ai,
                                           tb_loc_e bk, int bi, tb_loc_e dk, int di);
    return {op, ak, 4'(ai), bk, 4'(bi), dk, 4'(di), 7'd0};
  endfunction

endpackage
