// Test programs for TABLA: a distributed dot product, the core of linear
// SVM/regression inference. Every PE holds one feature x in r0 and one weight
// w in r1 and computes x * w. Inside a PU the products are summed along the
// neighbour chain PE 0 -> PE 1 -> ... -> PE NPE-1, and the last PE returns
// the PU's sum to PE 0 over the PE bus. Across PUs (chip = 1) the PU sums are
// chained over the inter-PU links PU 0 -> ... -> PU NPU-1, and the last PU
// sends the total to PU 0 over the global bus. PE 0 of PU 0 keeps the total
// in r3 and the decision (total > r4) in r5.
// With nf > 1 every PE holds nf feature/weight pairs: the first in r0/r1,
// pair j >= 1 in r(4+2j)/r(5+2j); the PE first sums its nf products in r2
// (r14 as scratch) and then joins the same reduction.
package tb_tabla_prog_pkg;
  import tabla_pkg::*;

  function automatic void pe_prog(int pu, int pe, int npu, int npe, bit chip,
                                  ref logic [31:0] p [$], input int nf = 1);
    p.delete();
    if (nf > 1) begin
      p.push_back(tb_instr(TB_MUL, LOC_REG, 0, LOC_REG, 1, LOC_REG, 2));
      for (int j = 1; j < nf; j++) begin
        p.push_back(tb_instr(TB_MUL, LOC_REG, 4 + 2 * j, LOC_REG, 5 + 2 * j, LOC_REG, 14));
        p.push_back(tb_instr(TB_ADD, LOC_REG, 2, LOC_REG, 14, LOC_REG, 2));
      end
    end
    if (pe == 0) begin
      if (nf > 1) p.push_back(tb_instr(TB_PASS, LOC_REG, 2, LOC_REG, 0, LOC_NB, 0));
      else        p.push_back(tb_instr(TB_MUL, LOC_REG, 0, LOC_REG, 1, LOC_NB, 0));
      if (!chip) begin
        p.push_back(tb_instr(TB_PASS, LOC_BUS, npe - 1, LOC_REG, 0, LOC_REG, 3));
      end else if (pu == 0) begin
        p.push_back(tb_instr(TB_PASS, LOC_BUS, npe - 1, LOC_REG, 0, LOC_PUNB, 0));
        p.push_back(tb_instr(TB_PASS, LOC_GBUS, npu - 1, LOC_REG, 0, LOC_REG, 3));
      end else if (pu < npu - 1) begin
        p.push_back(tb_instr(TB_ADD, LOC_BUS, npe - 1, LOC_PUNB, 0, LOC_PUNB, 0));
      end else begin
        p.push_back(tb_instr(TB_ADD, LOC_BUS, npe - 1, LOC_PUNB, 0, LOC_GBUS, 0));
      end
      if (!chip || pu == 0)
        p.push_back(tb_instr(TB_GT, LOC_REG, 3, LOC_REG, 4, LOC_REG, 5));
    end else begin
      if (nf == 1) p.push_back(tb_instr(TB_MUL, LOC_REG, 0, LOC_REG, 1, LOC_REG, 2));
      if (pe < npe - 1)
        p.push_back(tb_instr(TB_ADD, LOC_REG, 2, LOC_NB, 0, LOC_NB, 0));
      else
        p.push_back(tb_instr(TB_ADD, LOC_REG, 2, LOC_NB, 0, LOC_BUS, 0));
    end
    p.push_back(tb_instr(TB_HALT, LOC_REG, 0, LOC_REG, 0, LOC_REG, 0));
  endfunction

  function automatic logic signed [15:0] fmul(logic signed [15:0] a, logic signed [15:0] b);
    logic signed [31:0] q = a * b;
    return 16'(q >>> 8);
  endfunction

endpackage
