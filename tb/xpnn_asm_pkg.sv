// xpnn_asm_pkg -- testbench helpers that assemble XpulpNN instruction words.
//
// Each function builds the 32-bit encoding of one instruction from its
// operands, field by field, with the numeric codes written out here as
// literals so that a test does not depend on the design's package values:
// data types h=0 b=1 n=2 c=3; sign modes up=0 usp=1 sp=2; ALU op codes
// add=0 sub=1 avg=2 avgu=3 max=4 maxu=5 min=6 minu=7 srl=8 sra=9 sll=10 abs=11.
package xpnn_asm_pkg;

  // pv.<aluop>[.sc].<dt> rd, rs1, rs2
  function automatic logic [31:0] asm_alu(int op, int dt, bit sc, int rd, int rs1, int rs2);
    return {3'b000, 4'(op), 5'(rs2), 5'(rs1), sc, 2'(dt), 5'(rd), 7'b1010111};
  endfunction

  // pv.[s]dot<sign>[.sc].<dt> rd, rs1, rs2
  function automatic logic [31:0] asm_dotp(bit acc, int sgn, int dt, bit sc, int rd, int rs1, int rs2);
    return {3'b001, acc, 1'b0, 2'(sgn), 5'(rs2), 5'(rs1), sc, 2'(dt), 5'(rd), 7'b1010111};
  endfunction

  // pv.cusdot<sign>.<dt>.<i> rd, rs1, rs2
  function automatic logic [31:0] asm_cu(int sgn, int dt, int idx, int rd, int rs1, int rs2);
    return {2'(sgn), 3'b000, 2'(idx), 5'(rs2), 5'(rs1), 1'b0, 2'(dt), 5'(rd), 7'b0001011};
  endfunction

  // pv.nnsdot<sign>.<dt> rd, rs1, imm
  function automatic logic [31:0] asm_nn(int sgn, int dt, int imm, int rd, int rs1);
    return {2'(sgn), 5'b00000, 5'(imm), 5'(rs1), 1'b0, 2'(dt), 5'(rd), 7'b0101011};
  endfunction

  // nn_sdotp immediate: weight register w, activation register a,
  // upd_w / upd_a load the addressed register.
  function automatic int nn_imm(int w, int a, bit upd_w, bit upd_a);
    return (int'(upd_w) << 4) | (int'(upd_a) << 3) | (w << 1) | a;
  endfunction

endpackage
