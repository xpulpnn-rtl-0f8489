// tb_xpnn_decoder -- self-checking test of the XpulpNN instruction decoder.
//
// Assembles random instructions of every group with the testbench assembler
// and checks each decoded field against the operands it was built from:
// class, ALU operation, data type, sign mode, accumulate and .sc flags,
// register indices, and for nn_sdotp every bit of the immediate. It also
// checks that reserved encodings, the forbidden "load both" immediate and
// foreign opcodes are not decoded as XpulpNN operations.
module tb_xpnn_decoder;
  import xpnn_pkg::*;
  import xpnn_asm_pkg::*;

  logic [31:0] instr;
  dec_op_t     op;
  logic        illegal, is_xpnn;
  int          checks = 0, failures = 0;

  xpnn_decoder dut (.instr_i(instr), .op_o(op), .illegal_o(illegal), .is_xpnn_o(is_xpnn));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s: instr %h got %0d exp %0d", what, instr, got, exp_v);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int rd = $urandom_range(0, 31), rs1 = $urandom_range(0, 31), rs2 = $urandom_range(0, 31);
      int dt = $urandom_range(0, 3), sgn = $urandom_range(0, 2), aop = $urandom_range(0, 11);
      int idx = $urandom_range(0, 3);
      bit sc = 1'($urandom_range(0, 1)), acc = 1'($urandom_range(0, 1));
      int w = $urandom_range(0, 3), a = $urandom_range(0, 1), upd = $urandom_range(0, 2);
      int imm = nn_imm(w, a, upd == 2, upd == 1);
      // ALU
      instr = asm_alu(aop, dt, sc, rd, rs1, rs2); #1;
      expect_eq("alu cls", op.cls, 1);      expect_eq("alu op", op.alu_op, aop);
      expect_eq("alu dt", op.dt, dt);       expect_eq("alu sc", op.sc, sc);
      expect_eq("alu rd", op.rd, rd);       expect_eq("alu rs1", op.rs1, rs1);
      expect_eq("alu rs2", op.rs2, rs2);    expect_eq("alu ill", illegal, 0);
      expect_eq("alu upd", op.upd_w | op.upd_a, 0);
      // dot product
      instr = asm_dotp(acc, sgn, dt, sc, rd, rs1, rs2); #1;
      expect_eq("dot cls", op.cls, 2);      expect_eq("dot acc", op.acc, acc);
      expect_eq("dot sgn", op.sgn, sgn);    expect_eq("dot dt", op.dt, dt);
      expect_eq("dot sc", op.sc, sc);       expect_eq("dot rs2", op.rs2, rs2);
      // compute & update
      instr = asm_cu(sgn, dt, idx, rd, rs1, rs2); #1;
      expect_eq("cu cls", op.cls, 3);       expect_eq("cu sgn", op.sgn, sgn);
      expect_eq("cu idx", op.w_idx, idx);   expect_eq("cu updw", op.upd_w, 1);
      expect_eq("cu upda", op.upd_a, 0);    expect_eq("cu acc", op.acc, 1);
      expect_eq("cu rs1", op.rs1, rs1);     expect_eq("cu rs2", op.rs2, rs2);
      expect_eq("cu rd", op.rd, rd);        expect_eq("cu dt", op.dt, dt);
      // nn_sdotp
      instr = asm_nn(sgn, dt, imm, rd, rs1); #1;
      expect_eq("nn cls", op.cls, 4);       expect_eq("nn sgn", op.sgn, sgn);
      expect_eq("nn w", op.w_idx, w);       expect_eq("nn a", op.a_idx, a);
      expect_eq("nn updw", op.upd_w, upd == 2);
      expect_eq("nn upda", op.upd_a, upd == 1);
      expect_eq("nn rs1", op.rs1, rs1);     expect_eq("nn rd", op.rd, rd);
      expect_eq("nn dt", op.dt, dt);        expect_eq("nn acc", op.acc, 1);
    end
    // illegal and foreign encodings
    instr = asm_nn(1, 1, 5'b11000, 3, 4); #1;
    expect_eq("both-update illegal", illegal, 1); expect_eq("both-update cls", op.cls, 0);
    instr = asm_cu(3, 0, 0, 1, 2, 3); #1;
    expect_eq("cu sign 3 illegal", illegal, 1);
    instr = asm_alu(12, 0, 0, 1, 2, 3); #1;
    expect_eq("alu op 12 illegal", illegal, 1);
    instr = asm_dotp(0, 3, 0, 0, 1, 2, 3); #1;
    expect_eq("dot sign 3 illegal", illegal, 1);
    instr = 32'h0000_0013; #1;   // addi x0,x0,0
    expect_eq("foreign cls", op.cls, 0); expect_eq("foreign xpnn", is_xpnn, 0);
    expect_eq("foreign illegal", illegal, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
