// xpnn_decoder -- decoder for the XpulpNN instructions.
//
// Turns a 32-bit instruction word into the control struct dec_op_t used by
// the execute unit. Three instruction groups are recognised:
//
//   SIMD (R-type):  pv.<aluop>[.sc].{h,b,n,c}  and  pv.[s]dot{up,usp,sp}[.sc].{h,b,n,c}
//       [31:25] funct7  {000, alu_op[3:0]}  or  {001, acc, 0, sign[1:0]}
//       [24:20] rs2   [19:15] rs1   [14:12] {sc, dt[1:0]}   [11:7] rD   [6:0] opcode
//   Compute&Update: pv.cusdot{up,usp,sp}.{h,b,n,c}.<i>  rD, rs1, rs2
//       [31:30] sign  [29:27] 000  [26:25] NN-RF[i]  [24:20] rs2  [19:15] rs1
//       [14:12] {0, dt}  [11:7] rD  [6:0] opcode
//   nn_sdotp:       pv.nnsdot{up,usp,sp}.{h,b,n,c}  rD, rs1, Imm
//       [31:30] sign  [29:25] 00000  [24:20] Imm  [19:15] rs1
//       [14:12] {0, dt}  [11:7] rD  [6:0] opcode
//     Imm[0]   activation register read,   Imm[2:1] weight register read,
//     Imm[3]   load the addressed activation register from [rs1],
//     Imm[4]   load the addressed weight register from [rs1].
//
// C&U always loads the weight register it reads; both Mac&Load forms add rD
// to the dot product. Imm[3] and Imm[4] together, a reserved field that is
// not zero, or an unused code raise illegal_o (and cls = OPC_NONE).
//
// Purely combinational. The field positions (rD, DT, rs1, rs2/Imm and the
// sign selector on top), the meaning of each Imm bit and the hard-coded
// NN-RF index of C&U follow the design; the opcode values and the numeric
// codes of the SIMD functions, data types and sign modes are this
// implementation's own.
module xpnn_decoder
  import xpnn_pkg::*;
(
  input  logic [31:0] instr_i,
  output dec_op_t     op_o,
  output logic        illegal_o,   // XpulpNN opcode with a bad field
  output logic        is_xpnn_o    // opcode belongs to XpulpNN
);
  logic [6:0] opcode, funct7;
  logic [2:0] funct3;
  logic [4:0] imm;

  assign opcode = instr_i[6:0];
  assign funct3 = instr_i[14:12];
  assign funct7 = instr_i[31:25];
  assign imm    = instr_i[24:20];

  always_comb begin
    op_o        = '0;
    op_o.cls    = OPC_NONE;
    op_o.alu_op = ALU_ADD;
    op_o.sgn    = SGN_UP;
    op_o.dt     = dtype_e'(funct3[1:0]);
    op_o.rd     = instr_i[11:7];
    op_o.rs1    = instr_i[19:15];
    op_o.rs2    = instr_i[24:20];
    illegal_o   = 1'b0;
    is_xpnn_o   = 1'b0;

    unique case (opcode)
      OPCODE_SIMD: begin
        is_xpnn_o = 1'b1;
        op_o.sc   = funct3[2];
        if (funct7[6:4] == F7_ALU_HI) begin
          if (funct7[3:0] <= 4'(ALU_ABS)) begin
            op_o.cls    = OPC_ALU;
            op_o.alu_op = alu_op_e'(funct7[3:0]);
          end else begin
            illegal_o = 1'b1;
          end
        end else if (funct7[6:4] == F7_DOTP_HI && !funct7[2] && funct7[1:0] != 2'b11) begin
          op_o.cls = OPC_DOTP;
          op_o.acc = funct7[3];
          op_o.sgn = sign_e'(funct7[1:0]);
        end else begin
          illegal_o = 1'b1;
        end
      end
      OPCODE_CU: begin
        is_xpnn_o = 1'b1;
        if (funct7[6:5] != 2'b11 && funct7[4:2] == 3'b000 && !funct3[2]) begin
          op_o.cls   = OPC_CU;
          op_o.sgn   = sign_e'(funct7[6:5]);
          op_o.acc   = 1'b1;
          op_o.w_idx = funct7[1:0];
          op_o.upd_w = 1'b1;
        end else begin
          illegal_o = 1'b1;
        end
      end
      OPCODE_NNDOT: begin
        is_xpnn_o = 1'b1;
        if (funct7[6:5] != 2'b11 && funct7[4:0] == 5'b0 && !funct3[2] && !(imm[3] && imm[4])) begin
          op_o.cls   = OPC_NNDOT;
          op_o.sgn   = sign_e'(funct7[6:5]);
          op_o.acc   = 1'b1;
          op_o.rs2   = '0;
          op_o.a_idx = imm[0];
          op_o.w_idx = imm[2:1];
          op_o.upd_a = imm[3];
          op_o.upd_w = imm[4];
        end else begin
          illegal_o = 1'b1;
        end
      end
      default: ;
    endcase
  end

endmodule
