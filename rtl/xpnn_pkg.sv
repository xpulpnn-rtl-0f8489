// xpnn_pkg -- types and constants shared by the XpulpNN execute-stage blocks.
//
// XpulpNN extends a 32-bit RISC-V core with packed-SIMD arithmetic on 16-, 8-,
// 4- and 2-bit elements ("h", "b", "n" for nibble, "c" for crumb) and with two
// fused multiply-accumulate-and-load ("Mac&Load") instructions: Compute&Update
// (C&U) and nn_sdotp. This package holds the element-width and signedness
// enumerations, the decoded-operation struct passed from the decoder to the
// execute unit, and the instruction field positions.
//
// Field positions follow the instruction layouts of the design: rD in [11:7],
// the data type (DT) in [14:12], rs1 in [19:15], rs2 or the 5-bit nn_sdotp
// immediate in [24:20], and the signedness selector in the top bits. The
// opcode values, the DT and signedness codes and the SIMD function codes are
// this implementation's own choice.
package xpnn_pkg;

  // Element width of a packed SIMD operand. Two 16-bit, four 8-bit, eight
  // 4-bit or sixteen 2-bit elements fill a 32-bit register.
  typedef enum logic [1:0] {
    DT_H = 2'd0,  // 2 x 16 bit
    DT_B = 2'd1,  // 4 x 8 bit
    DT_N = 2'd2,  // 8 x 4 bit (nibble)
    DT_C = 2'd3   // 16 x 2 bit (crumb)
  } dtype_e;

  // Interpretation of the two dot-product operands.
  //   UP  : both unsigned
  //   USP : operand A (rs1 or the NN-RF weight) signed, operand B unsigned
  //   SP  : both signed
  typedef enum logic [1:0] {
    SGN_UP  = 2'd0,
    SGN_USP = 2'd1,
    SGN_SP  = 2'd2
  } sign_e;

  // Element-wise SIMD ALU operations (nibble/crumb table of the ISA).
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_AVG  = 4'd2,
    ALU_AVGU = 4'd3,
    ALU_MAX  = 4'd4,
    ALU_MAXU = 4'd5,
    ALU_MIN  = 4'd6,
    ALU_MINU = 4'd7,
    ALU_SRL  = 4'd8,
    ALU_SRA  = 4'd9,
    ALU_SLL  = 4'd10,
    ALU_ABS  = 4'd11
  } alu_op_e;

  // Class of a decoded instruction.
  typedef enum logic [2:0] {
    OPC_NONE  = 3'd0,  // not an XpulpNN instruction
    OPC_ALU   = 3'd1,  // pv.<aluop>[.sc].{h,b,n,c}
    OPC_DOTP  = 3'd2,  // pv.[s]dot{up,usp,sp}[.sc].{h,b,n,c}
    OPC_CU    = 3'd3,  // pv.cusdot{up,usp,sp}.{h,b,n,c}.<i>  (Compute&Update)
    OPC_NNDOT = 3'd4   // pv.nnsdot{up,usp,sp}.{h,b,n,c}     (nn_sdotp)
  } op_class_e;

  // NN-RF geometry: four weight registers and two activation registers.
  localparam int unsigned NN_W_REGS = 4;
  localparam int unsigned NN_A_REGS = 2;

  // Decoded instruction, produced by xpnn_decoder.
  typedef struct packed {
    op_class_e   cls;
    alu_op_e     alu_op;
    dtype_e      dt;
    sign_e       sgn;
    logic        acc;        // sum-of-dot-product: add rD to the dot product
    logic        sc;         // .sc: replicate element 0 of rs2
    logic [4:0]  rd;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [1:0]  w_idx;      // NN-RF weight register read (and, for C&U, loaded)
    logic        a_idx;      // NN-RF activation register read (nn_sdotp)
    logic        upd_w;      // load the addressed weight register
    logic        upd_a;      // load the addressed activation register
  } dec_op_t;

  // Opcodes (assumed values; RISC-V "custom" opcode space).
  localparam logic [6:0] OPCODE_SIMD  = 7'b101_0111;
  localparam logic [6:0] OPCODE_CU    = 7'b000_1011;
  localparam logic [6:0] OPCODE_NNDOT = 7'b010_1011;

  // funct7 codes of the SIMD opcode, bits [31:25]. ALU operations use
  // {3'b000, alu_op}; dot products use {3'b001, acc, 1'b0, sign}.
  localparam logic [2:0] F7_ALU_HI  = 3'b000;
  localparam logic [2:0] F7_DOTP_HI = 3'b001;

  // Number of elements and element width for a data type.
  function automatic int unsigned dt_width(dtype_e dt);
    case (dt)
      DT_H:    return 16;
      DT_B:    return 8;
      DT_N:    return 4;
      default: return 2;
    endcase
  endfunction

endpackage
