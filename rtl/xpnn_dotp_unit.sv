// xpnn_dotp_unit -- multi-precision SIMD dot-product unit.
//
// Computes the dot product of two packed 32-bit SIMD registers and adds a
// 32-bit scalar C: res = sum_i A[i]*B[i] + C. The vectors hold two 16-bit,
// four 8-bit, eight 4-bit or sixteen 2-bit elements, read as unsigned x
// unsigned, signed(A) x unsigned(B) or signed x signed. A plain dot product
// is the same operation with C = 0.
//
// Instead of one shared multiplier array the unit replicates the hardware:
// four regions (2 x 17b, 4 x 9b, 8 x 5b and 16 x 3b multipliers, each with its
// own adder tree into 32 bits) sit side by side, and an output multiplexer
// picks the region of the current width. Sharing would add operand
// splitting and selection logic to a path that is already close to critical.
// To keep the idle regions from switching, every region has its own operand
// registers, loaded only when an operation of its width is issued (the
// clock-gate enable). A small common register remembers the width of the
// last operation for the output multiplexer.
//
// Timing: operands are presented with en_i high in the cycle the operation
// enters execution (they are captured at that clock edge); res_o is valid
// during the next cycle and holds until the next en_i of any width. One
// operation per cycle, back to back, with no stall.
//
// Everything above follows the design. The signedness code of the three
// modes is this implementation's own (see xpnn_pkg).
module xpnn_dotp_unit
  import xpnn_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        en_i,     // issue an operation this cycle
  input  dtype_e      dt_i,
  input  sign_e       sgn_i,
  input  logic [31:0] opa_i,
  input  logic [31:0] opb_i,
  input  logic [31:0] opc_i,    // scalar addend (accumulator or 0)
  output logic [31:0] res_o,
  output logic [3:0]  region_en_o  // per-region gate enables {c,n,b,h}, for observation
);
  logic sext_a, sext_b;
  assign sext_a = (sgn_i == SGN_SP) || (sgn_i == SGN_USP);
  assign sext_b = (sgn_i == SGN_SP);

  logic [3:0]  en;
  logic [31:0] res [4];

  always_comb begin
    en = '0;
    en[dt_i] = en_i;
  end
  assign region_en_o = en;

  xpnn_dotp_region #(.W(16)) u_h (
    .clk_i, .rst_ni, .en_i(en[DT_H]), .opa_i, .opb_i, .opc_i,
    .sext_a_i(sext_a), .sext_b_i(sext_b), .res_o(res[DT_H]));
  xpnn_dotp_region #(.W(8))  u_b (
    .clk_i, .rst_ni, .en_i(en[DT_B]), .opa_i, .opb_i, .opc_i,
    .sext_a_i(sext_a), .sext_b_i(sext_b), .res_o(res[DT_B]));
  xpnn_dotp_region #(.W(4))  u_n (
    .clk_i, .rst_ni, .en_i(en[DT_N]), .opa_i, .opb_i, .opc_i,
    .sext_a_i(sext_a), .sext_b_i(sext_b), .res_o(res[DT_N]));
  xpnn_dotp_region #(.W(2))  u_c (
    .clk_i, .rst_ni, .en_i(en[DT_C]), .opa_i, .opb_i, .opc_i,
    .sext_a_i(sext_a), .sext_b_i(sext_b), .res_o(res[DT_C]));

  // Width of the operation now in execution, for the output multiplexer.
  dtype_e dt_q;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)   dt_q <= DT_B;
    else if (en_i) dt_q <= dt_i;
  end

  assign res_o = res[dt_q];

endmodule
