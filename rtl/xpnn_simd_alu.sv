// xpnn_simd_alu -- packed-SIMD element-wise ALU for 16-, 8-, 4- and 2-bit elements.
//
// Implements the element-wise XpulpNN operations on a 32-bit register seen as
// a vector of 2, 4, 8 or 16 elements: add, sub, signed and unsigned average,
// signed and unsigned max/min, logical and arithmetic right shift, left shift
// and absolute value. Each element i of the result depends only on element i
// of the two operands; there is no carry between elements. These are the
// operations the pooling and ReLU layers of a quantized network use on
// nibble and crumb data.
//
// How it works: for each element width a generate block computes all the
// operations on every element and picks one; the output multiplexer then
// picks the width. Add/sub/abs wrap modulo 2^W. Averages are (a+b)>>1
// computed on W+1 bits (arithmetic shift for avg, logical for avgu). A shift
// uses the low log2(W) bits of the matching element of operand B as its
// amount. The ".sc" form, which replicates element 0 of rs2, is prepared by
// the caller.
//
// Interface: purely combinational; op_i, dt_i, opa_i, opb_i in, res_o out.
//
// The operation set follows the design's instruction table. The rounding of
// the average, the shift-amount field and the support of 16- and 8-bit
// elements in the same unit are this implementation's own choices.
module xpnn_simd_alu
  import xpnn_pkg::*;
(
  input  alu_op_e     op_i,
  input  dtype_e      dt_i,
  input  logic [31:0] opa_i,
  input  logic [31:0] opb_i,
  output logic [31:0] res_o
);
  logic [31:0] res_w [4];

  for (genvar g = 0; g < 4; g++) begin : g_width
    localparam int unsigned W  = 16 >> g;   // 16, 8, 4, 2
    localparam int unsigned N  = 32 / W;
    localparam int unsigned SW = $clog2(W);

    for (genvar i = 0; i < N; i++) begin : g_elem
      logic [W-1:0]        a, b, r;
      logic signed [W:0]   as, bs;   // sign-extended
      logic [W:0]          au, bu;   // zero-extended
      logic [W:0]          sum_s, sum_u;
      logic [SW-1:0]       sh;

      assign a     = opa_i[i*W +: W];
      assign b     = opb_i[i*W +: W];
      assign as    = {a[W-1], a};
      assign bs    = {b[W-1], b};
      assign au    = {1'b0, a};
      assign bu    = {1'b0, b};
      assign sum_s = as + bs;
      assign sum_u = au + bu;
      assign sh    = b[SW-1:0];

      always_comb begin
        case (op_i)
          ALU_ADD:  r = a + b;
          ALU_SUB:  r = a - b;
          ALU_AVG:  r = sum_s[W:1];                       // arithmetic >> 1
          ALU_AVGU: r = sum_u[W:1];                       // logical >> 1
          ALU_MAX:  r = ($signed(a) > $signed(b)) ? a : b;
          ALU_MAXU: r = (a > b) ? a : b;
          ALU_MIN:  r = ($signed(a) < $signed(b)) ? a : b;
          ALU_MINU: r = (a < b) ? a : b;
          ALU_SRL:  r = a >> sh;
          ALU_SRA:  r = W'($signed(a) >>> sh);
          ALU_SLL:  r = a << sh;
          ALU_ABS:  r = a[W-1] ? W'(-a) : a;
          default:  r = '0;
        endcase
      end

      assign res_w[g][i*W +: W] = r;
    end
  end

  assign res_o = res_w[dt_i];

endmodule
