// xpnn_dotp_region -- one bit-width region of the multi-precision Dotp unit.
//
// A region serves a single element width W (16, 8, 4 or 2 bits) and holds
// 32/W multipliers followed by an adder tree. Each W-bit element of the two
// packed operands is widened to a (W+1)-bit signed number by a sign or zero
// extension bit, so one signed (W+1)x(W+1) multiplier serves the unsigned,
// mixed and signed interpretations. The 32/W products, each 2W+2 bits wide,
// and the 32-bit scalar operand C are summed into a 32-bit result
// (modulo 2^32).
//
// The region owns its operand registers. They load only when en_i is high,
// which is the enable of the clock gate that keeps the region's inputs still
// while another width is in use. The result is combinational from those
// registers: an operation captured at a clock edge has its result during
// the following cycle, with no pipeline register between multiplication and
// accumulation.
//
// Interface: en_i loads opa_i, opb_i, opc_i and the two sign-extension
// selects. res_o is the registered operands' sum of dot product.
//
// The region structure, the per-region gated registers, the (W+1)-bit
// extension and the product widths follow the design; the adder tree is
// written as a balanced pairwise reduction, an implementation choice.
module xpnn_dotp_region #(
  parameter int unsigned W = 8
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        en_i,
  input  logic [31:0] opa_i,
  input  logic [31:0] opb_i,
  input  logic [31:0] opc_i,
  input  logic        sext_a_i,   // 1: elements of A are signed
  input  logic        sext_b_i,   // 1: elements of B are signed
  output logic [31:0] res_o
);
  localparam int unsigned N  = 32 / W;     // elements per register
  localparam int unsigned PW = 2 * W + 2;  // product width

  logic [31:0] opa_q, opb_q, opc_q;
  logic        sext_a_q, sext_b_q;

  // Gated operand registers: only the region selected by the current
  // operation toggles.
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      opa_q    <= '0;
      opb_q    <= '0;
      opc_q    <= '0;
      sext_a_q <= 1'b0;
      sext_b_q <= 1'b0;
    end else if (en_i) begin
      opa_q    <= opa_i;
      opb_q    <= opb_i;
      opc_q    <= opc_i;
      sext_a_q <= sext_a_i;
      sext_b_q <= sext_b_i;
    end
  end

  // Multipliers: one (W+1)x(W+1) signed multiplier per element.
  logic signed [PW-1:0] prod [N];

  for (genvar i = 0; i < N; i++) begin : g_mult
    logic signed [W:0] ea, eb;
    assign ea = {sext_a_q & opa_q[i*W+W-1], opa_q[i*W +: W]};
    assign eb = {sext_b_q & opb_q[i*W+W-1], opb_q[i*W +: W]};
    assign prod[i] = PW'(ea) * PW'(eb);
  end

  // Adder tree: pairwise reduction of the sign-extended products, with the
  // scalar operand C added at the root.
  always_comb begin
    logic [31:0] lvl [N];
    for (int unsigned i = 0; i < N; i++) begin
      lvl[i] = 32'(prod[i]);
    end
    for (int unsigned step = 1; step < N; step = step * 2) begin
      for (int unsigned i = 0; i + step < N; i = i + 2 * step) begin
        lvl[i] = lvl[i] + lvl[i+step];
      end
    end
    res_o = lvl[0] + opc_q;
  end

endmodule
