// xpnn_nn_rf -- Neural Network Register File (NN-RF) of the Mac&Load datapath.
//
// A small register file next to the Dotp unit that holds dot-product operands
// fetched by the fused Mac&Load instructions, so that they neither occupy nor
// need write ports of the general-purpose register file. It has four weight
// registers and two activation registers, one write port fed by the
// load-store unit, and two read ports: the weight port feeds operand A of the
// Dotp unit (Compute&Update and nn_sdotp), the activation port feeds operand B
// (nn_sdotp only).
//
// How it works: each register loads only when the write port addresses it
// (per-register enable, i.e. the clock gate). A read of the register being
// written in the same cycle returns the incoming word (write-through), so an
// instruction can pick up load data in the cycle it returns.
//
// Interface: we_i/wsel_act_i/widx_i/wdata_i write on the rising clock edge;
// the reads are combinational. Reset clears all registers.
//
// Register count (4 weights, 2 activations), port count and clock gating
// follow the design; write-through is this implementation's own choice.
module xpnn_nn_rf
  import xpnn_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  // write port (from the load-store unit)
  input  logic        we_i,
  input  logic        wsel_act_i,   // 0: weight register, 1: activation register
  input  logic [1:0]  widx_i,       // register index (activation uses bit 0)
  input  logic [31:0] wdata_i,
  // read port to Dotp operand A
  input  logic [1:0]  w_raddr_i,
  output logic [31:0] w_rdata_o,
  // read port to Dotp operand B
  input  logic        a_raddr_i,
  output logic [31:0] a_rdata_o
);
  logic [31:0] w_q [NN_W_REGS];
  logic [31:0] a_q [NN_A_REGS];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < NN_W_REGS; i++) w_q[i] <= '0;
      for (int i = 0; i < NN_A_REGS; i++) a_q[i] <= '0;
    end else if (we_i) begin
      if (wsel_act_i) a_q[widx_i[0]] <= wdata_i;
      else            w_q[widx_i]    <= wdata_i;
    end
  end

  always_comb begin
    w_rdata_o = w_q[w_raddr_i];
    if (we_i && !wsel_act_i && (widx_i == w_raddr_i)) w_rdata_o = wdata_i;
    a_rdata_o = a_q[a_raddr_i];
    if (we_i && wsel_act_i && (widx_i[0] == a_raddr_i)) a_rdata_o = wdata_i;
  end

endmodule
