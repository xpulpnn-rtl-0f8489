// xpnn_ex_unit -- XpulpNN execute-stage extension with Mac&Load support.
//
// This is the part of a RI5CY-class 32-bit RISC-V core that XpulpNN adds or
// changes: it executes the packed-SIMD nibble/crumb ALU operations, the
// multi-precision (sum-of-)dot products on 16/8/4/2-bit elements, and the two
// fused "Mac&Load" instructions that hide operand loads behind the dot
// product:
//
//   Compute&Update (C&U)  rD += dotp(NN-RF.w[i], rs2);  NN-RF.w[i] <= mem[rs1];  rs1 += 4
//   nn_sdotp              rD += dotp(NN-RF.w[j], NN-RF.a[k]);
//                         optionally NN-RF.w[j] or NN-RF.a[k] <= mem[rs1]; rs1 += 4
//
// The host core keeps its fetch, decode, general-purpose register file
// (GP-RF), forwarding and load-store unit; they stay outside this block and
// connect through the ports below.
//
// Pipeline. An instruction is handed over in the "issue" cycle together with
// the three GP-RF operand values (rs1, rs2, rD, already forwarded by the
// host). At the issue clock edge its operands are captured in the operand
// registers of the unit that will execute it (one Dotp region or the SIMD
// ALU), which is the execute (EX) stage. In the EX cycle the result is
// produced combinationally and written back through the rD write port; a
// Mac&Load also sends the word address rs1 to data memory and returns rs1+4
// through the second GP-RF write port. The loaded word arrives with rvalid
// one or more cycles later and is written into the NN-RF, not the GP-RF. With
// no stalls the unit completes one instruction per cycle, Mac&Load included.
//
// Stalls. (1) Memory: a Mac&Load stays in EX until its request is granted,
// and holds issue meanwhile. (2) NN-RF hazard: an instruction that reads an
// NN-RF register whose load is still in flight is not accepted until the
// load data returns; the data is forwarded into the operand register in the
// cycle it arrives. An instruction may read and reload the same register: it
// uses the old value, the load replaces it.
//
// Interfaces. Issue: valid/ready handshake, an instruction word and three
// operand values. Writeback: two write ports (rD and the post-incremented
// rs1), valid in the cycle the instruction leaves EX; writes to x0 are the
// host's to discard. Memory: a TCDM-style read port (req/addr, gnt, then
// rvalid/rdata), one outstanding access.
//
// What follows the design: the operations, the NN-RF read ports multiplexed
// with the GP-RF operands in front of the Dotp unit, the +4 address update
// through a second write port, hazard handling by stalling, and one-cycle
// Mac&Load execution. This implementation's own choices: the issue and
// writeback port format, the forwarding of load data into the operand
// registers, that an nn_sdotp without an update bit neither loads nor
// increments rs1, and that a non-XpulpNN instruction is accepted and ignored.
module xpnn_ex_unit
  import xpnn_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,

  // issue from the host's decode stage
  input  logic        issue_valid_i,
  output logic        issue_ready_o,
  input  logic [31:0] instr_i,
  input  logic [31:0] rs1_val_i,
  input  logic [31:0] rs2_val_i,
  input  logic [31:0] rd_val_i,
  output logic        illegal_o,     // current instr_i is a malformed XpulpNN word

  // GP-RF write port 1: result
  output logic        wb_rd_we_o,
  output logic [4:0]  wb_rd_addr_o,
  output logic [31:0] wb_rd_data_o,
  // GP-RF write port 2: post-incremented address
  output logic        wb_rs1_we_o,
  output logic [4:0]  wb_rs1_addr_o,
  output logic [31:0] wb_rs1_data_o,

  // data memory read port (to the load-store unit / TCDM)
  output logic        data_req_o,
  output logic [31:0] data_addr_o,
  input  logic        data_gnt_i,
  input  logic        data_rvalid_i,
  input  logic [31:0] data_rdata_i,

  // observation of the two stall causes
  output logic        stall_mem_o,
  output logic        stall_nnrf_o
);

  // ------------------------------------------------------------------ decode
  dec_op_t dec;

  xpnn_decoder u_dec (
    .instr_i(instr_i), .op_o(dec), .illegal_o(illegal_o), .is_xpnn_o());

  logic dec_uses_dotp, dec_reads_w, dec_reads_a, dec_mem;
  assign dec_uses_dotp = (dec.cls == OPC_DOTP) || (dec.cls == OPC_CU) || (dec.cls == OPC_NNDOT);
  assign dec_reads_w   = (dec.cls == OPC_CU) || (dec.cls == OPC_NNDOT);
  assign dec_reads_a   = (dec.cls == OPC_NNDOT);
  assign dec_mem       = dec.upd_w || dec.upd_a;

  // ---------------------------------------------------------------- EX state
  logic        ex_valid_q;
  op_class_e   ex_cls_q;
  logic [4:0]  ex_rd_q, ex_rs1_q;
  logic [31:0] ex_addr_q;
  logic        ex_mem_q;
  logic        ex_ld_act_q;
  logic [1:0]  ex_ld_idx_q;

  // outstanding load: granted, data not yet returned
  logic        pend_q;
  logic        pend_act_q;
  logic [1:0]  pend_idx_q;

  // ------------------------------------------------------------ memory port
  assign data_req_o  = ex_valid_q && ex_mem_q && (!pend_q || data_rvalid_i);
  assign data_addr_o = ex_addr_q;

  logic ex_done;
  assign ex_done = !ex_mem_q || (data_req_o && data_gnt_i);

  // ------------------------------------------------------------------- NN-RF
  logic [31:0] nn_w_rdata, nn_a_rdata;

  xpnn_nn_rf u_nnrf (
    .clk_i, .rst_ni,
    .we_i(pend_q && data_rvalid_i), .wsel_act_i(pend_act_q), .widx_i(pend_idx_q),
    .wdata_i(data_rdata_i),
    .w_raddr_i(dec_reads_w ? dec.w_idx : 2'd0), .w_rdata_o(nn_w_rdata),
    .a_raddr_i(dec_reads_a ? dec.a_idx : 1'b0), .a_rdata_o(nn_a_rdata));

  // NN-RF read-after-load hazard of the instruction being issued.
  function automatic logic ld_hits(logic act, logic [1:0] idx, logic [1:0] w_idx,
                                   logic a_idx, logic rw, logic ra);
    return act ? (ra && (idx[0] == a_idx)) : (rw && (idx == w_idx));
  endfunction

  logic hz_ex, hz_pend;
  assign hz_ex   = ex_valid_q && ex_mem_q &&
                   ld_hits(ex_ld_act_q, ex_ld_idx_q, dec.w_idx, dec.a_idx, dec_reads_w, dec_reads_a);
  assign hz_pend = pend_q && !data_rvalid_i &&
                   ld_hits(pend_act_q, pend_idx_q, dec.w_idx, dec.a_idx, dec_reads_w, dec_reads_a);

  logic ex_free;
  assign ex_free       = !ex_valid_q || ex_done;
  assign issue_ready_o = ex_free && !(hz_ex || hz_pend);

  logic issue_fire;
  assign issue_fire = issue_valid_i && issue_ready_o && (dec.cls != OPC_NONE);

  assign stall_mem_o  = ex_valid_q && !ex_done;
  assign stall_nnrf_o = issue_valid_i && ex_free && (hz_ex || hz_pend);

  // --------------------------------------------------------- operand select
  logic [31:0] opb_gp;     // rs2, or element 0 of rs2 replicated (.sc)
  always_comb begin
    unique case (dec.dt)
      DT_H:    opb_gp = {2{rs2_val_i[15:0]}};
      DT_B:    opb_gp = {4{rs2_val_i[7:0]}};
      DT_N:    opb_gp = {8{rs2_val_i[3:0]}};
      default: opb_gp = {16{rs2_val_i[1:0]}};
    endcase
    if (!dec.sc) opb_gp = rs2_val_i;
  end

  logic [31:0] dot_a, dot_b, dot_c;
  assign dot_a = dec_reads_w ? nn_w_rdata : rs1_val_i;
  assign dot_b = dec_reads_a ? nn_a_rdata : opb_gp;
  assign dot_c = dec.acc ? rd_val_i : 32'h0;

  // --------------------------------------------------------------- Dotp unit
  logic [31:0] dot_res;
  logic [3:0]  dot_region_en;

  xpnn_dotp_unit u_dotp (
    .clk_i, .rst_ni,
    .en_i(issue_fire && dec_uses_dotp), .dt_i(dec.dt), .sgn_i(dec.sgn),
    .opa_i(dot_a), .opb_i(dot_b), .opc_i(dot_c),
    .res_o(dot_res), .region_en_o(dot_region_en));

  // ---------------------------------------------------------------- SIMD ALU
  // Operand registers loaded only for ALU operations (operand isolation).
  logic [31:0] alu_a_q, alu_b_q, alu_res;
  alu_op_e     alu_op_q;
  dtype_e      alu_dt_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      alu_a_q  <= '0;
      alu_b_q  <= '0;
      alu_op_q <= ALU_ADD;
      alu_dt_q <= DT_B;
    end else if (issue_fire && dec.cls == OPC_ALU) begin
      alu_a_q  <= rs1_val_i;
      alu_b_q  <= opb_gp;
      alu_op_q <= dec.alu_op;
      alu_dt_q <= dec.dt;
    end
  end

  xpnn_simd_alu u_alu (.op_i(alu_op_q), .dt_i(alu_dt_q), .opa_i(alu_a_q), .opb_i(alu_b_q),
                       .res_o(alu_res));

  // ---------------------------------------------------------- EX registers
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ex_valid_q  <= 1'b0;
      ex_cls_q    <= OPC_NONE;
      ex_rd_q     <= '0;
      ex_rs1_q    <= '0;
      ex_addr_q   <= '0;
      ex_mem_q    <= 1'b0;
      ex_ld_act_q <= 1'b0;
      ex_ld_idx_q <= '0;
    end else if (ex_free) begin
      ex_valid_q <= issue_fire;
      if (issue_fire) begin
        ex_cls_q    <= dec.cls;
        ex_rd_q     <= dec.rd;
        ex_rs1_q    <= dec.rs1;
        ex_addr_q   <= rs1_val_i;
        ex_mem_q    <= dec_mem;
        ex_ld_act_q <= dec.upd_a;
        ex_ld_idx_q <= dec.upd_a ? {1'b0, dec.a_idx} : dec.w_idx;
      end else begin
        ex_mem_q    <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      pend_q     <= 1'b0;
      pend_act_q <= 1'b0;
      pend_idx_q <= '0;
    end else if (data_req_o && data_gnt_i) begin
      pend_q     <= 1'b1;
      pend_act_q <= ex_ld_act_q;
      pend_idx_q <= ex_ld_idx_q;
    end else if (data_rvalid_i) begin
      pend_q     <= 1'b0;
    end
  end

  // ---------------------------------------------------------------- writeback
  assign wb_rd_we_o    = ex_valid_q && ex_done;
  assign wb_rd_addr_o  = ex_rd_q;
  assign wb_rd_data_o  = (ex_cls_q == OPC_ALU) ? alu_res : dot_res;
  assign wb_rs1_we_o   = ex_valid_q && ex_done && ex_mem_q;
  assign wb_rs1_addr_o = ex_rs1_q;
  assign wb_rs1_data_o = ex_addr_q + 32'd4;

  // ---------------------------------------------------------------- checks
  // Load data only returns for a granted request.
  a_rvalid_pending: assert property (@(posedge clk_i) disable iff (!rst_ni)
    data_rvalid_i |-> pend_q);
  // A request waiting for its grant keeps its address.
  a_req_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (data_req_o && !data_gnt_i) |=> (data_req_o && $stable(data_addr_o)));
  // Only one Dotp region is enabled at a time.
  a_region_onehot: assert property (@(posedge clk_i) disable iff (!rst_ni)
    $onehot0(dot_region_en));

endmodule
