// xpnn_core_model -- behavioural core around one xpnn_ex_unit, for cluster tests.
//
// Stands in for the host RI5CY core of one cluster processor: it holds a
// 32-entry GP-RF, issues a MatMul program in order to the execute unit, and
// executes the program's explicit post-increment loads (p.lw) itself. The
// explicit loads and the unit's Mac&Load accesses share one memory port in
// program order, with at most one access outstanding; a host load's data is
// forwarded to an instruction issued in the cycle it returns, and an
// instruction that needs it earlier waits.
//
// On start_i the model builds one of three 4x2 MatMul kernels (4 filters x 2
// pixels, ITERS words per stream) for its core index: 0 = plain sum-of-dot-
// product with six explicit loads per iteration, 1 = Compute&Update with two
// explicit loads, 2 = nn_sdotp. The core reads six streams, filters 0-3 and
// pixels 0-1, whose start word addresses are given by base_i. done_o rises when the program has
// retired; acc_o then holds the eight accumulators (filter f, pixel p at
// index 2f+p).
//
// Memory port: TCDM style, the request holds until granted and rvalid
// follows one or more cycles later.
module xpnn_core_model #(
  parameter int CORE_ID = 0
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        start_i,
  input  int          kernel_i,
  input  int          dt_i,
  input  int          iters_i,
  input  int          base_i [6],      // start word of filter 0-3 and pixel 0-1 streams
  output logic        done_o,
  output logic [31:0] acc_o [8],
  output int          mem_stall_o,     // cycles a memory request waited for its grant
  output int          accesses_o,      // memory accesses made
  // shared memory port
  output logic        req_o,
  output logic [31:0] addr_o,
  input  logic        gnt_i,
  input  logic        rvalid_i,
  input  logic [31:0] rdata_i
);
  import xpnn_asm_pkg::*;

  localparam int AW0 = 1, AX0 = 5, ACC0 = 10, AWB0 = 26, XR0 = 30, WR0 = 26;

  // ---------------------------------------------------------------- program
  typedef struct { bit host_ld; logic [31:0] code; int rd, rs1, rs2; } pins_t;
  pins_t prog[$];
  int    pc;

  function automatic void e_ld(int rd, int rs1);
    prog.push_back('{host_ld: 1'b1, code: 32'h13, rd: rd, rs1: rs1, rs2: 0});
  endfunction
  function automatic void e_unit(logic [31:0] c, int rd, int rs1, int rs2);
    prog.push_back('{host_ld: 1'b0, code: c, rd: rd, rs1: rs1, rs2: rs2});
  endfunction

  logic [31:0] rf [32];
  logic [31:0] init_rf [32];

  task automatic build(int kernel, int dt, int iters);
    prog.delete();
    for (int r = 0; r < 32; r++) init_rf[r] = 32'h0;
    for (int f = 0; f < 4; f++) init_rf[AW0 + f] = base_i[f] * 4;
    for (int f = 0; f < 4; f++) init_rf[AWB0 + f] = base_i[f] * 4;
    for (int p = 0; p < 2; p++) init_rf[AX0 + p] = base_i[4 + p] * 4;
    if (kernel == 1)
      for (int f = 0; f < 4; f++) e_unit(asm_cu(1, dt, f, 0, AW0 + f, 0), 0, AW0 + f, 0);
    if (kernel == 2) begin
      for (int f = 0; f < 4; f++) e_unit(asm_nn(1, dt, nn_imm(f, 0, 1, 0), 0, AW0 + f), 0, AW0 + f, 0);
      e_unit(asm_nn(1, dt, nn_imm(0, 0, 0, 1), 0, AX0), 0, AX0, 0);
      e_unit(asm_nn(1, dt, nn_imm(0, 1, 0, 1), 0, AX0 + 1), 0, AX0 + 1, 0);
    end
    for (int it = 0; it < iters; it++) begin
      case (kernel)
        0: begin
          e_ld(XR0, AX0); e_ld(XR0 + 1, AX0 + 1);
          for (int f = 0; f < 4; f++) e_ld(WR0 + f, AW0 + f);
          for (int p = 0; p < 2; p++)
            for (int f = 0; f < 4; f++)
              e_unit(asm_dotp(1, 1, dt, 0, ACC0 + 2 * f + p, WR0 + f, XR0 + p),
                     ACC0 + 2 * f + p, WR0 + f, XR0 + p);
        end
        1: begin
          e_ld(XR0, AX0); e_ld(XR0 + 1, AX0 + 1);
          for (int f = 0; f < 4; f++)
            e_unit(asm_cu(1, dt, f, ACC0 + 2 * f, AWB0 + f, XR0), ACC0 + 2 * f, AWB0 + f, XR0);
          for (int f = 0; f < 4; f++)
            e_unit(asm_cu(1, dt, f, ACC0 + 2 * f + 1, AW0 + f, XR0 + 1), ACC0 + 2 * f + 1,
                   AW0 + f, XR0 + 1);
        end
        default: begin
          e_unit(asm_nn(1, dt, nn_imm(0, 0, 0, 0), ACC0 + 0, 0), ACC0 + 0, 0, 0);
          e_unit(asm_nn(1, dt, nn_imm(0, 1, 1, 0), ACC0 + 1, AW0), ACC0 + 1, AW0, 0);
          e_unit(asm_nn(1, dt, nn_imm(1, 0, 0, 0), ACC0 + 2, 0), ACC0 + 2, 0, 0);
          e_unit(asm_nn(1, dt, nn_imm(1, 1, 1, 0), ACC0 + 3, AW0 + 1), ACC0 + 3, AW0 + 1, 0);
          e_unit(asm_nn(1, dt, nn_imm(2, 0, 0, 0), ACC0 + 4, 0), ACC0 + 4, 0, 0);
          e_unit(asm_nn(1, dt, nn_imm(2, 1, 1, 0), ACC0 + 5, AW0 + 2), ACC0 + 5, AW0 + 2, 0);
          e_unit(asm_nn(1, dt, nn_imm(3, 0, 0, 1), ACC0 + 6, AX0), ACC0 + 6, AX0, 0);
          e_unit(asm_nn(1, dt, nn_imm(3, 1, 0, 1), ACC0 + 7, AX0 + 1), ACC0 + 7, AX0 + 1, 0);
          e_unit(asm_nn(1, dt, nn_imm(3, 0, 1, 0), 0, AW0 + 3), 0, AW0 + 3, 0);
        end
      endcase
    end
  endtask

  // ---------------------------------------------------------------- the unit
  logic        issue_valid, issue_ready, illegal;
  logic [31:0] instr, rs1_val, rs2_val, rd_val;
  logic        wb_rd_we, wb_rs1_we;
  logic [4:0]  wb_rd_addr, wb_rs1_addr;
  logic [31:0] wb_rd_data, wb_rs1_data;
  logic        u_req, u_rvalid;
  logic [31:0] u_addr;
  logic        u_stall_mem, u_stall_nnrf;

  xpnn_ex_unit u_ex (
    .clk_i, .rst_ni,
    .issue_valid_i(issue_valid), .issue_ready_o(issue_ready), .instr_i(instr),
    .rs1_val_i(rs1_val), .rs2_val_i(rs2_val), .rd_val_i(rd_val), .illegal_o(illegal),
    .wb_rd_we_o(wb_rd_we), .wb_rd_addr_o(wb_rd_addr), .wb_rd_data_o(wb_rd_data),
    .wb_rs1_we_o(wb_rs1_we), .wb_rs1_addr_o(wb_rs1_addr), .wb_rs1_data_o(wb_rs1_data),
    .data_req_o(u_req), .data_addr_o(u_addr), .data_gnt_i(gnt_i && u_req),
    .data_rvalid_i(u_rvalid), .data_rdata_i(rdata_i),
    .stall_mem_o(u_stall_mem), .stall_nnrf_o(u_stall_nnrf));

  // ------------------------------------------------------------ host loads
  logic       out_q, out_host_q;    // an access is outstanding; it is a host load
  logic [4:0] hl_rd_q;
  logic       at_ld, h_req, host_wait;
  logic       running;

  assign at_ld     = running && (pc < prog.size()) && prog[pc].host_ld;
  assign h_req     = at_ld && !u_req && !u_stall_mem && (!out_q || rvalid_i) && !host_wait;
  assign u_rvalid  = rvalid_i && !out_host_q;
  assign req_o     = u_req || h_req;
  assign addr_o    = u_req ? u_addr : read_reg(prog[pc].rs1);

  function automatic logic [31:0] read_reg(int r);
    if (r == 0) return 32'h0;
    if (out_host_q && rvalid_i && hl_rd_q == 5'(r)) return rdata_i;
    if (wb_rd_we && wb_rd_addr == 5'(r)) return wb_rd_data;
    if (wb_rs1_we && wb_rs1_addr == 5'(r)) return wb_rs1_data;
    return rf[r];
  endfunction

  // an instruction that reads the register of a host load still in flight waits
  function automatic logic uses_pending(int rs1, int rs2, int rd);
    return out_q && out_host_q && !rvalid_i &&
           (hl_rd_q == 5'(rs1) || hl_rd_q == 5'(rs2) || hl_rd_q == 5'(rd));
  endfunction

  assign host_wait = running && (pc < prog.size()) &&
                     uses_pending(prog[pc].rs1, prog[pc].rs2, prog[pc].rd);

  always_comb begin
    issue_valid = running && (pc < prog.size()) && !prog[pc].host_ld && !host_wait;
    instr   = issue_valid ? prog[pc].code : 32'h13;
    rs1_val = issue_valid ? read_reg(prog[pc].rs1) : 32'h0;
    rs2_val = issue_valid ? read_reg(prog[pc].rs2) : 32'h0;
    rd_val  = issue_valid ? read_reg(prog[pc].rd)  : 32'h0;
  end

  always @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      running <= 1'b0; pc <= 0; out_q <= 1'b0; out_host_q <= 1'b0; hl_rd_q <= '0;
      done_o <= 1'b0; mem_stall_o <= 0; accesses_o <= 0;
    end else if (start_i) begin
      build(kernel_i, dt_i, iters_i);
      for (int r = 0; r < 32; r++) rf[r] <= init_rf[r];
      running <= 1'b1; pc <= 0; done_o <= 1'b0; mem_stall_o <= 0; accesses_o <= 0;
    end else if (running) begin
      logic        adv, hl_go, out_n, outh_n;
      logic [31:0] la;
      int          pc_n;
      if (req_o && !gnt_i) mem_stall_o <= mem_stall_o + 1;
      if (req_o && gnt_i) accesses_o <= accesses_o + 1;
      adv    = issue_valid && issue_ready;
      hl_go  = h_req && gnt_i;
      la     = read_reg(prog[pc].rs1);
      out_n  = out_q && !rvalid_i;
      outh_n = out_host_q;
      // host load data returns
      if (out_host_q && rvalid_i) rf[hl_rd_q] <= rdata_i;
      // unit writebacks (result port last, so it wins)
      if (wb_rs1_we && wb_rs1_addr != 0) rf[wb_rs1_addr] <= wb_rs1_data;
      if (wb_rd_we && wb_rd_addr != 0) rf[wb_rd_addr] <= wb_rd_data;
      if (u_req && gnt_i) begin out_n = 1'b1; outh_n = 1'b0; end
      if (hl_go) begin
        out_n = 1'b1; outh_n = 1'b1;
        hl_rd_q <= 5'(prog[pc].rd);
        rf[prog[pc].rs1] <= la + 4;
      end
      pc_n = (adv || hl_go) ? pc + 1 : pc;
      out_q      <= out_n;
      out_host_q <= outh_n;
      pc         <= pc_n;
      if (pc >= prog.size() && !out_q && !u_ex.ex_valid_q) begin
        running <= 1'b0;
        done_o  <= 1'b1;
      end
    end
  end

  for (genvar i = 0; i < 8; i++) begin : g_acc
    assign acc_o[i] = rf[ACC0 + i];
  end

endmodule
