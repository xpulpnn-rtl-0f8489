// tb_xpnn_ex_unit -- end-to-end test of the XpulpNN execute unit.
//
// The testbench plays the host core around the unit: a 32-entry GP-RF with
// forwarding from the two writeback ports, in-order issue of a program from
// an instruction list, and a TCDM-style data memory that grants a request
// after a random delay and returns data one cycle after the grant. An
// independent instruction-level model (xpnn_ref_pkg arithmetic, its own
// GP-RF and NN-RF copies) executes each instruction when it is issued and
// queues the writebacks it expects; every writeback of the unit is compared
// with that queue, in order.
//
// Programs:
//   1. a random mix of ALU, (sum-of-)dot-product, .sc, Compute&Update and
//      nn_sdotp instructions, first with an ideal memory and then with
//      memory contention;
//   2. the inner loop of a "4x2" matrix multiplication (4 filters x 2 pixels)
//      written with nn_sdotp, at 8, 4 and 2 bits;
//   3. the "4x4" layout (4 filters x 4 pixels) with nn_sdotp, at 8, 4 and 2 bits,
//      also under contention;
//   4. for comparison, the 4x2 MatMul with plain sum-of-dot-products and six
//      explicit loads per iteration, and with Compute&Update and two explicit
//      loads. Explicit loads (p.lw with post-increment) are executed by the
//      host model in one cycle, outside the unit.
// The MatMul accumulators are also checked against a matrix product computed
// directly from the data, and with an ideal memory the cycle count must equal
// the instruction count (one instruction per cycle, no stall).
//
// It counts how often each mechanism occurred (every data type, sign mode,
// ALU operation, .sc, C&U, nn_sdotp with weight / activation / no load,
// memory stall, NN-RF hazard stall, load data forwarded on arrival) and counts
// a failure for each one that never did. The unit has no parameters, so this
// is also the full-size test.
module tb_xpnn_ex_unit;
  import xpnn_asm_pkg::*;
  import xpnn_ref_pkg::*;

  // ------------------------------------------------------------------ DUT
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        issue_valid, issue_ready, illegal;
  logic [31:0] instr, rs1_val, rs2_val, rd_val;
  logic        wb_rd_we, wb_rs1_we;
  logic [4:0]  wb_rd_addr, wb_rs1_addr;
  logic [31:0] wb_rd_data, wb_rs1_data;
  logic        data_req, data_gnt, data_rvalid;
  logic [31:0] data_addr, data_rdata;
  logic        stall_mem, stall_nnrf;

  xpnn_ex_unit dut (
    .clk_i(clk), .rst_ni(rst_n),
    .issue_valid_i(issue_valid), .issue_ready_o(issue_ready), .instr_i(instr),
    .rs1_val_i(rs1_val), .rs2_val_i(rs2_val), .rd_val_i(rd_val), .illegal_o(illegal),
    .wb_rd_we_o(wb_rd_we), .wb_rd_addr_o(wb_rd_addr), .wb_rd_data_o(wb_rd_data),
    .wb_rs1_we_o(wb_rs1_we), .wb_rs1_addr_o(wb_rs1_addr), .wb_rs1_data_o(wb_rs1_data),
    .data_req_o(data_req), .data_addr_o(data_addr), .data_gnt_i(data_gnt),
    .data_rvalid_i(data_rvalid), .data_rdata_i(data_rdata),
    .stall_mem_o(stall_mem), .stall_nnrf_o(stall_nnrf));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --------------------------------------------------------------- program
  typedef enum int {K_ALU, K_DOT, K_CU, K_NN, K_LD} kind_e;
  typedef struct {
    kind_e kind;
    int    op, dt, sgn, rd, rs1, rs2, idx, imm;
    bit    acc, sc;
  } ins_t;

  ins_t        prog[$];
  logic [31:0] code[$];

  function automatic logic [31:0] encode(ins_t i);
    case (i.kind)
      K_ALU:   return asm_alu(i.op, i.dt, i.sc, i.rd, i.rs1, i.rs2);
      K_DOT:   return asm_dotp(i.acc, i.sgn, i.dt, i.sc, i.rd, i.rs1, i.rs2);
      K_CU:    return asm_cu(i.sgn, i.dt, i.idx, i.rd, i.rs1, i.rs2);
      K_LD:    return 32'h0000_0013;   // host load: executed by the host, not the unit
      default: return asm_nn(i.sgn, i.dt, i.imm, i.rd, i.rs1);
    endcase
  endfunction

  function automatic void emit(ins_t i);
    prog.push_back(i);
    code.push_back(encode(i));
  endfunction

  function automatic void emit_nn(int sgn, int dt, int rd, int rs1, int w, int a, bit uw, bit ua);
    ins_t i;
    i = '{kind: K_NN, op: 0, dt: dt, sgn: sgn, rd: rd, rs1: rs1, rs2: 0, idx: 0,
          imm: nn_imm(w, a, uw, ua), acc: 1'b1, sc: 1'b0};
    emit(i);
  endfunction

  // ---------------------------------------------------------------- memory
  localparam int MEM_WORDS = 8192;
  logic [31:0] mem [MEM_WORDS];
  int          gnt_pct = 100;   // grant probability per cycle, percent
  logic        rv_q;
  logic [31:0] rdata_q;

  int gnt_roll;
  always_comb data_gnt = data_req && (gnt_roll < gnt_pct);
  always @(posedge clk) gnt_roll <= $urandom_range(0, 99);

  always_ff @(posedge clk) begin
    rv_q    <= data_req && data_gnt;
    rdata_q <= mem[data_addr[14:2]];
  end
  assign data_rvalid = rv_q;
  assign data_rdata  = rdata_q;

  // --------------------------------------------------------------- host side
  logic [31:0] rf [32];
  int          pc;

  function automatic logic [31:0] read_reg(int r);
    if (r == 0) return 32'h0;
    if (wb_rd_we && wb_rd_addr == 5'(r)) return wb_rd_data;
    if (wb_rs1_we && wb_rs1_addr == 5'(r)) return wb_rs1_data;
    return rf[r];
  endfunction

  logic host_ld;
  always_comb begin
    host_ld     = rst_n && (pc < prog.size()) && (prog[pc].kind == K_LD);
    issue_valid = rst_n && (pc < prog.size()) && !host_ld;
    instr   = issue_valid ? code[pc] : 32'h0000_0013;
    rs1_val = issue_valid ? read_reg(prog[pc].rs1) : 32'h0;
    rs2_val = issue_valid ? read_reg(prog[pc].rs2) : 32'h0;
    rd_val  = issue_valid ? read_reg(prog[pc].rd)  : 32'h0;
  end

  // ------------------------------------------------- golden model and checks
  logic [31:0] g_rf [32];
  logic [31:0] g_w [4];
  logic [31:0] g_a [2];

  typedef struct { logic [4:0] rd; logic [31:0] rd_data; bit mem; logic [4:0] rs1; logic [31:0] rs1_data; } exp_t;
  exp_t exp_q[$];

  // mechanism counters
  int n_dt[4], n_sgn[3], n_alu[12];
  int n_sc = 0, n_cu = 0, n_nn_w = 0, n_nn_a = 0, n_nn_none = 0, n_dot_noacc = 0;
  int n_stall_mem = 0, n_stall_nnrf = 0, n_fwd = 0, n_illegal = 0;

  function automatic void golden_ld(ins_t i);
    logic [31:0] a;
    a = g_rf[i.rs1];
    g_rf[i.rs1] = a + 4;
    g_rf[i.rd] = mem[a[14:2]];
  endfunction

  function automatic void golden(ins_t i);
    exp_t  e;
    logic [31:0] a, b, c, r;
    a = g_rf[i.rs1];
    b = i.sc ? ref_splat(i.dt, g_rf[i.rs2]) : g_rf[i.rs2];
    c = g_rf[i.rd];
    e.mem = 1'b0; e.rs1 = 5'(i.rs1); e.rs1_data = a + 4; e.rd = 5'(i.rd);
    case (i.kind)
      K_ALU: begin r = ref_alu(i.op, i.dt, a, b); n_alu[i.op]++; end
      K_DOT: begin
        r = ref_dotp(i.dt, i.sgn, a, b, i.acc ? c : 32'h0);
        if (!i.acc) n_dot_noacc++;
      end
      K_CU: begin
        r = ref_dotp(i.dt, i.sgn, g_w[i.idx], b, c);
        g_w[i.idx] = mem[a[14:2]];
        e.mem = 1'b1;
        n_cu++;
      end
      default: begin
        int w = (i.imm >> 1) & 3, ai = i.imm & 1;
        r = ref_dotp(i.dt, i.sgn, g_w[w], g_a[ai], c);
        if (i.imm[4]) begin g_w[w] = mem[a[14:2]]; e.mem = 1'b1; n_nn_w++; end
        else if (i.imm[3]) begin g_a[ai] = mem[a[14:2]]; e.mem = 1'b1; n_nn_a++; end
        else n_nn_none++;
      end
    endcase
    if (i.kind != K_ALU) begin n_dt[i.dt]++; n_sgn[i.sgn]++; end
    if (i.sc) n_sc++;
    e.rd_data = r;
    if (e.mem) g_rf[i.rs1] = a + 4;
    if (i.rd != 0) g_rf[i.rd] = r;
    exp_q.push_back(e);
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (stall_mem) n_stall_mem++;
      if (stall_nnrf) n_stall_nnrf++;
      // load data used by an instruction in the cycle it arrives
      if (issue_valid && issue_ready && dut.pend_q && data_rvalid &&
          ((dut.dec_reads_w && !dut.pend_act_q && dut.pend_idx_q == dut.dec.w_idx) ||
           (dut.dec_reads_a && dut.pend_act_q && dut.pend_idx_q[0] == dut.dec.a_idx)))
        n_fwd++;
      if (issue_valid && illegal) n_illegal++;
      // writeback checks
      if (wb_rd_we) begin
        exp_t e;
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("FAIL unexpected writeback");
        end else begin
          e = exp_q.pop_front();
          if (wb_rd_addr !== e.rd || wb_rd_data !== e.rd_data) begin
            failures++;
            if (failures < 20) $display("FAIL rd wb x%0d=%h exp x%0d=%h (pc %0d)",
                                        wb_rd_addr, wb_rd_data, e.rd, e.rd_data, pc);
          end
          checks++;
          if (wb_rs1_we !== e.mem || (e.mem && (wb_rs1_addr !== e.rs1 || wb_rs1_data !== e.rs1_data))) begin
            failures++;
            if (failures < 20) $display("FAIL rs1 wb we=%b x%0d=%h exp %b x%0d=%h",
                                        wb_rs1_we, wb_rs1_addr, wb_rs1_data, e.mem, e.rs1, e.rs1_data);
          end
        end
      end else if (wb_rs1_we) begin
        checks++; failures++; $display("FAIL rs1 writeback without result");
      end
      // host register file update (result port wins over address port)
      if (wb_rs1_we && wb_rs1_addr != 0) rf[wb_rs1_addr] = wb_rs1_data;
      if (wb_rd_we && wb_rd_addr != 0) rf[wb_rd_addr] = wb_rd_data;
      if (issue_valid && issue_ready) begin
        golden(prog[pc]);
        pc <= pc + 1;
      end
      // host post-increment load p.lw rd, 4(rs1!) into the GP-RF, one cycle
      if (host_ld && issue_ready) begin
        logic [31:0] la;
        la = read_reg(prog[pc].rs1);
        rf[prog[pc].rs1] = la + 4;
        rf[prog[pc].rd]  = mem[la[14:2]];
        golden_ld(prog[pc]);
        pc <= pc + 1;
      end
    end
  end

  // ------------------------------------------------------------- utilities
  // Runs the current program to completion; returns the cycles from the
  // first issue to the last writeback.
  task automatic run_prog(output int cycles);
    int t0;
    pc = 0;
    @(posedge clk);
    #1;
    t0 = 0;
    while (pc < prog.size() || exp_q.size() != 0) begin
      @(posedge clk);
      #1;
      t0++;
    end
    cycles = t0;
  endtask

  task automatic set_reg(int r, logic [31:0] v);
    rf[r] = v; g_rf[r] = v;
  endtask

  task automatic clear_prog();
    prog.delete(); code.delete();
  endtask

  // ----------------------------------------------------- program 1: random mix
  // Address registers x1..x8 point into memory; results go to x10..x31.
  task automatic random_mix(int n);
    for (int k = 0; k < n; k++) begin
      ins_t i;
      int kind = $urandom_range(0, 9);
      i.kind = (kind < 3) ? K_ALU : (kind < 5) ? K_DOT : (kind < 7) ? K_CU : K_NN;
      i.op  = $urandom_range(0, 11);
      i.dt  = $urandom_range(0, 3);
      i.sgn = $urandom_range(0, 2);
      i.rd  = $urandom_range(9, 31);   // x9 is never read back, used as a sink
      i.rs1 = (i.kind == K_CU || i.kind == K_NN) ? $urandom_range(1, 8) : $urandom_range(0, 31);
      i.rs2 = $urandom_range(0, 31);
      i.idx = $urandom_range(0, 3);
      i.sc  = (i.kind == K_ALU || i.kind == K_DOT) ? 1'($urandom_range(0, 1)) : 1'b0;
      i.acc = (i.kind == K_DOT) ? 1'($urandom_range(0, 1)) : 1'b1;
      case ($urandom_range(0, 2))
        0: i.imm = nn_imm($urandom_range(0, 3), $urandom_range(0, 1), 1, 0);
        1: i.imm = nn_imm($urandom_range(0, 3), $urandom_range(0, 1), 0, 1);
        default: i.imm = nn_imm($urandom_range(0, 3), $urandom_range(0, 1), 0, 0);
      endcase
      emit(i);
    end
  endtask

  // --------------------------------------------------- programs 2/3: MatMul
  // Memory layout (word addresses): filter f at WBASE + f*KW, pixel p at
  // XBASE + p*KW; each iteration consumes one word of every stream.
  localparam int WBASE = 0, XBASE = 2048, KW = 64;
  localparam int AW0 = 1, AX0 = 5;     // x1..x4 weight pointers, x5..x8 pixel pointers
  localparam int ACC0 = 10;            // accumulators x10..x25 (filter f, pixel p -> 10+4f+p)

  task automatic matmul(int dt, int pixels, int iters, int gnt, output int cycles);
    int          n_instr;
    logic [31:0] expv;
    clear_prog();
    for (int f = 0; f < 4; f++) set_reg(AW0 + f, (WBASE + f * KW) * 4);
    for (int p = 0; p < 4; p++) set_reg(AX0 + p, (XBASE + p * KW) * 4);
    for (int r = ACC0; r < ACC0 + 16; r++) set_reg(r, 32'h0);
    // prologue: fill the NN-RF (rd = x0)
    for (int f = 0; f < 4; f++) emit_nn(1, dt, 0, AW0 + f, f, 0, 1, 0);
    emit_nn(1, dt, 0, AX0 + 0, 0, 0, 0, 1);
    emit_nn(1, dt, 0, AX0 + 1, 0, 1, 0, 1);
    for (int it = 0; it < iters; it++) begin
      if (pixels == 2) begin
        // 8 sum-of-dot-products, 5 fused loads, 1 load-only instruction
        emit_nn(1, dt, ACC0 + 0,  0,       0, 0, 0, 0);
        emit_nn(1, dt, ACC0 + 1,  AW0 + 0, 0, 1, 1, 0);
        emit_nn(1, dt, ACC0 + 4,  0,       1, 0, 0, 0);
        emit_nn(1, dt, ACC0 + 5,  AW0 + 1, 1, 1, 1, 0);
        emit_nn(1, dt, ACC0 + 8,  0,       2, 0, 0, 0);
        emit_nn(1, dt, ACC0 + 9,  AW0 + 2, 2, 1, 1, 0);
        emit_nn(1, dt, ACC0 + 12, AX0 + 0, 3, 0, 0, 1);
        emit_nn(1, dt, ACC0 + 13, AX0 + 1, 3, 1, 0, 1);
        emit_nn(1, dt, 0,         AW0 + 3, 3, 0, 1, 0);
      end else begin
        // 16 sum-of-dot-products, 7 fused loads, 1 load-only instruction;
        // the two activation registers hold pixels 0/1, then 2/3
        emit_nn(1, dt, ACC0 + 0,  0,       0, 0, 0, 0);
        emit_nn(1, dt, ACC0 + 1,  0,       0, 1, 0, 0);
        emit_nn(1, dt, ACC0 + 4,  0,       1, 0, 0, 0);
        emit_nn(1, dt, ACC0 + 5,  0,       1, 1, 0, 0);
        emit_nn(1, dt, ACC0 + 8,  0,       2, 0, 0, 0);
        emit_nn(1, dt, ACC0 + 9,  0,       2, 1, 0, 0);
        emit_nn(1, dt, ACC0 + 12, AX0 + 2, 3, 0, 0, 1);
        emit_nn(1, dt, ACC0 + 13, AX0 + 3, 3, 1, 0, 1);
        emit_nn(1, dt, ACC0 + 2,  0,       0, 0, 0, 0);
        emit_nn(1, dt, ACC0 + 3,  AW0 + 0, 0, 1, 1, 0);
        emit_nn(1, dt, ACC0 + 6,  0,       1, 0, 0, 0);
        emit_nn(1, dt, ACC0 + 7,  AW0 + 1, 1, 1, 1, 0);
        emit_nn(1, dt, ACC0 + 10, 0,       2, 0, 0, 0);
        emit_nn(1, dt, ACC0 + 11, AW0 + 2, 2, 1, 1, 0);
        emit_nn(1, dt, ACC0 + 14, AX0 + 0, 3, 0, 0, 1);
        emit_nn(1, dt, ACC0 + 15, AX0 + 1, 3, 1, 0, 1);
        emit_nn(1, dt, 0,         AW0 + 3, 3, 0, 1, 0);
      end
    end
    n_instr = prog.size();
    gnt_pct = gnt;
    run_prog(cycles);
    // direct matrix product: acc[f][p] = sum_k dot(W_f[k], X_p[k]), with
    // pixels 2/3 read from the streams that the 4x4 layout uses
    for (int f = 0; f < 4; f++) begin
      for (int p = 0; p < pixels; p++) begin
        expv = 32'h0;
        for (int k = 0; k < iters; k++)
          expv = ref_dotp(dt, 1, mem[WBASE + f * KW + k], mem[XBASE + p * KW + k], expv);
        checks++;
        if (rf[ACC0 + 4 * f + p] !== expv) begin
          failures++;
          $display("FAIL matmul %0dx%0d dt=%0d acc[%0d][%0d]=%h exp %h", 4, pixels, dt, f, p,
                   rf[ACC0 + 4 * f + p], expv);
        end
      end
    end
    if (gnt == 100) begin
      // one instruction per cycle: last writeback n_instr cycles after the
      // first issue
      checks++;
      if (cycles != n_instr) begin
        failures++;
        $display("FAIL matmul 4x%0d dt=%0d took %0d cycles for %0d instructions",
                 pixels, dt, cycles, n_instr);
      end
      $display("matmul 4x%0d %0d-bit: %0d instructions, %0d cycles, %0d SIMD MACs, %0.3f cycles/SIMD-MAC",
               pixels, ref_w(dt), n_instr, cycles, 4 * pixels * iters,
               real'(cycles) / real'(4 * pixels * iters));
    end
  endtask

  function automatic void emit_ld(int rd, int rs1);
    ins_t i;
    i = '{kind: K_LD, op: 0, dt: 0, sgn: 0, rd: rd, rs1: rs1, rs2: 0, idx: 0, imm: 0,
          acc: 1'b0, sc: 1'b0};
    emit(i);
  endfunction

  // 4x2 MatMul without NN-RF (plain sum-of-dot-product, variant 0) or with
  // Compute&Update (variant 1). Weights are read with a signed first operand
  // and activations are the unsigned second operand.
  localparam int AWB0 = 26;          // C&U: second pointer of each filter, x26..x29
  localparam int XR0 = 30;           // activation values x30, x31
  localparam int WR0 = 26;           // SIMD: weight values x26..x29
  task automatic matmul_gp(int variant, int dt, int iters, int gnt, output int cycles);
    int          n_instr, n_mac;
    logic [31:0] expv;
    clear_prog();
    for (int f = 0; f < 4; f++) set_reg(AW0 + f, (WBASE + f * KW) * 4);
    for (int p = 0; p < 2; p++) set_reg(AX0 + p, (XBASE + p * KW) * 4);
    for (int r = ACC0; r < ACC0 + 16; r++) set_reg(r, 32'h0);
    if (variant == 1) begin
      for (int f = 0; f < 4; f++) set_reg(AWB0 + f, (WBASE + f * KW) * 4);
      // prologue: NN-RF[f] <= W_f[0]
      for (int f = 0; f < 4; f++)
        emit('{kind: K_CU, op: 0, dt: dt, sgn: 1, rd: 0, rs1: AW0 + f, rs2: 0, idx: f,
               imm: 0, acc: 1'b1, sc: 1'b0});
    end
    for (int it = 0; it < iters; it++) begin
      emit_ld(XR0 + 0, AX0 + 0);
      emit_ld(XR0 + 1, AX0 + 1);
      if (variant == 0) begin
        for (int f = 0; f < 4; f++) emit_ld(WR0 + f, AW0 + f);
        for (int p = 0; p < 2; p++)
          for (int f = 0; f < 4; f++)
            emit('{kind: K_DOT, op: 0, dt: dt, sgn: 1, rd: ACC0 + 4 * f + p, rs1: WR0 + f,
                   rs2: XR0 + p, idx: 0, imm: 0, acc: 1'b1, sc: 1'b0});
      end else begin
        // first use reloads the same weight through the second pointer,
        // second use fetches the next weight
        for (int f = 0; f < 4; f++)
          emit('{kind: K_CU, op: 0, dt: dt, sgn: 1, rd: ACC0 + 4 * f, rs1: AWB0 + f,
                 rs2: XR0 + 0, idx: f, imm: 0, acc: 1'b1, sc: 1'b0});
        for (int f = 0; f < 4; f++)
          emit('{kind: K_CU, op: 0, dt: dt, sgn: 1, rd: ACC0 + 4 * f + 1, rs1: AW0 + f,
                 rs2: XR0 + 1, idx: f, imm: 0, acc: 1'b1, sc: 1'b0});
      end
    end
    n_instr = prog.size();
    n_mac   = 8 * iters;
    gnt_pct = gnt;
    run_prog(cycles);
    for (int f = 0; f < 4; f++) begin
      for (int p = 0; p < 2; p++) begin
        expv = 32'h0;
        for (int k = 0; k < iters; k++)
          expv = ref_dotp(dt, 1, mem[WBASE + f * KW + k], mem[XBASE + p * KW + k], expv);
        checks++;
        if (rf[ACC0 + 4 * f + p] !== expv) begin
          failures++;
          $display("FAIL %s dt=%0d acc[%0d][%0d]=%h exp %h", variant ? "C&U" : "SIMD", dt, f, p,
                   rf[ACC0 + 4 * f + p], expv);
        end
      end
    end
    if (gnt == 100) begin
      checks++;
      if (cycles != n_instr) begin
        failures++;
        $display("FAIL %s dt=%0d took %0d cycles for %0d instructions", variant ? "C&U" : "SIMD",
                 dt, cycles, n_instr);
      end
      $display("matmul 4x2 %s %0d-bit: %0d instructions, %0d cycles, %0d SIMD MACs, %0.3f cycles/SIMD-MAC",
               variant ? "C&U " : "SIMD", ref_w(dt), n_instr, cycles, n_mac,
               real'(cycles) / real'(n_mac));
    end
  endtask

  // ------------------------------------------------------------------- main
  initial begin
    int cyc;
    pc = 0;
    for (int r = 0; r < 32; r++) begin rf[r] = 32'h0; g_rf[r] = 32'h0; end
    for (int r = 0; r < 4; r++) g_w[r] = 32'h0;
    for (int r = 0; r < 2; r++) g_a[r] = 32'h0;
    for (int i = 0; i < MEM_WORDS; i++) mem[i] = $urandom;
    for (int i = 0; i < 4; i++) n_dt[i] = 0;
    for (int i = 0; i < 3; i++) n_sgn[i] = 0;
    for (int i = 0; i < 12; i++) n_alu[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // program 1: random mix, ideal memory then contention
    for (int r = 1; r <= 8; r++) set_reg(r, $urandom_range(0, 1000) * 4);
    for (int r = 10; r < 32; r++) set_reg(r, $urandom);
    random_mix(3000);
    gnt_pct = 100;
    run_prog(cyc);
    clear_prog();
    for (int r = 1; r <= 8; r++) set_reg(r, $urandom_range(0, 1000) * 4);
    random_mix(3000);
    gnt_pct = 40;
    run_prog(cyc);

    // programs 2 and 3: MatMul kernels
    for (int dt = 1; dt <= 3; dt++) begin
      matmul_gp(0, dt, 32, 100, cyc);
      matmul_gp(1, dt, 32, 100, cyc);
      matmul_gp(1, dt, 32, 50, cyc);
      matmul(dt, 2, 32, 100, cyc);
      matmul(dt, 4, 32, 100, cyc);
      matmul(dt, 4, 32, 50, cyc);
    end

    // malformed word: flagged, accepted and ignored
    clear_prog();
    begin
      ins_t i;
      i = '{kind: K_NN, op: 0, dt: 1, sgn: 1, rd: 12, rs1: 1, rs2: 0, idx: 0,
            imm: 5'b11000, acc: 1'b1, sc: 1'b0};
      prog.push_back(i);
      code.push_back(encode(i));
      pc = 0;
      #1;
      checks++;
      if (!illegal) begin failures++; $display("FAIL malformed word not flagged"); end
      @(posedge clk);   // golden() would model it; drop its expectation
      #1;
      exp_q.delete();
      repeat (2) @(posedge clk);
      #1;
      checks++;
      if (dut.ex_valid_q) begin failures++; $display("FAIL malformed word executed"); end
    end

    // every mechanism must have happened
    for (int i = 0; i < 4; i++) begin
      checks++; if (n_dt[i] == 0) begin failures++; $display("FAIL no dotp of dt %0d", i); end
    end
    for (int i = 0; i < 3; i++) begin
      checks++; if (n_sgn[i] == 0) begin failures++; $display("FAIL no dotp of sign %0d", i); end
    end
    for (int i = 0; i < 12; i++) begin
      checks++; if (n_alu[i] == 0) begin failures++; $display("FAIL no ALU op %0d", i); end
    end
    checks += 9;
    if (n_sc == 0)         begin failures++; $display("FAIL no .sc"); end
    if (n_cu == 0)         begin failures++; $display("FAIL no C&U"); end
    if (n_nn_w == 0)       begin failures++; $display("FAIL no nn_sdotp weight load"); end
    if (n_nn_a == 0)       begin failures++; $display("FAIL no nn_sdotp activation load"); end
    if (n_nn_none == 0)    begin failures++; $display("FAIL no nn_sdotp without load"); end
    if (n_dot_noacc == 0)  begin failures++; $display("FAIL no plain dot product"); end
    if (n_stall_mem == 0)  begin failures++; $display("FAIL no memory stall"); end
    if (n_stall_nnrf == 0) begin failures++; $display("FAIL no NN-RF hazard stall"); end
    if (n_fwd == 0)        begin failures++; $display("FAIL no load data forwarded"); end
    $display("mechanisms: dt h/b/n/c %0d/%0d/%0d/%0d, sign up/usp/sp %0d/%0d/%0d, .sc %0d, C&U %0d,",
             n_dt[0], n_dt[1], n_dt[2], n_dt[3], n_sgn[0], n_sgn[1], n_sgn[2], n_sc, n_cu);
    $display("  nn_sdotp w-load/a-load/none %0d/%0d/%0d, memory stalls %0d, NN-RF stalls %0d, forwards %0d, malformed %0d",
             n_nn_w, n_nn_a, n_nn_none, n_stall_mem, n_stall_nnrf, n_fwd, n_illegal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
