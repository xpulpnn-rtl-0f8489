// tb_xpnn_simd_alu -- self-checking test of the packed-SIMD element-wise ALU.
//
// Applies random and corner operands to every operation at every element
// width and compares the result with an element-by-element reference written
// with plain integers (sign handled by subtracting 2^W).
module tb_xpnn_simd_alu;
  import xpnn_pkg::*;

  alu_op_e     op;
  dtype_e      dt;
  logic [31:0] a, b, res;
  int          checks = 0, failures = 0;

  xpnn_simd_alu dut (.op_i(op), .dt_i(dt), .opa_i(a), .opb_i(b), .res_o(res));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint field(logic [31:0] v, int unsigned w, int unsigned i, bit signed_);
    longint x = 0;
    for (int unsigned k = 0; k < w; k++) if (v[i*w+k]) x += longint'(1) << k;
    if (signed_ && v[i*w+w-1]) x -= longint'(1) << w;
    return x;
  endfunction

  function automatic logic [31:0] ref_alu(alu_op_e o, dtype_e d, logic [31:0] x, logic [31:0] y);
    int unsigned w = (d == DT_H) ? 16 : (d == DT_B) ? 8 : (d == DT_N) ? 4 : 2;
    logic [31:0] r = '0;
    for (int unsigned i = 0; i < 32 / w; i++) begin
      longint sa = field(x, w, i, 1), sb = field(y, w, i, 1);
      longint ua = field(x, w, i, 0), ub = field(y, w, i, 0);
      longint sh = ub % w;
      longint v;
      case (o)
        ALU_ADD:  v = ua + ub;
        ALU_SUB:  v = ua - ub;
        ALU_AVG:  v = (sa + sb) >>> 1;
        ALU_AVGU: v = (ua + ub) >> 1;
        ALU_MAX:  v = (sa > sb) ? sa : sb;
        ALU_MAXU: v = (ua > ub) ? ua : ub;
        ALU_MIN:  v = (sa < sb) ? sa : sb;
        ALU_MINU: v = (ua < ub) ? ua : ub;
        ALU_SRL:  v = ua >> sh;
        ALU_SRA:  v = sa >>> sh;
        ALU_SLL:  v = ua << sh;
        default:  v = (sa < 0) ? -sa : sa;   // ALU_ABS
      endcase
      for (int unsigned k = 0; k < w; k++) r[i*w+k] = v[k];
    end
    return r;
  endfunction

  task automatic check(alu_op_e o, dtype_e d, logic [31:0] x, logic [31:0] y);
    logic [31:0] e;
    op = o; dt = d; a = x; b = y;
    e = ref_alu(o, d, x, y);
    #1;
    checks++;
    if (res !== e) begin
      failures++;
      if (failures < 20)
        $display("FAIL op=%0d dt=%0d a=%h b=%h got %h exp %h", o, d, x, y, res, e);
    end
  endtask

  initial begin
    for (int o = 0; o <= 11; o++) begin
      for (int d = 0; d < 4; d++) begin
        check(alu_op_e'(o), dtype_e'(d), 32'h0000_0000, 32'hFFFF_FFFF);
        check(alu_op_e'(o), dtype_e'(d), 32'h8888_8888, 32'h7777_7777);
        check(alu_op_e'(o), dtype_e'(d), 32'hAAAA_AAAA, 32'h5555_5555);
        check(alu_op_e'(o), dtype_e'(d), 32'h8000_8000, 32'h0101_0101);
        for (int n = 0; n < 300; n++) check(alu_op_e'(o), dtype_e'(d), $urandom, $urandom);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
