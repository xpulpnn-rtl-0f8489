// xpnn_ref_pkg -- reference arithmetic for the XpulpNN testbenches.
//
// Element-by-element models of the packed-SIMD dot product and ALU written
// with plain 64-bit integers. Data types: 0=h(16b) 1=b(8b) 2=n(4b) 3=c(2b).
// Sign modes: 0 both unsigned, 1 operand A signed and B unsigned, 2 both
// signed. ALU codes as in xpnn_asm_pkg.
package xpnn_ref_pkg;

  function automatic int unsigned ref_w(int dt);
    return (dt == 0) ? 16 : (dt == 1) ? 8 : (dt == 2) ? 4 : 2;
  endfunction

  function automatic longint ref_field(logic [31:0] v, int unsigned w, int unsigned i, bit sgn);
    longint x = 0;
    for (int unsigned k = 0; k < w; k++) if (v[i*w+k]) x += longint'(1) << k;
    if (sgn && v[i*w+w-1]) x -= longint'(1) << w;
    return x;
  endfunction

  function automatic logic [31:0] ref_dotp(int dt, int sgn, logic [31:0] a, logic [31:0] b,
                                           logic [31:0] c);
    int unsigned w = ref_w(dt);
    longint acc = longint'(c);
    for (int unsigned i = 0; i < 32 / w; i++)
      acc += ref_field(a, w, i, sgn != 0) * ref_field(b, w, i, sgn == 2);
    return acc[31:0];
  endfunction

  function automatic logic [31:0] ref_alu(int op, int dt, logic [31:0] x, logic [31:0] y);
    int unsigned w = ref_w(dt);
    logic [31:0] r = '0;
    for (int unsigned i = 0; i < 32 / w; i++) begin
      longint sa = ref_field(x, w, i, 1), sb = ref_field(y, w, i, 1);
      longint ua = ref_field(x, w, i, 0), ub = ref_field(y, w, i, 0);
      longint sh = ub % w;
      longint v;
      case (op)
        0:  v = ua + ub;
        1:  v = ua - ub;
        2:  v = (sa + sb) >>> 1;
        3:  v = (ua + ub) >> 1;
        4:  v = (sa > sb) ? sa : sb;
        5:  v = (ua > ub) ? ua : ub;
        6:  v = (sa < sb) ? sa : sb;
        7:  v = (ua < ub) ? ua : ub;
        8:  v = ua >> sh;
        9:  v = sa >>> sh;
        10: v = ua << sh;
        default: v = (sa < 0) ? -sa : sa;
      endcase
      for (int unsigned k = 0; k < w; k++) r[i*w+k] = v[k];
    end
    return r;
  endfunction

  // element 0 of v replicated over the register (.sc operand)
  function automatic logic [31:0] ref_splat(int dt, logic [31:0] v);
    int unsigned w = ref_w(dt);
    logic [31:0] r;
    for (int unsigned i = 0; i < 32; i++) r[i] = v[i % w];
    return r;
  endfunction

endpackage
