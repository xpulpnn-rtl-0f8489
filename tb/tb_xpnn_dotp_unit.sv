// tb_xpnn_dotp_unit -- self-checking test of the multi-precision Dotp unit.
//
// Issues random back-to-back operations of every element width and every
// signedness mode, plus corner vectors (all ones, most negative elements),
// and compares each result, one cycle after issue, with a reference that
// walks the elements one by one. It also checks that exactly the region of
// the issued width has its gate enable raised, and that a result holds while
// no new operation is issued.
module tb_xpnn_dotp_unit;
  import xpnn_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        en;
  dtype_e      dt;
  sign_e       sgn;
  logic [31:0] opa, opb, opc, res;
  logic [3:0]  region_en;
  int          checks = 0, failures = 0;

  xpnn_dotp_unit dut (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .dt_i(dt), .sgn_i(sgn),
    .opa_i(opa), .opb_i(opb), .opc_i(opc), .res_o(res), .region_en_o(region_en));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: element-by-element, with 64-bit integers.
  function automatic logic [31:0] ref_dotp(dtype_e d, sign_e s, logic [31:0] a,
                                           logic [31:0] b, logic [31:0] c);
    int unsigned w = (d == DT_H) ? 16 : (d == DT_B) ? 8 : (d == DT_N) ? 4 : 2;
    longint acc = longint'(c);
    for (int unsigned i = 0; i < 32 / w; i++) begin
      longint ea = 0, eb = 0;
      for (int unsigned k = 0; k < w; k++) begin
        if (a[i*w+k]) ea += longint'(1) << k;
        if (b[i*w+k]) eb += longint'(1) << k;
      end
      if ((s != SGN_UP) && a[i*w+w-1]) ea -= longint'(1) << w;
      if ((s == SGN_SP) && b[i*w+w-1]) eb -= longint'(1) << w;
      acc += ea * eb;
    end
    return acc[31:0];
  endfunction

  task automatic issue(dtype_e d, sign_e s, logic [31:0] a, logic [31:0] b, logic [31:0] c);
    logic [31:0] exp_res;
    en = 1'b1; dt = d; sgn = s; opa = a; opb = b; opc = c;
    exp_res = ref_dotp(d, s, a, b, c);
    #1;
    checks++;
    if (region_en != (4'b1 << d)) begin
      failures++;
      $display("FAIL region enable %b for dt %0d", region_en, d);
    end
    @(posedge clk); #1;
    en = 1'b0;
    // result is available in the cycle after issue
    checks++;
    if (res !== exp_res) begin
      failures++;
      $display("FAIL dt=%0d sgn=%0d a=%h b=%h c=%h got %h exp %h", d, s, a, b, c, res, exp_res);
    end
  endtask

  initial begin
    en = 0; dt = DT_B; sgn = SGN_UP; opa = 0; opb = 0; opc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    // corner cases
    for (int d = 0; d < 4; d++) begin
      for (int s = 0; s < 3; s++) begin
        issue(dtype_e'(d), sign_e'(s), 32'hFFFF_FFFF, 32'hFFFF_FFFF, 32'h0);
        issue(dtype_e'(d), sign_e'(s), 32'h8888_8888, 32'hAAAA_AAAA, 32'h1234_5678);
        issue(dtype_e'(d), sign_e'(s), 32'h8000_8000, 32'h8000_8000, 32'hFFFF_FFFF);
      end
    end
    // random back-to-back operations
    for (int n = 0; n < 3000; n++) begin
      issue(dtype_e'($urandom_range(0, 3)), sign_e'($urandom_range(0, 2)),
            $urandom, $urandom, ($urandom_range(0, 1) != 0) ? $urandom : 32'h0);
    end
    // result holds while nothing is issued; another width's issue does not
    // disturb a region's registers
    issue(DT_N, SGN_SP, 32'h7654_3210, 32'h89AB_CDEF, 32'd100);
    begin
      logic [31:0] held;
      held = res;
      repeat (3) @(posedge clk);
      #1;
      checks++;
      if (res !== held) begin failures++; $display("FAIL result not held"); end
      issue(DT_H, SGN_UP, 32'h0001_0002, 32'h0003_0004, 32'd0);
      issue(DT_N, SGN_SP, 32'h7654_3210, 32'h89AB_CDEF, 32'd100);
      checks++;
      if (res !== held) begin failures++; $display("FAIL nibble re-issue"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
