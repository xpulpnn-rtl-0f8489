// tb_xpnn_nn_rf -- self-checking test of the NN-RF.
//
// Performs random writes to weight and activation registers and random reads
// on both ports, checking every read against a shadow copy kept by the
// testbench, including the write-through case where a read addresses the
// register being written in the same cycle.
module tb_xpnn_nn_rf;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        we, wsel_act;
  logic [1:0]  widx, w_raddr;
  logic        a_raddr;
  logic [31:0] wdata, w_rdata, a_rdata;
  logic [31:0] shadow_w [4];
  logic [31:0] shadow_a [2];
  int          checks = 0, failures = 0;

  xpnn_nn_rf dut (
    .clk_i(clk), .rst_ni(rst_n), .we_i(we), .wsel_act_i(wsel_act), .widx_i(widx),
    .wdata_i(wdata), .w_raddr_i(w_raddr), .w_rdata_o(w_rdata),
    .a_raddr_i(a_raddr), .a_rdata_o(a_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ew, ea;
    we = 0; wsel_act = 0; widx = 0; wdata = 0; w_raddr = 0; a_raddr = 0;
    for (int i = 0; i < 4; i++) shadow_w[i] = '0;
    for (int i = 0; i < 2; i++) shadow_a[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      we = ($urandom_range(0, 2) != 0);
      wsel_act = $urandom_range(0, 1);
      widx = wsel_act ? 2'($urandom_range(0, 1)) : 2'($urandom_range(0, 3));
      wdata = $urandom;
      w_raddr = 2'($urandom_range(0, 3));
      a_raddr = 1'($urandom_range(0, 1));
      #1;
      ew = (we && !wsel_act && widx == w_raddr) ? wdata : shadow_w[w_raddr];
      ea = (we && wsel_act && widx[0] == a_raddr) ? wdata : shadow_a[a_raddr];
      checks += 2;
      if (w_rdata !== ew) begin failures++; $display("FAIL w read %0d got %h exp %h", w_raddr, w_rdata, ew); end
      if (a_rdata !== ea) begin failures++; $display("FAIL a read %0d got %h exp %h", a_raddr, a_rdata, ea); end
      @(posedge clk);
      if (we) begin
        if (wsel_act) shadow_a[widx[0]] = wdata;
        else          shadow_w[widx]    = wdata;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
