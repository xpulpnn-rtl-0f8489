// tb_xpnn_cluster -- eight execute units sharing a banked data memory.
//
// Runs the 4x2 MatMul inner loop on eight cores at once, each core being a
// behavioural host (xpnn_core_model) around one xpnn_ex_unit. The cores share
// a word-interleaved memory: word address a lives in bank a mod nbanks, each
// bank serves one request per cycle, and a round-robin pointer per bank picks
// among the cores that ask for it in the same cycle. Data returns one cycle
// after the grant. A request that loses arbitration waits, so the cores see
// real contention stalls.
//
// Each core reads four filter streams and two pixel streams of its own (as
// when the output channels of a layer are split over the cores); stream s of
// core c starts at a random word of region 6c+s (96 words each), so the
// cores collide on banks as with an arbitrary data layout. Each configuration
// is averaged over NLAYOUTS layouts, the same ones for 16 and 32 banks.
// Every configuration is run with 16 banks (banking factor 2 for eight cores)
// and with 32 banks (banking factor 4), for the three inner loops (plain
// sum-of-dot-product with explicit loads, Compute&Update, nn_sdotp) and for 8-,
// 4- and 2-bit data. Each core's eight accumulators are checked against a
// direct computation of the matrix product; contention stalls must occur in
// at least one configuration. Cycles per SIMD MAC per core are printed.
module tb_xpnn_cluster;
  import xpnn_ref_pkg::*;

  localparam int NCORES = 8;
  localparam int REGION = 96;        // words per stream region
  localparam int ITERS = 60;         // stream words used: at most 31 + ITERS + 1 <= REGION
  localparam int MEM_WORDS = 48 * REGION;
  localparam int NLAYOUTS = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ cores
  logic        start;
  int          kernel, dt, iters;
  logic        done   [NCORES];
  logic [31:0] acc    [NCORES][8];
  int          mstall [NCORES];
  int          naccs  [NCORES];
  logic        req    [NCORES];
  logic [31:0] addr   [NCORES];
  logic        gnt    [NCORES];
  logic        rvalid [NCORES];
  logic [31:0] rdata  [NCORES];
  int          base   [NCORES][6];

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    xpnn_core_model #(.CORE_ID(c)) u_core (
      .clk_i(clk), .rst_ni(rst_n), .start_i(start), .kernel_i(kernel), .dt_i(dt),
      .iters_i(iters), .base_i(base[c]), .done_o(done[c]), .acc_o(acc[c]), .mem_stall_o(mstall[c]),
      .accesses_o(naccs[c]), .req_o(req[c]), .addr_o(addr[c]), .gnt_i(gnt[c]),
      .rvalid_i(rvalid[c]), .rdata_i(rdata[c]));
  end

  // ------------------------------------------------------------ banked memory
  logic [31:0] mem [MEM_WORDS];
  int          nbanks;
  int          rr_q [32];          // per-bank round-robin pointer: next core to favour

  function automatic int bank_of(logic [31:0] a);
    return int'((a >> 2) % nbanks);
  endfunction

  always_comb begin
    for (int c = 0; c < NCORES; c++) gnt[c] = 1'b0;
    for (int b = 0; b < nbanks; b++) begin
      bit taken;
      int c;
      taken = 1'b0;
      for (int k = 0; k < NCORES; k++) begin
        c = (rr_q[b] + k) % NCORES;
        if (!taken && req[c] && bank_of(addr[c]) == b) begin
          gnt[c] = 1'b1;
          taken  = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 32; b++) rr_q[b] <= 0;
      for (int c = 0; c < NCORES; c++) begin
        rvalid[c] <= 1'b0;
        rdata[c]  <= '0;
      end
    end else begin
      for (int c = 0; c < NCORES; c++) begin
        rvalid[c] <= gnt[c];
        if (gnt[c]) begin
          rdata[c] <= mem[(addr[c] >> 2) % MEM_WORDS];
          rr_q[bank_of(addr[c])] <= (c + 1) % NCORES;
        end
      end
    end
  end

  // ------------------------------------------------------------ one run
  int total_stalls = 0;

  task automatic new_layout();
    for (int c = 0; c < NCORES; c++)
      for (int s = 0; s < 6; s++) base[c][s] = (6 * c + s) * REGION + int'($urandom % 32);
  endtask

  // runs one kernel on all cores; returns the cycles until the last core is done
  task automatic run(int kern, int d, int nb, output int cycles, output int stalls);
    bit all_done;
    cycles = 0;
    stalls = 0;
    kernel = kern; dt = d; iters = ITERS; nbanks = nb;
    @(posedge clk); #1;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    do begin
      @(posedge clk); #1;
      cycles++;
      all_done = 1'b1;
      for (int c = 0; c < NCORES; c++) all_done &= done[c];
    end while (!all_done && cycles < 200000);
    for (int c = 0; c < NCORES; c++) begin
      stalls += mstall[c];
      for (int f = 0; f < 4; f++)
        for (int p = 0; p < 2; p++) begin
          logic [31:0] e = 32'h0;
          for (int k = 0; k < ITERS; k++)
            e = ref_dotp(d, 1, mem[base[c][f] + k], mem[base[c][4 + p] + k], e);
          checks++;
          if (acc[c][2 * f + p] !== e) begin
            failures++;
            $display("FAIL kernel %0d dt %0d banks %0d core %0d acc[%0d][%0d]=%h exp %h",
                     kern, d, nb, c, f, p, acc[c][2 * f + p], e);
          end
        end
    end
    total_stalls += stalls;
  endtask

  initial begin
    start = 1'b0; kernel = 0; dt = 1; iters = ITERS; nbanks = 16;
    for (int c = 0; c < NCORES; c++)
      for (int s = 0; s < 6; s++) base[c][s] = 0;
    for (int i = 0; i < MEM_WORDS; i++) mem[i] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int d = 1; d <= 3; d++)
      for (int kern = 0; kern < 3; kern++) begin
        int cyc[2], stl[2], c1, s1;
        cyc = '{0, 0};
        stl = '{0, 0};
        for (int l = 0; l < NLAYOUTS; l++) begin
          new_layout();
          for (int bf = 0; bf < 2; bf++) begin
            run(kern, d, (bf == 1) ? 32 : 16, c1, s1);
            cyc[bf] += c1;
            stl[bf] += s1;
          end
        end
        for (int bf = 0; bf < 2; bf++)
          $display("%-9s %0d-bit, %0d banks: %0.1f cycles, %0.1f grant stalls, %0.3f cycles/SIMD-MAC per core",
                   kern == 0 ? "SIMD" : kern == 1 ? "C&U" : "nn_sdotp", ref_w(d), (bf == 1) ? 32 : 16,
                   real'(cyc[bf]) / NLAYOUTS, real'(stl[bf]) / NLAYOUTS,
                   real'(cyc[bf]) / real'(NLAYOUTS * 8 * ITERS));
      end
    checks++;
    if (total_stalls == 0) begin
      failures++;
      $display("FAIL no memory contention occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
