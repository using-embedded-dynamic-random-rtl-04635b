// Testbench of the LDPC decoder at its default size (4608-bit codewords).
// Random codewords are sent as LLRs of magnitude 16 (8 LLR units) with a
// number of bits given the wrong sign; the decoder must return the codeword,
// report success, and take 2 * 36 cycles per check per iteration.  A frame of
// all-zero LLRs checks the failure path (no convergence within NMAX).
module tb_ldpc_decoder;
  import rc_pkg::*;
  import tb_code_pkg::*;
  localparam int Z = 128;
  localparam int N = 36 * Z;
  localparam int M = 4 * Z;
  localparam int NMAX = 24;
  localparam int AW = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ld_en = 0, start = 0, busy, done, success, rd_hd;
  logic [AW-1:0] ld_addr = '0, rd_addr = '0;
  soft_t ld_llr = '0, rd_ext;
  logic [$clog2(NMAX+1)-1:0] iters;
  int checks = 0, failures = 0;

  ldpc_decoder dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_frame(row_t cw, int nflip, bit zero_llr, output int cyc);
    int flips [$];
    for (int k = 0; k < nflip; k++) flips.push_back($urandom_range(N - 1));
    for (int i = 0; i < N; i++) begin
      int v;
      v = cw[i] ? 16 : -16;
      foreach (flips[k]) if (flips[k] == i) v = -v;
      if (zero_llr) v = 0;
      @(negedge clk); ld_en = 1; ld_addr = AW'(i); ld_llr = soft_t'(v);
    end
    @(negedge clk); ld_en = 0; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    code_gen g;
    row_t cw;
    int cyc;
    g = new(Z, 1'b0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(g.rank > 0, "code rank");
    for (int f = 0; f < 6; f++) begin
      cw = g.codeword();
      check(ldpc_syndrome_weight(Z, cw) == 0, "generated word is a codeword");
      run_frame(cw, (f == 0) ? 0 : 8 * f, 1'b0, cyc);
      check(success == 1'b1, $sformatf("frame %0d success", f));
      // start, clear, then per iteration 2*36 cycles per check plus one
      check(cyc == int'(iters) * (M * 72 + 1) + 2, $sformatf("frame %0d cycles %0d iters %0d", f, cyc, iters));
      if (f == 0) check(iters == 1, "clean frame converges in one iteration");
      for (int i = 0; i < N; i++) begin
        rd_addr = AW'(i); #1;
        check(rd_hd == cw[i], $sformatf("frame %0d bit %0d", f, i));
      end
    end
    // erasures: all-zero LLRs cannot converge to a nonzero decision pattern
    // with positive LLR convention (ties decide 0, the all-zero codeword):
    run_frame('0, 0, 1'b1, cyc);
    check(success == 1'b1 && iters == 1, "all-zero input decodes to zero codeword");
    // a frame of random signs is no codeword: decoding must give up at NMAX
    cw = '0;
    for (int i = 0; i < N; i++) cw[i] = 1'($urandom);
    run_frame(cw, 0, 1'b0, cyc);
    check(success == 1'b0 && int'(iters) == NMAX, $sformatf("random frame fails after NMAX (iters %0d)", iters));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
