// End-to-end testbench of the read channel at circulant size 32 (1152-bit
// sectors, 9 post-processing segments), input buffer of 2 sectors and decoder
// buffer of 1 sector so that the buffers fill quickly.
//
// Written sectors are codewords of the LDPC code that also satisfy the two
// interleaved parity checks of every 128-bit segment.  The channel model is
// the 1 + 0.75D target (8 x_k + 6 x_{k-1}) plus bounded noise; the equalizer
// taps are set to pass samples unchanged.  The stimulus has three phases:
//   1. clean sectors, one at a time: decoded at the first try, no
//      post-processing;
//   2. a sector with burst errors, then a noisy sector;
//   3. a sector of random samples (no codeword), then, timed to arrive while
//      the decoding stage is about to run its first extra channel iteration,
//      six sectors back to back: the random sector goes through
//      post-processing and all channel iterations and fails, its LDPC
//      iterations exceed the budget (decoding overflow), the detection stage
//      has to wait for the shared detector and the input buffer overflows.
// Every sector that comes out is compared with the sectors written, in
// order; sectors lost to an input-buffer overflow are skipped and must match
// the overflow count.  Each mechanism is counted and must occur.
module tb_read_channel_top;
  import rc_pkg::*;
  import tb_code_pkg::*;
  localparam int Z = 32;
  localparam int N = 36 * Z;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic adc_valid = 0;
  logic signed [5:0] adc_sample = '0;
  logic signed [5:0] fir_coef [10];
  logic signed [5:0] wh_coef [3];
  logic out_valid, out_bit, sec_done, sec_ok;
  logic [1:0] sec_ch_iters;
  logic [6:0] sec_ldpc_iters;
  logic [31:0] cnt_sectors, cnt_failed, cnt_pp_runs, cnt_pp_events, cnt_ch_iters,
               cnt_dec_overflow, cnt_in_overflow, cnt_sova_waits;
  int checks = 0, failures = 0;

  read_channel_top #(.Z(Z), .D_SECTORS(2), .M_SECTORS(1)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  row_t sent [$];       // written sectors
  bit   is_cw [$];      // whether the sector is a codeword
  row_t rx;
  int   rx_n = 0, next_exp = 0, skipped = 0, n_out = 0, n_ok = 0, n_fail = 0;
  int   n_with_pp_ok = 0, n_first_try = 0;

  // Collect and compare output sectors.
  always @(posedge clk) begin
    if (out_valid) begin rx[rx_n] <= out_bit; rx_n <= rx_n + 1; end
    if (sec_done) begin
      n_out++;
      $display("sector done ok=%0d ch=%0d ldpc=%0d t=%0t", sec_ok, sec_ch_iters, sec_ldpc_iters, $time);
      check(rx_n == N, $sformatf("sector of %0d bits", rx_n));
      rx_n <= 0;
      if (sec_ok) begin
        int k;
        n_ok++;
        if (sec_ch_iters == 0 && sec_ldpc_iters <= 24) n_first_try++;
        k = next_exp;
        while (k < sent.size() && !(is_cw[k] && sent[k][N-1:0] == rx[N-1:0])) k++;
        check(k < sent.size(), "decoded sector matches a written sector");
        skipped += k - next_exp;
        next_exp = k + 1;
      end else begin
        n_fail++;
        check(sec_ch_iters == 2'(MAX_CH_ITER - 1), "failed sector used all channel iterations");
        while (next_exp < sent.size() && is_cw[next_exp]) begin next_exp++; skipped++; end
        next_exp++;
      end
    end
  end

  task automatic send(row_t x, bit cw, int noise, int burst);
    int prev;
    sent.push_back(x); is_cw.push_back(cw);
    prev = -1;
    for (int k = 0; k < N; k++) begin
      int v, cur;
      cur = x[k] ? 1 : -1;
      v = 8 * cur + 6 * prev + $urandom_range(0, 2 * noise) - noise;
      if (burst > 0 && (k % 229) < burst) v = -v;  // burst errors
      if (!cw) v = $urandom_range(0, 40) - 20;
      if (v > 31) v = 31;
      if (v < -31) v = -31;
      prev = cur;
      @(negedge clk); adc_valid = 1; adc_sample = 6'(v);
    end
    @(negedge clk); adc_valid = 0;
  endtask

  task automatic wait_idle(int n);
    int t;
    t = 0;
    while (n_out < n && t < 1000000) begin @(negedge clk); t++; end
  endtask

  initial begin
    code_gen g;
    for (int i = 0; i < 10; i++) fir_coef[i] = '0;
    for (int i = 0; i < 3; i++) wh_coef[i] = '0;
    fir_coef[0] = 6'sd16; wh_coef[0] = 6'sd16;
    g = new(Z, 1'b1);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // phase 1
    for (int s = 0; s < 2; s++) begin send(g.codeword(), 1, 2, 0); wait_idle(s + 1); end
    // phase 2
    send(g.codeword(), 1, 3, 1); wait_idle(3);
    send(g.codeword(), 1, 5, 0); wait_idle(4);
    // phase 3: the next sector is timed to reach the detector just before
    // the decoding stage asks for it again after post-processing
    send('0, 0, 0, 0);
    begin
      int t;
      t = 0;
      while (!(dut.b_pp_done && int'(dut.u_ldpc.it) == 23 && int'(dut.u_ldpc.chk) == 4 * Z - 20)
             && t < 2000000) begin
        @(negedge clk); t++;
      end
      check(t < 2000000, "random sector reached its second decoding after post-processing");
    end
    for (int s = 0; s < 6; s++) send(g.codeword(), 1, 2, 0);
    repeat (50) @(negedge clk);
    begin
      int t;
      t = 0;
      while (n_out + int'(cnt_in_overflow) / N < sent.size() && t < 2000000) begin @(negedge clk); t++; end
    end
    repeat (20) @(negedge clk);
    skipped += sent.size() - next_exp;   // lost at the end of the stream
    $display("sectors out %0d ok %0d failed %0d first-try %0d skipped %0d",
             n_out, n_ok, n_fail, n_first_try, skipped);
    $display("pp runs %0d pp events %0d extra channel iterations %0d decoding overflows %0d input overflow words %0d sova waits %0d",
             cnt_pp_runs, cnt_pp_events, cnt_ch_iters, cnt_dec_overflow, cnt_in_overflow, cnt_sova_waits);
    check(n_out + skipped == sent.size(), "every sector accounted for");
    check(cnt_sectors == 32'(n_out) && cnt_failed == 32'(n_fail), "sector counters");
    check(n_fail == 1, "exactly the random sector fails");
    check(32'(skipped * N) == cnt_in_overflow, "skipped sectors are the overflowed ones");
    // mechanisms
    check(n_first_try > 0, "sectors decoded without post-processing");
    check(cnt_pp_runs > 0, "conditional post-processing ran");
    check(cnt_pp_events > 0, "post-processor found events");
    check(cnt_ch_iters > 0, "extra channel iterations ran");
    check(cnt_dec_overflow > 0, "decoding overflow occurred");
    check(cnt_in_overflow > 0, "input buffer overflow occurred");
    check(cnt_sova_waits > 0, "detection stage waited for the detector");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
