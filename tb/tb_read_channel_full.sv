// Full-size run of the read channel with every parameter at its default
// (4608-bit sectors, input buffer of 5 sectors, decoder buffer of 4).  Three
// codeword sectors go through the 1 + 0.75D channel with bounded noise, the
// last one also with isolated inverted samples; each must come out equal to
// the written codeword and be reported as decoded.
module tb_read_channel_full;
  import rc_pkg::*;
  import tb_code_pkg::*;
  localparam int N = CW_BITS;

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

  read_channel_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  row_t sent [$];
  row_t rx;
  int   rx_n = 0, n_out = 0;

  always @(posedge clk) begin
    if (out_valid) begin rx[rx_n] <= out_bit; rx_n <= rx_n + 1; end
    if (sec_done) begin
      $display("sector %0d ok=%0d channel iterations=%0d ldpc iterations=%0d",
               n_out, sec_ok, sec_ch_iters, sec_ldpc_iters);
      check(rx_n == N, "sector length");
      check(sec_ok == 1'b1, "sector decoded");
      check(n_out < sent.size() && rx[N-1:0] == sent[n_out][N-1:0], $sformatf("sector %0d data", n_out));
      n_out++;
      rx_n <= 0;
    end
  end

  task automatic send(row_t x, int noise, bit flips);
    int prev;
    sent.push_back(x);
    prev = -1;
    for (int k = 0; k < N; k++) begin
      int v, cur;
      cur = x[k] ? 1 : -1;
      v = 8 * cur + 6 * prev + $urandom_range(0, 2 * noise) - noise;
      if (flips && (k % 509) == 17) v = -v;
      prev = cur;
      @(negedge clk); adc_valid = 1; adc_sample = 6'(v);
    end
    @(negedge clk); adc_valid = 0;
  endtask

  initial begin
    code_gen g;
    for (int i = 0; i < 10; i++) fir_coef[i] = '0;
    for (int i = 0; i < 3; i++) wh_coef[i] = '0;
    fir_coef[0] = 6'sd16; wh_coef[0] = 6'sd16;
    g = new(128, 1'b1);
    repeat (3) @(negedge clk);
    rst_n = 1;
    send(g.codeword(), 2, 1'b0);
    send(g.codeword(), 4, 1'b0);
    send(g.codeword(), 2, 1'b1);
    while (n_out < 3) @(negedge clk);
    check(cnt_sectors == 3 && cnt_failed == 0 && cnt_in_overflow == 0, "counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
