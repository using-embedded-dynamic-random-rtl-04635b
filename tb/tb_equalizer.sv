// Testbench of the equalizer: random taps and random input samples, with
// gaps in the valid stream.  A reference computed here from the recorded
// input history (FIR of the last 10 valid inputs, whitening of the last 3 FIR
// results, each rounded and saturated to 6 bits) must match every output,
// which must arrive exactly two cycles after its input.
module tb_equalizer;
  import rc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic signed [5:0] in_sample = '0;
  logic signed [5:0] fir_coef [10];
  logic signed [5:0] wh_coef [3];
  sample_t out_sample;
  int checks = 0, failures = 0;

  equalizer dut (.*);

  int xs [$];     // valid inputs, newest last
  int fs [$];     // reference FIR outputs
  int exp_q [$];  // expected outputs in order
  int cyc = 0, in_cyc [$];

  function automatic int rs(int acc);
    int r;
    r = (acc + 8) >>> 4;
    if (r > 31) r = 31;
    if (r < -31) r = -31;
    return r;
  endfunction

  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n && out_valid) begin
    int e, c;
    checks += 2;
    e = exp_q.pop_front();
    c = in_cyc.pop_front();
    if (int'(out_sample) != e) begin failures++; $display("FAIL: got %0d exp %0d", out_sample, e); end
    if (cyc - c != 2) begin failures++; $display("FAIL: latency %0d", cyc - c); end
  end

  initial begin
    for (int i = 0; i < 10; i++) fir_coef[i] = 6'($urandom_range(0, 63));
    for (int i = 0; i < 3; i++)  wh_coef[i]  = 6'($urandom_range(0, 63));
    fir_coef[0] = 6'sd16; wh_coef[0] = 6'sd16;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      in_sample = 6'($urandom_range(0, 63));
      if (in_valid) begin
        int acc, f;
        xs.push_back(int'(in_sample));
        acc = 0;
        for (int i = 0; i < 10; i++) if (xs.size() > i) acc += xs[xs.size()-1-i] * int'(fir_coef[i]);
        f = rs(acc);
        fs.push_back(f);
        acc = 0;
        for (int j = 0; j < 3; j++) if (fs.size() > j) acc += fs[fs.size()-1-j] * int'(wh_coef[j]);
        exp_q.push_back(rs(acc));
        in_cyc.push_back(cyc);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
