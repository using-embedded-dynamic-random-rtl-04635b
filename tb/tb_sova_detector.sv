// Testbench of the SOVA detector (default depth 16).  Sectors of random bits
// are sent through the 1 + 0.75D target (noiseless sample 8 x_k + 6 x_{k-1})
// with small bounded noise, followed by DEPTH - 1 padding samples.  Checks:
// every decision equals the written bit, exactly one decision per bit,
// each decision arrives one cycle after the sample DEPTH - 1 later, the soft
// output's sign follows the decision and its magnitude is not zero.  A second
// part sends silence (y = 0) with a strong a-priori LLR: the decisions must
// follow the a-priori signs.
module tb_sova_detector;
  import rc_pkg::*;
  localparam int DEPTH = 16;
  localparam int NB = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, sos = 0, out_valid, out_hd;
  sample_t y = '0;
  soft_t la = '0, out_llr;
  int checks = 0, failures = 0;

  sova_detector dut (.*);

  bit bits [NB];
  int feed_cyc [NB + DEPTH];
  int cyc = 0, nout = 0;
  bit noisy_part = 1;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (rst_n && out_valid) begin
    if (nout < NB) begin
      check(out_hd == bits[nout], $sformatf("bit %0d decision", nout));
      check(cyc - feed_cyc[nout + DEPTH - 1] == 1, $sformatf("bit %0d latency %0d", nout, cyc - feed_cyc[nout + DEPTH - 1]));
      check((out_llr > 0) == out_hd && out_llr != 0, $sformatf("bit %0d soft %0d", nout, out_llr));
    end else check(0, "extra decision");
    nout++;
  end

  task automatic send_sector(bit use_la);
    int prev;
    nout = 0;
    for (int k = 0; k < NB + DEPTH - 1; k++) begin
      int v;
      @(negedge clk);
      in_valid = 1; sos = (k == 0);
      if (k < NB) begin
        prev = (k == 0) ? -1 : (bits[k-1] ? 1 : -1);
        v = 8 * (bits[k] ? 1 : -1) + 6 * prev + $urandom_range(0, 6) - 3;
        y  = use_la ? sample_t'(0) : sample_t'(v);
        la = use_la ? (bits[k] ? soft_t'(31) : soft_t'(-31)) : soft_t'(0);
      end else begin
        y = '0; la = '0;
      end
      feed_cyc[k] = cyc;
      if ($urandom_range(4) == 0 && k > 0 && k < NB) begin  // gap in the stream
        @(negedge clk); in_valid = 0;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    check(nout == NB, $sformatf("%0d decisions for %0d bits", nout, NB));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      for (int i = 0; i < NB; i++) bits[i] = 1'($urandom);
      send_sector(1'b0);
    end
    for (int i = 0; i < NB; i++) bits[i] = 1'($urandom);
    send_sector(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
