// Testbench of the post-processor on 256-bit sectors (two 128-bit segments).
// The bits of each segment satisfy both interleaved parity checks and the
// samples are the noiseless target outputs of those bits; the hard decisions
// given to the post-processor carry an injected one-, two- or three-bit error
// event per segment (or none).  Expected: exactly the positions of each
// injected event come out as erasures, the event count matches, and a sector
// takes NSEG * (128 + 7) cycles plus one per erasure.
module tb_post_processor;
  import rc_pkg::*;
  localparam int N = 256, SEG = 128, NSEG = N / SEG;
  localparam int AW = $clog2(N);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, rd_hd, er_valid, done, busy;
  logic [AW-1:0] rd_addr, er_idx;
  sample_t rd_y;
  logic [$clog2(NSEG+1)-1:0] n_events;
  int checks = 0, failures = 0;

  post_processor #(.N_BITS(N)) dut (.*);

  bit      truth [N];
  bit      hd    [N];
  sample_t ys    [N];
  always @(posedge clk) begin
    rd_y  <= ys[rd_addr];
    rd_hd <= hd[rd_addr];
  end

  int got [$];
  always @(posedge clk) if (er_valid) got.push_back(int'(er_idx));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic trial(int len0, int len1);
    int exp_pos [$];
    int lens [2];
    int cyc;
    lens[0] = len0; lens[1] = len1;
    for (int s = 0; s < NSEG; s++) begin
      bit pe, po;
      pe = 0; po = 0;
      for (int i = 0; i < SEG - 2; i++) begin
        truth[s*SEG+i] = 1'($urandom);
        if (i % 2 == 0) pe ^= truth[s*SEG+i]; else po ^= truth[s*SEG+i];
      end
      truth[s*SEG+SEG-2] = pe;
      truth[s*SEG+SEG-1] = po;
    end
    for (int k = 0; k < N; k++) begin
      int prev;
      prev = (k == 0) ? -1 : (truth[k-1] ? 1 : -1);
      ys[k] = sample_t'(8 * (truth[k] ? 1 : -1) + 6 * prev);
      hd[k] = truth[k];
    end
    for (int s = 0; s < NSEG; s++) if (lens[s] > 0) begin
      int p;
      p = s * SEG + $urandom_range(4, SEG - 8);
      for (int i = 0; i < lens[s]; i++) begin
        hd[p+i] = !hd[p+i];
        exp_pos.push_back(p + i);
      end
    end
    got.delete();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(got.size() == exp_pos.size(), $sformatf("erasure count %0d exp %0d", got.size(), exp_pos.size()));
    foreach (exp_pos[i]) check(i < got.size() && got[i] == exp_pos[i], $sformatf("erasure %0d", i));
    check(int'(n_events) == int'(len0 > 0) + int'(len1 > 0), "event count");
    check(cyc == NSEG * (SEG + 7) + exp_pos.size() + 2, $sformatf("cycles %0d", cyc));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    trial(0, 0);
    for (int t = 0; t < 12; t++) trial($urandom_range(0, 3), $urandom_range(0, 3));
    trial(1, 2);
    trial(3, 1);
    trial(2, 3);
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
