// Testbench of the sector buffer with 3 slots of 8 words: fills it with
// numbered sectors, checks that a fourth sector is refused (overflow pulse
// for every word offered, nothing stored, even when a slot frees while the
// sector is being offered), reads the sectors back in order
// with random addresses and one cycle of read latency, and interleaves writes
// and releases to check that the slots wrap around.
module tb_sector_fifo;
  localparam int S = 3, L = 8, W = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, overflow, rd_release = 0, empty, full;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [2:0] rd_addr = '0;
  logic [1:0] count;
  int checks = 0, failures = 0;
  int next_wr = 0, next_rd = 0, ovf_seen = 0;

  sector_fifo #(.SECTORS(S), .SECTOR_LEN(L), .WIDTH(W)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [W-1:0] word(int sec, int i);
    return W'(sec * 16 + i + 3);
  endfunction

  always @(posedge clk) if (overflow) ovf_seen++;

  task automatic write_sector(int sec);
    for (int i = 0; i < L; i++) begin
      @(negedge clk); wr_en = 1; wr_data = word(sec, i);
    end
    @(negedge clk); wr_en = 0;
  endtask

  task automatic read_check_release(int sec);
    for (int k = 0; k < L; k++) begin
      int a;
      a = $urandom_range(L - 1);
      @(negedge clk); rd_addr = 3'(a);
      @(negedge clk);
      check(rd_data == word(sec, a), $sformatf("sector %0d word %0d", sec, a));
    end
    @(negedge clk); rd_release = 1;
    @(negedge clk); rd_release = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && count == 0, "empty after reset");
    for (int s = 0; s < S; s++) begin
      write_sector(s);
      check(count == 2'(s + 1), $sformatf("count %0d", count));
    end
    check(full, "full after 3 sectors");
    // a sector offered while full is lost entirely, even if a slot frees
    // while it is being offered
    fork
      write_sector(99);
      begin
        repeat (3) @(negedge clk);
        rd_release = 1;
        @(negedge clk); rd_release = 0;
      end
    join
    @(negedge clk);
    check(ovf_seen == L, $sformatf("overflow pulses %0d", ovf_seen));
    check(count == 2, "lost sector not stored");
    check(count == 2 && !full, "count after release");
    // wrap around: write two more while reading
    write_sector(3);
    check(count == 3, "sector after a lost one is stored");
    read_check_release(1);
    write_sector(4);
    read_check_release(2);
    read_check_release(3);
    read_check_release(4);
    check(empty, "empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
