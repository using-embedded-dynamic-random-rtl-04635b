// Soft-output Viterbi (SOVA) detector for the partial-response target
// 1 + 0.75D, with register-exchange survivor and reliability memories.
//
// The target has memory one, so the trellis has two states: the state is the
// previous bit.  Bits are mapped to x = +1 (bit 1) and x = -1 (bit 0); the
// noiseless sample for a transition is AMP * (x_k + 0.75 x_{k-1}), i.e.
// +-LEVEL_HI and +-LEVEL_LO with the defaults 14 and 2.  The branch metric is
// the squared error shifted right by BM_SHIFT, plus LA_SCALE * |La| when the
// hypothesised bit disagrees with the sign of the a-priori LLR La (La comes
// from the LDPC decoder in later channel iterations and is zero otherwise),
// saturated to 8 bits.  Path metrics are 9 bits wide, as in the source paper, and
// are renormalised every step by subtracting the smaller one.
//
// Each state keeps the DEPTH most recent bits of its survivor path and a
// 5-bit reliability for each.  When a state selects its survivor, the metric
// difference delta to the competing path lowers the reliability of every
// stored bit on which the two paths disagree (reliability = min(old, delta)).
// The bit leaving the register of the best state is the hard decision; its
// reliability, shifted right by SOFT_SHIFT and signed by the decision, is the
// 6-bit soft output (LLR, positive for bit 1).  The source paper names a
// "modified register-exchange" SOVA with 9-bit path metrics and 6-bit soft
// output; the metric scaling, the reliability rule shown here and DEPTH are
// this design's choices.
//
// Interface: one sample per cycle while in_valid; sos marks the first sample
// of a sector and clears the path metrics.  Timing: the decision for sample j
// appears (out_valid) one cycle after sample j + DEPTH - 1 was accepted, so a
// sector of N samples must be followed by DEPTH - 1 padding samples to flush
// it; exactly N decisions come out per sector.
module sova_detector
  import rc_pkg::*;
#(
  parameter int unsigned DEPTH      = 16,
  parameter int          LEVEL_HI   = 14,
  parameter int          LEVEL_LO   = 2,
  parameter int unsigned BM_SHIFT   = 3,
  parameter int unsigned LA_SCALE   = 2,
  parameter int unsigned SOFT_SHIFT = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic    sos,
  input  sample_t y,
  input  soft_t   la,
  output logic    out_valid,
  output logic    out_hd,
  output soft_t   out_llr
);
  localparam int unsigned REL_W = SOFT_W - 1;
  localparam int unsigned REL_MAX = (1 << REL_W) - 1;
  localparam int unsigned BM_MAX = 255;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  logic [PM_W-1:0]  pm [2];
  logic             path [2][DEPTH];
  logic [REL_W-1:0] rel  [2][DEPTH];
  logic [CNT_W-1:0] seen;

  logic [PM_W-1:0]  pm_n [2];
  logic             path_n [2][DEPTH];
  logic [REL_W-1:0] rel_n  [2][DEPTH];

  // Branch metric for previous bit p and current bit u.
  function automatic int unsigned bmetric(logic p, logic u, sample_t ys, soft_t las);
    int e, d, sq, a;
    // x_k + 0.75 x_{k-1}: (+,+) -> HI, (+,-) -> LO, (-,+) -> -LO, (-,-) -> -HI
    if (u != p) e = u ? LEVEL_LO : -LEVEL_LO;
    else        e = u ? LEVEL_HI : -LEVEL_HI;
    d  = int'(ys) - e;
    sq = (d * d) >>> BM_SHIFT;
    a  = int'(las);
    if (u && a < 0)  sq += LA_SCALE * (-a);
    if (!u && a > 0) sq += LA_SCALE * a;
    return (sq > int'(BM_MAX)) ? BM_MAX : int'(unsigned'(sq));
  endfunction

  always_comb begin
    logic [PM_W:0] m0, m1, mn;
    logic [PM_W:0] cand [2];
    logic          surv [2];
    logic [PM_W:0] delta [2];
    logic [PM_W-1:0] pm_in [2];
    pm_in[0] = sos ? '0 : pm[0];
    pm_in[1] = sos ? '0 : pm[1];
    for (int s = 0; s < 2; s++) begin
      m0 = {1'b0, pm_in[0]} + (PM_W+1)'(bmetric(1'b0, s[0], y, la));
      m1 = {1'b0, pm_in[1]} + (PM_W+1)'(bmetric(1'b1, s[0], y, la));
      surv[s]  = (m1 < m0);
      cand[s]  = surv[s] ? m1 : m0;
      delta[s] = surv[s] ? (m0 - m1) : (m1 - m0);
    end
    mn = (cand[0] < cand[1]) ? cand[0] : cand[1];
    for (int s = 0; s < 2; s++) begin
      pm_n[s] = PM_W'(cand[s] - mn);
      path_n[s][0] = s[0];
      rel_n[s][0]  = REL_W'(REL_MAX);
      for (int j = 1; j < DEPTH; j++) begin
        path_n[s][j] = path[surv[s]][j-1];
        if (path[0][j-1] != path[1][j-1] && {{(PM_W+1-REL_W){1'b0}}, rel[surv[s]][j-1]} > delta[s])
          rel_n[s][j] = REL_W'(delta[s]);
        else
          rel_n[s][j] = rel[surv[s]][j-1];
      end
      // On the first sample of a sector the predecessor bits are unknown.
      if (sos)
        for (int j = 1; j < DEPTH; j++) begin
          path_n[s][j] = 1'b0;
          rel_n[s][j]  = '0;
        end
    end
  end

  logic best_n;
  assign best_n = (pm_n[1] < pm_n[0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pm[0] <= '0; pm[1] <= '0;
      for (int s = 0; s < 2; s++)
        for (int j = 0; j < DEPTH; j++) begin
          path[s][j] <= 1'b0;
          rel[s][j]  <= '0;
        end
      seen      <= '0;
      out_valid <= 1'b0;
      out_hd    <= 1'b0;
      out_llr   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        pm   <= pm_n;
        path <= path_n;
        rel  <= rel_n;
        if (sos) seen <= CNT_W'(1);
        else if (seen != CNT_W'(DEPTH)) seen <= seen + 1'b1;
        if (!sos && int'(seen) >= DEPTH - 1) begin
          logic [REL_W-1:0] r;
          r = rel_n[best_n][DEPTH-1] >> SOFT_SHIFT;
          out_valid <= 1'b1;
          out_hd    <= path_n[best_n][DEPTH-1];
          out_llr   <= path_n[best_n][DEPTH-1] ? soft_t'({1'b0, r}) : -soft_t'({1'b0, r});
        end
      end
    end
  end
endmodule
