// LDPC decoder: sum-product decoding of the rate-8/9 regular quasi-cyclic
// code of the read channel (4 x 36 circulants of size CIRC, column weight 4).
//
// The decoder works on log-likelihood ratios (positive = bit 1) whose least
// significant bit is 0.5.  Channel LLRs are 6 bits, check-to-bit messages are
// 6 bits as in the source paper, and the a-posteriori values (APP) are kept with
// APP_W = 8 bits.  The schedule is layered: the four block rows are decoded
// one after the other, and each check is processed in two passes over its 36
// bits.  Pass 1 reads APP and the old check message R, forms the bit-to-check
// message Q = APP - R, and accumulates the sign product and the sum of
// phi(|Q|), phi(x) = -ln(tanh(x/2)).  Pass 2 forms each new message
// R = sign * phi(S - phi(|Q|)), whose sign says whether the other bits of the
// check hold an odd number of ones, stores it, and writes APP = Q + R back.
// phi is evaluated with two small tables given by formula below; the
// intermediate domain has 12 fraction bits.
//
// Decoding stops after the first iteration in which every parity check was
// satisfied by the hard decisions it read and no hard decision changed
// (then the final decisions form a codeword), or after NMAX iterations (24,
// the source paper's limit).  The source paper gives the code parameters, the
// algorithm, the 6-bit messages and the iteration limit; the layered
// bit-serial schedule and the circulant shifts (r*c mod CIRC) are this
// design's.
//
// Interface: while idle, ld_en writes channel LLR ld_llr at ld_addr (a load
// of 0 also serves to erase a bit flagged by the post-processor).  start
// begins decoding from the stored channel LLRs; done pulses at the end with
// success and iters valid until the next start.  rd_addr reads, without a
// clock, the hard decision and the extrinsic LLR (APP minus channel LLR,
// saturated to 6 bits) of one bit.
// Timing: 2 * 36 cycles per check, BROWS * CIRC checks per iteration
// (36,864 cycles per iteration at the default size), plus 2 cycles.
module ldpc_decoder
  import rc_pkg::*;
#(
  parameter int unsigned Z     = CIRC,
  parameter int unsigned NR    = BROWS,
  parameter int unsigned NC    = BCOLS,
  parameter int unsigned NMAX  = NMAX_ITER,
  parameter int unsigned APP_W = 8,
  localparam int unsigned N    = Z * NC,
  localparam int unsigned M    = Z * NR,
  localparam int unsigned AW   = $clog2(N),
  localparam int unsigned IW   = $clog2(NMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ld_en,
  input  logic [AW-1:0] ld_addr,
  input  soft_t         ld_llr,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          success,
  output logic [IW-1:0] iters,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_hd,
  output soft_t         rd_ext
);
  typedef logic signed [APP_W-1:0] app_t;
  typedef logic signed [MSG_W-1:0] msg_t;
  localparam int APP_MAX = (1 << (APP_W - 1)) - 1;
  localparam int MAG_MAX = (1 << (MSG_W - 1)) - 1;
  localparam int PHI_W   = 20;

  // phi of a 5-bit magnitude q (LLR q/2), in units of 2^-12:
  // min(16383, round(4096 * phi(q/2))), with phi(0) taken as 16383.
  localparam int PHI_FWD [32] = '{16383, 5762, 3162, 1859, 1116, 674, 408, 247,
                                  150, 91, 55, 33, 20, 12, 7, 5, 3, 2, 1, 1,
                                  0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  // Back to a 5-bit magnitude: m(a) = min(31, round(2 * phi(a / 4096))),
  // m(0) = 31.  PHI_THR[k-1] is the largest a with m(a) >= k, so
  // m(a) = number of k with a <= PHI_THR[k-1]  (k = 1..18), or 31 at a = 0.
  localparam int PHI_THR [18] = '{8538, 4203, 2414, 1438, 866, 524, 317, 192,
                                  116, 70, 42, 26, 15, 9, 5, 3, 2, 1};

  function automatic int phi_back(int a);
    int m;
    if (a <= 0) return MAG_MAX;
    m = 0;
    for (int k = 0; k < 18; k++) if (a <= PHI_THR[k]) m++;
    return m;
  endfunction

  function automatic app_t sat_app(int v);
    return app_t'(sat_sym(v, APP_W));
  endfunction

  // Memories.
  soft_t ch_mem  [N];
  app_t  app_mem [N];
  msg_t  r_mem   [M * NC];
  logic  app_ok  [N];     // APP written in this decoding; otherwise APP = channel
  logic  r_ok    [M];     // check has messages from this decoding; otherwise R = 0

  typedef enum logic [2:0] {IDLE, CLEAR, PASS1, PASS2, ITER_END} state_t;
  state_t state;

  logic [$clog2(M)-1:0]  chk;      // check index: layer * Z + row
  logic [$clog2(NC)-1:0] j;        // block column
  logic [IW-1:0]         it;
  logic signed [APP_W:0] qbuf [NC];
  logic                  hd_old [NC];
  int                    s_sum;
  logic                  s_sign, par;
  logic                  all_par_ok, no_change;

  // Bit and edge addressed by (chk, j).
  int layer, row, vidx, eidx;
  always_comb begin
    layer = int'(chk) / int'(Z);
    row   = int'(chk) % int'(Z);
    vidx  = int'(j) * int'(Z) + (row + layer * int'(j)) % int'(Z);
    eidx  = int'(chk) * int'(NC) + int'(j);
  end

  app_t app_rd;
  msg_t r_rd;
  assign app_rd = app_ok[vidx] ? app_mem[vidx] : app_t'(ch_mem[vidx]);
  assign r_rd   = r_ok[chk] ? r_mem[eidx] : msg_t'(0);

  // Read-out port.
  app_t app_out;
  assign app_out = app_ok[rd_addr] ? app_mem[rd_addr] : app_t'(ch_mem[rd_addr]);
  assign rd_hd   = (app_out > 0);
  assign rd_ext  = soft_t'(sat_sym(int'(app_out) - int'(ch_mem[rd_addr]), SOFT_W));

  assign busy = (state != IDLE);
  assign iters = it;

  // Pass 2: new check message and APP of bit j of the current check.
  msg_t r_new;
  app_t app_new;
  always_comb begin
    int q, qm, mag;
    q   = int'(qbuf[j]);
    qm  = (q < 0) ? -q : q;
    if (qm > MAG_MAX) qm = MAG_MAX;
    mag = phi_back(s_sum - PHI_FWD[qm]);
    // positive (bit 1) when the other bits of the check hold an odd number
    // of ones
    r_new   = (s_sign ^ (q > 0)) ? msg_t'(mag) : msg_t'(-mag);
    app_new = sat_app(q + int'(r_new));
  end

  always_ff @(posedge clk) begin
    if (state == IDLE && ld_en) ch_mem[ld_addr] <= ld_llr;
    if (state == PASS2) begin
      r_mem[eidx]   <= r_new;
      app_mem[vidx] <= app_new;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; chk <= '0; j <= '0; it <= '0;
      s_sum <= 0; s_sign <= 1'b0; par <= 1'b0;
      all_par_ok <= 1'b0; no_change <= 1'b0;
      done <= 1'b0; success <= 1'b0;
      for (int k = 0; k < NC; k++) begin qbuf[k] <= '0; hd_old[k] <= 1'b0; end
      for (int k = 0; k < int'(N); k++) app_ok[k] <= 1'b0;
      for (int k = 0; k < int'(M); k++) r_ok[k] <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) begin
          state <= CLEAR;
        end
        CLEAR: begin
          for (int k = 0; k < int'(N); k++) app_ok[k] <= 1'b0;
          for (int k = 0; k < int'(M); k++) r_ok[k] <= 1'b0;
          chk <= '0; j <= '0; it <= '0; success <= 1'b0;
          s_sum <= 0; s_sign <= 1'b0; par <= 1'b0;
          all_par_ok <= 1'b1; no_change <= 1'b1;
          state <= PASS1;
        end
        PASS1: begin
          int q, qm;
          q  = sat_sym(int'(app_rd) - int'(r_rd), APP_W);
          qm = (q < 0) ? -q : q;
          if (qm > MAG_MAX) qm = MAG_MAX;
          qbuf[j]   <= (APP_W+1)'(q);
          hd_old[j] <= (app_rd > 0);
          s_sum     <= s_sum + PHI_FWD[qm];
          s_sign    <= s_sign ^ (q > 0);
          par       <= par ^ (app_rd > 0);
          if (int'(j) == int'(NC) - 1) begin
            j <= '0;
            state <= PASS2;
          end else j <= j + 1'b1;
        end
        PASS2: begin
          app_ok[vidx] <= 1'b1;
          if ((app_new > 0) != hd_old[j]) no_change <= 1'b0;
          if (int'(j) == int'(NC) - 1) begin
            j <= '0;
            r_ok[chk] <= 1'b1;
            if (par) all_par_ok <= 1'b0;
            s_sum <= 0; s_sign <= 1'b0; par <= 1'b0;
            if (int'(chk) == int'(M) - 1) begin
              chk   <= '0;
              state <= ITER_END;
            end else begin
              chk   <= chk + 1'b1;
              state <= PASS1;
            end
          end else j <= j + 1'b1;
        end
        ITER_END: begin
          it <= it + 1'b1;
          if (all_par_ok && no_change) begin
            success <= 1'b1; done <= 1'b1; state <= IDLE;
          end else if (int'(it) + 1 >= int'(NMAX)) begin
            done <= 1'b1; state <= IDLE;
          end else begin
            all_par_ok <= 1'b1; no_change <= 1'b1;
            state <= PASS1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // The channel memory may only be written while the decoder is idle.
  assert property (@(posedge clk) disable iff (!rst_n) !(ld_en && busy))
    else $error("channel LLR written while decoding");
endmodule
