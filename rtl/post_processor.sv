// Post-processor: detection of dominant error events in the SOVA hard
// decisions with the help of two interleaved 64-bit single-parity-check (SPC)
// codes.
//
// The sector is cut into 128-bit segments; within a segment the even bit
// positions form one 64-bit SPC codeword and the odd positions the other.
// For the 1 + 0.75D target the dominant error events are taken to be one,
// two or three consecutive wrong bits.  Their parity signatures differ: a
// one-bit event at an even (odd) position violates the even (odd) check only,
// a two-bit event violates both, and a three-bit event violates only the
// check of its middle bit.  The post-processor therefore reads every segment
// once from the frame buffer (6-bit channel sample and 1-bit hard decision
// per bit), computes the two syndromes, and at the same time evaluates, for
// every start position, the weight metric of each event type
//     M = sum_k ( 2 r_k g_k - g_k^2 ) >> MET_SHIFT,   saturated to 10 bits,
// where r_k is the residual y_k - yhat_k of the hard decisions and g_k the
// change of the noiseless sample yhat_k = C0 x_k + C1 x_{k-1} caused by the
// event.  It keeps the best metric per event type and parity signature.  A
// violated syndrome selects the best event consistent with it, and the
// positions of that event are emitted as erasures: the read channel sets the
// soft output of each emitted position to zero, as in the source paper.  The
// source paper gives the SPC arrangement, the 10-bit metric and the zeroing
// rule; the event list, the metric formula and the one-pass schedule are this
// design's (the detailed computation is in a reference the source paper cites).
//
// Interface: a start pulse begins one sector.  The module drives rd_addr and
// expects rd_y/rd_hd one cycle later.  Erasure positions come out on
// er_valid/er_idx; done pulses at the end with the number of events found.
// Timing: SEG_BITS + 7 cycles per segment plus one cycle per erased bit, and
// two more per sector (from start to done).
module post_processor
  import rc_pkg::*;
#(
  parameter int unsigned N_BITS    = CW_BITS,
  parameter int unsigned SEG_BITS  = SPC_SEG,
  parameter int          C0        = 8,
  parameter int          C1        = 6,
  parameter int unsigned MET_SHIFT = 4,
  localparam int unsigned AW = $clog2(N_BITS),
  localparam int unsigned NSEG = N_BITS / SEG_BITS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [AW-1:0] rd_addr,
  input  sample_t       rd_y,
  input  logic          rd_hd,
  output logic          er_valid,
  output logic [AW-1:0] er_idx,
  output logic          done,
  output logic          busy,
  output logic [$clog2(NSEG+1)-1:0] n_events
);
  typedef logic signed [PP_METRIC_W-1:0] met_t;
  localparam int MET_MAX = (1 << (PP_METRIC_W - 1)) - 1;
  localparam int WIN = 5;
  localparam int READS = int'(SEG_BITS) + 4;   // positions base-1 .. base+SEG+2

  typedef enum logic [2:0] {IDLE, READ, DRAIN, DECIDE, EMIT, FINISH} state_t;
  state_t state;

  logic [$clog2(NSEG+1)-1:0] seg;
  logic [$clog2(READS+1)-1:0] rcnt;
  int                         base;      // first bit of the segment
  logic                       d_valid;   // read data arrives this cycle
  int                         d_pos;     // position of arriving data
  int                         i_pos;     // position being issued

  // Sliding window of the last WIN positions, [0] newest.
  logic    w_x  [WIN];   // hard decision
  sample_t w_y  [WIN];
  logic    w_in [WIN];   // position exists inside the sector

  logic syn [2];
  met_t best_s [2];  int best_s_pos [2];  logic has_s [2];
  met_t best_t [2];  int best_t_pos [2];  logic has_t [2];
  met_t best_d;      int best_d_pos;      logic has_d;

  int unsigned ev_pos, ev_len, ev_k;

  assign busy = (state != IDLE);

  // Noiseless sample of bits (x_k, x_{k-1}), bipolar.
  function automatic int yhat(logic xk, logic xk1);
    return (xk ? C0 : -C0) + (xk1 ? C1 : -C1);
  endfunction

  // Weight metric of flipping the L bits that end at window index 1
  // (positions p-L .. p-1 when the newest position is p, index 0).
  function automatic met_t event_metric(int L, logic wx [WIN], sample_t wy [WIN], logic win [WIN]);
    int acc, r, g;
    logic xf, xf1;
    acc = 0;
    // affected samples: window indices L (first flipped bit) down to 0
    for (int k = 0; k <= 3; k++) begin
      if (k <= L && win[k]) begin
        xf  = (k >= 1 && k <= L) ? !wx[k] : wx[k];
        xf1 = (k + 1 <= L) ? !wx[k+1] : wx[k+1];
        r = int'(wy[k]) - yhat(wx[k], wx[k+1]);
        g = yhat(xf, xf1) - yhat(wx[k], wx[k+1]);
        acc += 2 * r * g - g * g;
      end
    end
    acc = acc >>> MET_SHIFT;
    if (acc > MET_MAX) acc = MET_MAX;
    if (acc < -MET_MAX) acc = -MET_MAX;
    return met_t'(acc);
  endfunction

  assign rd_addr = AW'((i_pos < 0) ? 0 : (i_pos >= int'(N_BITS)) ? int'(N_BITS) - 1 : i_pos);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; seg <= '0; rcnt <= '0; base <= 0;
      d_valid <= 1'b0; d_pos <= 0; i_pos <= 0;
      for (int k = 0; k < WIN; k++) begin w_x[k] <= 1'b0; w_y[k] <= '0; w_in[k] <= 1'b0; end
      for (int c = 0; c < 2; c++) begin
        syn[c] <= 1'b0; best_s[c] <= '0; best_s_pos[c] <= 0; has_s[c] <= 1'b0;
        best_t[c] <= '0; best_t_pos[c] <= 0; has_t[c] <= 1'b0;
      end
      best_d <= '0; best_d_pos <= 0; has_d <= 1'b0;
      ev_pos <= 0; ev_len <= 0; ev_k <= 0;
      er_valid <= 1'b0; er_idx <= '0; done <= 1'b0; n_events <= '0;
    end else begin
      er_valid <= 1'b0;
      done     <= 1'b0;
      d_valid  <= 1'b0;

      // Issue side.
      if (state == READ) begin
        d_valid <= 1'b1;
        d_pos   <= i_pos;
        i_pos   <= i_pos + 1;
        rcnt    <= rcnt + 1'b1;
        if (int'(rcnt) == READS - 1) state <= DRAIN;
      end

      // Data side: shift the window, then evaluate events whose last
      // flipped bit is at window index 1.
      if (d_valid) begin
        logic    nx [WIN];
        sample_t ny [WIN];
        logic    ni [WIN];
        int      p;
        nx[0] = rd_hd; ny[0] = rd_y;
        ni[0] = (d_pos >= 0) && (d_pos < int'(N_BITS));
        for (int k = 1; k < WIN; k++) begin nx[k] = w_x[k-1]; ny[k] = w_y[k-1]; ni[k] = w_in[k-1]; end
        if (!ni[0]) begin nx[0] = 1'b0; ny[0] = '0; end
        w_x <= nx; w_y <= ny; w_in <= ni;
        p = d_pos - 1;  // last flipped bit of the candidate events
        // syndrome over the segment
        if (d_pos >= base && d_pos < base + int'(SEG_BITS) && ni[0] && rd_hd)
          syn[(d_pos - base) % 2] <= !syn[(d_pos - base) % 2];
        for (int L = 1; L <= 3; L++) begin
          int a, c;
          met_t m;
          a = p - L + 1;                      // first flipped bit
          if (a >= base && p < base + int'(SEG_BITS) && a >= 0) begin
            m = event_metric(L, nx, ny, ni);
            if (L == 1) begin
              c = (a - base) % 2;
              if (!has_s[c] || m > best_s[c]) begin best_s[c] <= m; best_s_pos[c] <= a; has_s[c] <= 1'b1; end
            end else if (L == 2) begin
              if (!has_d || m > best_d) begin best_d <= m; best_d_pos <= a; has_d <= 1'b1; end
            end else begin
              c = (a + 1 - base) % 2;
              if (!has_t[c] || m > best_t[c]) begin best_t[c] <= m; best_t_pos[c] <= a; has_t[c] <= 1'b1; end
            end
          end
        end
      end

      case (state)
        IDLE: if (start) begin
          seg <= '0; base <= 0; i_pos <= -1; rcnt <= '0; n_events <= '0;
          state <= READ;
        end
        DRAIN: state <= DECIDE;
        DECIDE: begin
          ev_len <= 0;
          if (syn[0] && syn[1] && has_d) begin
            ev_pos <= unsigned'(best_d_pos); ev_len <= 2;
          end else if (syn[0] != syn[1]) begin
            int c;
            c = syn[1] ? 1 : 0;
            if (has_t[c] && (!has_s[c] || best_t[c] > best_s[c])) begin
              ev_pos <= unsigned'(best_t_pos[c]); ev_len <= 3;
            end else if (has_s[c]) begin
              ev_pos <= unsigned'(best_s_pos[c]); ev_len <= 1;
            end
          end
          ev_k  <= 0;
          state <= EMIT;
        end
        EMIT: begin
          if (ev_k < ev_len) begin
            er_valid <= 1'b1;
            er_idx   <= AW'(ev_pos + ev_k);
            ev_k     <= ev_k + 1;
            if (ev_k == 0) n_events <= n_events + 1'b1;
          end else begin
            // clear per-segment state, move on
            for (int c = 0; c < 2; c++) begin
              syn[c] <= 1'b0; has_s[c] <= 1'b0; has_t[c] <= 1'b0;
            end
            has_d <= 1'b0;
            for (int k = 0; k < WIN; k++) w_in[k] <= 1'b0;
            if (int'(seg) == int'(NSEG) - 1) state <= FINISH;
            else begin
              seg   <= seg + 1'b1;
              base  <= base + int'(SEG_BITS);
              i_pos <= base + int'(SEG_BITS) - 1;
              rcnt  <= '0;
              state <= READ;
            end
          end
        end
        FINISH: begin
          done  <= 1'b1;
          state <= IDLE;
        end
        default: ;
      endcase
    end
  end
endmodule
