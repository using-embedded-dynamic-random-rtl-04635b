// Iterative magnetic-recording read channel with conditional post-processing
// and a multi-sector detector-to-decoder buffer.
//
// Samples from the read-back front end pass through the equalizer into the
// input sector buffer (d sectors).  One set of processing units (SOVA
// detector, post-processor, LDPC decoder) is shared by all channel
// iterations of a sector: the recursive architecture.  The work is split in
// two stages that run concurrently.
//
//   Detection stage: takes the oldest sector from the input buffer, runs it
//   through the SOVA detector without a-priori information and writes sample,
//   hard decision and soft output of each bit into the decoder buffer
//   (m sectors).  This buffer is what lets the LDPC decoder run at a lower
//   supply voltage, i.e. take longer than one sector time now and then.
//
//   Decoding stage: takes the oldest sector from the decoder buffer, copies
//   samples and hard decisions into the post-processing frame buffer, loads
//   the soft outputs into the LDPC decoder and decodes.  Only if this first
//   decoding fails is the post-processor run; it zeroes the soft outputs of
//   the bits of the dominant error events it finds, and the sector is
//   decoded again.  If that also fails, further channel iterations follow:
//   the SOVA detector runs again on the stored samples with the decoder's
//   extrinsic information as a-priori input, its extrinsic output replaces
//   the decoder input, and the sector is decoded again, up to MAX_CH_ITER
//   rounds in all.  Then the N hard decisions of the codeword are streamed
//   out.  The decoding stage has priority on the shared SOVA detector; the
//   detection stage waits for it between sectors.
//
// The source paper gives the recursive architecture, the conditional order of
// decoding and post-processing, the buffers and their capacities (d = 5,
// m = 2..6; the default m = 4 is where the source paper finds the energy saving
// levels off), and the iteration limits.  The two-stage split, the SOVA
// arbitration, the turbo exchange of extrinsic values and all handshakes are
// this design's choices.  Supply voltage scaling itself is not logic; its
// consequence is monitored: a sector that needs more than NR_BUDGET LDPC
// iterations in all (N_r = 7 for m = 4 in the source paper) is counted as a
// decoding overflow.
//
// Interface: adc_valid/adc_sample, one sample per cycle; each N_BITS samples
// form a sector (samples are dropped while the input buffer is full, counted
// in cnt_in_overflow).  out_valid/out_bit stream the decoded codeword bits;
// sec_done pulses after the last bit of each sector with sec_ok,
// sec_ch_iters (extra channel iterations, 0..MAX_CH_ITER-1) and
// sec_ldpc_iters.  The cnt_* outputs count events since reset;
// cnt_sova_waits counts the cycles in which one stage waited for the other to
// hand over the shared detector.
module read_channel_top
  import rc_pkg::*;
#(
  parameter int unsigned Z           = CIRC,
  parameter int unsigned D_SECTORS   = 5,
  parameter int unsigned M_SECTORS   = 4,
  parameter int unsigned NR_BUDGET   = 7,
  parameter int unsigned CH_ITERS    = MAX_CH_ITER,
  parameter int unsigned LDPC_ITERS  = NMAX_ITER,
  parameter int unsigned SOVA_DEPTH  = 16,
  localparam int unsigned N_BITS     = Z * BCOLS,
  localparam int unsigned AW         = $clog2(N_BITS),
  localparam int unsigned IW         = $clog2(LDPC_ITERS + 1),
  localparam int unsigned TW         = $clog2(CH_ITERS * LDPC_ITERS + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     adc_valid,
  input  logic signed [SAMPLE_W-1:0] adc_sample,
  input  logic signed [COEF_W-1:0] fir_coef [10],
  input  logic signed [COEF_W-1:0] wh_coef  [3],
  output logic                     out_valid,
  output logic                     out_bit,
  output logic                     sec_done,
  output logic                     sec_ok,
  output logic [1:0]               sec_ch_iters,
  output logic [TW-1:0]            sec_ldpc_iters,
  output logic [31:0]              cnt_sectors,
  output logic [31:0]              cnt_failed,
  output logic [31:0]              cnt_pp_runs,
  output logic [31:0]              cnt_pp_events,
  output logic [31:0]              cnt_ch_iters,
  output logic [31:0]              cnt_dec_overflow,
  output logic [31:0]              cnt_in_overflow,
  output logic [31:0]              cnt_sova_waits
);
  localparam int unsigned PADS = SOVA_DEPTH - 1;

  // ---------------------------------------------------------------- equalizer
  logic    eq_valid;
  sample_t eq_sample;
  equalizer u_eq (
    .clk, .rst_n, .in_valid(adc_valid), .in_sample(adc_sample),
    .fir_coef, .wh_coef, .out_valid(eq_valid), .out_sample(eq_sample)
  );

  // ------------------------------------------------------ input sector buffer
  logic [AW-1:0]        ib_rd_addr;
  logic [SAMPLE_W-1:0]  ib_rd_data;
  logic                 ib_release, ib_overflow, ib_empty, ib_full;
  logic [$clog2(D_SECTORS+1)-1:0] ib_count;
  sector_fifo #(.SECTORS(D_SECTORS), .SECTOR_LEN(N_BITS), .WIDTH(SAMPLE_W)) u_in_buf (
    .clk, .rst_n, .wr_en(eq_valid), .wr_data(eq_sample), .overflow(ib_overflow),
    .rd_addr(ib_rd_addr), .rd_data(ib_rd_data), .rd_release(ib_release),
    .count(ib_count), .empty(ib_empty), .full(ib_full)
  );

  // ------------------------------------------------------------ SOVA detector
  logic    sv_in_valid, sv_sos, sv_out_valid, sv_out_hd;
  sample_t sv_y;
  soft_t   sv_la, sv_out_llr;
  sova_detector #(.DEPTH(SOVA_DEPTH)) u_sova (
    .clk, .rst_n, .in_valid(sv_in_valid), .sos(sv_sos), .y(sv_y), .la(sv_la),
    .out_valid(sv_out_valid), .out_hd(sv_out_hd), .out_llr(sv_out_llr)
  );
  // Delay lines that align the SOVA input sample and a-priori value with the
  // decision that leaves the detector SOVA_DEPTH - 1 samples later.
  sample_t y_dl  [SOVA_DEPTH];
  soft_t   la_dl [SOVA_DEPTH];

  // ------------------------------------------------- decoder (eDRAM) buffer
  localparam int unsigned DBW = SAMPLE_W + 1 + SOFT_W;   // {y, hd, llr}
  logic           db_wr_en, db_release, db_overflow, db_empty, db_full;
  logic [DBW-1:0] db_wr_data, db_rd_data;
  logic [AW-1:0]  db_rd_addr;
  logic [$clog2(M_SECTORS+1)-1:0] db_count;
  sector_fifo #(.SECTORS(M_SECTORS), .SECTOR_LEN(N_BITS), .WIDTH(DBW)) u_dec_buf (
    .clk, .rst_n, .wr_en(db_wr_en), .wr_data(db_wr_data), .overflow(db_overflow),
    .rd_addr(db_rd_addr), .rd_data(db_rd_data), .rd_release(db_release),
    .count(db_count), .empty(db_empty), .full(db_full)
  );

  // ------------------------------------- post-processing frame buffer {y, hd}
  localparam int unsigned PBW = SAMPLE_W + 1;
  logic           pb_wr_en, pb_release, pb_overflow, pb_empty, pb_full;
  logic [PBW-1:0] pb_wr_data, pb_rd_data;
  logic [AW-1:0]  pb_rd_addr;
  logic           pb_count;
  sector_fifo #(.SECTORS(1), .SECTOR_LEN(N_BITS), .WIDTH(PBW)) u_pp_buf (
    .clk, .rst_n, .wr_en(pb_wr_en), .wr_data(pb_wr_data), .overflow(pb_overflow),
    .rd_addr(pb_rd_addr), .rd_data(pb_rd_data), .rd_release(pb_release),
    .count(pb_count), .empty(pb_empty), .full(pb_full)
  );

  // ----------------------------------------------------------- post-processor
  logic          pp_start, pp_er_valid, pp_done, pp_busy;
  logic [AW-1:0] pp_rd_addr, pp_er_idx;
  logic [$clog2(N_BITS/SPC_SEG+1)-1:0] pp_n_events;
  post_processor #(.N_BITS(N_BITS)) u_pp (
    .clk, .rst_n, .start(pp_start), .rd_addr(pp_rd_addr),
    .rd_y(sample_t'(pb_rd_data[PBW-1:1])), .rd_hd(pb_rd_data[0]),
    .er_valid(pp_er_valid), .er_idx(pp_er_idx), .done(pp_done), .busy(pp_busy),
    .n_events(pp_n_events)
  );

  // -------------------------------------------------------------- LDPC decoder
  logic          ld_en, dec_start, dec_busy, dec_done, dec_success, dec_hd;
  logic [AW-1:0] ld_addr, dec_rd_addr;
  soft_t         ld_llr, dec_ext;
  logic [IW-1:0] dec_iters;
  ldpc_decoder #(.Z(Z), .NMAX(LDPC_ITERS)) u_ldpc (
    .clk, .rst_n, .ld_en, .ld_addr, .ld_llr, .start(dec_start), .busy(dec_busy),
    .done(dec_done), .success(dec_success), .iters(dec_iters),
    .rd_addr(dec_rd_addr), .rd_hd(dec_hd), .rd_ext(dec_ext)
  );

  // ================================================================ control
  typedef enum logic [1:0] {A_IDLE, A_FEED, A_DRAIN} a_state_t;
  typedef enum logic [3:0] {B_IDLE, B_LOAD, B_LOAD_END, B_DEC, B_PP, B_SREQ,
                            B_SFEED, B_SDRAIN, B_OUT} b_state_t;
  a_state_t a_state;
  b_state_t b_state;

  logic [AW:0]   a_k, a_wk;      // detection stage: issued / written
  logic          a_fv, a_fpad, a_fsos;
  logic [AW:0]   b_k, b_wk;      // decoding stage: issued / written
  logic          b_fv, b_fpad, b_fsos;
  logic [AW-1:0] b_fk;
  soft_t         b_la;
  logic          b_pp_done;
  logic [1:0]    b_ch;
  logic [TW-1:0] b_iters;
  logic          b_owns_sova;

  // SOVA input multiplexer: the decoding stage while it owns the detector.
  always_comb begin
    if (b_owns_sova) begin
      sv_in_valid = b_fv;
      sv_sos      = b_fsos;
      sv_y        = b_fpad ? sample_t'(0) : sample_t'(pb_rd_data[PBW-1:1]);
      sv_la       = b_fpad ? soft_t'(0) : b_la;
    end else begin
      sv_in_valid = a_fv;
      sv_sos      = a_fsos;
      sv_y        = a_fpad ? sample_t'(0) : sample_t'(ib_rd_data);
      sv_la       = '0;
    end
  end

  // Detection stage reads the input buffer and writes the decoder buffer.
  assign ib_rd_addr = AW'((a_k < (AW+1)'(N_BITS)) ? a_k : '0);
  assign ib_release = (a_state == A_DRAIN) && (a_wk == (AW+1)'(N_BITS));
  assign db_wr_en   = sv_out_valid && !b_owns_sova;
  assign db_wr_data = {y_dl[SOVA_DEPTH-1], sv_out_hd, sv_out_llr};

  // Decoding stage.
  logic [AW-1:0] b_k_addr;
  assign b_k_addr   = AW'((b_k < (AW+1)'(N_BITS)) ? b_k : '0);
  assign db_rd_addr = b_k_addr;
  assign pb_rd_addr = (b_state == B_PP) ? pp_rd_addr : b_k_addr;
  assign dec_rd_addr = b_k_addr;
  assign pb_wr_en   = b_fv && (b_state == B_LOAD || b_state == B_LOAD_END);
  assign pb_wr_data = {db_rd_data[DBW-1:SOFT_W+1], db_rd_data[SOFT_W]};

  always_comb begin
    ld_en   = 1'b0;
    ld_addr = b_fk;
    ld_llr  = soft_t'(db_rd_data[SOFT_W-1:0]);
    if (b_state == B_LOAD || b_state == B_LOAD_END) begin
      ld_en = b_fv;
    end else if (b_state == B_PP) begin
      ld_en   = pp_er_valid;
      ld_addr = pp_er_idx;
      ld_llr  = '0;
    end else if (b_owns_sova) begin
      // extrinsic soft output of the detector: output minus a-priori input
      ld_en   = sv_out_valid;
      ld_addr = AW'(b_wk);
      ld_llr  = soft_t'(sat_sym(int'(sv_out_llr) - int'(la_dl[SOVA_DEPTH-1]), SOFT_W));
    end
  end

  logic dec_hd_q;
  assign out_valid = (b_state == B_OUT) && b_fv;
  assign out_bit   = dec_hd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_state <= A_IDLE; a_k <= '0; a_wk <= '0; a_fv <= 1'b0; a_fpad <= 1'b0; a_fsos <= 1'b0;
      b_state <= B_IDLE; b_k <= '0; b_wk <= '0; b_fv <= 1'b0; b_fpad <= 1'b0; b_fsos <= 1'b0;
      b_fk <= '0; b_la <= '0; b_pp_done <= 1'b0; b_ch <= '0; b_iters <= '0; b_owns_sova <= 1'b0;
      dec_hd_q <= 1'b0;
      db_release <= 1'b0; pb_release <= 1'b0; dec_start <= 1'b0; pp_start <= 1'b0;
      sec_done <= 1'b0; sec_ok <= 1'b0; sec_ch_iters <= '0; sec_ldpc_iters <= '0;
      cnt_sectors <= '0; cnt_failed <= '0; cnt_pp_runs <= '0; cnt_pp_events <= '0;
      cnt_ch_iters <= '0; cnt_dec_overflow <= '0; cnt_in_overflow <= '0; cnt_sova_waits <= '0;
      for (int i = 0; i < SOVA_DEPTH; i++) begin y_dl[i] <= '0; la_dl[i] <= '0; end
    end else begin
      db_release <= 1'b0; pb_release <= 1'b0; dec_start <= 1'b0; pp_start <= 1'b0;
      sec_done <= 1'b0;
      if (ib_overflow) cnt_in_overflow <= cnt_in_overflow + 1;

      if (sv_in_valid) begin
        y_dl[0]  <= sv_y;
        la_dl[0] <= sv_la;
        for (int i = 1; i < SOVA_DEPTH; i++) begin y_dl[i] <= y_dl[i-1]; la_dl[i] <= la_dl[i-1]; end
      end

      // ------------------------------------------------ detection stage
      a_fv <= 1'b0;
      case (a_state)
        A_IDLE: begin
          if (!ib_empty && !db_full && b_state != B_SREQ && !b_owns_sova) begin
            a_k <= '0; a_wk <= '0; a_state <= A_FEED;
          end else if (!ib_empty && !db_full && (b_state == B_SREQ || b_owns_sova))
            cnt_sova_waits <= cnt_sova_waits + 1;
        end
        A_FEED: begin
          a_fv   <= 1'b1;
          a_fsos <= (a_k == '0);
          a_fpad <= (a_k >= (AW+1)'(N_BITS));
          a_k    <= a_k + 1'b1;
          if (a_k == (AW+1)'(N_BITS + PADS - 1)) a_state <= A_DRAIN;
        end
        A_DRAIN: if (a_wk == (AW+1)'(N_BITS)) a_state <= A_IDLE;
        default: a_state <= A_IDLE;
      endcase
      if (db_wr_en) a_wk <= a_wk + 1'b1;

      // ------------------------------------------------- decoding stage
      b_fv <= 1'b0;
      case (b_state)
        B_IDLE: if (!db_empty && pb_empty) begin
          b_k <= '0; b_state <= B_LOAD;
        end
        B_LOAD: begin
          b_fv <= 1'b1;
          b_fk <= b_k_addr;
          b_k  <= b_k + 1'b1;
          if (b_k == (AW+1)'(N_BITS - 1)) b_state <= B_LOAD_END;
        end
        B_LOAD_END: begin
          db_release <= 1'b1;
          dec_start  <= 1'b1;
          b_pp_done  <= 1'b0;
          b_ch       <= '0;
          b_iters    <= '0;
          b_state    <= B_DEC;
        end
        B_DEC: if (dec_done) begin
          b_iters <= b_iters + TW'(dec_iters);
          if (dec_success) begin
            b_k <= '0; b_state <= B_OUT;
          end else if (!b_pp_done) begin
            pp_start    <= 1'b1;
            cnt_pp_runs <= cnt_pp_runs + 1;
            b_state     <= B_PP;
          end else if (int'(b_ch) < int'(CH_ITERS) - 1) begin
            b_state <= B_SREQ;
          end else begin
            b_k <= '0; b_state <= B_OUT;
          end
        end
        B_PP: if (pp_done) begin
          b_pp_done     <= 1'b1;
          cnt_pp_events <= cnt_pp_events + 32'(pp_n_events);
          dec_start     <= 1'b1;
          b_state       <= B_DEC;
        end
        B_SREQ: if (a_state == A_IDLE) begin
          b_owns_sova <= 1'b1;
          b_k <= '0; b_wk <= '0;
          b_state <= B_SFEED;
        end else cnt_sova_waits <= cnt_sova_waits + 1;
        B_SFEED: begin
          b_fv   <= 1'b1;
          b_fsos <= (b_k == '0);
          b_fpad <= (b_k >= (AW+1)'(N_BITS));
          b_la   <= dec_ext;
          b_k    <= b_k + 1'b1;
          if (b_k == (AW+1)'(N_BITS + PADS - 1)) b_state <= B_SDRAIN;
        end
        B_SDRAIN: if (b_wk == (AW+1)'(N_BITS)) begin
          b_owns_sova  <= 1'b0;
          b_ch         <= b_ch + 1'b1;
          cnt_ch_iters <= cnt_ch_iters + 1;
          dec_start    <= 1'b1;
          b_state      <= B_DEC;
        end
        B_OUT: begin
          b_fv     <= (b_k < (AW+1)'(N_BITS));
          dec_hd_q <= dec_hd;
          b_k      <= b_k + 1'b1;
          if (b_k == (AW+1)'(N_BITS)) begin
            pb_release     <= 1'b1;
            sec_done       <= 1'b1;
            sec_ok         <= dec_success;
            sec_ch_iters   <= b_ch;
            sec_ldpc_iters <= b_iters;
            cnt_sectors    <= cnt_sectors + 1;
            if (!dec_success) cnt_failed <= cnt_failed + 1;
            if (int'(b_iters) > int'(NR_BUDGET)) cnt_dec_overflow <= cnt_dec_overflow + 1;
            b_state <= B_IDLE;
          end
        end
        default: b_state <= B_IDLE;
      endcase
      if (b_owns_sova && sv_out_valid) b_wk <= b_wk + 1'b1;
    end
  end

  // The buffers between the stages are only written when they have room.
  assert property (@(posedge clk) disable iff (!rst_n) !db_overflow);
  assert property (@(posedge clk) disable iff (!rst_n) !pb_overflow);
endmodule
