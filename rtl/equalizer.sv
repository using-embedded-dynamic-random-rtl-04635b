// Equalizer: a 10-tap FIR filter that shapes the read-back samples towards
// the partial-response target 1 + 0.75D, followed by a 3-tap whitening
// (noise-prediction) filter.  Tap counts, the 6-bit coefficient width and the
// 6-bit output width are the source paper's; the coefficient values are not, so
// both filters take their taps as inputs (fixed point, FRAC_BITS fraction
// bits, 1.0 = 16 by default).  Each filter sums its products at full
// precision, rounds away FRAC_BITS and saturates symmetrically to 6 bits.
//
// Interface: one sample per cycle when in_valid is high; the delay lines
// advance only on valid samples.  Timing: out_valid/out_sample follow a valid
// input by exactly two cycles (one register after the FIR, one after the
// whitening filter).
module equalizer
  import rc_pkg::*;
#(
  parameter int unsigned FIR_TAPS  = 10,
  parameter int unsigned WH_TAPS   = 3,
  parameter int unsigned IN_W      = 6,
  parameter int unsigned FRAC_BITS = 4
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            in_valid,
  input  logic signed [IN_W-1:0]          in_sample,
  input  logic signed [COEF_W-1:0]        fir_coef [FIR_TAPS],
  input  logic signed [COEF_W-1:0]        wh_coef  [WH_TAPS],
  output logic                            out_valid,
  output sample_t                         out_sample
);
  logic signed [IN_W-1:0] x_dly [FIR_TAPS];   // x_dly[0] is the newest sample
  sample_t                f_dly [WH_TAPS];    // FIR outputs, newest first
  logic                   f_valid;

  // Round away FRAC_BITS and saturate to the 6-bit output range.
  function automatic sample_t round_sat(logic signed [31:0] acc);
    return sample_t'(sat_sym(int'((acc + (32'sd1 <<< (FRAC_BITS - 1))) >>> FRAC_BITS), SAMPLE_W));
  endfunction

  // Full-precision sums: FIR over the newest input and the delay line,
  // whitening over the last WH_TAPS FIR outputs.
  sample_t fir_next, wh_next;
  logic signed [31:0] fir_acc, wh_acc;
  always_comb begin
    fir_acc = 32'(in_sample) * 32'(fir_coef[0]);
    for (int i = 1; i < FIR_TAPS; i++) fir_acc = fir_acc + 32'(x_dly[i-1]) * 32'(fir_coef[i]);
    fir_next = round_sat(fir_acc);
  end

  always_comb begin
    wh_acc = 32'(f_dly[0]) * 32'(wh_coef[0]);
    for (int j = 1; j < WH_TAPS; j++) wh_acc = wh_acc + 32'(f_dly[j]) * 32'(wh_coef[j]);
    wh_next = round_sat(wh_acc);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < FIR_TAPS; i++) x_dly[i] <= '0;
      for (int j = 0; j < WH_TAPS; j++)  f_dly[j] <= '0;
      f_valid    <= 1'b0;
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      f_valid <= in_valid;
      if (in_valid) begin
        x_dly[0] <= in_sample;
        for (int i = 1; i < FIR_TAPS; i++) x_dly[i] <= x_dly[i-1];
        f_dly[0] <= fir_next;
        for (int j = 1; j < WH_TAPS; j++) f_dly[j] <= f_dly[j-1];
      end
      out_valid <= f_valid;
      if (f_valid) out_sample <= wh_next;
    end
  end
endmodule
