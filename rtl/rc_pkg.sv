// Shared constants and types of the iterative read channel.
//
// A sector carries 512 bytes of user data (4096 bits) and is protected by a
// rate-8/9 regular quasi-cyclic LDPC code of column weight 4, so a codeword is
// 4608 bits.  The parity-check matrix is built from 4 x 36 circulant
// permutation matrices of size 128 (4 * 128 = 512 checks, 36 * 128 = 4608
// bits, every check touching 36 bits).  The source paper fixes the code rate, the
// column weight and the sector size; the circulant size and the shift values
// follow from them and from this design's own choice of shift rule
// (shift(r,c) = r*c mod 128, which keeps every 4-cycle out of the graph).
//
// Word lengths follow the source paper: 6-bit equalizer output, 9-bit SOVA path
// metrics, 6-bit soft output, 6-bit FIR coefficients, 10-bit post-processor
// weight metric and 6-bit LDPC messages.
package rc_pkg;
  localparam int unsigned USER_BITS   = 4096; // 512-byte sector
  localparam int unsigned CIRC        = 128;  // circulant size
  localparam int unsigned BROWS       = 4;    // column weight
  localparam int unsigned BCOLS       = 36;   // row weight (rate 8/9)
  localparam int unsigned CW_BITS     = CIRC * BCOLS; // 4608
  localparam int unsigned SAMPLE_W    = 6;    // equalizer output
  localparam int unsigned COEF_W      = 6;    // FIR coefficient
  localparam int unsigned PM_W        = 9;    // SOVA path metric
  localparam int unsigned SOFT_W      = 6;    // SOVA soft output / LDPC input
  localparam int unsigned MSG_W       = 6;    // LDPC message
  localparam int unsigned PP_METRIC_W = 10;   // post-processor weight metric
  localparam int unsigned NMAX_ITER   = 24;   // max LDPC iterations
  localparam int unsigned MAX_CH_ITER = 4;    // max channel iterations
  localparam int unsigned SPC_LEN     = 64;   // each single parity check code
  localparam int unsigned SPC_SEG     = 2 * SPC_LEN; // two interleaved codes

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [SOFT_W-1:0]   soft_t;

  // Shift of circulant (r, c): r*c mod CIRC.
  function automatic int unsigned circ_shift(int unsigned r, int unsigned c, int unsigned z);
    return (r * c) % z;
  endfunction

  // Saturate a wide signed value to a signed w-bit range, symmetric
  // (the most negative code is not used).
  function automatic int sat_sym(int v, int unsigned w);
    int lim;
    lim = (1 <<< (w - 1)) - 1;
    if (v > lim) return lim;
    if (v < -lim) return -lim;
    return v;
  endfunction
endpackage
