// Testbench helpers: the parity-check matrix of the quasi-cyclic LDPC code
// (4 x 36 circulants of size z, circulant (r, c) shifted by r*c mod z, so
// check r*z + i touches bit c*z + (i + r*c) mod z), optionally extended by the
// two interleaved single-parity-check codes of every 128-bit segment, and a
// random codeword generator that brings the matrix to reduced row-echelon form
// and solves for the pivot bits.  Rows are packed bit vectors of the largest
// code length.
package tb_code_pkg;
  localparam int NMAXB = 4608;
  localparam int RMAX  = 512 + 72;
  typedef bit [NMAXB-1:0] row_t;

  class code_gen;
    int   n, nrows, rank;
    row_t h [RMAX];
    int   piv [RMAX];
    bit   is_piv [NMAXB];

    function new(int z, bit with_spc);
      n = 36 * z;
      nrows = 0;
      for (int r = 0; r < 4; r++)
        for (int i = 0; i < z; i++) begin
          h[nrows] = '0;
          for (int c = 0; c < 36; c++) h[nrows][c * z + (i + r * c) % z] = 1'b1;
          nrows++;
        end
      if (with_spc)
        for (int s = 0; s < n / 128; s++)
          for (int p = 0; p < 2; p++) begin
            h[nrows] = '0;
            for (int t = 0; t < 64; t++) h[nrows][s * 128 + 2 * t + p] = 1'b1;
            nrows++;
          end
      reduce();
    endfunction

    function void reduce();
      row_t tmp;
      for (int c = 0; c < NMAXB; c++) is_piv[c] = 1'b0;
      rank = 0;
      for (int c = 0; c < n && rank < nrows; c++) begin
        int f;
        f = -1;
        for (int r = rank; r < nrows; r++) if (h[r][c]) begin f = r; break; end
        if (f < 0) continue;
        tmp = h[f]; h[f] = h[rank]; h[rank] = tmp;
        for (int r = 0; r < nrows; r++) if (r != rank && h[r][c]) h[r] ^= h[rank];
        piv[rank] = c;
        is_piv[c] = 1'b1;
        rank++;
      end
    endfunction

    // Random codeword (bit i of the result is code bit i).
    function row_t codeword();
      row_t x;
      x = '0;
      for (int c = 0; c < n; c++) if (!is_piv[c]) x[c] = 1'($urandom);
      for (int k = 0; k < rank; k++) x[piv[k]] = ^(h[k] & x);
      return x;
    endfunction
  endclass

  // Syndrome weight of x against the LDPC checks only (first 4*z rows of the
  // unreduced matrix are rebuilt here, independent of the reduced copy).
  function automatic int ldpc_syndrome_weight(int z, row_t x);
    int w;
    w = 0;
    for (int r = 0; r < 4; r++)
      for (int i = 0; i < z; i++) begin
        bit p;
        p = 1'b0;
        for (int c = 0; c < 36; c++) p ^= x[c * z + (i + r * c) % z];
        w += int'(p);
      end
    return w;
  endfunction
endpackage
