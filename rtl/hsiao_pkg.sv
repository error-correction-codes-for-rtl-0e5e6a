// Shared constants and types of the (72,64) Hsiao SEC-DED code with byte
// erasure correction.
//
// The code is a Hsiao odd-weight-column code: all 56 weight-3 columns of
// length 8, eight weight-5 columns and the 8x8 identity for the check bits.
// Its columns are ordered so that each of the nine 8x8 submatrices H_i (the
// columns of one byte, i.e. of one memory chip) is invertible over GF(2).
// Then a byte whose location is known (an erasure) can be rebuilt from the
// other eight: H_i c_i = sum over j != i of H_j c_j, so c_i = H_i^-1 (...).
//
// Bit numbering: codeword bit n is data bit n for n < 64 and check bit n-64
// for n >= 64.  Byte b (0..8) is bits 8b..8b+7; byte 8 is the check byte, so
// H_8 (the ninth submatrix) is the identity.  Byte b is stored in chip b.
//
// The column order below was found with the column-exchange search: start
// from the Hsiao matrix and, for each byte in turn, exchange one of its
// columns with a column of a later, not yet fixed byte until its 8x8 matrix
// has full rank.  Which weight-5 columns are used (the complements of the
// eight cyclic shifts of 8'b0000_0111, giving every row of P weight 26) and
// the seed of the search are this design's choice; any order that passes the
// rank test is an equally valid code.  The inverses are not stored: they are
// computed by Gaussian elimination over GF(2) when the design is elaborated.
package hsiao_pkg;

  localparam int unsigned K      = 64;  // data bits
  localparam int unsigned R      = 8;   // check bits
  localparam int unsigned N      = K + R;
  localparam int unsigned NBYTES = N / 8;  // memory chips

  typedef logic [K-1:0] data_t;
  typedef logic [N-1:0] cw_t;
  typedef logic [R-1:0] syn_t;
  typedef logic [3:0]   chip_idx_t;  // 0..NBYTES-1

  // Decoder verdict for one codeword.
  typedef struct packed {
    logic single;      // one bit error found and corrected
    logic double_err;  // even-weight nonzero syndrome: two bit errors, not corrected
    logic other;       // odd-weight syndrome matching no column: uncorrectable
    logic erased;      // erasure mode and the erased byte had to be rewritten
  } dec_status_t;

  // Counters kept by the scrubbing block.
  typedef struct packed {
    logic [31:0] passes;         // completed scrub passes
    logic [31:0] recoveries;     // completed passes that rebuilt an erased chip
    logic [31:0] corrected;      // words rewritten with a correction
    logic [31:0] uncorrectable;  // words found uncorrectable (left as they were)
  } scrub_stats_t;

  // Columns of P: P_COLS[n] is the H column of data bit n, listed from
  // data bit 63 (first) down to data bit 0 (last).
  localparam logic [K-1:0][R-1:0] P_COLS = {
    8'hf1, 8'h91, 8'hd0, 8'hc8, 8'ha1, 8'h8c, 8'h32, 8'h45,
    8'he0, 8'h1f, 8'h38, 8'h07, 8'h2c, 8'h54, 8'h16, 8'ha8,
    8'h8f, 8'h25, 8'hc7, 8'h61, 8'ha4, 8'h49, 8'h3e, 8'h7c,
    8'h4a, 8'ha2, 8'h86, 8'h89, 8'h1a, 8'h70, 8'h68, 8'h64,
    8'h43, 8'h94, 8'h58, 8'h31, 8'h52, 8'h51, 8'h1c, 8'h0b,
    8'h92, 8'h46, 8'hf8, 8'h62, 8'h19, 8'h34, 8'he3, 8'hc1,
    8'hc2, 8'h0e, 8'h29, 8'h26, 8'h0d, 8'h23, 8'h85, 8'hb0,
    8'h4c, 8'h83, 8'h15, 8'h13, 8'h2a, 8'h98, 8'h8a, 8'hc4
  };

  // Column n of H = [P | I].
  function automatic syn_t h_col(int unsigned n);
    if (n < K) return P_COLS[n];
    return syn_t'(1) << (n - K);
  endfunction

  // Syndrome S = H c.
  function automatic syn_t syndrome(cw_t c);
    syn_t s = '0;
    for (int unsigned n = 0; n < N; n++)
      if (c[n]) s ^= h_col(n);
    return s;
  endfunction

  // Inverse of the 8x8 submatrix of byte b, returned as its 8 columns:
  // result[k] is column k of H_b^-1.  Gauss-Jordan elimination on [H_b | I].
  function automatic logic [7:0][7:0] sub_inverse(int unsigned b);
    logic [7:0][7:0] a;  // a[r][k] = H_b[r][k]
    logic [7:0][7:0] v;  // same row operations applied to I
    logic [7:0] t;
    syn_t col;
    logic [7:0][7:0] res;
    int p;
    for (int r = 0; r < 8; r++) begin
      v[r] = 8'(1) << r;
    end
    for (int k = 0; k < 8; k++) begin
      col = h_col(8*b + k);
      for (int r = 0; r < 8; r++) a[r][k] = col[r];
    end
    for (int c = 0; c < 8; c++) begin
      p = -1;
      for (int r = c; r < 8; r++)
        if (p < 0 && a[r][c]) p = r;
      if (p >= 0) begin
        t = a[c]; a[c] = a[p]; a[p] = t;
        t = v[c]; v[c] = v[p]; v[p] = t;
      end
      for (int r = 0; r < 8; r++)
        if (r != c && a[r][c]) begin
          a[r] ^= a[c];
          v[r] ^= v[c];
        end
    end
    for (int k = 0; k < 8; k++)
      for (int r = 0; r < 8; r++) res[k][r] = v[r][k];
    return res;
  endfunction

  function automatic logic [NBYTES-1:0][7:0][7:0] all_inverses();
    logic [NBYTES-1:0][7:0][7:0] res;
    for (int unsigned b = 0; b < NBYTES; b++) res[b] = sub_inverse(b);
    return res;
  endfunction

  // HINV[b][k]: column k of H_b^-1.
  localparam logic [NBYTES-1:0][7:0][7:0] HINV = all_inverses();

endpackage
