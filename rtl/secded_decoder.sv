// (72,64) Hsiao SEC-DED decoder with byte-erasure correction.
//
// Computes the syndrome S = H c of the codeword read from the nine chips.
// Normal mode (erase_en_i = 0): S = 0 means no error; S equal to column n of
// H means a single error at bit n, which is flipped back; a nonzero even-
// weight S is a double error, detected and not corrected; an odd-weight S
// that matches no column is flagged as uncorrectable too.
// Erasure mode (erase_en_i = 1): the byte erase_idx_i is known to be bad (its
// chip was power-cycled) and the other eight are trusted.  Then
// S = H_i (c_i' + c_i) and the byte is rebuilt as c_i = c_i' + H_i^-1 S,
// which is the same as recomputing it from the other bytes.  No further
// SEC/DED is possible in this mode; status_o.erased is set when the byte had
// to change.  The check byte (index 8) is rebuilt as P d.
//
// Purely combinational.  cw_o is the whole corrected codeword, ready to be
// written back by the scrubber; data_o is its data part.  The decoding rules
// follow the published code; the "other" status for odd syndromes that match
// no column is this design's choice.
module secded_decoder
  import hsiao_pkg::*;
(
  input  cw_t         cw_i,
  input  logic        erase_en_i,
  input  chip_idx_t   erase_idx_i,
  output data_t       data_o,
  output cw_t         cw_o,
  output syn_t        syndrome_o,
  output dec_status_t status_o
);

  syn_t     s;
  cw_t      flip_sec;   // single-error correction pattern
  cw_t      flip_era;   // erasure correction pattern
  syn_t     delta;

  always_comb begin
    s = '0;
    for (int unsigned n = 0; n < N; n++)
      if (cw_i[n]) s ^= h_col(n);
  end

  // Single error: locate the column equal to the syndrome.
  always_comb begin
    for (int unsigned n = 0; n < N; n++)
      flip_sec[n] = (s == h_col(n));
  end

  // Erasure: delta = H_i^-1 S, placed on byte i.
  always_comb begin
    delta = '0;
    for (int unsigned b = 0; b < NBYTES; b++)
      if (erase_idx_i == chip_idx_t'(b))
        for (int k = 0; k < 8; k++)
          if (s[k]) delta ^= HINV[b][k];
    flip_era = '0;
    for (int unsigned b = 0; b < NBYTES; b++)
      if (erase_idx_i == chip_idx_t'(b)) flip_era[8*b +: 8] = delta;
  end

  always_comb begin
    status_o = '0;
    if (erase_en_i) begin
      cw_o            = cw_i ^ flip_era;
      status_o.erased = (s != '0);
    end else begin
      cw_o              = cw_i ^ flip_sec;
      status_o.single   = (flip_sec != '0);
      status_o.double_err = (s != '0) && !(^s);
      status_o.other    = (^s) && (flip_sec == '0);
    end
  end

  assign data_o     = cw_o[K-1:0];
  assign syndrome_o = s;

endmodule
