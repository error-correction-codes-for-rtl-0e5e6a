// (72,64) Hsiao SEC-DED encoder.
//
// Forms the check byte c9 = P d of the 64-bit dataword d and appends it:
// cw_o = {c9, d}, so the first eight bytes of the codeword are the data
// bytes and the ninth is the check byte, one byte per memory chip.  Check bit
// r is the parity of the data bits whose H column has a one in row r; with
// the Hsiao columns each check bit is a 26-input XOR.
//
// Purely combinational, no clock.  The code itself follows the published
// construction; the column order is the one in hsiao_pkg.
module secded_encoder
  import hsiao_pkg::*;
(
  input  data_t data_i,
  output cw_t   cw_o
);

  syn_t check;

  always_comb begin
    check = '0;
    for (int unsigned n = 0; n < K; n++)
      if (data_i[n]) check ^= P_COLS[n];
  end

  assign cw_o = {check, data_i};

endmodule
