// SEC-DED codec placed between the processor bus and the nine memory chips.
//
// Write path: the 64-bit word from the processor is encoded into a 72-bit
// codeword (eight data bytes plus the check byte).  Read path: the 72-bit
// word from the chips is decoded, a single bit error is corrected, a double
// error is reported, and, while the scrubbing block reports an erased chip,
// that chip's byte is rebuilt from the other eight.  Besides the corrected
// data the decoder also returns the whole corrected codeword, which the
// scrubbing block writes back unchanged.
//
// Both paths are combinational and independent, so a read is decoded in the
// same cycle the chip data arrive.  Sharing one codec between processor and
// scrubber is this design's choice.
module secded_codec
  import hsiao_pkg::*;
(
  // write path
  input  data_t       wr_data_i,
  output cw_t         wr_cw_o,
  // read path
  input  cw_t         rd_cw_i,
  input  logic        erase_en_i,
  input  chip_idx_t   erase_idx_i,
  output data_t       rd_data_o,
  output cw_t         rd_cw_o,
  output syn_t        rd_syndrome_o,
  output dec_status_t rd_status_o
);

  secded_encoder u_enc (
    .data_i (wr_data_i),
    .cw_o   (wr_cw_o)
  );

  secded_decoder u_dec (
    .cw_i        (rd_cw_i),
    .erase_en_i  (erase_en_i),
    .erase_idx_i (erase_idx_i),
    .data_o      (rd_data_o),
    .cw_o        (rd_cw_o),
    .syndrome_o  (rd_syndrome_o),
    .status_o    (rd_status_o)
  );

endmodule
