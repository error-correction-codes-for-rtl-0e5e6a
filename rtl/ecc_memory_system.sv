// Fault-tolerant 64-bit memory subsystem: processor/memory interface of a
// spaceborne computer built from nine byte-wide commercial memory chips.
//
// Each 64-bit word is stored as a 72-bit Hsiao SEC-DED codeword, one byte per
// chip (eight data chips, one check chip).  Three mechanisms keep it alive:
//  - the codec corrects any single bit upset and detects double upsets;
//  - the scrubbing block rewrites every word periodically, so upsets do not
//    pile up in one word;
//  - one power controller per chip power-cycles a chip whose supply current
//    shows a hard functional interrupt or latch-up.  The chip comes back
//    empty; its byte is then an erasure at a known position, which the code
//    can rebuild from the other eight bytes, and a recovery scrub pass
//    rewrites every word so the chip holds valid data again.
//
// Processor port: proc_req_i with proc_we_i, proc_addr_i and proc_wdata_i;
// the request is taken in a cycle where proc_gnt_o is high.  A read returns
// proc_rdata_o and proc_rstatus_o with proc_rvalid_o one cycle later.  The
// processor has priority over scrub reads, but waits (proc_gnt_o low) for
// one cycle when its request falls in the scrubber's write-back slot.
// Chip port: one shared strobe, write enable and address, a byte of write
// data and of read data per chip; a chip returns read data in the cycle after
// the strobe.  chip_power_en_o drives the chips' supply switches and
// chip_overcurrent_i comes from their current sensors; chip_off_o marks a
// chip that is being power-cycled.
// The organisation (codec, scrubber, nine chips, nine power controllers)
// follows the published design; the chip timing, the arbitration and the
// sharing of one codec are this design's choices.
module ecc_memory_system
  import hsiao_pkg::*;
#(
  parameter int unsigned     ADDR_W        = 29,  // 512M codewords = 4 GB of data
  parameter longint unsigned SCRUB_PERIOD  = 64'd319_800_000_000,
  parameter int unsigned     OFF_CYCLES    = 533_000,
  parameter int unsigned     SETTLE_CYCLES = 106_600
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // processor
  input  logic                     proc_req_i,
  input  logic                     proc_we_i,
  input  logic [ADDR_W-1:0]        proc_addr_i,
  input  data_t                    proc_wdata_i,
  output logic                     proc_gnt_o,
  output logic                     proc_rvalid_o,
  output data_t                    proc_rdata_o,
  output dec_status_t              proc_rstatus_o,
  output syn_t                     proc_rsyndrome_o,
  // memory chips
  output logic                     mem_en_o,
  output logic                     mem_we_o,
  output logic [ADDR_W-1:0]        mem_addr_o,
  output logic [NBYTES-1:0][7:0]   mem_wdata_o,
  input  logic [NBYTES-1:0][7:0]   mem_rdata_i,
  // chip supplies
  output logic [NBYTES-1:0]        chip_power_en_o,
  input  logic [NBYTES-1:0]        chip_overcurrent_i,
  output logic [NBYTES-1:0]        chip_off_o,
  // status
  output logic                     erase_en_o,
  output chip_idx_t                erase_idx_o,
  output logic                     scrub_busy_o,
  output logic                     scrub_recovery_o,
  output logic                     multi_erasure_o,
  output scrub_stats_t             scrub_stats_o
);

  logic [NBYTES-1:0] pcse, restored;

  logic              s_req, s_gnt, s_wb, s_we;
  logic [ADDR_W-1:0] s_addr;

  cw_t         wr_cw, rd_cw, rd_cw_fixed;
  data_t       rd_data;
  syn_t        rd_syn;
  dec_status_t rd_status;

  // ---------------------------------------------------------------- power
  for (genvar i = 0; i < NBYTES; i++) begin : g_pwr
    power_controller #(
      .OFF_CYCLES    (OFF_CYCLES),
      .SETTLE_CYCLES (SETTLE_CYCLES)
    ) u_pwr (
      .clk           (clk),
      .rst_n         (rst_n),
      .overcurrent_i (chip_overcurrent_i[i]),
      .power_en_o    (chip_power_en_o[i]),
      .pcse_o        (pcse[i]),
      .restored_o    (restored[i]),
      .off_o         (chip_off_o[i])
    );
  end

  // ------------------------------------------------------------- scrubber
  scrubber #(
    .ADDR_W       (ADDR_W),
    .SCRUB_PERIOD (SCRUB_PERIOD),
    .NCHIPS       (NBYTES)
  ) u_scrub (
    .clk             (clk),
    .rst_n           (rst_n),
    .pcse_i          (pcse),
    .restored_i      (restored),
    .req_o           (s_req),
    .gnt_i           (s_gnt),
    .wb_o            (s_wb),
    .we_o            (s_we),
    .addr_o          (s_addr),
    .dec_status_i    (rd_status),
    .erase_en_o      (erase_en_o),
    .erase_idx_o     (erase_idx_o),
    .busy_o          (scrub_busy_o),
    .recovery_o      (scrub_recovery_o),
    .multi_erasure_o (multi_erasure_o),
    .stats_o         (scrub_stats_o)
  );

  // ---------------------------------------------------------------- codec
  assign rd_cw = cw_t'(mem_rdata_i);

  secded_codec u_codec (
    .wr_data_i     (proc_wdata_i),
    .wr_cw_o       (wr_cw),
    .rd_cw_i       (rd_cw),
    .erase_en_i    (erase_en_o),
    .erase_idx_i   (erase_idx_o),
    .rd_data_o     (rd_data),
    .rd_cw_o       (rd_cw_fixed),
    .rd_syndrome_o (rd_syn),
    .rd_status_o   (rd_status)
  );

  // ---------------------------------------------------------- arbitration
  // The write-back slot belongs to the scrubber; otherwise the processor wins.
  assign proc_gnt_o = proc_req_i && !s_wb;
  assign s_gnt      = !proc_req_i && !s_wb;

  always_comb begin
    if (proc_gnt_o) begin
      mem_en_o    = 1'b1;
      mem_we_o    = proc_we_i;
      mem_addr_o  = proc_addr_i;
      mem_wdata_o = wr_cw;
    end else begin
      mem_en_o    = (s_req && s_gnt) || s_we;
      mem_we_o    = s_we;
      mem_addr_o  = s_addr;
      mem_wdata_o = rd_cw_fixed;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) proc_rvalid_o <= 1'b0;
    else        proc_rvalid_o <= proc_gnt_o && !proc_we_i;
  end

  assign proc_rdata_o   = rd_data;
  assign proc_rstatus_o   = rd_status;
  assign proc_rsyndrome_o = rd_syn;

  // A scrub write-back always follows a granted scrub read.
  assert property (@(posedge clk) disable iff (!rst_n) (s_req && s_gnt) |=> s_wb);
  // The processor is never granted during the write-back slot.
  assert property (@(posedge clk) disable iff (!rst_n) s_wb |-> !proc_gnt_o);

endmodule
