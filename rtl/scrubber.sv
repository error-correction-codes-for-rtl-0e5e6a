// Scrubbing block.
//
// Walks through all 2**ADDR_W codeword addresses; at each it reads the word,
// lets the codec correct it and writes the corrected codeword back to the
// same address, so single upsets are removed before a second one can hit the
// same word.  A pass starts every SCRUB_PERIOD clocks, and also whenever the
// power controller of the erased chip reports that the chip is powered again.
//
// The block also owns the erasure location.  When a power controller reports
// a power-cycle event (pcse_i), that chip's contents are gone, so its index
// is handed to the codec (erase_en_o / erase_idx_o) and every read, from the
// processor or from the scrubber, rebuilds that byte from the other eight.
// The recovery pass that starts on restored_i rewrites every word, after which
// the chip holds valid data again and the erasure is cleared.  A recovery
// request is taken at the next word boundary (never between a granted read
// and its write-back).  A power-cycle
// event of a second chip while an erasure is active cannot be corrected: it
// sets the sticky multi_erasure_o flag and the first erasure is kept.  A
// recovery request restarts a running pass from address 0.
//
// Memory port and timing: two cycles per codeword.  In the read slot the
// block raises req_o with addr_o and waits for gnt_i (the processor has
// priority).  The granted cycle issues the read; in the next cycle, the
// write-back slot (wb_o = 1), the chip data are at the decoder and we_o
// writes the corrected codeword back.  The slot is never given away, so no
// processor write can fall between a scrub read and its write-back.  A word
// found uncorrectable is left as it is (we_o stays low) and counted.  A full
// pass without contention takes 2 * 2**ADDR_W cycles: 2**30 cycles, about
// 2 s at 533 MHz, at the default 512M codewords.
// Reset: active low, synchronous; no erasure, idle, counters cleared.
// The scrub procedure and the erasure hand-over follow the published memory
// organisation; arbitration, restart and the handling of uncorrectable words
// and of a second failed chip are this design's choices.
module scrubber
  import hsiao_pkg::*;
#(
  parameter int unsigned     ADDR_W       = 29,
  parameter longint unsigned SCRUB_PERIOD = 64'd319_800_000_000,  // 10 min at 533 MHz
  parameter int unsigned     NCHIPS       = NBYTES
) (
  input  logic                clk,
  input  logic                rst_n,
  // from the power controllers
  input  logic [NCHIPS-1:0]   pcse_i,
  input  logic [NCHIPS-1:0]   restored_i,
  // memory port
  output logic                req_o,
  input  logic                gnt_i,
  output logic                wb_o,
  output logic                we_o,
  output logic [ADDR_W-1:0]   addr_o,
  input  dec_status_t         dec_status_i,
  // to the codec
  output logic                erase_en_o,
  output chip_idx_t           erase_idx_o,
  // status
  output logic                busy_o,
  output logic                recovery_o,
  output logic                multi_erasure_o,
  output scrub_stats_t        stats_o
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE} sstate_t;

  sstate_t         state;
  logic [ADDR_W-1:0] addr;
  longint unsigned tmr;
  logic            period_hit;
  logic            pcse_any;
  chip_idx_t       pcse_idx;
  logic            restart;
  logic            restart_q;   // recovery requested, waiting for a word boundary
  logic            do_restart;
  logic            bad_word;
  logic            fixed_word;

  // Lowest-numbered chip reporting a power-cycle event.
  always_comb begin
    pcse_any = |pcse_i;
    pcse_idx = '0;
    for (int i = NCHIPS - 1; i >= 0; i--)
      if (pcse_i[i]) pcse_idx = chip_idx_t'(i);
  end

  assign period_hit = (tmr == SCRUB_PERIOD - 1);
  assign restart    = erase_en_o && restored_i[erase_idx_o];
  assign do_restart = restart || restart_q;
  assign bad_word   = dec_status_i.double_err || dec_status_i.other;
  assign fixed_word = dec_status_i.single || dec_status_i.erased;

  assign req_o  = (state == S_READ);
  assign wb_o   = (state == S_WRITE);
  assign we_o   = (state == S_WRITE) && !bad_word;
  assign addr_o = addr;
  assign busy_o = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) tmr <= '0;
    else        tmr <= period_hit ? '0 : tmr + 1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state           <= S_IDLE;
      addr            <= '0;
      erase_en_o      <= 1'b0;
      erase_idx_o     <= '0;
      recovery_o      <= 1'b0;
      restart_q       <= 1'b0;
      multi_erasure_o <= 1'b0;
      stats_o         <= '0;
    end else begin
      // erasure location from the power controllers
      if (pcse_any) begin
        if (!erase_en_o) begin
          erase_en_o  <= 1'b1;
          erase_idx_o <= pcse_idx;
        end else if ((pcse_i & ~(NCHIPS'(1) << erase_idx_o)) != '0) begin
          multi_erasure_o <= 1'b1;
        end
      end

      // A recovery request waits for a word boundary, so that a granted
      // read always gets its write-back slot.
      if (restart) restart_q <= 1'b1;

      unique case (state)
        S_IDLE: begin
          if (do_restart) begin
            state      <= S_READ;
            addr       <= '0;
            recovery_o <= 1'b1;
            restart_q  <= 1'b0;
          end else if (period_hit) begin
            state <= S_READ;
            addr  <= '0;
          end
        end
        S_READ: begin
          if (gnt_i) begin
            state <= S_WRITE;
          end else if (do_restart) begin
            addr       <= '0;
            recovery_o <= 1'b1;
            restart_q  <= 1'b0;
          end
        end
        S_WRITE: begin
          if (bad_word)   stats_o.uncorrectable <= stats_o.uncorrectable + 1;
          if (fixed_word) stats_o.corrected     <= stats_o.corrected + 1;
          if (do_restart) begin
            // the erased chip is back: rebuild it with a full pass from 0
            state      <= S_READ;
            addr       <= '0;
            recovery_o <= 1'b1;
            restart_q  <= 1'b0;
          end else if (addr == '1) begin
            state          <= S_IDLE;
            addr           <= '0;
            stats_o.passes <= stats_o.passes + 1;
            if (recovery_o) begin
              recovery_o         <= 1'b0;
              erase_en_o         <= 1'b0;
              stats_o.recoveries <= stats_o.recoveries + 1;
            end
          end else begin
            state <= S_READ;
            addr  <= addr + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
