// Power controller of one memory chip (digital part).
//
// The chip's supply current is watched by an analog IDDQ sensor outside this
// block; its comparator output, overcurrent_i, rises on a hard SEFI or a
// latch-up.  The controller then power-cycles the chip: it switches the
// supply off for OFF_CYCLES clocks, switches it on again and waits
// SETTLE_CYCLES clocks for the chip to come up.  It tells the scrubbing block
// twice: pcse_o pulses when the fault is detected (from then on the chip's
// contents are lost and its byte must be treated as an erasure) and
// restored_o pulses when the chip is usable again (the recovery scrub may
// start).  An over-current during the settle time starts the cycle again.
//
// Timing: overcurrent_i is asynchronous and passes a two-flop synchroniser;
// power_en_o falls and pcse_o pulses three clock edges after it rises.
// power_en_o is low for exactly OFF_CYCLES cycles.  Reset (active low,
// synchronous) leaves the chip powered.  The sequence follows the published
// memory organisation; the two delays and the synchroniser are this design's
// choices (1 ms off, 200 us settle at 533 MHz).
module power_controller #(
  parameter int unsigned OFF_CYCLES    = 533_000,
  parameter int unsigned SETTLE_CYCLES = 106_600
) (
  input  logic clk,
  input  logic rst_n,
  input  logic overcurrent_i,
  output logic power_en_o,
  output logic pcse_o,
  output logic restored_o,
  output logic off_o
);

  typedef enum logic [1:0] {P_ON, P_OFF, P_SETTLE} pstate_t;

  pstate_t     state;
  logic [1:0]  oc_sync;
  logic [31:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) oc_sync <= '0;
    else        oc_sync <= {oc_sync[0], overcurrent_i};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= P_ON;
      cnt        <= '0;
      pcse_o     <= 1'b0;
      restored_o <= 1'b0;
    end else begin
      pcse_o     <= 1'b0;
      restored_o <= 1'b0;
      unique case (state)
        P_ON: begin
          if (oc_sync[1]) begin
            state  <= P_OFF;
            cnt    <= '0;
            pcse_o <= 1'b1;
          end
        end
        P_OFF: begin
          if (cnt == OFF_CYCLES - 1) begin
            state <= P_SETTLE;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1;
          end
        end
        P_SETTLE: begin
          if (oc_sync[1]) begin
            state <= P_OFF;
            cnt   <= '0;
          end else if (cnt == SETTLE_CYCLES - 1) begin
            state      <= P_ON;
            cnt        <= '0;
            restored_o <= 1'b1;
          end else begin
            cnt <= cnt + 1;
          end
        end
        default: state <= P_ON;
      endcase
    end
  end

  assign power_en_o = (state != P_OFF);
  assign off_o      = (state != P_ON);

endmodule
