// Workload test: recovery of a whole memory after a hard SEFI.  The memory
// is filled, one chip is power-cycled through its current sensor, and the
// recovery scrub pass is timed.  At 2 cycles per codeword a pass over the
// full 2**29-word memory takes 2**30 cycles, about 2.0 s at 533 MHz; here
// the same pass runs over 2**20 words and must take exactly 2 * 2**20
// cycles.  Afterwards every word must read back clean with the erasure
// cleared, i.e. the wiped chip holds valid data again.  The test is repeated
// for the check chip and for a data chip.
module tb_sefi_recovery;
  import hsiao_pkg::*;

  localparam int unsigned AW    = 20;
  localparam int unsigned WORDS = 1 << AW;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic              p_req = 0, p_we = 0;
  logic [AW-1:0]     p_addr = '0;
  data_t             p_wdata = '0, p_rdata;
  logic              p_gnt, p_rvalid;
  dec_status_t       p_st;
  syn_t              p_syn;
  logic              m_en, m_we;
  logic [AW-1:0]     m_addr;
  logic [NBYTES-1:0][7:0] m_wdata, m_rdata;
  logic [NBYTES-1:0] pwr, oc = '0, chip_off;
  logic              er_en, busy, recov, multi;
  chip_idx_t         er_idx;
  scrub_stats_t      stats;

  data_t golden [WORDS];

  ecc_memory_system #(
    .ADDR_W(AW), .SCRUB_PERIOD(64'd1_000_000_000), .OFF_CYCLES(533), .SETTLE_CYCLES(107)
  ) dut (
    .clk(clk), .rst_n(rst_n),
    .proc_req_i(p_req), .proc_we_i(p_we), .proc_addr_i(p_addr), .proc_wdata_i(p_wdata),
    .proc_gnt_o(p_gnt), .proc_rvalid_o(p_rvalid), .proc_rdata_o(p_rdata),
    .proc_rstatus_o(p_st), .proc_rsyndrome_o(p_syn),
    .mem_en_o(m_en), .mem_we_o(m_we), .mem_addr_o(m_addr), .mem_wdata_o(m_wdata),
    .mem_rdata_i(m_rdata), .chip_power_en_o(pwr), .chip_overcurrent_i(oc),
    .chip_off_o(chip_off), .erase_en_o(er_en), .erase_idx_o(er_idx),
    .scrub_busy_o(busy), .scrub_recovery_o(recov), .multi_erasure_o(multi),
    .scrub_stats_o(stats)
  );

  for (genvar i = 0; i < NBYTES; i++) begin : g_chip
    mem_chip_model #(.ADDR_W(AW), .SEED(8'(11 * i + 7))) u_chip (
      .clk(clk), .power_i(pwr[i]), .en_i(m_en), .we_i(m_we), .addr_i(m_addr),
      .wdata_i(m_wdata[i]), .rdata_o(m_rdata[i])
    );
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  task automatic recover(int chip);
    longint t0, cyc;
    int bad = 0, erased = 0;
    @(negedge clk) oc[chip] = 1;
    repeat (5) @(posedge clk);
    @(negedge clk) oc[chip] = 0;
    check(er_en && er_idx == chip_idx_t'(chip), "erasure set");
    while (!recov) @(posedge clk);
    t0 = $time;
    while (busy) @(posedge clk);
    cyc = ($time - t0) / 10;
    check(cyc == 2 * WORDS, $sformatf("recovery pass %0d cycles, expected %0d", cyc, 2 * WORDS));
    $display("chip %0d: recovery of %0d words in %0d cycles; at 2**29 words and 533 MHz: %f s",
             chip, WORDS, cyc, real'(cyc) * real'(1 << (29 - AW)) / 533.0e6);
    check(!er_en, "erasure cleared");
    // read everything back: clean, without erasure help
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      p_req = 1; p_we = 0; p_addr = AW'(a);
      @(posedge clk);
      while (!p_gnt) @(posedge clk);
      @(negedge clk) p_req = 0;
      if (p_rdata != golden[a] || p_st != '0) bad++;
    end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL: %0d words wrong after recovery of chip %0d", bad, chip);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < WORDS; a++) begin
      golden[a] = {$urandom, $urandom};
      @(negedge clk);
      p_req = 1; p_we = 1; p_addr = AW'(a); p_wdata = golden[a];
      @(posedge clk);
      while (!p_gnt) @(posedge clk);
    end
    @(negedge clk) p_req = 0;
    recover(8);
    recover(2);
    check(stats.recoveries == 2 && !multi, "two recoveries, no multiple erasure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
