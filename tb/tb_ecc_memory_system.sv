// End-to-end test of ecc_memory_system with nine behavioural memory chips,
// at a reduced size (64 codewords, short scrub period and power-cycle
// times).  A processor model writes and reads the memory while upsets are
// injected into the chips and the current sensors report faults.  Every
// read is compared with a golden copy kept here.  Each mechanism of the
// design is counted and must occur at least once:
//   single-bit correction, double-error detection, processor stall behind a
//   scrub write-back, periodic scrub pass with corrections, power cycle of a
//   chip, read rebuilt from an erasure, recovery pass that clears the
//   erasure, and a second chip failing during recovery (multi_erasure).
// Also checks the two-cycles-per-word scrub time and that the supply of a
// faulty chip goes off.
module tb_ecc_memory_system;
  import hsiao_pkg::*;

  localparam int unsigned     AW     = 6;
  localparam int unsigned     WORDS  = 1 << AW;
  localparam longint unsigned PERIOD = 1500;
  localparam int unsigned     OFF    = 40, SET = 20;

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

  // mechanism counters
  int n_single = 0, n_double = 0, n_stall = 0, n_scrub_fix = 0, n_periodic = 0;
  int n_pcycle = 0, n_erased_rd = 0, n_recovery = 0, n_multi = 0;

  ecc_memory_system #(
    .ADDR_W(AW), .SCRUB_PERIOD(PERIOD), .OFF_CYCLES(OFF), .SETTLE_CYCLES(SET)
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

  event flip_ev;
  int   flip_chip, flip_pos;
  logic [AW-1:0] flip_addr;

  for (genvar i = 0; i < NBYTES; i++) begin : g_chip
    mem_chip_model #(.ADDR_W(AW), .SEED(8'(17 * i + 3))) u_chip (
      .clk(clk), .power_i(pwr[i]), .en_i(m_en), .we_i(m_we), .addr_i(m_addr),
      .wdata_i(m_wdata[i]), .rdata_o(m_rdata[i])
    );
    always @(flip_ev) if (flip_chip == i) u_chip.flip_bit(flip_addr, flip_pos);
  end

  always #5 clk = ~clk;

  always @(negedge clk) if (rst_n && p_req && !p_gnt) n_stall++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  task automatic upset(int chip, int a, int b);
    flip_chip = chip; flip_addr = AW'(a); flip_pos = b;
    -> flip_ev;
    #1;
  endtask

  task automatic wr(int a, data_t d);
    @(negedge clk);
    p_req = 1; p_we = 1; p_addr = AW'(a); p_wdata = d;
    @(posedge clk);
    while (!p_gnt) @(posedge clk);
    @(negedge clk) p_req = 0;
    golden[a] = d;
  endtask

  task automatic rd(int a, output data_t d, output dec_status_t st);
    @(negedge clk);
    p_req = 1; p_we = 0; p_addr = AW'(a);
    @(posedge clk);
    while (!p_gnt) @(posedge clk);
    @(negedge clk) p_req = 0;
    check(p_rvalid, "read data valid one cycle after grant");
    d = p_rdata; st = p_st;
  endtask

  // read and compare; returns the status
  task automatic rd_chk(int a, output dec_status_t st, input string what);
    data_t d;
    rd(a, d, st);
    check(d == golden[a], $sformatf("%s: addr %0d read %h expected %h", what, a, d, golden[a]));
    if (st.single) n_single++;
    if (st.erased) n_erased_rd++;
  endtask

  task automatic wait_idle();
    while (busy) @(posedge clk);
  endtask

  // power-cycle one chip through its current sensor
  task automatic sensor_fault(int chip);
    @(negedge clk) oc[chip] = 1;
    repeat (5) @(posedge clk);
    @(negedge clk) oc[chip] = 0;
  endtask

  initial begin
    dec_status_t st;
    data_t d;
    longint t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- fill and read back
    for (int a = 0; a < WORDS; a++) wr(a, {$urandom, $urandom});
    for (int a = 0; a < WORDS; a++) begin
      rd_chk(a, st, "clean read");
      check(st == '0, "clean status");
    end
    // ---- single upsets in every chip, read through the codec
    for (int c = 0; c < NBYTES; c++) begin
      upset(c, 5 * c, $urandom_range(7));
      rd_chk(5 * c, st, "single upset");
      check(st.single, "single flagged");
    end
    // ---- a double upset is detected
    upset(1, 50, 2);
    upset(6, 50, 5);
    rd(50, d, st);
    check(st.double_err && !st.single, "double upset detected");
    if (st.double_err) n_double++;
    wr(50, golden[50]);
    // ---- periodic scrub while the processor keeps reading
    while (!busy) begin
      @(negedge clk);
    end
    n_periodic++;
    t0 = $time;
    while (busy) begin
      rd_chk($urandom_range(WORDS - 1), st, "read during scrub");
    end
    wait_idle();
    check(stats.passes == 1, "one periodic pass");
    check(stats.corrected >= 1, $sformatf("scrub corrected %0d words", stats.corrected));
    n_scrub_fix = stats.corrected;
    // the nine upsets are gone from the chips
    for (int c = 0; c < NBYTES; c++) begin
      rd_chk(5 * c, st, "after scrub");
      check(st == '0, "scrubbed word clean");
    end
    // ---- time of an uncontended pass: two cycles per word
    while (!busy) @(posedge clk);
    t0 = $time;
    while (busy) @(posedge clk);
    check(($time - t0) / 10 == 2 * WORDS, $sformatf("pass took %0d cycles", ($time - t0) / 10));
    // ---- hard SEFI on chip 4: power cycle, erasure, recovery
    sensor_fault(4);
    check(!pwr[4] && er_en && er_idx == 4, "chip 4 powered off, erasure set");
    n_pcycle++;
    for (int a = 0; a < WORDS; a += 7) begin
      rd_chk(a, st, "read while chip off");
    end
    wr(9, {$urandom, $urandom});
    while (!recov) @(posedge clk);
    check(pwr[4], "chip 4 powered again");
    // reads during recovery: not yet rewritten words need the erasure
    for (int i = 0; i < 8; i++) rd_chk(WORDS - 1 - i, st, "read during recovery");
    wait_idle();
    check(!er_en && stats.recoveries == 1, "erasure cleared after recovery");
    if (stats.recoveries == 1) n_recovery++;
    for (int a = 0; a < WORDS; a++) begin
      rd_chk(a, st, "after recovery");
      check(st == '0, "rebuilt chip clean");
    end
    // ---- check chip lost, then a second chip during the recovery
    sensor_fault(8);
    n_pcycle++;
    while (!recov) @(posedge clk);
    sensor_fault(2);
    check(multi, "second chip failure flagged");
    if (multi) n_multi++;
    check(er_idx == 8, "first erasure kept");
    wait_idle();
    // mechanisms
    check(n_single > 0, "mechanism: single correction");
    check(n_double > 0, "mechanism: double detection");
    check(n_stall > 0, "mechanism: processor stall");
    check(n_periodic > 0 && n_scrub_fix > 0, "mechanism: periodic scrub corrections");
    check(n_pcycle > 0, "mechanism: power cycle");
    check(n_erased_rd > 0, "mechanism: erasure read");
    check(n_recovery > 0, "mechanism: recovery pass");
    check(n_multi > 0, "mechanism: multi erasure");
    $display("mechanisms: single=%0d double=%0d stall=%0d periodic=%0d scrub_fix=%0d power_cycle=%0d erased_read=%0d recovery=%0d multi=%0d",
             n_single, n_double, n_stall, n_periodic, n_scrub_fix, n_pcycle, n_erased_rd, n_recovery, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
