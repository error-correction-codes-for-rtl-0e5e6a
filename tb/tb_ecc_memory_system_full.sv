// Test of ecc_memory_system at its default size: 2**29 codewords (4 GB of
// data), 10-minute scrub period, 1 ms power-off and 200 us settle at
// 533 MHz.  Nine sparse behavioural chips hold only what is written.  The
// processor writes and reads words spread over the whole address range,
// single upsets are corrected, a double upset is detected, and one chip is
// power-cycled through its current sensor: while it is off and after it is
// back, reads are rebuilt from the erasure.  The recovery pass that follows
// (2**30 cycles) is started and checked to run, but not waited for.
module tb_ecc_memory_system_full;
  import hsiao_pkg::*;

  localparam int unsigned AW = 29;
  localparam int unsigned NT = 40;

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

  logic [AW-1:0] addrs [NT];
  data_t         golden [NT];

  ecc_memory_system dut (
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
    mem_chip_model #(.ADDR_W(AW), .SEED(8'(29 * i + 1))) u_chip (
      .clk(clk), .power_i(pwr[i]), .en_i(m_en), .we_i(m_we), .addr_i(m_addr),
      .wdata_i(m_wdata[i]), .rdata_o(m_rdata[i])
    );
    always @(flip_ev) if (flip_chip == i) u_chip.flip_bit(flip_addr, flip_pos);
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  task automatic wr(logic [AW-1:0] a, data_t d);
    @(negedge clk);
    p_req = 1; p_we = 1; p_addr = a; p_wdata = d;
    @(posedge clk);
    while (!p_gnt) @(posedge clk);
    @(negedge clk) p_req = 0;
  endtask

  task automatic rd(logic [AW-1:0] a, output data_t d, output dec_status_t st);
    @(negedge clk);
    p_req = 1; p_we = 0; p_addr = a;
    @(posedge clk);
    while (!p_gnt) @(posedge clk);
    @(negedge clk) p_req = 0;
    check(p_rvalid, "read valid");
    d = p_rdata; st = p_st;
  endtask

  initial begin
    data_t d;
    dec_status_t st;
    automatic int n_erased = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    addrs[0] = '0;
    addrs[1] = '1;
    for (int i = 2; i < NT; i++) addrs[i] = AW'($urandom);
    for (int i = 0; i < NT; i++) begin
      golden[i] = {$urandom, $urandom};
      wr(addrs[i], golden[i]);
    end
    for (int i = 0; i < NT; i++) begin
      rd(addrs[i], d, st);
      check(d == golden[i] && st == '0, $sformatf("read %h", addrs[i]));
    end
    // upsets
    for (int i = 0; i < 9; i++) begin
      flip_chip = i; flip_addr = addrs[i]; flip_pos = i % 8;
      -> flip_ev;
      #1;
      rd(addrs[i], d, st);
      check(d == golden[i] && st.single, "single upset corrected");
    end
    flip_chip = 3; flip_addr = addrs[20]; flip_pos = 0; -> flip_ev; #1;
    flip_chip = 3; flip_addr = addrs[20]; flip_pos = 1; -> flip_ev; #1;
    rd(addrs[20], d, st);
    check(st.double_err, "double upset detected");
    // rewrite the damaged words, as a scrub pass would: an upset left in a
    // word cannot be corrected on top of an erasure
    for (int i = 0; i < 9; i++) wr(addrs[i], golden[i]);
    wr(addrs[20], golden[20]);
    // hard SEFI on chip 7
    @(negedge clk) oc[7] = 1;
    repeat (5) @(posedge clk);
    @(negedge clk) oc[7] = 0;
    check(!pwr[7] && er_en && er_idx == 7, "chip 7 off, erasure set");
    for (int i = 0; i < NT; i += 3) begin
      rd(addrs[i], d, st);
      check(d == golden[i], "read while chip off");
      if (st.erased) n_erased++;
    end
    while (!recov) @(posedge clk);
    check(pwr[7] && busy, "chip back, recovery pass running");
    for (int i = 0; i < NT; i++) begin
      rd(addrs[i], d, st);
      check(d == golden[i], "read during recovery");
      if (st.erased) n_erased++;
    end
    check(n_erased > 0, "erasure reads seen");
    repeat (1000) @(posedge clk);
    check(busy && recov && er_en, "recovery pass still running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
