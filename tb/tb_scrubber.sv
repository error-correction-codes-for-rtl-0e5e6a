// Self-checking test of the scrubbing block with a 32-word memory (a plain
// array with one cycle of read latency, in this testbench) and the real
// codec between them.  Checks: the periodic pass starts SCRUB_PERIOD cycles
// after reset and takes exactly two cycles per word; single upsets are
// rewritten clean and counted; a double upset is left alone and counted; a
// power-cycle event sets the erasure, the restore starts a recovery pass
// from address 0 that rebuilds the wiped chip and then clears the erasure; a
// second failed chip sets multi_erasure; and scrub passes stay correct when
// a processor competes for the memory, and a restore that arrives while
// a periodic pass has a read granted is taken after that word.
module tb_scrubber;
  import hsiao_pkg::*;

  localparam int unsigned AW = 5, WORDS = 1 << AW;
  localparam longint unsigned PERIOD = 300;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [NBYTES-1:0] pcse = '0, restored = '0;
  logic req, gnt, wb, we, busy, recov, multi, er_en;
  logic [AW-1:0] addr;
  chip_idx_t er_idx;
  dec_status_t st;
  scrub_stats_t stats;
  logic proc_req = 0;
  longint cyc = 0;

  cw_t mem [WORDS];
  cw_t golden [WORDS];
  cw_t rdata, fixed, unused_wcw;
  data_t rd_d;
  syn_t syn;

  scrubber #(.ADDR_W(AW), .SCRUB_PERIOD(PERIOD)) dut (
    .clk(clk), .rst_n(rst_n), .pcse_i(pcse), .restored_i(restored),
    .req_o(req), .gnt_i(gnt), .wb_o(wb), .we_o(we), .addr_o(addr),
    .dec_status_i(st), .erase_en_o(er_en), .erase_idx_o(er_idx),
    .busy_o(busy), .recovery_o(recov), .multi_erasure_o(multi), .stats_o(stats)
  );

  secded_codec codec (
    .wr_data_i('0), .wr_cw_o(unused_wcw), .rd_cw_i(rdata), .erase_en_i(er_en),
    .erase_idx_i(er_idx), .rd_data_o(rd_d), .rd_cw_o(fixed),
    .rd_syndrome_o(syn), .rd_status_o(st)
  );

  assign gnt = !proc_req && !wb;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (we) mem[addr] <= fixed;
    else if (req && gnt) rdata <= mem[addr];
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  function automatic cw_t encode(data_t x);
    syn_t c;
    data_t rowmask;
    for (int r = 0; r < R; r++) begin
      rowmask = '0;
      for (int n = 0; n < K; n++) rowmask[n] = P_COLS[n][r];
      c[r] = ^(x & rowmask);
    end
    return {c, x};
  endfunction

  function automatic int count_bad();
    int n = 0;
    for (int a = 0; a < WORDS; a++) if (mem[a] != golden[a]) n++;
    return n;
  endfunction

  task automatic wait_pass(output longint start, output longint len);
    while (!busy) @(posedge clk);
    start = cyc;
    while (busy) @(posedge clk);
    len = cyc - start;
  endtask

  initial begin
    longint s, l, r0;
    int bad_addr, bit_pos;
    for (int a = 0; a < WORDS; a++) begin
      golden[a] = encode({$urandom, $urandom});
      mem[a] = golden[a];
    end
    rdata = '0;
    // upsets in 5 words, a double upset in one more
    for (int a = 0; a < 5; a++) begin
      bit_pos = $urandom_range(N-1);
      mem[3*a + 1] = mem[3*a + 1] ^ (cw_t'(1) << bit_pos);
    end
    bad_addr = 20;
    mem[bad_addr] = golden[bad_addr] ^ 72'h3;
    repeat (2) @(posedge clk);
    rst_n = 1;
    r0 = cyc;
    // ---- periodic pass
    wait_pass(s, l);
    check(s - r0 == PERIOD, $sformatf("periodic pass started at cycle %0d", s));
    check(l == 2 * WORDS, $sformatf("pass took %0d cycles for %0d words", l, WORDS));
    check(stats.passes == 1 && stats.corrected == 5 && stats.uncorrectable == 1, $sformatf("pass counters %0d %0d %0d", stats.passes, stats.corrected, stats.uncorrectable));
    check(count_bad() == 1 && mem[bad_addr] == (golden[bad_addr] ^ 72'h3), "upsets scrubbed, double left");
    mem[bad_addr] = golden[bad_addr];
    // ---- a chip is power-cycled
    @(negedge clk) pcse[3] = 1;
    @(negedge clk) pcse[3] = 0;
    check(er_en && er_idx == 3 && !multi, "erasure set on pcse");
    for (int a = 0; a < WORDS; a++) mem[a][8*3 +: 8] = 8'($urandom);
    repeat (10) @(posedge clk);
    @(negedge clk) restored[3] = 1;
    @(negedge clk) restored[3] = 0;
    check(busy && recov && addr == 0, "recovery pass started");
    wait_pass(s, l);
    check(!er_en && stats.recoveries == 1, "erasure cleared after recovery");
    check(count_bad() == 0, "wiped chip rebuilt");
    // ---- recovery with processor contention, then a second chip failure
    @(negedge clk) pcse[0] = 1;
    @(negedge clk) pcse[0] = 0;
    for (int a = 0; a < WORDS; a++) mem[a][7:0] = 8'($urandom);
    @(negedge clk) restored[0] = 1;
    @(negedge clk) restored[0] = 0;
    s = cyc;
    while (busy) begin
      @(negedge clk) proc_req = ($urandom_range(2) == 0);
      if (cyc - s == 7) pcse[6] = 1;
      else pcse[6] = 0;
    end
    proc_req = 0; pcse[6] = 0;
    check(cyc - s > 2 * WORDS, "contention slowed the pass");
    check(multi && er_idx == 0, "second chip flagged, first erasure kept");
    check(count_bad() == 0 && !er_en && stats.recoveries == 2, "recovery under contention");
    // ---- restore arriving while a periodic pass has a read granted
    while (!(busy && !recov && addr > 3)) @(negedge clk);
    pcse[5] = 1;
    @(negedge clk) pcse[5] = 0;
    for (int a = 0; a < WORDS; a++) mem[a][8*5 +: 8] = 8'($urandom);
    while (!(req && gnt)) @(negedge clk);
    restored[5] = 1;
    @(negedge clk) restored[5] = 0;
    check(wb && !recov, "granted read keeps its write-back slot");
    @(negedge clk);
    check(recov && addr == 0 && req, "recovery restarts from address 0 after the word");
    wait_pass(s, l);
    check(l == 2 * WORDS, $sformatf("recovery pass took %0d cycles", l));
    check(count_bad() == 0 && !er_en && stats.recoveries == 3, "recovery during periodic pass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a granted scrub read is always followed by its write-back slot
  always @(posedge clk) if (rst_n && $past(req && gnt) && !wb) begin
    failures++;
    $display("FAIL: write-back slot missing");
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
