// Self-checking test of secded_codec: data go through the write path, the
// codeword is damaged as a memory would damage it (a single upset, a double
// upset, or a whole chip's byte lost with its position known) and comes back
// through the read path.  Expected results follow from the code's rules.
module tb_secded_codec;
  import hsiao_pkg::*;

  int checks = 0, failures = 0;
  logic        clk = 0;
  data_t       wd, rd;
  cw_t         wcw, rcw, fixed;
  logic        er_en;
  chip_idx_t   er_idx;
  syn_t        syn;
  dec_status_t st;

  secded_codec dut (
    .wr_data_i(wd), .wr_cw_o(wcw), .rd_cw_i(rcw), .erase_en_i(er_en),
    .erase_idx_i(er_idx), .rd_data_o(rd), .rd_cw_o(fixed),
    .rd_syndrome_o(syn), .rd_status_o(st)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    cw_t good;
    int a, b;
    for (int t = 0; t < 3000; t++) begin
      wd = {$urandom, $urandom};
      er_en = 0; er_idx = 0;
      #1;
      good = wcw;
      check(good[63:0] == wd && syndrome(good) == '0, "encode");
      rcw = good; #1;
      check(rd == wd && st == '0, "clean read");
      a = $urandom_range(N-1);
      rcw = good ^ (cw_t'(1) << a); #1;
      check(rd == wd && fixed == good && st.single, "single upset");
      do b = $urandom_range(N-1); while (b == a);
      rcw = good ^ (cw_t'(1) << a) ^ (cw_t'(1) << b); #1;
      check(st.double_err && !st.single, "double upset");
      er_en = 1; er_idx = chip_idx_t'($urandom_range(NBYTES-1));
      rcw = good;
      rcw[8*er_idx +: 8] = 8'($urandom);
      #1;
      check(rd == wd && fixed == good && !st.single && !st.double_err, "chip byte lost");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
