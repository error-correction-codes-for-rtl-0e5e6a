// Self-checking test of secded_decoder.  Codewords are built in the
// testbench (row-wise parity, independent of the encoder RTL), then damaged:
// no error, every single bit error, random double errors, triple errors, and
// in erasure mode a random byte in each of the nine positions.  The expected
// correction and status flags follow from the rules of the code.
module tb_secded_decoder;
  import hsiao_pkg::*;

  int checks = 0, failures = 0;
  logic        clk = 0;
  cw_t         cw_in;
  logic        er_en;
  chip_idx_t   er_idx;
  data_t       d_out;
  cw_t         cw_out;
  syn_t        syn;
  dec_status_t st;

  secded_decoder dut (
    .cw_i(cw_in), .erase_en_i(er_en), .erase_idx_i(er_idx),
    .data_o(d_out), .cw_o(cw_out), .syndrome_o(syn), .status_o(st)
  );

  always #5 clk = ~clk;

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

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run(cw_t c, bit en, int idx);
    cw_in = c; er_en = en; er_idx = chip_idx_t'(idx);
    #1;
  endtask

  initial begin
    cw_t good, bad;
    data_t d;
    int a, b, c3;
    for (int t = 0; t < 300; t++) begin
      d = {$urandom, $urandom};
      good = encode(d);
      // clean
      run(good, 0, 0);
      check(cw_out == good && d_out == d && st == '0 && syn == '0, "clean word");
      // every single error
      for (int n = 0; n < N; n++) begin
        run(good ^ (cw_t'(1) << n), 0, 0);
        check(cw_out == good && st.single && !st.double_err && !st.other, $sformatf("single at %0d", n));
        check(syn == h_col(n), "syndrome of single error");
      end
      // double errors
      for (int i = 0; i < 20; i++) begin
        a = $urandom_range(N-1);
        do b = $urandom_range(N-1); while (b == a);
        run(good ^ (cw_t'(1) << a) ^ (cw_t'(1) << b), 0, 0);
        check(st.double_err && !st.single && !st.other, $sformatf("double at %0d,%0d", a, b));
      end
      // triple errors are never reported as clean
      a = $urandom_range(N-1);
      do b = $urandom_range(N-1); while (b == a);
      do c3 = $urandom_range(N-1); while (c3 == a || c3 == b);
      run(good ^ (cw_t'(1) << a) ^ (cw_t'(1) << b) ^ (cw_t'(1) << c3), 0, 0);
      check(st.single || st.other, "triple error seen");
      // byte erasure in each position
      for (int e = 0; e < NBYTES; e++) begin
        logic [7:0] junk;
        junk = 8'($urandom);
        bad = good;
        bad[8*e +: 8] = junk;
        run(bad, 1, e);
        check(cw_out == good && d_out == d, $sformatf("erasure of byte %0d", e));
        check(st.erased == (junk != good[8*e +: 8]) && !st.single && !st.double_err,
              "erasure status");
        // erasure mode on an intact word leaves it alone
        run(good, 1, e);
        check(cw_out == good && st == '0, "erasure mode, clean word");
      end
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
