// Self-checking test of secded_encoder.  Reference check bits are computed
// row by row (check bit r = parity of the data bits selected by row r of P),
// a different formulation from the encoder's column-wise XOR.  Also checks
// known columns of P and that every codeword has a zero syndrome.
module tb_secded_encoder;
  import hsiao_pkg::*;

  int checks = 0, failures = 0;
  logic  clk = 0;
  data_t d;
  cw_t   cw;

  secded_encoder dut (.data_i(d), .cw_o(cw));

  always #5 clk = ~clk;

  function automatic syn_t ref_check(data_t x);
    syn_t c;
    data_t rowmask;
    for (int r = 0; r < R; r++) begin
      rowmask = '0;
      for (int n = 0; n < K; n++) rowmask[n] = P_COLS[n][r];
      c[r] = ^(x & rowmask);
    end
    return c;
  endfunction

  task automatic apply(data_t x);
    d = x;
    #1;
    checks++;
    if (cw !== {ref_check(x), x} || syndrome(cw) != '0) begin
      failures++;
      $display("FAIL: data %h -> %h", x, cw);
    end
  endtask

  initial begin
    apply('0);
    checks++;
    if (cw[71:64] != 8'h00) failures++;
    apply(64'h1);
    checks++;
    if (cw[71:64] != 8'hc4) failures++;   // column of data bit 0
    apply(64'h8000_0000_0000_0000);
    checks++;
    if (cw[71:64] != 8'hf1) failures++;   // column of data bit 63
    for (int n = 0; n < K; n++) apply(data_t'(1) << n);
    for (int i = 0; i < 2000; i++) apply({$urandom, $urandom});
    apply('1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
