// Checks the parity-check matrix in hsiao_pkg against the rules of the code:
// every column nonzero, all 72 distinct, odd weight (56 of weight 3 and 8 of
// weight 5 in P), the check byte's submatrix the identity, every 8x8 byte
// submatrix of full rank over GF(2) (rank found here by an independent
// XOR-basis method), and HINV[b] times H_b equal to the identity.
module tb_hsiao_pkg;
  import hsiao_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int rank8(logic [7:0] cols [8]);
    logic [7:0] basis [8];
    int nb = 0;
    logic [7:0] x;
    for (int i = 0; i < 8; i++) begin
      x = cols[i];
      for (int j = 0; j < nb; j++)
        if ((x ^ basis[j]) < x) x ^= basis[j];
      if (x != 0) begin
        basis[nb] = x;
        nb++;
        // keep the basis in echelon form by leading bit
        for (int j = nb - 1; j > 0; j--)
          if (basis[j] > basis[j-1]) begin
            logic [7:0] t = basis[j]; basis[j] = basis[j-1]; basis[j-1] = t;
          end
      end
    end
    return nb;
  endfunction

  initial begin
    automatic int w3 = 0, w5 = 0;
    int rowsum [8];
    logic [7:0] cols [8];
    logic [7:0] prod;
    for (int r = 0; r < 8; r++) rowsum[r] = 0;
    for (int n = 0; n < N; n++) begin
      automatic syn_t c = h_col(n);
      check(c != 0, $sformatf("column %0d is zero", n));
      check($countones(c) % 2 == 1, $sformatf("column %0d has even weight", n));
      for (int m = 0; m < n; m++)
        check(h_col(m) != c, $sformatf("columns %0d and %0d equal", m, n));
      if (n < K) begin
        if ($countones(c) == 3) w3++;
        if ($countones(c) == 5) w5++;
        for (int r = 0; r < 8; r++) rowsum[r] += c[r];
      end
    end
    check(w3 == 56, $sformatf("%0d weight-3 columns", w3));
    check(w5 == 8, $sformatf("%0d weight-5 columns", w5));
    for (int r = 0; r < 8; r++) check(rowsum[r] == 26, $sformatf("row %0d of P weight %0d", r, rowsum[r]));
    for (int k = 0; k < 8; k++) check(h_col(64 + k) == (8'h01 << k), "check byte not identity");
    for (int b = 0; b < NBYTES; b++) begin
      for (int k = 0; k < 8; k++) cols[k] = h_col(8*b + k);
      check(rank8(cols) == 8, $sformatf("byte %0d submatrix singular", b));
      // HINV[b] * H_b * e_k must give e_k
      for (int k = 0; k < 8; k++) begin
        prod = '0;
        for (int r = 0; r < 8; r++)
          if (cols[k][r]) prod ^= HINV[b][r];
        check(prod == (8'h01 << k), $sformatf("HINV[%0d] wrong at column %0d", b, k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
