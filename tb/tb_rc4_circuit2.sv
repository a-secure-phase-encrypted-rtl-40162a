// tb_rc4_circuit2: random register banks S (permutations) and K, random
// i0 and j0; the reference performs two plain RC4 rounds one after the
// other (with the first swap really done) in both KSA and PRGA mode and
// the j1, j2 of the circuit must match. Cases with i2 == j1 are forced
// regularly because they take the comparator path.
module tb_rc4_circuit2;
  int checks = 0, failures = 0, n_cmp = 0;
  logic [7:0] s_bank [256], k_bank [256];
  logic [7:0] i1, i2, j0, j1, j2;
  logic       prga_en;
  rc4_circuit2 dut (.s_bank, .k_bank, .i1, .i2, .j0, .prga_en, .j1, .j2);

  initial begin
    logic [7:0] s [256];
    logic [7:0] r1, r2, t, i0;
    for (int it = 0; it < 2000; it++) begin
      for (int a = 0; a < 256; a++) begin s[a] = 8'(a); k_bank[a] = 8'($urandom); end
      for (int a = 255; a > 0; a--) begin
        int b; b = $urandom_range(a); t = s[a]; s[a] = s[b]; s[b] = 8'(t);
      end
      i0 = 8'($urandom); j0 = 8'($urandom); prga_en = 1'($urandom);
      if (it % 4 == 0) begin
        // force j1 == i0 + 2: choose S[i1] so that j0 + S[i1] + K[i1] = i0 + 2
        logic [7:0] want; int pos;
        want = 8'(i0 + 2 - j0 - (prga_en ? 0 : k_bank[8'(i0 + 1)]));
        for (pos = 0; pos < 256; pos++) if (s[pos] == want) break;
        t = s[8'(i0 + 1)]; s[8'(i0 + 1)] = want; s[pos] = t;
      end
      for (int a = 0; a < 256; a++) s_bank[a] = s[a];
      i1 = i0 + 8'd1; i2 = i0 + 8'd2;
      // reference: two sequential rounds
      r1 = j0 + s[i1] + (prga_en ? 8'd0 : k_bank[i1]);
      t = s[i1]; s[i1] = s[r1]; s[r1] = t;
      r2 = r1 + s[i2] + (prga_en ? 8'd0 : k_bank[i2]);
      if (i2 == r1) n_cmp++;
      #1;
      checks += 2;
      if (j1 != r1) begin failures++; $display("FAIL: j1 %0d vs %0d", j1, r1); end
      if (j2 != r2) begin failures++; $display("FAIL: j2 %0d vs %0d (i2==j1: %0d)", j2, r2, i2 == r1); end
    end
    checks++;
    if (n_cmp == 0) begin failures++; $display("FAIL: comparator path never used"); end
    $display("comparator path used %0d times", n_cmp);
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
