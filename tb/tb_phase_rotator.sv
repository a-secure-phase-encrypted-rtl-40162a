// tb_phase_rotator: drives random soft samples and key bits through the
// rotator and checks c = a*Re{d} + j*b*Im{d} (key bit 1 = -1), that the
// four key values give the four QPSK rotations of a +1+j symbol, and that
// applying the same key twice restores the sample (decryption).
module tb_phase_rotator;
  int checks = 0, failures = 0;
  logic signed [7:0] in_i, in_q, out_i, out_q, back_i, back_q;
  logic a, b;
  phase_rotator #(.W(8)) dut  (.in_i, .in_q, .key_a(a), .key_b(b), .out_i, .out_q);
  phase_rotator #(.W(8)) dut2 (.in_i(out_i), .in_q(out_q), .key_a(a), .key_b(b),
                               .out_i(back_i), .out_q(back_q));
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    for (int k = 0; k < 4; k++) begin
      {a, b} = 2'(k); in_i = 8'sd1; in_q = 8'sd1;
      #1;
      check(out_i == (a ? -8'sd1 : 8'sd1) && out_q == (b ? -8'sd1 : 8'sd1),
            $sformatf("rotation of 1+j by key %0d", k));
    end
    repeat (500) begin
      in_i = 8'($urandom_range(254)) - 8'sd127;
      in_q = 8'($urandom_range(254)) - 8'sd127;
      a = 1'($urandom); b = 1'($urandom);
      #1;
      check(int'(out_i) == (a ? -1 : 1) * int'(in_i), "I product");
      check(int'(out_q) == (b ? -1 : 1) * int'(in_q), "Q product");
      check(back_i == in_i && back_q == in_q, "decryption restores the sample");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
