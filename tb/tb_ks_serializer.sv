// tb_ks_serializer: loads random byte pairs every 8th phi tick and checks
// that KS_I and KS_Q give Z1 and Z2 bit by bit, most significant first,
// with one strobe per phi tick, and that nothing comes out when disabled.
module tb_ks_serializer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en, phi_en, load, ks_i, ks_q, ks_stb;
  logic [7:0] z1, z2;
  ks_serializer dut (.*);
  initial begin
    logic [7:0] a, b;
    en = 0; phi_en = 0; load = 0; z1 = 0; z2 = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); phi_en = 1; load = 1; @(negedge clk);
    checks++; if (ks_stb) begin failures++; $display("FAIL: strobe while disabled"); end
    phi_en = 0; load = 0;
    en = 1;
    repeat (30) begin
      a = 8'($urandom); b = 8'($urandom);
      for (int k = 0; k < 8; k++) begin
        @(negedge clk);
        phi_en = 1; load = (k == 0); z1 = (k == 0) ? a : 8'($urandom); z2 = (k == 0) ? b : 8'($urandom);
        @(negedge clk);
        phi_en = 0; load = 0;
        checks += 2;
        if (!ks_stb) begin failures++; $display("FAIL: no strobe"); end
        if (ks_i != a[7-k] || ks_q != b[7-k]) begin failures++; $display("FAIL: bit %0d", k); end
        repeat ($urandom_range(3)) begin
          @(negedge clk);
          checks++; if (ks_stb) begin failures++; $display("FAIL: extra strobe"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
