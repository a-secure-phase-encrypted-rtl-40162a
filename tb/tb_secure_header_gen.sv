// tb_secure_header_gen: feeds random key-stream pairs while capturing and
// checks header pair p = preamble pair p XOR key pair p for all 128 pairs,
// that `hdr_valid` rises after the 128th, that later strobes change
// nothing, and that `start` clears `hdr_valid`.
module tb_secure_header_gen;
  import pe_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, capture, ks_stb, ks_i, ks_q, hdr_valid;
  logic [127:0] hdr_i, hdr_q;
  secure_header_gen dut (.*);
  string sym0 = "11011001110000110101001000101110";
  initial begin
    logic [127:0] ki, kq;
    start = 0; capture = 0; ks_stb = 0; ks_i = 0; ks_q = 0;
    ki = {$urandom, $urandom, $urandom, $urandom};
    kq = {$urandom, $urandom, $urandom, $urandom};
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0; capture = 1;
    for (int p = 0; p < 128; p++) begin
      checks++; if (hdr_valid) begin failures++; $display("FAIL: early valid at %0d", p); end
      ks_stb = 1; ks_i = ki[p]; ks_q = kq[p];
      @(negedge clk); ks_stb = 0;
      repeat ($urandom_range(3)) @(negedge clk);
    end
    checks++; if (!hdr_valid) begin failures++; $display("FAIL: no valid"); end
    ks_stb = 1; ks_i = !ks_i; @(negedge clk); ks_stb = 0;
    for (int p = 0; p < 128; p++) begin
      bit ci, cq;
      ci = (sym0[(2*p) % 32] == "1");
      cq = (sym0[(2*p + 1) % 32] == "1");
      checks += 2;
      if (hdr_i[p] != (ci ^ ki[p])) begin failures++; $display("FAIL: I pair %0d", p); end
      if (hdr_q[p] != (cq ^ kq[p])) begin failures++; $display("FAIL: Q pair %0d", p); end
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    checks++; if (hdr_valid) begin failures++; $display("FAIL: start did not clear"); end
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
