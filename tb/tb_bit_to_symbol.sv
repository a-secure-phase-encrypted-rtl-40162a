// tb_bit_to_symbol: random bytes in with random valid gaps, random ready
// stalls on the symbol side; every byte must come out as its low nibble
// then its high nibble, in order, with nothing lost or repeated.
module tb_bit_to_symbol;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] byte_data; logic byte_valid, byte_ready, clr;
  logic [3:0] sym; logic sym_valid, sym_ready;
  bit_to_symbol dut (.*);
  logic [7:0] bytes [200];
  int nin = 0, nout = 0;
  assign byte_data = bytes[nin];
  always @(posedge clk) if (rst_n) begin
    if (byte_valid && byte_ready) nin <= nin + 1;
    if (sym_valid && sym_ready) begin
      logic [3:0] e;
      e = (nout % 2 == 0) ? bytes[nout/2][3:0] : bytes[nout/2][7:4];
      checks++;
      if (sym != e) begin failures++; $display("FAIL: symbol %0d: %h vs %h", nout, sym, e); end
      nout <= nout + 1;
    end
  end
  always @(negedge clk) begin
    byte_valid <= (nin < 200) && ($urandom_range(3) != 0);
    sym_ready  <= ($urandom_range(2) != 0);
  end
  initial begin
    clr = 0; byte_valid = 0; sym_ready = 0;
    foreach (bytes[k]) bytes[k] = 8'($urandom);
    repeat (2) @(posedge clk); rst_n = 1;
    wait (nout == 400);
    repeat (10) @(posedge clk);
    checks++; if (nout != 400) begin failures++; $display("FAIL: extra symbols"); end
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
