// tb_symbol_to_bit: random symbol pairs with random gaps; each byte must
// be {second symbol, first symbol}; `clr` must drop a half byte.
module tb_symbol_to_bit;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clr, sym_valid, byte_valid;
  logic [3:0] sym; logic [7:0] byte_data;
  symbol_to_bit dut (.*);
  task automatic send(input logic [3:0] s);
    @(negedge clk); sym = s; sym_valid = 1;
    @(negedge clk); sym_valid = 0;
    repeat ($urandom_range(3)) @(negedge clk);
  endtask
  initial begin
    logic [7:0] b;
    clr = 0; sym_valid = 0; sym = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (200) begin
      b = 8'($urandom);
      send(b[3:0]);
      checks++; if (byte_valid) begin failures++; $display("FAIL: early byte"); end
      @(negedge clk); sym = b[7:4]; sym_valid = 1;
      @(negedge clk); sym_valid = 0;
      checks += 2;
      if (!byte_valid) begin failures++; $display("FAIL: no byte"); end
      if (byte_data != b) begin failures++; $display("FAIL: byte %h vs %h", byte_data, b); end
    end
    send(4'h5);
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    send(4'h3); send(4'hC);
    @(negedge clk);
    checks++; if (byte_data != 8'hC3) begin failures++; $display("FAIL: clr %h", byte_data); end
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
