// tb_chip_to_symbol: takes each symbol's sequence (from the standard's
// table written out here), flips 0 to 6 random chips and checks the
// de-spreader returns the symbol and the number of flipped chips as the
// distance; one cycle latency.
module tb_chip_to_symbol;
  import pe_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  chipvec_t chips; logic chips_valid, sym_valid;
  logic [3:0] sym; logic [5:0] min_dist;
  chip_to_symbol dut (.*);
  string ref_seq [16] = '{
    "11011001110000110101001000101110", "11101101100111000011010100100010",
    "00101110110110011100001101010010", "00100010111011011001110000110101",
    "01010010001011101101100111000011", "00110101001000101110110110011100",
    "11000011010100100010111011011001", "10011100001101010010001011101101",
    "10001100100101100000011101111011", "10111000110010010110000001110111",
    "01111011100011001001011000000111", "01110111101110001100100101100000",
    "00000111011110111000110010010110", "01100000011101111011100011001001",
    "10010110000001110111101110001100", "11001001011000000111011110111000"};
  initial begin
    chipvec_t v;
    int s, ne;
    chips = 0; chips_valid = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (600) begin
      s = $urandom_range(15);
      ne = $urandom_range(6);
      for (int k = 0; k < 32; k++) v[k] = (ref_seq[s][k] == "1");
      for (int e = 0; e < ne; e++) begin
        int k;
        do k = $urandom_range(31); while (v[k] != (ref_seq[s][k] == "1"));
        v[k] = !v[k];
      end
      @(negedge clk); chips = v; chips_valid = 1;
      @(negedge clk); chips_valid = 0;
      checks += 3;
      if (!sym_valid) begin failures++; $display("FAIL: no valid"); end
      if (sym != 4'(s)) begin failures++; $display("FAIL: sym %0d vs %0d (%0d errors)", sym, s, ne); end
      if (min_dist != 6'(ne)) begin failures++; $display("FAIL: distance %0d vs %0d", min_dist, ne); end
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
