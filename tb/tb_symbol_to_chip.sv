// tb_symbol_to_chip: compares the spreading table with the sixteen
// 802.15.4 2.4 GHz chip sequences written out chip by chip (c0 first), and
// checks that every two sequences are 12 to 20 chips apart.
module tb_symbol_to_chip;
  import pe_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] sym;
  chipvec_t   chips;
  symbol_to_chip dut (.sym, .chips);

  string ref_seq [16] = '{
    "11011001110000110101001000101110", "11101101100111000011010100100010",
    "00101110110110011100001101010010", "00100010111011011001110000110101",
    "01010010001011101101100111000011", "00110101001000101110110110011100",
    "11000011010100100010111011011001", "10011100001101010010001011101101",
    "10001100100101100000011101111011", "10111000110010010110000001110111",
    "01111011100011001001011000000111", "01110111101110001100100101100000",
    "00000111011110111000110010010110", "01100000011101111011100011001001",
    "10010110000001110111101110001100", "11001001011000000111011110111000"};
  chipvec_t tab [16];

  initial begin
    for (int s = 0; s < 16; s++) begin
      sym = 4'(s);
      #1;
      tab[s] = chips;
      for (int k = 0; k < 32; k++) begin
        checks++;
        if (chips[k] != (ref_seq[s][k] == "1")) begin
          failures++;
          $display("FAIL: symbol %0d chip %0d", s, k);
        end
      end
    end
    for (int a = 0; a < 16; a++)
      for (int b = a + 1; b < 16; b++) begin
        int d;
        d = $countones(tab[a] ^ tab[b]);
        checks++;
        if (d < 12 || d > 20) begin
          failures++;
          $display("FAIL: distance %0d-%0d = %0d", a, b, d);
        end
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
