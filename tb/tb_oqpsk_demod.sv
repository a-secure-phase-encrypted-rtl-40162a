// tb_oqpsk_demod: sends soft samples of random chip vectors (I for even
// chips, Q for odd ones, random magnitudes, positive for chip 1) and
// checks every collected vector and the single valid pulse per 16 pairs.
module tb_oqpsk_demod;
  import pe_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clr, stb, chips_valid;
  logic signed [7:0] in_i, in_q;
  chipvec_t chips;
  oqpsk_demod #(.W(8)) dut (.*);
  function automatic logic signed [7:0] lvl(input bit c);
    int m; m = $urandom_range(127);
    return c ? 8'(m) : 8'(-m - 1);
  endfunction
  initial begin
    chipvec_t v;
    int nvalid;
    clr = 1; stb = 0; in_i = 0; in_q = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); clr = 0;
    repeat (30) begin
      v = $urandom;
      nvalid = 0;
      for (int p = 0; p < 16; p++) begin
        @(negedge clk);
        stb = 1; in_i = lvl(v[2*p]); in_q = lvl(v[2*p+1]);
        @(negedge clk);
        stb = 0;
        if (chips_valid) nvalid++;
        repeat ($urandom_range(4)) begin @(negedge clk); if (chips_valid) nvalid++; end
        if (p == 15) begin
          checks += 2;
          if (nvalid != 1) begin failures++; $display("FAIL: %0d valid pulses", nvalid); end
          if (chips != v) begin failures++; $display("FAIL: chips %h vs %h", chips, v); end
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
