// tb_half_sine_shaper: sends random chip pairs every 16 cycles and
// compares every output sample with sign * round(127 * sin(pi*n/16)),
// the Q pulse being 8 samples behind the I pulse; checks zero output
// before the first and after the last pulse.
module tb_half_sine_shaper;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic stb;
  logic signed [1:0] chip_i, chip_q;
  logic signed [7:0] samp_i, samp_q;
  half_sine_shaper #(.SW(8), .AMP(127)) dut (.*);

  localparam int NP = 40;
  int ci [NP], cq [NP];
  int t_stb [NP];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int expect_at(input int t, input bit q);
    // value expected at cycle t (sampled after the edge of cycle t)
    for (int p = 0; p < NP; p++) begin
      int n;
      n = t - t_stb[p] - 1 - (q ? 8 : 0);
      if (n >= 0 && n < 16)
        return (q ? cq[p] : ci[p]) * int'($floor(127.0 * $sin(3.14159265358979 * n / 16.0) + 0.5));
    end
    return 0;
  endfunction

  initial begin
    stb = 0; chip_i = 0; chip_q = 0;
    for (int p = 0; p < NP; p++) begin
      ci[p] = $urandom_range(1) ? 1 : -1;
      cq[p] = $urandom_range(1) ? 1 : -1;
      t_stb[p] = 20 + 16 * p;
    end
    repeat (2) @(posedge clk); rst_n = 1;
  end

  always @(negedge clk) begin
    stb <= 1'b0;
    for (int p = 0; p < NP; p++)
      if (cyc == t_stb[p]) begin
        stb <= 1'b1; chip_i <= 2'(ci[p]); chip_q <= 2'(cq[p]);
      end
  end

  // compare just before each rising edge
  always @(negedge clk) begin
    if (rst_n && cyc > 2 && cyc < 20 + 16 * NP + 40) begin
      checks += 2;
      if (int'(samp_i) != expect_at(cyc, 0)) begin
        failures++; $display("FAIL: I at %0d: %0d vs %0d", cyc, samp_i, expect_at(cyc, 0));
      end
      if (int'(samp_q) != expect_at(cyc, 1)) begin
        failures++; $display("FAIL: Q at %0d: %0d vs %0d", cyc, samp_q, expect_at(cyc, 1));
      end
    end
    if (cyc == 20 + 16 * NP + 60) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
