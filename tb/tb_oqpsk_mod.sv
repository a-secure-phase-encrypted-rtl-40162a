// tb_oqpsk_mod: feeds random chip vectors and advances with irregular
// strobes; pair p of each vector must be (c_2p, c_2p+1) as +1/-1 levels,
// `last` must mark pair 15, and a new vector must be taken in the cycle
// its predecessor's last pair is consumed so no strobe finds it empty.
module tb_oqpsk_mod;
  import pe_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  chipvec_t chips; logic chips_valid, chips_ready, adv, pair_valid, last, clr;
  logic signed [1:0] pair_i, pair_q;
  oqpsk_mod dut (.*);
  chipvec_t vecs [20];
  int nv = 0, np = 0;
  assign chips = vecs[nv];
  assign chips_valid = (nv < 20);
  always @(posedge clk) if (rst_n) begin
    if (chips_valid && chips_ready) nv <= nv + 1;
    if (adv && np < 320) begin
      int v, p;
      v = np / 16; p = np % 16;
      checks += 3;
      if (!pair_valid) begin failures++; $display("FAIL: empty at pair %0d", np); end
      if (pair_i != (vecs[v][2*p] ? 2'sd1 : -2'sd1) || pair_q != (vecs[v][2*p+1] ? 2'sd1 : -2'sd1)) begin
        failures++; $display("FAIL: pair %0d", np);
      end
      if (last != (p == 15)) begin failures++; $display("FAIL: last at %0d", np); end
      np <= np + 1;
    end
  end
  always @(negedge clk) adv <= rst_n && ($urandom_range(3) == 0);
  initial begin
    clr = 0; adv = 0;
    foreach (vecs[k]) vecs[k] = $urandom;
    repeat (2) @(posedge clk); rst_n = 1;
    wait (np == 320);
    repeat (5) @(posedge clk);
    checks++; if (pair_valid) begin failures++; $display("FAIL: still holds a pair"); end
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
