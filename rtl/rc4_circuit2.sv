// rc4_circuit2: computes the two j indices of one unrolled RC4 loop (two
// RC4 rounds per loop), shared by the key scheduling (KSA) and the
// pseudo-random generation (PRGA).
//
//   j1 = j0 + S0[i1] + K[i1]
//   j2 = j1 + S1[i2] + K[i2]
//
// where S1 is S0 after the first swap S0[i1] <-> S0[j1]. Since i2 = i1 + 1
// never equals i1, S1[i2] is S0[i1] when i2 == j1 and S0[i2] otherwise. The
// circuit therefore reads S[i1], S[i2], K[i1], K[i2] through four 256:1
// multiplexers, forces the K terms to zero during PRGA with two 2:1
// multiplexers, forms j1 and both candidate j2 sums with three 3-input
// adders, and picks the right candidate with a comparator (i2 == j1) and a
// 2:1 multiplexer. All arithmetic is modulo 256. Combinational.
module rc4_circuit2 (
  input  logic [7:0] s_bank [256],   // register bank S (current S0)
  input  logic [7:0] k_bank [256],   // register bank K (repeated key)
  input  logic [7:0] i1,
  input  logic [7:0] i2,
  input  logic [7:0] j0,
  input  logic       prga_en,        // 1: PRGA (no key terms), 0: KSA
  output logic [7:0] j1,
  output logic [7:0] j2
);
  logic [7:0] s_i1, s_i2, k1, k2, sum_a, sum_b;

  always_comb begin
    s_i1  = s_bank[i1];
    s_i2  = s_bank[i2];
    k1    = prga_en ? 8'd0 : k_bank[i1];
    k2    = prga_en ? 8'd0 : k_bank[i2];
    j1    = j0 + s_i1 + k1;
    sum_a = j1 + s_i1 + k2;      // S1[i2] = S0[i1] (i2 was swapped away)
    sum_b = j1 + s_i2 + k2;      // S1[i2] = S0[i2]
    j2    = (i2 == j1) ? sum_a : sum_b;
  end
endmodule
