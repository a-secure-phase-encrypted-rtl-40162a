// keystream_gen: RC4 key-stream generator with a loop-unrolled datapath,
// shared by the transmitter, the receiver and the secure header generator.
//
// Each unrolled loop performs two RC4 rounds (Table of the unrolled loop):
//   Circuit1  i1 = i0 + 1, i2 = i0 + 2
//   Circuit2  j1, j2 (rc4_circuit2)
//   Circuit3  S0[i1] <-> S0[j1], then S1[i2] <-> S1[j2]   (both in one step)
//   Circuit4  Z1 = S1[S0[i1] + S0[j1]], Z2 = S2[S1[i2] + S1[j2]]
// Circuit1/2 register i1, i2, j1, j2 on CLK1; Circuit3 swaps in register
// bank S on CLK3; Circuit4 reads the swapped bank on the following CLK1
// (undoing the second swap in its address logic to get S1) and loads the
// serializer, which shifts Z1 out on KS_I and Z2 on KS_Q.
// The same Circuit1-3 run the KSA (with the key bank K added in Circuit2)
// and the PRGA (K terms forced to zero).
//
// Sequence, controlled by KSA_en and PRGA_en:
//   both low      S = identity, K = secret key repeated to 256 bytes,
//                 i0 = 255 (so the first i1 is 0), j0 = 0.
//   KSA_en        128 loops of two KSA rounds at the system clock (two
//                 cycles per loop, 256 cycles, KSA_done). Then i0 = j0 = 0
//                 and `skip_loops`+1 more PRGA loops are run at the system
//                 clock without output: `skip_loops` loops are discarded
//                 (the receiver uses this to start at the key stream that
//                 follows the encrypted header) and one loop primes
//                 Circuit4. `ready` then rises and the clocks stop.
//   PRGA_en       one loop per 8 derived-clock ticks; every tick gives one
//                 key-stream bit per rail, flagged by ks_stb one cycle
//                 after the tick. The first bits are KS bytes 2*skip_loops
//                 (KS_I) and 2*skip_loops+1 (KS_Q) of the RC4 stream.
// Gated clocks of the original scheme are replaced by clock enables.
//
// Lint note: rst_n also appears in an assertion's `disable iff`, which a
// linter reports as a reset used both synchronously and asynchronously;
// the flops themselves use it only as an asynchronous reset.
module keystream_gen #(
  parameter int unsigned KEY_BYTES = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   derived_tick,   // 1 MHz chip-pair tick
  input  logic                   ksa_en,
  input  logic                   prga_en,
  input  logic [8*KEY_BYTES-1:0] key,            // byte 0 in bits 7:0
  input  logic [7:0]             skip_loops,
  output logic                   ksa_done,
  output logic                   ready,
  output logic                   ks_i,
  output logic                   ks_q,
  output logic                   ks_stb
);
  logic [7:0] s_bank [256];
  logic [7:0] k_bank [256];
  logic [7:0] i1_q, i2_q, j1_q, j2_q;
  logic [6:0] ksa_loops_q;
  logic [7:0] pre_loops_q;
  logic       phi_en, clk1_en, clk3_en;
  logic       idle;

  assign idle = !ksa_en && !prga_en;

  ks_clock_sched u_sched (
    .clk, .rst_n, .derived_tick, .ksa_en, .prga_en,
    .done(ready), .phi_en, .clk1_en, .clk3_en
  );

  // Circuit1
  logic [7:0] i1_n, i2_n, j1_n, j2_n;
  assign i1_n = i2_q + 8'd1;
  assign i2_n = i2_q + 8'd2;

  // Circuit2
  rc4_circuit2 u_c2 (
    .s_bank, .k_bank, .i1(i1_n), .i2(i2_n), .j0(j2_q),
    .prga_en(ksa_done), .j1(j1_n), .j2(j2_n)
  );

  // Circuit3 operands
  logic [7:0] v_i1, v_j1, u_i2, u_j2;
  always_comb begin
    v_i1 = s_bank[i1_q];
    v_j1 = s_bank[j1_q];
    u_i2 = (i2_q == j1_q) ? v_i1 : s_bank[i2_q];
    u_j2 = (j2_q == i1_q) ? v_j1 : ((j2_q == j1_q) ? v_i1 : s_bank[j2_q]);
  end

  // Circuit4: S here is S2 of the last loop; S1 is S2 with i2, j2 swapped back.
  function automatic logic [7:0] s1_at(input logic [7:0] a);
    if (a == i2_q)      return s_bank[j2_q];
    else if (a == j2_q) return s_bank[i2_q];
    else                return s_bank[a];
  endfunction

  logic [7:0] z1, z2, t1, t2;
  always_comb begin
    t1 = s1_at(i1_q) + s1_at(j1_q);
    z1 = s1_at(t1);
    t2 = s_bank[i2_q] + s_bank[j2_q];
    z2 = s_bank[t2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < 256; a++) begin
        s_bank[a] <= 8'(a);
        k_bank[a] <= '0;
      end
      i1_q <= '0; i2_q <= 8'hFF; j1_q <= '0; j2_q <= '0;
      ksa_loops_q <= '0;
      pre_loops_q <= '0;
      ksa_done    <= 1'b0;
      ready       <= 1'b0;
    end else if (idle) begin
      for (int a = 0; a < 256; a++) begin
        s_bank[a] <= 8'(a);
        k_bank[a] <= key[8*(a % KEY_BYTES) +: 8];
      end
      i1_q <= '0; i2_q <= 8'hFF; j1_q <= '0; j2_q <= '0;
      ksa_loops_q <= '0;
      pre_loops_q <= '0;
      ksa_done    <= 1'b0;
      ready       <= 1'b0;
    end else begin
      if (clk1_en) begin
        i1_q <= i1_n;
        i2_q <= i2_n;
        j1_q <= j1_n;
        j2_q <= j2_n;
      end
      if (clk3_en) begin
        s_bank[i1_q] <= v_j1;
        s_bank[j1_q] <= v_i1;
        s_bank[i2_q] <= u_j2;   // later writes win: second swap on top of first
        s_bank[j2_q] <= u_i2;
        if (!ksa_done) begin
          ksa_loops_q <= ksa_loops_q + 7'd1;
          if (ksa_loops_q == 7'd127) begin
            ksa_done <= 1'b1;
            i2_q     <= 8'd0;   // PRGA starts from i = j = 0
            j2_q     <= 8'd0;
          end
        end else if (!ready) begin
          pre_loops_q <= pre_loops_q + 8'd1;
          if (pre_loops_q == skip_loops) ready <= 1'b1;
        end
      end
    end
  end

  ks_serializer u_ser (
    .clk, .rst_n, .en(prga_en), .phi_en, .load(clk1_en),
    .z1, .z2, .ks_i, .ks_q, .ks_stb
  );

  // PRGA may only start once the generator is primed.
  assert property (@(posedge clk) disable iff (!rst_n) prga_en |-> ready);
endmodule
