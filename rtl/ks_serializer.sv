// ks_serializer: turns the two key-stream bytes Z1 and Z2 of each unrolled
// RC4 loop into two serial key streams, KS_I from Z1 and KS_Q from Z2, one
// bit per rail per phi tick, most significant bit first.
//
// On a phi tick with `load` (CLK1 during PRGA) the bytes are taken in and
// their top bits are shown at once; on the other seven phi ticks of the
// group the next bits are shifted out. Every phi tick while enabled gives
// one new (ks_i, ks_q) pair, flagged by a one-cycle `ks_stb` in the cycle
// after the tick (outputs are registered). The bit order is this design's
// choice.
module ks_serializer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,        // PRGA_en
  input  logic       phi_en,
  input  logic       load,
  input  logic [7:0] z1,
  input  logic [7:0] z2,
  output logic       ks_i,
  output logic       ks_q,
  output logic       ks_stb
);
  logic [6:0] sh_i, sh_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_i   <= '0;
      sh_q   <= '0;
      ks_i   <= 1'b0;
      ks_q   <= 1'b0;
      ks_stb <= 1'b0;
    end else begin
      ks_stb <= en && phi_en;
      if (en && phi_en) begin
        if (load) begin
          ks_i <= z1[7];
          ks_q <= z2[7];
          sh_i <= z1[6:0];
          sh_q <= z2[6:0];
        end else begin
          ks_i <= sh_i[6];
          ks_q <= sh_q[6];
          sh_i <= {sh_i[5:0], 1'b0};
          sh_q <= {sh_q[5:0], 1'b0};
        end
      end
    end
  end
endmodule
