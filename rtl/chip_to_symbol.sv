// chip_to_symbol: de-spreader. Compares a received 32-chip vector with the
// sixteen 802.15.4 chip sequences and picks the symbol whose sequence has
// the smallest Hamming distance (the largest correlation); on a tie the
// lower symbol wins. The sequences are at least 12 chips apart, so up to
// six chip errors are corrected. Registered: the decision and its distance
// appear with `sym_valid` in the cycle after `chips_valid`.
module chip_to_symbol
  import pe_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  chipvec_t   chips,
  input  logic       chips_valid,
  output logic [3:0] sym,
  output logic [5:0] min_dist,
  output logic       sym_valid
);
  logic [3:0] best_s;
  logic [5:0] best_d, d;

  always_comb begin
    best_s = '0;
    best_d = 6'd63;
    for (int s = 0; s < 16; s++) begin
      d = popcount32(chips ^ chip_seq(4'(s)));
      if (d < best_d) begin
        best_d = d;
        best_s = 4'(s);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym       <= '0;
      min_dist      <= '0;
      sym_valid <= 1'b0;
    end else begin
      sym_valid <= chips_valid;
      if (chips_valid) begin
        sym  <= best_s;
        min_dist <= best_d;
      end
    end
  end
endmodule
