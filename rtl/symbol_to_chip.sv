// symbol_to_chip: spreads a 4-bit symbol into its 32-chip 802.15.4 PN
// sequence (62.5 ksymbol/s in, 2 Mchip/s out).
//
// Purely combinational look-up built from the symbol-0 sequence with the
// cyclic-shift and odd-chip-inversion rule of the standard (see pe_pkg).
// Output bit k is chip c_k; c_0 is transmitted first.
module symbol_to_chip
  import pe_pkg::*;
(
  input  logic [3:0] sym,
  output chipvec_t   chips
);
  always_comb chips = chip_seq(sym);
endmodule
